// cfd: coarse frequency detector with automatic hand-over to the fine detector.
//
// Two unilateral detectors run all the time: fd_data_slower gives DN_C when the
// data is slower than the clock, fd_data_faster gives UP_C when it is faster.
// A STOP flip-flop (D tied high) is set by the first rising edge of UP_C and
// cleared by R. STOP selects, through two 2:1 multiplexers, how the coarse and
// fine (UP_F/DN_F from the M-DQFD) requests reach the charge pump:
//   STOP = 0 : UP_FD = UP_C          DN_FD = DN_C | DN_F
//   STOP = 1 : UP_FD = UP_C | UP_F   DN_FD = DN_F
// An acquisition therefore first pulls the frequency down (when the clock is
// too fast) until the data looks faster than the clock; from then on the coarse
// decrement path is ignored, the fine detector steers the loop and UP_C dies
// out by itself near lock. Because both detectors share one output pair, one
// charge pump serves both. All of this follows the published block diagram.
// R is asynchronous and active high (system reset or the loss-of-lock pulse).
// The outputs are combinational from the detector flip-flops.
`timescale 1ps / 1fs
module cfd
  import fll_pkg::*;
(
  input  logic  r,      // asynchronous clear of STOP, active high
  input  logic  din,    // serial data
  input  logic  cki,    // in-phase half-rate clock
  input  logic  ckq,    // quadrature clock
  input  updn_t fine,   // UP_F / DN_F from the fine detector
  output updn_t fd,     // UP_FD / DN_FD to the charge pump
  output logic  stop,   // STOP flag
  output updn_t coarse  // UP_C / DN_C, brought out for observation
);

  fd_data_slower u_slower (.din(din), .cki(cki), .ckq(ckq), .dn(coarse.dn));
  fd_data_faster u_faster (.din(din), .cki(cki), .ckq(ckq), .up(coarse.up));

  always_ff @(posedge coarse.up or posedge r) begin
    if (r) stop <= 1'b0;
    else   stop <= 1'b1;
  end

  always_comb begin
    fd.dn = stop ? fine.dn : (coarse.dn | fine.dn);
    fd.up = stop ? (coarse.up | fine.up) : coarse.up;
  end

endmodule
