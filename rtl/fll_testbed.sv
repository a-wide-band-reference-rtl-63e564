// fll_testbed: the continuous-rate test set-up around the FLL.
//
// Two PRBS7 generators, clocked at two different bit rates F_CK1 and F_CK2,
// feed a 2:1 multiplexer; S = 0 selects the first stream, S = 1 the second.
// The selected data goes to the FLL. Switching S changes the data rate
// abruptly, which is how the loop's loss-of-lock detection and bidirectional
// re-acquisition are exercised. The set-up (two generators, mux, FLL and the
// outputs VC, LOCK_FD, LLD and F_CK) follows the published simulation model;
// F_CK here is the recovered in-phase clock. The FLL contains behavioural
// analog models, so the set-up simulates but does not synthesise.
// The recovered clock also acts as an asynchronous clear inside the coarse
// increment detector, by design of that circuit.
`timescale 1ps / 1fs
module fll_testbed
  import fll_pkg::*;
#(
  parameter int unsigned LOCK_CYCLES = 512,
  parameter int unsigned LOL_WINDOW  = 512,
  parameter int unsigned LOL_EVENTS  = 12,
  parameter int unsigned LLD_CYCLES  = 64
) (
  input  logic  rst_n,    // asynchronous, active low
  input  logic  f_ck1,    // bit clock of the first data stream
  input  logic  f_ck2,    // bit clock of the second data stream
  input  logic  s,        // data select: 0 = first stream, 1 = second
  output real   vc,       // VCO control voltage
  output real   freq_hz,  // VCO frequency
  output logic  f_ck,     // recovered clock (CKI)
  output logic  f_ckq,    // recovered quadrature clock (CKQ)
  output logic  lock_fd,
  output logic  lld,
  output logic  stop,
  output logic  din,      // data seen by the FLL
  output updn_t fd_out,
  output updn_t coarse,
  output updn_t fine
);

  logic d1, d2;

  prbs7 #(.SEED(7'h7F)) u_prbs1 (.clk(f_ck1), .rst_n(rst_n), .dout(d1));
  prbs7 #(.SEED(7'h35)) u_prbs2 (.clk(f_ck2), .rst_n(rst_n), .dout(d2));

  assign din = s ? d2 : d1;

  fll #(
    .LOCK_CYCLES(LOCK_CYCLES), .LOL_WINDOW(LOL_WINDOW),
    .LOL_EVENTS(LOL_EVENTS), .LLD_CYCLES(LLD_CYCLES)
  ) u_fll (
    .rst_n(rst_n), .din(din), .vc(vc), .freq_hz(freq_hz),
    .cki(f_ck), .ckq(f_ckq), .lock_fd(lock_fd), .lld(lld), .stop(stop),
    .fd_out(fd_out), .coarse(coarse), .fine(fine)
  );

endmodule
