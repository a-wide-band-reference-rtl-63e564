// fd: the bidirectional reference-less frequency detector.
//
// It combines the coarse detector (cfd), the fine two-phase quadricorrelator
// (mdqfd) and the lock / loss-of-lock detectors. The fine requests feed the
// coarse detector's output multiplexers, so one UP_FD/DN_FD pair drives the
// charge pump. The lock detector raises LOCK_FD once the fine detector goes
// quiet; afterwards the loss-of-lock detector watches the same events and
// pulses LLD when they become frequent. LLD clears the STOP flag of the coarse
// detector and the lock detector, which starts a new acquisition. The block
// split and the LLD feedback follow the published block diagram. The event
// synchroniser and the reset combination r = !rst_n | LLD are this design's
// choices. LOCK_FD and LLD do not gate UP_FD/DN_FD.
// Timing: UP_FD/DN_FD are combinational from flip-flops clocked by the data,
// the clock and CK/2; LOCK_FD and LLD are registered on CKI.
// CKI clocks the lock logic and also clears a flip-flop of the increment
// detector asynchronously while low; that mixed use is part of the coarse
// detector circuit and is intended.
`timescale 1ps / 1fs
module fd
  import fll_pkg::*;
#(
  parameter int unsigned LOCK_CYCLES = 512,
  parameter int unsigned LOL_WINDOW  = 512,
  parameter int unsigned LOL_EVENTS  = 12,
  parameter int unsigned LLD_CYCLES  = 64
) (
  input  logic  rst_n,    // asynchronous, active low
  input  logic  din,      // serial data
  input  logic  cki,      // in-phase half-rate clock from the VCO
  input  logic  ckq,      // quadrature clock from the VCO
  output updn_t fd_out,   // UP_FD / DN_FD to the charge pump
  output logic  lock_fd,  // frequency lock
  output logic  lld,      // loss-of-lock pulse
  output logic  stop,     // STOP flag of the coarse detector
  output updn_t coarse,   // UP_C / DN_C
  output updn_t fine      // UP_F / DN_F
);

  logic r, ffd_evt;

  assign r = ~rst_n | lld;

  mdqfd u_ffd (.data(din), .cki(cki), .ckq(ckq), .fine(fine));

  cfd u_cfd (
    .r(r), .din(din), .cki(cki), .ckq(ckq),
    .fine(fine), .fd(fd_out), .stop(stop), .coarse(coarse)
  );

  ffd_event_sync u_sync (.clk(cki), .rst_n(rst_n), .fine(fine), .evt(ffd_evt));

  lock_detector #(.LOCK_CYCLES(LOCK_CYCLES)) u_ld (
    .clk(cki), .rst_n(rst_n), .clr(lld), .ffd_evt(ffd_evt), .lock(lock_fd)
  );

  lol_detector #(
    .LOL_WINDOW(LOL_WINDOW), .LOL_EVENTS(LOL_EVENTS), .LLD_CYCLES(LLD_CYCLES)
  ) u_lold (
    .clk(cki), .rst_n(rst_n), .lock(lock_fd), .ffd_evt(ffd_evt), .lld(lld)
  );

endmodule
