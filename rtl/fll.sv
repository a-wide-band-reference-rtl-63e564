// fll: the half-rate reference-less frequency-locked loop.
//
// The frequency detector compares the incoming data with the VCO's quadrature
// clocks CKI/CKQ and drives the charge pump, whose capacitor voltage VC tunes
// the VCO. No reference clock is used: the data itself is the reference. The
// loop first acquires coarsely in whichever direction is needed, hands over to
// the fine detector, raises LOCK_FD when the fine detector goes quiet, and
// restarts through LLD if the data rate changes. The loop structure follows
// the published block diagram. The charge pump, capacitor and VCO are
// behavioural models, so this module simulates but does not synthesise.
// The recovered clock also acts as an asynchronous clear inside the coarse
// increment detector, by design of that circuit.
`timescale 1ps / 1fs
module fll
  import fll_pkg::*;
#(
  parameter int unsigned LOCK_CYCLES = 512,
  parameter int unsigned LOL_WINDOW  = 512,
  parameter int unsigned LOL_EVENTS  = 12,
  parameter int unsigned LLD_CYCLES  = 64
) (
  input  logic  rst_n,    // asynchronous, active low (digital part only)
  input  logic  din,      // serial NRZ data
  output real   vc,       // VCO control voltage
  output real   freq_hz,  // VCO frequency (model observation)
  output logic  cki,      // recovered in-phase clock (F_CK)
  output logic  ckq,      // recovered quadrature clock
  output logic  lock_fd,
  output logic  lld,
  output logic  stop,
  output updn_t fd_out,   // UP_FD / DN_FD
  output updn_t coarse,   // UP_C / DN_C
  output updn_t fine      // UP_F / DN_F
);

  fd #(
    .LOCK_CYCLES(LOCK_CYCLES), .LOL_WINDOW(LOL_WINDOW),
    .LOL_EVENTS(LOL_EVENTS), .LLD_CYCLES(LLD_CYCLES)
  ) u_fd (
    .rst_n(rst_n), .din(din), .cki(cki), .ckq(ckq),
    .fd_out(fd_out), .lock_fd(lock_fd), .lld(lld), .stop(stop),
    .coarse(coarse), .fine(fine)
  );

  charge_pump u_cp (.fd(fd_out), .vc(vc));

  wideband_vco u_vco (.vc(vc), .cki(cki), .ckq(ckq), .freq_hz(freq_hz));

endmodule
