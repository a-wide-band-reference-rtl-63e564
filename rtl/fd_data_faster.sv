// fd_data_faster: coarse frequency detector for frequency increment acquisition.
//
// It detects that the input data rate is higher than twice the clock rate
// (half-rate operation) by catching a single '1' bit that starts and ends inside
// one high phase of the clock:
//   * FF1 (D tied high) is set by the rising data edge and held cleared while
//     CK is low, so Q2 is high only from a data rise to the next clock fall.
//   * FF2 samples Q2 on the falling data edge: UP1 goes high when the data bit
//     ended before the clock fell, i.e. the bit was shorter than half a clock
//     period. UP1 holds until the next falling data edge.
//   * FF3, clocked on the falling edge of CK/2 (the clock divided by two),
//     re-samples UP1 into UP2, and UP = UP1 | UP2. This stretches each UP
//     decision by up to two clock periods, which raises the average
//     charge-pump drive and shortens acquisition.
// The structure (three flip-flops and the OR gate) follows the published
// circuit. The divide-by-two flip-flop that makes CK/2 from CK is this design's
// own choice; it toggles on the rising clock edge. CKQ is accepted for
// interface compatibility with the coarse detector but the circuit uses only CKI.
// Nothing here has a reset: every flip-flop is overwritten within two clock
// periods or two data bits of start-up.
// The clock is used both as a clock and as FF1's asynchronous clear, as the
// circuit requires; lint tools flag that mixed use, and it is intended.
`timescale 1ps / 1fs
module fd_data_faster (
  input  logic din,   // serial NRZ data
  input  logic cki,   // in-phase half-rate clock (CK)
  input  logic ckq,   // quadrature clock, unused by this detector
  output logic up     // request to raise the clock frequency
);

  logic q2, up1, up2, ck_div2;

  // FF1: set by rising data, asynchronously cleared while CK is low.
  always_ff @(posedge din or negedge cki) begin
    if (!cki) q2 <= 1'b0;
    else      q2 <= 1'b1;
  end

  // FF2: the bit fitted inside the clock high phase if Q2 is still set
  // when the data falls.
  always_ff @(negedge din) up1 <= q2;

  // CK/2 and the pulse-extension flip-flop.
  always_ff @(posedge cki) ck_div2 <= ~ck_div2;
  always_ff @(negedge ck_div2) up2 <= up1;

  assign up = up1 | up2;

endmodule
