// fd_data_slower: coarse frequency detector for frequency decrement acquisition.
//
// It detects that the input data rate is lower than twice the clock rate by
// catching a run of '1' data during which the clock makes a rising and then a
// falling edge, i.e. a high data interval longer than half a clock period:
//   * FF1 (D tied high) is set by the rising clock edge and held cleared while
//     the data is low, so Q1 is high from the first clock rise inside a '1'
//     run until the data falls.
//   * FF2 samples Q1 on the falling clock edge: DN1 goes high when the data
//     was still high half a clock period after that rise. It holds one
//     clock period.
//   * FF3, clocked on the falling edge of CK/2, re-samples DN1 into DN2, and
//     DN = DN1 | DN2 stretches each decision by up to two clock periods.
// Note that a run of two or more '1' bits also fires DN when the loop is at
// lock; the coarse detector therefore ignores DN once its STOP flag is set.
// The structure follows the published circuit; the divide-by-two flip-flop
// that makes CK/2 (toggling on the rising clock edge) is this design's choice.
// CKQ is accepted for interface compatibility and unused. No reset is needed.
`timescale 1ps / 1fs
module fd_data_slower (
  input  logic din,   // serial NRZ data
  input  logic cki,   // in-phase half-rate clock (CK)
  input  logic ckq,   // quadrature clock, unused by this detector
  output logic dn     // request to lower the clock frequency
);

  logic q1, dn1, dn2, ck_div2;

  // FF1: set by the rising clock, asynchronously cleared while data is low.
  always_ff @(posedge cki or negedge din) begin
    if (!din) q1 <= 1'b0;
    else      q1 <= 1'b1;
  end

  // FF2: data stayed high through to the following falling clock edge.
  always_ff @(negedge cki) dn1 <= q1;

  // CK/2 and the pulse-extension flip-flop.
  always_ff @(posedge cki) ck_div2 <= ~ck_div2;
  always_ff @(negedge ck_div2) dn2 <= dn1;

  assign dn = dn1 | dn2;

endmodule
