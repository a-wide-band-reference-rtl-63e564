// ffd_event_sync: brings the fine-detector decisions into the VCO clock domain.
//
// UP_F and DN_F are levels produced by flip-flops clocked by the data. Their OR
// is passed through a two-flop synchroniser clocked by CKI, and a third flop
// turns each rising edge into a one-cycle event pulse. The lock and
// loss-of-lock detectors count these events. An event is seen if the request
// lasts at least about two clock periods, which holds at and near lock, where
// a request lasts until the next rising data edge. The synchroniser is this
// design's own choice. rst_n is asynchronous, active low. Latency: two to three
// CKI cycles from the request to the event pulse.
`timescale 1ps / 1fs
module ffd_event_sync
  import fll_pkg::*;
(
  input  logic  clk,     // CKI
  input  logic  rst_n,
  input  updn_t fine,    // UP_F / DN_F, asynchronous to clk
  output logic  evt      // one-cycle pulse per fine-detector request
);

  logic [2:0] sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[1:0], fine.up | fine.dn};
  end

  assign evt = sync[1] & ~sync[2];

endmodule
