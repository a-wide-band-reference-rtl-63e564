// lol_detector: loss-of-lock detector (LoLD).
//
// It is armed only while LOCK_FD is high. It then counts fine-detector events
// in consecutive windows of LOL_WINDOW CKI cycles. A change of the input data
// rate pushes the frequency error out of the lock region, the events become
// frequent, and as soon as LOL_EVENTS of them fall in one window the detector
// drives LLD high for LLD_CYCLES cycles. LLD resets the frequency detector (the
// STOP flag of the coarse detector and the lock detector), which starts a new
// acquisition from the present VCO frequency. While LLD is high the window
// counters stay cleared. Watching the fine-detector output and resetting the
// loop with LLD follow the published design; the windowed event count and all
// three numbers are this design's own choice. rst_n is asynchronous active low.
// LLD rises one CKI cycle after the event that completes the count.
`timescale 1ps / 1fs
module lol_detector #(
  parameter int unsigned LOL_WINDOW = 512,
  parameter int unsigned LOL_EVENTS = 12,
  parameter int unsigned LLD_CYCLES = 64
) (
  input  logic clk,      // CKI
  input  logic rst_n,
  input  logic lock,     // LOCK_FD
  input  logic ffd_evt,  // one-cycle fine-detector event
  output logic lld       // loss-of-lock pulse
);

  localparam int unsigned WW = $clog2(LOL_WINDOW + 1);
  localparam int unsigned EW = $clog2(LOL_EVENTS + 1);
  localparam int unsigned PW = $clog2(LLD_CYCLES + 1);

  logic [WW-1:0] win;
  logic [EW-1:0] events;
  logic [PW-1:0] pulse;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win    <= '0;
      events <= '0;
      pulse  <= '0;
      lld    <= 1'b0;
    end else if (pulse != '0) begin
      pulse  <= pulse - 1'b1;
      lld    <= (pulse != PW'(1));
      win    <= '0;
      events <= '0;
    end else if (!lock) begin
      win    <= '0;
      events <= '0;
      lld    <= 1'b0;
    end else if (ffd_evt && (events == EW'(LOL_EVENTS - 1))) begin
      pulse  <= PW'(LLD_CYCLES);
      lld    <= 1'b1;
      win    <= '0;
      events <= '0;
    end else if (win == WW'(LOL_WINDOW - 1)) begin
      win    <= '0;
      events <= '0;
      lld    <= 1'b0;
    end else begin
      win    <= win + 1'b1;
      events <= events + EW'(ffd_evt);
      lld    <= 1'b0;
    end
  end

endmodule
