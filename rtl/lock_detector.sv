// lock_detector: frequency lock detector (LD).
//
// The fine detector stays silent when the frequency error is inside its
// smallest region around zero, and fires more and more often as the error
// grows. The lock detector therefore counts CKI cycles since the last
// fine-detector event and raises LOCK_FD once LOCK_CYCLES cycles have passed
// without one. LOCK_FD then stays high: deciding that lock was lost is the job
// of the loss-of-lock detector, whose LLD pulse (input clr) clears this block
// together with the rest of the loop. Monitoring the fine-detector output is
// the published principle; the quiet-interval criterion and LOCK_CYCLES are
// this design's own choice. rst_n is asynchronous active low, clr synchronous.
`timescale 1ps / 1fs
module lock_detector #(
  parameter int unsigned LOCK_CYCLES = 512
) (
  input  logic clk,      // CKI
  input  logic rst_n,
  input  logic clr,      // LLD: restart lock detection
  input  logic ffd_evt,  // one-cycle fine-detector event
  output logic lock      // LOCK_FD
);

  localparam int unsigned CW = $clog2(LOCK_CYCLES + 1);

  logic [CW-1:0] quiet;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quiet <= '0;
      lock  <= 1'b0;
    end else if (clr) begin
      quiet <= '0;
      lock  <= 1'b0;
    end else if (ffd_evt) begin
      quiet <= '0;
    end else if (!lock) begin
      if (quiet == CW'(LOCK_CYCLES - 1)) lock <= 1'b1;
      quiet <= quiet + 1'b1;
    end
  end

endmodule
