// prbs7: pseudo-random binary sequence generator, PRBS7 (x^7 + x^6 + 1).
//
// A 7-bit Fibonacci LFSR shifts once per rising edge of clk and emits one bit
// per clock, so the data rate equals the clock rate. The sequence repeats every
// 127 bits and holds runs of up to seven ones and six zeros. The polynomial and
// the seed are the usual PRBS7 choices, not taken from the published design;
// rst_n is asynchronous and active low and loads SEED (which must not be zero).
`timescale 1ps / 1fs
module prbs7 #(
  parameter logic [6:0] SEED = 7'h7F
) (
  input  logic clk,
  input  logic rst_n,
  output logic dout
);

  logic [6:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= SEED;
    else        lfsr <= {lfsr[5:0], lfsr[6] ^ lfsr[5]};
  end

  assign dout = lfsr[6];

endmodule
