// tb_prbs7: checks the PRBS7 generator against the recurrence of its
// polynomial, computed here from the output bits alone: o[n+7] = o[n] ^ o[n+1].
// It also checks that the first seven bits are the seed (MSB first), that the
// sequence repeats after exactly 127 bits, that one period holds 64 ones, and
// that one bit comes out per clock.
`timescale 1ps / 1fs
module tb_prbs7;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, dout;
  logic [6:0] seed = 7'h35;
  bit o [0:400];
  int ones;

  prbs7 #(.SEED(7'h35)) dut (.clk(clk), .rst_n(rst_n), .dout(dout));

  always #500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1200 rst_n = 1'b1;
    #100 o[0] = dout;   // before the first shift at 1500
    for (int n = 1; n <= 400; n++) begin
      @(negedge clk);
      o[n] = dout;
    end
    for (int n = 0; n < 7; n++) check(o[n] == seed[6-n], $sformatf("seed bit %0d", n));
    for (int n = 0; n + 7 <= 400; n++)
      check(o[n+7] == (o[n] ^ o[n+1]), $sformatf("recurrence at bit %0d", n));
    for (int n = 0; n + 127 <= 400; n++)
      check(o[n+127] == o[n], $sformatf("period 127 at bit %0d", n));
    ones = 0;
    for (int n = 0; n < 127; n++) ones += int'(o[n]);
    check(ones == 64, $sformatf("ones per period %0d", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
