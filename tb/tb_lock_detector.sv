// tb_lock_detector: LOCK must rise exactly LOCK_CYCLES clock cycles after the
// last fine-detector event (counted here cycle by cycle), stay high through
// later events, and be cleared by clr and by reset. Run with LOCK_CYCLES = 20.
`timescale 1ps / 1fs
module tb_lock_detector;
  localparam int unsigned LC = 20;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, ffd_evt = 1'b0, lock;
  int quiet;

  lock_detector #(.LOCK_CYCLES(LC)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .ffd_evt(ffd_evt), .lock(lock));

  always #500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Reference: lock after LC consecutive event-free cycles since the last
  // event or clear, sticky until clr.
  logic exp_lock;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin quiet = 0; exp_lock = 1'b0; end
    else if (clr) begin quiet = 0; exp_lock = 1'b0; end
    else if (ffd_evt) quiet = 0;
    else if (!exp_lock) begin quiet++; if (quiet == LC) exp_lock = 1'b1; end
  end

  int lock_rises = 0;
  always @(posedge lock) lock_rises++;

  initial begin
    #2200 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(lock == exp_lock, $sformatf("cycle %0d lock=%0b expected %0b", i, lock, exp_lock));
      // events: frequent in bursts, rare between them
      ffd_evt = ((i / 300) % 2 == 0) ? ($urandom_range(9) == 0) : ($urandom_range(99) == 0);
      clr = ($urandom_range(499) == 0);
    end
    check(lock_rises >= 2, "lock reached more than once");
    // Exact latency from a single event.
    @(negedge clk); clr = 1'b1; ffd_evt = 1'b0;
    @(negedge clk); clr = 1'b0; ffd_evt = 1'b1;
    @(negedge clk); ffd_evt = 1'b0;
    repeat (LC - 1) begin @(negedge clk); check(lock == 1'b0, "not yet locked"); end
    @(negedge clk); check(lock == 1'b1, "locked after LOCK_CYCLES quiet cycles");
    rst_n = 1'b0; #1;
    check(lock == 1'b0, "reset clears lock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
