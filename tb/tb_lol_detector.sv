// tb_lol_detector: checks the loss-of-lock detector against a cycle-level
// reference written here: armed only while lock is high, it counts events in
// windows of LOL_WINDOW cycles, fires when LOL_EVENTS fall in one window, and
// then holds LLD for exactly LLD_CYCLES cycles. Run with a window of 32
// cycles, 4 events and an 8-cycle pulse. The test drives lock the way the
// lock detector would (it drops one cycle after LLD rises).
`timescale 1ps / 1fs
module tb_lol_detector;
  localparam int unsigned W = 32, E = 4, P = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, lock = 1'b0, ffd_evt = 1'b0, lld;
  int win, events, pulse, n_fire = 0, len;
  logic exp_lld;

  lol_detector #(.LOL_WINDOW(W), .LOL_EVENTS(E), .LLD_CYCLES(P)) dut (
    .clk(clk), .rst_n(rst_n), .lock(lock), .ffd_evt(ffd_evt), .lld(lld));

  always #500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin win = 0; events = 0; pulse = 0; exp_lld = 1'b0; end
    else if (pulse > 0) begin pulse--; exp_lld = (pulse > 0); win = 0; events = 0; end
    else if (!lock) begin win = 0; events = 0; exp_lld = 1'b0; end
    else begin
      events += int'(ffd_evt);
      if (events >= E) begin pulse = P; exp_lld = 1'b1; win = 0; events = 0; n_fire++; end
      else begin
        win++;
        if (win == W) begin win = 0; events = 0; end
        exp_lld = 1'b0;
      end
    end
  end

  initial begin
    #2200 rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      check(lld == exp_lld, $sformatf("cycle %0d lld=%0b expected %0b", i, lld, exp_lld));
      // lock: dropped by LLD, re-acquired after a random while
      if (lld) lock = 1'b0;
      else if (!lock && $urandom_range(49) == 0) lock = 1'b1;
      // event density changes every 500 cycles: sparse or dense
      ffd_evt = ((i / 500) % 2 == 0) ? ($urandom_range(19) == 0) : ($urandom_range(3) == 0);
    end
    check(n_fire >= 3, $sformatf("LLD fired %0d times", n_fire));
    // Pulse length and latency, directed.
    @(negedge clk); lock = 1'b1; ffd_evt = 1'b0;
    repeat (W + 2) @(negedge clk);
    repeat (E) begin ffd_evt = 1'b1; @(negedge clk); end
    ffd_evt = 1'b0;
    check(lld == 1'b1, "LLD one cycle after the event completing the count");
    len = 0;
    while (lld && len < 100) begin len++; @(negedge clk); end
    check(len == P, $sformatf("LLD lasted %0d cycles", len));
    // Unarmed: no LLD without lock, whatever the events.
    lock = 1'b0; ffd_evt = 1'b1;
    repeat (3 * W) begin @(negedge clk); check(lld == 1'b0, "no LLD while unlocked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
