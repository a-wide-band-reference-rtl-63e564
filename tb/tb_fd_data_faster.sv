// tb_fd_data_faster: directed test of the increment-acquisition detector.
// CK has a 1000 ps period, rising at 500 + 1000n and falling at 1000n.
// A '1' bit that starts and ends inside one high phase must raise UP at its
// falling edge; a bit that crosses the falling clock edge must not. The
// pulse extension is checked by letting UP1 stay high long enough for CK/2 to
// capture it, then clearing UP1: UP must stay high until the next falling edge
// of CK/2 (at most two clock periods) and then drop.
`timescale 1ps / 1fs
module tb_fd_data_faster;
  int checks = 0, failures = 0;
  logic din = 1'b0, cki = 1'b0, ckq = 1'b0, up;

  fd_data_faster dut (.din(din), .cki(cki), .ckq(ckq), .up(up));

  always #500 cki = ~cki;
  always @(cki) ckq <= #250 cki;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // A '1' bit from t0 to t1 (absolute times).
  task automatic bit_at(input longint t0, input longint t1);
    #(t0 - $time) din = 1'b1;
    #(t1 - t0)    din = 1'b0;
  endtask

  initial begin
    // Clear UP1 with a non-fitting bit, then wait for UP2 to drain.
    bit_at(1800, 2200);
    #(6000 - $time);
    check(up == 1'b0, "idle after non-fitting bit");
    // Fitting bit: 6600..6900 inside the high phase 6500..7000.
    bit_at(6600, 6900);
    #1;
    check(up == 1'b1, "UP at end of fitting bit");
    // Hold three clock periods: UP1 stays, UP2 captures it.
    #(10000 - $time);
    check(up == 1'b1, "UP held until next data fall");
    // Non-fitting bit 10800..11200 crosses the clock fall at 11000.
    bit_at(10800, 11200);
    #1;
    check(up == 1'b1, "UP extended by UP2 after UP1 cleared");
    #(13300 - $time);
    check(up == 1'b0, "UP drops after CK/2 samples UP1 low");
    // Bit starting before the clock rise: 12400..12700 (rise at 12500).
    bit_at(14400, 14700);
    #1;
    check(up == 1'b0, "no UP for a bit crossing the clock rise");
    // Random bits, each checked against the fit rule on UP's rising edge.
    for (int i = 0; i < 200; i++) begin
      longint t0, w;
      logic exp_up1;
      t0 = $time + 4200 + longint'($urandom_range(999));
      w  = 100 + longint'($urandom_range(600));
      // fits iff both edges lie in the same high phase [500+1000n, 1000n+1000)
      exp_up1 = ((t0 % 1000) > 500) && (((t0 + w) % 1000) > 500) && ((t0 / 1000) == ((t0 + w) / 1000));
      bit_at(t0, t0 + w);
      #1;
      if (exp_up1) check(up == 1'b1, $sformatf("random fitting bit %0d", i));
      else begin
        // after a non-fitting bit UP1 is low; UP2 drains within 2 periods
        #2100;
        check(up == 1'b0, $sformatf("random non-fitting bit %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
