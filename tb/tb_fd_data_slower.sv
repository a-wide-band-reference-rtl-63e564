// tb_fd_data_slower: directed test of the decrement-acquisition detector.
// CK has a 1000 ps period, rising at 500 + 1000n and falling at 1000n.
// A data-high interval that contains a rising clock edge followed by a falling
// clock edge must raise DN at that falling edge; shorter intervals must not.
// The pulse extension is checked as in the increment detector: after a long
// DN1, DN stays high past the clock fall that clears DN1 and drops within two
// further clock periods.
`timescale 1ps / 1fs
module tb_fd_data_slower;
  int checks = 0, failures = 0;
  logic din = 1'b0, cki = 1'b0, ckq = 1'b0, dn;

  fd_data_slower dut (.din(din), .cki(cki), .ckq(ckq), .dn(dn));

  always #500 cki = ~cki;
  always @(cki) ckq <= #250 cki;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic high_at(input longint t0, input longint t1);
    #(t0 - $time) din = 1'b1;
    #(t1 - t0)    din = 1'b0;
  endtask

  initial begin
    #(6000 - $time);
    check(dn == 1'b0, "idle with data low");
    // 6550..6900: no clock rise inside -> nothing.
    high_at(6550, 6900);
    #(8100 - $time);
    check(dn == 1'b0, "no DN for short high interval");
    // 8400..9100: rise at 8500 and fall at 9000 inside -> DN at 9000.
    fork
      high_at(8400, 9100);
      begin #(9001 - $time); check(dn == 1'b1, "DN at clock fall"); end
    join
    // Long run 10400..16100 keeps DN1 high until the clock fall at 17000.
    high_at(10400, 16100);
    #(16900 - $time);
    check(dn == 1'b1, "DN held through long run");
    #(17050 - $time);
    check(dn == 1'b1, "DN extended by DN2 after DN1 cleared");
    #(19100 - $time);
    check(dn == 1'b0, "DN drops after CK/2 samples DN1 low");
    // Random single intervals.
    for (int i = 0; i < 200; i++) begin
      longint t0, w, r;
      logic exp_dn1;
      t0 = $time + 4200 + longint'($urandom_range(999));
      w  = 100 + longint'($urandom_range(1400));
      // first rising clock edge at or after t0, then its falling edge
      r = ((t0 - 500 + 999) / 1000) * 1000 + 500;
      exp_dn1 = (r + 500) < (t0 + w);
      fork
        high_at(t0, t0 + w);
        if (exp_dn1) begin
          #(r + 501 - $time);
          check(dn == 1'b1, $sformatf("random long interval %0d", i));
        end
      join
      if (!exp_dn1) begin
        #3100;
        check(dn == 1'b0, $sformatf("random short interval %0d", i));
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
