// tb_mdqfd: checks the fine detector against a reference that works from the
// data-edge times alone. CKI has a 1000 ps period and rises at 0 + 1000n; CKQ
// lags by 250 ps. A data edge at phase p (0..1) of the clock period falls in
// state 1 (p < .25), 2 (< .5), 3 (< .75) or 4. UP must be high exactly when
// the previous rising data edge was in state 2 and the present one in state 1,
// DN when it was in state 2 and the present one in state 3. Edges are kept
// 50 ps away from the state boundaries so the reference is unambiguous.
`timescale 1ps / 1fs
module tb_mdqfd;
  import fll_pkg::*;
  int checks = 0, failures = 0;
  logic data = 1'b0, cki = 1'b0, ckq = 1'b0;
  updn_t fine;
  int n_up = 0, n_dn = 0;

  mdqfd dut (.data(data), .cki(cki), .ckq(ckq), .fine(fine));

  initial forever begin
    cki = 1'b1; #250 ckq = 1'b1; #250 cki = 1'b0; #250 ckq = 1'b0; #250;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic int state_of(input int phase_ps);
    return phase_ps / 250 + 1;
  endfunction

  // Rising data edge at the given phase of the next-but-one clock period.
  task automatic edge_at(input int phase_ps);
    longint t;
    t = ((longint'($time) / 1000) + 2) * 1000 + phase_ps;
    #(t - $time) data = 1'b1;
    #100 data = 1'b0;
  endtask

  int prev, cur, ph;
  logic exp_up, exp_dn;

  initial begin
    // Directed: 2 -> 1 is UP, 2 -> 3 is DN, 2 -> 2 and 1 -> 2 are neither.
    edge_at(375); edge_at(125);
    check(fine.up == 1'b1 && fine.dn == 1'b0, "state 2 -> 1 gives UP");
    edge_at(375); edge_at(625);
    check(fine.up == 1'b0 && fine.dn == 1'b1, "state 2 -> 3 gives DN");
    edge_at(375); edge_at(375);
    check(fine.up == 1'b0 && fine.dn == 1'b0, "state 2 -> 2 gives nothing");
    edge_at(125); edge_at(375);
    check(fine.up == 1'b0 && fine.dn == 1'b0, "state 1 -> 2 gives nothing");
    // Random walk of edges, weighted towards state 2.
    prev = state_of(375);
    for (int i = 0; i < 400; i++) begin
      ph = ($urandom_range(3) == 0) ? (300 + int'($urandom_range(150)))
                                    : (int'($urandom_range(3)) * 250 + 50 + int'($urandom_range(150)));
      cur = state_of(ph);
      edge_at(ph);
      exp_up = (prev == 2) && (cur == 1);
      exp_dn = (prev == 2) && (cur == 3);
      n_up += int'(exp_up);
      n_dn += int'(exp_dn);
      check(fine.up == exp_up && fine.dn == exp_dn,
            $sformatf("edge %0d: state %0d -> %0d gave up=%0b dn=%0b", i, prev, cur, fine.up, fine.dn));
      prev = cur;
    end
    check(n_up > 5 && n_dn > 5, "random walk covered both directions");
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
