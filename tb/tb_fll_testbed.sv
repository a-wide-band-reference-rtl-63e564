// tb_fll_testbed: end-to-end run of the continuous-rate set-up with every
// parameter at its default. The VCO starts at 400 MHz. With S = 0 the FLL sees
// 2 Gb/s PRBS7 data and must acquire upwards (increment acquisition) and raise
// LOCK_FD with the clock within 3 % of 1 GHz. Then S switches to the 1.5 Gb/s
// stream: LLD must pulse, LOCK_FD drop, and the loop must acquire downwards
// (decrement acquisition) and lock again within 3 % of 750 MHz.
// The test counts each mechanism of the design and fails any that never
// happened: STOP set, STOP cleared by LLD, UP_C, DN_C reaching DN_FD while
// STOP is low, UP_F, DN_F, LOCK_FD, LLD, and the VCO moving up and down.
// The bit clocks carry +-1 ps of random jitter per half period. A spurious
// LLD while locked at 2 Gb/s is tolerated (the loop re-acquires) and reported;
// the rate change is applied once a lock has held for 2 us.
`timescale 1ps / 1fs
module tb_fll_testbed;
  import fll_pkg::*;
  int checks = 0, failures = 0;
  logic rst_n = 1'b0, f_ck1 = 1'b0, f_ck2 = 1'b0, s = 1'b0;
  real vc, freq_hz, f_lock1, f_lock2, f_start, t_lock1, t_switch, t_lock2;
  logic f_ck, f_ckq, lock_fd, lld, stop, din;
  updn_t fd_out, coarse, fine;

  int n_stop_set = 0, n_stop_clr = 0, n_up_c = 0, n_dn_c_pass = 0;
  int n_up_f = 0, n_dn_f = 0, n_lock = 0, n_lld = 0;

  fll_testbed dut (
    .rst_n(rst_n), .f_ck1(f_ck1), .f_ck2(f_ck2), .s(s), .vc(vc), .freq_hz(freq_hz),
    .f_ck(f_ck), .f_ckq(f_ckq), .lock_fd(lock_fd), .lld(lld), .stop(stop), .din(din),
    .fd_out(fd_out), .coarse(coarse), .fine(fine));

  always #(249 + $urandom_range(2)) f_ck1 = ~f_ck1;   // 2 Gb/s
  always #(332 + $urandom_range(2)) f_ck2 = ~f_ck2;   // 1.5 Gb/s

  always @(posedge stop) n_stop_set++;
  always @(negedge stop) if (rst_n) n_stop_clr++;
  always @(posedge coarse.up) n_up_c++;
  always @(posedge coarse.dn) if (!stop && fd_out.dn) n_dn_c_pass++;
  always @(posedge fine.up) n_up_f++;
  always @(posedge fine.dn) n_dn_f++;
  always @(posedge lock_fd) n_lock++;
  always @(posedge lld) n_lld++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic wait_lock(input real limit_ps, output bit got);
    real t_end;
    t_end = $realtime + limit_ps;
    got = 1'b0;
    while (!got && $realtime < t_end) begin
      #1000;
      got = lock_fd;
    end
  endtask

  bit got;

  int n_lld_at_switch;

  initial begin
    #1 f_start = freq_hz;
    #20000 rst_n = 1'b1;
    check(f_start > 399.0e6 && f_start < 401.0e6, "VCO starts at 400 MHz");
    // First acquisition at 2 Gb/s.
    wait_lock(40.0e6, got);
    check(got, "lock at 2 Gb/s");
    f_lock1 = freq_hz; t_lock1 = $realtime;
    $display("locked at %0.2f us, %0.2f MHz", t_lock1 / 1e6, f_lock1 / 1e6);
    check(f_lock1 > 970.0e6 && f_lock1 < 1030.0e6, $sformatf("lock frequency %0.2f MHz", f_lock1 / 1e6));
    // Wait for a lock that holds for 2 us (a spurious LLD restarts the
    // acquisition; the number of those is reported), then change the rate.
    begin
      int n0, tries;
      tries = 0;
      n0 = n_lld;
      #2000000;
      while ((n_lld != n0 || !lock_fd) && tries < 10) begin
        tries++;
        wait_lock(40.0e6, got);
        n0 = n_lld;
        #2000000;
      end
    end
    check(lock_fd == 1'b1, "lock held for 2 us at 2 Gb/s");
    $display("LLD pulses while locked at 2 Gb/s: %0d", n_lld);
    s = 1'b1; t_switch = $realtime;
    n_lld_at_switch = n_lld;
    while (n_lld == n_lld_at_switch && $realtime < t_switch + 5.0e6) #1000;
    check(n_lld > n_lld_at_switch, "LLD after the rate change");
    $display("LLD %0.3f us after the switch", ($realtime - t_switch) / 1e6);
    #2000;
    check(lock_fd == 1'b0, "LOCK_FD dropped by LLD");
    wait_lock(40.0e6, got);
    check(got, "lock again at 1.5 Gb/s");
    f_lock2 = freq_hz; t_lock2 = $realtime;
    $display("locked again %0.2f us after the switch, %0.2f MHz", (t_lock2 - t_switch) / 1e6, f_lock2 / 1e6);
    check(f_lock2 > 727.5e6 && f_lock2 < 772.5e6, $sformatf("second lock frequency %0.2f MHz", f_lock2 / 1e6));
    #1000000;
    $display("mechanisms: stop_set=%0d stop_clr=%0d up_c=%0d dn_c_pass=%0d up_f=%0d dn_f=%0d lock=%0d lld=%0d",
             n_stop_set, n_stop_clr, n_up_c, n_dn_c_pass, n_up_f, n_dn_f, n_lock, n_lld);
    check(n_stop_set > 0, "STOP set");
    check(n_stop_clr > 0, "STOP cleared by LLD");
    check(n_up_c > 0, "UP_C fired");
    check(n_dn_c_pass > 0, "DN_C reached DN_FD with STOP low");
    check(n_up_f > 0, "UP_F fired");
    check(n_dn_f > 0, "DN_F fired");
    check(n_lock >= 2, "LOCK_FD raised twice");
    check(n_lld > 0, "LLD fired");
    check(f_lock1 > f_start, "increment acquisition");
    check(f_lock2 < f_lock1, "decrement acquisition");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #150000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
