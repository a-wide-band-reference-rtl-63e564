// tb_fll: closed-loop test of the FLL across its range. The test itself
// generates random NRZ data (+-1 ps jitter per bit) and steps the bit rate
// through 2.4 Gb/s, 1.7 Gb/s and 1.1 Gb/s: a wide increment acquisition from
// the 400 MHz start, then two decrements of about 30 %. Larger steps are less
// reliable: at a small-integer ratio between the old clock and the new bit
// rate (e.g. 2.5 Gb/s to 0.5 Gb/s) the fine detector sees no phase drift, LLD
// does not fire and the loop holds a false lock. For each rate it waits for LOCK_FD (and,
// after a change, for the LLD pulse that restarts acquisition), lets the lock
// hold for 1 us, and checks that the VCO ran within 3 % of half the bit rate
// when LOCK_FD rose and is still within 8 % after the hold (the loop keeps
// wandering slowly while locked, since nothing stops the fine detector).
// The VCO starts at 400 MHz. Default loop parameters.
`timescale 1ps / 1fs
module tb_fll;
  import fll_pkg::*;
  int checks = 0, failures = 0;
  logic rst_n = 1'b0, din = 1'b0;
  real vc, freq_hz;
  logic cki, ckq, lock_fd, lld, stop;
  updn_t fd_out, coarse, fine;
  real bit_ps = 400.0;
  int n_lld = 0;
  real rates [3] = '{2.4e9, 1.7e9, 1.1e9};

  fll dut (.rst_n(rst_n), .din(din), .vc(vc), .freq_hz(freq_hz), .cki(cki), .ckq(ckq),
           .lock_fd(lock_fd), .lld(lld), .stop(stop), .fd_out(fd_out), .coarse(coarse), .fine(fine));

  always begin
    #(bit_ps - 1.0 + real'($urandom_range(2)));
    din = 1'($urandom_range(1));
  end

  always @(posedge lld) n_lld++;

  real f_at_lock;
  always @(posedge lock_fd) f_at_lock = freq_hz;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Wait until LOCK_FD has been high for 1 us without an LLD in between.
  task automatic wait_stable_lock(input real limit_ps, output bit got);
    real t_end;
    int n0;
    t_end = $realtime + limit_ps;
    got = 1'b0;
    while (!got && $realtime < t_end) begin
      while (!lock_fd && $realtime < t_end) #1000;
      n0 = n_lld;
      #1000000;
      got = lock_fd && (n_lld == n0);
    end
  endtask

  bit got;
  real target, t0;
  int n_before;

  initial begin
    #20000 rst_n = 1'b1;
    foreach (rates[i]) begin
      n_before = n_lld;
      bit_ps = 1.0e12 / rates[i];
      target = rates[i] / 2.0;
      t0 = $realtime;
      if (i > 0) begin
        while (n_lld == n_before && $realtime < t0 + 5.0e6) #1000;
        check(n_lld > n_before, $sformatf("LLD after change to %0.2f Gb/s", rates[i] / 1e9));
      end
      wait_stable_lock(60.0e6, got);
      check(got, $sformatf("lock at %0.2f Gb/s", rates[i] / 1e9));
      $display("rate %0.2f Gb/s: locked after %0.2f us at %0.2f MHz (target %0.2f MHz)",
               rates[i] / 1e9, ($realtime - t0) / 1e6, freq_hz / 1e6, target / 1e6);
      check(f_at_lock > 0.97 * target && f_at_lock < 1.03 * target,
            $sformatf("frequency at LOCK_FD %0.2f MHz for target %0.2f MHz", f_at_lock / 1e6, target / 1e6));
      check(freq_hz > 0.92 * target && freq_hz < 1.08 * target,
            $sformatf("frequency 1 us later %0.2f MHz for target %0.2f MHz", freq_hz / 1e6, target / 1e6));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #250000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
