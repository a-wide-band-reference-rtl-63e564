// tb_fll_range: the two ends of the lock range, 400 Mb/s and 2.6 Gb/s.
// Two FLL instances with default parameters run side by side, each from the
// 400 MHz start of the VCO: one receives 2.6 Gb/s random NRZ data and must
// acquire upwards to 1.3 GHz, the other receives 400 Mb/s data and must
// acquire downwards to 200 MHz. Both targets sit on the VCO model's tuning
// limits, so once acquired each VCO rests on its limit; the test shows that
// the detector steers all the way there and then goes quiet enough to lock. Each bit carries +-1 ps of random jitter. For each loop the test
// waits for LOCK_FD to have held for 1 us without an LLD pulse, and checks
// that the VCO ran within 3 % of half the bit rate when LOCK_FD rose and is
// still within 8 % afterwards. It also checks that the high-rate loop used
// the coarse UP path (increment acquisition) and the low-rate loop the coarse
// DN path with STOP low (decrement acquisition). It reports the acquisition
// times.
`timescale 1ps / 1fs
module tb_fll_range;
  import fll_pkg::*;
  int checks = 0, failures = 0;
  logic rst_n = 1'b0;

  localparam int N = 2;
  localparam real RATE [N] = '{2.6e9, 0.4e9};

  logic din [N];
  real vc [N], freq_hz [N], f_at_lock [N];
  logic cki [N], ckq [N], lock_fd [N], lld [N], stop [N];
  updn_t fd_out [N], coarse [N], fine [N];
  int n_lld [N], n_up_c [N], n_dn_c_pass [N];

  for (genvar g = 0; g < N; g++) begin : g_loop
    fll dut (.rst_n(rst_n), .din(din[g]), .vc(vc[g]), .freq_hz(freq_hz[g]), .cki(cki[g]),
             .ckq(ckq[g]), .lock_fd(lock_fd[g]), .lld(lld[g]), .stop(stop[g]),
             .fd_out(fd_out[g]), .coarse(coarse[g]), .fine(fine[g]));

    initial begin
      din[g] = 1'b0;
      n_lld[g] = 0;
      n_up_c[g] = 0;
      n_dn_c_pass[g] = 0;
      f_at_lock[g] = 0.0;
    end

    always begin
      #(1.0e12 / RATE[g] - 1.0 + real'($urandom_range(2)));
      din[g] = 1'($urandom_range(1));
    end

    always @(posedge lld[g]) n_lld[g]++;
    always @(posedge coarse[g].up) n_up_c[g]++;
    always @(posedge coarse[g].dn) if (!stop[g] && fd_out[g].dn) n_dn_c_pass[g]++;
    always @(posedge lock_fd[g]) f_at_lock[g] = freq_hz[g];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Wait until loop k has held LOCK_FD for 1 us without an LLD in between.
  task automatic wait_stable_lock(input int k, input real limit_ps, output bit got);
    real t_end;
    int n0;
    t_end = $realtime + limit_ps;
    got = 1'b0;
    while (!got && $realtime < t_end) begin
      while (!lock_fd[k] && $realtime < t_end) #1000;
      n0 = n_lld[k];
      #1000000;
      got = lock_fd[k] && (n_lld[k] == n0);
    end
  endtask

  bit got [N];
  real t_lock [N];

  for (genvar g = 0; g < N; g++) begin : g_wait
    initial begin
      #20000;
      wait_stable_lock(g, 80.0e6, got[g]);
      t_lock[g] = $realtime - 1.0e6;
    end
  end

  initial begin
    real target;
    #20000 rst_n = 1'b1;
    // Both waiters end by 20 ns + 80 us + 1 us; collect them then.
    #(82.0e6 - $realtime);
    for (int k = 0; k < N; k++) begin
      target = RATE[k] / 2.0;
      check(got[k], $sformatf("stable lock at %0.2f Gb/s", RATE[k] / 1e9));
      $display("rate %0.2f Gb/s: LOCK_FD at %0.2f MHz (target %0.2f MHz), now %0.2f MHz, locked at about %0.2f us",
               RATE[k] / 1e9, f_at_lock[k] / 1e6, target / 1e6, freq_hz[k] / 1e6, t_lock[k] / 1e6);
      check(f_at_lock[k] > 0.97 * target && f_at_lock[k] < 1.03 * target,
            $sformatf("frequency at LOCK_FD %0.2f MHz for target %0.2f MHz", f_at_lock[k] / 1e6, target / 1e6));
      check(freq_hz[k] > 0.92 * target && freq_hz[k] < 1.08 * target,
            $sformatf("frequency now %0.2f MHz for target %0.2f MHz", freq_hz[k] / 1e6, target / 1e6));
    end
    check(n_up_c[0] > 0, "increment acquisition used UP_C");
    check(n_dn_c_pass[1] > 0, "decrement acquisition used DN_C with STOP low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #120000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
