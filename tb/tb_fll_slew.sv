// tb_fll_slew: VCO control-voltage change rate during coarse acquisition, and
// the effect of the pulse extension of the coarse detectors on it.
// Two FLL instances with default parameters start from the 400 MHz VCO
// frequency: one receives 2 Gb/s random NRZ data (increment acquisition
// towards 1 GHz), the other 0.5 Gb/s data (decrement acquisition towards
// 250 MHz). Over a window of WIN_PS early in the acquisition, every 5 ps,
// the test records how often the unextended detector output (UP1 or DN1
// inside the coarse detector), the extended coarse output (UP_C or DN_C) and
// the charge-pump inputs UP_FD/DN_FD are high. It checks that:
//   * VC rises for the increment case and falls for the decrement case;
//   * the extended output is high more often than UP1/DN1 alone over the
//     window (the extension widens the pulses);
//   * the measured VC slope matches (I_CP/Cp) x (duty(UP_FD) - duty(DN_FD))
//     within 5 % + 2 mV/us, worked out from the model's current and capacitor.
// It prints the slew rates in mV/us and the duty cycles.
`timescale 1ps / 1fs
module tb_fll_slew;
  import fll_pkg::*;
  int checks = 0, failures = 0;
  logic rst_n = 1'b0;

  localparam int N = 2;
  localparam real RATE [N] = '{2.0e9, 0.5e9};
  localparam real T0_PS = 50000.0;     // window start
  localparam real WIN_PS = 400000.0;   // window length
  localparam real SLEW_MAX = CP_I_A / CP_C_F * 1.0e-6 * 1.0e3;  // mV/us at full duty

  logic din [N];
  real vc [N], freq_hz [N];
  logic cki [N], ckq [N], lock_fd [N], lld [N], stop [N];
  updn_t fd_out [N], coarse [N], fine [N];
  logic raw [N];   // UP1 for the increment case, DN1 for the decrement case
  logic ext [N];   // UP_C / DN_C

  fll u_inc (.rst_n(rst_n), .din(din[0]), .vc(vc[0]), .freq_hz(freq_hz[0]), .cki(cki[0]),
             .ckq(ckq[0]), .lock_fd(lock_fd[0]), .lld(lld[0]), .stop(stop[0]),
             .fd_out(fd_out[0]), .coarse(coarse[0]), .fine(fine[0]));
  fll u_dec (.rst_n(rst_n), .din(din[1]), .vc(vc[1]), .freq_hz(freq_hz[1]), .cki(cki[1]),
             .ckq(ckq[1]), .lock_fd(lock_fd[1]), .lld(lld[1]), .stop(stop[1]),
             .fd_out(fd_out[1]), .coarse(coarse[1]), .fine(fine[1]));

  assign raw[0] = u_inc.u_fd.u_cfd.u_faster.up1;
  assign ext[0] = coarse[0].up;
  assign raw[1] = u_dec.u_fd.u_cfd.u_slower.dn1;
  assign ext[1] = coarse[1].dn;

  for (genvar g = 0; g < N; g++) begin : g_data
    initial din[g] = 1'b0;
    always begin
      #(1.0e12 / RATE[g] - 1.0 + real'($urandom_range(2)));
      din[g] = 1'($urandom_range(1));
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int n_samp = 0;
  int n_raw [N], n_ext [N], n_up [N], n_dn [N];
  real v0 [N], slew [N], expect_slew [N];
  bit sampling = 1'b0;

  always #5 if (sampling) begin
    n_samp++;
    for (int k = 0; k < N; k++) begin
      n_raw[k] += int'(raw[k]);
      n_ext[k] += int'(ext[k]);
      n_up[k]  += int'(fd_out[k].up);
      n_dn[k]  += int'(fd_out[k].dn);
    end
  end

  localparam string NAME [N] = '{"increment", "decrement"};

  initial begin
    for (int k = 0; k < N; k++) begin n_raw[k] = 0; n_ext[k] = 0; n_up[k] = 0; n_dn[k] = 0; end
    #20000 rst_n = 1'b1;
    #(T0_PS - 20000.0);
    for (int k = 0; k < N; k++) v0[k] = vc[k];
    sampling = 1'b1;
    #(WIN_PS);
    sampling = 1'b0;
    for (int k = 0; k < N; k++) begin
      slew[k] = (vc[k] - v0[k]) * 1.0e3 / (WIN_PS * 1.0e-6);   // mV/us
      expect_slew[k] = SLEW_MAX * real'(n_up[k] - n_dn[k]) / real'(n_samp);
      $display("%s (%0.1f Gb/s): VC slew %0.1f mV/us (expected %0.1f), duty %s %0.3f, extended %0.3f, UP_FD %0.3f, DN_FD %0.3f",
               NAME[k], RATE[k] / 1e9, slew[k], expect_slew[k], k == 0 ? "UP1" : "DN1",
               real'(n_raw[k]) / n_samp, real'(n_ext[k]) / n_samp,
               real'(n_up[k]) / n_samp, real'(n_dn[k]) / n_samp);
      check(n_ext[k] > n_raw[k], $sformatf("%s: extension widens the coarse pulses", NAME[k]));
      check(n_raw[k] > 0, $sformatf("%s: unextended detector fired", NAME[k]));
      check((slew[k] - expect_slew[k]) < 0.05 * (expect_slew[k] < 0 ? -expect_slew[k] : expect_slew[k]) + 2.0 &&
            (expect_slew[k] - slew[k]) < 0.05 * (expect_slew[k] < 0 ? -expect_slew[k] : expect_slew[k]) + 2.0,
            $sformatf("%s: slew %0.1f mV/us against %0.1f", NAME[k], slew[k], expect_slew[k]));
    end
    check(slew[0] > 0.0, "VC rises during increment acquisition");
    check(slew[1] < 0.0, "VC falls during decrement acquisition");
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
