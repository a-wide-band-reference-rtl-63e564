// tb_wideband_vco: sets VC to a series of voltages and measures the CKI period
// over 50 cycles, comparing the frequency with the linear tuning law computed
// here (400 MHz at 0.65 V, 2.5 GHz/V, clamped to 200 MHz..1.3 GHz). It also
// checks that CKQ rises a quarter period after CKI.
`timescale 1ps / 1fs
module tb_wideband_vco;
  int checks = 0, failures = 0;
  real vc = 0.65, freq_hz;
  logic cki, ckq;

  wideband_vco dut (.vc(vc), .cki(cki), .ckq(ckq), .freq_hz(freq_hz));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic real law(input real v);
    real f;
    f = 400.0e6 + 2.5e9 * (v - 0.65);
    if (f < 200.0e6) f = 200.0e6;
    if (f > 1.3e9) f = 1.3e9;
    return f;
  endfunction

  real t0, t1, tq, f_meas, v;

  initial begin
    for (int i = 0; i < 12; i++) begin
      v = (i == 0) ? 0.3 : (i == 1) ? 1.5 : 0.55 + 0.04 * real'(i);
      vc = v;
      repeat (3) @(posedge cki);
      t0 = $realtime;
      repeat (50) @(posedge cki);
      t1 = $realtime;
      f_meas = 50.0e12 / (t1 - t0);
      check((f_meas / law(v) - 1.0 < 0.002) && (law(v) / f_meas - 1.0 < 0.002),
            $sformatf("vc=%0.3f f=%0.2f MHz expected %0.2f MHz", v, f_meas / 1e6, law(v) / 1e6));
      check((freq_hz / law(v) - 1.0 < 1e-9) && (law(v) / freq_hz - 1.0 < 1e-9), "freq_hz output");
      @(posedge cki); t0 = $realtime;
      @(posedge ckq); tq = $realtime - t0;
      check((tq > 0.25e12 / law(v) - 5.0) && (tq < 0.25e12 / law(v) + 5.0),
            $sformatf("CKQ lag %0.1f ps", tq));
    end
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
