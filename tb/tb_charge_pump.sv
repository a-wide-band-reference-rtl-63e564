// tb_charge_pump: drives UP, DN and both for known times and compares the
// change of VC with I*t/C worked out here (40 uA into 50 pF is 0.8 mV/ns),
// then checks the clamp at the supply and at ground.
`timescale 1ps / 1fs
module tb_charge_pump;
  import fll_pkg::*;
  int checks = 0, failures = 0;
  updn_t fd = '0;
  real vc, v0;
  localparam real SLOPE = 40.0e-6 / 50.0e-12 * 1.0e-12;   // volts per ps

  charge_pump #(.I_CP_A(40.0e-6), .C_P_F(50.0e-12), .V_INIT(0.65)) dut (.fd(fd), .vc(vc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s (vc=%f)", $time, what, vc); end
  endtask

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  initial begin
    #5;
    check(near(vc, 0.65, 1e-9), "starts at V_INIT");
    for (int i = 0; i < 20; i++) begin
      int t_ps;
      updn_t req;
      real exp_dv;
      t_ps = 1000 * (1 + int'($urandom_range(99)));
      req = updn_t'($urandom_range(3));
      v0 = vc;
      fd = req;
      #(t_ps);
      fd = '0;
      #20;
      exp_dv = (req == 2'b10) ? SLOPE * t_ps : (req == 2'b01) ? -SLOPE * t_ps : 0.0;
      check(near(vc - v0, exp_dv, 2.0 * SLOPE * 10.0 + 1e-9),
            $sformatf("req %0b for %0d ps: dv=%f expected %f", req, t_ps, vc - v0, exp_dv));
    end
    fd = 2'b10; #5000000; fd = '0; #20;
    check(near(vc, 1.8, 1e-9), "clamped at VDD");
    fd = 2'b01; #5000000; fd = '0; #20;
    check(near(vc, 0.0, 1e-9), "clamped at ground");
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
