// tb_cfd: checks the coarse detector's STOP flag and output multiplexers.
// The clock runs at 1 GHz (period 1000 ps). Random data at 3 Gb/s is faster
// than the clock, so UP_C fires. Random fine requests are driven alongside.
// At random instants the outputs are compared with the published selection
// rule, computed here from STOP and the observed UP_C/DN_C and fine inputs:
//   STOP = 0 : UP_FD = UP_C, DN_FD = DN_C | DN_F
//   STOP = 1 : UP_FD = UP_C | UP_F, DN_FD = DN_F
// STOP must be low after R, stay low until UP_C first rises, and be high after.
`timescale 1ps / 1fs
module tb_cfd;
  import fll_pkg::*;
  int checks = 0, failures = 0;
  logic r = 1'b1, din = 1'b0, cki = 1'b0, ckq = 1'b0, run_data = 1'b0;
  updn_t fine = '0, fd, coarse;
  logic stop;
  int up_c_rises = 0, sel0 = 0, sel1 = 0;

  cfd dut (.r(r), .din(din), .cki(cki), .ckq(ckq), .fine(fine), .fd(fd), .stop(stop), .coarse(coarse));

  always #500 cki = ~cki;
  always @(cki) ckq <= #250 cki;

  // 3 Gb/s random data with 1 ps steps of jitter, and random fine requests.
  always begin
    #(333 + $urandom_range(2));
    if (run_data) din = 1'($urandom_range(1));
  end
  always begin
    #(700 + $urandom_range(900));
    fine = updn_t'($urandom_range(3));
  end

  always @(posedge coarse.up) if (!r) up_c_rises++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic check_mux();
    updn_t exp;
    exp.up = stop ? (coarse.up | fine.up) : coarse.up;
    exp.dn = stop ? fine.dn : (coarse.dn | fine.dn);
    if (stop) sel1++; else sel0++;
    check(fd == exp, $sformatf("mux stop=%0b coarse=%0b fine=%0b fd=%0b", stop, coarse, fine, fd));
  endtask

  initial begin
    #3000;
    check(stop == 1'b0, "STOP cleared by R");
    r = 1'b0;
    // With no data, UP_C cannot fire: STOP stays low and DN_F passes.
    repeat (20) begin #(100 + $urandom_range(400)); check_mux(); end
    check(stop == 1'b0, "STOP low without UP_C");
    run_data = 1'b1;
    repeat (400) begin
      #(100 + $urandom_range(400));
      check(stop == (up_c_rises > 0), "STOP set exactly by first UP_C");
      check_mux();
    end
    check(up_c_rises > 0, "UP_C fired for fast data");
    // R clears STOP again.
    r = 1'b1; #10;
    check(stop == 1'b0, "STOP cleared by second R");
    r = 1'b0; up_c_rises = 0;
    repeat (200) begin
      #(100 + $urandom_range(400));
      check(stop == (up_c_rises > 0), "STOP set by first UP_C after R");
      check_mux();
    end
    check(sel0 > 20 && sel1 > 20, "both STOP settings exercised");
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
