// tb_fd: open-loop test of the frequency detector with an ideal 1 GHz
// quadrature clock (period 1000 ps) and random NRZ data whose bit period the
// test sets. Three phases:
//   1. 2.6 Gb/s data (faster than twice the clock): UP_C fires, STOP sets and
//      UP_FD dominates DN_FD.
//   2. 2.0 Gb/s data (exactly matched): the fine detector falls silent and
//      LOCK_FD rises within LOCK_CYCLES plus a margin.
//   3. 1.6 Gb/s data (slower): fine-detector events become frequent, LLD
//      pulses, which clears LOCK_FD and STOP; then DN_FD (coarse path
//      re-enabled) dominates UP_FD.
// Throughout, UP_FD/DN_FD are compared with the coarse detector's selection
// rule applied to the observed coarse and fine requests.
`timescale 1ps / 1fs
module tb_fd;
  import fll_pkg::*;
  localparam int unsigned LC = 256;
  int checks = 0, failures = 0;
  logic rst_n = 1'b0, din = 1'b0, cki = 1'b0, ckq = 1'b0;
  updn_t fd_out, coarse, fine;
  logic lock_fd, lld, stop;
  int bit_ps = 385;
  int up_time, dn_time, n_lld = 0, n_lock = 0, n_stop = 0;

  fd #(.LOCK_CYCLES(LC), .LOL_WINDOW(256), .LOL_EVENTS(8), .LLD_CYCLES(64)) dut (
    .rst_n(rst_n), .din(din), .cki(cki), .ckq(ckq), .fd_out(fd_out),
    .lock_fd(lock_fd), .lld(lld), .stop(stop), .coarse(coarse), .fine(fine));

  initial forever begin
    cki = 1'b1; #250 ckq = 1'b1; #250 cki = 1'b0; #250 ckq = 1'b0; #250;
  end

  // NRZ data with +-1 ps of random timing jitter per bit.
  always begin
    #(bit_ps - 1 + int'($urandom_range(2)));
    din = 1'($urandom_range(1));
  end

  always @(posedge lld) n_lld++;
  always @(posedge lock_fd) n_lock++;
  always @(posedge stop) n_stop++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Sample for n ns: count UP/DN time and check the multiplexer rule.
  task automatic observe(input int n_ns);
    updn_t exp;
    up_time = 0; dn_time = 0;
    repeat (n_ns) begin
      #1000;
      up_time += int'(fd_out.up);
      dn_time += int'(fd_out.dn);
      exp.up = stop ? (coarse.up | fine.up) : coarse.up;
      exp.dn = stop ? fine.dn : (coarse.dn | fine.dn);
      check(fd_out == exp, "output selection rule");
    end
  endtask

  initial begin
    #3000 rst_n = 1'b1;
    // 1. data faster
    bit_ps = 385;
    observe(2000);
    check(stop == 1'b1, "STOP set by fast data");
    check(up_time > 2 * dn_time && up_time > 100,
          $sformatf("fast data: UP %0d ns vs DN %0d ns", up_time, dn_time));
    check(lock_fd == 1'b0, "no lock while data is fast");
    // 2. matched data
    bit_ps = 500;
    observe(LC + 2000);
    check(lock_fd == 1'b1, "LOCK_FD at matched rate");
    check(n_lld == 0, "no LLD before a rate change");
    // 3. data slower
    bit_ps = 625;
    observe(1500);
    check(n_lld >= 1, "LLD after the rate change");
    check(stop == 1'b0 || n_stop >= 2, "STOP cleared by LLD");
    observe(2000);
    check(dn_time > 2 * up_time && dn_time > 100,
          $sformatf("slow data: DN %0d ns vs UP %0d ns", dn_time, up_time));
    check(lock_fd == 1'b0, "no lock while data is slow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
