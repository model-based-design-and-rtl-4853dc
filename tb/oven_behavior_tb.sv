// oven_behavior_tb: self-checking test of the oven thermal model.
//
// A reference model (64-bit integers, the two energy balances of the
// thermal circuit with C-style truncating division) runs beside the design.
// Checks: reset puts heater and oven at Te; every step with random power
// and Te gives the reference temperatures; th and tout change only on a
// step, one clock after it; and, from physics, a constant 1150 W at
// Te = 25 degC settles the oven at Te + P*R0 = 140 degC and the heater at
// 140 + 1150/7 = 304 degC.
module oven_behavior_tb;
  import cs_pkg::*;

  logic clk = 1'b0;
  logic rst, step;
  power_t power;
  te_t te;
  temp_t tout;
  th_t th;

  int checks = 0, failures = 0;

  oven_behavior dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint eh, e0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic do_step(int p, int t_e, bit verify);
    longint th_r, to_r, qh, qe;
    power = power_t'(p);
    te = te_t'(t_e);
    th_r = eh / 500;
    to_r = e0 / 1000;
    qh = 7 * (th_r - to_r);
    qe = 10 * (to_r - t_e);
    eh = eh + p - qh;
    e0 = e0 + qh - qe;
    @(negedge clk) step = 1'b1;
    @(negedge clk) step = 1'b0;
    if (verify) begin
      check("tout", longint'(tout), e0 / 1000);
      check("th", longint'(th), eh / 500);
    end
  endtask

  initial begin
    rst = 1'b1; step = 1'b0; power = '0; te = 25;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check("reset tout = Te", longint'(tout), 25);
    check("reset th = Te", longint'(th), 25);
    eh = 500 * 25; e0 = 1000 * 25;
    // no step: state holds
    repeat (5) @(negedge clk);
    check("holds without step", longint'(tout), 25);
    // full power heating, then random operation
    for (int k = 0; k < 100; k++) do_step(5000, 25, 1);
    for (int k = 0; k < 400; k++) do_step($urandom_range(5000), 10 + $urandom_range(20), 1);
    for (int k = 0; k < 200; k++) do_step(0, 10, 1);
    // steady state from physics
    for (int k = 0; k < 4000; k++) do_step(1150, 25, 0);
    check("steady oven temperature", longint'(tout), 140);
    check("steady heater temperature", longint'(th), 304);
    // reset at another Te
    te = 17; rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    check("reset at Te=17", longint'(tout), 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
