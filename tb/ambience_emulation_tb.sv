// ambience_emulation_tb: self-checking test of the emulated environment.
//
// Checks that Te resets to 25 degC with the oven at 25 degC, moves by one
// per up/down pulse, stops at 10 and 30 degC, ignores up and down together,
// and that the oven, stepped with no heating, drifts to the new Te and
// stays there (power 0 at Te = 30: the oven settles at 30 degC; at
// Te = 10: at 10 degC). The oven's first step at full power is checked
// against a hand calculation: heater 25 + 5000/500 = 35 degC.
module ambience_emulation_tb;
  import cs_pkg::*;

  logic clk = 1'b0;
  logic rst, te_up, te_down, step;
  power_t power;
  te_t te;
  temp_t tout;
  th_t th;

  int checks = 0, failures = 0;

  ambience_emulation dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic pulse_up();   @(negedge clk) te_up = 1;   @(negedge clk) te_up = 0;   endtask
  task automatic pulse_down(); @(negedge clk) te_down = 1; @(negedge clk) te_down = 0; endtask
  task automatic steps(int n);
    repeat (n) begin @(negedge clk) step = 1; @(negedge clk) step = 0; end
  endtask

  initial begin
    rst = 1; te_up = 0; te_down = 0; step = 0; power = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check("Te after reset", longint'(te), 25);
    check("oven after reset", longint'(tout), 25);
    check("heater after reset", longint'(th), 25);
    pulse_up();
    check("Te up", longint'(te), 26);
    pulse_down(); pulse_down();
    check("Te down", longint'(te), 24);
    @(negedge clk) begin te_up = 1; te_down = 1; end
    @(negedge clk) begin te_up = 0; te_down = 0; end
    check("up and down together", longint'(te), 24);
    repeat (10) pulse_up();
    check("Te upper limit", longint'(te), 30);
    steps(3000);
    check("oven drifts to Te=30", longint'(tout), 30);
    check("heater drifts to Te=30", longint'(th), 30);
    repeat (25) pulse_down();
    check("Te lower limit", longint'(te), 10);
    steps(3000);
    check("oven drifts to Te=10", longint'(tout), 10);
    // reset returns to 25, one full-power step heats the heater by 10 degC
    rst = 1;
    @(negedge clk) rst = 0;
    check("Te after second reset", longint'(te), 25);
    check("oven after second reset", longint'(tout), 25);
    power = power_t'(5000);
    steps(1);
    check("heater after one 5000 W step", longint'(th), 35);
    check("oven after one 5000 W step", longint'(tout), 25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
