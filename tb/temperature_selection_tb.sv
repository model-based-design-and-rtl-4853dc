// temperature_selection_tb: checks the set point register.
//
// Reset gives 140 degC; each up/down pulse moves the set point by one,
// one clock later; up and down together change nothing; and it stops at
// 250 and 100 degC. A random sequence of pulses is compared with a
// reference counter.
module temperature_selection_tb;
  import cs_pkg::*;

  logic clk = 1'b0;
  logic rst, up, down;
  ts_t ts;
  int checks = 0, failures = 0;

  temperature_selection dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  int ref_ts;

  initial begin
    rst = 1; up = 0; down = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    check("reset value", longint'(ts), 140);
    @(negedge clk) up = 1;
    @(negedge clk) up = 0;
    check("up", longint'(ts), 141);
    @(negedge clk) down = 1;
    @(negedge clk) down = 0;
    check("down", longint'(ts), 140);
    @(negedge clk) begin up = 1; down = 1; end
    @(negedge clk) begin up = 0; down = 0; end
    check("both", longint'(ts), 140);
    up = 1; repeat (200) @(negedge clk); up = 0;
    check("upper limit", longint'(ts), 250);
    down = 1; repeat (200) @(negedge clk); down = 0;
    check("lower limit", longint'(ts), 100);
    ref_ts = 100;
    for (int k = 0; k < 2000; k++) begin
      up = ($urandom_range(2) == 0);
      down = ($urandom_range(3) == 0);
      if (up && !down && ref_ts < 250) ref_ts++;
      else if (down && !up && ref_ts > 100) ref_ts--;
      @(negedge clk);
      check("random sequence", longint'(ts), ref_ts);
    end
    up = 0; down = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
