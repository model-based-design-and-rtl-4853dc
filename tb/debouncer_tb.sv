// debouncer_tb: checks bounce rejection and the press pulse.
//
// The sample enable is pulsed every 4 clocks and STABLE_N is 4. A clean
// press must raise level after 4 agreeing samples and give exactly one
// press pulse; bursts of glitches shorter than 4 samples, high while the
// button is up or low while it is down, must change nothing; a bouncing
// press (several short closures, then a steady one) must give one pulse.
module debouncer_tb;
  localparam int N = 4, CE_EVERY = 4;

  logic clk = 1'b0;
  logic rst, sample_ce, btn_in, level, press;
  int checks = 0, failures = 0;
  int n_press = 0, cyc = 0, n_glitch = 0;

  debouncer #(.STABLE_N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && press) n_press <= n_press + 1;
  end
  assign sample_ce = (cyc % CE_EVERY == 0);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic hold(bit v, int clocks);
    btn_in = v;
    repeat (clocks) @(negedge clk);
  endtask

  initial begin
    rst = 1; btn_in = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    hold(0, 40);
    check("idle level", longint'(level), 0);
    // glitches while released: each under N samples long
    repeat (5) begin hold(1, CE_EVERY * (N - 2)); hold(0, CE_EVERY * 2); n_glitch++; end
    hold(0, 40);
    check("glitches ignored while up", longint'(level), 0);
    check("no press from glitches", n_press, 0);
    // clean press: level after at most N+1 sample periods plus synchroniser
    btn_in = 1;
    repeat (CE_EVERY * (N - 1)) @(negedge clk);
    check("not yet debounced", longint'(level), 0);
    repeat (CE_EVERY * 2 + 2) @(negedge clk);
    check("debounced press", longint'(level), 1);
    hold(1, 20);
    check("one press pulse", n_press, 1);
    // dropouts while held
    repeat (5) begin hold(0, CE_EVERY * (N - 2)); hold(1, CE_EVERY * 2); n_glitch++; end
    hold(1, 20);
    check("dropouts ignored while down", longint'(level), 1);
    check("still one press", n_press, 1);
    hold(0, 60);
    check("released", longint'(level), 0);
    // bouncing press
    repeat (4) begin hold(1, 3); hold(0, 5); end
    hold(1, 80);
    check("bouncing press gives one pulse", n_press, 2);
    hold(0, 60);
    check("glitch bursts applied", longint'(n_glitch), 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
