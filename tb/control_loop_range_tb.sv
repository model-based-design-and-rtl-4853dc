// control_loop_range_tb: the control core at the corners of its operating
// range.
//
// The set point may be 100..250 degC and the environment 10..30 degC. For
// each of the four corners the loop is reset at the given Te, run for
// 30,000 one-second samples and must settle within 1 degC below the set
// point, with the heater, averaged over the last 2,000 samples, supplying the
// insulation loss (Ts - Te) / R0 = 10 * (Ts - Te) W to within 5 %. The integral sum must not reach its
// saturation value on the way.
module control_loop_range_tb;
  import cs_pkg::*;

  logic clk = 1'b0;
  logic rst, ce, te_up, te_down;
  ts_t ts;
  te_t te;
  temp_t tout;
  th_t th;
  power_t power;
  comp_t p_f, int_f, der_f;
  logic sample_done;

  int checks = 0, failures = 0;

  temperature_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic corner(int t_s, int t_e);
    int loss;
    longint psum = 0;
    ts = ts_t'(t_s);
    rst = 1; ce = 0; te_up = 0; te_down = 0;
    @(negedge clk) rst = 0;
    // Te resets to 25 degC: step it to the corner value, then restart the oven
    while (te != te_t'(t_e)) begin
      if (te < te_t'(t_e)) te_up = 1; else te_down = 1;
      @(negedge clk) begin te_up = 0; te_down = 0; end
    end
    for (int k = 0; k < 30000; k++) begin
      @(negedge clk) ce = 1;
      @(negedge clk) ce = 0;
      @(negedge clk);
      if (k >= 28000) psum += longint'(power);
    end
    psum = psum / 2000;
    loss = 10 * (t_s - t_e);
    checks++;
    if (int'(tout) < t_s - 1 || int'(tout) > t_s) begin
      failures++; $display("FAIL Ts=%0d Te=%0d: tout %0d", t_s, t_e, tout);
    end
    checks++;
    if (psum * 20 < loss * 19 || psum * 20 > loss * 21) begin
      failures++; $display("FAIL Ts=%0d Te=%0d: mean power %0d, loss %0d", t_s, t_e, psum, loss);
    end
    checks++;
    if (dut.u_pid.integ_q == 24'h7FFFFF) begin
      failures++; $display("FAIL Ts=%0d Te=%0d: integrator saturated", t_s, t_e);
    end
    $display("Ts=%0d Te=%0d: tout=%0d mean power %0d (loss %0d W)", t_s, t_e, tout, psum, loss);
  endtask

  initial begin
    corner(100, 10);
    corner(100, 30);
    corner(250, 10);
    corner(250, 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
