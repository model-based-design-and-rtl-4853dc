// temperature_control_tb: closed-loop test of the control core.
//
// The set point is 140 degC and the environment 25 degC, the operating
// point the controller is tuned for. A reference model of the whole loop
// (integer PID with forward-Euler sum and floor scaling by 1024, two-node
// oven with truncating division) runs in step with the design for 30,000
// one-second samples and every sample's power and oven temperature are
// compared. The sequence timing is checked on each sample: power one clock
// after ce, sample_done two clocks after ce. At the end the loop must sit
// at 139..140 degC with the heater near 1150 W, the power that balances
// the insulation loss (140 - 25) / 0.1 W. Along the way the power must hit
// both limits, and a set-point step and a Te change are applied.
module temperature_control_tb;
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
  int n_sat_hi = 0, n_sat_lo = 0, n_ts_step = 0, n_te_step = 0;

  temperature_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %t", what, got, exp, $time);
    end
  endtask

  function automatic longint floor_div(longint a, longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  // reference state
  longint r_eh, r_e0, r_sum, r_eprev, r_te;
  bit     r_first;

  task automatic run_sample(int t_s);
    longint to_r, th_r, e, u, pw, qh, qe;
    ts = ts_t'(t_s);
    th_r = r_eh / 500;
    to_r = r_e0 / 1000;
    e = t_s - to_r;
    u = 100 * e + floor_div(20 * r_sum, 1024) + (r_first ? 0 : 1000 * (e - r_eprev));
    pw = (u < 0) ? 0 : (u > 5000) ? 5000 : u;
    if (u > 5000) n_sat_hi++;
    if (u < 0) n_sat_lo++;
    r_sum += e; r_eprev = e; r_first = 0;
    qh = 7 * (th_r - to_r);
    qe = 10 * (to_r - r_te);
    r_eh = r_eh + pw - qh;
    r_e0 = r_e0 + qh - qe;
    @(negedge clk) ce = 1;
    @(negedge clk) ce = 0;
    check("power", longint'(power), pw);
    check("sample_done not yet", longint'(sample_done), 0);
    @(negedge clk);
    check("sample_done two clocks after ce", longint'(sample_done), 1);
    check("tout", longint'(tout), r_e0 / 1000);
  endtask

  initial begin
    rst = 1; ce = 0; te_up = 0; te_down = 0; ts = 140;
    repeat (2) @(negedge clk);
    rst = 0;
    r_eh = 500 * 25; r_e0 = 1000 * 25; r_sum = 0; r_eprev = 0; r_first = 1; r_te = 25;
    @(negedge clk);
    check("start at Te", longint'(tout), 25);
    for (int k = 0; k < 30000; k++) run_sample(140);
    checks++;
    if (tout < 139 || tout > 140) begin failures++; $display("FAIL final tout %0d", tout); end
    checks++;
    if (power < 1100 || power > 1200) begin failures++; $display("FAIL final power %0d", power); end
    $display("after 30000 s: tout=%0d power=%0d th=%0d int_f=%0d", tout, power, th, int_f);
    // set point step up by 20 degC: the power must rise to its limit again
    for (int k = 0; k < 3000; k++) run_sample(160);
    n_ts_step++;
    // colder environment
    repeat (5) begin @(negedge clk) te_down = 1; @(negedge clk) te_down = 0; end
    r_te = 20;
    check("Te lowered", longint'(te), 20);
    n_te_step++;
    for (int k = 0; k < 3000; k++) run_sample(160);
    check("power limit 5000 W reached", longint'(n_sat_hi > 0), 1);
    check("power limit 0 W reached", longint'(n_sat_lo > 0), 1);
    $display("samples at upper limit %0d, at lower limit %0d, set-point steps %0d, Te steps %0d",
             n_sat_hi, n_sat_lo, n_ts_step, n_te_step);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
