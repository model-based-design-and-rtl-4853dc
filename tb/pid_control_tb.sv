// pid_control_tb: self-checking test of the PID controller.
//
// A reference model in plain integer arithmetic (64-bit, floor division by
// 1024 for the integral scaling, forward-Euler sum, zero derivative on the
// first sample) is run beside the design on a sequence of set points and
// oven temperatures: a long cold start that drives the output into its
// upper limit, a hot phase that drives it to zero, and random samples.
// Every sample checks power and the three components, and that valid
// comes exactly one clock after ce. Both output limits must be reached.
module pid_control_tb;
  import cs_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic ce;
  ts_t ts;
  temp_t tout;
  power_t power;
  logic valid;
  comp_t p_f, int_f, der_f;

  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_mid = 0;

  localparam int KP = 100, KIS = 20, KD = 1000;

  pid_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint floor_div(longint a, longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  longint m_sum, m_eprev;
  bit     m_first;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (ts=%0d tout=%0d)", what, got, exp, ts, tout);
    end
  endtask

  task automatic sample(int t_s, int t_o);
    longint e, p, i, d, u, pw;
    ts = ts_t'(t_s);
    tout = temp_t'(t_o);
    e = longint'(t_s) - longint'(t_o);
    p = KP * e;
    i = floor_div(KIS * m_sum, 1024);
    d = m_first ? 0 : KD * (e - m_eprev);
    u = p + i + d;
    pw = (u < 0) ? 0 : (u > 5000) ? 5000 : u;
    if (u > 5000) n_sat_hi++; else if (u < 0) n_sat_lo++; else n_mid++;
    m_sum += e;
    m_eprev = e;
    m_first = 0;
    @(negedge clk) ce = 1'b1;
    @(negedge clk) ce = 1'b0;
    check("valid one clock after ce", longint'(valid), 1);
    check("power", longint'(power), pw);
    check("p_f", longint'(p_f), p);
    check("int_f", longint'(int_f), i);
    check("der_f", longint'(der_f), d);
    @(negedge clk);
    check("valid is a single pulse", longint'(valid), 0);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; ce = 1'b0; ts = 140; tout = 25;
    m_sum = 0; m_eprev = 0; m_first = 1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check("power zero after reset", longint'(power), 0);
    // cold start: heating
    for (int k = 0; k < 60; k++) sample(140, 25 + 2 * k);
    // too hot: output must go to zero
    for (int k = 0; k < 40; k++) sample(140, 160 + k % 5);
    // random operation
    for (int k = 0; k < 400; k++) sample(100 + $urandom_range(150), $urandom_range(300));
    check("upper limit reached", longint'(n_sat_hi > 0), 1);
    check("lower limit reached", longint'(n_sat_lo > 0), 1);
    check("linear range reached", longint'(n_mid > 0), 1);
    $display("samples: upper limit %0d, lower limit %0d, linear %0d", n_sat_hi, n_sat_lo, n_mid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
