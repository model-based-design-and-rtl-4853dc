// control_system_top_tb: end-to-end test of the whole control system.
//
// The dividers are shortened (a 1000-clock sample period, button sampling
// every 2 clocks, display digit every 3 clocks) so tens of thousands of
// control samples fit in a short run; the logic is the same as on the
// board. The testbench presses buttons with contact bounce and reads the
// seven-segment display back through the segment shapes, as a user would.
//
// A reference model of the controller and oven is stepped on every
// sample_done and power and tout are compared. Checked along the way:
// the sample period, the display in all four modes, set point and Te
// changes through debounced buttons, rejection of a short glitch, the
// reset button, and that the loop settles at the set point with about
// 1150 W. Each mechanism is counted and one that never happened counts
// as a failure.
module control_system_top_tb;
  import cs_pkg::*;

  localparam int SD = 1000, DD = 2, RD = 3;

  logic clk = 1'b0;
  logic [2:0] btn = '0;
  logic [1:0] sw = '0;
  logic [6:0] seg_n;
  logic [3:0] an_n;
  temp_t tout;
  power_t power;
  th_t th;
  comp_t p_f, int_f, der_f;
  logic sample_done;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_sat_hi = 0, n_sat_lo = 0, n_ts_btn = 0, n_te_btn = 0, n_glitch = 0;
  int n_reset_btn = 0, n_disp [4] = '{0, 0, 0, 0}, n_samples = 0;

  control_system_top #(.SAMPLE_DIV(SD), .DEB_DIV(DD), .REFRESH_DIV(RD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60_000_000) @(posedge clk);
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

  // ---------------- reference model, stepped on every sample ----------------
  longint r_eh, r_e0, r_sum, r_eprev, r_ts, r_te;
  bit r_first;
  int cyc = 0, last_done = -1;
  bit check_period = 0;

  task automatic ref_reset();
    r_ts = 140; r_te = 25;
    r_eh = 500 * 25; r_e0 = 1000 * 25; r_sum = 0; r_eprev = 0; r_first = 1;
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (sample_done) begin
      longint to_r, th_r, e, u, pw, qh, qe;
      th_r = r_eh / 500;
      to_r = r_e0 / 1000;
      e = r_ts - to_r;
      u = 100 * e + floor_div(20 * r_sum, 1024) + (r_first ? 0 : 1000 * (e - r_eprev));
      pw = (u < 0) ? 0 : (u > 5000) ? 5000 : u;
      if (pw == 5000) n_sat_hi++;
      if (pw == 0) n_sat_lo++;
      r_sum += e; r_eprev = e; r_first = 0;
      qh = 7 * (th_r - to_r);
      qe = 10 * (to_r - r_te);
      r_eh = r_eh + pw - qh;
      r_e0 = r_e0 + qh - qe;
      check("power", longint'(power), pw);
      check("tout", longint'(tout), r_e0 / 1000);
      if (check_period && last_done >= 0) check("sample period", cyc - last_done, SD);
      last_done = cyc;
      check_period = 1;
      n_samples++;
    end
  end

  // ---------------- user actions ----------------
  task automatic wait_samples(int n);
    repeat (n) @(posedge sample_done);
    repeat (2) @(negedge clk);   // after the reference model has taken the sample
  endtask

  // a press with contact bounce, held well past the debounce time
  task automatic press(int b);
    repeat (3) begin
      @(negedge clk) btn[b] = 1;
      @(negedge clk) btn[b] = 0;
    end
    @(negedge clk) btn[b] = 1;
    repeat (30) @(negedge clk);
    btn[b] = 0;
    repeat (30) @(negedge clk);
  endtask

  function automatic int decode(logic [6:0] lit);
    case (lit)
      7'b0111111: return 0;
      7'b0000110: return 1;
      7'b1011011: return 2;
      7'b1001111: return 3;
      7'b1100110: return 4;
      7'b1101101: return 5;
      7'b1111101: return 6;
      7'b0000111: return 7;
      7'b1111111: return 8;
      7'b1101111: return 9;
      default:    return 0;
    endcase
  endfunction

  // read the four multiplexed digits back into a number
  task automatic read_display(output int v);
    int d [4];
    foreach (d[i]) d[i] = 0;
    repeat (6) @(negedge clk);   // switch synchroniser
    repeat (4 * RD + 2) @(negedge clk);
    for (int k = 0; k < 4 * RD + 1; k++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) if (an_n == ~(4'b0001 << i)) d[i] = decode(~seg_n);
    end
    v = d[3] * 1000 + d[2] * 100 + d[1] * 10 + d[0];
  endtask

  task automatic check_display(disp_sel_e mode, int exp, string what);
    int v;
    sw = mode;
    read_display(v);
    check(what, v, exp);
    n_disp[mode]++;
  endtask

  int v;

  initial begin
    ref_reset();
    @(negedge dut.u_clk.por);
    // heating up from 25 degC to the 140 degC set point
    wait_samples(400);
    check_display(DISP_TS, 140, "display set point");
    check_display(DISP_TOUT, int'(tout), "display oven temperature");
    check_display(DISP_POWER, int'(power), "display power");
    check_display(DISP_TE, 25, "display Te");
    // settle
    sw = DISP_TS;
    wait_samples(30000);
    checks++;
    if (tout < 139 || tout > 140) begin failures++; $display("FAIL settled tout %0d", tout); end
    checks++;
    if (power < 1100 || power > 1200) begin failures++; $display("FAIL settled power %0d", power); end
    $display("settled: tout=%0d power=%0d (P %0d, I %0d, D %0d)", tout, power, p_f, int_f, der_f);
    // raise the set point by 5 with bouncing presses
    wait_samples(1);
    repeat (5) press(1);
    r_ts = 145;
    n_ts_btn += 5;
    check_display(DISP_TS, 145, "set point after 5 presses");
    // a glitch shorter than the debounce time on 'down' changes nothing
    wait_samples(1);
    @(negedge clk) btn[2] = 1;
    repeat (3) @(negedge clk);
    btn[2] = 0;
    n_glitch++;
    check_display(DISP_TS, 145, "set point after glitch");
    // lower Te by 3 in Te mode
    wait_samples(1);
    sw = DISP_TE;
    repeat (8) @(negedge clk);
    repeat (3) press(2);
    r_te = 22;
    n_te_btn += 3;
    check_display(DISP_TE, 22, "Te after 3 presses");
    check_display(DISP_TS, 145, "set point unchanged by Te edit");
    sw = DISP_TS;
    wait_samples(5000);
    checks++;
    if (tout < 144 || tout > 145) begin failures++; $display("FAIL tout at new set point %0d", tout); end
    // reset button
    wait_samples(1);
    ref_reset();
    press(0);
    check_period = 0;
    n_reset_btn++;
    check_display(DISP_TS, 140, "set point after reset");
    check_display(DISP_TE, 25, "Te after reset");
    check_display(DISP_TOUT, 25, "oven after reset");
    wait_samples(300);

    check("mechanism: power at 5000 W limit", longint'(n_sat_hi > 0), 1);
    check("mechanism: power at 0 W limit", longint'(n_sat_lo > 0), 1);
    check("mechanism: set point button", longint'(n_ts_btn > 0), 1);
    check("mechanism: Te button", longint'(n_te_btn > 0), 1);
    check("mechanism: glitch rejected", longint'(n_glitch > 0), 1);
    check("mechanism: reset button", longint'(n_reset_btn > 0), 1);
    foreach (n_disp[i]) check("mechanism: display mode", longint'(n_disp[i] > 0), 1);
    $display("samples %0d; power at 5000 W %0d, at 0 W %0d; set point presses %0d, Te presses %0d, glitches %0d, resets %0d; display modes %0d/%0d/%0d/%0d",
             n_samples, n_sat_hi, n_sat_lo, n_ts_btn, n_te_btn, n_glitch, n_reset_btn,
             n_disp[0], n_disp[1], n_disp[2], n_disp[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
