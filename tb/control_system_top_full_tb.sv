// control_system_top_full_tb: the whole system at its real board timing.
//
// No parameter is overridden: the 50 MHz clock gives one control sample
// per second (50,000,000 clocks), buttons are sampled at 1 kHz and each
// display digit is lit for 1 ms. The test runs three complete control
// samples from power-up, comparing heater power and oven temperature with
// a hand-worked reference, checks the one-second sample period, and reads
// the set point back from the multiplexed display.
//   sample 1: e = 140 - 25 = 115, P term 11500, limited to 5000 W;
//             heater 25 + 5000/500 = 35 degC, oven still 25 degC
//   sample 2: 7 * (35 - 25) = 70 W flows into the oven; heater
//             (17500 + 5000 - 70) / 500 = 44 degC; power again 5000 W
//   sample 3: heater (22430 + 5000 - 133) / 500 = 54 degC, oven still
//             25 degC (25203 J), still 5000 W
module control_system_top_full_tb;
  import cs_pkg::*;

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
  longint cyc = 0, last = -1;
  int n = 0;

  control_system_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (170_000_000) @(posedge clk);
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

  always @(posedge clk) cyc <= cyc + 1;

  // hand-worked values for the first three samples
  int exp_power [3] = '{5000, 5000, 5000};
  int exp_tout  [3] = '{25, 25, 25};
  int exp_th    [3] = '{35, 44, 54};

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

  initial begin
    int d [4];
    foreach (d[i]) d[i] = 0;
    for (int s = 0; s < 3; s++) begin
      @(posedge sample_done);
      @(negedge clk);
      check("power", longint'(power), exp_power[s]);
      check("oven temperature", longint'(tout), exp_tout[s]);
      check("heater temperature", longint'(th), exp_th[s]);
      if (last >= 0) check("one-second sample period", cyc - last, 50_000_000);
      last = cyc;
      n++;
      if (s == 0) begin
        // read the set point from the display: 4 digits, 1 ms each
        repeat (5 * 50_000) begin
          @(negedge clk);
          for (int i = 0; i < 4; i++) if (an_n == ~(4'b0001 << i)) d[i] = decode(~seg_n);
        end
        check("display shows set point", d[3] * 1000 + d[2] * 100 + d[1] * 10 + d[0], 140);
      end
    end
    check("three samples taken", n, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
