// seven_segment_display_tb: checks the multiplexed display driver.
//
// For a set of values (including 0, 7, 140, 1150, 5000, 9999 and random
// ones) it steps the digit index through four refresh pulses and checks
// that exactly one anode is driven low per slot (or none for a blanked
// leading zero), that every digit position is visited once per round, and
// that the segments read back, through a decoding table of the standard
// seven-segment shapes, as the expected decimal digit.
module seven_segment_display_tb;
  logic clk = 1'b0;
  logic rst, refresh_ce;
  logic [13:0] value;
  logic [6:0] seg_n;
  logic [3:0] an_n;
  int checks = 0, failures = 0;

  seven_segment_display dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (value %0d)", what, got, exp, value);
    end
  endtask

  // segments lit (active high) -> digit, -1 if not a digit shape
  function automatic int decode(logic [6:0] lit);
    // g f e d c b a
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
      default:    return -1;
    endcase
  endfunction

  task automatic show(int v);
    int seen [4];
    int exp_digit, pos, num_digits;
    value = 14'(v);
    num_digits = (v >= 1000) ? 4 : (v >= 100) ? 3 : (v >= 10) ? 2 : 1;
    foreach (seen[i]) seen[i] = 0;
    for (int slot = 0; slot < 4; slot++) begin
      @(negedge clk) refresh_ce = 1;
      @(negedge clk) refresh_ce = 0;
      if (an_n == 4'b1111) continue;
      pos = -1;
      for (int i = 0; i < 4; i++) if (an_n == ~(4'b0001 << i)) pos = i;
      check("one anode low", longint'(pos >= 0), 1);
      if (pos < 0) continue;
      seen[pos]++;
      exp_digit = (v / (10 ** pos)) % 10;
      check("digit shape", decode(~seg_n), exp_digit);
    end
    for (int i = 0; i < 4; i++)
      check("digit lit iff significant", seen[i], (i < num_digits) ? 1 : 0);
  endtask

  initial begin
    rst = 1; refresh_ce = 0; value = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    check("dark after reset", longint'(an_n), 4'hF);
    show(0); show(7); show(140); show(1150); show(5000); show(9999); show(305);
    for (int k = 0; k < 200; k++) show($urandom_range(9999));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
