// clock_management_tb: checks the power-on reset and the enable rates.
//
// With small dividers (7, 5, 3) it checks that por is high for exactly
// POR_CYCLES clocks from the start, that each enable is a one-clock pulse,
// that the first pulse comes DIV clocks after por falls and that pulses
// are exactly DIV clocks apart; and that rst restarts the counts.
module clock_management_tb;
  localparam int SD = 7, DD = 5, RD = 3, PC = 16;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic por, sample_ce, deb_ce, refresh_ce;

  int checks = 0, failures = 0;
  int cyc = 0;
  int por_len = 0;
  int last_s = -1, last_d = -1, last_r = -1, n_s = 0, n_d = 0, n_r = 0;
  int por_end = -1;

  clock_management #(.SAMPLE_DIV(SD), .DEB_DIV(DD), .REFRESH_DIV(RD), .POR_CYCLES(PC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  // observe on the falling edge; cyc counts rising edges seen so far
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (por) por_len <= por_len + 1;   // rising edges that see por high
  end

  always @(negedge clk) begin
    if (!por && por_end < 0) por_end = cyc;
    if (!por && !rst) begin
      if (sample_ce) begin
        check("sample_ce spacing", cyc - ((last_s < 0) ? por_end : last_s), SD);
        last_s = cyc; n_s++;
      end
      if (deb_ce) begin
        check("deb_ce spacing", cyc - ((last_d < 0) ? por_end : last_d), DD);
        last_d = cyc; n_d++;
      end
      if (refresh_ce) begin
        check("refresh_ce spacing", cyc - ((last_r < 0) ? por_end : last_r), RD);
        last_r = cyc; n_r++;
      end
    end else begin
      check("no enables during reset", longint'(sample_ce | deb_ce | refresh_ce), 0);
    end
  end

  initial begin
    repeat (300) @(posedge clk);
    @(negedge clk);
    check("por length", por_len, PC);
    check("sample pulses", n_s, (cyc - por_end) / SD);
    check("deb pulses", n_d, (cyc - por_end) / DD);
    check("refresh pulses", n_r, (cyc - por_end) / RD);
    // restart with rst
    rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    por_end = cyc; last_s = -1; last_d = -1; last_r = -1;
    repeat (40) @(negedge clk);
    check("pulses after rst", longint'(last_s >= 0 && last_d >= 0 && last_r >= 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
