// clock_management: clock enables and power-on reset for the whole design.
//
// Everything runs on the single board clock; slower activity is paced by
// one-clock enable pulses instead of derived clocks:
//   sample_ce   every SAMPLE_DIV clocks - the control sample time
//               (1 s at the 50 MHz board clock)
//   deb_ce      every DEB_DIV clocks    - button sampling (1 kHz)
//   refresh_ce  every REFRESH_DIV clocks - display digit switching (1 kHz)
// The first pulse of each comes DIV clocks after reset. por is high for
// the first POR_CYCLES clocks after configuration (its counter has an
// initial value, as FPGA registers do) and resets the rest of the design.
//
// Follows the source design: a clock management block that paces the PID
// control and provides the CE signal of the other blocks. This design's own
// choices: the clock-enable scheme, the rates and the power-on reset.
module clock_management #(
  parameter int SAMPLE_DIV  = 50_000_000,
  parameter int DEB_DIV     = 50_000,
  parameter int REFRESH_DIV = 50_000,
  parameter int POR_CYCLES  = 16
) (
  input  logic clk,
  input  logic rst,
  output logic por,
  output logic sample_ce,
  output logic deb_ce,
  output logic refresh_ce
);

  localparam int SW = $clog2(SAMPLE_DIV + 1);
  localparam int DW = $clog2(DEB_DIV + 1);
  localparam int RW = $clog2(REFRESH_DIV + 1);
  localparam int PW = $clog2(POR_CYCLES + 1);

  logic [PW-1:0] por_cnt = '0;
  logic [SW-1:0] s_cnt;
  logic [DW-1:0] d_cnt;
  logic [RW-1:0] r_cnt;

  always_ff @(posedge clk) begin
    if (por_cnt != PW'(POR_CYCLES)) por_cnt <= por_cnt + 1'b1;
  end
  assign por = (por_cnt != PW'(POR_CYCLES));

  always_ff @(posedge clk) begin
    if (rst || por) begin
      s_cnt <= '0; d_cnt <= '0; r_cnt <= '0;
      sample_ce <= 1'b0; deb_ce <= 1'b0; refresh_ce <= 1'b0;
    end else begin
      sample_ce  <= (s_cnt == SW'(SAMPLE_DIV - 1));
      deb_ce     <= (d_cnt == DW'(DEB_DIV - 1));
      refresh_ce <= (r_cnt == RW'(REFRESH_DIV - 1));
      s_cnt <= (s_cnt == SW'(SAMPLE_DIV - 1))  ? '0 : s_cnt + 1'b1;
      d_cnt <= (d_cnt == DW'(DEB_DIV - 1))     ? '0 : d_cnt + 1'b1;
      r_cnt <= (r_cnt == RW'(REFRESH_DIV - 1)) ? '0 : r_cnt + 1'b1;
    end
  end

endmodule
