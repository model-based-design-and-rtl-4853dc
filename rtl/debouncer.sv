// debouncer: clean interface to one mechanical push button.
//
// The raw button is first passed through two flip-flops to bring it into
// the clock domain. It is then looked at only on sample_ce (1 kHz); the
// debounced level takes the new value once STABLE_N samples in a row have
// differed from it, so contact bounce shorter than about STABLE_N sample
// periods never reaches the design. press is a one-clock pulse on each
// rising edge of the debounced level, one clock after level rises.
//
// Follows the source design: a debouncer that removes the glitches of the
// board's mechanical buttons. How it does so is this design's own choice.
module debouncer #(
  parameter int STABLE_N = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic sample_ce,
  input  logic btn_in,
  output logic level,
  output logic press
);

  localparam int CW = $clog2(STABLE_N + 1);

  logic          sync1, sync2;
  logic [CW-1:0] cnt;
  logic          level_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1 <= 1'b0;
      sync2 <= 1'b0;
      cnt   <= '0;
      level <= 1'b0;
      level_d <= 1'b0;
      press <= 1'b0;
    end else begin
      sync1   <= btn_in;
      sync2   <= sync1;
      level_d <= level;
      press   <= level && !level_d;
      if (sample_ce) begin
        if (sync2 == level) begin
          cnt <= '0;
        end else if (cnt == CW'(STABLE_N - 1)) begin
          cnt   <= '0;
          level <= sync2;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
