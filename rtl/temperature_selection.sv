// temperature_selection: holds the set point temperature Ts.
//
// Ts starts at TS_INIT and moves by 1 degC per one-clock pulse on up or
// down, staying within [TS_LO, TS_HI]; both pulses together do nothing.
// The new value shows on ts the clock after the pulse. It feeds the
// control core and the display.
//
// Follows the source design: the block that holds the set point and passes
// it to the display, and the 100..250 degC range. This design's own
// choices: the 1 degC step and the reset value of 140 degC (the operating
// point the controller was tuned for).
module temperature_selection
  import cs_pkg::*;
#(
  parameter int TS_INIT = 140,
  parameter int TS_LO   = TS_MIN,
  parameter int TS_HI   = TS_MAX
) (
  input  logic clk,
  input  logic rst,
  input  logic up,
  input  logic down,
  output ts_t  ts
);

  always_ff @(posedge clk) begin
    if (rst)                                      ts <= ts_t'(TS_INIT);
    else if (up && !down && ts < ts_t'(TS_HI))    ts <= ts + 1'b1;
    else if (down && !up && ts > ts_t'(TS_LO))    ts <= ts - 1'b1;
  end

endmodule
