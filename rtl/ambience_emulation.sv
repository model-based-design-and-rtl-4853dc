// ambience_emulation: the emulated surroundings of the controller, so the
// control system can be exercised on the board without a real oven.
//
// It holds the environment temperature Te in a register and runs the oven
// thermal model (oven_behavior) with the heater power the controller asks
// for. Te starts at TE_INIT and moves by 1 degC per pulse on te_up or
// te_down, held within [TE_MIN, TE_MAX]. A step pulse advances the oven by
// one 1 s sample; tout follows one clock after it. Reset returns Te to
// TE_INIT and puts the oven at that temperature.
//
// Follows the source design: the Te range of 10..30 degC and the split into
// an emulation of the plant and its environment. This design's own
// choices: Te is changed with buttons at run time, 1 degC per press.
module ambience_emulation
  import cs_pkg::*;
#(
  parameter int TE_INIT = 25,
  parameter int TE_LO   = TE_MIN,
  parameter int TE_HI   = TE_MAX
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   te_up,
  input  logic   te_down,
  input  logic   step,
  input  power_t power,
  output te_t    te,
  output temp_t  tout,
  output th_t    th
);

  always_ff @(posedge clk) begin
    if (rst)                                    te <= te_t'(TE_INIT);
    else if (te_up && !te_down && te < te_t'(TE_HI)) te <= te + 1'b1;
    else if (te_down && !te_up && te > te_t'(TE_LO)) te <= te - 1'b1;
  end

  // during reset the oven starts from TE_INIT, the value Te resets to
  te_t te_oven;
  assign te_oven = rst ? te_t'(TE_INIT) : te;

  oven_behavior u_oven (
    .clk   (clk),
    .rst   (rst),
    .step  (step),
    .power (power),
    .te    (te_oven),
    .tout  (tout),
    .th    (th)
  );

endmodule
