// oven_behavior: integer discrete-time thermal model of an electrically
// heated oven, used to emulate the plant in hardware.
//
// The plant is a two-node thermal circuit. The heater element has heat
// capacity CH and is joined to the oven chamber through a thermal
// resistance Rh0; the chamber has heat capacity C0 and loses heat through
// its insulation, resistance R0, to the environment at temperature Te. The
// heater power is a current source into the heater node. Each capacitance
// is an energy accumulator in joules; its temperature is the energy divided
// by the capacity, truncated toward zero:
//   Th = Eh / CH,   Tout = E0 / C0
//   q_h0 = G_H0 * (Th - Tout)      heater -> chamber, W   (G_H0 = 1/Rh0)
//   q_0e = G_0  * (Tout - Te)      chamber -> outside, W  (G_0  = 1/R0)
//   Eh += power - q_h0,  E0 += q_h0 - q_0e     once per 1 s step
// Both flows use the temperatures before the step, which is what breaks
// the loop between the two nodes.
//
// Interface: a one-clock pulse on step advances the model by one sample
// with the present power and te. th and tout are combinational functions
// of the stored energies, so they show the new state the clock after step.
// Reset puts both nodes at the present te.
//
// Follows the source design: the circuit, CH = 500 J/degC, C0 = 1000 J/degC,
// Rh0 = 0.143 degC/W, R0 = 0.1 degC/W, the 1 s step and truncation toward
// zero. This design's own choices: the conductances rounded to whole W/degC
// (1/0.143 -> 7) and the reset state.
module oven_behavior
  import cs_pkg::*;
#(
  parameter int CH   = 500,
  parameter int C0   = 1000,
  parameter int G_H0 = 7,
  parameter int G_0  = 10
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   step,
  input  power_t power,
  input  te_t    te,
  output temp_t  tout,
  output th_t    th
);

  energy_t eh_q, e0_q;
  energy_t th_s, to_s;
  energy_t q_h0, q_0e;

  always_comb begin
    th_s = eh_q / energy_t'(CH);            // signed division truncates toward zero
    to_s = e0_q / energy_t'(C0);
    q_h0 = energy_t'(G_H0) * (th_s - to_s);
    q_0e = energy_t'(G_0) * (to_s - energy_t'({1'b0, te}));
    th   = th_t'(th_s);
    tout = temp_t'(to_s);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      eh_q <= energy_t'(CH) * energy_t'({1'b0, te});
      e0_q <= energy_t'(C0) * energy_t'({1'b0, te});
    end else if (step) begin
      eh_q <= eh_q + energy_t'({1'b0, power}) - q_h0;
      e0_q <= e0_q + q_h0 - q_0e;
    end
  end

endmodule
