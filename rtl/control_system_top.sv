// control_system_top: FPGA temperature control system with an emulated
// oven, for a small development board (50 MHz clock, push buttons, slide
// switches, four-digit seven-segment display).
//
// Blocks:
//   clock_management      power-on reset and the 1 s / 1 kHz / 1 kHz enables
//   debouncer x3          buttons 0..2
//   temperature_selection set point Ts, 100..250 degC
//   temperature_control   PID controller + ambience emulation (oven model)
//   seven_segment_display shows the value chosen by the switches
//
// Board use (this design's own mapping):
//   btn[0]   reset of the control system (set point, Te, oven, controller)
//   btn[1]   up,  btn[2] down: change Te while the switches select Te,
//            otherwise change the set point
//   sw[1:0]  display: 00 Ts, 01 Te, 10 oven temperature, 11 heater power
// tout, power, the heater temperature th, the three PID components and
// the sample_done pulse are brought out for a logic analyser or a testbench.
// Buttons and switches are synchronised; btn[0] acts after debouncing.
//
// Follows the source design: the block structure and the 1 s control
// sample time. Clock rate, dividers and the button/switch mapping are this
// design's own choices.
module control_system_top
  import cs_pkg::*;
#(
  parameter int SAMPLE_DIV  = 50_000_000,
  parameter int DEB_DIV     = 50_000,
  parameter int REFRESH_DIV = 50_000
) (
  input  logic       clk,
  input  logic [2:0] btn,
  input  logic [1:0] sw,
  output logic [6:0] seg_n,
  output logic [3:0] an_n,
  output temp_t      tout,
  output power_t     power,
  output th_t        th,
  output comp_t      p_f,
  output comp_t      int_f,
  output comp_t      der_f,
  output logic       sample_done
);

  logic por, sample_ce, deb_ce, refresh_ce;
  logic [2:0] btn_level, btn_press;
  logic [1:0] sw_s1, sw_s2;
  logic sys_rst;
  disp_sel_e disp_sel;
  logic edit_te;
  ts_t ts;
  te_t te;
  logic [13:0] disp_value;

  clock_management #(
    .SAMPLE_DIV (SAMPLE_DIV),
    .DEB_DIV    (DEB_DIV),
    .REFRESH_DIV(REFRESH_DIV)
  ) u_clk (
    .clk        (clk),
    .rst        (1'b0),
    .por        (por),
    .sample_ce  (sample_ce),
    .deb_ce     (deb_ce),
    .refresh_ce (refresh_ce)
  );

  for (genvar i = 0; i < 3; i++) begin : g_btn
    debouncer u_deb (
      .clk       (clk),
      .rst       (por),
      .sample_ce (deb_ce),
      .btn_in    (btn[i]),
      .level     (btn_level[i]),
      .press     (btn_press[i])
    );
  end

  always_ff @(posedge clk) begin
    sw_s1 <= sw;
    sw_s2 <= sw_s1;
  end

  assign sys_rst  = por || btn_level[0];
  assign disp_sel = disp_sel_e'(sw_s2);
  assign edit_te  = (disp_sel == DISP_TE);

  temperature_selection u_tsel (
    .clk  (clk),
    .rst  (sys_rst),
    .up   (btn_press[1] && !edit_te),
    .down (btn_press[2] && !edit_te),
    .ts   (ts)
  );

  temperature_control u_core (
    .clk         (clk),
    .rst         (sys_rst),
    .ce          (sample_ce),
    .ts          (ts),
    .te_up       (btn_press[1] && edit_te),
    .te_down     (btn_press[2] && edit_te),
    .te          (te),
    .tout        (tout),
    .th          (th),
    .power       (power),
    .p_f         (p_f),
    .int_f       (int_f),
    .der_f       (der_f),
    .sample_done (sample_done)
  );

  always_comb begin
    unique case (disp_sel)
      DISP_TS:    disp_value = 14'(ts);
      DISP_TE:    disp_value = 14'(te);
      DISP_TOUT:  disp_value = 14'(tout);
      DISP_POWER: disp_value = 14'(power);
      default:    disp_value = '0;
    endcase
  end

  seven_segment_display u_disp (
    .clk        (clk),
    .rst        (por),
    .refresh_ce (refresh_ce),
    .value      (disp_value),
    .seg_n      (seg_n),
    .an_n       (an_n)
  );

endmodule
