// temperature_control: the control core, PID controller and emulated oven
// closed in a feedback loop.
//
// One sample runs per pulse on ce (the 1 s sample enable):
//   clock 0  ce        PID reads Ts and the present Tout(k)
//   clock 1  pid valid power(k) is registered; the oven steps with it
//   clock 2  done      Tout(k+1) is on tout
// so the power computed from Tout(k) heats the oven from sample k to k+1.
// ce must not come again before done; at one pulse per second it never
// does. te_up / te_down change the environment temperature of the
// emulation. The PID components are brought out for observation.
//
// Follows the source design: the core made of PID control and the oven
// behaviour, one update per sample. The three-clock sequence is this
// design's own.
module temperature_control
  import cs_pkg::*;
#(
  parameter int KP      = 100,
  parameter int KIS     = 20,
  parameter int KD      = 1000,
  parameter int TE_INIT = 25
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   ce,
  input  ts_t    ts,
  input  logic   te_up,
  input  logic   te_down,
  output te_t    te,
  output temp_t  tout,
  output th_t    th,
  output power_t power,
  output comp_t  p_f,
  output comp_t  int_f,
  output comp_t  der_f,
  output logic   sample_done
);

  logic pid_valid;

  pid_control #(.KP(KP), .KIS(KIS), .KD(KD)) u_pid (
    .clk   (clk),
    .rst   (rst),
    .ce    (ce),
    .ts    (ts),
    .tout  (tout),
    .power (power),
    .valid (pid_valid),
    .p_f   (p_f),
    .int_f (int_f),
    .der_f (der_f)
  );

  ambience_emulation #(.TE_INIT(TE_INIT)) u_amb (
    .clk     (clk),
    .rst     (rst),
    .te_up   (te_up),
    .te_down (te_down),
    .step    (pid_valid),
    .power   (power),
    .te      (te),
    .tout    (tout),
    .th      (th)
  );

  always_ff @(posedge clk) begin
    if (rst) sample_done <= 1'b0;
    else     sample_done <= pid_valid;
  end

  // a new sample must not start while one is in flight
  assert property (@(posedge clk) disable iff (rst) ce |-> !pid_valid)
    else $error("temperature_control: ce while a sample is in progress");

endmodule
