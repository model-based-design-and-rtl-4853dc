// pid_control: integer PID controller for the oven heater.
//
// Once per sample (a one-clock pulse on ce, the 1 s sample time) it forms
// the error e = Ts - Tout and the three components
//   p_f   = KP * e
//   int_f = (KIS * S) >>> I_SHIFT,  S = e(0) + ... + e(k-1)
//   der_f = KD * (e(k) - e(k-1))
// and drives power = p_f + int_f + der_f clipped to [0, POWER_MAX] watts.
// The integral gain is below one, so it is carried as KIS = 2^I_SHIFT * I
// and the product is shifted back by I_SHIFT bits (arithmetic shift,
// rounding toward minus infinity), as in the source design. The running
// sum S is a forward-Euler integrator: the sample's own error enters the
// sum used from the next sample on.
//
// Timing: everything is registered on ce; power, the components and the
// valid pulse appear one clock after ce. Reset clears S and marks the next
// sample as the first, whose derivative is taken as zero.
//
// Follows the source design: the structure, the 1/1024 integral scaling
// and the 0..5000 W output limit. This design's own choices: the gains
// (the source names its tuning method but prints no values), the 24-bit
// saturating integrator and two's-complement arithmetic.
module pid_control
  import cs_pkg::*;
#(
  parameter int KP        = 100,
  parameter int KIS       = 20,
  parameter int KD        = 1000,
  parameter int I_SHIFT   = 10,
  parameter int POWER_LIM = POWER_MAX
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   ce,
  input  ts_t    ts,
  input  temp_t  tout,
  output power_t power,
  output logic   valid,
  output comp_t  p_f,
  output comp_t  int_f,
  output comp_t  der_f
);

  localparam int INT_W = 24;
  localparam int SUM_W = 40;
  localparam logic signed [INT_W-1:0] INT_HI = {1'b0, {(INT_W-1){1'b1}}};
  localparam logic signed [INT_W-1:0] INT_LO = {1'b1, {(INT_W-1){1'b0}}};

  logic signed [INT_W-1:0] integ_q;     // S, sum of earlier errors
  err_t                    e_prev_q;
  logic                    first_q;

  err_t                    e;
  logic signed [INT_W:0]   integ_sum;
  logic signed [INT_W-1:0] integ_next;
  logic signed [SUM_W-1:0] p_w, i_w, d_w, u_w;
  power_t                  power_next;

  always_comb begin
    e = err_t'($signed({2'b00, ts}) - $signed({1'b0, tout}));

    // forward-Euler integrator with saturation instead of wrap-around
    integ_sum = $signed({integ_q[INT_W-1], integ_q}) + (INT_W+1)'(e);
    if (integ_sum > $signed({INT_HI[INT_W-1], INT_HI}))      integ_next = INT_HI;
    else if (integ_sum < $signed({INT_LO[INT_W-1], INT_LO})) integ_next = INT_LO;
    else                                                      integ_next = integ_sum[INT_W-1:0];

    p_w = SUM_W'(KP) * SUM_W'(e);
    i_w = (SUM_W'(KIS) * SUM_W'(integ_q)) >>> I_SHIFT;
    d_w = first_q ? '0 : SUM_W'(KD) * (SUM_W'(e) - SUM_W'(e_prev_q));
    u_w = p_w + i_w + d_w;

    if (u_w < 0)                        power_next = '0;
    else if (u_w > SUM_W'(POWER_LIM))   power_next = power_t'(POWER_LIM);
    else                                power_next = power_t'(u_w);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      integ_q  <= '0;
      e_prev_q <= '0;
      first_q  <= 1'b1;
      power    <= '0;
      valid    <= 1'b0;
      p_f      <= '0;
      int_f    <= '0;
      der_f    <= '0;
    end else begin
      valid <= ce;
      if (ce) begin
        integ_q  <= integ_next;
        e_prev_q <= e;
        first_q  <= 1'b0;
        power    <= power_next;
        p_f      <= comp_t'(p_w);
        int_f    <= comp_t'(i_w);
        der_f    <= comp_t'(d_w);
      end
    end
  end

endmodule
