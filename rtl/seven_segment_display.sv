// seven_segment_display: driver for a multiplexed four-digit seven-segment
// display.
//
// The 14-bit value (0..9999; larger values show as 9999) is split into
// four decimal digits. Only one digit is lit at a time: a 2-bit digit
// index advances on each refresh_ce pulse, and the anode of that digit and
// its segment pattern are registered on the same clock. At 1 kHz each
// digit is lit 1 ms of every 4 ms, too fast for the eye to see flicker.
// Leading zeros are blanked; the units digit always shows.
// Outputs are active low, for a common-anode display: seg_n[0] is segment
// a, seg_n[6] segment g; an_n[0] is the rightmost digit.
//
// Follows the source design: a driver for the board's multiplexed 4-digit
// display. The decimal format, blanking and pin polarity are this design's
// own choices.
module seven_segment_display (
  input  logic        clk,
  input  logic        rst,
  input  logic        refresh_ce,
  input  logic [13:0] value,
  output logic [6:0]  seg_n,
  output logic [3:0]  an_n
);

  logic [1:0]  idx;
  logic [13:0] v;
  logic [3:0]  dig [4];
  logic [3:0]  blank;
  logic [3:0]  d_sel;
  logic [6:0]  seg_on;   // active high, bit 0 = a

  always_comb begin
    v      = (value > 14'd9999) ? 14'd9999 : value;
    dig[0] = 4'(v % 14'd10);
    dig[1] = 4'((v / 14'd10) % 14'd10);
    dig[2] = 4'((v / 14'd100) % 14'd10);
    dig[3] = 4'(v / 14'd1000);
    blank[3] = (dig[3] == 0);
    blank[2] = blank[3] && (dig[2] == 0);
    blank[1] = blank[2] && (dig[1] == 0);
    blank[0] = 1'b0;
    d_sel = dig[idx];
    unique case (d_sel)
      4'd0: seg_on = 7'b0111111;
      4'd1: seg_on = 7'b0000110;
      4'd2: seg_on = 7'b1011011;
      4'd3: seg_on = 7'b1001111;
      4'd4: seg_on = 7'b1100110;
      4'd5: seg_on = 7'b1101101;
      4'd6: seg_on = 7'b1111101;
      4'd7: seg_on = 7'b0000111;
      4'd8: seg_on = 7'b1111111;
      4'd9: seg_on = 7'b1101111;
      default: seg_on = 7'b0000000;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx   <= '0;
      seg_n <= '1;
      an_n  <= '1;
    end else if (refresh_ce) begin
      idx   <= idx + 1'b1;
      seg_n <= ~seg_on;
      an_n  <= blank[idx] ? 4'b1111 : ~(4'b0001 << idx);
    end
  end

endmodule
