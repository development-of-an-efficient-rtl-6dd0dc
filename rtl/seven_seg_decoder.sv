// seven_seg_decoder: one BCD digit to a 7-segment pattern.
//
// Combinational. Digits 0-9 light the usual segments (6 with its top bar,
// 7 with three segments, 9 with its bottom bar); codes 10-15 blank the digit.
// Two parameters select the output convention:
//   GFEDCBA_ORDER = 0: bit 6 is segment a ... bit 0 is segment g;
//   GFEDCBA_ORDER = 1: bit 6 is segment g ... bit 0 is segment a;
//   ACTIVE_LOW    = 1: a lit segment is driven 0.
// With (0, 0) the digit 0 is 7E, 1 is 30 and 5 is 5B, the codes the meter's
// reading displays show; with (1, 1) 0 is 40, 1 is 79 and 9 is 10, the codes
// of the digital clock's digits. The two conventions are taken from the
// published display traces; the parameterised form is this design's.
module seven_seg_decoder #(
  parameter bit GFEDCBA_ORDER = 1'b0,
  parameter bit ACTIVE_LOW    = 1'b0
) (
  input  logic [3:0] digit,
  output logic [6:0] seg
);
  logic [6:0] abcdefg;
  logic [6:0] ordered;

  always_comb begin
    unique case (digit)
      4'd0:    abcdefg = 7'b111_1110;
      4'd1:    abcdefg = 7'b011_0000;
      4'd2:    abcdefg = 7'b110_1101;
      4'd3:    abcdefg = 7'b111_1001;
      4'd4:    abcdefg = 7'b011_0011;
      4'd5:    abcdefg = 7'b101_1011;
      4'd6:    abcdefg = 7'b101_1111;
      4'd7:    abcdefg = 7'b111_0000;
      4'd8:    abcdefg = 7'b111_1111;
      4'd9:    abcdefg = 7'b111_1011;
      default: abcdefg = 7'b000_0000;
    endcase
    for (int b = 0; b < 7; b++) ordered[b] = GFEDCBA_ORDER ? abcdefg[6-b] : abcdefg[b];
    seg = ACTIVE_LOW ? ~ordered : ordered;
  end
endmodule
