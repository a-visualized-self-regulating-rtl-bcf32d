// seven_seg_decoder: one BCD digit to an active-low seven-segment pattern.
//
// Output bit 7 is the decimal point and bits 6..0 are segments g..a; a 0
// lights a segment. Digits 0..9 use the glyphs of the original design,
// in which 6 has no top bar and 9 no bottom bar; any other code blanks the
// digit. The decimal point is lit when `dp` is 1. Combinational.
module seven_seg_decoder
  import greenhouse_pkg::*;
(
  input  bcd_t       digit,
  input  logic       dp,
  output logic [7:0] hex
);

  logic [6:0] seg;   // active high, g..a

  always_comb begin
    unique case (digit)
      4'd0:    seg = 7'b0111111;
      4'd1:    seg = 7'b0000110;
      4'd2:    seg = 7'b1011011;
      4'd3:    seg = 7'b1001111;
      4'd4:    seg = 7'b1100110;
      4'd5:    seg = 7'b1101101;
      4'd6:    seg = 7'b1111100;
      4'd7:    seg = 7'b0000111;
      4'd8:    seg = 7'b1111111;
      4'd9:    seg = 7'b1100111;
      default: seg = 7'b0000000;
    endcase
    hex = ~{dp, seg};
  end

endmodule
