// Seven-segment decoder: turns a 4-bit value into the segment drives of one display digit.
//
// Values 0-9 show as decimal digits and 10-15 as the hexadecimal letters A b C d E F, so
// every input value has a glyph. The output is active low, bit 6..0 = segments g f e d c b a:
// a 1 shows as "1111001" (only segments b and c lit). The decoder is purely combinational;
// the output follows the input in the same cycle.
//
// The 4-bit input range, the active-low polarity and the example pattern for 1 follow the
// design description; the letter shapes for 10-15 are this design's choice.
module seven_seg_decoder
  import clock_pkg::*;
(
  input  bcd_t  value,
  output seg7_t seg
);

  always_comb begin
    unique case (value)
      4'h0: seg = 7'b100_0000;
      4'h1: seg = 7'b111_1001;
      4'h2: seg = 7'b010_0100;
      4'h3: seg = 7'b011_0000;
      4'h4: seg = 7'b001_1001;
      4'h5: seg = 7'b001_0010;
      4'h6: seg = 7'b000_0010;
      4'h7: seg = 7'b111_1000;
      4'h8: seg = 7'b000_0000;
      4'h9: seg = 7'b001_0000;
      4'hA: seg = 7'b000_1000;
      4'hB: seg = 7'b000_0011;
      4'hC: seg = 7'b100_0110;
      4'hD: seg = 7'b010_0001;
      4'hE: seg = 7'b000_0110;
      4'hF: seg = 7'b000_1110;
      default: seg = SEG_BLANK;
    endcase
  end

endmodule
