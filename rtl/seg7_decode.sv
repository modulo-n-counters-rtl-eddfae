// seg7_decode: 4-bit digit to seven-segment pattern.
//
// Purely combinational. Segments are named a..g in the usual way (a top,
// b top right, c bottom right, d bottom, e bottom left, f top left,
// g middle); 1 lights a segment. Values 0-9 show decimal digits and 10-15
// the hexadecimal letters A b C d E F, so any count a modulo-n digit can
// hold (n up to 16) is readable. The segment names follow the display
// wiring of the lab; the patterns are the conventional ones.
module seg7_decode
  import lab5_pkg::*;
(
  input  digit_t digit,
  output seg_t   seg
);

  always_comb begin
    unique case (digit)              //   abcdefg
      4'h0:    seg = seg_t'(7'b1111110);
      4'h1:    seg = seg_t'(7'b0110000);
      4'h2:    seg = seg_t'(7'b1101101);
      4'h3:    seg = seg_t'(7'b1111001);
      4'h4:    seg = seg_t'(7'b0110011);
      4'h5:    seg = seg_t'(7'b1011011);
      4'h6:    seg = seg_t'(7'b1011111);
      4'h7:    seg = seg_t'(7'b1110000);
      4'h8:    seg = seg_t'(7'b1111111);
      4'h9:    seg = seg_t'(7'b1111011);
      4'hA:    seg = seg_t'(7'b1110111);
      4'hB:    seg = seg_t'(7'b0011111);
      4'hC:    seg = seg_t'(7'b1001110);
      4'hD:    seg = seg_t'(7'b0111101);
      4'hE:    seg = seg_t'(7'b1001111);
      default: seg = seg_t'(7'b1000111);   // F
    endcase
  end

endmodule
