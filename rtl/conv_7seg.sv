// conv_7seg: hexadecimal digit to seven-segment display decoder.
//
// Purely combinational. digit 0..F gives the usual 0-9, A, b, C, d, E, F
// glyphs. seg is active low, as the DE1 board's displays are wired:
// seg[0] is segment a (top), then b, c, d, e, f clockwise, and seg[6] is g
// (middle). A 0 lights the segment.
//
// The examples use this decoder by name only; the glyph table and the
// active-low polarity are this design's choice for the DE1 board.
module conv_7seg (
  input  logic [3:0] digit,
  output logic [6:0] seg
);

  logic [6:0] on;  // active-high segments, bit 6 = g ... bit 0 = a

  always_comb begin
    unique case (digit)
      4'h0: on = 7'b0111111;
      4'h1: on = 7'b0000110;
      4'h2: on = 7'b1011011;
      4'h3: on = 7'b1001111;
      4'h4: on = 7'b1100110;
      4'h5: on = 7'b1101101;
      4'h6: on = 7'b1111101;
      4'h7: on = 7'b0000111;
      4'h8: on = 7'b1111111;
      4'h9: on = 7'b1101111;
      4'hA: on = 7'b1110111;
      4'hB: on = 7'b1111100;
      4'hC: on = 7'b0111001;
      4'hD: on = 7'b1011110;
      4'hE: on = 7'b1111001;
      default: on = 7'b1110001;  // F
    endcase
  end

  assign seg = ~on;

endmodule
