// glyph_rom: 5x8 pixel font for the score tab.
//
// Returns one row of a character: bit 4 is the leftmost pixel, bit 0 the
// rightmost. Rows 0..6 hold the glyph, row 7 is blank (space below the
// text). Only the characters the score tab uses are present: the digits,
// P, L, A, Y, E, R, the colon and the space. Combinational. The glyph
// shapes are this design's own.
module glyph_rom
  import ah_pkg::*;
(
  input  char_e      ch,
  input  logic [2:0] row,
  output logic [GLYPH_W-1:0] bits
);
  // Seven rows of five pixels, first row in the most significant bits.
  function automatic logic [34:0] glyph(input char_e c);
    case (c)
      CH_0:     return 35'b01110_10001_10011_10101_11001_10001_01110;
      CH_1:     return 35'b00100_01100_00100_00100_00100_00100_01110;
      CH_2:     return 35'b01110_10001_00001_00010_00100_01000_11111;
      CH_3:     return 35'b11111_00010_00100_00010_00001_10001_01110;
      CH_4:     return 35'b00010_00110_01010_10010_11111_00010_00010;
      CH_5:     return 35'b11111_10000_11110_00001_00001_10001_01110;
      CH_6:     return 35'b00110_01000_10000_11110_10001_10001_01110;
      CH_7:     return 35'b11111_00001_00010_00100_01000_01000_01000;
      CH_8:     return 35'b01110_10001_10001_01110_10001_10001_01110;
      CH_9:     return 35'b01110_10001_10001_01111_00001_00010_01100;
      CH_P:     return 35'b11110_10001_10001_11110_10000_10000_10000;
      CH_L:     return 35'b10000_10000_10000_10000_10000_10000_11111;
      CH_A:     return 35'b01110_10001_10001_11111_10001_10001_10001;
      CH_Y:     return 35'b10001_10001_01010_00100_00100_00100_00100;
      CH_E:     return 35'b11111_10000_10000_11110_10000_10000_11111;
      CH_R:     return 35'b11110_10001_10001_11110_10100_10010_10001;
      CH_COLON: return 35'b00000_01100_01100_00000_01100_01100_00000;
      default:  return '0;
    endcase
  endfunction

  logic [34:0] g;
  assign g = glyph(ch);

  always_comb begin
    bits = '0;
    if (row < 3'd7) bits = g[34 - 5*row -: 5];
  end
endmodule
