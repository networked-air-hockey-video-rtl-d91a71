// score_text: one player's entry of the score tab, "PLAYER n:d".
//
// The text is ten 6-pixel character cells starting at column X0 on lines
// TEXT_Y0..TEXT_Y0+7 (just below the table). For the pixel (x,y) it picks
// the character of the cell under x: the fixed label "PLAYER", a space, the
// player number PLAYER, a colon and the current score as one decimal digit.
// A score above 9 shows as a blank cell (a game ends at 8). The glyph row
// comes from glyph_rom; the last column of each cell is always blank.
// Output pix is high on a lit text pixel. Combinational.
// The placement below the table, the label and the bitmap rendering follow
// the original game; the font and the 6-pixel cells are this design's own.
module score_text
  import ah_pkg::*;
#(
  parameter int unsigned X0     = 0,
  parameter int unsigned PLAYER = 1
) (
  input  coord_t x,
  input  coord_t y,
  input  coord_t score,
  output logic   pix
);
  localparam int unsigned TEXT_W = TEXT_CHARS * CELL_W;

  logic       in_area;
  coord_t     dx, dy;
  logic [3:0] cell_idx;
  logic [2:0] col;
  char_e      ch;
  logic [GLYPH_W-1:0] bits;

  // Left of X0 or above TEXT_Y0 the differences wrap to large values.
  assign dx      = x - coord_t'(X0);
  assign dy      = y - coord_t'(TEXT_Y0);
  assign in_area = (dx < coord_t'(TEXT_W)) && (dy < coord_t'(TEXT_ROWS));
  assign cell_idx = 4'(dx / CELL_W);
  assign col  = 3'(dx % CELL_W);

  always_comb begin
    case (cell_idx)
      4'd0:    ch = CH_P;
      4'd1:    ch = CH_L;
      4'd2:    ch = CH_A;
      4'd3:    ch = CH_Y;
      4'd4:    ch = CH_E;
      4'd5:    ch = CH_R;
      4'd6:    ch = CH_SPACE;
      4'd7:    ch = char_e'(PLAYER % 10);
      4'd8:    ch = CH_COLON;
      4'd9:    ch = (score <= coord_t'(9)) ? char_e'(score[4:0]) : CH_SPACE;
      default: ch = CH_SPACE;
    endcase
  end

  glyph_rom u_font (.ch(ch), .row(dy[2:0]), .bits(bits));

  assign pix = in_area && (col < 3'(GLYPH_W)) && bits[3'(GLYPH_W - 1) - col];
endmodule
