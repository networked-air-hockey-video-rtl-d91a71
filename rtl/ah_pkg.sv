// ah_pkg: shared constants and types of the air hockey display.
//
// Holds the 640x480 VGA raster timing, the geometry of the table drawing
// (lines, circles, goal slots, score tab), the colours, the reset positions
// of the paddles and the puck, the bus request type and the character codes
// of the score-tab font. All coordinates are pixel coordinates of the active
// picture: x = 0..639 left to right, y = 0..479 top to bottom.
//
// The timing numbers, radii, line positions, goal slot, colours and reset
// positions are those of the original game. The character codes and the
// split of the text into 6-pixel cells are this design's own.
package ah_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned COORD_W = 10;          // pixel coordinates and counters
  localparam int unsigned COLOR_W = 10;          // per channel, to the 10-bit video DAC
  localparam int unsigned BUS_AW  = 5;           // word address of the register file
  localparam int unsigned BUS_DW  = 16;          // bus data width

  typedef logic [COORD_W-1:0] coord_t;

  // ------------------------------------------------- 640x480 @ 59.94 Hz timing
  // Pixel clock 25 MHz (board clock 50 MHz divided by two). One line is
  // sync, back porch, active, front porch; the borders of the timing table
  // are folded into the porches (8+40 = 48 and 8+8 = 16 pixels, 25+8 = 33
  // and 2+8 = 10 lines).
  localparam int unsigned H_SYNC   = 96;
  localparam int unsigned H_BACK   = 48;
  localparam int unsigned H_ACTIVE = 640;
  localparam int unsigned H_FRONT  = 16;
  localparam int unsigned H_TOTAL  = H_SYNC + H_BACK + H_ACTIVE + H_FRONT;  // 800

  localparam int unsigned V_SYNC   = 2;
  localparam int unsigned V_BACK   = 33;
  localparam int unsigned V_ACTIVE = 480;
  localparam int unsigned V_FRONT  = 10;
  localparam int unsigned V_TOTAL  = V_SYNC + V_BACK + V_ACTIVE + V_FRONT;  // 525

  // ------------------------------------------------------------- geometry
  localparam int unsigned TABLE_Y_LAST   = 464;  // last line of the blue table
  localparam int unsigned LINE_X_LEFT    = 140;  // quarter line, player 1 side
  localparam int unsigned LINE_X_MID     = 320;  // half-way line
  localparam int unsigned LINE_X_RIGHT   = 500;  // quarter line, player 2 side

  localparam int unsigned CENTER_X       = 320;  // centre of the table
  localparam int unsigned CENTER_Y       = 232;
  localparam int unsigned CENTER_R       = 20;   // centre ring, outer radius
  localparam int unsigned CENTER_R_IN    = 18;   // centre ring, inner radius

  localparam int unsigned GOAL_Y_LO      = 212;  // goal slot, first line
  localparam int unsigned GOAL_Y_HI      = 252;  // goal slot, last line
  localparam int unsigned GOAL_X_LEFT    = 0;    // centre of the left goal arc
  localparam int unsigned GOAL_X_RIGHT   = 640;  // centre of the right goal arc
  localparam int unsigned GOAL_R         = 20;   // goal arc, outer radius
  localparam int unsigned GOAL_R_IN      = 18;   // goal arc, inner radius

  localparam int unsigned PIECE_R        = 10;   // paddle and puck radius
  localparam int unsigned MAX_R          = 20;   // largest radius drawn

  localparam int unsigned TEXT_Y0        = 469;  // first line of the score text
  localparam int unsigned TEXT_ROWS      = 8;
  localparam int unsigned TEXT_X_P1      = 0;    // left edge of "PLAYER 1:n"
  localparam int unsigned TEXT_X_P2      = 500;  // left edge of "PLAYER 2:n"
  localparam int unsigned GLYPH_W        = 5;    // glyph columns inside a cell
  localparam int unsigned CELL_W         = 6;    // glyph plus one blank column
  localparam int unsigned TEXT_CHARS     = 10;   // "PLAYER n:d"

  // ------------------------------------------------- reset positions
  localparam coord_t USER_X0  = 10'd525;
  localparam coord_t USER_Y0  = 10'd112;
  localparam coord_t REMOTE_X0 = 10'd127;
  localparam coord_t REMOTE_Y0 = 10'd127;
  localparam coord_t PUCK_X0  = 10'd320;
  localparam coord_t PUCK_Y0  = 10'd232;

  // -------------------------------------------------------------- colours
  typedef struct packed {
    logic [COLOR_W-1:0] r;
    logic [COLOR_W-1:0] g;
    logic [COLOR_W-1:0] b;
  } rgb_t;

  localparam rgb_t COL_BLACK = '{r: 10'h000, g: 10'h000, b: 10'h000};
  localparam rgb_t COL_WHITE = '{r: 10'h3FF, g: 10'h3FF, b: 10'h3FF};
  localparam rgb_t COL_RED   = '{r: 10'h3FF, g: 10'h000, b: 10'h000};
  localparam rgb_t COL_BLUE  = '{r: 10'h000, g: 10'h000, b: 10'h3FF};
  localparam rgb_t COL_TABLE = '{r: 10'h000, g: 10'h3E7, b: 10'h3FF};

  // ------------------------------------------------ register file
  // Word addresses of the display registers (16-bit words).
  typedef enum logic [BUS_AW-1:0] {
    REG_USER_X   = 5'd0,   // local paddle
    REG_USER_Y   = 5'd1,
    REG_REMOTE_X = 5'd2,   // paddle of the other terminal
    REG_REMOTE_Y = 5'd3,
    REG_PUCK_X   = 5'd4,
    REG_PUCK_Y   = 5'd5,
    REG_SCORE1   = 5'd7,   // player 1 score
    REG_SCORE2   = 5'd8    // player 2 score
  } reg_addr_e;

  // Bus request of a simple memory-mapped slave (Avalon-MM style).
  typedef struct packed {
    logic              chipselect;
    logic              read;
    logic              write;
    logic [BUS_AW-1:0] address;
    logic [BUS_DW-1:0] writedata;
  } bus_req_t;

  // What the picture generator needs from the register file.
  typedef struct packed {
    coord_t user_x;
    coord_t user_y;
    coord_t remote_x;
    coord_t remote_y;
    coord_t puck_x;
    coord_t puck_y;
    coord_t score1;
    coord_t score2;
  } disp_state_t;

  // ------------------------------------------------------- font codes
  // Codes 0..9 are the decimal digits.
  typedef enum logic [4:0] {
    CH_0 = 5'd0, CH_1, CH_2, CH_3, CH_4, CH_5, CH_6, CH_7, CH_8, CH_9,
    CH_P = 5'd10, CH_L, CH_A, CH_Y, CH_E, CH_R, CH_COLON, CH_SPACE
  } char_e;

endpackage
