// vga_raster: bus-programmable VGA display of the air hockey table.
//
// The processor writes the positions of the two paddles and the puck and the
// two scores into vga_regs; the display draws the table from them on every
// field with no frame buffer. vga_timing scans the 640x480 raster at 25 MHz
// (a pixel-enable from clk_div2, all logic on the 50 MHz clk). For the pixel
// under the scan, a set of shape tests runs in parallel:
//   goal slot   red vertical line at x = 0 and x = 639, lines 212..252
//   puck        blue disc, radius 10
//   paddles     white discs, radius 10 (local and remote player)
//   goal arc    white ring of radius 18..20 around (0,232) and (640,232)
//   field lines white verticals at x = 140, 320, 500 down to line 464
//   centre ring white ring of radius 18..20 around (320,232)
//   score tab   white text "PLAYER 1:n" and "PLAYER 2:n" on lines 469..476
//   table       blue-green background on lines 0..464, black below
// and a fixed priority (the order above) picks the colour. Discs and rings
// use circle_hit, whose distance test reads a table of squares.
//
// Timing: colour, sync and blank are registered together in the pixel step
// after the counters show the pixel, so they stay aligned; the picture is
// one pixel clock behind the counters. VGA_CLK is the 25 MHz clock, rising
// half-way through each pixel. VGA_HS/VGA_VS are active low, VGA_BLANK is
// low outside the active picture, VGA_SYNC (sync on green) is held low.
// The picture, colours, priorities, register map and timing follow the
// original game; the single clock with a pixel enable, the aligned output
// register and blanking from the active region are this design's own.
module vga_raster
  import ah_pkg::*;
(
  input  logic               clk,        // 50 MHz
  input  logic               rst_n,      // synchronous, active low
  input  bus_req_t           req,
  output logic [BUS_DW-1:0]  readdata,
  output logic               VGA_CLK,
  output logic               VGA_HS,
  output logic               VGA_VS,
  output logic               VGA_BLANK,
  output logic               VGA_SYNC,
  output logic [COLOR_W-1:0] VGA_R,
  output logic [COLOR_W-1:0] VGA_G,
  output logic [COLOR_W-1:0] VGA_B
);
  disp_state_t st;
  logic        pix_en;

  vga_regs u_regs (.clk, .rst_n, .req, .readdata, .state(st));

  clk_div2 u_div (.clk, .rst_n, .clk_half(VGA_CLK), .en(pix_en));

  coord_t x, y;
  logic   active, hsync_n, vsync_n;

  // The raw counters and the line/field markers are not needed here.
  vga_timing u_timing (
    .clk, .rst_n, .pix_en,
    .hcount(), .vcount(), .x, .y, .active, .hsync_n, .vsync_n,
    .line_end(), .frame_end()
  );

  // ------------------------------------------------------------ shapes
  logic puck, user_pad, remote_pad;
  logic goal_out_l, goal_out_r, goal_in_l, goal_in_r;
  logic center_out, center_in;
  logic text_p1, text_p2;
  logic goal_slot, field_line, on_table;

  circle_hit #(.RADIUS(PIECE_R)) u_puck (
    .px(x), .py(y), .cx(st.puck_x), .cy(st.puck_y), .hit(puck));
  circle_hit #(.RADIUS(PIECE_R)) u_user (
    .px(x), .py(y), .cx(st.user_x), .cy(st.user_y), .hit(user_pad));
  circle_hit #(.RADIUS(PIECE_R)) u_remote (
    .px(x), .py(y), .cx(st.remote_x), .cy(st.remote_y), .hit(remote_pad));

  circle_hit #(.RADIUS(GOAL_R)) u_goal_out_l (
    .px(x), .py(y), .cx(coord_t'(GOAL_X_LEFT)), .cy(coord_t'(CENTER_Y)), .hit(goal_out_l));
  circle_hit #(.RADIUS(GOAL_R)) u_goal_out_r (
    .px(x), .py(y), .cx(coord_t'(GOAL_X_RIGHT)), .cy(coord_t'(CENTER_Y)), .hit(goal_out_r));
  circle_hit #(.RADIUS(GOAL_R_IN)) u_goal_in_l (
    .px(x), .py(y), .cx(coord_t'(GOAL_X_LEFT)), .cy(coord_t'(CENTER_Y)), .hit(goal_in_l));
  circle_hit #(.RADIUS(GOAL_R_IN)) u_goal_in_r (
    .px(x), .py(y), .cx(coord_t'(GOAL_X_RIGHT)), .cy(coord_t'(CENTER_Y)), .hit(goal_in_r));

  circle_hit #(.RADIUS(CENTER_R)) u_center_out (
    .px(x), .py(y), .cx(coord_t'(CENTER_X)), .cy(coord_t'(CENTER_Y)), .hit(center_out));
  circle_hit #(.RADIUS(CENTER_R_IN)) u_center_in (
    .px(x), .py(y), .cx(coord_t'(CENTER_X)), .cy(coord_t'(CENTER_Y)), .hit(center_in));

  score_text #(.X0(TEXT_X_P1), .PLAYER(1)) u_text_p1 (
    .x, .y, .score(st.score1), .pix(text_p1));
  score_text #(.X0(TEXT_X_P2), .PLAYER(2)) u_text_p2 (
    .x, .y, .score(st.score2), .pix(text_p2));

  assign on_table   = (y <= coord_t'(TABLE_Y_LAST));
  assign goal_slot  = (y >= coord_t'(GOAL_Y_LO)) && (y <= coord_t'(GOAL_Y_HI)) &&
                      ((x == '0) || (x == coord_t'(H_ACTIVE - 1)));
  assign field_line = on_table && ((x == coord_t'(LINE_X_LEFT)) ||
                                   (x == coord_t'(LINE_X_MID))  ||
                                   (x == coord_t'(LINE_X_RIGHT)));

  // ------------------------------------------------------ priority mixer
  rgb_t pix;
  always_comb begin
    if (!active)                            pix = COL_BLACK;
    else if (goal_slot)                     pix = COL_RED;
    else if (puck)                          pix = COL_BLUE;
    else if (user_pad || remote_pad)        pix = COL_WHITE;
    else if (goal_in_l || goal_in_r)        pix = COL_TABLE;
    else if (field_line || goal_out_l || goal_out_r) pix = COL_WHITE;
    else if (center_in)                     pix = COL_TABLE;
    else if (center_out || text_p1 || text_p2) pix = COL_WHITE;
    else if (on_table)                      pix = COL_TABLE;
    else                                    pix = COL_BLACK;
  end

  // ------------------------------------------------------ output register
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {VGA_R, VGA_G, VGA_B} <= COL_BLACK;
      VGA_HS    <= 1'b1;
      VGA_VS    <= 1'b1;
      VGA_BLANK <= 1'b0;
    end else if (pix_en) begin
      {VGA_R, VGA_G, VGA_B} <= pix;
      VGA_HS    <= hsync_n;
      VGA_VS    <= vsync_n;
      VGA_BLANK <= active;
    end
  end

  assign VGA_SYNC = 1'b0;
endmodule
