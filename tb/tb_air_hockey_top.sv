// tb_air_hockey_top: end-to-end run of one terminal at full size.
//
// Plays a short scripted rally the way the game software drives the display:
// between fields it writes new puck and paddle positions (the local paddle
// from the mouse, the remote paddle as received over the network) and, when
// the puck enters a goal, the new score; reads back a register; and checks
// every pixel of every field against the reference model, together with
// the sync timing and the 25 MHz Ethernet clock. It counts how often each
// display mechanism was seen: puck, both paddles, the puck drawn over a
// paddle, goal slot, goal arc, centre ring, field lines, score text, a score
// change, a register read back and a field redrawn after a register write.
// A mechanism that never occurs counts as a failure.
module tb_air_hockey_top;
  import ah_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, reset_n = 0;
  logic avs_chipselect = 0, avs_read = 0, avs_write = 0;
  logic [BUS_AW-1:0] avs_address = '0;
  logic [BUS_DW-1:0] avs_writedata = '0, avs_readdata;
  logic VGA_CLK, VGA_HS, VGA_VS, VGA_BLANK, VGA_SYNC, ENET_CLK;
  logic [COLOR_W-1:0] VGA_R, VGA_G, VGA_B;
  int checks = 0, failures = 0;

  air_hockey_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input int d);
    @(negedge clk);
    avs_chipselect = 1; avs_write = 1; avs_address = BUS_AW'(a); avs_writedata = BUS_DW'(d);
    @(negedge clk);
    avs_chipselect = 0; avs_write = 0;
  endtask

  task automatic rd(input int a, output int v);
    @(negedge clk);
    avs_chipselect = 1; avs_read = 1; avs_address = BUS_AW'(a);
    #1 v = int'(avs_readdata);
    @(negedge clk);
    avs_chipselect = 0; avs_read = 0;
  endtask

  // mechanism counters
  int n_puck, n_pad_local, n_pad_remote, n_puck_over_pad, n_goal_slot;
  int n_goal_arc, n_center_ring, n_field_line, n_text, n_score_change;
  int n_readback, n_redraw, n_enet_edges;

  always @(posedge ENET_CLK) n_enet_edges++;

  // Capture one field after the next vertical sync and compare it.
  task automatic check_field(input ref_state_t s);
    int row = 0, col = 0, bad = 0, pix = 0;
    bit prev_blank = 0;
    rgb_t got, exp;
    @(posedge VGA_VS);
    while (row < 480) begin
      @(posedge VGA_CLK);
      if (VGA_BLANK) begin
        got = '{r: VGA_R, g: VGA_G, b: VGA_B};
        exp = ref_pixel(col, row, s);
        if (got != exp) begin
          bad++;
          if (bad < 10) $display("(%0d,%0d) got %h exp %h", col, row, got, exp);
        end
        // what was drawn here (only where the model and the display agree)
        if (got == exp) begin
          if (got == COL_BLUE) n_puck++;
          if (got == COL_RED) n_goal_slot++;
          if (got == COL_WHITE && in_circle(col, row, s.ux, s.uy, 10)) n_pad_local++;
          if (got == COL_WHITE && in_circle(col, row, s.ex, s.ey, 10)) n_pad_remote++;
          if (got == COL_BLUE && (in_circle(col, row, s.ux, s.uy, 10) ||
                                  in_circle(col, row, s.ex, s.ey, 10))) n_puck_over_pad++;
          if (got == COL_WHITE && in_circle(col, row, 0, 232, 20) &&
              !in_circle(col, row, 0, 232, 18)) n_goal_arc++;
          if (got == COL_WHITE && in_circle(col, row, 320, 232, 20) &&
              !in_circle(col, row, 320, 232, 18)) n_center_ring++;
          if (got == COL_WHITE && col == 140 && row > 300) n_field_line++;
          if (got == COL_WHITE && row >= 469) n_text++;
        end
        pix++; col++;
      end else if (prev_blank) begin
        row++; col = 0;
      end
      prev_blank = VGA_BLANK;
    end
    check(pix == 640 * 480, $sformatf("%0d active pixels", pix));
    check(bad == 0, $sformatf("%0d wrong pixels", bad));
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_state_t s;
    int v, enet0, old_score;
    reset_n = 0;
    repeat (4) @(posedge clk);
    reset_n = 1;
    // start-up picture
    s = '{ux: 525, uy: 112, ex: 127, ey: 127, px: 320, py: 232, s1: 0, s2: 0};
    check_field(s);
    // rally: the puck travels left from the centre, bouncing off the
    // paddles; the local paddle follows the mouse
    for (int f = 0; f < 6; f++) begin
      @(negedge VGA_VS);
      old_score = s.s2;
      s.px = 320 - 60 * (f + 1);
      s.py = 232 + ((f % 2) ? 20 : -20);
      s.ux = 520 - 5 * f;  s.uy = 200 + 10 * f;   // local paddle (mouse)
      s.ex = s.px - 8;     s.ey = s.py + 6;        // remote paddle meets the puck
      if (f == 5) begin s.px = 6; s.py = 232; s.s2 = old_score + 1; end  // goal
      wr(0, s.ux); wr(1, s.uy); wr(2, s.ex); wr(3, s.ey);
      wr(4, s.px); wr(5, s.py);
      if (s.s2 != old_score) begin wr(8, s.s2); n_score_change++; end
      rd(4, v);
      check(v == s.px, $sformatf("puck x read back %0d", v));
      n_readback++;
      check_field(s);
      n_redraw++;
    end
    // puck back at the centre after the goal, player 1 scores too
    @(negedge VGA_VS);
    s.px = 320; s.py = 232; s.s1 = 1;
    wr(4, s.px); wr(5, s.py); wr(7, s.s1); n_score_change++;
    check_field(s);
    n_redraw++;

    enet0 = n_enet_edges;
    repeat (1000) @(posedge clk);
    check(n_enet_edges - enet0 == 500, $sformatf("ENET_CLK %0d rising edges in 1000 cycles", n_enet_edges - enet0));

    check(n_puck > 0,          "puck never drawn");
    check(n_pad_local > 0,     "local paddle never drawn");
    check(n_pad_remote > 0,    "remote paddle never drawn");
    check(n_puck_over_pad > 0, "puck never drawn over a paddle");
    check(n_goal_slot > 0,     "goal slot never drawn");
    check(n_goal_arc > 0,      "goal arc never drawn");
    check(n_center_ring > 0,   "centre ring never drawn");
    check(n_field_line > 0,    "field line never drawn");
    check(n_text > 0,          "score text never drawn");
    check(n_score_change > 0,  "score never changed");
    check(n_readback > 0,      "no register read back");
    check(n_redraw > 0,        "no field redrawn after a write");
    $display("mechanisms: puck=%0d local=%0d remote=%0d puck_over_pad=%0d goal_slot=%0d goal_arc=%0d centre_ring=%0d field_line=%0d text=%0d score_changes=%0d readbacks=%0d redraws=%0d",
             n_puck, n_pad_local, n_pad_remote, n_puck_over_pad, n_goal_slot, n_goal_arc,
             n_center_ring, n_field_line, n_text, n_score_change, n_readback, n_redraw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
