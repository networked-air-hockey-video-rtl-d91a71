// tb_vga_raster: full-field check of the display against the reference
// model. For each of three register settings it writes the registers during
// vertical sync, captures the next complete field at the rising edges of
// VGA_CLK and compares all 640x480 pixels with ref_pixel(). It also checks
// the sync pulse widths (96 pixels, 2 lines = 1600 pixels), the line period
// (800 pixels), the field period (420000 pixels) and that the blank output
// frames exactly the active area.
module tb_vga_raster;
  import ah_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t req;
  logic [BUS_DW-1:0] readdata;
  logic VGA_CLK, VGA_HS, VGA_VS, VGA_BLANK, VGA_SYNC;
  logic [COLOR_W-1:0] VGA_R, VGA_G, VGA_B;
  int checks = 0, failures = 0;

  vga_raster dut (.clk, .rst_n, .req, .readdata, .VGA_CLK, .VGA_HS, .VGA_VS,
                  .VGA_BLANK, .VGA_SYNC, .VGA_R, .VGA_G, .VGA_B);

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input int d);
    @(negedge clk);
    req = '{chipselect: 1, read: 0, write: 1, address: BUS_AW'(a), writedata: BUS_DW'(d)};
    @(negedge clk);
    req = '0;
  endtask

  task automatic load(input ref_state_t s);
    wr(0, s.ux); wr(1, s.uy); wr(2, s.ex); wr(3, s.ey);
    wr(4, s.px); wr(5, s.py); wr(7, s.s1); wr(8, s.s2);
  endtask

  // Capture one field, starting at the end of a vertical sync pulse, and
  // compare it with the model.
  task automatic check_field(input ref_state_t s);
    int row = 0, col = 0, bad = 0, pix = 0, hs_run = 0, hs_bad = 0;
    int vs_run = 0, period = 0, line_len = 0, line_bad = 0;
    bit prev_blank = 0, prev_hs = 1;
    rgb_t got, exp;
    @(posedge VGA_VS);
    while (1) begin
      @(posedge VGA_CLK);
      period++;
      line_len++;
      if (!VGA_HS) hs_run++;
      if (VGA_HS && !prev_hs) begin
        if (hs_run != 96) hs_bad++;
        hs_run = 0;
      end
      if (!VGA_HS && prev_hs) begin
        if (line_len != 800 && period > 800) line_bad++;
        line_len = 0;
      end
      prev_hs = VGA_HS;
      if (!VGA_VS) begin
        vs_run++;
        if (vs_run == 1) check(period == 420000 - 1600 + 1, $sformatf("field period %0d", period + 1600 - 1));
      end else if (vs_run != 0) begin
        check(vs_run == 1600, $sformatf("vsync %0d pixels", vs_run));
        break;
      end
      if (VGA_BLANK) begin
        got = '{r: VGA_R, g: VGA_G, b: VGA_B};
        exp = ref_pixel(col, row, s);
        if (got != exp) begin
          bad++;
          if (bad < 10) $display("(%0d,%0d) got %h exp %h", col, row, got, exp);
        end
        pix++; col++;
      end else begin
        if (VGA_R != 0 || VGA_G != 0 || VGA_B != 0) bad++;
        if (prev_blank) begin row++; check(col == 640, $sformatf("line of %0d pixels", col)); col = 0; end
      end
      prev_blank = VGA_BLANK;
    end
    check(row == 480, $sformatf("%0d active lines", row));
    check(pix == 640 * 480, $sformatf("%0d active pixels", pix));
    check(bad == 0, $sformatf("%0d wrong pixels", bad));
    check(hs_bad == 0, $sformatf("%0d hsync pulses not 96 pixels", hs_bad));
    check(line_bad == 0, $sformatf("%0d lines not 800 pixels", line_bad));
    check(VGA_SYNC == 0, "sync on green");
  endtask

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_state_t s;
    req = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    // 1: the start-up picture
    s = '{ux: 525, uy: 112, ex: 127, ey: 127, px: 320, py: 232, s1: 0, s2: 0};
    check_field(s);
    // 2: puck overlapping the local paddle, remote paddle on a field line,
    //    puck on a goal arc edge would clash with the red slot, scores 3 and 7
    s = '{ux: 300, uy: 300, ex: 140, ey: 60, px: 312, py: 306, s1: 3, s2: 7};
    @(negedge VGA_VS);
    load(s);
    check_field(s);
    // 3: puck in the left goal mouth, paddle over the score tab, score 8
    s = '{ux: 60, uy: 470, ex: 630, ey: 240, px: 5, py: 230, s1: 8, s2: 5};
    @(negedge VGA_VS);
    load(s);
    check_field(s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
