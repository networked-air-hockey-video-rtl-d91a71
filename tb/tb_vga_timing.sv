// tb_vga_timing: runs the raster timing for two fields at the 25 MHz pixel
// rate (pixel enable every second 50 MHz cycle) and checks the line length
// (800 pixels), the field length (525 lines), the sync pulse widths (96
// pixels, 2 lines), the active area (640 x 480 pixels, first active pixel at
// x = y = 0) and the line and field rates derived from them.
module tb_vga_timing;
  import ah_pkg::*;
  logic clk = 0, rst_n = 0, pix_en = 0;
  coord_t hcount, vcount, x, y;
  logic active, hsync_n, vsync_n, line_end, frame_end;
  int checks = 0, failures = 0;

  vga_timing dut (.clk, .rst_n, .pix_en, .hcount, .vcount, .x, .y, .active,
                  .hsync_n, .vsync_n, .line_end, .frame_end);

  always #10 clk = ~clk;                  // 50 MHz
  always @(posedge clk) pix_en <= rst_n ? ~pix_en : 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cyc = 0, frame_cyc_start = -1, frame_cycles = 0;
    int line_pix = 0, hs_low = 0, act_line = 0;
    int lines = 0, vs_low_lines = 0, act_pix = 0, act_lines = 0;
    int frames = 0, line_errs = 0, hs_errs = 0, act_errs = 0, xy_errs = 0;
    int exp_x = 0, exp_y = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    while (frames < 2) begin
      @(posedge clk);
      cyc++;
      if (!pix_en) continue;
      // sample the current pixel (counter state before this edge's update)
      line_pix++;
      if (!hsync_n) hs_low++;
      if (active) begin
        act_line++; act_pix++;
        if (int'(x) != exp_x || int'(y) != exp_y) xy_errs++;
        exp_x++;
      end
      if (line_end) begin
        if (line_pix != 800) line_errs++;
        if (hs_low != 96) hs_errs++;
        if (act_line != 0 && act_line != 640) act_errs++;
        if (act_line == 640) begin act_lines++; exp_x = 0; exp_y++; end
        if (!vsync_n) vs_low_lines++;
        lines++;
        line_pix = 0; hs_low = 0; act_line = 0;
      end
      if (frame_end) begin
        check(lines == 525, $sformatf("field of %0d lines", lines));
        check(vs_low_lines == 2, $sformatf("vsync %0d lines", vs_low_lines));
        check(act_lines == 480, $sformatf("%0d active lines", act_lines));
        check(act_pix == 640 * 480, $sformatf("%0d active pixels", act_pix));
        // 800 x 525 pixels at two 50 MHz cycles each: 840000 cycles per field,
        // 59.52 Hz at 25 MHz (59.94 Hz at 25.175 MHz), 31.25 kHz lines.
        if (frame_cyc_start >= 0) frame_cycles = cyc - frame_cyc_start;
        frame_cyc_start = cyc;
        lines = 0; vs_low_lines = 0; act_lines = 0; act_pix = 0;
        exp_x = 0; exp_y = 0;
        frames++;
      end
    end
    check(line_errs == 0, $sformatf("%0d lines not 800 pixels", line_errs));
    check(hs_errs == 0, $sformatf("%0d hsync pulses not 96 pixels", hs_errs));
    check(act_errs == 0, $sformatf("%0d lines with partial active area", act_errs));
    check(xy_errs == 0, $sformatf("%0d wrong x/y coordinates", xy_errs));
    check(frame_cycles == 840000, $sformatf("field period %0d cycles", frame_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
