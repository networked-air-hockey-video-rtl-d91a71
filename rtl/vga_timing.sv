// vga_timing: 640x480 raster timing generator.
//
// A horizontal counter runs 0..799 and a vertical counter 0..524; both step
// only in cycles where pix_en is high (25 MHz pixel rate from a 50 MHz clk).
// Each line and each field is laid out as sync, back porch, active region,
// front porch: 96/48/640/16 pixels and 2/33/480/10 lines, which gives the
// 31.47 kHz line and 59.94 Hz field rates of the standard mode. The sync
// pulses are active low. Outputs are combinational functions of the
// counters: x and y are the coordinates of the active pixel (valid while
// active is high), line_end and frame_end mark the last pixel of a line and
// of a field. The numbers and sync polarity follow the original game; the
// counter ordering (sync first) follows its raster generator.
module vga_timing
  import ah_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,      // synchronous, active low
  input  logic   pix_en,     // one pixel per cycle with pix_en high
  output coord_t hcount,
  output coord_t vcount,
  output coord_t x,
  output coord_t y,
  output logic   active,
  output logic   hsync_n,
  output logic   vsync_n,
  output logic   line_end,
  output logic   frame_end
);
  localparam int unsigned HA0 = H_SYNC + H_BACK;   // first active pixel
  localparam int unsigned VA0 = V_SYNC + V_BACK;   // first active line

  assign line_end  = (hcount == coord_t'(H_TOTAL - 1));
  assign frame_end = line_end && (vcount == coord_t'(V_TOTAL - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_en) begin
      if (line_end) begin
        hcount <= '0;
        vcount <= (vcount == coord_t'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
      end else begin
        hcount <= hcount + 1'b1;
      end
    end
  end

  logic h_act, v_act;
  assign h_act   = (hcount >= coord_t'(HA0)) && (hcount < coord_t'(HA0 + H_ACTIVE));
  assign v_act   = (vcount >= coord_t'(VA0)) && (vcount < coord_t'(VA0 + V_ACTIVE));
  assign active  = h_act && v_act;
  assign x       = hcount - coord_t'(HA0);
  assign y       = vcount - coord_t'(VA0);
  assign hsync_n = !(hcount < coord_t'(H_SYNC));
  assign vsync_n = !(vcount < coord_t'(V_SYNC));
endmodule
