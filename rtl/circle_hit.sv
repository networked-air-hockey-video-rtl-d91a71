// circle_hit: is pixel (px,py) inside the circle of radius RADIUS at (cx,cy)?
//
// The absolute offsets |px-cx| and |py-cy| are first checked against the
// radius (the bounding square); inside it their squares come from
// square_lut and the pixel is inside when dx^2 + dy^2 <= RADIUS^2. Both
// centre and pixel are unsigned 10-bit coordinates, so a centre may lie
// just outside the picture (the goal arcs are centred at x = 640).
// Combinational. The distance test with a table of squares follows the
// original game; testing the four quadrants at once through absolute
// offsets is this design's own.
module circle_hit
  import ah_pkg::*;
#(
  parameter int unsigned RADIUS = 10
) (
  input  coord_t px,
  input  coord_t py,
  input  coord_t cx,
  input  coord_t cy,
  output logic   hit
);
  localparam int unsigned IN_W  = $clog2(MAX_R + 1);
  localparam int unsigned OUT_W = $clog2(MAX_R * MAX_R + 1);

  logic [COORD_W-1:0] adx, ady;
  logic               in_box;
  logic [OUT_W-1:0]   sqx, sqy;

  assign adx    = (px >= cx) ? px - cx : cx - px;
  assign ady    = (py >= cy) ? py - cy : cy - py;
  assign in_box = (adx <= COORD_W'(RADIUS)) && (ady <= COORD_W'(RADIUS));

  square_lut #(.MAX_N(MAX_R)) u_sqx (.n(adx[IN_W-1:0]), .sq(sqx));
  square_lut #(.MAX_N(MAX_R)) u_sqy (.n(ady[IN_W-1:0]), .sq(sqy));

  assign hit = in_box && ((OUT_W+1)'(sqx) + (OUT_W+1)'(sqy) <= (OUT_W+1)'(RADIUS * RADIUS));

  initial assert (RADIUS <= MAX_R) else $error("circle_hit: RADIUS above MAX_R");
endmodule
