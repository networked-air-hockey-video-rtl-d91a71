// tb_circle_hit: compares the table-based circle test with a multiplying
// reference, for the radii the display uses (10, 18, 20), on every pixel of
// a window around random centres, including centres at the picture edges.
module tb_circle_hit;
  import ah_pkg::*;
  coord_t px, py, cx, cy;
  logic hit10, hit18, hit20;
  int checks = 0, failures = 0;

  circle_hit #(.RADIUS(10)) d10 (.px, .py, .cx, .cy, .hit(hit10));
  circle_hit #(.RADIUS(18)) d18 (.px, .py, .cx, .cy, .hit(hit18));
  circle_hit #(.RADIUS(20)) d20 (.px, .py, .cx, .cy, .hit(hit20));

  function automatic bit in_disc(int x, int y, int xc, int yc, int r);
    return (x - xc) * (x - xc) + (y - yc) * (y - yc) <= r * r;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int centres [6][2];
    int n10 = 0;
    centres = '{'{320, 232}, '{0, 232}, '{640, 232}, '{10, 10}, '{0, 0}, '{0, 0}};
    centres[4] = '{30 + $urandom_range(0, 580), 30 + $urandom_range(0, 420)};
    centres[5] = '{30 + $urandom_range(0, 580), 30 + $urandom_range(0, 420)};
    foreach (centres[c]) begin
      cx = coord_t'(centres[c][0]);
      cy = coord_t'(centres[c][1]);
      for (int x = centres[c][0] - 24; x <= centres[c][0] + 24; x++)
        for (int y = centres[c][1] - 24; y <= centres[c][1] + 24; y++) begin
          if (x < 0 || y < 0 || x > 1023 || y > 1023) continue;
          px = coord_t'(x); py = coord_t'(y);
          #1;
          checks += 3;
          if (hit10 != in_disc(x, y, centres[c][0], centres[c][1], 10)) begin
            failures++; $display("r10 (%0d,%0d) c(%0d,%0d)", x, y, cx, cy); end
          if (hit18 != in_disc(x, y, centres[c][0], centres[c][1], 18)) begin
            failures++; $display("r18 (%0d,%0d) c(%0d,%0d)", x, y, cx, cy); end
          if (hit20 != in_disc(x, y, centres[c][0], centres[c][1], 20)) begin
            failures++; $display("r20 (%0d,%0d) c(%0d,%0d)", x, y, cx, cy); end
          n10 += int'(hit10);
        end
    end
    // A disc of radius 10 covers 317 pixels; the centres at the picture edge
    // cut some away, so at least four whole discs must have been seen.
    checks++; if (n10 < 4 * 317) begin failures++; $display("n10=%0d", n10); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
