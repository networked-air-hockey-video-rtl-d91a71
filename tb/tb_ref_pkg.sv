// tb_ref_pkg: reference model of the air hockey picture for the testbenches.
//
// ref_pixel() gives the colour the display must show at active pixel (x,y)
// for a given register state. It is written independently of the RTL: the
// circle tests multiply instead of reading a table of squares, and the font
// is held as text pictures ('#' lit, '.' dark) rather than bit vectors.
package tb_ref_pkg;
  import ah_pkg::*;

  // 7-row text pictures of the characters the score tab uses.
  function automatic string glyph_row(input int c, input int row);
    string g [18][7] = '{
      '{".###.","#...#","#..##","#.#.#","##..#","#...#",".###."},  // 0
      '{"..#..",".##..","..#..","..#..","..#..","..#..",".###."},  // 1
      '{".###.","#...#","....#","...#.","..#..",".#...","#####"},  // 2
      '{"#####","...#.","..#..","...#.","....#","#...#",".###."},  // 3
      '{"...#.","..##.",".#.#.","#..#.","#####","...#.","...#."},  // 4
      '{"#####","#....","####.","....#","....#","#...#",".###."},  // 5
      '{"..##.",".#...","#....","####.","#...#","#...#",".###."},  // 6
      '{"#####","....#","...#.","..#..",".#...",".#...",".#..."},  // 7
      '{".###.","#...#","#...#",".###.","#...#","#...#",".###."},  // 8
      '{".###.","#...#","#...#",".####","....#","...#.",".##.."},  // 9
      '{"####.","#...#","#...#","####.","#....","#....","#...."},  // P
      '{"#....","#....","#....","#....","#....","#....","#####"},  // L
      '{".###.","#...#","#...#","#####","#...#","#...#","#...#"},  // A
      '{"#...#","#...#",".#.#.","..#..","..#..","..#..","..#.."},  // Y
      '{"#####","#....","#....","####.","#....","#....","#####"},  // E
      '{"####.","#...#","#...#","####.","#.#..","#..#.","#...#"},  // R
      '{".....",".##..",".##..",".....",".##..",".##..","....."},  // :
      '{".....",".....",".....",".....",".....",".....","....."}   // space
    };
    return g[c][row];
  endfunction

  // Is (x,y) a lit pixel of the text "PLAYER p:s" whose left edge is x0?
  function automatic bit text_pixel(input int x, input int y, input int x0,
                                    input int p, input int s);
    int code [10];
    int cx, cy, ci, col;
    string r;
    code = '{10, 11, 12, 13, 14, 15, 17, p, 16, (s <= 9) ? s : 17};
    cx = x - x0;
    cy = y - 469;
    if (cx < 0 || cx >= 60 || cy < 0 || cy >= 7) return 0;
    ci  = cx / 6;
    col = cx % 6;
    if (col == 5) return 0;
    r = glyph_row(code[ci], cy);
    return r[col] == "#";
  endfunction

  function automatic bit in_circle(input int x, input int y, input int cx,
                                   input int cy, input int r);
    return (x - cx) * (x - cx) + (y - cy) * (y - cy) <= r * r;
  endfunction

  typedef struct {
    int ux, uy, ex, ey, px, py, s1, s2;
  } ref_state_t;

  function automatic rgb_t ref_pixel(input int x, input int y, input ref_state_t s);
    bit table_area = (y <= 464);
    if (y >= 212 && y <= 252 && (x == 0 || x == 639)) return COL_RED;
    if (in_circle(x, y, s.px, s.py, 10)) return COL_BLUE;
    if (in_circle(x, y, s.ux, s.uy, 10) || in_circle(x, y, s.ex, s.ey, 10)) return COL_WHITE;
    if (in_circle(x, y, 0, 232, 18) || in_circle(x, y, 640, 232, 18)) return COL_TABLE;
    if ((table_area && (x == 140 || x == 320 || x == 500)) ||
        in_circle(x, y, 0, 232, 20) || in_circle(x, y, 640, 232, 20)) return COL_WHITE;
    if (in_circle(x, y, 320, 232, 18)) return COL_TABLE;
    if (in_circle(x, y, 320, 232, 20) || text_pixel(x, y, 0, 1, s.s1) ||
        text_pixel(x, y, 500, 2, s.s2)) return COL_WHITE;
    if (table_area) return COL_TABLE;
    return COL_BLACK;
  endfunction
endpackage
