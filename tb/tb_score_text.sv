// tb_score_text: renders both score entries for every score 0..9 (and one
// out-of-range score) over the whole score-tab area and compares each pixel
// with the text pictures of the reference model.
module tb_score_text;
  import ah_pkg::*;
  import tb_ref_pkg::*;
  coord_t x, y, score;
  logic pix1, pix2;
  int checks = 0, failures = 0;

  score_text #(.X0(0),   .PLAYER(1)) d1 (.x, .y, .score, .pix(pix1));
  score_text #(.X0(500), .PLAYER(2)) d2 (.x, .y, .score, .pix(pix2));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lit;
    for (int s = 0; s <= 10; s++) begin
      score = coord_t'((s == 10) ? 12 : s);
      lit = 0;
      for (int yy = 464; yy < 480; yy++)
        for (int xx = 0; xx < 640; xx++) begin
          x = coord_t'(xx); y = coord_t'(yy);
          #1;
          checks += 2;
          if (pix1 != text_pixel(xx, yy, 0, 1, int'(score))) begin
            failures++; $display("p1 s=%0d (%0d,%0d) got %0b", score, xx, yy, pix1); end
          if (pix2 != text_pixel(xx, yy, 500, 2, int'(score))) begin
            failures++; $display("p2 s=%0d (%0d,%0d) got %0b", score, xx, yy, pix2); end
          lit += int'(pix1);
        end
      checks++; if (lit == 0) begin failures++; $display("no text for score %0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
