// tb_square_lut: every entry of the table of squares, and out-of-range inputs.
module tb_square_lut;
  logic [4:0] n;
  logic [8:0] sq;
  int checks = 0, failures = 0;

  square_lut #(.MAX_N(20)) dut (.n, .sq);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      n = 5'(i);
      #1;
      checks++;
      if (int'(sq) != ((i <= 20) ? i * i : 0)) begin
        failures++; $display("n=%0d sq=%0d", i, sq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
