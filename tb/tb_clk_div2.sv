// tb_clk_div2: checks that the divider halves the clock and that the enable
// strobe is high in exactly every second cycle, together with the half clock.
module tb_clk_div2;
  logic clk = 0, rst_n = 0, clk_half, en;
  int checks = 0, failures = 0;

  clk_div2 dut (.clk, .rst_n, .clk_half, .en);

  always #10 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    int rises = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (clk_half !== 1'b0 || en !== 1'b0) begin failures++; $display("reset value wrong"); end
    rst_n = 1;
    @(posedge clk); #1;
    prev = clk_half;
    for (int i = 0; i < 100; i++) begin
      @(posedge clk); #1;
      checks++; if (clk_half !== ~prev) begin failures++; $display("no toggle at %0d", i); end
      checks++; if (en !== clk_half) begin failures++; $display("enable mismatch at %0d", i); end
      if (!prev && clk_half) rises++;
      prev = clk_half;
    end
    // 100 cycles of a half-rate clock give 50 rising edges.
    checks++; if (rises != 50) begin failures++; $display("rises=%0d", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
