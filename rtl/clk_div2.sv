// clk_div2: divide-by-two of the 50 MHz board clock.
//
// A single flip-flop toggles on every rising edge of clk, so clk_half is a
// 25 MHz square wave, the pixel clock of the VGA raster and the clock of the
// Ethernet chip. en is high in every second clk cycle, the cycle in which
// clk_half is high; logic clocked by clk that acts only when en is high
// steps at 25 MHz without a second clock domain. Its outputs change at the
// falling edge of clk_half, so clk_half rises in the middle of each step.
// Halving the board clock follows the original game; the enable output and
// the synchronous reset (to 0) are this design's own.
module clk_div2 (
  input  logic clk,       // 50 MHz
  input  logic rst_n,     // synchronous, active low
  output logic clk_half,  // 25 MHz square wave
  output logic en         // one-cycle strobe at 25 MHz
);
  always_ff @(posedge clk) begin
    if (!rst_n) clk_half <= 1'b0;
    else        clk_half <= ~clk_half;
  end

  assign en = clk_half;
endmodule
