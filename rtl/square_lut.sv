// square_lut: look-up table of the squares 0..MAX_N.
//
// The circle test of the display compares dx*dx + dy*dy with r*r. Offsets
// are never larger than the biggest radius drawn (20 pixels), so the squares
// come from a small table instead of a multiplier. Entry i holds i*i and is
// filled at elaboration; an index above MAX_N returns 0 (callers only look
// up offsets already known to be in range). Purely combinational. The table
// of squares 0..20 follows the original game; the width parameters are this
// design's own.
module square_lut #(
  parameter int unsigned MAX_N = 20,
  parameter int unsigned IN_W  = $clog2(MAX_N + 1),
  parameter int unsigned OUT_W = $clog2(MAX_N * MAX_N + 1)
) (
  input  logic [IN_W-1:0]  n,
  output logic [OUT_W-1:0] sq
);
  logic [OUT_W-1:0] table_q [MAX_N+1];

  for (genvar i = 0; i <= MAX_N; i++) begin : g_entry
    assign table_q[i] = OUT_W'(i * i);
  end

  always_comb begin
    sq = '0;
    if (int'(n) <= MAX_N) sq = table_q[n];
  end
endmodule
