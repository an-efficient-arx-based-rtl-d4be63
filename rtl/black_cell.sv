// black_cell: prefix-network cell that merges two (generate, propagate) pairs.
//
// The upper pair (g_hi, p_hi) covers bits i..k+1 and the lower pair
// (g_lo, p_lo) covers bits k..j; the output covers i..j:
//   G = g_hi | (p_hi & g_lo),  P = p_hi & p_lo.
// Purely combinational. The equations are the document's; the module boundary
// is this design's own.
module black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g,
  output logic p
);
  assign g = g_hi | (p_hi & g_lo);
  assign p = p_hi & p_lo;
endmodule
