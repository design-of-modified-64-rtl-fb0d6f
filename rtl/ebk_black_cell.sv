// Black cell of the Brent-Kung prefix tree.
//
// Combines an upper group (g_hi, p_hi) with the adjacent lower group
// (g_lo, p_lo) into one group spanning both:
//   p_out = p_hi & p_lo            (group propagate)
//   g_out = g_hi | (p_hi & g_lo)   (group generate)
// It is used only where the combined group does not yet reach bit 0, so its
// propagate is still needed further down the tree. Purely combinational.
// The two equations are the document's; the port names are this design's.
module ebk_black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g_out,
  output logic p_out
);
  assign p_out = p_hi & p_lo;
  assign g_out = g_hi | (p_hi & g_lo);
endmodule
