// Gray cell of the Brent-Kung prefix tree.
//
// Combines an upper group (g_hi, p_hi) with a lower group whose generate
// g_lo already includes everything down to bit 0 and the carry input:
//   g_out = g_hi | (p_hi & g_lo)
// The result is therefore a final carry, and the group propagate is not
// formed. Replacing black cells by these wherever the propagate would be
// unused is the area saving the design is built around. Combinational.
module ebk_gray_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  output logic g_out
);
  assign g_out = g_hi | (p_hi & g_lo);
endmodule
