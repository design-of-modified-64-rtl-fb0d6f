// Carry-input cell ("M" in the tree diagrams).
//
// Folds the adder's carry input into bit 0 so that the prefix tree sees bit 0
// as a group that already starts at the carry input:
//   c0 = g0 | (p0 & cin)
// c0 is the carry out of bit 0. Because every prefix that reaches bit 0
// therefore carries the carry input with it, all cells on those paths can be
// gray cells. Combinational.
module ebk_cin_cell (
  input  logic g0,
  input  logic p0,
  input  logic cin,
  output logic c0
);
  assign c0 = g0 | (p0 & cin);
endmodule
