// Pre-processing stage of the efficient Brent-Kung adder.
//
// Forms for every bit position i the bit propagate p[i] = a[i] ^ b[i] and the
// bit generate g[i] = a[i] & b[i]. These feed the carry tree of the
// generation stage; p is also reused there to form the sum bits.
// Combinational, WIDTH bits wide; the default of 32 is the slice width of the
// 64-bit adder.
module ebk_preprocess #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] g
);
  assign p = a ^ b;
  assign g = a & b;
endmodule
