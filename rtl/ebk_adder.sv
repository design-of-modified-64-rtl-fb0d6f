// Efficient Brent-Kung adder, WIDTH bits.
//
// s + 2^WIDTH * cout = a + b + cin, computed in two stages:
//   1. pre-processing: bit propagate p = a ^ b and generate g = a & b;
//   2. generation: a Brent-Kung prefix tree of black and gray cells turns
//      (p, g, cin) into every bit's carry c[i], and s[i] = p[i] ^ c[i-1].
// c exposes the internal carries (c[i] is the carry out of bit i), as the
// tree diagrams of the design do; cout equals c[WIDTH-1].
// Purely combinational. WIDTH must be a power of two; the default 32 is the
// slice from which the 64-bit adder is built. The same module at WIDTH = 16
// and 8 gives the smaller adders of the design.
module ebk_adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] c,
  output logic             cout
);
  logic [WIDTH-1:0] p, g;

  ebk_preprocess #(.WIDTH(WIDTH)) u_pre (.a(a), .b(b), .p(p), .g(g));

  ebk_generation #(.WIDTH(WIDTH)) u_gen (
    .p(p), .g(g), .cin(cin), .c(c), .s(s), .cout(cout)
  );
endmodule
