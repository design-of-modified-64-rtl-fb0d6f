// 64-bit efficient Brent-Kung adder (top level).
//
// s + 2^64 * cout = a + b + cin. The 64 bits are split into WIDTH/SLICE
// slices of SLICE bits (two 32-bit slices by default). Each slice is a
// complete efficient Brent-Kung adder (pre-processing stage plus generation
// stage); the carry out of one slice is the carry input of the next, so the
// slice boundary is the only place where carries ripple.
// c gives the carry out of every bit position across all slices.
// Purely combinational: results are valid one combinational delay after the
// inputs change. Building the 64-bit adder as two 32-bit additions chained by
// their carries follows the document; the SLICE parameter is this design's.
module ebk_adder64 #(
  parameter int WIDTH = 64,
  parameter int SLICE = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] c,
  output logic             cout
);
  localparam int NSLICE = WIDTH / SLICE;

  // carry into each slice; chain[NSLICE] is the adder's carry out
  logic [NSLICE:0] chain;
  assign chain[0] = cin;

  for (genvar k = 0; k < NSLICE; k++) begin : g_slice
    ebk_adder #(.WIDTH(SLICE)) u_slice (
      .a   (a[k*SLICE +: SLICE]),
      .b   (b[k*SLICE +: SLICE]),
      .cin (chain[k]),
      .s   (s[k*SLICE +: SLICE]),
      .c   (c[k*SLICE +: SLICE]),
      .cout(chain[k+1])
    );
  end

  assign cout = chain[NSLICE];

  if (NSLICE * SLICE != WIDTH) begin : g_bad_slice
    $error("ebk_adder64: WIDTH must be a multiple of SLICE");
  end
endmodule
