// Generation stage of the efficient Brent-Kung adder.
//
// Takes the bit propagates p and generates g of the pre-processing stage and
// the carry input cin, and produces every bit's carry c[i] (the carry out of
// bit i) and the sum bits s[i] = p[i] ^ c[i-1], with c[-1] = cin.
//
// The carries come from a Brent-Kung parallel-prefix tree:
//   * the carry-input cell folds cin into bit 0 first, so c[0] = g0 | p0&cin;
//   * up-sweep, level l = 0 .. log2(WIDTH)-1: every position i with
//     (i+1) a multiple of 2^(l+1) combines its group with the group ending at
//     i - 2^l, doubling the span of the group;
//   * down-sweep, level l = log2(WIDTH)-2 .. 0: every position
//     i = k*2^(l+1) + 2^l - 1 (k >= 1) combines with the finished prefix at
//     i - 2^l.
// A combine whose lower group already reaches bit 0 yields a final carry and
// needs no group propagate, so it is a gray cell; only the up-sweep combines
// that do not reach bit 0 are black cells. For WIDTH = 16 this gives 11 black
// and 15 gray cells, where a tree of black cells only would need 26.
//
// WIDTH must be a power of two, at least 2. Combinational; the carry path is
// 2*log2(WIDTH) - 1 prefix cells plus the carry-input cell deep.
// The cell equations, the carry-input cell and the gray-for-black substitution
// follow the document; the exact placement rule for the cells above is the
// textbook Brent-Kung tree chosen by this design.
module ebk_generation #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] g,
  input  logic             cin,
  output logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  localparam int LG = $clog2(WIDTH);

  // Group generate / propagate after each up-sweep level (index 0 = input).
  logic [WIDTH-1:0] gu [LG+1];
  logic [WIDTH-1:0] pu [LG+1];
  // Group generate / propagate during the down-sweep; gd[LG-1] is the
  // up-sweep result and gd[0] holds the final carries.
  logic [WIDTH-1:0] gd [LG];
  logic [WIDTH-1:0] pd [LG];

  // Bit 0 absorbs the carry input (cell "M").
  ebk_cin_cell u_m (.g0(g[0]), .p0(p[0]), .cin(cin), .c0(gu[0][0]));
  assign pu[0][0] = 1'b0;  // a group that reaches bit 0 needs no propagate
  assign gu[0][WIDTH-1:1] = g[WIDTH-1:1];
  assign pu[0][WIDTH-1:1] = p[WIDTH-1:1];

  for (genvar l = 0; l < LG; l++) begin : g_up
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (((i + 1) % (2 ** (l + 1))) == 0) begin : g_node
        if ((i + 1) == (2 ** (l + 1))) begin : g_gray
          ebk_gray_cell u_gray (
            .g_hi(gu[l][i]), .p_hi(pu[l][i]), .g_lo(gu[l][i - 2 ** l]),
            .g_out(gu[l+1][i])
          );
          assign pu[l+1][i] = 1'b0;
        end else begin : g_black
          ebk_black_cell u_black (
            .g_hi(gu[l][i]), .p_hi(pu[l][i]),
            .g_lo(gu[l][i - 2 ** l]), .p_lo(pu[l][i - 2 ** l]),
            .g_out(gu[l+1][i]), .p_out(pu[l+1][i])
          );
        end
      end else begin : g_pass
        assign gu[l+1][i] = gu[l][i];
        assign pu[l+1][i] = pu[l][i];
      end
    end
  end

  assign gd[LG-1] = gu[LG];
  assign pd[LG-1] = pu[LG];

  for (genvar l = LG - 2; l >= 0; l--) begin : g_down
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if ((i >= 2 ** (l + 1)) && (((i + 1) % (2 ** (l + 1))) == 2 ** l)) begin : g_gray
        ebk_gray_cell u_gray (
          .g_hi(gd[l+1][i]), .p_hi(pd[l+1][i]), .g_lo(gd[l+1][i - 2 ** l]),
          .g_out(gd[l][i])
        );
        assign pd[l][i] = 1'b0;
      end else begin : g_pass
        assign gd[l][i] = gd[l+1][i];
        assign pd[l][i] = pd[l+1][i];
      end
    end
  end

  assign c    = gd[0];
  assign s    = p ^ {c[WIDTH-2:0], cin};
  assign cout = c[WIDTH-1];

  if (WIDTH < 2 || (2 ** LG) != WIDTH) begin : g_bad_width
    $error("ebk_generation: WIDTH must be a power of two and at least 2");
  end
endmodule
