// Testbench for ebk_generation. Instantiates the stage at its default width
// (32) and at 8, 16 and 64 bits, feeds all four from the same random or
// corner-case propagate/generate vectors and carry input, and compares every
// carry, every sum bit and the carry out with a bit-serial reference:
// c[i] = g[i] | p[i] & c[i-1], c[-1] = cin, s[i] = p[i] ^ c[i-1].
// p and g are driven independently, so the tree is also exercised with
// p and g both set in one position.
module tb_ebk_generation;
  logic [63:0] p, g;
  logic        cin;
  logic [7:0]  c8,  s8;   logic co8;
  logic [15:0] c16, s16;  logic co16;
  logic [31:0] c32, s32;  logic co32;
  logic [63:0] c64, s64;  logic co64;
  int checks = 0, failures = 0;

  ebk_generation #(.WIDTH(8))  dut8  (.p(p[7:0]),  .g(g[7:0]),  .cin, .c(c8),  .s(s8),  .cout(co8));
  ebk_generation #(.WIDTH(16)) dut16 (.p(p[15:0]), .g(g[15:0]), .cin, .c(c16), .s(s16), .cout(co16));
  ebk_generation               dut32 (.p(p[31:0]), .g(g[31:0]), .cin, .c(c32), .s(s32), .cout(co32));
  ebk_generation #(.WIDTH(64)) dut64 (.p(p),       .g(g),       .cin, .c(c64), .s(s64), .cout(co64));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // serial reference over the low w bits
  task automatic check_w(int w, logic [63:0] c_dut, logic [63:0] s_dut, logic co_dut);
    logic cr = cin;
    logic [63:0] c_ref = '0, s_ref = '0;
    for (int i = 0; i < w; i++) begin
      s_ref[i] = p[i] ^ cr;
      cr = g[i] | (p[i] & cr);
      c_ref[i] = cr;
    end
    checks += 3;
    if (c_dut !== c_ref) begin failures++; if (failures <= 10) $display("W=%0d carries %h, expected %h (p=%h g=%h cin=%b)", w, c_dut, c_ref, p, g, cin); end
    if (s_dut !== s_ref) begin failures++; if (failures <= 10) $display("W=%0d sum %h, expected %h", w, s_dut, s_ref); end
    if (co_dut !== cr)   begin failures++; if (failures <= 10) $display("W=%0d cout %b, expected %b", w, co_dut, cr); end
  endtask

  task automatic apply(logic [63:0] pv, logic [63:0] gv, logic cv);
    p = pv; g = gv; cin = cv;
    #1;
    check_w(8,  64'(c8),  64'(s8),  co8);
    check_w(16, 64'(c16), 64'(s16), co16);
    check_w(32, 64'(c32), 64'(s32), co32);
    check_w(64, c64,      s64,      co64);
  endtask

  initial begin
    // a lone generate or a carry input travelling through a full propagate run
    apply('1, '0, 1'b1);
    apply('1, '0, 1'b0);
    apply('0, '0, 1'b1);
    for (int i = 0; i < 64; i++) begin
      apply(~(64'd1 << i), '0, 1'b1);       // propagate run broken at bit i
      apply('1, 64'd1 << i, 1'b0);          // one generate, then all propagate
    end
    repeat (2000) begin
      apply({$urandom(), $urandom()}, {$urandom(), $urandom()}, 1'($urandom()));
      // mostly-propagate vectors make long carry chains likely
      apply({$urandom(), $urandom()} | {$urandom(), $urandom()} | {$urandom(), $urandom()},
            {$urandom(), $urandom()} & {$urandom(), $urandom()} & {$urandom(), $urandom()},
            1'($urandom()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
