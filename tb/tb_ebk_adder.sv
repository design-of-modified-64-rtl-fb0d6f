// Testbench for ebk_adder at its default width (32) and at 16 and 8 bits,
// the adder sizes of the design. Every case compares {cout, s} with the
// integer sum a + b + cin and checks that each internal carry c[i] equals the
// carry out of adding the low i+1 bits.
module tb_ebk_adder;
  logic [31:0] a, b;
  logic        cin;
  logic [31:0] s32, c32; logic co32;
  logic [15:0] s16, c16; logic co16;
  logic [7:0]  s8,  c8;  logic co8;
  int checks = 0, failures = 0;

  ebk_adder               dut32 (.a(a),       .b(b),       .cin, .s(s32), .c(c32), .cout(co32));
  ebk_adder #(.WIDTH(16)) dut16 (.a(a[15:0]), .b(b[15:0]), .cin, .s(s16), .c(c16), .cout(co16));
  ebk_adder #(.WIDTH(8))  dut8  (.a(a[7:0]),  .b(b[7:0]),  .cin, .s(s8),  .c(c8),  .cout(co8));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_w(int w, logic [31:0] s_dut, logic [31:0] c_dut, logic co_dut);
    logic [32:0] full;
    logic [31:0] mask;
    mask = (w == 32) ? '1 : ((32'd1 << w) - 1);
    full = 33'(a & mask) + 33'(b & mask) + 33'(cin);
    checks += 2;
    if (s_dut !== (full[31:0] & mask) || co_dut !== full[w]) begin
      failures++;
      if (failures <= 10) $display("W=%0d %h + %h + %b = %b_%h, got %b_%h", w, a & mask, b & mask, cin, full[w], full[31:0] & mask, co_dut, s_dut);
    end
    for (int i = 0; i < w; i++) begin
      logic [32:0] part;
      logic [31:0] m;
      m = (32'd2 << i) - 1;
      part = 33'(a & m) + 33'(b & m) + 33'(cin);
      if (c_dut[i] !== part[i+1]) begin
        failures++;
        if (failures <= 10) $display("W=%0d carry %0d wrong: a=%h b=%h cin=%b", w, i, a, b, cin);
        break;
      end
    end
  endtask

  task automatic apply(logic [31:0] av, logic [31:0] bv, logic cv);
    a = av; b = bv; cin = cv;
    #1;
    check_w(32, s32, c32, co32);
    check_w(16, 32'(s16), 32'(c16), co16);
    check_w(8,  32'(s8),  32'(c8),  co8);
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);          // carry input ripples through every bit
    apply('1, '1, 1'b1);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int i = 0; i < 32; i++) apply('1, 32'd1 << i, 1'b0);
    repeat (3000) apply($urandom(), $urandom(), 1'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
