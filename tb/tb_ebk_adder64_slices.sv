// Testbench for the 64-bit adder built with other slice widths: one 64-bit
// Brent-Kung tree (SLICE = 64) and four chained 16-bit slices (SLICE = 16).
// Both are compared with 65-bit integer addition on corner and random cases,
// and the run fails unless a carry crossed a 16-bit slice boundary.
module tb_ebk_adder64_slices;
  logic [63:0] a, b, s1, c1, s4, c4;
  logic        cin, co1, co4;
  int checks = 0, failures = 0, n_boundary = 0;

  ebk_adder64 #(.SLICE(64)) dut_one  (.a, .b, .cin, .s(s1), .c(c1), .cout(co1));
  ebk_adder64 #(.SLICE(16)) dut_four (.a, .b, .cin, .s(s4), .c(c4), .cout(co4));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [63:0] av, logic [63:0] bv, logic cv);
    logic [64:0] full;
    a = av; b = bv; cin = cv;
    #1;
    full = 65'(a) + 65'(b) + 65'(cin);
    checks += 2;
    if ({co1, s1} !== full) begin failures++; if (failures <= 10) $display("SLICE=64: %h + %h + %b = %h, got %b_%h", a, b, cin, full, co1, s1); end
    if ({co4, s4} !== full) begin failures++; if (failures <= 10) $display("SLICE=16: %h + %h + %b = %h, got %b_%h", a, b, cin, full, co4, s4); end
    for (int k = 1; k < 4; k++) begin
      logic [64:0] part;
      logic [63:0] m;
      m = (64'd1 << (16 * k)) - 1;
      part = 65'(a & m) + 65'(b & m) + 65'(cin);
      if (part[16*k]) n_boundary++;
    end
  endtask

  initial begin
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply(64'h0000_FFFF_FFFF_FFFF, 64'd1, 1'b0);
    for (int i = 0; i < 64; i++) apply('1, 64'd1 << i, 1'b0);
    repeat (3000) apply({$urandom(), $urandom()}, {$urandom(), $urandom()}, 1'($urandom()));
    if (n_boundary == 0) begin failures++; $display("no carry crossed a 16-bit slice boundary"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
