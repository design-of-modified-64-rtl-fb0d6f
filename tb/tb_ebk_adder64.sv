// End-to-end testbench for the 64-bit adder with every parameter at its
// default. Compares {cout, s} with the integer sum a + b + cin, and every
// carry c[i] with the carry out of adding the low i+1 bits, for corner cases
// and random operands. It counts how often each mechanism of the adder was
// exercised and fails if one never was:
//   cin      - the carry input was 1 and changed the result
//   slice    - a carry crossed from the lower 32-bit slice into the upper one
//   full_run - a carry travelled through all 64 bit positions
//   overflow - the sum overflowed 64 bits (cout = 1)
module tb_ebk_adder64;
  logic [63:0] a, b, s, c;
  logic        cin, cout;
  int checks = 0, failures = 0;
  int n_cin = 0, n_slice = 0, n_full_run = 0, n_overflow = 0;

  ebk_adder64 dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [63:0] av, logic [63:0] bv, logic cv);
    logic [64:0] full;
    logic [32:0] low;
    a = av; b = bv; cin = cv;
    #1;
    full = 65'(a) + 65'(b) + 65'(cin);
    low  = 33'(a[31:0]) + 33'(b[31:0]) + 33'(cin);
    checks += 2;
    if ({cout, s} !== full) begin
      failures++;
      if (failures <= 10) $display("%h + %h + %b = %h, got %b_%h", a, b, cin, full, cout, s);
    end
    for (int i = 0; i < 64; i++) begin
      logic [64:0] part;
      logic [63:0] m;
      m = (i == 63) ? '1 : ((64'd2 << i) - 1);
      part = 65'(a & m) + 65'(b & m) + 65'(cin);
      if (c[i] !== part[i+1]) begin
        failures++;
        if (failures <= 10) $display("carry %0d wrong: a=%h b=%h cin=%b", i, a, b, cin);
        break;
      end
    end
    if (cin && full != 65'(a) + 65'(b)) n_cin++;
    if (low[32]) n_slice++;
    if (cin && (a ^ b) == '1) n_full_run++;
    if (full[64]) n_overflow++;
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);                         // carry ripples through all 64 bits
    apply(64'h0000_0000_FFFF_FFFF, 64'd1, 1'b0);  // carry leaves the lower slice
    apply('1, '1, 1'b0);
    apply(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b1);
    apply(64'h0123_4567_89AB_CDEF, 64'hFEDC_BA98_7654_3210, 1'b1);
    for (int i = 0; i < 64; i++) apply('1, 64'd1 << i, 1'b0);
    repeat (5000) apply({$urandom(), $urandom()}, {$urandom(), $urandom()}, 1'($urandom()));
    $display("mechanisms: cin=%0d slice=%0d full_run=%0d overflow=%0d",
             n_cin, n_slice, n_full_run, n_overflow);
    if (n_cin == 0)      begin failures++; if (failures <= 10) $display("carry input never exercised"); end
    if (n_slice == 0)    begin failures++; if (failures <= 10) $display("slice carry never exercised"); end
    if (n_full_run == 0) begin failures++; if (failures <= 10) $display("full carry run never exercised"); end
    if (n_overflow == 0) begin failures++; if (failures <= 10) $display("overflow never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
