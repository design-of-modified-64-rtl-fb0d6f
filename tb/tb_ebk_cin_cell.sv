// Testbench for ebk_cin_cell: for every bit pair (a0, b0) and carry input,
// checks that c0 is the carry out of the one-bit sum a0 + b0 + cin.
module tb_ebk_cin_cell;
  logic g0, p0, cin, c0;
  int checks = 0, failures = 0;

  ebk_cin_cell dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic a0, b0;
      logic [1:0] total;
      {a0, b0, cin} = 3'(v);
      g0 = a0 & b0;
      p0 = a0 ^ b0;
      #1;
      total = 2'(a0) + 2'(b0) + 2'(cin);
      checks++;
      if (c0 !== total[1]) begin failures++; if (failures <= 10) $display("c0 wrong for a0=%b b0=%b cin=%b", a0, b0, cin); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
