// Testbench for ebk_preprocess at its default width: random and corner
// operands, each bit's propagate and generate checked against a bit-by-bit
// one-bit-addition reference (p = low bit of a+b, g = high bit of a+b).
module tb_ebk_preprocess;
  localparam int W = 32;
  logic [W-1:0] a, b, p, g;
  int checks = 0, failures = 0;

  ebk_preprocess dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    for (int i = 0; i < W; i++) begin
      logic [1:0] t;
      t = 2'(a[i]) + 2'(b[i]);
      checks++;
      if (p[i] !== t[0] || g[i] !== t[1]) begin
        failures++;
        if (failures <= 10) $display("bit %0d wrong: a=%h b=%h p=%h g=%h", i, a, b, p, g);
      end
    end
  endtask

  initial begin
    a = '0;       b = '0;       check();
    a = '1;       b = '1;       check();
    a = '1;       b = '0;       check();
    a = 32'h5555_5555; b = 32'hAAAA_AAAA; check();
    repeat (200) begin
      a = $urandom(); b = $urandom(); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
