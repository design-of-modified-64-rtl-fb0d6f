// Testbench for ebk_gray_cell: drives all 8 input combinations and checks
// g_out = g_hi or (p_hi and g_lo) against a truth-table reference.
module tb_ebk_gray_cell;
  logic g_hi, p_hi, g_lo, g_out;
  int checks = 0, failures = 0;

  ebk_gray_cell dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_g;
      {g_hi, p_hi, g_lo} = 3'(v);
      #1;
      exp_g = (v[2] == 1'b1) || (v[1] == 1'b1 && v[0] == 1'b1);
      checks++;
      if (g_out !== exp_g) begin failures++; if (failures <= 10) $display("g_out wrong for %b", 3'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
