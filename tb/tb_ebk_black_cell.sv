// Testbench for ebk_black_cell: drives all 16 input combinations and checks
// the group generate and propagate against a truth-table reference
// (g_out = g_hi or (p_hi and g_lo), p_out = p_hi and p_lo).
module tb_ebk_black_cell;
  logic g_hi, p_hi, g_lo, p_lo, g_out, p_out;
  int checks = 0, failures = 0;

  ebk_black_cell dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g, exp_p;
      {g_hi, p_hi, g_lo, p_lo} = 4'(v);
      #1;
      // group generates if the upper part generates, or it propagates a
      // generate coming from the lower part
      exp_g = (v[3] == 1'b1) || (v[2] == 1'b1 && v[1] == 1'b1);
      exp_p = (v[2] == 1'b1) && (v[0] == 1'b1);
      checks += 2;
      if (g_out !== exp_g) begin failures++; if (failures <= 10) $display("g_out wrong for %b", 4'(v)); end
      if (p_out !== exp_p) begin failures++; if (failures <= 10) $display("p_out wrong for %b", 4'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
