// black_cell_tb: exhaustive check of the black prefix cell against the
// truth table of G = Ghi | Phi & Glo and P = Phi & Plo, all 16 input
// combinations.
module black_cell_tb;
  logic g_hi, p_hi, g_lo, p_lo, g_out, p_out;
  int checks = 0, failures = 0;

  black_cell dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {g_hi, p_hi, g_lo, p_lo} = 4'(v);
      #1;
      checks++;
      // group generates if the upper half generates, or propagates a
      // generate from the lower half
      if (g_out !== ((g_hi == 1'b1) || (p_hi == 1'b1 && g_lo == 1'b1)) ||
          p_out !== (p_hi == 1'b1 && p_lo == 1'b1)) begin
        failures++;
        $display("FAIL v=%b g=%b p=%b", 4'(v), g_out, p_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
