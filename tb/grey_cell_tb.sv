// grey_cell_tb: exhaustive check of the grey prefix cell.
// All 8 combinations of (G_i:k, P_i:k, G_k-1:j) are applied and the group
// generate compared with a value chosen case by case from the inputs.
module grey_cell_tb;
  logic g_hi, p_hi, g_lo, g_out;
  int checks = 0, failures = 0;

  grey_cell dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .g_out(g_out));

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_g;
      {g_hi, p_hi, g_lo} = 3'(v);
      exp_g = (g_hi == 1'b1) ? 1'b1 : ((p_hi == 1'b1) ? g_lo : 1'b0);
      #1;
      checks++;
      if (g_out !== exp_g) begin failures++; $display("FAIL v=%b g_out=%b", 3'(v), g_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
