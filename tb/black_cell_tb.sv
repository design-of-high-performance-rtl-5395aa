// black_cell_tb: exhaustive check of the black prefix cell.
// All 16 combinations of (G_i:k, P_i:k, G_k-1:j, P_k-1:j) are applied. The
// expected group terms come from the meaning of the groups: the combined group
// generates a carry if the upper part generates one, or the lower part does and
// the upper part passes it on; it propagates only if both parts propagate.
module black_cell_tb;
  logic g_hi, p_hi, g_lo, p_lo, g_out, p_out;
  int checks = 0, failures = 0;

  black_cell dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .p_lo(p_lo),
                  .g_out(g_out), .p_out(p_out));

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g, exp_p;
      {g_hi, p_hi, g_lo, p_lo} = 4'(v);
      // Carry out of the combined group with carry-in c: carry of upper group
      // fed by carry of lower group. Generate = carry out when c = 0.
      exp_g = (g_hi == 1'b1) ? 1'b1 : ((p_hi == 1'b1) ? g_lo : 1'b0);
      exp_p = (p_hi == 1'b1) ? p_lo : 1'b0;
      #1;
      checks += 2;
      if (g_out !== exp_g) begin failures++; $display("FAIL v=%b g_out=%b", 4'(v), g_out); end
      if (p_out !== exp_p) begin failures++; $display("FAIL v=%b p_out=%b", 4'(v), p_out); end
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
