// sum_cell_tb: exhaustive check of the sum cell. The expected sum bit is the
// low bit of the arithmetic sum of a propagating bit pair (P) and the incoming
// carry (G_i-1:0).
module sum_cell_tb;
  logic p, g_prev, s;
  int checks = 0, failures = 0;

  sum_cell dut (.p(p), .g_prev(g_prev), .s(s));

  initial begin
    for (int v = 0; v < 4; v++) begin
      int total;
      {p, g_prev} = 2'(v);
      total = int'(p) + int'(g_prev);
      #1;
      checks++;
      if (s !== total[0]) begin failures++; $display("FAIL p=%b g=%b s=%b", p, g_prev, s); end
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
