// pg_cell_tb: exhaustive check of the bit generate/propagate cell.
// All four input pairs are applied; G must equal the AND and P the XOR of the
// inputs, computed here from the truth table rather than from the cell's
// equations. A watchdog ends the run if it stalls.
module pg_cell_tb;
  logic a, b, g, p;
  int checks = 0, failures = 0;

  pg_cell dut (.a(a), .b(b), .g(g), .p(p));

  // Truth table rows {a,b} = 00,01,10,11: expected g and p.
  localparam logic [3:0] G_TT = 4'b1000;
  localparam logic [3:0] P_TT = 4'b0110;

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks += 2;
      if (g !== G_TT[v]) begin failures++; $display("FAIL a=%b b=%b g=%b", a, b, g); end
      if (p !== P_TT[v]) begin failures++; $display("FAIL a=%b b=%b p=%b", a, b, p); end
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
