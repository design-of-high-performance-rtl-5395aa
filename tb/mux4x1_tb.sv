// mux4x1_tb: exhaustive check of the one-bit 4-to-1 multiplexer over all 64
// combinations of data and select inputs; the expected output is the data
// input indexed by {S1,S0}.
module mux4x1_tb;
  logic [3:0] i;
  logic s0, s1, q;
  int checks = 0, failures = 0;

  mux4x1 dut (.i0(i[0]), .i1(i[1]), .i2(i[2]), .i3(i[3]), .s0(s0), .s1(s1), .q(q));

  initial begin
    for (int v = 0; v < 64; v++) begin
      {s1, s0, i} = 6'(v);
      #1;
      checks++;
      if (q !== i[{s1, s0}]) begin
        failures++;
        $display("FAIL s1=%b s0=%b i=%b q=%b", s1, s0, i, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
