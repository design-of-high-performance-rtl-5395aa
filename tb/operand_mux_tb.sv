// operand_mux_tb: checks the 16-bit operand selector. For random and corner
// values of B and every select code the output must be B, ~B, all zeros or all
// ones (codes 00, 01, 10, 11).
module operand_mux_tb;
  import au_pkg::*;
  localparam int unsigned W = AU_WIDTH;
  logic [W-1:0] b, q, exp_q;
  logic s1, s0;
  int checks = 0, failures = 0;

  operand_mux dut (.b(b), .s1(s1), .s0(s0), .q(q));

  task automatic check(input logic [W-1:0] bv, input qsel_e sel);
    b = bv;
    {s1, s0} = sel;
    case (sel)
      QSEL_B:    exp_q = bv;
      QSEL_NOTB: exp_q = ~bv;
      QSEL_ZERO: exp_q = '0;
      default:   exp_q = '1;
    endcase
    #1;
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL sel=%b b=%h q=%h expected %h", sel, bv, q, exp_q);
    end
  endtask

  initial begin
    for (int s = 0; s < 4; s++) begin
      check('0, qsel_e'(s));
      check('1, qsel_e'(s));
      check(W'(16'hA5C3), qsel_e'(s));
      for (int n = 0; n < 500; n++) check(W'($urandom), qsel_e'(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
