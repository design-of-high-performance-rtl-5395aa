// ks_adder_tb: checks the 16-bit Kogge-Stone adder against integer addition.
// Corner cases (all-zero, all-one, alternating patterns, carry rippling the
// full width), then random operands with random carry in. sum and cout are
// compared with the 17-bit result of p_in + q_in + cin. The expected cell count
// of the prefix tree (34 black, 15 grey, 4 levels at 16 bits) is also checked.
// Also counts how often a carry out and a full-width carry chain occurred.
module ks_adder_tb;
  import au_pkg::*;
  localparam int unsigned W = AU_WIDTH;
  logic [W-1:0] p_in, q_in, sum;
  logic cin, cout;
  int checks = 0, failures = 0;
  int n_cout = 0, n_full_chain = 0;

  ks_adder dut (.p_in(p_in), .q_in(q_in), .cin(cin), .sum(sum), .cout(cout));

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    logic [W:0] expv;
    p_in = x; q_in = y; cin = c;
    expv = {1'b0, x} + {1'b0, y} + (W+1)'(c);
    #1;
    checks++;
    if ({cout, sum} !== expv) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h + %b = %b_%h expected %h", x, y, c, cout, sum, expv);
    end
    if (expv[W]) n_cout++;
    if ((x ^ y) == '1 && c) n_full_chain++;
  endtask

  initial begin
    checks++;
    if (ks_levels(W) != 4 || ks_black_cells(W) != 34 || ks_grey_cells(W) != 15) begin
      failures++;
      $display("FAIL cell count levels=%0d black=%0d grey=%0d",
               ks_levels(W), ks_black_cells(W), ks_grey_cells(W));
    end
    for (int c = 0; c < 2; c++) begin
      check('0, '0, c[0]);
      check('1, '0, c[0]);
      check('0, '1, c[0]);
      check('1, '1, c[0]);
      check(W'(16'h5555), W'(16'hAAAA), c[0]);
      check(W'(16'h8000), W'(16'h8000), c[0]);
      for (int i = 0; i < W; i++) begin
        check(W'(1) << i, '1, c[0]);          // carry from bit i to the top
        check(W'(1) << i, W'(1) << i, c[0]);  // single generate
      end
    end
    for (int n = 0; n < 200000; n++)
      check(W'($urandom), W'($urandom), 1'($urandom));
    checks++;
    if (n_cout == 0 || n_full_chain == 0) begin
      failures++;
      $display("FAIL coverage cout=%0d full_chain=%0d", n_cout, n_full_chain);
    end
    $display("carry outs %0d, full-width carry chains %0d", n_cout, n_full_chain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
