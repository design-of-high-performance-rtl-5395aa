// arith_unit_tb: end-to-end test of the 16-bit arithmetic unit at its default
// size.
//
// Part 1 walks the function table: every {S1,S0,Cin} row with corner and
// random operands. The expected D and carry out come from what each row means
// (add, add with carry, A-B-1, A-B, transfer, increment, decrement, transfer),
// written with integer arithmetic and comparisons, not from the adder's
// A + Q + Cin form. Part 2 runs a random program of register-transfer
// micro-operations on three registers R1..R3 kept in the testbench:
//   R3 <- R1 + R2, R3 <- R1 - R2, R2 <- ~R2, R2 <- ~R2 + 1, R2 <- R1 + ~R2 + 1,
//   R1 <- R1 + 1, R1 <- R1 - 1, R1 <- R2
// Each is issued to the unit with the routing and select code it needs (the
// complement operations put zero on A, the move puts R2 on A) and the register
// state is compared with a reference model. Every function-table row, every
// micro-operation, carry out, borrow, increment wrap-around and decrement
// wrap-around are counted; one that never happens counts as a failure. The
// unit is combinational: results are checked one time step after the inputs.
module arith_unit_tb;
  import au_pkg::*;
  localparam int unsigned W = AU_WIDTH;
  localparam logic [W-1:0] ALL1 = '1;

  logic [W-1:0] a, b, d;
  logic s1, s0, cin, cout;
  int checks = 0, failures = 0;

  int row_seen [8];
  int uop_seen [8];
  int n_carry = 0, n_borrow = 0, n_inc_wrap = 0, n_dec_wrap = 0;

  arith_unit dut (.a(a), .b(b), .s1(s1), .s0(s0), .cin(cin), .d(d), .cout(cout));

  // Expected result of function-table row {s1,s0,cin}.
  function automatic logic [W:0] expected(input logic [2:0] row,
                                          input logic [W-1:0] av, input logic [W-1:0] bv);
    longint x = longint'(av);
    longint y = longint'(bv);
    longint m = longint'(1) << W;
    longint r;
    logic   c;
    case (row)
      3'b000: begin r = x + y;     c = (r >= m); end  // add
      3'b001: begin r = x + y + 1; c = (r >= m); end  // add with carry
      3'b010: begin r = x - y - 1; c = (x > y);  end  // subtract with borrow
      3'b011: begin r = x - y;     c = (x >= y); end  // subtract
      3'b100: begin r = x;         c = 1'b0;     end  // transfer
      3'b101: begin r = x + 1;     c = (av == ALL1); end  // increment
      3'b110: begin r = x - 1;     c = (av != '0); end    // decrement
      default: begin r = x;        c = 1'b1;     end  // transfer
    endcase
    r = ((r % m) + m) % m;
    return {c, W'(r)};
  endfunction

  task automatic apply(input logic [2:0] row, input logic [W-1:0] av, input logic [W-1:0] bv);
    logic [W:0] e;
    a = av; b = bv; {s1, s0, cin} = row;
    e = expected(row, av, bv);
    #1;
    checks++;
    if ({cout, d} !== e) begin
      failures++;
      if (failures < 10)
        $display("FAIL row %b a=%h b=%h: d=%h cout=%b expected d=%h cout=%b",
                 row, av, bv, d, cout, e[W-1:0], e[W]);
    end
    row_seen[row]++;
    if (row[2:1] == 2'b00 && e[W]) n_carry++;
    if (row[2:1] == 2'b01 && !e[W]) n_borrow++;
    if (row == 3'b101 && av == ALL1) n_inc_wrap++;
    if (row == 3'b110 && av == '0) n_dec_wrap++;
  endtask

  // Issue one result through the unit and return D.
  task automatic run_unit(input logic [2:0] row, input logic [W-1:0] av,
                          input logic [W-1:0] bv, output logic [W-1:0] res);
    apply(row, av, bv);
    res = d;
  endtask

  logic [W-1:0] r1, r2, r3;       // registers as updated through the unit
  logic [W-1:0] m1, m2, m3;       // reference model

  initial begin
    // Part 1: function table.
    for (int row = 0; row < 8; row++) begin
      apply(3'(row), '0, '0);
      apply(3'(row), ALL1, ALL1);
      apply(3'(row), ALL1, W'(1));
      apply(3'(row), W'(1), ALL1);
      apply(3'(row), W'(16'h1234), W'(16'h1234));
      apply(3'(row), W'(16'h8000), W'(16'h7FFF));
      for (int n = 0; n < 5000; n++) apply(3'(row), W'($urandom), W'($urandom));
    end

    // Part 2: micro-operation program.
    r1 = W'($urandom); r2 = W'($urandom); r3 = '0;
    m1 = r1; m2 = r2; m3 = r3;
    for (int n = 0; n < 4000; n++) begin
      int op;
      logic [W-1:0] res;
      op = int'($urandom_range(7, 0));
      case (op)
        0: begin run_unit(3'b000, r1, r2, res); r3 = res; m3 = m1 + m2; end
        1: begin run_unit(3'b011, r1, r2, res); r3 = res; m3 = m1 - m2; end
        2: begin run_unit(3'b010, '0, r2, res); r2 = res; m2 = ~m2; end
        3: begin run_unit(3'b011, '0, r2, res); r2 = res; m2 = W'(0) - m2; end
        4: begin run_unit(3'b011, r1, r2, res); r2 = res; m2 = m1 - m2; end
        5: begin run_unit(3'b101, r1, r2, res); r1 = res; m1 = m1 + W'(1); end
        6: begin run_unit(3'b110, r1, r2, res); r1 = res; m1 = m1 - W'(1); end
        default: begin run_unit(3'b100, r2, r1, res); r1 = res; m1 = m2; end
      endcase
      uop_seen[op]++;
      checks++;
      if (r1 !== m1 || r2 !== m2 || r3 !== m3) begin
        failures++;
        if (failures < 10)
          $display("FAIL micro-op %0d: R1=%h R2=%h R3=%h expected %h %h %h",
                   op, r1, r2, r3, m1, m2, m3);
        r1 = m1; r2 = m2; r3 = m3;
      end
      // Now and then force the wrap-around cases.
      if (n % 500 == 0) begin r1 = ALL1; m1 = ALL1; end
      if (n % 500 == 250) begin r1 = '0; m1 = '0; end
    end

    // Every mechanism must have been exercised.
    for (int i = 0; i < 8; i++) begin
      checks += 2;
      if (row_seen[i] == 0) begin failures++; $display("FAIL row %b never applied", 3'(i)); end
      if (uop_seen[i] == 0) begin failures++; $display("FAIL micro-op %0d never issued", i); end
    end
    checks += 4;
    if (n_carry == 0)    begin failures++; $display("FAIL no carry out seen"); end
    if (n_borrow == 0)   begin failures++; $display("FAIL no borrow seen"); end
    if (n_inc_wrap == 0) begin failures++; $display("FAIL no increment wrap seen"); end
    if (n_dec_wrap == 0) begin failures++; $display("FAIL no decrement wrap seen"); end
    $display("rows applied: %0d %0d %0d %0d %0d %0d %0d %0d", row_seen[0], row_seen[1],
             row_seen[2], row_seen[3], row_seen[4], row_seen[5], row_seen[6], row_seen[7]);
    $display("micro-ops: %0d %0d %0d %0d %0d %0d %0d %0d", uop_seen[0], uop_seen[1],
             uop_seen[2], uop_seen[3], uop_seen[4], uop_seen[5], uop_seen[6], uop_seen[7]);
    $display("carry outs %0d, borrows %0d, increment wraps %0d, decrement wraps %0d",
             n_carry, n_borrow, n_inc_wrap, n_dec_wrap);
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
