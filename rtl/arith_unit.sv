// arith_unit: 16-bit arithmetic unit built around a Kogge-Stone adder.
//
// Operand A goes straight to the adder's P input. Operand B reaches the Q input
// through a bank of 4x1 multiplexers (operand_mux) that choose, under S1,S0,
// between B, ~B, all zeros and all ones. The adder then forms D = A + Q + Cin:
//
//   S1 S0 Cin   Q    D            operation
//    0  0  0    B    A + B        add
//    0  0  1    B    A + B + 1    add with carry
//    0  1  0   ~B    A + ~B       subtract with borrow (A - B - 1)
//    0  1  1   ~B    A + ~B + 1   subtract (A - B)
//    1  0  0    0    A            transfer
//    1  0  1    0    A + 1        increment
//    1  1  0    1    A - 1        decrement
//    1  1  1    1    A            transfer (cout = 1)
//
// The structure and table are those of the published unit. It is purely
// combinational (no clock, reset or registers; the result follows the inputs
// after the adder's log2(WIDTH) prefix levels). cout is the adder's carry out;
// for subtraction it is the inverted borrow. No overflow flag is produced.
module arith_unit #(
  parameter int unsigned WIDTH = au_pkg::AU_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             s1,
  input  logic             s0,
  input  logic             cin,
  output logic [WIDTH-1:0] d,
  output logic             cout
);
  logic [WIDTH-1:0] q;

  operand_mux #(.WIDTH(WIDTH)) u_opmux (
    .b(b), .s1(s1), .s0(s0), .q(q)
  );

  ks_adder #(.WIDTH(WIDTH)) u_adder (
    .p_in(a), .q_in(q), .cin(cin), .sum(d), .cout(cout)
  );

endmodule
