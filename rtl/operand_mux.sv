// operand_mux: the bank of 4x1 multiplexers that prepares the adder's Q input.
// One mux4x1 per bit, all sharing S1,S0. Bit i sees B_i, its inverted copy,
// a ground bus bit (logic 0) and the inverted ground bus bit (logic 1), so the
// bank delivers B, ~B, all zeros or all ones (codes 00, 01, 10, 11, see
// au_pkg::qsel_e). Purely combinational; WIDTH defaults to 16 as published.
module operand_mux #(
  parameter int unsigned WIDTH = au_pkg::AU_WIDTH
) (
  input  logic [WIDTH-1:0] b,
  input  logic             s1,
  input  logic             s0,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] b_n;
  logic [WIDTH-1:0] gnd;
  logic [WIDTH-1:0] gnd_n;

  assign b_n   = ~b;
  assign gnd   = '0;
  assign gnd_n = ~gnd;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    mux4x1 u_mux (
      .i0(b[i]), .i1(b_n[i]), .i2(gnd[i]), .i3(gnd_n[i]),
      .s0(s0), .s1(s1), .q(q[i])
    );
  end
endmodule
