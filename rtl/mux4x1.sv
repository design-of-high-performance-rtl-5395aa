// mux4x1: one-bit 4-to-1 multiplexer of the operand selector.
// Output Q follows I0, I1, I2 or I3 for {S1,S0} = 00, 01, 10, 11. In the
// arithmetic unit I0..I3 carry B_i, ~B_i, logic 0 and logic 1. The mapping of
// select code to input follows the unit's function table; the gate-level form
// (the original is a static CMOS circuit) is this design's own. Combinational.
module mux4x1 (
  input  logic i0,
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic s0,
  input  logic s1,
  output logic q
);
  always_comb begin
    unique case ({s1, s0})
      2'b00:   q = i0;
      2'b01:   q = i1;
      2'b10:   q = i2;
      default: q = i3;
    endcase
  end
endmodule
