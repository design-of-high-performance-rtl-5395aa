// pg_cell: bitwise pre-processing cell of the Kogge-Stone adder.
// For one bit position it forms the bit generate G_i:i = A_i & B_i and the bit
// propagate P_i:i = A_i ^ B_i, the level-0 inputs of the prefix tree. Purely
// combinational, no clock. The equations are the adder's own; the transistor
// circuit the cell was drawn with is not modelled.
module pg_cell (
  input  logic a,  // A_i
  input  logic b,  // B_i
  output logic g,  // G_i:i
  output logic p   // P_i:i
);
  assign g = a & b;
  assign p = a ^ b;
endmodule
