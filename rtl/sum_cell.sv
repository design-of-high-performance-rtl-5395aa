// sum_cell: post-processing cell of the Kogge-Stone adder.
// Sum bit i is the bit propagate XOR the carry into the bit, which is the
// group generate of all lower bits: S_i = P_i ^ G_i-1:0 (for bit 0 the carry
// in). Purely combinational.
module sum_cell (
  input  logic p,       // P_i
  input  logic g_prev,  // G_i-1:0
  output logic s        // S_i
);
  assign s = p ^ g_prev;
endmodule
