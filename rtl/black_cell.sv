// black_cell: prefix operator with group propagate (valency 2).
// Combines an upper group (i:k) with the adjacent lower group (k-1:j):
//   G_i:j = G_i:k | P_i:k & G_k-1:j      P_i:j = P_i:k & P_k-1:j
// The generate is written as the original cell builds it: a NAND whose inputs
// are the complemented terms (~G_i:k and ~(P_i:k & G_k-1:j)), so the OR takes
// two gate levels. Purely combinational.
module black_cell (
  input  logic g_hi,   // G_i:k
  input  logic p_hi,   // P_i:k
  input  logic g_lo,   // G_k-1:j
  input  logic p_lo,   // P_k-1:j
  output logic g_out,  // G_i:j
  output logic p_out   // P_i:j
);
  logic g_hi_n, pg_n;

  assign g_hi_n = ~g_hi;
  assign pg_n   = ~(p_hi & g_lo);
  assign g_out  = ~(g_hi_n & pg_n);
  assign p_out  = p_hi & p_lo;
endmodule
