// grey_cell: prefix operator that forms only the group generate.
// Used where the lower group already ends at bit 0, so no group propagate is
// needed further on:  G_i:j = G_i:k | P_i:k & G_k-1:j, built like the black
// cell's generate half (NAND of complemented terms). Purely combinational.
module grey_cell (
  input  logic g_hi,   // G_i:k
  input  logic p_hi,   // P_i:k
  input  logic g_lo,   // G_k-1:j
  output logic g_out   // G_i:j
);
  logic g_hi_n, pg_n;

  assign g_hi_n = ~g_hi;
  assign pg_n   = ~(p_hi & g_lo);
  assign g_out  = ~(g_hi_n & pg_n);
endmodule
