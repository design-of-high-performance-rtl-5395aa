// ks_adder: radix-2 Kogge-Stone parallel prefix adder, sum = p_in + q_in + cin.
//
// Three parts. Pre-processing: one pg_cell per bit gives G_i:i = p_i & q_i and
// P_i:i = p_i ^ q_i. Prefix network: log2(WIDTH) levels; at level l (span
// d = 2**(l-1)) bit i combines its group with the group ending d bits lower,
// (G,P)_i:j = (G,P)_i:k o (G,P)_k-1:j. The cell is a grey_cell (generate only)
// when that lower group already reaches bit 0 (d <= i < 2d), a black_cell
// otherwise; bits i < d are passed on unchanged (buffers in the original). At
// 16 bits this is 4 levels of 34 black and 15 grey cells, every node driving
// at most two cells of the next level. Post-processing: one sum_cell per bit,
// S_i = P_i ^ G_i-1:0, and cout = G_WIDTH-1:0.
//
// Carry in is this design's own addition to the published tree, which shows no
// carry-in input: one grey cell ahead of the tree folds it into bit 0,
// G_0:0 = g_0 | p_0 & cin, so every G_i:0 (and cout) includes it and S_0 is
// P_0 ^ cin. Purely combinational, no clock; WIDTH must be a power of two >= 2.
module ks_adder #(
  parameter int unsigned WIDTH = au_pkg::AU_WIDTH
) (
  input  logic [WIDTH-1:0] p_in,  // operand on adder input P
  input  logic [WIDTH-1:0] q_in,  // operand on adder input Q
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned LEVELS = au_pkg::ks_levels(WIDTH);

  // Bit generate / propagate from the pre-processing cells.
  logic [WIDTH-1:0] g_bit, p_bit;
  // Group terms after each level; level 0 holds the bit terms (with cin in bit 0).
  // Group propagates of grey-cell outputs are never formed; those bits stay 0.
  logic [WIDTH-1:0] g_lvl [LEVELS+1];
  logic [WIDTH-1:0] p_lvl [LEVELS+1];

  for (genvar i = 0; i < WIDTH; i++) begin : g_pre
    pg_cell u_pg (.a(p_in[i]), .b(q_in[i]), .g(g_bit[i]), .p(p_bit[i]));
  end

  // Carry-in merge into bit 0.
  grey_cell u_cin (.g_hi(g_bit[0]), .p_hi(p_bit[0]), .g_lo(cin), .g_out(g_lvl[0][0]));
  assign g_lvl[0][WIDTH-1:1] = g_bit[WIDTH-1:1];
  assign p_lvl[0]            = p_bit;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << (l - 1);
    for (genvar i = 0; i < WIDTH; i++) begin : g_node
      if (i < D) begin : g_buf
        assign g_lvl[l][i] = g_lvl[l-1][i];
        assign p_lvl[l][i] = p_lvl[l-1][i];
      end else if (i < 2 * D) begin : g_grey
        grey_cell u_grey (
          .g_hi(g_lvl[l-1][i]), .p_hi(p_lvl[l-1][i]),
          .g_lo(g_lvl[l-1][i-D]),
          .g_out(g_lvl[l][i])
        );
        assign p_lvl[l][i] = 1'b0;
      end else begin : g_black
        black_cell u_black (
          .g_hi(g_lvl[l-1][i]), .p_hi(p_lvl[l-1][i]),
          .g_lo(g_lvl[l-1][i-D]), .p_lo(p_lvl[l-1][i-D]),
          .g_out(g_lvl[l][i]), .p_out(p_lvl[l][i])
        );
      end
    end
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_post
    if (i == 0) begin : g_lsb
      sum_cell u_sum (.p(p_bit[0]), .g_prev(cin), .s(sum[0]));
    end else begin : g_bit_i
      sum_cell u_sum (.p(p_bit[i]), .g_prev(g_lvl[LEVELS][i-1]), .s(sum[i]));
    end
  end

  assign cout = g_lvl[LEVELS][WIDTH-1];

endmodule
