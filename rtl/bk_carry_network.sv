// bk_carry_network: the regular carry-chain network. From W input pairs
// (g_i, p_i) it computes every prefix (G_i, P_i) = (g_i,p_i) o ... o (g_1,p_1);
// G_i is the carry out of bit i.
//
// Structure (W = 2**K): an input row of white processors (level 0), then
// 2K-1 levels. Levels 1..K are a binary tree that leaves (G_W, P_W) at the
// most significant position after level K, together with the block pairs of
// all power-of-two-aligned blocks. Levels K+1..2K-1 are the same tree
// inverted (root first) and fill in the remaining prefixes. Which processor
// is black, and which diagonal input it takes, is given by bk_pkg. For W = 16
// this is 7 levels with 26 black processors.
//
// Timing: with REGISTERED = 1 every row, the input row included, is a
// register stage, so the network accepts a new operand every cycle and
// delivers its prefixes 2K cycles later (2K = 8 for W = 16). With
// REGISTERED = 0 the network is combinational with a depth of 2K-1 black
// processors.
//
// Interface: x[i] is the pair of bit i (0 = least significant); y[i] is the
// prefix (G_(i+1), P_(i+1)) in the paper's 1-based numbering; root is the
// output of the most significant position after level K, i.e. (G_W, P_W) of
// the operand, made available for the pipelined adder's accumulator.
//
// The two-tree arrangement and the unit time per level follow the original
// description of the layout; registering every row is this design's choice.
module bk_carry_network
  import bk_pkg::*;
#(
  parameter int unsigned W          = 16,
  parameter bit          REGISTERED = 1'b1
) (
  input  logic clk,
  input  gp_t  x    [W],
  output gp_t  y    [W],
  output gp_t  root
);

  localparam int K = $clog2(W);
  localparam int L = bk_levels(K);

  if (W < 2 || (1 << K) != W) begin : g_bad_width
    $error("bk_carry_network: W must be a power of two of at least 2");
  end

  // row0 is the input row; g_lvl[t].r is the output of level t, declared per
  // level so that levels are separate signals.
  gp_t row0 [W];

  for (genvar i = 0; i < W; i++) begin : g_in
    white_proc #(.REG(REGISTERED)) u_in (.clk(clk), .d(x[i]), .q(row0[i]));
  end

  for (genvar t = 1; t <= L; t++) begin : g_lvl
    gp_t prev [W];
    gp_t r    [W];
    if (t == 1) begin : g_first
      assign prev = row0;
    end else begin : g_next
      assign prev = g_lvl[t-1].r;
    end
    for (genvar i = 0; i < W; i++) begin : g_pos
      if (bk_is_black(K, t, i)) begin : g_black
        black_proc #(.REG(REGISTERED)) u_b (
          .clk  (clk),
          .d_own(prev[i]),
          .d_hat(prev[bk_partner(K, t, i)]),
          .q    (r[i])
        );
      end else begin : g_white
        white_proc #(.REG(REGISTERED)) u_w (.clk(clk), .d(prev[i]), .q(r[i]));
      end
    end
  end

  assign y    = g_lvl[L].r;
  assign root = g_lvl[K].r[W-1];

endmodule
