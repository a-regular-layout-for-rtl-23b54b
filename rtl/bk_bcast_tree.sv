// bk_bcast_tree: the extra tree superimposed on the top half of the carry
// network of the pipelined adder. It carries the square processor's value to
// all W leaves at the top of the network.
//
// It is a fan-out tree of white processors: level u (u = 1..K-1, W = 2**K)
// holds 2**u of them, each fed from its parent one level below; each node
// of the last level serves two neighbouring leaves. The tree takes one cycle
// per level, K-1 cycles in all, which is exactly as long as the upper half
// of the carry network (levels K+1..2K-1) takes, so the value leaves the
// tree in step with the segment whose root pair it met in the square.
//
// Interface: d is the square's output, q[i] the value for leaf i. For W = 2
// the tree has no level and q is d.
//
// The tree over the top half of the network follows the original
// description; its exact node counts and registers are this design's reading.
module bk_bcast_tree
  import bk_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic clk,
  input  gp_t  d,
  output gp_t  q [W]
);

  localparam int K = $clog2(W);

  if (K <= 1) begin : g_flat
    for (genvar i = 0; i < W; i++) begin : g_leaf
      assign q[i] = d;
    end
  end else begin : g_tree
    // Nodes in heap order: node[1] is the input, the children of node n are
    // 2n and 2n+1, so tree level u holds nodes 2**u .. 2**(u+1)-1.
    gp_t node [1:W-1];
    assign node[1] = d;
    for (genvar n = 2; n < W; n++) begin : g_node
      white_proc #(.REG(1'b1)) u_w (.clk(clk), .d(node[n/2]), .q(node[n]));
    end
    for (genvar i = 0; i < W; i++) begin : g_leaf
      assign q[i] = node[W/2 + i/2];
    end
  end

endmodule
