// bk_parallel_adder: N-bit carry-lookahead adder with the regular layout,
// computed in one combinational pass.
//
// The operands go through gp_gen (g_i = a_i & b_i, p_i = a_i ^ b_i), the
// carry network computes every carry c_i = G_i at once, and each sum bit is
// s_i = p_i ^ c_(i-1) with c_0 = 0; the carry out is c_N. With unit delay for
// AND, OR and XOR the longest path is 1 + 2(2K-1) + 1 = 4K gate delays for
// N = 2**K, against 2N - 1 for a ripple chain.
//
// Interface: a, b are unsigned N-bit operands, s is the N-bit sum and cout
// the carry out (s_(N+1)). No clock: the network is instantiated without its
// pipeline registers. The carry-in is fixed at 0 as in the described scheme.
module bk_parallel_adder
  import bk_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout
);

  gp_t gp   [N];
  gp_t pref [N];
  gp_t root_unused;

  gp_gen #(.W(N)) u_gp (.a(a), .b(b), .gp(gp));

  bk_carry_network #(.W(N), .REGISTERED(1'b0)) u_net (
    .clk (1'b0),
    .x   (gp),
    .y   (pref),
    .root(root_unused)
  );

  always_comb begin
    s[0] = gp[0].p;
    for (int i = 1; i < N; i++) s[i] = gp[i].p ^ pref[i-1].g;
    cout = pref[N-1].g;
  end

endmodule
