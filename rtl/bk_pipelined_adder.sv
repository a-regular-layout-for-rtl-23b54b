// bk_pipelined_adder: adder for long operands that are fed W bits at a time,
// least significant segment first, one segment per clock cycle.
//
// Each segment is turned into (g, p) pairs and sent through the registered
// carry network, which yields the carries inside the segment as if its
// carry-in were 0. The pair (G_W, P_W) of the segment, available at the
// network's root after level K (W = 2**K), enters the square processor,
// which accumulates the pair of all earlier segments of the same operand. In
// the same cycle the square sends its contents, (G_(i-1)W, P_(i-1)W) for
// segment i and (0, 1) for the first, up the broadcast tree. Tree and upper
// half of the network take equally long, so at the top a row of W black leaf
// processors combines each in-segment prefix with the carry state of all
// less significant segments: (G_j, P_j) o (G_(i-1)W, P_(i-1)W). Their G are
// the true carries; s_j = p_j ^ c_(j-1), with the carry into the segment
// taken from the tree as well. The p_j of the segment travel alongside in a
// delay line.
//
// Timing: a segment presented with in_valid on one rising edge appears on
// the outputs with out_valid LATENCY = 2K+1 cycles later (9 for W = 16);
// a new segment may be presented every cycle, with or without gaps. An
// n-bit addition therefore takes n/W + 2K+1 cycles.
//
// Interface: in_first marks the least significant segment of an operand,
// in_last the most significant one; both are only meaningful with in_valid
// and are returned as out_first/out_last with the result. s is the segment's
// sum, cout the carry out of its top bit (the carry out of the whole
// addition when out_last is high). rst_n is active low and synchronous.
//
// Network, square processor, tree and black leaves follow the original
// description of the scheme; the handshake, the p delay line, the way the
// carry into a segment is obtained and the cycle timing are this design's.
module bk_pipelined_adder
  import bk_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic         in_last,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         out_valid,
  output logic         out_first,
  output logic         out_last,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int K = $clog2(W);
  localparam int STAGES = 2 * K + 1;  // input row, 2K-1 levels, leaf row

  typedef struct packed {
    logic valid;
    logic first;
    logic last;
  } tag_t;

  gp_t gp     [W];
  gp_t pref   [W];
  gp_t root;
  gp_t sq_out;
  gp_t bc     [W];
  gp_t leaf   [W];
  logic cin_seg;

  tag_t         tag  [STAGES];
  logic [W-1:0] pdly [STAGES];

  gp_gen #(.W(W)) u_gp (.a(a), .b(b), .gp(gp));

  bk_carry_network #(.W(W), .REGISTERED(1'b1)) u_net (
    .clk (clk),
    .x   (gp),
    .y   (pref),
    .root(root)
  );

  // Tag and propagate-bit pipelines, one stage per row of processors.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int st = 0; st < STAGES; st++) tag[st] <= '0;
    end else begin
      tag[0] <= '{valid: in_valid, first: in_valid & in_first, last: in_valid & in_last};
      for (int st = 1; st < STAGES; st++) tag[st] <= tag[st-1];
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < W; i++) pdly[0][i] <= gp[i].p;
    for (int st = 1; st < STAGES; st++) pdly[st] <= pdly[st-1];
  end

  // tag[K] belongs to the segment whose root pair is at the network's root.
  square_proc u_sq (
    .clk  (clk),
    .rst_n(rst_n),
    .valid(tag[K].valid),
    .first(tag[K].first),
    .d    (root),
    .q    (sq_out)
  );

  bk_bcast_tree #(.W(W)) u_tree (.clk(clk), .d(sq_out), .q(bc));

  for (genvar i = 0; i < W; i++) begin : g_leaf
    black_proc #(.REG(1'b1)) u_leaf (.clk(clk), .d_own(pref[i]), .d_hat(bc[i]), .q(leaf[i]));
  end

  // Carry into the segment, registered in step with the leaf row.
  always_ff @(posedge clk) cin_seg <= bc[0].g;

  always_comb begin
    s[0] = pdly[STAGES-1][0] ^ cin_seg;
    for (int i = 1; i < W; i++) s[i] = pdly[STAGES-1][i] ^ leaf[i-1].g;
    cout      = leaf[W-1].g;
    out_valid = tag[STAGES-1].valid;
    out_first = tag[STAGES-1].first;
    out_last  = tag[STAGES-1].last;
  end

  // A segment can be marked first or last only when it is presented.
  a_first_needs_valid: assert property (@(posedge clk) disable iff (!rst_n) in_first |-> in_valid);
  a_last_needs_valid:  assert property (@(posedge clk) disable iff (!rst_n) in_last |-> in_valid);

endmodule
