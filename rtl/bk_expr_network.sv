// bk_expr_network: the carry network layout reused for arithmetic. The
// operator o only needs one distributive law, so the same arrangement of
// processors evaluates, for every prefix i, the nested expression
//   E_i = g_i + p_i (g_(i-1) + p_(i-1) (... + p_2 g_1))
// on numbers. With all p_i = x, E_W is the polynomial
// g_W + g_(W-1) x + ... + g_1 x^(W-1) in Horner form.
//
// A black processor here computes g_out = g_in + p_in * g^_in and
// p_out = p_in * p^_in; a white one passes its pair on. The placement of the
// black processors is the same as in bk_carry_network (bk_pkg functions).
// Arithmetic is unsigned modulo 2**DW: sums and products are truncated to
// DW bits.
//
// Timing: every row, the input row included, is a register stage, so a new
// set of coefficients is accepted every cycle and val appears 2K cycles
// later (W = 2**K), flagged by out_valid. rst_n (active low, synchronous)
// clears only the valid pipeline.
//
// Interface: g[i], p[i] are the coefficients of position i+1 (index 0 is
// the innermost g_1, p_1); val[i] is E_(i+1).
//
// The processor rule follows the original description; the number format
// (unsigned, DW bits, wrap-around) and the pipelining are this design's.
module bk_expr_network
  import bk_pkg::*;
#(
  parameter int unsigned W  = 16,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] g   [W],
  input  logic [DW-1:0] p   [W],
  output logic          out_valid,
  output logic [DW-1:0] val [W]
);

  localparam int K = $clog2(W);
  localparam int L = bk_levels(K);

  if (W < 2 || (1 << K) != W) begin : g_bad_width
    $error("bk_expr_network: W must be a power of two of at least 2");
  end

  typedef struct packed {
    logic [DW-1:0] g;
    logic [DW-1:0] p;
  } num_pair_t;

  num_pair_t  row   [L+1][W];
  logic [L:0] vpipe;

  for (genvar i = 0; i < W; i++) begin : g_in
    always_ff @(posedge clk) row[0][i] <= '{g: g[i], p: p[i]};
  end

  for (genvar t = 1; t <= L; t++) begin : g_lvl
    for (genvar i = 0; i < W; i++) begin : g_pos
      if (bk_is_black(K, t, i)) begin : g_black
        localparam int J = bk_partner(K, t, i);
        always_ff @(posedge clk) begin
          row[t][i].g <= row[t-1][i].g + row[t-1][i].p * row[t-1][J].g;
          row[t][i].p <= row[t-1][i].p * row[t-1][J].p;
        end
      end else begin : g_white
        always_ff @(posedge clk) row[t][i] <= row[t-1][i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[L-1:0], in_valid};
  end

  assign out_valid = vpipe[L];
  for (genvar i = 0; i < W; i++) begin : g_out
    assign val[i] = row[L][i].g;
  end

endmodule
