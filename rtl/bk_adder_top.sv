// bk_adder_top: the regular-layout adders side by side.
//
//  * par_*  : the N-bit combinational parallel adder (all carries from one
//             pass through the carry network), N = 16 by default.
//  * pipe_* : the pipelined adder of width W that adds operands of any
//             multiple of W bits, fed W bits per cycle, least significant
//             segment first, with a latency of 2*log2(W)+1 cycles.
//  * expr_* : the same network layout with numeric processors, evaluating
//             g_n + p_n(g_(n-1) + p_(n-1)(... + p_2 g_1)) for every prefix
//             (a polynomial when all p equal x), pipelined like the adder.
//
// The three share no state; each has its own ports. clk and rst_n (active
// low, synchronous) serve the pipelined parts.
module bk_adder_top
  import bk_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned W  = 16,
  parameter int unsigned EW = 16,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // combinational parallel adder
  input  logic [N-1:0]  par_a,
  input  logic [N-1:0]  par_b,
  output logic [N-1:0]  par_s,
  output logic          par_cout,
  // pipelined adder
  input  logic          pipe_in_valid,
  input  logic          pipe_in_first,
  input  logic          pipe_in_last,
  input  logic [W-1:0]  pipe_a,
  input  logic [W-1:0]  pipe_b,
  output logic          pipe_out_valid,
  output logic          pipe_out_first,
  output logic          pipe_out_last,
  output logic [W-1:0]  pipe_s,
  output logic          pipe_cout,
  // expression evaluator
  input  logic          expr_in_valid,
  input  logic [DW-1:0] expr_g [EW],
  input  logic [DW-1:0] expr_p [EW],
  output logic          expr_out_valid,
  output logic [DW-1:0] expr_val [EW]
);

  bk_parallel_adder #(.N(N)) u_par (.a(par_a), .b(par_b), .s(par_s), .cout(par_cout));

  bk_pipelined_adder #(.W(W)) u_pipe (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (pipe_in_valid),
    .in_first (pipe_in_first),
    .in_last  (pipe_in_last),
    .a        (pipe_a),
    .b        (pipe_b),
    .out_valid(pipe_out_valid),
    .out_first(pipe_out_first),
    .out_last (pipe_out_last),
    .s        (pipe_s),
    .cout     (pipe_cout)
  );

  bk_expr_network #(.W(EW), .DW(DW)) u_expr (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (expr_in_valid),
    .g        (expr_g),
    .p        (expr_p),
    .out_valid(expr_out_valid),
    .val      (expr_val)
  );

endmodule
