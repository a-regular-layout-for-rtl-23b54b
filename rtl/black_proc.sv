// black_proc: the "black" processor of the carry network. It applies the
// carry operator to the pair from directly below (d_own, the more
// significant operand) and the pair arriving on the diagonal from a less
// significant position (d_hat):
//   g_out = g_in | (p_in & g^_in),  p_out = p_in & p^_in.
// It is about as complex as a one-bit adder.
//
// With REG = 1 (default) the result is registered on the rising edge of clk,
// so one level of the network is one clock cycle; with REG = 0 it is
// combinational. No reset: validity is tracked by the enclosing pipeline.
module black_proc
  import bk_pkg::*;
#(
  parameter bit REG = 1'b1
) (
  input  logic clk,
  input  gp_t  d_own,
  input  gp_t  d_hat,
  output gp_t  q
);

  gp_t res;
  assign res = gp_op(d_own, d_hat);

  if (REG) begin : g_reg
    always_ff @(posedge clk) q <= res;
  end else begin : g_wire
    assign q = res;
  end

endmodule
