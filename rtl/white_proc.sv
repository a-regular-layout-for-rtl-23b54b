// white_proc: the "white" processor of the carry network. It performs no
// logic: it transmits its (g, p) pair to the level above, taking one unit of
// time like every other processor of the network.
//
// With REG = 1 (default) that unit of time is one clock cycle: q is the input
// registered on the rising edge of clk, which keeps all paths of a pipelined
// network equally long. With REG = 0 the processor is a plain wire, used in
// the purely combinational adder. The two identical outputs of the processor
// are the single output q fanned out to the two consumers above it.
// The register carries data only and has no reset; validity is tracked
// alongside by the enclosing pipeline.
module white_proc
  import bk_pkg::*;
#(
  parameter bit REG = 1'b1
) (
  input  logic clk,
  input  gp_t  d,
  output gp_t  q
);

  if (REG) begin : g_reg
    always_ff @(posedge clk) q <= d;
  end else begin : g_wire
    assign q = d;
  end

endmodule
