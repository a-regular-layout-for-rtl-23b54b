// square_proc: the "square" processor of the pipelined adder, an accumulator
// of the carry state between the W-bit segments of a long addition.
//
// Its contents (g, p) start at the identity (0, 1). Each time the pair
// (G_W, P_W) of a segment arrives from the root of the carry network it
// updates itself to g := g_in | (p_in & g), p := p_in & p, so that after the
// segments 1..i-1 it holds (G_(i-1)W, P_(i-1)W) of the whole operand.
//
// Output q is the value the square sends up the broadcast tree in the cycle a
// segment's root pair arrives: its contents before they absorb that segment,
// i.e. (0, 1) for the first segment and (G_(i-1)W, P_(i-1)W) for segment i.
// The first segment of an operand is marked by first; it restarts the
// accumulation from (0, 1) so additions can follow each other without a gap.
// The contents update on the rising edge of clk when valid is high; rst_n
// (active low, synchronous) loads the identity.
//
// The update rule and the starting value (0, 1) follow the original
// description; forwarding the contents from before the update, the first
// flag and the reset are this design's choices.
module square_proc
  import bk_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic valid,
  input  logic first,
  input  gp_t  d,
  output gp_t  q
);

  gp_t acc;

  assign q = first ? GP_IDENTITY : acc;

  always_ff @(posedge clk) begin
    if (!rst_n) acc <= GP_IDENTITY;
    else if (valid) acc <= gp_op(d, q);
  end

endmodule
