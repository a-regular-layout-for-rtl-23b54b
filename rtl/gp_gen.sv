// gp_gen: carry generate / propagate generation, the row of logic that sits
// below the carry network of the adder.
//
// For every bit position i it forms g_i = a_i & b_i and p_i = a_i ^ b_i,
// packed as one (g, p) pair per bit. Purely combinational, one gate level.
// Interface: a, b are W-bit operands (bit 0 least significant); gp[i] is
// the pair of bit i.
module gp_gen
  import bk_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output gp_t          gp [W]
);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      gp[i].g = a[i] & b[i];
      gp[i].p = a[i] ^ b[i];
    end
  end

endmodule
