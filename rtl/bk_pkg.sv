// bk_pkg: types, the carry operator and the network geometry shared by every
// module of the regular-layout carry-lookahead adder.
//
// A bit position carries a pair (g, p): carry generate and carry propagate.
// The operator o combines a more significant pair with a less significant one,
//   (g, p) o (g', p') = (g | (p & g'), p & p'),
// and is associative, so the prefix (G_i, P_i) = (g_i,p_i) o ... o (g_1,p_1)
// may be evaluated in any bracketing; G_i is then the carry out of bit i.
// (0, 1) is the identity of o.
//
// The geometry functions describe the network for a width W = 2**K. Level
// numbers t run from 1 to 2K-1 (level 0 is the input row). Levels 1..K form
// a binary tree: at level t the position j (1-based) with j mod 2**t == 0
// combines with position j - 2**(t-1). Levels K+1..2K-1 form the same tree
// inverted: with d = 2K - t, position j with j mod 2**d == 2**(d-1) and
// j > 2**d combines with j - 2**(d-1). Every other position only passes its
// pair on. The functions take 0-based positions i = j - 1.
package bk_pkg;

  typedef struct packed {
    logic g;  // carry generate (block generate after combining)
    logic p;  // carry propagate (block propagate after combining)
  } gp_t;

  localparam gp_t GP_IDENTITY = '{g: 1'b0, p: 1'b1};

  // (hi) o (lo): hi is the more significant operand.
  function automatic gp_t gp_op(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Number of processing levels above the input row for width 2**k.
  function automatic int bk_levels(int k);
    return 2 * k - 1;
  endfunction

  // 1 when the processor at level t, 0-based position i, is a black one.
  function automatic bit bk_is_black(int k, int t, int i);
    int j;
    int d;
    j = i + 1;
    if (t >= 1 && t <= k) begin
      return (j % (1 << t)) == 0;
    end else if (t > k && t <= 2 * k - 1) begin
      d = 2 * k - t;
      return ((j % (1 << d)) == (1 << (d - 1))) && (j > (1 << d));
    end
    return 1'b0;
  endfunction

  // 0-based position whose pair a black processor at (t, i) takes as its
  // second (less significant) operand. Returns i for a white processor.
  function automatic int bk_partner(int k, int t, int i);
    if (!bk_is_black(k, t, i)) return i;
    if (t <= k) return i - (1 << (t - 1));
    return i - (1 << (2 * k - t - 1));
  endfunction

endpackage
