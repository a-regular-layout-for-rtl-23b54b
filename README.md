# Regular-layout parallel adders (prefix carry network)

An adder is only as fast as its carries. A ripple adder computes carry `c_i`
from `c_(i-1)`, so its time grows linearly with the width. This design gets all carries in
a number of steps logarithmic in the width. It does so with a network that repeats two
cells in a regular pattern, so its area grows only a little faster than the width. The
same network is the core of three units:

* `bk_parallel_adder`: an N-bit adder that gets every carry in one
  combinational pass (N = 16 by default).
* `bk_pipelined_adder`: an adder for operands of any length, fed W bits per
  clock cycle, least significant segment first (W = 16 by default). An
  n-bit addition takes n/W + 2·log2(W) + 1 cycles.
* `bk_expr_network`: the same network with arithmetic cells. It evaluates
  nested expressions such as a polynomial in Horner form, for every prefix at once.

`bk_adder_top` puts the three side by side, each with its own ports.

## Carries as a prefix computation

For each bit, `g_i = a_i & b_i` (this bit generates a carry) and
`p_i = a_i ^ b_i` (this bit passes an incoming carry on). The carry
recurrence `c_i = g_i | (p_i & c_(i-1))`, `c_0 = 0`, can be written with an
operator on pairs:

    (g, p) o (g', p') = (g | (p & g'), p & p')

Let `(G_i, P_i) = (g_i,p_i) o (g_(i-1),p_(i-1)) o ... o (g_1,p_1)`. Then
`G_i = c_i`: the block spanning bits 1..i either generates a carry (G) or
passes one through (P). The operator is associative, so the brackets can
be placed anywhere. This is what lets a tree compute the prefixes instead of
a chain. The pair (0, 1) is its identity. The sum is `s_i = p_i ^ c_(i-1)`
and the carry out is `c_N`.

Only the distributive law of AND over OR is used. The same construction
therefore works over numbers with `+` and `*` (see `bk_expr_network`).

## The network (`bk_carry_network`)

The network has two kinds of cell:

* **white processor** (`white_proc`): passes its pair upwards;
* **black processor** (`black_proc`): `q = d_own o d_hat`, where `d_own` comes from
  directly below and `d_hat` from a less significant position. It is about as
  complex as a one-bit full adder.

The network has W columns and, above an input row, 2·log2(W) − 1 levels. Levels 1..log2(W) form a
binary tree, which leaves `(G_W, P_W)` in the top column. The remaining
levels are the same tree turned upside down, root first. They fill in every prefix that is
still missing. For W = 16 (7 levels, 26 black cells), the black cells are as follows.
Columns are numbered 1..16, and `j<-k` means column j combines with the pair of column k:

| level | black cells |
|------:|-------------|
| 1 | 2<-1 4<-3 6<-5 8<-7 10<-9 12<-11 14<-13 16<-15 |
| 2 | 4<-2 8<-6 12<-10 16<-14 |
| 3 | 8<-4 16<-12 |
| 4 | 16<-8 |
| 5 | 12<-8 |
| 6 | 6<-4 10<-8 14<-12 |
| 7 | 3<-2 5<-4 7<-6 9<-8 11<-10 13<-12 15<-14 |

The rule for general W = 2^K is given by the functions `bk_is_black` and `bk_partner` in
`bk_pkg`. At level t ≤ K, column j is black when j mod 2^t = 0, and it takes
column j − 2^(t−1). At level t > K, let d = 2K − t. Column j is black when
j mod 2^d = 2^(d−1) and j > 2^d, and it takes column j − 2^(d−1).

Every cell takes one unit of time. With `REGISTERED = 1` that unit is a clock
cycle: each row, the input row included, is a register stage. The network then
accepts a new vector every cycle and returns its prefixes 2K cycles later.
With `REGISTERED = 0` it is combinational. Suppose AND, OR and XOR each take
one gate delay. The whole adder then takes 1 (g/p) + 2·(2K − 1) (black cells)
+ 1 (sum XOR) = 4K delays. That is 12, 16, 20 and 24 for 8, 16, 32 and 64 bits,
against 2N − 1 for a ripple chain. The testbench derives these numbers from the
network's measured latency.

## Long operands: the pipelined adder (`bk_pipelined_adder`)

An n-bit operand (n a multiple of W) is sent as n/W segments, least
significant first, one per cycle. The network treats each segment as if its carry-in were 0.
Three parts correct this:

1. **Square processor** (`square_proc`). After level K the network's top
   column holds `(G_W, P_W)` of the segment, and this pair enters an accumulator.
   In that same cycle the accumulator sends up its current contents. For segment i
   these are `(G_(i-1)W, P_(i-1)W)`, the combined pair of all earlier segments.
   For the first segment they are (0, 1). The accumulator then absorbs the segment:
   `g := g_in | (p_in & g)`, `p := p_in & p`. A segment flagged `in_first` makes it
   start again from (0, 1), so additions may follow one another with no gap.
2. **Broadcast tree** (`bk_bcast_tree`). This is a fan-out tree of registered white cells,
   with levels of 2, 4, …, W/2 nodes, laid over the top half of the network. It takes
   K − 1 cycles, as long as the network's upper levels. The square's value
   therefore reaches the top exactly when its segment does.
3. **Leaf row**. W black cells compute
   `(G_j, P_j) o (G_(i-1)W, P_(i-1)W)` for the segment. These are the true
   carries. The carry into the segment's bit 0 comes from the tree, registered in
   step. A delay line carries each `p_j` up to the sum XOR.

Pipeline for W = 16. A segment presented on the edge at cycle 0 comes out on
`s`/`cout` with `out_valid` on cycle 9:

| cycle edge | what holds the segment |
|---|---|
| 1 | input row (g, p) register |
| 2–5 | network levels 1–4; after edge 5 the root pair meets the square |
| 6–8 | network levels 5–7 and, in parallel, tree levels 1–3 |
| 9 | leaf row; `s = p ^ c` is combinational from here |

`in_first`/`in_last` travel with the data and come out as
`out_first`/`out_last`. `cout` is the carry out of the segment's top bit,
which for the `out_last` segment is the carry out of the whole addition.
There is no back-pressure. `in_valid` may drop for any number of cycles,
including between the segments of one addition. The accumulator only
updates on valid segments. Assertions check that `in_first`/`in_last` are
only raised with `in_valid`.

Reset (`rst_n`, active low, synchronous) clears the valid flags and loads
(0, 1) into the accumulator. Data registers have no reset; their contents
matter only under a valid flag.

## Arithmetic use of the layout (`bk_expr_network`)

Replace OR/AND by `+`/`*`. A black cell then computes `g = g_in + p_in·ĝ`, `p = p_in·p̂`, and
output i is `E_i = g_i + p_i·(g_(i-1) + p_(i-1)·(… + p_2·g_1))`. With every
`p_i = x`, `E_W = g_W + g_(W-1)·x + … + g_1·x^(W-1)`. Values are unsigned and
DW bits wide (16 by default), and every sum and product wraps modulo 2^DW. The network
is registered like the adder's, with latency 2·log2(W) = 8 cycles. Index 0 of
`g`/`p` is the innermost term `g_1`/`p_1`.

## Files

| file | content |
|---|---|
| `rtl/bk_pkg.sv` | pair type `gp_t`, operator `gp_op`, identity, network geometry |
| `rtl/gp_gen.sv` | g/p generation |
| `rtl/white_proc.sv`, `rtl/black_proc.sv` | the two cells (`REG` selects register or wire) |
| `rtl/bk_carry_network.sv` | prefix network, `W`, `REGISTERED` |
| `rtl/bk_parallel_adder.sv` | combinational N-bit adder |
| `rtl/square_proc.sv`, `rtl/bk_bcast_tree.sv` | accumulator and broadcast tree |
| `rtl/bk_pipelined_adder.sv` | segment-serial adder |
| `rtl/bk_expr_network.sv` | numeric version of the network |
| `rtl/bk_adder_top.sv` | the three units side by side |
| `tb/<module>_tb.sv` | one self-checking testbench per module; `bk_carry_network_chk.sv` and `bk_pipelined_adder_chk.sv` are helpers |

Widths must be powers of two, at least 2; an elaboration-time `$error` catches
other values.

## Choices made here, not given by the underlying description

* Each cell taking one unit of time follows the description. Making that
  unit a clock cycle, with a register in every cell, and the valid/first/last
  handshake are this design's own choices.
* Which cell is black is derived from the construction described above (tree,
  then the inverted tree). It reproduces the 7 levels for 16 bits and the
  4·log2(n) times.
* In the cycle a segment's root pair arrives, the square processor sends up its
  contents from *before* it absorbs that segment. This is what makes each segment
  receive the carry state of the earlier segments only.
* The restart flag, the reset, the `p` delay line, and the way the carry
  into bit 0 of a segment is obtained are all this design's own.
* The parallel adder has no carry-in (c_0 = 0) and no overflow flag. The
  adders add unsigned or two's complement operands. One's complement
  (end-around carry) and sign-magnitude forms would need small changes and are
  not provided.
* Widths of 1 bit per segment, which reduce the pipelined adder to a serial
  carry chain, are not supported.
* The numeric network's number format (unsigned, DW = 16, wrap-around) is
  an assumption.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. Each also has a watchdog that counts a failure if the run hangs.
For example:

    verilator --binary --timing --assert -Irtl -Itb rtl/bk_pkg.sv \
        tb/bk_adder_top_tb.sv --top-module bk_adder_top_tb
    ./obj_dir/Vbk_adder_top_tb

Swap in any other `tb/*_tb.sv`. Each finishes in well under a second.

* `bk_carry_network_tb` runs the registered network at widths 8, 16, 32 and 64
  against a ripple-carry reference. For each width it finds the latency by trying
  every lag, and checks it and the resulting gate-delay time (12/16/20/24). It also
  checks the root output's lag and the combinational form.
* `bk_parallel_adder_tb` tests 8-, 16- and 64-bit adders against built-in addition.
* `bk_pipelined_adder_tb` streams 300 additions of 1 to 8 segments through the
  adder at its default width 16 and at widths 4 and 64 (through the helper
  `bk_pipelined_adder_chk.sv`), with gaps and back-to-back additions. It checks
  every segment, the latency of 2·log2(W) + 1 cycles (9 at W = 16) and the
  n/W + 2·log2(W) + 1 total time. It also counts, and requires, four events: carries crossing
  a segment boundary, carries rippling through an all-propagate segment,
  accumulator restarts after a carry, and idle cycles inside an addition.
* `bk_expr_network_tb` checks every prefix expression and polynomial results.
* `bk_adder_top_tb` runs the top level at its default sizes end to end and
  counts the same events, plus parallel-adder carry-outs and polynomial
  evaluations.

The testbenches for the cells, g/p generation, the square processor and the tree
check them on their own.
