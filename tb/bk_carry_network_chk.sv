// bk_carry_network_chk: test driver for one registered bk_carry_network of
// width W. It feeds a random (g, p) vector every cycle and records them. For
// every candidate latency it counts how many output samples disagree with
// the ripple-carry reference of the input that many cycles earlier; the
// measured latency is the one lag with no disagreement. It then checks that
// latency against 2*log2(W) and the resulting gate-delay time
// 2 + 2*(levels) against the expected time passed in as TABLE_TIME.
// The root output is checked against (G_W, P_W) with its own lag.
module bk_carry_network_chk
  import bk_pkg::*;
#(
  parameter int W          = 16,
  parameter int TABLE_TIME = 16
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int K     = $clog2(W);
  localparam int NCYC  = 80;
  localparam int MAXL  = 4 * K + 2;

  gp_t x [W], y [W], root;
  logic [2*W-1:0] hist_in  [NCYC];
  logic [2*W-1:0] hist_out [NCYC];
  logic [1:0]     hist_root[NCYC];
  int mism [MAXL+1];
  int rmism[MAXL+1];

  bk_carry_network #(.W(W), .REGISTERED(1'b1)) dut (.clk(clk), .x(x), .y(y), .root(root));

  // ripple reference for a packed input: returns packed prefixes
  function automatic logic [2*W-1:0] ref_prefix(logic [2*W-1:0] v);
    logic [2*W-1:0] r;
    logic c, pp;
    c = 1'b0;
    pp = 1'b1;
    for (int i = 0; i < W; i++) begin
      c  = v[2*i+1] | (v[2*i] & c);
      pp = pp & v[2*i];
      r[2*i+1] = c;
      r[2*i]   = pp;
    end
    return r;
  endfunction

  initial begin
    int meas, rmeas, nzero, rnzero;
    logic [2*W-1:0] v, rf;
    checks = 0;
    failures = 0;
    done = 1'b0;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      for (int i = 0; i < W; i++) hist_out[n][2*i +: 2] = y[i];
      hist_root[n] = root;
      for (int i = 0; i < W; i++) begin
        // bias towards propagate so that long carry chains occur
        v[2*i]   = ($urandom % 4) != 0;
        v[2*i+1] = v[2*i] ? 1'b0 : 1'($urandom);
      end
      if (n % 7 == 3) v = {W{2'b01}};             // all propagate
      if (n % 7 == 5) begin v = {W{2'b01}}; v[1:0] = 2'b10; end // generate at bit 0
      hist_in[n] = v;
      for (int i = 0; i < W; i++) x[i] = v[2*i +: 2];
    end
    for (int lag = 0; lag <= MAXL; lag++) begin
      mism[lag] = 0;
      rmism[lag] = 0;
      for (int m = MAXL + 1; m < NCYC; m++) begin
        rf = ref_prefix(hist_in[m-lag]);
        if (hist_out[m] !== rf) mism[lag]++;
        if (hist_root[m] !== rf[2*W-1 -: 2]) rmism[lag]++;
      end
    end
    meas = -1; nzero = 0; rmeas = -1; rnzero = 0;
    for (int lag = 0; lag <= MAXL; lag++) begin
      if (mism[lag] == 0) begin meas = lag; nzero++; end
      if (rmism[lag] == 0) begin rmeas = lag; rnzero++; end
    end
    checks++;
    if (nzero != 1) begin
      failures++;
      $display("W=%0d: no unique latency with matching prefixes (%0d candidates)", W, nzero);
    end
    checks++;
    if (meas != 2 * K) begin
      failures++;
      $display("W=%0d: latency %0d cycles, expected %0d", W, meas, 2 * K);
    end
    checks++;
    // input row is transmission only: black levels = latency - 1
    if (2 + 2 * (meas - 1) != TABLE_TIME) begin
      failures++;
      $display("W=%0d: gate-delay time %0d, expected %0d", W, 2 + 2 * (meas - 1), TABLE_TIME);
    end
    checks++;
    if (rnzero != 1 || rmeas != K + 1) begin
      failures++;
      $display("W=%0d: root lag %0d (%0d candidates), expected %0d", W, rmeas, rnzero, K + 1);
    end
    // every individual output sample at the expected lag
    for (int m = MAXL + 1; m < NCYC; m++) begin
      checks++;
      if (hist_out[m] !== ref_prefix(hist_in[m - 2 * K])) failures++;
    end
    done = 1'b1;
  end
endmodule
