// bk_expr_network_tb: random coefficient sets enter the 16-position numeric
// network every cycle (16-bit arithmetic). Each output must equal the nested
// expression E_i = g_i + p_i E_(i-1), E_1 = g_1, of the set that entered
// 2*log2(16) = 8 cycles earlier. Every third set uses one p for all
// positions, and there the last output is also compared with the polynomial
// g_16 + g_15 x + ... + g_1 x^15 evaluated power by power.
module bk_expr_network_tb;
  localparam int W = 16;
  localparam int DW = 16;
  localparam int LAT = 2 * $clog2(W);
  localparam int NSET = 120;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [DW-1:0] g [W], p [W], val [W];
  logic [DW-1:0] hg [NSET][W];
  logic [DW-1:0] hp [NSET][W];
  bit            poly [NSET];
  int in_cycle [NSET];
  int cycle = 0, nin = 0, nout = 0;
  int checks = 0, failures = 0, npoly = 0;

  bk_expr_network dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .g(g), .p(p),
                       .out_valid(out_valid), .val(val));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] x;
    for (int i = 0; i < W; i++) begin g[i] = '0; p[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (nin < NSET) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      if (in_valid) begin
        poly[nin] = (nin % 3) == 0;
        x = DW'($urandom);
        for (int i = 0; i < W; i++) begin
          g[i] = DW'($urandom);
          p[i] = poly[nin] ? x : DW'($urandom);
          hg[nin][i] = g[i];
          hp[nin][i] = p[i];
        end
        in_cycle[nin] = cycle;
        nin++;
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  always @(negedge clk) begin
    logic [DW-1:0] e, xp, pv;
    if (rst_n && out_valid) begin
      e = hg[nout][0];
      checks++;
      if (val[0] !== e) failures++;
      for (int i = 1; i < W; i++) begin
        e = hg[nout][i] + hp[nout][i] * e;
        checks++;
        if (val[i] !== e) begin
          failures++;
          $display("set %0d position %0d: %h, expected %h", nout, i, val[i], e);
        end
      end
      if (poly[nout]) begin
        pv = '0;
        xp = 1;
        for (int i = W - 1; i >= 0; i--) begin
          pv = pv + hg[nout][i] * xp;
          xp = xp * hp[nout][0];
        end
        checks++;
        npoly++;
        if (val[W-1] !== pv) failures++;
      end
      checks++;
      if (cycle - in_cycle[nout] != LAT) begin
        failures++;
        $display("set %0d: latency %0d", nout, cycle - in_cycle[nout]);
      end
      nout++;
      if (nout == NSET) begin
        checks++;
        if (npoly == 0) failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
