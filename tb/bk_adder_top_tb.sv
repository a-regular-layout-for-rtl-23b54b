// bk_adder_top_tb: end-to-end test of the top level at its default sizes
// (16-bit parallel adder, 16-bit-wide pipelined adder, 16-position numeric
// network with 16-bit values).
//  * Parallel adder: random and corner operands against built-in addition;
//    counts results with a carry out.
//  * Pipelined adder: a stream of 64-bit and 128-bit additions (4 and 8
//    segments) and single-segment ones, each segment compared with the
//    built-in sum and its latency checked (9 cycles); counts carries that
//    cross a segment boundary, carries that ripple through an all-propagate
//    segment, restarts of the accumulator after an addition that ended in a
//    carry, idle cycles inside an addition and back-to-back additions.
//  * Numeric network: polynomial evaluation (all p equal to x) against a
//    power-by-power evaluation, latency 8 cycles.
// Every counted mechanism must have happened at least once.
module bk_adder_top_tb;
  localparam int W = 16;
  localparam int LAT = 9;
  localparam int ELAT = 8;
  localparam int NOPS = 200;

  logic clk = 0, rst_n = 0;
  logic [15:0] par_a = '0, par_b = '0, par_s;
  logic par_cout;
  logic pipe_in_valid = 0, pipe_in_first = 0, pipe_in_last = 0;
  logic [W-1:0] pipe_a = '0, pipe_b = '0, pipe_s;
  logic pipe_out_valid, pipe_out_first, pipe_out_last, pipe_cout;
  logic expr_in_valid = 0, expr_out_valid;
  logic [15:0] expr_g [16], expr_p [16], expr_val [16];

  bk_adder_top dut (
    .clk(clk), .rst_n(rst_n),
    .par_a(par_a), .par_b(par_b), .par_s(par_s), .par_cout(par_cout),
    .pipe_in_valid(pipe_in_valid), .pipe_in_first(pipe_in_first), .pipe_in_last(pipe_in_last),
    .pipe_a(pipe_a), .pipe_b(pipe_b), .pipe_out_valid(pipe_out_valid),
    .pipe_out_first(pipe_out_first), .pipe_out_last(pipe_out_last),
    .pipe_s(pipe_s), .pipe_cout(pipe_cout),
    .expr_in_valid(expr_in_valid), .expr_g(expr_g), .expr_p(expr_p),
    .expr_out_valid(expr_out_valid), .expr_val(expr_val)
  );

  always #5 clk = ~clk;

  // sum of the low m bits of the two operands (bit m is the carry into bit m)
  function automatic logic [8*W:0] low_sum(logic [8*W-1:0] x, logic [8*W-1:0] y, int m);
    logic [8*W:0] mask;
    mask = ({{(8*W){1'b0}}, 1'b1} << m) - 1;
    return ({1'b0, x} & mask) + ({1'b0, y} & mask);
  endfunction


  typedef struct {
    logic [W-1:0] sum;
    logic         cout;
    logic         first;
    logic         last;
    int           cycle;
  } exp_t;

  exp_t expq [$];
  int cycle = 0;
  int checks = 0, failures = 0;
  int n_par_cout = 0, n_cross = 0, n_ripple = 0, n_restart = 0, n_gap = 0, n_b2b = 0, n_poly = 0;
  bit pipe_done = 0, par_done = 0, expr_done = 0;
  int ops_out = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // parallel adder
  initial begin
    logic [16:0] e;
    for (int n = 0; n < 300; n++) begin
      par_a = (n == 0) ? 16'hFFFF : 16'($urandom);
      par_b = (n == 0) ? 16'h0001 : ((n % 4 == 1) ? ~par_a : 16'($urandom));
      #1;
      e = par_a + par_b;
      checks++;
      if ({par_cout, par_s} !== e) begin
        failures++;
        $display("parallel: %h + %h gave %h", par_a, par_b, {par_cout, par_s});
      end
      if (e[16]) n_par_cout++;
      #1;
    end
    par_done = 1;
  end

  // pipelined adder driver
  initial begin
    logic [8*W-1:0] A, B, S;
    logic [8*W:0] part;
    logic prev_carry;
    int nseg, last_end;
    exp_t e;
    prev_carry = 0;
    last_end = -10;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int op = 0; op < NOPS; op++) begin
      case ($urandom % 3)
        0: nseg = 1;
        1: nseg = 4;
        default: nseg = 8;
      endcase
      A = '0; B = '0;
      for (int k = 0; k < nseg; k++) begin
        A[k*W +: W] = W'($urandom);
        B[k*W +: W] = (($urandom % 3) == 0) ? ~A[k*W +: W] : W'($urandom);
      end
      S = A + B;
      if (prev_carry) n_restart++;
      if (last_end == cycle) n_b2b++;
      for (int k = 0; k < nseg; k++) begin
        if (k > 0 && ($urandom % 8) == 0) begin
          pipe_in_valid = 0; pipe_in_first = 0; pipe_in_last = 0;
          n_gap++;
          @(negedge clk);
        end
        pipe_in_valid = 1;
        pipe_in_first = (k == 0);
        pipe_in_last = (k == nseg - 1);
        pipe_a = A[k*W +: W];
        pipe_b = B[k*W +: W];
        part = low_sum(A, B, (k+1)*W);
        e.sum = S[k*W +: W];
        e.cout = part[(k+1)*W];
        e.first = (k == 0);
        e.last = (k == nseg - 1);
        e.cycle = cycle;
        if (k > 0) begin
          part = low_sum(A, B, k*W);
          if (part[k*W]) begin
            n_cross++;
            if ((A[k*W +: W] ^ B[k*W +: W]) == '1) n_ripple++;
          end
        end
        expq.push_back(e);
        prev_carry = e.cout;
        @(negedge clk);
      end
      last_end = cycle;
      if (($urandom % 4) == 0) begin
        pipe_in_valid = 0; pipe_in_first = 0; pipe_in_last = 0;
        @(negedge clk);
      end
    end
    pipe_in_valid = 0; pipe_in_first = 0; pipe_in_last = 0;
    wait (expq.size() == 0);
    pipe_done = 1;
  end

  // pipelined adder monitor
  always @(negedge clk) begin
    exp_t e;
    if (rst_n && pipe_out_valid) begin
      checks += 2;
      if (expq.size() == 0) begin
        failures += 2;
      end else begin
        e = expq.pop_front();
        if (pipe_s !== e.sum || pipe_cout !== e.cout || pipe_out_first !== e.first || pipe_out_last !== e.last) begin
          failures++;
          $display("pipelined: got %h/%b expected %h/%b", pipe_s, pipe_cout, e.sum, e.cout);
        end
        if (cycle - e.cycle != LAT) failures++;
        if (e.last) ops_out++;
      end
    end
  end

  // numeric network: polynomial evaluation
  initial begin
    logic [15:0] x, pv, xp;
    int start;
    for (int i = 0; i < 16; i++) begin expr_g[i] = '0; expr_p[i] = '0; end
    @(posedge rst_n);
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      x = 16'($urandom);
      for (int i = 0; i < 16; i++) begin
        expr_g[i] = 16'($urandom);
        expr_p[i] = x;
      end
      pv = '0;
      xp = 1;
      for (int i = 15; i >= 0; i--) begin
        pv = pv + expr_g[i] * xp;
        xp = xp * x;
      end
      expr_in_valid = 1;
      start = cycle;
      @(negedge clk);
      expr_in_valid = 0;
      while (!expr_out_valid && cycle - start < 20) @(negedge clk);
      checks += 2;
      if (expr_val[15] !== pv) begin
        failures++;
        $display("polynomial: got %h expected %h", expr_val[15], pv);
      end else n_poly++;
      if (cycle - start != ELAT) begin
        failures++;
        $display("polynomial latency %0d", cycle - start);
      end
    end
    expr_done = 1;
  end

  initial begin
    wait (pipe_done && par_done && expr_done);
    checks++;
    if (ops_out != NOPS) failures++;
    $display("parallel carry-out %0d, segment carry %0d, segment ripple %0d, restart %0d, gaps %0d, back-to-back %0d, polynomials %0d",
             n_par_cout, n_cross, n_ripple, n_restart, n_gap, n_b2b, n_poly);
    checks += 7;
    if (n_par_cout == 0) failures++;
    if (n_cross == 0) failures++;
    if (n_ripple == 0) failures++;
    if (n_restart == 0) failures++;
    if (n_gap == 0) failures++;
    if (n_b2b == 0) failures++;
    if (n_poly == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
