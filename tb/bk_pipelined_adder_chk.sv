// bk_pipelined_adder_chk: test driver for one bk_pipelined_adder of width W.
// It streams additions of 1 to 8 segments (W to 8W bits) through the adder, one segment per cycle, least significant
// first, sometimes with idle cycles between segments and sometimes with one
// addition directly following another. Every result segment is compared
// with the built-in addition of the whole operands, the first/last marks
// are checked, every segment must emerge exactly at the pipeline latency
// after it entered (2*log2(W)+1 cycles), and an addition of n bits without
// gaps must take n/W + 2*log2(W)+1 cycles from first input to last output. It counts how often a
// carry crossed a segment boundary, a carry rippled through a fully
// propagating segment, an addition restarted after one that ended with a
// carry, and an idle cycle interrupted an addition; each must happen.
module bk_pipelined_adder_chk #(
  parameter int W          = 16,
  parameter bit DEFAULT_W  = 1'b0
) (
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int LAT = 2 * $clog2(W) + 1;
  localparam int MAXSEG = 8;
  localparam int NOPS = 300;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [W-1:0] a = '0, b = '0;
  logic out_valid, out_first, out_last, cout;
  logic [W-1:0] s;

  logic [W-1:0] s_dut;
  if (DEFAULT_W) begin : g_default
    // the adder at its own default width
    bk_pipelined_adder dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first), .in_last(in_last),
    .a(a), .b(b), .out_valid(out_valid), .out_first(out_first), .out_last(out_last),
    .s(s_dut), .cout(cout)
  );
  end else begin : g_sized
    bk_pipelined_adder #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first), .in_last(in_last),
    .a(a), .b(b), .out_valid(out_valid), .out_first(out_first), .out_last(out_last),
    .s(s_dut), .cout(cout)
  );
  end
  assign s = s_dut;

  always #5 clk = ~clk;

  // sum of the low m bits of the two operands (bit m is the carry into bit m)
  function automatic logic [MAXSEG*W:0] low_sum(logic [MAXSEG*W-1:0] x, logic [MAXSEG*W-1:0] y, int m);
    logic [MAXSEG*W:0] mask;
    mask = ({{(MAXSEG*W){1'b0}}, 1'b1} << m) - 1;
    return ({1'b0, x} & mask) + ({1'b0, y} & mask);
  endfunction


  typedef struct {
    logic [W-1:0] sum;
    logic         cout;
    logic         first;
    logic         last;
    int           cycle;
    int           op;
  } exp_t;

  exp_t expq [$];
  int cycle = 0;
  initial begin checks = 0; failures = 0; done = 1'b0; end
  int n_cross = 0, n_ripple = 0, n_restart = 0, n_gap = 0, n_b2b = 0;
  int op_start [NOPS];
  int op_nseg  [NOPS];
  bit op_gappy [NOPS];
  bit sending_done = 0;
  int ops_done = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // driver
  initial begin
    logic [MAXSEG*W-1:0] A, B, S;
    logic [MAXSEG*W:0] part;
    logic prev_carry;
    int nseg;
    exp_t e;
    prev_carry = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int op = 0; op < NOPS; op++) begin
      nseg = 1 << ($urandom % 4);
      A = '0; B = '0;
      for (int k = 0; k < nseg; k++) begin
        case ($urandom % 4)
          0: begin A[k*W +: W] = W'($urandom); B[k*W +: W] = ~A[k*W +: W]; end  // all propagate
          1: begin A[k*W +: W] = '1; B[k*W +: W] = W'($urandom); end
          default: begin A[k*W +: W] = W'($urandom); B[k*W +: W] = W'($urandom); end
        endcase
      end
      S = A + B;
      op_nseg[op] = nseg;
      op_gappy[op] = 0;
      if (prev_carry) n_restart++;
      for (int k = 0; k < nseg; k++) begin
        if (k > 0 && ($urandom % 6) == 0) begin
          in_valid = 0; in_first = 0; in_last = 0;
          a = W'($urandom); b = W'($urandom);
          n_gap++;
          op_gappy[op] = 1;
          @(negedge clk);
        end
        in_valid = 1;
        in_first = (k == 0);
        in_last  = (k == nseg - 1);
        a = A[k*W +: W];
        b = B[k*W +: W];
        part = low_sum(A, B, (k+1)*W);
        e.sum = S[k*W +: W];
        e.cout = part[(k+1)*W];
        e.first = (k == 0);
        e.last = (k == nseg - 1);
        e.cycle = cycle;
        e.op = op;
        if (k == 0) op_start[op] = cycle;
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
      if (op > 0 && op_start[op] == cycle - nseg) n_b2b++;
      if (($urandom % 3) == 0) begin
        in_valid = 0; in_first = 0; in_last = 0;
        repeat ($urandom % 3) @(negedge clk);
      end
    end
    in_valid = 0; in_first = 0; in_last = 0;
    sending_done = 1;
  end

  // monitor
  always @(negedge clk) begin
    exp_t e;
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cycle);
      end else begin
        e = expq.pop_front();
        if (s !== e.sum || cout !== e.cout || out_first !== e.first || out_last !== e.last) begin
          failures++;
          $display("op %0d: got s=%h c=%b f=%b l=%b expected s=%h c=%b f=%b l=%b",
                   e.op, s, cout, out_first, out_last, e.sum, e.cout, e.first, e.last);
        end
        checks++;
        if (cycle - e.cycle != LAT) begin
          failures++;
          $display("op %0d: latency %0d, expected %0d", e.op, cycle - e.cycle, LAT);
        end
        if (e.last) begin
          ops_done++;
          if (!op_gappy[e.op]) begin
            checks++;
            // n/w segments entered back to back plus the pipeline latency
            if (cycle - op_start[e.op] + 1 != op_nseg[e.op] + LAT) begin
              failures++;
              $display("op %0d: %0d cycles for %0d segments", e.op, cycle - op_start[e.op] + 1, op_nseg[e.op]);
            end
          end
        end
      end
    end
    if (sending_done && expq.size() == 0 && !done) begin
      checks++;
      if (ops_done != NOPS) failures++;
      $display("W=%0d: carry across segment %0d, ripple through segment %0d, restart after carry %0d, gaps %0d, back-to-back %0d",
               W, n_cross, n_ripple, n_restart, n_gap, n_b2b);
      checks += 5;
      if (n_cross == 0) failures++;
      if (n_ripple == 0) failures++;
      if (n_restart == 0) failures++;
      if (n_gap == 0) failures++;
      if (n_b2b == 0) failures++;
      done = 1'b1;
    end
  end
endmodule
