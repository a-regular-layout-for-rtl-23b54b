// bk_bcast_tree_tb: a new random value enters the tree every cycle; every
// leaf output must show the value that entered log2(W)-1 = 3 cycles before
// (W = 16), and the width-2 tree must pass its input straight through.
module bk_bcast_tree_tb;
  import bk_pkg::*;
  localparam int W = 16;
  localparam int LAG = $clog2(W) - 1;
  logic clk = 0;
  gp_t d, q [W], q2 [2];
  gp_t hist [64];
  int checks = 0, failures = 0;

  bk_bcast_tree dut (.clk(clk), .d(d), .q(q));
  bk_bcast_tree #(.W(2)) dut2 (.clk(clk), .d(d), .q(q2));

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 64; n++) begin
      @(negedge clk);
      if (n >= LAG) begin
        for (int i = 0; i < W; i++) begin
          checks++;
          if (q[i] !== hist[n - LAG]) begin
            failures++;
            $display("cycle %0d leaf %0d: %b, expected %b", n, i, q[i], hist[n - LAG]);
          end
        end
      end
      d = gp_t'($urandom);
      hist[n] = d;
      #1;
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (q2[i] !== d) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
