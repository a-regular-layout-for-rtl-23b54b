// square_proc_tb: drives random root pairs with random valid and first
// flags and checks, every cycle, that the square forwards the identity
// (0, 1) for a first segment and otherwise the pair accumulated from all
// earlier valid segments since the last first one, with a reference built
// from the ripple-carry meaning of (G, P): G = carry out of the segments so
// far, P = all of them propagate.
module square_proc_tb;
  import bk_pkg::*;
  logic clk = 0, rst_n = 0, valid = 0, first = 0;
  gp_t d, q;
  logic mg, mp;   // reference contents
  int checks = 0, failures = 0;
  int restarts = 0;

  square_proc dut (.clk(clk), .rst_n(rst_n), .valid(valid), .first(first), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    mg = 0; mp = 1;
    // after reset, no first: contents must be the identity
    #1;
    checks++;
    if (q !== GP_IDENTITY) failures++;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      valid = ($urandom % 4) != 0;
      first = valid && (($urandom % 5) == 0);
      d.p = ($urandom % 3) != 0;
      d.g = d.p ? 1'b0 : 1'($urandom);
      if (first) begin mg = 0; mp = 1; restarts++; end
      #1;
      checks++;
      if (q.g !== mg || q.p !== mp) begin
        failures++;
        $display("cycle %0d: forwarded %b, expected %b%b", n, q, mg, mp);
      end
      if (valid) begin
        mg = d.g | (d.p & mg);
        mp = d.p & mp;
      end
    end
    checks++;
    if (restarts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
