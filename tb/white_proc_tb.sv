// white_proc_tb: the registered white processor must return each input one
// clock later; the wire variant must return it at once.
module white_proc_tb;
  import bk_pkg::*;
  logic clk = 0;
  gp_t d, q_reg, q_wire, prev;
  int checks = 0, failures = 0;

  white_proc #(.REG(1'b1)) dut_r (.clk(clk), .d(d), .q(q_reg));
  white_proc #(.REG(1'b0)) dut_w (.clk(clk), .d(d), .q(q_wire));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    @(posedge clk);
    for (int n = 0; n < 100; n++) begin
      #1;
      prev = d;
      d = gp_t'($urandom);
      #1;
      checks++;
      if (q_wire !== d) failures++;
      @(posedge clk);
      #1;
      checks++;
      if (q_reg !== d) begin
        failures++;
        $display("registered output %b, expected %b", q_reg, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
