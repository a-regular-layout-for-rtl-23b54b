// black_proc_tb: all 16 input combinations of the black processor, in its
// combinational and its registered (one cycle) form, against the truth
// table of g = g_in | (p_in & g^_in), p = p_in & p^_in.
module black_proc_tb;
  import bk_pkg::*;
  logic clk = 0;
  gp_t own, hat, q_reg, q_wire, exp_q;
  int checks = 0, failures = 0;

  black_proc #(.REG(1'b0)) dut_w (.clk(clk), .d_own(own), .d_hat(hat), .q(q_wire));
  black_proc #(.REG(1'b1)) dut_r (.clk(clk), .d_own(own), .d_hat(hat), .q(q_reg));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      @(negedge clk);
      own = gp_t'(v[3:2]);
      hat = gp_t'(v[1:0]);
      exp_q.g = v[3] | (v[2] & v[1]);
      exp_q.p = v[2] & v[0];
      #1;
      checks++;
      if (q_wire !== exp_q) begin
        failures++;
        $display("comb: own=%b hat=%b got %b expected %b", own, hat, q_wire, exp_q);
      end
      @(posedge clk);
      #1;
      checks++;
      if (q_reg !== exp_q) begin
        failures++;
        $display("reg: own=%b hat=%b got %b expected %b", own, hat, q_reg, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
