// bk_carry_network_tb: the registered carry network at widths 8, 16, 32 and
// 64, each checked against a ripple-carry reference, its latency measured
// and turned into a gate-delay time (expected 12, 16, 20, 24, i.e. 4 log2 W),
// plus the combinational form at width 16 on random vectors.
module bk_carry_network_tb;
  import bk_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  int c8, f8, c16, f16, c32, f32, c64, f64;
  logic d8, d16, d32, d64;
  int checks = 0, failures = 0;

  bk_carry_network_chk #(.W(8),  .TABLE_TIME(12)) u8  (.clk(clk), .checks(c8),  .failures(f8),  .done(d8));
  bk_carry_network_chk #(.W(16), .TABLE_TIME(16)) u16 (.clk(clk), .checks(c16), .failures(f16), .done(d16));
  bk_carry_network_chk #(.W(32), .TABLE_TIME(20)) u32 (.clk(clk), .checks(c32), .failures(f32), .done(d32));
  bk_carry_network_chk #(.W(64), .TABLE_TIME(24)) u64 (.clk(clk), .checks(c64), .failures(f64), .done(d64));

  // combinational network
  gp_t cx [16], cy [16], croot;
  bk_carry_network #(.W(16), .REGISTERED(1'b0)) u_comb (.clk(1'b0), .x(cx), .y(cy), .root(croot));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic c, pp;
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 16; i++) begin
        cx[i].p = ($urandom % 4) != 0;
        cx[i].g = cx[i].p ? 1'b0 : 1'($urandom);
      end
      #1;
      c = 0; pp = 1;
      for (int i = 0; i < 16; i++) begin
        c = cx[i].g | (cx[i].p & c);
        pp = pp & cx[i].p;
        checks++;
        if (cy[i].g !== c || cy[i].p !== pp) failures++;
      end
    end
    wait (d8 && d16 && d32 && d64);
    checks += c8 + c16 + c32 + c64;
    failures += f8 + f16 + f32 + f64;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
