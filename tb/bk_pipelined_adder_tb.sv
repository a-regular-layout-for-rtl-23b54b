// bk_pipelined_adder_tb: runs the streaming check of bk_pipelined_adder_chk
// on the adder at its default width (16 bits per segment) and at widths 4
// and 64, covering short and wide segments of the same scheme: every result
// segment against built-in addition, latency 2*log2(W)+1, total time
// n/W + 2*log2(W)+1 for an addition without gaps, and the carry, ripple,
// restart, gap and back-to-back cases each at least once per width.
module bk_pipelined_adder_tb;
  int c16, f16, c4, f4, c64, f64;
  logic d16, d4, d64;
  int checks = 0, failures = 0;

  bk_pipelined_adder_chk #(.W(16), .DEFAULT_W(1'b1)) u16 (.checks(c16), .failures(f16), .done(d16));
  bk_pipelined_adder_chk #(.W(4))  u4  (.checks(c4),  .failures(f4),  .done(d4));
  bk_pipelined_adder_chk #(.W(64)) u64 (.checks(c64), .failures(f64), .done(d64));

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d16 && d4 && d64);
    checks = c16 + c4 + c64;
    failures = f16 + f4 + f64;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
