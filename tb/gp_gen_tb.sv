// gp_gen_tb: checks the generate/propagate row against a + b bit logic on
// random and corner operands (16-bit default width).
module gp_gen_tb;
  import bk_pkg::*;
  localparam int W = 16;
  logic [W-1:0] a, b;
  gp_t gp [W];
  int checks = 0, failures = 0;

  gp_gen #(.W(W)) dut (.a(a), .b(b), .gp(gp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      case (n)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = '1; end
        2: begin a = 16'hAAAA; b = 16'h5555; end
        default: begin a = W'($urandom); b = W'($urandom); end
      endcase
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (gp[i].g !== (a[i] && b[i]) || gp[i].p !== (a[i] != b[i])) begin
          failures++;
          $display("mismatch bit %0d a=%h b=%h", i, a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
