// bk_parallel_adder_tb: the combinational adder at its default width 16 and
// at widths 8 and 64, compared with the built-in addition on corner cases
// (0, all ones, full carry propagation) and random operands.
module bk_parallel_adder_tb;
  logic [15:0] a16, b16, s16;
  logic        co16;
  logic [7:0]  a8, b8, s8;
  logic        co8;
  logic [63:0] a64, b64, s64;
  logic        co64;
  int checks = 0, failures = 0;

  bk_parallel_adder dut16 (.a(a16), .b(b16), .s(s16), .cout(co16));
  bk_parallel_adder #(.N(8))  dut8  (.a(a8),  .b(b8),  .s(s8),  .cout(co8));
  bk_parallel_adder #(.N(64)) dut64 (.a(a64), .b(b64), .s(s64), .cout(co64));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] e16;
    logic [8:0]  e8;
    logic [64:0] e64;
    for (int n = 0; n < 400; n++) begin
      case (n)
        0: begin a16 = 16'hFFFF; b16 = 16'h0001; end
        1: begin a16 = 16'hFFFF; b16 = 16'hFFFF; end
        2: begin a16 = 16'h0000; b16 = 16'h0000; end
        3: begin a16 = 16'h7FFF; b16 = 16'h0001; end
        default: begin a16 = 16'($urandom); b16 = 16'($urandom); end
      endcase
      a8  = 8'($urandom);
      b8  = (n % 5 == 0) ? ~a8 + 8'd1 : 8'($urandom);
      a64 = {$urandom, $urandom};
      b64 = (n % 5 == 0) ? ~a64 : {$urandom, $urandom};
      if (n == 1) begin a64 = '1; b64 = 64'd1; end
      #1;
      e16 = a16 + b16;
      e8  = a8 + b8;
      e64 = a64 + b64;
      checks += 3;
      if ({co16, s16} !== e16) begin failures++; $display("16: %h + %h = %h, got %h", a16, b16, e16, {co16, s16}); end
      if ({co8, s8}   !== e8)  begin failures++; $display("8: %h + %h = %h, got %h", a8, b8, e8, {co8, s8}); end
      if ({co64, s64} !== e64) begin failures++; $display("64: %h + %h = %h, got %h", a64, b64, e64, {co64, s64}); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
