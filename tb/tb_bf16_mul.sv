// tb_bf16_mul: checks the bfloat16 multiplier against real arithmetic.
// Random normal operands (product of two bf16 values is exact in fp32),
// plus zero, infinity and NaN corner cases.
module tb_bf16_mul;
  import tb_fp_pkg::*;
  logic [15:0] a, b;
  logic [31:0] p, exp_p;
  int checks = 0, failures = 0;

  bf16_mul dut (.a(a), .b(b), .p(p));

  task automatic check(logic [31:0] want, string what);
    #1;
    checks++;
    if (p !== want) begin
      failures++;
      $display("FAIL %s: %h * %h = %h, want %h", what, a, b, p, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = rand_bf16(-40, 40);
      b = rand_bf16(-40, 40);
      exp_p = real_to_fp32(bf16_to_real(a) * bf16_to_real(b));
      check(exp_p, "random");
    end
    a = 16'h3F80; b = 16'h4040; check(32'h4040_0000, "1*3");
    a = 16'h0000; b = 16'hC040; check(32'h8000_0000, "0*-3");
    a = 16'h7F80; b = 16'h3F80; check(32'h7F80_0000, "inf*1");
    a = 16'h7F80; b = 16'h0000; check(32'h7FC0_0000, "inf*0");
    a = 16'h7F00; b = 16'h7F00; check(32'h7F80_0000, "overflow");
    a = 16'h0100; b = 16'h0100; check(32'h0000_0000, "underflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
