// tb_fp32_add: checks the fp32 adder against real arithmetic rounded to
// nearest even. Operand exponents differ by at most 20 so the double-precision
// sum is exact; separate cases cover cancellation, large exponent gaps,
// infinities and signed zeros.
module tb_fp32_add;
  import tb_fp_pkg::*;
  logic [31:0] a, b, y, want;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] w, string what);
    #1;
    checks++;
    if (y !== w) begin
      failures++;
      $display("FAIL %s: %h + %h = %h, want %h", what, a, b, y, w);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int e;
      e = int'($urandom_range(0, 60)) - 30;
      a = rand_fp32(e, e);
      b = rand_fp32(e - int'($urandom_range(0, 20)), e);
      if (i % 2 == 1) {a, b} = {b, a};
      want = real_to_fp32(fp32_to_real(a) + fp32_to_real(b));
      check(want, "random");
    end
    // near cancellation: same exponent, opposite signs
    for (int i = 0; i < 500; i++) begin
      a = rand_fp32(3, 3);
      b = {~a[31], a[30:23], a[22:0] ^ 23'($urandom_range(0, 255))};
      want = real_to_fp32(fp32_to_real(a) + fp32_to_real(b));
      check(want, "cancel");
    end
    a = 32'h3F80_0000; b = 32'h3380_0000; check(32'h3F80_0000, "1+2^-24 ties to even");
    a = 32'h3F80_0000; b = 32'h2000_0000; check(32'h3F80_0000, "huge gap");
    a = 32'h3F80_0000; b = 32'hBF80_0000; check(32'h0000_0000, "x-x");
    a = 32'h7F80_0000; b = 32'h3F80_0000; check(32'h7F80_0000, "inf+1");
    a = 32'h7F80_0000; b = 32'hFF80_0000; check(32'h7FC0_0000, "inf-inf");
    a = 32'h7F7F_FFFF; b = 32'h7F7F_FFFF; check(32'h7F80_0000, "overflow");
    a = 32'h0000_0000; b = 32'hC0A0_0000; check(32'hC0A0_0000, "0+x");
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
