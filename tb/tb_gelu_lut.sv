// tb_gelu_lut: checks the gelu lookup table against the function computed in
// real arithmetic. Every input in the table window (exponents -4..3,
// both signs, all mantissas) must match the correctly rounded bfloat16
// result; inputs outside the window must give the documented approximation.
module tb_gelu_lut;
  import tb_fp_pkg::*;
  logic [15:0] x, y, want;
  int checks = 0, failures = 0;

  gelu_lut dut (.x(x), .y(y));

  function automatic real f(real xr);
    return 0.5 * xr * (1.0 + $tanh(0.7978845608028654 * (xr + 0.044715 * xr * xr * xr)));
  endfunction

  task automatic check(logic [15:0] w, string what);
    #1;
    checks++;
    if (y !== w) begin
      failures++;
      if (failures < 20) $display("FAIL %s: f(%h) = %h, want %h", what, x, y, w);
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++)
      for (int e = -4; e <= 3; e++)
        for (int m = 0; m < 128; m++) begin
          x = {1'(s), 8'(e + 127), 7'(m)};
          check(real_to_bf16(f(bf16_to_real(x))), "window");
        end
    x = 16'h3D00; check(16'h0000, "0.03125 -> 0");
    x = 16'h0000; check(16'h0000, "zero");
    x = 16'h4190; check(16'h4190, "18 -> 18");
    x = 16'hC190; check(16'h0000, "-18 -> 0");
    x = 16'h7F80; check(16'h7F80, "+inf");
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
