// tb_exp_lut: checks the exp lookup table against the function computed in
// real arithmetic. Every input in the table window (exponents -6..5,
// both signs, all mantissas) must match the correctly rounded bfloat16
// result; inputs outside the window must give the documented approximation.
module tb_exp_lut;
  import tb_fp_pkg::*;
  logic [15:0] x, y, want;
  int checks = 0, failures = 0;

  exp_lut dut (.x(x), .y(y));

  function automatic real f(real xr);
    return $exp(xr);
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
      for (int e = -6; e <= 5; e++)
        for (int m = 0; m < 128; m++) begin
          x = {1'(s), 8'(e + 127), 7'(m)};
          check(real_to_bf16(f(bf16_to_real(x))), "window");
        end
    x = 16'h3C00; check(16'h3F80, "2^-7 -> 1");
    x = 16'h0000; check(16'h3F80, "zero -> 1");
    x = 16'h4300; check(16'h7F80, "128 -> inf");
    x = 16'hC300; check(16'h0000, "-128 -> 0");
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
