// tb_simd_alu: checks every SIMD ALU operation of a lane with both lookup
// tables present, against real arithmetic, and that a lane without lookup
// tables passes x through for GELU and EXP.
module tb_simd_alu;
  import prose_pkg::*;
  import tb_fp_pkg::*;
  alu_op_e op;
  fp32_t x, y, y_plain;
  bf16_t v, alpha, beta;
  int checks = 0, failures = 0;

  simd_alu #(.HAS_GELU(1'b1), .HAS_EXP(1'b1)) dut (.op, .x, .v, .alpha, .beta, .y);
  simd_alu #(.HAS_GELU(1'b0), .HAS_EXP(1'b0)) plain (.op, .x, .v, .alpha, .beta, .y(y_plain));

  task automatic check(fp32_t want, string what);
    #1;
    checks++;
    if (y !== want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: x=%h v=%h a=%h b=%h y=%h want %h", what, x, v, alpha, beta, y, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 500; i++) begin
      real xr, vr, ar, br, xt;
      int  e;
      x = rand_fp32(-3, 3); v = rand_bf16(-3, 3); alpha = rand_bf16(-3, 3); beta = rand_bf16(-3, 3);
      xr = fp32_to_real(x); xt = bf16_to_real(x[31:16]);
      vr = bf16_to_real(v); ar = bf16_to_real(alpha); br = bf16_to_real(beta);
      op = ALU_PASS;   check(x, "pass");
      op = ALU_MUL;    check(real_to_fp32(xt * ar), "mul");
      op = ALU_ADD;    check(real_to_fp32(xr + vr), "add");
      op = ALU_MULADD; check(real_to_fp32(xt * ar + vr * br), "muladd");
      e = int'(x[30:23]) - 127;
      op = ALU_GELU;
      if (e >= -4) check({real_to_bf16(0.5 * xt * (1.0 + $tanh(0.7978845608028654 * (xt + 0.044715 * xt * xt * xt)))), 16'd0}, "gelu");
      else check(32'd0, "gelu small");
      op = ALU_EXP;
      if (e >= -6) check({real_to_bf16($exp(xt)), 16'd0}, "exp");
      else check(32'h3F80_0000, "exp small");
      op = ALU_GELU; #1; checks++; if (y_plain !== x) failures++;
    end
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
