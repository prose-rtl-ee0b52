// simd_alu: one lane of the SIMD ALU column beside a ProSE systolic array.
//
// In simd mode the array rotates left; the accumulator leaving the left-most
// column (x, fp32) enters this lane together with the lane's element of the
// vector register (v) and the two scalar registers (alpha, beta), and the
// result y re-enters the array at the right-most column. Operations:
//   PASS   y = x                    (read-out)
//   MUL    y = alpha * x            (scaling; MatDiv uses alpha = 1/a)
//   ADD    y = x + v                (matrix addition)
//   MULADD y = alpha * x + beta * v (MulAdd)
//   GELU   y = GELU(x)              (only if HAS_GELU)
//   EXP    y = exp(x)               (only if HAS_EXP)
// The operation set follows the document's five primitives; folding the
// scalar and vector terms of MulAdd into one lane operation is this
// implementation's choice. For the multiplications and the lookups x is
// taken as bfloat16 (accumulator bits [31:16], as the PE output); ADD keeps
// full fp32 precision. Lookup results are widened to fp32 with zero low bits.
// An operation the lane lacks hardware for (GELU without HAS_GELU, EXP
// without HAS_EXP) behaves as PASS.
// Purely combinational: a lane produces one result per cycle.
module simd_alu
  import prose_pkg::*;
#(
  parameter bit HAS_GELU = 1'b0,
  parameter bit HAS_EXP  = 1'b0
) (
  input  alu_op_e op,
  input  fp32_t   x,
  input  bf16_t   v,
  input  bf16_t   alpha,
  input  bf16_t   beta,
  output fp32_t   y
);
  fp32_t ax, bv, sum_in_a, sum_in_b, sum;
  bf16_t x16, gelu_y, exp_y;

  assign x16 = x[31:16];

  bf16_mul u_mul_x (.a(x16), .b(alpha), .p(ax));
  bf16_mul u_mul_v (.a(v),   .b(beta),  .p(bv));
  fp32_add u_add   (.a(sum_in_a), .b(sum_in_b), .y(sum));

  if (HAS_GELU) begin : g_gelu
    gelu_lut u_gelu (.x(x16), .y(gelu_y));
  end else begin : g_no_gelu
    assign gelu_y = x16;
  end

  if (HAS_EXP) begin : g_exp
    exp_lut u_exp (.x(x16), .y(exp_y));
  end else begin : g_no_exp
    assign exp_y = x16;
  end

  always_comb begin
    sum_in_a = (op == ALU_ADD) ? x : ax;
    sum_in_b = (op == ALU_ADD) ? {v, 16'd0} : bv;
    unique case (op)
      ALU_MUL:    y = ax;
      ALU_ADD,
      ALU_MULADD: y = sum;
      ALU_GELU:   y = HAS_GELU ? {gelu_y, 16'd0} : x;
      ALU_EXP:    y = HAS_EXP  ? {exp_y, 16'd0}  : x;
      default:    y = x;
    endcase
  end
endmodule
