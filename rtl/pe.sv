// pe: output-stationary processing element of a ProSE systolic array.
//
// Structure (as drawn for the design): a bfloat16 multiplier takes the
// operand arriving from above (in_a) and the operand arriving from the left
// (in_b); its 32-bit product is added to the 32-bit accumulator. REG_A and
// REG_B pass the operands on to the PE below (out_a) and to the right (out_b)
// one step later. A multiplexer in front of the accumulator selects either
// the adder (matmul mode) or rot_in, the accumulator of the right-hand
// neighbour (simd mode, left rotation); rot_out shows this PE's accumulator
// to its left-hand neighbour. The accumulator is the intermediate storage of
// the design: results stay here between a MatMul and the SIMD operations
// that follow it. result is the bfloat16 view of the accumulator, bits
// [31:16].
//
// Control (this implementation's choice): en advances the PE by one step;
// with en low nothing changes, which is how the array stalls. clear zeroes
// the accumulator, rot loads rot_in, otherwise a step is a multiply-
// accumulate. All updates are on the rising clock edge; rst_n is an
// asynchronous active-low reset.
module pe
  import prose_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  clear,
  input  logic  rot,
  input  bf16_t in_a,
  input  bf16_t in_b,
  input  fp32_t rot_in,
  output bf16_t out_a,
  output bf16_t out_b,
  output fp32_t rot_out,
  output bf16_t result
);
  fp32_t product, sum, acc;
  bf16_t reg_a, reg_b;

  bf16_mul u_mul (.a(in_a), .b(in_b), .p(product));
  fp32_add u_add (.a(acc), .b(product), .y(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      reg_a <= '0;
      reg_b <= '0;
    end else if (clear) begin
      acc   <= '0;
    end else if (en) begin
      if (rot) begin
        acc <= rot_in;
      end else begin
        acc   <= sum;
        reg_a <= in_a;
        reg_b <= in_b;
      end
    end
  end

  assign out_a   = reg_a;
  assign out_b   = reg_b;
  assign rot_out = acc;
  assign result  = acc[31:16];
endmodule
