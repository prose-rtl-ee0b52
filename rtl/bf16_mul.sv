// bf16_mul: bfloat16 x bfloat16 multiplier with an fp32 product.
//
// This is the multiplier of a ProSE processing element: two 16-bit operands
// in, a 32-bit product out that feeds the fp32 accumulator adder. Two 8-bit
// significands give a 16-bit product, which fits in the 24-bit fp32
// significand, so the product is exact and needs no rounding. The document
// gives the widths (16-bit inputs, 32-bit product); the number handling is
// this implementation's: denormal inputs count as zero, a result above the
// fp32 range becomes infinity and one below it becomes signed zero,
// infinity times zero gives the canonical NaN 0x7FC00000.
//
// Purely combinational; no clock.
module bf16_mul
  import prose_pkg::*;
(
  input  bf16_t a,
  input  bf16_t b,
  output fp32_t p
);
  logic        sign;
  logic        a_zero, b_zero, a_spec, b_spec;
  logic [15:0] prod;
  logic [9:0]  exp_sum;   // signed-safe: ea + eb + 1 - 127 computed in 10 bits
  logic [22:0] frac;

  always_comb begin
    sign    = a[15] ^ b[15];
    a_zero  = (a[14:7] == 8'd0);
    b_zero  = (b[14:7] == 8'd0);
    a_spec  = (a[14:7] == 8'hFF);
    b_spec  = (b[14:7] == 8'hFF);
    prod    = {1'b1, a[6:0]} * {1'b1, b[6:0]};
    // Normalise: the product of two values in [1,2) lies in [1,4).
    if (prod[15]) begin
      frac    = {prod[14:0], 8'd0};
      exp_sum = 10'(a[14:7]) + 10'(b[14:7]) - 10'd126;
    end else begin
      frac    = {prod[13:0], 9'd0};
      exp_sum = 10'(a[14:7]) + 10'(b[14:7]) - 10'd127;
    end

    if ((a_spec && b_zero) || (b_spec && a_zero) ||
        (a_spec && a[6:0] != 7'd0) || (b_spec && b[6:0] != 7'd0))
      p = 32'h7FC0_0000;                       // NaN
    else if (a_spec || b_spec)
      p = {sign, 8'hFF, 23'd0};                // infinity
    else if (a_zero || b_zero)
      p = {sign, 31'd0};                       // zero
    else if (exp_sum[9] || exp_sum == 10'd0)
      p = {sign, 31'd0};                       // underflow: flush to zero
    else if (exp_sum >= 10'd255)
      p = {sign, 8'hFF, 23'd0};                // overflow
    else
      p = {sign, exp_sum[7:0], frac};
  end
endmodule
