// fp32_add: single-precision floating-point adder, round to nearest even.
//
// Used as the accumulator adder of every processing element and inside the
// SIMD ALU. The document fixes only its width (32-bit accumulation); the
// algorithm is the usual one: order the operands by magnitude, align the
// smaller one with guard, round and sticky bits, add or subtract, normalise
// with a leading-zero count, then round to nearest even. Denormal inputs
// count as zero and results below the normal range flush to signed zero
// (a choice of this implementation). Infinities propagate; inf - inf and any
// NaN input give the canonical NaN 0x7FC00000.
//
// Purely combinational; no clock.
module fp32_add
  import prose_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  logic        a_zero, b_zero, a_spec, b_spec, a_nan, b_nan;
  fp32_t       hi, lo;
  logic [7:0]  shamt_raw;
  logic [4:0]  shamt;
  logic [26:0] m_hi, m_lo, m_shift;   // {hidden, 23 frac, guard, round, sticky}
  logic        sticky;
  logic [27:0] sum;                       // one carry bit on top
  logic [4:0]  lz;
  logic [9:0]  exp_r;                     // working exponent, two's complement
  logic [26:0] norm;
  logic [24:0] rounded;                   // carry + 24-bit significand
  logic        round_up;
  logic        sub;
  logic        found;

  always_comb begin
    a_zero = (a[30:23] == 8'd0);
    b_zero = (b[30:23] == 8'd0);
    a_spec = (a[30:23] == 8'hFF);
    b_spec = (b[30:23] == 8'hFF);
    a_nan  = a_spec && (a[22:0] != 23'd0);
    b_nan  = b_spec && (b[22:0] != 23'd0);

    // Order by magnitude.
    if (a[30:0] >= b[30:0]) begin
      hi = a; lo = b;
    end else begin
      hi = b; lo = a;
    end
    sub = a[31] ^ b[31];

    m_hi   = {1'b1, hi[22:0], 3'b000};
    m_lo = (lo[30:23] == 8'd0) ? 27'd0 : {1'b1, lo[22:0], 3'b000};

    // Align with sticky.
    shamt_raw = hi[30:23] - lo[30:23];
    shamt     = (shamt_raw > 8'd26) ? 5'd27 : shamt_raw[4:0];
    m_shift   = (shamt == 5'd27) ? 27'd0 : (m_lo >> shamt);
    sticky    = (shamt == 5'd27) ? (m_lo != 27'd0)
                                 : ((m_lo & ((27'd1 << shamt) - 27'd1)) != 27'd0);
    m_shift[0] = m_shift[0] | sticky;

    sum = sub ? ({1'b0, m_hi} - {1'b0, m_shift}) : ({1'b0, m_hi} + {1'b0, m_shift});

    // Normalise.
    lz = 5'd0;
    found = 1'b0;
    for (int i = 0; i < 27; i++)
      if (!found && sum[26 - i]) begin
        lz    = 5'(i);
        found = 1'b1;
      end
    exp_r = {2'b00, hi[30:23]};
    if (sum[27]) begin
      norm  = sum[27:1];
      norm[0] = sum[1] | sum[0];
      exp_r = exp_r + 10'd1;
    end else begin
      norm  = sum[26:0] << lz;
      exp_r = exp_r - 10'(lz);
    end

    // Round to nearest even on {guard, round, sticky} = norm[2:0].
    round_up = norm[2] && (norm[1] || norm[0] || norm[3]);
    rounded  = {1'b0, norm[26:3]} + 25'(round_up);
    if (rounded[24]) begin
      rounded = rounded >> 1;
      exp_r   = exp_r + 10'd1;
    end

    if (a_nan || b_nan || (a_spec && b_spec && sub))
      y = 32'h7FC0_0000;
    else if (a_spec)
      y = a;
    else if (b_spec)
      y = b;
    else if (a_zero && b_zero)
      y = {a[31] & b[31], 31'd0};
    else if (b_zero)
      y = a;
    else if (a_zero)
      y = b;
    else if (sum == 28'd0)
      y = 32'd0;                               // exact cancellation gives +0
    else if (exp_r[9] || exp_r == 10'd0)
      y = {hi[31], 31'd0};                    // underflow: flush to zero
    else if (exp_r >= 10'd255)
      y = {hi[31], 8'hFF, 23'd0};             // overflow
    else
      y = {hi[31], exp_r[7:0], rounded[22:0]};
  end
endmodule
