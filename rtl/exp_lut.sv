// exp_lut: bfloat16 exp(x) by two-level indexed table lookup.
//
// The first level decodes sign and exponent of x: only exponents -6..5
// (|x| in [2^-6, 64)) are looked up. Each (sign, exponent) pair selects one
// 128-entry segment, and the second level indexes it with the 7 mantissa
// bits: 2 x 12 x 128 = 3072 entries of 16 bits, the 6 KB the design budgets
// for Exp. Outside the window: |x| < 2^-6 gives 1.0, x >= 64 gives +infinity
// and x <= -64 gives 0; NaN passes through.
// The table is computed at elaboration with $exp and rounded to nearest even,
// so no data file is needed. The lookup is combinational, one per cycle; one
// copy exists per SIMD ALU lane of an E-Type array.
module exp_lut
  import prose_pkg::*;
(
  input  bf16_t x,
  output bf16_t y
);
  localparam int EMIN = -6;
  localparam int EMAX = 5;
  localparam int NSEG = EMAX - EMIN + 1;
  localparam int DEPTH = 2 * NSEG * 128;

  typedef bf16_t table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < DEPTH; i++) begin
      int    seg;
      bf16_t xi;
      seg = (i / 128) % NSEG;
      xi  = {1'(i / (NSEG * 128)), 8'(seg + EMIN + 127), 7'(i % 128)};
      t[i] = real_to_bf16($exp(bf16_to_real(xi)));
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  logic [7:0]  e;
  logic        in_window;
  logic [11:0] seg_base;
  logic [11:0] index;

  always_comb begin
    e = x[14:7];
    in_window = (int'(e) >= EMIN + 127) && (int'(e) <= EMAX + 127);
    // level 1: segment number from sign and exponent; level 2: mantissa
    seg_base = 12'(x[15] ? NSEG : 0) + 12'(int'(e) - (EMIN + 127));
    index    = 12'(seg_base * 12'd128) + 12'(x[6:0]);
    if (in_window)
      y = TABLE[index];
    else if (e == 8'hFF && x[6:0] != 7'd0)
      y = x;                                   // NaN
    else if (int'(e) < EMIN + 127)
      y = BF16_ONE;                            // |x| < 2^-6
    else if (x[15])
      y = BF16_ZERO;                           // x <= -64
    else
      y = BF16_INF;                            // x >= 64
  end
endmodule
