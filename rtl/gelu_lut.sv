// gelu_lut: bfloat16 GELU by two-level indexed table lookup.
//
// GELU(x) = 0.5 x (1 + tanh(sqrt(2/pi) (x + 0.044715 x^3))). The first level
// decodes sign and exponent of x: only exponents -4..3 (|x| in [2^-4, 16)) are
// looked up. Each (sign, exponent) pair selects one 128-entry segment, and the
// second level indexes that segment with the 7 mantissa bits. That is
// 2 x 8 x 128 = 2048 entries of 16 bits, the 4 KB the design budgets for GELU.
// Outside the window the design approximates: small |x| gives 0, large
// positive x gives x, large negative x gives 0; infinities follow the same
// rule and NaN passes through.
// The table is computed at elaboration from the formula above, rounded to
// nearest even, so no data file is needed. The lookup is combinational, one
// per cycle; one copy exists per SIMD ALU lane of a G-Type array.
module gelu_lut
  import prose_pkg::*;
(
  input  bf16_t x,
  output bf16_t y
);
  localparam int EMIN = -4;
  localparam int EMAX = 3;
  localparam int NSEG = EMAX - EMIN + 1;        // exponent segments per sign
  localparam int DEPTH = 2 * NSEG * 128;

  typedef bf16_t table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < DEPTH; i++) begin
      int    seg;
      bf16_t xi;
      seg = (i / 128) % NSEG;
      xi  = {1'(i / (NSEG * 128)), 8'(seg + EMIN + 127), 7'(i % 128)};
      t[i] = real_to_bf16(gelu_real(bf16_to_real(xi)));
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  logic [7:0]  e;
  logic        in_window;
  localparam int IW = $clog2(DEPTH);             // table index width
  logic [IW-1:0] seg_base;
  logic [IW-1:0] index;

  always_comb begin
    e = x[14:7];
    in_window = (int'(e) >= EMIN + 127) && (int'(e) <= EMAX + 127);
    // level 1: segment number from sign and exponent; level 2: mantissa
    seg_base = IW'(x[15] ? NSEG : 0) + IW'(int'(e) - (EMIN + 127));
    index    = IW'(seg_base * IW'(128)) + IW'(x[6:0]);
    if (in_window)
      y = TABLE[index];
    else if (e == 8'hFF && x[6:0] != 7'd0)
      y = x;                                   // NaN
    else if (int'(e) < EMIN + 127)
      y = BF16_ZERO;                           // |x| < 2^-4
    else if (x[15])
      y = BF16_ZERO;                           // x <= -16
    else
      y = x;                                   // x >= 16: linear region
  end
endmodule
