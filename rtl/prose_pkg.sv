// prose_pkg: types, command encodings and constant functions shared by the
// ProSE systolic-array accelerator.
//
// Numbers: operands are bfloat16 (1 sign, 8 exponent, 7 mantissa bits), as in
// the design; accumulators and SIMD ALU results are IEEE single precision
// (fp32), matching the 32-bit accumulator of each processing element.
// Denormals are flushed to zero everywhere (a choice of this implementation).
//
// Commands: each systolic array is driven by a small command word (sa_cmd_t).
// CLEAR zeroes the accumulators, MATMUL streams count steps of A columns and
// B rows through the array (matmul mode), SIMD rotates the array left count
// times through the SIMD ALU column (simd mode). The command format is this
// implementation's own; the document describes the operations, not an encoding.
//
// The real-number helpers at the end are constant functions: they fill the
// GELU and Exp lookup tables at elaboration time, so no table file is needed.
package prose_pkg;

  typedef logic [15:0] bf16_t;
  typedef logic [31:0] fp32_t;

  localparam bf16_t BF16_ZERO = 16'h0000;
  localparam bf16_t BF16_ONE  = 16'h3F80;
  localparam bf16_t BF16_INF  = 16'h7F80;

  // Systolic array flavours: M-Type (MatMul + SIMD ALU), G-Type (+ GELU),
  // E-Type (+ Exp).
  typedef enum logic [1:0] {SA_M = 2'd0, SA_G = 2'd1, SA_E = 2'd2} sa_type_e;

  typedef enum logic [1:0] {
    CMD_CLEAR  = 2'd0,   // zero all accumulators (1 cycle)
    CMD_MATMUL = 2'd1,   // matmul mode: accumulate A(n x count) * B(count x n)
    CMD_SIMD   = 2'd2,   // simd mode: count left rotations through the ALUs
    CMD_NOP    = 2'd3
  } sa_cmd_e;

  // SIMD ALU operations. x is the accumulator leaving the left-most column,
  // v the vector-register lane, alpha/beta the scalar registers.
  typedef enum logic [2:0] {
    ALU_PASS   = 3'd0,   // y = x              (read-out of results)
    ALU_MUL    = 3'd1,   // y = alpha * x      (scaling, MatDiv by 1/alpha)
    ALU_ADD    = 3'd2,   // y = x + v          (matrix addition)
    ALU_MULADD = 3'd3,   // y = alpha*x + beta*v (MulAdd)
    ALU_GELU   = 3'd4,   // y = GELU(x)        (G-Type only)
    ALU_EXP    = 3'd5    // y = exp(x)         (E-Type only)
  } alu_op_e;

  // Source of the A (left) operand stream during MATMUL.
  typedef enum logic [1:0] {
    ABUF_STREAM = 2'd0,  // from the host stream only
    ABUF_RECORD = 2'd1,  // from the host stream, and keep a copy
    ABUF_REPLAY = 2'd2   // from the input partial buffer, no host traffic
  } abuf_mode_e;

  typedef struct packed {
    sa_cmd_e    op;
    alu_op_e    alu_op;
    abuf_mode_e abuf;
    logic       emit;     // SIMD: send each ALU result column to the host
    logic [15:0] count;   // MATMUL: K steps; SIMD: number of rotations
    bf16_t      alpha;    // scalar register 1
    bf16_t      beta;     // scalar register 2
  } sa_cmd_t;

  // True when the ALU operation reads the vector register.
  function automatic logic alu_uses_v(alu_op_e op);
    return (op == ALU_ADD) || (op == ALU_MULADD);
  endfunction

  // ---------------------------------------------------------------------
  // Constant (elaboration-time) helpers for the lookup tables.
  // ---------------------------------------------------------------------

  // bfloat16 bit pattern to real (normal numbers; zero/denormal give 0).
  function automatic real bf16_to_real(bf16_t b);
    logic [63:0] d;
    if (b[14:7] == 8'd0) return 0.0;
    d = {b[15], 11'(int'(b[14:7]) - 127 + 1023), b[6:0], 45'd0};
    return $bitstoreal(d);
  endfunction

  // real to bfloat16 with round-to-nearest-even; overflow gives infinity,
  // results below the normal range give signed zero.
  function automatic bf16_t real_to_bf16(real r);
    logic [63:0] d;
    int          e;
    logic [7:0]  m;
    logic        g, s;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 15'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b0, d[51:45]};
    g = d[44];
    s = |d[43:0];
    if (g && (s || m[0])) m = m + 8'd1;
    if (m[7]) begin
      m = 8'd0;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 15'h7F80};
    if (e <= 0)   return {d[63], 15'd0};
    return {d[63], 8'(e), m[6:0]};
  endfunction

  // GELU(x) = 0.5 x (1 + tanh(sqrt(2/pi) (x + 0.044715 x^3)))
  function automatic real gelu_real(real x);
    return 0.5 * x * (1.0 + $tanh(0.7978845608028654 * (x + 0.044715 * x * x * x)));
  endfunction

endpackage
