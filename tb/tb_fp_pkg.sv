// tb_fp_pkg: reference number conversions for the testbenches.
//
// Independent of the RTL: values are converted through IEEE double precision
// ($realtobits / $bitstoreal) and rounded to nearest even in software, so the
// testbenches can compute expected bfloat16 and fp32 results from real
// arithmetic. Denormals are treated as zero, as in the RTL.
package tb_fp_pkg;

  function automatic real fp32_to_real(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic real bf16_to_real(logic [15:0] b);
    return fp32_to_real({b, 16'd0});
  endfunction

  // Round a real to a float with MB stored mantissa bits (23 or 7).
  function automatic logic [31:0] real_to_float(real r, int mb);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    logic        g, s;
    logic [51:0] frac;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e    = int'(d[62:52]) - 1023 + 127;
    frac = d[51:0];
    m    = 24'(frac >> (52 - mb));
    g    = frac[51 - mb];
    s    = (frac & ((52'd1 << (51 - mb)) - 52'd1)) != 52'd0;
    if (g && (s || m[0])) m = m + 24'd1;
    if (m[mb]) begin
      m = 24'd0;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), 23'(m << (23 - mb))};
  endfunction

  function automatic logic [31:0] real_to_fp32(real r);
    return real_to_float(r, 23);
  endfunction

  function automatic logic [15:0] real_to_bf16(real r);
    logic [31:0] f;
    f = real_to_float(r, 7);
    return f[31:16];
  endfunction

  // Random normal bfloat16 with unbiased exponent in [emin, emax].
  function automatic logic [15:0] rand_bf16(int emin, int emax);
    int e;
    e = emin + int'($urandom_range(0, emax - emin));
    return {1'($urandom), 8'(e + 127), 7'($urandom)};
  endfunction

  function automatic logic [31:0] rand_fp32(int emin, int emax);
    int e;
    e = emin + int'($urandom_range(0, emax - emin));
    return {1'($urandom), 8'(e + 127), 23'($urandom)};
  endfunction

endpackage
