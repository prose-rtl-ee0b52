// tb_systolic_array: end-to-end checks of one systolic array (N = 4, all
// special functions present, 16-deep input partial buffer).
//
// Reference values are computed here in real arithmetic with fp32 rounding
// after each accumulation step, in the order the array accumulates (k
// ascending), so results must match bit for bit. Covered: MATMUL latency
// (K + 2N - 2 cycles), accumulation across two MATMULs, record and replay
// through the input partial buffer, stalls from a slow B stream, back-
// pressure on the result stream, and the SIMD ops PASS, MUL (with emit off,
// results kept in place), ADD, MULADD, GELU and EXP.
module tb_systolic_array;
  import prose_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 4;
  localparam int K = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, a_valid, a_ready, b_valid, b_ready, out_valid, out_ready, busy;
  sa_cmd_t cmd;
  bf16_t [N-1:0] a_data, b_data, out_data;

  systolic_array #(.N(N), .HAS_GELU(1'b1), .HAS_EXP(1'b1), .HAS_INBUF(1'b1), .INBUF_DEPTH(16)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .a_valid, .a_ready, .a_data,
    .b_valid, .b_ready, .b_data, .out_valid, .out_ready, .out_data, .busy);

  int checks = 0, failures = 0;
  int stall_cycles = 0, bp_cycles = 0;

  bf16_t A [N][K];
  bf16_t B [K][N];
  logic [31:0] C [N][N];       // reference accumulators
  bf16_t D [N][N];             // vector operand
  int    b_gap = 0;            // max random idle cycles between B beats
  bit    random_ready = 0;

  bf16_t a_q [$][N];
  bf16_t b_q [$][N];
  bf16_t got [N][N];

  always @(posedge clk) if (dut.state == 2'd1 && !dut.feed_step) stall_cycles++;
  int busy_cycles = 0;
  always @(posedge clk) if (busy) busy_cycles++;
  always @(posedge clk) if (out_valid && !out_ready) bp_cycles++;

  // Stream drivers: handshake sampled at the rising edge, data changed on the
  // falling edge.
  logic a_fire;
  always @(posedge clk) a_fire <= a_valid && a_ready;
  initial begin
    a_valid = 0; a_data = '0;
    forever begin
      @(negedge clk);
      if (a_fire) void'(a_q.pop_front());
      if (a_q.size() != 0) begin
        a_valid = 1;
        for (int i = 0; i < N; i++) a_data[i] = a_q[0][i];
      end else a_valid = 0;
    end
  end
  // B driver: handshake sampled at the rising edge, data changed on the falling edge.
  logic b_fire;
  always @(posedge clk) b_fire <= b_valid && b_ready;
  initial begin
    b_valid = 0; b_data = '0;
    forever begin
      @(negedge clk);
      if (b_fire) begin
        void'(b_q.pop_front());
        b_valid = 0;
        if (b_gap != 0) repeat ($urandom_range(1, b_gap)) @(negedge clk);
      end
      if (b_q.size() != 0) begin
        b_valid = 1;
        for (int j = 0; j < N; j++) b_data[j] = b_q[0][j];
      end else b_valid = 0;
    end
  end

  always @(negedge clk) out_ready <= random_ready ? 1'($urandom_range(0, 2) != 0) : 1'b1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  task automatic issue(sa_cmd_e op, alu_op_e aop, abuf_mode_e ab, logic em, int cnt,
                       bf16_t al, bf16_t be);
    @(negedge clk);
    cmd_valid = 1;
    cmd = '{op: op, alu_op: aop, abuf: ab, emit: em, count: 16'(cnt), alpha: al, beta: be};
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic wait_idle();
    do @(posedge clk); while (busy);
  endtask

  task automatic clear_ref();
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) C[i][j] = 0;
  endtask

  task automatic rand_ab(int emin, int emax);
    for (int i = 0; i < N; i++) for (int k = 0; k < K; k++) A[i][k] = rand_bf16(emin, emax);
    for (int k = 0; k < K; k++) for (int j = 0; j < N; j++) B[k][j] = rand_bf16(emin, emax);
  endtask

  task automatic ref_matmul(int k0, int k1);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      for (int k = k0; k < k1; k++)
        C[i][j] = real_to_fp32(fp32_to_real(C[i][j]) +
                               bf16_to_real(A[i][k]) * bf16_to_real(B[k][j]));
  endtask

  task automatic push_stream(int k0, int k1, bit with_a);
    bf16_t col [N];
    for (int k = k0; k < k1; k++) begin
      if (with_a) begin
        for (int i = 0; i < N; i++) col[i] = A[i][k];
        a_q.push_back(col);
      end
      for (int j = 0; j < N; j++) col[j] = B[k][j];
      b_q.push_back(col);
    end
  endtask

  // Run a SIMD command; if emit, collect the N result columns into got.
  task automatic simd(alu_op_e aop, logic em, bf16_t al, bf16_t be);
    int col = 0;
    if (alu_uses_v(aop)) begin
      bf16_t c [N];
      for (int j = 0; j < N; j++) begin
        for (int i = 0; i < N; i++) c[i] = D[i][j];
        a_q.push_back(c);
      end
    end
    issue(CMD_SIMD, aop, ABUF_STREAM, em, N, al, be);
    if (em) begin
      while (col < N) begin
        @(posedge clk);
        if (out_valid && out_ready) begin
          for (int i = 0; i < N; i++) got[i][col] = out_data[i];
          col++;
        end
      end
    end
    wait_idle();
  endtask

  task automatic compare(string what, bf16_t want [N][N]);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      check(got[i][j] === want[i][j],
            $sformatf("%s C[%0d][%0d] = %h want %h", what, i, j, got[i][j], want[i][j]));
  endtask

  function automatic bf16_t gelu_model(bf16_t x);
    real xr;
    int  e;
    e = int'(x[14:7]) - 127;
    xr = bf16_to_real(x);
    if (e < -4) return 16'h0000;
    if (e > 3) return x[15] ? 16'h0000 : x;
    return real_to_bf16(0.5 * xr * (1.0 + $tanh(0.7978845608028654 * (xr + 0.044715 * xr * xr * xr))));
  endfunction

  function automatic bf16_t exp_model(bf16_t x);
    int e;
    e = int'(x[14:7]) - 127;
    if (e < -6) return 16'h3F80;
    if (e > 5) return x[15] ? 16'h0000 : 16'h7F80;
    return real_to_bf16($exp(bf16_to_real(x)));
  endfunction

  bf16_t want [N][N];
  int t0, t1;

  initial begin
    cmd_valid = 0; cmd = '0; out_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. MATMUL with record; streams pre-filled so there is no stall: latency check.
    rand_ab(-3, 2);
    clear_ref();
    issue(CMD_CLEAR, ALU_PASS, ABUF_STREAM, 0, 0, 0, 0);
    push_stream(0, K, 1);
    repeat (K + 2) @(negedge clk);
    @(negedge clk);
    cmd_valid = 1;
    cmd = '{op: CMD_MATMUL, alu_op: ALU_PASS, abuf: ABUF_RECORD, emit: 0, count: 16'(K), alpha: 0, beta: 0};
    t0 = busy_cycles;
    @(negedge clk); cmd_valid = 0;
    wait_idle(); @(negedge clk);
    t1 = busy_cycles;
    check(t1 - t0 == K + 2 * N - 2, $sformatf("MATMUL latency %0d, want %0d", t1 - t0, K + 2 * N - 2));
    ref_matmul(0, K);
    simd(ALU_PASS, 1, BF16_ONE, BF16_ONE);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) want[i][j] = C[i][j][31:16];
    compare("matmul", want);
    // The PASS rotation went all the way round: accumulators are unchanged.

    // 2. Replay A from the partial buffer with a new B, accumulated onto C.
    for (int k = 0; k < K; k++) for (int j = 0; j < N; j++) B[k][j] = rand_bf16(-3, 2);
    push_stream(0, K, 0);
    issue(CMD_MATMUL, ALU_PASS, ABUF_REPLAY, 0, K, 0, 0);
    wait_idle();
    check(a_q.size() == 0, "replay consumed no A stream");
    ref_matmul(0, K);
    simd(ALU_PASS, 1, BF16_ONE, BF16_ONE);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) want[i][j] = C[i][j][31:16];
    compare("replay+accumulate", want);

    // 3. Split K into two MATMULs with a slow, bursty B stream (stalls).
    rand_ab(-3, 2);
    clear_ref();
    issue(CMD_CLEAR, ALU_PASS, ABUF_STREAM, 0, 0, 0, 0);
    b_gap = 3;
    push_stream(0, 3, 1);
    issue(CMD_MATMUL, ALU_PASS, ABUF_STREAM, 0, 3, 0, 0);
    wait_idle();
    push_stream(3, K, 1);
    issue(CMD_MATMUL, ALU_PASS, ABUF_STREAM, 0, K - 3, 0, 0);
    wait_idle();
    b_gap = 0;
    ref_matmul(0, K);
    check(stall_cycles > 0, "stalls happened");
    random_ready = 1;
    simd(ALU_PASS, 1, BF16_ONE, BF16_ONE);
    random_ready = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) want[i][j] = C[i][j][31:16];
    compare("stalled matmul", want);

    // 4. MulAdd in two passes: MUL kept in place (emit off), then ADD streamed out.
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) D[i][j] = rand_bf16(-3, 2);
    simd(ALU_MUL, 0, 16'h3FC0, BF16_ONE);                   // alpha = 1.5
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      C[i][j] = real_to_fp32(bf16_to_real(C[i][j][31:16]) * 1.5);
    random_ready = 1;
    simd(ALU_ADD, 1, BF16_ONE, BF16_ONE);
    random_ready = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      C[i][j] = real_to_fp32(fp32_to_real(C[i][j]) + bf16_to_real(D[i][j]));
      want[i][j] = C[i][j][31:16];
    end
    compare("mul then add", want);

    // 5. MULADD alpha*x + beta*v in one pass.
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) D[i][j] = rand_bf16(-3, 2);
    simd(ALU_MULADD, 1, 16'hBF00, 16'h4000);                 // alpha = -0.5, beta = 2
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      C[i][j] = real_to_fp32(bf16_to_real(C[i][j][31:16]) * -0.5 + bf16_to_real(D[i][j]) * 2.0);
      want[i][j] = C[i][j][31:16];
    end
    compare("muladd", want);

    // 6. GELU, then EXP of the GELU results.
    simd(ALU_GELU, 1, BF16_ONE, BF16_ONE);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      want[i][j] = gelu_model(C[i][j][31:16]);
      C[i][j] = {want[i][j], 16'd0};
    end
    compare("gelu", want);
    simd(ALU_EXP, 1, BF16_ONE, BF16_ONE);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      want[i][j] = exp_model(C[i][j][31:16]);
      C[i][j] = {want[i][j], 16'd0};
    end
    compare("exp", want);

    check(bp_cycles > 0, "result back-pressure happened");
    $display("stall cycles %0d, back-pressure cycles %0d", stall_cycles, bp_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
