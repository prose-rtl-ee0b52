// tb_prose_top: end-to-end test of the accelerator at reduced size (every
// array 4x4; 2 M-Type, 2 G-Type, 3 E-Type arrays). Seven host threads run
// concurrently, one per array, each through its type's shared I/O port:
//   M-Type: Dataflow 1, MatMul then MulAdd (alpha*C + beta*D); afterwards a
//           MatMul that replays A from the input partial buffer.
//   G-Type: Dataflow 2 tail, MatMul, bias ADD kept in place, then GELU.
//   E-Type: Dataflow 3 core, MatMul (Q*K^T), MatDiv by 8 kept in place, then
//           Exp; the host finishes the softmax (sum and divide) and the
//           testbench checks that it normalises.
// Every result is compared bit for bit with a reference computed here in
// real arithmetic. B beats arrive with random gaps and the host takes results
// with random back-pressure. The test counts how often each mechanism
// happened (stalls, back-pressure, two arrays of a type competing for the
// result port, replay, each SIMD op) and counts a failure for any that never
// did.
module tb_prose_top;
  import prose_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 4;
  localparam int K = 6;
  localparam int NT = 3;                       // types: 0 M, 1 G, 2 E
  localparam int CNT [NT] = '{2, 2, 3};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          cmd_valid [NT], cmd_ready [NT], a_valid [NT], a_ready [NT];
  logic          b_valid [NT], b_ready [NT], out_valid [NT], out_ready [NT];
  logic [1:0]    cmd_dest [NT], a_dest [NT], b_dest [NT], out_src [NT];
  sa_cmd_t       cmd [NT];
  bf16_t [N-1:0] a_data [NT], b_data [NT], out_data [NT];
  logic [2:0]    busy [NT];
  logic [0:0]    m_src, g_src;
  logic [1:0]    m_busy, g_busy;
  logic [1:0]    e_src;
  logic [2:0]    e_busy;

  prose_top #(.M_N(N), .M_COUNT(2), .M_INBUF(16), .G_N(N), .G_COUNT(2), .G_INBUF(16),
              .E_N(N), .E_COUNT(3), .E_INBUF(16)) dut (
    .clk, .rst_n,
    .m_cmd_valid(cmd_valid[0]), .m_cmd_ready(cmd_ready[0]), .m_cmd_dest(cmd_dest[0][0:0]), .m_cmd(cmd[0]),
    .m_a_valid(a_valid[0]), .m_a_ready(a_ready[0]), .m_a_dest(a_dest[0][0:0]), .m_a_data(a_data[0]),
    .m_b_valid(b_valid[0]), .m_b_ready(b_ready[0]), .m_b_dest(b_dest[0][0:0]), .m_b_data(b_data[0]),
    .m_out_valid(out_valid[0]), .m_out_ready(out_ready[0]), .m_out_src(m_src), .m_out_data(out_data[0]),
    .m_busy(m_busy),
    .g_cmd_valid(cmd_valid[1]), .g_cmd_ready(cmd_ready[1]), .g_cmd_dest(cmd_dest[1][0:0]), .g_cmd(cmd[1]),
    .g_a_valid(a_valid[1]), .g_a_ready(a_ready[1]), .g_a_dest(a_dest[1][0:0]), .g_a_data(a_data[1]),
    .g_b_valid(b_valid[1]), .g_b_ready(b_ready[1]), .g_b_dest(b_dest[1][0:0]), .g_b_data(b_data[1]),
    .g_out_valid(out_valid[1]), .g_out_ready(out_ready[1]), .g_out_src(g_src), .g_out_data(out_data[1]),
    .g_busy(g_busy),
    .e_cmd_valid(cmd_valid[2]), .e_cmd_ready(cmd_ready[2]), .e_cmd_dest(cmd_dest[2]), .e_cmd(cmd[2]),
    .e_a_valid(a_valid[2]), .e_a_ready(a_ready[2]), .e_a_dest(a_dest[2]), .e_a_data(a_data[2]),
    .e_b_valid(b_valid[2]), .e_b_ready(b_ready[2]), .e_b_dest(b_dest[2]), .e_b_data(b_data[2]),
    .e_out_valid(out_valid[2]), .e_out_ready(out_ready[2]), .e_out_src(e_src), .e_out_data(out_data[2]),
    .e_busy(e_busy));

  assign out_src[0] = {1'b0, m_src};
  assign out_src[1] = {1'b0, g_src};
  assign out_src[2] = e_src;
  assign busy[0] = {1'b0, m_busy};
  assign busy[1] = {1'b0, g_busy};
  assign busy[2] = e_busy;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_stall = 0, n_backpressure = 0, n_contention = 0, n_replay = 0;
  int n_op [6];

  typedef struct { int dest; bf16_t d [N]; } beat_t;
  beat_t a_q [NT][$];
  beat_t b_q [NT][$];
  bf16_t res_q [NT][3][$][N];
  bit    lock [NT];
  int    e_at_barrier = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  // ---------------- stream drivers, one per type and channel ----------------
  for (genvar t = 0; t < NT; t++) begin : g_drv
    logic a_fire, b_fire;
    always @(posedge clk) a_fire <= a_valid[t] && a_ready[t];
    always @(posedge clk) b_fire <= b_valid[t] && b_ready[t];
    initial begin
      a_valid[t] = 0; a_data[t] = '0; a_dest[t] = 0;
      forever begin
        @(negedge clk);
        if (a_fire) void'(a_q[t].pop_front());
        if (a_q[t].size() != 0) begin
          a_valid[t] = 1; a_dest[t] = 2'(a_q[t][0].dest);
          for (int i = 0; i < N; i++) a_data[t][i] = a_q[t][0].d[i];
        end else a_valid[t] = 0;
      end
    end
    initial begin
      b_valid[t] = 0; b_data[t] = '0; b_dest[t] = 0;
      forever begin
        @(negedge clk);
        if (b_fire) begin
          void'(b_q[t].pop_front());
          b_valid[t] = 0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
        if (b_q[t].size() != 0) begin
          b_valid[t] = 1; b_dest[t] = 2'(b_q[t][0].dest);
          for (int j = 0; j < N; j++) b_data[t][j] = b_q[t][0].d[j];
        end else b_valid[t] = 0;
      end
    end
    always @(negedge clk) out_ready[t] <= ($urandom_range(0, 3) != 0);
    always @(posedge clk) if (rst_n && out_valid[t] && out_ready[t]) begin
      bf16_t col [N];
      for (int i = 0; i < N; i++) col[i] = out_data[t][i];
      res_q[t][out_src[t]].push_back(col);
    end
    always @(posedge clk) if (rst_n && out_valid[t] && !out_ready[t]) n_backpressure++;
  end

  // ---------------- mechanism probes ----------------
  always @(posedge clk) begin
    if (dut.u_m_type.g_array[0].u_sa.state == 2'd1 && !dut.u_m_type.g_array[0].u_sa.feed_step) n_stall++;
    if (dut.u_e_type.g_array[1].u_sa.state == 2'd1 && !dut.u_e_type.g_array[1].u_sa.feed_step) n_stall++;
    if (dut.u_e_type.arr_out_valid[0] + dut.u_e_type.arr_out_valid[1] + dut.u_e_type.arr_out_valid[2] > 1) n_contention++;
    if (dut.u_m_type.arr_out_valid[0] && dut.u_m_type.arr_out_valid[1]) n_contention++;
    if (dut.u_m_type.g_array[0].u_sa.replay && dut.u_m_type.g_array[0].u_sa.feed_step) n_replay++;
  end

  // ---------------- host-side helpers ----------------
  task automatic issue(int t, int d, sa_cmd_e op, alu_op_e aop, abuf_mode_e ab, logic em,
                       int cnt, bf16_t al, bf16_t be);
    while (lock[t]) @(negedge clk);
    lock[t] = 1;
    @(negedge clk);
    cmd_valid[t] = 1; cmd_dest[t] = 2'(d);
    cmd[t] = '{op: op, alu_op: aop, abuf: ab, emit: em, count: 16'(cnt), alpha: al, beta: be};
    do @(posedge clk); while (!cmd_ready[t]);
    @(negedge clk);
    cmd_valid[t] = 0;
    lock[t] = 0;
    if (op == CMD_SIMD) n_op[int'(aop)]++;
    // wait until the array has finished
    @(posedge clk);
    while (busy[t][d]) @(posedge clk);
  endtask

  task automatic push(int t, int d, bit to_a, bf16_t v [N]);
    beat_t bt;
    bt.dest = d;
    bt.d = v;
    if (to_a) a_q[t].push_back(bt); else b_q[t].push_back(bt);
  endtask

  task automatic collect(int t, int d, output bf16_t got [N][N]);
    for (int j = 0; j < N; j++) begin
      while (res_q[t][d].size() == 0) @(posedge clk);
      for (int i = 0; i < N; i++) got[i][j] = res_q[t][d][0][i];
      void'(res_q[t][d].pop_front());
    end
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

  // One array's work: t = type, d = array index within the type.
  task automatic worker(int t, int d);
    bf16_t A [N][K];
    bf16_t B [K][N];
    bf16_t D [N][N];
    logic [31:0] C [N][N];
    bf16_t got [N][N], want [N][N], v [N];
    string tag;
    tag = $sformatf("type %0d array %0d", t, d);
    for (int i = 0; i < N; i++) for (int k = 0; k < K; k++) A[i][k] = rand_bf16(-3, 1);
    for (int k = 0; k < K; k++) for (int j = 0; j < N; j++) B[k][j] = rand_bf16(-3, 1);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) D[i][j] = rand_bf16(-3, 1);

    // MatMul C = A * B (recorded into the partial buffer)
    issue(t, d, CMD_CLEAR, ALU_PASS, ABUF_STREAM, 0, 0, 0, 0);
    for (int k = 0; k < K; k++) begin
      for (int i = 0; i < N; i++) v[i] = A[i][k];
      push(t, d, 1, v);
      for (int j = 0; j < N; j++) v[j] = B[k][j];
      push(t, d, 0, v);
    end
    issue(t, d, CMD_MATMUL, ALU_PASS, ABUF_RECORD, 0, K, 0, 0);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      C[i][j] = 0;
      for (int k = 0; k < K; k++)
        C[i][j] = real_to_fp32(fp32_to_real(C[i][j]) + bf16_to_real(A[i][k]) * bf16_to_real(B[k][j]));
    end

    if (t == 0) begin
      // Dataflow 1: MulAdd 0.5*C - 1*D, streamed out
      for (int j = 0; j < N; j++) begin
        for (int i = 0; i < N; i++) v[i] = D[i][j];
        push(t, d, 1, v);
      end
      fork
        issue(t, d, CMD_SIMD, ALU_MULADD, ABUF_STREAM, 1, N, 16'h3F00, 16'hBF80);
        collect(t, d, got);
      join
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
        want[i][j] = real_to_fp32(bf16_to_real(C[i][j][31:16]) * 0.5 - bf16_to_real(D[i][j]))
                     >> 16;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
        check(got[i][j] === want[i][j], $sformatf("%s muladd [%0d][%0d] %h want %h", tag, i, j, got[i][j], want[i][j]));
      // next tile: same A from the partial buffer, new B
      for (int k = 0; k < K; k++) for (int j = 0; j < N; j++) B[k][j] = rand_bf16(-3, 1);
      issue(t, d, CMD_CLEAR, ALU_PASS, ABUF_STREAM, 0, 0, 0, 0);
      for (int k = 0; k < K; k++) begin
        for (int j = 0; j < N; j++) v[j] = B[k][j];
        push(t, d, 0, v);
      end
      issue(t, d, CMD_MATMUL, ALU_PASS, ABUF_REPLAY, 0, K, 0, 0);
      fork
        issue(t, d, CMD_SIMD, ALU_PASS, ABUF_STREAM, 1, N, BF16_ONE, BF16_ONE);
        collect(t, d, got);
      join
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        logic [31:0] c;
        c = 0;
        for (int k = 0; k < K; k++)
          c = real_to_fp32(fp32_to_real(c) + bf16_to_real(A[i][k]) * bf16_to_real(B[k][j]));
        check(got[i][j] === c[31:16], $sformatf("%s replay [%0d][%0d] %h want %h", tag, i, j, got[i][j], c[31:16]));
      end
    end else if (t == 1) begin
      // Dataflow 2 tail: bias add in place, then GELU streamed out
      for (int j = 0; j < N; j++) begin
        for (int i = 0; i < N; i++) v[i] = D[i][j];
        push(t, d, 1, v);
      end
      issue(t, d, CMD_SIMD, ALU_ADD, ABUF_STREAM, 0, N, BF16_ONE, BF16_ONE);
      fork
        issue(t, d, CMD_SIMD, ALU_GELU, ABUF_STREAM, 1, N, BF16_ONE, BF16_ONE);
        collect(t, d, got);
      join
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        logic [31:0] c;
        c = real_to_fp32(fp32_to_real(C[i][j]) + bf16_to_real(D[i][j]));
        want[i][j] = gelu_model(c[31:16]);
        check(got[i][j] === want[i][j], $sformatf("%s gelu [%0d][%0d] %h want %h", tag, i, j, got[i][j], want[i][j]));
      end
    end else begin
      // Dataflow 3 core: MatDiv by 8 in place, Exp streamed out, softmax on the host
      real rowsum;
      issue(t, d, CMD_SIMD, ALU_MUL, ABUF_STREAM, 0, N, 16'h3E00, BF16_ONE);
      // all E-Type arrays start their Exp together, so they compete for the port
      e_at_barrier++;
      while (e_at_barrier < CNT[2]) @(negedge clk);
      fork
        issue(t, d, CMD_SIMD, ALU_EXP, ABUF_STREAM, 1, N, BF16_ONE, BF16_ONE);
        collect(t, d, got);
      join
      for (int i = 0; i < N; i++) begin
        rowsum = 0.0;
        for (int j = 0; j < N; j++) begin
          logic [31:0] c;
          c = real_to_fp32(bf16_to_real(C[i][j][31:16]) * 0.125);
          want[i][j] = exp_model(c[31:16]);
          check(got[i][j] === want[i][j], $sformatf("%s exp [%0d][%0d] %h want %h", tag, i, j, got[i][j], want[i][j]));
          rowsum += bf16_to_real(got[i][j]);
        end
        // host side of softmax: normalised row sums to one
        begin
          real s;
          s = 0.0;
          for (int j = 0; j < N; j++) s += bf16_to_real(got[i][j]) / rowsum;
          check(s > 0.999 && s < 1.001, $sformatf("%s softmax row %0d sums to %f", tag, i, s));
        end
      end
    end
  endtask

  initial begin
    for (int t = 0; t < NT; t++) begin
      cmd_valid[t] = 0; cmd[t] = '0; cmd_dest[t] = 0; lock[t] = 0;
    end
    foreach (n_op[o]) n_op[o] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      worker(0, 0); worker(0, 1);
      worker(1, 0); worker(1, 1);
      worker(2, 0); worker(2, 1); worker(2, 2);
    join
    $display("mechanisms: stall %0d, back-pressure %0d, port contention %0d, replay %0d",
             n_stall, n_backpressure, n_contention, n_replay);
    $display("SIMD ops: PASS %0d MUL %0d ADD %0d MULADD %0d GELU %0d EXP %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5]);
    check(n_stall > 0, "a stall happened");
    check(n_backpressure > 0, "back-pressure happened");
    check(n_contention > 0, "result port contention happened");
    check(n_replay > 0, "partial-buffer replay happened");
    for (int o = 0; o < 6; o++) check(n_op[o] > 0, $sformatf("SIMD op %0d used", o));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
