// systolic_array: one ProSE output-stationary streaming systolic array with
// its SIMD ALU column (M-, G- or E-Type, chosen by HAS_GELU / HAS_EXP).
//
// Organisation. N x N processing elements (pe) hold the output tile C in
// their 32-bit accumulators. Matrix A enters from the left, one column per
// step (a_data[i] = A[i][k]); matrix B enters from the top, one row per step
// (b_data[j] = B[k][j]). Each stream passes an 8-deep streaming buffer and a
// delay slot (skew) before the array. A column of N SIMD ALU lanes sits at
// the left edge, with a vector register (N bfloat16 lanes, loaded from the
// left stream) and two scalar registers (alpha, beta, loaded by the command).
//
// Modes (the document's matmul and simd modes):
//  * MATMUL count=K: K feed steps, then 2N-2 drain steps with zero operands,
//    so every PE(i,j) has added sum_k A[i][k]*B[k][j] to its accumulator.
//    Accumulators are not cleared, so successive MATMULs add up (a large K
//    is split into several commands). A feed step needs an A column and a B
//    row; if either buffer is empty the whole array, skew registers included,
//    holds for that cycle (a stall).
//  * SIMD count=R: R left rotations. Each rotation moves every accumulator
//    one column left; the left-most column goes through the SIMD ALUs and the
//    results enter the right-most column. After R = N rotations every element
//    of C has been replaced by op(C), in place, with no local scratchpad.
//    With emit set, each rotation also sends the N results (bfloat16, one
//    column of the tile, column 0 first) to out_data; the rotation waits for
//    out_ready. Ops reading the vector register consume one left-stream beat
//    per rotation.
//  * CLEAR: zero all accumulators (in the accept cycle).
// Input partial buffer (HAS_INBUF): a MATMUL with abuf = RECORD also stores
// the A columns it streams; with abuf = REPLAY it reads them back instead of
// the left stream, so the host sends only B for the next tile.
//
// Interface: valid/ready handshakes on cmd, a, b and out; busy is high while
// a command executes. A command is accepted only when the array is idle.
// Timing without stalls: MATMUL K occupies K + 2N - 2 cycles after the
// accept cycle, SIMD R occupies R cycles, CLEAR none.
//
// From the document: output-stationary PEs with 32-bit accumulators, the
// 8-deep streaming buffers and delay slots, the two modes with left rotation
// through a SIMD column of N ALUs, vector and scalar registers, GELU/Exp
// lookup per ALU lane, the input partial buffer. This implementation's own:
// the command format, the handshakes, the whole-array stall, the drain with
// zero operands, and reading results out by a PASS rotation. The document
// runs simd mode at half the matmul clock; here both modes use one clock.
module systolic_array
  import prose_pkg::*;
#(
  parameter int N           = 16,
  parameter bit HAS_GELU    = 1'b0,
  parameter bit HAS_EXP     = 1'b1,
  parameter bit HAS_INBUF   = 1'b1,
  parameter int INBUF_DEPTH = 64,
  parameter int SB_DEPTH    = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  sa_cmd_t       cmd,
  input  logic          a_valid,
  output logic          a_ready,
  input  bf16_t [N-1:0] a_data,
  input  logic          b_valid,
  output logic          b_ready,
  input  bf16_t [N-1:0] b_data,
  output logic          out_valid,
  input  logic          out_ready,
  output bf16_t [N-1:0] out_data,
  output logic          busy
);
  localparam int DRAIN = 2 * N - 2;
  localparam int IAW   = (INBUF_DEPTH > 1) ? $clog2(INBUF_DEPTH) : 1;

  typedef enum logic [1:0] {S_IDLE, S_FEED, S_DRAIN, S_SIMD} state_e;
  state_e state;

  logic [15:0] count, cnt;
  alu_op_e     alu_op;
  abuf_mode_e  abuf;
  logic        emit;
  bf16_t       alpha, beta;

  // ---------------- streaming buffers ----------------
  logic          sa_valid, sa_pop, sb_valid, sb_pop;
  bf16_t [N-1:0] sa_data, sb_data;
  logic [$clog2(SB_DEPTH+1)-1:0] sa_level, sb_level;

  stream_buffer #(.WIDTH(16 * N), .DEPTH(SB_DEPTH)) u_sbuf_a (
    .clk, .rst_n, .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .out_valid(sa_valid), .out_ready(sa_pop), .out_data(sa_data), .level(sa_level));

  stream_buffer #(.WIDTH(16 * N), .DEPTH(SB_DEPTH)) u_sbuf_b (
    .clk, .rst_n, .in_valid(b_valid), .in_ready(b_ready), .in_data(b_data),
    .out_valid(sb_valid), .out_ready(sb_pop), .out_data(sb_data), .level(sb_level));

  // ---------------- input partial buffer ----------------
  logic          replay, record;
  bf16_t [N-1:0] ib_data;

  if (HAS_INBUF) begin : g_inbuf
    input_partial_buffer #(.N(N), .DEPTH(INBUF_DEPTH)) u_inbuf (
      .clk, .wr_en(record && sa_pop), .wr_addr(cnt[IAW-1:0]), .wr_data(sa_data),
      .rd_addr(cnt[IAW-1:0]), .rd_data(ib_data));
    assign replay = (state == S_FEED) && (abuf == ABUF_REPLAY);
    assign record = (state == S_FEED) && (abuf == ABUF_RECORD);
  end else begin : g_no_inbuf
    assign ib_data = '0;
    assign replay  = 1'b0;
    assign record  = 1'b0;
  end

  // ---------------- step control ----------------
  logic feed_step, simd_step, need_v, vreg_valid, vreg_load, mm_en, clear_all;
  bf16_t [N-1:0] vreg;
  logic [15:0]   vloads_left;
  bf16_t [N-1:0] left_in, top_in, left_skew, top_skew;

  assign need_v    = alu_uses_v(alu_op);
  assign feed_step = (state == S_FEED) && (replay || sa_valid) && sb_valid;
  assign simd_step = (state == S_SIMD) && (!need_v || vreg_valid) && (!emit || out_ready);
  assign mm_en     = feed_step || (state == S_DRAIN);
  assign vreg_load = (state == S_SIMD) && need_v && sa_valid && (vloads_left != '0) &&
                     (!vreg_valid || simd_step);
  assign sa_pop    = (feed_step && !replay) || vreg_load;
  assign sb_pop    = feed_step;
  assign left_in   = feed_step ? (replay ? ib_data : sa_data) : '0;
  assign top_in    = feed_step ? sb_data : '0;
  assign clear_all = cmd_valid && cmd_ready && (cmd.op == CMD_CLEAR);

  assign cmd_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);
  assign out_valid = (state == S_SIMD) && emit && (!need_v || vreg_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      count       <= '0;
      cnt         <= '0;
      alu_op      <= ALU_PASS;
      abuf        <= ABUF_STREAM;
      emit        <= 1'b0;
      alpha       <= BF16_ONE;
      beta        <= BF16_ONE;
      vreg        <= '0;
      vreg_valid  <= 1'b0;
      vloads_left <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          count <= cmd.count;
          cnt   <= '0;
          unique case (cmd.op)
            CMD_MATMUL: begin
              abuf  <= HAS_INBUF ? cmd.abuf : ABUF_STREAM;
              state <= (cmd.count != '0) ? S_FEED : ((DRAIN != 0) ? S_DRAIN : S_IDLE);
            end
            CMD_SIMD: begin
              alu_op      <= cmd.alu_op;
              emit        <= cmd.emit;
              alpha       <= cmd.alpha;
              beta        <= cmd.beta;
              vloads_left <= alu_uses_v(cmd.alu_op) ? cmd.count : '0;
              vreg_valid  <= 1'b0;
              state       <= (cmd.count != '0) ? S_SIMD : S_IDLE;
            end
            default: ;
          endcase
        end
        S_FEED: if (feed_step) begin
          if (cnt == count - 16'd1) begin
            cnt   <= '0;
            state <= (DRAIN != 0) ? S_DRAIN : S_IDLE;
          end else begin
            cnt <= cnt + 16'd1;
          end
        end
        S_DRAIN: begin
          if (cnt == 16'(DRAIN - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
          end else begin
            cnt <= cnt + 16'd1;
          end
        end
        S_SIMD: if (simd_step) begin
          if (cnt == count - 16'd1) begin
            cnt   <= '0;
            state <= S_IDLE;
          end else begin
            cnt <= cnt + 16'd1;
          end
        end
        default: state <= S_IDLE;
      endcase

      // vector register: refilled from the left stream as rotations consume it
      if (vreg_load) begin
        vreg        <= sa_data;
        vreg_valid  <= 1'b1;
        vloads_left <= vloads_left - 16'd1;
      end else if (simd_step) begin
        vreg_valid  <= 1'b0;
      end
    end
  end

  // ---------------- delay slots ----------------
  delay_slot #(.N(N)) u_skew_left (.clk, .rst_n, .en(mm_en), .in_lanes(left_in), .out_lanes(left_skew));
  delay_slot #(.N(N)) u_skew_top  (.clk, .rst_n, .en(mm_en), .in_lanes(top_in),  .out_lanes(top_skew));

  // ---------------- PE grid and SIMD column ----------------
  bf16_t v_out [N][N];   // operand leaving PE(i,j) downwards
  bf16_t h_out [N][N];   // operand leaving PE(i,j) to the right
  fp32_t acc   [N][N];   // accumulator of PE(i,j), towards the left
  fp32_t alu_y [N];

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      bf16_t pe_top, pe_left;
      fp32_t pe_rot_in;
      assign pe_top    = (i == 0) ? top_skew[j]   : v_out[(i == 0) ? 0 : i - 1][j];
      assign pe_left   = (j == 0) ? left_skew[i]  : h_out[i][(j == 0) ? 0 : j - 1];
      assign pe_rot_in = (j == N - 1) ? alu_y[i]  : acc[i][(j == N - 1) ? j : j + 1];
      pe u_pe (
        .clk, .rst_n,
        .en(mm_en || simd_step), .clear(clear_all), .rot(state == S_SIMD),
        .in_a(pe_top), .in_b(pe_left), .rot_in(pe_rot_in),
        .out_a(v_out[i][j]), .out_b(h_out[i][j]), .rot_out(acc[i][j]), .result());
    end

    simd_alu #(.HAS_GELU(HAS_GELU), .HAS_EXP(HAS_EXP)) u_alu (
      .op(alu_op), .x(acc[i][0]), .v(vreg[i]), .alpha(alpha), .beta(beta), .y(alu_y[i]));
    assign out_data[i] = alu_y[i][31:16];
  end

  // ---------------- protocol checks ----------------
  // Results offered to the host stay put until taken.
  assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
  // A recorded or replayed step must fit the input partial buffer.
  assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && cmd_ready && cmd.op == CMD_MATMUL && cmd.abuf != ABUF_STREAM && HAS_INBUF
      |-> int'(cmd.count) <= INBUF_DEPTH);
endmodule
