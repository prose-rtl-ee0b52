// prose_top: the ProSE accelerator card, a heterogeneous collection of
// output-stationary streaming systolic arrays.
//
// Default configuration (the design's MostEfficient instance, 16K PEs):
//   M-Type: 2 arrays of 64x64           MatMul + SIMD ALU     (Dataflow 1)
//   G-Type: 3 arrays of 32x32 + GELU    MatMul + SIMD + GELU  (Dataflow 2)
//   E-Type: 20 arrays of 16x16 + Exp    MatMul + SIMD + Exp   (Dataflow 3)
// Each type has its own host I/O port (prefix m_, g_, e_): a command
// channel, a left (A / vector) stream and a top (B) stream, each with a
// destination array index, and a result stream tagged with its source
// index. Beats are one array row or column wide (N bfloat16 values). The
// host CPU and the NVLink link between host and card are outside this RTL:
// these ports are where the link's lanes, statically divided among the three
// types, deliver their data. Softmax sums and divisions run on the host.
// Counts, sizes and special functions follow the design; the port format is
// this implementation's. All arrays share one clock and an asynchronous
// active-low reset.
module prose_top
  import prose_pkg::*;
#(
  parameter int M_N = 64, parameter int M_COUNT = 2,  parameter int M_INBUF = 3072,
  parameter int G_N = 32, parameter int G_COUNT = 3,  parameter int G_INBUF = 768,
  parameter int E_N = 16, parameter int E_COUNT = 20, parameter int E_INBUF = 64,
  parameter int M_IDW = (M_COUNT > 1) ? $clog2(M_COUNT) : 1,
  parameter int G_IDW = (G_COUNT > 1) ? $clog2(G_COUNT) : 1,
  parameter int E_IDW = (E_COUNT > 1) ? $clog2(E_COUNT) : 1
) (
  input  logic clk,
  input  logic rst_n,
  // M-Type port
  input  logic m_cmd_valid, output logic m_cmd_ready, input logic [M_IDW-1:0] m_cmd_dest, input sa_cmd_t m_cmd,
  input  logic m_a_valid, output logic m_a_ready, input logic [M_IDW-1:0] m_a_dest, input bf16_t [M_N-1:0] m_a_data,
  input  logic m_b_valid, output logic m_b_ready, input logic [M_IDW-1:0] m_b_dest, input bf16_t [M_N-1:0] m_b_data,
  output logic m_out_valid, input logic m_out_ready, output logic [M_IDW-1:0] m_out_src, output bf16_t [M_N-1:0] m_out_data,
  output logic [M_COUNT-1:0] m_busy,
  // G-Type port
  input  logic g_cmd_valid, output logic g_cmd_ready, input logic [G_IDW-1:0] g_cmd_dest, input sa_cmd_t g_cmd,
  input  logic g_a_valid, output logic g_a_ready, input logic [G_IDW-1:0] g_a_dest, input bf16_t [G_N-1:0] g_a_data,
  input  logic g_b_valid, output logic g_b_ready, input logic [G_IDW-1:0] g_b_dest, input bf16_t [G_N-1:0] g_b_data,
  output logic g_out_valid, input logic g_out_ready, output logic [G_IDW-1:0] g_out_src, output bf16_t [G_N-1:0] g_out_data,
  output logic [G_COUNT-1:0] g_busy,
  // E-Type port
  input  logic e_cmd_valid, output logic e_cmd_ready, input logic [E_IDW-1:0] e_cmd_dest, input sa_cmd_t e_cmd,
  input  logic e_a_valid, output logic e_a_ready, input logic [E_IDW-1:0] e_a_dest, input bf16_t [E_N-1:0] e_a_data,
  input  logic e_b_valid, output logic e_b_ready, input logic [E_IDW-1:0] e_b_dest, input bf16_t [E_N-1:0] e_b_data,
  output logic e_out_valid, input logic e_out_ready, output logic [E_IDW-1:0] e_out_src, output bf16_t [E_N-1:0] e_out_data,
  output logic [E_COUNT-1:0] e_busy
);
  prose_type_group #(.N(M_N), .COUNT(M_COUNT), .HAS_GELU(1'b0), .HAS_EXP(1'b0),
                     .INBUF_DEPTH(M_INBUF), .IDW(M_IDW)) u_m_type (
    .clk, .rst_n,
    .cmd_valid(m_cmd_valid), .cmd_ready(m_cmd_ready), .cmd_dest(m_cmd_dest), .cmd(m_cmd),
    .a_valid(m_a_valid), .a_ready(m_a_ready), .a_dest(m_a_dest), .a_data(m_a_data),
    .b_valid(m_b_valid), .b_ready(m_b_ready), .b_dest(m_b_dest), .b_data(m_b_data),
    .out_valid(m_out_valid), .out_ready(m_out_ready), .out_src(m_out_src), .out_data(m_out_data),
    .busy(m_busy));

  prose_type_group #(.N(G_N), .COUNT(G_COUNT), .HAS_GELU(1'b1), .HAS_EXP(1'b0),
                     .INBUF_DEPTH(G_INBUF), .IDW(G_IDW)) u_g_type (
    .clk, .rst_n,
    .cmd_valid(g_cmd_valid), .cmd_ready(g_cmd_ready), .cmd_dest(g_cmd_dest), .cmd(g_cmd),
    .a_valid(g_a_valid), .a_ready(g_a_ready), .a_dest(g_a_dest), .a_data(g_a_data),
    .b_valid(g_b_valid), .b_ready(g_b_ready), .b_dest(g_b_dest), .b_data(g_b_data),
    .out_valid(g_out_valid), .out_ready(g_out_ready), .out_src(g_out_src), .out_data(g_out_data),
    .busy(g_busy));

  prose_type_group #(.N(E_N), .COUNT(E_COUNT), .HAS_GELU(1'b0), .HAS_EXP(1'b1),
                     .INBUF_DEPTH(E_INBUF), .IDW(E_IDW)) u_e_type (
    .clk, .rst_n,
    .cmd_valid(e_cmd_valid), .cmd_ready(e_cmd_ready), .cmd_dest(e_cmd_dest), .cmd(e_cmd),
    .a_valid(e_a_valid), .a_ready(e_a_ready), .a_dest(e_a_dest), .a_data(e_a_data),
    .b_valid(e_b_valid), .b_ready(e_b_ready), .b_dest(e_b_dest), .b_data(e_b_data),
    .out_valid(e_out_valid), .out_ready(e_out_ready), .out_src(e_out_src), .out_data(e_out_data),
    .busy(e_busy));
endmodule
