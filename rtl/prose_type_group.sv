// prose_type_group: all systolic arrays of one type behind their shared I/O
// port (type_io_buffer). COUNT arrays of dimension N, each with the special
// function lookups selected by HAS_GELU / HAS_EXP and an input partial buffer
// of INBUF_DEPTH columns. The host-side ports are those of type_io_buffer;
// busy has one bit per array. Pure structure: no logic of its own.
module prose_type_group
  import prose_pkg::*;
#(
  parameter int N           = 16,
  parameter int COUNT       = 20,
  parameter bit HAS_GELU    = 1'b0,
  parameter bit HAS_EXP     = 1'b1,
  parameter int INBUF_DEPTH = 64,
  parameter int IDW         = (COUNT > 1) ? $clog2(COUNT) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cmd_valid,
  output logic           cmd_ready,
  input  logic [IDW-1:0] cmd_dest,
  input  sa_cmd_t        cmd,
  input  logic           a_valid,
  output logic           a_ready,
  input  logic [IDW-1:0] a_dest,
  input  bf16_t [N-1:0]  a_data,
  input  logic           b_valid,
  output logic           b_ready,
  input  logic [IDW-1:0] b_dest,
  input  bf16_t [N-1:0]  b_data,
  output logic           out_valid,
  input  logic           out_ready,
  output logic [IDW-1:0] out_src,
  output bf16_t [N-1:0]  out_data,
  output logic [COUNT-1:0] busy
);
  logic          arr_cmd_valid [COUNT], arr_cmd_ready [COUNT];
  logic          arr_a_valid [COUNT], arr_a_ready [COUNT];
  logic          arr_b_valid [COUNT], arr_b_ready [COUNT];
  logic          arr_out_valid [COUNT], arr_out_ready [COUNT];
  bf16_t [N-1:0] arr_out_data [COUNT];
  bf16_t [N-1:0] arr_a_data, arr_b_data;
  sa_cmd_t       arr_cmd;

  type_io_buffer #(.N(N), .COUNT(COUNT), .IDW(IDW)) u_io (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_dest, .cmd,
    .a_valid, .a_ready, .a_dest, .a_data,
    .b_valid, .b_ready, .b_dest, .b_data,
    .out_valid, .out_ready, .out_src, .out_data,
    .arr_cmd_valid, .arr_cmd_ready, .arr_cmd,
    .arr_a_valid, .arr_a_ready, .arr_a_data,
    .arr_b_valid, .arr_b_ready, .arr_b_data,
    .arr_out_valid, .arr_out_ready, .arr_out_data);

  for (genvar d = 0; d < COUNT; d++) begin : g_array
    systolic_array #(.N(N), .HAS_GELU(HAS_GELU), .HAS_EXP(HAS_EXP), .HAS_INBUF(1'b1),
                     .INBUF_DEPTH(INBUF_DEPTH)) u_sa (
      .clk, .rst_n,
      .cmd_valid(arr_cmd_valid[d]), .cmd_ready(arr_cmd_ready[d]), .cmd(arr_cmd),
      .a_valid(arr_a_valid[d]), .a_ready(arr_a_ready[d]), .a_data(arr_a_data),
      .b_valid(arr_b_valid[d]), .b_ready(arr_b_ready[d]), .b_data(arr_b_data),
      .out_valid(arr_out_valid[d]), .out_ready(arr_out_ready[d]), .out_data(arr_out_data[d]),
      .busy(busy[d]));
  end
endmodule
