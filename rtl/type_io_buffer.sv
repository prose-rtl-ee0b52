// type_io_buffer: host I/O port shared by all systolic arrays of one type.
//
// The accelerator has one such port per systolic-array type (M, G, E); the
// host link lanes given to a type end here. Commands, left-stream (A /
// vector) beats and top-stream (B) beats carry a destination index and are
// steered to that array; result beats from the arrays are merged onto one
// return stream, tagged with their source index. Merging is round robin, and
// a granted array keeps the port until its beat is taken, so a stalled host
// never sees a beat change under it. That arbitration, the tags and the
// valid/ready handshakes are this implementation's; the document states only
// that each type has its own I/O buffer. A beat for one array waits (ready
// low) while that array's streaming buffer is full, which also holds up later
// beats for other arrays on the same channel.
// Combinational paths: host ready depends on the addressed array's ready;
// out_valid/out_data depend on the arrays' result outputs.
module type_io_buffer
  import prose_pkg::*;
#(
  parameter int N     = 16,   // array dimension (lanes per beat)
  parameter int COUNT = 20,   // arrays of this type
  parameter int IDW   = (COUNT > 1) ? $clog2(COUNT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // host side
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  logic [IDW-1:0] cmd_dest,
  input  sa_cmd_t       cmd,
  input  logic          a_valid,
  output logic          a_ready,
  input  logic [IDW-1:0] a_dest,
  input  bf16_t [N-1:0] a_data,
  input  logic          b_valid,
  output logic          b_ready,
  input  logic [IDW-1:0] b_dest,
  input  bf16_t [N-1:0] b_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [IDW-1:0] out_src,
  output bf16_t [N-1:0] out_data,
  // array side
  output logic          arr_cmd_valid [COUNT],
  input  logic          arr_cmd_ready [COUNT],
  output sa_cmd_t       arr_cmd,
  output logic          arr_a_valid   [COUNT],
  input  logic          arr_a_ready   [COUNT],
  output bf16_t [N-1:0] arr_a_data,
  output logic          arr_b_valid   [COUNT],
  input  logic          arr_b_ready   [COUNT],
  output bf16_t [N-1:0] arr_b_data,
  input  logic          arr_out_valid [COUNT],
  output logic          arr_out_ready [COUNT],
  input  bf16_t [N-1:0] arr_out_data  [COUNT]
);
  // ---------------- host -> arrays ----------------
  assign arr_cmd    = cmd;
  assign arr_a_data = a_data;
  assign arr_b_data = b_data;

  always_comb begin
    cmd_ready = 1'b0;
    a_ready   = 1'b0;
    b_ready   = 1'b0;
    for (int d = 0; d < COUNT; d++) begin
      arr_cmd_valid[d] = cmd_valid && (int'(cmd_dest) == d);
      arr_a_valid[d]   = a_valid   && (int'(a_dest)   == d);
      arr_b_valid[d]   = b_valid   && (int'(b_dest)   == d);
      if (int'(cmd_dest) == d) cmd_ready = arr_cmd_ready[d];
      if (int'(a_dest)   == d) a_ready   = arr_a_ready[d];
      if (int'(b_dest)   == d) b_ready   = arr_b_ready[d];
    end
  end

  // ---------------- arrays -> host: round-robin merge ----------------
  logic [IDW-1:0] last, grant, held;
  logic           locked, any;

  logic [IDW-1:0] idx;

  always_comb begin
    any   = 1'b0;
    grant = last;
    idx   = '0;
    if (locked) begin
      grant = held;
      any   = 1'b1;
    end else begin
      // first requester after the one served last
      for (int k = 1; k <= COUNT; k++) begin
        idx = IDW'((int'(last) + k) % COUNT);
        if (!any && arr_out_valid[idx]) begin
          grant = IDW'(idx);
          any   = 1'b1;
        end
      end
    end
    out_valid = any && arr_out_valid[grant];
    out_src   = grant;
    out_data  = arr_out_data[grant];
    for (int d = 0; d < COUNT; d++)
      arr_out_ready[d] = any && (int'(grant) == d) && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last   <= IDW'(COUNT - 1);
      held   <= '0;
      locked <= 1'b0;
    end else begin
      if (out_valid && out_ready) begin
        last   <= grant;
        locked <= 1'b0;
      end else if (out_valid) begin
        held   <= grant;
        locked <= 1'b1;
      end
    end
  end

  // The addressed array must exist.
  assert property (@(posedge clk) disable iff (!rst_n) cmd_valid |-> int'(cmd_dest) < COUNT);
  assert property (@(posedge clk) disable iff (!rst_n) a_valid   |-> int'(a_dest)   < COUNT);
  assert property (@(posedge clk) disable iff (!rst_n) b_valid   |-> int'(b_dest)   < COUNT);
endmodule
