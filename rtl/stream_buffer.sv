// stream_buffer: register FIFO that decouples a host stream from the array.
//
// Each ProSE systolic array has one of these for each input matrix, 8 entries
// deep by default, built from registers, so that streaming from the host can
// continue while the array momentarily cannot take data. Depth 8 is the
// document's number; the valid/ready handshake on both sides is this
// implementation's choice.
// Interface: in_valid/in_ready/in_data write side, out_valid/out_ready/
// out_data read side; a transfer happens on a rising edge where valid and
// ready are both high. out_data shows the oldest entry; a write into a full
// buffer is refused (in_ready low) even when a read happens in the same cycle.
// Latency: an entry written in cycle t can be read in cycle t+1.
module stream_buffer #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int LW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic             push, pop;

  assign in_ready  = (level != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (level != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      level  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      level <= level + LW'(push) - LW'(pop);
    end
  end

  // Storage needs no reset: an entry is only read after it was written.
  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // A full buffer never accepts, an empty one never delivers.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> level < LW'(DEPTH));
  assert property (@(posedge clk) disable iff (!rst_n) pop  |-> level != '0);
endmodule
