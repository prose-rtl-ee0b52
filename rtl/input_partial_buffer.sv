// input_partial_buffer: local copy of one step of input matrix A.
//
// When a large MatMul is cut into tiles, the same rows of A (one step: an
// n x K block) are needed again for the next column block of B. This buffer
// records the A columns as they stream in from the host and replays them for
// the following tiles, so the host link only carries B. It stores inputs
// only, never intermediate results (those stay in the PE accumulators).
// DEPTH is the largest K one step may have. The record/replay port protocol
// is this implementation's: wr_en writes wr_data at wr_addr on the rising
// edge; rd_data shows the column at rd_addr combinationally (one column per
// cycle, like the streaming buffer it substitutes for).
module input_partial_buffer
  import prose_pkg::*;
#(
  parameter int N     = 16,
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  bf16_t [N-1:0]            wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output bf16_t [N-1:0]            rd_data
);
  bf16_t [N-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];
endmodule
