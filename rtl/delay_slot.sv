// delay_slot: input skew for one edge of a systolic array.
//
// An output-stationary array needs operand i of a step to arrive i steps
// after operand 0, so that A[i][k] and B[k][j] meet in PE(i,j) in the same
// step. Lane i therefore passes through a shift register of i stages (lane 0
// is a wire). The design places such delay slots between each streaming
// buffer and the array; their construction is this implementation's.
// en advances all lanes by one step (low: hold, the array is stalled).
// rst_n (asynchronous, active low) clears all stages.
module delay_slot
  import prose_pkg::*;
#(
  parameter int N = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  bf16_t [N-1:0]   in_lanes,
  output bf16_t [N-1:0]   out_lanes
);
  assign out_lanes[0] = in_lanes[0];

  for (genvar i = 1; i < N; i++) begin : g_lane
    bf16_t stage [i];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < i; s++) stage[s] <= '0;
      end else if (en) begin
        stage[0] <= in_lanes[i];
        for (int s = 1; s < i; s++) stage[s] <= stage[s-1];
      end
    end
    assign out_lanes[i] = stage[i-1];
  end
endmodule
