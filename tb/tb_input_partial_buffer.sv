// tb_input_partial_buffer: records 64 random A columns and replays them in
// forward and random order, checking every lane.
module tb_input_partial_buffer;
  import prose_pkg::*;
  localparam int N = 4, DEPTH = 64;
  logic clk = 0, wr_en = 0;
  logic [5:0] wr_addr = 0, rd_addr = 0;
  bf16_t [N-1:0] wr_data = '0, rd_data;
  bf16_t [N-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  input_partial_buffer #(.N(N), .DEPTH(DEPTH)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data);

  initial begin
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(k);
      for (int i = 0; i < N; i++) wr_data[i] = 16'($urandom);
      ref_mem[k] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int r = 0; r < 3 * DEPTH; r++) begin
      rd_addr = (r < DEPTH) ? 6'(r) : 6'($urandom);
      #1;
      checks++;
      if (rd_data !== ref_mem[rd_addr]) begin
        failures++;
        $display("FAIL addr %0d: %h want %h", rd_addr, rd_data, ref_mem[rd_addr]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
