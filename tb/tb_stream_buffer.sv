// tb_stream_buffer: pushes a numbered sequence through the 8-deep buffer with
// random valid and ready, checks order and contents against a queue model,
// that exactly 8 entries are accepted before in_ready falls, and the one-
// cycle write-to-read latency.
module tb_stream_buffer;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [15:0] in_data = 0, out_data;
  logic [3:0] level;
  int checks = 0, failures = 0;
  logic [15:0] model [$];
  always #5 clk = ~clk;

  stream_buffer #(.WIDTH(16), .DEPTH(8)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .level);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int accepted = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill without reading: exactly 8 accepted
    in_valid = 1;
    for (int i = 0; i < 10; i++) begin
      in_data = 16'(i);
      @(posedge clk);
      if (in_valid && in_ready) begin model.push_back(in_data); accepted++; end
      @(negedge clk);
    end
    check(accepted == 8, $sformatf("accepted %0d before full", accepted));
    check(level == 4'd8 && !in_ready, "full");
    // random traffic
    for (int t = 0; t < 2000; t++) begin
      in_valid  = $urandom_range(0, 1);
      in_data   = 16'($urandom);
      out_ready = $urandom_range(0, 1);
      @(posedge clk);
      if (out_valid && out_ready) begin
        check(model.size() != 0 && out_data === model[0], "order");
        void'(model.pop_front());
      end
      if (in_valid && in_ready) model.push_back(in_data);
      @(negedge clk);
      check(int'(level) == model.size(), "level");
    end
    // latency: empty buffer, one write, readable next cycle
    out_ready = 1; in_valid = 0;
    repeat (10) @(negedge clk);
    model.delete();
    in_valid = 1; in_data = 16'hABCD;
    @(negedge clk); in_valid = 0;
    check(out_valid && out_data == 16'hABCD, "1-cycle latency");
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
