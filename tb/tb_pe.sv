// tb_pe: checks one processing element: multiply-accumulate over a stream of
// operand pairs (fp32 reference rounded after every step), operand
// forwarding through REG_A/REG_B with one step of delay, hold when en is
// low, clear, and the rotation path (rot loads rot_in; rot_out and result
// show the accumulator).
module tb_pe;
  import prose_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, clear = 0, rot = 0;
  bf16_t in_a = 0, in_b = 0, out_a, out_b, result;
  fp32_t rot_in = 0, rot_out, acc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pe dut (.clk, .rst_n, .en, .clear, .rot, .in_a, .in_b, .rot_in,
          .out_a, .out_b, .rot_out, .result);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    acc = 0;
    for (int t = 0; t < 200; t++) begin
      bf16_t pa, pb;
      @(negedge clk);
      pa = rand_bf16(-5, 5);
      pb = rand_bf16(-5, 5);
      in_a = pa; in_b = pb;
      en = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (en) begin
        acc = real_to_fp32(fp32_to_real(acc) + bf16_to_real(pa) * bf16_to_real(pb));
        check(out_a === pa && out_b === pb, "operands forwarded");
      end
      check(rot_out === acc, $sformatf("acc %h want %h", rot_out, acc));
      check(result === acc[31:16], "result = acc[31:16]");
      en = 0;
    end
    // rotation path
    @(negedge clk); rot = 1; en = 1; rot_in = 32'h4049_0FDB;
    @(negedge clk); check(rot_out === 32'h4049_0FDB, "rotate in");
    check(out_a === in_a && out_b === in_b, "rotate leaves REG_A/REG_B");
    rot = 0; en = 0;
    // clear
    clear = 1; @(negedge clk); clear = 0;
    check(rot_out === 32'd0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
