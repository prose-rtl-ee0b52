// tb_delay_slot: sends random lane vectors through an 8-lane skew and checks
// that lane i shows the value given i enabled steps earlier, and that
// nothing moves while en is low.
module tb_delay_slot;
  import prose_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, en = 0;
  bf16_t [N-1:0] in_lanes = '0, out_lanes;
  bf16_t hist [$][N];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  delay_slot #(.N(N)) dut (.clk, .rst_n, .en, .in_lanes, .out_lanes);

  initial begin
    bf16_t zero [N];
    for (int i = 0; i < N; i++) zero[i] = 0;
    for (int i = 0; i < N; i++) hist.push_front(zero);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      bf16_t v [N];
      for (int i = 0; i < N; i++) begin v[i] = 16'($urandom); in_lanes[i] = v[i]; end
      en = ($urandom_range(0, 3) != 0);
      #1;
      // combinational view: lane i = input of i enabled steps ago (lane 0 = now)
      for (int i = 0; i < N; i++) begin
        bf16_t want;
        want = (i == 0) ? v[0] : hist[i - 1][i];
        checks++;
        if (out_lanes[i] !== want) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d lane %0d: %h want %h", t, i, out_lanes[i], want);
        end
      end
      @(negedge clk);
      if (en) hist.push_front(v);
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
