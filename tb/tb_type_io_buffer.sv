// tb_type_io_buffer: checks the per-type I/O port with three stand-in arrays
// that take beats with random ready and offer numbered result beats.
// Checked: every host command, A and B beat reaches exactly the addressed
// array with its data; every result beat reaches the host once, tagged with
// its source, in order per source; a beat held back by the host stays
// unchanged; when all three arrays offer beats continuously, the grants
// rotate (each array gets one beat in every three).
module tb_type_io_buffer;
  import prose_pkg::*;
  localparam int N = 2, COUNT = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_ready, a_valid = 0, a_ready, b_valid = 0, b_ready;
  logic out_valid, out_ready = 0;
  logic [1:0] cmd_dest = 0, a_dest = 0, b_dest = 0, out_src;
  sa_cmd_t cmd = '0;
  bf16_t [N-1:0] a_data = '0, b_data = '0, out_data;
  logic arr_cmd_valid [COUNT], arr_cmd_ready [COUNT], arr_a_valid [COUNT], arr_a_ready [COUNT];
  logic arr_b_valid [COUNT], arr_b_ready [COUNT], arr_out_valid [COUNT], arr_out_ready [COUNT];
  bf16_t [N-1:0] arr_out_data [COUNT];
  bf16_t [N-1:0] arr_a_data, arr_b_data;
  sa_cmd_t arr_cmd;

  type_io_buffer #(.N(N), .COUNT(COUNT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // stand-in arrays
  int sent [COUNT];      // result beats offered and taken per array
  int got_a [COUNT], got_b [COUNT], got_cmd [COUNT];
  bit offer [COUNT];
  for (genvar d = 0; d < COUNT; d++) begin : g_arr
    always @(negedge clk) begin
      arr_cmd_ready[d] <= $urandom_range(0, 1);
      arr_a_ready[d]   <= $urandom_range(0, 1);
      arr_b_ready[d]   <= $urandom_range(0, 1);
    end
    assign arr_out_valid[d] = offer[d];
    assign arr_out_data[d]  = {16'(d), 16'(sent[d])};
    always @(posedge clk) if (rst_n) begin
      if (arr_out_valid[d] && arr_out_ready[d]) sent[d]++;
      if (arr_a_valid[d] && arr_a_ready[d]) begin
        check(arr_a_data == {16'(d), 16'(got_a[d])}, $sformatf("A beat %0d to array %0d", got_a[d], d));
        got_a[d]++;
      end
      if (arr_b_valid[d] && arr_b_ready[d]) begin
        check(arr_b_data == {16'(d), 16'(got_b[d])}, "B beat data");
        got_b[d]++;
      end
      if (arr_cmd_valid[d] && arr_cmd_ready[d]) begin
        check(arr_cmd.count == 16'(d), "command routed");
        got_cmd[d]++;
      end
    end
  end

  // host: results
  int rcv [COUNT];
  logic [N*16-1:0] held;
  logic was_stalled = 0;
  int rr_errors = 0, prev_src = -1, fair_window = 0;
  always @(posedge clk) if (rst_n) begin
    if (was_stalled) check(out_valid && out_data == held, "held beat stable");
    was_stalled <= out_valid && !out_ready;
    held <= out_data;
    if (out_valid && out_ready) begin
      check(out_data[1] == 16'(out_src), "source tag");
      check(out_data[0] == 16'(rcv[out_src]), "order per source");
      rcv[out_src]++;
      if (fair_window > 0) begin
        if (prev_src >= 0 && int'(out_src) != (prev_src + 1) % COUNT) rr_errors++;
        checks++;
      end
      prev_src = out_src;
    end
  end

  // host: A, B and command streams with random destinations
  int a_cnt [COUNT], b_cnt [COUNT];
  initial begin
    int d;
    for (int i = 0; i < COUNT; i++) begin sent[i] = 0; rcv[i] = 0; got_a[i] = 0; got_b[i] = 0; got_cmd[i] = 0; a_cnt[i] = 0; b_cnt[i] = 0; offer[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      for (int n = 0; n < 300; n++) begin
        d = $urandom_range(0, COUNT - 1);
        a_valid = 1; a_dest = 2'(d); a_data = {16'(d), 16'(a_cnt[d])};
        do @(posedge clk); while (!a_ready);
        a_cnt[d]++;
        @(negedge clk); a_valid = 0;
      end
      begin
        int db;
        for (int n = 0; n < 300; n++) begin
          db = $urandom_range(0, COUNT - 1);
          b_valid = 1; b_dest = 2'(db); b_data = {16'(db), 16'(b_cnt[db])};
          do @(posedge clk); while (!b_ready);
          b_cnt[db]++;
          @(negedge clk); b_valid = 0;
        end
      end
      begin
        int dc;
        for (int n = 0; n < 100; n++) begin
          dc = $urandom_range(0, COUNT - 1);
          cmd_valid = 1; cmd_dest = 2'(dc); cmd = '0; cmd.count = 16'(dc);
          do @(posedge clk); while (!cmd_ready);
          @(negedge clk); cmd_valid = 0;
        end
      end
      // random result traffic with back-pressure
      for (int n = 0; n < 600; n++) begin
        @(negedge clk);
        for (int i = 0; i < COUNT; i++) if (!offer[i] || arr_out_ready[i]) offer[i] = $urandom_range(0, 1);
        out_ready = $urandom_range(0, 1);
      end
    join
    // all offering, host always ready: strict rotation
    @(negedge clk);
    for (int i = 0; i < COUNT; i++) offer[i] = 1;
    out_ready = 1;
    repeat (2) @(negedge clk);
    fair_window = 1;
    repeat (30) @(negedge clk);
    fair_window = 0;
    check(rr_errors == 0, $sformatf("round robin violated %0d times", rr_errors));
    for (int i = 0; i < COUNT; i++) begin
      check(got_a[i] == a_cnt[i] && got_b[i] == b_cnt[i], "no beat lost or duplicated");
      check(rcv[i] == sent[i], "no result lost");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
