// tb_stream_slice: checks the two-entry register slice.
//
// A random source and a random sink move 2000 16-bit words; every word must
// arrive once and in order. A second phase holds valid and ready high and
// checks that the slice sustains one transfer per cycle after its one-cycle
// latency, and that a word offered before a clock edge is on the output right after it.
module tb_stream_slice;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  stream_slice #(.T(logic [15:0])) dut (.*);

  logic [15:0] exp_q [$];
  bit random_mode = 1;
  int n_out = 0, n_in = 0;
  // The source moves on only after a transfer seen at a clock edge.
  logic fire = 0;
  always @(posedge clk) fire <= in_valid && in_ready;
  always @(negedge clk) if (random_mode) begin
    if (!in_valid || fire) begin
      in_valid <= (n_in < 2000) && ($urandom_range(0, 2) != 0);
      in_data  <= 16'($urandom);
    end
    out_ready <= ($urandom_range(0, 2) != 0);
  end
  always @(posedge clk) if (!rst) begin
    if (in_valid && in_ready) begin exp_q.push_back(in_data); n_in++; end
    if (out_valid && out_ready) begin
      check(exp_q.size() > 0 && out_data == exp_q[0], $sformatf("word %0d", n_out));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      n_out++;
    end
  end

  initial begin
    int t0, cnt;
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (n_out == 2000);
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "nothing left over");
    // Throughput and latency.
    @(negedge clk) begin random_mode = 0; in_valid = 0; out_ready = 1; end
    repeat (3) @(negedge clk);
    in_valid = 1; in_data = 16'h1234;
    #1;
    check(!out_valid, "no output before the clock edge");
    @(posedge clk); #1;
    check(out_valid && out_data == 16'h1234, "output registered at the next edge");
    cnt = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk) in_data = 16'(i);
      @(posedge clk) if (in_valid && in_ready && out_valid && out_ready) cnt++;
    end
    check(cnt == 100, $sformatf("full throughput: %0d of 100 cycles", cnt));
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
