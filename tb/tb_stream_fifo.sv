// tb_stream_fifo: checks the FIFO (depth 16).
//
// Random traffic of 3000 words must come out once and in order, and the
// level output must equal the number of stored words every cycle. Filling
// with the output stalled must stop at exactly 16 words with in_ready low;
// draining must then return them in order.
module tb_stream_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic in_valid, in_ready, out_valid, out_ready;
  logic [11:0] in_data, out_data;
  logic [4:0] level;
  stream_fifo #(.T(logic [11:0]), .DEPTH(16)) dut (.*);

  logic [11:0] exp_q [$];
  int n_in = 0, n_out = 0, phase = 0;
  logic fire = 0;
  always @(posedge clk) fire <= in_valid && in_ready;
  always @(negedge clk) if (phase == 0) begin
    if (!in_valid || fire) begin
      in_valid <= (n_in < 3000) && ($urandom_range(0, 3) != 0);
      in_data  <= 12'($urandom);
    end
    out_ready <= ($urandom_range(0, 2) == 0) || (n_in > 1500 && $urandom_range(0, 1) == 0);
  end
  always @(posedge clk) if (!rst) begin
    check(int'(level) == exp_q.size(), "level matches contents");
    if (in_valid && in_ready) begin exp_q.push_back(in_data); n_in++; end
    if (out_valid && out_ready) begin
      check(exp_q.size() > 0 && out_data == exp_q[0], $sformatf("word %0d", n_out));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      n_out++;
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (n_out == 3000);
    @(negedge clk) begin phase = 1; in_valid = 0; out_ready = 0; end
    for (int i = 0; i < 20; i++) begin
      @(negedge clk) begin in_valid = 1; in_data = 12'(i + 100); end
    end
    @(negedge clk) in_valid = 0;
    check(level == 16 && !in_ready, "full at 16 words");
    check(exp_q.size() == 16, "16 words accepted");
    out_ready = 1;
    wait (exp_q.size() == 0);
    @(negedge clk);
    check(!out_valid && level == 0, "empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
