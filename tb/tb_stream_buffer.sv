// tb_stream_buffer: checks the stream buffer at depths 0 (wire), 1 (slice)
// and 6 (FIFO plus output slice).
//
// All three carry the same random traffic; each must deliver every word once
// and in order. With the output stalled, the depth-6 buffer must take at
// least 6 words and the depth-0 one none.
module tb_stream_buffer;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int NB = 3;
  logic [NB-1:0] in_valid, in_ready, out_valid, out_ready;
  logic [9:0] in_data [NB], out_data [NB];
  stream_buffer #(.T(logic [9:0]), .DEPTH(0)) u_d0 (.clk, .rst, .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .in_data(in_data[0]), .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_data(out_data[0]));
  stream_buffer #(.T(logic [9:0]), .DEPTH(1)) u_d1 (.clk, .rst, .in_valid(in_valid[1]), .in_ready(in_ready[1]),
    .in_data(in_data[1]), .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_data(out_data[1]));
  stream_buffer #(.T(logic [9:0]), .DEPTH(6)) u_d6 (.clk, .rst, .in_valid(in_valid[2]), .in_ready(in_ready[2]),
    .in_data(in_data[2]), .out_valid(out_valid[2]), .out_ready(out_ready[2]), .out_data(out_data[2]));

  logic [9:0] exp_q [NB][$];
  int n_in [NB], n_out [NB];
  bit phase = 0;
  initial for (int b = 0; b < NB; b++) begin n_in[b] = 0; n_out[b] = 0; end
  logic [NB-1:0] fire = '0;
  always @(posedge clk) fire <= in_valid & in_ready;
  always @(negedge clk) if (!phase) for (int b = 0; b < NB; b++) begin
    if (!in_valid[b] || fire[b]) begin
      in_valid[b] <= (n_in[b] < 1000) && ($urandom_range(0, 2) != 0);
      in_data[b]  <= 10'($urandom);
    end
    out_ready[b] <= ($urandom_range(0, 2) != 0);
  end
  always @(posedge clk) if (!rst) for (int b = 0; b < NB; b++) begin
    if (in_valid[b] && in_ready[b]) begin exp_q[b].push_back(in_data[b]); n_in[b]++; end
    if (out_valid[b] && out_ready[b]) begin
      check(exp_q[b].size() > 0 && out_data[b] == exp_q[b][0], $sformatf("buffer %0d word %0d", b, n_out[b]));
      if (exp_q[b].size() > 0) void'(exp_q[b].pop_front());
      n_out[b]++;
    end
  end

  initial begin
    in_valid = 0; out_ready = 0;
    for (int b = 0; b < NB; b++) in_data[b] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (n_out[0] == 1000 && n_out[1] == 1000 && n_out[2] == 1000);
    @(negedge clk) begin phase = 1; out_ready = 0; in_valid = '1; end
    repeat (12) @(negedge clk);
    in_valid = 0;
    check(exp_q[2].size() >= 6, $sformatf("depth 6 holds %0d", exp_q[2].size()));
    check(exp_q[0].size() == 0, "depth 0 holds nothing");
    check(exp_q[1].size() >= 1, "depth 1 holds a word");
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
