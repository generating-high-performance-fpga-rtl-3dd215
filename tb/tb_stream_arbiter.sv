// tb_stream_arbiter: checks the round-robin arbiter with three inputs.
//
// Each source sends numbered words tagged with its own index under random
// valid and backpressure. Every word must come out once, in per-source
// order, with out_index equal to its source. With all inputs valid, no input
// may wait more than two transfers (round-robin fairness); sources hold
// valid until served, so this holds under random traffic as well.
module tb_stream_arbiter;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [2:0] in_valid, in_ready;
  logic [15:0] in_data [3];
  logic out_valid, out_ready;
  logic [15:0] out_data;
  logic [1:0] out_index;
  stream_arbiter #(.T(logic [15:0]), .N(3)) dut (.*);

  int sent [3], got [3], waits [3];
  bit phase = 0;
  initial for (int i = 0; i < 3; i++) begin sent[i] = 0; got[i] = 0; waits[i] = 0; end
  // Sources move on only after a transfer seen at the clock edge, since
  // ready can change when other valids change.
  logic [2:0] fire = '0;
  always @(posedge clk) fire <= in_valid & in_ready;
  always @(negedge clk) begin
    for (int i = 0; i < 3; i++)
      if (!in_valid[i] || fire[i]) begin
        in_valid[i] <= (sent[i] < 600) && (phase || $urandom_range(0, 2) != 0);
        in_data[i]  <= {2'(i), 14'(sent[i])};
      end
    out_ready <= phase || ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < 3; i++) if (in_valid[i] && in_ready[i]) sent[i]++;
    if (out_valid && out_ready) begin
      int s;
      s = int'(out_data[15:14]);
      check(int'(out_index) == s, $sformatf("index matches source %0d %h %b", out_index, out_data, in_valid));
      check(int'(out_data[13:0]) == got[s], $sformatf("source %0d word %0d in order", s, got[s]));
      got[s]++;
      for (int i = 0; i < 3; i++) begin
        if (i == s) waits[i] = 0;
        else if (in_valid[i]) begin
          waits[i]++;
          check(waits[i] <= 2, $sformatf("input %0d waited %0d transfers", i, waits[i]));
        end
      end
    end
  end

  initial begin
    in_valid = 0; out_ready = 0;
    for (int i = 0; i < 3; i++) in_data[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (got[0] >= 300 && got[1] >= 300 && got[2] >= 300);
    phase = 1;
    wait (got[0] == 600 && got[1] == 600 && got[2] == 600);
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
