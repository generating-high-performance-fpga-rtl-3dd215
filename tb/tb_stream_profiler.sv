// tb_stream_profiler: checks the six stream counters.
//
// A random stream (valid, ready, last, element count 0..4) is observed
// while enable toggles in long random stretches. A reference model counts
// the same events; after each stretch all six counters must match it. A
// clear pulse must zero every counter.
module tb_stream_profiler;
  import fletcher_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic enable, clear, probe_valid, probe_ready, probe_last;
  logic [2:0] probe_count;
  prof_t result;
  stream_profiler #(.CNT_W(3)) dut (.*);

  prof_t model;
  always @(posedge clk) begin
    if (rst || clear) model <= '0;
    else if (enable) begin
      model.cycles <= model.cycles + 1;
      if (probe_valid) model.valids <= model.valids + 1;
      if (probe_ready) model.readies <= model.readies + 1;
      if (probe_valid && probe_ready) begin
        model.transfers <= model.transfers + 1;
        model.elements  <= model.elements + 32'(probe_count);
        if (probe_last) model.packets <= model.packets + 1;
      end
    end
  end
  always @(negedge clk) begin
    probe_valid <= $urandom_range(0, 2) != 0;
    probe_ready <= $urandom_range(0, 1) != 0;
    probe_last  <= $urandom_range(0, 4) == 0;
    probe_count <= 3'($urandom_range(0, 4));
  end

  task automatic compare(string when);
    check(result.elements == model.elements, {when, ": elements"});
    check(result.valids == model.valids, {when, ": valids"});
    check(result.readies == model.readies, {when, ": readies"});
    check(result.transfers == model.transfers, {when, ": transfers"});
    check(result.packets == model.packets, {when, ": packets"});
    check(result.cycles == model.cycles, {when, ": cycles"});
  endtask

  initial begin
    enable = 0; clear = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int s = 0; s < 40; s++) begin
      @(negedge clk) enable = (s % 3 != 2);
      repeat ($urandom_range(20, 200)) @(negedge clk);
      compare($sformatf("stretch %0d", s));
    end
    check(model.transfers > 1000 && model.packets > 100, "enough traffic observed");
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    check(result == '0, "clear zeroes all counters");
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
