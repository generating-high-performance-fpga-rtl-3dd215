// tb_stream_barrel: checks the element rotator with 4 elements of 8 bits.
//
// Random beats with random rotate amounts, counts and last flags pass under
// random backpressure; each output beat must be its input beat rotated right
// by the amount (output element p = input element (p + amount) mod 4), with
// count and last unchanged and beats in order. With valid and ready held
// high the rotator must move one beat per cycle.
module tb_stream_barrel;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic [31:0] in_data, out_data;
  logic [1:0] in_amount;
  logic [2:0] in_count, out_count;
  stream_barrel #(.EPC(4), .ELEM_W(8)) dut (.*);

  typedef struct { logic [31:0] d; logic [2:0] c; logic l; } beat_t;
  beat_t exp_q [$];
  int n_in = 0, n_out = 0, phase = 0;
  logic fire = 0;
  always @(posedge clk) fire <= in_valid && in_ready;
  always @(negedge clk) if (phase == 0) begin
    if (!in_valid || fire) begin
      in_valid  <= (n_in < 2000) && ($urandom_range(0, 3) != 0);
      in_data   <= $urandom;
      in_amount <= 2'($urandom);
      in_count  <= 3'($urandom_range(0, 4));
      in_last   <= 1'($urandom);
    end
    out_ready <= ($urandom_range(0, 2) != 0);
  end
  always @(posedge clk) if (!rst) begin
    if (in_valid && in_ready) begin
      beat_t b;
      for (int p = 0; p < 4; p++) b.d[p*8 +: 8] = in_data[((p + int'(in_amount)) % 4)*8 +: 8];
      b.c = in_count; b.l = in_last;
      exp_q.push_back(b); n_in++;
    end
    if (out_valid && out_ready) begin
      check(exp_q.size() > 0 && out_data == exp_q[0].d && out_count == exp_q[0].c && out_last == exp_q[0].l,
            $sformatf("beat %0d", n_out));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      n_out++;
    end
  end

  initial begin
    int cnt = 0;
    in_valid = 0; out_ready = 0; in_data = 0; in_amount = 0; in_count = 0; in_last = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (n_out == 2000);
    @(negedge clk) begin phase = 1; in_valid = 1; out_ready = 1; end
    repeat (2) @(posedge clk);
    for (int i = 0; i < 50; i++) @(posedge clk) if (in_valid && in_ready && out_valid && out_ready) cnt++;
    check(cnt == 50, $sformatf("one beat per cycle: %0d of 50", cnt));
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
