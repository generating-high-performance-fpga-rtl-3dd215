// tb_stream_sync: checks the stream synchroniser with three inputs and two
// outputs, with random valid, ready and use masks each cycle.
//
// Reference model, per cycle: a used input sees ready when every other used
// input is valid and every used output is ready; a used output shows valid
// when every used input is valid and every other used output is ready.
// Unused streams see neither, so a transfer happens on all used streams in
// the same cycle or on none.
module tb_stream_sync;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [2:0] in_valid, in_ready, in_use;
  logic [1:0] out_valid, out_ready, out_use;
  stream_sync #(.NI(3), .NO(2)) dut (.*);

  initial begin
    bit all_in, all_out, go;
    int n_go = 0;
    for (int t = 0; t < 5000; t++) begin
      in_valid = 3'($urandom); in_use = 3'($urandom) | 3'b001;
      out_ready = 2'($urandom); out_use = 2'($urandom) | 2'b01;
      if (t % 4 == 0) begin in_valid = '1; out_ready = '1; end
      #1;
      all_in  = ((in_valid | ~in_use) == '1);
      all_out = ((out_ready | ~out_use) == '1);
      go = all_in && all_out;
      if (go) n_go++;
      for (int i = 0; i < 3; i++) begin
        bit others;
        others = 1;
        for (int j = 0; j < 3; j++) if (j != i && in_use[j] && !in_valid[j]) others = 0;
        check(in_ready[i] == (in_use[i] && all_out && others), $sformatf("t=%0d in_ready[%0d]", t, i));
        if (in_use[i]) check((in_valid[i] && in_ready[i]) == go, $sformatf("t=%0d input %0d transfers with the rest", t, i));
      end
      for (int o = 0; o < 2; o++) begin
        bit others;
        others = 1;
        for (int p = 0; p < 2; p++) if (p != o && out_use[p] && !out_ready[p]) others = 0;
        check(out_valid[o] == (out_use[o] && all_in && others), $sformatf("t=%0d out_valid[%0d]", t, o));
      end
    end
    check(n_go > 1000, "handshakes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
