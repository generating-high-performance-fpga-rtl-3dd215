// tb_foods_name_meph: the foods.name access of the example at one and at
// four characters per handshake.
//
// Two string ArrayReaders (array_reader_list), one with EPC=1 and one with
// EPC=4, each read the foods name column (apple, pear, banana, melon) from
// their own memory model without random stalls, with the consumer always
// ready. The test checks every character, count and last flag against the
// names, and the handshake rate: the first two names (apple, pear: 9
// characters) take 9 character beats at EPC=1 and 3 beats at EPC=4, each
// group in as many consecutive cycles as beats, and the whole column takes
// 20 and 7 beats. With four characters per beat a name of n characters
// needs ceil(n/4) beats, since no beat holds characters of two names.
module tb_foods_name_meph;
  import fletcher_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [63:0] OFF_BASE = 64'h800, VAL_BASE = 64'hC00;
  string names [4] = '{"apple", "pear", "banana", "melon"};
  int    cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic start_cmd = 0;

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int EPC = (g == 0) ? 1 : 4;
    localparam int CW  = $clog2(EPC + 1);
    logic cmd_valid, cmd_ready, unl_valid;
    logic [TAG_W-1:0] unl_tag;
    arr_cmd_t cmd;
    logic rreq_valid, rreq_ready, rdat_valid, rdat_ready;
    bus_req_t rreq; bus_rdat_t rdat;
    logic len_valid, len_last, val_valid, val_dvalid, val_last;
    logic [INDEX_W-1:0] len_data;
    logic [EPC*8-1:0] val_data;
    logic [CW-1:0] val_count;
    array_reader_list #(.ELEM_W(8), .EPC(EPC)) u_dut (
      .clk, .rst, .cmd_valid, .cmd_ready, .cmd, .unl_valid, .unl_ready(1'b1), .unl_tag,
      .rreq_valid, .rreq_ready, .rreq, .rdat_valid, .rdat_ready, .rdat,
      .len_valid, .len_ready(1'b1), .len_data, .len_last,
      .val_valid, .val_ready(1'b1), .val_data, .val_count, .val_dvalid, .val_last);
    mem_model #(.LATENCY(4), .STALL(1'b0)) u_m (.clk, .rst, .rreq_valid, .rreq_ready, .rreq,
      .rdat_valid, .rdat_ready, .rdat,
      .wreq_valid(1'b0), .wreq_ready(), .wreq('0), .wdat_valid(1'b0), .wdat_ready(), .wdat('0));

    assign cmd = '{first_idx: 32'd0, last_idx: 32'd4, addr_a: OFF_BASE, addr_b: VAL_BASE, tag: 1'b1};
    always_ff @(posedge clk)
      if (rst) cmd_valid <= 1'b0;
      else if (start_cmd && !cmd_valid && n_cmd == 0) cmd_valid <= 1'b1;
      else if (cmd_ready) cmd_valid <= 1'b0;

    int n_cmd = 0, row = 0, k = 0, beats = 0, beats01 = 0, first01 = -1, last01 = -1, n_len = 0, n_unl = 0;
    always @(posedge clk) if (!rst) begin
      if (cmd_valid && cmd_ready) n_cmd++;
      if (len_valid) begin
        check(len_data == 32'(names[n_len].len()), $sformatf("EPC=%0d length %0d", EPC, n_len));
        n_len++;
      end
      if (unl_valid) n_unl++;
      if (val_valid && row < 4) begin
        int n;
        n = names[row].len() - k;
        if (n > EPC) n = EPC;
        check(int'(val_count) == n, $sformatf("EPC=%0d row %0d count", EPC, row));
        for (int e = 0; e < n; e++)
          check(val_data[8*e +: 8] == names[row][k + e], $sformatf("EPC=%0d row %0d char %0d", EPC, row, k + e));
        check(val_last == (k + n == names[row].len()), $sformatf("EPC=%0d row %0d last", EPC, row));
        beats++;
        if (row < 2) begin
          beats01++;
          if (first01 < 0) first01 = cyc;
          last01 = cyc;
        end
        k += n;
        if (k == names[row].len()) begin k = 0; row++; end
      end
    end
  end

  task automatic pokeb(logic [63:0] a, logic [7:0] v);
    g_cfg[0].u_m.poke(a, v);
    g_cfg[1].u_m.poke(a, v);
  endtask

  initial begin
    int off;
    off = 0;
    for (int f = 0; f < 4; f++) begin
      for (int b = 0; b < 4; b++) pokeb(OFF_BASE + 64'(4 * f + b), 8'(off >> (8 * b)));
      for (int c = 0; c < names[f].len(); c++) pokeb(VAL_BASE + 64'(off + c), names[f][c]);
      off += names[f].len();
    end
    for (int b = 0; b < 4; b++) pokeb(OFF_BASE + 64'(16 + b), 8'(off >> (8 * b)));
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    start_cmd = 1;
    wait (g_cfg[0].n_unl == 1 && g_cfg[1].n_unl == 1);
    repeat (5) @(posedge clk);
    check(g_cfg[0].row == 4 && g_cfg[1].row == 4, "all names received");
    check(g_cfg[0].beats01 == 9, $sformatf("EPC=1: apple and pear take 9 beats (got %0d)", g_cfg[0].beats01));
    check(g_cfg[1].beats01 == 3, $sformatf("EPC=4: apple and pear take 3 beats (got %0d)", g_cfg[1].beats01));
    check(g_cfg[0].last01 - g_cfg[0].first01 + 1 == 9,
          $sformatf("EPC=1: apple and pear in 9 consecutive cycles (got %0d)", g_cfg[0].last01 - g_cfg[0].first01 + 1));
    check(g_cfg[1].last01 - g_cfg[1].first01 + 1 == 3,
          $sformatf("EPC=4: apple and pear in 3 consecutive cycles (got %0d)", g_cfg[1].last01 - g_cfg[1].first01 + 1));
    check(g_cfg[0].beats == 20, "EPC=1: 20 beats for the column");
    check(g_cfg[1].beats == 7, "EPC=4: 7 beats for the column");
    check(g_cfg[0].n_len == 4 && g_cfg[1].n_len == 4, "four lengths each");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
