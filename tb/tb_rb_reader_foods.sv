// tb_rb_reader_foods: checks the foods RecordBatchReader.
//
// Each of its two bus masters has a memory model holding the foods table
// (ids 10, 31, 32, 70; names apple, pear, banana, melon). Commands for rows
// [0, 4) and then [1, 3) go to both fields. The id stream, the name length
// stream and the one-character-per-beat name stream must carry the rows in
// order with last on the final row (and on the final character of each
// name), and each command must unlock once.
module tb_rb_reader_foods;
  import fletcher_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [1:0] cmd_valid, cmd_ready, unl_valid, unl_ready, rreq_valid, rreq_ready, rdat_valid, rdat_ready;
  arr_cmd_t cmd [2]; bus_req_t rreq [2]; bus_rdat_t rdat [2];
  logic foods_id_valid, foods_id_last, foods_id_ready; logic [15:0] foods_id;
  logic foods_name_valid, foods_name_last, foods_name_ready; logic [INDEX_W-1:0] foods_name_length;
  logic foods_name_chars_valid, foods_name_chars_last, foods_name_chars_ready;
  logic [7:0] foods_name_chars; logic [0:0] foods_name_chars_count;
  rb_reader_foods dut (.*);
  for (genvar g = 0; g < 2; g++) begin : g_mem
    mem_model u_m (.clk, .rst, .rreq_valid(rreq_valid[g]), .rreq_ready(rreq_ready[g]), .rreq(rreq[g]),
      .rdat_valid(rdat_valid[g]), .rdat_ready(rdat_ready[g]), .rdat(rdat[g]),
      .wreq_valid(1'b0), .wreq_ready(), .wreq('0), .wdat_valid(1'b0), .wdat_ready(), .wdat('0));
  end
  localparam logic [63:0] ID_BASE = 64'h400, OFF_BASE = 64'h800, VAL_BASE = 64'hC00;
  string names [4] = '{"apple", "pear", "banana", "melon"};
  int    ids   [4] = '{10, 31, 32, 70};
  task automatic pokeb(logic [63:0] a, logic [7:0] v); g_mem[0].u_m.poke(a, v); g_mem[1].u_m.poke(a, v); endtask

  int first, last, r_id, r_len, r_chr, k_chr, n_unl;
  always @(negedge clk) begin
    foods_id_ready <= $urandom_range(0, 2) != 0;
    foods_name_ready <= $urandom_range(0, 2) != 0;
    foods_name_chars_ready <= $urandom_range(0, 2) != 0;
  end
  always @(posedge clk) if (!rst) begin
    if (foods_id_valid && foods_id_ready) begin
      check(foods_id == 16'(ids[r_id]), $sformatf("id row %0d", r_id));
      check(foods_id_last == (r_id == last - 1), "id last");
      r_id++;
    end
    if (foods_name_valid && foods_name_ready) begin
      check(foods_name_length == 32'(names[r_len].len()), $sformatf("name length row %0d", r_len));
      check(foods_name_last == (r_len == last - 1), "name length last");
      r_len++;
    end
    if (foods_name_chars_valid && foods_name_chars_ready) begin
      check(foods_name_chars_count == 1 && foods_name_chars == names[r_chr][k_chr], $sformatf("name row %0d char %0d", r_chr, k_chr));
      check(foods_name_chars_last == (k_chr == names[r_chr].len() - 1), "char last at end of name");
      if (k_chr == names[r_chr].len() - 1) begin k_chr = 0; r_chr++; end else k_chr++;
    end
    if (unl_valid[0] && unl_ready[0]) n_unl++;
    if (unl_valid[1] && unl_ready[1]) n_unl++;
  end

  task automatic run(int f, int l);
    int off = 0;
    first = f; last = l; r_id = f; r_len = f; r_chr = f; k_chr = 0; n_unl = 0;
    @(negedge clk);
    cmd[0] = '{first_idx: 32'(f), last_idx: 32'(l), addr_a: ID_BASE, addr_b: 64'h0, tag: 1'b0};
    cmd[1] = '{first_idx: 32'(f), last_idx: 32'(l), addr_a: OFF_BASE, addr_b: VAL_BASE, tag: 1'b1};
    cmd_valid = 2'b11;
    while (cmd_valid != 0) begin @(posedge clk); #1 cmd_valid = cmd_valid & ~cmd_ready; end
    wait (r_id == l && r_len == l && r_chr == l && n_unl == 2);
    check(1, "rows and unlocks complete");
  endtask

  initial begin
    int off = 0;
    cmd_valid = 0; unl_ready = 2'b11;
    for (int i = 0; i < 2; i++) cmd[i] = '0;
    for (int f = 0; f < 4; f++) begin
      pokeb(ID_BASE + 64'(2 * f), 8'(ids[f]));
      for (int b = 0; b < 4; b++) pokeb(OFF_BASE + 64'(4 * f + b), 8'(off >> (8 * b)));
      for (int k = 0; k < names[f].len(); k++) pokeb(VAL_BASE + 64'(off + k), names[f][k]);
      off += names[f].len();
    end
    pokeb(OFF_BASE + 16, 8'(off));
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(0, 4);
    run(1, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
