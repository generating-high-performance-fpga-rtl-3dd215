// tb_rb_reader_people: checks the people RecordBatchReader with EPC = 4
// characters per beat.
//
// Each of its three bus masters has a memory model holding a 120-row people
// table (names of 0..10 characters, ages, food ids). Commands for rows
// [7, 117) go to all three fields. The name lengths, the concatenated
// characters of each name (up to four per beat, last at the end of each
// name, an empty last beat for an empty name), ages and food ids must match
// the table row by row, and each command must unlock once.
module tb_rb_reader_people;
  import fletcher_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int EPC = 4, N = 120, F = 7, L = 117;
  logic [2:0] cmd_valid, cmd_ready, unl_valid, unl_ready, rreq_valid, rreq_ready, rdat_valid, rdat_ready;
  arr_cmd_t cmd [3]; bus_req_t rreq [3]; bus_rdat_t rdat [3];
  logic people_name_valid, people_name_last, people_name_ready; logic [INDEX_W-1:0] people_name_length;
  logic people_name_chars_valid, people_name_chars_last, people_name_chars_ready;
  logic [EPC*8-1:0] people_name_chars; logic [2:0] people_name_chars_count;
  logic people_age_valid, people_age_last, people_age_ready; logic [7:0] people_age;
  logic people_food_id_valid, people_food_id_last, people_food_id_ready; logic [15:0] people_food_id;
  rb_reader_people #(.EPC(EPC)) dut (.*);
  for (genvar g = 0; g < 3; g++) begin : g_mem
    mem_model u_m (.clk, .rst, .rreq_valid(rreq_valid[g]), .rreq_ready(rreq_ready[g]), .rreq(rreq[g]),
      .rdat_valid(rdat_valid[g]), .rdat_ready(rdat_ready[g]), .rdat(rdat[g]),
      .wreq_valid(1'b0), .wreq_ready(), .wreq('0), .wdat_valid(1'b0), .wdat_ready(), .wdat('0));
  end
  localparam logic [63:0] OFF_BASE = 64'h1000, VAL_BASE = 64'h2000, AGE_BASE = 64'h3000, FID_BASE = 64'h3400;
  task automatic pokeb(logic [63:0] a, logic [7:0] v);
    g_mem[0].u_m.poke(a, v); g_mem[1].u_m.poke(a, v); g_mem[2].u_m.poke(a, v);
  endtask
  function automatic string pname(int i);
    string s;
    s = "";
    for (int k = 0; k < (i * 7) % 11; k++) s = {s, string'(8'(97 + (i + k * 3) % 26))};
    return s;
  endfunction

  int r_len = F, r_chr = F, r_age = F, r_fid = F, n_unl = 0, n_empty = 0;
  string cur = "";
  always @(negedge clk) begin
    people_name_ready <= $urandom_range(0, 2) != 0;
    people_name_chars_ready <= $urandom_range(0, 2) != 0;
    people_age_ready <= $urandom_range(0, 2) != 0;
    people_food_id_ready <= $urandom_range(0, 2) != 0;
  end
  always @(posedge clk) if (!rst) begin
    if (people_name_valid && people_name_ready) begin
      check(people_name_length == 32'(pname(r_len).len()), $sformatf("name length row %0d", r_len));
      check(people_name_last == (r_len == L - 1), "name length last");
      r_len++;
    end
    if (people_name_chars_valid && people_name_chars_ready) begin
      check(people_name_chars_count <= EPC, "count within EPC");
      for (int e = 0; e < EPC; e++) if (e < int'(people_name_chars_count)) cur = {cur, string'(people_name_chars[e*8 +: 8])};
      if (people_name_chars_last) begin
        check(cur == pname(r_chr), $sformatf("name row %0d: '%s'", r_chr, cur));
        if (cur.len() == 0) n_empty++;
        cur = ""; r_chr++;
      end
    end
    if (people_age_valid && people_age_ready) begin
      check(people_age == 8'(r_age * 13 % 90), $sformatf("age row %0d", r_age));
      check(people_age_last == (r_age == L - 1), "age last");
      r_age++;
    end
    if (people_food_id_valid && people_food_id_ready) begin
      check(people_food_id == 16'(r_fid * 257 + 3), $sformatf("food id row %0d", r_fid));
      check(people_food_id_last == (r_fid == L - 1), "food id last");
      r_fid++;
    end
    for (int f = 0; f < 3; f++) if (unl_valid[f] && unl_ready[f]) n_unl++;
  end

  initial begin
    int off = 0;
    cmd_valid = 0; unl_ready = '1;
    for (int i = 0; i < N; i++) begin
      string s;
      s = pname(i);
      for (int b = 0; b < 4; b++) pokeb(OFF_BASE + 64'(4 * i + b), 8'(off >> (8 * b)));
      for (int k = 0; k < s.len(); k++) pokeb(VAL_BASE + 64'(off + k), s[k]);
      off += s.len();
      pokeb(AGE_BASE + 64'(i), 8'(i * 13 % 90));
      pokeb(FID_BASE + 64'(2 * i), 8'(i * 257 + 3)); pokeb(FID_BASE + 64'(2 * i + 1), 8'((i * 257 + 3) >> 8));
    end
    for (int b = 0; b < 4; b++) pokeb(OFF_BASE + 64'(4 * N + b), 8'(off >> (8 * b)));
    cmd[0] = '{first_idx: F, last_idx: L, addr_a: OFF_BASE, addr_b: VAL_BASE, tag: 1'b0};
    cmd[1] = '{first_idx: F, last_idx: L, addr_a: AGE_BASE, addr_b: 64'h0, tag: 1'b0};
    cmd[2] = '{first_idx: F, last_idx: L, addr_a: FID_BASE, addr_b: 64'h0, tag: 1'b0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) cmd_valid = 3'b111;
    while (cmd_valid != 0) begin @(posedge clk); #1 cmd_valid = cmd_valid & ~cmd_ready; end
    wait (r_len == L && r_chr == L && r_age == L && r_fid == L && n_unl == 3);
    check(n_empty > 0, "empty names seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
