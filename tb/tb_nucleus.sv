// tb_nucleus: checks the Nucleus (register file, command accumulators,
// profilers and kernel) over its AXI4-lite port, with real RecordBatch
// readers and writer and one memory model per bus master around it.
//
// The host model programs buffer addresses, row ranges and the threshold,
// enables profiling, pulses start, polls status and reads the result. The
// dinner buffers in memory are checked against a model of the query, the
// commands must carry the programmed addresses, the profiler counters of the
// people.name streams must match the traffic, and read-only registers must
// ignore writes. A reset pulse and a zero-match run follow.
module tb_nucleus;
  import fletcher_pkg::*;
  import mantle_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  localparam int EPC = 4, CW = 3;
  localparam int NPEOPLE = 300, PFIRST = 5, PLAST = 293, THRESH = 40;
  localparam logic [63:0] FOODS_ID = 64'h1000, FOODS_OFF = 64'h1100, FOODS_VAL = 64'h1200,
    PEOPLE_OFF = 64'h2000, PEOPLE_VAL = 64'h3000, PEOPLE_AGE = 64'h4000, PEOPLE_FID = 64'h4400,
    DIN_NOFF = 64'h5000, DIN_NVAL = 64'h5800, DIN_FOFF = 64'h6000, DIN_FVAL = 64'h6800;

  // Field data streams
  logic               foods_id_valid, foods_id_last, foods_id_ready;
  logic [15:0]        foods_id;
  logic               foods_name_valid, foods_name_last, foods_name_ready;
  logic [INDEX_W-1:0] foods_name_length;
  logic               foods_name_chars_valid, foods_name_chars_last, foods_name_chars_ready;
  logic [EPC*8-1:0]   foods_name_chars;
  logic [CW-1:0]      foods_name_chars_count;
  logic               people_name_valid, people_name_last, people_name_ready;
  logic [INDEX_W-1:0] people_name_length;
  logic               people_name_chars_valid, people_name_chars_last, people_name_chars_ready;
  logic [EPC*8-1:0]   people_name_chars;
  logic [CW-1:0]      people_name_chars_count;
  logic               people_age_valid, people_age_last, people_age_ready;
  logic [7:0]         people_age;
  logic               people_food_id_valid, people_food_id_last, people_food_id_ready;
  logic [15:0]        people_food_id;
  logic               dinner_name_valid, dinner_name_last, dinner_name_ready;
  logic [INDEX_W-1:0] dinner_name_length;
  logic               dinner_name_chars_valid, dinner_name_chars_last, dinner_name_chars_ready;
  logic [EPC*8-1:0]   dinner_name_chars;
  logic [CW-1:0]      dinner_name_chars_count;
  logic               dinner_food_valid, dinner_food_last, dinner_food_ready;
  logic [INDEX_W-1:0] dinner_food_length;
  logic               dinner_food_chars_valid, dinner_food_chars_last, dinner_food_chars_ready;
  logic [EPC*8-1:0]   dinner_food_chars;
  logic [CW-1:0]      dinner_food_chars_count;
  logic [6:0] acmd_valid, acmd_ready, aunl_valid, aunl_ready;
  arr_cmd_t   acmd [7];
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] awaddr, wdata, araddr, rdata; logic [3:0] wstrb; logic [1:0] bresp, rresp;
  // Bus masters: 0 foods.id, 1 foods.name, 2 people.name, 3 people.age,
  // 4 people.food_id (read); 0 dinner.name, 1 dinner.food (write).
  logic [4:0] rreq_valid, rreq_ready, rdat_valid, rdat_ready;
  bus_req_t   rreq [5]; bus_rdat_t rdat [5];
  logic [1:0] wreq_valid, wreq_ready, wdat_valid, wdat_ready;
  bus_req_t   wreq [2]; bus_wdat_t wdat [2];
  for (genvar g = 0; g < 5; g++) begin : g_rmem
    mem_model u_m (.clk, .rst, .rreq_valid(rreq_valid[g]), .rreq_ready(rreq_ready[g]), .rreq(rreq[g]),
      .rdat_valid(rdat_valid[g]), .rdat_ready(rdat_ready[g]), .rdat(rdat[g]),
      .wreq_valid(1'b0), .wreq_ready(), .wreq('0), .wdat_valid(1'b0), .wdat_ready(), .wdat('0));
  end
  for (genvar g = 0; g < 2; g++) begin : g_wmem
    mem_model u_m (.clk, .rst, .rreq_valid(1'b0), .rreq_ready(), .rreq('0), .rdat_valid(), .rdat_ready(1'b1), .rdat(),
      .wreq_valid(wreq_valid[g]), .wreq_ready(wreq_ready[g]), .wreq(wreq[g]),
      .wdat_valid(wdat_valid[g]), .wdat_ready(wdat_ready[g]), .wdat(wdat[g]));
  end
  rb_reader_foods #(.EPC(EPC)) u_foods (.clk, .rst,
    .cmd_valid(acmd_valid[1:0]), .cmd_ready(acmd_ready[1:0]), .cmd(acmd[0:1]),
    .unl_valid(aunl_valid[1:0]), .unl_ready(aunl_ready[1:0]),
    .rreq_valid(rreq_valid[1:0]), .rreq_ready(rreq_ready[1:0]), .rreq(rreq[0:1]),
    .rdat_valid(rdat_valid[1:0]), .rdat_ready(rdat_ready[1:0]), .rdat(rdat[0:1]), .*);
  rb_reader_people #(.EPC(EPC)) u_people (.clk, .rst,
    .cmd_valid(acmd_valid[4:2]), .cmd_ready(acmd_ready[4:2]), .cmd(acmd[2:4]),
    .unl_valid(aunl_valid[4:2]), .unl_ready(aunl_ready[4:2]),
    .rreq_valid(rreq_valid[4:2]), .rreq_ready(rreq_ready[4:2]), .rreq(rreq[2:4]),
    .rdat_valid(rdat_valid[4:2]), .rdat_ready(rdat_ready[4:2]), .rdat(rdat[2:4]), .*);
  rb_writer_dinner #(.EPC(EPC)) u_dinner (.clk, .rst,
    .cmd_valid(acmd_valid[6:5]), .cmd_ready(acmd_ready[6:5]), .cmd(acmd[5:6]),
    .unl_valid(aunl_valid[6:5]), .unl_ready(aunl_ready[6:5]),
    .wreq_valid, .wreq_ready, .wreq, .wdat_valid, .wdat_ready, .wdat, .*);
  task automatic pokeb(logic [63:0] a, logic [7:0] v);
    g_rmem[0].u_m.poke(a, v); g_rmem[1].u_m.poke(a, v); g_rmem[2].u_m.poke(a, v);
    g_rmem[3].u_m.poke(a, v); g_rmem[4].u_m.poke(a, v);
  endtask
  function automatic logic [7:0] peekb(logic [63:0] a);
    return (a >= DIN_FOFF) ? g_wmem[1].u_m.peek(a) : g_wmem[0].u_m.peek(a);
  endfunction
  nucleus #(.EPC(EPC)) dut (.*);

  string food_names [4] = '{"apple", "pear", "banana", "melon"};
  int    food_ids   [4] = '{10, 31, 32, 70};
  function automatic string pname(int i);
    string s;
    int n;
    s = "";
    n = (i % 13 == 4) ? 0 : (i * 5) % 11 + 1;
    for (int k = 0; k < n; k++) s = {s, string'(8'(65 + (i * 7 + k * 3) % 26))};
    return s;
  endfunction
  function automatic int page(int i);  return (i * 29 + 3) % 70; endfunction
  function automatic int pfood(int i); return (i % 6 == 5) ? 77 : food_ids[(i * 3) % 4]; endfunction
  function automatic string fname(int id);
    for (int f = 0; f < 4; f++) if (food_ids[f] == id) return food_names[f];
    return "";
  endfunction
  task automatic poke32(logic [63:0] a, int v);
    for (int b = 0; b < 4; b++) pokeb(a + 64'(b), 8'(v >> (8 * b)));
  endtask
  function automatic logic [31:0] peek32(logic [63:0] a);
    logic [31:0] v;
    for (int b = 0; b < 4; b++) v[b*8 +: 8] = peekb(a + 64'(b));
    return v;
  endfunction
  task automatic load_tables();
    int off;
    off = 0;
    for (int f = 0; f < 4; f++) begin
      pokeb(FOODS_ID + 64'(2 * f), 8'(food_ids[f])); pokeb(FOODS_ID + 64'(2 * f + 1), 8'(food_ids[f] >> 8));
      poke32(FOODS_OFF + 64'(4 * f), off);
      for (int k = 0; k < food_names[f].len(); k++) pokeb(FOODS_VAL + 64'(off + k), food_names[f][k]);
      off += food_names[f].len();
    end
    poke32(FOODS_OFF + 16, off);
    off = 0;
    for (int i = 0; i < NPEOPLE; i++) begin
      string s;
      s = pname(i);
      poke32(PEOPLE_OFF + 64'(4 * i), off);
      for (int k = 0; k < s.len(); k++) pokeb(PEOPLE_VAL + 64'(off + k), s[k]);
      off += s.len();
      pokeb(PEOPLE_AGE + 64'(i), 8'(page(i)));
      pokeb(PEOPLE_FID + 64'(2 * i), 8'(pfood(i))); pokeb(PEOPLE_FID + 64'(2 * i + 1), 8'(pfood(i) >> 8));
    end
    poke32(PEOPLE_OFF + 64'(4 * NPEOPLE), off);
  endtask

  // Mechanism counters
  int n_empty_name = 0, n_unknown_food = 0, n_kernel_bp = 0, n_zero_run = 0, n_multi_char = 0;
  int n_unl [7];
  initial for (int f = 0; f < 7; f++) n_unl[f] = 0;
  always @(posedge clk) if (!rst) begin
    if (people_name_valid && people_name_ready && people_name_length == 0) n_empty_name++;
    if (people_food_id_valid && people_food_id_ready && people_food_id == 77) n_unknown_food++;
    if (people_name_chars_valid && !people_name_chars_ready) n_kernel_bp++;
    for (int f = 0; f < 7; f++) if (aunl_valid[f] && aunl_ready[f]) n_unl[f]++;
  end
  always @(posedge clk) if (!rst)
    if (dinner_name_chars_valid && dinner_name_chars_ready && dinner_name_chars_count > 1) n_multi_char++;

  task automatic reg_write(int idx, logic [31:0] v);
    @(negedge clk);
    awvalid = 1; awaddr = 32'(4 * idx); wvalid = 1; wdata = v; wstrb = 4'hF;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk) begin awvalid = 0; wvalid = 0; bready = 1; end
    while (!bvalid) @(negedge clk);
    @(negedge clk) bready = 0;
  endtask
  task automatic reg_read(int idx, output logic [31:0] v);
    @(negedge clk);
    arvalid = 1; araddr = 32'(4 * idx); rready = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk) arvalid = 0;
    while (!rvalid) @(negedge clk);
    v = rdata;
    @(negedge clk) rready = 0;
  endtask
  task automatic reg_write64(int idx, logic [63:0] v);
    reg_write(idx, v[31:0]); reg_write(idx + 1, v[63:32]);
  endtask
  task automatic setup();
    reg_write(REG_FOODS_FIRST, 0);        reg_write(REG_FOODS_LAST, 4);
    reg_write(REG_PEOPLE_FIRST, PFIRST);  reg_write(REG_PEOPLE_LAST, PLAST);
    reg_write(REG_DINNER_FIRST, 0);       reg_write(REG_DINNER_LAST, 0);
    reg_write64(REG_FOODS_ID_VAL, FOODS_ID);
    reg_write64(REG_FOODS_NAME_OFF, FOODS_OFF);     reg_write64(REG_FOODS_NAME_VAL, FOODS_VAL);
    reg_write64(REG_PEOPLE_NAME_OFF, PEOPLE_OFF);   reg_write64(REG_PEOPLE_NAME_VAL, PEOPLE_VAL);
    reg_write64(REG_PEOPLE_AGE_VAL, PEOPLE_AGE);    reg_write64(REG_PEOPLE_FOOD_ID_VAL, PEOPLE_FID);
    reg_write64(REG_DINNER_NAME_OFF, DIN_NOFF);     reg_write64(REG_DINNER_NAME_VAL, DIN_NVAL);
    reg_write64(REG_DINNER_FOOD_OFF, DIN_FOFF);     reg_write64(REG_DINNER_FOOD_VAL, DIN_FVAL);
    reg_write(REG_PROFILE_CONTROL, 32'h3);
  endtask
  task automatic run_query(int thresh, output int n_out);
    logic [31:0] st, r0, r1;
    int cyc;
    cyc = 0;
    reg_write(REG_AGE_THRESHOLD, 32'(thresh));
    reg_write(REG_CONTROL, 32'h1);
    do begin reg_read(REG_STATUS, st); cyc++; end while (!st[2] && cyc < 20000);
    check(st[2] == 1'b1, "status reports done");
    reg_read(REG_RETURN0, r0);
    reg_read(REG_RETURN1, r1);
    n_out = int'(r0);
    check(r1 == 0, "result upper word");
  endtask
  task automatic do_reset();
    logic [31:0] v;
    reg_write(REG_CONTROL, 32'h4);
    reg_read(REG_STATUS, v);
    check(v[2] == 1'b0 && v[0] == 1'b1, "reset clears done");
  endtask
  task automatic check_prof(int exp_names, int exp_chars);
    logic [31:0] v;
    reg_read(REG_PROF_NAME_LEN + 0, v);   check(v == 32'(exp_names), $sformatf("profiler name elements %0d", v));
    reg_read(REG_PROF_NAME_LEN + 3, v);   check(v == 32'(exp_names), "profiler name transfers");
    reg_read(REG_PROF_NAME_LEN + 4, v);   check(v == 1, "profiler name packets");
    reg_read(REG_PROF_NAME_CHARS + 0, v); check(v == 32'(exp_chars), $sformatf("profiler char elements %0d", v));
    reg_read(REG_PROF_NAME_CHARS + 4, v); check(v == 32'(exp_names), "profiler char packets");
    reg_read(REG_PROF_NAME_CHARS + 5, v); check(v > 0, "profiler cycles");
  endtask

  task automatic check_dinner(int thresh, int n_out);
    int row, noff, foff, exp_chars, exp_names;
    row = 0; noff = 0; foff = 0; exp_chars = 0; exp_names = 0;
    for (int i = PFIRST; i < PLAST; i++) begin
      exp_chars += pname(i).len();
      exp_names++;
      if (page(i) < thresh) begin
        string n, fd;
        n = pname(i); fd = fname(pfood(i));
        check(peek32(DIN_NOFF + 64'(4 * row)) == 32'(noff), $sformatf("dinner.name offset %0d", row));
        check(peek32(DIN_FOFF + 64'(4 * row)) == 32'(foff), $sformatf("dinner.food offset %0d", row));
        for (int k = 0; k < n.len(); k++)
          check(peekb(DIN_NVAL + 64'(noff + k)) == n[k], $sformatf("dinner.name row %0d char %0d", row, k));
        for (int k = 0; k < fd.len(); k++)
          check(peekb(DIN_FVAL + 64'(foff + k)) == fd[k], $sformatf("dinner.food row %0d char %0d", row, k));
        noff += n.len(); foff += fd.len(); row++;
      end
    end
    check(n_out == row, $sformatf("result %0d rows, expected %0d", n_out, row));
    check(peek32(DIN_NOFF + 64'(4 * row)) == 32'(noff), "dinner.name final offset");
    check(peek32(DIN_FOFF + 64'(4 * row)) == 32'(foff), "dinner.food final offset");
    check_prof(exp_names, exp_chars);
  endtask

  initial begin
    int n_out;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; wdata = 0; wstrb = 0; araddr = 0;
    load_tables();
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;
    setup();
    run_query(THRESH, n_out);
    check_dinner(THRESH, n_out);
    for (int f = 0; f < 7; f++) check(n_unl[f] >= 1, $sformatf("field %0d unlocked", f));
    do_reset();
    run_query(0, n_out);
    check(n_out == 0, "no matches with threshold 0");
    if (n_out == 0) n_zero_run++;
    begin
      logic [31:0] v;
      reg_write(REG_RETURN0, 32'hDEAD);
      reg_read(REG_RETURN0, v);
      check(v == 0, "read-only register ignores writes");
      reg_read(REG_PEOPLE_NAME_VAL, v);
      check(v == PEOPLE_VAL[31:0], "address register reads back");
    end
    $display("mechanisms: empty names %0d, unknown foods %0d, backpressure %0d, zero runs %0d, multi-char beats %0d",
             n_empty_name, n_unknown_food, n_kernel_bp, n_zero_run, n_multi_char);
    check(n_empty_name > 0, "empty names occurred");
    check(n_unknown_food > 0, "unknown food ids occurred");
    check(n_zero_run > 0, "zero-match run occurred");
    check(n_multi_char > 0, "multi-character beats written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
