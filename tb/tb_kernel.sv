// tb_kernel: checks the dinner-query kernel with real RecordBatch readers,
// writer and memory models around it, and EPC = 4 characters per beat.
//
// The testbench plays the command accumulators (adds buffer addresses to the
// kernel's commands) and gives every bus master its own memory model holding
// the foods table (ids 10, 31, 32, 70; apple, pear, banana, melon) and a
// people table. It pulses start, waits for done and checks the result, the
// dinner offsets and characters against a model of the query (people younger
// than the threshold, with the name of their food; an unknown food id gives
// an empty string), and that every command unlocked. A second run after a
// reset pulse uses threshold 0 (no dinner command at all), a third one a
// stop pulse in the middle of a run, after which the kernel must be idle.
module tb_kernel;
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
  logic start, stop, reset, idle, busy, done;
  logic [63:0] result;
  logic [INDEX_W-1:0] foods_firstidx, foods_lastidx, people_firstidx, people_lastidx, dinner_firstidx;
  logic [31:0] age_threshold;
  logic [6:0] cmd_valid, cmd_ready;
  kern_cmd_t  cmd [7];
  kernel #(.EPC(EPC)) dut (.clk, .rst, .start, .stop, .reset, .idle, .busy, .done, .result,
    .foods_firstidx, .foods_lastidx, .people_firstidx, .people_lastidx, .dinner_firstidx, .age_threshold,
    .cmd_valid, .cmd_ready, .cmd, .unl_valid(aunl_valid), .unl_ready(aunl_ready), .*);
  // Command accumulation done by the testbench: add buffer addresses.
  logic [63:0] fa [7] = '{FOODS_ID, FOODS_OFF, PEOPLE_OFF, PEOPLE_AGE, PEOPLE_FID, DIN_NOFF, DIN_FOFF};
  logic [63:0] fb [7] = '{64'h0, FOODS_VAL, PEOPLE_VAL, 64'h0, 64'h0, DIN_NVAL, DIN_FVAL};
  always_comb for (int f = 0; f < 7; f++)
    acmd[f] = '{first_idx: cmd[f].first_idx, last_idx: cmd[f].last_idx, addr_a: fa[f], addr_b: fb[f], tag: cmd[f].tag};
  assign acmd_valid = cmd_valid;
  assign cmd_ready  = acmd_ready;

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

  task automatic setup();
    foods_firstidx = 0; foods_lastidx = 4; people_firstidx = PFIRST; people_lastidx = PLAST; dinner_firstidx = 0;
  endtask
  task automatic run_query(int thresh, output int n_out);
    int cyc;
    age_threshold = 32'(thresh);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    check(busy && !idle, "busy after start");
    cyc = 0;
    while (!done && cyc < 200000) begin @(negedge clk); cyc++; end
    check(done, "done");
    n_out = int'(result);
    check(result[63:32] == 0, "result upper word");
  endtask
  task automatic do_reset();
    @(negedge clk) reset = 1;
    @(negedge clk) reset = 0;
    check(!done && idle && result == 0, "reset clears done and result");
  endtask
  task automatic check_prof(int exp_names, int exp_chars);
    check(exp_names > 0 && exp_chars > 0, "people traffic expected");
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
    start = 0; stop = 0; reset = 0; age_threshold = 0;
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
    // Stop in the middle of a run: the kernel must return to idle.
    do_reset();
    age_threshold = THRESH;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (60) @(negedge clk);
    check(busy, "busy in the middle of a run");
    stop = 1;
    @(negedge clk) stop = 0;
    check(idle && !busy, "stop returns to idle");
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
