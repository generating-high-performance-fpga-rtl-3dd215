// tb_fletcher_top: end-to-end test of the whole top level at its default
// parameters.
//
// Accelerator: a host model writes the foods table (ids 10, 31, 32, 70;
// names apple, pear, banana, melon) and a 410-row people table into a
// memory model, programs buffer addresses, row ranges (people rows 3..402,
// so the first element sits inside a bus word) and the age threshold over
// AXI4-lite, enables the profiler, pulses start and polls status until done.
// It then checks the result register against the number of matching people
// and the dinner offsets and character buffers in memory against a model of
// the query, and checks the profiler counters of the people.name streams.
// A second run after a reset pulse uses threshold 0 (no matches, no dinner
// command). Example ArrayReaders: the three fields of the example schema
// (nullable float32, string, struct of int16/float64) are read from a
// second set of memories and compared row by row.
// Each mechanism is counted and must occur: multi-beat and maximum-length
// read bursts, read arbitration contention, write bursts with partial byte
// strobes, unlocks of all seven fields, empty names and unknown food ids,
// memory stalls, backpressure on the kernel's streams, the reset and
// zero-match path, and null elements on field A.
module tb_fletcher_top;
  import fletcher_pkg::*;
  import mantle_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- DUT ----------------
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] awaddr, wdata, araddr, rdata; logic [3:0] wstrb; logic [1:0] bresp, rresp;
  logic bus_rreq_valid, bus_rreq_ready, bus_rdat_valid, bus_rdat_ready;
  logic bus_wreq_valid, bus_wreq_ready, bus_wdat_valid, bus_wdat_ready;
  bus_req_t bus_rreq, bus_wreq; bus_rdat_t bus_rdat; bus_wdat_t bus_wdat;
  logic [2:0] ex_cmd_valid, ex_cmd_ready, ex_unl_valid, ex_unl_ready;
  logic [2:0] ex_rreq_valid, ex_rreq_ready, ex_rdat_valid, ex_rdat_ready;
  arr_cmd_t ex_cmd [3]; bus_req_t ex_rreq [3]; bus_rdat_t ex_rdat [3];
  logic a_valid, a_ready, a_validity, a_last; logic [31:0] a_data;
  logic b_len_valid, b_len_ready, b_len_last, b_chr_valid, b_chr_ready, b_chr_last;
  logic [INDEX_W-1:0] b_len; logic [7:0] b_chr; logic [0:0] b_chr_count;
  logic c_valid, c_ready, c_last; logic [15:0] c_e; logic [63:0] c_f;

  fletcher_top dut (.*);

  mem_model u_mem (.clk, .rst, .rreq_valid(bus_rreq_valid), .rreq_ready(bus_rreq_ready), .rreq(bus_rreq),
    .rdat_valid(bus_rdat_valid), .rdat_ready(bus_rdat_ready), .rdat(bus_rdat),
    .wreq_valid(bus_wreq_valid), .wreq_ready(bus_wreq_ready), .wreq(bus_wreq),
    .wdat_valid(bus_wdat_valid), .wdat_ready(bus_wdat_ready), .wdat(bus_wdat));

  for (genvar g = 0; g < 3; g++) begin : g_exmem
    mem_model u_m (.clk, .rst, .rreq_valid(ex_rreq_valid[g]), .rreq_ready(ex_rreq_ready[g]), .rreq(ex_rreq[g]),
      .rdat_valid(ex_rdat_valid[g]), .rdat_ready(ex_rdat_ready[g]), .rdat(ex_rdat[g]),
      .wreq_valid(1'b0), .wreq_ready(), .wreq('0), .wdat_valid(1'b0), .wdat_ready(), .wdat('0));
  end

  // ---------------- Data set ----------------
  localparam int NPEOPLE = 410, PFIRST = 3, PLAST = 403, THRESH = 40;
  localparam logic [63:0] FOODS_ID = 64'h1000, FOODS_OFF = 64'h1100, FOODS_VAL = 64'h1200,
    PEOPLE_OFF = 64'h2000, PEOPLE_VAL = 64'h3000, PEOPLE_AGE = 64'h4000, PEOPLE_FID = 64'h4400,
    DIN_NOFF = 64'h5000, DIN_NVAL = 64'h5800, DIN_FOFF = 64'h6000, DIN_FVAL = 64'h6800;
  string food_names [4] = '{"apple", "pear", "banana", "melon"};
  int    food_ids   [4] = '{10, 31, 32, 70};

  function automatic string pname(int i);
    string s = "";
    int n = (i % 17 == 5) ? 0 : (i * 7) % 9 + 1;
    for (int k = 0; k < n; k++) s = {s, string'(8'(97 + (i * 3 + k * 5) % 26))};
    return s;
  endfunction
  function automatic int page(int i);  return (i * 37 + 11) % 80; endfunction
  function automatic int pfood(int i); return (i % 5 == 4) ? 99 : food_ids[i % 4]; endfunction
  function automatic string fname(int id);
    for (int f = 0; f < 4; f++) if (food_ids[f] == id) return food_names[f];
    return "";
  endfunction

  task automatic poke16(logic [63:0] a, int v);
    u_mem.poke(a, 8'(v)); u_mem.poke(a + 1, 8'(v >> 8));
  endtask

  task automatic load_tables();
    int off = 0;
    for (int f = 0; f < 4; f++) begin
      poke16(FOODS_ID + 64'(2 * f), food_ids[f]);
      u_mem.poke32(FOODS_OFF + 64'(4 * f), off);
      for (int k = 0; k < food_names[f].len(); k++) u_mem.poke(FOODS_VAL + 64'(off + k), food_names[f][k]);
      off += food_names[f].len();
    end
    u_mem.poke32(FOODS_OFF + 16, off);
    off = 0;
    for (int i = 0; i < NPEOPLE; i++) begin
      string s = pname(i);
      u_mem.poke32(PEOPLE_OFF + 64'(4 * i), off);
      for (int k = 0; k < s.len(); k++) u_mem.poke(PEOPLE_VAL + 64'(off + k), s[k]);
      off += s.len();
      u_mem.poke(PEOPLE_AGE + 64'(i), 8'(page(i)));
      poke16(PEOPLE_FID + 64'(2 * i), pfood(i));
    end
    u_mem.poke32(PEOPLE_OFF + 64'(4 * NPEOPLE), off);
  endtask

  // ---------------- AXI4-lite host ----------------
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

  // ---------------- Mechanism counters ----------------
  int n_burst_multi = 0, n_burst_max = 0, n_contention = 0, n_partial_strobe = 0, n_wburst = 0;
  int n_mem_stall = 0, n_kernel_bp = 0, n_empty_name = 0, n_unknown_food = 0, n_zero_run = 0, n_a_null = 0;
  int n_unl [7];
  initial for (int f = 0; f < 7; f++) n_unl[f] = 0;
  always @(posedge clk) if (!rst) begin
    if (bus_rreq_valid && bus_rreq_ready && bus_rreq.len > 1) n_burst_multi++;
    if (bus_rreq_valid && bus_rreq_ready && int'(bus_rreq.len) == BUS_BURST_MAX) n_burst_max++;
    if ($countones(dut.u_mantle.m_rreq_valid) > 1) n_contention++;
    if (bus_wreq_valid && bus_wreq_ready && bus_wreq.len > 1) n_wburst++;
    if (bus_wdat_valid && bus_wdat_ready && bus_wdat.strobe != '1) n_partial_strobe++;
    if (!bus_rdat_valid && u_mem.rq.size() > 0) n_mem_stall++;
    if (dut.u_mantle.people_name_chars_valid && !dut.u_mantle.people_name_chars_ready) n_kernel_bp++;
    if (dut.u_mantle.people_name_valid && dut.u_mantle.people_name_ready && dut.u_mantle.people_name_length == 0)
      n_empty_name++;
    if (dut.u_mantle.people_food_id_valid && dut.u_mantle.people_food_id_ready && dut.u_mantle.people_food_id == 99)
      n_unknown_food++;
    for (int f = 0; f < 7; f++)
      if (dut.u_mantle.aunl_valid[f] && dut.u_mantle.aunl_ready[f]) n_unl[f]++;
  end

  // ---------------- Accelerator run ----------------
  task automatic run_query(int thresh, output int n_out);
    logic [31:0] st, r0, r1;
    int cyc = 0;
    reg_write(REG_AGE_THRESHOLD, 32'(thresh));
    reg_write(REG_CONTROL, 32'h1);
    do begin
      reg_read(REG_STATUS, st);
      cyc++;
    end while (!st[2] && cyc < 20000);
    check(st[2] == 1'b1, "status reports done");
    reg_read(REG_RETURN0, r0);
    reg_read(REG_RETURN1, r1);
    n_out = int'(r0);
    check(r1 == 0, "result upper word");
  endtask

  task automatic check_dinner(int thresh, int n_out);
    int row = 0, noff = 0, foff = 0;
    int exp_chars = 0, exp_names = 0;
    for (int i = PFIRST; i < PLAST; i++) begin
      exp_chars += pname(i).len();
      exp_names++;
      if (page(i) < thresh) begin
        string n = pname(i), fd = fname(pfood(i));
        check(u_mem.peek32(DIN_NOFF + 64'(4 * row)) == 32'(noff), $sformatf("dinner.name offset %0d", row));
        check(u_mem.peek32(DIN_FOFF + 64'(4 * row)) == 32'(foff), $sformatf("dinner.food offset %0d", row));
        for (int k = 0; k < n.len(); k++)
          check(u_mem.peek(DIN_NVAL + 64'(noff + k)) == n[k], $sformatf("dinner.name row %0d char %0d", row, k));
        for (int k = 0; k < fd.len(); k++)
          check(u_mem.peek(DIN_FVAL + 64'(foff + k)) == fd[k], $sformatf("dinner.food row %0d char %0d", row, k));
        noff += n.len(); foff += fd.len(); row++;
      end
    end
    check(n_out == row, $sformatf("result %0d rows, expected %0d", n_out, row));
    check(u_mem.peek32(DIN_NOFF + 64'(4 * row)) == 32'(noff), "dinner.name final offset");
    check(u_mem.peek32(DIN_FOFF + 64'(4 * row)) == 32'(foff), "dinner.food final offset");
    begin
      logic [31:0] v;
      reg_read(REG_PROF_NAME_LEN + 0, v);   check(v == 32'(exp_names), $sformatf("profiler name elements %0d", v));
      reg_read(REG_PROF_NAME_LEN + 3, v);   check(v == 32'(exp_names), "profiler name transfers");
      reg_read(REG_PROF_NAME_LEN + 4, v);   check(v == 1, "profiler name packets");
      reg_read(REG_PROF_NAME_CHARS + 0, v); check(v == 32'(exp_chars), $sformatf("profiler char elements %0d", v));
      reg_read(REG_PROF_NAME_CHARS + 4, v); check(v == 32'(exp_names), "profiler char packets");
      reg_read(REG_PROF_NAME_CHARS + 5, v); check(v > 32'(exp_chars), "profiler cycles");
      reg_read(REG_PROF_NAME_CHARS + 1, v); check(v >= 32'(exp_chars), "profiler valid cycles");
    end
  endtask

  // ---------------- Example ArrayReaders ----------------
  logic [31:0] fa [3] = '{32'h3F000000, 32'h3E800000, 32'h0};
  string       fb [3] = '{"fpga", "fun", "!"};
  logic [15:0] fe [3] = '{16'd42, 16'd1337, 16'd13};
  logic [63:0] ff [3] = '{64'h3FC0000000000000, 64'h0, 64'h400599999999999A};
  int n_a = 0, n_bl = 0, n_bc = 0, n_c = 0, n_ex_unl = 0;
  string bstr = "";
  always @(negedge clk) begin
    a_ready <= ($urandom_range(0, 2) != 0); b_len_ready <= ($urandom_range(0, 2) != 0);
    b_chr_ready <= ($urandom_range(0, 2) != 0); c_ready <= ($urandom_range(0, 2) != 0);
  end
  always @(posedge clk) if (!rst) begin
    if (a_valid && a_ready) begin
      check(a_validity == (n_a != 2), $sformatf("field A validity row %0d", n_a));
      if (n_a != 2) check(a_data == fa[n_a], $sformatf("field A value row %0d", n_a));
      else n_a_null++;
      check(a_last == (n_a == 2), "field A last");
      n_a++;
    end
    if (b_len_valid && b_len_ready) begin
      check(b_len == 32'(fb[n_bl].len()), $sformatf("field B length row %0d", n_bl));
      check(b_len_last == (n_bl == 2), "field B length last");
      n_bl++;
    end
    if (b_chr_valid && b_chr_ready) begin
      if (b_chr_count != 0) bstr = {bstr, string'(b_chr)};
      if (b_chr_last) begin
        check(bstr == fb[n_bc], $sformatf("field B string row %0d: %s", n_bc, bstr));
        bstr = ""; n_bc++;
      end
    end
    if (c_valid && c_ready) begin
      check(c_e == fe[n_c] && c_f == ff[n_c], $sformatf("field C row %0d", n_c));
      check(c_last == (n_c == 2), "field C last");
      n_c++;
    end
    for (int f = 0; f < 3; f++) if (ex_unl_valid[f] && ex_unl_ready[f]) n_ex_unl++;
  end

  task automatic load_example();
    g_exmem[0].u_m.poke(64'h0, 8'b011);
    for (int i = 0; i < 3; i++) g_exmem[0].u_m.poke32(64'h100 + 64'(4 * i), fa[i]);
    for (int i = 0, off = 0; i < 3; i++) begin
      g_exmem[1].u_m.poke32(64'h0 + 64'(4 * i), 32'(off));
      for (int k = 0; k < fb[i].len(); k++) g_exmem[1].u_m.poke(64'h100 + 64'(off + k), fb[i][k]);
      off += fb[i].len();
      if (i == 2) g_exmem[1].u_m.poke32(64'hC, 32'(off));
    end
    for (int i = 0; i < 3; i++) begin
      g_exmem[2].u_m.poke(64'h0 + 64'(2 * i), fe[i][7:0]); g_exmem[2].u_m.poke(64'h1 + 64'(2 * i), fe[i][15:8]);
      for (int b = 0; b < 8; b++) g_exmem[2].u_m.poke(64'h100 + 64'(8 * i + b), ff[i][b*8 +: 8]);
    end
  endtask

  // ---------------- Sequence ----------------
  initial begin
    int n_out;
    logic [31:0] v;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; wdata = 0; wstrb = 0; araddr = 0;
    ex_cmd_valid = 0; ex_unl_ready = '1;
    for (int f = 0; f < 3; f++) ex_cmd[f] = '{first_idx: 0, last_idx: 3, addr_a: 64'h0, addr_b: 64'h100, tag: 1'b0};
    load_tables();
    load_example();
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;

    // Example ArrayReaders: all three commands at once.
    @(negedge clk) ex_cmd_valid = 3'b111;
    while (ex_cmd_valid != 0) begin
      @(posedge clk);
      #1 ex_cmd_valid = ex_cmd_valid & ~ex_cmd_ready;
    end

    // Accelerator, run 1.
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
    reg_read(REG_STATUS, v);
    check(v[0] == 1'b1, "idle before start");
    run_query(THRESH, n_out);
    check_dinner(THRESH, n_out);
    for (int f = 0; f < 7; f++) check(n_unl[f] >= 1, $sformatf("field %0d unlocked", f));

    // Reset pulse, then a run without matches.
    reg_write(REG_CONTROL, 32'h4);
    reg_read(REG_STATUS, v);
    check(v[2] == 1'b0 && v[0] == 1'b1, "reset clears done");
    run_query(0, n_out);
    check(n_out == 0, "no matches with threshold 0");
    if (n_out == 0) n_zero_run++;

    wait (n_a == 3 && n_bl == 3 && n_bc == 3 && n_c == 3 && n_ex_unl == 3);
    check(1, "example ArrayReaders complete");

    $display("mechanisms: multi-beat reads %0d, max bursts %0d, contention %0d, write bursts %0d, partial strobes %0d",
             n_burst_multi, n_burst_max, n_contention, n_wburst, n_partial_strobe);
    $display("mechanisms: mem stalls %0d, kernel backpressure %0d, empty names %0d, unknown foods %0d, zero runs %0d, nulls %0d",
             n_mem_stall, n_kernel_bp, n_empty_name, n_unknown_food, n_zero_run, n_a_null);
    check(n_burst_multi > 0, "multi-beat read bursts occurred");
    check(n_burst_max > 0, "maximum-length read bursts occurred");
    check(n_contention > 0, "read arbitration contention occurred");
    check(n_wburst > 0, "multi-beat write bursts occurred");
    check(n_partial_strobe > 0, "partial byte strobes occurred");
    check(n_mem_stall > 0, "memory stalls occurred");
    check(n_kernel_bp > 0, "kernel backpressure occurred");
    check(n_empty_name > 0, "empty names occurred");
    check(n_unknown_food > 0, "unknown food ids occurred");
    check(n_zero_run > 0, "zero-match run occurred");
    check(n_a_null > 0, "null element occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
