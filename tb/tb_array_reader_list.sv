// tb_array_reader_list: checks the list (string) ArrayReader with four
// characters per beat.
//
// The string column starts with "apple", "pear", "banana", "melon" and goes
// on with generated strings, some of them empty. For two row ranges the
// length stream must give every string length (last on the final row) and
// the character stream every character, never crossing a string boundary
// (so "apple" arrives as 4 + 1 characters), with last at the end of each
// string and an empty beat for an empty string.
module tb_array_reader_list;
  import fletcher_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int NROW = 80;
  localparam logic [63:0] OBASE = 64'h4000, VBASE = 64'h10000;
  logic cmd_valid, cmd_ready, unl_valid, unl_ready; arr_cmd_t cmd; logic [TAG_W-1:0] unl_tag;
  logic q_valid, q_ready, d_valid, d_ready; bus_req_t q; bus_rdat_t d;
  logic len_valid, len_ready, len_last; logic [31:0] len_data;
  logic val_valid, val_ready, val_dvalid, val_last; logic [31:0] val_data; logic [2:0] val_count;

  array_reader_list #(.ELEM_W(8), .EPC(4)) dut (
    .clk, .rst, .cmd_valid, .cmd_ready, .cmd, .unl_valid, .unl_ready, .unl_tag,
    .rreq_valid(q_valid), .rreq_ready(q_ready), .rreq(q), .rdat_valid(d_valid), .rdat_ready(d_ready), .rdat(d),
    .len_valid, .len_ready, .len_data, .len_last,
    .val_valid, .val_ready, .val_data, .val_count, .val_dvalid, .val_last);
  mem_model u_mem (.clk, .rst, .rreq_valid(q_valid), .rreq_ready(q_ready), .rreq(q),
    .rdat_valid(d_valid), .rdat_ready(d_ready), .rdat(d),
    .wreq_valid(1'b0), .wreq_ready(), .wreq('0), .wdat_valid(1'b0), .wdat_ready(), .wdat('0));

  string strs [NROW];
  int    offs [NROW+1];

  always @(negedge clk) begin
    len_ready <= ($urandom_range(0, 2) != 0);
    val_ready <= ($urandom_range(0, 3) != 0);
  end

  task automatic run(int first, int last);
    int lrow, vrow, pos, nfirst_beats;
    @(negedge clk);
    cmd = '{first_idx: 32'(first), last_idx: 32'(last), addr_a: OBASE, addr_b: VBASE, tag: 1'b1};
    cmd_valid = 1;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk) cmd_valid = 0;
    lrow = first; vrow = first; pos = 0; nfirst_beats = 0;
    while (lrow < last || vrow < last) begin
      @(posedge clk);
      if (len_valid && len_ready) begin
        check(int'(len_data) == strs[lrow].len(), $sformatf("length row %0d: %0d exp %0d", lrow, len_data, strs[lrow].len()));
        check(len_last == (lrow == last - 1), "length last");
        lrow++;
      end
      if (val_valid && val_ready) begin
        int rest;
        rest = strs[vrow].len() - pos;
        check(int'(val_count) == ((rest < 4) ? rest : 4), $sformatf("char count row %0d: %0d", vrow, val_count));
        check(val_dvalid == (val_count != 0), "dvalid");
        for (int e = 0; e < int'(val_count); e++)
          check(val_data[e*8 +: 8] == strs[vrow][pos + e], $sformatf("char row %0d pos %0d", vrow, pos + e));
        pos += int'(val_count);
        if (vrow == 0) nfirst_beats++;
        check(val_last == (pos == strs[vrow].len()), $sformatf("char last row %0d", vrow));
        if (val_last) begin
          if (vrow == 0) check(nfirst_beats == 2, "\"apple\" takes two beats of four");
          vrow++; pos = 0;
        end
      end
    end
    while (n_unl < n_cmd) @(posedge clk);
    check(last_tag == 1'b1, "unlock tag");
  endtask

  // Unlocks may come before the final characters leave the cutter.
  int n_unl = 0, n_cmd = 0;
  logic [TAG_W-1:0] last_tag;
  always @(posedge clk) begin
    if (unl_valid && unl_ready) begin n_unl <= n_unl + 1; last_tag <= unl_tag; end
    if (cmd_valid && cmd_ready) n_cmd <= n_cmd + 1;
  end

  initial begin
    cmd_valid = 0; unl_ready = 1; cmd = '0;
    strs[0] = "apple"; strs[1] = "pear"; strs[2] = "banana"; strs[3] = "melon";
    for (int i = 4; i < NROW; i++) begin
      strs[i] = "";
      for (int k = 0; k < (i * 7) % 13; k++) strs[i] = {strs[i], string'(8'(97 + (i + k) % 26))};
    end
    offs[0] = 0;
    for (int i = 0; i < NROW; i++) offs[i+1] = offs[i] + strs[i].len();
    for (int i = 0; i <= NROW; i++) u_mem.poke32(OBASE + 64'(4*i), 32'(offs[i]));
    for (int i = 0; i < NROW; i++)
      for (int k = 0; k < strs[i].len(); k++) u_mem.poke(VBASE + 64'(offs[i] + k), strs[i][k]);
    repeat (3) @(posedge clk);
    rst = 0;
    run(0, NROW);
    run(13, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog o.rs=%0d o.ds=%0d v.rs=%0d v.ds=%0d act=%0d rem=%0d lf=%0b/%0d cut_v=%0b cut_cnt=%0d v_el_left=%0d", dut.u_offsets.rs, dut.u_offsets.ds, dut.u_values.rs, dut.u_values.ds, dut.active, dut.rem, dut.lf_valid, dut.lf_len, dut.c_valid, dut.u_cutter.cnt_q, dut.u_values.el_left);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
