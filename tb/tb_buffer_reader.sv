// tb_buffer_reader: checks a values BufferReader (uint8, 4 elements per
// beat) and an offsets BufferReader against a memory model.
//
// Values: several commands with unaligned first indices, ranges spanning
// many bursts, and an empty range; every element, beat count, last flag and
// unlock tag is compared with the preloaded pattern. Offsets: the child
// command must carry offset[first] and offset[last], and the length stream
// must equal the differences of consecutive offsets.
module tb_buffer_reader;
  import fletcher_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- values reader ----------------
  logic vc_valid, vc_ready, vu_valid, vu_ready;
  buf_cmd_t vc;
  logic [TAG_W-1:0] vu_tag;
  logic vq_valid, vq_ready, vd_valid, vd_ready;
  bus_req_t vq; bus_rdat_t vd;
  logic vo_valid, vo_ready, vo_last;
  logic [31:0] vo_data; logic [2:0] vo_count;

  buffer_reader #(.ELEM_W(8), .EPC(4)) u_val (
    .clk, .rst, .cmd_valid(vc_valid), .cmd_ready(vc_ready), .cmd(vc),
    .unl_valid(vu_valid), .unl_ready(vu_ready), .unl_tag(vu_tag),
    .rreq_valid(vq_valid), .rreq_ready(vq_ready), .rreq(vq),
    .rdat_valid(vd_valid), .rdat_ready(vd_ready), .rdat(vd),
    .out_valid(vo_valid), .out_ready(vo_ready), .out_data(vo_data), .out_count(vo_count), .out_last(vo_last),
    .ccmd_valid(), .ccmd_ready(1'b1), .ccmd_first(), .ccmd_last());

  mem_model u_mv (.clk, .rst, .rreq_valid(vq_valid), .rreq_ready(vq_ready), .rreq(vq),
    .rdat_valid(vd_valid), .rdat_ready(vd_ready), .rdat(vd),
    .wreq_valid(1'b0), .wreq_ready(), .wreq('0), .wdat_valid(1'b0), .wdat_ready(), .wdat('0));

  // ---------------- offsets reader ----------------
  logic oc_valid, oc_ready, ou_valid, ou_ready;
  buf_cmd_t oc;
  logic [TAG_W-1:0] ou_tag;
  logic oq_valid, oq_ready, od_valid, od_ready;
  bus_req_t oq; bus_rdat_t od;
  logic oo_valid, oo_ready, oo_last;
  logic [31:0] oo_data; logic oo_count;
  logic cc_valid, cc_ready;
  logic [31:0] cc_first, cc_last;

  buffer_reader #(.ELEM_W(32), .EPC(1), .OFFSETS(1'b1)) u_off (
    .clk, .rst, .cmd_valid(oc_valid), .cmd_ready(oc_ready), .cmd(oc),
    .unl_valid(ou_valid), .unl_ready(ou_ready), .unl_tag(ou_tag),
    .rreq_valid(oq_valid), .rreq_ready(oq_ready), .rreq(oq),
    .rdat_valid(od_valid), .rdat_ready(od_ready), .rdat(od),
    .out_valid(oo_valid), .out_ready(oo_ready), .out_data(oo_data), .out_count(oo_count), .out_last(oo_last),
    .ccmd_valid(cc_valid), .ccmd_ready(cc_ready), .ccmd_first(cc_first), .ccmd_last(cc_last));

  mem_model u_mo (.clk, .rst, .rreq_valid(oq_valid), .rreq_ready(oq_ready), .rreq(oq),
    .rdat_valid(od_valid), .rdat_ready(od_ready), .rdat(od),
    .wreq_valid(1'b0), .wreq_ready(), .wreq('0), .wdat_valid(1'b0), .wdat_ready(), .wdat('0));

  always @(negedge clk) begin
    vo_ready <= ($urandom_range(0, 3) != 0);
    oo_ready <= ($urandom_range(0, 3) != 0);
  end

  localparam logic [63:0] VBASE = 64'h1000;
  localparam logic [63:0] OBASE = 64'h8000;
  function automatic logic [7:0] vpat(int i); return 8'(i * 7 + 3); endfunction
  function automatic int lenpat(int i); return (i * 5) % 11; endfunction
  int offs [0:400];

  // Values command runner
  task automatic run_values(int first, int last, logic [TAG_W-1:0] tag);
    int idx, beats;
    bit seen_last;
    @(negedge clk);
    vc = '{first_idx: 32'(first), last_idx: 32'(last), base: VBASE, tag: tag};
    vc_valid = 1;
    do @(posedge clk); while (!vc_ready);
    @(negedge clk) vc_valid = 0;
    idx = first; seen_last = (first == last); beats = 0;
    while (!seen_last) begin
      @(posedge clk);
      if (vo_valid && vo_ready) begin
        int expc;
        expc = (last - idx < 4) ? last - idx : 4;
        check(int'(vo_count) == expc, $sformatf("values count %0d exp %0d at %0d", vo_count, expc, idx));
        for (int e = 0; e < int'(vo_count); e++) begin
          check(vo_data[e*8 +: 8] == vpat(idx), $sformatf("value at %0d: %h exp %h", idx, vo_data[e*8 +: 8], vpat(idx)));
          idx++;
        end
        seen_last = vo_last;
        check(vo_last == (idx == last), "values last flag");
        beats++;
      end
    end
    do @(posedge clk); while (!(vu_valid && vu_ready));
    check(vu_tag == tag, "values unlock tag");
  endtask

  initial begin
    vc_valid = 0; oc_valid = 0; vu_ready = 1; ou_ready = 1; cc_ready = 1;
    vc = '0; oc = '0;
    offs[0] = 0;
    for (int i = 0; i < 400; i++) offs[i+1] = offs[i] + lenpat(i);
    for (int i = 0; i < 3000; i++) u_mv.poke(VBASE + 64'(i), vpat(i));
    for (int i = 0; i <= 400; i++) u_mo.poke32(OBASE + 64'(4*i), 32'(offs[i]));
    repeat (3) @(posedge clk);
    rst = 0;
    run_values(5, 150, 1'b1);
    run_values(0, 64, 1'b0);
    run_values(63, 1200, 1'b1);   // spans more than one 16-word burst
    run_values(7, 7, 1'b0);       // empty range: unlock only
    run_values(2999, 3000, 1'b1);


    // Offsets reader: rows [3, 300)
    begin
      int row, nlen;
      bit got_cc;
      logic [63:0] reqs0;
      @(negedge clk);
      oc = '{first_idx: 32'd3, last_idx: 32'd300, base: OBASE, tag: 1'b1};
      oc_valid = 1;
      do @(posedge clk); while (!oc_ready);
      @(negedge clk) oc_valid = 0;
      row = 3; got_cc = 0; nlen = 0;
      while (row < 300) begin
        @(posedge clk);
        if (cc_valid && cc_ready) begin
          got_cc = 1;
          check(cc_first == 32'(offs[3]) && cc_last == 32'(offs[300]), "child command offsets");
        end
        if (oo_valid && oo_ready) begin
          check(got_cc, "child command before lengths");
          check(oo_data == 32'(lenpat(row)), $sformatf("length row %0d: %0d exp %0d", row, oo_data, lenpat(row)));
          check(oo_last == (row == 299), "length last flag");
          row++;
        end
      end
      do @(posedge clk); while (!(ou_valid && ou_ready));
      check(ou_tag == 1'b1, "offsets unlock tag");
      // 2 probe words + 19 words of offsets in 2 bursts
      check(u_mo.n_rreq == 4, $sformatf("offsets reader requests %0d exp 4", u_mo.n_rreq));
      reqs0 = 64'(u_mv.n_rreq);
      check(reqs0 == 1 + 1 + 2 + 0 + 1, $sformatf("values reader requests %0d exp 5", reqs0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog"); $display("V rs=%0d ds=%0d el_left=%0d bf_valid=%0b vq=%0b/%0b vd=%0b/%0b rs_valid=%0b ba_valid=%0b", u_val.rs, u_val.ds, u_val.el_left, u_val.bf_valid, vq_valid,vq_ready,vd_valid,vd_ready, u_val.rs_valid, u_val.ba_valid); $display("rs=%0d ds=%0d el_left=%0d bf_valid=%0b cc_valid=%0b oo_valid=%0b rs_valid=%0b", u_off.rs, u_off.ds, u_off.el_left, u_off.bf_valid, cc_valid, oo_valid, u_off.rs_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
