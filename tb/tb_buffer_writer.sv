// tb_buffer_writer: checks a values BufferWriter (uint8, up to 4 elements per
// beat, random counts) and an offsets BufferWriter against a memory model.
//
// The values writer starts at an unaligned element index; every written byte
// must match the input, and the sentinel bytes just before and after the
// range must be left untouched (strobes). The offsets writer must write the
// running sum of the input lengths, starting at 0, with one extra final
// offset. Unlock tags and the number of write bursts are checked.
module tb_buffer_writer;
  import fletcher_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic vc_valid, vc_ready, vu_valid, vu_ready; buf_cmd_t vc; logic [TAG_W-1:0] vu_tag;
  logic vq_valid, vq_ready, vd_valid, vd_ready; bus_req_t vq; bus_wdat_t vd;
  logic vi_valid, vi_ready, vi_last; logic [31:0] vi_data; logic [2:0] vi_count;

  buffer_writer #(.ELEM_W(8), .EPC(4)) u_val (
    .clk, .rst, .cmd_valid(vc_valid), .cmd_ready(vc_ready), .cmd(vc),
    .unl_valid(vu_valid), .unl_ready(vu_ready), .unl_tag(vu_tag),
    .wreq_valid(vq_valid), .wreq_ready(vq_ready), .wreq(vq),
    .wdat_valid(vd_valid), .wdat_ready(vd_ready), .wdat(vd),
    .in_valid(vi_valid), .in_ready(vi_ready), .in_data(vi_data), .in_count(vi_count), .in_last(vi_last));
  mem_model u_mv (.clk, .rst, .rreq_valid(1'b0), .rreq_ready(), .rreq('0), .rdat_valid(), .rdat_ready(1'b0), .rdat(),
    .wreq_valid(vq_valid), .wreq_ready(vq_ready), .wreq(vq), .wdat_valid(vd_valid), .wdat_ready(vd_ready), .wdat(vd));

  logic oc_valid, oc_ready, ou_valid, ou_ready; buf_cmd_t oc; logic [TAG_W-1:0] ou_tag;
  logic oq_valid, oq_ready, od_valid, od_ready; bus_req_t oq; bus_wdat_t od;
  logic oi_valid, oi_ready, oi_last; logic [31:0] oi_data;

  buffer_writer #(.ELEM_W(32), .EPC(1), .OFFSETS(1'b1)) u_off (
    .clk, .rst, .cmd_valid(oc_valid), .cmd_ready(oc_ready), .cmd(oc),
    .unl_valid(ou_valid), .unl_ready(ou_ready), .unl_tag(ou_tag),
    .wreq_valid(oq_valid), .wreq_ready(oq_ready), .wreq(oq),
    .wdat_valid(od_valid), .wdat_ready(od_ready), .wdat(od),
    .in_valid(oi_valid), .in_ready(oi_ready), .in_data(oi_data), .in_count(1'b1), .in_last(oi_last));
  mem_model u_mo (.clk, .rst, .rreq_valid(1'b0), .rreq_ready(), .rreq('0), .rdat_valid(), .rdat_ready(1'b0), .rdat(),
    .wreq_valid(oq_valid), .wreq_ready(oq_ready), .wreq(oq), .wdat_valid(od_valid), .wdat_ready(od_ready), .wdat(od));

  localparam logic [63:0] VBASE = 64'h2000, OBASE = 64'h9000;
  localparam int FIRST = 70, N = 1300, NL = 200;
  function automatic logic [7:0] vpat(int i); return 8'(i * 13 + 1); endfunction
  function automatic int lenpat(int i); return (i * 3) % 7; endfunction

  initial begin
    int sent, sum, burst_bytes;
    vc_valid = 0; oc_valid = 0; vu_ready = 1; ou_ready = 1; vi_valid = 0; oi_valid = 0;
    vc = '0; oc = '0; vi_data = '0; vi_count = '0; vi_last = 0; oi_data = '0; oi_last = 0;
    for (int i = FIRST - 8; i < FIRST + N + 8; i++) u_mv.poke(VBASE + 64'(i), 8'hEE);
    repeat (3) @(posedge clk);
    rst = 0;
    fork
      begin  // values writer
        @(negedge clk);
        vc = '{first_idx: 32'(FIRST), last_idx: 32'(FIRST + N), base: VBASE, tag: 1'b1};
        vc_valid = 1;
        do @(posedge clk); while (!vc_ready);
        @(negedge clk) vc_valid = 0;
        sent = 0;
        while (sent < N) begin
          int k;
          k = $urandom_range(1, 4);
          if (k > N - sent) k = N - sent;
          vi_data = '0;
          for (int e = 0; e < k; e++) vi_data[e*8 +: 8] = vpat(sent + e);
          vi_count = 3'(k); vi_last = (sent + k == N);
          vi_valid = ($urandom_range(0, 4) != 0);
          @(posedge clk);
          if (vi_valid && vi_ready) sent += k;
          @(negedge clk);
        end
        vi_valid = 0;
        do @(posedge clk); while (!(vu_valid && vu_ready));
        check(vu_tag == 1'b1, "values unlock tag");
      end
      begin  // offsets writer
        @(negedge clk);
        oc = '{first_idx: 32'd0, last_idx: 32'(NL), base: OBASE, tag: 1'b0};
        oc_valid = 1;
        do @(posedge clk); while (!oc_ready);
        @(negedge clk) oc_valid = 0;
        for (int i = 0; i < NL; i++) begin
          oi_data = 32'(lenpat(i)); oi_last = (i == NL - 1); oi_valid = 1;
          do @(posedge clk); while (!oi_ready);
          @(negedge clk);
        end
        oi_valid = 0;
        do @(posedge clk); while (!(ou_valid && ou_ready));
        check(ou_tag == 1'b0, "offsets unlock tag");
      end
    join
    repeat (20) @(posedge clk);
    for (int i = FIRST - 8; i < FIRST + N + 8; i++) begin
      logic [7:0] exp;
      exp = (i < FIRST || i >= FIRST + N) ? 8'hEE : vpat(i - FIRST);
      check(u_mv.peek(VBASE + 64'(i)) == exp, $sformatf("byte %0d: %h exp %h", i, u_mv.peek(VBASE + 64'(i)), exp));
    end
    sum = 0;
    for (int i = 0; i <= NL; i++) begin
      check(u_mo.peek32(OBASE + 64'(4*i)) == 32'(sum), $sformatf("offset %0d: %0d exp %0d", i, u_mo.peek32(OBASE + 64'(4*i)), sum));
      if (i < NL) sum += lenpat(i);
    end
    // Words 1..21 of the values buffer: 21 words -> bursts 16 + 5
    check(u_mv.n_wreq == 2, $sformatf("values bursts %0d exp 2", u_mv.n_wreq));
    check(u_mo.n_wreq == 1, $sformatf("offsets bursts %0d exp 1", u_mo.n_wreq));
    burst_bytes = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Write data beats must end exactly at each burst length.
  int beat_v = 0;
  always @(posedge clk) if (vd_valid && vd_ready) begin
    check(vd.last == (beat_v == int'(u_mv.wq[0].len) - 1), "write last flag at burst end");
    beat_v = vd.last ? 0 : beat_v + 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
