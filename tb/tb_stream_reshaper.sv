// tb_stream_reshaper: checks the MEPH reshaper in both directions.
//
// Instance A turns beats of up to 4 elements into beats of up to 3, with a
// random out_max per cycle; instance B turns single elements into beats of
// up to 4. Random packets (element counts 0..4 per input beat, last on the
// final beat) pass under random backpressure. For each instance the
// sequence of output elements must equal the input sequence, no output beat
// may hold more than min(OUT_EPC, out_max) elements, unused element lanes
// must be zero, and exactly the final beat of each packet carries last (each
// output packet holds as many elements as its input packet).
module tb_stream_reshaper;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // A: 4 -> 3 with out_max
  logic a_iv, a_ir, a_il, a_ov, a_or, a_ol;
  logic [31:0] a_id; logic [2:0] a_ic; logic [23:0] a_od; logic [1:0] a_oc; logic [31:0] a_max;
  stream_reshaper #(.ELEM_W(8), .IN_EPC(4), .OUT_EPC(3)) u_a (.clk, .rst,
    .in_valid(a_iv), .in_ready(a_ir), .in_data(a_id), .in_count(a_ic), .in_last(a_il), .out_max(a_max),
    .out_valid(a_ov), .out_ready(a_or), .out_data(a_od), .out_count(a_oc), .out_last(a_ol));
  // B: 1 -> 4
  logic b_iv, b_ir, b_il, b_ov, b_or, b_ol;
  logic [7:0] b_id; logic [0:0] b_ic; logic [31:0] b_od; logic [2:0] b_oc;
  stream_reshaper #(.ELEM_W(8), .IN_EPC(1), .OUT_EPC(4)) u_b (.clk, .rst,
    .in_valid(b_iv), .in_ready(b_ir), .in_data(b_id), .in_count(b_ic), .in_last(b_il), .out_max(32'd4),
    .out_valid(b_ov), .out_ready(b_or), .out_data(b_od), .out_count(b_oc), .out_last(b_ol));

  logic [7:0] a_exp [$], b_exp [$];
  int a_pk_in = 0, a_pk_out = 0, b_pk_in = 0, b_pk_out = 0;
  int a_beats = 0, b_beats = 0;
  int a_pk_len [$], a_cur_in = 0, a_cur_out = 0;
  byte unsigned seq_a = 0, seq_b = 0;
  localparam int NPK = 300;

  logic a_fire = 0, b_fire = 0;
  always @(posedge clk) begin a_fire <= a_iv && a_ir; b_fire <= b_iv && b_ir; end
  always @(negedge clk) begin
    if (!a_iv || a_fire) begin
      a_iv = (a_pk_in < NPK) && ($urandom_range(0, 3) != 0);
      a_ic = 3'($urandom_range(0, 4));
      a_il = ($urandom_range(0, 3) == 0);
      a_id = $urandom;
      for (int e = 0; e < 4; e++) if (e < int'(a_ic)) begin a_id[e*8 +: 8] = seq_a; seq_a++; end
    end
    a_or  <= ($urandom_range(0, 2) != 0);
    a_max <= 32'($urandom_range(1, 4));
    if (!b_iv || b_fire) begin
      b_iv = (b_pk_in < NPK) && ($urandom_range(0, 3) != 0);
      b_ic = 1'b1;
      b_il = ($urandom_range(0, 4) == 0);
      b_id = seq_b; seq_b++;
    end
    b_or <= ($urandom_range(0, 2) != 0);
  end

  always @(posedge clk) if (!rst) begin
    if (a_iv && a_ir) begin
      for (int e = 0; e < int'(a_ic); e++) a_exp.push_back(a_id[e*8 +: 8]);
      a_cur_in += int'(a_ic);
      if (a_il) begin a_pk_in++; a_pk_len.push_back(a_cur_in); a_cur_in = 0; end
    end
    if (a_ov && a_or) begin
      int lim;
      lim = (a_max < 3) ? int'(a_max) : 3;
      check(int'(a_oc) <= lim, $sformatf("A beat %0d count %0d within %0d", a_beats, a_oc, lim));
      for (int e = 0; e < 3; e++)
        if (e < int'(a_oc)) begin
          check(a_exp.size() > 0 && a_od[e*8 +: 8] == a_exp[0], $sformatf("A element, beat %0d", a_beats));
          if (a_exp.size() > 0) void'(a_exp.pop_front());
        end else check(a_od[e*8 +: 8] == 0, "A unused lane zero");
      a_cur_out += int'(a_oc);
      if (a_ol) begin
        check(a_pk_out < a_pk_in, "A last only after an input last");
        check(a_pk_len.size() > 0 && a_cur_out == a_pk_len[0], $sformatf("A packet %0d size", a_pk_out));
        if (a_pk_len.size() > 0) void'(a_pk_len.pop_front());
        a_cur_out = 0;
        a_pk_out++;
      end
      a_beats++;
    end
    if (b_iv && b_ir) begin
      b_exp.push_back(b_id);
      if (b_il) b_pk_in++;
    end
    if (b_ov && b_or) begin
      check(int'(b_oc) <= 4, "B count");
      check(b_ol || b_oc == 4, $sformatf("B full beats except at the end (%0d)", b_oc));
      for (int e = 0; e < 4; e++)
        if (e < int'(b_oc)) begin
          check(b_exp.size() > 0 && b_od[e*8 +: 8] == b_exp[0], "B element");
          if (b_exp.size() > 0) void'(b_exp.pop_front());
        end
      if (b_ol) begin
        check(b_pk_out < b_pk_in, "B last only after an input last");
        b_pk_out++;
      end
      b_beats++;
    end
  end

  initial begin
    a_iv = 0; b_iv = 0; a_or = 0; b_or = 0; a_max = 3; a_id = 0; b_id = 0; a_ic = 0; b_ic = 0; a_il = 0; b_il = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (a_pk_out == NPK && b_pk_out == NPK);
    repeat (5) @(posedge clk);
    check(a_exp.size() == 0 && b_exp.size() == 0, "all elements delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
