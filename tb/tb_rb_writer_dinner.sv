// tb_rb_writer_dinner: checks the dinner RecordBatchWriter with EPC = 4
// characters per beat.
//
// Commands for rows [0, 90) go to both fields; a driver then offers the
// 90 name and food strings (0..12 characters, some empty) as length streams
// and character streams of up to four characters per beat, with random gaps.
// Each writer has its own memory model. Afterwards the offsets buffers must
// hold the running sums of the lengths (91 entries) and the values buffers
// the concatenated strings, and each command must unlock once.
module tb_rb_writer_dinner;
  import fletcher_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int EPC = 4, N = 90;
  logic [1:0] cmd_valid, cmd_ready, unl_valid, unl_ready, wreq_valid, wreq_ready, wdat_valid, wdat_ready;
  arr_cmd_t cmd [2]; bus_req_t wreq [2]; bus_wdat_t wdat [2];
  logic dinner_name_valid, dinner_name_last, dinner_name_ready; logic [INDEX_W-1:0] dinner_name_length;
  logic dinner_name_chars_valid, dinner_name_chars_last, dinner_name_chars_ready;
  logic [EPC*8-1:0] dinner_name_chars; logic [2:0] dinner_name_chars_count;
  logic dinner_food_valid, dinner_food_last, dinner_food_ready; logic [INDEX_W-1:0] dinner_food_length;
  logic dinner_food_chars_valid, dinner_food_chars_last, dinner_food_chars_ready;
  logic [EPC*8-1:0] dinner_food_chars; logic [2:0] dinner_food_chars_count;
  rb_writer_dinner #(.EPC(EPC)) dut (.*);
  for (genvar g = 0; g < 2; g++) begin : g_mem
    mem_model u_m (.clk, .rst, .rreq_valid(1'b0), .rreq_ready(), .rreq('0), .rdat_valid(), .rdat_ready(1'b1), .rdat(),
      .wreq_valid(wreq_valid[g]), .wreq_ready(wreq_ready[g]), .wreq(wreq[g]),
      .wdat_valid(wdat_valid[g]), .wdat_ready(wdat_ready[g]), .wdat(wdat[g]));
  end
  localparam logic [63:0] OFF_BASE = 64'h1000, VAL_BASE = 64'h2000;
  function automatic string str(int f, int i);
    string s;
    s = "";
    for (int k = 0; k < (i * (5 + f) + f) % 13; k++) s = {s, string'(8'(65 + f * 32 + (i + k) % 26))};
    return s;
  endfunction

  // Per field: length stream driver and character stream driver.
  int l_row [2], c_row [2], c_pos [2], n_unl = 0;
  logic [1:0] l_fire = '0, c_fire = '0;
  always @(posedge clk) begin
    l_fire <= {dinner_food_valid && dinner_food_ready, dinner_name_valid && dinner_name_ready};
    c_fire <= {dinner_food_chars_valid && dinner_food_chars_ready, dinner_name_chars_valid && dinner_name_chars_ready};
    if (!rst) for (int f = 0; f < 2; f++) if (unl_valid[f] && unl_ready[f]) n_unl++;
  end
  task automatic drive_len(int f);
    logic v, l; logic [31:0] d;
    v = (l_row[f] < N) && ($urandom_range(0, 3) != 0);
    d = 32'(str(f, l_row[f]).len());
    l = (l_row[f] == N - 1);
    if (f == 0) begin dinner_name_valid = v; dinner_name_length = d; dinner_name_last = l; end
    else        begin dinner_food_valid = v; dinner_food_length = d; dinner_food_last = l; end
  endtask
  task automatic drive_chr(int f);
    string s;
    int n;
    logic [EPC*8-1:0] d;
    s = str(f, c_row[f]);
    n = s.len() - c_pos[f];
    if (n > EPC) n = EPC;
    d = '0;
    for (int e = 0; e < n; e++) d[e*8 +: 8] = s[c_pos[f] + e];
    if (f == 0) begin
      dinner_name_chars_valid = (c_row[f] < N) && ($urandom_range(0, 3) != 0);
      dinner_name_chars = d; dinner_name_chars_count = 3'(n); dinner_name_chars_last = (c_pos[f] + n == s.len());
    end else begin
      dinner_food_chars_valid = (c_row[f] < N) && ($urandom_range(0, 3) != 0);
      dinner_food_chars = d; dinner_food_chars_count = 3'(n); dinner_food_chars_last = (c_pos[f] + n == s.len());
    end
  endtask
  always @(negedge clk) if (!rst) for (int f = 0; f < 2; f++) begin
    if (l_fire[f]) l_row[f]++;
    if (c_fire[f]) begin
      int n;
      n = str(f, c_row[f]).len() - c_pos[f];
      if (n <= EPC) begin c_row[f]++; c_pos[f] = 0; end else c_pos[f] += EPC;
    end
    if (!(f == 0 ? dinner_name_valid : dinner_food_valid) || l_fire[f]) drive_len(f);
    if (!(f == 0 ? dinner_name_chars_valid : dinner_food_chars_valid) || c_fire[f]) drive_chr(f);
  end

  function automatic logic [7:0] peek(int f, logic [63:0] a);
    return (f == 0) ? g_mem[0].u_m.peek(a) : g_mem[1].u_m.peek(a);
  endfunction
  task automatic check_field(int f);
    int off;
    off = 0;
    for (int i = 0; i <= N; i++) begin
      logic [31:0] o;
      for (int b = 0; b < 4; b++) o[b*8 +: 8] = peek(f, OFF_BASE + 64'(4 * i + b));
      check(o == 32'(off), $sformatf("field %0d offset %0d", f, i));
      if (i < N) begin
        string s;
        s = str(f, i);
        for (int k = 0; k < s.len(); k++)
          check(peek(f, VAL_BASE + 64'(off + k)) == s[k], $sformatf("field %0d row %0d char %0d", f, i, k));
        off += s.len();
      end
    end
  endtask

  initial begin
    for (int f = 0; f < 2; f++) begin l_row[f] = 0; c_row[f] = 0; c_pos[f] = 0; end
    dinner_name_valid = 0; dinner_food_valid = 0; dinner_name_chars_valid = 0; dinner_food_chars_valid = 0;
    dinner_name_length = 0; dinner_food_length = 0; dinner_name_last = 0; dinner_food_last = 0;
    dinner_name_chars = 0; dinner_food_chars = 0; dinner_name_chars_count = 0; dinner_food_chars_count = 0;
    dinner_name_chars_last = 0; dinner_food_chars_last = 0;
    cmd_valid = 0; unl_ready = '1;
    for (int f = 0; f < 2; f++) cmd[f] = '{first_idx: 0, last_idx: N, addr_a: OFF_BASE, addr_b: VAL_BASE, tag: 1'b0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) cmd_valid = 2'b11;
    while (cmd_valid != 0) begin @(posedge clk); #1 cmd_valid = cmd_valid & ~cmd_ready; end
    wait (n_unl == 2);
    repeat (5) @(posedge clk);
    check_field(0);
    check_field(1);
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
