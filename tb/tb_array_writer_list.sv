// tb_array_writer_list: checks the list (string) ArrayWriter with four
// characters per beat.
//
// Writes generated strings (some empty, one batch starting with the example
// names) as a length stream and a character stream, the two driven
// independently with random gaps, then reads memory back: the offsets buffer
// must hold the running sums from 0 and the values buffer every character
// in order. Each command must unlock once with its tag.
module tb_array_writer_list;
  import fletcher_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int NROW = 90;
  localparam logic [63:0] OBASE = 64'h4000, VBASE = 64'h10000;
  logic cmd_valid, cmd_ready, unl_valid, unl_ready; arr_cmd_t cmd; logic [TAG_W-1:0] unl_tag;
  logic q_valid, q_ready, d_valid, d_ready; bus_req_t q; bus_wdat_t d;
  logic len_valid, len_ready, len_last; logic [31:0] len_data;
  logic val_valid, val_ready, val_last; logic [31:0] val_data; logic [2:0] val_count;

  array_writer_list #(.ELEM_W(8), .EPC(4)) dut (
    .clk, .rst, .cmd_valid, .cmd_ready, .cmd, .unl_valid, .unl_ready, .unl_tag,
    .wreq_valid(q_valid), .wreq_ready(q_ready), .wreq(q), .wdat_valid(d_valid), .wdat_ready(d_ready), .wdat(d),
    .len_valid, .len_ready, .len_data, .len_last, .val_valid, .val_ready, .val_data, .val_count, .val_last);
  mem_model u_mem (.clk, .rst, .rreq_valid(1'b0), .rreq_ready(), .rreq('0), .rdat_valid(), .rdat_ready(1'b0), .rdat(),
    .wreq_valid(q_valid), .wreq_ready(q_ready), .wreq(q), .wdat_valid(d_valid), .wdat_ready(d_ready), .wdat(d));

  string strs [NROW];
  int n_unl = 0;
  always @(posedge clk) if (unl_valid && unl_ready) n_unl <= n_unl + 1;

  initial begin
    int total;
    cmd_valid = 0; unl_ready = 1; cmd = '0;
    len_valid = 0; len_data = '0; len_last = 0; val_valid = 0; val_data = '0; val_count = '0; val_last = 0;
    strs[0] = "apple"; strs[1] = "pear"; strs[2] = "";
    for (int i = 3; i < NROW; i++) begin
      strs[i] = "";
      for (int k = 0; k < (i * 5) % 11; k++) strs[i] = {strs[i], string'(8'(65 + (i + k) % 26))};
    end
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    cmd = '{first_idx: 32'd0, last_idx: 32'(NROW), addr_a: OBASE, addr_b: VBASE, tag: 1'b1};
    cmd_valid = 1;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk) cmd_valid = 0;
    fork
      for (int i = 0; i < NROW; i++) begin
        while ($urandom_range(0, 2) == 0) @(negedge clk);
        len_data = 32'(strs[i].len()); len_last = (i == NROW - 1); len_valid = 1;
        do @(posedge clk); while (!len_ready);
        @(negedge clk) len_valid = 0;
      end
      for (int i = 0; i < NROW; i++) begin
        int pos;
        pos = 0;
        do begin
          int k;
          k = strs[i].len() - pos;
          if (k > 4) k = 4;
          val_data = '0;
          for (int e = 0; e < k; e++) val_data[e*8 +: 8] = strs[i][pos + e];
          val_count = 3'(k); val_last = (pos + k == strs[i].len()); val_valid = 1;
          do @(posedge clk); while (!val_ready);
          @(negedge clk) val_valid = 0;
          pos += k;
          while ($urandom_range(0, 3) == 0) @(negedge clk);
        end while (pos < strs[i].len());
      end
    join
    while (n_unl < 1) @(posedge clk);
    check(unl_tag == 1'b1, "unlock tag");
    repeat (10) @(posedge clk);
    total = 0;
    for (int i = 0; i <= NROW; i++) begin
      check(u_mem.peek32(OBASE + 64'(4*i)) == 32'(total), $sformatf("offset %0d", i));
      if (i < NROW) begin
        for (int k = 0; k < strs[i].len(); k++)
          check(u_mem.peek(VBASE + 64'(total + k)) == strs[i][k], $sformatf("char row %0d pos %0d", i, k));
        total += strs[i].len();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
