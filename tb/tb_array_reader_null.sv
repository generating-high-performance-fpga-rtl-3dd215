// tb_array_reader_null: checks the nullable primitive ArrayReader (Float32
// values plus validity bitmap).
//
// The bitmap is a generated bit pattern and the values a generated 32-bit
// pattern. For two row ranges (one longer than a 512-bit bitmap word, one
// starting in the middle of a word) every output beat must pair the right
// validity bit with the right value, with last on the final row and one
// unlock per command.
module tb_array_reader_null;
  import fletcher_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [63:0] BBASE = 64'h4000, VBASE = 64'h10000;
  logic cmd_valid, cmd_ready, unl_valid, unl_ready; arr_cmd_t cmd; logic [TAG_W-1:0] unl_tag;
  logic q_valid, q_ready, d_valid, d_ready; bus_req_t q; bus_rdat_t d;
  logic out_valid, out_ready, out_validity, out_last; logic [31:0] out_data;

  array_reader_null #(.ELEM_W(32)) dut (
    .clk, .rst, .cmd_valid, .cmd_ready, .cmd, .unl_valid, .unl_ready, .unl_tag,
    .rreq_valid(q_valid), .rreq_ready(q_ready), .rreq(q), .rdat_valid(d_valid), .rdat_ready(d_ready), .rdat(d),
    .out_valid, .out_ready, .out_validity, .out_data, .out_last);
  mem_model u_mem (.clk, .rst, .rreq_valid(q_valid), .rreq_ready(q_ready), .rreq(q),
    .rdat_valid(d_valid), .rdat_ready(d_ready), .rdat(d),
    .wreq_valid(1'b0), .wreq_ready(), .wreq('0), .wdat_valid(1'b0), .wdat_ready(), .wdat('0));

  function automatic bit vbit(int i); return ((i * 37) % 5) != 0; endfunction
  function automatic logic [31:0] val(int i); return 32'(i) * 32'h9E3779B1; endfunction

  int n_unl = 0;
  always @(posedge clk) if (unl_valid && unl_ready) n_unl <= n_unl + 1;
  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  task automatic run(int first, int last, int nexp);
    int row;
    @(negedge clk);
    cmd = '{first_idx: 32'(first), last_idx: 32'(last), addr_a: BBASE, addr_b: VBASE, tag: 1'b0};
    cmd_valid = 1;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk) cmd_valid = 0;
    row = first;
    while (row < last) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        check(out_validity == vbit(row), $sformatf("validity row %0d", row));
        check(out_data == val(row), $sformatf("value row %0d", row));
        check(out_last == (row == last - 1), "last");
        row++;
      end
    end
    while (n_unl < nexp) @(posedge clk);
    check(unl_tag == 1'b0, "unlock tag");
  endtask

  initial begin
    cmd_valid = 0; unl_ready = 1; cmd = '0;
    for (int i = 0; i < 1200; i++) u_mem.poke32(VBASE + 64'(4*i), val(i));
    for (int b = 0; b < 1200 / 8; b++) begin
      logic [7:0] by;
      for (int k = 0; k < 8; k++) by[k] = vbit(b*8 + k);
      u_mem.poke(BBASE + 64'(b), by);
    end
    repeat (3) @(posedge clk);
    rst = 0;
    run(0, 1100, 1);
    run(600, 650, 2);
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
