// tb_array_reader_struct: checks the struct ArrayReader for
// Struct<E: Int16, F: Float64>.
//
// Field E holds a 16-bit pattern, field F a 64-bit pattern (the first three
// rows are the example's (42, 0.125), (1337, 0.0), (13, 2.7) in IEEE-754).
// For two row ranges every output beat must carry both fields of the same
// row, last on the final row, and each command must unlock once.
module tb_array_reader_struct;
  import fletcher_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [63:0] ABASE = 64'h4000, BBASE = 64'h10000;
  logic cmd_valid, cmd_ready, unl_valid, unl_ready; arr_cmd_t cmd; logic [TAG_W-1:0] unl_tag;
  logic q_valid, q_ready, d_valid, d_ready; bus_req_t q; bus_rdat_t d;
  logic out_valid, out_ready, out_last; logic [15:0] out_a; logic [63:0] out_b;

  array_reader_struct dut (
    .clk, .rst, .cmd_valid, .cmd_ready, .cmd, .unl_valid, .unl_ready, .unl_tag,
    .rreq_valid(q_valid), .rreq_ready(q_ready), .rreq(q), .rdat_valid(d_valid), .rdat_ready(d_ready), .rdat(d),
    .out_valid, .out_ready, .out_a, .out_b, .out_last);
  mem_model u_mem (.clk, .rst, .rreq_valid(q_valid), .rreq_ready(q_ready), .rreq(q),
    .rdat_valid(d_valid), .rdat_ready(d_ready), .rdat(d),
    .wreq_valid(1'b0), .wreq_ready(), .wreq('0), .wdat_valid(1'b0), .wdat_ready(), .wdat('0));

  function automatic logic [15:0] fa(int i);
    case (i) 0: return 16'd42; 1: return 16'd1337; 2: return 16'd13; default: return 16'(i * 31 + 7);
    endcase
  endfunction
  function automatic logic [63:0] fb(int i);
    case (i)
      0: return $realtobits(0.125);
      1: return $realtobits(0.0);
      2: return $realtobits(2.7);
      default: return 64'(i) * 64'h9E3779B97F4A7C15;
    endcase
  endfunction

  int n_unl = 0;
  always @(posedge clk) if (unl_valid && unl_ready) n_unl <= n_unl + 1;
  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  task automatic run(int first, int last, int nexp);
    int row;
    @(negedge clk);
    cmd = '{first_idx: 32'(first), last_idx: 32'(last), addr_a: ABASE, addr_b: BBASE, tag: 1'b1};
    cmd_valid = 1;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk) cmd_valid = 0;
    row = first;
    while (row < last) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        check(out_a == fa(row), $sformatf("field E row %0d", row));
        check(out_b == fb(row), $sformatf("field F row %0d", row));
        check(out_last == (row == last - 1), "last");
        row++;
      end
    end
    while (n_unl < nexp) @(posedge clk);
    check(unl_tag == 1'b1, "unlock tag");
  endtask

  initial begin
    cmd_valid = 0; unl_ready = 1; cmd = '0;
    for (int i = 0; i < 500; i++) begin
      u_mem.poke(ABASE + 64'(2*i), fa(i)[7:0]);
      u_mem.poke(ABASE + 64'(2*i + 1), fa(i)[15:8]);
      u_mem.poke32(BBASE + 64'(8*i), fb(i)[31:0]);
      u_mem.poke32(BBASE + 64'(8*i + 4), fb(i)[63:32]);
    end
    repeat (3) @(posedge clk);
    rst = 0;
    run(0, 3, 1);
    run(5, 400, 2);
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
