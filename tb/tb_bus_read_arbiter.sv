// tb_bus_read_arbiter: checks the read interconnect with three masters in
// front of one memory model.
//
// Memory word w holds a pattern derived from w. Each master issues 60 read
// bursts of random length (1..16 beats) at random word addresses, under
// random backpressure on its data port. Every master must receive exactly
// its own bursts, in order, with the right words and last on the final beat
// of each burst; requests from different masters must contend at least once.
module tb_bus_read_arbiter;
  import fletcher_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int N = 3, NREQ = 60;
  logic [N-1:0] mst_req_valid, mst_req_ready, mst_dat_valid, mst_dat_ready;
  bus_req_t mst_req [N]; bus_rdat_t mst_dat [N];
  logic slv_req_valid, slv_req_ready, slv_dat_valid, slv_dat_ready;
  bus_req_t slv_req; bus_rdat_t slv_dat;
  bus_read_arbiter #(.N(N)) dut (.*);
  mem_model u_mem (.clk, .rst, .rreq_valid(slv_req_valid), .rreq_ready(slv_req_ready), .rreq(slv_req),
    .rdat_valid(slv_dat_valid), .rdat_ready(slv_dat_ready), .rdat(slv_dat),
    .wreq_valid(1'b0), .wreq_ready(), .wreq('0), .wdat_valid(1'b0), .wdat_ready(), .wdat('0));

  function automatic logic [BUS_DATA_W-1:0] pat(logic [63:0] w);
    return {8{w * 64'h9E3779B97F4A7C15 + 64'd1}};
  endfunction

  logic [63:0] exp_w [N][$];
  int beat_left [N], n_req [N], n_done [N];
  int contention = 0;
  initial for (int m = 0; m < N; m++) begin beat_left[m] = 0; n_req[m] = 0; n_done[m] = 0; end

  logic [N-1:0] fire = '0;
  always @(posedge clk) fire <= mst_req_valid & mst_req_ready;
  always @(negedge clk) for (int m = 0; m < N; m++) begin
    if (!mst_req_valid[m] || fire[m]) begin
      mst_req_valid[m] <= (n_req[m] < NREQ) && ($urandom_range(0, 2) != 0);
      mst_req[m].addr  <= 64'($urandom_range(0, 1000)) * BUS_BYTES;
      mst_req[m].len   <= BUS_LEN_W'($urandom_range(1, 16));
    end
    mst_dat_ready[m] <= ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) if (!rst) begin
    if ($countones(mst_req_valid) > 1) contention++;
    for (int m = 0; m < N; m++) begin
      if (mst_req_valid[m] && mst_req_ready[m]) begin
        for (int b = 0; b < int'(mst_req[m].len); b++) exp_w[m].push_back(mst_req[m].addr / BUS_BYTES + 64'(b));
        n_req[m]++;
      end
      if (mst_dat_valid[m] && mst_dat_ready[m]) begin
        check(exp_w[m].size() > 0 && mst_dat[m].data == pat(exp_w[m][0]), $sformatf("master %0d data", m));
        if (beat_left[m] == 0) beat_left[m] = 1;
        if (exp_w[m].size() > 0) void'(exp_w[m].pop_front());
        if (mst_dat[m].last) n_done[m]++;
      end
    end
  end

  initial begin
    mst_req_valid = 0; mst_dat_ready = 0;
    for (int m = 0; m < N; m++) mst_req[m] = '0;
    for (int w = 0; w < 1020; w++) u_mem.mem[64'(w)] = pat(64'(w));
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (n_done[0] == NREQ && n_done[1] == NREQ && n_done[2] == NREQ);
    repeat (5) @(posedge clk);
    for (int m = 0; m < N; m++) check(exp_w[m].size() == 0, $sformatf("master %0d got every beat", m));
    check(contention > 0, "masters contended");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (bursts done %0d %0d %0d)", n_done[0], n_done[1], n_done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
