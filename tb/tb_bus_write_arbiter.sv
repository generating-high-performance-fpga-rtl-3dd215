// tb_bus_write_arbiter: checks the write interconnect with two masters in
// front of one memory model.
//
// Each master writes 40 bursts of random length (1..16 beats) to its own
// region, each beat carrying a pattern of master, burst and beat and a random
// byte strobe. The masters offer data beats with random gaps, and may offer
// data before their request is granted. Afterwards every word in memory must
// hold exactly the strobed bytes of the last write to it.
module tb_bus_write_arbiter;
  import fletcher_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int N = 2, NREQ = 40;
  logic [N-1:0] mst_req_valid, mst_req_ready, mst_dat_valid, mst_dat_ready;
  bus_req_t mst_req [N]; bus_wdat_t mst_dat [N];
  logic slv_req_valid, slv_req_ready, slv_dat_valid, slv_dat_ready;
  bus_req_t slv_req; bus_wdat_t slv_dat;
  bus_write_arbiter #(.N(N)) dut (.*);
  mem_model u_mem (.clk, .rst, .rreq_valid(1'b0), .rreq_ready(), .rreq('0), .rdat_valid(), .rdat_ready(1'b1), .rdat(),
    .wreq_valid(slv_req_valid), .wreq_ready(slv_req_ready), .wreq(slv_req),
    .wdat_valid(slv_dat_valid), .wdat_ready(slv_dat_ready), .wdat(slv_dat));

  logic [BUS_DATA_W-1:0] model [logic [63:0]];
  int n_req [N], n_beats_sent [N], beats_total [N];
  bus_req_t plan [N][$];
  int contention = 0;

  function automatic logic [BUS_DATA_W-1:0] pat(int m, int r, int b);
    return {16{32'(m * 1000003 + r * 1009 + b * 7 + 1)}};
  endfunction

  // Each master: a request stream and a data stream that run independently.
  int dreq [N], dbeat [N];
  initial for (int m = 0; m < N; m++) begin n_req[m] = 0; dreq[m] = 0; dbeat[m] = 0; end
  logic [N-1:0] rfire = '0, dfire = '0;
  always @(posedge clk) begin
    rfire <= mst_req_valid & mst_req_ready;
    dfire <= mst_dat_valid & mst_dat_ready;
  end
  always @(negedge clk) for (int m = 0; m < N; m++) begin
    if (!mst_req_valid[m] || rfire[m]) begin
      mst_req_valid[m] <= (n_req[m] < NREQ) && ($urandom_range(0, 2) != 0);
      mst_req[m] <= (n_req[m] < NREQ) ? plan[m][n_req[m]] : '0;
    end
    if (!mst_dat_valid[m] || dfire[m]) begin
      if (dreq[m] < NREQ && $urandom_range(0, 3) != 0) begin
        mst_dat_valid[m] <= 1'b1;
        mst_dat[m].data   <= pat(m, dreq[m], dbeat[m]);
        mst_dat[m].strobe <= {$urandom, $urandom};
        mst_dat[m].last   <= (dbeat[m] == int'(plan[m][dreq[m]].len) - 1);
        if (dbeat[m] == int'(plan[m][dreq[m]].len) - 1) begin dbeat[m] <= 0; dreq[m] <= dreq[m] + 1; end
        else dbeat[m] <= dbeat[m] + 1;
      end else mst_dat_valid[m] <= 1'b0;
    end
  end
  int acc_req [N], acc_beat [N], done [N];
  initial for (int m = 0; m < N; m++) begin acc_req[m] = 0; acc_beat[m] = 0; done[m] = 0; end
  always @(posedge clk) if (!rst) begin
    if ($countones(mst_req_valid) > 1) contention++;
    for (int m = 0; m < N; m++) begin
      if (mst_req_valid[m] && mst_req_ready[m]) n_req[m]++;
      if (mst_dat_valid[m] && mst_dat_ready[m]) begin
        logic [63:0] w;
        logic [BUS_DATA_W-1:0] word;
        w = plan[m][acc_req[m]].addr / BUS_BYTES + 64'(acc_beat[m]);
        word = model.exists(w) ? model[w] : '0;
        for (int b = 0; b < BUS_BYTES; b++) if (mst_dat[m].strobe[b]) word[b*8 +: 8] = mst_dat[m].data[b*8 +: 8];
        model[w] = word;
        if (mst_dat[m].last) begin acc_req[m]++; acc_beat[m] = 0; done[m]++; end
        else acc_beat[m]++;
      end
    end
  end

  initial begin
    mst_req_valid = 0; mst_dat_valid = 0;
    for (int m = 0; m < N; m++) begin
      mst_req[m] = '0; mst_dat[m] = '0;
      for (int r = 0; r < NREQ; r++) begin
        bus_req_t q;
        q.addr = 64'(m * 4096 + $urandom_range(0, 40)) * BUS_BYTES;
        q.len  = BUS_LEN_W'($urandom_range(1, 16));
        plan[m].push_back(q);
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (done[0] == NREQ && done[1] == NREQ);
    repeat (10) @(posedge clk);
    foreach (model[w]) check(u_mem.rd_word(w) == model[w], $sformatf("memory word %0d", w));
    check(contention > 0, "masters contended");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (bursts done %0d %0d, requests %0d %0d)", done[0], done[1], n_req[0], n_req[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
