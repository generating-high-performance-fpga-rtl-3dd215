// mem_model: behavioural model of the memory behind the bus (host or
// on-board DRAM), for simulation only.
//
// Storage is a sparse array of bus words indexed by word address. The read
// port takes burst requests into a queue and returns their words in order,
// one per cycle, after LATENCY cycles, with random idle cycles when STALL is
// set. The write port takes a request, then that many data beats, and writes
// each byte whose strobe is set. Testbenches preload and inspect memory
// through the byte tasks below.
module mem_model
  import fletcher_pkg::*;
#(
  parameter int LATENCY = 4,
  parameter bit STALL   = 1'b1
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      rreq_valid,
  output logic      rreq_ready,
  input  bus_req_t  rreq,
  output logic      rdat_valid,
  input  logic      rdat_ready,
  output bus_rdat_t rdat,
  input  logic      wreq_valid,
  output logic      wreq_ready,
  input  bus_req_t  wreq,
  input  logic      wdat_valid,
  output logic      wdat_ready,
  input  bus_wdat_t wdat
);
  logic [BUS_DATA_W-1:0] mem [logic [63:0]];
  bus_req_t rq [$];
  bus_req_t wq [$];
  int       beat, wbeat, wait_cnt;
  int       n_rreq, n_wreq;

  function automatic logic [BUS_DATA_W-1:0] rd_word(logic [63:0] w);
    if (mem.exists(w)) return mem[w];
    return '0;
  endfunction

  task automatic poke(logic [63:0] addr, logic [7:0] val);
    logic [BUS_DATA_W-1:0] word;
    word = rd_word(addr / BUS_BYTES);
    word[(addr % BUS_BYTES)*8 +: 8] = val;
    mem[addr / BUS_BYTES] = word;
  endtask

  function automatic logic [7:0] peek(logic [63:0] addr);
    logic [BUS_DATA_W-1:0] word;
    word = rd_word(addr / BUS_BYTES);
    return word[(addr % BUS_BYTES)*8 +: 8];
  endfunction

  task automatic poke32(logic [63:0] addr, logic [31:0] val);
    for (int b = 0; b < 4; b++) poke(addr + 64'(b), val[b*8 +: 8]);
  endtask

  function automatic logic [31:0] peek32(logic [63:0] addr);
    logic [31:0] v;
    for (int b = 0; b < 4; b++) v[b*8 +: 8] = peek(addr + 64'(b));
    return v;
  endfunction

  assign rreq_ready = (rq.size() < 8);
  assign wreq_ready = (wq.size() < 8);

  always_comb begin
    rdat_valid = 1'b0;
    rdat       = '0;
    if (rq.size() > 0 && wait_cnt == 0) begin
      rdat_valid = 1'b1;
      rdat.data  = rd_word(rq[0].addr / BUS_BYTES + 64'(beat));
      rdat.last  = (beat == int'(rq[0].len) - 1);
    end
    wdat_ready = (wq.size() > 0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rq.delete();
      wq.delete();
      beat     <= 0;
      wbeat    <= 0;
      wait_cnt <= LATENCY;
      n_rreq   <= 0;
      n_wreq   <= 0;
    end else begin
      if (rreq_valid && rreq_ready) begin
        rq.push_back(rreq);
        n_rreq <= n_rreq + 1;
      end
      if (wreq_valid && wreq_ready) begin
        wq.push_back(wreq);
        n_wreq <= n_wreq + 1;
      end
      if (wait_cnt > 0 && rq.size() > 0) wait_cnt <= wait_cnt - 1;
      if (rdat_valid && rdat_ready) begin
        if (rdat.last) begin
          void'(rq.pop_front());
          beat     <= 0;
          wait_cnt <= LATENCY;
        end else begin
          beat <= beat + 1;
          if (STALL && ($urandom_range(0, 3) == 0)) wait_cnt <= 1;
        end
      end
      if (wdat_valid && wdat_ready) begin
        logic [63:0]           w;
        logic [BUS_DATA_W-1:0] word;
        w    = wq[0].addr / BUS_BYTES + 64'(wbeat);
        word = rd_word(w);
        for (int b = 0; b < BUS_BYTES; b++)
          if (wdat.strobe[b]) word[b*8 +: 8] = wdat.data[b*8 +: 8];
        mem[w] = word;
        if (wbeat == int'(wq[0].len) - 1) begin
          void'(wq.pop_front());
          wbeat <= 0;
        end else begin
          wbeat <= wbeat + 1;
        end
      end
    end
  end
endmodule
