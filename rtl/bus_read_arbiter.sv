// bus_read_arbiter: shares one bus read slave port among N read masters.
//
// Requests are arbitrated round-robin (stream_arbiter). Each granted request
// pushes the master index into an order FIFO; read data beats from the slave
// go to the master at the head of that FIFO, which is popped on the beat
// marked last. This relies on the slave returning bursts in request order.
// The order FIFO bounds the number of outstanding bursts (MAX_OUTSTANDING).
// Used both as the bus arbiter inside an ArrayReader and as the Mantle's read
// interconnect. Round-robin arbitration comes from the document; the
// ordering scheme and depth are this design's choices.
// The Verilator linter may report UNOPTFLAT on arb_ready when several arbiters and
// syncs are nested: its analysis merges the bits of the ready/valid vectors
// of the masters. No bit depends on itself, as no valid depends on a ready,
// so the warning is left as it is.
module bus_read_arbiter
  import fletcher_pkg::*;
#(
  parameter int N               = 2,
  parameter int MAX_OUTSTANDING = 8,
  parameter int IW              = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst,
  // Master side
  input  logic [N-1:0] mst_req_valid,
  output logic [N-1:0] mst_req_ready,
  input  bus_req_t     mst_req       [N],
  output logic [N-1:0] mst_dat_valid,
  input  logic [N-1:0] mst_dat_ready,
  output bus_rdat_t    mst_dat       [N],
  // Slave side
  output logic         slv_req_valid,
  input  logic         slv_req_ready,
  output bus_req_t     slv_req,
  input  logic         slv_dat_valid,
  output logic         slv_dat_ready,
  input  bus_rdat_t    slv_dat
);
  logic          arb_valid, arb_ready;
  logic [IW-1:0] arb_index;
  logic          ord_in_ready, ord_valid, ord_ready;
  logic [IW-1:0] ord_index;

  stream_arbiter #(.T(bus_req_t), .N(N)) u_arb (
    .clk, .rst,
    .in_valid(mst_req_valid), .in_ready(mst_req_ready), .in_data(mst_req),
    .out_valid(arb_valid), .out_ready(arb_ready), .out_data(slv_req), .out_index(arb_index));

  // A request leaves only when its index can be recorded.
  assign slv_req_valid = arb_valid && ord_in_ready;
  assign arb_ready     = slv_req_ready && ord_in_ready;

  stream_fifo #(.T(logic [IW-1:0]), .DEPTH(MAX_OUTSTANDING)) u_order (
    .clk, .rst,
    .in_valid(arb_valid && slv_req_ready), .in_ready(ord_in_ready), .in_data(arb_index),
    .out_valid(ord_valid), .out_ready(ord_ready), .out_data(ord_index), .level());

  always_comb begin
    for (int i = 0; i < N; i++) begin
      mst_dat[i]       = slv_dat;
      mst_dat_valid[i] = slv_dat_valid && ord_valid && (int'(ord_index) == i);
    end
    slv_dat_ready = ord_valid && mst_dat_ready[ord_index];
    ord_ready     = slv_dat_valid && slv_dat_ready && slv_dat.last;
  end
endmodule
