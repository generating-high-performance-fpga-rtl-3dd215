// bus_write_arbiter: shares one bus write slave port among N write masters.
//
// Write requests are arbitrated round-robin. Each granted request pushes the
// master index into an order FIFO, and the write data channel is connected to
// the master at the head of that FIFO until its beat marked last has been
// accepted, so data bursts reach the slave in request order and never
// interleave. Used as the Mantle's write interconnect and inside the list
// ArrayWriter. Round-robin comes from the document; the ordering scheme is
// this design's choice.
// The Verilator linter may report UNOPTFLAT on arb_ready when several arbiters and
// syncs are nested: its analysis merges the bits of the ready/valid vectors
// of the masters. No bit depends on itself, as no valid depends on a ready,
// so the warning is left as it is.
module bus_write_arbiter
  import fletcher_pkg::*;
#(
  parameter int N               = 2,
  parameter int MAX_OUTSTANDING = 8,
  parameter int IW              = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] mst_req_valid,
  output logic [N-1:0] mst_req_ready,
  input  bus_req_t     mst_req       [N],
  input  logic [N-1:0] mst_dat_valid,
  output logic [N-1:0] mst_dat_ready,
  input  bus_wdat_t    mst_dat       [N],
  output logic         slv_req_valid,
  input  logic         slv_req_ready,
  output bus_req_t     slv_req,
  output logic         slv_dat_valid,
  input  logic         slv_dat_ready,
  output bus_wdat_t    slv_dat
);
  logic          arb_valid, arb_ready;
  logic [IW-1:0] arb_index;
  logic          ord_in_ready, ord_valid, ord_ready;
  logic [IW-1:0] ord_index;

  stream_arbiter #(.T(bus_req_t), .N(N)) u_arb (
    .clk, .rst,
    .in_valid(mst_req_valid), .in_ready(mst_req_ready), .in_data(mst_req),
    .out_valid(arb_valid), .out_ready(arb_ready), .out_data(slv_req), .out_index(arb_index));

  assign slv_req_valid = arb_valid && ord_in_ready;
  assign arb_ready     = slv_req_ready && ord_in_ready;

  stream_fifo #(.T(logic [IW-1:0]), .DEPTH(MAX_OUTSTANDING)) u_order (
    .clk, .rst,
    .in_valid(arb_valid && slv_req_ready), .in_ready(ord_in_ready), .in_data(arb_index),
    .out_valid(ord_valid), .out_ready(ord_ready), .out_data(ord_index), .level());

  always_comb begin
    slv_dat       = mst_dat[ord_index];
    slv_dat_valid = ord_valid && mst_dat_valid[ord_index];
    for (int i = 0; i < N; i++)
      mst_dat_ready[i] = ord_valid && slv_dat_ready && (int'(ord_index) == i);
    ord_ready = slv_dat_valid && slv_dat_ready && slv_dat.last;
  end
endmodule
