// mantle: the generated wrapper around the Nucleus for the example
// 'foods / people -> dinner' design.
//
// Instantiates the Nucleus (MMIO, kernel, command accumulators, profilers),
// the RecordBatchReaders for 'foods' and 'people', the RecordBatchWriter for
// 'dinner', and the read and write interconnects that give the whole design
// one memory bus read port and one write port (64-bit addresses, 512-bit
// data, 8-bit burst length, bursts of at most 16 beats).
// Read interconnect masters: 0 foods.id, 1 foods.name, 2 people.name,
// 3 people.age, 4 people.food_id. Write interconnect masters: 0 dinner.name,
// 1 dinner.food. The read interconnect registers the outgoing request in a
// stream slice and buffers returning data in a four-deep stream buffer; the
// write interconnect registers requests and write data in stream slices.
// Timing: all paths registered at the bus boundary; latency from a kernel
// command to the first data element is a few cycles plus the memory latency.
// Block structure and interconnect sizes follow the generated example
// design in the document; the slice/buffer placement is this design's own.
module mantle
  import fletcher_pkg::*;
#(
  parameter int EPC = 1
) (
  input  logic        clk,
  input  logic        rst,
  // AXI4-lite MMIO slave
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] awaddr,
  input  logic        wvalid,
  output logic        wready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  output logic        bvalid,
  input  logic        bready,
  output logic [1:0]  bresp,
  input  logic        arvalid,
  output logic        arready,
  input  logic [31:0] araddr,
  output logic        rvalid,
  input  logic        rready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  // memory bus read master
  output logic        bus_rreq_valid,
  input  logic        bus_rreq_ready,
  output bus_req_t    bus_rreq,
  input  logic        bus_rdat_valid,
  output logic        bus_rdat_ready,
  input  bus_rdat_t   bus_rdat,
  // memory bus write master
  output logic        bus_wreq_valid,
  input  logic        bus_wreq_ready,
  output bus_req_t    bus_wreq,
  output logic        bus_wdat_valid,
  input  logic        bus_wdat_ready,
  output bus_wdat_t   bus_wdat
);
  localparam int CW = $clog2(EPC + 1);

  // Field data streams between the RecordBatch modules and the Nucleus.
  logic               foods_id_valid, foods_id_last, foods_id_ready;
  logic [15:0]        foods_id;
  logic               foods_name_valid, foods_name_last, foods_name_ready;
  logic [INDEX_W-1:0] foods_name_length;
  logic               foods_name_chars_valid, foods_name_chars_last, foods_name_chars_ready;
  logic [EPC*8-1:0]   foods_name_chars;
  logic [CW-1:0]      foods_name_chars_count;
  logic               people_name_valid, people_name_last, people_name_ready;
  logic [INDEX_W-1:0] people_name_length;
  logic               people_name_chars_valid, people_name_chars_last, people_name_chars_ready;
  logic [EPC*8-1:0]   people_name_chars;
  logic [CW-1:0]      people_name_chars_count;
  logic               people_age_valid, people_age_last, people_age_ready;
  logic [7:0]         people_age;
  logic               people_food_id_valid, people_food_id_last, people_food_id_ready;
  logic [15:0]        people_food_id;
  logic               dinner_name_valid, dinner_name_last, dinner_name_ready;
  logic [INDEX_W-1:0] dinner_name_length;
  logic               dinner_name_chars_valid, dinner_name_chars_last, dinner_name_chars_ready;
  logic [EPC*8-1:0]   dinner_name_chars;
  logic [CW-1:0]      dinner_name_chars_count;
  logic               dinner_food_valid, dinner_food_last, dinner_food_ready;
  logic [INDEX_W-1:0] dinner_food_length;
  logic               dinner_food_chars_valid, dinner_food_chars_last, dinner_food_chars_ready;
  logic [EPC*8-1:0]   dinner_food_chars;
  logic [CW-1:0]      dinner_food_chars_count;

  // Commands and unlocks, indexed by field (0..6).
  logic [6:0] acmd_valid, acmd_ready, aunl_valid, aunl_ready;
  arr_cmd_t   acmd [7];

  nucleus #(.EPC(EPC)) u_nucleus (.*);

  // ---------------- RecordBatch readers / writer ----------------
  logic [4:0] m_rreq_valid, m_rreq_ready, m_rdat_valid, m_rdat_ready;
  bus_req_t   m_rreq [5];
  bus_rdat_t  m_rdat [5];
  logic [1:0] m_wreq_valid, m_wreq_ready, m_wdat_valid, m_wdat_ready;
  bus_req_t   m_wreq [2];
  bus_wdat_t  m_wdat [2];

  rb_reader_foods #(.EPC(EPC)) u_foods (
    .clk, .rst,
    .cmd_valid(acmd_valid[1:0]), .cmd_ready(acmd_ready[1:0]), .cmd(acmd[0:1]),
    .unl_valid(aunl_valid[1:0]), .unl_ready(aunl_ready[1:0]),
    .rreq_valid(m_rreq_valid[1:0]), .rreq_ready(m_rreq_ready[1:0]), .rreq(m_rreq[0:1]),
    .rdat_valid(m_rdat_valid[1:0]), .rdat_ready(m_rdat_ready[1:0]), .rdat(m_rdat[0:1]),
    .*);

  rb_reader_people #(.EPC(EPC)) u_people (
    .clk, .rst,
    .cmd_valid(acmd_valid[4:2]), .cmd_ready(acmd_ready[4:2]), .cmd(acmd[2:4]),
    .unl_valid(aunl_valid[4:2]), .unl_ready(aunl_ready[4:2]),
    .rreq_valid(m_rreq_valid[4:2]), .rreq_ready(m_rreq_ready[4:2]), .rreq(m_rreq[2:4]),
    .rdat_valid(m_rdat_valid[4:2]), .rdat_ready(m_rdat_ready[4:2]), .rdat(m_rdat[2:4]),
    .*);

  rb_writer_dinner #(.EPC(EPC)) u_dinner (
    .clk, .rst,
    .cmd_valid(acmd_valid[6:5]), .cmd_ready(acmd_ready[6:5]), .cmd(acmd[5:6]),
    .unl_valid(aunl_valid[6:5]), .unl_ready(aunl_ready[6:5]),
    .wreq_valid(m_wreq_valid), .wreq_ready(m_wreq_ready), .wreq(m_wreq),
    .wdat_valid(m_wdat_valid), .wdat_ready(m_wdat_ready), .wdat(m_wdat),
    .*);

  // ---------------- Read interconnect (5 masters) ----------------
  logic      rd_req_valid, rd_req_ready, rd_dat_valid, rd_dat_ready;
  bus_req_t  rd_req;
  bus_rdat_t rd_dat;

  bus_read_arbiter #(.N(5)) u_rd_arb (
    .clk, .rst,
    .mst_req_valid(m_rreq_valid), .mst_req_ready(m_rreq_ready), .mst_req(m_rreq),
    .mst_dat_valid(m_rdat_valid), .mst_dat_ready(m_rdat_ready), .mst_dat(m_rdat),
    .slv_req_valid(rd_req_valid), .slv_req_ready(rd_req_ready), .slv_req(rd_req),
    .slv_dat_valid(rd_dat_valid), .slv_dat_ready(rd_dat_ready), .slv_dat(rd_dat));

  stream_slice #(.T(bus_req_t)) u_rd_req_slice (
    .clk, .rst, .in_valid(rd_req_valid), .in_ready(rd_req_ready), .in_data(rd_req),
    .out_valid(bus_rreq_valid), .out_ready(bus_rreq_ready), .out_data(bus_rreq));

  stream_buffer #(.T(bus_rdat_t), .DEPTH(4)) u_rd_dat_buf (
    .clk, .rst, .in_valid(bus_rdat_valid), .in_ready(bus_rdat_ready), .in_data(bus_rdat),
    .out_valid(rd_dat_valid), .out_ready(rd_dat_ready), .out_data(rd_dat));

  // ---------------- Write interconnect (2 masters) ----------------
  logic      wr_req_valid, wr_req_ready, wr_dat_valid, wr_dat_ready;
  bus_req_t  wr_req;
  bus_wdat_t wr_dat;

  bus_write_arbiter #(.N(2)) u_wr_arb (
    .clk, .rst,
    .mst_req_valid(m_wreq_valid), .mst_req_ready(m_wreq_ready), .mst_req(m_wreq),
    .mst_dat_valid(m_wdat_valid), .mst_dat_ready(m_wdat_ready), .mst_dat(m_wdat),
    .slv_req_valid(wr_req_valid), .slv_req_ready(wr_req_ready), .slv_req(wr_req),
    .slv_dat_valid(wr_dat_valid), .slv_dat_ready(wr_dat_ready), .slv_dat(wr_dat));

  stream_slice #(.T(bus_req_t)) u_wr_req_slice (
    .clk, .rst, .in_valid(wr_req_valid), .in_ready(wr_req_ready), .in_data(wr_req),
    .out_valid(bus_wreq_valid), .out_ready(bus_wreq_ready), .out_data(bus_wreq));

  stream_slice #(.T(bus_wdat_t)) u_wr_dat_slice (
    .clk, .rst, .in_valid(wr_dat_valid), .in_ready(wr_dat_ready), .in_data(wr_dat),
    .out_valid(bus_wdat_valid), .out_ready(bus_wdat_ready), .out_data(bus_wdat));
endmodule
