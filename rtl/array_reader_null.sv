// array_reader_null: ArrayReader for a nullable primitive field (e.g. a
// nullable Float32 column).
//
// A command (row range, validity bitmap address in addr_a, values address in
// addr_b, tag) goes to two BufferReaders at once: a 1-bit one for the Arrow
// validity bitmap and one for the ELEM_W-bit values. A bus arbiter shares the
// array's memory port between them, and a sync pairs each validity bit with
// its value so the output beat carries both (one element per beat). Unlock
// fires when both readers have unlocked. Follows the document's Null
// configuration; one element per beat is this design's choice.
module array_reader_null
  import fletcher_pkg::*;
#(
  parameter int ELEM_W = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  arr_cmd_t          cmd,
  output logic              unl_valid,
  input  logic              unl_ready,
  output logic [TAG_W-1:0]  unl_tag,
  output logic              rreq_valid,
  input  logic              rreq_ready,
  output bus_req_t          rreq,
  input  logic              rdat_valid,
  output logic              rdat_ready,
  input  bus_rdat_t         rdat,
  output logic              out_valid,
  input  logic              out_ready,
  output logic              out_validity,
  output logic [ELEM_W-1:0] out_data,
  output logic              out_last
);
  logic [1:0] m_req_valid, m_req_ready, m_dat_valid, m_dat_ready;
  bus_req_t   m_req [2];
  bus_rdat_t  m_dat [2];

  bus_read_arbiter #(.N(2)) u_arb (
    .clk, .rst,
    .mst_req_valid(m_req_valid), .mst_req_ready(m_req_ready), .mst_req(m_req),
    .mst_dat_valid(m_dat_valid), .mst_dat_ready(m_dat_ready), .mst_dat(m_dat),
    .slv_req_valid(rreq_valid), .slv_req_ready(rreq_ready), .slv_req(rreq),
    .slv_dat_valid(rdat_valid), .slv_dat_ready(rdat_ready), .slv_dat(rdat));

  // Both readers take the command in the same cycle.
  logic [1:0] c_ready, c_valid;
  stream_sync #(.NI(1), .NO(2)) u_cmd_sync (
    .in_valid(cmd_valid), .in_ready(cmd_ready), .in_use(1'b1),
    .out_valid(c_valid), .out_ready(c_ready), .out_use(2'b11));

  buf_cmd_t bcmd, vcmd;
  assign bcmd = '{first_idx: cmd.first_idx, last_idx: cmd.last_idx, base: cmd.addr_a, tag: cmd.tag};
  assign vcmd = '{first_idx: cmd.first_idx, last_idx: cmd.last_idx, base: cmd.addr_b, tag: cmd.tag};

  logic [1:0]        u_valid, u_ready, d_valid, d_ready;
  logic [TAG_W-1:0]  b_tag;
  logic              b_bit, b_last;
  logic [ELEM_W-1:0] v_data;

  buffer_reader #(.ELEM_W(1), .EPC(1)) u_validity (
    .clk, .rst, .cmd_valid(c_valid[0]), .cmd_ready(c_ready[0]), .cmd(bcmd),
    .unl_valid(u_valid[0]), .unl_ready(u_ready[0]), .unl_tag(b_tag),
    .rreq_valid(m_req_valid[0]), .rreq_ready(m_req_ready[0]), .rreq(m_req[0]),
    .rdat_valid(m_dat_valid[0]), .rdat_ready(m_dat_ready[0]), .rdat(m_dat[0]),
    .out_valid(d_valid[0]), .out_ready(d_ready[0]), .out_data(b_bit), .out_count(), .out_last(b_last),
    .ccmd_valid(), .ccmd_ready(1'b1), .ccmd_first(), .ccmd_last());

  buffer_reader #(.ELEM_W(ELEM_W), .EPC(1)) u_values (
    .clk, .rst, .cmd_valid(c_valid[1]), .cmd_ready(c_ready[1]), .cmd(vcmd),
    .unl_valid(u_valid[1]), .unl_ready(u_ready[1]), .unl_tag(),
    .rreq_valid(m_req_valid[1]), .rreq_ready(m_req_ready[1]), .rreq(m_req[1]),
    .rdat_valid(m_dat_valid[1]), .rdat_ready(m_dat_ready[1]), .rdat(m_dat[1]),
    .out_valid(d_valid[1]), .out_ready(d_ready[1]), .out_data(v_data), .out_count(), .out_last(),
    .ccmd_valid(), .ccmd_ready(1'b1), .ccmd_first(), .ccmd_last());

  stream_sync #(.NI(2), .NO(1)) u_data_sync (
    .in_valid(d_valid), .in_ready(d_ready), .in_use(2'b11),
    .out_valid(out_valid), .out_ready(out_ready), .out_use(1'b1));
  assign out_validity = b_bit;
  assign out_data     = v_data;
  assign out_last     = b_last;

  stream_sync #(.NI(2), .NO(1)) u_unl_sync (
    .in_valid(u_valid), .in_ready(u_ready), .in_use(2'b11),
    .out_valid(unl_valid), .out_ready(unl_ready), .out_use(1'b1));
  assign unl_tag = b_tag;
endmodule
