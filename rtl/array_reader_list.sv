// array_reader_list: ArrayReader for a list (variable-length) field, such as
// an Arrow UTF8 string column.
//
// One command (row range, offsets buffer address in addr_a, values buffer
// address in addr_b, tag) starts an offsets BufferReader. It first sends the
// values BufferReader a single child command covering offset[first_idx] to
// offset[last_idx], so the characters are fetched in large bursts, and then
// produces one length per row. A bus arbiter shares the array's memory port
// between the two readers. Lengths go to the kernel on the length stream and,
// through a sync, into a small FIFO that tells the list cutter where each
// list ends: the cutter reshapes the values stream so that no beat crosses a
// list boundary and the final beat of each list carries last. An empty list
// gives one beat with count 0 and last. Unlock fires when both readers have
// unlocked.
// Timing: the cutter loads the next list's length on the final beat of the
// current list, so consecutive non-empty lists follow each other without an
// idle cycle: one beat per cycle when the consumer is always ready.
//
// Streams: len (32-bit length, last on the final row) and val (EPC elements
// of ELEM_W bits, count, dvalid = count != 0, last per list), matching the
// length and character streams of the kernel interface. Follows the
// document's List configuration (offsets reader feeding the values reader,
// length stream, first/last index command); the cutter and its FIFO depth
// are this design's choices.
module array_reader_list
  import fletcher_pkg::*;
#(
  parameter int ELEM_W    = 8,
  parameter int EPC       = 1,
  parameter int LEN_DEPTH = 16,
  parameter int CW        = $clog2(EPC + 1)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  arr_cmd_t              cmd,
  output logic                  unl_valid,
  input  logic                  unl_ready,
  output logic [TAG_W-1:0]      unl_tag,
  output logic                  rreq_valid,
  input  logic                  rreq_ready,
  output bus_req_t              rreq,
  input  logic                  rdat_valid,
  output logic                  rdat_ready,
  input  bus_rdat_t             rdat,
  output logic                  len_valid,
  input  logic                  len_ready,
  output logic [INDEX_W-1:0]    len_data,
  output logic                  len_last,
  output logic                  val_valid,
  input  logic                  val_ready,
  output logic [EPC*ELEM_W-1:0] val_data,
  output logic [CW-1:0]         val_count,
  output logic                  val_dvalid,
  output logic                  val_last
);
  // Command split
  logic [BUS_ADDR_W-1:0] values_base;
  buf_cmd_t              ocmd, vcmd;
  logic                  occ_valid, occ_ready;
  logic [INDEX_W-1:0]    occ_first, occ_last;

  assign ocmd = '{first_idx: cmd.first_idx, last_idx: cmd.last_idx, base: cmd.addr_a, tag: cmd.tag};
  assign vcmd = '{first_idx: occ_first, last_idx: occ_last, base: values_base, tag: cmd.tag};

  always_ff @(posedge clk) if (cmd_valid && cmd_ready) values_base <= cmd.addr_b;

  // Bus arbitration between the two buffer readers
  logic [1:0] m_req_valid, m_req_ready, m_dat_valid, m_dat_ready;
  bus_req_t   m_req [2];
  bus_rdat_t  m_dat [2];

  bus_read_arbiter #(.N(2)) u_arb (
    .clk, .rst,
    .mst_req_valid(m_req_valid), .mst_req_ready(m_req_ready), .mst_req(m_req),
    .mst_dat_valid(m_dat_valid), .mst_dat_ready(m_dat_ready), .mst_dat(m_dat),
    .slv_req_valid(rreq_valid), .slv_req_ready(rreq_ready), .slv_req(rreq),
    .slv_dat_valid(rdat_valid), .slv_dat_ready(rdat_ready), .slv_dat(rdat));

  // Offsets reader
  logic               o_valid, o_ready, o_last, o_unl_valid, o_unl_ready;
  logic [INDEX_W-1:0] o_len;
  logic [TAG_W-1:0]   o_unl_tag, v_unl_tag;

  buffer_reader #(.ELEM_W(32), .EPC(1), .OFFSETS(1'b1)) u_offsets (
    .clk, .rst, .cmd_valid, .cmd_ready, .cmd(ocmd),
    .unl_valid(o_unl_valid), .unl_ready(o_unl_ready), .unl_tag(o_unl_tag),
    .rreq_valid(m_req_valid[0]), .rreq_ready(m_req_ready[0]), .rreq(m_req[0]),
    .rdat_valid(m_dat_valid[0]), .rdat_ready(m_dat_ready[0]), .rdat(m_dat[0]),
    .out_valid(o_valid), .out_ready(o_ready), .out_data(o_len), .out_count(), .out_last(o_last),
    .ccmd_valid(occ_valid), .ccmd_ready(occ_ready), .ccmd_first(occ_first), .ccmd_last(occ_last));

  // Values reader
  logic                  v_valid, v_ready, v_unl_valid, v_unl_ready;
  logic [EPC*ELEM_W-1:0] v_data;
  logic [CW-1:0]         v_count;

  buffer_reader #(.ELEM_W(ELEM_W), .EPC(EPC)) u_values (
    .clk, .rst, .cmd_valid(occ_valid), .cmd_ready(occ_ready), .cmd(vcmd),
    .unl_valid(v_unl_valid), .unl_ready(v_unl_ready), .unl_tag(v_unl_tag),
    .rreq_valid(m_req_valid[1]), .rreq_ready(m_req_ready[1]), .rreq(m_req[1]),
    .rdat_valid(m_dat_valid[1]), .rdat_ready(m_dat_ready[1]), .rdat(m_dat[1]),
    .out_valid(v_valid), .out_ready(v_ready), .out_data(v_data), .out_count(v_count), .out_last(),
    .ccmd_valid(), .ccmd_ready(1'b1), .ccmd_first(), .ccmd_last());

  // Unlock when both readers are done
  logic [1:0] u_rdy;
  stream_sync #(.NI(2), .NO(1)) u_unl_sync (
    .in_valid({v_unl_valid, o_unl_valid}), .in_ready(u_rdy), .in_use(2'b11),
    .out_valid(unl_valid), .out_ready(unl_ready), .out_use(1'b1));
  assign {v_unl_ready, o_unl_ready} = u_rdy;
  assign unl_tag = o_unl_tag;

  // Length stream to the kernel and to the cutter
  logic [1:0]         l_out_valid;
  logic               lf_in_ready, lf_valid, lf_ready;
  logic [INDEX_W-1:0] lf_len;

  stream_sync #(.NI(1), .NO(2)) u_len_sync (
    .in_valid(o_valid), .in_ready(o_ready), .in_use(1'b1),
    .out_valid(l_out_valid), .out_ready({lf_in_ready, len_ready}), .out_use(2'b11));
  assign len_valid = l_out_valid[0];
  assign len_data  = o_len;
  assign len_last  = o_last;

  stream_fifo #(.T(logic [INDEX_W-1:0]), .DEPTH(LEN_DEPTH)) u_len_fifo (
    .clk, .rst,
    .in_valid(l_out_valid[1]), .in_ready(lf_in_ready), .in_data(o_len),
    .out_valid(lf_valid), .out_ready(lf_ready), .out_data(lf_len), .level());

  // List cutter
  logic                  active;
  logic [INDEX_W-1:0]    rem;
  logic                  c_valid, c_ready;
  logic [EPC*ELEM_W-1:0] c_data;
  logic [CW-1:0]         c_count;

  stream_reshaper #(.ELEM_W(ELEM_W), .IN_EPC(EPC), .OUT_EPC(EPC)) u_cutter (
    .clk, .rst,
    .in_valid(v_valid), .in_ready(v_ready), .in_data(v_data), .in_count(v_count), .in_last(1'b0),
    .out_max(active ? 32'(rem) : 32'(1)),
    .out_valid(c_valid), .out_ready(c_ready), .out_data(c_data), .out_count(c_count), .out_last());

  always_comb begin
    if (active) begin
      val_valid  = c_valid;
      val_data   = c_data;
      val_count  = c_count;
      val_last   = (32'(c_count) == 32'(rem));
      c_ready    = val_ready;
      // Load the next non-empty list on the final beat: no idle cycle.
      lf_ready   = val_valid && val_ready && val_last && lf_valid && (lf_len != '0);
    end else begin
      // Idle: an empty list is answered directly, otherwise load its length.
      val_valid  = lf_valid && (lf_len == '0);
      val_data   = '0;
      val_count  = '0;
      val_last   = 1'b1;
      c_ready    = 1'b0;
      lf_ready   = (lf_len == '0) ? val_ready : 1'b1;
    end
    val_dvalid = (val_count != '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      rem    <= '0;
    end else if (!active) begin
      if (lf_valid && lf_len != '0) begin
        active <= 1'b1;
        rem    <= lf_len;
      end
    end else if (val_valid && val_ready) begin
      if (!val_last) begin
        rem <= rem - INDEX_W'(c_count);
      end else if (lf_valid && lf_len != '0) begin
        rem <= lf_len;
      end else begin
        active <= 1'b0;
      end
    end
  end
endmodule
