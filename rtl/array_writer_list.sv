// array_writer_list: ArrayWriter for a list (variable-length) field, such as
// an Arrow UTF8 string column written by the kernel.
//
// A command (first row index, offsets buffer address in addr_a, values
// buffer address in addr_b, tag) starts an offsets BufferWriter and a values
// BufferWriter together. The kernel supplies a length stream (last on the
// final row) and a values stream (up to EPC elements per beat, last at the
// end of every list; an empty list is one beat with count 0 and last). The
// offsets writer turns lengths into offsets starting at 0; the values writer
// packs the characters from element 0 of the values buffer. A values beat is
// accepted only once the length of its list has been accepted, so when the
// final list ends the writer knows it and passes last to the values writer,
// which then flushes. A bus write arbiter shares the array's memory port.
// Unlock fires when both writers have unlocked.
// Follows the document's list writer (offsets generated from a length
// stream, commands for the values buffer); one values command per array
// instead of one per list, and offsets starting at 0, are this design's
// choices.
module array_writer_list
  import fletcher_pkg::*;
#(
  parameter int ELEM_W = 8,
  parameter int EPC    = 1,
  parameter int CW     = $clog2(EPC + 1)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  arr_cmd_t              cmd,
  output logic                  unl_valid,
  input  logic                  unl_ready,
  output logic [TAG_W-1:0]      unl_tag,
  output logic                  wreq_valid,
  input  logic                  wreq_ready,
  output bus_req_t              wreq,
  output logic                  wdat_valid,
  input  logic                  wdat_ready,
  output bus_wdat_t             wdat,
  input  logic                  len_valid,
  output logic                  len_ready,
  input  logic [INDEX_W-1:0]    len_data,
  input  logic                  len_last,
  input  logic                  val_valid,
  output logic                  val_ready,
  input  logic [EPC*ELEM_W-1:0] val_data,
  input  logic [CW-1:0]         val_count,
  input  logic                  val_last
);
  logic [1:0] m_req_valid, m_req_ready, m_dat_valid, m_dat_ready;
  bus_req_t   m_req [2];
  bus_wdat_t  m_dat [2];

  bus_write_arbiter #(.N(2)) u_arb (
    .clk, .rst,
    .mst_req_valid(m_req_valid), .mst_req_ready(m_req_ready), .mst_req(m_req),
    .mst_dat_valid(m_dat_valid), .mst_dat_ready(m_dat_ready), .mst_dat(m_dat),
    .slv_req_valid(wreq_valid), .slv_req_ready(wreq_ready), .slv_req(wreq),
    .slv_dat_valid(wdat_valid), .slv_dat_ready(wdat_ready), .slv_dat(wdat));

  logic [1:0] c_valid, c_ready;
  stream_sync #(.NI(1), .NO(2)) u_cmd_sync (
    .in_valid(cmd_valid), .in_ready(cmd_ready), .in_use(1'b1),
    .out_valid(c_valid), .out_ready(c_ready), .out_use(2'b11));

  buf_cmd_t ocmd, vcmd;
  assign ocmd = '{first_idx: cmd.first_idx, last_idx: cmd.last_idx, base: cmd.addr_a, tag: cmd.tag};
  assign vcmd = '{first_idx: '0, last_idx: '0, base: cmd.addr_b, tag: cmd.tag};

  // List bookkeeping
  logic [INDEX_W-1:0] n_len, n_list;
  logic               len_done;
  logic               o_in_ready, v_in_ready, v_in_valid, v_in_last;

  assign len_ready  = o_in_ready;
  assign v_in_valid = val_valid && (n_list < n_len);
  assign val_ready  = v_in_ready && (n_list < n_len);
  assign v_in_last  = val_last && len_done && (n_list + 1'b1 == n_len);

  always_ff @(posedge clk) begin
    if (rst || (cmd_valid && cmd_ready)) begin
      n_len    <= '0;
      n_list   <= '0;
      len_done <= 1'b0;
    end else begin
      if (len_valid && len_ready) begin
        n_len <= n_len + 1'b1;
        if (len_last) len_done <= 1'b1;
      end
      if (val_valid && val_ready && val_last) n_list <= n_list + 1'b1;
    end
  end

  logic [1:0]       u_valid, u_ready;
  logic [TAG_W-1:0] o_tag;

  buffer_writer #(.ELEM_W(32), .EPC(1), .OFFSETS(1'b1)) u_offsets (
    .clk, .rst, .cmd_valid(c_valid[0]), .cmd_ready(c_ready[0]), .cmd(ocmd),
    .unl_valid(u_valid[0]), .unl_ready(u_ready[0]), .unl_tag(o_tag),
    .wreq_valid(m_req_valid[0]), .wreq_ready(m_req_ready[0]), .wreq(m_req[0]),
    .wdat_valid(m_dat_valid[0]), .wdat_ready(m_dat_ready[0]), .wdat(m_dat[0]),
    .in_valid(len_valid), .in_ready(o_in_ready), .in_data(len_data), .in_count(1'b1), .in_last(len_last));

  buffer_writer #(.ELEM_W(ELEM_W), .EPC(EPC)) u_values (
    .clk, .rst, .cmd_valid(c_valid[1]), .cmd_ready(c_ready[1]), .cmd(vcmd),
    .unl_valid(u_valid[1]), .unl_ready(u_ready[1]), .unl_tag(),
    .wreq_valid(m_req_valid[1]), .wreq_ready(m_req_ready[1]), .wreq(m_req[1]),
    .wdat_valid(m_dat_valid[1]), .wdat_ready(m_dat_ready[1]), .wdat(m_dat[1]),
    .in_valid(v_in_valid), .in_ready(v_in_ready), .in_data(val_data), .in_count(val_count), .in_last(v_in_last));

  stream_sync #(.NI(2), .NO(1)) u_unl_sync (
    .in_valid(u_valid), .in_ready(u_ready), .in_use(2'b11),
    .out_valid(unl_valid), .out_ready(unl_ready), .out_use(1'b1));
  assign unl_tag = o_tag;
endmodule
