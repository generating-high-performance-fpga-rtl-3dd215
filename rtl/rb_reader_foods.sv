// rb_reader_foods: RecordBatchReader for the 'foods' table
// (id: uint16, name: utf8 string).
//
// Groups the ArrayReaders of the table's columns: a primitive reader
// (a BufferReader of 16-bit elements) for 'id' and a list ArrayReader for
// 'name'. Each column keeps its own command and unlock stream, as in the
// generated example design, and brings out its own memory bus master for
// the read interconnect (master 0: id, 1: name). Field commands are
// ArrayReader commands (row range plus buffer addresses).
module rb_reader_foods
  import fletcher_pkg::*;
#(
  parameter int EPC = 1,
  parameter int CW  = $clog2(EPC + 1)
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] cmd_valid,
  output logic [1:0] cmd_ready,
  input  arr_cmd_t   cmd [2],
  output logic [1:0] unl_valid,
  input  logic [1:0] unl_ready,
  output logic [1:0] rreq_valid,
  input  logic [1:0] rreq_ready,
  output bus_req_t   rreq [2],
  input  logic [1:0] rdat_valid,
  output logic [1:0] rdat_ready,
  input  bus_rdat_t  rdat [2],
  output logic        foods_id_valid, foods_id_last,
  input  logic        foods_id_ready,
  output logic [15:0] foods_id,
  output logic               foods_name_valid, foods_name_last,
  input  logic               foods_name_ready,
  output logic [INDEX_W-1:0] foods_name_length,
  output logic               foods_name_chars_valid, foods_name_chars_last,
  input  logic               foods_name_chars_ready,
  output logic [EPC*8-1:0]   foods_name_chars,
  output logic [CW-1:0]      foods_name_chars_count
);
  buf_cmd_t id_cmd;
  assign id_cmd = '{first_idx: cmd[0].first_idx, last_idx: cmd[0].last_idx, base: cmd[0].addr_a, tag: cmd[0].tag};

  buffer_reader #(.ELEM_W(16), .EPC(1)) u_id (
    .clk, .rst, .cmd_valid(cmd_valid[0]), .cmd_ready(cmd_ready[0]), .cmd(id_cmd),
    .unl_valid(unl_valid[0]), .unl_ready(unl_ready[0]), .unl_tag(),
    .rreq_valid(rreq_valid[0]), .rreq_ready(rreq_ready[0]), .rreq(rreq[0]),
    .rdat_valid(rdat_valid[0]), .rdat_ready(rdat_ready[0]), .rdat(rdat[0]),
    .out_valid(foods_id_valid), .out_ready(foods_id_ready), .out_data(foods_id), .out_count(), .out_last(foods_id_last),
    .ccmd_valid(), .ccmd_ready(1'b1), .ccmd_first(), .ccmd_last());

  array_reader_list #(.ELEM_W(8), .EPC(EPC)) u_name (
    .clk, .rst, .cmd_valid(cmd_valid[1]), .cmd_ready(cmd_ready[1]), .cmd(cmd[1]),
    .unl_valid(unl_valid[1]), .unl_ready(unl_ready[1]), .unl_tag(),
    .rreq_valid(rreq_valid[1]), .rreq_ready(rreq_ready[1]), .rreq(rreq[1]),
    .rdat_valid(rdat_valid[1]), .rdat_ready(rdat_ready[1]), .rdat(rdat[1]),
    .len_valid(foods_name_valid), .len_ready(foods_name_ready), .len_data(foods_name_length), .len_last(foods_name_last),
    .val_valid(foods_name_chars_valid), .val_ready(foods_name_chars_ready), .val_data(foods_name_chars),
    .val_count(foods_name_chars_count), .val_dvalid(), .val_last(foods_name_chars_last));
endmodule
