// rb_reader_people: RecordBatchReader for the 'people' table
// (id: uint32, ignored; name: utf8 string; age: uint8; food_id: uint16).
//
// The 'id' column is marked ignored in the schema, so no reader exists for
// it. 'name' gets a list ArrayReader, 'age' and 'food_id' primitive readers
// (BufferReaders of 8- and 16-bit elements). Each column has its own command
// and unlock stream and its own memory bus master for the read interconnect
// (master 0: name, 1: age, 2: food_id).
module rb_reader_people
  import fletcher_pkg::*;
#(
  parameter int EPC = 1,
  parameter int CW  = $clog2(EPC + 1)
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] cmd_valid,
  output logic [2:0] cmd_ready,
  input  arr_cmd_t   cmd [3],
  output logic [2:0] unl_valid,
  input  logic [2:0] unl_ready,
  output logic [2:0] rreq_valid,
  input  logic [2:0] rreq_ready,
  output bus_req_t   rreq [3],
  input  logic [2:0] rdat_valid,
  output logic [2:0] rdat_ready,
  input  bus_rdat_t  rdat [3],
  output logic               people_name_valid, people_name_last,
  input  logic               people_name_ready,
  output logic [INDEX_W-1:0] people_name_length,
  output logic               people_name_chars_valid, people_name_chars_last,
  input  logic               people_name_chars_ready,
  output logic [EPC*8-1:0]   people_name_chars,
  output logic [CW-1:0]      people_name_chars_count,
  output logic        people_age_valid, people_age_last,
  input  logic        people_age_ready,
  output logic [7:0]  people_age,
  output logic        people_food_id_valid, people_food_id_last,
  input  logic        people_food_id_ready,
  output logic [15:0] people_food_id
);
  array_reader_list #(.ELEM_W(8), .EPC(EPC)) u_name (
    .clk, .rst, .cmd_valid(cmd_valid[0]), .cmd_ready(cmd_ready[0]), .cmd(cmd[0]),
    .unl_valid(unl_valid[0]), .unl_ready(unl_ready[0]), .unl_tag(),
    .rreq_valid(rreq_valid[0]), .rreq_ready(rreq_ready[0]), .rreq(rreq[0]),
    .rdat_valid(rdat_valid[0]), .rdat_ready(rdat_ready[0]), .rdat(rdat[0]),
    .len_valid(people_name_valid), .len_ready(people_name_ready), .len_data(people_name_length), .len_last(people_name_last),
    .val_valid(people_name_chars_valid), .val_ready(people_name_chars_ready), .val_data(people_name_chars),
    .val_count(people_name_chars_count), .val_dvalid(), .val_last(people_name_chars_last));

  buf_cmd_t age_cmd, fid_cmd;
  assign age_cmd = '{first_idx: cmd[1].first_idx, last_idx: cmd[1].last_idx, base: cmd[1].addr_a, tag: cmd[1].tag};
  assign fid_cmd = '{first_idx: cmd[2].first_idx, last_idx: cmd[2].last_idx, base: cmd[2].addr_a, tag: cmd[2].tag};

  buffer_reader #(.ELEM_W(8), .EPC(1)) u_age (
    .clk, .rst, .cmd_valid(cmd_valid[1]), .cmd_ready(cmd_ready[1]), .cmd(age_cmd),
    .unl_valid(unl_valid[1]), .unl_ready(unl_ready[1]), .unl_tag(),
    .rreq_valid(rreq_valid[1]), .rreq_ready(rreq_ready[1]), .rreq(rreq[1]),
    .rdat_valid(rdat_valid[1]), .rdat_ready(rdat_ready[1]), .rdat(rdat[1]),
    .out_valid(people_age_valid), .out_ready(people_age_ready), .out_data(people_age), .out_count(), .out_last(people_age_last),
    .ccmd_valid(), .ccmd_ready(1'b1), .ccmd_first(), .ccmd_last());

  buffer_reader #(.ELEM_W(16), .EPC(1)) u_food_id (
    .clk, .rst, .cmd_valid(cmd_valid[2]), .cmd_ready(cmd_ready[2]), .cmd(fid_cmd),
    .unl_valid(unl_valid[2]), .unl_ready(unl_ready[2]), .unl_tag(),
    .rreq_valid(rreq_valid[2]), .rreq_ready(rreq_ready[2]), .rreq(rreq[2]),
    .rdat_valid(rdat_valid[2]), .rdat_ready(rdat_ready[2]), .rdat(rdat[2]),
    .out_valid(people_food_id_valid), .out_ready(people_food_id_ready), .out_data(people_food_id), .out_count(),
    .out_last(people_food_id_last),
    .ccmd_valid(), .ccmd_ready(1'b1), .ccmd_first(), .ccmd_last());
endmodule
