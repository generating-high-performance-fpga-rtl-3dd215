// rb_writer_dinner: RecordBatchWriter for the 'dinner' table
// (name: utf8 string, food: utf8 string).
//
// Two list ArrayWriters, one per column, each with its own command and
// unlock stream and its own memory bus write master for the write
// interconnect (master 0: name, 1: food).
module rb_writer_dinner
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
  output logic [1:0] wreq_valid,
  input  logic [1:0] wreq_ready,
  output bus_req_t   wreq [2],
  output logic [1:0] wdat_valid,
  input  logic [1:0] wdat_ready,
  output bus_wdat_t  wdat [2],
  input  logic               dinner_name_valid, dinner_name_last,
  output logic               dinner_name_ready,
  input  logic [INDEX_W-1:0] dinner_name_length,
  input  logic               dinner_name_chars_valid, dinner_name_chars_last,
  output logic               dinner_name_chars_ready,
  input  logic [EPC*8-1:0]   dinner_name_chars,
  input  logic [CW-1:0]      dinner_name_chars_count,
  input  logic               dinner_food_valid, dinner_food_last,
  output logic               dinner_food_ready,
  input  logic [INDEX_W-1:0] dinner_food_length,
  input  logic               dinner_food_chars_valid, dinner_food_chars_last,
  output logic               dinner_food_chars_ready,
  input  logic [EPC*8-1:0]   dinner_food_chars,
  input  logic [CW-1:0]      dinner_food_chars_count
);
  array_writer_list #(.ELEM_W(8), .EPC(EPC)) u_name (
    .clk, .rst, .cmd_valid(cmd_valid[0]), .cmd_ready(cmd_ready[0]), .cmd(cmd[0]),
    .unl_valid(unl_valid[0]), .unl_ready(unl_ready[0]), .unl_tag(),
    .wreq_valid(wreq_valid[0]), .wreq_ready(wreq_ready[0]), .wreq(wreq[0]),
    .wdat_valid(wdat_valid[0]), .wdat_ready(wdat_ready[0]), .wdat(wdat[0]),
    .len_valid(dinner_name_valid), .len_ready(dinner_name_ready), .len_data(dinner_name_length), .len_last(dinner_name_last),
    .val_valid(dinner_name_chars_valid), .val_ready(dinner_name_chars_ready), .val_data(dinner_name_chars),
    .val_count(dinner_name_chars_count), .val_last(dinner_name_chars_last));

  array_writer_list #(.ELEM_W(8), .EPC(EPC)) u_food (
    .clk, .rst, .cmd_valid(cmd_valid[1]), .cmd_ready(cmd_ready[1]), .cmd(cmd[1]),
    .unl_valid(unl_valid[1]), .unl_ready(unl_ready[1]), .unl_tag(),
    .wreq_valid(wreq_valid[1]), .wreq_ready(wreq_ready[1]), .wreq(wreq[1]),
    .wdat_valid(wdat_valid[1]), .wdat_ready(wdat_ready[1]), .wdat(wdat[1]),
    .len_valid(dinner_food_valid), .len_ready(dinner_food_ready), .len_data(dinner_food_length), .len_last(dinner_food_last),
    .val_valid(dinner_food_chars_valid), .val_ready(dinner_food_chars_ready), .val_data(dinner_food_chars),
    .val_count(dinner_food_chars_count), .val_last(dinner_food_chars_last));
endmodule
