// fletcher_top: top level holding the two designs side by side.
//
// 1. The generated accelerator for the 'foods / people -> dinner' query:
//    the Mantle, with an AXI4-lite register port for the host and one
//    memory bus read port and one write port (64-bit address, 512-bit data,
//    bursts up to 16 beats). The host writes buffer addresses, row ranges
//    and the age threshold, pulses start, polls status and reads the number
//    of dinner rows from the return registers.
// 2. The three ArrayReaders for the example schema with a nullable float32
//    field A (Null over Prim), a UTF-8 string field B (List over Prim) and
//    a struct field C of int16 E and float64 F (Struct over two Prims).
//    Each ArrayReader has its own command, unlock and output streams and its
//    own memory bus read port (ports ex_*, index 0 = A, 1 = B, 2 = C), as an
//    ArrayReader does before a RecordBatch interconnect joins them.
// The memories and the host are outside this module. Timing is that of the
// blocks inside; nothing is added at this level.
module fletcher_top
  import fletcher_pkg::*;
#(
  parameter int EPC = 1,
  parameter int CW  = $clog2(EPC + 1)
) (
  input  logic        clk,
  input  logic        rst,
  // ---- accelerator: AXI4-lite MMIO ----
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
  // ---- accelerator: memory bus ----
  output logic        bus_rreq_valid,
  input  logic        bus_rreq_ready,
  output bus_req_t    bus_rreq,
  input  logic        bus_rdat_valid,
  output logic        bus_rdat_ready,
  input  bus_rdat_t   bus_rdat,
  output logic        bus_wreq_valid,
  input  logic        bus_wreq_ready,
  output bus_req_t    bus_wreq,
  output logic        bus_wdat_valid,
  input  logic        bus_wdat_ready,
  output bus_wdat_t   bus_wdat,
  // ---- example ArrayReaders: commands, unlocks, bus ports ----
  input  logic [2:0]  ex_cmd_valid,
  output logic [2:0]  ex_cmd_ready,
  input  arr_cmd_t    ex_cmd [3],
  output logic [2:0]  ex_unl_valid,
  input  logic [2:0]  ex_unl_ready,
  output logic [2:0]  ex_rreq_valid,
  input  logic [2:0]  ex_rreq_ready,
  output bus_req_t    ex_rreq [3],
  input  logic [2:0]  ex_rdat_valid,
  output logic [2:0]  ex_rdat_ready,
  input  bus_rdat_t   ex_rdat [3],
  // field A: nullable float32
  output logic        a_valid,
  input  logic        a_ready,
  output logic        a_validity,
  output logic [31:0] a_data,
  output logic        a_last,
  // field B: utf8 string (lengths and characters)
  output logic               b_len_valid,
  input  logic               b_len_ready,
  output logic [INDEX_W-1:0] b_len,
  output logic               b_len_last,
  output logic               b_chr_valid,
  input  logic               b_chr_ready,
  output logic [EPC*8-1:0]   b_chr,
  output logic [CW-1:0]      b_chr_count,
  output logic               b_chr_last,
  // field C: struct(E int16, F float64)
  output logic        c_valid,
  input  logic        c_ready,
  output logic [15:0] c_e,
  output logic [63:0] c_f,
  output logic        c_last
);
  mantle #(.EPC(EPC)) u_mantle (.*);

  array_reader_null #(.ELEM_W(32)) u_field_a (
    .clk, .rst, .cmd_valid(ex_cmd_valid[0]), .cmd_ready(ex_cmd_ready[0]), .cmd(ex_cmd[0]),
    .unl_valid(ex_unl_valid[0]), .unl_ready(ex_unl_ready[0]), .unl_tag(),
    .rreq_valid(ex_rreq_valid[0]), .rreq_ready(ex_rreq_ready[0]), .rreq(ex_rreq[0]),
    .rdat_valid(ex_rdat_valid[0]), .rdat_ready(ex_rdat_ready[0]), .rdat(ex_rdat[0]),
    .out_valid(a_valid), .out_ready(a_ready), .out_validity(a_validity), .out_data(a_data), .out_last(a_last));

  array_reader_list #(.ELEM_W(8), .EPC(EPC)) u_field_b (
    .clk, .rst, .cmd_valid(ex_cmd_valid[1]), .cmd_ready(ex_cmd_ready[1]), .cmd(ex_cmd[1]),
    .unl_valid(ex_unl_valid[1]), .unl_ready(ex_unl_ready[1]), .unl_tag(),
    .rreq_valid(ex_rreq_valid[1]), .rreq_ready(ex_rreq_ready[1]), .rreq(ex_rreq[1]),
    .rdat_valid(ex_rdat_valid[1]), .rdat_ready(ex_rdat_ready[1]), .rdat(ex_rdat[1]),
    .len_valid(b_len_valid), .len_ready(b_len_ready), .len_data(b_len), .len_last(b_len_last),
    .val_valid(b_chr_valid), .val_ready(b_chr_ready), .val_data(b_chr), .val_count(b_chr_count),
    .val_dvalid(), .val_last(b_chr_last));

  array_reader_struct #(.A_W(16), .B_W(64)) u_field_c (
    .clk, .rst, .cmd_valid(ex_cmd_valid[2]), .cmd_ready(ex_cmd_ready[2]), .cmd(ex_cmd[2]),
    .unl_valid(ex_unl_valid[2]), .unl_ready(ex_unl_ready[2]), .unl_tag(),
    .rreq_valid(ex_rreq_valid[2]), .rreq_ready(ex_rreq_ready[2]), .rreq(ex_rreq[2]),
    .rdat_valid(ex_rdat_valid[2]), .rdat_ready(ex_rdat_ready[2]), .rdat(ex_rdat[2]),
    .out_valid(c_valid), .out_ready(c_ready), .out_a(c_e), .out_b(c_f), .out_last(c_last));
endmodule
