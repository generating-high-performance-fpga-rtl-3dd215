// stream_buffer: a stream buffer whose depth is a parameter.
//
// DEPTH 0 gives a plain connection, DEPTH 1 a register slice (one cycle of
// latency, path broken), and DEPTH 2 or more a FIFO of that many entries
// behind which a slice registers the output. The library describes the
// buffer as an abstraction over a FIFO with a variable depth; which structure
// serves which depth is this design's choice.
module stream_buffer #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);
  if (DEPTH == 0) begin : g_wire
    assign out_valid = in_valid;
    assign in_ready  = out_ready;
    assign out_data  = in_data;
  end else if (DEPTH == 1) begin : g_slice
    stream_slice #(.T(T)) u_slice (
      .clk, .rst, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);
  end else begin : g_fifo
    logic f_valid, f_ready;
    T     f_data;
    stream_fifo #(.T(T), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst, .in_valid, .in_ready, .in_data,
      .out_valid(f_valid), .out_ready(f_ready), .out_data(f_data), .level());
    stream_slice #(.T(T)) u_slice (
      .clk, .rst, .in_valid(f_valid), .in_ready(f_ready), .in_data(f_data),
      .out_valid, .out_ready, .out_data);
  end
endmodule
