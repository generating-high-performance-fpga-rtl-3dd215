// stream_fifo: first-in first-out buffer for a valid/ready stream.
//
// DEPTH entries held in a memory array with read and write pointers. The
// head entry is presented combinationally (first-word fall-through), so a
// value written in one cycle can leave in the next. Accepts a write when not
// full; a simultaneous read and write is allowed at any fill level.
// DEPTH must be at least 2. The buffering role comes from the stream library
// description; the organisation is this design's choice.
module stream_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int AW = $clog2(DEPTH);
  T mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  logic wr, rd;

  assign in_ready  = (cnt != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rptr];
  assign level     = cnt;
  assign wr = in_valid && in_ready;
  assign rd = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (wr) mem[wptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
      cnt  <= '0;
    end else begin
      if (wr) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (rd) rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      cnt <= cnt + (wr ? 1'b1 : 1'b0) - (rd ? 1'b1 : 1'b0);
    end
  end

  initial assert (DEPTH >= 2) else $error("stream_fifo: DEPTH must be >= 2");
endmodule
