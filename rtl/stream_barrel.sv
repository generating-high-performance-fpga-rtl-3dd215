// stream_barrel: pipelined element-level barrel rotator for multiple-element-
// per-handshake (MEPH) streams.
//
// Each beat carries EPC elements of ELEM_W bits and a rotate amount. The
// output beat holds the input rotated right by that many elements, so input
// element k appears at output position (k - amount) mod EPC. Element count
// and last flag travel alongside unchanged. One register stage (latency one
// cycle, one beat per cycle); the stage is a stream slice-style register with
// ready passed through when the register is empty or being drained.
// The library description gives the function and that it is pipelined; the
// single stage is this design's choice. The buffer reader uses it as its
// aligner.
module stream_barrel #(
  parameter int EPC    = 8,
  parameter int ELEM_W = 8,
  parameter int AMT_W  = (EPC > 1) ? $clog2(EPC) : 1,
  parameter int CNT_W  = $clog2(EPC + 1)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [EPC*ELEM_W-1:0]   in_data,
  input  logic [AMT_W-1:0]        in_amount,
  input  logic [CNT_W-1:0]        in_count,
  input  logic                    in_last,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [EPC*ELEM_W-1:0]   out_data,
  output logic [CNT_W-1:0]        out_count,
  output logic                    out_last
);
  logic [2*EPC*ELEM_W-1:0] doubled, shifted;
  logic [EPC*ELEM_W-1:0]   rotated;

  always_comb begin
    doubled = {in_data, in_data};
    shifted = doubled >> (int'(in_amount) * ELEM_W);
    rotated = shifted[EPC*ELEM_W-1:0];
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data  <= rotated;
        out_count <= in_count;
        out_last  <= in_last;
      end
    end
  end
endmodule
