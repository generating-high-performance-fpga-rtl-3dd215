// stream_arbiter: round-robin arbiter of N valid/ready streams onto one.
//
// Each cycle the first valid input at or after the pointer is selected
// (combinationally); after its transfer the pointer moves past the winner,
// so no input waits more than N-1 transfers. The index of the selected input
// travels with the output. The round-robin policy is the one the document
// names for the interconnect; the rest is this design's choice.
module stream_arbiter #(
  parameter type T = logic [7:0],
  parameter int  N = 2,
  parameter int  IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] in_valid,
  output logic [N-1:0] in_ready,
  input  T             in_data [N],
  output logic         out_valid,
  input  logic         out_ready,
  output T             out_data,
  output logic [IW-1:0] out_index
);
  logic [IW-1:0] ptr;
  logic [IW-1:0] sel;
  logic          found;

  always_comb begin
    sel   = '0;
    found = 1'b0;
    for (int k = N - 1; k >= 0; k--) begin
      if (in_valid[(int'(ptr) + k) % N]) begin
        found = 1'b1;
        sel   = IW'((int'(ptr) + k) % N);
      end
    end
    out_valid = found;
    out_data  = in_data[sel];
    out_index = sel;
    in_ready  = '0;
    in_ready[sel] = found && out_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) ptr <= '0;
    else if (out_valid && out_ready) ptr <= (int'(sel) == N-1) ? '0 : sel + 1'b1;
  end
endmodule
