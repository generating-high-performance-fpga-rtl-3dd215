// stream_profiler: gathers handshake statistics of one stream.
//
// While enabled it counts, per clock cycle: elements transferred (the beat's
// element count on each transfer), cycles with valid high, cycles with ready
// high, transfers (valid and ready), packets (transfers with last) and
// enabled cycles. clear zeroes all six counters. The six measurements are the
// ones the document lists for its profiling registers; 32-bit wrapping
// counters are this design's choice. The profiler only observes the stream.
module stream_profiler
  import fletcher_pkg::*;
#(
  parameter int CNT_W = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  input  logic             clear,
  input  logic             probe_valid,
  input  logic             probe_ready,
  input  logic             probe_last,
  input  logic [CNT_W-1:0] probe_count,
  output prof_t            result
);
  logic xfer;
  assign xfer = probe_valid && probe_ready;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      result <= '0;
    end else if (enable) begin
      result.cycles <= result.cycles + 1'b1;
      if (probe_valid) result.valids  <= result.valids + 1'b1;
      if (probe_ready) result.readies <= result.readies + 1'b1;
      if (xfer) begin
        result.transfers <= result.transfers + 1'b1;
        result.elements  <= result.elements + REG_W'(probe_count);
        if (probe_last) result.packets <= result.packets + 1'b1;
      end
    end
  end
endmodule
