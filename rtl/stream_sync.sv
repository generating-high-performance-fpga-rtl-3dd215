// stream_sync: synchronises NI input streams with NO output streams.
//
// A transfer happens on all streams in the same cycle, and only when every
// input is valid and every output is ready. Data travels outside this block;
// it only combines the handshakes (the grey "Sync" boxes of the buffer
// reader/writer diagrams). Combinational, no state. in_use masks let a
// stream be left out of the synchronisation (held ready/valid low).
// The Verilator linter may report UNOPTFLAT (circular logic) on the ready vectors when
// syncs are chained: it treats a whole vector as one signal, and different
// bits of it feed each other's logic. No bit depends on itself (valid never
// depends on ready), so the loop is only apparent; it costs simulation
// speed, not correctness, and the warning is left as it is.
module stream_sync #(
  parameter int NI = 2,
  parameter int NO = 1
) (
  input  logic [NI-1:0] in_valid,
  output logic [NI-1:0] in_ready,
  input  logic [NI-1:0] in_use,
  output logic [NO-1:0] out_valid,
  input  logic [NO-1:0] out_ready,
  input  logic [NO-1:0] out_use
);
  logic all_in, all_out;
  assign all_in  = &(in_valid | ~in_use);
  assign all_out = &(out_ready | ~out_use);

  always_comb begin
    for (int i = 0; i < NI; i++) begin
      // Input i is acknowledged when everything else is ready too.
      in_ready[i] = in_use[i] && all_out && (&(in_valid | ~in_use | (NI'(1) << i)));
    end
    for (int o = 0; o < NO; o++) begin
      out_valid[o] = out_use[o] && all_in && (&(out_ready | ~out_use | (NO'(1) << o)));
    end
  end
endmodule
