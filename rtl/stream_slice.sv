// stream_slice: register slice for a valid/ready stream of any payload type.
//
// Breaks the combinational path of valid, data and ready with a two-entry
// skid buffer, so it sustains one transfer per cycle while in_ready depends
// only on registers. Latency is one cycle. The library description only says
// that a slice breaks combinational paths "typically using registers"; the
// skid-buffer structure is this design's choice.
module stream_slice #(
  parameter type T = logic [7:0]
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
  T     main_q, skid_q;
  logic main_v, skid_v;

  assign in_ready  = !skid_v;
  assign out_valid = main_v;
  assign out_data  = main_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      main_v <= 1'b0;
      skid_v <= 1'b0;
    end else begin
      if (!main_v || out_ready) begin
        // Main register drains; refill it from skid first, else from input.
        if (skid_v) begin
          main_q <= skid_q;
          main_v <= 1'b1;
          skid_v <= 1'b0;
        end else begin
          main_v <= in_valid;
          if (in_valid) main_q <= in_data;
        end
      end else if (in_valid && in_ready) begin
        skid_q <= in_data;
        skid_v <= 1'b1;
      end
    end
  end
endmodule
