// stream_reshaper: changes the number of elements per handshake of an MEPH
// stream.
//
// Absorbs beats of up to IN_EPC valid elements (in_count, packed from element
// 0) and emits beats of up to OUT_EPC elements. Elements are kept in a shift
// buffer of IN_EPC+OUT_EPC entries: an output beat takes the n oldest
// elements, where n = min(buffered, OUT_EPC, out_max), and the buffer is
// barrel-shifted down by n while a new input beat is appended behind what is
// left. out_max lets a consumer cut beats at a boundary it knows (the list
// reader uses it to end each beat at the end of a string). A beat is emitted
// once min(OUT_EPC, out_max) elements are buffered, or after an input beat
// with in_last, which flushes the rest with out_last on the final beat (a
// flush with nothing buffered gives one empty last beat). Input is accepted
// while at most OUT_EPC elements are buffered and no flush is pending, so
// when IN_EPC >= OUT_EPC the output sustains a full beat per cycle.
// Elements of an output beat beyond out_count are zero.
// The function (serialise wide streams, parallelise narrow ones, built on a
// barrel shifter) follows the library description; the buffer organisation
// and the out_max port are this design's choices.
module stream_reshaper #(
  parameter int ELEM_W  = 8,
  parameter int IN_EPC  = 4,
  parameter int OUT_EPC = 1,
  parameter int IN_CW   = $clog2(IN_EPC + 1),
  parameter int OUT_CW  = $clog2(OUT_EPC + 1),
  parameter int MAX_W   = 32
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [IN_EPC*ELEM_W-1:0]  in_data,
  input  logic [IN_CW-1:0]          in_count,
  input  logic                      in_last,
  input  logic [MAX_W-1:0]          out_max,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [OUT_EPC*ELEM_W-1:0] out_data,
  output logic [OUT_CW-1:0]         out_count,
  output logic                      out_last
);
  localparam int CAP = IN_EPC + OUT_EPC;
  localparam int CW  = $clog2(CAP + 1);

  logic [CAP*ELEM_W-1:0] buf_q, buf_d, kept, incoming;
  logic [CW-1:0]         cnt_q, cnt_d;
  logic                  flush_q;
  int                    want, n;
  logic                  take, give;

  always_comb begin
    want = (int'(out_max) < OUT_EPC) ? int'(out_max) : OUT_EPC;
    n    = (int'(cnt_q) < want) ? int'(cnt_q) : want;
    out_valid = flush_q || ((int'(cnt_q) >= want) && (cnt_q != '0));
    out_count = OUT_CW'(n);
    out_last  = flush_q && (n == int'(cnt_q));
    out_data  = '0;
    for (int e = 0; e < OUT_EPC; e++)
      if (e < n) out_data[e*ELEM_W +: ELEM_W] = buf_q[e*ELEM_W +: ELEM_W];
  end

  assign in_ready = !flush_q && (int'(cnt_q) <= OUT_EPC);
  assign take     = in_valid && in_ready;
  assign give     = out_valid && out_ready;

  always_comb begin
    kept     = give ? (buf_q >> (n * ELEM_W)) : buf_q;
    incoming = '0;
    for (int e = 0; e < IN_EPC; e++)
      if (e < int'(in_count)) incoming[e*ELEM_W +: ELEM_W] = in_data[e*ELEM_W +: ELEM_W];
    cnt_d = give ? CW'(int'(cnt_q) - n) : cnt_q;
    buf_d = kept;
    if (take) begin
      buf_d = kept | (incoming << (int'(cnt_d) * ELEM_W));
      cnt_d = CW'(int'(cnt_d) + int'(in_count));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      buf_q   <= '0;
      cnt_q   <= '0;
      flush_q <= 1'b0;
    end else begin
      buf_q <= buf_d;
      cnt_q <= cnt_d;
      if (take && in_last) flush_q <= 1'b1;
      else if (give && out_last) flush_q <= 1'b0;
    end
  end
endmodule
