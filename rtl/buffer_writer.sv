// buffer_writer: writes an MEPH element stream into one Arrow buffer in
// memory.
//
// Command: first element index first_idx of the buffer at byte address base,
// and a tag (last_idx is not used: the input stream's last flag ends the
// command, since a writer cannot always know its output size beforehand).
// Elements (ELEM_W bits, a multiple of 8; E = BUS_DATA_W/ELEM_W per word)
// pass through the padder and reshaper, which packs them into bus words: the
// first word starts at element first_idx mod E and the elements before it,
// like those after the final element, get a cleared element write strobe.
// The byte strobe generator expands element strobes to byte strobes. Words
// wait in the bus write buffer; the word & burst counter issues a write
// request of BURST_MAX words whenever that many are buffered, and a shorter
// one for the rest after the last element. Data beats follow their request
// in order with last on the final beat of each burst. When every word has
// been sent the tag is returned on the unlock stream.
//
// Offsets mode (OFFSETS=1, ELEM_W=32, EPC=1): the input is a stream of list
// lengths and the offset generator writes the running sum: one offset per
// length, starting at 0, and after the length marked last one more offset
// holding the total. Generating child commands per list (which the document
// offers as an option that pads every list) is left out; the list writer
// commands its values writer once, the document's maximum-throughput
// setting.
//
// Timing: one command at a time; the input sustains one beat per cycle. No
// write response is awaited: unlock means all data has been handed to the
// bus. The block structure follows the document's buffer writer diagram;
// burst policy, the start-at-zero offsets and the missing write response are
// this design's choices.
module buffer_writer
  import fletcher_pkg::*;
#(
  parameter int ELEM_W     = 8,
  parameter int EPC        = 1,
  parameter bit OFFSETS    = 1'b0,
  parameter int BURST_MAX  = BUS_BURST_MAX,
  parameter int FIFO_DEPTH = 2 * BUS_BURST_MAX,
  parameter int CW         = $clog2(EPC + 1)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  buf_cmd_t              cmd,
  output logic                  unl_valid,
  input  logic                  unl_ready,
  output logic [TAG_W-1:0]      unl_tag,
  output logic                  wreq_valid,
  input  logic                  wreq_ready,
  output bus_req_t              wreq,
  output logic                  wdat_valid,
  input  logic                  wdat_ready,
  output bus_wdat_t             wdat,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [EPC*ELEM_W-1:0] in_data,
  input  logic [CW-1:0]         in_count,
  input  logic                  in_last
);
  localparam int E   = BUS_DATA_W / ELEM_W;
  localparam int ECW = $clog2(E + 1);
  localparam int EB  = ELEM_W / 8;          // bytes per element

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_UNLOCK} state_e;
  state_e      st;
  buf_cmd_t    c;
  logic [63:0] w_base;
  logic [ECW-1:0] lead;
  logic        first_word, end_seen;
  logic [63:0] words_in, words_req, words_sent;

  assign cmd_ready = (st == S_IDLE);
  assign unl_valid = (st == S_UNLOCK);
  assign unl_tag   = c.tag;

  // ------------------------------------------------------------------
  // Offset generation (offsets mode) or direct element input
  // ------------------------------------------------------------------
  logic                  el_valid, el_ready, el_last;
  logic [EPC*ELEM_W-1:0] el_data;
  logic [CW-1:0]         el_count;

  if (OFFSETS) begin : g_off
    logic [INDEX_W-1:0] acc;
    logic               extra;
    always_comb begin
      el_valid = (st == S_RUN) && (extra || in_valid);
      el_data  = '0;
      el_data[INDEX_W-1:0] = acc;
      el_count = CW'(1);
      el_last  = extra;
      in_ready = (st == S_RUN) && !extra && el_ready;
    end
    always_ff @(posedge clk) begin
      if (rst || st == S_IDLE) begin
        acc   <= '0;
        extra <= 1'b0;
      end else if (el_valid && el_ready) begin
        if (extra) extra <= 1'b0;
        else begin
          acc <= acc + in_data[INDEX_W-1:0];
          if (in_last) extra <= 1'b1;
        end
      end
    end
  end else begin : g_val
    assign el_valid = (st == S_RUN) && in_valid;
    assign in_ready = (st == S_RUN) && el_ready;
    assign el_data  = in_data;
    assign el_count = in_count;
    assign el_last  = in_last;
  end

  // ------------------------------------------------------------------
  // Padder / reshaper: elements to bus words
  // ------------------------------------------------------------------
  logic                  rw_valid, rw_ready, rw_last;
  logic [BUS_DATA_W-1:0] rw_data;
  logic [ECW-1:0]        rw_count;

  stream_reshaper #(.ELEM_W(ELEM_W), .IN_EPC(EPC), .OUT_EPC(E), .IN_CW(CW)) u_reshaper (
    .clk, .rst,
    .in_valid(el_valid), .in_ready(el_ready), .in_data(el_data),
    .in_count(el_count), .in_last(el_last),
    .out_max(first_word ? 32'(E - int'(lead)) : 32'(E)),
    .out_valid(rw_valid), .out_ready(rw_ready), .out_data(rw_data),
    .out_count(rw_count), .out_last(rw_last));

  typedef struct packed {
    logic [BUS_DATA_W-1:0] data;
    logic [BUS_BYTES-1:0]  strobe;
  } word_t;

  word_t          wb_in, wb_out;
  logic           wb_in_valid, wb_in_ready, wb_out_valid, wb_out_ready;
  logic [E-1:0]   el_strobe;
  int             shift;

  always_comb begin
    shift     = first_word ? int'(lead) : 0;
    el_strobe = '0;
    for (int e = 0; e < E; e++)
      if (e < int'(rw_count)) el_strobe[e] = 1'b1;
    el_strobe     = el_strobe << shift;
    wb_in.data    = rw_data << (shift * ELEM_W);
    for (int b = 0; b < BUS_BYTES; b++) wb_in.strobe[b] = el_strobe[b / EB];
    // An empty flush beat ends the stream without producing a word.
    wb_in_valid   = rw_valid && (rw_count != '0);
    rw_ready      = (rw_count == '0) || wb_in_ready;
  end

  stream_fifo #(.T(word_t), .DEPTH(FIFO_DEPTH)) u_wbuf (
    .clk, .rst,
    .in_valid(wb_in_valid), .in_ready(wb_in_ready), .in_data(wb_in),
    .out_valid(wb_out_valid), .out_ready(wb_out_ready), .out_data(wb_out), .level());

  // ------------------------------------------------------------------
  // Word & burst counter, request generation
  // ------------------------------------------------------------------
  logic [63:0] pending;
  logic        bl_in_ready, bl_valid, bl_ready;
  logic [BUS_LEN_W-1:0] bl_len;
  logic [BUS_LEN_W-1:0] beat;

  always_comb begin
    pending    = words_in - words_req;
    wreq_valid = (st == S_RUN) && bl_in_ready &&
                 ((pending >= 64'(BURST_MAX)) || (end_seen && pending != 0));
    wreq.addr  = c.base + (w_base + words_req) * BUS_BYTES;
    wreq.len   = (pending >= 64'(BURST_MAX)) ? BUS_LEN_W'(BURST_MAX) : BUS_LEN_W'(pending);
  end

  stream_fifo #(.T(logic [BUS_LEN_W-1:0]), .DEPTH(4)) u_blen (
    .clk, .rst,
    .in_valid(wreq_valid && wreq_ready), .in_ready(bl_in_ready), .in_data(wreq.len),
    .out_valid(bl_valid), .out_ready(bl_ready), .out_data(bl_len), .level());

  always_comb begin
    wdat_valid   = wb_out_valid && bl_valid;
    wdat.data    = wb_out.data;
    wdat.strobe  = wb_out.strobe;
    wdat.last    = (beat == bl_len - 1'b1);
    wb_out_ready = wdat_ready && bl_valid;
    bl_ready     = wdat_valid && wdat_ready && wdat.last;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE;
      first_word <= 1'b1;
      end_seen   <= 1'b0;
      words_in   <= '0;
      words_req  <= '0;
      words_sent <= '0;
      beat       <= '0;
      lead       <= '0;
    end else begin
      case (st)
        S_IDLE: if (cmd_valid) begin
          c          <= cmd;
          w_base     <= (64'(cmd.first_idx) * ELEM_W) / BUS_DATA_W;
          lead       <= ECW'(cmd.first_idx % E);
          first_word <= 1'b1;
          end_seen   <= 1'b0;
          words_in   <= '0;
          words_req  <= '0;
          words_sent <= '0;
          st         <= S_RUN;
        end
        S_RUN: begin
          if (rw_valid && rw_ready) begin
            if (rw_count != '0) begin
              words_in   <= words_in + 1;
              first_word <= 1'b0;
            end
            if (rw_last) end_seen <= 1'b1;
          end
          if (wreq_valid && wreq_ready) words_req <= words_req + 64'(wreq.len);
          if (wdat_valid && wdat_ready) begin
            words_sent <= words_sent + 1;
            beat <= wdat.last ? '0 : beat + 1'b1;
          end
          if (end_seen && words_sent == words_in && !wb_out_valid) st <= S_UNLOCK;
        end
        S_UNLOCK: if (unl_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
