// buffer_reader: reads a range of elements of one Arrow buffer from memory
// and delivers them as a multiple-element-per-handshake (MEPH) stream.
//
// Command: element range [first_idx, last_idx) of the buffer at byte address
// base, plus a tag. The reader works out which bus words hold the range
// (elements are ELEM_W bits, E = BUS_DATA_W/ELEM_W per word, 1-bit validity
// bitmaps included), issues bursts of at most BURST_MAX words, buffers the
// returned words (bus read buffer), and per word the alignment & count
// control computes how many leading elements to drop and how many are valid.
// The aligner (stream_barrel) rotates the first word so the first wanted
// element sits at position 0, and the reshaper cuts words into beats of up to
// EPC elements with a count; the final beat carries last. When the last
// element has left, the tag is handed back on the unlock stream.
//
// Offsets mode (OFFSETS=1, ELEM_W=32, EPC=1): the reader first fetches the
// words holding offset[first_idx] and offset[last_idx] and sends them as a
// child command (first, last) for the values reader, then reads the offsets
// [first_idx, last_idx] in large bursts; consecutive offsets are subtracted
// to give one length per beat.
//
// Timing: one command is handled at a time (cmd_ready is high only when
// idle); a new command is accepted the cycle after unlock. The output
// sustains one beat per cycle when memory keeps up. An empty range issues no
// request and only unlocks. Buffer base addresses must be aligned to the bus
// word (64 bytes). Bursts are not split at page boundaries.
// What follows the document: the interfaces (command, unlock, bus read
// request, bus read data, MEPH data), the block structure (request
// generation, bus read buffer, alignment & count control, sync, aligner,
// reshaper, length generation, child command generation) and the
// first/last-offset-before-burst scheme. The rest is this design's choice.
module buffer_reader
  import fletcher_pkg::*;
#(
  parameter int ELEM_W      = 8,
  parameter int EPC         = 1,
  parameter bit OFFSETS     = 1'b0,
  parameter int BURST_MAX   = BUS_BURST_MAX,
  parameter int FIFO_DEPTH  = 2 * BUS_BURST_MAX,
  parameter int CW          = $clog2(EPC + 1)
) (
  input  logic                  clk,
  input  logic                  rst,
  // Command in
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  buf_cmd_t              cmd,
  // Unlock out
  output logic                  unl_valid,
  input  logic                  unl_ready,
  output logic [TAG_W-1:0]      unl_tag,
  // Bus read request / data
  output logic                  rreq_valid,
  input  logic                  rreq_ready,
  output bus_req_t              rreq,
  input  logic                  rdat_valid,
  output logic                  rdat_ready,
  input  bus_rdat_t             rdat,
  // MEPH data out (lengths in offsets mode)
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [EPC*ELEM_W-1:0] out_data,
  output logic [CW-1:0]         out_count,
  output logic                  out_last,
  // Child command out (offsets mode only)
  output logic                  ccmd_valid,
  input  logic                  ccmd_ready,
  output logic [INDEX_W-1:0]    ccmd_first,
  output logic [INDEX_W-1:0]    ccmd_last
);
  localparam int E     = BUS_DATA_W / ELEM_W;     // elements per bus word
  localparam int EAW   = (E > 1) ? $clog2(E) : 1;
  localparam int ECW   = $clog2(E + 1);
  localparam int ROUT  = OFFSETS ? 1 : EPC;       // reshaper output width
  localparam int RCW   = $clog2(ROUT + 1);

  typedef enum logic [2:0] {R_IDLE, R_PROBE_F, R_PROBE_L, R_BURST, R_WAIT, R_UNLOCK} rstate_e;
  typedef enum logic [1:0] {D_PROBE_F, D_PROBE_L, D_CCMD, D_DATA} dstate_e;

  rstate_e          rs;
  dstate_e          ds;
  buf_cmd_t         c;
  logic [63:0]      n_el;        // elements to deliver
  logic [63:0]      w_next;      // next word index to request
  logic [63:0]      w_left;      // words still to request
  logic [63:0]      el_left;     // elements still to pass to the aligner
  logic             first_word;
  logic             done;        // final element has left
  logic [INDEX_W-1:0] off_first, off_last;

  // ------------------------------------------------------------------
  // Request generation
  // ------------------------------------------------------------------
  logic [63:0] cmd_n, cmd_w0, cmd_w1;
  always_comb begin
    cmd_n  = 64'(cmd.last_idx) - 64'(cmd.first_idx) + (OFFSETS ? 64'd1 : 64'd0);
    cmd_w0 = (64'(cmd.first_idx) * ELEM_W) / BUS_DATA_W;
    cmd_w1 = ((64'(cmd.first_idx) + cmd_n) * ELEM_W - 1) / BUS_DATA_W;
  end

  assign cmd_ready = (rs == R_IDLE);

  always_comb begin
    rreq_valid = 1'b0;
    rreq       = '0;
    case (rs)
      R_PROBE_F: begin
        rreq_valid = 1'b1;
        rreq.addr  = c.base + ((64'(c.first_idx) * ELEM_W) / BUS_DATA_W) * BUS_BYTES;
        rreq.len   = BUS_LEN_W'(1);
      end
      R_PROBE_L: begin
        rreq_valid = 1'b1;
        rreq.addr  = c.base + ((64'(c.last_idx) * ELEM_W) / BUS_DATA_W) * BUS_BYTES;
        rreq.len   = BUS_LEN_W'(1);
      end
      R_BURST: begin
        rreq_valid = 1'b1;
        rreq.addr  = c.base + w_next * BUS_BYTES;
        rreq.len   = (w_left > 64'(BURST_MAX)) ? BUS_LEN_W'(BURST_MAX) : BUS_LEN_W'(w_left);
      end
      default: ;
    endcase
  end

  assign unl_valid = (rs == R_UNLOCK);
  assign unl_tag   = c.tag;

  always_ff @(posedge clk) begin
    if (rst) begin
      rs <= R_IDLE;
    end else begin
      case (rs)
        R_IDLE: if (cmd_valid) begin
          c      <= cmd;
          n_el   <= cmd_n;
          w_next <= cmd_w0;
          w_left <= cmd_w1 - cmd_w0 + 1;
          if (cmd_n == 0) rs <= R_UNLOCK;
          else            rs <= OFFSETS ? R_PROBE_F : R_BURST;
        end
        R_PROBE_F: if (rreq_ready) rs <= R_PROBE_L;
        R_PROBE_L: if (rreq_ready) rs <= R_BURST;
        R_BURST: if (rreq_ready) begin
          w_next <= w_next + 64'(rreq.len);
          w_left <= w_left - 64'(rreq.len);
          if (w_left <= 64'(BURST_MAX)) rs <= R_WAIT;
        end
        R_WAIT:   if (done) rs <= R_UNLOCK;
        R_UNLOCK: if (unl_ready) rs <= R_IDLE;
        default:  rs <= R_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // Bus read buffer
  // ------------------------------------------------------------------
  logic      bf_valid, bf_ready;
  bus_rdat_t bf_data;

  stream_fifo #(.T(bus_rdat_t), .DEPTH(FIFO_DEPTH)) u_rbuf (
    .clk, .rst,
    .in_valid(rdat_valid), .in_ready(rdat_ready), .in_data(rdat),
    .out_valid(bf_valid), .out_ready(bf_ready), .out_data(bf_data), .level());

  // ------------------------------------------------------------------
  // Alignment & count control, synchronised with the bus words
  // ------------------------------------------------------------------
  logic           al_valid, al_ready;
  logic [EAW-1:0] al_shift;
  logic [ECW-1:0] al_count;
  logic           al_last;
  logic           busy;

  assign busy = (rs == R_PROBE_F) || (rs == R_PROBE_L) || (rs == R_BURST) || (rs == R_WAIT);

  always_comb begin
    logic [63:0] avail;
    al_shift = first_word ? EAW'(c.first_idx % E) : '0;
    avail    = 64'(E) - 64'(al_shift);
    al_count = (el_left < avail) ? ECW'(el_left) : ECW'(avail);
    al_last  = (el_left <= avail);
  end

  always_comb begin
    bf_ready   = 1'b0;
    al_valid   = 1'b0;
    ccmd_valid = 1'b0;
    case (ds)
      D_PROBE_F, D_PROBE_L: bf_ready = busy;
      D_CCMD:               ccmd_valid = 1'b1;
      D_DATA: begin
        al_valid = busy && bf_valid && (el_left != 0);
        bf_ready = busy && al_ready && (el_left != 0);
      end
      default: ;
    endcase
  end
  assign ccmd_first = off_first;
  assign ccmd_last  = off_last;

  always_ff @(posedge clk) begin
    if (rst) begin
      ds         <= OFFSETS ? D_PROBE_F : D_DATA;
      first_word <= 1'b1;
      el_left    <= '0;
    end else begin
      if (rs == R_IDLE && cmd_valid) begin
        ds         <= OFFSETS ? D_PROBE_F : D_DATA;
        first_word <= 1'b1;
        el_left    <= cmd_n;
      end else begin
        case (ds)
          D_PROBE_F: if (busy && bf_valid) begin
            off_first <= bf_data.data[((c.first_idx) % E) * ELEM_W +: INDEX_W];
            ds <= D_PROBE_L;
          end
          D_PROBE_L: if (busy && bf_valid) begin
            off_last <= bf_data.data[((c.last_idx) % E) * ELEM_W +: INDEX_W];
            ds <= D_CCMD;
          end
          D_CCMD: if (ccmd_ready) ds <= D_DATA;
          D_DATA: if (al_valid && al_ready) begin
            first_word <= 1'b0;
            el_left    <= el_left - 64'(al_count);
          end
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------------------
  // Aligner and reshaper
  // ------------------------------------------------------------------
  logic                   ba_valid, ba_ready, ba_last;
  logic [BUS_DATA_W-1:0]  ba_data;
  logic [ECW-1:0]         ba_count;

  stream_barrel #(.EPC(E), .ELEM_W(ELEM_W), .AMT_W(EAW), .CNT_W(ECW)) u_aligner (
    .clk, .rst,
    .in_valid(al_valid), .in_ready(al_ready), .in_data(bf_data.data),
    .in_amount(al_shift), .in_count(al_count), .in_last(al_last),
    .out_valid(ba_valid), .out_ready(ba_ready), .out_data(ba_data),
    .out_count(ba_count), .out_last(ba_last));

  logic                   rs_valid, rs_ready, rs_last;
  logic [ROUT*ELEM_W-1:0] rs_data;
  logic [RCW-1:0]         rs_count;

  stream_reshaper #(.ELEM_W(ELEM_W), .IN_EPC(E), .OUT_EPC(ROUT)) u_reshaper (
    .clk, .rst,
    .in_valid(ba_valid), .in_ready(ba_ready), .in_data(ba_data),
    .in_count(ba_count), .in_last(ba_last), .out_max(32'(ROUT)),
    .out_valid(rs_valid), .out_ready(rs_ready), .out_data(rs_data),
    .out_count(rs_count), .out_last(rs_last));

  // ------------------------------------------------------------------
  // Output: elements directly, or lengths from consecutive offsets
  // ------------------------------------------------------------------
  if (OFFSETS) begin : g_len
    logic               have_prev;
    logic [INDEX_W-1:0] prev;
    always_comb begin
      out_valid = rs_valid && have_prev;
      out_data  = '0;
      out_data[INDEX_W-1:0] = rs_data[INDEX_W-1:0] - prev;
      out_count = CW'(1);
      out_last  = rs_last;
      rs_ready  = !have_prev || out_ready;
    end
    always_ff @(posedge clk) begin
      if (rst || (rs == R_IDLE)) begin
        have_prev <= 1'b0;
        done      <= 1'b0;
      end else if (rs_valid && rs_ready) begin
        have_prev <= 1'b1;
        prev      <= rs_data[INDEX_W-1:0];
        if (rs_last) done <= 1'b1;
      end
    end
  end else begin : g_val
    assign out_valid = rs_valid;
    assign out_data  = rs_data;
    assign out_count = CW'(rs_count);
    assign out_last  = rs_last;
    assign rs_ready  = out_ready;
    always_ff @(posedge clk) begin
      if (rst || (rs == R_IDLE)) done <= 1'b0;
      else if (rs_valid && rs_ready && rs_last) done <= 1'b1;
    end
  end
endmodule
