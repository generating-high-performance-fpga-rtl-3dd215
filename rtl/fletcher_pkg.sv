// fletcher_pkg: widths and stream/bus payload types shared by the Arrow
// buffer readers/writers, the interconnect and the Mantle.
//
// The memory bus follows the generated interconnect instance names of the
// example design (read and write interconnect "AW64 DW512 LW8 BM16"):
// 64-bit byte addresses, 512-bit data words, an 8-bit burst length field and
// bursts of at most 16 words. Row indices are 32 bits, as in the kernel
// waveforms (32'h00000004). The tag width (1 bit), the register width
// (32 bits, from the register map description) and the meaning of the burst
// length field (number of beats, 1..16) are this design's choices.
//
// The bus is AXI4-like: independent request and data channels, each a
// valid/ready stream. Read data returns in request order. Writes carry a
// byte strobe; there is no write-response channel.
package fletcher_pkg;

  localparam int BUS_ADDR_W    = 64;
  localparam int BUS_DATA_W    = 512;
  localparam int BUS_LEN_W     = 8;
  localparam int BUS_BURST_MAX = 16;
  localparam int BUS_BYTES     = BUS_DATA_W / 8;
  localparam int INDEX_W       = 32;
  localparam int TAG_W         = 1;
  localparam int REG_W         = 32;

  // Bus read or write request: a burst of len words starting at addr.
  typedef struct packed {
    logic [BUS_ADDR_W-1:0] addr;
    logic [BUS_LEN_W-1:0]  len;
  } bus_req_t;

  // Bus read data beat.
  typedef struct packed {
    logic [BUS_DATA_W-1:0] data;
    logic                  last;
  } bus_rdat_t;

  // Bus write data beat.
  typedef struct packed {
    logic [BUS_DATA_W-1:0] data;
    logic [BUS_BYTES-1:0]  strobe;
    logic                  last;
  } bus_wdat_t;

  // Command to a single BufferReader/BufferWriter: element range
  // [first_idx, last_idx) of the Arrow buffer at byte address base.
  typedef struct packed {
    logic [INDEX_W-1:0]    first_idx;
    logic [INDEX_W-1:0]    last_idx;
    logic [BUS_ADDR_W-1:0] base;
    logic [TAG_W-1:0]      tag;
  } buf_cmd_t;

  // Command from the kernel: a range of row indices and a tag.
  typedef struct packed {
    logic [INDEX_W-1:0] first_idx;
    logic [INDEX_W-1:0] last_idx;
    logic [TAG_W-1:0]   tag;
  } kern_cmd_t;

  // Command to an ArrayReader/ArrayWriter: row range, up to two Arrow
  // buffer addresses (offsets or validity in addr_a, values in addr_b; a
  // primitive array uses addr_a only) and the tag.
  typedef struct packed {
    logic [INDEX_W-1:0]    first_idx;
    logic [INDEX_W-1:0]    last_idx;
    logic [BUS_ADDR_W-1:0] addr_a;
    logic [BUS_ADDR_W-1:0] addr_b;
    logic [TAG_W-1:0]      tag;
  } arr_cmd_t;

  // Stream profiler results (all counters 32 bits).
  typedef struct packed {
    logic [REG_W-1:0] elements;
    logic [REG_W-1:0] valids;
    logic [REG_W-1:0] readies;
    logic [REG_W-1:0] transfers;
    logic [REG_W-1:0] packets;
    logic [REG_W-1:0] cycles;
  } prof_t;

endpackage
