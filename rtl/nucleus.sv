// nucleus: the kernel's environment inside the Mantle.
//
// Holds the MMIO register file (AXI4-lite), the user kernel, the command
// accumulators and the stream profilers. The kernel issues commands that
// carry only row indices; for each of the seven Arrow fields a command
// accumulator adds the field's buffer addresses, taken from the
// schema-derived registers, and forwards an ArrayReader/Writer command, so
// the kernel never handles pointers. Control pulses (start, stop, reset)
// come from writes to the control register, and status (idle, busy, done)
// and the 64-bit result are readable. RecordBatch row ranges and the custom
// register age_threshold go to the kernel as plain inputs.
// Two stream profilers watch the people.name length and character streams
// between the Nucleus boundary and the kernel; their counters appear in the
// profiling registers, controlled by the profile control register.
// Data streams pass straight between the Nucleus ports and the kernel.
// Structure (MMIO controller, per-field command accumulators, profilers on
// tagged streams, kernel) follows the document; the register map is in
// mantle_pkg.
module nucleus
  import fletcher_pkg::*;
  import mantle_pkg::*;
#(
  parameter int EPC = 1,
  parameter int CW  = $clog2(EPC + 1)
) (
  input  logic clk,
  input  logic rst,
  // AXI4-lite MMIO
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] awaddr,
  input  logic        wvalid,
  output logic        wready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  output logic        bvalid,
  input  logic        bready,
  output logic [1:0]  bresp,
  input  logic        arvalid,
  output logic        arready,
  input  logic [31:0] araddr,
  output logic        rvalid,
  input  logic        rready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  // ArrayReader/Writer commands and unlocks (same field order as the kernel)
  output logic [6:0] acmd_valid,
  input  logic [6:0] acmd_ready,
  output arr_cmd_t   acmd [7],
  input  logic [6:0] aunl_valid,
  output logic [6:0] aunl_ready,
  // Arrow data streams
  input  logic        foods_id_valid, foods_id_last,
  output logic        foods_id_ready,
  input  logic [15:0] foods_id,
  input  logic               foods_name_valid, foods_name_last,
  output logic               foods_name_ready,
  input  logic [INDEX_W-1:0] foods_name_length,
  input  logic               foods_name_chars_valid, foods_name_chars_last,
  output logic               foods_name_chars_ready,
  input  logic [EPC*8-1:0]   foods_name_chars,
  input  logic [CW-1:0]      foods_name_chars_count,
  input  logic               people_name_valid, people_name_last,
  output logic               people_name_ready,
  input  logic [INDEX_W-1:0] people_name_length,
  input  logic               people_name_chars_valid, people_name_chars_last,
  output logic               people_name_chars_ready,
  input  logic [EPC*8-1:0]   people_name_chars,
  input  logic [CW-1:0]      people_name_chars_count,
  input  logic        people_age_valid, people_age_last,
  output logic        people_age_ready,
  input  logic [7:0]  people_age,
  input  logic        people_food_id_valid, people_food_id_last,
  output logic        people_food_id_ready,
  input  logic [15:0] people_food_id,
  output logic               dinner_name_valid, dinner_name_last,
  input  logic               dinner_name_ready,
  output logic [INDEX_W-1:0] dinner_name_length,
  output logic               dinner_name_chars_valid, dinner_name_chars_last,
  input  logic               dinner_name_chars_ready,
  output logic [EPC*8-1:0]   dinner_name_chars,
  output logic [CW-1:0]      dinner_name_chars_count,
  output logic               dinner_food_valid, dinner_food_last,
  input  logic               dinner_food_ready,
  output logic [INDEX_W-1:0] dinner_food_length,
  output logic               dinner_food_chars_valid, dinner_food_chars_last,
  input  logic               dinner_food_chars_ready,
  output logic [EPC*8-1:0]   dinner_food_chars,
  output logic [CW-1:0]      dinner_food_chars_count
);
  // ---------------- MMIO ----------------
  localparam logic [NUM_REGS-1:0] RO =
      (NUM_REGS'(1) << REG_STATUS) | (NUM_REGS'(1) << REG_RETURN0) | (NUM_REGS'(1) << REG_RETURN1) |
      (NUM_REGS'(12'hFFF) << REG_PROF_NAME_LEN);

  logic [31:0]         regs [NUM_REGS];
  logic [31:0]         ro   [NUM_REGS];
  logic [NUM_REGS-1:0] wr_pulse;

  mmio #(.NREG(NUM_REGS), .ADDR_W(32), .RO_MASK(RO)) u_mmio (
    .clk, .rst, .awvalid, .awready, .awaddr, .wvalid, .wready, .wdata, .wstrb,
    .bvalid, .bready, .bresp, .arvalid, .arready, .araddr, .rvalid, .rready, .rdata, .rresp,
    .regs, .wr_pulse, .ro_value(ro));

  logic        start, stop, reset, idle, busy, done;
  logic [63:0] result;
  assign start = wr_pulse[REG_CONTROL] && regs[REG_CONTROL][0];
  assign stop  = wr_pulse[REG_CONTROL] && regs[REG_CONTROL][1];
  assign reset = wr_pulse[REG_CONTROL] && regs[REG_CONTROL][2];

  prof_t prof_len, prof_chars;
  logic  prof_enable, prof_clear;
  assign prof_enable = regs[REG_PROFILE_CONTROL][0];
  assign prof_clear  = wr_pulse[REG_PROFILE_CONTROL] && regs[REG_PROFILE_CONTROL][1];

  always_comb begin
    for (int i = 0; i < NUM_REGS; i++) ro[i] = '0;
    ro[REG_STATUS]  = {29'b0, done, busy, idle};
    ro[REG_RETURN0] = result[31:0];
    ro[REG_RETURN1] = result[63:32];
    {ro[REG_PROF_NAME_LEN+0], ro[REG_PROF_NAME_LEN+1], ro[REG_PROF_NAME_LEN+2],
     ro[REG_PROF_NAME_LEN+3], ro[REG_PROF_NAME_LEN+4], ro[REG_PROF_NAME_LEN+5]} = prof_len;
    {ro[REG_PROF_NAME_CHARS+0], ro[REG_PROF_NAME_CHARS+1], ro[REG_PROF_NAME_CHARS+2],
     ro[REG_PROF_NAME_CHARS+3], ro[REG_PROF_NAME_CHARS+4], ro[REG_PROF_NAME_CHARS+5]} = prof_chars;
  end

  // ---------------- Stream profilers (people.name) ----------------
  stream_profiler #(.CNT_W(1)) u_prof_name (
    .clk, .rst, .enable(prof_enable), .clear(prof_clear),
    .probe_valid(people_name_valid), .probe_ready(people_name_ready),
    .probe_last(people_name_last), .probe_count(1'b1), .result(prof_len));

  stream_profiler #(.CNT_W(CW)) u_prof_name_chars (
    .clk, .rst, .enable(prof_enable), .clear(prof_clear),
    .probe_valid(people_name_chars_valid), .probe_ready(people_name_chars_ready),
    .probe_last(people_name_chars_last), .probe_count(people_name_chars_count), .result(prof_chars));

  // ---------------- Command accumulators ----------------
  logic [6:0] k_cmd_valid, k_cmd_ready;
  kern_cmd_t  k_cmd [7];

  function automatic logic [63:0] addr64(int idx);
    return {regs[idx+1], regs[idx]};
  endfunction

  always_comb begin
    logic [63:0] a [7], b [7];
    a[0] = addr64(REG_FOODS_ID_VAL);       b[0] = '0;
    a[1] = addr64(REG_FOODS_NAME_OFF);     b[1] = addr64(REG_FOODS_NAME_VAL);
    a[2] = addr64(REG_PEOPLE_NAME_OFF);    b[2] = addr64(REG_PEOPLE_NAME_VAL);
    a[3] = addr64(REG_PEOPLE_AGE_VAL);     b[3] = '0;
    a[4] = addr64(REG_PEOPLE_FOOD_ID_VAL); b[4] = '0;
    a[5] = addr64(REG_DINNER_NAME_OFF);    b[5] = addr64(REG_DINNER_NAME_VAL);
    a[6] = addr64(REG_DINNER_FOOD_OFF);    b[6] = addr64(REG_DINNER_FOOD_VAL);
    for (int f = 0; f < 7; f++)
      acmd[f] = '{first_idx: k_cmd[f].first_idx, last_idx: k_cmd[f].last_idx,
                  addr_a: a[f], addr_b: b[f], tag: k_cmd[f].tag};
  end
  assign acmd_valid  = k_cmd_valid;
  assign k_cmd_ready = acmd_ready;

  // ---------------- Kernel ----------------
  kernel #(.EPC(EPC)) u_kernel (
    .clk, .rst, .start, .stop, .reset, .idle, .busy, .done, .result,
    .foods_firstidx(regs[REG_FOODS_FIRST]),   .foods_lastidx(regs[REG_FOODS_LAST]),
    .people_firstidx(regs[REG_PEOPLE_FIRST]), .people_lastidx(regs[REG_PEOPLE_LAST]),
    .dinner_firstidx(regs[REG_DINNER_FIRST]), .age_threshold(regs[REG_AGE_THRESHOLD]),
    .cmd_valid(k_cmd_valid), .cmd_ready(k_cmd_ready), .cmd(k_cmd),
    .unl_valid(aunl_valid), .unl_ready(aunl_ready),
    .*);
endmodule
