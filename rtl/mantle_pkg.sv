// mantle_pkg: register map of the example accelerator (tables 'foods' and
// 'people' read, table 'dinner' written), as seen over AXI4-lite.
//
// All registers are 32 bits, at byte address 4 * index. The order follows
// the four register categories of the framework: default registers
// (control, status, two return-value words), schema-derived registers (first
// and last row index of each RecordBatch, then every Arrow buffer address as
// a low/high word pair; RecordBatches sorted by name, then read before
// write), custom registers (age_threshold) and profiling registers (one
// control register, then six counters per profiled stream). The exact
// numbering and the bit positions inside control/status are this design's
// choices.
package mantle_pkg;
  localparam int REG_CONTROL    = 0;   // W: bit0 start, bit1 stop, bit2 reset (self-clearing)
  localparam int REG_STATUS     = 1;   // R: bit0 idle, bit1 busy, bit2 done
  localparam int REG_RETURN0    = 2;   // R: result[31:0]
  localparam int REG_RETURN1    = 3;   // R: result[63:32]
  localparam int REG_FOODS_FIRST  = 4;
  localparam int REG_FOODS_LAST   = 5;
  localparam int REG_PEOPLE_FIRST = 6;
  localparam int REG_PEOPLE_LAST  = 7;
  localparam int REG_DINNER_FIRST = 8;
  localparam int REG_DINNER_LAST  = 9;
  // Buffer addresses, low word at the index, high word at index + 1.
  localparam int REG_FOODS_ID_VAL       = 10;
  localparam int REG_FOODS_NAME_OFF     = 12;
  localparam int REG_FOODS_NAME_VAL     = 14;
  localparam int REG_PEOPLE_NAME_OFF    = 16;
  localparam int REG_PEOPLE_NAME_VAL    = 18;
  localparam int REG_PEOPLE_AGE_VAL     = 20;
  localparam int REG_PEOPLE_FOOD_ID_VAL = 22;
  localparam int REG_DINNER_NAME_OFF    = 24;
  localparam int REG_DINNER_NAME_VAL    = 26;
  localparam int REG_DINNER_FOOD_OFF    = 28;
  localparam int REG_DINNER_FOOD_VAL    = 30;
  localparam int REG_AGE_THRESHOLD      = 32;  // custom register
  localparam int REG_PROFILE_CONTROL    = 33;  // bit0 enable, bit1 clear
  localparam int REG_PROF_NAME_LEN      = 34;  // 6 counters, people.name length stream
  localparam int REG_PROF_NAME_CHARS    = 40;  // 6 counters, people.name character stream
  localparam int NUM_REGS               = 46;
endpackage
