// mmio: AXI4-lite slave register file of NREG 32-bit registers.
//
// A write needs its address and data (AW and W channels, accepted together)
// and answers OKAY on B; byte strobes are honoured. A read (AR) answers on R
// one cycle later. Registers whose bit is set in RO_MASK are read-only: reads
// return ro_value[i] and writes are ignored; the others are storage whose
// value appears on regs[i]. wr_pulse[i] is high for one cycle after each
// write to register i (used for self-clearing control bits). Addresses are
// byte addresses, register i at 4*i; out-of-range reads return 0.
// The document only says the MMIO controller is generated from a register
// map and reached over AXI4-lite; this implementation is this design's own.
module mmio
  import fletcher_pkg::*;
#(
  parameter int               NREG    = 8,
  parameter int               ADDR_W  = 32,
  parameter logic [NREG-1:0]  RO_MASK = '0
) (
  input  logic              clk,
  input  logic              rst,
  // AXI4-lite
  input  logic              awvalid,
  output logic              awready,
  input  logic [ADDR_W-1:0] awaddr,
  input  logic              wvalid,
  output logic              wready,
  input  logic [31:0]       wdata,
  input  logic [3:0]        wstrb,
  output logic              bvalid,
  input  logic              bready,
  output logic [1:0]        bresp,
  input  logic              arvalid,
  output logic              arready,
  input  logic [ADDR_W-1:0] araddr,
  output logic              rvalid,
  input  logic              rready,
  output logic [31:0]       rdata,
  output logic [1:0]        rresp,
  // Register side
  output logic [31:0]       regs     [NREG],
  output logic [NREG-1:0]   wr_pulse,
  input  logic [31:0]       ro_value [NREG]
);
  logic do_write, do_read;
  int   widx, ridx;

  assign widx     = int'(awaddr >> 2);
  assign ridx     = int'(araddr >> 2);
  assign awready  = !bvalid && awvalid && wvalid;
  assign wready   = awready;
  assign do_write = awready;
  assign arready  = !rvalid;
  assign do_read  = arvalid && arready;
  assign bresp    = 2'b00;
  assign rresp    = 2'b00;

  always_ff @(posedge clk) begin
    if (rst) begin
      bvalid   <= 1'b0;
      rvalid   <= 1'b0;
      rdata    <= '0;
      wr_pulse <= '0;
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else begin
      wr_pulse <= '0;
      if (do_write) begin
        bvalid <= 1'b1;
        if (widx < NREG && !RO_MASK[widx]) begin
          for (int b = 0; b < 4; b++)
            if (wstrb[b]) regs[widx][b*8 +: 8] <= wdata[b*8 +: 8];
          wr_pulse[widx] <= 1'b1;
        end
      end else if (bvalid && bready) begin
        bvalid <= 1'b0;
      end
      if (do_read) begin
        rvalid <= 1'b1;
        if (ridx >= NREG)        rdata <= '0;
        else if (RO_MASK[ridx])  rdata <= ro_value[ridx];
        else                     rdata <= regs[ridx];
      end else if (rvalid && rready) begin
        rvalid <= 1'b0;
      end
    end
  end
endmodule
