// tb_mmio: checks the AXI4-lite register file with 8 registers, of which
// registers 1 and 3 are read-only.
//
// Writes with random byte strobes to random registers must update exactly
// the strobed bytes of writable registers and pulse wr_pulse for one cycle;
// writes to read-only or out-of-range registers must change nothing. Reads
// must return the register (or the ro_value input for read-only ones, or 0
// out of range) one cycle after the address is taken, with OKAY responses.
module tb_mmio;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [7:0] RO = 8'b0000_1010;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] awaddr, araddr, wdata, rdata; logic [3:0] wstrb; logic [1:0] bresp, rresp;
  logic [31:0] regs [8], ro_value [8];
  logic [7:0] wr_pulse;
  mmio #(.NREG(8), .ADDR_W(32), .RO_MASK(RO)) dut (.*);

  logic [31:0] model [8];
  int pulses = 0;
  always @(posedge clk) if (!rst) begin
    check($countones(wr_pulse) <= 1, "at most one write pulse");
    if (wr_pulse != 0) pulses++;
  end

  task automatic write(int idx, logic [31:0] v, logic [3:0] s);
    int lat = 0;
    @(negedge clk);
    awvalid = 1; wvalid = 1; awaddr = 32'(4 * idx); wdata = v; wstrb = s;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk) begin awvalid = 0; wvalid = 0; bready = 1; end
    while (!bvalid) @(negedge clk);
    check(bresp == 2'b00, "write response OKAY");
    check(wr_pulse == ((idx < 8 && !RO[idx]) ? 8'(1 << idx) : 8'h0), $sformatf("write pulse for register %0d", idx));
    @(negedge clk) bready = 0;
    if (idx < 8 && !RO[idx]) for (int b = 0; b < 4; b++) if (s[b]) model[idx][b*8 +: 8] = v[b*8 +: 8];
  endtask
  task automatic read_check(int idx);
    logic [31:0] exp;
    @(negedge clk);
    arvalid = 1; araddr = 32'(4 * idx); rready = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk) arvalid = 0;
    check(rvalid, "read data one cycle after the address");
    exp = (idx >= 8) ? 32'h0 : RO[idx] ? ro_value[idx] : model[idx];
    check(rdata == exp && rresp == 2'b00, $sformatf("read register %0d: %h, expected %h", idx, rdata, exp));
    @(negedge clk) rready = 0;
  endtask

  initial begin
    int idx;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0; awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    for (int i = 0; i < 8; i++) begin model[i] = 0; ro_value[i] = 32'hA5000000 | 32'(i); end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 9; i++) read_check(i);
    for (int t = 0; t < 300; t++) begin
      idx = $urandom_range(0, 8);
      if ($urandom_range(0, 1) == 0) write(idx, $urandom, 4'($urandom_range(1, 15)));
      else read_check(idx);
      for (int i = 0; i < 8; i++) if (!RO[i]) check(regs[i] == model[i], $sformatf("register %0d contents", i));
    end
    check(pulses > 50, "write pulses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
