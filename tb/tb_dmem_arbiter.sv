// tb_dmem_arbiter: self-checking test of dmem_arbiter.
//
// Random processor accesses and random DMA read requests compete for a
// synchronous memory model (one-cycle read latency). Checked every cycle:
// the processor always gets the port, the DMA is granted exactly the free
// cycles, DMA cycles never write, and the DMA read data returns with
// gp_rvalid one cycle after the grant and matches the addressed word.
module tb_dmem_arbiter;

  logic        clk = 0, rst = 1;
  logic        mips_en = 0;
  logic [3:0]  mips_we = 0;
  logic [31:0] mips_addr = 0, mips_wdata = 0, mips_rdata;
  logic        gp_req = 0, gp_gnt, gp_rvalid;
  logic [31:0] gp_addr = 0, gp_rdata;
  logic        dmem_en;
  logic [3:0]  dmem_we;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;

  int checks = 0, failures = 0;
  int granted = 0, denied = 0;

  dmem_arbiter dut (.*);

  // memory model: 256 words, byte write enables, registered read
  logic [31:0] mem [256];
  always_ff @(posedge clk) begin
    if (dmem_en) begin
      for (int b = 0; b < 4; b++)
        if (dmem_we[b]) mem[dmem_addr[9:2]][8*b +: 8] <= dmem_wdata[8*b +: 8];
      dmem_rdata <= mem[dmem_addr[9:2]];
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  logic        exp_rvalid;
  logic [31:0] exp_rdata;

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = 32'h1234_0000 + i * 32'h0001_0011;
    dmem_rdata = 0;
    exp_rvalid = 0;
    exp_rdata  = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      mips_en    = ($urandom_range(99) < 50);
      mips_we    = ($urandom_range(1)) ? 4'($urandom) : 4'h0;
      mips_addr  = {22'd0, 8'($urandom), 2'b00};
      mips_wdata = $urandom;
      gp_req     = ($urandom_range(99) < 60);
      gp_addr    = {22'd0, 8'($urandom), 2'b00};
      #1;
      check(gp_gnt == (gp_req && !mips_en), "grant only in free cycles");
      check(dmem_en == (mips_en || gp_req), "memory enable");
      if (mips_en) begin
        check(dmem_addr == mips_addr && dmem_we == mips_we && dmem_wdata == mips_wdata,
              "processor owns the port");
      end else if (gp_req) begin
        check(dmem_addr == gp_addr && dmem_we == 4'h0, "DMA read on a free cycle");
      end
      check(gp_rvalid == exp_rvalid, "read valid one cycle after grant");
      if (exp_rvalid) check(gp_rdata == exp_rdata, "DMA read data");
      check(mips_rdata == dmem_rdata, "processor read data");
      if (gp_req && mips_en) denied++;
      if (gp_gnt) granted++;
      exp_rvalid = gp_gnt;
      exp_rdata  = mem[gp_addr[9:2]];
      @(posedge clk);
      #1;
    end
    check(granted > 100 && denied > 100, "both grant and denial seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
