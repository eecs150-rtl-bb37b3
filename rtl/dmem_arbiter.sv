// dmem_arbiter: shares the single data-memory port between the MIPS
// processor and the graphics processor's DMA reader.
//
// The processor always wins: whenever mips_en is high its address, write
// data and byte write enables go to the memory and the DMA request waits.
// In any other cycle a pending DMA read is passed to the memory and granted
// (gp_gnt) in that same cycle, so the DMA only uses cycles the processor
// leaves free and never stalls it. The memory's read data is wired to both
// requesters; gp_rvalid marks the cycle, READ_LATENCY cycles after the
// grant, in which it belongs to the DMA read.
//
// From the specification: one arbiter in front of data memory, DMA taking
// only free cycles. Own choices: the fixed priority, the same-cycle grant
// and the read-valid pipeline (READ_LATENCY 1 suits a synchronous block RAM).
module dmem_arbiter
  import gp_pkg::*;
#(
  parameter int unsigned AW           = WORD_W,
  parameter int unsigned DW           = WORD_W,
  parameter int unsigned READ_LATENCY = 1
) (
  input  logic            clk,
  input  logic            rst,
  // processor data port
  input  logic            mips_en,
  input  logic [DW/8-1:0] mips_we,
  input  logic [AW-1:0]   mips_addr,
  input  logic [DW-1:0]   mips_wdata,
  output logic [DW-1:0]   mips_rdata,
  // graphics DMA read port
  input  logic            gp_req,
  input  logic [AW-1:0]   gp_addr,
  output logic            gp_gnt,
  output logic            gp_rvalid,
  output logic [DW-1:0]   gp_rdata,
  // data memory
  output logic            dmem_en,
  output logic [DW/8-1:0] dmem_we,
  output logic [AW-1:0]   dmem_addr,
  output logic [DW-1:0]   dmem_wdata,
  input  logic [DW-1:0]   dmem_rdata
);

  logic [READ_LATENCY:0] gnt_pipe;

  assign gp_gnt     = gp_req && !mips_en;
  assign dmem_en    = mips_en || gp_req;
  assign dmem_addr  = mips_en ? mips_addr : gp_addr;
  assign dmem_we    = mips_en ? mips_we : '0;
  assign dmem_wdata = mips_wdata;
  assign mips_rdata = dmem_rdata;
  assign gp_rdata   = dmem_rdata;

  assign gnt_pipe[0] = gp_gnt;
  assign gp_rvalid   = gnt_pipe[READ_LATENCY];

  for (genvar i = 1; i <= READ_LATENCY; i++) begin : g_lat
    always_ff @(posedge clk) begin
      if (rst) gnt_pipe[i] <= 1'b0;
      else     gnt_pipe[i] <= gnt_pipe[i-1];
    end
  end

  // The DMA never writes.
  a_gp_read_only: assert property (@(posedge clk) disable iff (rst)
                                   gp_gnt |-> (dmem_we == '0));

endmodule
