// gfx_top: the hardware added to the video subsystem for drawing.
//
// It joins three parts as the system block diagram shows them:
//   dmem_arbiter       - puts the processor and the graphics DMA on the one
//                        data-memory port, the processor first;
//   graphics_processor - executes the command list whose address is written
//                        to GP_CODE and writes line pixels to the frame buffer;
//   vbi_gen            - watches the video address generator's reads and
//                        raises the vertical blanking interrupt at the end
//                        of each frame.
// Everything else of the system (processor, data memory, memory-mapped
// interface, frame buffer, address generator) connects through the ports:
// the processor's data port, the data memory port, the GP_CODE write, the
// frame buffer pixel port with its stall, the address generator's
// coordinate and the interrupt with its acknowledge.
module gfx_top
  import gp_pkg::*;
#(
  parameter int unsigned CW           = COORD_W,
  parameter int unsigned PW           = COLOR_W,
  parameter int unsigned DMA_DEPTH    = 4,
  parameter int unsigned READ_LATENCY = 1,
  parameter int unsigned WIDTH        = SCREEN_W,
  parameter int unsigned HEIGHT       = SCREEN_H,
  parameter int unsigned X_STEP       = 1
) (
  input  logic              clk,
  input  logic              rst,
  // processor data port
  input  logic              mips_en,
  input  logic [3:0]        mips_we,
  input  logic [WORD_W-1:0] mips_addr,
  input  logic [WORD_W-1:0] mips_wdata,
  output logic [WORD_W-1:0] mips_rdata,
  // data memory
  output logic              dmem_en,
  output logic [3:0]        dmem_we,
  output logic [WORD_W-1:0] dmem_addr,
  output logic [WORD_W-1:0] dmem_wdata,
  input  logic [WORD_W-1:0] dmem_rdata,
  // memory-mapped GP_CODE register write
  input  logic              gp_code_we,
  input  logic [WORD_W-1:0] gp_code,
  // frame buffer pixel write port
  output logic              fb_valid,
  output logic [2*CW-1:0]   fb_crd,
  output logic [PW-1:0]     fb_color,
  input  logic              fb_stall,
  // video address generator read coordinate
  input  logic              vid_valid,
  input  logic [2*CW-1:0]   vid_crd,
  // interrupt
  output logic              vbi_irq,
  output logic              vbi_pulse,
  input  logic              vbi_ack,
  // status
  output logic              gp_busy,
  output logic              gp_line_done,
  output logic              gp_list_done,
  output logic              gp_bad_op
);

  logic              gp_req, gp_gnt, gp_rvalid;
  logic [WORD_W-1:0] gp_addr, gp_rdata;

  dmem_arbiter #(.READ_LATENCY(READ_LATENCY)) u_arb (
    .clk, .rst,
    .mips_en, .mips_we, .mips_addr, .mips_wdata, .mips_rdata,
    .gp_req, .gp_addr, .gp_gnt, .gp_rvalid, .gp_rdata,
    .dmem_en, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata
  );

  graphics_processor #(.CW(CW), .PW(PW), .DMA_DEPTH(DMA_DEPTH)) u_gp (
    .clk, .rst,
    .gp_code_we, .gp_code,
    .mem_req(gp_req), .mem_addr(gp_addr), .mem_gnt(gp_gnt),
    .mem_rvalid(gp_rvalid), .mem_rdata(gp_rdata),
    .fb_valid, .fb_crd, .fb_color, .fb_stall,
    .busy(gp_busy), .line_done(gp_line_done), .list_done(gp_list_done), .bad_op(gp_bad_op)
  );

  vbi_gen #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .X_STEP(X_STEP), .CW(CW)) u_vbi (
    .clk, .rst,
    .rd_valid(vid_valid), .rd_x(vid_crd[2*CW-1:CW]), .rd_y(vid_crd[CW-1:0]),
    .vbi_ack, .vbi_irq, .vbi_pulse
  );

endmodule
