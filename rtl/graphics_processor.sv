// graphics_processor: the graphics engine of the video subsystem.
//
// It executes a list of graphics commands that the processor has written to
// data memory. Writing the list's byte address to the memory-mapped GP_CODE
// register (gp_code_we) starts it; the command words are fetched by the DMA
// reader (gp_dma) through the data-memory arbiter, decoded by the parser
// (gp_parser), and every LINE command is drawn by the Bresenham line engine
// (line_engine) into the frame buffer until a STOP command is read.
//
// Frame buffer port: fb_valid with a 20-bit screen coordinate {x[9:0],
// y[9:0]} and a 16-bit colour; the pixel is written when fb_stall is low.
// While fb_stall is high the whole pipeline holds the pixel. In the best
// case one pixel is written per cycle; each line adds one set-up cycle.
// The memory port is a read-only request/grant/read-valid port (see
// gp_dma and dmem_arbiter).
//
// From the specification: the three parts (DMA engine, instruction parser,
// line engine), the GP_CODE trigger, the 20-bit/16-bit frame buffer port
// and the stall input. Own choices: the handshakes between the parts.
module graphics_processor
  import gp_pkg::*;
#(
  parameter int unsigned CW        = COORD_W,
  parameter int unsigned PW        = COLOR_W,
  parameter int unsigned DMA_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst,
  // GP_CODE register write
  input  logic              gp_code_we,
  input  logic [WORD_W-1:0] gp_code,
  // data memory (through the arbiter)
  output logic              mem_req,
  output logic [WORD_W-1:0] mem_addr,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [WORD_W-1:0] mem_rdata,
  // frame buffer
  output logic              fb_valid,
  output logic [2*CW-1:0]   fb_crd,
  output logic [PW-1:0]     fb_color,
  input  logic              fb_stall,
  // status
  output logic              busy,
  output logic              line_done,   // pulse: last pixel of a line written
  output logic              list_done,
  output logic              bad_op
);

  logic              dma_start, dma_stop;
  logic [WORD_W-1:0] dma_addr;
  logic              word_valid, word_pop;
  logic [WORD_W-1:0] word_data;
  logic              le_clear, le_start, le_ready;
  logic [CW-1:0]     le_x0, le_y0, le_x1, le_y1, pix_x, pix_y;
  logic [PW-1:0]     le_color;

  gp_dma #(.DEPTH(DMA_DEPTH)) u_dma (
    .clk, .rst,
    .start(dma_start), .start_addr(dma_addr), .stop(dma_stop),
    .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .word_valid, .word_data, .word_pop
  );

  gp_parser #(.CW(CW), .PW(PW)) u_parser (
    .clk, .rst,
    .gp_code_we, .gp_code,
    .dma_start, .dma_addr, .dma_stop,
    .word_valid, .word_data, .word_pop,
    .le_clear, .le_start, .le_ready,
    .le_x0, .le_y0, .le_x1, .le_y1, .le_color,
    .busy, .list_done, .bad_op
  );

  line_engine #(.CW(CW), .PW(PW)) u_line (
    .clk, .rst, .clear(le_clear),
    .start(le_start), .ready(le_ready),
    .x0(le_x0), .y0(le_y0), .x1(le_x1), .y1(le_y1), .color(le_color),
    .done(line_done),
    .pix_valid(fb_valid), .pix_x, .pix_y, .pix_color(fb_color),
    .stall(fb_stall)
  );

  assign fb_crd = {pix_x, pix_y};

endmodule
