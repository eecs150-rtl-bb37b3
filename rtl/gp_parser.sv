// gp_parser: command parser and sequencer of the graphics processor.
//
// A write of GP_CODE (gp_code_we with the byte address of a command list)
// restarts everything: the DMA reader is pointed at the address, a line in
// progress is abandoned, and the parser waits for the first command word.
// For each command it reads the TYPE byte inst[31:24]:
//   STOP (0): the DMA reader is stopped and the parser goes idle until the
//             next GP_CODE write.
//   LINE (1): colour = inst[15:0]; the next two words are the endpoints
//             (0xXXXX_YYYY, low COORD_W bits of each half used). The line is
//             handed to the line engine as soon as it is ready.
// Once a line has been handed over the parser goes straight on to the next
// command, so the following command is fetched and decoded while the line is
// being drawn. busy stays high until STOP has been read and the line engine
// has finished. An unknown TYPE ends the list like STOP and is reported on
// bad_op (a one-cycle pulse).
//
// From the specification: the command formats, start on a GP_CODE write,
// execution up to STOP. Own choices: fetch/draw overlap, treatment of
// unknown commands, the handshakes. New commands are added as further
// states and a case item on the TYPE byte.
module gp_parser
  import gp_pkg::*;
#(
  parameter int unsigned CW = COORD_W,
  parameter int unsigned PW = COLOR_W
) (
  input  logic              clk,
  input  logic              rst,
  // memory-mapped GP_CODE register write
  input  logic              gp_code_we,
  input  logic [WORD_W-1:0] gp_code,
  // DMA reader
  output logic              dma_start,
  output logic [WORD_W-1:0] dma_addr,
  output logic              dma_stop,
  input  logic              word_valid,
  input  logic [WORD_W-1:0] word_data,
  output logic              word_pop,
  // line engine
  output logic              le_clear,
  output logic              le_start,
  input  logic              le_ready,
  output logic [CW-1:0]     le_x0,
  output logic [CW-1:0]     le_y0,
  output logic [CW-1:0]     le_x1,
  output logic [CW-1:0]     le_y1,
  output logic [PW-1:0]     le_color,
  // status
  output logic              busy,
  output logic              list_done,   // pulse: STOP read
  output logic              bad_op       // pulse: unknown TYPE read
);

  typedef enum logic [2:0] {
    S_IDLE, S_CMD, S_ARG0, S_ARG1, S_LINE
  } state_e;

  state_e  state;
  gp_cmd_t cmd;
  gp_point_t pt;

  assign cmd       = gp_cmd_t'(word_data);
  assign pt        = gp_point_t'(word_data);
  assign dma_start = gp_code_we;
  assign dma_addr  = gp_code;
  assign le_clear  = gp_code_we;
  assign le_start  = (state == S_LINE) && le_ready && !gp_code_we;
  assign busy      = (state != S_IDLE) || !le_ready;

  always_comb begin
    word_pop  = 1'b0;
    dma_stop  = 1'b0;
    list_done = 1'b0;
    bad_op    = 1'b0;
    if (!gp_code_we && word_valid) begin
      unique case (state)
        S_CMD: begin
          word_pop = 1'b1;
          if (cmd.op != GP_LINE) begin
            dma_stop  = 1'b1;
            list_done = 1'b1;
            bad_op    = (cmd.op != GP_STOP);
          end
        end
        S_ARG0, S_ARG1: word_pop = 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
    end else if (gp_code_we) begin
      state <= S_CMD;
    end else begin
      unique case (state)
        S_IDLE: ;
        S_CMD: if (word_valid) begin
          if (cmd.op == GP_LINE) begin
            le_color <= cmd.color;
            state    <= S_ARG0;
          end else begin
            state <= S_IDLE;
          end
        end
        S_ARG0: if (word_valid) begin
          le_x0 <= pt.x[CW-1:0];
          le_y0 <= pt.y[CW-1:0];
          state <= S_ARG1;
        end
        S_ARG1: if (word_valid) begin
          le_x1 <= pt.x[CW-1:0];
          le_y1 <= pt.y[CW-1:0];
          state <= S_LINE;
        end
        S_LINE: if (le_ready) state <= S_CMD;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
