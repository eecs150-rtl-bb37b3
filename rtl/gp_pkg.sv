// gp_pkg: types and constants shared by the graphics processor blocks.
//
// A graphics command is one or more 32-bit words. The top byte of the first
// word is the command TYPE; the rest holds arguments. TYPE 0 is STOP and
// TYPE 1 is LINE (colour in bits [15:0], followed by two endpoint words laid
// out as 0xXXXX_YYYY). These encodings, the 16-bit colour and the 800x600
// screen come from the project specification. The 10-bit coordinate width is
// the number of bits of each 16-bit coordinate the hardware uses.
package gp_pkg;

  localparam int unsigned WORD_W  = 32;  // command word / data memory word
  localparam int unsigned COORD_W = 10;  // bits of x and of y that are used
  localparam int unsigned COLOR_W = 16;  // pixel colour
  localparam int unsigned SCREEN_W = 800;
  localparam int unsigned SCREEN_H = 600;

  // Command TYPE field, inst[31:24].
  typedef enum logic [7:0] {
    GP_STOP = 8'h00,
    GP_LINE = 8'h01
  } gp_op_e;

  // First word of a command.
  typedef struct packed {
    logic [7:0]  op;    // gp_op_e value; kept as raw bits so unknown codes can be seen
    logic [7:0]  rsvd;
    logic [15:0] color;
  } gp_cmd_t;

  // Endpoint argument word, 0xXXXX_YYYY.
  typedef struct packed {
    logic [15:0] x;
    logic [15:0] y;
  } gp_point_t;

  // 20-bit screen coordinate sent to the frame buffer: {x, y}.
  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } screen_crd_t;

endpackage
