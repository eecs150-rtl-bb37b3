// vbi_gen: vertical blanking interrupt generator.
//
// The video engine's address generator walks the frame buffer in raster
// order, presenting a screen coordinate {x, y} with rd_valid. When it
// reaches the last read of a frame (y = HEIGHT-1 and x within the last
// X_STEP columns, X_STEP being how many pixels one read covers) the frame
// has been read out and the interrupt is requested: vbi_pulse is high for
// one cycle and vbi_irq is set and stays high until the processor
// acknowledges it with vbi_ack. A coordinate that stays on the last read for
// several cycles requests only once; the next request needs the address to
// leave the last read first.
//
// From the specification: request the VBI when the video engine is done
// reading the frame, found by watching its address lines; 800x600 screen.
// Own choices: the exact trigger point, the level/acknowledge interface.
module vbi_gen
  import gp_pkg::*;
#(
  parameter int unsigned WIDTH  = SCREEN_W,
  parameter int unsigned HEIGHT = SCREEN_H,
  parameter int unsigned X_STEP = 1,
  parameter int unsigned CW     = COORD_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          rd_valid,
  input  logic [CW-1:0] rd_x,
  input  logic [CW-1:0] rd_y,
  input  logic          vbi_ack,
  output logic          vbi_irq,
  output logic          vbi_pulse
);

  logic at_end, was_end;

  assign at_end    = rd_valid && (rd_y == CW'(HEIGHT - 1)) && (rd_x >= CW'(WIDTH - X_STEP));
  assign vbi_pulse = at_end && !was_end;

  always_ff @(posedge clk) begin
    if (rst) begin
      was_end <= 1'b0;
      vbi_irq <= 1'b0;
    end else begin
      if (rd_valid) was_end <= at_end;
      if (vbi_pulse)    vbi_irq <= 1'b1;
      else if (vbi_ack) vbi_irq <= 1'b0;
    end
  end

endmodule
