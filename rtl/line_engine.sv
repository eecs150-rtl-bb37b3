// line_engine: Bresenham line drawing in hardware, one pixel per cycle.
//
// The engine draws the line from (x0,y0) to (x1,y1) exactly as the integer
// Bresenham routine does: if the line is steep (|dy| > |dx|) x and y are
// exchanged, the endpoints are ordered so that the major axis counts up, an
// error term starts at deltax/2, and every step subtracts deltay from it,
// moving the minor axis by one and adding deltax back whenever it goes
// negative. A steep line is plotted with x and y exchanged back.
//
// Interface: when ready is high, a start pulse latches the endpoints and the
// colour. All set-up arithmetic (steepness test, exchanges, deltas) is done
// combinationally in that start cycle, so the first pixel appears on the
// next cycle and one pixel follows per cycle: a line of N pixels occupies the
// engine for N+1 cycles (start cycle included). pix_valid/pix_crd/pix_color
// present a pixel; it is taken when stall is low. While stall is high the
// pixel is held unchanged, so no coordinate is lost. done pulses with the
// acceptance of the last pixel; ready returns on the following cycle. clear
// abandons a line at once (used when a new command list is started).
//
// From the specification: the algorithm, the one-pixel-per-cycle goal and
// the stall rule. Own choices: the single-cycle combinational set-up, the
// ready/start/done handshake and the clear input.
module line_engine
  import gp_pkg::*;
#(
  parameter int unsigned CW = COORD_W,   // coordinate width
  parameter int unsigned PW = COLOR_W    // colour width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  // command side
  input  logic          start,
  output logic          ready,
  input  logic [CW-1:0] x0,
  input  logic [CW-1:0] y0,
  input  logic [CW-1:0] x1,
  input  logic [CW-1:0] y1,
  input  logic [PW-1:0] color,
  output logic          done,
  // pixel side
  output logic          pix_valid,
  output logic [CW-1:0] pix_x,
  output logic [CW-1:0] pix_y,
  output logic [PW-1:0] pix_color,
  input  logic          stall
);

  localparam int unsigned EW = CW + 2;   // signed error term, range [-2^CW, 2^CW]

  // ---------------- set-up (combinational, from the inputs) ----------------
  logic [CW-1:0] adx, ady;               // |x1-x0|, |y1-y0|
  logic          s_steep;
  logic [CW-1:0] a0, b0, a1, b1;         // after the steep exchange (a = major axis)
  logic [CW-1:0] sa0, sb0, sa1, sb1;     // after ordering a0 <= a1

  always_comb begin
    adx     = (x1 >= x0) ? x1 - x0 : x0 - x1;
    ady     = (y1 >= y0) ? y1 - y0 : y0 - y1;
    s_steep = ady > adx;
    if (s_steep) begin
      a0 = y0; b0 = x0; a1 = y1; b1 = x1;
    end else begin
      a0 = x0; b0 = y0; a1 = x1; b1 = y1;
    end
    if (a0 > a1) begin
      sa0 = a1; sb0 = b1; sa1 = a0; sb1 = b0;
    end else begin
      sa0 = a0; sb0 = b0; sa1 = a1; sb1 = b1;
    end
  end

  // ---------------- drawing state ----------------
  logic                 busy;
  logic                 steep;
  logic [CW-1:0]        a, b;            // current point on major / minor axis
  logic [CW-1:0]        a_end;
  logic [CW-1:0]        dmaj, dmin;      // deltax, deltay of the algorithm
  logic                 b_down;          // ystep = -1
  logic signed [EW-1:0] err;
  logic [PW-1:0]        col;

  logic                 advance, last;
  logic signed [EW-1:0] err_sub;

  assign ready     = !busy;
  assign pix_valid = busy;
  assign pix_x     = steep ? b : a;
  assign pix_y     = steep ? a : b;
  assign pix_color = col;
  assign advance   = busy && !stall;
  assign last      = (a == a_end);
  assign done      = advance && last;
  assign err_sub   = err - $signed({2'b00, dmin});

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      busy <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy   <= 1'b1;
        steep  <= s_steep;
        a      <= sa0;
        b      <= sb0;
        a_end  <= sa1;
        dmaj   <= sa1 - sa0;
        dmin   <= (sb1 >= sb0) ? sb1 - sb0 : sb0 - sb1;
        b_down <= sb1 < sb0;
        err    <= $signed({2'b00, (sa1 - sa0) >> 1});
        col    <= color;
      end
    end else if (advance) begin
      if (last) begin
        busy <= 1'b0;
      end else begin
        a <= a + 1'b1;
        if (err_sub < 0) begin
          b   <= b_down ? b - 1'b1 : b + 1'b1;
          err <= err_sub + $signed({2'b00, dmaj});
        end else begin
          err <= err_sub;
        end
      end
    end
  end

  // A held pixel must not change while the frame buffer stalls.
  property p_hold;
    @(posedge clk) disable iff (rst || clear)
      (pix_valid && stall) |=> (pix_valid && $stable(pix_x) && $stable(pix_y) && $stable(pix_color));
  endproperty
  a_hold: assert property (p_hold);

endmodule
