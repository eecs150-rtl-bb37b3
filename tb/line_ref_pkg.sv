// line_ref_pkg: reference model for the testbenches.
//
// line_pixels() returns, in drawing order, the pixels of the integer
// Bresenham line from (x0,y0) to (x1,y1), written as plain sequential code:
// steep lines swap x and y, endpoints are ordered by the major axis, the
// error starts at deltax/2 and loses deltay per step, and the minor axis
// moves when it goes negative. Each pixel is packed as {x[15:0], y[15:0]}.
package line_ref_pkg;

  typedef int unsigned pix_q_t[$];

  function automatic pix_q_t line_pixels(int x0, int y0, int x1, int y1);
    pix_q_t q;
    int t, dx, dy, err, ystep, y;
    bit steep;
    steep = ((y1 > y0 ? y1 - y0 : y0 - y1) > (x1 > x0 ? x1 - x0 : x0 - x1));
    if (steep) begin
      t = x0; x0 = y0; y0 = t;
      t = x1; x1 = y1; y1 = t;
    end
    if (x0 > x1) begin
      t = x0; x0 = x1; x1 = t;
      t = y0; y0 = y1; y1 = t;
    end
    dx    = x1 - x0;
    dy    = (y1 > y0) ? y1 - y0 : y0 - y1;
    err   = dx / 2;
    y     = y0;
    ystep = (y0 < y1) ? 1 : -1;
    for (int x = x0; x <= x1; x++) begin
      if (steep) q.push_back({y[15:0], x[15:0]});
      else       q.push_back({x[15:0], y[15:0]});
      err = err - dy;
      if (err < 0) begin
        y   = y + ystep;
        err = err + dx;
      end
    end
    return q;
  endfunction

endpackage
