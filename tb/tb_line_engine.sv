// tb_line_engine: self-checking test of line_engine.
//
// Draws fixed lines (endpoints only, horizontal, vertical, both diagonals,
// all octants, full-screen width and height) and random lines, with and
// without random stalls. Every accepted pixel is compared with the
// reference Bresenham model, the pixel count and the done pulse are checked,
// and without stalls the line must take exactly N+1 cycles from start to
// ready (one pixel per cycle plus one set-up cycle).
module tb_line_engine;
  import line_ref_pkg::*;

  localparam int CW = 10;
  localparam int PW = 16;

  logic          clk = 0, rst = 1, clear = 0;
  logic          start = 0, ready, done;
  logic [CW-1:0] x0, y0, x1, y1;
  logic [PW-1:0] color;
  logic          pix_valid, stall = 0;
  logic [CW-1:0] pix_x, pix_y;
  logic [PW-1:0] pix_color;

  int checks = 0, failures = 0;
  int stalls_seen = 0;

  line_engine dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic draw(int ax, int ay, int bx, int by, int stall_pct);
    pix_q_t exp_q;
    int n, got, cycles, dones;
    logic [PW-1:0] c;
    exp_q = line_pixels(ax, ay, bx, by);
    n = exp_q.size();
    c = PW'($urandom);
    // wait for ready
    while (!ready) @(posedge clk);
    x0 = CW'(ax); y0 = CW'(ay); x1 = CW'(bx); y1 = CW'(by); color = c;
    start = 1;
    @(posedge clk);
    #1 start = 0;
    got = 0; cycles = 1; dones = 0;
    while (!ready) begin
      stall = ($urandom_range(99) < stall_pct);
      #1;
      if (pix_valid && stall) stalls_seen++;
      if (pix_valid && !stall) begin
        if (got < n)
          check({6'd0, pix_x, 6'd0, pix_y} == exp_q[got] && pix_color == c,
                $sformatf("line (%0d,%0d)-(%0d,%0d) pixel %0d got (%0d,%0d) exp (%0d,%0d)",
                          ax, ay, bx, by, got, pix_x, pix_y, exp_q[got][31:16], exp_q[got][15:0]));
        got++;
        if (done) dones++;
        check(done == (got == n), "done pulse position");
      end
      @(posedge clk);
      #1 cycles++;
      stall = 0;
    end
    check(got == n, $sformatf("pixel count %0d exp %0d", got, n));
    check(dones == 1, "one done pulse");
    if (stall_pct == 0)
      check(cycles == n + 1, $sformatf("latency %0d exp %0d", cycles, n + 1));
  endtask

  initial begin
    x0 = 0; y0 = 0; x1 = 0; y1 = 0; color = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(ready && !pix_valid, "idle after reset");
    // fixed cases
    draw(5, 5, 5, 5, 0);          // single pixel
    draw(0, 0, 799, 0, 0);        // full width
    draw(0, 0, 0, 599, 0);        // full height
    draw(799, 599, 0, 0, 0);      // diagonal backwards
    draw('h10, 'h20, 'h1A, 'h2B, 0);
    draw('h123, 'h124, 'hAA, 'hBB, 0);
    draw(10, 10, 30, 15, 0);   draw(10, 10, 15, 30, 0);
    draw(10, 10, -5 + 10, 30, 0); draw(30, 10, 10, 15, 0);
    draw(30, 15, 10, 10, 0);   draw(15, 30, 10, 10, 0);
    draw(10, 30, 30, 25, 0);   draw(10, 30, 15, 10, 0);
    draw(0, 0, 1023, 1023, 0); // width limits
    // random lines, with and without stalls
    for (int i = 0; i < 300; i++)
      draw($urandom_range(799), $urandom_range(599), $urandom_range(799), $urandom_range(599),
           (i % 2) ? 40 : 0);
    // clear in the middle of a line
    while (!ready) @(posedge clk);
    x0 = 0; y0 = 0; x1 = 100; y1 = 0; start = 1;
    @(posedge clk); #1 start = 0;
    repeat (10) @(posedge clk);
    #1 clear = 1; @(posedge clk); #1 clear = 0;
    check(ready && !pix_valid, "clear abandons the line");
    draw(3, 4, 9, 2, 0);
    check(stalls_seen > 100, $sformatf("stalls exercised (%0d)", stalls_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
