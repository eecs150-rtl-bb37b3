// tb_gfx_top: end-to-end test of gfx_top at its default (800x600) size.
//
// Models around the design: a data memory (synchronous, one-cycle read), a
// processor that issues random loads and stores of its own and writes the
// graphics command lists through the arbiter, a frame buffer that stalls at
// random and stores every pixel written, and a video address generator that
// scans the 800x600 raster one pixel per cycle.
//
// The software of the example is followed: command lists are kept at
// 0x4000 and 0x5000; on each vertical blanking interrupt the service
// routine acknowledges it, writes GP_CODE with the list prepared during the
// previous frame, and the processor then writes the next frame's list into
// the other area. Frame 0 draws the specification's example (blue and red
// lines), frame 1 the same lines moved by one pixel; later frames draw
// random lines. One frame writes GP_CODE a second time while the first list
// is still being drawn, and one list ends with an unknown command.
//
// Checked: every pixel written matches, in order, the reference Bresenham
// pixels of the running list (an abandoned list may stop early); each list
// completes; the frame buffer holds the example's pixels; one interrupt per
// frame. Counted, and required at least once each: frame-buffer stalls,
// processor memory accesses while a list runs, LINE and STOP
// commands, steep and reversed lines, the interrupt, a restart while busy,
// an unknown command.
module tb_gfx_top;
  import line_ref_pkg::*;

  localparam int W = 800, H = 600;
  localparam int FRAMES = 5;

  logic        clk = 0, rst = 1;
  logic        mips_en = 0;
  logic [3:0]  mips_we = 0;
  logic [31:0] mips_addr = 0, mips_wdata = 0, mips_rdata;
  logic        dmem_en;
  logic [3:0]  dmem_we;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic        gp_code_we = 0;
  logic [31:0] gp_code = 0;
  logic        fb_valid, fb_stall = 0;
  logic [19:0] fb_crd;
  logic [15:0] fb_color;
  logic        vid_valid = 0;
  logic [19:0] vid_crd = 0;
  logic        vbi_irq, vbi_pulse, vbi_ack = 0;
  logic        gp_busy, gp_line_done, gp_list_done, gp_bad_op;

  int checks = 0, failures = 0;
  int n_stall = 0, n_denied = 0, n_line = 0, n_stop = 0, n_steep = 0, n_rev = 0;
  int n_vbi = 0, n_restart = 0, n_bad = 0, n_pix = 0;

  gfx_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (FRAMES * W * H + 200000) @(posedge clk);
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

  // ---------------- data memory: 32K words, byte enables ----------------
  logic [31:0] mem [32768];
  always_ff @(posedge clk) begin
    if (dmem_en) begin
      for (int b = 0; b < 4; b++)
        if (dmem_we[b]) mem[dmem_addr[16:2]][8*b +: 8] <= dmem_wdata[8*b +: 8];
      dmem_rdata <= mem[dmem_addr[16:2]];
    end
  end

  // ---------------- frame buffer ----------------
  logic [15:0] fb [W * H];
  logic [35:0] exp_q[$];        // expected pixels of the running list
  bit          may_truncate = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (fb_valid && fb_stall) n_stall++;
      if (fb_valid && !fb_stall) begin
        n_pix++;
        fb[int'(fb_crd[9:0]) * W + int'(fb_crd[19:10])] <= fb_color;
        if (exp_q.size() == 0) check(0, "unexpected pixel");
        else begin
          logic [35:0] e;
          e = exp_q.pop_front();
          check({fb_crd, fb_color} == e,
                $sformatf("pixel got (%0d,%0d) %h exp (%0d,%0d) %h", fb_crd[19:10], fb_crd[9:0],
                          fb_color, e[35:26], e[25:16], e[15:0]));
        end
      end
      // processor holds the memory port while a list is running
      if (gp_busy && mips_en) n_denied++;
      if (gp_list_done) n_stop++;
      if (gp_bad_op) n_bad++;
      if (vbi_pulse) n_vbi++;
    end
    fb_stall <= ($urandom_range(99) < 25);
  end

  // ---------------- video address generator ----------------
  initial begin
    @(negedge clk);
    while (rst) @(negedge clk);
    forever
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          vid_valid = 1;
          vid_crd   = {10'(x), 10'(y)};
          @(negedge clk);
        end
  end

  // ---------------- processor data port ----------------
  // Stores queued by the "software" take priority; otherwise random traffic
  // to a scratch area at 0x10000.
  logic [63:0] store_q[$];      // {addr, data}
  always @(negedge clk) begin
    if (rst) begin
      mips_en = 0; mips_we = 0;
    end else if (store_q.size() != 0 && $urandom_range(1)) begin
      logic [63:0] s;
      s = store_q.pop_front();
      mips_en = 1; mips_we = 4'hF; mips_addr = s[63:32]; mips_wdata = s[31:0];
    end else begin
      mips_en    = ($urandom_range(99) < 40);
      mips_we    = $urandom_range(1) ? 4'($urandom) : 4'h0;
      mips_addr  = 32'h1_0000 | ($urandom & 32'hFFFC);
      mips_wdata = $urandom;
    end
  end

  // ---------------- command lists ----------------
  typedef struct { logic [15:0] c; int ax, ay, bx, by; } line_t;
  line_t lists [3][$];          // [0] at 0x4000, [1] at 0x5000, [2] at 0x6000
  bit    list_bad [3];

  function automatic int base_of(int i);
    return 'h4000 + 'h1000 * i;
  endfunction

  task automatic write_list(int i);
    int a;
    a = base_of(i);
    foreach (lists[i][k]) begin
      store_q.push_back({32'(a),     {8'h01, 8'h00, lists[i][k].c}});
      store_q.push_back({32'(a + 4), {16'(lists[i][k].ax), 16'(lists[i][k].ay)}});
      store_q.push_back({32'(a + 8), {16'(lists[i][k].bx), 16'(lists[i][k].by)}});
      a += 12;
    end
    store_q.push_back({32'(a), list_bad[i] ? 32'h7F00_0000 : 32'h0000_0000});
  endtask

  task automatic expect_list(int i);
    exp_q.delete();
    foreach (lists[i][k]) begin
      pix_q_t p;
      int adx, ady;
      p = line_pixels(lists[i][k].ax, lists[i][k].ay, lists[i][k].bx, lists[i][k].by);
      foreach (p[j]) exp_q.push_back({p[j][25:16], p[j][9:0], lists[i][k].c});
      adx = lists[i][k].bx - lists[i][k].ax; if (adx < 0) adx = -adx;
      ady = lists[i][k].by - lists[i][k].ay; if (ady < 0) ady = -ady;
      n_line++;
      if (ady > adx) n_steep++;
      if ((ady > adx) ? (lists[i][k].ay > lists[i][k].by) : (lists[i][k].ax > lists[i][k].bx)) n_rev++;
    end
  endtask

  task automatic random_list(int i, int n);
    lists[i].delete();
    for (int k = 0; k < n; k++) begin
      line_t l;
      l.c = 16'($urandom);
      l.ax = $urandom_range(W - 1); l.ay = $urandom_range(H - 1);
      l.bx = $urandom_range(W - 1); l.by = $urandom_range(H - 1);
      lists[i].push_back(l);
    end
  endtask

  // The expectation is switched one cycle after the write, so that a pixel
  // of the old list accepted in the write cycle is still checked against it.
  task automatic gp_write(int i);
    @(negedge clk);
    gp_code_we = 1; gp_code = base_of(i);
    @(negedge clk);
    gp_code_we = 0;
    expect_list(i);
  endtask

  task automatic wait_stores();
    while (store_q.size() != 0) @(negedge clk);
  endtask

  initial begin
    line_t l;
    foreach (mem[i]) mem[i] = 0;
    foreach (fb[i]) fb[i] = 0;
    dmem_rdata = 0;
    // frame 0 list: the example at 0x4000
    l = '{16'h001f, 'h10, 'h20, 'h1A, 'h2B};   lists[0].push_back(l);
    l = '{16'hf800, 'h123, 'h124, 'hAA, 'hBB}; lists[0].push_back(l);
    // frame 1 list: the same lines moved, at 0x5000
    l = '{16'h001f, 'h11, 'h20, 'h1B, 'h2B};   lists[1].push_back(l);
    l = '{16'hf800, 'h123, 'h125, 'hAA, 'hBC}; lists[1].push_back(l);
    // restart list at 0x6000: both screen diagonals, ended by an unknown command
    l = '{16'h07E0, W - 1, H - 1, 0, 0}; lists[2].push_back(l);
    l = '{16'h07E0, 0, H - 1, W - 1, 0}; lists[2].push_back(l);
    list_bad[0] = 0; list_bad[1] = 0; list_bad[2] = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    write_list(0);
    write_list(2);
    wait_stores();
    gp_write(0);
    write_list(1);
    for (int f = 1; f <= FRAMES; f++) begin
      int cur;
      cur = f % 2;
      // wait for the end of the current frame
      while (!vbi_irq) @(negedge clk);
      check(!gp_busy, "previous list finished within the frame");
      check(exp_q.size() == 0, $sformatf("previous list fully drawn (%0d left)", exp_q.size()));
      if (f == 1) begin
        // the example's endpoints and colours are in the frame buffer
        check(fb['h20 * W + 'h10] == 16'h001f, "blue first endpoint");
        check(fb['h2B * W + 'h1A] == 16'h001f, "blue second endpoint");
        check(fb['h124 * W + 'h123] == 16'hf800, "red first endpoint");
        check(fb['hBB * W + 'hAA] == 16'hf800, "red second endpoint");
      end
      // interrupt service: acknowledge, start the prepared list
      @(negedge clk); vbi_ack = 1; @(negedge clk); vbi_ack = 0;
      check(!vbi_irq, "interrupt acknowledged");
      wait_stores();
      gp_write(cur);
      if (f == 3) begin
        // GP_CODE written again while this list is being drawn
        repeat (300) @(negedge clk);
        check(gp_busy, "list still running at the restart");
        n_restart++;
        gp_write(2);
      end
      // prepare the next frame's list in the other area
      random_list(1 - cur, $urandom_range(10, 40));
      list_bad[1 - cur] = 0;
      write_list(1 - cur);
    end
    check(n_vbi == FRAMES, $sformatf("one interrupt per frame (%0d)", n_vbi));
    check(n_stall > 0,   "frame buffer stall happened");
    check(n_denied > 0,  "processor used the memory during a list");
    check(n_line > 0 && n_stop > 0, "LINE and STOP commands executed");
    check(n_steep > 0 && n_rev > 0, "steep and reversed lines drawn");
    check(n_restart > 0, "restart while busy");
    check(n_bad > 0,     "unknown command ended a list");
    $display("stalls=%0d mips_during_list=%0d lines=%0d stops=%0d steep=%0d reversed=%0d vbi=%0d restarts=%0d bad=%0d pixels=%0d",
             n_stall, n_denied, n_line, n_stop, n_steep, n_rev, n_vbi, n_restart, n_bad, n_pix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
