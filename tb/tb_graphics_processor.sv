// tb_graphics_processor: self-checking test of graphics_processor.
//
// A command list of random LINE commands and a STOP is placed in a memory
// model. The memory grants read requests at random and answers one cycle
// later; the frame buffer side stalls at random. Every pixel written is
// compared, in order, with the reference Bresenham pixels of the list.
// One run is made with no stalls and a memory that is always free: the
// pixels must then come one per cycle, with exactly one idle cycle per line
// after the first (the line set-up), because the next command is fetched
// while a line is drawn. The list from the specification's example
// (a blue and a red line at 0x4000) is run first.
module tb_graphics_processor;
  import line_ref_pkg::*;

  logic        clk = 0, rst = 1;
  logic        gp_code_we = 0;
  logic [31:0] gp_code = 0;
  logic        mem_req, mem_gnt, mem_rvalid = 0;
  logic [31:0] mem_addr, mem_rdata = 0;
  logic        fb_valid, fb_stall = 0;
  logic [19:0] fb_crd;
  logic [15:0] fb_color;
  logic        busy, line_done, list_done, bad_op;

  int checks = 0, failures = 0;
  int stalls = 0, denied = 0;

  graphics_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // memory model: 4096 words
  logic [31:0] mem [4096];
  int gnt_pct = 100, stall_pct = 0;
  logic gate = 1;
  assign mem_gnt = mem_req && gate;
  always @(posedge clk) begin
    mem_rvalid <= mem_gnt;
    mem_rdata  <= mem[mem_addr[13:2]];
    gate       <= ($urandom_range(99) < gnt_pct);
    if (mem_req && !mem_gnt) denied++;
  end

  // expected pixel stream {x, y, color}
  logic [35:0] exp_q[$];
  int first_pix, last_pix, idle_between, pix_count;
  int cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (fb_valid && fb_stall) stalls++;
      if (fb_valid && !fb_stall) begin
        if (exp_q.size() == 0) check(0, "unexpected pixel");
        else begin
          logic [35:0] e;
          e = exp_q.pop_front();
          check({fb_crd, fb_color} == e,
                $sformatf("pixel got (%0d,%0d) %h exp (%0d,%0d) %h", fb_crd[19:10], fb_crd[9:0],
                          fb_color, e[35:26], e[25:16], e[15:0]));
        end
        if (pix_count == 0) first_pix = cyc;
        last_pix = cyc;
        pix_count++;
      end else if (pix_count > 0 && exp_q.size() > 0) idle_between++;
    end
    fb_stall <= ($urandom_range(99) < stall_pct);
  end

  task automatic put_line(inout int a, input logic [15:0] c, input int ax, ay, bx, by);
    pix_q_t p;
    mem[a/4] = {8'h01, 8'h00, c};
    mem[a/4 + 1] = {ax[15:0], ay[15:0]};
    mem[a/4 + 2] = {bx[15:0], by[15:0]};
    a += 12;
    p = line_pixels(ax, ay, bx, by);
    foreach (p[i]) exp_q.push_back({p[i][25:16], p[i][9:0], c});
  endtask

  task automatic run(int base, int nlines, bit example, output int n_lines);
    int a, t;
    a = base;
    exp_q.delete();
    pix_count = 0; idle_between = 0;
    if (example) begin
      put_line(a, 16'h001f, 'h10, 'h20, 'h1A, 'h2B);
      put_line(a, 16'hf800, 'h123, 'h124, 'hAA, 'hBB);
      n_lines = 2;
    end else begin
      for (int i = 0; i < nlines; i++)
        put_line(a, 16'($urandom), $urandom_range(799), $urandom_range(599),
                 $urandom_range(799), $urandom_range(599));
      n_lines = nlines;
    end
    mem[a/4] = 32'h0000_0000;   // STOP
    @(negedge clk);
    gp_code_we = 1; gp_code = base;
    @(negedge clk);
    gp_code_we = 0;
    t = 0;
    while (busy && t < 100000) begin @(negedge clk); t++; end
    check(!busy, "list finishes");
    check(exp_q.size() == 0, $sformatf("all pixels drawn (%0d left)", exp_q.size()));
  endtask

  initial begin
    int nl;
    foreach (mem[i]) mem[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // example list, full speed: one pixel per cycle
    run('h4000 - 'h4000 + 'h400, 0, 1, nl);
    check(idle_between == nl - 1, $sformatf("idle cycles between lines %0d exp %0d", idle_between, nl - 1));
    check(last_pix - first_pix + 1 == pix_count + nl - 1, "one pixel per cycle");
    // random lists, full speed
    run('h800, 20, 0, nl);
    check(idle_between == nl - 1, $sformatf("idle cycles between lines %0d exp %0d", idle_between, nl - 1));
    // random lists with a busy memory and a stalling frame buffer
    gnt_pct = 40; stall_pct = 30;
    for (int k = 0; k < 6; k++) run('h100 * k, $urandom_range(1, 12), 0, nl);
    check(stalls > 100 && denied > 100, $sformatf("stalls %0d, denied reads %0d", stalls, denied));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
