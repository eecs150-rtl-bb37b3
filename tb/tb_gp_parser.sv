// tb_gp_parser: self-checking test of gp_parser.
//
// Command words are supplied from a queue standing in for the DMA reader
// (with random gaps); the line engine is modelled by a ready flag that
// drops for a random number of cycles after each start. Random command
// lists of LINE commands ended by STOP (or by an unknown TYPE) are run.
// Checked: each LINE reaches the line engine once, in order, with its
// colour and the low 10 bits of each coordinate; STOP stops the DMA and
// pulses list_done; an unknown TYPE also pulses bad_op; busy covers the
// list until the last line is finished; a GP_CODE write starts the DMA at
// the written address and clears the line engine; the next command is
// fetched while a line is still being drawn.
module tb_gp_parser;
  import gp_pkg::*;

  logic        clk = 0, rst = 1;
  logic        gp_code_we = 0;
  logic [31:0] gp_code = 0;
  logic        dma_start, dma_stop, word_valid, word_pop;
  logic [31:0] dma_addr, word_data;
  logic        le_clear, le_start, le_ready;
  logic [9:0]  le_x0, le_y0, le_x1, le_y1;
  logic [15:0] le_color;
  logic        busy, list_done, bad_op;

  int checks = 0, failures = 0;
  int overlap = 0, stops = 0, bads = 0, lines = 0;

  gp_parser dut (.*);

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

  // DMA stand-in
  logic [31:0] words[$];
  logic        gap = 0;
  assign word_valid = (words.size() != 0) && !gap;
  assign word_data  = (words.size() != 0) ? words[0] : 32'h0;

  // line engine stand-in
  int busy_left = 0;
  assign le_ready = (busy_left == 0);

  // expected lines {color, x0, y0, x1, y1}
  logic [55:0] exp_lines[$];

  always @(posedge clk) begin
    gap <= ($urandom_range(3) == 0);
    if (word_pop && !rst) begin
      check(word_valid, "pop only when a word is there");
      if (!le_ready) overlap++;
      void'(words.pop_front());
    end
    if (rst || le_clear) busy_left <= 0;
    else if (le_start) begin
      check(le_ready, "start only when ready");
      lines++;
      if (exp_lines.size() == 0) check(0, "unexpected line");
      else begin
        logic [55:0] e;
        e = exp_lines.pop_front();
        check({le_color, le_x0, le_y0, le_x1, le_y1} == e,
              $sformatf("line got %h exp %h", {le_color, le_x0, le_y0, le_x1, le_y1}, e));
      end
      busy_left <= $urandom_range(1, 20);
    end else if (busy_left > 0) busy_left <= busy_left - 1;
    if (list_done) stops++;
    if (bad_op) bads++;
  end

  task automatic run_list(int n, bit bad_end);
    int cyc;
    logic [31:0] addr;
    // the GP_CODE write flushes the DMA stand-in in the same cycle
    addr = $urandom & 32'hFFFF_FFFC;
    @(negedge clk);
    gp_code_we = 1; gp_code = addr;
    words.delete();
    exp_lines.delete();
    for (int i = 0; i < n; i++) begin
      logic [15:0] c, ax, ay, bx, by;
      c = 16'($urandom); ax = 16'($urandom); ay = 16'($urandom);
      bx = 16'($urandom); by = 16'($urandom);
      words.push_back({8'h01, 8'($urandom), c});
      words.push_back({ax, ay});
      words.push_back({bx, by});
      exp_lines.push_back({c, ax[9:0], ay[9:0], bx[9:0], by[9:0]});
    end
    words.push_back(bad_end ? {8'($urandom_range(2, 255)), 24'($urandom)} : {8'h00, 24'($urandom)});
    // tail words after STOP must not be consumed
    words.push_back({8'h01, 24'h0});
    #1;
    check(dma_start && dma_addr == addr && le_clear, "GP_CODE write starts the DMA");
    @(negedge clk);
    gp_code_we = 0;
    cyc = 0;
    while (busy && cyc < 5000) begin @(negedge clk); cyc++; end
    check(!busy, "list finishes");
    check(exp_lines.size() == 0, "all lines issued");
    check(words.size() == 1, "STOP ends fetching");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(!busy && !dma_start, "idle after reset");
    for (int k = 0; k < 60; k++) begin
      int s0, b0;
      s0 = stops; b0 = bads;
      run_list($urandom_range(0, 6), (k % 5 == 4));
      check(stops == s0 + 1, "one list_done per list");
      check(bads == b0 + ((k % 5 == 4) ? 1 : 0), "bad_op only for an unknown TYPE");
    end
    // restart while a list is running: the old list is abandoned
    words.delete(); exp_lines.delete();
    for (int i = 0; i < 4; i++) begin
      words.push_back(32'h0100_1234); words.push_back(32'h0001_0002); words.push_back(32'h0003_0004);
    end
    @(negedge clk); gp_code_we = 1; gp_code = 32'h4000;
    exp_lines.push_back({16'h1234, 10'd1, 10'd2, 10'd3, 10'd4});
    @(negedge clk); gp_code_we = 0;
    while (exp_lines.size() != 0) @(negedge clk);
    words.delete(); exp_lines.delete();
    run_list(2, 0);
    check(overlap > 20, $sformatf("fetch during drawing seen (%0d)", overlap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
