// tb_gp_dma: self-checking test of gp_dma.
//
// The memory side grants requests at random (as a busy processor would
// leave free cycles) and returns data two cycles after each grant from a
// model whose word at byte address a is word_at(a). The consumer pops at
// random. Checked: the popped words are exactly the consecutive words from
// the start address, the outstanding reads never exceed the FIFO depth, a
// restart in mid-stream delivers only words of the new stream, and stop
// ends the requests and empties the queue.
module tb_gp_dma;

  localparam int DEPTH = 4;

  logic        clk = 0, rst = 1;
  logic        start = 0, stop = 0;
  logic [31:0] start_addr = 0;
  logic        mem_req, mem_gnt, mem_rvalid = 0;
  logic [31:0] mem_addr, mem_rdata = 0;
  logic        word_valid, word_pop = 0;
  logic [31:0] word_data;

  int checks = 0, failures = 0;
  int denied = 0;

  gp_dma #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] word_at(logic [31:0] a);
    return {a[15:0] ^ 16'h5A5A, ~a[15:0]};
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
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

  int gnt_pct = 50, pop_pct = 50;
  logic [31:0] exp_addr;

  // memory side: random grant, two-cycle read latency so that reads are
  // still in flight when a new stream starts
  logic        gate = 0, v1 = 0;
  logic [31:0] d1 = 0;
  always_comb mem_gnt = mem_req && gate;
  always @(posedge clk) begin
    v1         <= mem_gnt;
    d1         <= word_at(mem_addr);
    mem_rvalid <= v1;
    mem_rdata  <= d1;
    gate       <= ($urandom_range(99) < gnt_pct);
  end

  // run n cycles checking popped words against exp_addr
  task automatic run(int n);
    for (int i = 0; i < n; i++) begin
      word_pop = ($urandom_range(99) < pop_pct);
      #1;
      if (mem_req && !mem_gnt) denied++;
      if (word_valid && word_pop) begin
        check(word_data == word_at(exp_addr),
              $sformatf("word for %h: got %h", exp_addr, word_data));
        exp_addr += 4;
      end
      @(posedge clk); #1;
      word_pop = 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(!mem_req && !word_valid, "idle after reset");
    // stream from 0x4000
    start = 1; start_addr = 32'h4000; exp_addr = 32'h4000;
    @(posedge clk); #1 start = 0;
    run(400);
    // restart in mid-stream at 0x5000, with reads in flight
    gnt_pct = 100; pop_pct = 0;
    run(3);
    start = 1; start_addr = 32'h5000; exp_addr = 32'h5000;
    #1; @(posedge clk); #1 start = 0;
    gnt_pct = 50; pop_pct = 50;
    run(400);
    // fill without popping: requests must stop at DEPTH words
    pop_pct = 0; gnt_pct = 100;
    run(20);
    check(!mem_req, "no request while the queue is full");
    // restart many times quickly
    for (int k = 0; k < 50; k++) begin
      gnt_pct = $urandom_range(100); pop_pct = $urandom_range(100);
      start = 1; start_addr = 32'h100 * k; exp_addr = 32'h100 * k;
      #1; @(posedge clk); #1 start = 0;
      run($urandom_range(1, 12));
    end
    // stop: requests end and the queue empties
    stop = 1; #1; @(posedge clk); #1 stop = 0;
    run(5);
    check(!mem_req && !word_valid, "stopped");
    check(denied > 50, $sformatf("denied requests seen (%0d)", denied));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
