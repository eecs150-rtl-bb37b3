// tb_vbi_gen: self-checking test of vbi_gen.
//
// A small raster (parameters overridden to 16x8) is scanned repeatedly in
// raster order with random idle cycles and with the last read held for
// several cycles. The interrupt must pulse exactly once per frame, on the
// read of the last pixel, stay set until acknowledged, and clear on the
// acknowledge.
module tb_vbi_gen;

  localparam int W = 16, H = 8, CW = 10;

  logic          clk = 0, rst = 1;
  logic          rd_valid = 0, vbi_ack = 0;
  logic [CW-1:0] rd_x = 0, rd_y = 0;
  logic          vbi_irq, vbi_pulse;

  int checks = 0, failures = 0, pulses = 0;

  vbi_gen #(.WIDTH(W), .HEIGHT(H), .X_STEP(1), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int f = 0; f < 6; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int hold;
          hold = (x == W - 1 && y == H - 1) ? 3 : 1;
          // idle cycles between reads
          while ($urandom_range(3) == 0) begin
            rd_valid = 0; #1;
            check(!vbi_pulse, "no pulse while idle");
            @(posedge clk); #1;
          end
          for (int k = 0; k < hold; k++) begin
            rd_valid = 1; rd_x = CW'(x); rd_y = CW'(y); #1;
            check(vbi_pulse == (x == W - 1 && y == H - 1 && k == 0),
                  $sformatf("pulse at (%0d,%0d) hold %0d", x, y, k));
            if (vbi_pulse) pulses++;
            @(posedge clk); #1;
            if (x == W - 1 && y == H - 1) check(vbi_irq, "interrupt pending after last read");
          end
        end
      rd_valid = 0;
      // acknowledge on even frames only; odd frames stay pending
      if (f % 2 == 0) begin
        vbi_ack = 1; @(posedge clk); #1 vbi_ack = 0;
        check(!vbi_irq, "acknowledge clears the interrupt");
      end else begin
        @(posedge clk); #1;
        check(vbi_irq, "interrupt held until acknowledged");
      end
    end
    check(pulses == 6, $sformatf("one request per frame (%0d)", pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
