// tb_slow_clock_gen: with the default division (16) slowclk must have a
// period of 16 clocks, be high for 8 of them, and slow_tick must pulse once
// per period, in the cycle before slowclk rises (so that logic acting on
// the tick changes at the same clock edge as slowclk).
module tb_slow_clock_gen;
  logic clk = 0, rst = 1, slowclk, slow_tick;
  int checks = 0, failures = 0;
  int cyc = 0, last_rise = -1, ticks = 0, highs = 0;
  logic prev = 0, prev_tick = 0;

  slow_clock_gen dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (16 * 40) begin
      @(posedge clk); #1;
      cyc++;
      if (slow_tick) ticks++;
      if (slowclk) highs++;
      if (slowclk && !prev) begin
        checks++;
        if (!prev_tick) begin failures++; $display("tick not aligned with rise at %0d", cyc); end
        if (last_rise >= 0) begin
          checks++;
          if (cyc - last_rise != 16) begin failures++; $display("period %0d", cyc - last_rise); end
        end
        last_rise = cyc;
      end
      if (prev_tick && !(slowclk && !prev)) begin failures++; checks++; end
      prev = slowclk;
      prev_tick = slow_tick;
    end
    checks++; if (ticks != 40 && ticks != 39) begin failures++; $display("ticks=%0d", ticks); end
    checks++; if (highs < 8 * 39 || highs > 8 * 41) begin failures++; $display("highs=%0d", highs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
