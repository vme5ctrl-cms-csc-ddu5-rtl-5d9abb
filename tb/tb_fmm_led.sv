// tb_fmm_led: with a 4-bit blink counter (blink half period 8 clocks) the
// LEDs must follow the table: steady on, blinking (both phases seen, each
// phase 8 clocks long) or off, per FMM code.
module tb_fmm_led;
  logic clk = 0, rst = 1;
  logic [3:0] fmm = 4'b1000;
  logic led_grn, led_yel;
  int checks = 0, failures = 0;

  fmm_led #(.BLINK_BITS(4)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected: 0 off, 1 on, 2 blink
  task automatic check_code(input logic [3:0] code, input int g, input int y);
    int gon = 0, yon = 0, yrun = 0, ymaxrun = 0;
    fmm = code;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 64; i++) begin
      @(posedge clk); #1;
      gon += led_grn; yon += led_yel;
      if (led_yel) yrun++; else begin if (yrun > ymaxrun) ymaxrun = yrun; yrun = 0; end
    end
    checks += 2;
    if ((g == 0 && gon != 0) || (g == 1 && gon != 64) || (g == 2 && (gon < 24 || gon > 40))) begin
      failures++; $display("code %b green on %0d/64", code, gon);
    end
    if ((y == 0 && yon != 0) || (y == 1 && yon != 64) || (y == 2 && (yon < 24 || yon > 40))) begin
      failures++; $display("code %b yellow on %0d/64", code, yon);
    end
    if (y == 2) begin
      checks++;
      if (ymaxrun != 8) begin failures++; $display("blink phase %0d clocks", ymaxrun); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check_code(4'b1000, 1, 0);   // ready
    check_code(4'b0001, 1, 2);   // warning
    check_code(4'b0100, 0, 1);   // busy
    check_code(4'b0010, 2, 2);   // lost sync
    check_code(4'b1100, 0, 2);   // error
    check_code(4'b0000, 0, 0);   // undefined
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
