// tb_fmm_encoder: every status combination, with and without override,
// against the FMM code table: error 1100 > lost sync 0010 > busy 0100 >
// warning 0001 > ready 1000; one cycle of latency.
module tb_fmm_encoder;
  logic clk = 0, rst = 1;
  logic [3:0] stat = '0, override_code = '0, fmm, exp;
  logic override_en = 0;
  int checks = 0, failures = 0;

  fmm_encoder dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1;
    checks++; if (fmm !== 4'b0100) failures++;   // busy while in reset
    rst = 0;
    for (int i = 0; i < 64; i++) begin
      stat = 4'(i); override_en = i[4]; override_code = 4'(i * 7);
      if (override_en)  exp = override_code;
      else if (stat[3]) exp = 4'b1100;
      else if (stat[2]) exp = 4'b0010;
      else if (stat[0]) exp = 4'b0100;
      else if (stat[1]) exp = 4'b0001;
      else              exp = 4'b1000;
      @(posedge clk); #1;
      checks++;
      if (fmm !== exp) begin failures++; $display("stat=%b ovr=%b fmm=%b exp=%b", stat, override_en, fmm, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
