// tb_sr16lce: checks the serial-in right-shift register: a known bit
// stream must appear in q[15:16-n] first bit lowest; clear works unclocked.
module tb_sr16lce;
  logic c = 0, clr = 1, ce = 0, sli = 0;
  logic [15:0] q, model;
  int checks = 0, failures = 0;

  sr16lce dut (.*);

  always #5 c = ~c;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    model = '0;
    #12 clr = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge c);
      ce = $urandom % 3 != 0; sli = $urandom % 2;
      @(posedge c); #1;
      if (ce) model = {sli, model[15:1]};
      checks++;
      if (q !== model) begin failures++; $display("mismatch %0d: q=%h model=%h", i, q, model); end
    end
    // 16 bits of 0xBEEF sent LSB first end up as 0xBEEF
    for (int b = 0; b < 16; b++) begin
      @(negedge c); ce = 1; sli = 1'(16'hBEEF >> b);
    end
    @(negedge c); ce = 0;
    checks++; if (q !== 16'hBEEF) begin failures++; $display("stream q=%h", q); end
    clr = 1; #1; checks++; if (q !== 16'h0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
