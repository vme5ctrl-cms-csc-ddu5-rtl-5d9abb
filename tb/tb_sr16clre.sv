// tb_sr16clre: checks the loadable right-shift register against a model:
// random load / shift / hold sequences and asynchronous clears.
module tb_sr16clre;
  logic c = 0, clr = 1, ce = 0, l = 0, sli = 0;
  logic [15:0] d = '0, q, model;
  int checks = 0, failures = 0;

  sr16clre dut (.*);

  always #5 c = ~c;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    model = '0;
    #12 clr = 0;
    checks++; if (q !== 16'h0) failures++;
    for (int i = 0; i < 400; i++) begin
      @(negedge c);
      l = ($urandom % 5 == 0); ce = $urandom % 2; sli = $urandom % 2; d = 16'($urandom);
      @(posedge c); #1;
      if (l) model = d; else if (ce) model = {sli, model[15:1]};
      checks++;
      if (q !== model) begin failures++; $display("mismatch %0d: q=%h model=%h", i, q, model); end
      if (i % 97 == 50) begin
        #2 clr = 1; #1; checks++; if (q !== 16'h0) failures++;
        model = '0; clr = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
