// tb_sr4re: synchronous reset loads 0001 on the clock edge, whatever ce is,
// and only then; enabled clocks shift up with sli entering bit 0.
module tb_sr4re;
  logic c = 0, r = 1, ce = 0, sli = 0;
  logic [3:0] q, model;
  int checks = 0, failures = 0;

  sr4re dut (.*);

  always #5 c = ~c;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge c); #1;
    model = 4'b0001;
    checks++; if (q !== 4'b0001) failures++;
    for (int i = 0; i < 300; i++) begin
      @(negedge c);
      r = ($urandom % 7 == 0); ce = $urandom % 2; sli = $urandom % 2;
      #1;
      if (r) begin checks++; if (q !== model) failures++; end  // not asynchronous
      @(posedge c); #1;
      if (r) model = 4'b0001; else if (ce) model = {model[2:0], sli};
      checks++;
      if (q !== model) begin failures++; $display("mismatch %0d q=%b model=%b", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
