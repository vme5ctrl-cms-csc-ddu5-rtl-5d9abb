// tb_sr4ce3: the clear must give 0001 without a clock; enabled clocks move
// the bits up with sli entering bit 0.
module tb_sr4ce3;
  logic c = 0, clr = 0, ce = 0, sli = 0;
  logic [3:0] q, model;
  int checks = 0, failures = 0;

  sr4ce3 dut (.*);

  always #5 c = ~c;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #2 clr = 1; #1;
    checks++; if (q !== 4'b0001) failures++;
    model = 4'b0001;
    #1 clr = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge c);
      ce = $urandom % 2; sli = $urandom % 2;
      @(posedge c); #1;
      if (ce) model = {model[2:0], sli};
      checks++;
      if (q !== model) begin failures++; $display("mismatch %0d q=%b model=%b", i, q, model); end
      if (i % 41 == 20) begin
        #2 clr = 1; #1; checks++; if (q !== 4'b0001) failures++;
        model = 4'b0001; clr = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
