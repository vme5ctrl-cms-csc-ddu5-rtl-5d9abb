// tb_serial_adc_ctrl: two ADC models behind the serial-ADC port. For each
// ADC and a few channels: command 0 sends the control byte (checked in the
// model), command 1 reads 16 bits back (checked against the model's
// result). Also checks chip selects, the bit count of each phase, the bit
// clock period (2 slow ticks) and that unused commands end at once.
module tb_serial_adc_ctrl;
  import vme5_pkg::*;
  localparam int DIV = 4;

  logic clk = 0, rst = 1, slowclk, slow_tick;
  vme_req_t req = '0;
  vme_rsp_t rsp;
  logic [1:0] adc_cs_n, adc_dout;
  logic adc_sclk, adc_din;
  int checks = 0, failures = 0;

  slow_clock_gen #(.DIV(DIV)) u_slow (.clk, .rst, .slowclk, .slow_tick);
  serial_adc_ctrl dut (.*);
  tb_adc_model #(.RESULT_BASE(12'h300)) adc0 (.cs_n(adc_cs_n[0]), .sclk(adc_sclk), .din(adc_din), .dout(adc_dout[0]));
  tb_adc_model #(.RESULT_BASE(12'h800)) adc1 (.cs_n(adc_cs_n[1]), .sclk(adc_sclk), .din(adc_din), .dout(adc_dout[1]));

  always #5 clk = ~clk;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int sclk_edges = 0, last_rise = -1, cyc = 0, bad_period = 0;
  logic sclk_d = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    sclk_d <= adc_sclk;
    if (adc_sclk && !sclk_d) begin
      sclk_edges <= sclk_edges + 1;
      if (last_rise >= 0 && cyc - last_rise < 2 * DIV) bad_period <= bad_period + 1;
      last_rise <= cyc;
    end
  end

  task automatic op(input logic [3:0] adc, input logic [3:0] code, input logic [15:0] wdata,
                    output logic [15:0] rdata, output int cycles);
    @(posedge clk);
    req.strobe <= 1'b1; req.write <= !code[0]; req.dev <= 4'd9;
    req.cmd <= {adc, 2'b00, code}; req.wdata <= wdata;
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (!rsp.dtack && cycles < 100000);
    rdata = rsp.rdata;
    req.strobe <= 1'b0;
    @(posedge clk);
    while (rsp.dtack) @(posedge clk);
  endtask

  logic [15:0] rd;
  int cy, e;
  logic [7:0] ctrl;
  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    check(adc_cs_n == 2'b11, "no ADC selected after reset");
    for (int a = 0; a < 2; a++) begin
      for (int ch = 0; ch < 8; ch += 3) begin
        ctrl = {1'b1, 3'(ch), 4'b0001};
        e = sclk_edges;
        op(4'(a), 4'h0, {8'h00, ctrl}, rd, cy);
        check(sclk_edges - e == 8, $sformatf("control byte is 8 clocks (%0d)", sclk_edges - e));
        check(adc_cs_n[a] == 1'b0 && adc_cs_n[1-a] == 1'b1, "chip select held for the conversion");
        check((a == 0 ? adc0.ctrl : adc1.ctrl) == ctrl, $sformatf("ADC %0d got control %h", a, a == 0 ? adc0.ctrl : adc1.ctrl));
        check(cy >= 8 * 2 * DIV && cy <= 9 * 2 * DIV + 8, $sformatf("write latency %0d", cy));
        e = sclk_edges;
        op(4'(a), 4'h1, 16'h0, rd, cy);
        check(sclk_edges - e == 16, "read is 16 clocks");
        check(rd == {1'b0, (a == 0 ? 12'h300 : 12'h800) + 12'h111 * 12'(ch), 3'b000},
              $sformatf("ADC %0d ch %0d read %h", a, ch, rd));
        check(adc_cs_n == 2'b11, "chip select released after read");
      end
    end
    e = sclk_edges;
    op(4'd0, 4'h8, 16'h0, rd, cy);
    check(cy <= 6 && sclk_edges == e, "unused command ends at once");
    op(4'd0, 4'h3, 16'h0, rd, cy);
    check(cy <= 6 && sclk_edges == e, "Burr-Brown read is unused");
    check(bad_period == 0, "bit clock period is two slow ticks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
