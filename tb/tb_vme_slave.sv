// tb_vme_slave: a VME master drives the slave; four stand-in function units
// answer after different delays with their own data. Checks routing by
// type and device, the slot match (own slot, broadcast write, broadcast
// read not answered, other slot not answered), the fields handed to the
// unit, the read data and data-bus enable, and the DTACK handshake.
module tb_vme_slave;
  import vme5_pkg::*;

  logic clk = 0, rst = 1;
  logic [4:0] ga = 5'd7;
  logic [23:1] vme_a = '0;
  logic vme_as_n = 1, vme_write_n = 1;
  logic [1:0] vme_ds_n = 2'b11;
  logic [15:0] vme_d_in = '0, vme_d_out;
  logic vme_d_oe, vme_dtack_n;
  vme_req_t req_jtag, req_adc, req_ser, req_par;
  vme_rsp_t rsp_jtag, rsp_adc, rsp_ser, rsp_par;
  int checks = 0, failures = 0;

  vme_slave dut (.*);

  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures); $finish;
  end

  // stand-in units: dtack after DELAY clocks of strobe, data = ID ^ cmd
  vme_req_t last [4];
  int       hits [4];
  for (genvar u = 0; u < 4; u++) begin : g_unit
    vme_req_t rq;
    vme_rsp_t rs;
    int cnt = 0;
    assign rq = (u == 0) ? req_jtag : (u == 1) ? req_adc : (u == 2) ? req_ser : req_par;
    always @(posedge clk) begin
      if (rst || !rq.strobe) begin cnt <= 0; rs.dtack <= 1'b0; end
      else begin
        cnt <= cnt + 1;
        if (cnt == 0) begin last[u] = rq; hits[u]++; end
        if (cnt == 3 * u + 2) begin rs.dtack <= 1'b1; rs.rdata <= 16'(u * 16'h1111) ^ {6'h0, rq.cmd}; end
      end
    end
  end
  assign rsp_jtag = g_unit[0].rs;
  assign rsp_adc  = g_unit[1].rs;
  assign rsp_ser  = g_unit[2].rs;
  assign rsp_par  = g_unit[3].rs;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic vme(input logic [23:0] a, input bit wr, input logic [15:0] wd,
                     output logic [15:0] rd, output bit acked);
    int n = 0;
    vme_a = a[23:1]; vme_write_n = !wr; vme_d_in = wd;
    #20 vme_as_n = 0;
    #10 vme_ds_n = 2'b00;
    acked = 0;
    while (n < 200) begin
      @(posedge clk); n++;
      if (!vme_dtack_n) begin acked = 1; break; end
    end
    #3 rd = vme_d_out;
    if (acked) check(vme_d_oe == !wr, "data bus enabled only on reads");
    vme_ds_n = 2'b11; vme_as_n = 1;
    n = 0;
    while (!vme_dtack_n && n < 50) begin @(posedge clk); n++; end
    check(vme_dtack_n, "DTACK released after data strobe");
    repeat (4) @(posedge clk);
  endtask

  function automatic logic [23:0] adr(input logic [4:0] slot, input logic [2:0] typ,
                                      input logic [3:0] dev, input logic [9:0] cmd);
    return {slot, typ, dev, cmd, 2'b00};
  endfunction

  logic [15:0] rd;
  bit ack;
  int h0;
  initial begin
    for (int u = 0; u < 4; u++) hits[u] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    // VME-JTAG device 5, bit count 9, command 7
    vme(adr(5'd7, 3'b000, 4'd5, {4'd9, 6'h07}), 1, 16'h03C2, rd, ack);
    check(ack && hits[0] == 1 && last[0].dev == 5 && last[0].cmd == {4'd9, 6'h07} &&
          last[0].wdata == 16'h03C2 && last[0].write, "JTAG write routed with its fields");
    // serial ADC is JTAG device 9
    vme(adr(5'd7, 3'b000, 4'd9, 10'h001), 0, 16'h0, rd, ack);
    check(ack && hits[1] == 1 && rd == (16'h1111 ^ 16'h001), $sformatf("ADC read %h", rd));
    // VME-Serial
    vme(adr(5'd7, 3'b100, 4'd4, 10'h00D), 1, 16'h0, rd, ack);
    check(ack && hits[2] == 1 && last[2].dev == 4 && last[2].cmd == 10'h00D, "serial routed");
    // VME-Parallel read
    vme(adr(5'd7, 3'b011, 4'd15, 10'h000), 0, 16'h0, rd, ack);
    check(ack && hits[3] == 1 && rd == 16'h3333, $sformatf("parallel read %h", rd));
    // broadcast write is accepted, broadcast read is not
    vme(adr(5'd28, 3'b011, 4'd9, 10'h080), 1, 16'h00AA, rd, ack);
    check(ack && hits[3] == 2 && last[3].wdata == 16'h00AA, "broadcast write");
    vme(adr(5'd28, 3'b011, 4'd0, 10'h000), 0, 16'h0, rd, ack);
    check(!ack && hits[3] == 2, "broadcast read not answered");
    // other slot, other type, unused JTAG device
    vme(adr(5'd8, 3'b011, 4'd0, 10'h000), 0, 16'h0, rd, ack);
    check(!ack && hits[3] == 2, "other slot not answered");
    vme(adr(5'd7, 3'b001, 4'd0, 10'h000), 0, 16'h0, rd, ack);
    check(!ack, "unknown type not answered");
    h0 = hits[0];
    vme(adr(5'd7, 3'b000, 4'd0, 10'h000), 0, 16'h0, rd, ack);
    check(!ack && hits[0] == h0, "JTAG device 0 not answered");
    vme(adr(5'd7, 3'b000, 4'd15, 10'h005), 0, 16'h0, rd, ack);
    check(ack && hits[0] == h0 + 1 && rd == 16'h0005, "JTAG device 15 (emergency PROM path)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
