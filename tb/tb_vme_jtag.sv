// tb_vme_jtag: drives the VME-JTAG bridge with unit requests and checks it
// against two TAP models: chain 5 (10-bit IR, like the control FPGA) and
// chain 2 (8-bit IR, like a PROM). Checks the TAP state and registers after
// each operation, the TDO read-back, that the other chain sees no clock,
// the number and period of TCK cycles, and the restore-idle sequence.
module tb_vme_jtag;
  import vme5_pkg::*;
  localparam int DIV = 4;

  logic clk = 0, rst = 1, slowclk, slow_tick, restore_idle = 0, busy;
  vme_req_t req = '0;
  vme_rsp_t rsp;
  logic [15:0] tdo, tck, tms, tdi, dvcenb;
  int checks = 0, failures = 0;

  slow_clock_gen #(.DIV(DIV)) u_slow (.clk, .rst, .slowclk, .slow_tick);
  vme_jtag dut (.*);

  logic tdo5, tdo2;
  tb_tap_model #(.IR_LEN(10), .DR_CAPTURE(16'hA5C3)) tap5 (.tck(tck[5]), .tms(tms[5]), .tdi(tdi[5]), .tdo(tdo5));
  tb_tap_model #(.IR_LEN(8),  .DR_CAPTURE(16'h0F0F)) tap2 (.tck(tck[2]), .tms(tms[2]), .tdi(tdi[2]), .tdo(tdo2));
  always_comb begin
    tdo = '0;
    tdo[5] = tdo5;
    tdo[2] = tdo2;
  end

  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One VME cycle; returns read data and the clocks from strobe to dtack.
  task automatic op(input logic [3:0] dev, input logic [3:0] code, input int nbits,
                    input logic [15:0] wdata, output logic [15:0] rdata, output int cycles);
    @(posedge clk);
    req.strobe <= 1'b1; req.write <= 1'b1; req.dev <= dev;
    req.cmd <= {4'(nbits - 1), 2'b00, code}; req.wdata <= wdata;
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (!rsp.dtack && cycles < 100000);
    rdata = rsp.rdata;
    req.strobe <= 1'b0;
    @(posedge clk);
    while (rsp.dtack) @(posedge clk);
  endtask

  // TCK period on chain 5, inside one operation: must be 2*DIV clocks
  int last_rise = -1, cyc = 0, bad_period = 0, periods = 0;
  logic tck5_d = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    tck5_d <= tck[5];
    if (!busy) last_rise <= -1;
    else if (tck[5] && !tck5_d) begin
      if (last_rise >= 0) begin
        periods <= periods + 1;
        if (cyc - last_rise != 2 * DIV) bad_period <= bad_period + 1;
      end
      last_rise <= cyc;
    end
  end

  logic [15:0] rd;
  int cy, e5, e2;
  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // restore idle on every chain
    restore_idle <= 1; @(posedge clk); restore_idle <= 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    check(tap5.at_idle && tap2.at_idle, "restore-idle leaves TAPs in Run-Test/Idle");
    check(tap5.edges == 6 && tap2.edges == 6, $sformatf("restore-idle is 6 TCK cycles (%0d,%0d)", tap5.edges, tap2.edges));

    // IR with header and tailer: User1 = 0x3C2 into the 10-bit IR
    e2 = tap2.edges;
    op(4'd5, 4'h7, 10, 16'h03C2, rd, cy);
    check(tap5.ir == 10'h3C2, $sformatf("IR = %h", tap5.ir));
    check(tap5.at_idle, "back in Run-Test/Idle after IR tailer");
    check(tap5.edges == 6 + 16, $sformatf("IR shift took %0d TCK", tap5.edges - 6));
    check(tap2.edges == e2, "other chain not clocked");
    check(cy >= 16 * 2 * DIV && cy <= 17 * 2 * DIV + 8, $sformatf("IR op latency %0d clocks", cy));

    // DR: 8 bits with header, then 8 bits with tailer
    op(4'd5, 4'h1, 8, 16'h005A, rd, cy);
    check(tap5.at_shift_dr, "header-only leaves TAP in Shift-DR");
    op(4'd5, 4'h2, 8, 16'h00C3, rd, cy);
    check(tap5.at_idle, "tailer returns to idle");
    check(tap5.dr == 16'hC35A, $sformatf("DR = %h", tap5.dr));
    op(4'd5, 4'h5, 1, 16'h0, rd, cy);
    check(rd == 16'hA5C3, $sformatf("TDO read-back %h", rd));
    check(cy <= 4, "TDO register read needs no JTAG clocks");

    // DR 16 bits with header and tailer
    e5 = tap5.edges;
    op(4'd5, 4'h3, 16, 16'h1234, rd, cy);
    check(tap5.dr == 16'h1234 && tap5.at_idle, $sformatf("DR16 = %h", tap5.dr));
    check(tap5.edges - e5 == 3 + 16 + 2, $sformatf("DR16 took %0d TCK", tap5.edges - e5));
    op(4'd5, 4'h5, 1, 16'h0, rd, cy);
    check(rd == 16'hA5C3, $sformatf("TDO read-back 16 %h", rd));

    // IR in two parts on chain 2: header-only 4 bits, tailer-only 4 bits
    op(4'd2, 4'hD, 4, 16'h000D, rd, cy);
    check(tap2.at_shift_ir, "IR header-only leaves Shift-IR");
    op(4'd2, 4'hC, 2, 16'h0002, rd, cy);
    check(tap2.at_shift_ir, "IR no header/tailer stays in Shift-IR");
    op(4'd2, 4'hE, 2, 16'h0003, rd, cy);
    check(tap2.at_idle, "IR tailer-only returns to idle");
    check(tap2.ir == 8'hED, $sformatf("chain 2 IR = %h", tap2.ir));
    op(4'd5, 4'h5, 1, 16'h0, rd, cy);

    // TAP reset on chain 2
    e5 = tap5.edges;
    op(4'd2, 4'h6, 1, 16'h0, rd, cy);
    check(tap2.ir == 8'hFF && tap2.at_idle, "reset: BYPASS and idle");
    check(tap5.edges == e5, "reset touches only the selected chain");
    check(cy >= 12 * DIV && cy <= 13 * DIV + 8, $sformatf("reset takes 12 slow ticks (%0d clocks)", cy));

    // an undefined operation ends at once
    e5 = tap5.edges;
    op(4'd5, 4'h4, 1, 16'h0, rd, cy);
    check(cy <= 4 && tap5.edges == e5, "undefined op does nothing");

    check(periods > 40 && bad_period == 0, $sformatf("TCK period: %0d of %0d wrong", bad_period, periods));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
