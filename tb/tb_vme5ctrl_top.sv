// tb_vme5ctrl_top: end-to-end test of the whole VME controller at its
// default parameters, through the VME bus only, with models of the JTAG
// devices (control FPGA with a 10-bit IR on chain 5, a 14-bit-IR FPGA
// with a 32-bit ID register on chain 6, a PROM on chain 2, the input
// FIFOs' 16-bit IR chain on 8), two serial ADCs, the settings
// flash and the serial devices. It runs: the settings load after reset,
// restore-idle of the JTAG chains, the usual VME-JTAG access sequence
// (User1 / select / User2 / data / User1 / no-op / Bypass), TDO read-back,
// a 32-bit register read in two 16-bit cycles,
// a TAP reset, an ADC conversion, input FIFO read and load through the
// input shift registers, a flash program and reload on request, the flash
// status, the status registers and histories, the FMM output and LEDs, the
// FMM test override, a broadcast write, an unanswered cycle, a soft reset
// and a reset with the automatic load switched off. Each of these is
// counted, and one that never happened counts as a failure. The JTAG, ADC
// and flash bit clocks are checked against the 1.25 MHz rate throughout.
module tb_vme5ctrl_top;
  import vme5_pkg::*;

  logic clk = 0, rst = 1, soft_rst = 0;
  logic [4:0] ga = 5'd3;
  logic [7:0] mode_sw = 8'h00;
  logic [23:1] vme_a = '0;
  logic vme_as_n = 1, vme_write_n = 1;
  logic [1:0] vme_ds_n = 2'b11;
  logic [15:0] vme_d_in = '0, vme_d_out;
  logic vme_d_oe, vme_dtack_n;
  logic [15:0] jtag_tck, jtag_tms, jtag_tdi, jtag_oe, jtag_tdo;
  logic [1:0] adc_cs_n, adc_dout;
  logic adc_sclk, adc_din;
  logic ser_clk, ser_do;
  logic [15:0] ser_en;
  logic [3:0] ser_di;
  logic ctrl_req = 0;
  logic fl_cs_n, fl_sck, fl_si, fl_so;
  logic [15:0][3:0] stat = '0;
  logic [3:0] fmm;
  logic fmm_led_grn, fmm_led_yel;
  logic [15:0] led_mode;
  logic [7:0] led_par;
  logic la_all_high;
  logic [15:0] slink_gbe_cfg;
  logic slowclk;
  int checks = 0, failures = 0;

  vme5ctrl_top dut (.*);

  logic tdo5, tdo2, tdo8, tdo6;
  tb_tap_model #(.IR_LEN(10), .DR_CAPTURE(16'h1DDC)) fpga5 (.tck(jtag_tck[5]), .tms(jtag_tms[5]), .tdi(jtag_tdi[5]), .tdo(tdo5));
  tb_tap_model #(.IR_LEN(8),  .DR_CAPTURE(16'h5036)) prom2 (.tck(jtag_tck[2]), .tms(jtag_tms[2]), .tdi(jtag_tdi[2]), .tdo(tdo2));
  tb_tap_model #(.IR_LEN(14), .DR_LEN(32), .DR_CAPTURE(32'h1266_E093)) fpga6 (.tck(jtag_tck[6]), .tms(jtag_tms[6]), .tdi(jtag_tdi[6]), .tdo(tdo6));
  tb_tap_model #(.IR_LEN(16), .DR_CAPTURE(16'h0000)) fifo8 (.tck(jtag_tck[8]), .tms(jtag_tms[8]), .tdi(jtag_tdi[8]), .tdo(tdo8));
  always_comb begin
    jtag_tdo = '0;
    jtag_tdo[5] = tdo5; jtag_tdo[2] = tdo2; jtag_tdo[8] = tdo8; jtag_tdo[6] = tdo6;
  end
  tb_adc_model #(.RESULT_BASE(12'h400)) adc0 (.cs_n(adc_cs_n[0]), .sclk(adc_sclk), .din(adc_din), .dout(adc_dout[0]));
  tb_adc_model #(.RESULT_BASE(12'h900)) adc1 (.cs_n(adc_cs_n[1]), .sclk(adc_sclk), .din(adc_din), .dout(adc_dout[1]));
  tb_flash_model  flash (.cs_n(fl_cs_n), .sck(fl_sck), .si(fl_si), .so(fl_so));
  tb_serdev_model devs  (.ser_clk, .ser_do, .ser_en, .ser_di);

  always #12.5 clk = ~clk;   // 40 MHz
  initial begin
    #30_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures); $finish;
  end

  // Bit-clock rates: rising edges of TCK, the ADC clock and the flash clock
  // must never be closer than 800 ns (1.25 MHz = 40 MHz / 32), and within a
  // transfer they are exactly that far apart. Longer gaps (the clock resting
  // low between two operations or two phases) are allowed and not counted.
  int rate_checks = 0, rate_bad = 0;
  for (genvar k = 0; k < 3; k++) begin : g_rate
    logic    bclk;
    realtime last = 0;
    assign bclk = (k == 0) ? jtag_tck[5] : (k == 1) ? adc_sclk : fl_sck;
    always @(posedge bclk) begin
      if (last != 0) begin
        if ($realtime - last == 800) rate_checks++;
        if ($realtime - last < 800) begin
          rate_bad++;
          $display("FAIL: bit clock %0d period %0t", k, $realtime - last);
        end
      end
      last = $realtime;
    end
  end

  // mechanisms seen
  typedef enum int {
    M_AUTOLOAD, M_CTRL_RELOAD, M_RESTORE_IDLE, M_JTAG_IR, M_JTAG_DR_SPLIT, M_TDO_READ,
    M_TAP_RESET, M_ADC, M_FIFO_READ, M_DEV_LOAD, M_FLASH_PROG, M_FLASH_STATUS,
    M_STATUS_REGS, M_HISTORY, M_FMM, M_OVERRIDE, M_BROADCAST, M_UNANSWERED,
    M_SOFT_RESET, M_AUTOLOAD_OFF, M_NUM
  } mech_e;
  int seen [M_NUM];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic vme(input logic [23:0] a, input bit wr, input logic [15:0] wd,
                     output logic [15:0] rd, output bit acked);
    int n = 0;
    vme_a = a[23:1]; vme_write_n = !wr; vme_d_in = wd;
    #40 vme_as_n = 0;
    #20 vme_ds_n = 2'b00;
    acked = 0;
    while (n < 20000) begin
      @(posedge clk); n++;
      if (!vme_dtack_n) begin acked = 1; break; end
    end
    #5 rd = vme_d_out;
    vme_ds_n = 2'b11; vme_as_n = 1;
    n = 0;
    while (!vme_dtack_n && n < 50) begin @(posedge clk); n++; end
    repeat (4) @(posedge clk);
  endtask

  function automatic logic [23:0] adr(input logic [2:0] typ, input logic [3:0] dev, input logic [9:0] cmd);
    return {ga, typ, dev, cmd, 2'b00};
  endfunction

  // VME-JTAG: op code, bit count
  task automatic jtag(input logic [3:0] dev, input logic [3:0] op, input int nbits,
                      input logic [15:0] data, output logic [15:0] rd);
    bit ack;
    vme(adr(3'b000, dev, {4'(nbits - 1), 2'b00, op}), 1, data, rd, ack);
    check(ack, $sformatf("JTAG dev %0d op %h acknowledged", dev, op));
  endtask
  task automatic par_rd(input logic [3:0] dev, input logic [7:0] cmd, output logic [15:0] rd);
    bit ack;
    vme(adr(3'b011, dev, {2'b00, cmd}), 0, 16'h0, rd, ack);
    check(ack, "parallel read acknowledged");
  endtask
  task automatic par_wr(input logic [3:0] dev, input logic [7:0] cmd, input logic [15:0] wd);
    bit ack; logic [15:0] rd;
    vme(adr(3'b011, dev, {2'b00, cmd}), 1, wd, rd, ack);
    check(ack, "parallel write acknowledged");
  endtask
  task automatic ser(input logic [3:0] dev, input logic [3:0] cmd);
    bit ack; logic [15:0] rd;
    vme(adr(3'b100, dev, {6'h0, cmd}), 1, 16'h0, rd, ack);
    check(ack, $sformatf("serial dev %0d cmd %h acknowledged", dev, cmd));
  endtask

  task automatic set_page(input int p, input logic [47:0] v, input int n);
    for (int k = 0; k < n; k++) flash.page[p][k] = v[n - 1 - k];
  endtask

  task automatic wait_ready();
    logic [15:0] st;
    int n = 0;
    do begin par_rd(4'd15, 8'h00, st); n++; end while (!st[15] && n < 5000);
    check(st[15], "VME ready after settings load");
  endtask

  function automatic logic [15:0] col(input logic [15:0][3:0] s, input int k);
    for (int b = 0; b < 16; b++) col[b] = s[b][k];
  endfunction

  logic [15:0] rd;
  bit ack;
  int r0, e5;
  logic [15:0][3:0] s1, s2;
  initial begin
    for (int m = 0; m < M_NUM; m++) seen[m] = 0;
    #1;
    set_page(1, 48'h0000_0000_7FFF, 16);   // kill mask
    set_page(7, 48'h0000_0000_00A3, 16);   // board ID
    set_page(4, 48'h0000_0102_0304, 32);   // DDR offsets
    set_page(5, 48'h0001_8000_0040, 34);   // GbE thresholds
    repeat (10) @(posedge clk);
    rst = 0;

    // ---- settings load and restore-idle after reset
    wait_ready();
    check(flash.reads == 4 && devs.rx[13][15:0] == 16'h7FFF && devs.rx[14][15:0] == 16'h00A3 &&
          devs.rx[9][31:0] == 32'h0102_0304 && devs.rx[12][33:0] == 34'h1_8000_0040,
          "settings loaded from flash after reset");
    if (flash.reads == 4) seen[M_AUTOLOAD]++;
    check(fpga5.at_idle && prom2.at_idle && fifo8.at_idle,
          "JTAG chains in Run-Test/Idle after reset");
    if (fpga5.edges == 6) seen[M_RESTORE_IDLE]++;

    // ---- typical VME-JTAG sequence on the control FPGA
    jtag(4'd5, 4'h7, 10, 16'h03C2, rd);                 // IR User1
    check(fpga5.ir == 10'h3C2, "IR = User1");
    jtag(4'd5, 4'h3, 8, 16'h0021, rd);                  // select function
    check(fpga5.dr[15:8] == 8'h21, $sformatf("User1 DR %h", fpga5.dr));
    jtag(4'd5, 4'h7, 10, 16'h03C3, rd);                 // IR User2
    check(fpga5.ir == 10'h3C3, "IR = User2");
    jtag(4'd5, 4'h1, 8, 16'h00CD, rd);                  // 16-bit DR in two parts
    jtag(4'd5, 4'h2, 8, 16'h00AB, rd);
    check(fpga5.dr == 16'hABCD && fpga5.at_idle, $sformatf("User2 DR %h", fpga5.dr));
    seen[M_JTAG_DR_SPLIT]++;
    jtag(4'd5, 4'h5, 1, 16'h0, rd);
    check(rd == 16'h1DDC, $sformatf("TDO read-back %h", rd));
    if (rd == 16'h1DDC) seen[M_TDO_READ]++;
    jtag(4'd5, 4'h7, 10, 16'h03C2, rd);
    jtag(4'd5, 4'h3, 8, 16'h0000, rd);                  // no-op
    e5 = fpga5.edges;
    jtag(4'd5, 4'h7, 10, 16'h03FF, rd);                 // Bypass
    check(fpga5.ir == 10'h3FF && fpga5.edges - e5 == 16, "IR = Bypass in 16 TCK");
    seen[M_JTAG_IR]++;
    // 16-bit IR of the input FIFO chain
    jtag(4'd8, 4'hF, 16, 16'h1234, rd);
    check(fifo8.ir == 16'h1234, $sformatf("FIFO chain IR %h", fifo8.ir));
    // 32-bit ID read from a 14-bit-IR FPGA in two 16-bit cycles:
    // header on the first (op 1), tailer on the second (op 2)
    jtag(4'd6, 4'h7, 14, 16'h3249, rd);
    check(fpga6.ir == 14'h3249 && fpga6.at_idle, "14-bit IR loaded");
    jtag(4'd6, 4'h1, 16, 16'h0000, rd);
    jtag(4'd6, 4'h5, 16, 16'h0, rd);
    check(rd == 16'hE093 && fpga6.at_shift_dr, $sformatf("ID low word %h", rd));
    jtag(4'd6, 4'h2, 16, 16'h0000, rd);
    jtag(4'd6, 4'h5, 16, 16'h0, rd);
    check(rd == 16'h1266 && fpga6.at_idle, $sformatf("ID high word %h", rd));
    // TAP reset of the PROM
    jtag(4'd2, 4'h7, 8, 16'h00FE, rd);
    check(prom2.ir == 8'hFE, "PROM IR = IDCODE");
    jtag(4'd2, 4'h6, 1, 16'h0, rd);
    check(prom2.ir == 8'hFF && prom2.at_idle, "PROM reset to BYPASS, idle");
    if (prom2.ir == 8'hFF) seen[M_TAP_RESET]++;

    // ---- serial ADC, device 9 of VME-JTAG
    vme(adr(3'b000, 4'd9, {4'd1, 6'h00}), 1, 16'h00D1, rd, ack);   // ADC 1, channel 5
    vme(adr(3'b000, 4'd9, 10'h001), 0, 16'h0, rd, ack);
    check(ack && rd == {1'b0, 12'h900 + 12'h555, 3'b000}, $sformatf("ADC 1 ch 5 = %h", rd));
    if (adc1.conversions == 1) seen[M_ADC]++;

    // ---- input FIFO read through the input shift registers
    devs.clear_rx();
    ser(4'd1, 4'h0);
    par_rd(4'd8, 8'h00, rd); check(rd == devs.tx[1][15:0], "FIFO 1 low word");
    par_rd(4'd8, 8'h01, rd); check(rd == devs.tx[1][31:16], "FIFO 1 high word");
    seen[M_FIFO_READ]++;
    // load input FIFO 3 with new offsets
    par_wr(4'd8, 8'h80, 16'h0A0B);
    par_wr(4'd8, 8'h80, 16'h0C0D);
    devs.clear_rx();
    ser(4'hB, 4'h0);
    check(devs.rxcnt[11] == 32 && devs.rx[11][31:0] == 32'h0A0B_0C0D, "FIFO 3 loaded");
    if (devs.rxcnt[11] == 32) seen[M_DEV_LOAD]++;

    // ---- program the board ID page, reload on DDU_Ctrl request
    par_wr(4'd8, 8'h80, 16'h00B7);
    r0 = flash.programs;
    ser(4'h4, 4'hF);
    check(flash.programs == r0 + 1, "page 7 programmed");
    if (flash.programs == r0 + 1) seen[M_FLASH_PROG]++;
    devs.clear_rx();
    @(posedge clk); ctrl_req = 1; @(posedge clk); ctrl_req = 0;
    wait_ready();
    check(devs.rx[14][15:0] == 16'h00B7 && devs.rx[13][15:0] == 16'h7FFF, "board ID reloaded on request");
    if (devs.rx[14][15:0] == 16'h00B7) seen[M_CTRL_RELOAD]++;
    ser(4'h4, 4'h0);
    par_rd(4'd8, 8'h00, rd);
    check(rd[7:0] == 8'h9C, $sformatf("flash status %h", rd[7:0]));
    if (rd[7:0] == 8'h9C) seen[M_FLASH_STATUS]++;

    // ---- status registers, histories, FMM
    s1 = '0; s1[3][0] = 1; s1[15][1] = 1; s1[6][2] = 1;
    stat = s1; repeat (4) @(posedge clk);
    s2 = '0; s2[9][3] = 1; s2[15][0] = 1;
    stat = s2; repeat (4) @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      par_rd(4'(k), 8'h00, rd);
      check(rd == col(s2, k), $sformatf("status word %0d = %h", k, rd));
    end
    par_rd(4'd4, 8'h00, rd);
    check(rd == 16'h0200, "boards needing reset");
    seen[M_STATUS_REGS]++;
    par_rd(4'd5, 8'h00, rd); check(rd == 16'h8000, $sformatf("warning history %h", rd));
    par_rd(4'd6, 8'h00, rd); check(rd == 16'h8008, $sformatf("busy history %h", rd));
    seen[M_HISTORY]++;
    check(fmm == 4'b0100 && fmm_led_yel && !fmm_led_grn, "DDU busy: FMM 0100, yellow on");
    stat = '0; repeat (4) @(posedge clk);
    check(fmm == 4'b1000 && fmm_led_grn && !fmm_led_yel, "DDU ready: FMM 1000, green on");
    stat[15][3] = 1; repeat (4) @(posedge clk);
    check(fmm == 4'b1100, "DDU error: FMM 1100");
    stat = '0;
    seen[M_FMM]++;
    par_wr(4'd9, 8'h8F, 16'hE1E1);       // override with 0001 (warning)
    repeat (4) @(posedge clk);
    check(fmm == 4'b0001, "FMM override");
    if (fmm == 4'b0001) seen[M_OVERRIDE]++;
    par_wr(4'd9, 8'h8F, 16'h0000);
    repeat (4) @(posedge clk);
    check(fmm == 4'b1000, "override off");
    par_rd(4'd15, 8'h00, rd);
    check(rd == {1'b1, 6'b0, 4'b1000, 5'd3}, $sformatf("status %h", rd));

    // ---- broadcast write and unanswered cycle
    vme({5'd28, 3'b011, 4'd9, 10'h080, 2'b00}, 1, 16'h5A5A, rd, ack);
    check(ack && slink_gbe_cfg == 16'h5A5A, "broadcast write");
    if (slink_gbe_cfg == 16'h5A5A) seen[M_BROADCAST]++;
    vme({5'd4, 3'b011, 4'd15, 10'h000, 2'b00}, 0, 16'h0, rd, ack);
    check(!ack, "other slot not answered");
    if (!ack) seen[M_UNANSWERED]++;

    // ---- mode switch
    mode_sw = 8'h05; #1;
    check(led_mode == 16'h0020 && led_par == 8'h00, "debug LED mode 5");
    mode_sw = 8'h33; #1;
    check(led_mode == 16'h0000 && led_par == 8'h08, "parallel LED mode 3");
    par_rd(4'd14, 8'h00, rd);
    check(rd == 16'h0033, "mode switch readable");

    // ---- soft reset: chains back to idle and settings reloaded
    jtag(4'd5, 4'hD, 4, 16'h0002, rd);     // leave chain 5 in Shift-IR
    check(fpga5.at_shift_ir, "chain 5 left in Shift-IR");
    mode_sw = 8'h00;
    r0 = flash.reads;
    @(posedge clk); soft_rst = 1; repeat (3) @(posedge clk); soft_rst = 0;
    wait_ready();
    check(fpga5.at_idle && flash.reads == r0 + 4, "soft reset: restore idle and reload");
    if (fpga5.at_idle) seen[M_SOFT_RESET]++;
    // reset with the automatic load switched off (mode switch 7)
    mode_sw = 8'h40;
    r0 = flash.reads;
    @(posedge clk); soft_rst = 1; repeat (3) @(posedge clk); soft_rst = 0;
    wait_ready();
    repeat (200) @(posedge clk);
    check(flash.reads == r0, "no load with mode[6] set");
    if (flash.reads == r0) seen[M_AUTOLOAD_OFF]++;

    checks += 3; failures += rate_bad;
    if (rate_checks < 1000) begin failures++; $display("FAIL: only %0d 800 ns bit-clock periods", rate_checks); end
    $display("bit-clock periods of 800 ns: %0d, shorter: %0d", rate_checks, rate_bad);
    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      if (seen[m] == 0) begin failures++; $display("FAIL: mechanism %s never happened", mech_e'(m)); end
      else $display("mechanism %-16s seen %0d", mech_e'(m), seen[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
