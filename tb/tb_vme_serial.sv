// tb_vme_serial: the VME-Serial controller with a flash model and serial
// device models. Checks the automatic load after reset (four flash pages
// into the right devices with the right widths), the reload on a DDU_Ctrl
// request, input FIFO reads into the chain, device loads from the chain
// (single device, GbE 34 bits, all four input FIFOs), flash page program
// followed by a reload of the programmed data, the flash status read, the
// auto-load disable, and the bit-time of a transfer.
module tb_vme_serial;
  import vme5_pkg::*;
  localparam int DIV = 4;

  logic clk = 0, rst = 1, slowclk, slow_tick;
  vme_req_t req = '0;
  vme_rsp_t rsp;
  logic chain_wr = 0;
  logic [15:0] chain_wdata = '0;
  logic [47:0] chain;
  logic auto_dis = 0, ctrl_req = 0;
  logic ser_clk, ser_do, fl_cs_n, fl_sck, fl_si, fl_so, busy, auto_busy;
  logic [15:0] ser_en;
  logic [3:0] ser_di;
  int checks = 0, failures = 0;

  slow_clock_gen #(.DIV(DIV)) u_slow (.clk, .rst, .slowclk, .slow_tick);
  vme_serial dut (.*);
  tb_flash_model   flash (.cs_n(fl_cs_n), .sck(fl_sck), .si(fl_si), .so(fl_so));
  tb_serdev_model  devs  (.ser_clk, .ser_do, .ser_en, .ser_di);

  always #5 clk = ~clk;
  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic set_page(input int p, input logic [47:0] v, input int n);
    for (int k = 0; k < n; k++) flash.page[p][k] = v[n - 1 - k];
  endtask
  function automatic logic [47:0] get_page(input int p, input int n);
    get_page = '0;
    for (int k = 0; k < n; k++) get_page[n - 1 - k] = flash.page[p][k];
  endfunction

  task automatic op(input logic [3:0] dev, input logic [3:0] cmd, output int cycles);
    @(posedge clk);
    req.strobe <= 1'b1; req.write <= 1'b1; req.dev <= dev; req.cmd <= {6'h0, cmd}; req.wdata <= '0;
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (!rsp.dtack && cycles < 200000);
    req.strobe <= 1'b0;
    @(posedge clk);
    while (rsp.dtack) @(posedge clk);
  endtask

  task automatic wr_chain(input logic [15:0] w);
    @(posedge clk); chain_wr <= 1; chain_wdata <= w;
    @(posedge clk); chain_wr <= 0;
    @(posedge clk);
  endtask

  task automatic wait_auto();
    int n = 0;
    @(posedge clk);
    while ((auto_busy || busy) && n < 500000) begin @(posedge clk); n++; end
  endtask

  int cy, r0;
  initial begin
    #1;
    set_page(1, 48'h0000_0000_C0DE, 16);
    set_page(7, 48'h0000_0000_0B1D, 16);
    set_page(4, 48'h0000_DD12_3456, 32);
    set_page(5, 48'h0002_6BCD_EF01, 34);
    repeat (4) @(posedge clk);
    check(ser_en[12] == 1'b1, "GbE FIFO enable high during reset");
    rst <= 0;
    wait_auto();
    check(flash.reads == 4, $sformatf("auto load read %0d pages", flash.reads));
    check(devs.rxcnt[13] == 16 && devs.rx[13][15:0] == 16'hC0DE, $sformatf("kill mask %h (%0d bits)", devs.rx[13][15:0], devs.rxcnt[13]));
    check(devs.rxcnt[14] == 16 && devs.rx[14][15:0] == 16'h0B1D, $sformatf("board id %h", devs.rx[14][15:0]));
    for (int d = 8; d < 12; d++)
      check(devs.rxcnt[d] == 32 && devs.rx[d][31:0] == 32'hDD12_3456, $sformatf("DDR FIFO %0d got %h", d, devs.rx[d][31:0]));
    check(devs.rxcnt[12] == 34 && devs.rx[12][33:0] == 34'h2_6BCD_EF01, $sformatf("GbE got %h", devs.rx[12][33:0]));

    // DDU_Ctrl request: reload kill mask and board ID only
    devs.clear_rx();
    @(posedge clk); ctrl_req <= 1; @(posedge clk); ctrl_req <= 0;
    wait_auto();
    check(flash.reads == 6, "request reads two pages");
    check(devs.rx[13][15:0] == 16'hC0DE && devs.rx[14][15:0] == 16'h0B1D && devs.rxcnt[8] == 0,
          "request reloads kill mask and board ID only");

    // read input FIFO 2 into the chain
    devs.clear_rx();
    op(4'd2, 4'h0, cy);
    check(chain[31:0] == devs.tx[2], $sformatf("FIFO 2 read %h", chain[31:0]));
    check(cy >= 32 * 2 * DIV && cy <= 33 * 2 * DIV + 8, $sformatf("32-bit read took %0d clocks", cy));

    // load the GbE FIFO with 34 bits from the chain
    wr_chain(16'h0003); wr_chain(16'hA5A5); wr_chain(16'h5A5A);
    check(chain[33:0] == 34'h3_A5A5_5A5A, $sformatf("chain written by three words %h", chain));
    devs.clear_rx();
    op(4'hC, 4'h0, cy);
    check(devs.rxcnt[12] == 34 && devs.rx[12][33:0] == 34'h3_A5A5_5A5A, $sformatf("GbE load %h", devs.rx[12][33:0]));

    // load all four DDR FIFOs
    wr_chain(16'h1357); wr_chain(16'h9BDF);
    devs.clear_rx();
    op(4'hF, 4'h0, cy);
    for (int d = 8; d < 12; d++)
      check(devs.rx[d][31:0] == 32'h1357_9BDF && devs.rxcnt[d] == 32, "all-FIFO load");
    check(devs.rxcnt[12] == 0, "GbE not loaded by device F");

    // program flash page 1 (kill mask), then reload it
    wr_chain(16'hFACE);
    r0 = flash.programs;
    op(4'h4, 4'h9, cy);
    check(flash.programs == r0 + 1 && get_page(1, 16) == 48'hFACE, $sformatf("page 1 programmed %h", get_page(1, 16)));
    wr_chain(16'h0001); wr_chain(16'h2345); wr_chain(16'h6789);
    op(4'h4, 4'hD, cy);
    check(get_page(5, 34) == 48'h1_2345_6789, $sformatf("page 5 programmed %h", get_page(5, 34)));
    devs.clear_rx();
    @(posedge clk); ctrl_req <= 1; @(posedge clk); ctrl_req <= 0;
    wait_auto();
    check(devs.rx[13][15:0] == 16'hFACE, "programmed kill mask reloads");

    // flash status
    op(4'h4, 4'h0, cy);
    check(chain[7:0] == 8'h9C && flash.status_reads == 1, $sformatf("flash status %h", chain[7:0]));
    // page read is not a VME command
    r0 = flash.reads;
    op(4'h4, 4'h4, cy);
    check(flash.reads == r0 && cy < 8, "page read by VME is refused");

    // reset with the auto load disabled
    auto_dis = 1;
    r0 = flash.reads;
    @(posedge clk); rst <= 1; repeat (3) @(posedge clk); rst <= 0;
    wait_auto();
    repeat (100) @(posedge clk);
    check(flash.reads == r0, "auto load disabled by the mode switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
