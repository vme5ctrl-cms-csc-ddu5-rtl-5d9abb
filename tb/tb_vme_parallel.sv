// tb_vme_parallel: reads and writes every VME-Parallel register. Board
// statuses are driven at random and the busy/warning/lost-sync/error words,
// the reset summary and the sticky histories are checked against a model;
// the input shift chain write strobe, the S-Link/GbE register, the FMM test
// register and its override rule, the mode and status words are checked.
module tb_vme_parallel;
  import vme5_pkg::*;

  logic clk = 0, rst = 1;
  vme_req_t req = '0;
  vme_rsp_t rsp;
  logic [15:0][3:0] stat = '0;
  logic [7:0] mode = 8'hA7;
  logic [4:0] ga = 5'd11;
  logic [3:0] fmm = 4'b1000;
  logic vme_rdy = 1;
  logic [47:0] chain = 48'h3333_2222_1111;
  logic chain_wr;
  logic [15:0] chain_wdata, slink_gbe_cfg;
  logic fmm_override_en;
  logic [3:0] fmm_override_code;
  int checks = 0, failures = 0, chain_writes = 0;
  logic [15:0] last_chain_data;

  vme_parallel dut (.*);

  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures); $finish;
  end
  always @(posedge clk) if (chain_wr) begin chain_writes++; last_chain_data = chain_wdata; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic op(input logic [3:0] dev, input logic [7:0] cmd, input logic [15:0] wdata,
                    output logic [15:0] rdata);
    int n = 0;
    @(posedge clk);
    req.strobe <= 1'b1; req.write <= cmd[7]; req.dev <= dev; req.cmd <= {2'b00, cmd}; req.wdata <= wdata;
    do begin @(posedge clk); n++; end while (!rsp.dtack && n < 100);
    rdata = rsp.rdata;
    req.strobe <= 1'b0;
    @(posedge clk);
    while (rsp.dtack) @(posedge clk);
  endtask

  function automatic logic [15:0] col(input logic [15:0][3:0] s, input int k);
    for (int b = 0; b < 16; b++) col[b] = s[b][k];
  endfunction

  logic [15:0] rd, whist, bhist;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    whist = '0; bhist = '0;
    for (int i = 0; i < 30; i++) begin
      stat = {$urandom, $urandom};
      if (i % 3 == 0) stat = '0;
      repeat (3) @(posedge clk);
      whist |= col(stat, 1); bhist |= col(stat, 0);
      for (int k = 0; k < 4; k++) begin
        op(4'(k), 8'h00, 16'h0, rd);
        check(rd == col(stat, k), $sformatf("dev %0d = %h, expected %h", k, rd, col(stat, k)));
      end
      op(4'd4, 8'h00, 16'h0, rd);
      check(rd == (col(stat, 2) | col(stat, 3)), "reset summary");
      op(4'd5, 8'h00, 16'h0, rd);
      check(rd == whist, $sformatf("warning history %h vs %h", rd, whist));
      op(4'd6, 8'h00, 16'h0, rd);
      check(rd == bhist, $sformatf("busy history %h vs %h", rd, bhist));
    end
    // input shift registers
    for (int w = 0; w < 3; w++) begin
      op(4'd8, 8'(w), 16'h0, rd);
      check(rd == chain[16*w +: 16], $sformatf("input register %0d = %h", w, rd));
    end
    op(4'd8, 8'h80, 16'hBEEF, rd);
    check(chain_writes == 1 && last_chain_data == 16'hBEEF, "input register 0 write strobe");
    // S-Link / GbE register
    op(4'd9, 8'h80, 16'h1234, rd);
    op(4'd9, 8'h00, 16'h0, rd);
    check(rd == 16'h1234 && slink_gbe_cfg == 16'h1234, "S-Link/GbE register");
    // FMM test register: valid format enables the override
    check(!fmm_override_en, "no override after reset");
    op(4'd9, 8'h8F, 16'h3C3C, rd);   // 3 = ~C: valid
    check(fmm_override_en && fmm_override_code == 4'hC, "override with valid format");
    op(4'd9, 8'h0F, 16'h0, rd);
    check(rd == 16'h3C3C, "FMM test register read");
    op(4'd9, 8'h8F, 16'h3C3D, rd);   // byte 1 differs: no override
    check(!fmm_override_en, "no override with invalid format");
    op(4'd14, 8'h00, 16'h0, rd);
    check(rd == 16'h00A7, "mode switch word");
    op(4'd15, 8'h00, 16'h0, rd);
    check(rd == {1'b1, 6'b0, 4'b1000, 5'd11}, $sformatf("status word %h", rd));
    op(4'd7, 8'h00, 16'h0, rd);
    check(rd == 16'h0, "unused device reads 0");
    // writes to read-only devices are ignored
    op(4'd0, 8'h80, 16'hFFFF, rd);
    check(chain_writes == 1 && slink_gbe_cfg == 16'h1234, "read-only device write ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
