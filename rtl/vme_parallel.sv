// vme_parallel: the VME-Parallel registers, all 16 bits wide.
//
// Devices (address bits [15:12]); cmd is address bits [9:2], and a command
// of 0x80 or more is a write:
//   0  boards that are busy (not ready)     bit 15 = DDU, bits 14:0 = DMB 14:0
//   1  boards with warning / near full       same bit order
//   2  boards that lost sync
//   3  boards in error
//   4  boards that need a reset (lost sync or error)
//   5  warning history: every board that has shown warning since reset
//   6  busy history: every board that has been busy since reset
//   8  input shift registers: cmd 0-2 read word 0-2, cmd 0x80 writes word 0
//      (the chain moves up one word first)
//   9  cmd 0x00/0x80: S-Link wait enable / GbE prescale register;
//      cmd 0x0F/0x8F: FMM test register
//   14 bits 7:0 mode switch
//   15 status: bit 15 VME ready, bits 8:5 FMM code, bits 4:0 slot address
// Other devices and commands read as 0 and ignore writes.
//
// The FMM test register overrides the FMM output when its contents have the
// checking format (bits 7:4 the inverse of bits 3:0, bits 15:8 equal to bits
// 7:0); bits 3:0 are then the code sent. The board statuses are registered
// once on entry. The device list follows the board; the test register's
// location, the override rule, the history clearing (only by reset) and the
// status-word layout are this design's choices.
//
// Timing: dtack rises the cycle after strobe and stays until strobe falls;
// writes take effect in that cycle.
// chain_wdata is the VME write data itself (the chain stores it), so it
// follows req.wdata directly.
module vme_parallel
  import vme5_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  vme_req_t         req,
  output vme_rsp_t         rsp,
  input  logic [15:0][3:0] stat,        // [board][STATx], board 15 = DDU
  input  logic [7:0]       mode,
  input  logic [4:0]       ga,
  input  logic [3:0]       fmm,
  input  logic             vme_rdy,
  input  logic [47:0]      chain,
  output logic             chain_wr,
  output logic [15:0]      chain_wdata,
  output logic [15:0]      slink_gbe_cfg,
  output logic             fmm_override_en,
  output logic [3:0]       fmm_override_code
);
  logic [15:0][3:0] stat_q;
  logic [15:0]      busy_v, warn_v, lsync_v, err_v;
  logic [15:0]      warn_hist, busy_hist;
  logic [15:0]      fmm_test;
  logic             ack;
  logic [15:0]      rdata_d;
  logic [7:0]       cmd;

  assign cmd = req.cmd[7:0];

  always_comb begin
    for (int b = 0; b < 16; b++) begin
      busy_v[b]  = stat_q[b][STAT_BUSY];
      warn_v[b]  = stat_q[b][STAT_WARN];
      lsync_v[b] = stat_q[b][STAT_LSYNC];
      err_v[b]   = stat_q[b][STAT_ERROR];
    end
  end

  always_comb begin
    unique case (req.dev)
      4'd0:  rdata_d = busy_v;
      4'd1:  rdata_d = warn_v;
      4'd2:  rdata_d = lsync_v;
      4'd3:  rdata_d = err_v;
      4'd4:  rdata_d = lsync_v | err_v;
      4'd5:  rdata_d = warn_hist;
      4'd6:  rdata_d = busy_hist;
      4'd8: begin
        unique case (cmd)
          8'h00:   rdata_d = chain[15:0];
          8'h01:   rdata_d = chain[31:16];
          8'h02:   rdata_d = chain[47:32];
          default: rdata_d = '0;
        endcase
      end
      4'd9: begin
        unique case (cmd)
          8'h00:   rdata_d = slink_gbe_cfg;
          8'h0F:   rdata_d = fmm_test;
          default: rdata_d = '0;
        endcase
      end
      4'd14:   rdata_d = {8'h00, mode};
      4'd15:   rdata_d = {vme_rdy, 6'b000000, fmm, ga};
      default: rdata_d = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      stat_q        <= '0;
      warn_hist     <= '0;
      busy_hist     <= '0;
      fmm_test      <= '0;
      slink_gbe_cfg <= '0;
      ack           <= 1'b0;
      rsp.rdata     <= '0;
    end else begin
      stat_q    <= stat;
      warn_hist <= warn_hist | warn_v;
      busy_hist <= busy_hist | busy_v;
      ack       <= req.strobe;
      if (req.strobe && !ack) begin
        rsp.rdata <= rdata_d;
        if (req.dev == 4'd9 && cmd == 8'h80) slink_gbe_cfg <= req.wdata;
        if (req.dev == 4'd9 && cmd == 8'h8F) fmm_test      <= req.wdata;
      end
    end
  end

  assign rsp.dtack   = ack && req.strobe;
  assign chain_wr    = req.strobe && !ack && req.dev == 4'd8 && cmd == 8'h80;
  assign chain_wdata = req.wdata;

  assign fmm_override_en   = (fmm_test[7:4] == ~fmm_test[3:0]) && (fmm_test[15:8] == fmm_test[7:0]);
  assign fmm_override_code = fmm_test[3:0];
endmodule
