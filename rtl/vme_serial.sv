// vme_serial: VME-Serial controller. Moves data between the 48-bit input
// shift register chain, the board's serial devices (input FIFOs, GbE output
// FIFO, the DDU control FPGA) and the serial flash memory that keeps the
// board's settings, and reloads those settings from flash after a reset.
//
// The chain is three 16-bit registers, written and read over VME-Parallel
// device 8 (chain_wr shifts the chain up by 16 bits and puts chain_wdata in
// the low word). A VME-Serial cycle then shifts N bits: out of the chain
// from bit N-1 (MSB first, the chain shifting up) or into it at bit 0, so
// that the N bits read from a device end up in chain[N-1:0].
//
// VME-Serial devices (address bits [15:12]) and flash commands ([5:2]):
//   0-3  read input FIFO 0-3, 32 bits into the chain
//   4    flash: cmd 0 read the status register (opcode 0xD7, 8 bits back);
//        cmd 9/C/D/F program page 1/4/5/7 with 16/32/34/16 bits of the chain
//        (32-bit opcode: 0x82 and a 24-bit page address)
//   8-B  load input FIFO 0-3, 32 bits;  F  load all four at once
//   C    load the GbE output FIFO, 34 bits
//   D    load the DDU control FPGA kill-channel mask, 16 bits
//   E    load the DDU control FPGA board ID, 16 bits
// Other devices and flash commands finish the cycle without doing anything;
// flash commands 1, 4, 5 and 7 (page read) are reserved for the automatic
// load. Whether the VME cycle is a read or a write does not matter.
//
// Automatic load: after reset, unless auto_dis is set, four steps copy a
// flash page straight into a device (64-bit read opcode 0xD2, page address,
// 32 don't-care bits, then the data): page 1 to device D, page 7 to device
// E, page 4 to all four input FIFOs, page 5 to device C. A pulse on ctrl_req
// (a request from the DDU control FPGA) repeats the first two steps. The
// step pointer is a one-hot register that the reset sets to step 0.
//
// Serial timing: each bit takes two slow_tick pulses; data changes while the
// serial clock goes low and is sampled when it goes high (SPI mode 0).
// fl_cs_n stays low for the whole flash transfer; ser_en of the target
// devices is high for the data bits only and ser_clk runs only then. The
// GbE FIFO enable (ser_en[12]) is held high during reset, as the board does.
// dtack rises when the transfer has ended and stays until strobe falls.
//
// The device and command codes, data widths and load sequence follow the
// board. The chain order, bit order, the flash read/program opcodes and
// page-address format (AT45DB family: 4 reserved bits, 11 page bits, 9
// byte bits) are this design's choices.
module vme_serial
  import vme5_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        slow_tick,
  input  vme_req_t    req,
  output vme_rsp_t    rsp,
  // input shift register chain, VME-Parallel side
  input  logic        chain_wr,
  input  logic [15:0] chain_wdata,
  output logic [47:0] chain,
  // automatic load
  input  logic        auto_dis,
  input  logic        ctrl_req,
  // serial devices
  output logic        ser_clk,
  output logic        ser_do,
  output logic [15:0] ser_en,
  input  logic [3:0]  ser_di,
  // serial flash
  output logic        fl_cs_n,
  output logic        fl_sck,
  output logic        fl_si,
  input  logic        fl_so,
  output logic        busy,
  output logic        auto_busy
);
  typedef enum logic [2:0] {S_IDLE, S_OP, S_DAT, S_END, S_ACK} state_e;
  typedef enum logic [1:0] {SRC_CHAIN, SRC_FLASH, SRC_DEV} src_e;

  state_e      state;
  src_e        src_q;
  logic        to_chain_q;    // data phase writes into the chain
  logic        flash_q;       // flash selected
  logic        vme_q;         // job started by a VME cycle
  logic [15:0] devmask_q;     // devices enabled in the data phase
  logic [1:0]  rdev_q;        // input FIFO being read
  logic [63:0] op_q;
  logic [6:0]  op_len_q;
  logic [5:0]  dat_len_q;
  logic [6:0]  cnt;
  logic        phase;
  logic        sclk_r, out_r;
  logic        sclk_dat;      // serial clock of a data bit

  // Automatic load step pointer and pending flags.
  logic [3:0]  step;
  logic        auto_pend, ctrl_pend, ctrl_run, ctrl_step;
  logic        auto_step_done;

  sr4ce3 u_step (.c(clk), .clr(rst), .ce(auto_step_done), .sli(1'b0), .q(step));

  function automatic logic [23:0] page_addr(input logic [2:0] page);
    return {4'b0000, 8'h00, page, 9'h000};
  endfunction

  // Job for an automatic-load step.
  logic [2:0]  sld_page;
  logic [15:0] sld_mask;
  logic [5:0]  sld_len;
  logic [1:0]  sld_idx;
  always_comb begin
    sld_idx = ctrl_run ? {1'b0, ctrl_step}
                       : (step[0] ? 2'd0 : step[1] ? 2'd1 : step[2] ? 2'd2 : 2'd3);
    unique case (sld_idx)
      2'd0: begin sld_page = 3'd1; sld_mask = 16'h2000; sld_len = 6'd16; end
      2'd1: begin sld_page = 3'd7; sld_mask = 16'h4000; sld_len = 6'd16; end
      2'd2: begin sld_page = 3'd4; sld_mask = 16'h0F00; sld_len = 6'd32; end
      default: begin sld_page = 3'd5; sld_mask = 16'h1000; sld_len = 6'd34; end
    endcase
  end

  // Data width of a VME-Serial device or flash program command.
  function automatic logic [5:0] dev_len(input logic [3:0] d);
    unique case (d)
      4'hC:             return 6'd34;
      4'hD, 4'hE:       return 6'd16;
      default:          return 6'd32;
    endcase
  endfunction

  logic       last_bit;
  logic [6:0] cur_len;
  logic       in_bit;
  assign cur_len  = (state == S_OP) ? op_len_q : {1'b0, dat_len_q};
  assign last_bit = (cnt == cur_len - 7'd1);
  always_comb begin
    unique case (src_q)
      SRC_DEV:   in_bit = ser_di[rdev_q];
      default:   in_bit = fl_so;
    endcase
  end

  assign auto_step_done = (state == S_END) && slow_tick && !vme_q && !ctrl_run;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      src_q      <= SRC_CHAIN;
      to_chain_q <= 1'b0;
      flash_q    <= 1'b0;
      vme_q      <= 1'b0;
      devmask_q  <= '0;
      rdev_q     <= '0;
      op_q       <= '0;
      op_len_q   <= '0;
      dat_len_q  <= '0;
      cnt        <= '0;
      phase      <= 1'b0;
      sclk_r     <= 1'b0;
      sclk_dat   <= 1'b0;
      out_r      <= 1'b0;
      chain      <= '0;
      auto_pend  <= 1'b1;
      ctrl_pend  <= 1'b0;
      ctrl_run   <= 1'b0;
      ctrl_step  <= 1'b0;
    end else begin
      if (ctrl_req) ctrl_pend <= 1'b1;
      if (chain_wr && state == S_IDLE) chain <= {chain[31:0], chain_wdata};

      unique case (state)
        S_IDLE: begin
          cnt   <= '0;
          phase <= 1'b0;
          if (auto_pend && auto_dis) begin
            auto_pend <= 1'b0;
          end else if (ctrl_pend && !auto_pend && !ctrl_run) begin
            ctrl_run  <= 1'b1;
            ctrl_step <= 1'b0;
            ctrl_pend <= 1'b0;
          end else if (auto_pend || ctrl_run) begin
            vme_q      <= 1'b0;
            flash_q    <= 1'b1;
            src_q      <= SRC_FLASH;
            to_chain_q <= 1'b0;
            op_q       <= {FL_OP_READ, page_addr(sld_page), 32'h0};
            op_len_q   <= 7'd64;
            dat_len_q  <= sld_len;
            devmask_q  <= sld_mask;
            state      <= S_OP;
          end else if (req.strobe) begin
            vme_q <= 1'b1;
            if (req.dev <= 4'h3) begin
              flash_q    <= 1'b0;
              src_q      <= SRC_DEV;
              rdev_q     <= req.dev[1:0];
              to_chain_q <= 1'b1;
              dat_len_q  <= 6'd32;
              devmask_q  <= 16'h0001 << req.dev;
              state      <= S_DAT;
            end else if (req.dev >= 4'h8) begin
              flash_q    <= 1'b0;
              src_q      <= SRC_CHAIN;
              to_chain_q <= 1'b0;
              dat_len_q  <= dev_len(req.dev);
              devmask_q  <= (req.dev == 4'hF) ? 16'h0F00 : (16'h0001 << req.dev);
              state      <= S_DAT;
            end else if (req.dev == 4'h4 && req.cmd[3:0] == 4'h0) begin
              flash_q    <= 1'b1;
              src_q      <= SRC_FLASH;
              to_chain_q <= 1'b1;
              op_q       <= {FL_OP_STATUS, 56'h0};
              op_len_q   <= 7'd8;
              dat_len_q  <= 6'd8;
              devmask_q  <= '0;
              state      <= S_OP;
            end else if (req.dev == 4'h4 && req.cmd[3:0] inside {4'h9, 4'hC, 4'hD, 4'hF}) begin
              flash_q    <= 1'b1;
              src_q      <= SRC_CHAIN;
              to_chain_q <= 1'b0;
              op_q       <= {FL_OP_PROGRAM, page_addr(req.cmd[2:0]), 32'h0};
              op_len_q   <= 7'd32;
              unique case (req.cmd[3:0])
                4'hC:    dat_len_q <= 6'd32;
                4'hD:    dat_len_q <= 6'd34;
                default: dat_len_q <= 6'd16;
              endcase
              devmask_q  <= '0;
              state      <= S_OP;
            end else begin
              state <= S_ACK;
            end
          end
        end

        S_OP, S_DAT: begin
          if (slow_tick) begin
            if (!phase) begin
              sclk_r   <= 1'b0;
              sclk_dat <= 1'b0;
              if (state == S_OP) out_r <= op_q[63];
              else               out_r <= (src_q == SRC_CHAIN) && chain[dat_len_q - 6'd1];
              phase  <= 1'b1;
            end else begin
              sclk_r   <= 1'b1;
              sclk_dat <= (state == S_DAT);
              phase    <= 1'b0;
              if (state == S_OP) begin
                op_q <= {op_q[62:0], 1'b0};
              end else if (to_chain_q) begin
                chain <= {chain[46:0], in_bit};
              end else if (src_q == SRC_CHAIN) begin
                chain <= {chain[46:0], 1'b0};
              end
              if (last_bit) begin
                cnt   <= '0;
                state <= (state == S_OP) ? S_DAT : S_END;
              end else begin
                cnt <= cnt + 7'd1;
              end
            end
          end
        end

        S_END: begin
          if (slow_tick) begin
            sclk_r   <= 1'b0;
            sclk_dat <= 1'b0;
            out_r    <= 1'b0;
            if (vme_q) begin
              state <= S_ACK;
            end else begin
              state <= S_IDLE;
              if (ctrl_run) begin
                if (ctrl_step) ctrl_run  <= 1'b0;
                else           ctrl_step <= 1'b1;
              end
              if (!ctrl_run && step[3]) auto_pend <= 1'b0;
            end
          end
        end

        S_ACK: begin
          if (!req.strobe) state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  logic data_phase;
  assign data_phase = (state == S_DAT) || (state == S_END);

  always_comb begin
    ser_en = '0;
    if (rst) ser_en[12] = 1'b1;
    else if (data_phase && !to_chain_q) ser_en = devmask_q;
    else if (data_phase && src_q == SRC_DEV) ser_en = devmask_q;
  end

  assign ser_clk  = sclk_dat && (devmask_q != '0);
  assign ser_do   = (src_q == SRC_FLASH) ? fl_so : out_r;
  assign fl_cs_n  = !(flash_q && (state == S_OP || data_phase));
  assign fl_sck   = sclk_r && flash_q;
  assign fl_si    = out_r && flash_q;
  assign busy     = (state != S_IDLE);
  assign auto_busy = auto_pend || ctrl_pend || ctrl_run || (busy && !vme_q);

  assign rsp.dtack = (state == S_ACK);
  assign rsp.rdata = chain[15:0];
endmodule
