// serial_adc_ctrl: VME access to the board's MAX1270/MAX1271 serial ADCs,
// which sit at VME-JTAG device 9 although their interface is not JTAG.
//
// Command 0 (address bits [5:2]) sends wdata[7:0], the ADC control byte
// (start bit, channel, range, power-down/clock mode), MSB first, and leaves
// the ADC's chip select low while it converts. Command 1 then clocks 16 bits
// out of the ADC, MSB first, returns them as rdata and releases the chip
// select; the 12-bit result is in the bits where the ADC's data sheet puts
// it. Commands 3, 8 and 9 (a second converter type and a chip-select
// register, both unused on the board) and all others finish the cycle
// without doing anything. Address bits [11:8] (cmd[9:6]) pick the ADC for
// command 0; this and the 16-clock read are this design's choices, and the
// host is expected to use the ADC's internal-clock mode, so that the pause
// between the two VME cycles does not matter.
//
// The bit clock is half the slow clock (1.25 MHz on the board): two
// slow_tick pulses per bit, DIN changes while SCLK goes low, DOUT is sampled
// when it goes high. The sequencer is a one-hot register (idle, shift, end,
// acknowledge); dtack rises after the last bit and stays until strobe falls.
module serial_adc_ctrl
  import vme5_pkg::*;
#(
  parameter int unsigned NUM_ADC = 2
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               slow_tick,
  input  vme_req_t           req,
  output vme_rsp_t           rsp,
  output logic [NUM_ADC-1:0] adc_cs_n,
  output logic               adc_sclk,
  output logic               adc_din,
  input  logic [NUM_ADC-1:0] adc_dout
);
  localparam int unsigned SW = (NUM_ADC > 1) ? $clog2(NUM_ADC) : 1;

  logic [3:0]    seq;          // 0001 idle, 0010 shift, 0100 end, 1000 ack
  logic          seq_ce, seq_r;
  logic [SW-1:0] sel_q;
  logic          cs_active;
  logic          read_q;
  logic [15:0]   sh_q;
  logic [15:0]   data_q;
  logic [4:0]    cnt;
  logic [4:0]    nbits;
  logic          phase;
  logic          sclk_r, din_r;
  logic          start_shift;
  logic          noop_q;       // command without ADC activity

  sr4re u_seq (.c(clk), .r(seq_r), .ce(seq_ce), .sli(1'b0), .q(seq));

  assign nbits = read_q ? 5'd16 : 5'd8;
  assign start_shift = seq[0] && req.strobe && (req.cmd[3:0] == 4'h0 || req.cmd[3:0] == 4'h1);

  // Move to the next phase: on a new cycle, after the last bit, and on the
  // end tick. A command that does nothing walks through the phases without
  // waiting.
  always_comb begin
    seq_ce = 1'b0;
    if (seq[0] && req.strobe) seq_ce = 1'b1;
    if (seq[1] && (noop_q || (slow_tick && phase && cnt == nbits - 5'd1))) seq_ce = 1'b1;
    if (seq[2] && (noop_q || slow_tick)) seq_ce = 1'b1;
  end
  assign seq_r = rst || (seq[3] && !req.strobe) || (seq == 4'b0000);

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_q     <= '0;
      cs_active <= 1'b0;
      read_q    <= 1'b0;
      noop_q    <= 1'b0;
      sh_q      <= '0;
      data_q    <= '0;
      cnt       <= '0;
      phase     <= 1'b0;
      sclk_r    <= 1'b0;
      din_r     <= 1'b0;
    end else begin
      if (seq[0]) begin
        cnt   <= '0;
        phase <= 1'b0;
        noop_q <= req.strobe && !start_shift;
        if (start_shift) begin
          read_q <= req.cmd[0];
          if (!req.cmd[0]) begin
            sel_q     <= SW'(req.cmd[9:6]);
            cs_active <= 1'b1;
            sh_q      <= {req.wdata[7:0], 8'h00};
          end else begin
            sh_q      <= '0;
          end
        end
      end
      if (seq[1] && slow_tick && !noop_q) begin
        if (!phase) begin
          sclk_r <= 1'b0;
          din_r  <= read_q ? 1'b0 : sh_q[15];
          phase  <= 1'b1;
        end else begin
          sclk_r <= 1'b1;
          phase  <= 1'b0;
          sh_q   <= {sh_q[14:0], adc_dout[sel_q]};
          cnt    <= cnt + 5'd1;
        end
      end
      if (seq[2] && slow_tick && !noop_q) begin
        sclk_r <= 1'b0;
        din_r  <= 1'b0;
        if (read_q) begin
          data_q    <= sh_q;
          cs_active <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_ADC; i++)
      adc_cs_n[i] = !(cs_active && sel_q == SW'(i));
  end
  assign adc_sclk  = sclk_r;
  assign adc_din   = din_r;
  assign rsp.dtack = seq[3];
  assign rsp.rdata = data_q;
endmodule
