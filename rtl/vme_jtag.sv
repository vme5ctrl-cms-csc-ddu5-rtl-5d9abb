// vme_jtag: VME-to-JTAG bridge. One VME cycle shifts up to 16 bits into the
// JTAG chain of one board device (PROMs, FPGAs, FIFOs), optionally walking
// the TAP controller from Run-Test/Idle into Shift-DR or Shift-IR first
// (header) and back to Run-Test/Idle afterwards (tailer).
//
// Addressing: dev (address bits [15:12]) selects the chain; cmd[3:0]
// (address bits [5:2]) is the operation and cmd[9:6] (address bits [11:8])
// is the bit count minus one. Operations:
//   0/1/2/3  shift data register: none / header / tailer / header+tailer
//   7        shift instruction register with header and tailer
//   C/D/E/F  shift instruction register: none / header / tailer / both
//   5        read the TDO register (no JTAG activity)
//   6        reset all TAP controllers of the chain, ending in Run-Test/Idle
// The data header is TMS 1,0,0 and the instruction header TMS 1,1,0,0, both
// from Run-Test/Idle. During the shift TMS is 0, except on the last bit when
// a tailer follows; the tailer is TMS 1,0 (Update, Run-Test/Idle). The reset
// is five TCK cycles with TMS 1 and one with TMS 0: 12 slow-clock ticks, as
// the board's reset counter. restore_idle runs the same reset on every chain
// at once without a VME cycle, which the board does after a soft reset.
//
// Data: wdata is sent LSB first. TDO is sampled on the rising edge of TCK
// into a right-shifting 16-bit register, so after an n-bit shift the bits
// read back are in rdata[15:16-n], the first one lowest; the register keeps
// older bits below them.
//
// Timing: TCK is half the slow clock; each TCK cycle takes two slow_tick
// pulses, TMS/TDI change while TCK goes low and TDO is sampled when it goes
// high. dtack rises after the last TCK cycle and stays until strobe falls.
// The outputs of the chain that is not selected are held low by its
// enable (dvcenb), as the AND gates of every JTAG path on the board do.
// Taking the end of the shift, rather than the load, as the point of dtack
// is this design's choice.
// Chains whose bit in JTAG_DEVS is clear (no JTAG device at that number)
// never get an enable, so their four outputs are constant low by design.
module vme_jtag
  import vme5_pkg::*;
#(
  parameter logic [15:0] JTAG_DEVS = 16'h81FE  // chains 1-8 and 15
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        slow_tick,
  input  vme_req_t    req,
  output vme_rsp_t    rsp,
  input  logic        restore_idle,
  input  logic [15:0] tdo,
  output logic [15:0] tck,
  output logic [15:0] tms,
  output logic [15:0] tdi,
  output logic [15:0] dvcenb,
  output logic        busy
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_ACK} state_e;
  state_e state;

  logic [3:0]  dev_q;
  logic        all_q;       // restore-idle: every chain enabled, no dtack
  logic        reset_q;     // TAP reset sequence
  logic        ir_q, hdr_q, tail_q;
  logic [4:0]  nbits_q;
  logic [4:0]  step;
  logic        phase;
  logic [4:0]  hdr_len, total, shift_end;
  logic        tck_r, tms_r, tdi_r;
  logic        in_shift;
  logic        tms_d;

  logic        load_sr, shift_sr;
  logic [15:0] data_q, tdo_q;
  logic        tdo_bit;

  logic [3:0]  op;
  logic        is_shift_op;
  assign op = req.cmd[3:0];
  assign is_shift_op = (op inside {4'h0, 4'h1, 4'h2, 4'h3, 4'h7, 4'hC, 4'hD, 4'hE, 4'hF});

  // Data out (TDI) and data back (TDO) registers.
  sr16clre u_tdi_sr (.c(clk), .clr(rst), .ce(shift_sr), .l(load_sr),
                     .sli(1'b0), .d(req.wdata), .q(data_q));
  sr16lce  u_tdo_sr (.c(clk), .clr(rst), .ce(shift_sr), .sli(tdo_bit), .q(tdo_q));

  assign tdo_bit = tdo[dev_q];

  assign hdr_len   = reset_q ? 5'd0 : (hdr_q ? (ir_q ? 5'd4 : 5'd3) : 5'd0);
  assign shift_end = hdr_len + (reset_q ? 5'd0 : nbits_q);
  assign total     = reset_q ? 5'd6 : (shift_end + (tail_q ? 5'd2 : 5'd0));
  assign in_shift  = !reset_q && (step >= hdr_len) && (step < shift_end);

  // TMS for the current step.
  always_comb begin
    if (reset_q)               tms_d = (step < 5'd5);
    else if (step < hdr_len)   tms_d = ir_q ? (step < 5'd2) : (step == 5'd0);
    else if (step < shift_end) tms_d = tail_q && (step == shift_end - 5'd1);
    else                       tms_d = (step == shift_end);   // Update, then Idle
  end

  assign load_sr  = (state == S_IDLE) && req.strobe && is_shift_op;
  assign shift_sr = (state == S_RUN) && slow_tick && phase && in_shift;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      dev_q   <= '0;
      all_q   <= 1'b0;
      reset_q <= 1'b0;
      ir_q    <= 1'b0;
      hdr_q   <= 1'b0;
      tail_q  <= 1'b0;
      nbits_q <= '0;
      step    <= '0;
      phase   <= 1'b0;
      tck_r   <= 1'b0;
      tms_r   <= 1'b0;
      tdi_r   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          step  <= '0;
          phase <= 1'b0;
          if (req.strobe) begin
            dev_q   <= req.dev;
            all_q   <= 1'b0;
            reset_q <= (op == 4'h6);
            ir_q    <= (op == 4'h7) || (op[3:2] == 2'b11);
            hdr_q   <= (op == 4'h7) || op[0];
            tail_q  <= (op == 4'h7) || op[1];
            nbits_q <= {1'b0, req.cmd[9:6]} + 5'd1;
            state   <= (is_shift_op || op == 4'h6) ? S_RUN : S_ACK;
          end else if (restore_idle) begin
            all_q   <= 1'b1;
            reset_q <= 1'b1;
            state   <= S_RUN;
          end
        end
        S_RUN: begin
          if (slow_tick) begin
            if (!phase) begin
              tck_r <= 1'b0;
              if (step == total) begin
                tms_r <= 1'b0;
                tdi_r <= 1'b0;
                state <= all_q ? S_IDLE : S_ACK;
                all_q <= 1'b0;
              end else begin
                tms_r <= tms_d;
                tdi_r <= in_shift ? data_q[0] : 1'b0;
                phase <= 1'b1;
              end
            end else begin
              tck_r <= 1'b1;
              phase <= 1'b0;
              step  <= step + 5'd1;
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

  always_comb begin
    for (int d = 0; d < 16; d++) begin
      dvcenb[d] = JTAG_DEVS[d] && (state == S_RUN) && (all_q || dev_q == 4'(d));
      tck[d]    = dvcenb[d] && tck_r;
      tms[d]    = dvcenb[d] && tms_r;
      tdi[d]    = dvcenb[d] && tdi_r;
    end
  end

  assign busy      = (state == S_RUN);
  assign rsp.dtack = (state == S_ACK);
  assign rsp.rdata = tdo_q;

  // Only one chain is driven at a time, except during restore-idle.
  a_one_chain: assert property (@(posedge clk) disable iff (rst)
    !all_q |-> $onehot0(dvcenb));
endmodule
