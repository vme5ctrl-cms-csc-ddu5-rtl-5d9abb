// vme5ctrl_top: VME controller FPGA of the DDU5 board (CMS CSC readout).
//
// The board's VME interface reaches everything that is set up or debugged
// from the crate controller: the JTAG chains of the board's PROMs, FPGAs and
// FIFOs (VME-JTAG), the serial devices and the settings flash (VME-Serial),
// a set of status and control registers (VME-Parallel), and two serial ADCs
// for voltages and temperatures. The block also drives the 4-bit FMM
// status output with its two LEDs, and decodes the mode switch.
//
// Structure: vme_slave decodes each VME cycle and hands it to vme_jtag,
// serial_adc_ctrl, vme_serial or vme_parallel. slow_clock_gen gives the
// slow_tick enable that paces all serial shifting. vme_parallel holds the
// input shift registers that vme_serial shifts, reports the board status
// lines and sets the FMM test override used by fmm_encoder; fmm_led blinks
// the LEDs; led_mode_decode decodes the mode switch.
//
// Resets: rst is the power-up / master reset and soft_rst the front-panel
// soft reset; either resets the whole block. When the reset ends, every
// JTAG chain is walked back to Run-Test/Idle and, unless mode switch 7
// (mode[6]) is on, the settings are loaded from flash into the serial
// devices.
//
// The JTAG lines of a chain are driven only while it is being accessed
// (jtag_oe), so that the pins can be 3-state outside that time.
// The lines of chain numbers with no JTAG device (0, 9-14) stay low, and
// la_all_high is mode switch bit 7 itself.
//
// One clock: clk (the 40 MHz board clock). Everything runs on it; the slow
// clock appears only as an enable and as the slowclk output.
module vme5ctrl_top
  import vme5_pkg::*;
#(
  parameter int unsigned SLOW_DIV   = 16,
  parameter int unsigned BLINK_BITS = 25,
  parameter int unsigned NUM_ADC    = 2
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               soft_rst,
  input  logic [4:0]         ga,
  input  logic [7:0]         mode_sw,
  // VME bus
  input  logic [23:1]        vme_a,
  input  logic               vme_as_n,
  input  logic [1:0]         vme_ds_n,
  input  logic               vme_write_n,
  input  logic [15:0]        vme_d_in,
  output logic [15:0]        vme_d_out,
  output logic               vme_d_oe,
  output logic               vme_dtack_n,
  // JTAG chains, indexed by VME-JTAG device number
  output logic [15:0]        jtag_tck,
  output logic [15:0]        jtag_tms,
  output logic [15:0]        jtag_tdi,
  output logic [15:0]        jtag_oe,     // drive enable of each chain's lines
  input  logic [15:0]        jtag_tdo,
  // serial ADCs
  output logic [NUM_ADC-1:0] adc_cs_n,
  output logic               adc_sclk,
  output logic               adc_din,
  input  logic [NUM_ADC-1:0] adc_dout,
  // serial devices, indexed by VME-Serial device number
  output logic               ser_clk,
  output logic               ser_do,
  output logic [15:0]        ser_en,
  input  logic [3:0]         ser_di,
  input  logic               ctrl_req,
  // settings flash
  output logic               fl_cs_n,
  output logic               fl_sck,
  output logic               fl_si,
  input  logic               fl_so,
  // board status: [board][STATx], board 15 is the DDU control FPGA
  input  logic [15:0][3:0]   stat,
  // FMM, LEDs, configuration
  output logic [3:0]         fmm,
  output logic               fmm_led_grn,
  output logic               fmm_led_yel,
  output logic [15:0]        led_mode,
  output logic [7:0]         led_par,
  output logic               la_all_high,
  output logic [15:0]        slink_gbe_cfg,
  output logic               slowclk
);
  logic     rst_i, rst_d, restore_idle;
  logic     slow_tick;
  vme_req_t req_jtag, req_adc, req_ser, req_par;
  vme_rsp_t rsp_jtag, rsp_adc, rsp_ser, rsp_par;
  logic     chain_wr;
  logic [15:0] chain_wdata;
  logic [47:0] chain;
  logic     auto_dis;
  logic     auto_busy, jtag_busy;
  logic     ovr_en;
  logic [3:0] ovr_code;

  assign rst_i = rst || soft_rst;

  // One-cycle pulse when the reset ends: return the JTAG chains to idle.
  always_ff @(posedge clk) rst_d <= rst_i;
  assign restore_idle = rst_d && !rst_i;

  slow_clock_gen #(.DIV(SLOW_DIV)) u_slow (
    .clk, .rst(rst_i), .slowclk, .slow_tick);

  vme_slave u_vme (
    .clk, .rst(rst_i), .ga, .vme_a, .vme_as_n, .vme_ds_n, .vme_write_n,
    .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack_n,
    .req_jtag, .req_adc, .req_ser, .req_par,
    .rsp_jtag, .rsp_adc, .rsp_ser, .rsp_par);

  vme_jtag u_jtag (
    .clk, .rst(rst_i), .slow_tick, .req(req_jtag), .rsp(rsp_jtag),
    .restore_idle, .tdo(jtag_tdo), .tck(jtag_tck), .tms(jtag_tms),
    .tdi(jtag_tdi), .dvcenb(jtag_oe), .busy(jtag_busy));

  serial_adc_ctrl #(.NUM_ADC(NUM_ADC)) u_adc (
    .clk, .rst(rst_i), .slow_tick, .req(req_adc), .rsp(rsp_adc),
    .adc_cs_n, .adc_sclk, .adc_din, .adc_dout);

  vme_serial u_ser (
    .clk, .rst(rst_i), .slow_tick, .req(req_ser), .rsp(rsp_ser),
    .chain_wr, .chain_wdata, .chain, .auto_dis, .ctrl_req,
    .ser_clk, .ser_do, .ser_en, .ser_di,
    .fl_cs_n, .fl_sck, .fl_si, .fl_so, .busy(), .auto_busy);

  vme_parallel u_par (
    .clk, .rst(rst_i), .req(req_par), .rsp(rsp_par), .stat,
    .mode(mode_sw), .ga, .fmm, .vme_rdy(!auto_busy && !jtag_busy),
    .chain, .chain_wr, .chain_wdata, .slink_gbe_cfg,
    .fmm_override_en(ovr_en), .fmm_override_code(ovr_code));

  fmm_encoder u_fmm (
    .clk, .rst(rst_i), .stat(stat[15]), .override_en(ovr_en),
    .override_code(ovr_code), .fmm);

  fmm_led #(.BLINK_BITS(BLINK_BITS)) u_led (
    .clk, .rst(rst_i), .fmm, .led_grn(fmm_led_grn), .led_yel(fmm_led_yel));

  led_mode_decode u_mode (
    .mode(mode_sw), .led_mode, .led_par, .auto_load_dis(auto_dis), .la_all_high);
endmodule
