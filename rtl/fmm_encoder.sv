// fmm_encoder: drives the DDU's 4-bit FMM (fast merging module) status
// output from the status lines of the DDU control FPGA.
//
// The four STATx lines mean busy (bit 0), warning/near full (1), lost sync
// (2) and error (3). They are encoded to the FMM code, most serious first:
// error 1100, lost sync 0010, busy 0100, warning 0001, otherwise ready 1000
// (ready is simply "not busy"). The codes are the board's; the order
// follows the rank numbers printed beside the board's code list (error 1
// to ready 5), read here as a priority.
// For tests the code can be forced: with override_en high the output is
// override_code instead.
//
// Ports: clk, rst (synchronous, output goes to busy), stat[3:0],
// override_en, override_code[3:0]; fmm[3:0] registered, one cycle after
// its inputs.
module fmm_encoder
  import vme5_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] stat,
  input  logic       override_en,
  input  logic [3:0] override_code,
  output logic [3:0] fmm
);
  logic [3:0] code;

  always_comb begin
    if      (stat[STAT_ERROR]) code = FMM_ERROR;
    else if (stat[STAT_LSYNC]) code = FMM_LSYNC;
    else if (stat[STAT_BUSY])  code = FMM_BUSY;
    else if (stat[STAT_WARN])  code = FMM_WARN;
    else                       code = FMM_READY;
  end

  always_ff @(posedge clk) begin
    if (rst)              fmm <= FMM_BUSY;
    else if (override_en) fmm <= override_code;
    else                  fmm <= code;
  end
endmodule
