// fmm_led: slow-blink control of the green and yellow FMM front-panel LEDs.
//
// A free-running counter of BLINK_BITS bits gives the blink phase (its top
// bit), so an LED that blinks is on for 2**(BLINK_BITS-1) clock cycles and
// off for as many. Per FMM code: ready 1000 green on; warning 0001 green on,
// yellow blinking; busy 0100 yellow on; lost sync 0010 both blinking; error
// 1100 yellow blinking. Any other code leaves both LEDs dark. The LED states
// per code follow the board; the blink rate is this design's choice
// (about 0.84 s per period at 40 MHz).
//
// Ports: clk, rst (synchronous), fmm[3:0]; led_grn, led_yel active high,
// registered.
module fmm_led
  import vme5_pkg::*;
#(
  parameter int unsigned BLINK_BITS = 25
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] fmm,
  output logic       led_grn,
  output logic       led_yel
);
  logic [BLINK_BITS-1:0] cnt;
  logic                  blink;
  logic                  grn_d, yel_d;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  assign blink = cnt[BLINK_BITS-1];

  always_comb begin
    unique case (fmm)
      FMM_READY: begin grn_d = 1'b1;  yel_d = 1'b0;  end
      FMM_WARN:  begin grn_d = 1'b1;  yel_d = blink; end
      FMM_BUSY:  begin grn_d = 1'b0;  yel_d = 1'b1;  end
      FMM_LSYNC: begin grn_d = blink; yel_d = blink; end
      FMM_ERROR: begin grn_d = 1'b0;  yel_d = blink; end
      default:   begin grn_d = 1'b0;  yel_d = 1'b0;  end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      led_grn <= 1'b0;
      led_yel <= 1'b0;
    end else begin
      led_grn <= grn_d;
      led_yel <= yel_d;
    end
  end
endmodule
