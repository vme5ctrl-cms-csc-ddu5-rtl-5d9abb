// slow_clock_gen: derives the slow clock (SLOWCLK) that paces the JTAG,
// serial-device and serial-ADC shifters.
//
// A free-running counter divides the input clock by DIV; its top half is
// the slow clock level, which is re-registered once more before it leaves
// the block, the same retiming the board uses to give SLOWCLK a fixed phase
// to the fast clock. Besides the clock itself the block gives slow_tick, a
// one-cycle pulse in the input clock domain on every rising edge of slowclk,
// so that the rest of the design can run on the one input clock with an
// enable instead of on a derived clock: logic that acts on slow_tick
// changes at the same clock edge at which slowclk rises.
//
// The board builds a divide-by-4 from toggle flip-flops; the JTAG and ADC
// clocks are stated as 1.25 MHz, half of SLOWCLK, so SLOWCLK is 2.5 MHz.
// With the 40 MHz board clock that is DIV = 16, the default here.
//
// Ports: clk, rst (synchronous, active high); slowclk, slow_tick.
// Timing: slowclk has period DIV clk cycles, high for DIV/2 of them;
// slow_tick is high for one cycle per period, the cycle before slowclk
// goes high.
module slow_clock_gen #(
  parameter int unsigned DIV = 16   // even, >= 2
) (
  input  logic clk,
  input  logic rst,
  output logic slowclk,
  output logic slow_tick
);
  localparam int unsigned CW = (DIV > 2) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;
  logic          level;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt <= '0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign level = (cnt >= CW'(DIV / 2));

  // Retiming register, the last flip-flop of the divider chain.
  always_ff @(posedge clk) begin
    if (rst) slowclk <= 1'b0;
    else     slowclk <= level;
  end

  assign slow_tick = level && !slowclk;
endmodule
