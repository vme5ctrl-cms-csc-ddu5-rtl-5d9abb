// tb_adc_model: behavioural model of a MAX1271-style serial ADC for
// testbenches: the first 8 bits after chip select falls are the control
// byte (channel in bits 6:4); the next 16 clocks return RESULT_BASE plus
// 0x111 times the channel, as a 12-bit value in bits 14:3.
module tb_adc_model #(
  parameter logic [11:0] RESULT_BASE = 12'h300
) (
  input  logic cs_n,
  input  logic sclk,
  input  logic din,
  output logic dout
);
  logic [7:0]  ctrl = '0;
  logic [15:0] result;
  int          cnt = 0;
  int          conversions = 0;

  always @(negedge cs_n) cnt <= 0;
  always @(posedge sclk) begin
    if (!cs_n) begin
      cnt <= cnt + 1;
      if (cnt < 8) ctrl <= {ctrl[6:0], din};
      if (cnt == 7) conversions++;
    end
  end
  assign result = {1'b0, RESULT_BASE + 12'h111 * 12'(ctrl[6:4]), 3'b000};
  assign dout = (!cs_n && cnt >= 8 && cnt < 24) ? result[23 - cnt] : 1'b0;
endmodule
