// tb_serdev_model: behavioural model of the serial devices behind the
// VME-Serial port for testbenches. Every enabled device records the bits it
// receives on ser_do (rx[d], newest bit lowest, rxcnt[d] bits); input FIFO
// devices 0-3 send the 32-bit word tx[d], MSB first.
module tb_serdev_model (
  input  logic        ser_clk,
  input  logic        ser_do,
  input  logic [15:0] ser_en,
  output logic [3:0]  ser_di
);
  logic [63:0] rx    [16];
  int          rxcnt [16];
  logic [31:0] tx    [4];
  int          txcnt [4];

  initial begin
    for (int d = 0; d < 16; d++) begin rx[d] = '0; rxcnt[d] = 0; end
    for (int d = 0; d < 4; d++) begin tx[d] = 32'h1111_0000 * (d + 1) + 32'h1234; txcnt[d] = 0; end
  end

  always @(posedge ser_clk) begin
    for (int d = 0; d < 16; d++) begin
      if (ser_en[d]) begin
        rx[d]    <= {rx[d][62:0], ser_do};
        rxcnt[d] <= rxcnt[d] + 1;
      end
    end
    for (int d = 0; d < 4; d++) if (ser_en[d]) txcnt[d] <= txcnt[d] + 1;
  end

  always_comb begin
    for (int d = 0; d < 4; d++)
      ser_di[d] = (txcnt[d] < 32) ? tx[d][31 - txcnt[d]] : 1'b0;
  end

  task automatic clear_rx();
    for (int d = 0; d < 16; d++) begin rx[d] = '0; rxcnt[d] = 0; end
    for (int d = 0; d < 4; d++) txcnt[d] = 0;
  endtask
endmodule
