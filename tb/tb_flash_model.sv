// tb_flash_model: behavioural model of the serial settings flash (SPI mode
// 0) for testbenches. Opcode 0xD7 returns STATUS; 0x82 with a 24-bit
// address (page in bits 19:9) stores the following bits as that page's bit
// stream when chip select rises; 0xD2 with address and 32 don't-care bits
// returns the page's bit stream. Pages hold 64 bits, in the order sent.
module tb_flash_model #(
  parameter logic [7:0] STATUS = 8'h9C
) (
  input  logic cs_n,
  input  logic sck,
  input  logic si,
  output logic so
);
  logic [0:63] page [8];
  logic [0:63] wbuf;
  logic [7:0]  op;
  logic [23:0] addr;
  int          cnt;
  int          programs = 0, reads = 0, status_reads = 0;

  initial for (int p = 0; p < 8; p++) page[p] = '0;

  always @(negedge cs_n) begin
    cnt  <= 0;
    op   <= '0;
    addr <= '0;
    wbuf <= '0;
  end

  always @(posedge sck) begin
    if (!cs_n) begin
      cnt <= cnt + 1;
      if (cnt < 8)        op   <= {op[6:0], si};
      else if (cnt < 32)  addr <= {addr[22:0], si};
      else if (op == 8'h82 && cnt - 32 < 64) wbuf[cnt - 32] <= si;
    end
  end

  always @(posedge cs_n) begin
    if (op == 8'h82) begin page[addr[11:9]] = wbuf; programs++; end
    if (op == 8'hD2) reads++;
    if (op == 8'hD7) status_reads++;
  end

  always_comb begin
    so = 1'b0;
    if (!cs_n && op == 8'hD7 && cnt >= 8 && cnt < 16) so = STATUS[15 - cnt];
    if (!cs_n && op == 8'hD2 && cnt >= 64 && cnt < 128) so = page[addr[11:9]][cnt - 64];
  end
endmodule
