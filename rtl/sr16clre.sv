// sr16clre: 16-bit loadable shift register, right shift, with clock enable
// and asynchronous clear (Xilinx SR16CLRE macro changed to shift right).
//
// On a clock edge with l high the register loads d; otherwise, with ce high,
// it shifts right: sli enters bit 15 and bit 0 leaves. l has priority over
// ce, as in the library macro. clr clears all bits at once, without a clock.
// Used as the JTAG TDI data register: bit 0 is the next bit to send.
module sr16clre (
  input  logic        c,
  input  logic        clr,
  input  logic        ce,
  input  logic        l,
  input  logic        sli,
  input  logic [15:0] d,
  output logic [15:0] q
);
  always_ff @(posedge c or posedge clr) begin
    if (clr)     q <= '0;
    else if (l)  q <= d;
    else if (ce) q <= {sli, q[15:1]};
  end
endmodule
