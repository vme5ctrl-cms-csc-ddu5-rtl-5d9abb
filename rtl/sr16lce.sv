// sr16lce: 16-bit serial-in, parallel-out shift register, right shift, with
// clock enable and asynchronous clear (Xilinx SR16CE changed to shift right).
//
// With ce high a clock edge moves every bit one place down and puts sli into
// bit 15, so after n shifts the last n serial bits sit in q[15:16-n], the
// first of them lowest. clr clears the register without a clock. Used to
// collect TDO bits in the JTAG shifter.
module sr16lce (
  input  logic        c,
  input  logic        clr,
  input  logic        ce,
  input  logic        sli,
  output logic [15:0] q
);
  always_ff @(posedge c or posedge clr) begin
    if (clr)     q <= '0;
    else if (ce) q <= {sli, q[15:1]};
  end
endmodule
