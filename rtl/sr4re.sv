// sr4re: 4-bit serial-in, parallel-out shift register with clock enable
// that loads a single one on synchronous reset.
//
// As drawn in the macro, q[0] is a flip-flop with synchronous set and
// q[3:1] have synchronous resets, so r gives 4'b0001 on the next clock edge
// whatever ce is. With ce high, each edge moves the bits up one place and
// sli enters q[0]. Used as a one-hot phase sequencer.
module sr4re (
  input  logic       c,
  input  logic       r,
  input  logic       ce,
  input  logic       sli,
  output logic [3:0] q
);
  always_ff @(posedge c) begin
    if (r)       q <= 4'b0001;
    else if (ce) q <= {q[2:0], sli};
  end
endmodule
