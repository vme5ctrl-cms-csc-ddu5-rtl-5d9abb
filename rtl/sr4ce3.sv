// sr4ce3: 4-bit serial-in, parallel-out shift register with clock enable,
// where the asynchronous clear presets q[0] and clears q[3:1].
//
// The one flip-flop with a preset and three with a clear follow the macro's
// drawing: after clr the register holds 4'b0001, a single one that each
// enabled clock edge moves up one place (sli enters q[0]). With sli tied to
// 0 it is a one-hot step pointer that a clear restarts at step 0.
module sr4ce3 (
  input  logic       c,
  input  logic       clr,
  input  logic       ce,
  input  logic       sli,
  output logic [3:0] q
);
  always_ff @(posedge c or posedge clr) begin
    if (clr)     q <= 4'b0001;
    else if (ce) q <= {q[2:0], sli};
  end
endmodule
