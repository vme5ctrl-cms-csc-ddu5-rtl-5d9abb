// tb_tap_model: behavioural model of one JTAG device for testbenches: the
// IEEE 1149.1 TAP state machine with an IR of IR_LEN bits and a single
// 16-bit data register. Capture-IR loads ...01, Capture-DR loads
// DR_CAPTURE, Update-IR/DR copy the shift registers to ir/dr, and
// Test-Logic-Reset sets ir to all ones (BYPASS). TDO is the LSB of the
// shift register in use. It counts rising TCK edges.
module tb_tap_model #(
  parameter int          IR_LEN     = 10,
  parameter int          DR_LEN     = 16,
  parameter logic [DR_LEN-1:0] DR_CAPTURE = DR_LEN'(16'hA5C3)
) (
  input  logic tck,
  input  logic tms,
  input  logic tdi,
  output logic tdo
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_e;

  tap_e              state = TLR;
  logic [IR_LEN-1:0] ir = '1, ir_sr = '0;
  logic [DR_LEN-1:0] dr = '0, dr_sr = '0;
  int                edges = 0;

  always @(posedge tck) begin
    edges <= edges + 1;
    unique case (state)
      TLR:    state <= tms ? TLR : RTI;
      RTI:    state <= tms ? SEL_DR : RTI;
      SEL_DR: state <= tms ? SEL_IR : CAP_DR;
      CAP_DR: state <= tms ? EX1_DR : SH_DR;
      SH_DR:  state <= tms ? EX1_DR : SH_DR;
      EX1_DR: state <= tms ? UPD_DR : PAU_DR;
      PAU_DR: state <= tms ? EX2_DR : PAU_DR;
      EX2_DR: state <= tms ? UPD_DR : SH_DR;
      UPD_DR: state <= tms ? SEL_DR : RTI;
      SEL_IR: state <= tms ? TLR : CAP_IR;
      CAP_IR: state <= tms ? EX1_IR : SH_IR;
      SH_IR:  state <= tms ? EX1_IR : SH_IR;
      EX1_IR: state <= tms ? UPD_IR : PAU_IR;
      PAU_IR: state <= tms ? EX2_IR : PAU_IR;
      EX2_IR: state <= tms ? UPD_IR : SH_IR;
      UPD_IR: state <= tms ? SEL_DR : RTI;
      default: state <= TLR;
    endcase
    case (state)
      TLR:    ir <= '1;
      CAP_DR: dr_sr <= DR_CAPTURE;
      SH_DR:  dr_sr <= {tdi, dr_sr[DR_LEN-1:1]};
      UPD_DR: dr <= dr_sr;
      CAP_IR: ir_sr <= IR_LEN'(1);
      SH_IR:  ir_sr <= {tdi, ir_sr[IR_LEN-1:1]};
      UPD_IR: ir <= ir_sr;
      default: ;
    endcase
  end

  logic at_idle, at_tlr, at_shift_ir, at_shift_dr;
  assign at_idle     = (state == RTI);
  assign at_tlr      = (state == TLR);
  assign at_shift_ir = (state == SH_IR);
  assign at_shift_dr = (state == SH_DR);

  assign tdo = (state == SH_IR) ? ir_sr[0] : (state == SH_DR) ? dr_sr[0] : 1'b0;
endmodule
