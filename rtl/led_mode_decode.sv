// led_mode_decode: decodes the 8-position mode switch of the board.
//
// mode[5:4] choose what the front-panel LEDs and logic-analyser pins show:
// 00 standard debug, 01 VME-Serial, 10 flash RAM, 11 VME-Parallel. mode[3:0]
// then pick one of up to sixteen debug views, mode[6] disables the automatic
// serial load after reset, and mode[7] forces every logic-analyser bit high
// and puts the inverted firmware version on the LEDs.
//
// Two 4-to-16 decoders, as on the board: led_mode is the one-hot of
// mode[3:0] when mode[4], mode[5] and mode[7] are all low (standard debug),
// and led_par[7:0] is the one-hot of mode[3:0] when mode[4] and mode[5] are
// high and mode[7] is low (VME-Parallel view; the upper eight outputs of that
// decoder are unused). Outputs are combinational.
// auto_load_dis and la_all_high are mode bits 6 and 7 brought out under
// their own names.
module led_mode_decode (
  input  logic [7:0]  mode,
  output logic [15:0] led_mode,
  output logic [7:0]  led_par,
  output logic        auto_load_dis,
  output logic        la_all_high
);
  logic leden, ledpar;
  logic [15:0] par_full;

  assign leden  = !mode[4] && !mode[5] && !mode[7];
  assign ledpar =  mode[4] &&  mode[5] && !mode[7];

  always_comb begin
    led_mode = '0;
    par_full = '0;
    if (leden)  led_mode[mode[3:0]] = 1'b1;
    if (ledpar) par_full[mode[3:0]] = 1'b1;
  end

  assign led_par       = par_full[7:0];
  assign auto_load_dis = mode[6];
  assign la_all_high   = mode[7];
endmodule
