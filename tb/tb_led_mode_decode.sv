// tb_led_mode_decode: every mode-switch setting against an independent
// decode: debug view one-hot only for mode[5:4]=00 with mode[7] low, the
// VME-Parallel view only for mode[5:4]=11 with mode[7] low and mode[3]=0.
module tb_led_mode_decode;
  logic [7:0]  mode;
  logic [15:0] led_mode;
  logic [7:0]  led_par;
  logic        auto_load_dis, la_all_high;
  int checks = 0, failures = 0;

  led_mode_decode dut (.*);

  initial begin
    for (int m = 0; m < 256; m++) begin
      logic [15:0] exp_mode;
      logic [7:0]  exp_par;
      mode = 8'(m);
      #1;
      exp_mode = (mode[5:4] == 2'b00 && !mode[7]) ? (16'd1 << mode[3:0]) : 16'd0;
      exp_par  = (mode[5:4] == 2'b11 && !mode[7] && !mode[3]) ? (8'd1 << mode[2:0]) : 8'd0;
      checks += 4;
      if (led_mode !== exp_mode) begin failures++; $display("mode %h led_mode %h", m, led_mode); end
      if (led_par !== exp_par)   begin failures++; $display("mode %h led_par %h", m, led_par); end
      if (auto_load_dis !== mode[6]) failures++;
      if (la_all_high !== mode[7])   failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
