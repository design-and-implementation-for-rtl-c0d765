// Self-checking testbench of the 8-channel current stimulation module
// model: for every channel, code and direction, only the selected channel
// carries current, of code * 108 uA and of the chosen sign, and only
// while the pulse is high.
module tb_current_stim_module;
  import microstim_pkg::na_t;

  logic [4:0] code;
  logic       pulse, s, u;
  logic [7:0] en;
  na_t        i_el [8];
  int         checks = 0, failures = 0;

  current_stim_module dut (
    .dac_code_i(code), .pulse_i(pulse), .sign_i(s), .unsign_i(u), .chan_en_i(en), .i_elec_na_o(i_el)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_i;
    for (int ch = 0; ch < 8; ch++)
      for (int dir = 0; dir < 2; dir++)
        for (int p = 0; p < 2; p++) begin
          code  = 5'($urandom);
          en    = 8'(1 << ch);
          pulse = 1'(p);
          s     = (p == 1) && (dir == 0);
          u     = (p == 1) && (dir == 1);
          #10;
          for (int k = 0; k < 8; k++) begin
            exp_i = (k == ch && p == 1) ? ((dir == 0) ? 1 : -1) * int'(code) * 108000 : 0;
            check(i_el[k] == exp_i, "electrode current");
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
