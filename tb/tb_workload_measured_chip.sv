// Workload testbench: the stimulator with the current step measured on the
// fabricated chip (87 uA per level instead of the 108 uA design value).
//
// Programs full-scale current (code 31) at the reference 300 us / 20 Hz
// on channel 5, reverse polarity, and checks over three pulses that the
// electrode current is -31 x 87 uA = -2.697 mA during each pulse and 0
// outside, with the pulse width and period exact at 1 MHz. Then it
// programs about 1 mA (code 11 = 0.957 mA at 87 uA per level) forward.
module tb_workload_measured_chip;
  import microstim_pkg::*;

  localparam int STEP = 87000;

  logic                ext_clk = 1'b0, ext_rst_n = 1'b0;
  logic                clk = 1'b0, rst_n = 1'b0;
  logic                tx, strobe, med;
  logic                locked, ferr, ok, err, pwp, pulse, sign, unsign;
  stim_cfg_t           cfg;
  logic [CHANNELS-1:0] chan_en;
  logic [AMP_BITS-1:0] code;
  na_t                 i_el [CHANNELS];
  int                  checks = 0, failures = 0;

  microstim_top #(.STEP_NA(STEP)) dut (
    .ext_clk(ext_clk), .ext_rst_n(ext_rst_n), .tx_data_i(tx), .tx_bit_strobe_o(strobe), .med_o(med),
    .clk(clk), .rst_n(rst_n), .locked_o(locked), .frame_err_o(ferr), .cmd_ok_o(ok), .cmd_err_o(err),
    .cfg_o(cfg), .pw_pulse_o(pwp), .filt_pulse_i(pwp), .pulse_o(pulse), .sign_o(sign), .unsign_o(unsign),
    .chan_en_o(chan_en), .dac_code_o(code), .i_elec_na_o(i_el)
  );

  pattern_gen_model u_pg (.clk(ext_clk), .bit_strobe_i(strobe), .tx_o(tx));

  always #500ns clk = ~clk;
  always #490ns ext_clk = ~ext_clk;   // transmitter 2 % fast

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Times are compared to within 1 ns, since they are reals.
  function automatic bit same_time(input realtime a, input realtime b);
    return (a - b < 1ns) && (b - a < 1ns);
  endfunction

  task automatic stimulate(input bit pol, input int ch, input int amp);
    realtime t0, t1, t_prev;
    u_pg.send_command(pol, ch, amp, 30, 50);
    u_pg.drain();
    t_prev = 0;
    for (int n = 0; n < 3; n++) begin
      @(posedge pulse);
      t0 = $realtime;
      if (n > 0) check(same_time(t0 - t_prev, 50ms), "period 50 ms");
      t_prev = t0;
      #150us;
      for (int k = 0; k < CHANNELS; k++)
        check(i_el[k] == ((k == ch) ? (pol ? -amp * STEP : amp * STEP) : 0), "current during pulse");
      @(negedge pulse);
      t1 = $realtime;
      check(same_time(t1 - t0, 300us), "width 300 us");
      #10us;
      for (int k = 0; k < CHANNELS; k++) check(i_el[k] == 0, "no current between pulses");
    end
  endtask

  initial begin : watchdog
    #1s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3us ext_rst_n = 1'b1;
    #5us rst_n = 1'b1;
    #100us;
    stimulate(1'b1, 5, 31);
    check(-31 * STEP == -2697000, "full scale of the measured chip");
    stimulate(1'b0, 1, 11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
