// End-to-end testbench of the microstimulator at its default sizes.
//
// The implant runs on a 1 MHz clock; the external controller on its own
// clock, 1.5 % slower, so the decoder has to follow a transmitter with a
// different time base. A microcontroller model sends commands over the
// Manchester line; the digital filter path is a plain wire. The test
// programs the reference stimulation (300 us pulses at 20 Hz, about 1 mA)
// and checks pulse width, period and electrode currents in real time, then
// drives every mechanism of the design at least once and counts it: lock
// acquisition, loss and re-acquisition of lock, a UART framing error, a
// malformed command, a change of channel, of polarity (Sign and Unsign),
// full-scale current, and stopping stimulation. A mechanism that never
// happened counts as a failure.
module tb_microstim_top;
  import microstim_pkg::*;

  localparam realtime T_CLK = 1000ns;     // implant clock, 1 MHz
  localparam realtime T_EXT = 1015ns;     // external controller clock

  logic                ext_clk = 1'b0, ext_rst_n = 1'b0;
  logic                clk = 1'b0, rst_n = 1'b0;
  logic                tx, strobe, med;
  logic                locked, ferr, ok, err, pwp, pulse, sign, unsign;
  stim_cfg_t           cfg;
  logic [CHANNELS-1:0] chan_en;
  logic [AMP_BITS-1:0] code;
  na_t                 i_el [CHANNELS];

  int checks = 0, failures = 0;

  microstim_top dut (
    .ext_clk(ext_clk), .ext_rst_n(ext_rst_n), .tx_data_i(tx), .tx_bit_strobe_o(strobe), .med_o(med),
    .clk(clk), .rst_n(rst_n), .locked_o(locked), .frame_err_o(ferr), .cmd_ok_o(ok), .cmd_err_o(err),
    .cfg_o(cfg), .pw_pulse_o(pwp), .filt_pulse_i(pwp), .pulse_o(pulse), .sign_o(sign), .unsign_o(unsign),
    .chan_en_o(chan_en), .dac_code_o(code), .i_elec_na_o(i_el)
  );

  pattern_gen_model u_pg (.clk(ext_clk), .bit_strobe_i(strobe), .tx_o(tx));

  always #(T_CLK / 2) clk = ~clk;
  always #(T_EXT / 2) ext_clk = ~ext_clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Mechanism counters.
  int n_lock = 0, n_unlock = 0, n_ferr = 0, n_cmd_err = 0, n_cmd_ok = 0;
  int n_sign_pulses = 0, n_unsign_pulses = 0, n_full_scale = 0, n_stop = 0, n_chan_change = 0;

  logic locked_d = 1'b0, pulse_d = 1'b0;
  realtime t_rise;
  realtime rises[$];
  realtime widths[$];
  always @(posedge clk) begin
    if (rst_n) begin
      if (locked && !locked_d) n_lock++;
      if (!locked && locked_d) n_unlock++;
      if (ferr) n_ferr++;
      if (err) n_cmd_err++;
      if (ok) n_cmd_ok++;
      if (pulse && !pulse_d) begin
        t_rise = $realtime;
        rises.push_back(t_rise);
        if (sign) n_sign_pulses++;
        if (unsign) n_unsign_pulses++;
      end
      if (!pulse && pulse_d) widths.push_back($realtime - t_rise);
      locked_d <= locked;
      pulse_d  <= pulse;
    end
  end

  // Electrode currents, checked in the middle of every pulse and between pulses.
  function automatic na_t expect_current(input int ch, input bit in_pulse);
    if (!in_pulse || ch != int'(cfg.channel)) return 0;
    return (cfg.polarity ? -1 : 1) * int'(cfg.amp) * 108000;
  endfunction

  task automatic check_currents(input bit in_pulse);
    for (int k = 0; k < CHANNELS; k++)
      check(i_el[k] == expect_current(k, in_pulse), "electrode current");
  endtask

  // Sends a command and checks that it arrived intact.
  task automatic program_cmd(input bit pol, input int ch, input int amp, input int pw, input int per);
    int ok0 = n_cmd_ok;
    int prev_ch = int'(cfg.channel);
    u_pg.send_command(pol, ch, amp, pw, per);
    u_pg.drain();
    check(n_cmd_ok == ok0 + 1, "command received");
    check(cfg.polarity == pol && int'(cfg.channel) == ch && int'(cfg.amp) == amp &&
          int'(cfg.pw) == pw && int'(cfg.per) == per, "command decoded intact");
    if (ch != prev_ch) n_chan_change++;
    if (per == 0) n_stop++;
    if (amp == 31) n_full_scale++;
  endtask

  // Times are compared to within 1 ns, since they are reals.
  function automatic bit same_time(input realtime a, input realtime b);
    return (a - b < 1ns) && (b - a < 1ns);
  endfunction

  // Watches n pulses and checks width and period in microseconds.
  task automatic watch(input int pw, input int per, input int n);
    rises.delete();
    widths.delete();
    for (int i = 0; i < n; i++) begin
      @(posedge pulse);
      #(pw * 5us);
      check_currents(1'b1);
      #(pw * 5us + 20us);
      check_currents(1'b0);
    end
    @(negedge clk);
    check(rises.size() == n && widths.size() == n, "pulses seen");
    for (int i = 1; i < rises.size(); i++)
      check(same_time(rises[i] - rises[i-1], per * 1ms), "stimulation period");
    foreach (widths[i]) check(same_time(widths[i], pw * 10us), "pulse width");
  endtask

  initial begin : watchdog
    #2s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, f0;
    #(3 * T_EXT) ext_rst_n = 1'b1;
    #(5 * T_CLK) rst_n = 1'b1;
    #200us;
    check(!locked, "no lock on an idle line of ones");
    check(!pulse && cfg == CFG_OFF, "stimulation off after reset");

    // Reference stimulation: 300 us, 20 Hz, 9 x 108 uA (about 1 mA), channel 2.
    program_cmd(1'b0, 2, 9, 30, 50);
    check(locked, "locked after the first frame");
    watch(30, 50, 3);

    // A frame with a bad stop bit is dropped; a stray data word is rejected.
    f0 = n_ferr;
    u_pg.send_word(8'h55, 1'b0);
    u_pg.drain();
    check(n_ferr == f0 + 1, "framing error detected");
    e0 = n_cmd_err;
    u_pg.send_word(8'h12);
    u_pg.drain();
    check(n_cmd_err == e0 + 1, "malformed command rejected");
    check(int'(cfg.channel) == 2 && int'(cfg.per) == 50, "settings survive bad input");

    // Other channel, reverse current, full scale, faster rate.
    program_cmd(1'b1, 6, 31, 50, 5);
    watch(50, 5, 4);

    // Line silent (controller in reset): lock lost, then regained.
    @(negedge ext_clk) ext_rst_n = 1'b0;
    #200us;
    check(!locked, "lock lost on a silent line");
    @(negedge ext_clk) ext_rst_n = 1'b1;
    program_cmd(1'b0, 0, 17, 1, 1);
    watch(1, 1, 5);

    // Stop.
    program_cmd(1'b0, 0, 17, 30, 0);
    rises.delete();
    #20ms;
    check(rises.size() == 0, "no pulses after stop");

    check(n_lock >= 2, "lock acquisition and re-acquisition happened");
    check(n_unlock >= 1, "lock loss happened");
    check(n_ferr >= 1, "framing error happened");
    check(n_cmd_err >= 1, "command error happened");
    check(n_sign_pulses >= 1, "Sign pulses happened");
    check(n_unsign_pulses >= 1, "Unsign pulses happened");
    check(n_full_scale >= 1, "full-scale current happened");
    check(n_chan_change >= 2, "channel changes happened");
    check(n_stop >= 1, "stop happened");
    $display("mechanisms: lock=%0d unlock=%0d frame_err=%0d cmd_err=%0d cmd_ok=%0d sign=%0d unsign=%0d full_scale=%0d chan_change=%0d stop=%0d",
             n_lock, n_unlock, n_ferr, n_cmd_err, n_cmd_ok, n_sign_pulses, n_unsign_pulses,
             n_full_scale, n_chan_change, n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
