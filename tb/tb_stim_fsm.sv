// Self-checking testbench of the stimulation state machine.
//
// Sends commands word by word (the digital filter path is a plain wire)
// and checks: the active configuration after each complete command and
// that it does not change cfg_prev the last word; errors for a stray data
// word, a header inside a command and a bad amplitude word; the pulse
// train (width pw * 10 clocks, spacing per * 1000 clocks at the default
// sizes, i.e. 300 us / 20 Hz at 1 MHz for pw = 30, per = 50); Sign or
// Unsign during pulses by polarity; the channel select and DAC code; and
// that per = 0 stops stimulation.
module tb_stim_fsm;
  import microstim_pkg::*;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 wv = 1'b0;
  logic [7:0]           w = '0;
  logic                 pwp, pulse, sign, unsign, ok, err;
  logic [CHANNELS-1:0]  chan_en;
  logic [AMP_BITS-1:0]  code;
  stim_cfg_t            cfg;
  int                   checks = 0, failures = 0;
  int                   n_ok = 0, n_err = 0;

  stim_fsm dut (
    .clk(clk), .rst_n(rst_n), .byte_valid_i(wv), .byte_i(w),
    .pw_pulse_o(pwp), .filt_pulse_i(pwp), .pulse_o(pulse), .sign_o(sign), .unsign_o(unsign),
    .chan_en_o(chan_en), .dac_code_o(code), .cfg_o(cfg), .cmd_ok_o(ok), .cmd_err_o(err)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok_, input string what);
    checks++;
    if (!ok_) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // pulse measurement and per-cycle output checks
  int cyc = 0, cur_w = 0;
  int rises[$];
  int widths[$];
  logic pulse_d = 1'b0;
  always @(posedge clk) begin
    if (ok) n_ok++;
    if (err) n_err++;
    if (pulse && !pulse_d) rises.push_back(cyc);
    if (pulse) cur_w++;
    if (!pulse && pulse_d) begin
      widths.push_back(cur_w);
      cur_w = 0;
    end
    if (rst_n && pulse) begin
      check(sign == !cfg.polarity && unsign == cfg.polarity, "Sign/Unsign during pulse");
      check(chan_en == (CHANNELS'(1) << cfg.channel) && code == cfg.amp, "channel and code");
    end
    if (rst_n && !pulse) check(!sign && !unsign, "bridge open between pulses");
    pulse_d <= pulse;
    cyc++;
  end

  task automatic put(input logic [7:0] v);
    @(negedge clk);
    w  = v;
    wv = 1'b1;
    @(negedge clk);
    wv = 1'b0;
    repeat (5) @(negedge clk);
  endtask

  task automatic command(input bit pol, input int ch, input int amp, input int pw, input int per);
    stim_cfg_t cfg_prev = cfg;
    put(hdr_word(pol, 3'(ch)));
    put(8'(amp));
    put(8'(pw));
    check(cfg == cfg_prev, "settings unchanged until the command is complete");
    put(8'(per));
    check(cfg.polarity == pol && cfg.channel == 3'(ch) && cfg.amp == 5'(amp) &&
          cfg.pw == 7'(pw) && cfg.per == 7'(per), "settings loaded");
  endtask

  task automatic observe(input int pw, input int per, input int npulses);
    rises.delete();
    widths.delete();
    repeat (npulses * per * 1000 + 10) @(negedge clk);
    check(rises.size() == npulses, "number of pulses");
    for (int i = 1; i < rises.size(); i++) check(rises[i] - rises[i-1] == per * 1000, "pulse period");
    foreach (widths[i]) check(widths[i] == pw * 10, "pulse width");
  endtask

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, o0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2000) @(negedge clk);
    check(rises.size() == 0 && cfg == CFG_OFF, "off after reset");
    // 300 us pulses at 20 Hz on channel 3, forward current
    o0 = n_ok;
    command(1'b0, 3, 20, 30, 50);
    check(n_ok == o0 + 1, "command accepted");
    observe(30, 50, 3);
    // malformed input
    e0 = n_err;
    put(8'd17);                                 // data word with no header
    check(n_err == e0 + 1, "stray data word rejected");
    put(hdr_word(1'b1, 3'd7));
    command(1'b1, 7, 31, 5, 2);                 // header inside a command restarts it
    check(n_err == e0 + 2, "header inside a command flagged");
    observe(5, 2, 5);
    e0 = n_err;
    o0 = n_ok;
    put(hdr_word(1'b0, 3'd1));
    put(8'hE0);                                 // amplitude word with stray bits
    put(8'd10);
    put(8'd10);
    check(n_err == e0 + 3 && n_ok == o0, "bad amplitude word rejects the command");
    check(cfg.channel == 3'd7, "settings kept after a rejected command");
    // random commands
    for (int i = 0; i < 4; i++) begin
      int pw = $urandom_range(1, 99);
      int per = $urandom_range(2, 6);
      command(1'($urandom), $urandom_range(0, 7), $urandom_range(0, 31), pw, per);
      observe(pw, per, 3);
    end
    // stop
    command(1'b0, 0, 0, 30, 0);
    observe(30, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
