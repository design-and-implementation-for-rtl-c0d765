// Self-checking testbench of the control logic circuit.
//
// Sweeps every channel, both polarities and both pulse levels with random
// amplitude, width and period settings, and checks the one-hot channel
// select, the DAC code, and that Sign or Unsign (never both) is high only
// during the pulse, as chosen by the polarity.
module tb_control_logic;
  import microstim_pkg::*;

  stim_cfg_t            cfg;
  logic                 pulse;
  logic                 sign, unsign;
  logic [CHANNELS-1:0]  chan_en;
  logic [AMP_BITS-1:0]  code;
  int                   checks = 0, failures = 0;
  logic                 clk = 1'b0;

  control_logic dut (
    .cfg_i(cfg), .pulse_i(pulse), .sign_o(sign), .unsign_o(unsign),
    .chan_en_o(chan_en), .dac_code_o(code)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 8; rep++)
      for (int ch = 0; ch < CHANNELS; ch++)
        for (int pol = 0; pol < 2; pol++)
          for (int p = 0; p < 2; p++) begin
            cfg.polarity = 1'(pol);
            cfg.channel  = CH_BITS'(ch);
            cfg.amp      = AMP_BITS'($urandom);
            cfg.pw       = PW_BITS'($urandom);
            cfg.per      = PER_BITS'($urandom);
            pulse        = 1'(p);
            @(posedge clk);
            check(chan_en == (CHANNELS'(1) << ch), "one-hot channel select");
            check(code == cfg.amp, "DAC code");
            check(sign == (p == 1 && pol == 0), "Sign");
            check(unsign == (p == 1 && pol == 1), "Unsign");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
