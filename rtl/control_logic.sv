// Control logic circuit of the stimulation state machine.
//
// Turns the active settings into the signals of the current stimulation
// module: a one-hot select of the stimulation channel, the 5-bit current
// code D4..D0 for the DAC, and the bridge controls Sign and Unsign that
// set the direction of the current through the nerve. Sign and Unsign are
// raised only while the stimulation pulse is high, one of them chosen by
// the polarity setting, so the bridge is open between pulses and the two
// are never on together (this gating is this design's choice; the
// published design says only that Sign and Unsign set the direction).
// Purely combinational.
module control_logic
  import microstim_pkg::*;
(
  input  stim_cfg_t             cfg_i,
  input  logic                  pulse_i,
  output logic                  sign_o,
  output logic                  unsign_o,
  output logic [CHANNELS-1:0]   chan_en_o,
  output logic [AMP_BITS-1:0]   dac_code_o
);

  always_comb begin
    chan_en_o = '0;
    chan_en_o[cfg_i.channel] = 1'b1;
  end

  assign dac_code_o = cfg_i.amp;
  assign sign_o     = pulse_i & ~cfg_i.polarity;
  assign unsign_o   = pulse_i &  cfg_i.polarity;

endmodule
