// Behavioural model (not synthesizable hardware) of the 8-channel current
// stimulation module, the analog chip of the stimulator.
//
// Each channel is a 5-bit current-mode DAC, a current mirror and an output
// bridge: the code sets the current level (32 levels, 108 uA each by
// default), the mirror drives it into the electrode, and Sign/Unsign pick
// its direction. The digital side selects one channel: only that channel
// receives the code and the bridge controls; the code reaches the DAC only
// while the stimulation pulse is high. The output is the signed current
// into each electrode pair, in nanoamperes. No timing. The channel count
// and the DAC / mirror / bridge structure follow the published chip; one
// DAC per channel and gating the code by the pulse are this model's
// choices.
module current_stim_module
  import microstim_pkg::na_t;
#(
  parameter int unsigned CHANNELS = 8,
  parameter int          STEP_NA  = 108000,
  parameter int          GAIN     = 1
) (
  input  logic [4:0]          dac_code_i,
  input  logic                pulse_i,
  input  logic                sign_i,
  input  logic                unsign_i,
  input  logic [CHANNELS-1:0] chan_en_i,
  output na_t                  i_elec_na_o [CHANNELS]
);

  for (genvar c = 0; c < CHANNELS; c++) begin : g_ch
    logic [4:0] code;
    na_t         iref, iout;

    assign code = (chan_en_i[c] && pulse_i) ? dac_code_i : 5'd0;

    current_dac #(.STEP_NA(STEP_NA)) u_dac (
      .d_i      (code),
      .vref_i   (1'b1),
      .iref_na_o(iref)
    );

    current_mirror #(.GAIN(GAIN)) u_mirror (
      .iref_na_i(iref),
      .iout_na_o(iout)
    );

    output_bridge u_bridge (
      .iout_na_i (iout),
      .sign_i    (sign_i && chan_en_i[c]),
      .unsign_i  (unsign_i && chan_en_i[c]),
      .iload_na_o(i_elec_na_o[c])
    );
  end

endmodule
