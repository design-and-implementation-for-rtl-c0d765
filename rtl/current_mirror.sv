// Behavioural model (not synthesizable hardware) of the stimulator chip's
// output current mirror.
//
// The cascoded NMOS mirror copies the DAC's reference current Iref into
// the output branch, scaled by the mirror ratio: Iout = GAIN * Iref, in
// nanoamperes. The ratio of the fabricated mirror is not known; GAIN = 1
// keeps the stimulus full scale at the DAC's 3.5 mA range. The output is
// limited to what the 5 V supply can drive through the electrode load:
// COMPLIANCE_NA (5 mA into 1 kOhm by default). No timing.
module current_mirror
  import microstim_pkg::na_t;
#(
  parameter int GAIN          = 1,
  parameter int COMPLIANCE_NA = 5000000
) (
  input  na_t iref_na_i,
  output na_t iout_na_o
);

  na_t scaled;

  always_comb begin
    scaled    = iref_na_i * GAIN;
    iout_na_o = (scaled > COMPLIANCE_NA) ? COMPLIANCE_NA : scaled;
  end

endmodule
