// Behavioural model (not synthesizable hardware) of the 5-bit current-mode
// DAC of the stimulator chip.
//
// The real DAC is a network of PMOS transistors in the triode region,
// binary weighted by the inputs D4..D0 and biased from Vref, whose summed
// drain current is the reference current Iref. The model gives the ideal
// transfer Iref = code * STEP_NA, in nanoamperes: 32 levels of 108 uA,
// the design value, from 0 to 3.348 mA. The fabricated chip measured about
// 87 uA per level (2.77 mA at full scale); set STEP_NA = 87000 to model it.
// Vref is kept as a port so the model has the real part's pins; a Vref of
// 0 turns the DAC off. No timing: the output follows the code at once.
module current_dac
  import microstim_pkg::na_t;
#(
  parameter int STEP_NA = 108000
) (
  input  logic [4:0] d_i,
  input  logic       vref_i,
  output na_t         iref_na_o
);

  always_comb iref_na_o = vref_i ? int'(d_i) * STEP_NA : 0;

endmodule
