// Behavioural model (not synthesizable hardware) of the stimulator chip's
// output bridge (the "control logic" of the analog channel).
//
// Two complementary switch pairs steer the mirror current through the
// nerve load in either direction: Sign drives it one way (+Iout), Unsign
// the other (-Iout). With neither input high the bridge is open and no
// current flows. Both high is not a valid input (it would short the
// supply through the load path); the model then gives 0 and an assertion
// reports it. Current is in signed nanoamperes. No timing. The two
// direction inputs follow the published chip; the treatment of the
// invalid case is this model's own.
module output_bridge
  import microstim_pkg::na_t;
(
  input  na_t   iout_na_i,
  input  logic sign_i,
  input  logic unsign_i,
  output na_t   iload_na_o
);

  always_comb begin
    unique case ({sign_i, unsign_i})
      2'b10:   iload_na_o =  iout_na_i;
      2'b01:   iload_na_o = -iout_na_i;
      default: iload_na_o = 0;
    endcase
  end

  always_comb a_not_both: assert (!(sign_i && unsign_i))
    else $error("output_bridge: Sign and Unsign both high");

endmodule
