// windowed_adc: behavioural model of the windowed A/D converter; it is not
// synthesizable and stands for a mixed-signal block.
//
// The converter compares the attenuated output voltage v_sense with a window
// centred on the reference v_ref * V_LSB and reports the difference in steps
// of V_LSB, rounded to the nearest step and limited to the nine values -4..+4:
//   e = clamp(round((v_ref * V_LSB - v_sense) / V_LSB), -4, 4)
// A positive error means the output is below the reference. The model is
// continuous-time (no sampling, no conversion delay): the compensator samples
// e on its own clock, while the mode logic watches it all the time. The nine
// output levels and the sign follow the controller description; V_LSB and the
// reference encoding are this design's choices.
module windowed_adc
  import sd_pkg::*;
#(
  parameter int unsigned REF_BITS = 8,
  parameter real         V_LSB    = 0.01   // volts per error step at the A/D input
) (
  input  real                 v_sense,  // attenuated output voltage H*v_out
  input  logic [REF_BITS-1:0] v_ref,    // reference, in steps of V_LSB
  output err_t                e         // error e[n], -4..+4
);

  real diff;
  int  steps;

  always_comb begin
    diff  = (real'(v_ref) * V_LSB - v_sense) / V_LSB;
    steps = int'($floor(diff + 0.5));
    if (steps > E_LIMIT)       e = err_t'(E_LIMIT);
    else if (steps < -E_LIMIT) e = err_t'(-E_LIMIT);
    else                       e = err_t'(steps);
  end

endmodule
