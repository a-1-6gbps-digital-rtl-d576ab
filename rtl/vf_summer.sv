// vf_summer: behavioural model of the node that sums the DAC currents into
// the fine control voltage V_F.
//
// This is a behavioural model of an analog circuit, not synthesizable
// logic. The proportional and integral DAC currents meet at one node, which
// is loaded by a diode-connected device and a bias current sink. Around its
// operating point the node is modelled as a resistance R_LOAD:
//   V_F = V_MID + R_LOAD * (i_p + i_i - I_BIAS)
// With I_BIAS equal to the sum of the two DACs' mid-scale currents, V_F sits
// at V_MID when both codes are 0.
//
// Interface: two currents in (A), one voltage out (V), no delay.
// Following the design: summing the two paths in the current domain into
// V_F. Own choices: the linear model, its values and the sign (more current
// gives a higher V_F).
module vf_summer #(
  parameter real R_LOAD = 1.0e3,    // small-signal node resistance, ohm
  parameter real I_BIAS = 40.0e-6,  // bias sink current, A
  parameter real V_MID  = 0.6       // V_F at mid-scale, V
) (
  input  real i_p,  // proportional DAC current, A
  input  real i_i,  // integral DAC current, A
  output real vf    // fine control voltage, V
);
  timeunit 1ps; timeprecision 1fs;

  always_comb vf = V_MID + R_LOAD * (i_p + i_i - I_BIAS);

endmodule
