// tri_dac: behavioural model of the three-level current DAC.
//
// This is a behavioural model of an analog circuit, not synthesizable
// logic. The DAC turns a three-level code into an output current:
// -1 (DN) gives 0, 0 gives I_UNIT and +1 (UP) gives 2*I_UNIT. The same
// model serves as the proportional DAC, whose step sets the frequency step
// dF_P of the proportional path, and as the integral DAC, whose step sets
// dF_I. The transistor-level details of the real circuit (a steered pair of
// current sources with a transistor that suppresses clock feed-through
// glitches) are not modelled; the output follows the code at once.
//
// Interface: code in, current out in amperes.
// Following the design: the code-to-current map 0 / I / 2I. Own choice: the
// value of I_UNIT, picked together with the V_F summer and VCO gains so that
// the frequency steps come out as the design's dF_P and dF_I.
module tri_dac
  import dcdr_pkg::*;
#(
  parameter real I_UNIT = 10.0e-6  // current per step, A
) (
  input  tri_t code,  // UP = +1, DN = -1
  output real  i_o    // output current, A
);
  timeunit 1ps; timeprecision 1fs;

  always_comb i_o = I_UNIT * real'(1 + int'(tri_value(code)));

endmodule
