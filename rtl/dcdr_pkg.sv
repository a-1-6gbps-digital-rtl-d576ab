// dcdr_pkg: types and constants shared by the digital CDR.
//
// Every "+1, 0, -1" wire in the loop (phase detector output, majority vote
// output, delta-sigma output, DAC inputs) carries a three-level code. It is
// kept as a pair of one-hot flags, UP meaning +1 and DN meaning -1, which is
// how the DAC inputs are labelled; neither flag set means 0. Both flags set
// never leaves a block of this design and is read as 0 where it could occur.
// The widths below are the ones the design is built for: a 14-bit integral
// accumulator of which the 3 least significant bits are dropped, leaving an
// 11-bit word for the delta-sigma modulator.
package dcdr_pkg;

  timeunit 1ps; timeprecision 1fs;

  typedef struct packed {
    logic up;  // +1
    logic dn;  // -1
  } tri_t;

  localparam tri_t TRI_ZERO = '{up: 1'b0, dn: 1'b0};
  localparam tri_t TRI_UP   = '{up: 1'b1, dn: 1'b0};
  localparam tri_t TRI_DN   = '{up: 1'b0, dn: 1'b1};

  // Default sizes of the integral path.
  localparam int unsigned ACC_W_DEF  = 14;  // accumulator width
  localparam int unsigned DROP_W_DEF = 3;   // LSBs discarded before the DSM

  // Signed value (-1, 0, +1) of a three-level code.
  function automatic logic signed [1:0] tri_value(tri_t t);
    if (t.up && !t.dn) return 2'sd1;
    if (t.dn && !t.up) return -2'sd1;
    return 2'sd0;
  endfunction

endpackage
