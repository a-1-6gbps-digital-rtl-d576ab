// int_accum: integral path accumulator.
//
// A signed ACC_W-bit register adds the three-level vote (+1, 0 or -1) once
// per quarter-rate clock. It saturates at its most positive and most
// negative values rather than wrapping, since a wrap would throw the VCO
// frequency from one end of the integral range to the other. The DROP_W
// least significant bits are left out of the output word frac, which
// carries the upper ACC_W-DROP_W bits to the delta-sigma modulator; the
// dropped bits make the integral path slower and so reduce the dither that
// its loop latency would otherwise cause.
//
// Timing: acc and frac change one clk cycle after the vote is sampled.
// sat is high while acc sits at either limit.
// Following the design: 14-bit accumulator at quarter rate, +-1 input, 3 LSBs
// discarded, 11 bits onward. Own choices: two's complement coding with reset
// to 0 (the middle of the range, where the VCO runs at its coarse-tuned
// frequency), and saturation.
module int_accum
  import dcdr_pkg::*;
#(
  parameter int unsigned ACC_W  = dcdr_pkg::ACC_W_DEF,   // accumulator bits
  parameter int unsigned DROP_W = dcdr_pkg::DROP_W_DEF   // LSBs discarded
) (
  input  logic                             clk,    // quarter-rate clock
  input  logic                             rst_n,  // asynchronous reset
  input  tri_t                             inc,    // +1 / 0 / -1
  output logic signed [ACC_W-1:0]          acc,    // full accumulator
  output logic signed [ACC_W-DROP_W-1:0]   frac,   // acc without its LSBs
  output logic                             sat     // acc at a limit
);
  timeunit 1ps; timeprecision 1fs;

  localparam logic signed [ACC_W-1:0] MAX_V = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] MIN_V = {1'b1, {(ACC_W-1){1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else if (inc.up && !inc.dn && acc != MAX_V) acc <= acc + 1'b1;
    else if (inc.dn && !inc.up && acc != MIN_V) acc <= acc - 1'b1;
  end

  assign frac = acc[ACC_W-1:DROP_W];
  assign sat  = (acc == MAX_V) || (acc == MIN_V);

endmodule
