// dsm2: second-order delta-sigma modulator with a three-level output.
//
// The signed IN_W-bit input x is read as a fraction of the output step:
// x = F = 2**(IN_W-1) would be +1, x = -F is -1. Each clock the modulator
// emits -1, 0 or +1 so that the running average of the output equals x/F,
// with the quantization error pushed to high frequencies, where the CDR
// loop filters it out.
//
// Structure (error feedback, noise transfer (1 - z^-1)^2):
//   v = x - 2*e[n-1] + e[n-2]
//   y = +1 if v >= F/2, -1 if v < -F/2, else 0
//   e = y*F - v            (clipped to +-2F)
// so that y*F = x + e - 2*e[n-1] + e[n-2]. With only three output levels
// the quantizer overloads now and then (|v| above 1.5F), so e is not held
// to +-F/2; the loop stays stable for inputs up to at least half of full
// scale, with |e| below 2F, and then the shaping is exact. For inputs near
// full scale the clip at +-2F keeps the state bounded and the flag ovl
// reports it. The CDR only uses about a third of full scale for its
// tracking range.
//
// Timing: y is registered, one clock after x. The design runs the
// modulator from the quarter-rate clock.
// Following the design: second-order modulator, 11 bits in, 3 levels out.
// Own choices: the error-feedback structure, the input scaling, rounding
// thresholds at +-F/2 and the clip on overload.
module dsm2
  import dcdr_pkg::*;
#(
  parameter int unsigned IN_W = dcdr_pkg::ACC_W_DEF - dcdr_pkg::DROP_W_DEF  // 11
) (
  input  logic                   clk,    // quarter-rate clock
  input  logic                   rst_n,  // asynchronous reset
  input  logic signed [IN_W-1:0] x,      // input, fraction of one step
  output tri_t                   y,      // three-level output
  output logic                   ovl     // error clipped this cycle
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned V_W = IN_W + 4;
  localparam logic signed [V_W-1:0] F = V_W'(1) <<< (IN_W - 1);
  localparam logic signed [V_W-1:0] H = F >>> 1;
  localparam logic signed [V_W-1:0] E_MAX = F <<< 1;  // error clip

  logic signed [V_W-1:0] e1, e2;   // errors of the last two cycles
  logic signed [V_W-1:0] v, e_raw, e_clip;
  tri_t                  q;

  always_comb begin
    v = V_W'(x) - (e1 <<< 1) + e2;
    if (v >= H) begin
      q     = TRI_UP;
      e_raw = F - v;
    end else if (v < -H) begin
      q     = TRI_DN;
      e_raw = -F - v;
    end else begin
      q     = TRI_ZERO;
      e_raw = -v;
    end
    ovl    = (e_raw > E_MAX) || (e_raw < -E_MAX);
    e_clip = (e_raw > E_MAX) ? E_MAX : (e_raw < -E_MAX) ? -E_MAX : e_raw;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1 <= '0;
      e2 <= '0;
      y  <= TRI_ZERO;
    end else begin
      e1 <= e_clip;
      e2 <= e1;
      y  <= q;
    end
  end

endmodule
