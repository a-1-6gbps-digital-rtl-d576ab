// bbpd: receiver front end with bang-bang (early/late) phase detection.
//
// Two samplers watch the serial input: the data sampler on the rising edge
// of the recovered clock rck, which is meant to sit in the middle of each
// bit, and the edge sampler on the falling edge, half a bit later, which
// is meant to sit on the bit boundary. A flop on the next rising edge
// retimes both so that three samples of the same boundary are available
// together: the previous bit d(n-1), the boundary sample x(n-1) and the
// current bit d(n).
//
//   early = x ^ d(n)     the boundary sample still shows the old bit: the
//                        clock samples ahead of the data, so it must slow
//   late  = x ^ d(n-1)   the boundary sample already shows the new bit: the
//                        clock lags, so it must speed up
//
// Both are 0 when there is no transition. The three-level output pd is UP
// (+1) on late, DN (-1) on early and 0 otherwise (also 0 in the impossible
// case of both, which only a glitch between samples can cause).
// rdata is the retimed data bit d(n-1).
//
// Following the design: samplers on the recovered clock, a retiming flop
// behind the data sampler, and two XORs forming E and L. Own choices: which
// clock edge samples data and which samples edges, the polarity of E and L
// (the sense in which "early" is meant), the asynchronous reset and taking
// rdata from the retiming flop. The sense amplifiers are modelled as flops.
//
// Timing: all outputs change right after a rising edge of rck; pd and
// early/late are combinational from flops, so a phase decision reaches the
// proportional DAC within the same bit.
module bbpd
  import dcdr_pkg::*;
(
  input  logic rck,    // recovered clock, full rate (one bit per period)
  input  logic rst_n,  // asynchronous reset, active low
  input  logic din,    // serial data input
  output logic rdata,  // recovered, retimed data
  output logic early,  // E: clock early
  output logic late,   // L: clock late
  output tri_t pd      // three-level phase decision: UP = late, DN = early
);
  timeunit 1ps; timeprecision 1fs;

  logic d_smp;  // data sampler output, d(n)
  logic x_smp;  // edge sampler output
  logic d_old;  // d(n-1)
  logic x_ret;  // edge sample between d(n-1) and d(n)

  always_ff @(posedge rck or negedge rst_n) begin
    if (!rst_n) begin
      d_smp <= 1'b0;
      d_old <= 1'b0;
      x_ret <= 1'b0;
    end else begin
      d_smp <= din;
      d_old <= d_smp;
      x_ret <= x_smp;
    end
  end

  always_ff @(negedge rck or negedge rst_n) begin
    if (!rst_n) x_smp <= 1'b0;
    else        x_smp <= din;
  end

  always_comb begin
    early = x_ret ^ d_smp;
    late  = x_ret ^ d_old;
    pd.up = late & ~early;
    pd.dn = early & ~late;
  end

  assign rdata = d_old;

endmodule
