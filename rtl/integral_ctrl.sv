// integral_ctrl: the integral path of the CDR loop filter.
//
// The full-rate phase decisions are de-multiplexed by four (pd_demux),
// reduced to one three-level decision per four bits by majority vote,
// integrated in a 14-bit saturating accumulator, stripped of the
// accumulator's 3 LSBs and truncated to a three-level IDAC code by a
// second-order delta-sigma modulator. Everything after the de-multiplexer
// runs from the quarter-rate clock clk_q that pd_demux derives from rck.
//
// Timing, in clk_q cycles from the word load: the vote is combinational,
// the accumulator registers it at the next clk_q edge and the modulator
// output follows one clk_q edge later.
//
// DSM_DIV sets the modulator's clock as a division of rck: 4 (the design's
// configuration, the modulator on clk_q, 400 MHz at 1.6 Gb/s) or 8 (200 MHz,
// the slower rate the design was also measured at, which lets more
// quantization noise through to the clock). For 8, a 3-bit counter on rck
// makes the modulator clock; it rises two rck cycles after a clk_q edge,
// so the modulator samples a settled accumulator.
//
// Following the design: the chain demux -> majority vote -> 14-bit
// accumulator -> drop 3 LSBs -> second-order DSM -> IDAC code, all at
// quarter rate, and the 200 MHz modulator clock as an option. The inner
// choices are those of the sub-blocks.
module integral_ctrl
  import dcdr_pkg::*;
#(
  parameter int unsigned ACC_W  = dcdr_pkg::ACC_W_DEF,
  parameter int unsigned DROP_W = dcdr_pkg::DROP_W_DEF,
  parameter int unsigned DSM_DIV = 4   // modulator clock = rck / DSM_DIV (4 or 8)
) (
  input  logic                           rck,     // recovered clock
  input  logic                           rst_n,   // asynchronous reset
  input  tri_t                           pd,      // phase decision
  output logic                           clk_q,   // quarter-rate clock
  output tri_t                           vote,    // majority vote
  output logic signed [ACC_W-1:0]        acc,     // integral state
  output logic                           sat,     // accumulator at a limit
  output tri_t                           idac,    // IDAC code
  output logic                           dsm_ovl  // modulator clipped
);
  timeunit 1ps; timeprecision 1fs;

  tri_t [3:0]                     word;
  logic signed [ACC_W-DROP_W-1:0] frac;
  logic                           clk_dsm;

  if (DSM_DIV == 8) begin : g_dsm_div8
    logic [2:0] cnt8;
    always_ff @(posedge rck or negedge rst_n) begin
      if (!rst_n) cnt8 <= '0;
      else        cnt8 <= cnt8 + 3'd1;
    end
    assign clk_dsm = cnt8[2];
  end else begin : g_dsm_div4
    assign clk_dsm = clk_q;
  end

  if (DSM_DIV != 4 && DSM_DIV != 8) begin : g_dsm_div_check
    $error("integral_ctrl: DSM_DIV must be 4 or 8");
  end

  pd_demux u_demux (
    .rck   (rck),
    .rst_n (rst_n),
    .pd    (pd),
    .clk_q (clk_q),
    .word  (word)
  );

  majority_vote u_mv (
    .word (word),
    .vote (vote)
  );

  int_accum #(.ACC_W(ACC_W), .DROP_W(DROP_W)) u_acc (
    .clk   (clk_q),
    .rst_n (rst_n),
    .inc   (vote),
    .acc   (acc),
    .frac  (frac),
    .sat   (sat)
  );

  dsm2 #(.IN_W(ACC_W - DROP_W)) u_dsm (
    .clk   (clk_dsm),
    .rst_n (rst_n),
    .x     (frac),
    .y     (idac),
    .ovl   (dsm_ovl)
  );

endmodule
