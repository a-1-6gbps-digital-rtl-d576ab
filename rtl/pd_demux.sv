// pd_demux: 1:4 de-multiplexer of the phase detector output, with the
// quarter-rate clock for the integral path.
//
// Every recovered-clock cycle the three-level phase decision (2 bits) is
// shifted into a four-entry register. Every fourth cycle the four newest
// decisions are copied in parallel into an 8-bit word, which then holds for
// four cycles. A 2-bit counter divides the recovered clock by four; its MSB
// is the quarter-rate clock clk_q.
//
// Interface and timing: word[0] is the newest decision, word[3] the oldest.
// The word is loaded on the rck edge where the counter wraps (3 -> 0); clk_q
// rises two rck cycles later (counter 1 -> 2), in the middle of the word's
// four-cycle life, so logic on clk_q always samples a settled word.
// Following the design: the 2-bit decision stream de-multiplexed by four to
// 8 bits at quarter rate. Own choices: the shift-and-copy structure, deriving
// the quarter-rate clock from a counter and the phase between the word load
// and the clk_q edge.
module pd_demux
  import dcdr_pkg::*;
(
  input  logic       rck,    // recovered clock, full rate
  input  logic       rst_n,  // asynchronous reset, active low
  input  tri_t       pd,     // phase decision of the current bit
  output logic       clk_q,  // quarter-rate clock (rck / 4, 50% duty)
  output tri_t [3:0] word    // four decisions, [0] newest
);
  timeunit 1ps; timeprecision 1fs;

  logic [1:0] cnt;
  tri_t [2:0] sh;  // three previous decisions, [0] newest

  always_ff @(posedge rck or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      sh   <= '{default: TRI_ZERO};
      word <= '{default: TRI_ZERO};
    end else begin
      cnt <= cnt + 2'd1;
      sh  <= {sh[1:0], pd};
      if (cnt == 2'd3) word <= {sh, pd};
    end
  end

  assign clk_q = cnt[1];

endmodule
