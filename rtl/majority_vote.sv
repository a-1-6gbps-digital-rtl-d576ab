// majority_vote: re-quantizes four three-level phase decisions to one.
//
// The four decisions of a de-multiplexed word are added as signed values
// (+1 for UP, -1 for DN, 0 otherwise). The result is UP if the sum is
// positive, DN if it is negative and 0 on a tie, so UP wins only when more
// of the four bits said "late" than said "early", and the other way round.
//
// Purely combinational. The design calls for a simple majority vote to 3
// levels; reading it as the sign of the sum, with ties giving 0, is this
// design's choice.
module majority_vote
  import dcdr_pkg::*;
(
  input  tri_t [3:0] word,  // four decisions
  output tri_t       vote   // three-level majority
);
  timeunit 1ps; timeprecision 1fs;

  logic signed [3:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < 4; i++) sum += 4'(tri_value(word[i]));
    vote.up = (sum > 0);
    vote.dn = (sum < 0);
  end

endmodule
