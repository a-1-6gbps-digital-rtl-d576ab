// error_checker: PRBS bit error checker on the recovered data.
//
// It checks the recovered data against a pseudo-random bit sequence, either
// PRBS7 (x^7 + x^6 + 1, period 2^7-1) or PRBS31 (x^31 + x^28 + 1, period
// 2^31-1), chosen by prbs31. After clear, the first 7 or 31 received bits
// are loaded into a local generator (seeding). From then on the generator
// runs on its own and every received bit is compared with the bit it
// predicts; a mismatch counts one error. Because the generator does not
// take in received bits after seeding, one wrong bit counts as one error.
// If the seed itself was wrong the error rate stays near one half; clear
// then starts over.
//
// Interface and timing: one bit per clk edge while en is high. synced goes
// high once seeding is done. bits counts checked bits and errors counts
// mismatches; both saturate. A change of prbs31 takes effect at the next
// clear.
// The design has an on-chip error checker used with 2^7-1 and 2^31-1 PRBS
// data; its insides are not given, so the self-seeding generator, the
// counters and their widths are this design's choices.
module error_checker #(
  parameter int unsigned CNT_W = 32  // width of the bit and error counters
) (
  input  logic             clk,     // recovered clock
  input  logic             rst_n,   // asynchronous reset
  input  logic             clear,   // restart seeding and clear counters
  input  logic             en,      // a data bit is present this cycle
  input  logic             prbs31,  // 0: PRBS7, 1: PRBS31
  input  logic             din,     // recovered data bit
  output logic             synced,  // seeding done, comparing
  output logic             err,     // mismatch on this cycle's bit
  output logic [CNT_W-1:0] bits,    // bits compared
  output logic [CNT_W-1:0] errors   // mismatches counted
);
  timeunit 1ps; timeprecision 1fs;

  logic [30:0] sr;        // last 31 bits, [0] newest
  logic [4:0]  fill;      // bits loaded while seeding
  logic        mode31;    // polynomial latched at clear
  logic        pred;      // predicted next bit

  always_comb begin
    pred = mode31 ? (sr[30] ^ sr[27]) : (sr[6] ^ sr[5]);
    err  = synced && en && (din != pred);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr     <= '0;
      fill   <= '0;
      mode31 <= 1'b0;
      synced <= 1'b0;
      bits   <= '0;
      errors <= '0;
    end else if (clear) begin
      sr     <= '0;
      fill   <= '0;
      mode31 <= prbs31;
      synced <= 1'b0;
      bits   <= '0;
      errors <= '0;
    end else if (en) begin
      if (!synced) begin
        sr   <= {sr[29:0], din};
        fill <= fill + 5'd1;
        if (fill == (mode31 ? 5'd30 : 5'd6)) synced <= 1'b1;
      end else begin
        sr <= {sr[29:0], pred};
        if (bits != '1) bits <= bits + 1'b1;
        if (err && errors != '1) errors <= errors + 1'b1;
      end
    end
  end

endmodule
