// dcdr_top: the digital clock and data recovery loop, 1.6 Gb/s.
//
// A bang-bang phase detector (bbpd) samples the serial input with the
// recovered clock and says, bit by bit, whether the clock is early or late.
// That decision drives two paths that are summed as currents at the VCO's
// fine control node V_F:
//   * proportional path: the decision goes straight to a three-level DAC
//     (PDAC), which moves the VCO by +-dF_P (4 MHz) for as long as the
//     decision lasts. No adder is needed, which is what lets this path run
//     at full rate with almost no latency.
//   * integral path (integral_ctrl): the decisions are de-multiplexed by four,
//     majority-voted to one three-level decision per four bits, integrated
//     at quarter rate in a 14-bit accumulator whose 3 LSBs are dropped, and
//     the remaining 11 bits are truncated to three levels by a second-order
//     delta-sigma modulator. A second three-level DAC (IDAC, step dF_I =
//     12 MHz) turns the modulator output into current; the average of its
//     output sets the VCO frequency with a resolution of dF_I/1024.
// The VCO's coarse control V_C comes from outside and only has to bring
// the VCO within the pull-in range. An error checker compares the
// recovered data with a PRBS7 or PRBS31 sequence.
//
// The PD, demux, vote, accumulator, modulator and checker are synthesizable
// logic. The two DACs, the V_F node and the VCO are behavioural models of
// analog circuits, so the top as a whole simulates the closed loop but is
// not a synthesis target; dcdr_top's digital part is everything except
// u_pdac, u_idac, u_vf and u_vco.
//
// Interface: din is the serial input; rck and rdata are the recovered clock
// and data. The remaining outputs expose the loop's internal decisions for
// observation. The checker counts bits on rck while chk_en is high.
// Following the design: the block structure and the 14/3/11-bit integral
// path, the step sizes dF_P = 4 MHz and dF_I = 12 MHz, quarter-rate
// integral path. DSM_DIV = 8 clocks the modulator at an eighth of the bit
// rate instead (200 MHz), the slower rate the design was also measured at.
// Own choices are listed in each block.
module dcdr_top
  import dcdr_pkg::*;
#(
  parameter int unsigned ACC_W  = dcdr_pkg::ACC_W_DEF,   // 14
  parameter int unsigned DROP_W = dcdr_pkg::DROP_W_DEF,  // 3
  parameter int unsigned DSM_DIV = 4,                    // modulator clock = rck/4
  parameter int unsigned CNT_W  = 32,                    // checker counters
  parameter real         I_P    = 10.0e-6,               // PDAC step, A
  parameter real         I_I    = 30.0e-6,               // IDAC step, A
  parameter real         K_F    = 4.0e8                  // VCO fine gain, Hz/V
) (
  input  logic                    rst_n,       // asynchronous reset
  input  logic                    din,         // serial data in
  input  real                     vc,          // coarse control voltage, V
  input  logic                    chk_clear,   // checker restart
  input  logic                    chk_en,      // checker enable
  input  logic                    chk_prbs31,  // checker polynomial
  output logic                    rck,         // recovered clock
  output logic [3:0]              ph,          // VCO phases
  output logic                    rdata,       // recovered data
  output logic                    early,       // PD: clock early
  output logic                    late,        // PD: clock late
  output logic                    clk_q,       // quarter-rate clock
  output tri_t                    vote,        // majority vote
  output logic signed [ACC_W-1:0] acc,         // integral accumulator
  output logic                    acc_sat,     // accumulator at a limit
  output tri_t                    idac_code,   // modulator output
  output logic                    dsm_ovl,     // modulator clipped
  output real                     vf,          // fine control voltage, V
  output logic                    chk_synced,  // checker seeded
  output logic                    chk_err,     // checker mismatch
  output logic [CNT_W-1:0]        chk_bits,    // bits checked
  output logic [CNT_W-1:0]        chk_errors   // errors counted
);
  timeunit 1ps; timeprecision 1fs;

  tri_t pd;
  real  i_p, i_i;

  bbpd u_pd (
    .rck   (rck),
    .rst_n (rst_n),
    .din   (din),
    .rdata (rdata),
    .early (early),
    .late  (late),
    .pd    (pd)
  );

  integral_ctrl #(.ACC_W(ACC_W), .DROP_W(DROP_W), .DSM_DIV(DSM_DIV)) u_int (
    .rck     (rck),
    .rst_n   (rst_n),
    .pd      (pd),
    .clk_q   (clk_q),
    .vote    (vote),
    .acc     (acc),
    .sat     (acc_sat),
    .idac    (idac_code),
    .dsm_ovl (dsm_ovl)
  );

  tri_dac #(.I_UNIT(I_P)) u_pdac (.code(pd),        .i_o(i_p));
  tri_dac #(.I_UNIT(I_I)) u_idac (.code(idac_code), .i_o(i_i));

  vf_summer #(.R_LOAD(1.0e3), .I_BIAS(I_P + I_I), .V_MID(0.6)) u_vf (
    .i_p (i_p),
    .i_i (i_i),
    .vf  (vf)
  );

  ring_vco #(.K_F(K_F), .V_MID(0.6)) u_vco (
    .vc  (vc),
    .vf  (vf),
    .ph  (ph),
    .rck (rck)
  );

  error_checker #(.CNT_W(CNT_W)) u_chk (
    .clk    (rck),
    .rst_n  (rst_n),
    .clear  (chk_clear),
    .en     (chk_en),
    .prbs31 (chk_prbs31),
    .din    (rdata),
    .synced (chk_synced),
    .err    (chk_err),
    .bits   (chk_bits),
    .errors (chk_errors)
  );

endmodule
