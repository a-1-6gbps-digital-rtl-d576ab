// tb_dcdr_top: closed-loop test of the whole CDR at its default sizes.
//
// A transmitter model sends PRBS data at 1.6 Gb/s times (1 + offset), with
// uniformly distributed edge jitter of +-JIT ps, into the CDR, whose VCO
// is coarse-tuned to exactly 1.6 GHz (V_C = 0.96 V). For each frequency
// offset the digital part is reset, the loop is given ACQ bits to acquire,
// and then the on-chip error checker, set to the sequence being sent,
// counts errors over MEAS bits. A run passes when
//   * the checker synchronises and counts no error,
//   * the recovered clock runs at the data rate (rck cycles during the
//     measurement equal the bits sent, within 2),
//   * the integral accumulator holds the offset: with 11 bits kept and
//     a 12 MHz step, one unit of acc>>3 is 12 MHz/1024 = 7.32 ppm of
//     1.6 GHz, so (acc>>3)*7.32 ppm must match the offset within 150 ppm.
// Offsets: +1000 and +-1500 ppm (inside the design's +-1500 ppm lock-in
// range: the recovered clock must tick exactly once per bit sent from reset
// to lock, i.e. no cycle slip), +-2000 and +-2500 ppm (outside it but
// inside the +-2500 ppm tracking range, so the loop slips cycles while the
// integral path pulls the VCO in).
// Two last runs lock at +600 ppm and then hold the line for 30,000 and for
// 72,000 identical digits. During such a run the detector is silent and the
// VCO keeps the frequency the integral path holds, so the clock drifts by
// whatever residual error that leaves (a few ppm). 30,000 digits must pass
// without a cycle slip; for 72,000, which is close to the limit, slips are
// reported but not failed. Both must relock and be error free afterwards.
// Mechanism counts, each of which must be non-zero: early and late
// decisions, UP/DN/0 votes, UP/DN/0 modulator codes, PRBS7 and PRBS31
// checking, the integral path acquiring a positive and a negative
// offset, cycle slipping outside the lock-in range and the identical-digit
// run. The quarter-rate clock must run at exactly a quarter of rck.
// During each measurement the rising edges of rck are timed against the
// transmitter's ideal (unjittered) bit grid: their mean must lie within
// 0.35..0.65 UI of the bit edge (the loop centres the data sampler) and
// their rms spread, which comes from the loop's own dither plus the data
// jitter it follows, must stay below 0.05 UI. No analog noise is modelled.
module tb_dcdr_top;
  import dcdr_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam real UI0  = 625.0;    // ps at 1.6 Gb/s
  localparam real JIT  = 15.0;     // ps, peak uniform edge jitter
  localparam int  ACQ  = 100_000;  // bits to acquire
  localparam int  MEAS = 20_000;   // bits checked

  logic rst_n = 1'b1, din = 1'b0;
  real  vc = 0.96;
  logic chk_clear = 1'b0, chk_en = 1'b0, chk_prbs31 = 1'b0;
  logic rck, rdata, early, late, clk_q, acc_sat, dsm_ovl;
  logic [3:0] ph;
  tri_t vote, idac_code;
  logic signed [13:0] acc;
  real  vf;
  logic chk_synced, chk_err;
  logic [31:0] chk_bits, chk_errors;

  int checks = 0, failures = 0;
  longint n_early = 0, n_late = 0, n_vup = 0, n_vdn = 0, n_v0 = 0;
  longint n_iup = 0, n_idn = 0, n_i0 = 0, n_rck = 0, n_q = 0;
  int n_slip_runs = 0, n_cid_runs = 0;
  int n_prbs7 = 0, n_prbs31 = 0, n_acq_pos = 0, n_acq_neg = 0;

  dcdr_top dut (
    .rst_n, .din, .vc, .chk_clear, .chk_en, .chk_prbs31,
    .rck, .ph, .rdata, .early, .late, .clk_q, .vote, .acc, .acc_sat,
    .idac_code, .dsm_ovl, .vf, .chk_synced, .chk_err, .chk_bits, .chk_errors
  );

  always @(posedge rck) begin
    n_rck++;
    n_early += longint'(early);
    n_late  += longint'(late);
  end

  always @(posedge clk_q) begin
    n_q++;
    if (vote == TRI_UP) n_vup++; else if (vote == TRI_DN) n_vdn++; else n_v0++;
    if (idac_code == TRI_UP) n_iup++; else if (idac_code == TRI_DN) n_idn++; else n_i0++;
  end

  initial begin
    #(1_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitter: PRBS7 (x^7+x^6+1) or PRBS31 (x^31+x^28+1)
  logic [30:0] lfsr = 31'h5555_1234;
  bit   tx_31 = 1'b0;
  real  tx_ui = UI0;
  realtime t_edge = 0.0;

  function automatic logic tx_bit();
    logic b = tx_31 ? (lfsr[30] ^ lfsr[27]) : (lfsr[6] ^ lfsr[5]);
    lfsr = {lfsr[29:0], b};
    return b;
  endfunction

  // free-running transmitter; tx_tick marks each new bit
  event tx_tick;
  bit   tx_on = 1'b0;
  int   cid_left = 0;

  // recovered-clock phase against the transmitter's ideal bit grid
  realtime last_ideal = 0.0;
  bit      ph_meas = 1'b0;
  real     ph_sum, ph_sq;
  longint  ph_n;
  real     worst_rms = 0.0;

  always @(posedge rck) begin
    real p;
    if (ph_meas) begin
      p = $realtime - last_ideal;
      if (p < 0.0) p = p + tx_ui;
      ph_sum += p;
      ph_sq  += p * p;
      ph_n++;
    end
  end

  initial begin
    real j;
    wait (tx_on);
    t_edge = $realtime;
    forever begin
      t_edge = t_edge + tx_ui;
      j = JIT * (2.0 * real'($urandom_range(1000)) / 1000.0 - 1.0);
      #(t_edge + j - $realtime);
      last_ideal = t_edge;
      if (cid_left > 0) cid_left--;   // hold the line: identical digits
      else din = tx_bit();
      -> tx_tick;
    end
  end

  task automatic send(int n);
    repeat (n) @(tx_tick);
  endtask

  task automatic scenario(real ppm, bit use31);
    longint r0, q0;
    int frac, slips;
    real ph_mean, ph_rms;
    real held_ppm;
    tx_ui = UI0 / (1.0 + ppm * 1e-6);
    tx_31 = use31;
    lfsr  = 31'h5555_1234;   // a seed that is non-zero for both lengths
    // reset the digital part (falling edge: the asynchronous reset acts)
    rst_n = 1'b0;
    send(20);
    rst_n = 1'b1;
    r0 = n_rck;
    send(ACQ);
    slips = int'(n_rck - r0) - ACQ;
    if (slips != 0) n_slip_runs++;
    checks++;
    if (ppm <= 1500.0 && ppm >= -1500.0 && slips != 0) begin
      failures++;
      $display("  FAIL: %0d cycle slips inside the lock-in range", slips);
    end
    // checker on the sequence being sent
    chk_prbs31 = use31;
    @(negedge rck) chk_clear = 1'b1;
    @(negedge rck) begin chk_clear = 1'b0; chk_en = 1'b1; end
    r0 = n_rck; q0 = n_q;
    ph_sum = 0.0; ph_sq = 0.0; ph_n = 0; ph_meas = 1'b1;
    send(MEAS);
    ph_meas = 1'b0;
    @(negedge rck) chk_en = 1'b0;
    ph_mean = ph_sum / real'(ph_n);
    ph_rms  = $sqrt(ph_sq / real'(ph_n) - ph_mean * ph_mean);
    $display("offset %0.0f ppm: sampling point %0.1f ps after the ideal bit edge, %0.2f ps rms",
             ppm, ph_mean, ph_rms);
    if (ph_rms > worst_rms) worst_rms = ph_rms;
    checks++;
    if (ph_mean < 0.35 * tx_ui || ph_mean > 0.65 * tx_ui || ph_rms > 0.05 * tx_ui) begin
      failures++;
      $display("  FAIL: recovered clock not centred on the bits");
    end
    frac = int'(acc) >>> 3;
    held_ppm = real'(frac) * 12.0e6 / 1024.0 / 1.6e9 * 1e6;
    $display("offset %0.0f ppm: %0d cycle slips while acquiring", ppm, slips);
    $display("offset %0.0f ppm, PRBS%0d: errors %0d in %0d bits, acc=%0d (%0.0f ppm), rck %0d, clk_q %0d",
             ppm, use31 ? 31 : 7, chk_errors, chk_bits, acc, held_ppm, n_rck - r0, n_q - q0);
    checks++;
    if (!chk_synced || chk_errors != 0 || chk_bits < MEAS - 100) begin
      failures++;
      $display("  FAIL: not error free");
    end
    checks++;
    if (n_rck - r0 < MEAS - 2 || n_rck - r0 > MEAS + 4) begin
      failures++;
      $display("  FAIL: recovered clock not at the data rate");
    end
    checks++;
    if ((n_q - q0) * 4 < (n_rck - r0) - 4 || (n_q - q0) * 4 > (n_rck - r0) + 4) begin
      failures++;
      $display("  FAIL: quarter-rate clock not at rck/4");
    end
    checks++;
    if (held_ppm - ppm > 150.0 || ppm - held_ppm > 150.0) begin
      failures++;
      $display("  FAIL: integral path holds %0.0f ppm", held_ppm);
    end else begin
      if (ppm > 0) n_acq_pos++; else n_acq_neg++;
    end
    if (use31) n_prbs31++; else n_prbs7++;
  endtask

  // After lock, hold the line for n_cid bits, then resume PRBS data. The
  // recovered clock must not slip: over the whole window it must tick once
  // per bit sent. The checker then has to find the data error free.
  task automatic cid_run(real ppm, int n_cid, bit must_hold);
    longint r0;
    int slips;
    tx_ui = UI0 / (1.0 + ppm * 1e-6);
    tx_31 = 1'b0;
    lfsr  = 31'h5555_1234;
    rst_n = 1'b0;
    send(20);
    rst_n = 1'b1;
    send(ACQ);
    r0 = n_rck;
    send(2000);
    cid_left = n_cid;
    send(n_cid + 20_000);
    slips = int'(n_rck - r0) - (n_cid + 22_000);
    chk_prbs31 = 1'b0;
    @(negedge rck) chk_clear = 1'b1;
    @(negedge rck) begin chk_clear = 1'b0; chk_en = 1'b1; end
    send(MEAS);
    @(negedge rck) chk_en = 1'b0;
    $display("offset %0.0f ppm, %0d identical digits: %0d slips, then %0d errors in %0d bits, acc=%0d",
             ppm, n_cid, slips, chk_errors, chk_bits, acc);
    checks++;
    if ((must_hold && slips != 0) || !chk_synced || chk_errors != 0) begin
      failures++;
      $display("  FAIL: identical digits not tolerated");
    end else if (slips == 0) n_cid_runs++;
  endtask

  task automatic need(longint n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never seen: %s", what);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #5000 rst_n = 1'b1;
    tx_on = 1'b1;
    scenario(1000.0, 1'b0);
    scenario(1500.0, 1'b0);
    scenario(-1500.0, 1'b1);
    scenario(2000.0, 1'b1);
    scenario(-2000.0, 1'b0);
    scenario(2500.0, 1'b0);
    scenario(-2500.0, 1'b1);
    cid_run(600.0, 30_000, 1'b1);
    cid_run(600.0, 72_000, 1'b0);
    $display("largest rms spread of the recovered clock: %0.2f ps", worst_rms);
    $display("early %0d, late %0d; votes up %0d dn %0d zero %0d; IDAC up %0d dn %0d zero %0d",
             n_early, n_late, n_vup, n_vdn, n_v0, n_iup, n_idn, n_i0);
    need(n_early, "early decision");
    need(n_late, "late decision");
    need(n_vup, "UP vote");
    need(n_vdn, "DN vote");
    need(n_v0, "zero vote");
    need(n_iup, "IDAC +1");
    need(n_idn, "IDAC -1");
    need(n_i0, "IDAC 0");
    need(n_prbs7, "PRBS7 check");
    need(n_prbs31, "PRBS31 check");
    need(n_acq_pos, "integral acquisition of a positive offset");
    need(n_acq_neg, "integral acquisition of a negative offset");
    need(n_slip_runs, "cycle slipping before lock");
    need(n_cid_runs, "identical-digit run without slip");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
