// tb_rate: the closed loop across the operating range, 0.8 to 1.8 Gb/s.
//
// The coarse control V_C would come from a frequency-locking loop outside
// this design; here the testbench sets it as such a loop would leave it:
// the VCO's free-running frequency 600 ppm away from the data rate, towards
// the middle of the coarse range (so it is still reachable at 1.8 GHz).
// For each rate the digital part is reset, the loop acquires for ACQ bits,
// then for MEAS bits the error checker counts errors on the PRBS7 data and
// the phase of the recovered clock is taken against the transmitter's bit
// grid. Checks per rate: no errors and checker synchronised; one recovered
// clock cycle per bit over the measurement (frequency lock); sampling
// point within 0.35..0.65 UI of the bit edge; and the integral path's
// frequency correction, (acc >>> 3) * 12 MHz / 1024, within 250 ppm of
// the 600 ppm the VCO started off by (the margin covers the modulator's
// harmonic-mean bias, which grows as the rate falls).
module tb_rate;
  import dcdr_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam int  ACQ  = 40_000;
  localparam int  MEAS = 20_000;
  localparam real OFF  = 600.0e-6;   // residual offset left by the coarse loop

  logic rst_n = 1'b1, din = 1'b0;
  real  vc = 0.96;
  logic chk_clear = 1'b0, chk_en = 1'b0;
  logic rck, rdata, early, late, clk_q, acc_sat, dsm_ovl;
  logic [3:0] ph;
  tri_t vote, idac_code;
  logic signed [13:0] acc;
  real  vf;
  logic chk_synced, chk_err;
  logic [31:0] chk_bits, chk_errors;
  int checks = 0, failures = 0;

  dcdr_top dut (
    .rst_n, .din, .vc, .chk_clear, .chk_en, .chk_prbs31(1'b0),
    .rck, .ph, .rdata, .early, .late, .clk_q, .vote, .acc, .acc_sat,
    .idac_code, .dsm_ovl, .vf, .chk_synced, .chk_err, .chk_bits, .chk_errors
  );

  initial begin
    #(1_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitter, PRBS7 at a bit period that the test sets
  real        ui = 625.0;
  logic [6:0] lfsr = 7'h5B;
  realtime    last_edge = 0.0;
  event       tx_tick;

  initial begin
    realtime t_edge = 1000.0;
    forever begin
      t_edge = t_edge + ui;
      #(t_edge - $realtime);
      last_edge = t_edge;
      lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
      din  = lfsr[0];
      -> tx_tick;
    end
  end

  task automatic send(int n);
    repeat (n) @(tx_tick);
  endtask

  // recovered-clock phase and cycle count during the measurement
  bit     meas = 1'b0;
  real    p_sum;
  longint p_n;

  always @(posedge rck) begin
    real p;
    if (meas) begin
      p = $realtime - last_edge;
      if (p < 0.0) p = p + ui;
      p_sum += p;
      p_n++;
    end
  end

  // VCO coarse law of the model: f = 0.8 GHz + 1 GHz * V_C / 1.2 V
  function automatic real vc_for(real f_hz);
    return (f_hz - 0.8e9) / 1.0e9 * 1.2;
  endfunction

  task automatic run_rate(real rate);
    real f_vco, mean, want_ppm, got_ppm;
    ui    = 1.0e12 / rate;
    f_vco = (rate < 1.3e9) ? rate * (1.0 + OFF) : rate * (1.0 - OFF);
    vc    = vc_for(f_vco);
    rst_n = 1'b0;
    send(20);
    rst_n = 1'b1;
    send(ACQ);
    @(negedge rck) chk_clear = 1'b1;
    @(negedge rck) begin chk_clear = 1'b0; chk_en = 1'b1; end
    p_sum = 0.0; p_n = 0;
    meas = 1'b1;
    send(MEAS);
    meas = 1'b0;
    @(negedge rck) chk_en = 1'b0;
    mean = p_sum / real'(p_n);
    want_ppm = (rate - f_vco) / rate * 1e6;
    got_ppm  = real'(int'(acc) >>> 3) * 12.0e6 / 1024.0 / rate * 1e6;
    $display("%0.2f Gb/s, V_C %0.4f V: %0d errors in %0d bits, %0d clock cycles for %0d bits, sampling %0.1f ps after the bit edge, acc=%0d",
             rate / 1e9, vc, chk_errors, chk_bits, p_n, MEAS, mean, acc);
    checks++;
    if (!chk_synced || chk_errors != 0 || chk_bits < MEAS - 100) begin
      failures++;
      $display("  FAIL: errors or checker not synchronised");
    end
    checks++;
    if (p_n < MEAS - 1 || p_n > MEAS + 1) begin
      failures++;
      $display("  FAIL: recovered clock not locked to the bit rate");
    end
    $display("  integral correction %0.0f ppm for a %0.0f ppm offset", got_ppm, want_ppm);
    checks++;
    if (got_ppm - want_ppm > 250.0 || want_ppm - got_ppm > 250.0) begin
      failures++;
      $display("  FAIL: integral path does not hold the offset");
    end
    checks++;
    if (mean < 0.35 * ui || mean > 0.65 * ui) begin
      failures++;
      $display("  FAIL: recovered clock not centred on the bits");
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #5000 rst_n = 1'b1;
    run_rate(0.8e9);
    run_rate(1.2e9);
    run_rate(1.8e9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
