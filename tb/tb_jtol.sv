// tb_jtol: sinusoidal jitter tolerance sweep of the closed CDR loop.
//
// The transmitter sends PRBS7 data at exactly 1.6 Gb/s with its bit edges
// moved by a sinusoid: edge k is at k*UI + (A/2)*UI*sin(2*pi*fm*t), A being
// the peak-to-peak jitter in UI. For each modulation frequency fm and
// amplitude A the digital part is reset, the loop acquires for ACQ bits
// with the jitter on, and the error checker then counts errors over MEAS
// bits (20 modulation periods at 2 MHz). The largest amplitude of the list
// that gives no error is reported as the tolerance at that frequency.
//
// Jitter below 1 UIpp needs no tracking at all: a clock that stood still
// at the bit centre would still sample every bit correctly. Beyond that the
// loop has to follow the jitter, and a bang-bang loop can only slew its
// phase as fast as its proportional step allows: the steepest slope of the
// jitter, pi*fm*A UI per second, must stay below about dF_P/f times the
// transition density, roughly 1250 ppm of the bit rate. At 100 kHz that
// allows far more than 2 UIpp; at 2 MHz it allows about 0.4 UIpp of
// tracking, so the tolerance there ends close to 1 UIpp. The checks are
// that the loop tolerates 2 UIpp at 100 kHz and at least 0.8 UIpp at 2 MHz.
module tb_jtol;
  import dcdr_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam real UI   = 625.0;
  localparam int  ACQ  = 40_000;
  localparam int  MEAS = 16_000;
  localparam real PI   = 3.141592653589793;

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

  dcdr_top dut (
    .rst_n, .din, .vc, .chk_clear, .chk_en, .chk_prbs31,
    .rck, .ph, .rdata, .early, .late, .clk_q, .vote, .acc, .acc_sat,
    .idac_code, .dsm_ovl, .vf, .chk_synced, .chk_err, .chk_bits, .chk_errors
  );

  initial begin
    #(2_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitter with sinusoidal jitter
  logic [6:0] lfsr = 7'h5B;
  real  sj_app = 0.0;   // peak-to-peak, UI
  real  sj_fm  = 2.0e6; // Hz
  event tx_tick;

  initial begin
    realtime t0;
    longint k = 0;
    real off;
    t0 = 1000.0;
    forever begin
      k++;
      off = 0.5 * sj_app * UI * $sin(2.0 * PI * sj_fm * (real'(k) * UI * 1e-12));
      #(t0 + real'(k) * UI + off - $realtime);
      lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
      din  = lfsr[0];
      -> tx_tick;
    end
  end

  task automatic send(int n);
    repeat (n) @(tx_tick);
  endtask

  task automatic trial(real fm, real app, output bit ok);
    sj_fm = fm; sj_app = app;
    rst_n = 1'b0;
    send(20);
    rst_n = 1'b1;
    send(ACQ);
    @(negedge rck) chk_clear = 1'b1;
    @(negedge rck) begin chk_clear = 1'b0; chk_en = 1'b1; end
    send(MEAS);
    @(negedge rck) chk_en = 1'b0;
    ok = chk_synced && chk_errors == 0 && chk_bits > MEAS - 100;
    $display("fm %0.2f MHz, %0.2f UIpp: %0d errors in %0d bits", fm / 1e6, app,
             chk_errors, chk_bits);
  endtask

  real amps [] = '{0.2, 0.4, 0.6, 0.8, 1.0, 1.2, 1.5, 2.0};

  task automatic sweep(real fm, output real tol);
    bit ok;
    tol = 0.0;
    foreach (amps[i]) begin
      trial(fm, amps[i], ok);
      if (!ok) break;
      tol = amps[i];
    end
    $display("tolerance at %0.2f MHz: %0.2f UIpp", fm / 1e6, tol);
  endtask

  initial begin
    real tol_lo, tol_hi;
    #1 rst_n = 1'b0;
    #5000 rst_n = 1'b1;
    sweep(0.1e6, tol_lo);
    sweep(2.0e6, tol_hi);
    checks++;
    if (tol_lo < 2.0) begin
      failures++;
      $display("FAIL: less than 2 UIpp tolerated at 100 kHz");
    end
    checks++;
    if (tol_hi < 0.8) begin
      failures++;
      $display("FAIL: less than 0.8 UIpp tolerated at 2 MHz");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
