// tb_dsm_clock: modulator clock rate, 400 MHz against 200 MHz.
//
// Two copies of the CDR receive the same PRBS7 stream, 1000 ppm fast and
// without transmitter jitter. One runs the modulator on clk_q (rck/4,
// 400 MHz, the design's choice), the other at rck/8 (200 MHz). Each IDAC
// code then lasts twice as long in the slow copy, so each modulator step
// moves the recovered clock twice as far and more of the quantization
// noise reaches the clock. After acquisition the phase of each recovered
// clock is taken against the transmitter's bit grid over MEAS bits.
// The testbench also sums the IDAC's quantization error, (y - x/1024) per
// UI, into the phase it alone would put on the clock with no loop to act
// on it.
// Checks: both copies error-free and centred on the bits; the quantization
// phase at least 1.6 times larger at 200 MHz; and the slow modulator's
// clock spread larger than the fast one's by at least a quarter.
module tb_dsm_clock;
  import dcdr_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam real UI0  = 625.0;
  localparam real PPM  = 1000.0;
  localparam int  ACQ  = 60_000;
  localparam int  MEAS = 60_000;

  logic rst_n = 1'b1, din = 1'b0;
  real  vc = 0.96;
  logic chk_clear = 1'b0, chk_en = 1'b0;
  int   checks = 0, failures = 0;

  logic [1:0] rck, rdata, early, late, clk_q, acc_sat, dsm_ovl, chk_synced, chk_err;
  logic [3:0] ph [2];
  tri_t vote [2], idac_code [2];
  logic signed [13:0] acc [2];
  real  vf [2];
  logic [31:0] chk_bits [2], chk_errors [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    dcdr_top #(.DSM_DIV(g == 0 ? 4 : 8)) dut (
      .rst_n, .din, .vc, .chk_clear, .chk_en, .chk_prbs31(1'b0),
      .rck(rck[g]), .ph(ph[g]), .rdata(rdata[g]), .early(early[g]), .late(late[g]),
      .clk_q(clk_q[g]), .vote(vote[g]), .acc(acc[g]), .acc_sat(acc_sat[g]),
      .idac_code(idac_code[g]), .dsm_ovl(dsm_ovl[g]), .vf(vf[g]),
      .chk_synced(chk_synced[g]), .chk_err(chk_err[g]),
      .chk_bits(chk_bits[g]), .chk_errors(chk_errors[g])
    );
  end

  initial begin
    #(1_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitter
  localparam real UI = UI0 / (1.0 + PPM * 1e-6);
  logic [6:0] lfsr = 7'h5B;
  realtime    last_ideal = 0.0;
  event       tx_tick;

  initial begin
    realtime t_edge = 1000.0;
    forever begin
      t_edge = t_edge + UI;
      #(t_edge - $realtime);
      last_ideal = t_edge;
      lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
      din  = lfsr[0];
      -> tx_tick;
    end
  end

  task automatic send(int n);
    repeat (n) @(tx_tick);
  endtask

  // phase of each recovered clock against the bit grid
  bit     meas = 1'b0;
  real    p_sum [2], p_sq [2];
  longint p_n [2];

  // phase the modulator's quantization error alone puts on the clock: each
  // UI the IDAC code y moves the phase by (y - x/1024) * dF_I/f UI, x being
  // the modulator input acc>>>3; the running sum is that phase, taken open
  // loop (the loop could only remove part of it)
  real    q_ph [2], q_sum [2], q_sq [2];

  for (genvar g = 0; g < 2; g++) begin : g_ph
    always @(posedge rck[g]) begin
      real p;
      q_ph[g] += (real'(tri_value(idac_code[g])) - real'(int'(acc[g]) >>> 3) / 1024.0)
                 * 12.0e6 / 1.6e9 * UI0;
      if (meas) begin
        q_sum[g] += q_ph[g];
        q_sq[g]  += q_ph[g] * q_ph[g];
        p = $realtime - last_ideal;
        if (p < 0.0) p = p + UI;
        p_sum[g] += p;
        p_sq[g]  += p * p;
        p_n[g]++;
      end
    end
  end

  initial begin
    real mean [2], rms [2], q_rms [2];
    q_ph[0] = 0.0; q_ph[1] = 0.0;
    #1 rst_n = 1'b0;
    send(20);
    rst_n = 1'b1;
    send(ACQ);
    @(negedge rck[0]) chk_clear = 1'b1;
    @(negedge rck[0]) begin chk_clear = 1'b0; chk_en = 1'b1; end
    for (int g = 0; g < 2; g++) begin
      p_sum[g] = 0.0; p_sq[g] = 0.0; p_n[g] = 0;
      q_sum[g] = 0.0; q_sq[g] = 0.0;
    end
    meas = 1'b1;
    send(MEAS);
    meas = 1'b0;
    @(negedge rck[0]) chk_en = 1'b0;
    for (int g = 0; g < 2; g++) begin
      mean[g] = p_sum[g] / real'(p_n[g]);
      rms[g]  = $sqrt(p_sq[g] / real'(p_n[g]) - mean[g] * mean[g]);
      q_rms[g] = $sqrt(q_sq[g] / real'(p_n[g])
                       - (q_sum[g] / real'(p_n[g])) * (q_sum[g] / real'(p_n[g])));
      $display("modulator at rck/%0d: quantization phase %0.2f ps rms (open loop)",
               g == 0 ? 4 : 8, q_rms[g]);
      $display("modulator at rck/%0d: sampling point %0.1f ps after the bit edge, %0.2f ps rms, %0d errors in %0d bits, acc=%0d",
               g == 0 ? 4 : 8, mean[g], rms[g], chk_errors[g], chk_bits[g], acc[g]);
      checks++;
      if (!chk_synced[g] || chk_errors[g] != 0 || chk_bits[g] < MEAS - 100) begin
        failures++;
        $display("  FAIL: errors or checker not synchronised");
      end
      checks++;
      if (mean[g] < 0.35 * UI || mean[g] > 0.65 * UI) begin
        failures++;
        $display("  FAIL: recovered clock not centred on the bits");
      end
    end
    checks++;
    if (q_rms[1] < 1.6 * q_rms[0]) begin
      failures++;
      $display("FAIL: quantization phase did not about double at 200 MHz");
    end
    checks++;
    if (rms[1] < 1.25 * rms[0]) begin
      failures++;
      $display("FAIL: the 200 MHz modulator did not widen the clock spread");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
