// tb_ring_vco: checks the VCO model. With V_C = 0.96 V and V_F at V_MID
// the clock must run at 1.6 GHz (625 ps period); the four phases must be
// 78.125 ps (45 degrees) apart in the order ph[0]..ph[3]; raising V_F by
// 10 mV must add 4 MHz and lowering it by 30 mV must remove 12 MHz, the
// proportional and integral frequency steps. Coarse control at its ends
// must give 0.8 and 1.8 GHz. Periods are measured over 1000 cycles.
// These checks use a copy without phase noise. A second copy, with the
// default phase noise of -102 dBc/Hz at 3 MHz from 1.6 GHz, is then timed
// over 400 windows of 1000 cycles at 1.6 GHz: the spread of the window
// lengths must match the random walk that phase noise implies,
// sqrt(C * 625 ns) with C = 10^(-10.2) * (3 MHz / 1.6 GHz)^2, i.e.
// 11.8 ps, within 15 %; and the mean frequency must stay within 5 ppm of
// 1.6 GHz.
module tb_ring_vco;
  timeunit 1ps; timeprecision 1fs;

  real vc = 0.96, vf = 0.6;
  logic [3:0] ph, ph_n;
  logic rck, rck_n;
  int checks = 0, failures = 0;

  ring_vco #(.PHASE_NOISE(1'b0)) dut (.vc, .vf, .ph, .rck);
  ring_vco dut_n (.vc, .vf, .ph(ph_n), .rck(rck_n));

  initial begin
    #(1_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic freq(real c, real f, real want_hz);
    realtime t0, t1;
    real got;
    vc = c; vf = f;
    repeat (3) @(posedge rck);
    t0 = $realtime;
    repeat (1000) @(posedge rck);
    t1 = $realtime;
    got = 1000.0 / ((t1 - t0) * 1e-12);
    checks++;
    if (got < want_hz * (1 - 2e-6) || got > want_hz * (1 + 2e-6)) begin
      failures++;
      $display("V_C=%f V_F=%f: %f MHz, expected %f MHz", c, f, got / 1e6, want_hz / 1e6);
    end
  endtask

  task automatic noise();
    localparam int NW = 400;
    real c, want, d, sum = 0.0, sq = 0.0, mean, sd, f;
    realtime t0;
    vc = 0.96; vf = 0.6;
    c    = 10.0 ** (-10.2) * (3.0e6 / 1.6e9) ** 2;
    want = $sqrt(c * 1000.0 / 1.6e9) * 1e12;
    repeat (10) @(posedge rck_n);
    for (int w = 0; w < NW; w++) begin
      t0 = $realtime;
      repeat (1000) @(posedge rck_n);
      d = $realtime - t0;
      sum += d;
      sq  += d * d;
    end
    mean = sum / NW;
    sd   = $sqrt(sq / NW - mean * mean);
    f    = 1000.0 / (mean * 1e-12);
    $display("with phase noise: 1000-cycle spread %0.2f ps (expected %0.2f ps), mean %f MHz",
             sd, want, f / 1e6);
    checks++;
    if (sd < 0.85 * want || sd > 1.15 * want) begin
      failures++;
      $display("FAIL: phase noise does not match its setting");
    end
    checks++;
    if (f < 1.6e9 * (1 - 5e-6) || f > 1.6e9 * (1 + 5e-6)) begin
      failures++;
      $display("FAIL: phase noise moved the mean frequency");
    end
  endtask

  initial begin
    realtime tr [4];
    freq(0.96, 0.6, 1.6e9);
    // phase order and spacing
    @(posedge ph[0]) tr[0] = $realtime;
    @(posedge ph[1]) tr[1] = $realtime;
    @(posedge ph[2]) tr[2] = $realtime;
    @(posedge ph[3]) tr[3] = $realtime;
    for (int k = 1; k < 4; k++) begin
      checks++;
      if (tr[k] - tr[k-1] < 78.120 || tr[k] - tr[k-1] > 78.130) begin
        failures++;
        $display("ph[%0d] follows ph[%0d] by %f ps", k, k - 1, tr[k] - tr[k-1]);
      end
    end
    freq(0.96, 0.61, 1.604e9);
    freq(0.96, 0.57, 1.588e9);
    freq(0.0, 0.6, 0.8e9);
    freq(1.2, 0.6, 1.8e9);
    noise();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
