// ring_vco: behavioural model of the four-stage split-tuned ring VCO.
//
// This is a behavioural model of an analog circuit, not synthesizable
// logic. The real oscillator is a ring of four pseudo-differential delay
// cells; each cell has a strong coarse-tuning device driven by V_C and a
// weak fine-tuning device driven by V_F, and all four cells share both
// controls, so the eight clock phases stay equally spaced. Here the
// frequency is
//   f = F_MIN + (F_MAX - F_MIN) * V_C / VDD  +  K_F * (V_F - V_MID)
// with V_C clipped to 0..VDD. The ring advances one stage every 1/(8f):
// ph[0], ph[1], ph[2], ph[3] rise in turn, then fall in turn, so ph[k] lags
// ph[0] by k*45 degrees. rck is ph[0]. The frequency is re-evaluated at
// every stage transition, and transition times are accumulated in real
// arithmetic so that rounding to the time precision does not build up.
//
// Phase noise (PHASE_NOISE = 1): each transition time gets a Gaussian
// increment of variance C * dt, dt being the nominal step, so the timing
// error performs a random walk. That is the 1/f^2 phase noise of a free-
// running oscillator, L(df) = C * f0^2 / df^2, and C is set from one
// point: PN_DBC dBc/Hz at offset PN_FOFF from carrier PN_F0. The normal
// deviates come from $urandom through the Box-Muller transform.
//
// Following the design: four stages, separate coarse and fine control,
// coarse range 0.8-1.8 GHz, phase noise -102 dBc/Hz at 3 MHz offset at
// 1.6 GHz. Own choices: the linear tuning laws, the fine-tuning gain K_F
// (set so that the DAC steps give dF_P = 4 MHz and dF_I = 12 MHz together
// with the DAC and summer models), and a phase noise that is purely 1/f^2
// (no flicker region, no noise floor).
module ring_vco #(
  parameter real F_MIN = 0.8e9,  // coarse range low end, Hz
  parameter real F_MAX = 1.8e9,  // coarse range high end, Hz
  parameter real VDD   = 1.2,    // supply, V
  parameter real K_F   = 4.0e8,  // fine gain, Hz/V
  parameter real V_MID = 0.6,    // V_F at which the fine term is zero, V
  parameter bit  PHASE_NOISE = 1'b1,  // 1: add 1/f^2 phase noise
  parameter real PN_DBC  = -102.0,    // phase noise, dBc/Hz ...
  parameter real PN_FOFF = 3.0e6,     // ... at this offset, Hz ...
  parameter real PN_F0   = 1.6e9      // ... from this carrier, Hz
) (
  input  real        vc,   // coarse control voltage, V
  input  real        vf,   // fine control voltage, V
  output logic [3:0] ph,   // four stage outputs, 45 degrees apart
  output logic       rck   // recovered clock (ph[0])
);
  timeunit 1ps; timeprecision 1fs;

  localparam real PI = 3.141592653589793;
  // random-walk constant C, s (timing variance per second of running)
  localparam real PN_C = 10.0 ** (PN_DBC / 10.0) * PN_FOFF * PN_FOFF / (PN_F0 * PN_F0);

  real t_next;   // time of the next stage transition, ps
  int  stage;    // stage that toggles next

  function automatic real freq_hz(real c, real f);
    real cc, fr;
    cc = (c < 0.0) ? 0.0 : (c > VDD) ? VDD : c;
    fr = F_MIN + (F_MAX - F_MIN) * cc / VDD + K_F * (f - V_MID);
    return (fr < 1.0e8) ? 1.0e8 : fr;
  endfunction

  // standard normal deviate
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  initial begin
    real dt;   // nominal step, ps
    ph     = 4'b0000;
    stage  = 0;
    t_next = 0.0;
    forever begin
      dt     = 1.0e12 / (8.0 * freq_hz(vc, vf));
      t_next = t_next + dt;
      if (PHASE_NOISE) t_next = t_next + 1.0e12 * $sqrt(PN_C * dt * 1.0e-12) * gauss();
      #(t_next - $realtime);
      ph[stage] = ~ph[stage];
      stage     = (stage + 1) % 4;
    end
  end

  assign rck = ph[0];

endmodule
