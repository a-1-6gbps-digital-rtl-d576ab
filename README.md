# A digital clock and data recovery loop for 1.6 Gb/s

A clock and data recovery (CDR) circuit takes a serial bit stream and
rebuilds from it both a clock aligned to the bits and the bits themselves.
The classic way is an analog phase-locked loop: a bang-bang phase detector,
a charge pump, an RC loop filter and a VCO. This design keeps the phase
detector and the VCO but replaces the charge pump and the RC filter with
digital logic, without the two costs that a straight digital translation
brings: adders that would have to run at the full bit rate, and a 14-bit
DAC that would have to run at 1.6 GHz.

Two observations make that possible:

* **The proportional path needs no arithmetic.** A bang-bang detector only
  ever says +1 (clock late), -1 (clock early) or 0 (no data transition).
  Multiplying that by a gain and adding it is the same as steering a fixed
  current up or down, so the decision drives a three-level current DAC
  directly. This path stays at full rate and has almost no delay, which is
  what keeps the loop stable.
* **The integral path can be slow and coarse.** Its decisions are grouped
  four at a time, reduced to one by majority vote, integrated at a quarter
  of the bit rate and finally cut down to three levels by a second-order
  delta-sigma modulator. A second three-level DAC turns that into current.
  The modulator's quantization noise is pushed to high frequencies, where
  the loop filters it out, so a three-level DAC switched at 400 MHz gives a
  frequency resolution of about 7 ppm.

The two DAC currents are summed at the VCO's fine control node V_F. A
separate coarse control V_C, driven from outside, brings the VCO within
reach of the loop.

```
            +------+   pd (+1/0/-1), full rate                 +------+
  din ----->| bbpd |------------------------------------------>| PDAC |--+ i_p
            |      |----+                                      +------+  |
            +------+    |  +--------+  8 bits  +----+  +1/0/-1           v
               ^        +->| demux  |--------->| MV |-----+        +-----------+
               |           | 1:4    |  clk_q   +----+     |        | V_F node  |---> vf
               |           +--------+                     v        +-----------+
               |                       +--------------------+            ^  |
               |                       | 14-bit accumulator |            |  |
               |                       +--------------------+            |  v
               |                          | drop 3 LSBs, 11 bits   i_i   | +-----+
               |                          v                              | | VCO |<-- vc
               |                       +------+  +1/0/-1  +------+       | +-----+
               |                       | DSM  |---------->| IDAC |-------+    |
               |                       +------+           +------+            |
               +------------------------------------------------------------ rck
```

Everything from the phase detector to the modulator, plus a PRBS error
checker, is synthesizable SystemVerilog. The DACs, the V_F node and the
VCO are analog circuits; they are given as behavioural models so that the
whole loop can be simulated, and they are labelled as such.

## The loop's numbers

| quantity | value | where it comes from |
|---|---|---|
| bit rate, UI | 1.6 Gb/s, 625 ps | original design |
| proportional step dF_P | +-4 MHz (+-2500 ppm) | original design |
| integral step dF_I | +-12 MHz (+-7500 ppm) | original design |
| integral accumulator | 14 bits, 3 LSBs dropped, 11 bits to the modulator | original design |
| integral path clock | rck/4 = 400 MHz | original design |
| frequency resolution | 12 MHz / 1024 = 11.7 kHz = 7.32 ppm | follows from the above |
| integral range | +-dF_I = +-7500 ppm | this design's scaling of the 11-bit word |
| lock-in range (no cycle slip) | +-1500 ppm | original design; reproduced in simulation |
| tracking range | +-2500 ppm | original design; reproduced in simulation |
| VCO coarse range | 0.8-1.8 GHz | original design |
| ratio dF_P / (frequency of one accumulator LSB) | 4 MHz / 1.46 kHz = 2731 | computed; the original asks for more than 1000 to keep the loop over-damped |

The original design quotes a resolution "better than 7 ppm" and a
tolerance of more than 72,000 identical digits. With the step sizes above,
one LSB is 7.32 ppm, so a frequency error frozen at a full LSB would drift
half a UI in 68,300 bits. The simulated loop is right at that edge (see
"Identical digits" below).

## Phase detection (`bbpd`)

Two samplers watch the input: one on the rising edge of the recovered
clock, meant to land mid-bit (data), and one on the falling edge, meant to
land on the boundary between bits (edge). A retiming flop lines up three
samples of each boundary: the bit before, the edge sample and the bit
after. If there was a transition, the edge sample agrees with one of the
two bits:

* it still shows the old bit: the clock samples too early, `early` = 1,
  decision -1 (DN, slow down);
* it already shows the new bit: the clock samples too late, `late` = 1,
  decision +1 (UP, speed up).

With no transition both are 0. `rdata` is the retimed data bit. The two
XORs and the sampler-plus-flop arrangement follow the original receiver;
which clock edge does which job and the sense of "early" are this design's
reading. The sense amplifiers of the real circuit are plain flip-flops here.

## Proportional path

There is no logic in it: the 2-bit decision from `bbpd` drives the
proportional DAC (`tri_dac`, 10 uA per step) directly, and the VCO moves by
4 MHz for as long as the decision lasts. A decision is held for one bit
period, so each transition nudges the clock phase by 4 MHz x 625 ps =
0.25 % of a UI. In lock the loop dithers between +dF_P and -dF_P.

## Integral path (`integral_ctrl`)

This is where the design's ideas are concentrated.

**De-multiplexing (`pd_demux`).** The 2-bit decisions are shifted into a
four-entry register at full rate and copied out as one 8-bit word every
fourth cycle. A 2-bit counter divides the recovered clock by four; its MSB
is the quarter-rate clock `clk_q`. The word is loaded two rck cycles before
`clk_q` rises, so the slow side always sees a settled word. (The original
only states that the decisions are de-multiplexed to 8 bits at quarter
rate; the structure and timing are this design's.)

**Majority vote (`majority_vote`).** The four decisions of a word are added
as +1/0/-1 and the sign of the sum is kept: UP when more of them said late,
DN when more said early, 0 on a tie. This cuts the integrator's input back
to three levels, so its adder only ever adds +-1.

**Accumulator (`int_accum`).** A 14-bit two's-complement register adds the
vote each quarter-rate cycle. It starts at 0, the middle of its range,
where the VCO runs at the frequency set by V_C, and it saturates instead of
wrapping (a wrap would throw the VCO from one end of its range to the
other). The 3 LSBs are not passed on: the integral path reacts with a delay
of several quarter-rate cycles, and stepping the frequency in finer
increments than the output sees keeps that delay from turning into
dither. The remaining 11 bits go to the modulator.

**Delta-sigma modulator (`dsm2`).** The 11-bit signed word x is read as a
fraction x/1024 of one IDAC step, so its full range is -1 .. +1. The
modulator emits -1, 0 or +1 each quarter-rate cycle such that the average
output is x/1024, with the error shaped by (1 - z^-1)^2:

```
v = x - 2 e[n-1] + e[n-2]
y = +1 if v >= 512, -1 if v < -512, else 0
e = 1024 y - v          (clipped to +-2048)
```

so 1024 y = x + e - 2 e[n-1] + e[n-2]. Summed once, the output tracks x to
within a couple of steps over any run; summed twice, the difference is
just the latest quantization error, bounded. That double-sum bound is what
the testbench checks, and it is what separates a second-order modulator
from a first-order one. With only three output levels the quantizer input
can exceed the +-1.5 steps a three-level quantizer covers, so the error is
not kept within +-512; for inputs up to half of full scale it stays below
2048 and the shaping is exact. The clip at +-2048 only guards against
runaway near full scale, and `ovl` reports when it acts. The loop's
tracking range uses a third of full scale. The original does not say which
modulator structure it used; the error-feedback form is this design's
choice as the simplest one with the stated order.

Latency: a vote reaches the accumulator on the next `clk_q` edge and the
modulator's registered output one edge later.

**Modulator clock.** By default the modulator runs on `clk_q`, 400 MHz at
1.6 Gb/s. Parameter `DSM_DIV = 8` clocks it at rck/8 (200 MHz) instead,
the slower rate the original was also measured at. A 3-bit counter on rck
makes that clock. It rises two rck cycles after a `clk_q` edge, so the
modulator always reads a settled accumulator.

## Analog parts as behavioural models

These modules use `real` ports and delays and are not synthesizable. They
are sized so that the loop's frequency steps come out as dF_P = 4 MHz and
dF_I = 12 MHz:

* `tri_dac`: code -1, 0, +1 gives 0, I, 2I (this map is the original's). I
  is 10 uA for the proportional DAC and 30 uA for the integral DAC.
* `vf_summer`: V_F = 0.6 V + 1 kOhm x (i_p + i_i - 40 uA), a linear model of
  the node where the two DAC currents meet.
* `ring_vco`: f = 0.8 GHz + 1.0 GHz x V_C / 1.2 V + 400 MHz/V x (V_F - 0.6 V).
  The four stage outputs `ph[3:0]` step 45 degrees apart, as in the
  four-stage differential ring of the original; `rck` is `ph[0]`. Edge
  times are accumulated in real arithmetic, so rounding to the 1 fs time
  precision does not build up. The duty cycle is exactly 50 %.
  Phase noise is modelled as a random walk of the edge times: every
  transition gets a Gaussian increment of variance C x dt, which is the
  1/f^2 phase noise L(df) = C f^2 / df^2 of a free-running oscillator. C
  is set from -102 dBc/Hz at 3 MHz offset from 1.6 GHz, the original's
  simulated figure, giving C = 2.2e-16 s: about 12 ps rms of wander over
  1000 cycles. `PHASE_NOISE = 0` turns it off.

With V_C = 0.96 V the VCO runs at 1.6 GHz. The polarity (more DAC current,
higher V_F, higher frequency) is a modelling choice; in silicon it depends
on the delay cell. Not modelled: the glitch-suppression transistor in the
DAC, the duty-cycle-correcting buffer after the VCO, and the frequency
acquisition loop that would set V_C.

## Error checker (`error_checker`)

A PRBS checker on the recovered data, for PRBS7 (x^7 + x^6 + 1) or PRBS31
(x^31 + x^28 + 1). After `clear` it loads the first 7 or 31 received bits
into its own generator, then lets the generator run free and compares each
received bit with it, so each wrong bit counts once. `bits` and `errors`
are 32-bit saturating counters. The original chip has an error checker and
was tested with both sequences; its insides are this design's.

## Top level (`dcdr_top`)

`dcdr_top` wires the loop as in the diagram and brings out the recovered
clock and data, the VCO phases and the loop's internal decisions
(`early`, `late`, `vote`, `acc`, `idac_code`, `vf`, ...) for observation.
Inputs are the serial data, the coarse control voltage `vc` (a `real`),
an active-low asynchronous reset and the checker's controls. Because it
contains the behavioural models, the top simulates but does not synthesize;
the synthesizable part is `bbpd`, `integral_ctrl` and `error_checker`.

Reset: all flops reset asynchronously. The quarter-rate flops only see a
falling edge of `rst_n` or a `clk_q` edge; a testbench should therefore
drive `rst_n` high first and then low, rather than hold it low from time 0.

## What simulation shows

`tb_dcdr_top` runs the closed loop at the default parameters with PRBS data
and +-15 ps of random edge jitter (about 2 s of wall time). acc>>3 is
converted to ppm at 7.32 ppm per step:

| offset | data | cycle slips while acquiring | errors after lock | acc>>3 in ppm |
|---|---|---|---|---|
| +1000 ppm | PRBS7 | 0 | 0 / 20,000 | ~1025 |
| +-1500 ppm | PRBS7 / PRBS31 | 0 | 0 / 20,000 | ~+-1500 |
| +-2000 ppm | PRBS31 / PRBS7 | 2 to 4 | 0 / 20,000 | ~+-2000 |
| +-2500 ppm | PRBS7 / PRBS31 | 8 to 10 | 0 / 20,000 | ~+-2500 |
| +600 ppm, then 30,000 identical digits | PRBS7 | 0 across the run | 0 / 20,000 | ~630 |
| +600 ppm, then 72,000 identical digits | PRBS7 | 0 or 1, depending on the random seed | 0 / 20,000 | ~630 |

Inside +-1500 ppm the proportional path pulls the phase in without a slip;
beyond it the loop slips cycles while the integral path walks the VCO
towards the data rate, as the original describes.

In lock, the rising edges of the recovered clock sit half a UI after the
ideal bit edges (within 1 ps). Their spread is 6.7-6.9 ps rms with the
+-15 ps data jitter, and 6.3 ps rms with clean data (`tb_dsm_clock`). Most
of it is the bang-bang dither plus the modulator's shaped noise. The VCO's
phase noise adds little: with it turned off, the clean-data run gives
6.2 ps. The loop corrects the VCO's wander long before it builds up.
Sampler noise and supply noise are not modelled.

**Identical digits.** During a run of identical digits the detector says
nothing, the proportional DAC sits at mid-scale and the VCO keeps the
frequency the integral path holds. What remains is the small average the
proportional path was contributing in lock, a few ppm, and the clock
drifts by that. 30,000 identical digits always pass; 72,000 sit at the
edge (one slip in about a third of the seeds tried), in line with the
worst-case arithmetic of 68,300 digits for a 7.32 ppm resolution.

**A bias worth knowing about.** In lock the accumulator holds a value about
25-45 ppm above the data offset, for either sign of offset, and yet the
loop is exactly on frequency. The reason is that the modulator is clocked
by the recovered clock itself: each IDAC code is held for four VCO cycles,
not for a fixed time, so a +1 code (VCO fast) lasts a little shorter in
time than a -1 code. The time-averaged frequency is then the harmonic mean
of the dithered frequencies, lower than the arithmetic mean by about
dF_I^2 x var(y) / f, i.e. 90 kHz x var(y), roughly 30 ppm. The integral
loop simply settles that much higher. The same effect exists in a circuit
whose integral path runs from the recovered clock.

**Modulator clock rate.** `tb_dsm_clock` feeds one PRBS7 stream, 1000 ppm
fast, to two copies of the CDR: one with the modulator at 400 MHz, one at
200 MHz. Both lock and run error free. The recovered-clock spread is
6.3 ps rms at 400 MHz and 11.4 ps rms at 200 MHz. Each IDAC code lasts
twice as long at the slower rate, so every modulator step moves the clock
phase twice as far. This is the reason the original gives for choosing
400 MHz.

The same testbench sums the IDAC's quantization error, the code minus the
modulator's input, into the phase it would put on the clock if the loop
did not act on it. This comes to 5.6 ps rms at 400 MHz and 10.9 ps rms at
200 MHz. The original's simulation gives under 2.5 ps for its quarter-rate
modulator, and this model does not get there. The arithmetic: one IDAC code
held for one 400 MHz period moves the phase by 12 MHz / 400 MHz = 0.03 UI
(18.75 ps), and a three-level second-order modulator leaves about 0.3 of
that step as rms error. Reaching 2.5 ps would need a smaller IDAC step or a
different modulator. The original gives neither its modulator structure
nor an IDAC step other than the 12 MHz of its loop model.

**Operating range.** `tb_rate` runs the loop at 0.8, 1.2 and 1.8 Gb/s.
V_C is set as an external frequency loop would leave it, with the VCO
600 ppm off the data rate. At each rate the loop locks and runs error free.
The integral path takes up the offset to within about 100 ppm. The
remaining difference is the harmonic-mean bias described above. It grows as
the rate falls, because the 12 MHz IDAC step is a larger fraction of a
lower frequency.

`tb_jtol` applies sinusoidal jitter: the model tolerates 2 UIpp at 100 kHz
and 1.0 UIpp at 2 MHz (0.8 with some random seeds, never 1.2). Up to
1 UIpp nothing needs tracking; above it the phase slew the proportional step allows (about 1250 ppm with
PRBS transition density) sets the limit. The original reports more than
2 UI at 2 MHz on silicon; this model does not reach that. The measured
recovered-clock jitter of the original (8.9 ps rms with PRBS7) is close to
the 6.7-6.9 ps above. It cannot be compared directly, though: sampler
noise, supply noise and the instrument's own jitter are not modelled.

## Simulating

All files are in `rtl/` (design) and `tb/` (testbenches); each module is in
a file of its own name, and `dcdr_pkg.sv` must come first. For example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/dcdr_pkg.sv tb/tb_dcdr_top.sv --top-module tb_dcdr_top
./obj_dir/Vtb_dcdr_top
```

Every testbench ends with `TB_RESULT checks=N failures=M`. Unit tests:
`tb_bbpd`, `tb_pd_demux`, `tb_majority_vote`, `tb_int_accum`, `tb_dsm2`,
`tb_integral_ctrl`, `tb_error_checker`, `tb_tri_dac`, `tb_vf_summer`,
`tb_ring_vco`; system tests: `tb_dcdr_top`, `tb_jtol`, `tb_dsm_clock`,
`tb_rate`.

Parameters worth changing: `ACC_W` and `DROP_W` on `dcdr_top` or
`integral_ctrl` (integral resolution and speed), `DSM_DIV` on the same
two (modulator clock, rck/4 or rck/8), `I_P`, `I_I` and `K_F`
on `dcdr_top` (dF_P = I_P x 1 kOhm x K_F, dF_I likewise). The VCO's
phase noise is set on `ring_vco` (`PHASE_NOISE`, `PN_DBC`, `PN_FOFF`,
`PN_F0`); `dcdr_top` uses its defaults. In `tb_dcdr_top`, `JIT`, `ACQ`
and `MEAS` set the edge jitter, the acquisition time and the number of
bits checked.

## Departures and open points

* Choices of this design where the original is silent: the sampler clock
  edges and early/late polarity; the {up, dn} code; tie handling in the
  vote; two's-complement accumulator reset to mid-range with saturation;
  the modulator's structure, input scaling and clip; the counter that
  makes the quarter-rate clock; the checker's insides; all analog model
  values and polarities.
* The original gives the loop latency only as M = 3 in its linear model;
  here the proportional path acts within the bit and the integral path
  takes about two quarter-rate cycles after a word is loaded.
* The resolution is 7.32 ppm where the original quotes better than 7 ppm
  (see the numbers above).
* How the original made its 200 MHz modulator clock is not described; the
  counter used here for `DSM_DIV = 8` is this design's choice.
* Two figures of the original are not reached by the model: under 2.5 ps
  rms from the modulator (5.6 ps here, open loop) and more than 2 UI of
  jitter tolerance at 2 MHz (1.0 UIpp here). Both are discussed above.
