# All-digital sample clock dither for OFDM timing recovery

An OFDM receiver has to sample its A/D converters at the right instant
within each sample period. The transmitter's clock and the receiver's clock
differ by up to several hundred ppm, so that instant drifts. The usual fix
samples with a free-running clock and then interpolates the samples with a
fractional-delay filter. This design does the opposite: it moves the
sampling instant itself. A small all-digital clock generator produces 32
phases of the sample clock. A phase-adjustment loop picks the phase at
which the A/Ds sample *coherently*, that is, on the symbol points of the
received waveform. It needs four timing measurements on the short preamble
to acquire the phase. During the data symbols it nudges the phase using the
pilots.

The RTL covers the whole mechanism: the clock generator, the timing
detector, the distance-based acquisition, the phase controller and the
pilot-based tracking. The analog interpolating part of the clock generator
is a behavioural model. Everything else is synthesizable SystemVerilog.

```
 clk2x ──► adcm ──► adc_clk ──► (A/D, outside) ──► adc_i/adc_q
            ▲  └──► clk_1x (clock of all baseband logic)
            │                                   │
      phase_addr                         timing_detector ──► TD
            │                                   │
        phase_ctrl ◄── max/second, offset ── acquisition (TD registers,
            ▲                                   sorter, address interpolator)
            └── trk_adjust ── pilot_tracking ◄── pilot TD (from the OFDM
                                                  receiver's cross correlator)
```

## 1. The multiphase clock (`adcm`, `adcm_four_phase`, `adcm_interp`)

The generator uses no PLL and no DLL. A 5-bit phase address `p` selects
phase `p` of 32. The A/D clock then lags the 0-degree clock by `p/32` of a
sample period.

* **Quadrant (address bits 4:3).** Two flip-flops divide the 2x system
  clock into four 1x clocks at 0, 90, 180 and 270 degrees. One toggles on
  the rising 2x edge and the other copies it on the falling edge. Two 4-to-1
  multiplexers pick the quadrant clock for bank E and the clock 90 degrees
  later for bank L (`adcm_four_phase`, synthesizable).
* **Fine step (address bits 2:0).** Two banks of binary-weighted tri-state
  buffers (x1, x2, x4) drive one node and have complementary enables. If
  only bank E drives, the edge is not delayed. If only bank L drives, the
  edge is 90 degrees late. Mixed settings place the edge in between,
  according to the current balance. A Schmitt-trigger driver in three
  stages cleans the edge.
* **The model.** `adcm_interp` places the output edge `w_L/8` of a quarter
  period after the bank-E edge, where `w_L` is the enabled weight of bank L.
  It measures the quarter period from the distance between the two input
  edges, so no clock frequency is configured. The real circuit has unequal
  steps, because rise and fall times differ, and it also has jitter. The
  model has neither: its 32 steps are equal.

`clk_1x` is the 0-degree clock. All baseband logic runs on it. Because it
is derived from `clk2x`, it does not toggle while `clk2x` runs in reset. The
reset is asynchronous, so assert `rst_n` with an edge.

## 2. The timing detector (`timing_detector`)

The known short preamble is a BPSK (+/-1) sequence `c[0..N-1]`. The
detector cross-correlates every new I/Q sample window with it. It then
accumulates the correlation power over a window of lags:

    TD = sum over k = -N/3 .. 4N/3 of |R(k)|^2 ,  R = sum_m x[t-N+1+m] * c[m]

With N = 16 this is 27 lags. TD is largest when the samples are taken on
the symbol points and falls as the sampling instant moves between them.
The correlator uses adds and subtracts only. Each sample's power
`Re^2 + Im^2` is registered and then accumulated. The result appears one
cycle after the last sample of the window.

The preamble chips are the parameter `COEF`. Bit m set means `c[m] = -1`.
The default `16'h1D2B` is a placeholder: set it to the preamble of the
target standard.

## 3. Acquisition: from four TD values to one phase (`acquisition`, `td_sorter`, `addr_interp`, `phase_ctrl`)

This is the part most worth understanding before changing anything.

1. **Coarse search.** The circle of 32 phases is cut into L = 3 sections of
   120 degrees. The controller samples successive preamble slots at phases
   0, 10 and 21 (`floor(s*M/L)`). It stores one TD per phase in the
   registers TD(0), TD(120) and TD(240).
2. **Sort.** The sorter names the best section (`i_max`) and the
   runner-up (`i_second`). The coherent phase lies between them.
3. **Fine search.** The controller samples one more slot at the midpoint
   `i_c` of `i_max` and `i_second`. Phases live on a circle, so the midpoint
   is taken the short way round. For example, `i_max = 0` and
   `i_second = 21` give `i_c = 26`, not 10. The sign of the circular
   difference `i_max - i_second` is the **offset direction**.
4. **Triangulation.** The address interpolator forms two TD distances,
   `d1 = TD(i_max) - TD(i_second)` and `d2 = TD(i_c) - TD(i_second)`. It
   then computes

       offset = floor( (2 - d1/d2) * M/(4L) )        (M/(4L) = 2.67 phases)

   The final phase is `i_c + direction * offset`, which moves from the
   midpoint towards `i_max`.
   * `d1/d2 = 2` means the TD falls linearly through the midpoint. The
     result is `offset = 0`.
   * `d1/d2 = 1` means the midpoint is as good as Max, so the coherent
     phase lies half way between them. The result is
     `offset = floor(Delta/4) = 2`, where `Delta = M/L` is the section
     width.
   * This design clamps the ratio to [0, 2], so the offset stays within
     0..5 phases. A midpoint no better than Second counts as ratio 2.

   The divider is a restoring divider that computes 9 quotient bits (8
   fraction bits), one bit per cycle. The whole interpolator takes 11
   cycles.

**What this rule can and cannot do.** The rule is a heuristic. It is exact
when the coherent phase lies a quarter section away from `i_max`. For a
coherent phase right at `i_max`, it can return up to half a section (5
phases) too far towards the midpoint. In the end-to-end simulation the
acquired phase was 0 to 6 phases from the true coherent phase, including
the drift during acquisition at 400 ppm. Tracking then keeps the error
from growing.

**Timing.** After `pkt_det` the controller waits `SETTLE` = 20 cycles. It
then starts a timing detection every `SLOT` = 48 cycles. The phase for the
next detection is applied as soon as the previous result arrives, so the
correlator refills with samples of the new phase. The final phase is
applied 208 cycles after `pkt_det`, which the end-to-end test checks. The
detections are spaced on a fixed grid, so if `SLOT` is a multiple of the
preamble period, every detection sees the periodic preamble at the same
alignment. An elaboration check requires `SLOT >= WIN + N + 2`.

## 4. Tracking (`pilot_tracking`, `phase_ctrl`)

During the data symbols the receiver's cross correlator supplies one TD
value per pilot (`pilot_valid`/`pilot_td`). The block averages the four
pilot values of each symbol. The first symbol's average becomes the
reference. For every later symbol the reference is subtracted, and the
sign is the decision:

* new average below the reference: `trk_adjust = 1`, and the controller
  moves the phase one step in the offset direction;
* otherwise the phase is left alone.

At 400 ppm with 80-sample symbols the clock drifts 1.02 phases per
symbol. One step per symbol falls short by 0.02 phases per symbol, which
adds up to less than one phase over a 40-symbol packet. The steps only go
in the direction found during acquisition. **If the clock drifts the other
way, tracking cannot follow.** The end-to-end tests drive the drift in the
acquired direction.

## 5. Interfaces

`adscd_top` (parameters `M`=32, `L`=3, `N`=16, `W`=8, `NP`=4, `FRAC`=8,
`SETTLE`=20, `SLOT`=48, `COEF`):

| port | dir | meaning |
|---|---|---|
| `clk2x`, `rst_n` | in | 2x system clock, asynchronous active-low reset |
| `clk_1x` | out | 0-degree 1x clock; every other port is synchronous to it |
| `adc_clk` | out | A/D sampling clock at the selected phase |
| `adc_valid`, `adc_i`, `adc_q` | in | A/D samples, 8-bit signed, taken on `adc_clk`, delivered in the `clk_1x` domain |
| `pkt_det` | in | a packet was detected: start acquisition, clear the tracking reference |
| `pilot_valid`, `pilot_td` | in | one TD value per pilot, four per OFDM symbol |
| `phase_addr` | out | current phase address |
| `i_max`, `i_second`, `i_c`, `offset_dir` | out | acquisition results |
| `td_valid`, `td`, `interp_ratio`, `interp_offset` | out | detector and interpolator results |
| `state`, `acq_done` | out | controller state, end of acquisition |
| `trk_valid`, `trk_adjust`, `trk_step` | out | tracking decision, adjust request, phase step taken |

**Changing the sizes.** `M` must be a power of two, at least 8. The two
top address bits pick the quadrant, and the rest drive `log2(M) - 2`
buffers per bank. `L` sets the number of coarse sections: acquisition
takes `L + 1` detections and
`SETTLE + 1 + L*SLOT + WIN + 3 + FRAC + 5` cycles. A finer `M` gives a finer
final phase. Tracking still moves one phase per symbol, though, so the
highest offset it can follow falls as `M` grows. A larger `L` costs one
slot per extra section. `SLOT` must cover the window and the correlator
refill (`SLOT >= WIN + N + 2`, checked at elaboration). For the slot grid
to match a repeating preamble, it should also be a multiple of `N`.

The shared widths, constants and the controller state type are defined in
`adscd_pkg`. TD values are 32 bits wide, which leaves headroom and cannot
overflow.

## 6. Choices made here, and departures from the published description

* **Preamble length N = 16, pilot count 4, OFDM symbol length 80.** These
  numbers come from 20 MHz WLAN framing; the published description gives
  none of them. The preamble chips (`COEF`) are a placeholder.
* **One detection per 48-sample slot.** The published description acquires
  in "four preambles". The TD window it defines (27 lags) plus the
  correlator refill is longer than one 16-sample preamble. This design
  therefore still uses four detections, but each takes three preamble
  periods, 208 cycles in all.
* **Triangulation formula.** The published rule also rounds `2 - d1/d2`
  down before scaling it. Taken literally, that gives only whole
  multiples of `Delta/4`, with nothing in between. This design keeps the
  fraction and rounds only the scaled product: divide, subtract from 2, multiply by M/(4L), then
  take the integer part. It still returns the rule's two named cases
  exactly. The ratio clamp and the handling of a non-positive denominator
  are this design's additions.
* **Circular midpoint and direction.** Both are taken the short way round
  the phase circle.
* **Tracking.** The step size (one phase) and the reference policy (the
  first data symbol of the packet, kept for the whole packet) are this
  design's choices.
* **Register width.** The published tracking stores fewer than 100 bits.
  Here TD keeps its full 32-bit width, about 200 flip-flops.
* **Clock generator model.** The generator model has uniform phase steps;
  the published circuit has non-uniform ones.
* **Not included.** The A/D converters, the packet detector, the OFDM
  receiver (S/P, FFT, pilot extractor, cross correlator) and the 2x clock
  source. Their signals are ports of `adscd_top`.

## 7. Simulation

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`.
Each one prints `TB_RESULT checks=N failures=F` and has a watchdog. Run one
with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_adscd_top rtl/adscd_pkg.sv tb/tb_adscd_top.sv
./obj_dir/Vtb_adscd_top
```

* `tb_adscd_top` runs the full design at its default sizes. It contains a
  channel and A/D model: a periodic BPSK preamble with a transmitter clock
  400 ppm slow, linear interpolation between symbol points, and sampling at
  the real time stamps of `adc_clk` edges, so the chosen phase really moves
  the sampling instant. It sends six packets with different timing
  offsets. For each packet it checks:
  * the number of detections (4) and the acquisition time (208 cycles);
  * the final phase against an independent floating-point evaluation of
    the acquisition rule on the observed TD values;
  * the distance to the true coherent phase;
  * during 40 data symbols, that tracking keeps the error bounded.

  It also checks that each mechanism happened at least once: zero and
  non-zero interpolated offsets, both offset directions, the wrap-around
  midpoint, and tracking steps and non-steps.
* `tb_adscd_ppm_sweep` runs the same model at -400, -200, -50, +50, +200
  and +400 ppm, two packets each. It makes the same checks per packet. It
  also checks that the number of tracking steps grows with the offset. At
  400 ppm the tracking made 73 steps in 80 symbols against about 82
  phases of drift, and the phase error stayed within 3 phases of the
  acquired error. The pilot model in all three end-to-end tests lets the coherent phase
  drift in the direction acquisition reported (see section 4). None of
  them includes the fading channel, AGC or FFT of a complete receiver.
* `tb_adscd_m64_l4` runs the design with 64 phases and 4 coarse sections.
  It checks that acquisition then takes L + 1 = 5 detections, at phases
  0, 16, 32 and 48 and then the midpoint, in 256 cycles. It also makes the
  same accuracy and tracking checks, at +/-200 ppm. With 64 phases,
  200 ppm is already about one phase of drift per symbol. So the highest
  offset that tracking can follow halves when M doubles.
* The unit testbenches compare each block with a reference model. They
  cover sorter ordering, the interpolator's fixed-point result and its
  latency, and the detector's TD values and latency, including full-scale
  preamble input and a window restarted before it completes. They also cover the
  controller's phase sequence, slot timing and tracking step, the
  tracking's reference and sign, the clock divider's phase relations, and
  the generator's 32 delays.

Verilator must run with `--timing` because of the behavioural clock
generator model. That model's edge delay is computed at run time and is
zero at phase 0. Verilator warns about this (ZERODLY), and the warning
is expected. `-Wno-fatal` keeps warnings like this one from stopping the
build.
