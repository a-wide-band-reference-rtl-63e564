# Reference-less bidirectional frequency-locked loop for continuous-rate data

A clock-and-data-recovery receiver has to bring its VCO to the right
frequency before its phase detector can lock. It usually does this with a
reference crystal, or with a sweep that starts at one end of the VCO range.
This loop does it without a reference clock and without a sweep. The incoming
NRZ data is the only frequency reference. The loop:

- decides from the data whether the VCO is too fast or too slow and steers
  the VCO either way;
- declares lock once it is close enough;
- notices when the data rate changes and starts a new acquisition from the
  frequency it is at.

The clock is **half rate**: at lock the VCO runs at half the bit rate, so
2 Gb/s data needs a 1 GHz clock. The VCO gives two clocks, `CKI` and `CKQ`,
with `CKQ` a quarter period behind `CKI`.

```
            +--------------------- FD (fd) ---------------------+
 data ----->|  coarse FD (cfd)        fine FD (mdqfd)           |  UP_FD   +----+  VC  +-----+
            |   FD_DATA slower  DN_C   UP_F/DN_F                |--------->| CP |----->| VCO |--+-> CKI, CKQ
            |   FD_DATA faster  UP_C      |                     |  DN_FD   | Cp |      +-----+  |
            |   STOP flag + muxes <-------+                     |--------->+----+               |
            |   lock detector -> LOCK_FD                        |                               |
            |   loss-of-lock detector -> LLD (clears STOP, LD)  |<------------------------------+
            +---------------------------------------------------+
```

The loop has two detectors. The **coarse detector** recognises large errors in
either direction from single data bits. The **fine detector** is a modified
digital quadricorrelator. It gives a signed decision near lock, where the
coarse detector is blind. A single flag, `STOP`, moves control from one to the
other. Sections 2 and 3 explain this hand-over and the fine detector. They are
the parts that take the most care to follow.

## 1. Coarse detection: two one-bit tests

Both coarse detectors compare the width of a data pulse with half a clock
period. At half rate, half a clock period is exactly one bit time.

**Data faster than the clock, `fd_data_faster` (gives UP).**
- Flip-flop FF1 has its D input tied high. A rising data edge sets it, and it
  is held clear while `CK` is low.
- FF2 samples FF1 on the falling data edge.
- `UP1` goes high when a `1` bit both started and ended inside one high phase
  of `CK`. That means the bit was shorter than half a clock period, so the
  data is faster than twice the clock.

**Data slower than the clock, `fd_data_slower` (gives DN).**
- FF1 is set by the rising clock edge and held clear while the data is low.
- FF2 samples it on the falling clock edge.
- `DN1` goes high when the data stayed high across a whole high phase of the
  clock, from a rising edge to the following falling edge.

**Pulse stretching.** Each detector has a third flip-flop. It samples
`UP1`/`DN1` on the falling edge of `CK/2`, the clock divided by two. The
output is `UP = UP1 | UP2` (and `DN = DN1 | DN2` for the slower detector).
This stretches every decision by up to two clock periods. Wider pulses put
more charge on the loop capacitor for each detected bit, which is what makes
acquisition fast. Here `CK/2` is made by a toggle flip-flop on the rising
edge of `CKI`.

**Asynchronous clears.** The clock or the data clears FF1 asynchronously in
both circuits. That is how the circuit works, not an accident. Verilator
warns about it (SYNCASYNCNET).

## 2. The hand-over: the STOP flag

The slower detector also fires at lock. A run of two or more `1` bits lasts a
full clock period, so it often spans a whole clock high phase. If `DN_C` went to
the charge pump all the time, the loop would be pulled below the right
frequency. The faster detector has no such problem: a single `1` bit is never
shorter than half a clock period while the VCO runs at or above the right
frequency.

`cfd` therefore keeps a `STOP` flip-flop. Its D input is tied high, it is
clocked by `UP_C`, and it is cleared by `R`. Two multiplexers then choose
what reaches the charge pump:

| STOP | UP_FD           | DN_FD           |
|------|-----------------|-----------------|
| 0    | `UP_C`          | `DN_C \| DN_F`  |
| 1    | `UP_C \| UP_F`  | `DN_F`          |

A typical acquisition runs in this order:

1. **The VCO starts too slow.** A `1` bit soon fits inside a clock high phase,
   so `UP_C` fires. That sets `STOP`. From then on `UP_C` and the fine
   detector drive the loop up, and `DN_C` is ignored.
2. **Near lock.** `UP_C` stops by itself and the fine detector takes over.
3. **The VCO starts too fast.** `DN_C` and `DN_F` pull it down until the first
   `UP_C` event. That means the clock has just passed below the data rate.
   `STOP` is then set and the loop finishes as in step 1.

`R` is the system reset or the loss-of-lock pulse `LLD`. Every new acquisition
therefore starts with `STOP` low, so both directions are open.

## 3. The fine detector (M-DQFD)

`mdqfd` has four flip-flops, all clocked by the rising data edge:

- `Q1` samples `CKI` and `Q2` samples `CKQ`;
- `Q3` takes the old `Q1` and `Q4` takes the old `Q2`.

So `(Q3,Q4)` is the clock phase seen at the previous rising data edge, and
`(Q1,Q2)` is the phase seen at the present one. The quadrant of the clock
phase is numbered from `(CKI,CKQ)`:

| state | CKI | CKQ |
|-------|-----|-----|
| 1     | 1   | 0   |
| 2     | 1   | 1   |
| 3     | 0   | 1   |
| 4     | 0   | 0   |

With `CKQ` lagging, the phase runs 1 → 2 → 3 → 4. Only one previous state
matters, state 2 (`Q3 = Q4 = 1`):

- **Moved back to state 1:** the data edges are coming earlier, so the data is
  faster. This gives `UP_F = Q1 & ~Q2 & Q3 & Q4`.
- **Moved on to state 3:** the data is slower. This gives
  `DN_F = ~Q1 & Q2 & Q3 & Q4`.

A decision holds until the next rising data edge. Using only state 2 means
the detector fires only when the phase drifts across a quadrant boundary. With
a small frequency error that rarely happens, so the detector is quiet near
lock. The lock detectors rely on that.

**How these equations were chosen.** The published description labels the
gates with equations that, read literally against the flip-flop chain, swap
the roles of the old and the new sample. Its prose states the rule in terms of
states instead: a second edge that has drifted back across the 1/2 boundary
means UP, one that has drifted on into state 3 means DN. The equations above
implement that state rule. Taking the printed labels literally gives a
detector that does not steer the loop; `tb_mdqfd` rejects that reading.

**A limit of half-rate operation.** Two rising data edges `k` bits apart see
clock phases `k` half-periods apart, plus the frequency error.

- For even `k` the half-periods cancel, and the decision has the right sign.
- For odd `k` they add 180°. The sample lands in the opposite quadrant pair,
  and a drift across the 4/1 boundary is read with the opposite sign.

The net fine-detector drive is therefore the difference between even- and
odd-spaced edge pairs in the data. It is weaker than the full-rate
quadricorrelator's, and it depends on the data pattern. With PRBS7 data the
loop still converges. `UP_C` does most of the upward work far from lock.

## 4. Lock and loss-of-lock

The published design says what these detectors do but not how they are
built. The circuits here are this design's own. Both watch the fine detector.
`ffd_event_sync` brings `UP_F | DN_F` into the `CKI` domain with a two-flop
synchroniser and turns each rising edge into a one-cycle event.

- **`lock_detector`** raises `LOCK_FD` after `LOCK_CYCLES` (512) consecutive
  `CKI` cycles with no event. `LOCK_FD` stays high until `LLD` or reset.
- **`lol_detector`** is armed while `LOCK_FD` is high. It counts events in
  windows of `LOL_WINDOW` (512) cycles. If `LOL_EVENTS` (12) events fall in
  one window, it drives `LLD` for `LLD_CYCLES` (64) cycles.

`LLD` clears `STOP` and the lock detector, and the loop acquires again. The
capacitor voltage is not reset: the new acquisition starts from the present
frequency and goes whichever way is needed. `LOCK_FD` does not gate the charge
pump. After lock, the FD keeps correcting slow drift through the fine
detector.

The thresholds trade speed against false alarms. At lock, PRBS data
occasionally makes a few fine-detector events in a row. With a 12-event
threshold, a false `LLD` at 2 Gb/s is rare but not impossible. If one
happens, the loop simply re-acquires.

## 5. Analog parts: behavioural models

The charge pump, the loop capacitor and the VCO are analog. They are written
as behavioural real-valued models. They simulate but do not synthesise, so
`fll` and `fll_testbed`, which contain them, also do not synthesise.

| model          | parameter       | default          | basis |
|----------------|-----------------|------------------|-------|
| `charge_pump`  | `I_CP_A`        | 40 µA            | own choice |
|                | `C_P_F`         | 50 pF            | own choice, 0.8 mV/ns |
|                | `V_INIT`        | 0.65 V           | start of the published VC trace |
|                | `VDD`           | 1.8 V            | published supply |
| `wideband_vco` | `F_START_HZ` at `V_START` | 400 MHz at 0.65 V | published start frequency |
|                | `KVCO_HZ_PER_V` | 2.5 GHz/V        | own choice |
|                | `F_MIN_HZ`–`F_MAX_HZ` | 200 MHz–1.3 GHz | the 0.4–2.6 Gb/s lock range at half rate |
|                | `JITTER_PS`     | ±2 ps per quarter period | own choice |

The charge pump integrates `±I_CP_A` into `C_P_F` every `STEP_PS` (10 ps).
`UP` and `DN` together cancel. The output is clamped to 0..VDD.

The VCO makes `CKI`/`CKQ` as four quarter-period steps. It re-reads `VC`
every quarter period.

**Why the VCO has jitter.** A noiseless simulation with an exact rational
ratio between bit rate and clock can freeze the data-clocked samplers on one
pattern, for example at 5:2. The jitter breaks that up, as real noise would.

## 6. Test set-up and measured behaviour

`fll_testbed` is the top level. It contains:

- two PRBS7 generators (`x^7 + x^6 + 1`, different seeds), clocked by
  `f_ck1` and `f_ck2`;
- a multiplexer selected by `s` (0 picks stream 1);
- the FLL.

Its outputs are `VC`, the VCO frequency, the recovered clock `F_CK` (= `CKI`),
`LOCK_FD`, `LLD`, and the internal detector signals.

Results with the default parameters (`tb_fll_testbed`, one seed):

| phase | result |
|-------|--------|
| 400 MHz start, 2 Gb/s data | `LOCK_FD` after 4.6 µs at 998 MHz |
| switch to 1.5 Gb/s | `LLD` 0.37 µs after the switch |
| | lock again 2.9 µs after the switch, at 747 MHz |

Across seeds, the first lock takes about 3–15 µs and the re-lock about
2–9 µs. `tb_fll` steps the rate 2.4 → 1.7 → 1.1 Gb/s. It locked within
about 1.5 % of the target each time, after 4–15 µs.

The published circuit reaches lock in 1.73 µs (increment) and 0.38 µs
(decrement). The gap comes from the charge-pump current, capacitance and VCO
gain chosen here, which the original does not give. Raise `I_CP_A` or
`KVCO_HZ_PER_V` for faster, coarser acquisition.

**Known limits:**

- **Lock range ends.** The ends of the 0.4–2.6 Gb/s range sit exactly on the
  VCO model's limits. `tb_fll_range` starts two loops at 400 MHz, one with
  2.6 Gb/s data and one with 0.4 Gb/s data. Both lock, after about 4–19 µs
  and about 2.5–6 µs. Each VCO then rests on its limit, so this shows the
  detector steering to the end of the range, not loop behaviour beyond it.
- **False lock after a very large step.** After a step from 2.5 Gb/s to
  0.5 Gb/s, the VCO sits at 1.25 GHz against a 250 MHz target, a 5:2 ratio.
  At that ratio the fine detector can stay silent. `LOCK_FD` then stays high
  and no `LLD` comes, so the loop stays at the wrong frequency. The original
  design claims freedom from harmonic locking; this model does not reach it
  for such steps. Steps within about 2:1 behave as intended.
- **Slew rates.** The original reports 30.2 mV/µs (increment) and 84.4 mV/µs
  (decrement) for its transistor-level circuit. It credits its pulse
  extension with roughly doubling them over a detector without it.
  `tb_fll_slew` measures the same quantities on this model over the first
  0.4 µs of an acquisition from 400 MHz:
  - **Increment (2 Gb/s).** VC rises at about 105–250 mV/µs. `UP_C` is high
    18–19 % of the time, against 12–14 % for `UP1` alone.
  - **Decrement (0.5 Gb/s).** VC falls at about 80–510 mV/µs. `DN_C` is high
    37–56 % of the time, against 24–34 % for `DN1`.

  So the extension widens the coarse pulses about 1.4–1.6 times. The absolute
  rates follow from this design's charge-pump current and capacitor, not from
  the original circuit.

## 7. Files and simulation

| file | contents |
|------|----------|
| `rtl/fll_pkg.sv` | `updn_t` (UP/DN pair) and the analog model constants |
| `rtl/fd_data_faster.sv`, `rtl/fd_data_slower.sv` | coarse increment / decrement detectors |
| `rtl/cfd.sv` | coarse FD with `STOP` and the output multiplexers |
| `rtl/mdqfd.sv` | fine detector |
| `rtl/ffd_event_sync.sv` | fine-event synchroniser |
| `rtl/lock_detector.sv`, `rtl/lol_detector.sv` | `LOCK_FD` and `LLD` |
| `rtl/fd.sv` | the complete frequency detector (synthesisable) |
| `rtl/charge_pump.sv`, `rtl/wideband_vco.sv` | behavioural analog models |
| `rtl/fll.sv` | the loop |
| `rtl/prbs7.sv` | data generator |
| `rtl/fll_testbed.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fll_range.sv` | the 0.4 and 2.6 Gb/s ends of the lock range |
| `tb/tb_fll_slew.sv` | VC slew rate and the effect of the pulse extension |

All delays are in picoseconds (`timescale 1ps/1fs`). The synthesisable part is
`fd` and everything below it, plus `prbs7`.

Each testbench prints `TB_RESULT checks=N failures=M`, and also has a
watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    -Irtl rtl/fll_pkg.sv tb/tb_fll_testbed.sv --top-module tb_fll_testbed
./obj_dir/Vtb_fll_testbed +verilator+rand+reset+2 +verilator+seed+7
```

`tb_fll_testbed` runs the whole scenario with default parameters in under a
second of wall time. Some unit testbenches override the detector parameters
to stay short:

| testbench | parameters |
|-----------|------------|
| `tb_lock_detector` | `LOCK_CYCLES = 20` |
| `tb_lol_detector` | `LOL_WINDOW`/`LOL_EVENTS`/`LLD_CYCLES` = 32 / 4 / 8 |
| `tb_fd` | `LOCK_CYCLES` = 256, `LOL_WINDOW`/`LOL_EVENTS`/`LLD_CYCLES` = 256 / 8 / 64 |

`tb_fd` drives an ideal 1 GHz clock pair with 2.6, 2.0 and 1.6 Gb/s data. It
checks coarse decisions, the `STOP` hand-over, lock and `LLD`.
