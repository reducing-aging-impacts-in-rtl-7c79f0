# Aging-calibrated digital sensor

A delay-based digital sensor watches for voltage, temperature and clock
conditions that push a chip outside its timing specification. It does this by
checking how far a toggling signal gets along a chain of buffers in one clock
period. Its own buffers age, though (NBTI and HCI raise transistor thresholds),
so the chain slows down over the years. The reading drifts downwards, and a
fixed alarm window goes wrong in two ways:

- slightly slow but safe conditions start to raise **false alarms**;
- slightly fast, unsafe conditions fall back into the window and become
  **missed alarms**.

This design fixes the drift at run time with a second, identical sensor placed
next to the first. The **Always-on sensor (A)** does the monitoring. The
**Rarely-on sensor (R)** is switched on only for a few clock cycles per
calibration, for example once a month, so it stays practically new. At each
calibration the difference between the two readings is the offset caused by
aging. That offset is stored and added to every A reading until the next
calibration. Two correction schemes are built:

- **DC (differential calibration):** `delta = AFN_R - AFN_A`, then
  `C-AFN_A = AFN_A + delta`.
- **ML-DC:** a linear regression over the present A reading and the readings of
  the last four calibrations estimates the reading of a new sensor. The
  difference is then applied the same way as in DC.

The method follows the paper *Reducing Aging Impacts in Digital Sensors via
Run-time Calibration* (Anik, Ebrahimabadi, Danger, Guilley, Karimi). The
paper's text and figures give the sensor structure, the AFN calculator, the
error check, the alarm rule and both calibration schemes. The RTL here is an
independent implementation of them. Number formats, the calibration sequencer
and the timing are this implementation's own choices. The section
"Departures and choices" lists them.

## 1. How the sensor measures: FN and AFN

```
        +---+   a0 (F/2)
clk --->| T |----> [buf]x N0 ----> [buf]-+->[buf]-+-> ... ->[buf]-+
        +---+                            |        |               |
                                        D O1     D O2     ...    D ON1   (sampled at every clk)
```

- A toggle flip-flop drives `a0`, which changes at every clock edge.
- `a0` passes through `N0 = 9` leading buffers, then through `N1 = 43` tapped
  buffers. Each tapped buffer feeds a sampling flip-flop `O1..O43`.
- At a clock edge, the flip-flops that the newest `a0` edge has already reached
  hold one value. The flip-flops beyond it still hold the previous value.
- **FN** is the index of the first flip-flop that disagrees with `O1`. A slow
  chip (hot, low voltage, aged) gives a small FN. A fast chip (cold, high
  voltage, or a shortened clock period) gives a large FN.
- In a fast chain an older edge can still be travelling further down, which
  gives a second boundary. Only the first one counts.

**AFN** is FN averaged over the last `N = 2^SEL` cycles (SEL = 0..3, so N = 1,
2, 4 or 8). Averaging removes the noise of single cycles. For example, a 0→1
edge that travels slightly slower than a 1→0 edge makes FN alternate between
15 and 16, and AFN reads 15.5.

At nominal conditions the evaluated sensor reads AFN = 22. The acceptable
window is 22 ± 5:

- AFN < 17: alarm, chip too slow.
- AFN > 27: alarm, chip too fast.

### AFN calculator (`afn_calculator`)

An 8-entry shift register takes FN at every cycle. One adder and one
subtractor keep a running sum:

```
SUM <= SUM + FN_i - FN_(i-N)        FN_(i-N) = shift register entry N-1 (0, 1, 3 or 7)
AFN  = SUM / N                      a shift, with the shifted-out bits kept
```

The result is exact: `afn = SUM << (3 - SEL)` is unsigned fixed point with 3
fraction bits. The value 124 means 15.5. `afn_valid` rises once N readings have
entered after reset or `clr`. SEL must be held constant while the calculator
runs; change it under reset.

### Error checker (`error_checker`)

Averaging hides disturbances that last only a cycle or two. The error checker
compares each FN with the one before it:

```
error = |FN_i - FN_(i-1)| > THR
```

THR is an input. This check catches a glitch even when AFN stays in range.

## 2. Calibration

### Calibration sequence (`calibration_controller`)

A calibration starts in any of three ways:

- on a `cal_req` pulse (ad hoc);
- when a programmable period expires (`cal_period` cycles, 0 = off; the
  counter is 56 bits, enough for a month at any clock below 27 GHz);
- once right after reset. This first calibration records the
  process-variation offset of the new pair.

Sequence:

1. **WAKE:** R is switched on (`r_on`). For `SETTLE = 2` cycles its averaging
   is held in restart. The sampling flip-flops of a chain that was just
   started hold stale values, so those readings are dropped.
2. **WAIT:** R runs until both AFNs are valid (N readings). In the cycle where
   both are valid, the adder/subtractor of both calibrators is switched to
   subtract mode for exactly one cycle. Both calibrators store their new
   `delta`.
3. **IDLE:** R is switched off. The calibrators return to add mode.

R is therefore on for `SETTLE + N + 1` cycles: 11 with SEL = 3, 7 with
SEL = 2. A request that arrives during a calibration is served right after it.

### DC (`dc_calibrator`)

One adder/subtractor and one `delta` register.

- Calibration cycle: `delta <= AFN_R - AFN_A`.
- Operating cycle: `c_afn <= AFN_A + delta`.

Because the single adder is busy in the calibration cycle, `c_afn` keeps its
previous value for that one cycle. `delta` is signed: process variation can
make R the slower sensor when the pair is new.

### ML-DC (`mldc_calibrator`, `afn_history`, `lr_engine`)

This is the subtlest part of the design: what the regression sees depends on
when it is evaluated.

The history register (`afn_history`) holds the `(AFN_A, AFN_R)` pairs of the
last `M-1 = 4` calibrations, newest first. The regression uses
`NF = 2M-1 = 9` features:

```
x[0]      = present AFN_A
x[2j+1]   = AFN_A read at calibration TC_(i-1-j)      j = 0..3
x[2j+2]   = AFN_R read at calibration TC_(i-1-j)

AFN'_A = bias + sum_k w[k] * x[k]        (lr_engine, 9 multipliers + adder tree)
```

At calibration time TC_i:

1. `AFN'_A` is computed with the history of TC_(i-4)..TC_(i-1).
2. `delta <= AFN_R - AFN'_A` is stored.
3. Only after that is the pair of TC_i pushed into the history.

At operating time: `c_afn <= AFN'_A + delta`.

So during operation the history already includes TC_i, one pair newer than
the history used for `delta`. A model whose history weights do not cancel
out therefore shifts C-AFN by a small amount after each calibration. Train
the weights with that in mind. The lifetime testbench shows one way: it fits
them by least squares on features that are built the same way.

The weights are trained offline in software, for example on accelerated-aging
data of one sensor pair. They enter through the `lr_w` and `lr_bias` ports.

Number formats:

- `lr_w`: signed, 16 bits, 8 fraction bits (256 = 1.0).
- `lr_bias`: signed AFN fixed point (3 fraction bits).
- The weighted sum is rounded to the nearest 1/8. The result is saturated to
  the signed 11-bit range.

Setting `lr_w[0] = 256` and every other weight and the bias to 0 makes ML-DC
behave exactly like DC.

Before four calibrations have happened, the history holds zeros.
`mldc_hist_count` says how many pairs it holds. A model trained for a full
history gives meaningless estimates until then. Use DC for the first
calibrations, or train the weights accordingly.

## 3. Alarm and DVFS thresholds

`alarm_generator` applies the window rule to the selected calibrated value. The
`method` input selects DC or ML-DC.

```
alarm_slow = C-AFN < AFN_l      alarm_fast = C-AFN > AFN_h      alarm = slow | fast
```

The outputs are registered and stay low while the value is not valid.

`dvfs_threshold_table` holds one `(AFN_l, AFN_h)` pair per DVFS operating
point (3 points by default). The `dvfs_mode` input selects the pair. Each
operating point is meant to be equally safe, so the windows differ only
slightly between points. The thresholds must not be changeable by software in the field, so the
table is write-once:

- Reset loads the `AFN_L_TAB`/`AFN_H_TAB` parameters. Every entry defaults to
  the nominal 17..27.
- Boot code may overwrite entries through `thr_wr_en`/`thr_wr_mode`/
  `thr_wr_afn_l`/`thr_wr_afn_h`, for example with values kept in fuses.
- `thr_lock` freezes the table until the next reset. `thr_locked` reports the
  frozen state.

No values for the other operating points are known here.

## 4. Top level (`aging_calibrated_sensor`)

```
sensor A (always on) --AFN_A--+--> DC calibrator ----+
sensor R (rarely on) --AFN_R--+--> ML-DC calibrator -+--> method mux --> alarm generator
         ^ r_on                     ^ add/sub mode                          ^ AFN_l, AFN_h
         +--- calibration controller                       DVFS threshold table
```

Each "sensor" is a `sensor_unit`: a `digital_sensor`, a `position_detector`, an
`afn_calculator` and an `error_checker`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous active-high reset |
| `raw_access` | in | 1 | 1: the readings below are visible; 0: they read as zero |
| `sel` | in | 2 | averaging depth, N = 2^sel |
| `thr` | in | 6 | error threshold THR |
| `method` | in | 1 | `METHOD_DC` or `METHOD_MLDC` drives the alarm |
| `dvfs_mode` | in | 2 | DVFS operating point |
| `thr_wr_en`, `thr_wr_mode`, `thr_wr_afn_l`, `thr_wr_afn_h` | in | 1, 2, 11, 11 | load one threshold-table entry |
| `thr_lock` / `thr_locked` | in / out | 1 | freeze the threshold table until reset |
| `cal_req` | in | 1 | start a calibration |
| `cal_period` | in | 56 | cycles between automatic calibrations, 0 = off |
| `lr_w[9]`, `lr_bias` | in | 16 / 11 | regression weights and bias |
| `a_rise_delay_ps`, `a_fall_delay_ps`, `r_rise_delay_ps`, `r_fall_delay_ps`, `clk_period_ps` | in | 16 | operating conditions seen by the two delay-chain models (see section 5) |
| `alarm`, `alarm_slow`, `alarm_fast` | out | 1 | window rule on the calibrated AFN |
| `error_a`, `error_r` | out | 1 | FN jump above THR (`error_r` only while R is on) |
| `c_afn`, `c_afn_valid` | out | 11, 1 | calibrated AFN (signed, 3 fraction bits) |
| `afn_a`, `afn_r`, `fn_a`, `fn_r` | out | 9, 6 | raw readings |
| `delta_dc`, `delta_mldc` | out | 11 | stored corrections |
| `r_on`, `cal_busy`, `cal_count`, `mldc_hist_count` | out | | calibration status |

**Access gate.** The readings (`fn_*`, `afn_*`, `c_afn`, `delta_*`) show how
the chip's own supply and temperature move. That is a side channel: an
attacker can use it to watch the chip's power. These outputs therefore read as
zero unless `raw_access` is high. The system should raise `raw_access` only for
privileged software or test. The alarm, error and calibration status outputs
are always visible.

**Latency.** FN is combinational from the sampling flip-flops. AFN comes one
edge later, `c_afn` one edge after that, and the alarm one more edge later. A
change of conditions reaches the alarm 3 cycles after it is sampled, plus the
N cycles the average needs to follow it.

### Sizes

The defaults are those of the evaluated sensor:

| parameter | default |
|---|---|
| `N0` (leading buffers) | 9 |
| `N1` (sampled buffers) | 43 |
| `M` (ML-DC depth) | 5 |
| `N_MODES` (DVFS points) | 3 |
| `SETTLE` (cycles) | 2 |
| `CNT_W` (period counter bits) | 56 |

`dsens_pkg` holds the shared formats:

| constant | value | meaning |
|---|---|---|
| `FN_W` | 6 | FN width |
| `AFN_W` | 9 | unsigned AFN, 3 fraction bits |
| `CAFN_W` | 11 | signed calibrated AFN |
| `W_W` | 16 | weight width |
| `W_FRAC` | 8 | weight fraction bits |

If you change `N1` to more than 63, widen `N1_DEF` in the package as well: the
FN width is derived from it.

## 5. The delay-chain model

The buffer chain is analog behaviour, so `delay_chain_model` is a
**behavioural model**, not logic meant for synthesis. On silicon it would be
`N0 + N1` standard-cell buffers kept from optimisation. The toggle flip-flop
and the sampling flip-flops around it (`digital_sensor`) are ordinary logic.

The model is cycle based:

- It remembers the last four values of `a0`.
- For each tap k, it takes the newest `a0` edge that has covered `N0 + k`
  buffers in the time since it was launched.
- A rising edge uses `rise_delay_ps` per buffer and a falling edge uses
  `fall_delay_ps`. The period is `clk_period_ps`.

These three inputs stand for the physical condition: supply, temperature,
process and age. They are not pins of a real sensor. With equal rise and fall
delay `d` and period `T`, the first boundary is at `FN = floor(T/d) - N0 + 1`,
as long as `(N0+1)*d <= T`. A delay of 33 ps at 1000 ps gives the nominal 22.

Aging is modelled by giving the A chain a larger delay than the R chain. The
size of that difference is up to the user.

Synthesis of the complete top therefore includes the model's comparison logic.
Those cells are not representative of the real sensor. The rest of the design
is small: a few hundred flip-flops, the 9 multipliers of the regression, and a
handful of adders.

## 6. How far to trust it, departures and choices

Every module has a self-checking testbench, and each one was shown to fail on
a deliberately broken copy of its module. The end-to-end test runs the top at
its default sizes. What has not been checked:

- timing closure or gate-level behaviour;
- a real buffer chain: the delay-chain model is an idealised stand-in;
- regression weights trained on real aging data.

Read the points below before trusting the design for a specific use.

- **FN range.** FN is 2..N1. With only the sampled word available, a boundary
  before O1 cannot be seen. A word with no boundary at all saturates to N1,
  the fastest reading. The evaluated chain is sized to always show a boundary.
- **AFN fraction.** The division by N keeps its fraction bits instead of
  dropping them. This keeps readings such as 15.5 and thresholds such as 8.5
  exact.
- **Regression size.** 9 multipliers, one per feature (present AFN_A plus 4
  stored pairs). The published overhead figure of 5 multipliers and 4 adders
  would fit a smaller feature set. This design follows the published
  description of the features instead, so its regression is larger than
  that figure.
- **R on-time.** The published evaluation kept R on for 8 cycles per month. This
  sequencer needs `SETTLE + N + 1` cycles: 11 at N = 8, 7 at N = 4.
- **Memory retention.** `delta` and the ML-DC history are registers cleared by
  reset. If the chip loses power between calibrations, they should live in
  retained or non-volatile storage, which is not modelled here. The first
  calibration after reset restores `delta`, but the ML-DC history starts
  empty.
- **Sensor OFF.** A sensor is switched off by holding its toggle and sampling
  flip-flops (clock gating). Power gating would be the stronger choice against
  aging. It is outside RTL.
- **Both schemes present.** DC and ML-DC both run all the time. `method` picks
  which one drives the alarm. A product would keep one.
- **DVFS table.** Only the nominal window is known. The other entries are
  placeholders equal to it. The non-volatile memory the thresholds come from
  is not part of the design. The table is a register file that is loaded
  and locked after reset.
- **Not included.** Offline training of the regression. The AES core and UART
  of the FPGA demonstration: the AES core only served as a circuit under
  attack, and the UART only carried results to a PC.

## 7. Simulating

Every file has one module or package named like the file. The testbenches
use `#` delays, so build them with `--timing` and a default timescale:

```sh
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -Irtl rtl/dsens_pkg.sv tb/tb_aging_calibrated_sensor.sv \
    --top-module tb_aging_calibrated_sensor
./obj_dir/Vtb_aging_calibrated_sensor
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
counts a failure if a test hangs.

| testbench | what it shows |
|---|---|
| `tb_aging_calibrated_sensor` | the whole design at default sizes. It covers the calibration after reset, a false slow alarm of the aged sensor that recalibration removes, a missed fast alarm that recalibration restores, genuine slow and fast alarms, a clock glitch caught by the error checker, periodic and ad hoc calibration, ML-DC with a non-trivial model, and loading and locking the threshold table with DVFS mode changes that change the alarm. Each mechanism is counted and required. |
| `tb_aging_lifetime` | seven years of monthly calibration (85 calibrations) under a synthetic, saturating aging model and random conditions, with both DC and ML-DC. The ML-DC weights are fitted in the testbench by least squares on a second synthetic pair, then used on the tested pair. It counts false and missed alarms for each method and for the same aged sensor without calibration, and requires both methods to reduce them. |
| `tb_fpga_clock_sweep` | eight sensor units sized like the FPGA version: 22 leading buffers, 20 sampled buffers, AFN over 8 cycles. The clock is swept from 70 to 100 MHz with an alarm below AFN 8.5. AFN falls with frequency, and the alarm starts above 86 MHz with the chosen buffer delays. |
| `tb_<block>` | one self-checking test per module against values computed in the testbench |

A typical lifetime run checks 850 random conditions, of which 362 should alarm:

| | false alarms | missed alarms |
|---|---|---|
| no calibration | 112 | 59 |
| DC | 40 | 53 |
| ML-DC | 98 | 4 |

Both methods remove most wrong alarms. ML-DC in particular misses almost
none. Its estimate runs slightly low here, because the tested pair's
reference sensor is 1 ps slower than a new active sensor, so it trades
missed alarms for false slow alarms. These counts come from a made-up aging
curve and a threshold on whole FN steps. They show that the mechanisms work,
not how a real chip will behave.

All block tests run in well under a second. The lifetime test runs in a few
seconds.
