# Aging-aware delay-chain timing sensor

A chip that must notice when it is being run outside its specification —
too hot, under-supplied, or deliberately disturbed by a fault attack — can
carry a *digital sensor*: an artificial critical path that fails before the
real logic does. This RTL implements such a sensor together with the two
ways of reading it that were proposed in a published study of how sensors
age, and the clone-based recalibration that study recommends against
aging.

The central fact behind the design: transistor aging (NBTI and HCI) makes the
sensor's buffers slower year after year. An aged sensor at perfectly normal
voltage and temperature looks like a fresh sensor in a hot or under-supplied
chip. It raises false alarms, and it misses real "too fast" conditions.
The design therefore keeps an idle copy of the sensor. The copy barely ages,
and comparing the two tells the checker how far its expectation has to move.

## The sensor and its snapshot

```
 clk ─┬──────────────────────────────────────────────┐
      │   ┌────┐  a0 (F/2)                            │ 33 flip-flops
      └──►│ T  ├──► B1 ► B2 ► … ► B32 ─┬─► B33 ─┬─► … ─► B64
   rst ──►│ FF │                       │        │          │
          └────┘                      ff1      ff2        ff33   → snapshot q[32:0]
```

* A toggle flip-flop flips `a0` on every clock edge, so every buffer in the
  chain switches once per cycle.
* The chain has 64 buffers. The outputs of buffers 32 to 64 go to 33
  flip-flops (`q[0]` is flip-flop 1, behind 32 buffers; `q[32]` is
  flip-flop 33, behind 64).
* At each clock edge the 33 flip-flops take a snapshot of the wave
  travelling down the chain. Tap *k* sits behind (31 + k) buffer delays.
  If that delay spans *m* whole clock periods, the tap shows the value `a0`
  had *m* cycles earlier. Taps therefore fall into runs of equal value, and
  the run boundaries are the *phase changes*.

The clock is tuned so that a fresh part at the nominal condition has exactly
one change, at flip-flop 18:

```
flip-flop   1 ........ 17 | 18 ........ 33
value       A  A  A ... A | Ā  Ā  ... Ā      (A alternates every cycle)
```

A slower chain (heat, low supply, age) moves the change to a lower index. A
faster chain (cold, high supply) moves it higher. A much slower chain
spans two clock periods inside the sampled window and shows two changes.
A much faster one shows no change at all. The index of the first change,
FN, is a digital reading of "how much timing margin is left".

With the default numbers used throughout the testbenches — 10 ps per buffer
and a 485 ps clock — flip-flop 17 sits at 480 ps (inside one period) and
flip-flop 18 at 490 ps (beyond it), so FN = 18. With 9 ps buffers FN = 23,
with 11 ps FN = 14, with 12 ps FN = 10, and with 30 ps there are changes at 2
and 18. The clock period is not a parameter of the RTL: it is whatever
clock the sensor is given, and it must be chosen for the chain at hand.

## Reading the snapshot: two checkers

Both checkers measure over a *window* of `WINDOW` (16) consecutive
snapshots. A one-cycle `meas_start` starts both windows together.

**Difference-based method (DBM, `ds_dbm`).** A single XOR compares flip-flop
1 with flip-flop 17. At nominal speed or faster they are in the same phase.
Once the first change has moved to 17 or below, they differ. Any mismatch
in any cycle of the window sets `dbm_alarm`. It is nearly free, but it sees
only "too slow". It also fires for an aged sensor at a normal condition,
which is the false-alarm problem this design addresses.

**Average-based method (ABM, `ds_abm`, `ds_fn_extractor`).** Each cycle a
priority search finds FN, the first flip-flop that differs from its
predecessor. It also reports whether there were several changes
(`multi`) or none (`none`). The window sums FN. Because `WINDOW` is a power
of two, the sum *is* the average AFN in fixed point with log2(WINDOW) = 4
fraction bits: 18.0 is 288, 17.5 is 280. The average is compared with a band:

| alarm             | condition                                     |
|-------------------|-----------------------------------------------|
| `abm_alarm_low`   | AFN < `afn_nominal` − `afn_tol` (too slow)     |
| `abm_alarm_high`  | AFN > `afn_nominal` + `afn_tol` (too fast)     |
| `abm_alarm_multi` | some snapshot in the window had ≥ 2 changes    |
| `abm_alarm_none`  | some snapshot in the window had no change      |

`abm_alarm` is the OR of the four. Both band edges are accepted: with nominal
18 and a tolerance of 5, averages from 13.0 to 23.0 are accepted, and 12.9375
or 23.0625 raise an alarm. `afn_tol` is an input (whole flip-flops). A band of 5
is the tight setting. A band of 8 produces fewer false alarms and misses
more real events. `afn_nominal` is *not* a constant: it comes from the
calibrator.

## Aging correction with a sleeping clone (`ds_clone_calibrator`)

The top holds two identical sensors. The **working sensor** runs all the
time. The **clone** is kept asleep: its toggle flip-flop is held in reset,
so its buffers never switch and it suffers almost no switching-induced
aging. A `cal_start` pulse runs this sequence:

1. wake the clone (release its toggle flip-flop) and wait `WARMUP` (4)
   cycles for its chain to fill;
2. wait until the working ABM checker is idle, then start an ABM window on
   both sensors in the same cycle;
3. both sensors see the same voltage and temperature, so their difference
   is the aging drift: `correction = AFN(clone) − AFN(working)`;
4. set `afn_nominal = 18 − correction` (clamped at 0), put the clone back to
   sleep and pulse `cal_done`.

If either measurement contained a snapshot with several changes or none, the
average is not trustworthy. The old values are then kept and `cal_error` is
set. Example from the end-to-end test: an aged working sensor (12 ps
buffers, FN = 10) at a nominal condition raises a slow alarm against 18 ± 5.
After calibration against a fresh clone (FN = 18) the expectation becomes
10, the same reading passes, and a further slow-down (15 ps buffers,
FN = 2) is caught again.

The correction moves only the centre of the band; the band width stays as set
by `afn_tol`. Calibration should be run at a condition where both sensors
give a single clean change.

## Timing

All control is single-clock and pulse based. The checkers and the calibrator
reset synchronously on `rst`. The toggle flip-flops reset asynchronously.

| event | when |
|-------|------|
| snapshot usable after reset | 3 cycles at the default delays (chain fill) |
| `dbm_done`, `abm_done` | the WINDOW-th rising edge after the edge that samples `meas_start` |
| results (`dbm_alarm`, `afn`, `abm_alarm*`) | valid from `*_done` until the next start |
| `cal_done` | WARMUP + WINDOW + 4 edges after the edge that samples `cal_start` (plus one per cycle the working checker was still busy) |
| `meas_start` during calibration | ignored |
| start while a window is running | ignored |

## Modules

| file | role |
|------|------|
| `rtl/ds_pkg.sv` | shared constants (64, 33, 17, 18, 5, window 16) and the `fn_result_t` struct |
| `rtl/ds_top.sv` | working sensor, clone, DBM, two ABM checkers, calibrator |
| `rtl/ds_sensor.sv` | one sensor: toggle flip-flop + chain + sampling bank |
| `rtl/ds_toggle_ff.sv` | F/2 launch flip-flop |
| `rtl/ds_delay_chain.sv` | **behavioural model** of the 64-buffer chain |
| `rtl/ds_capture_bank.sv` | the 33 sampling flip-flops |
| `rtl/ds_fn_extractor.sv` | per-snapshot first-change search |
| `rtl/ds_dbm.sv` | difference-based checker |
| `rtl/ds_abm.sv` | average-based checker |
| `rtl/ds_clone_calibrator.sv` | clone wake-up, measurement and correction |

Every module has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M`. `tb/tb_ds_top.sv` runs the whole design at
its default sizes. It drives nominal, fast, slow, too-slow (two changes)
and too-fast (no change) conditions, and the ±8 band. It runs one
calibration that removes an aging false alarm and one that must be
refused. It counts each of these mechanisms and fails if one never occurs.

## Aging sweep: miss and false alarms

`tb/tb_ds_aging_sweep.sv` reproduces, in miniature, the comparison that
motivates the calibration. Each operating condition is a fresh-chain buffer
delay from 7 ps (cold or high supply) to 14 ps (hot or low supply), with
10 ps as the nominal condition. Aging adds 1, 2 or 3 ps per buffer. For
each age the testbench measures every condition and compares the result
with the fresh sensor:

* a **miss alarm** is a condition where the fresh sensor alarms and the aged
  one does not (a real event would go unnoticed);
* a **false alarm** is a condition where only the aged sensor alarms.

It does this for DBM, for ABM with ±5 and ±8, and for ABM after a clone
calibration at the nominal condition. Every alarm is checked against a
prediction made from the delays alone. The run prints:

```
aging +1 ps/buffer: DBM miss=0 false=1 | ABM +/-5 miss=1 false=1 | +/-8 miss=1 false=1 | calibrated +/-5 miss=0 false=0 (nominal now 224/16)
aging +2 ps/buffer: DBM miss=1 false=3 | ABM +/-5 miss=3 false=3 | +/-8 miss=3 false=3 | calibrated +/-5 miss=0 false=0 (nominal now 160/16)
aging +3 ps/buffer: DBM miss=3 false=6 | ABM +/-5 miss=5 false=6 | +/-8 miss=5 false=6 | calibrated +/-5 miss=1 false=0 (nominal now 112/16)
```

The grid is coarse: with integer-picosecond buffers one step of delay moves
FN by 4 to 7 positions. The ±5 and ±8 bands therefore agree here, while on
real silicon the wider band removes many of the borderline alarms. A DBM
"miss" at the slowest conditions is aliasing: flip-flops 1 and 17 both lie
one period back and agree again. The absolute numbers say nothing about
real parts. What the sweep shows is the mechanism: aging creates both kinds
of error, and recalibrating against the clone removes most of them.

## The delay model, and what that means for trust

The buffer chain's whole function is its analog delay, which neither RTL
simulation nor synthesis represents. `ds_delay_chain` is therefore a
behavioural model, not hardware. It records its input on a 1 ps grid in a
4096-entry shift register, and tap *k* reads the entry (31 + k) × `buf_delay_ps`
back. `buf_delay_ps` (default `BUF_DELAY_PS` = 10) is a variable. A
testbench changes a condition by assigning it hierarchically:

```systemverilog
dut.u_main.u_chain.buf_delay_ps  = 12;  // aged or hot working sensor
dut.u_clone.u_chain.buf_delay_ps = 10;  // clone stays fresh
```

Consequences:

* Voltage, temperature, process and age exist only through this one number.
  The mapping from real conditions to buffer delay comes from transistor-level
  characterization and is not part of this RTL. The 10 ps and 485 ps values
  are illustrative.
* Rising and falling edges take the same time, all buffers are equal, and
  there is no metastability. A real sensor near a sampling edge can show
  extra, isolated changes. Here multiple changes appear only when the chain
  spans two clock periods.
* The longest modelled chain delay is 4096 ps (64 ps per buffer). Raise
  `HIST_LEN` for slower buffers.
* For silicon, the chain must be built from library buffer cells that the
  flow is told to keep, and the clock period must be characterized so that
  FN = 18 at the nominal condition. Everything else (`ds_toggle_ff`,
  `ds_capture_bank`, the checkers, the calibrator) is ordinary synthesizable
  logic.

## Where this RTL makes its own choices

The chain length, the 33 taps, flip-flop 17 as the DBM comparison point, the
nominal index 18, the ±5 and ±8 bands, averaging FN, alarming on multiple
changes, and the idea of a rarely-active clone whose difference corrects the
aged sensor all follow the published sensor. The following are this
design's own:

* the 16-cycle window, shared by both checkers, and the 4-bit fixed-point
  average;
* the start/done handshakes and holding results until the next start;
* treating a snapshot with no change as an alarm;
* asynchronous, active-high reset of the toggle flip-flop, and no reset on
  the sampling flip-flops;
* the calibration sequence: sleeping by holding the toggle flip-flop in
  reset, a 4-cycle warm-up, simultaneous measurement, shifting only the band
  centre, clamping, and refusing unclean measurements;
* ignoring measurement requests during calibration.

Not built: calibration from embedded analog PVT sensors, which is the
alternative to the clone. Its interface is not defined anywhere this design
could follow.

## Simulating

Any testbench runs with plain Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/ds_pkg.sv tb/tb_ds_top.sv --top-module tb_ds_top
./obj_dir/Vtb_ds_top
```

Replace `tb_ds_top` with any other `tb/tb_*.sv` to test one block or to run
the aging sweep. The
testbenches use a 1 ps time unit. They reset or initialise everything they
read, so they also pass with `+verilator+rand+reset+2` on the simulation
command line, which starts uninitialised state at random values. The
end-to-end run takes well under a second.

## Changing it

* `N_BUF`, `N_FF`, `MID_FF`, `NOMINAL_AFN`, `WINDOW`, `WARMUP` and
  `BUF_DELAY_PS` are parameters of `ds_top` (defaults in `ds_pkg`).
  `WINDOW` must be a power of two, and an assertion checks this. The AFN width
  grows with it (6 + log2(WINDOW) bits).
* A different nominal index needs a different clock period or buffer delay
  in the testbench, and `NOMINAL_AFN` to match.
* To use the clone as a permanent differential reference instead of a
  periodic calibrator, keep `clone_rst` low and compare the two averages
  directly. That gives up the clone's low aging, which is the reason for
  keeping it asleep.
