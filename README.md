# NBTI-tolerant LUT ring oscillators for FPGA aging monitors

Ring oscillators are the cheapest on-chip sensor: their frequency tracks
process, temperature, voltage and aging. They have one weakness as a
long-term sensor: they age themselves. A sensing ring oscillates only for
tens of microseconds at a time and rests for the rest of its life, and the
state it rests in decides how fast it drifts. Negative Bias Temperature
Instability (NBTI) slowly weakens a PMOS transistor whenever its gate sits
at 0, that is, while the PMOS is switched on.

On an FPGA the ring stages are look-up tables. A LUT is a tree of 2:1
selectors, and each selector is a complementary pass pair. An input pin at 1
turns the NMOS on. An input pin at 0 turns the PMOS on, and that PMOS is
stressed. A conventional ring (an inverter chain gated by an AND with an
enable) stops with its stage outputs alternating 0/1. Half of the LUTs then
sit with PMOS selectors conducting in the oscillation path, for as long as
the ring is idle.

This design uses the three LUT pins that the ring does not need. It does not
gate the ring. One pin of each LUT (the *oscillation pin*) is driven by the
previous stage. The other three are *control pins*, and a mode multiplexer
drives them:

* **Oscillation mode:** the control pins hold values that make the LUT an
  inverter of its oscillation pin. The ring runs.
* **Sleep mode:** the control pins switch to values that force the LUT
  output to a fixed level. That level is also what the next LUT's
  oscillation pin then sees, so the ring rests in a state of our choosing.

In the main variant, RO_4, every pin of every LUT rests at 1 during sleep.
No selector PMOS in the oscillation path is then under NBTI stress.

The RTL contains the LUT and ring structure, six pin-assignment variants,
and the logic that measures them. That logic is a shared edge counter and a
scheduler. Once a minute, the scheduler wakes each ring alone for 85 µs and
records its frequency. Watching those counts over days of operation shows how much each
variant ages.

## LUT model

`lut4` is a 4-input LUT built explicitly from 15 `lut_selector`
instances. Sixteen configuration cells feed the tree:

```
cells ─► level A (8 selectors) ─► level B (4) ─► level C (2) ─► level D (1) ─► out
```

* Pin A drives the level next to the cells ("SRAM side").
* Pin D drives the level next to the output ("output side").
* The output is `sram[{D,C,B,A}]`. For example, (A,B,C,D) = (0,1,1,0) reads
  cell index 6, the seventh cell.
* A selector passes `in1` when its pin is 1 (NMOS) and `in0` when its pin
  is 0 (PMOS).

The tree is kept visible, not folded into one indexed read, because the
design is analysed selector by selector.

The configuration cells are an input port. A ring ties them to a constant
taken from `ro_pkg`.

## The six variants

All variants share one structure. They differ only in:

* which pin closes the ring;
* the control-pin values in each mode;
* the LUT contents.

`ro_pkg::ro_config()` holds them. The pin letters in the table below give
the selector type that conducts:

* P: the pin is 0, so the PMOS conducts.
* N: the pin is 1, so the NMOS conducts.
* O: the oscillation pin, which alternates.

| variant | LUT function        | init   | oscillation (A B C D) | sleep (A B C D) | rest level | PMOS stressed in both modes | NMOS in both modes | nominal f |
|---------|---------------------|--------|-----------------------|-----------------|------------|-----------------------------|--------------------|-----------|
| RO_1    | !(A+B+C+D)          | 0x0001 | P P P O               | N P P P         | 0          | 3                           | 0                  | 168 MHz   |
| RO_2    | !(A·B·C·D)          | 0x7FFF | N N N O               | P N N N         | 1          | 0                           | 3                  | 156 MHz   |
| RO_3    | !(A+B+C+D)          | 0x0001 | O P P P               | P N P P         | 0          | 3                           | 0                  | 91 MHz    |
| **RO_4**| !A+B+C+D            | 0xFFFD | O P P P               | N N N N         | 1          | 0                           | 1                  | 90 MHz    |
| RO_5    | !(A·B·C·D)          | 0x7FFF | O N N N               | N P N N         | 1          | 0                           | 3                  | 87 MHz    |
| RO_6    | !A·B·C·D            | 0x4000 | O N N N               | P P P P         | 0          | 1                           | 0                  | 95 MHz    |

The columns mean the following:

* **PMOS / NMOS in both modes:** the number of pins whose selector of that
  type conducts in oscillation mode and again in sleep mode. These are the
  selectors that can age: PMOS selectors through NBTI, NMOS selectors
  through PBTI.
* **Rest level:** the level of every LUT output, and of every oscillation
  pin, while the ring is asleep.
* **Nominal f:** the measured initial frequency of an 11-LUT ring of that
  variant on the target device. Here it only calibrates the delay model.
  The oscillation pin matters a lot: a ring closed on D (next to the output)
  runs almost twice as fast as one closed on A.

RO_4 is the intended configuration:

* In oscillation mode, B = C = D = 0 and the LUT reads cells 0 and 1, which
  hold 1 and 0. The LUT is then an inverter of A.
* In sleep mode, B = C = D = 1 forces the output to 1. The next LUT's A pin
  therefore also rests at 1.

The other variants cover a range of stress levels and are useful for
comparison and characterisation. The conventional AND-gated inverter chain
is not implemented. It is the reference the variants are compared against,
not part of this design.

## The ring and its wake-up

`ring_oscillator` chains `NUM_LUTS` = 11 LUTs. Eleven is odd, and it fits
in one 16-LE logic array block with spare LEs. The wiring is:

* Output k drives the oscillation pin of LUT k+1.
* The last output is `f_out` and closes the ring.
* One `ro_mode_mux` drives the control pins of all LUTs.

The period is 2 × NUM_LUTS × stage delay.

The ring is a deliberate combinational loop. In simulation, a `lut_delay`
behind each LUT stands for the LUT and routing delay, and that delay is
what breaks the loop. `lut_delay` is a behavioural model, not
synthesizable. It is an *inertial* delay: it swallows pulses narrower than
itself. Its default value per variant comes from
`ro_pkg::nominal_stage_delay_ps`:

    delay_ps = 1e12 / (2 · NUM_LUTS · f_nominal)

For example, RO_4 gets 505 ps, which gives 90.0 MHz.

**Wake-up is the subtle part.** In sleep, every stage rests at the same
level. If all LUTs left sleep at the same instant, all stages would invert
together, and an ideal model with no mismatch would oscillate forever in
that fast, all-stages-toggling mode. On silicon, mismatch collapses that
mode almost at once.

The model gets the same result another way. It gives the control bus a
small skew along the chain, `CTRL_SKEW_PS` = 20 ps per LUT, so LUT k sees
the mode change k × 20 ps after LUT 0. Then:

1. LUT 0 switches first.
2. Each odd LUT would produce a glitch narrower than one stage delay, and
   the inertial delay swallows it.
3. A single edge starts round the ring.

`tb_ring_oscillator` checks that every period has the same length, which
rules out the fast mode.

Two constraints follow, and both hold by construction in the bank:

* `CTRL_SKEW_PS` must be well below the stage delay. This is checked at
  elaboration.
* A ring must have been asleep for at least NUM_LUTS stage delays before it
  is woken.

## Measurement

`ro_aging_monitor` places the six variants at `NUM_LOC` = 2 locations.
That gives 12 rings. Ring i is variant `i mod 6` at location `i / 6`.

**`measure_ctrl`** sweeps the rings once after reset and then once per
period (one minute by default). For each ring in index order it goes
through these steps:

1. **Clear** (4 cycles): select the ring onto the counter. Hold the counter
   in clear while every ring is asleep.
2. **Run** (window = 85 µs = 4250 cycles at 50 MHz): that ring alone is in
   oscillation mode.
3. **Settle** (8 cycles): the ring is back in sleep and the counter stops.
4. **Capture** (1 cycle): the count is reported on `result_*` and stored in
   `last_count[i]`.

A sweep takes 12 × 4263 cycles, about 1.02 ms. A period tick that arrives
during a sweep is held and starts the next sweep. Assertions check two
rules:

* At most one ring runs at a time.
* The counter is never cleared while a ring runs.

**`freq_counter`** is clocked by the selected ring output itself, so it
needs no clock faster than the rings (they run at 87 to 168 MHz against a
50 MHz system clock). The counter behaves as follows:

* It saturates at all ones and sets `overflow` rather than wrapping.
* Its asynchronous clear comes from a system-clock register. That register
  changes only while the selected ring is asleep and the counter's clock is
  still.
* The system clock reads `count` without a synchronizer. This is safe
  because the count is read only after the settle time, when the ring is
  asleep and the value is static.

The ring frequency is `count × 1e9 / WINDOW_NS` Hz. At the defaults, one
count is 11.8 kHz, or about 0.013 % of a 90 MHz ring.

The aging drift to be tracked is about 0.15 % to 0.25 % over some 2500 minutes
(about 40 hours) of powered-on stress at 85 °C. One count is therefore coarse for a single reading, so
several readings should be averaged. A moving average of about 21
consecutive readings has been used for this.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ro_aging_monitor` | `NUM_LUTS` | 11 | LUTs per ring (odd, 3..14) |
| | `NUM_LOC` | 2 | copies of the six-variant set |
| | `CNT_W` | 16 | counter width (168 MHz × 85 µs = 14280 fits) |
| | `CLK_HZ` | 50 000 000 | system clock |
| | `WINDOW_NS` | 85 000 | oscillation window per measurement |
| | `PERIOD_US` | 60 000 000 | sweep repetition |
| | `CTRL_SKEW_PS` | 20 | model only: control-bus skew per LUT |
| `ring_oscillator` | `RO_TYPE` | `RO_4` | variant |
| | `STAGE_DELAY_PS` | from the variant | model only: LUT + route delay |
| `measure_ctrl` | `CLEAR_CYC`, `SETTLE_CYC` | 4, 8 | cycles around each window |

Ports of the top:

* Inputs: `clk` and `rst_n` (synchronous, active low).
* Per-measurement result stream: `result_valid`, `result_idx`,
  `result_count` and `result_overflow`.
* `sweep_done`: a one-cycle pulse at the end of each sweep.
* Latest result of every ring: `last_count[12]` and `last_overflow`.
* `osc_active`: the ring that is running, if any.

## What follows the source design and what is this implementation's own

These parts follow the published structure and measurements:

* the LUT selector tree and its pin order;
* the mode multiplexer on the control pins;
* the six pin-assignment variants and their LUT functions;
* 11 LUTs per ring and two locations;
* an 85 µs oscillation once a minute;
* the nominal frequencies.

These are this implementation's own choices:

* the whole measuring side: the shared saturating counter clocked by the
  ring, the one-at-a-time sweep order, the clear and settle times, the
  result registers, and first sweep right after reset;
* the 50 MHz system clock;
* the enum encodings;
* the delay model and its wake-up skew.

Limits:

* The RTL does not model aging. Stage delays are fixed, and a degradation
  experiment needs real silicon.
* Physical placement is a constraint for the implementation tools and is
  not expressed in the RTL. It must be supplied: each ring's LUTs go in one
  logic array block, in serial order, and the physical LUT pins must be
  mapped so that the oscillation pin really is pin A (or D for RO_1/RO_2).
  On a real FPGA the synthesis tool must also be told to keep the LUTs
  unmerged.
* The conventional AND-gated ring is not included.

## Simulating

All files use `timescale 1ps/1ps`. Build any testbench with plain
Verilator 5, for example the whole bank at its default parameters:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_ro_aging_monitor_full \
    rtl/ro_pkg.sv tb/tb_ro_aging_monitor_full.sv
./obj_dir/Vtb_ro_aging_monitor_full
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself,
with a watchdog as backstop.

| testbench | what it shows |
|---|---|
| `tb_lut_selector` | selector truth table |
| `tb_lut4` | cell numbering (seventh-cell example), every address, the six variant functions |
| `tb_ro_mode_mux` | mode selection |
| `tb_lut_delay` | exact delay, short pulses swallowed |
| `tb_ro_pkg` | each variant inverts in oscillation mode and is forced to its rest level in sleep; stage delays |
| `tb_ring_oscillator` | all six variants: rest levels and pin values in both modes, stressed-selector counts derived from the observed pins, period against nominal frequency, clean single-edge oscillation, repeated wake-ups |
| `tb_freq_counter` | edge counts, clear, saturation |
| `tb_measure_ctrl` | sweep order, one ring at a time, exact window length, sweep period, results |
| `tb_ro_aging_monitor` | full bank over two sweeps with a 1.5 ms period and a 13-bit counter, so the two fastest variants saturate; counts wake-ups, returns to sleep, timer-started sweeps, saturated and normal results (about 30 s) |
| `tb_ro_aging_monitor_82us` | one location with an 82 µs window: exact window length and counts (about 4 s) |
| `tb_ro_aging_monitor_full` | default parameters, one complete sweep after reset; prints the 12 measured frequencies (about 15 s) |

To try another variant or ring length, set `RO_TYPE` and `NUM_LUTS` on
`ring_oscillator`. `STAGE_DELAY_PS` follows from them. To add a variant,
extend `ro_type_e` and `ro_config()`; `tb_ro_pkg` states the two
conditions a new entry must meet.
