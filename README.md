# Digital-vernier time interval counter

This design measures the time between two repetitive clocks, S1 and S2, with
picosecond resolution. The two clocks run at the same frequency f0, and their
interval can be anywhere from about 1 ps to a whole input period (up to 1 us
at 1 MHz). It is meant for timing calibration in high-speed test equipment:
S1 carries a marker and S2 one driver output, and the counter reports how far
the driver lags the marker.

No logic can be clocked fast enough to count picoseconds. The design
therefore uses a digital vernier: it makes the interval large enough to
count. A third clock RF runs at a slightly different frequency fR. Sampling
S1 and S2 with RF gives two slow square waves, the *beat signals*. Their
frequency is |f0 - fR|, and the phase difference between them is the S1-S2
interval stretched by fR/|f0 - fR|. Counting RF cycles across that phase
difference gives an integer N, and

    interval = N * |f0 - fR| / (f0 * fR)          (the vernier resolution)

A measurement takes one beat period, 1/|f0 - fR|, plus up to two beat periods
to arm. Example: with f0 = 100 MHz and 1 ps resolution, fR is 100 MHz / 1.0001
and one beat period lasts 100 us. With f0 = 500 MHz and RF at a 2000.8 ps
period, the resolution is 0.8 ps and a beat period is 2500 RF cycles.

The design follows a published single-chip bipolar implementation. Its
digital part is written here as synthesizable SystemVerilog. Its analog input
stage, the skew detectors, is given as a behavioural model.

## Block structure

```
tic_top
├── skew_detection_block      (behavioural model: three skew detectors)
│   └── skew_detector ×3      D1: S1 latched by RF → b1
│                             D2: S2 latched by RF → b2
│                             D3: S2 latched by S1 → polarity
└── tic_core                  (synthesizable, clocked by RF)
    ├── beat_signal_processor window A from b1, b2, polarity, mode
    ├── edge_count_trigger    gate B = exactly one beat period after start
    ├── interval_counter      20-bit N, counts RF cycles where A and B are both 1
    └── io_bus                8-bit register interface
```

`tic_pkg` holds the shared widths, the extraction-mode enum and the register
map. The signals A, B and C = A & B are brought out of `tic_top` as
`window_a`, `gate_b` and `count_en`, so they can be observed.

## Skew detectors: why only one kind of edge is trusted

Each detector answers one question at every rising edge of its strobe input:
was the data input already high? D1 and D2 use RF as the strobe. Their
outputs are therefore RF-synchronous, and RF can clock the whole digital
part.

Consider the position phi of an RF edge within the S1 period T. b1 is 1 for
phi in [0, T/2) and b2 is 1 for phi in [D, D + T/2), where D is the S1-to-S2
interval. phi advances by one resolution step per RF cycle. Each beat signal
has two kinds of edge:

* **In-phase crossing.** A rising edge of S1/S2 meets the rising edge of RF
  (phi = 0 for b1, phi = D for b2). The detector circuit amplifies the
  voltage difference during the input slew before it latches, so it resolves
  these skews to about 0.8 ps.
* **Out-phase crossing.** A falling edge of S1/S2 meets the rising edge of
  RF. Here the circuit is no better than a plain flip-flop comparator, which
  is limited by metastability to about 4.5 ps.

Near either crossing, input jitter and limited resolution make the detector
output chatter: it takes random values for a number of RF cycles. The model
in `skew_detector.sv` reproduces this. If a data edge lies within
`TAU_IN_PS/2` (rising data edge) or `TAU_OUT_PS/2` (falling data edge) of
the strobe edge, the result is random. Otherwise it is the true level. q
changes `STROBE_DELAY_PS` (300 ps) after the strobe edge. The model does not
represent voltages, gain stages or a soft probability curve; its two
windows are the only analog property it keeps.

## From beat signals to a count: window A

This is the least obvious part of the design (`beat_signal_processor.sv`).
The wanted window is phi in [0, D): from the in-phase edge of b1 to the
in-phase edge of b2. Both of its ends are crossings that the detectors
resolve well. The processor builds the window from the current levels of b1
and b2 alone, with no edge detection:

| interval D           | D3 polarity | window A      |
|----------------------|-------------|---------------|
| D < T/2              | 0           | `b1 & ~b2`    |
| D > T/2              | 1           | `b1 \| ~b2`   |

Why the polarity is needed: for D > T/2 the pair (b1, b2) = (1, 1) occurs
both inside and outside [0, D), so the levels alone cannot tell them apart.
D3 samples S2 at the rising edge of S1. It reads 1 exactly when S2 lags S1
by more than half a period, which is the extra bit needed. The same
equations hold whether fR is above or below f0. Only the direction in which
phi moves changes, and the set of phases in the window stays the same.

The **out-phase mode** is a register bit meant for experiments. It inverts
both beat signals before the equations are applied. This moves the window to
[T/2, T/2 + D), which starts and ends on out-phase crossings. The count is
the same, but the scatter is that of a conventional flip-flop detector. The
mode exists to compare the two kinds of edge.

**The polarity is held for a whole measurement.** It is synchronised into
the RF domain and captured at each start command. Near zero skew, and near
half a period, jitter makes D3 flip from one S1 cycle to the next. A polarity
that changed during a measurement would mix the two equations and could give
an error of hundreds of picoseconds. A held polarity can be wrong only when
|D| is within the jitter. The result then has the right size and the wrong
sign, so the error is at most 2|D|.

**Reading the result.** The interval is measured modulo one input period.
N * res lies in [0, T). If the polarity bit is 1, the same result can be
read as the signed value N * res - T, meaning S2 is ahead of S1.

## Edge-count trigger: one clean beat period despite chatter

Gate B must open for exactly one beat period after a start command. Window A
is periodic, so counting it over exactly one period gives N = D/res, no
matter where in the period the gate opens. The difficulty is the chatter:
at fine resolution a beat edge is smeared over many RF cycles. A plain edge
detector would fire several times, and an analog low-pass filter would slow
the edges.

`edge_count_trigger.sv` uses two 8-bit down counters:

1. After start, CT1 counts the RF cycles in which ES1 senses b1 high. It
   borrows (decrements from zero) after preset + 1 such cycles.
2. CT2 then counts the cycles in which ES2 senses b1 low, and borrows after
   preset + 1 of them. **Gate B opens here.**
3. The CT1 and CT2 steps repeat once more. At the second CT2 borrow,
   **gate B closes** and `done` pulses.

The chatter around one edge cannot supply preset + 1 samples of one level.
Each borrow therefore happens only after the signal has settled, and at the
same beat phase each time. The default preset of 255 tolerates about 250
cycles of chatter, which is 250 ps of total jitter at 1 ps resolution. The
preset can be rewritten over the bus, and it has two limits. It must exceed
the chatter, which at 1 fs resolution is already 800 cycles from the
detector alone, so that case cannot be used. It must also stay below half a
beat period: at 5 ps resolution and 500 MHz a beat lasts only 400 RF cycles,
so the preset has to be lowered, to 100 for example. With too large a preset
the gate spans more than one beat period and N is wrong.

Timing: the gate opens in the RF cycle after the first CT2 borrow. It
closes one beat period later, give or take the chatter at the out-phase edge
where the gate sits. A measurement ends at most three beat periods after the
start write.

## Result counter

`interval_counter.sv` is a 20-bit counter, enough for six decades (10^6
counts, for example 1 MHz inputs at 1 ps resolution). The original chip gates
the RF clock itself. Here RF clocks every cycle and A & B acts as a count
enable, which counts the same cycles. The counter is cleared at start. A
sticky overflow flag is set when the count wraps. This happens only if the
input period exceeds 2^20 resolution steps, for example 0.5 MHz at 1 ps.

## Register interface

The bus is 8 bits wide and synchronous to RF: `cs`, `we`, a 3-bit `addr`,
`wdata`, and `rdata`. rdata is valid the cycle after a read access and held
until the next read.

| addr | name   | access | contents |
|------|--------|--------|----------|
| 0    | CTRL   | W      | bit 0: start (one-cycle pulse, ignored while busy); bit 1: mode (0 in-phase, 1 out-phase) |
| 0    | STATUS | R      | bit 0 busy, bit 1 mode, bit 2 done (cleared by start), bit 3 overflow, bit 4 polarity |
| 1    | PRESET | R/W    | CT1/CT2 preset, 255 after reset |
| 2    | CNT0   | R      | N[7:0] |
| 3    | CNT1   | R      | N[15:8] |
| 4    | CNT2   | R      | N[19:16] in bits 3:0 |

A measurement proceeds as follows. Write CTRL = 0x01 (or 0x03 for
out-phase). Poll STATUS until done is set. Then read CNT0..CNT2.

## Where this RTL departs from the original chip, and why

These parts follow the original: the three-detector structure, in-phase
extraction with an out-phase experimental mode, the edge-count trigger with
two 8-bit counters and a settle-then-borrow sequence, the 20-bit counter,
the 8-bit bus, and the strobe timing and detector resolutions used in the
model.

The following are this design's own choices. The original describes their
function but not their logic:

* **Detector strobes.** RF strobes D1 and D2, and S1 strobes D3.
* **Window equations and polarity.** The window equations are as given
  above. The polarity passes a two-flop synchroniser and is held for the
  whole measurement.
* **Trigger counting.** The edge sensors report a level in every cycle, and
  the counters count those cycles. This matches the stated 250 ps
  tolerance. The gate follows b1.
* **Bus.** The register map, the 3-bit address and the single clock domain
  are this design's own. In silicon the bus would be slow and asynchronous
  to a 700 MHz RF, and it would need synchronisers, which are not included.
  The bidirectional data lines are split into `wdata` and `rdata`.
* **Extras.** The overflow flag is an addition. So is the rule that ignores a
  start while a measurement is running.
* **Skew detector model.** It is a behavioural model, not a circuit. It does
  not model the level converter's input range, amplitude- or slew-dependent
  delay, or device offsets, which set the zero-skew offset of a real chip.

The package, the coplanar input lines and the signal sources are not
represented.

## Simulation

All files are in `rtl/` (design and model) and `tb/` (testbenches). Each
`tb_*.sv` is self-checking. It prints `TB_RESULT checks=N failures=M` and
stops itself if it hangs. The testbenches need the `--timing` option,
because the clocks and the detector model use delays. Example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/tic_pkg.sv tb/tb_tic_top.sv --top-module tb_tic_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_skew_detector` | Resolved and chattering skews on both edge types; output timing. |
| `tb_skew_detection_block` | Beat period (200 RF cycles at 10 ps resolution), b2 lagging b1 by D/res, polarity. |
| `tb_beat_signal_processor` | Window A for every D in a 64-step period, both modes, polarity hold. |
| `tb_edge_count_trigger` | One gate pulse of exactly one beat period. Exact gate position without chatter; bounded with 250 cycles of chatter. Start ignored while busy. |
| `tb_interval_counter` | Random enable/clear, wrap and sticky overflow. |
| `tb_io_bus` | Every register and status bit, start pulse rules. |
| `tb_tic_core` | N = D exactly from synthetic beat signals in both modes and polarities. Bounded error with chatter. Smaller preset. 20-bit wrap. |
| `tb_tic_top` | End to end with real clock waveforms at the default parameters. 500 MHz, 1 ps resolution, +-1 ps input jitter: N must lie within +-8 of the interval (+-15 out-phase) in both modes and polarities; observed within +-2. Also checks gate length, measurement time, an ignored start, and overflow at 0.5 MHz. Takes about 15 s. |
| `tb_tic_workloads` | The evaluated operating points with 1.2 ps rms input jitter. At 800 fs resolution: a 500 MHz sweep to 1800 ps, zero skew +-4 ps, 700 MHz with 30-fold averaging, and 10 MHz intervals to 98 ns in 2 ns steps. Also the scatter at 500 MHz against resolution (5, 2, 1 and 0.5 ps), in-phase against out-phase extraction. Takes about 45 s. |

In `tb_tic_workloads` the single-measurement scatter is about 1-1.7 ps rms
at 800 fs. The worst error is 4 ps, and the 30-fold average at 700 MHz lands
within 0.5 ps. Out-phase extraction scatters more than in-phase: 2.5, 1.8
and 1.2 ps rms against 1.5, 1.2 and 0.8 ps at 2, 1 and 0.5 ps resolution. These figures come from the behavioural detector model with uniform
jitter. They show that the logic is right; they do not predict silicon
performance.
