# Heart-rate-variability monitor in SystemVerilog

This is a small ASIC datapath for heart-rate-variability (HRV) monitoring.
It takes a digitised ECG, one 16-bit sample per clock at 2 kHz, and finds the
R peak of every heartbeat. From the peaks it measures each beat-to-beat (R-R)
interval in clock cycles. It stores the intervals in a small
interval memory and builds a 16-bin histogram of them. An external
microcontroller reads either memory through a simple request/enable
interface. The design follows a published 0.5 µm student ASIC (a
heart-rate-variability chip with a custom 32 x 12 SRAM). The RTL here is a
clean synchronous rewrite of that architecture, and the places where it
departs are listed below.

```
 datain[15:0] ──► rpeak_detector ──trigger──► p2p_counter ──interval[11:0], interval_valid──┐
                       │                                                               │
                       └──► trigger (pin)          ┌───────────────────────────────────┤
                                                   ▼                                   ▼
                                   mem_mux ──► interval_sram (32 x 12)            hist_sorter
                                      │        or external-memory pins                 │ bin index
                                      │                                                ▼
                                      │                                          hist_memory (16 x 8)
                                      │                                                │ ──► overflow dump pins
                                      └──────────────► control_unit ◄──────────────────┘
                                                          │
                         address, enable, control_trigger ┘──► dataout[11:0], dataout_valid
```

Every block is a small state machine on the single clock. Blocks pass work
along with one-cycle strobes. The detector's `trigger` starts the counter.
The counter's `interval_valid` starts both the SRAM write and the sorter. The
sorter's `index_valid` starts the histogram increment.

## Finding R peaks (`rpeak_detector`)

This is the part that needs the most explanation. The detector does not
filter or differentiate the signal. It uses a threshold that adapts over
time:

1. **Setup (S0–S2).** For the first `SETUP_TIME` samples (default 2000 = 1 s)
   it records the largest and the smallest sample. The initial threshold is
   `Th = 3·max/4 + min/4`, which is three quarters of the way from the floor
   to the tallest R wave it saw. This means the setup window must contain at
   least one beat.
2. **Wait (S3).** It waits for a sample above `Th`.
3. **Climb (S4).** It follows the R wave upward and keeps the running
   maximum. The first sample lower than its predecessor ends the climb.
4. **Verify (S5).** The maximum is only a candidate. If a later sample is
   higher, the detector goes back to S4 with the new maximum. This handles
   notched or double-humped R waves and noise spikes on the upstroke. A peak
   is accepted once `VERIFY_TIME` consecutive samples (default 8, counting
   the first falling one) stay at or below it.
5. **Report and adapt (S5→S6).** Accepting the peak sets `trigger` for
   exactly one cycle. The same edge moves the threshold by the change in peak
   height: `Th ← Th + peak_now − peak_prev`, clamped to 0..65535. The
   threshold therefore follows slow amplitude drift, for example the
   baseline wander visible in real recordings. For the first beat,
   `peak_prev` is the setup maximum.
6. **Re-arm (S7).** The detector waits until the signal falls back below the
   threshold before it looks for the next beat, so one R wave cannot trigger
   twice.

**Latency.** `trigger` rises on the clock edge that samples the
`VERIFY_TIME`-th sample after the true peak. That is 8 cycles (4 ms at 2 kHz)
with the defaults. The delay is the same for every beat, so it cancels out of
the R-R intervals.

**Limits.** After each peak the threshold equals the setup-derived offset
plus the latest peak height, minus the setup maximum. A beat lower than the
previous one by more than that margin (about a quarter of the setup
peak-to-floor swing) is missed. The original design shares this property.

## From peaks to intervals (`p2p_counter`)

A free-running counter restarts at every trigger. Just before it restarts,
its value is copied into the `interval` register. The register therefore
holds the exact number of cycles between two triggers, and `interval_valid`
pulses in the following cycle. The counter is 12 bits wide: 4095 cycles is
about 2 s. Longer gaps saturate at 4095. The first trigger after reset only
starts the counter and produces no interval.

## Interval memory (`interval_sram`, `mem_mux`)

The interval memory holds 32 words of 12 bits. In the original chip it was a
hand-built 6T SRAM: word lines driven by a 5→32 decoder through a gate that
forces them low during bit-line pre-charge, and read/write pulses made by
inverter delay chains. Here each phase of that access sequence is one clock
state:

| request | states |
|---|---|
| write (`wr`) | SW1 select write address → SW2 condition bit lines → SW3 store → SW4 write address + 1 |
| read (`rd`) | SR1 select read address → SR2 condition bit lines → SR3 output (`rdata`, `rvalid`) |
| clear (`clear`) | SC1 write address = 0 |

The word-line decoder and its zeroing gate are kept literally. The word lines
are a decoded one-hot vector that is only released in the store and output
states.

Writes do not take an address. An internal write counter points at the next
free word. When the counter wraps, its carry (`full`) is set and it stops.
Later intervals are dropped until the microcontroller sends a clear. The
memory therefore holds the **first** 32 intervals after a clear, not the
latest 32. Requests that arrive while the sequencer is busy are held (one of
each kind) and served in the order clear, write, read. A write takes 5
cycles. A read returns `rdata`/`rvalid` on the 4th edge after the one that
samples `rd`.

`mem_mux` sits between the datapath and the SRAM. It can route the interval
traffic to off-chip pins instead (`mem_enable = 0`: `ext_wr`,
`external_mem_out`, `ext_rd`, `ext_addr`, `ext_clear`, with `external_mem_in`
and `ext_rvalid` coming back). The original chip added this path so it
could run without its custom SRAM. The switch is combinational, so change
`mem_enable` only while no access is in flight.

## Histogram (`hist_sorter`, `hist_memory`)

Intervals go into 16 bins. The bins are finer between 0.7 s and 0.9 s
(70–86 bpm), where most resting heart rates vary:

| bin | interval (s) | cycles at 2 kHz |
|---|---|---|
| 0 | 0 – 0.4 | 1 – 800 |
| 1 | 0.4 – 0.6 | 801 – 1200 |
| 2 | 0.6 – 0.7 | 1201 – 1400 |
| 3 … 12 | 0.70 – 0.90 in 20 ms steps | 1401 – 1800 in steps of 40 |
| 13 | 0.9 – 1.0 | 1801 – 2000 |
| 14 | 1.0 – 1.2 | 2001 – 2400 |
| 15 | above 1.2 | 2401 – 4095 |

Each bin edge is the boundary in seconds × 2000. The edges live in
`hrv_pkg::BIN_EDGE`. The sorter gives every bin a lower comparator (`>`)
and an upper comparator (`<=`), and the last bin has no upper one, for 31
comparators in all. It registers the interval and reports the 0-based bin
two edges later.

`hist_memory` holds sixteen 8-bit counters. An increment reads the bin,
checks it, and adds one (S1–S3). If the bin is already at 255, the whole
histogram is streamed out on `hist_dump_valid/addr/data`, one bin per cycle
for bins 0 to 15, and every bin is cleared (S4). The beat that overflowed is
not counted. Reads from the control unit (S5–S6) copy a bin into the output
register, and a read waiting at the same time as an increment goes first.

## Reading data out (`control_unit`)

The microcontroller drives three pins:

- `address` (5 bits)
- `enable`: 1 selects the interval memory, 0 the histogram, which uses the
  low 4 address bits
- `control_trigger`: the read request

In S0 the control unit takes the request. S1 or S2 strobes the selected
memory and waits for its data. S4 loads the 12-bit `dataout` register,
zero-extending histogram counts, and pulses `dataout_valid`. A request held
high keeps re-reading, so `dataout` follows `address` and `enable`. Reset
empties the output register. From request to `dataout_valid` takes about 7
cycles through the SRAM and 6 through the histogram.

## Top level (`hrv_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | sample clock; synchronous active-high reset of every block |
| `datain` | in | 16 | unsigned ECG sample, one per clock |
| `address`, `enable`, `control_trigger` | in | 5, 1, 1 | read interface (see above) |
| `mem_enable` | in | 1 | 1: on-chip SRAM, 0: external memory |
| `sram_clear` | in | 1 | restart the interval memory's write counter |
| `dataout`, `dataout_valid` | out | 12, 1 | requested word |
| `trigger` | out | 1 | one-cycle pulse per detected R peak |
| `sram_full` | out | 1 | interval memory has stopped accepting intervals |
| `ext_*`, `external_mem_out/in` | out/in | | external interval memory (used when `mem_enable = 0`) |
| `hist_dump_valid/addr/data` | out | 1, 4, 8 | histogram dump on bin overflow |

Parameters: `SETUP_TIME` (default 2000) and `VERIFY_TIME` (default 8, at
least 2). The widths and bin edges are in `rtl/hrv_pkg.sv`. `interval_sram`
and `hist_memory` take their sizes as parameters. At the top level these are
tied to the package constants (`ADDR_W = 5` gives 32 words).

## Where this RTL departs from the original chip

- **SRAM.** The original is a self-timed transistor-level macro: 6T cells,
  PMOS pre-charge, inverter delay chains, tri-state bit-line drivers. Here it
  is a synchronous register array with one clock per access phase. Storage,
  addressing, the write counter that stops at its carry, and the clear
  behave as described. Analog timing, and the risk of reading while the bit
  lines float, do not exist in this model.
- **Memory size.** The original's block diagram and control-unit waveforms
  show a 128-word memory with a 7-bit address. Its SRAM description and
  decoder are 32 words with a 5-bit address. This RTL uses 32 words.
- **Latency.** The original reports the detector latency as "1 ms, eight
  cycles". At 2 kHz, eight cycles are 4 ms. The RTL keeps the eight cycles.
- **Histogram timing.** In the original, bins increment at the trigger
  pulse. Here they increment about 9 cycles after it, following the
  counter → sorter → memory handshake.
- **Histogram dump port, external-memory handshake, `sram_clear` pin,
  `mem_enable` polarity, first-peak threshold reference, threshold clamping,
  counter saturation.** None of these is specified by the original. They are
  this design's choices, and the module headers describe each one.
- **Not modelled:** the pad ring and package, the standard-cell details
  (single-bit comparator cells), the microcontroller, the ECG front end and
  ADC.

## Simulating

Each block has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb -Irtl \
    rtl/hrv_pkg.sv tb/tb_hrv_top.sv --top-module tb_hrv_top
./obj_dir/Vtb_hrv_top
```

Replace `tb_hrv_top` with `tb_rpeak_detector`, `tb_p2p_counter`,
`tb_interval_sram`, `tb_hist_sorter`, `tb_hist_memory`, `tb_control_unit` or
`tb_mem_mux` to test one block.

- **`tb_hrv_top`** runs the whole chip at its default parameters, about
  475 000 cycles in under a second. A synthetic ECG of triangular R waves is
  generated on the fly. The testbench derives every expected output from the
  peak positions it planted:
  - trigger times;
  - intervals, SRAM contents and external-memory writes;
  - histogram counts and the overflow dump.

  It also checks that each mechanism happened at least once: a verify
  restart on a double hump, threshold moves, counter saturation, SRAM full
  with dropped intervals, clear, external-memory reads and writes, reads of
  both memories, and a histogram overflow.
- **`tb_ecg_workload`** plays a 50-second synthetic ECG into eight copies
  of the chip. The copies use setup windows of 1000, 2000, 3000 and 4000
  samples, each with verification windows of 8 and 16, which are the
  settings the original detector was tuned over. The ECG has a P wave, a
  QRS complex and a T wave, a 7-second baseline wander of ±3000, and R-R
  intervals swinging between 0.7 and 0.9 s. Every copy must detect every
  beat after its setup window at the fixed latency. Its interval memory and
  histogram are read back and compared with the beat times.
- **Block testbenches.** These check latencies as well as values:
  - the detector's trigger position and threshold arithmetic;
  - every bin edge of the sorter;
  - the SRAM's full/clear behaviour;
  - the histogram's dump order;
  - the control unit against randomly slow memories.

Build with `--assert`. The RTL carries concurrent assertions that hold in
every run:
- the detector's trigger and the control unit's read strobes last one cycle;
- the control unit never reads both memories at once;
- the sorter matches at most one bin;
- at most one SRAM word line is open, and only in the drive or sense state.

No real ECG recordings are included. Detection quality on clinical data
(baseline wander, T waves taller than R waves, artefacts) has not been
evaluated with this RTL.

## Changing it

- **Detector tuning.** `SETUP_TIME` and `VERIFY_TIME` are parameters of
  `hrv_top`. The original authors compared setup windows of 1000–4000
  samples and verification windows of 8 and 16.
- **Clock rate.** At a clock other than 2 kHz, the bin edges in `hrv_pkg`
  scale with it (seconds × f_clk). `RR_W` must then cover the longest
  interval.
- **Larger interval memory.** Raise `ADDR_W` in `hrv_pkg`. The control unit,
  the switch, the SRAM and the address pins follow it.
- **Histogram.** The bin count, count width and edges are in the package.
  The sorter derives its comparators from `BIN_EDGE`.
