# Multimode 256-point FFT with per-domain voltage and frequency scaling

This RTL is a 256-point FFT processor for MIMO OFDM receivers. The same
hardware serves several workloads:

* one to eight independent streams at 300 Msample/s each;
* one wideband stream at 2.4 Gsample/s.

The clock always runs at a fixed fclk (300 MHz in the target system), and
eight samples enter per clock. With fewer streams the full datapath is not
needed. The processor therefore spreads the streams over eight parallel
paths. The two halves of the datapath (two "FFT cores") then run at fclk/2,
/4 or /8, and each half gets its own supply voltage.

The supply is not controlled by a slow closed loop. At power-on, a timing
sensor next to each core is calibrated into a table: how much spare delay
the core has at each supply voltage, for each clock ratio. When a packet
arrives, the controller:

1. jumps straight to a safe voltage taken from that table;
2. tests whether a few lower steps still hold;
3. settles on the lowest voltage that passes.

The design has four parts:

| Part | Files | Role |
|---|---|---|
| FFT processing engine | `fft_engine`, `input_scheduler`, `fft_module12` (×2), `fft_module34`, `sdf_stage`, `trivial_cmult`, `twiddle_cmult` | the transform |
| Clock generator | `clock_gen` | fclk and fclk/2, /4, /8 per core domain |
| DVFS controller | `dvfs_controller`, `olvds_ctrl` (×2) | mode decoding, clock ratios, voltage search |
| Voltage detectors | `voltage_detector` (×2) | timing sensors; **behavioural model**, not synthesizable |

`dvfs_fft_processor` is the top. `fft_pkg` holds the shared types, the mode
table and the twiddle arithmetic.

## Operation modes

| Mode | Paths used | Core 1 clock | Core 2 clock | Streams in core 1 / core 2 |
|---|---|---|---|---|
| 1-stream | 8 | fclk/8 | fclk/8 | shared |
| 2-stream | 8 | fclk/4 | fclk/4 | shared |
| 3-stream | 4 + 4 | fclk/2 | fclk/4 | 2 / 1 |
| 4-stream | 8 | fclk/2 | fclk/2 | shared |
| 5-stream | 4 + 4 | fclk | fclk/4 | 4 / 1 |
| 6-stream | 4 + 4 | fclk | fclk/2 | 4 / 2 |
| 7-stream | 8 | fclk | fclk | shared (8 slots, one idle) |
| 8-stream | 8 | fclk | fclk | shared |
| high-speed | 8 | fclk | fclk | one stream, 8 samples per clock |

Modes split in two ways:

* **8-path modes** (1, 2, 4, 7, 8 streams and high-speed). Every stream is
  spread over all eight paths. Core 1 works on paths 0-3 and core 2 on
  paths 4-7.
* **Group modes** (3, 5 and 6 streams). The streams are divided into two
  independent 4-path groups, one per core. Each group runs at its own rate.
  That is why these modes can lower one core further than the other.

`op_mode` is a 4-bit code: 1 to 8 for the stream count, 9 for high-speed.

## How the transform is split

The FFT is radix-2^4 decimation in frequency: two radix-16 stages joined by a
W256 twiddle multiplication. Each radix-16 stage is four radix-2 steps. The
indices are written as:

* input n = 16·n1 + n2, with n2 = 8·g1 + 4·g2 + 2·g3 + g4;
* output k = k1 + 16·k2, with k2 = l1 + 2·l2 + 4·l3 + 8·l4.

The main idea is to map the four bits g1..g4 of n2 onto time or onto space.

**8-path modes.** Sample n goes to path n mod 8, so g2, g3 and g4 select the
path. Each path then holds a 32-sample sequence per stream (n1 and g1).
Modules 1 and 2 (`fft_module12`, one per core) run each path as an
independent single-path delay-feedback pipeline with five radix-2 steps:

1. the four steps of the first radix-16 stage;
2. the W256 multiplier, placed after step 4;
3. the first step of the second stage (over g1).

The remaining three steps combine across paths:

* The step over g2 combines core 1 with core 2. Module 4's four butterflies
  form this path merge: sums go to Module 3 and differences stay in Module 4.
* The steps over g3 and g4 combine paths inside one module.

No FIFO is needed for these last steps.

**Group modes.** Within each core, sample n goes to lane n mod 4, and g2
becomes a time bit. The first step of Modules 3 and 4 is then an ordinary
delay-feedback stage on each module's own paths. Nothing crosses between the
cores.

**Interleaving and FIFO sizes.** Streams are interleaved in time slots, so
each delay-feedback FIFO scales with the slot count:

* step k holds 16·p/2^(k−1) words in 8-path modes with p slots;
* step k holds 32·q/2^(k−1) words in group modes with q streams in the group.

The first FIFO is therefore 16 to 128 words. Modules 3 and 4 need at most 4
and 2 words. `sdf_stage` is one shared delay-feedback butterfly. Its FIFO is
a shift register with a tap chosen by the mode (`len_lg`). A position
counter, restarted at each symbol start, tells the butterfly which half of a
block it is in.

**Twiddle factors.** The exponent of every twiddle comes from position
counters, not from stored sequences:

* After steps 1, 2 and 3, the factors are powers of W16. `trivial_cmult`
  makes 1 and −j exactly; the others use the shared table.
* After step 4, the factor is W256^(n2·k1). `twiddle_cmult` reads it from a
  256-entry table.
* In Modules 3 and 4, the factors before the last two steps are
  W8^(g3·(l1+2·l2)) and W16^(g4·(l1+2·l2+4·l3)).

The twiddle table is built at elaboration by a constant function. It starts
from the 40-bit fixed-point value of W256^1 and rotates repeatedly. Entries
are 12 bits with 10 fraction bits. No table file is read.

## Input scheduler

The eight input lanes carry stream s on lane s, one sample per fclk. The
scheduler reorders these samples into slots: the order the paths need, at
the rate of the receiving core.

* **8-path modes with p slots.** Slot t carries stream t mod p, sample
  8·(t div p) + path.
* **Group modes.** Group 1 (paths 0-3) takes the first q1 streams and group 2
  (paths 4-7) takes the rest. Within a group, slot t carries stream t mod q,
  sample 4·(t div q) + lane.
* **High-speed mode.** The lanes already hold samples 8t to 8t+7 of the one
  stream. The scheduler is bypassed and the input is only registered.

The scheduler is a two-bank corner turn of 8×8 registers:

1. During an 8-clock frame, one bank is written.
2. During the next frame, that bank is read out in slot order while the
   other bank fills.
3. Each slot is held for one period of the receiving domain.

The frame counter is the clock generator's divider. `symbol_en` restarts it,
so frames line up with symbols.

## Clocking

Everything is clocked by fclk. A domain "running at fclk/2^d" is a set of
registers with a clock enable that is high in the last fclk cycle of each
2^d-cycle period. `clock_gen` produces these enables from a 3-bit counter.
It also drives the divided clocks themselves (`clk_fd1`, `clk_fd2`) for an
implementation that gates or divides real clocks.

Clock ratios change only at a packet start. No glitch-free switching of a
running divided clock is provided.

## Voltage control

Each core domain has one `olvds_ctrl` and one detector. The supply code is
`vcode`: the requested voltage is 1.0 V − 25 mV·vcode, with codes 0 to 15
(down to 0.625 V). The code goes out as `vctrl1`/`vctrl2` to an external
DC-DC converter.

### The detector

A detector has four detection units. Each unit is a chain:

1. a launch flip-flop;
2. a copy of the core's critical path;
3. a delay line adding 0 to 59 delay units;
4. a capture flip-flop.

The controller sends a one-cycle pulse and looks for it two domain clocks
later. If replica plus added delay is longer than the clock period, the
pulse shows up one clock late. A test passes only if all four units see the
pulse on time.

`voltage_detector` models this behaviour with real arithmetic:

* Gate delay scales with the supply as V/(V − 0.26)².
* The replica is 2397 ps at 1.0 V. That is a 447-MHz critical path plus a
  160-ps margin.
* One delay unit is 20 ps.
* There is a fixed 8-ps offset between neighbouring units.
* The input `env_ps` adds delay, to mimic temperature or supply noise.

The model is for simulation only.

### Calibration

Calibration runs after reset, for each of the four clock ratios.
`ready` stays low until it is done, and packets are not accepted before
then. For each ratio:

1. Start at 1.0 V.
2. Sweep the added delay from 59 down to 0. The first setting that passes is
   the spare delay N(V) at this voltage.
3. If some setting passed, lower the supply by 25 mV and repeat step 2.
4. Stop when no setting passes (a timing violation) or when 0.625 V is
   reached.
5. Keep the last voltage that passed as code K.

After each supply change the controller waits `SETTLE` fclk cycles for the
converter. The default is 64.

### Per-packet voltage search

At the rising edge of `packet_en`:

1. The mode is latched, and the clock ratios of the mode take effect.
2. For each domain, the table of its ratio is selected.
3. The supply jumps to the safe code J = K − 3.
4. Candidate i is tested 16 times at that supply, starting at i = K. Each
   test uses the replica plus N(V_J) − N(V_i) extra units. This asks: "would
   the path still fit at V_i?"
5. If all 16 tests pass, the supply moves to V_i.
6. On any failure, i moves one step up, toward J, and the tests repeat.
   When i reaches J, the supply stays at V_J.

`scaled1`/`scaled2` go high when the search ends. A test takes five domain
clocks. At fclk/8 a full search therefore takes 16 × 5 × 8 = 640 fclk cycles
plus settling. A real packet preamble covers this.

Data may flow during the search, because the supply only drops after a
candidate has passed. When `packet_en` falls, the supply returns to nominal.

## Top-level interface

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | fclk, asynchronous active-low reset |
| `op_mode[3:0]` | in | mode code, sampled at the rising edge of `packet_en` |
| `packet_en` | in | packet in progress; also marks `fft_in` as valid |
| `symbol_en` | in | high with the first input word of each symbol. A symbol is 256 clocks in MIMO modes and 32 clocks in high-speed mode |
| `fft_in[8]` | in | 8-bit complex samples (`cin_t`) |
| `fft_out[8]` | out | 11-bit complex results (`cout_t`). Lanes 0-3 come from core 1, lanes 4-7 from core 2 |
| `out_bin[8]` | out | bin index k of each lane |
| `out_vld[2]`, `out_sof[2]`, `out_stream[2]` | out | per core: valid, first output of a symbol, stream number |
| `vctrl1`, `vctrl2` | out | supply requests (1.0 V − 25 mV·code) |
| `vdd1_mv`, `vdd2_mv`, `env1_ps`, `env2_ps` | in | supply actually delivered, and extra delay. Used only by the detector models |
| `ready`, `scaled1`, `scaled2` | out | calibration done; voltage search done per domain |
| `clk_fd1`, `clk_fd2` | out | divided clocks |
| `kmax1[4]`, `kmax2[4]` | out | calibrated code K per clock ratio |

Timing rules:

* Inputs are registered once.
* A core's outputs change only on that domain's clock enable. To read a
  result, sample it in the last fclk cycle of the domain period, as the
  testbenches do.
* Bins leave in the transform's natural digit-reversed order. Each output
  carries its bin index, so nothing is reordered.
* Latency is about one symbol period plus a few tens of fclk cycles,
  depending on the mode. The throughput is one symbol per symbol period per
  stream (checked in simulation).

## Number format

* Input: 8 bits per real part.
* Internal: 18 bits per real part. The transform can grow by 8 bits, and
  there is no internal scaling.
* Output: the internal result is divided by 32, rounded, and saturated to 11
  bits. For 8-bit random input this keeps typical bins well inside the range.
* Twiddles: 12 bits, rounded after each multiplication.

The output scaling and the internal width are this design's own choices.

## Where this RTL departs from the published design, and what is missing

* **Input scheduler.** The published scheduler is built from input delays, a
  switch network, a barrel shifter, hold registers and output delays. Here
  the same slot order comes from a register corner turn.
* **7-stream mode.** The published schedule holds the seventh stream over
  the eighth slot. Here that slot carries nothing, and its results are
  marked not valid.
* **Clocking.** Clock-enable domains on one clock replace separately clocked
  domains. Level shifters between supply domains are wires in RTL and do not
  appear.
* **Output width.** Outputs are 11 bits. A summary table of the original work
  lists 10-bit wordlength; the 11-bit figure from its word-length study was
  followed.
* **Chosen values.** These numbers are this design's own, not published:
  * the safe margin K − J = 3 steps;
  * the settling wait;
  * five clocks per test;
  * the detector model's delay law and unit delay;
  * the output scaling.
* **Not included.** The DC-DC converter is external; the testbenches model
  it. The chip's test module (a digitally controlled oscillator and an
  8-bank test SRAM used for at-speed measurement) is not included.

## Simulation

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops. A watchdog ends a hung run
with a failure. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/fft_pkg.sv tb/fft_ref_pkg.sv \
    tb/tb_dvfs_fft_processor.sv --top-module tb_dvfs_fft_processor
./obj_dir/Vtb_dvfs_fft_processor
```

Replace the testbench name to run another one. `fft_ref_pkg` holds the
double-precision DFT and rotation helpers used as references.

| Testbench | Checks |
|---|---|
| `tb_dvfs_fft_processor` | Whole chip at default parameters. Calibration, then packets in all nine modes plus one with added detector delay. Checks: every bin of every stream against a DFT/32 (±3 LSB); each bin delivered once; nothing for absent streams; symbol rate; clock ratios; supply codes; return to nominal. Counts calibration, voltage scaling, backed-off search, mode switches, path merge, group mode, bypass and idle-slot masking, and fails if any never happened. |
| `tb_fft_engine` | Engine alone, all nine modes, two back-to-back symbols each, against a DFT |
| `tb_fft_module12` | Modules 1 and 2 against the partial transform, in 8-path and group configurations, with a random clock enable |
| `tb_fft_module34` | Modules 3 and 4 against the last three radix-2 steps; merge and group configurations; 1/4/8 slots; saturation |
| `tb_sdf_stage` | Delay-feedback butterfly against a model, every FIFO length, random enable |
| `tb_trivial_cmult`, `tb_twiddle_cmult` | Products against double-precision rotation |
| `tb_input_scheduler` | Slot order in every mode, per-group rates |
| `tb_clock_gen` | Enable and divided-clock counts for every ratio; restart |
| `tb_voltage_detector` | On-time or one-clock-late capture against the delay law |
| `tb_olvds_ctrl` | Calibration tables against an exhaustive search; per-packet search result and number of test pulses, with and without extra delay |
| `tb_dvfs_controller` | Mode table, calibration, supplies per mode, mode latching |

The full-chip test runs in well under a minute. Most of that time is the
power-on calibration and the reference DFTs.

## Capacity against the target workloads

* **8 streams at 300 Msample/s, or one stream at 2.4 Gsample/s.** Both need
  eight samples per fclk at 300 MHz. The datapath takes exactly that at
  ratio 1.
* **Fewer streams.** These need p samples per fclk. The 8-path modes provide
  8/2^d, and the group modes 4/2^d per group. The table above matches them.
* **Faster clocks.** The same structure would carry 8 × 447 MHz =
  3.58 Gsample/s if the clock could be raised. Whether the RTL meets such a
  clock depends on the cell library.
