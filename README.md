# LUT fault injection through the configuration port

This design emulates single-event transients (SETs) in the combinational logic of
a circuit under test (CUT) on a Xilinx Virtex-5 XC5VLX110T. It does not add
saboteur logic to the CUT. Instead it rewrites the truth table of one LUT in the
FPGA configuration memory, leaves it wrong for a short time, and then puts it
back. Two copies of the CUT run side by side: GOLDEN, which is never touched,
and FAULTY, which takes the faults. A comparator tells the two kinds of outcome
apart. Either the fault reaches the outputs ("error"), or the outputs still agree
when a timer runs out ("latent/silent").

The method is fast because it attacks only the LUTs that the CUT actually uses,
not every bit of the 24,304-frame configuration memory. The fault list is simply
the CUT's LUT locations, as reported by the implemented netlist. What makes this
work is a mapping from a slice coordinate (`SLICE_X<x>Y<y>`, LUT A–D) to the
exact frames, word and bits that hold that LUT's 64-bit truth table. The mapping
is implemented in hardware (`lut_frame_addr`), and most of this README explains
it.

The RTL contains the complete fault-injection top: injector, fault list, timer,
comparator, clock-domain crossing, and both CUT instances. The CUT is the 4-bit
counter case study, with and without triple modular redundancy. The FPGA's own
configuration memory and its access port (ICAP) are stood in for by a
behavioural model, so the whole loop can be simulated: inject, observe, classify.

## Finding a LUT in the configuration memory

### Frame address word

The configuration memory is addressed one frame at a time. A frame is 41 words
of 32 bits. Its 32-bit frame address (FAR) has these fields:

| bits    | field  | meaning                                                        |
|---------|--------|----------------------------------------------------------------|
| [31:24] | —      | unused                                                         |
| [23:21] | PLANE  | block type; 000 = interconnect and block configuration (LUTs)  |
| [20]    | HALF   | 0 = top half, 1 = bottom half                                  |
| [19:15] | LINE   | configuration row, 0 next to the middle of the die             |
| [14:7]  | COLUMN | major column, 0 at the left edge                               |
| [6:0]   | FRAME  | minor frame within the column's stack                          |

`fi_pkg::far_t` is this word as a packed struct.

### Columns

Each major column holds a single resource type. The XC5VLX110T has 65 major
columns:

```
 0 IOB | 1-4 CLB | 5 BRAM | 6-15 CLB | 16 BRAM | 17-18 CLB | 19 DSP | 20-27 CLB
28 IOB | 29 CLK  | 30-41 CLB | 42 BRAM | 43-52 CLB | 53 BRAM | 54-57 CLB | 58 IOB
59-62 CLB | 63 BRAM | 64 GTP
```

That gives 54 CLB columns. A CLB has two slices side by side, so CLB column `k`
(counting CLB columns only, from 0) holds slices `X = 2k` and `X = 2k+1`. For
example, slices X80 and X81 lie in major column 47. `fi_pkg::clb_to_major` and
`major_to_clb` convert in both directions.

### Rows

There are 160 CLB rows (Y = 0..159), split into two halves and eight
configuration rows of 20 CLB rows each:

| Y       | HALF       | LINE |
|---------|------------|------|
| 0–19    | 1 (bottom) | 3    |
| 20–39   | 1          | 2    |
| 40–59   | 1          | 1    |
| 60–79   | 1          | 0    |
| 80–99   | 0 (top)    | 0    |
| 100–119 | 0          | 1    |
| 120–139 | 0          | 2    |
| 140–159 | 0          | 3    |

### Frames of a CLB column

A CLB column has a stack of 36 frames:

- Frames 0–25 configure routing.
- Frames 30–31 hold other CLB settings.
- Frames 26–29 and 32–35 hold the LUT truth tables. Slices with odd Y use
  frames 26–29; slices with even Y use frames 32–35.

Each of the four frames holds 16 bits of a LUT:

| frame (odd Y / even Y) | truth-table bits |
|------------------------|------------------|
| 26 / 32                | [15:0]           |
| 27 / 33                | [31:16]          |
| 28 / 34                | [47:32]          |
| 29 / 35                | [63:48]          |

Flipping 16 bits in each of the four frames therefore complements the whole
LUT.

### Words inside a frame

Word 20 configures the HCLK (clock spine) row. Words 0–19 serve the ten CLB rows
below it and words 21–40 the ten rows above. Let `r = Y mod 20` be the row inside
the configuration row, and `p = r / 2` the pair of rows. Then:

```
base = 4*p + (p >= 5 ? 1 : 0)          // skips the HCLK word
word = base + 2*(X odd) + (LUT is C or D)
half = bits [31:16] for LUT B and D, [15:0] for LUT A and C
```

**Worked example:** SLICE_X81Y19, LUT A.
- Y = 19 is in the bottom half, LINE 3. Y is odd, so the frames are 26–29.
- X81 is in major column 47.
- r = 19, so p = 9, and base = 37. X is odd, so the word is 39.
- LUT A uses bits [15:0].
- The FAR is `0x0011_979A`, and the same word of frames 27, 28 and 29 holds the
  rest. LUT D of the same slice is in word 40, bits [31:16].

`lut_frame_addr` does all this in one combinational step. It also reports
whether the coordinate lies inside the 108 × 160 slice array.

**How far to trust this mapping.** The parts below are firm:
- the field layout;
- the column order, which matches the per-type column counts of the device;
- the 41-word frame with its HCLK word;
- the frame ranges and the A/B/C/D arrangement of the two words of
  SLICE_X81Y19.

The parts below are this design's reading and should be confirmed on a device
before the address is trusted everywhere:
- how a pair of rows shares its four words;
- whether the frame group is chosen by the parity of Y (as implemented) or of X.

The worked example has both X and Y odd, so it cannot tell the two apart.
Changing either rule is a one-line edit in `lut_frame_addr.sv`.

## One injection, step by step

`fi_controller` works through the fault list. For each entry (X, Y, LUT letter)
it does the following:

1. **Reset.** It holds `cut_rst_req` for `RST_CYCLES` cycles, which resets both
   CUT instances and the comparator to a known state. It then waits
   `SETTLE_CYCLES` cycles so that the synchronizers drain.
2. **Read.** It reads the four frames holding the LUT, 4 × 41 words, into a frame
   buffer. This takes 165 cycles, because reads are pipelined with one cycle of
   latency.
3. **Inject.** It writes the four frames back with the LUT's 16-bit field
   inverted in each (164 cycles). The LUT now computes the complement of its
   function. The timeout timer starts with the first word written.
4. **Hold.** It waits `set_cycles` cycles. This is the length of the transient.
   A comparator interrupt ends the wait early.
5. **Restore.** It writes the original frames back (164 cycles). This always
   happens, whatever the outcome.
6. **Classify.** If the comparator interrupt came, the outcome is `RES_ERROR`. If
   the timer expired first, it is `RES_TIMEOUT` (latent/silent). The outcome is
   written into the entry and the totals `n_error` and `n_timeout` count up.

An entry outside the device is skipped. It keeps `RES_NONE` and is counted in
`n_skipped`.

When the timeout is longer than the write-back, a fault that stays latent takes
`2 + RST_CYCLES + SETTLE_CYCLES + 165 + 1 + timeout_limit + 2` cycles of
`clk_fi`. The testbench checks this figure. With the default lengths (16 and 8)
that is 194 cycles of overhead plus the timeout. At 100 MHz this is about 2 µs
per fault plus the timeout, so the timeout dominates the campaign time. For
scale, the reference campaign of 5425 faults took 20 minutes, about 0.22 s per
fault, on a processor-driven system.

The host loads the fault list before a campaign through the `host_*` port and
reads the annotated entries afterwards. Nothing passes between host and injector
during a campaign.

## The circuit under test: a 4-bit counter with and without TMR

`counter_cut` is built the way the counter maps onto slices. Each counter copy
occupies one slice:

- four LUTs, one per bit, computing the propagate signal of an incrementer;
- a carry chain of four multiplexer/XOR pairs, with carry-in 1;
- four flip-flops.

The two variants differ as follows:

- **TMR = 1 (default, "original"):** three copies, so 12 LUTs, 12 flip-flops and
  12 multiplexer/XOR pairs. The LUT for bit *i* in every copy takes bit *i* of all
  three copies and outputs their majority (truth table `E8E8…`). Every copy
  therefore loads voted+1 and falls back into step after a disturbance. The
  output is the bitwise majority of the copies. Complementing any single LUT
  corrupts at most one copy, so no fault reaches the output: every injection
  times out.
- **TMR = 0 ("custom"):** one copy and 4 LUTs, each passing its own bit through
  (truth table `AAAA…`). Complementing a LUT corrupts the count permanently, so
  every injection is an error.

These are the outcomes of the counter case study: 0 % and 100 % errors. The
end-to-end testbench reproduces them. Placing the voter inside the LUTs is this
design's construction; the published case study gives only the resource counts.

The LUTs of both instances (`lut6`, a 64 × 1 table) take their truth tables from
the configuration memory model. The FAULTY copies sit in slices X81Y19, X80Y19
and X81Y18 (bottom half). The GOLDEN copies sit in X81Y141, X80Y141 and X81Y140
(top half). LUT A–D is bit 0–3. `fi_pkg` holds this placement.

## Clock domains

The injector and the configuration memory run on `clk_fi`. The CUT instances and
the comparator run on `clk_cut`, which is unrelated to `clk_fi`. Two signals
cross between the domains, each through a two-flop `cdc_sync`:

- the CUT reset request, towards the CUT (reset value 1, so the CUT stays in
  reset after power-up until the first injection);
- the comparator's mismatch flag, towards the injector.

The comparator flag is sticky until the next reset, so a one-cycle difference
between the outputs cannot be lost in the crossing. Truth-table changes reach the
CUT asynchronously, as a real reconfiguration does.

## Configuration memory model

`cfg_mem` is a behavioural stand-in for the device. It is not logic to be built.
It stores every LUT frame of the device: 2 halves × 4 rows × 54 CLB columns ×
8 frames × 41 words, which is 4.5 Mbit. Other frame types are not stored: writes
to them are dropped and reads return zero. The model has three interfaces:

- **`icap`** (`cfg_if`): one word per cycle, reads returning one cycle later. It
  replaces the configuration packet protocol of the real ICAP, which is not
  modelled.
- **`load_*`**: a download port for the bitstream's LUT frames before a
  campaign.
- **`site` / `lut_init`**: the live truth table of each LUT site used by the
  CUTs, gathered from its four frames.

On hardware, `fisoc`'s `icap` port would drive the device's ICAP primitive
through a packet encoder, and `cfg_mem` would disappear.

## Files

| file | role |
|------|------|
| `rtl/fi_pkg.sv` | FAR struct, frame geometry, column map, fault-entry and result types, CUT placement |
| `rtl/cfg_if.sv` | word-level configuration port bundle, with protocol assertions |
| `rtl/lut_frame_addr.sv` | slice/LUT → FAR, word, half-word |
| `rtl/fi_controller.sv` | per-fault sequence: reset, read, invert, hold, restore, classify |
| `rtl/fi_timer.sv` | timeout timer |
| `rtl/fault_list_ram.sv` | dual-port fault list (host / controller), 8192 entries |
| `rtl/fisoc.sv` | injector: list + controller + timer |
| `rtl/comparator.sv` | sticky GOLDEN/FAULTY output comparator, generic width |
| `rtl/cdc_sync.sv` | two-flop synchronizer |
| `rtl/lut6.sv` | 64 × 1 LUT with run-time truth table |
| `rtl/counter_cut.sv` | 4-bit counter CUT, TMR or plain |
| `rtl/cfg_mem.sv` | behavioural configuration memory + ICAP model |
| `rtl/fitop.sv` | top: everything above wired together |
| `tb/fi_ref_pkg.sv` | independent reference of the frame layout, for testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_fitop` runs TMR and plain campaigns end to end; `tb_fitop_full` runs one campaign with all defaults; `tb_fisoc_obc` runs a 5425-fault campaign over random LUTs of the whole device |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. To build
and run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps --top-module tb_fitop \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/fi_pkg.sv tb/fi_ref_pkg.sv tb/tb_fitop.sv
./obj_dir/Vtb_fitop
```

Replace `tb_fitop` with any other testbench name. Each runs in seconds.
`tb_fitop_full` uses the top with no parameter overrides. `tb_fitop` also counts
each mechanism and fails if one never happens:
- a truth table being complemented in each top;
- CUT reset releases;
- comparator interrupts;
- GOLDEN LUTs that change, which must never happen;
- GOLDEN counter steps.

To run a campaign, follow these steps:
1. Download the LUT frames of both CUT instances through `load_*`. The
   testbenches compute their placement with `fi_ref_pkg::place_lut`.
2. Write the fault entries `{x, y, lut, RES_NONE}` through `host_*`.
3. Set `timeout_limit` and `set_cycles`.
4. Pulse `start` with `num_faults`, then wait for `done`.

## Where this design departs from the described system

- **Injector in hardware.** The injector is a state machine, not software on a
  soft processor. The order of steps is the same.
- **Addresses computed on chip.** The frame address is computed on chip from the
  slice coordinates. In the described flow the host computes it and the list
  carries the result.
- **Word-level ICAP model.** The configuration port is modelled at word level;
  configuration packets, the read pipeline and dummy frames are left out. Only
  LUT frames are stored.
- **Own choices.** The synchronizer depth, the reset and settle lengths, the SET
  length (`set_cycles`), the timeout value, the fault-list depth (8192) and the
  entry format are this design's choices. None of them is specified.
- **Counter internals.** The internals of the TMR counter (voter inside the
  LUTs, voted output) are reconstructed from its resource counts.
- **Larger case study not included.** The LEON3-based on-board computer (5425
  LUTs) is not included. The fault list is deep enough for it, but the CUT and
  its bus monitor are third-party designs. `cfg_mem` exposes truth tables only
  for the 24 counter LUT sites. `tb_fisoc_obc` runs the injector alone at that
  size: 5425 distinct LUTs drawn at random from the whole device. A stand-in
  for the processor and its monitor flags 3916 of them, the published error
  count. The testbench checks every configuration write against an independent
  model of the frame layout. At a 200-cycle timeout, one fault takes about 506
  cycles.
