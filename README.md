# Digital associative processors: a VQ engine and a delay-encoded DP matcher

Associative processing recognises an unknown input by comparing it with a
large set of stored examples (templates) and picking the most similar one.
This repository holds synthesizable SystemVerilog for two processors that
do this in hardware:

* **`vq_processor`** is a general-purpose vector-quantization (VQ) engine. It
  stores up to 128 template vectors of up to 256 8-bit elements. It computes
  the weighted Manhattan distance from an input vector to every template in
  32 parallel units, and finds the nearest one with a winner-take-all (WTA)
  tree that handles 6 bits per clock. A block-addressed mask chooses which
  templates take part in a search. That makes local searches and "best four"
  lists cheap.
* **`dp_matching_processor`** is a dynamic-programming (DP) sequence
  matcher for two 16-element vectors of 6-bit elements. Elements may be
  skipped or shifted. It does the arithmetic in time, not with numbers: the
  penalties are delays of programmable delay lines, the minimum is an OR
  gate (first arrival wins), and the result is the time a step takes to
  cross the network.

`associative_processors_top` places the two side by side. They share clock
and reset, and each keeps its own ports (prefixed `vq_` and `dp_`).

## Part 1: the VQ processor

### Data flow

```
 host ──instr──► vq_controller ──row addr──► template_sram (4 banks × 256 rows × 256 bits)
                     │                              │ 256 bits = 32 × 8-bit elements
                     │ IN, SHIFT, SIGN, clr/acc/store│
                     ▼                              ▼
               distance_pe × 32   (Acc, then 4 distance registers each = 128 distances)
                                   │
                                   ▼
               masking_unit (128 masking registers, vbb_decoder)  → similarity = ~distance, or 0
                                   │
                                   ▼
               wta_2dbp (128 inputs, 24 bits, 6 bits/clock) ──► res_loc, res_dist
```

A row of the SRAM holds element *e* of 32 templates, one byte per distance
unit. Bank *k* holds the templates whose distances go into distance register
*k* of every unit. Template *bank·32 + unit* therefore becomes WTA input
*bank·32 + unit*, and the winner's location code is that number. A full
distance computation over all 128 templates takes 4 × (vector length) `OP_ACC`
instructions: one per bank and element, each feeding all 32 units at once.

### Distance unit: a weighted absolute difference without a multiplier

Each accumulate step does

    Acc += (-1)^SIGN · 2^SHIFT · |IN − TMP|          (24-bit Acc, 3-bit SHIFT)

With SHIFT = SIGN = 0 the steps add up a Manhattan distance. A weight is a
short sequence of steps on the same element: weight 3 is `+4·|d|` then
`−1·|d|`, weight 7 is `+8·|d|` then `−1·|d|` (Booth recoding). The hardware
has no incrementer for the absolute value and no multiplier:

1. An 8-bit adder forms `IN + ~TMP + 1`. If the result is negative its bits
   are inverted, which gives `|d| − 1` rather than `|d|`.
2. The 16-bit left shifter shifts that by SHIFT. For a negative difference it
   shifts in ones, which adds `2^SHIFT − 1`.
3. The 24-bit accumulator adds the shifter output, or its inverse when SIGN
   is set. Its carry-in supplies the last missing 1. For an add the carry-in
   is `neg`; for a subtract it is `SIGN XOR neg`, because
   `acc − (x + c) = acc + ~x + (1 − c)`.

The accumulator wraps modulo 2^24. A Booth sequence may go negative in
between; only the final distance must lie below 2^24. An `OP_STORE k` copies
the accumulator into distance register *k*, and `OP_CLR` zeroes it.

### Masking by variable-binary-block addresses

Each WTA input has a one-bit masking register. A masked input feeds all
zeros to the WTA and so can never win, unless every input is masked. One
`OP_MASK` instruction sets or clears the registers of a whole aligned block,
named by an 8-bit code, one bit wider than a plain 7-bit address:

* the lowest `1` of the code, at bit *p*, gives the block size `2^p`;
* the code with that bit cleared, shifted right by one, is the first input.

| code (binary) | selects |
|---|---|
| `0000_0001` | input 0 |
| `(n<<1)\|1` | input n alone |
| `1001_0000` (144) | inputs 64..79 |
| `0100_0000` (64) | inputs 0..63 |
| `1000_0000` (128) | all 128 inputs |
| `0000_0000` | nothing |

`vbb_decoder` implements this the way an address decoder with don't-cares
does. A "don't care" generator sets `D[b]` for the address bits below *p*,
and each target's AND gate ignores those bits. The delay does not grow with
the number of targets. Examples of use: select 80 of 128 inputs with three
writes (mask all, unmask 0..63, unmask 64..79). To list the best four, run a
search, mask the winner with `(loc<<1)|1`, and search again, four times.

### The two-dimensional bit-propagating WTA

A WTA built from word comparators costs a full carry-look-ahead compare at
each of the log2 N tournament stages. In `wta_2dbp` each tree node is instead
a chain of one-bit comparators (`wta_bit_comparator`), running from the MSB
down:

* Each node carries a STATE pair, both `1` at the MSB. While both are `1`
  the two bits are compared. Where they differ, the loser's STATE falls to
  `0`, and it stays `0` for the less significant bits.
* The winning bit (BIT_OUT) leaves at once for the same bit position of the
  next stage. It does not wait for the rest of the word.

Bits therefore travel two ways at once, along the word and up the tree. The
critical path is about *n + log N* gates rather than *n · log N*. The
location encoder mirrors the tree: from the root down, each stage follows
the input whose final STATE is `1`. On a tie it takes input 0, so the lowest
index wins.

The tree is 6 bits wide. A 24-bit search takes four clocks, most significant
slice first. Between clocks every node keeps its final STATE pair in a
register, and the next slice starts from it instead of from `1,1`. A node
that decided in an upper slice keeps its decision; a node that was tied goes
on comparing. The result is the same as one 24-bit-wide compare.

### Instruction set and timing

Instructions are 32-bit words on a valid/ready port (`vq_pkg::instr_t`):

| op `[31:28]` | name | fields |
|---|---|---|
| 0 | NOP | none |
| 1 | CLR | clear all accumulators |
| 2 | ACC | bank `[27:26]`, row/element `[25:18]`, IN `[17:10]`, SHIFT `[9:7]`, SIGN `[6]` |
| 3 | STORE | distance register = bank field |
| 4 | MASK | value = bank field bit 0 (1 = masked), block code = row field |
| 5 | WTA | search all unmasked inputs |

* The controller accepts one instruction per clock. An ACC reads the SRAM in
  the cycle it is accepted, and the units accumulate one cycle later. CLR,
  STORE and MASK also act one cycle after acceptance, so everything takes
  effect in program order.
* WTA starts the search one cycle after acceptance. `res_valid` pulses four
  clocks later with `res_loc` and `res_dist`. `instr_ready` is low while the
  search is being started and while it runs, so an instruction right behind
  a WTA waits four cycles. This stall keeps a store or mask write from
  changing the WTA inputs mid-search. `stall` shows `instr_valid` held off.
* Templates are loaded one byte per clock through `tmpl_we / tmpl_bank /
  tmpl_row / tmpl_lane / tmpl_data`.
* Reset (`rst_n` low, synchronous) clears accumulators, distance registers
  and masks. It does not clear the SRAM.

## Part 2: the DP matching processor

### The recurrence as a race

The two sequences span a grid of 17 × 17 nodes. Node (i, j) is reached from
(i, j−1) and from (i−1, j) through horizontal and vertical lines, which
carry a constant skip penalty. It is reached from (i−1, j−1) through a
diagonal line, whose delay grows with the mismatch between T[i−1] and X[j−1].
Every node is an OR gate, so it rises when the first of its inputs arrives.
A step launched at (0, 0) therefore reaches (i, j) at exactly

    D(i,j) = min(D(i,j−1) + H, D(i−1,j−1) + diag, D(i−1,j) + V)

and the arrival time at (16, 16) is the DP score.

### Delay lines in clock ticks

The lines are chains of domino elements (`prog_delay_line`). In this RTL
time is counted in clock ticks, and one element takes one tick to fire. A
fired element stays fired until the line is cleared. While PHI is high, the
first unfired element fires each tick. OUT is `PHI AND last element fired`.
So OUT rises *r* ticks after PHI, where *r* is the number of unfired
elements (0 ticks if none are left). A line is programmed in one of two ways:

* **By a write pulse.** Clear the line to all-unfired, then hold PHI high
  for *w* ticks. The domino runs *w* elements and stops, leaving `N − w`
  elements as the delay. A wide pulse gives a short delay.
* **By the preset decoder.** During the clear, all but `preset` elements are
  precharged as fired, so the delay is `preset`.

### Turning element values into write pulses

Each element has an `element_pulse_converter`. It holds a 6-bit register,
a 64-element line preset to the value *v*, and a 32-element line preset to
the common pulse width *w*. When the reference REF rises, the first line's
output rises *v* ticks later and starts the second line. The pulse is
`first AND NOT second`: high for *w* ticks starting at tick *v*. The pulses
of T[i] and X[j] are ANDed and drive PHI of their diagonal line. They
overlap for `max(0, w − |T[i] − X[j]|)` ticks, so the diagonal delay becomes

    diag(i,j) = 32 − max(0, w − |T[i] − X[j]|)      (between 32 − w and 32)

All 256 diagonal lines are programmed at the same time, in one REF sweep.

### Phases and the converter

`dp_sequencer` runs one match when `start` is pulsed.

1. **Delay setting** (`enable_o` high): one clear tick, then REF for 100
   ticks, enough for the latest pulse (value 63 + width 31).
2. **Matching** (`enable_o` low): `step_o` rises at node (0, 0).

`tdc` counts ticks from the step until the goal node rises (`goal_o`). It
first skips `tdc_offset` ticks, then counts up to 255 and saturates. So
`score = clamp(D − tdc_offset, 0, 255)`, and `done` stays high until the
next `start`. The offset exists because every path carries a delay common to
all matches: with *w* = 16, even identical vectors give D = 16 · 16 = 256. In
the single-element test, `tdc_offset = 256` shows only the mismatch.

Loading: `x_we` or `t_we` with `elem_idx` / `elem_val` writes one element.
`pulse_width` (5 bits), `skip_pen` (4 bits, delay 0..15 ticks) and
`tdc_offset` (10 bits) apply to the next match.

## Where this RTL departs from the chips, or fills gaps

* **Time is quantised.** The silicon DP processor is asynchronous; its domino
  stage delay (roughly 150 ps) is its resolution. Here one element is one
  clock tick, which gives an exact, repeatable score. Analog effects such as
  the non-linearity every 8 elements are not modelled.
* **Element-to-element emulation is not exact.** The chip emulates plain
  element-by-element matching by setting the skip penalty to its maximum. In
  the tick model the largest skip (15 ticks) is cheaper than one full
  diagonal mismatch (32 ticks), so skips still win sometimes. A skip pair
  would need to cost more than the worst diagonal, which no 16-element line
  can do. `tb_dp_shift_workload` shows the effect.
* **The converter offset is an addition.** The 256-level converter is not
  described beyond counting while the step travels and stopping when it
  arrives.
* **The controller's instruction set is this design's own.** So are the
  valid/ready port, the one-stage pipeline, the stall rule, the byte-wide
  template load port and the location numbering. The processor is described
  only as decoding instructions and controlling the other blocks.
* **How a wide word is split into 6-bit slices is this design's choice.**
  The WTA carries the node STATE registers from one slice to the next, as
  described above; "repeated over several clocks" is all that is known.
* **Block-address start position.** The start is the code with its lowest
  `1` cleared, shifted **right** by one. This is the only reading that gives
  the documented example, code 20 selecting targets 8..11 of 16.
* **The SRAM is an inferred array**, not a hand-laid-out macro. Its read
  latency is one cycle.
* The pass-transistor STATE chain and the domino circuits keep only their
  logic function.

## Not in this RTL

* The analog VQ processors: the floating-gate (EEPROM) memory-merged
  absolute-difference cell and its averaging array, the hot-electron
  write-and-verify circuit, the sense amplifier, the sample-and-hold, the
  binary-search WTA, the NMOS bell-shape matching cell, the double-reset
  inverter unity-gain buffer, the cyclic DAC (`A_i = (D_i + A_{i−1})/2`) and
  the analog comparator tree. These are transistor-level circuits with no
  logic function to write.
* The larger VQ configuration: 512 WTA inputs of 33 bits (24-bit distance
  plus 9-bit location in the low bits), 32 locally clocked blocks of 8 units
  and 1 KB SRAM each. The modules are parameterised (`wta_2dbp` N_IN / W /
  SLICE_W, `masking_unit` N), but `vq_pkg` and the top are not set up for it.
* Pads, clock distribution and chip-level I/O.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference values are
computed in the testbench, independently of the RTL.

| testbench | what it checks |
|---|---|
| `tb_distance_pe` | Manhattan sums, Booth-weighted sequences and edge cases against the formula; all four distance registers |
| `tb_vbb_decoder` | all codes for 16 and for 128 targets, including the code 20 → 8..11 example |
| `tb_masking_unit` | random block set/clear writes; outputs are `~distance` or 0 |
| `tb_wta_2dbp` | random words, words tied in upper slices, exact ties (lowest index wins), all-zero input; done exactly 4 clocks after start |
| `tb_template_sram`, `tb_vq_controller` | readback of written rows; decode, ordering and stall of every opcode |
| `tb_vq_processor` | full size: 128 templates × 64 elements; Manhattan winner, best four, 80-of-128 selection, weighted distances; 4 busy clocks per search; stalls counted |
| `tb_prog_delay_line`, `tb_element_pulse_converter`, `tb_tdc` | exact tick delays for every pulse width and preset; pulse position and width; converter clamp and saturation |
| `tb_dp_network` | every programmed diagonal delay and the goal arrival time against a DP reference (`dp_ref_pkg`); skip paths must occur |
| `tb_dp_matching_processor` | full size: identical, shifted and unrelated vectors, offset, zero-clamp and saturation; the single-non-zero-element sweep (Ts = 16, 32, 48) has its minimum at Xs = Ts |
| `tb_dp_shift_workload` | two-element sequences shifted by 0..6: score minimal at 0 and never falling with the shift |
| `tb_associative_processors_top` | whole design at default parameters: VQ best-four over 80 active inputs, a weighted search, and three DP matches. Counts stalls, mask writes, negative accumulate steps, sort steps, both DP phases, skip paths and converter saturation, and fails if any never happens |

Every testbench was also run against a deliberately broken copy of its
module, and each one failed. The template data are random stand-ins: the
handwritten-digit and face vectors are not available.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
  rtl/vq_pkg.sv tb/dp_ref_pkg.sv tb/tb_associative_processors_top.sv \
  --top-module tb_associative_processors_top -o sim
./obj_dir/sim
```

Replace the testbench file and top module name to run any other test. Every
testbench finishes in seconds; the full-size ones take about half a minute
to compile. Lint any module with `verilator --lint-only -Wall -Irtl -y rtl
rtl/vq_pkg.sv rtl/<module>.sv`. The remaining warnings are unused
observation outputs and package constants.

## Changing it

* VQ sizes live in `vq_pkg` (units, registers per unit, element and distance
  widths, WTA slice width, SRAM geometry). `DIST_W` must be a multiple of
  `SLICE_W`. `N_WTA` must be a power of two for the block decoder and the
  tree. The instruction fields are sized for 4 banks of 256 rows.
* The DP processor is parameterised by vector length `N`, line lengths
  (`DIAG_N`, `HV_N`, `POS_N`, `WID_N`), field widths and converter width.
  Keep `POS_N ≥ 2^ELEM_W` and `WID_N ≥ 2^WID_W` so every value can be
  preset. The flip-flop count grows as N² · (DIAG_N + 2·HV_N): about 17 k at
  N = 16.
