# Speckle-contrast DSP unit for laser speckle blood-flow imaging

Laser speckle imaging estimates blood flow from how much a speckle pattern blurs. In a
small window of pixels, moving scatterers (red blood cells) wash out the speckle and lower
its contrast, the ratio of the standard deviation to the mean intensity. This RTL
implements a small, low-power unit that sits next to a column-parallel CMOS image sensor.
For every 5×5 window of 8-bit pixels it computes

    K = sqrt( N·ΣI² − (ΣI)² ) / ΣI          N = 25

as an unsigned Q13.15 number (13 integer bits, 15 fraction bits). This is σ/μ up to the
constant factor sqrt((N−1)/N). The form suits hardware because ΣI and ΣI² are independent
sums. They can be kept as running sums while the window slides, and only one square root
and one division per window remain.

One unit (`lasca_dsp`) serves a strip of 32 image columns and gives 28 output columns.
The top level (`lasca_array`) puts 32 units side by side. Their strips overlap by four
columns, so together they cover a 900-column image. The target is a 30 MHz clock:
* each unit gives one result every 30 cycles;
* a result comes 60 cycles after its column is read;
* a 1024×900 frame takes one 30 fps frame time.

## How a window is computed

### The window memory and the sliding scan

`pixel_sram` holds five image rows of 32 pixels: five blocks of eight bit-rows by 32
columns. The sensor writes a whole row at once into one block. Row r goes to block r mod 5,
so the memory always holds the last five rows. Block order does not matter because the
sums are order independent.

A **scan** slides the window across the five stored rows, from left to right, one column
per 30-cycle **period**:

* In period p (p = 0..31), column p enters the window. Each block puts bit k of its
  column-p pixel on its **ADD bus** in cycle k, LSB first: five pixels, one bit per cycle.
* Column p−5 leaves the window. Each block puts that pixel on its **SUB bus** at the same
  time. In periods 0..4 nothing has left yet, and the decoder's `R` output forces the SUB
  buses to zero.
* The running sums are then updated:
  `ΣI ← ΣI + ΣADD − ΣSUB` and `ΣI² ← ΣI² + ΣADD² − ΣSUB²`.
  So only 10 pixels are read per result, not 25.
* From period 4 on, the sums describe a full window (columns p−4..p) and a result follows.

A scan therefore yields 28 results. There is no shift register between the memory and
the arithmetic: the bit-row select (`C9`) reads the memory bit-serially. The bus bit is
sampled by a flip-flop, which stands for the sense-amplifier flip-flop of a
non-precharged differential SRAM.

### Stage 1: bit-serial, LSB first

Every word in stage 1 travels one bit per cycle, LSB first, so every operator is a
bit-serial one:

| block | what it is | widths |
|---|---|---|
| `bs_squarer` ×10 | squares the ADD and SUB pixels | 8 → 16 bits |
| `bs_tree_adder` ×4 | Σ of 5 ADD (+ old sum) and Σ of 5 SUB streams | 6- and 5-input |
| `bs_adder` ×3 | the subtractions | full adder + carry flip-flop |
| `bs_squarer` (13-bit) | (ΣI)², and stores ΣI | 13 → 26 bits |
| 21-bit register | stores ΣI² | 21 bits |
| `bs_const_mult` | ×25, by shift-and-add: taps at bits 0, 3, 4 | 21 → 26 bits |

The bit-serial squarer is the least obvious part. Write x = x₀ + 2y. Then
x² = x₀ + 4·x₀·y + 4·y². The first bit squared is itself. The cross term is x₀ ANDed with
each later bit, shifted one place. The last term is the same problem one bit shorter.
Unrolled, this becomes a chain of W−1 bit slices and one AND gate. Slice k works as
follows:

* **Cycle k:** it stores bit xₖ as the bit arrives, and a multiplexer passes xₖ on as its
  own square, of weight 2^2k.
* **Each later cycle t:** it ANDs the stored bit with input bit xₜ. It delays the product
  by one cycle, which supplies the ×2 of the cross term, of weight 2^(t+k+1).
* **Every cycle:** a full adder sums that term, the partial sum coming from slice k+1 and
  the slice's own carry. The sum moves on to slice k−1 in the next cycle. The carry stays.

A partial sum moves down one slice each cycle, so its weight is its cycle number plus its
slice number, and every term arrives at slice 0 in the cycle of its weight. Slice 0 then
gives x² one bit per cycle. This is a serial-parallel multiplier whose parallel operand is
the serial input itself, stored as it arrives.

There is no global clear. Each slice's latch is overwritten when its own bit arrives.
Until then it still holds the previous word, which the next paragraph relies on. Slice k
only carries live data in cycles k..2W−1−k, so its latches are enabled only in that window
(its store latch only in cycle k). This cuts the clocked latch-cycles roughly in half.

The 13-bit squarer's slice latches double as the store for ΣI. In the next period, bit k
of the old ΣI is read from slice k one cycle before the new bit k overwrites it. That value
feeds the 6-input adder as its sixth input.

Schedule within a period (c = cycle, k = bit index):

| cycle | event |
|---|---|
| c = k | memory bit k selected (C9) |
| c = k+1 | bit k on the ADD/SUB buses; squarers and ΣI adders take it |
| c = k+2 | new ΣI bit k (13 bits, done by c = 14), written into the 13-bit squarer |
| c = k+3 | new ΣI² bit k (21 bits), ×25, minus (ΣI)² bit k, gives D bit k |
| c = 3..28 | the 26 bits of D = 25·ΣI² − (ΣI)² are collected |
| c = 29 | D goes to the square root and ΣI goes to the divider |

All subtractions are modulo 2ⁿ. The true values are non-negative and fit their widths, so
the truncated bit streams are exact. Worst-case widths are ΣI 13 bits, ΣI² 21 bits and
D 26 bits.

### Stage 2: digit-serial, MSB first

Square root and division produce digits from the MSB, so stage 2 works on the whole word,
one digit per cycle:

* **`sqrt_nr`**: radix-2 non-restoring square root. In each iteration it appends two
  radicand bits to the partial remainder R. It then subtracts 4Q+1 (if R ≥ 0) or adds
  4Q+3 (if R < 0, undoing the last over-subtraction). The sign of the result is the next
  root digit. One 15-bit adder does this, with the partial root inverted in front of it
  for subtraction. 13 digits come out in cycles 0..12 of the next period.
* **`div_sub`**: long division, one compare-and-subtract with a 14-bit adder per step.
  Its dividend is the stream of root digits: each digit is used one cycle after it is
  made. After the 13 integer steps, 15 more steps with zero input give the fraction bits.
  That is 28 steps, in cycles 1..28.
* **`cla_sparse`**: the adder inside both units. It is a sparse radix-4 carry-lookahead
  adder:
  * OR-propagate and AND-generate per bit. OR is used instead of XOR to keep the XOR off the
    carry path.
  * Carries are computed only into bits 4, 8 and 12, in two merge levels:
    * each 4-bit group's generate/propagate;
    * each sparse carry from the groups below it plus the carry-in.
  * The lower groups form their sums with a small 4-bit lookahead off the critical path.
  * The top group (3 bits in the 15-bit adder) is a carry-select block. Its sums are ready
    for both carry-ins, and the last sparse carry only drives a multiplexer.

  The sign bit of the 15-bit adder in the square root is the unit's critical path. The
  carry-select top group shortens it to one multiplexer after the carries.

K is registered in cycle 29, so `k_valid` pulses in cycle 0 two periods after the window's
column was read.

A window whose pixels are all zero has ΣI = 0. Its K comes out all ones, which is simply
what the divider produces for a zero divisor.

## Control and clock gating

`lasca_fsm` is built from three counters and a decoder:

* **C30** (`c30_ring`): a 30-bit one-hot ring. One bit per cycle of the period, so every
  control signal is a single bit or an OR of a few bits.
* **C9** (`c9_shift`): a 9-bit one-hot shift register. Bits 0..7 select the memory
  bit-row in cycles 0..7; bit 8 is the bus-discharge cycle. After that it is all zero until
  it is reloaded for the next period. Reset loads bit 0.
* **C64** (`c64_counter`): a 6-bit binary counter of periods. The low five bits are the
  column; the value 32 marks the drain period, which finishes a scan's last window.
* **DEC** (`dec5to32`): turns the column number into a one-hot select. It predecodes
  2 + 2 + 1 address bits into ten lines and uses one 3-input AND per output. Its `R`
  output (column < 5) zeroes the SUB buses. The SUB select is the ADD select moved five
  columns.

Each latch group is clocked only in the cycles its word passes through. `cg_range` makes
these enables from C30: φ[x] for a single cycle, φ[x:y] for a range. In this RTL they are
register clock-enables. In silicon they would drive clock-gating cells.

| group | enabled in cycles |
|---|---|
| ten 8-bit squarers | 1..18 |
| ΣI adders | 1..15 |
| ΣI² path, 13-bit squarer, ×25, D | 2..28 |
| square root | 0..12 |
| divider | 1..28 |

## The column-parallel array

A window five columns wide that ends at a unit's last column needs four columns from the
next strip. Units do not talk to each other. Instead, each unit's memory holds 32 columns,
of which only 28 are its own:
* unit u is wired to image columns 28u..28u+31;
* the four columns at every boundary are written into both neighbours.

An image width must therefore be 4 + 28·n. With the default 32 units that is 900.

All units share the row write strobes, `start` and reset, so they step in lockstep. The
array's status outputs are unit 0's, and an assertion checks that all units agree. One
`k_valid` delivers 32 contrasts, one per unit. `k_out[u]` belongs to the window whose
leftmost image column is 28u + `k_col`.

## Interface

The ports of one unit (`lasca_dsp`) are listed below. `lasca_array` has the same ports, with
these differences:
* `wr_data` is a whole 900-pixel row;
* `k_out` is an array of 32 results.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `wr_en` | in | 5 | one-hot block write strobe |
| `wr_data` | in | 32×8 | one pixel row (packed array, column 0 in the low byte) |
| `start` | in | 1 | start a scan of the five stored rows |
| `busy` | out | 1 | a scan is running |
| `ready` | out | 1 | the memory may be written and `start` given |
| `done` | out | 1 | pulse after the last result of a scan |
| `k_valid` | out | 1 | pulse: a new result is on `k_out` / `k_col` |
| `k_out` | out | 28 | K, unsigned Q13.15 |
| `k_col` | out | 5 | leftmost column of the window (0..27) |

Protocol:

1. Write five rows, then pulse `start`.
2. The first result arrives 181 cycles later. The others follow every 30 cycles.
3. A lone scan takes 33 periods (990 cycles), the last one being the drain period.
4. For continuous operation, watch `ready`. It is high when idle. During a scan it is high
   in cycles 9..29 of period 31, after the scan's last memory read. In that window, write
   the next row and pulse `start`.
5. The next scan then starts right away. The old scan's last window finishes stage 2 in
   the new scan's period 0, so each image row costs 32 periods (960 cycles).
6. Write the memory only while `ready` is high.

### Throughput

* Steady state: one K per 30 cycles, about 1 M results/s at 30 MHz.
* Per image row: 28 results every 960 cycles, because of the four fill periods.
* A 1024-row frame takes 979,231 cycles from first start to last result. At 30 MHz that
  fits the 1,000,000 cycles of a 30 frame/s frame time. With 32 units in the array, that
  covers a 1024×900 image at 30 fps.

## How far this follows the original design

The datapath algorithms, widths, schedule length, memory organisation, counters and
decoder follow the published full-custom design. This RTL makes these choices of its own:

* **Circuits become registers.** The original uses pulse-latches, custom latches with
  embedded logic, a dynamic multiplexing latch, a non-precharged differential SRAM and
  sense-amplifier flip-flops. Here they are ordinary edge-triggered registers and
  single-ended buses. Timing and power behaviour at the circuit level are not modelled.
* **Gated clocks become clock enables.** The gating windows are derived from this RTL's own
  cycle schedule. The exact cycle-level schedule (where each unit starts, which outputs are
  registered) is this implementation's, kept within the same 30-cycle period and 60-cycle
  latency.
* **The squarer's gating windows** come from this RTL's slice timing. The original's windows
  are one or two cycles different because its slices are timed differently.
* **The sparse CLA** has the original's levels and carry-select top group. Its gate-level
  merge wiring is this RTL's own.
* **New interface signals.** `ready`, `k_valid`, `k_col` and chaining of scans (32 periods
  per row instead of 33) are additions. They let one unit meet the 30 fps target.
* **The array.** The 32-to-28 column packing and the 32-unit, 900-column configuration
  are the original's. These are this RTL's own:
  * all units share one `start`;
  * status is taken from unit 0;
  * all results leave on one wide bus.
* **Zero windows.** K for a window with ΣI = 0 is all ones.

## Verification

Each block has a self-checking testbench in `tb/`. They compare against values computed
independently in the testbench:

* **Arithmetic units**: random and corner operands, against plain integer arithmetic:
  * the bit-serial adders;
  * the 8- and 13-bit squarers (all 256 8-bit values);
  * the ×25 multiplier;
  * the CLA (exhaustive at 6 bits, random at 14 and 15);
  * the square root, against an exact integer square root;
  * the divider, against integer division.
* **Control blocks**: checked cycle by cycle (counters, decoder, clock-gating ranges,
  controller).
* **Memory**: ADD/SUB column selection and bit-serial readout.
* **`tb_lasca_dsp`**: one unit at its default parameters.
  * 12 rows and 8 scans, 3 started from idle and 5 chained: 224 results.
  * Each result is checked bit-exactly against a reference model of the formula above.
  * Timing is checked: 181 cycles to the first result, 30 between results, 150 from a
    scan's last result to the next scan's first.
  * The test covers flat windows (K = 0), dark windows (ΣI = 0), full-scale pixels, SUB
    zeroing, rolling block overwrite, chaining and clock gating.
* **`tb_lasca_array`**: the 32-unit array at its default size.
  * 8 rows of a 900-column image and 4 scans, 2 from idle and 2 chained.
  * All 32 × 28 results of each scan are checked.
  * The flat, dark and full-scale regions straddle unit boundaries, so windows over the
    shared columns are exercised.
* **Frame workload** (`tb_lasca_frame` for one unit's strip, `tb_lasca_array_frame` for the
  whole array). A 1024-row image is streamed through with chained scans.
  * Every result is checked: 913,920 for the array.
  * The last result must come within 1,000,000 cycles of the first start. It comes after
    979,231.
  * The array run takes about 2 minutes to compile and 100 s to simulate.

To run a testbench with Verilator, for example a single unit:

    verilator --binary --timing --assert -Wno-fatal rtl/*.sv \
        tb/lasca_tb_core.sv tb/tb_lasca_dsp.sv --top-module tb_lasca_dsp -o sim
    ./obj_dir/sim

The array testbenches use `tb/lasca_array_tb_core.sv` in the same way. A unit testbench
needs only its module and the modules below it. `-Wno-fatal` keeps Verilator's style
warnings (unused signals and parameters) from stopping the build. Each testbench ends with
a line `TB_RESULT checks=N failures=M`.

## Files

* `rtl/lasca_pkg.sv`: constants (N, widths, period, output format).
* `rtl/lasca_array.sv`: top level, 32 units side by side.
* `rtl/lasca_dsp.sv`: one unit.
* Memory and control: `pixel_sram`, `lasca_fsm`, `c30_ring`, `c9_shift`, `c64_counter`,
  `dec5to32`, `cg_range`.
* Stage 1: `bs_adder`, `bs_tree_adder`, `bs_squarer`, `bs_const_mult`.
* Stage 2: `sqrt_nr`, `div_sub`, `cla_sparse`.
* `tb/tb_<module>.sv`: one testbench per module.
* `tb/lasca_tb_core.sv`: sensor model and reference checker shared by `tb_lasca_dsp` and
  `tb_lasca_frame`.
* `tb/lasca_array_tb_core.sv`: the same for the array, shared by `tb_lasca_array` and
  `tb_lasca_array_frame`.
