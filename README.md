# FLIPBIT flash: writing the nearest value that needs no erase

NOR flash can turn a stored 1 into a 0 cheaply, one byte at a time: a byte
program takes about 30 µs and 545 nJ. Turning a 0 back into a 1 is only
possible by erasing a whole 256-byte page, which takes about 10.2 ms and
196 µJ. An IoT device that keeps rewriting the same flash locations (a
camera frame buffer, the activations of a neural network) pays mostly for
erases.

FLIPBIT puts a small circuit into the flash chip, between the page write
buffers and the cell array. When a page is rewritten, it computes for each
value the closest number that can be reached from the stored value by
clearing bits only. It also adds up how far those numbers are from what the
CPU asked for. If the mean absolute error of the page stays within a
threshold set by software, the approximate page is programmed on top of the
old one and no erase happens. Otherwise the chip falls back to a normal
erase followed by an exact program. Only data the programmer has put into an
"approximatable" address range is treated this way; everything else is
always written exactly.

This repository holds synthesizable SystemVerilog for the FLIPBIT datapath
and the flash-chip control around it, a behavioural model of the cell array,
and self-checking testbenches for every block.

## Contents

| file | block |
|---|---|
| `rtl/flipbit_pkg.sv` | shared constants, register offsets, types |
| `rtl/flipbit_tt_logic.sv` | "truth table logic": round up or not, minimax over an n-bit window |
| `rtl/flipbit_bit_cell.sv` | one bit of the approximator (setOnes / setZeros chain) |
| `rtl/flipbit_approx.sv` | 32 chained bit cells; 8, 16 or 32-bit values |
| `rtl/flipbit_mae.sv` | absolute-error accumulator |
| `rtl/flipbit_regs.sv` | region start/end, value type and n, threshold |
| `rtl/page_buffer.sv` | one page of SRAM write buffer |
| `rtl/flash_ctrl.sv` | bus decode, commands, load/sweep/decide/erase/program sequencing |
| `rtl/nor_flash_array.sv` | behavioural model of the NOR page array with its latencies |
| `rtl/flipbit_flash.sv` | top: the flash chip with FLIPBIT |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_flipbit_flash_full.sv` | the top at full size and real latencies |
| `tb/tb_flipbit_workloads.sv` | video-capture and DNN-activation workloads, with and without FLIPBIT |
| `tb/flipbit_ref_pkg.sv` | software reference of the approximation |
| `tb/flipbit_bus_tasks.svh` | CPU-side bus tasks shared by the chip testbenches |

## The approximation: one pass from the MSB down

Given `previous` (what the flash holds) and `exact` (what the CPU wants),
the result `approx` must satisfy `approx & ~previous == 0`: every 1 in it
must already be a 1 in flash. The approximator decides one bit at a time,
from the most significant bit down, and carries two flags:

* **setOnes**: some higher bit has already been left *below* `exact`
  (exact had a 1 where previous had a 0, so the bit had to be 0). From now
  on the result is too small whatever happens, so every remaining bit that
  *can* be 1 is set to 1.
* **setZeros**: some higher bit has already been rounded *above* `exact`
  (set to 1 where exact had 0). The result is now too large, so every
  remaining bit is 0.

With neither flag set the result so far equals `exact`'s upper bits. For bit i:

| previous[i] | exact[i] | result |
|---|---|---|
| 0 | 0 | approx[i] = 0, still equal |
| 0 | 1 | approx[i] = 0, set setOnes |
| 1 | 1 | approx[i] = 1, still equal |
| 1 | 0 | **the hard case**: ask the truth-table logic |

In the hard case, leaving the bit at 0 keeps the value at or below `exact`
for now, and the lower bits may still close the gap. Setting it to 1 jumps
above `exact` by up to 2^i, and all lower bits are then cleared. The right
choice depends on the lower bits of both values.

Per bit this is

    approx[i]     = !setZeros & previous[i] & (exact[i] | setOnes | up)
    setZeros_out  = setZeros | (approx[i] & !exact[i] & !setOnes)
    setOnes_out   = setOnes  | (!setZeros & exact[i] & !previous[i])

where `up` comes from the truth-table logic (`rtl/flipbit_bit_cell.sv`).
`flipbit_approx` chains 32 such cells. The chain input of bit 31 is
`setOnes = setZeros = 0`. For 8 and 16-bit values the inputs above the
width are forced to 0, so only the lower 8 or 16 cells produce anything.

## The truth-table logic, the hardest part

The block sees bit i and the n−1 bits below it of both values. It answers
"round up?" by minimising the *worst-case* error, given that bits below the
window are unknown. For n = 2 this gives:

| exact[i-1] | previous[i-1] | up |
|---|---|---|
| 0 | x | 0 |
| 1 | 0 | 1 |
| 1 | 1 | 0 |

Read the rows like this. If exact[i-1] = 0, staying below costs at most
about 2^(i-1), less than rounding up would. If exact[i-1] = 1 but the flash
holds a 0 there, staying below loses the whole of bit i-1, while rounding up
costs at most the same and often less. If both are 1, bit i-1 can follow
exact and staying below is better.

For larger n no table is stored. `flipbit_tt_logic` computes the minimax
directly. It works in units of the lowest window bit, with `e` and `p` the
n−1 window bits of exact and previous. Everything below the window is
treated as an unknown fraction x in [0,1).

* Rounding up gives 2^(n−1) in window units. The worst error is
  `errA = 2^(n−1) − e`, reached at x = 0.
* Staying at 0, the reachable window values are the submasks of `p`. Let
  `a_lo` be the largest submask ≤ e and `a_hi` the smallest submask > e.
  The worst error over x of the nearer of the two is `errB`:
  * no `a_hi`: e − a_lo + 1;
  * `a_hi − e ≤ e − a_lo`: a_hi − e;
  * `a_hi − e ≥ e − a_lo + 2`: e − a_lo + 1;
  * otherwise: the midpoint (a_hi − a_lo)/2.
* `up = errA < errB`. A tie keeps the bit at 0.

All quantities are doubled so that the midpoint stays an integer. `a_lo` is
found greedily: walk from the top window bit down and take each `p` bit that
still fits under `e`. `a_hi` is found by trying every position where `e` has a 0, `p`
has a 1, and all of `e`'s bits above the position are also set in `p`. The
candidate is "e's bits above, this bit set, nothing below". The lowest such
position gives the smallest candidate.

**Variable n at run time.** The circuit is built for NMAX = 8, with a 7-bit
window. For a smaller n the lowest 8−n window bits are forced to 0 in both
values, which turns the n = 8 table into the table for n. With n = 1 the
window is empty, `up` is always 0 and the approximator becomes the plain
1-bit rule (never round up).

**A circuit hard-wired for n = 2.** Building `flipbit_approx` with
`NMAX = 2` gives the fixed n = 2 circuit. It has no run-time choice of n
(any n ≥ 2 acts as 2). Synthesized to simple gates, it needs about 350
gates, against about 8,000 for the configurable `NMAX = 8` build.
`tb_flipbit_approx` checks that the two agree whenever n = 2.

**Checks against published examples.** This minimax reading reproduces each
row of the n = 2 table above. It also reproduces three worked examples:

* previous 0101, exact 0011 gives 0001 with n = 1;
* the same pair gives 0100 with n = 2;
* previous 212, exact 207 gives 208 with n = 2.

The published description gives the rule and the n = 2 table, but not the
larger tables. The formulas above are this design's reading of "minimise the
maximum potential error" (how the unknown lower bits are modelled, and ties
go to 0). A different reading could give a different `up` in a few rows for
n ≥ 3. All such differences stay inside this one module.

## Error check and the decision

`flipbit_mae` follows the published error circuit. It computes
exact − approx and approx − exact, picks the non-negative one by the sign of
the first, and adds it into an accumulator register whose enable is driven
by the sweep. The accumulator is 48 bits wide, enough for 256 errors of
2^32.

The threshold is a mean, but nothing is divided. The controller accepts
the approximation when

    err_sum * 256  <=  THRESH * number_of_values

with `THRESH` read as a fixed-point number with 8 fractional bits. A value
of 256 means a mean error of 1.0; 26 means about 0.1. The test is
inclusive, so a threshold of 0 still accepts a page whose approximation
has no error. That happens when the new data needs no 0→1 flip; this case
saves an erase at no cost.

## The write flow and its commands

The chip has two page buffers. Buffer 0 receives the CPU's exact data.
Buffer 1 holds the page's old contents and then its approximation. A page
update goes through three steps:

1. **LOAD** (write `0x1000_0000 | page_address` to CMD): the page is read
   from the array into both buffers. Nothing is erased.
2. The CPU writes the new values into buffer 0 through the buffer window
   (`0x80_1000 + offset`), with byte enables. Bytes it does not write keep
   the old contents.
3. **COMMIT** (write `0x2000_0000 | page_address` to CMD).
   * If the page base lies in `[START, END]`, the controller sweeps the
     page one value per cycle. It reads exact from buffer 0 and previous
     from buffer 1, writes the approximation back into buffer 1, and
     accumulates the error.
   * If the mean error passes the test, buffer 1 is programmed onto the
     page and there is no erase.
   * Otherwise, and always outside the region, the page is erased and
     buffer 0 is programmed.

A COMMIT with no page loaded does nothing. STATUS reports the outcome:
`busy`, `open` (a page is loaded), `approx`, `erased` and `inregion`.
ERRSUM holds the page's accumulated error.

Every byte of the page is programmed in both cases. A program never sets a
bit, so bytes that did not change are programmed with their own value and
stay as they were.

## Register map

Registers live at `0x80_0000 + offset`. Flash array addresses are `0x00_0000`
and up. Array reads take four byte reads; bus writes to array addresses are
ignored.

| offset | name | contents | reset |
|---|---|---|---|
| 0x000 | START | first byte address of the approximatable region | 0xFFFFFF |
| 0x004 | END | last byte address (inclusive) | 0x000000 |
| 0x008 | TYPE | [1:0] value width 0/1/2 = 8/16/32 bit; [11:8] n (1..8, clamped) | width 8, n = 2 |
| 0x00C | THRESH | mean-error threshold, 8 fractional bits | 0 |
| 0x010 | CMD | [31:28] 1 = LOAD, 2 = COMMIT; [23:0] page address | – |
| 0x014 | STATUS | bit 0 busy, 1 open, 2 approx, 3 erased, 4 inregion | 0 |
| 0x018 | ERRSUM | low 32 bits of the error sum of the last sweep | 0 |

The region starts empty, so after reset the chip behaves as a plain flash.

## Timing

Everything runs on the flash clock. The published design runs it at
33 MHz, and the array latency parameters of `flipbit_flash` default to that
clock:

| parameter | default | meaning |
|---|---|---|
| `PAGE_BYTES` | 256 | page size |
| `NUM_PAGES` | 8192 | 16 Mbit array |
| `READ_CYCLES` | 1 | 30.3 ns byte read |
| `PROG_CYCLES` | 990 | 30 µs byte program |
| `ERASE_CYCLES` | 336634 | 10.2 ms page erase |

For B bytes per page and V values per page, the busy time is:

* LOAD: B·(READ_CYCLES + 2) cycles.
* COMMIT:
  * V + 2 cycles of sweep and decision (only inside the region);
  * then ERASE_CYCLES + 2 if the page is written exactly;
  * then B·(PROG_CYCLES + 3) cycles of programming.

With the defaults, an approximate commit of 8-bit data takes 254,466
cycles (7.7 ms) and an exact one outside the region takes 590,844 (17.9 ms). The sweep adds
258 cycles, which is negligible next to one byte program.

While a command runs, only register reads complete, so STATUS can be
polled. Any other bus access is held with `bus_ready` low until the
command ends.

## Where this design departs from, or adds to, the published one

* **When the sweep runs.** The published text says the approximation runs
  once the CPU has finished writing the page. It also says, elsewhere,
  that it runs while values are being written. Here it runs at COMMIT, one
  value per clock. It reuses a single 32-bit approximator, as the published
  design does.
* **Threshold comparison.** One passage says approximate if the error is
  below the threshold. Another says fall back if the error is above it.
  Here an equal error approximates.
* **The interface is this design's own.** The published design names four
  registers: region start and end, variable type, and threshold. Their
  addresses and encodings are this design's. So are the bus, the command
  and status registers, the error-sum readout and n's place in TYPE.
* **The truth-table rule for n ≥ 3** is a reading of the minimax rule (see
  above). The published table covers n = 2.
* **Size of the configurable approximator.** The published configurable
  circuit costs only about a fifth more area than the n = 2 one. Here the
  minimax is computed by generic logic per bit, which costs much more: about
  8,000 gates against 350. A netlist derived from precomputed tables, as
  the original design did, should be far smaller. It would plug in behind
  the same `flipbit_tt_logic` ports.
* **Statistics outputs.** The counts of reads, programs, erases and
  approximate/exact commits are brought out for energy and wear
  accounting.
* **Not modelled:** the host CPU and the real bus protocol. Floating-point
  data and multi-level cells are mentioned only as possible extensions and
  are not built.

## The cell array model

`nor_flash_array` is a behavioural model, not a circuit. Real cells are an
analog, process-specific macro. The model keeps a byte array and handles
one operation at a time:

* a read returns the byte after READ_CYCLES;
* a program ANDs the data into the byte after PROG_CYCLES;
* an erase sets the page to 0xFF during its first PAGE_BYTES cycles and
  ends after ERASE_CYCLES.

Its contents are not initialised, as in a real part, so a testbench must
write a page exactly once before relying on it.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and calls `$finish`, and it has a
watchdog. With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
      --top-module tb_flipbit_flash -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/flipbit_pkg.sv tb/flipbit_ref_pkg.sv tb/tb_flipbit_flash.sv \
      --Mdir obj_flash -o sim
    ./obj_flash/sim

To run another bench, replace `tb_flipbit_flash` in both places (the
testbenches are `tb/tb_<module>.sv`). The package files are listed first
because `-y` cannot find packages.

* **`tb_flipbit_flash`** is the end-to-end test. It uses 8 pages and short
  latencies, and runs 60 random page updates of four kinds:
  * small changes;
  * ReLU-like zeroing;
  * new random data;
  * updates that need no 0→1 flip.
  
  It uses every width, several n and several thresholds. Each outcome is
  checked against the software model, and each page is read back. Every
  busy time is compared with the formulas above. It also counts each
  mechanism and fails if any never happened: approximate commit with and
  without error, fallback erase, commit outside the region, each width,
  status polling during a command, and a stalled bus access.
* **`tb_flipbit_flash_full`** runs the top with all default parameters:
  256-byte pages, 8192 pages and real latencies. It writes a page exactly,
  opens a 1 MB region, approximates a small update without an erase, and
  falls back on a large one. That is about 1.44 million cycles, which
  takes a couple of seconds.
* **`tb_flipbit_workloads`** runs the two application types with short
  latencies.
  * *Video capture:* a mostly static 64×32 grey scene with ±1 sensor noise
    and a moving object. It is stored 12 times into the same 8-page frame
    buffer.
  * *DNN layer activations:* 2 kB of 8-bit ReLU outputs, recomputed for
    each new input.
  
  Each runs with the region closed (the baseline) and then at thresholds
  1.0 and 10.0. The bench checks each page decision against the model and
  reads back every page. It reports erases, PSNR and write energy from the
  per-operation energies. With the default seed:
  * video: 96 erases in the baseline, 30 at threshold 1.0 (48 dB PSNR) and
    5 at 10.0 (28 dB);
  * activations: 96 erases in the baseline, 96 at threshold 1.0 and 0 at
    10.0 (33 dB).
  
  The frames and activations are synthetic stand-ins, not the published
  benchmark data.
* **The unit benches** compare:
  * `flipbit_tt_logic` against a brute-force submask search, for every n;
  * `flipbit_bit_cell` and `flipbit_approx` against a bit-serial software
    model, with tens of thousands of random vectors, the worked examples
    and the "never sets a bit" property;
  * the array model against its latencies and the AND/erase rules.

## How far to trust it

Every block has been linted with Verilator and elaborated and synthesized
with Yosys (slang front end). Every testbench passes. Each testbench was
also shown to fail on a deliberately broken copy of its block, such as:

* a tie broken the other way;
* a missing setZeros term;
* a shifted window;
* an inverted mux select;
* ignored byte enables;
* an overwriting program;
* a strict threshold test;
* buffers cross-wired.

The approximation matches an independent software model bit for bit. That
model has also been checked against the published worked examples and the
n = 2 table. What is not validated against the original work is the
truth-table behaviour for n ≥ 3, which follows from the minimax reading
above. The control interface is likewise not validated, since it is this
design's own.

Synthesis of the top at default size gives about 5,000 cells and 478
flip-flops outside the memories. Most of the logic is the 32-bit
approximator (about 4,600 cells), which is combinational with 32 bit cells
in series. At the 33 MHz flash clock this is not a timing concern.
