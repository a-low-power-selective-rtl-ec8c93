# Selective median filter with a majority-voting median circuit

A median filter removes salt-and-pepper noise from an image. Two things make
it expensive in hardware. First, every pixel needs the median of its 3x3
neighbourhood, which usually means a sorting network. Second, it smooths clean
pixels and edges that did not need it. This design attacks both costs:

* **Selective filtering.** A double-derivative (Laplacian) detector checks each
  pixel first. Only pixels whose second difference reaches a threshold go
  through the median. All other pixels pass through unchanged, and the median
  logic's inputs do not switch for them.
* **No sorting.** The median comes from a bit-serial *majority vote*. One vote
  per bit, from the MSB down, gives the median bit by bit. Every stage is one
  majority gate plus a little control logic. There are no magnitude comparators
  and no compare-and-swap network.

The filter is wrapped as a small image processor. A 30 x 30 pixel image RAM,
a control unit that walks the image, and an image processing unit (IPU) work
together. An unrelated second design, a small multi-cycle 16-bit CPU with a
64-word memory, sits beside it in the same top level.

## The majority-voting median (`mvc_median`, `majority_vote`, `lc_unit`)

This is the core of the design and the least obvious part.

Take N words (N odd, 9 for a 3x3 window) of W bits. The median's MSB equals
the MSB of the majority of the words. Either more than half the words start
with 1, so the middle-ranked word does too, or more than half start with 0.
The words in the *losing* group are now known to lie entirely on one side of
the median:

* Losers with MSB 0 are smaller than the median.
* Losers with MSB 1 are larger.

To carry that knowledge into the following votes, each loser's remaining bits
are overwritten with its losing bit. A small loser becomes `0000…` and a large
loser becomes `1111…`. From then on it votes "smaller" or "larger" at every
lower bit, which is exactly where it belongs. The same vote-and-polarise step
repeats at each lower bit. After W steps the W majority bits are the median.

Example with five 4-bit words (majority = 3 of 5). In the table, `*` marks a
word that has just lost; its lower bits are overwritten from the next column
on.

| word | vote on bit 3 (winner 0) | bit 2 (winner 1) | bit 1 (winner 1) | bit 0 (winner 1) |
|------|--------------------------|------------------|------------------|------------------|
| 0110 | 0110                     | 0110             | 0110             | 0110             |
| 1011 | 1011 *→ 1111             | 1111             | 1111             | 1111             |
| 0111 | 0111                     | 0111             | 0111             | 0111             |
| 1110 | 1110 *→ 1111             | 1111             | 1111             | 1111             |
| 0001 | 0001                     | 0001 *→ 0000     | 0000             | 0000             |

The median is 0111, the third of 0001, 0110, 0111, 1011, 1110.

In the RTL:

* `majority_vote` is the vote. The `LOGIC` parameter picks one of three
  equivalent gate structures, because their power differs:
  * `LOGIC=1` counts the ones and the zeros and compares the two counts.
  * `LOGIC=2` compares the sum of the bits with N/2.
  * `LOGIC=3` (the default) is a pure AND-OR threshold network with no adder.
    "At least k of the first i bits" is
    `(bit_i AND at least k-1 of the first i-1) OR (at least k of the first i-1)`.
    For three inputs this is `x1x2 + x2x3 + x1x3`. For N inputs it takes about
    N·(N+1)/2 AND/OR pairs.
* `lc_unit` ("logic control") polarises the losers after the vote at bit `POS`.
  It is written as a mask: `lose = bit ^ winner`; the low bits are cleared where
  `lose` is set, then filled with the word's own bit.
* `mvc_median` chains W vote stages and W-1 logic-control stages. It is purely
  combinational, so the median settles within one clock period. The IPU
  registers its inputs and its output. `N=9` is the 3x3 window. The same module
  with `N=41` is the forty-one-input circuit used for power comparisons; both
  sizes are simulated.

Equal values need no special handling: ties simply vote together.

## Noise detector (`dd_detector`)

The detector looks at the five pixels of the target's row, x21..x25, with the
target at x23 (the middle of a 3x5 window). It forms the first differences
`x'2j = x2j − x2(j+1)`, and then three second differences:

    x''2j = | x'2j − x'2(j+1) | = | x2j − 2·x2(j+1) + x2(j+2) |      j = 1..3

The middle one, `x''22 = |x22 − 2·x23 + x24|`, is the discrete second derivative
at the target. If `x''22 ≥ threshold` the pixel is treated as noisy and replaced
by its 3x3 median. Otherwise it is kept. A threshold of 100 suits 8-bit images
(`smf_pkg::DEFAULT_THRESHOLD`). The threshold is an input, so it can be tuned
per image. The value is 10 bits wide because the second difference reaches 510.

Two points where this design makes its own call:

* The first differences are kept **signed**. With absolute first differences,
  an isolated spike would give `| |a−s| − |s−c| | ≈ 0` and would never be
  detected.
* Only the horizontal second difference decides. The outer two (`dd_o[0]` and
  `dd_o[2]`) are computed but are not used by the IPU.

## Image processing unit (`ipu`)

The IPU holds eleven window slots (`smf_pkg`):

* slots 0–8: the 3x3 window, row-major (slot 4 is the target);
* slot 9: the centre-row pixel two columns to the left;
* slot 10: the centre-row pixel two columns to the right.

The control unit writes the slots with `mvc_rd_i`/`widx_i`/`wdata_i`, then
pulses `eval_i`.

* **Clean pixel, or `bypass_i` (border):** the target is output 1 cycle after
  `eval_i`, with `out_noisy_o = 0`.
* **Noisy pixel:** the nine window slots are loaded into the median circuit's
  input register, and the median is output 2 cycles after `eval_i`, with
  `out_noisy_o = 1`.

This input register loads *only* for noisy pixels. That is how the selection
saves power: the sorting logic sees no transitions while clean pixels go past.
An assertion checks that the window is not written while a median is pending.

## Image processor: RAM, control unit and scan timing

`image_processor` connects:

* `image_ram`: 900 x 8 bits, a write port for loading, and a synchronous read
  port enabled by `vma` (valid memory address) with 1 cycle of latency;
* `median_cu`: the control unit;
* `ipu`: the image processing unit.

After `start_i` the control unit scans the image in raster order. For each
pixel:

| step    | interior pixel                                         | border pixel    |
|---------|--------------------------------------------------------|-----------------|
| setup   | 1 cycle                                                | 1 cycle         |
| reads   | 11 (`vma`), each forwarded a cycle later as `mvc_rd`   | 1 (centre only) |
| drain   | 1                                                      | 1               |
| eval    | 1                                                      | 1               |
| result  | 1 (clean) or 2 (noisy)                                 | 1               |
| total   | **15 / 16 cycles**                                     | **5 cycles**    |

A pixel is a border pixel when its 3x5 window would leave the image: the first
or last row, or the first two or last two columns. Border pixels pass through
unchanged.

Results stream out on `out_valid_o`/`out_pixel_o`, together with
`out_row_o`/`out_col_o` and `out_noisy_o`. `done_o` pulses after the last
pixel. A 30 x 30 scan takes about 12,000 cycles. The whole window is re-read
for every pixel: the unit is built for simplicity, not for sliding-window
reuse.

Host sequence:

1. Release `rst`.
2. Write all pixels (`load_we_i`, address `row*COLS+col`).
3. Set `threshold_i` and pulse `start_i`.
4. Collect the results.
5. Wait for `done_o` before reloading.

## The 16-bit CPU (`cpu_system`, `cpu_core` and its units)

This is a separate, simple teaching-style processor. It has:

* eight 16-bit registers (`cpu_regfile`);
* an ALU with add, sub, mul (low 16 bits), xor, and, or (`cpu_alu`);
* a one-bit shifter (`cpu_shifter`) and an unsigned comparator with eq/gt flags
  (`cpu_comparator`);
* an instruction register, an address register, a program counter and an
  internal 16-bit data bus;
* a finite-state control unit. Its control lines are named after their
  targets: `addr_sel`, `alu_sel`, `reg_sel`, `instr_sel` and `comp_sel`
  (`cpu_pkg::ctrl_t`).

It talks to `cpu_mem` (64 x 16 bits) over a VMA / Ready / Addr / Data
interface. The CPU holds `vma` with the address until the memory answers with
`ready`, one cycle later. An assertion checks that the request stays stable.

Instruction word: `opcode[15:11] | unused[10:6] | src[5:3] | dst[2:0]`.
Opcodes ≥ 16 take a second word, which holds an address or an immediate value.

| opcode | instruction | effect                      | opcode | instruction | effect              |
|--------|-------------|-----------------------------|--------|-------------|---------------------|
| 0      | NOP         |                             | 15     | HALT        | stop                |
| 1      | ADD         | Rd ← Rd + Rs                | 16     | LOADI a     | Rd ← mem[a]         |
| 2      | SUB         | Rd ← Rd − Rs                | 17     | MOVI k      | Rd ← k              |
| 3      | MUL         | Rd ← (Rd · Rs)[15:0]        | 18     | BRA a       | PC ← a              |
| 4/5/6  | XOR/AND/OR  | Rd ← Rd op Rs               | 19     | BEQ a       | if eq: PC ← a       |
| 7/8    | SHL/SHR     | Rd ← Rs shifted by 1        | 20     | BGT a       | if gt: PC ← a       |
| 9      | CMP         | flags ← compare(Rd, Rs)     | 21     | STORE a     | mem[a] ← Rd         |

Cycle counts (FETCH 2, DECODE 1, FETCH2 2, EXECUTE 1, MEMORY 2):

* single-word instructions: 4 cycles;
* MOVI and the branches: 6 cycles;
* LOADI and STORE: 8 cycles.

Load a program through the `load_*` port while the CPU is in reset. It then
runs from address 0 until HALT.

## Top level (`smf_top`)

The top level has two independent port groups on one clock:

* `ip_*` for the filter. The 30 x 30 RAM address is 10 bits; row and column
  are 5 bits each.
* `cpu_*` for the processor. `cpu_rst_i` holds the CPU in reset on its own,
  for program loading.

The global `rst` resets both.

## Where this design departs from its source, and how far to trust it

These points follow the filter's source description:

* the majority-vote median algorithm;
* the three majority logic styles;
* the 3x3 median window;
* the 3x5 detector window and the "second difference ≥ t (100) → median" rule;
* the 30 x 30 image memory;
* the vma / mvc_rd control signals;
* the CPU's unit list, 16-bit word, instruction formats and base instruction
  set.

These are this design's own choices:

* **Detector arithmetic.** The first differences are signed; see the detector
  section.
* **Logic 3 beyond three inputs.** The AND-OR network for N inputs is a
  generalisation.
* **Borders.** Pixels without a full 3x5 window pass through unchanged.
* **Control unit.** The read order, the slot layout, the scan timing, streaming
  the results out instead of writing an output memory, and the operand gating
  of the median inputs.
* **CPU memory.** Words are 16 bits, not 8, so that one access returns one
  instruction word.
* **CPU instructions.** The opcode values, the multi-cycle state sequence and
  the NOP, SHL, SHR, CMP, BEQ, BGT, STORE and HALT instructions.
* **Reset.** Synchronous and active high everywhere. Memories are not reset.

Not built:

* the floating-gate analog majority circuit that this design replaces;
* the compare-and-swap sorting networks of earlier median filters;
* the software (MATLAB/Simulink) test set-up.

**Image size.** A 250 x 250 image does not fit the default 900-pixel RAM.
Raise `ROWS` and `COLS` on `image_processor`, or filter in tiles.
`tb_workload_250` does the former. It filters a synthetic 250 x 250 image
with 10% and with 50% salt-and-pepper noise, checks every pixel, and reports
the cycle count: about 0.94 M cycles at 10% and 0.96 M at 50%.

**What has been verified.** Every module has a self-checking testbench that
compares against an independent model in the testbench:

* the medians against a sorted list;
* the detector against integer arithmetic;
* the whole filter against a pixel-by-pixel model, including the cycle count
  of the scan;
* the CPU against a hand-traced program (5! loop, loads, stores, all logic and
  shift instructions, taken and skipped branches), including its cycle count.

The top-level test filters a full 30 x 30 noisy image twice, at threshold 100
and at the maximum threshold, while the CPU runs its program. No power, area
or timing figures come with this RTL.

## Simulating

All sources are in `rtl/`, the testbenches in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`. For example, the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_smf_top \
      -y rtl -y tb +libext+.sv rtl/smf_pkg.sv rtl/cpu_pkg.sv \
      tb/tb_cpu_prog_pkg.sv tb/tb_smf_top.sv
    ./obj_dir/Vtb_smf_top

Replace `tb_smf_top` with any other `tb_<module>` to test one unit.
`tb_cpu_prog_pkg.sv` is needed only by the CPU tests. The filter's size
(`ROWS`, `COLS`), the majority logic style (`LOGIC`) and the median width
(`N`, `W`) are parameters.

| file | role |
|------|------|
| `rtl/smf_pkg.sv`, `rtl/cpu_pkg.sv` | shared types, window slot map, opcodes |
| `rtl/majority_vote.sv`, `rtl/lc_unit.sv`, `rtl/mvc_median.sv` | majority-voting median |
| `rtl/dd_detector.sv`, `rtl/ipu.sv` | noise detector, image processing unit |
| `rtl/image_ram.sv`, `rtl/median_cu.sv`, `rtl/image_processor.sv` | image memory, control unit, filter system |
| `rtl/cpu_*.sv` | 16-bit CPU and memory |
| `rtl/smf_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_smf_top` runs the full-size design |
