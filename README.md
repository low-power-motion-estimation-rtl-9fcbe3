# Low-power block-matching motion estimation in SystemVerilog

This repository holds synthesizable SystemVerilog for motion-estimation (ME)
hardware for an H.264-style video encoder. Each 16x16 macroblock (MB) of the
current frame is compared with every 16x16 candidate in a [-16, +15] search
range of a reference frame. The comparison uses the sum of absolute
differences (SAD). For each of the 41 variable-size sub-blocks that H.264
allows, the hardware reports the best integer motion vector (MV).

Around that full search sit three power-saving ideas:

* **Comparison prediction (CP):** every processing element (PE) guesses
  which of its two pixels is larger. It can then drop the comparator in
  front of its absolute-difference subtractor.
* **Vector dependent SAD reuse (VDSR):** when smaller sub-blocks share an
  integer MV, their half-pixel SADs are added together, so the larger block
  needs no half-pixel search of its own.
* **Vector trajectory based search (VTBS):** the direction of the integer MV
  decides whether a sub-block's half-pixel search can be 1-D (2 candidates)
  instead of 2-D (8 candidates).

There are two independent integer-pixel engines:

* `me256_core`: 256 PEs, one candidate location per clock.
* `me64_core`: 64 PEs, one candidate every four clocks, about a quarter of
  the datapath.

Both sit in `me_top` with separate ports.

## Sub-blocks and search window

One MB holds 41 sub-blocks. They are numbered as follows (`me_pkg`; "WxH" is
width x height):

| index | blocks | order |
|---|---|---|
| 0..15 | 16 x 4x4 | raster order |
| 16..23 | 8 x 4x8 | vertical pairs of 4x4s, raster over a 4-wide x 2-tall grid |
| 24..31 | 8 x 8x4 | horizontal pairs of 4x4s, raster over a 2-wide x 4-tall grid |
| 32..35 | 4 x 8x8 | raster |
| 36..37 | 2 x 8x16 | left, right |
| 38..39 | 2 x 16x8 | top, bottom |
| 40 | 16x16 | |

Index 40 is the fixed-block-size (FBS) result. For example, 8x4 block 24
covers 4x4 blocks 0 and 1, and 8x8 block 33 covers 4x4 blocks 2, 3, 6 and 7.
The function `geometry()` in `tb/me_ref_pkg.sv` gives the position and size
of every index.

The search window is 47x47 pixels: 16 + 31 columns and rows. Window pixel
(X, Y) corresponds to MV (X-16, Y-16). An MV is an `mv_t` struct of two
signed 6-bit fields.

## The 256-PE engine (`me256_core`)

### Data flow

The PE array is 16x16. Each PE keeps one current-MB pixel and one search
pixel, and writes a registered absolute difference (AD) every cycle. The
search pixels shift through the array, so one full candidate block is
present every cycle.

The search visits the 32 candidate columns in zigzag order:

1. **Column 0, downward.** Window rows 0..14 are preloaded. Each new row
   then enters at the bottom of the array and everything shifts up. The
   array therefore holds candidate (0, 0), then (0, 1), and so on up to
   (0, 31).
2. **Shift left.** One step left moves in window column 16. Its pixels come
   from the 16 *temporary registers*, a vertical pipeline beside the
   array's right edge. The temporary registers were fed from a seventeenth
   memory read during the previous column. This left step makes candidate
   (1, 31).
3. **Column 1, upward.** New rows enter at the top, and the array walks up
   to (1, 0).
4. **Repeat.** Column 2 goes down again, and so on.

The cost is 47 cycles for the first column and 32 for each later one, so a
search issues 1039 cycles. Every location costs one cycle; no pixel is read
twice within a column.

### Memories and rotator

The window lives in 17 memories (`sw_bank`). Memory b holds the window
columns with X mod 17 = b, at word address (X / 17) * 47 + Y. One read from
all 17 memories returns 17 horizontally adjacent pixels of one row. Those
pixels are the 16 the array needs plus the one the temporary registers
need.

The pixels come out in memory order, not window order. `h_rotator` rotates
them by (current column mod 17). Outputs 0..15 go to the top or bottom PE
row, and output 16 goes to the temporary registers. The rotator is purely
combinational; the PE and temporary registers form the register stage after
it.

### Pipeline and timing

| stage | what happens |
|---|---|
| 0 | synchronous memory read (address from `me256_ctrl`) |
| 1 | rotation and PE / temporary register load (shift) |
| 2 | AD register in each PE |
| 3-4 | `sad4x4_tree`: 16 4x4 SADs |
| 5-6 | `vbs_sad_tree`: all 41 SADs |
| 7 | `mv_comparator`: running minimum per sub-block |

`start` to `done` takes 1039 + 8 = 1047 cycles. The last result is valid in
the cycle `done` is high, and `best_sad`/`best_mv` hold until the next
`start`.

Loading is outside the search time:

* The window is written one pixel per cycle through `sw_we/sw_col/sw_row/sw_pix`.
* The current MB is written one 16-pixel row per cycle through `cur_we/cur_row/cur_data`.

Ties keep the location searched first, in zigzag order. The reference
model in `tb/me_ref_pkg.sv` applies the same rule.

The source design quotes 1091 cycles per MB, and its own data-flow table ends
at cycle 1038. This implementation follows the table. The 16 cycles for
loading a current MB and the remaining gap are not part of the count.

## Comparison prediction (`ad_unit`)

A standard AD circuit compares the two pixels, then uses two multiplexers to
subtract the smaller from the larger. In the CP circuit:

* A one-bit *prediction* register chooses the subtraction order directly.
* The subtraction `larger - smaller` is computed in the predicted order, and
  its sign bit shows a wrong guess.
* A wrong guess inverts the prediction, ready for the next cycle.

Successive search pixels in one PE are neighbours in the picture, so the
guess is usually right; the test pictures give about 90 %. The prediction
register starts at "search minus current".

What happens on a wrong guess is chosen by `MODE` (type `ad_mode_e`):

| MODE | on a wrong guess |
|---|---|
| `AD_STD` | no prediction: comparator plus muxes, always exact |
| `AD_RADP` | AD register is cleared to 0 |
| `AD_EADP` | AD register keeps its previous value (enable low) |

With `CHECKER = 1`, the array arranges the PEs as a checkerboard:

* PEs where x+y is even use the standard circuit.
* The others, where x+y is odd, use the predicting one.

The checkerboard gives up part of the saving in exchange for smaller SAD errors. The four CP variants
are R-ADP, E-ADP, CR-ADP and CE-ADP.

Wrong guesses change SADs, so the chosen MV can differ slightly from the
exact one. That is the image-quality cost traded for power.

The core has an extra output, `mispred_cnt`. It counts wrong guesses during
valid search cycles and is meant for measuring. `me_top` defaults to
`MODE = AD_EADP`, `CHECKER = 0`.

## Half-pixel preparation

### VDSR (`vdsr_mv_compare`, `vdsr_sad_reuse`)

`vdsr_mv_compare` makes 20 equality comparisons of integer MVs:

* 16 comparisons between neighbouring 4x4 blocks: 8 horizontal pairs and
  8 vertical pairs.
* 4 comparisons between 8x8 blocks.

From these it derives, for the 25 sub-blocks larger than 4x4, whether all
the 4x4 blocks inside share one MV. Such a block is marked `reuse`, and its
`hp_en` bit is low. Its half-pixel SAD at each of the 8 half-pixel positions
is then just the sum of its parts' SADs.

`vdsr_sad_reuse` holds those parts:

* a register file of 16 4x4 blocks x 8 positions
* a register file of 4 8x8 blocks x 8 positions
* one shared adder

A request `(req_blk, req_loc)` returns one summed SAD a cycle later:

| block | sum of |
|---|---|
| 4x8 / 8x4 | 2 4x4 entries |
| 8x8 | 4 4x4 entries |
| 8x16 / 16x8 | 2 8x8 entries |
| 16x16 | 4 8x8 entries |

Reused 8x8 sums are written back into the 8x8 file, so that larger blocks
can build on them.

### VTBS (`vtbs_trajectory`)

`vtbs_trajectory` looks at one integer MV (x, y) and picks a half-pixel
search pattern. It outputs a mode and an 8-bit mask of the enabled
half-pixel positions:

| mask bit | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| offset | (-1,-1) | (0,-1) | (+1,-1) | (-1,0) | (+1,0) | (-1,+1) | (0,+1) | (+1,+1) |

Three criteria are available through `METHOD`:

* **`TR_BT` (bigger-than, the default):**
  * |x| > |y| gives 1-D x search (left and right).
  * |y| > |x| gives 1-D y search.
  * A tie gives 2-D.
* **`TR_TBT` (two-times-bigger-than):** a 1-D search needs one component to
  be at least twice the other; otherwise 2-D.
* **`TR_Z` (zero):** x = 0 gives 1-D y and y = 0 gives 1-D x.

A zero MV always gives 2-D.

In `me_top`, after every search, a small sequencer feeds the 41 best MVs
through one trajectory unit, one per cycle. This produces the
`traj_valid/traj_blk/traj_hp_en/traj_mode/traj_loc_mask` stream. `traj_hp_en`
repeats the VDSR decision, so a consumer can skip reused blocks.

### Interpolation filter (`hp_fir6`)

`hp_fir6` is the H.264 six-tap half-pixel filter with taps
(1, -5, 20, 20, -5, 1). It rounds by adding 16, divides by 32 and clips the
result to 0..255. The result is registered, with a latency of 1 cycle.

### What is missing

The half-pixel search engine itself is not in this repository. That engine
interpolates whole sub-blocks, computes half-pixel SADs and picks the best
one. `me_top` brings out, as ports, everything that engine would connect
to:

* the VDSR flags
* the trajectory stream
* the SAD-reuse register files and adder
* the filter

## The 64-PE engine (`me64_core`)

The 64-PE engine is a 16x4 array. PE (x, j) covers column x of the
candidate block and the four block rows 4j..4j+3. It holds the four current
pixels of those rows and four search registers, and the search registers of
the four PEs in a column form one chain.

In phase p (0..3), every PE computes the AD of its row 4j+p. Each phase
therefore adds one row to each of the 16 4x4 blocks. `sad_acc64` sums the
four phases, then the same VBS adder tree and comparator as in the 256-PE
engine take over. The engine finishes one candidate every 4 cycles.

Window columns are processed top to bottom only (no zigzag):

1. Cycles 0..15 of a column write rows 0..15 straight into their registers.
2. From cycle 16, one new row is read every fourth cycle, and the register
   chains shift by one, up to row 46 at cycle 136.
3. Computing starts while the fill is still running.

A column takes 140 cycles, and a search takes 32 x 140 + 7 = 4487 cycles
from `start` to `done`. The same 17 memories and the rotator are reused
from the 256-PE engine; only outputs 0..15 are used.

The source design's text gives 4160 cycles. Its cycle-by-cycle table uses
140 cycles per column, ending at clock 4479; this implementation follows
the table.

The 64-PE engine uses the standard AD circuit, without comparison
prediction.

## Files

| file | contents |
|---|---|
| `rtl/me_pkg.sv` | sizes, types (`pixel_t`, `sad_t`, `mv_t`), enums, sub-block indices |
| `rtl/me_top.sv` | top level: both engines, VDSR, VTBS sequencer, SAD reuse, filter |
| `rtl/me256_core.sv`, `me256_ctrl.sv` | 256-PE engine and its zigzag controller |
| `rtl/pe_array256.sv`, `pe256.sv`, `ad_unit.sv` | 16x16 PE array, PE, AD circuit (standard or CP) |
| `rtl/temp_regs.sv`, `sw_bank.sv`, `h_rotator.sv` | temporary registers, window memory, rotator |
| `rtl/sad4x4_tree.sv`, `vbs_sad_tree.sv`, `mv_comparator.sv` | adder trees and best-MV selection |
| `rtl/me64_core.sv`, `me64_ctrl.sv`, `pe_array64.sv`, `pe64.sv`, `sad_acc64.sv` | 64-PE engine |
| `rtl/vdsr_mv_compare.sv`, `vdsr_sad_reuse.sv` | SAD-reuse decision and storage |
| `rtl/vtbs_trajectory.sv`, `hp_fir6.sv` | half-pixel search pattern and interpolation filter |
| `tb/me_ref_pkg.sv` | reference model: pictures, exact and CP-aware full search, sub-block geometry |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Every testbench is self-checking. Each one:

* prints `TB_RESULT checks=<n> failures=<m>` and ends with `$finish`;
* has a watchdog that counts a failure if it runs out of cycles.

Build and run with Verilator 5, from the repository root:

```sh
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/me_pkg.sv tb/me_ref_pkg.sv tb/tb_me_top.sv --top-module tb_me_top
./obj_dir/Vtb_me_top
```

Replace `tb_me_top` by any other `tb/tb_<module>` to test one block.
`tb_me_top` runs the top with all parameters at their defaults and takes
the whole design through its operation:

* three 256-PE searches with planted motion
* checks of the VDSR flags and the trajectory stream
* the SAD-reuse adder and the filter
* one 64-PE search

It counts each mechanism (array shifts in three directions, wrong
predictions, reuse, each trajectory mode, write-back, clipping, the 64-PE
fill and shift), and a mechanism that never occurs is a failure. The
module testbenches cover the other parameter settings (R-ADP, checkerboard,
the Z and TBT criteria).

`tb/tb_cp_workload.sv` runs five copies of the 256-PE core side by side:
the exact circuit, R-ADP, E-ADP, CR-ADP and CE-ADP. It searches ten
macroblocks from five synthetic pictures, checks every copy against the
reference model, and prints the prediction accuracy per method and how often
the 16x16 MV matches the exact one. It takes about a minute.

The test pictures are synthetic: smooth gradients with noise. No video
sequences are included. The measured prediction accuracy is about 89.6-89.8 %,
close to the roughly 90 % reported for real video; real video can behave
differently.

## Departures and choices to be aware of

* **Cycle counts:** 1047 per MB for the 256-PE engine and 4487 for the
  64-PE engine. The source design states 1091 and 4160; the cycle counts
  here follow its data-flow schedules (see above).
* **CP placement:** CP was evaluated on the fixed-block-size version of the
  256-PE engine. Here it sits in the variable-block-size engine, whose
  16x16 output is the fixed-block-size result.
* **Interfaces:** the loading ports, the start/busy/done handshake, the
  result hold, the tie rule and `mispred_cnt` are this design's own.
* **Filter:** rounding and clipping follow H.264; the source design gives
  only the filter weights and the division by 32.
* **Sub-block numbering:** the order of the 8x16 and 16x8 entries is this
  design's choice.
* **Memories:** modelled as plain arrays with a synchronous read port
  (141 words x 8 bits each). An FPGA tool maps them to block RAM.
* **64-PE reuse of the 256-PE memory organisation:** the 64-PE engine uses
  the same 17 memories and rotator. Its memory organisation is not
  specified separately.
