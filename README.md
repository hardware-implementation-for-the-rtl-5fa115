# HEVC fractional motion estimation engine for square prediction units

This is synthesizable SystemVerilog for the fractional motion estimation (FME) stage of an HEVC video encoder. It follows a published low-energy architecture that restricts motion estimation to the four square prediction-unit (PU) sizes: 8x8, 16x16, 32x32 and 64x64.

The integer motion search finds the best whole-sample vector for a PU. This engine then looks at the 48 positions around that vector on a quarter-sample grid. The offsets are −3/4 … +3/4 in x and in y, with (0,0) left out. For each position it:

- builds the fractional block with the HEVC 8-tap luma interpolation filters;
- measures it against the current block by the sum of absolute differences (SAD);
- returns the best vector and its SAD. If no fractional block is strictly better, it returns the integer vector.

Every one of the 48 positions is evaluated (full search). Half- and quarter-sample positions are not searched one after the other.

Larger PUs are never handled as a whole. The engine processes every PU as 8x8 pieces and adds up the SADs, so one datapath sized for 8x8 serves all four sizes.

| PU | 8x8 pieces | cycles |
|----|-----------|--------|
| 8x8 | 1 | 51 |
| 16x16 | 4 | 204 |
| 32x32 | 16 | 816 |
| 64x64 | 64 | 3264 |

PUs can follow each other with no gap. At 51 cycles per 8x8 block, UHD 2160p at 60 frames/s needs about 397 M cycles/s:

    3840·2160/64 blocks × 51 cycles × 60 frames/s ≈ 396.6 M cycles/s

HD 1080p at 30 frames/s needs 49.6 M cycles/s.

## The 48 candidates and the 16x16 window

Number the samples of an 8x8 block 0..7 in x and y. A candidate with offset (dx, dy) in quarter samples uses, at block position (x, y), the sample at (x + dx/4, y + dy/4). Negative offsets turn into positive ones on the neighbouring column or row: x − 3/4 = (x − 1) + 1/4. So each of the three fractional phases (1/4, 1/2, 3/4) is needed at the nine positions −1..7. Each of these samples is computed by an 8-tap filter, which reaches 3 samples back and 4 ahead. That makes the integer window 16x16, from block coordinate −4 to 11.

The samples fall into three kinds:

- **H-type** (horizontal, dy = 0). These come from integer samples along a row. They are needed for all 16 window rows, because the diagonal samples are filtered vertically from them: 27 columns × 16 rows = 432 samples.
- **V-type** (vertical, dx = 0). These come from integer samples along a column. There are 27 of them for each of the 8 block columns, 216 in all.
- **D-type** (diagonal). These are the vertical filtering of H-type samples: 27 H columns × 27 results = 729 samples.

Candidates are numbered 0..47 in raster order over the 7x7 offset grid with the centre removed (`fme_pkg::blk_id`, `off_x`, `off_y`).

## The 51-cycle schedule

The filter bank turns one line of 16 inputs into 27 outputs per clock: nine quarter, nine half and nine three-quarter samples, at positions −1..7. `fme_control` issues 51 slots per 8x8 block.

| slots | phase | filter input | what comes out | SAD trees used |
|-------|-------|--------------|----------------|----------------|
| 0–15 | H | window row 0..15 from the reference memory | one row of 27 H-type samples, all written to the H-type buffer | 6, for window rows 4..11 (block rows 0..7) |
| 16–23 | V | window column 4..11 from the reference memory | 27 V-type samples of block column 0..7 | 6 |
| 24–50 | D | column `th·9 + k` of the H-type buffer | three vertical phases over rows −1..7 of that H column | 12 |

In the D phase the slots are grouped by position k = 0..8, three horizontal phases each.

The last H row leaves the filters at slot 19, before the first D read at slot 24. The next block's first H write comes after the last D read. So blocks follow each other with no bubble, and the interpolation and the search run in parallel.

The diagonal slots are the subtle part. An H column of phase `th` at position x = k − 1 serves two groups of candidates:

- the candidates with dx = th + 1, for which it is block column x;
- the candidates with dx = th − 3, for which it is block column x + 1.

In each group there are six vertical offsets, so twelve candidates use the column. Those in the first group compare with current-block column x. Those in the second compare with column x + 1.

Only one 8-sample current column is fetched per slot, and it is column x + 1. Column x was fetched during the previous group of three slots and is held in an 8-sample register (`cur_lo` in `sad_trees`). At the ends, k = 0 only feeds the dx < 0 candidates and k = 8 only the dx > 0 ones, so those slots use six trees.

## Interpolation filters

The HEVC coefficient sets are:

| phase | coefficients | filter |
|-------|--------------|--------|
| quarter (1/4) | −1 4 −10 58 17 −5 1 0 | `fir_up_down` (Up) |
| half (1/2) | −1 4 −11 40 40 −11 4 −1 | `fir_middle` |
| three-quarter (3/4) | 0 1 −5 17 58 −10 4 −1 | `fir_up_down` (Down) |

The three-quarter set is the quarter set reversed, so `fir_up_down` serves both. Its parameter `DOWN` reverses the taps.

There are no multipliers. The products are built from shifts and adds:

- 58x = 64x − 4x − 2x
- 17x = 16x + x
- 40x = 32x + 8x
- 11x = 8x + 2x + x

Each filter has three pipeline stages. Every filter output is scaled as **(sum + 32) >>> 6**: a shift with round-half-up instead of a division. This applies to the second (vertical) pass of the diagonal samples too. The ranges that result are:

| input | filter | output range | width |
|-------|--------|--------------|-------|
| 8-bit integer samples | quarter / three-quarter | −64..319 | 10 bits |
| 8-bit integer samples | half | −96..351 | 10 bits |
| 10-bit H-type samples | quarter / three-quarter | — | 10 bits |
| 10-bit H-type samples | half | — | 11 bits |

Filter inputs are 10-bit signed.

This one-shift-per-pass scaling is the published design's choice for the encoder-side search. It is not the bit-exact HEVC two-stage intermediate precision used for the final prediction. It therefore ranks candidates on slightly different sample values than motion compensation will produce.

H-type samples go into the buffer **unclipped**, because clipping them before the vertical pass would compound the error. Every sample is clipped to 0..255 (`clip8`, 27 instances) just before the SAD trees.

## Search and comparison

- **`sad_tree`** (12 instances) computes |R − C| over eight samples, then a 3-level adder tree: four stages, one 11-bit line SAD per clock.
- **`sad_trees`** holds the twelve trees and the routing. Each candidate always uses the same tree (`fme_pkg::tree_of`). Tree `tr` always reads phase `(tr % 6)/2` of the filter outputs: samples k = 1..8 for positive offsets and k = 0..7 for negative ones. So the sample wiring is fixed, and only the candidate ids and the current line change from phase to phase. A tag (`acc_tag_t`: valid, candidate id, load) travels down each tree with the data.
- **`sad_accumulator`** has 48 accumulators of 20 bits. Each listens to its candidate's tree. A line marked `load`, the first line of a PU, restarts the sum. The sums carry on across all 8x8 pieces of a PU, and 20 bits hold a 64x64 SAD (4096 × 255). `done` pulses when the last line of the PU has been added.
- **`sad_comparator`** is a six-stage tournament of 48 two-input comparators:
  - stages 1–4 reduce 48 → 24 → 12 → 6 → 3;
  - in stage 5 the integer-search result joins as a fourth entry (4 → 2);
  - stage 6 gives the winner (2 → 1).

  On a tie the left entry wins. The integer result sits on the left in stage 5, so a fractional vector must be strictly better to win. Among equal fractional SADs the lowest candidate id wins. The output vector is the integer vector plus the winner's quarter-sample offset.

The comparator works on one PU while the accumulators already collect the next, so it adds no cycles to the throughput.

## Interface and timing

`fme_top` ports:

| group | signals | meaning |
|-------|---------|---------|
| request | `start`, `ready`, `busy` | `start` is taken on a clock where `ready` is high. `ready` is high when the engine is idle, or in the last slot of the running PU, which allows back-to-back PUs. |
| | `pu_size` | 0..3 = 8x8 … 64x64 |
| | `ime_mv_x`, `ime_mv_y` | integer-search vector in quarter-sample units, `MV_W` = 16 bits signed |
| | `ime_sad` | 20-bit integer-search SAD |
| reference memory | `ref_rd_en`, `ref_rd_col`, `ref_rd_idx`, `ref_rd_sub_x`, `ref_rd_sub_y` → `ref_line[16]` | asks for window row (`ref_rd_col`=0) or column (`ref_rd_col`=1) `ref_rd_idx` (0..15 = coordinate −4..11) of 8x8 sub-block (`sub_x`, `sub_y`) of the PU. The memory returns 16 8-bit samples one clock later. It adds the PU position and the integer vector itself. |
| current memory | `cur_rd_*` → `cur_line[8]` | same scheme for a row or column 0..7 of the current block, one clock latency |
| result | `res_valid`, `res_sad`, `res_mv_x`, `res_mv_y`, `res_frac_x`, `res_frac_y`, `res_frac_win` | one-clock strobe with the best SAD, the best vector (quarter-sample units), the fractional offset (−3..3, 0 when the integer vector wins), and whether a fractional block won |

The pipeline, counted from slot s:

| clock | step |
|-------|------|
| s | line requested |
| s+1 | line arrives, filter stage 1 |
| s+3 | current line requested |
| s+4 | filter output goes to the H buffer and the clip; current line arrives |
| s+8 | line SAD |
| s+9 | accumulated |
| s+15 | comparator result |

For an 8x8 PU, `res_valid` comes 65 clocks after the clock on which `start` was taken. The next results follow every 51 clocks per 8x8 piece.

## Where this RTL departs from, or adds to, the published design

- **First-result latency.** It is 65 cycles where the published design states 64. The extra clock is the registered read of the external reference memory, whose timing the publication does not give. The 51-cycle period and 204 cycles per 16x16 PU match exactly.
- **Slot order.** The order inside the 51 cycles (H rows, then V columns, then D columns grouped by position) is this design's own. The publication gives only the cycle counts, 19 cycles until the H samples are complete, and the totals, which this order meets. So are the raster order of the 8x8 pieces and the start/ready handshake.
- **Held current column.** The 8-sample register `cur_lo` lets the D phase fetch only one current column per cycle. It is an addition.
- **Accumulator wiring.** The fixed candidate-to-tree wiring is one consistent reading of the publication's accumulator description.
- **Motion vectors.** The publication selects candidate vectors from an external vector memory. Here the vector is computed as the integer vector plus the offset.
- **Clock gating.** It is represented by register enables driven by the valid bits of the pipeline. No gating cell is instantiated; a synthesis flow can map the enables to clock gates.
- **Tie-breaking and reset.** Ties are resolved as described under Search and comparison. Control, valid and tag registers have an asynchronous active-low reset; data registers have none. Both choices are this design's own.
- **Scope.** Only 8-bit luma (Main Profile) is supported, and only square PUs. No area, power or frequency figures are reproduced here: those are properties of a synthesis flow, not of the RTL.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `fme_pkg.sv` | constants, the slot tag (`fme_tag_t`), the tree tag (`acc_tag_t`), candidate numbering functions |
| `fme_top.sv` | the whole engine |
| `fme_control.sv` | slot and sub-block state machine |
| `input_mux.sv` | reference line or H-buffer column into the filters |
| `filter_bank.sv` | 9 Up, 9 Middle and 9 Down filters |
| `fir_up_down.sv`, `fir_middle.sv` | the two filter architectures |
| `h_buffer.sv` | 27x16x10-bit register store, row write / column read |
| `clip8.sv` | clip to 0..255 |
| `sad_tree.sv`, `sad_trees.sv` | one SAD tree; the twelve with their routing |
| `sad_accumulator.sv` | 48 accumulators |
| `sad_comparator.sv` | six-stage comparator |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each prints `TB_RESULT checks=N failures=M` and stops itself after a fixed number of clocks.

`tb_fme_top` runs the engine at its default parameters on ten PUs of all four sizes. Some PUs start back to back; some are built so that a fractional block wins, others so that the integer vector wins. It models both external memories and checks:

- all 48 accumulated SADs of every PU against an interpolation model written straight from the filter definitions;
- the final SAD, vector and offset;
- the 65-cycle latency, the 51- and 204-cycle spacing, and the 32x32 timing;
- that every PU size, a back-to-back start, both winner kinds and all three slot types actually occurred.

`tb_fme_frame` is the real-time test. It runs one whole 3840x2160 frame through the engine. Every 64x64 unit of the frame is cut into square PUs by a random quadtree, and the 10,713 PUs that result are started back to back. The reference frame is random. The current frame is the reference moved by a fixed integer vector, plus noise of ±1. Reads outside the frame repeat the edge sample, as a padded HEVC reference picture does. The test checks:

- that the frame takes exactly 51 clocks per 8x8 block, i.e. the engine never stalls between PUs of different sizes: 6,609,615 clocks, or 396.6 MHz for 60 frames/s;
- the result of every fifth 8x8 and 16x16 PU against the software model (about 1,500 PUs).

It takes about 15 seconds with Verilator.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/fme_pkg.sv tb/tb_fme_top.sv --top-module tb_fme_top
    ./obj_dir/Vtb_fme_top

For a unit test, replace `tb_fme_top` with that module's testbench. The package must come first on the command line; the other modules are found through `-Irtl`. The full-size end-to-end run takes well under a second.

To change the design:

- filter coefficients and widths are in `fir_up_down.sv`, `fir_middle.sv` and `fme_pkg.sv`;
- the slot schedule is in `fme_control.sv`, and the routing that must match it is in `sad_trees.sv`;
- the tie-break is in `sad_comparator.sv` (`pick`).

`tb_sad_trees` checks the routing from the candidates' side: it derives every candidate's samples from its offset alone. After any change to the schedule, run it first.
