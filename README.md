# Fast two-step fractional motion estimation engine for H.264/AVC

H.264 refines every integer-pel motion vector to quarter-pel precision. A full
search tests all 49 quarter-pel positions within one pel of the integer match,
and the JM reference software tests 17 (the integer point, 8 half-pels, then 8
quarter-pels). This engine tests only **8 or 9**, in two steps. The reasoning
behind it: inside one pel the SATD error surface is almost always unimodal,
and the true fractional vector is usually close to the integer match. So the
engine measures a few points first, then looks only between the best ones.

* **Step 1.** Evaluate the integer position and the four half-pel points of a
  diamond (up, left, right, down). Five candidates, five processing units in
  parallel.
* **Step 2.** Rank the step-1 costs and choose one of four quarter-pel patterns
  from the best three positions (3 or 4 points, see below). The result is the
  lowest cost of all the points evaluated.
* **Early termination.** If the best step-1 SATD is below a threshold, step 2
  is skipped. The threshold is predicted from the integer-pel SAD and QP.

The cost is the SATD: the sum of absolute 4x4 Hadamard coefficients of the
residual, summed over the 4x4 blocks of the partition. Any H.264 partition
from 16x16 down to 4x4 can be refined.

## Second-step patterns

Offsets are in quarter pels, `(dx, dy)`. The step-1 points are
C=(0,0), U=(0,-2), L=(-2,0), R=(2,0), D=(0,2). Two half-pel points
*neighbour* each other when they are perpendicular (U and L, for example).
They do not when they are opposite (U and D). Below, `u` is the one-quarter
step from the centre towards a half-pel point (for L, `u`=(-1,0)), and `p` is
the step perpendicular to `u`.

```
          -3 -2 -1  0  1  2  3          case 1: best C, 2nd L, 3rd R
      -3   .  .  .  .  .  .  .                  -> (-1,-1) (-1,0) (-1,1)
      -2   .  .  .  U  .  .  .          case 2: best C, 2nd L, 3rd U
      -1   .  .  .  .  .  .  .                  -> (-1,0) (0,-1) (-1,-1)
       0   .  L  .  C  .  R  .          case 3: best L, 2nd U
       1   .  .  .  .  .  .  .                  -> (-2,-1) (-1,-1) (-1,-2)
       2   .  .  .  D  .  .  .          case 4: best L, 2nd R or C
       3   .  .  .  .  .  .  .                  -> (-3,0) (-1,0) (-2,-1) (-2,1)
```

| case | condition | step-2 points |
|---|---|---|
| 1 | centre best; 2nd and 3rd opposite | the three quarter-pels between the centre and the 2nd best: `u2-p`, `u2`, `u2+p` |
| 2 | centre best; 2nd and 3rd neighbouring | an "L": `u2`, `u3`, `u2+u3` |
| 3 | a half-pel best; 2nd best a neighbouring half-pel | an "L" between the two, corner towards the centre: `d1+u2`, `u1+u2`, `d2+u1` |
| 4 | a half-pel best; 2nd best opposite, or the centre | the four quarter-pels around the best: `d1±u1`, `d1±p1` |

The four cases and their conditions are the algorithm's. The exact points of
each pattern are this implementation's reading of them. Case 1 has the most
room for another reading. The case-4 rule for "half-pel best, centre second"
is also a choice made here. All pattern logic is in `fme_compare.sv`, and the
same patterns are written out a second time, independently, in
`tb/fme_tb_model.sv`. To change a pattern, edit both.

Ties are broken towards the lower index (C, U, L, R, D). In the final
comparison the step-1 winner wins ties against step-2 points.

## Early-termination threshold

The threshold is piecewise linear in the best integer-pel SAD of the
partition. It has a QP term so that coarse quantisation stops the search more
often:

| SAD | threshold |
|---|---|
| SAD <= 500 | 1.25·SAD + 16·(QP−28) + 36 |
| 500 < SAD <= 1000 | SAD + 16·(QP−28) + 161 |
| SAD > 1000 | 0.75·SAD + 16·(QP−28) + 411 |

The offsets make the three pieces meet at SAD = 500 and at SAD = 1000. The
quarter factors use `SAD>>2`, which truncates. The test is made once per
partition, after step 1: step 2 is skipped when the best step-1 SATD is
strictly below the threshold. A threshold of zero or less never terminates.
This once-per-step form suits hardware that evaluates all the points of a step
in parallel. A sequential implementation would instead test after every
point.

## Datapath

```
 ref buffer --10 px/cycle--> interpolation --5x11 half-pel grid--> selection --4 px x 5--> PU x5 --> costs
 (22x22)                     5 H-FIR, 6-row buffer, 11 V-FIR       per-PU mux + avg          ^
 cur buffer ------------------------4 original px/cycle, broadcast -------------------------+
 compare & determine <-- costs;  early termination <-- SAD, QP;  control sequences both steps
```

**Order of processing (vertical integration).** The partition is processed as
4-pixel-wide column strips. Each strip is read top to bottom as H+6 reference
rows (3 margin rows above and below), one row per cycle. Interpolated rows
are then shared between vertically adjacent 4x4 blocks, and a 4x4 block
reaches the PUs every four cycles.

**Interpolation (`fme_interp`).** Each cycle, 10 integer pixels (columns −3
to +6 of the strip) enter. Five horizontal 6-tap filters give the unrounded
half-pels between columns −1 and 4. These five values and the six integer
pixels (−1 to 4) enter a 6-row shift buffer. Eleven vertical 6-tap filters
over the buffer give the half row below the middle row: six on integer
columns, five on the unrounded horizontal half-pels, which give the centre
half-pels. The last three (integer row, half row) pairs form a **5 x 11
half-pel grid** around one pixel row R: rows R−1, R−½, R, R+½, R+1 and
columns −1, −½, …, 4. Every quarter-pel sample within ±¾ pel of the four
pixels of row R is either a grid sample or the rounded average of two grid
samples. Rounding follows H.264: `(x+16)>>5` for the half-pels and
`(x+512)>>10` for the centre half-pel, clipped to 0..255. The grid for the row
that entered at cycle t is valid at cycle t+6. A tag travels with it. Row R+1
needs input only up to row R+3, so the next strip can follow without a gap.

**Selection (`fme_select`).** For each PU and each of its four pixels, the
quarter-pel position relative to the grid is `(4+dy, 4+4k+dx)` in quarter
units. Selection works in three cases:

* Both coordinates are even: take the grid sample.
* One coordinate is odd: average the two neighbouring samples on that axis.
* Both are odd: average the two diagonal corners that are half-pels of mixed
  type. These are the corners whose grid coordinates have an odd sum.

This is exactly the H.264 quarter-pel rule, written in grid form. There is
one register stage.

**Processing unit (`fme_pu`).** The PU has these parts:

* Four PEs form the residuals of one row.
* A 1-D Hadamard transform (`fme_hadamard4`) transforms the row.
* A two-bank transpose register array stores the transformed rows.
* A second 1-D Hadamard transforms one column per cycle from the bank that is
  full.
* An absolute-sum accumulator adds up the column results.

Filling one bank and draining the other each take four cycles. The PU
therefore accepts four pixels every cycle with no gap between blocks.
Per 4x4 block the SATD is `(Σ|coef|+1)>>1`, as in JM. `cost_valid` comes five
cycles after the last row.

**Compare & determine (`fme_compare`).** This unit is combinational. It ranks
five costs (best, second, third) and, from a step-1 ranking, gives the case
and the step-2 points. In step 2 the step-2 candidates run on PUs 1–4. The
unit then compares their costs with the step-1 winner, which is placed in
slot 0.

**Control (`fme_control`).** This is a state machine:
IDLE → FEED → DRAIN → DECIDE → FEED → DRAIN → FINAL. It generates the strip
and row addresses and the row tags: block row, first and last block, and the
original-pixel address.

## Interface and timing (`fme_top`)

1. Write the (4·h4+6) x (4·w4+6) reference pixels around the integer match
   through `ref_wr_*`. Window (0,0) is 3 rows above and 3 columns left of the
   partition.
2. Write the original pixels through `cur_wr_*`.
3. Pulse `start` with `blk_w4`, `blk_h4` (1, 2 or 4), `int_sad` and `qp`.
4. `done` pulses with:
   * `mv`: the quarter-pel offset from the integer vector, −3..+3 per
     component;
   * `cost`: the SATD;
   * `step2_case`: `CASE_NONE` after early termination;
   * `early_term`.

Cycles from `start` to `done`: `steps · (w4·(4·h4+6) + 11) + 1`. For 16x16
that is 100 cycles with early termination and 199 with both steps. All 41
partitions of a macroblock take 2607 cycles in the worst case. Buffer loading
is not included. At 100 MHz that is 38.4k macroblocks/s. For 720x480 at 30 Hz
(40.5k MB/s), the worst case without any early termination therefore falls
about 5% short. Any early termination closes the gap: in the macroblock test
with a generous threshold, the total drops to 1423 cycles.

## How far to trust it

All of the following are checked by self-checking testbenches against an
independent model, `tb/fme_tb_model.sv`:

* **Samples:** every interpolated and quarter-pel sample, for all 49 offsets
  and on random data. The model uses the standard's per-position equations
  (a…s).
* **SATD:** the matrix form H·D·Hᵀ.
* **Search:** the whole two-step search, for all seven partition shapes.
* **Threshold:** including QP above 31 and the segment edges.
* **Timing:** the cycle counts above.

Each testbench has also been shown to fail against a deliberately broken copy
of its module.

What this design leaves out or chooses for itself:

* No motion-vector rate term: the cost is SATD only.
* One partition per `start`. The loop over the 41 partitions and the integer
  ME are outside.
* Buffer loading is one pixel per cycle and is not overlapped with
  computation.
* The bilinear quarter-pel filters are formed on demand, 20 of them (one per
  PU pixel), in the selection unit. There is no precomputed and pruned set of
  quarter-pel filters.
* No gate-level figures: area numbers from another technology do not carry
  over.

## Relation to the published architecture

The algorithm comes from a published fast FME algorithm and its VLSI
architecture: Y.-J. Wang, C.-C. Cheng and T.-S. Chang, "A Fast Algorithm and
Its VLSI Architecture for Fractional Motion Estimation for H.264/MPEG-4 AVC
Video Coding". This RTL follows that architecture in these points:

* the two-step search with its four cases;
* the QP-adaptive threshold, tested once per step;
* five 4x4-block PUs fed four original pixels per cycle;
* the PU built from PEs, two 1-D Hadamard transforms and a transpose array;
* the split horizontal/vertical 6-tap interpolation with 5 + 11 filters and a
  shifting buffer of six integer pixels and five intermediate values;
* a selection unit ahead of the PUs;
* the compare, early-termination and control units.

It departs from that architecture in these points:

* **Latency.** The published figure is 2000 cycles per macroblock for all 41
  partitions. This design needs 2607 in the worst case. It processes 4-wide
  strips of H+6 rows and drains an 11-cycle pipeline after each step. The
  published schedule is not described in enough detail to reproduce.
* **Quarter-pel filters.** The published unit precomputes the quarter-pel
  samples with a pruned set of 68 bilinear filters. Here, 20 averaging
  filters in the selection unit form only the samples of the current
  candidates.
* **Exact pattern points.** These are readings of the case descriptions (see
  above).
* **SATD normalisation** `(Σ+1)>>1`, **tie-breaking** and the
  **start/done interface** are this design's own choices.

## Files

| file | contents |
|---|---|
| `rtl/fme_pkg.sv` | types (`qmv_t`, `row_tag_t`, `fme_case_e`), 6-tap filter, rounding, threshold function |
| `rtl/fme_top.sv` | the engine |
| `rtl/fme_control.sv` | sequencer |
| `rtl/fme_ref_buffer.sv`, `rtl/fme_cur_buffer.sv` | reference-window and original-block memories |
| `rtl/fme_interp.sv` | half-pel interpolation unit |
| `rtl/fme_select.sv` | per-PU sample selection and quarter-pel averaging |
| `rtl/fme_pu.sv`, `rtl/fme_hadamard4.sv` | 4x4 SATD processing unit and its 1-D transform |
| `rtl/fme_compare.sv` | ranking, case and pattern |
| `rtl/fme_early_term.sv` | threshold and decision |
| `tb/fme_tb_model.sv` | reference model package |
| `tb/tb_fme_*.sv` | one testbench per module; `tb_fme_top` (random partitions, all cases) and `tb_fme_mb41` (a whole macroblock) run the full engine at its default size |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. The simulator used is Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/fme_pkg.sv tb/fme_tb_model.sv tb/tb_fme_top.sv --top-module tb_fme_top
./obj_dir/Vtb_fme_top
```

Replace `tb_fme_top` with any other testbench name. The top-level tests run in
about a second.
