# Multi-level lifting 2-D DWT without frame memory

This is a pipelined three-level 2-D discrete wavelet transform (9/7 wavelet,
lifting form) for an N x N image. It never stores the image or a whole
intermediate band. It takes 32 pixels per clock cycle and produces all
subbands of all three levels while the image streams in. Two ideas make this
work:

* **Overlapped stripes.** The image is cut into vertical stripes 2S pixels
  wide (S = 16, so 32 pixels). Stripes are read left to right, and each stripe
  is read top to bottom, one stripe row per cycle. Each row also carries the
  last 7 pixels of the same row of the stripe to its left. From those 7 pixels
  a small unit recomputes the lifting state at the stripe boundary. Without
  them, that state would have to be kept for every row between stripes.
* **Flipped lifting cells.** Every lifting step is written so that only the
  step's own sample is multiplied. The multiplier uses the reciprocal of the
  lifting coefficients, and the two neighbours go straight into the adder.
  Each pipeline stage is then one multiplier plus one adder. Right shifts by
  K = 1 bit guard against overflow. A final scaling unit removes all the
  leftover constant factors.

Level 1 handles a full stripe row every cycle. Its LL band is half as wide and
arrives every second cycle. A *splitter* cuts each LL row into two halves,
one per cycle, so level 2 needs only a quarter of the hardware. Level 3 works
the same way. With S = 16, the levels have 16, 4 and 1 lifting pipes in the
row transform and the same number in the column transform.

## Data flow

```
pix[32] --> overlap_buffer --> Arch 1 ------------------------------> level-1 LL/LH/HL/HH (16 lanes)
            (+7 overlapped      | LL1, 16 values every 2nd cycle
             pixels)            v
                             splitter --> 8 values/cycle --> Arch 2 --> level-2 subbands (4 lanes)
                                                               | LL2
                                                               v
                                          splitter --> 2 values/cycle --> Arch 3 --> level-3 subbands (1 lane)

Arch j = rdwt (Row-PU + Aux-PU or per-row store) -> transpose_reg -> cdwt -> scaling_unit x S_j
```

| level | DPPs (row and column) | segments per row | input per cycle |
|-------|-----------------------|------------------|-----------------|
| 1     | S = 16                | 1                | 32 pixels + 7 overlapped |
| 2     | S/4 = 4               | 2                | 8 LL1 coefficients |
| 3     | S/16 = 1              | 4                | 2 LL2 coefficients |

All three levels are fully busy when the input streams without gaps. One
image takes N*N/32 cycles. The last coefficient comes out 41 cycles after the
last input row.

## The arithmetic: cells, DPPs and scale factors

Take one row (or column) as a sequence `z[]`, with `z[0] = 0` as padding and
`z[i+1]` the i-th sample. The 9/7 lifting steps are

```
d1[n] = z[2n+1] + a (z[2n]   + z[2n+2])     a = -1.586134342
s1[n] = z[2n]   + b (d1[n-1] + d1[n])       b = -0.052980118
d2[n] = d1[n]   + g (s1[n]   + s1[n+1])     g =  0.882911076
s2[n] = s1[n]   + d (d2[n-1] + d2[n])       d =  0.443506852
low = zeta * s2,  high = d2 / zeta            zeta = 1.149604399
```

`lift_cell` computes one *flipped* step:
`q = (C*m >>> (12+K)) + (a >>> K) + (b >>> K)`, registered. Here `m` is the
step's own sample and `a`, `b` are its neighbours. Dividing each step by the
product of the coefficients so far gives the four constants
`C1 = 1/a`, `C2 = 1/(a b 2^K)`, `C3 = 1/(b g 2^K)`, `C4 = 1/(g d 2^K)`.
They are held in Q12 (`dwt_pkg`). Each variable therefore carries a fixed,
known scale. After one 1-D pass, `s2' = s2 / (a b g d 2^4K)` and
`d2' = d2 / (a b g 2^3K)`. `scaling_unit` multiplies each 2-D subband by the
product of its two 1-D factors `kL = zeta a b g d 2^4K` and
`kH = a b g 2^3K / zeta` (LL: kL², LH and HL: kL·kH, HH: kH²), in Q14. All
shifts truncate.

A `dpp` (data processing pipe) is four cells, one per lifting step, with a
register after each. Unit `n` takes the pair `z[2n+1], z[2n+2]`, and also
`z[2n]` from its left neighbour, at cycle t. From unit `n-1` it takes the
partial results d1[n-1] at t+1, s1[n-1] at t+2 and d2[n-2] at t+3. It hands
on d1[n], s1[n] and d2[n-1] with the same offsets. It outputs s2[n-1] and
d2[n-1] at t+4. Because producer and consumer are offset by the same amount,
a chain of S DPPs (`row_pu`) needs no extra registers between pipes. All
stages of all pipes work in parallel, so the critical path stays at one
multiplier plus one adder.

Note the index shift: **a pipe's output belongs to the unit one position to
its left.** Lane 0 of a stripe finishes the last pair of the previous stripe.
The output column `i` of any level therefore holds lifting index `i-1`.

## Stripe boundaries: the Auxiliary-PU

The first DPP of a stripe needs three things from the stripe to its left:
d1[n], s1[n], d2[n-1] for the unit just left of the stripe, plus z[2n].
These depend on exactly the seven samples `z[2n-4] .. z[2n+2]`.
`aux_pu` recomputes them with six cells (three d1, two s1, one d2), with the
same timing as a DPP's partial outputs. For the first stripe the seven
samples are zero, which is the zero padding at the left image edge. The
partial results of the last DPP of a stripe are dropped at level 1.

`overlap_buffer` supplies the seven pixels. It keeps the last 7 pixels of
every row of the previous stripe (7 x N pixels). In a system that can re-read
those columns from the image source, this buffer can go.

## From rows to columns: transposition and interleaving

Each cycle, the row transform yields one (L, H) pair per lane for one image
row. The column transform needs two rows of the same column at once.
`transpose_reg` keeps the even row. When the odd row arrives, it queues two
entries: `(L[2m], L[2m+1])` and `(H[2m], H[2m+1])`. One entry leaves per
cycle. So the column DPP of a lane works on its L column and its H column in
alternate cycles.

`cdwt` has one DPP per lane. The lifting state of a column (the last odd-row
sample, d1, s1 and d2) comes from the previous entry of *that* column, which
passed two cycles earlier at level 1. Each lane keeps this state in a small
table with one slot per interleaved column (2 at level 1, 4 at level 2,
8 at level 3). A stage writes the table when it finishes an entry, and the
same stage reads it when it starts the next entry of that column. Row pair 0
of a column reads zeros, which is padding above the image. An L-column entry
yields {LL, LH} and an H-column entry yields {HL, HH}.

## Higher levels: splitters, segments and the per-row store

The LL band of a level arrives as S_j values at most every second cycle.
`splitter` passes the first half of each group at once and keeps the second
half in its segment register for one cycle. The next level therefore sees
every LL row as 2 segments (level 2) or 4 segments (level 3). Each segment is
a quarter as wide as the previous level's stripe, so each level gets one
segment per cycle.

Within a row, segment s > 0 continues segment s-1. `rdwt` keeps that
segment's last sample and last partial results in chain registers. Segment 0
continues the last segment of the *same row in the previous stripe*, which
was processed N_j rows earlier. Above level 1 there are no overlapped pixels
to recompute it from. So those four words are kept in a per-row store:
N/2 x 4 words at level 2 and N/4 x 4 words at level 3. This store is the only
memory that grows with N, apart from the input buffer.

`transpose_reg` sizes its queue at 4P entries, because at level 3 the four
segments of an odd row all arrive in a burst.

## Output format

Each level j (S_j lanes) has `lj_valid`, `lj_tag` and two coefficient arrays
`lj_lo` / `lj_hi`:

* `tag.hi = 0`: `lo` = LL, `hi` = LH. `tag.hi = 1`: `lo` = HL, `hi` = HH.
* `tag.row` = subband row m. Lane k is subband column
  `(tag.stripe * 2^(j-1) + tag.seg) * S_j + k`.
* Subbands are (N_j/2) x (N_j/2), where N_j = N / 2^(j-1). Entry (m, i) holds
  lifting index (m-1, i-1) of the zero-padded transform. The first row and
  column come from the padding side. The last index (N_j/2 - 1) in each
  direction is not produced, because the right and bottom edges are handled
  by dropping the last partial results.
* Levels 1 and 2 also output their LL band, which feeds the next level.

Coefficients are 20-bit signed (`dwt_pkg::DW`), and pixels are 8-bit
unsigned. Across the test images (random images and full-scale checkerboard
and bar patterns) no intermediate value exceeds 8k in magnitude, so there is
wide headroom.

## What follows the architecture and what is filled in

Taken from the architecture: the overlapped stripe scan with 7 overlapped
pixels and zero padding for the first stripe; the flipped cell (one
multiplier, two adders, three K-bit shifts, K = 1); the four-cell DPP with
three pixel and three partial-result inputs; the six-cell Auxiliary-PU; the
S-DPP Row-PU whose last partials are ignored at level 1; the transposition
registers; the column DWT of independent DPPs whose partials are reused two
cycles later; the scaling units; the splitter with its segment register and
mux; and the three-level pipeline with S = 16.

Filled in by this design:

* The filter constants, which are the standard 9/7 lifting coefficients.
  Also the word lengths, fixed-point formats and truncation.
* The index mapping of cells to lifting steps, and the one-pair output shift
  that follows from it.
* How levels 2 and 3 are sequenced: row segments, chain registers, and a
  per-row store of 4 words for the stripe boundary. At level 1 no store is
  needed.
* The transposition queue and the per-column state tables, which let any
  pattern of valid cycles through.
* The internals of the input buffer and of the scaling unit.
* N = 512 as the default image size.
* Zero padding at the top of columns, and all four subbands of levels 1 and 2
  on the outputs.
* Active-low asynchronous reset of the control state only. Datapath
  registers are qualified by valid bits and are not reset.

The transform is the zero-padded one. It is not JPEG 2000's symmetric
extension, so coefficients next to the image borders differ from a JPEG 2000
codec.

## Files

| file | contents |
|------|----------|
| `rtl/dwt_pkg.sv` | widths, lifting and scaling constants, `tag_t` |
| `rtl/lift_cell.sv` | flipped lifting cell |
| `rtl/dpp.sv` | four-cell data processing pipe |
| `rtl/aux_pu.sv` | Auxiliary-PU (six cells) |
| `rtl/row_pu.sv` | chain of S DPPs |
| `rtl/rdwt.sv` | row DWT of a level: Row-PU plus Aux-PU (level 1) or chain registers and per-row store |
| `rtl/transpose_reg.sv` | transposition registers and queue |
| `rtl/cdwt.sv` | column DWT with per-column state |
| `rtl/scaling_unit.sv` | subband scaling |
| `rtl/dwt_arch.sv` | one level (Arch j) with its scan counters |
| `rtl/splitter.sv` | level-to-level splitter |
| `rtl/overlap_buffer.sv` | input buffer for the 7 overlapped pixels |
| `rtl/dwt_top.sv` | three-level top |
| `tb/dwt_ref_pkg.sv` | reference transform: the same integer arithmetic applied straight to whole rows and columns |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_dwt_top_full` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dwt_top \
  -y rtl -y tb +libext+.sv rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt_top.sv
./obj_dir/Vtb_dwt_top
```

* `tb_dwt_top` streams four 64 x 64 images back to back: two random
  images, a full-scale checkerboard and full-scale 2-pixel bars. The last
  image has random idle cycles between its rows. It compares every
  coefficient of all 12 subbands with the reference. It also counts each
  mechanism (zero-padded stripes, overlapped stripes, segment chaining,
  per-row store reads at levels 2 and 3, both splitter halves, and queue
  depth above 1) and fails if any count is zero.
* `tb_dwt_top_full` does the same for one image at the default size,
  512 x 512 (8192 input cycles, a few seconds).
* The block testbenches check each module against the equations or the
  reference, including latencies. The rdwt, cdwt, transpose_reg and dwt_arch
  testbenches also drive random idle cycles.

## Changing it

* `dwt_top #(.N, .S)`: N must be a multiple of 2S, and S a multiple of 16
  (level 3 uses S/16 DPPs).
* Word length and fixed-point formats are in `dwt_pkg`. The reference model
  reads the same constants, so the testbenches follow any change.
* K (`KSH`) is built into the constants C2..C4 and the scale factors. If K
  changes, recompute them with the formulas in `dwt_pkg`.
