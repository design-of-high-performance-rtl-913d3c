# H.264 intra prediction circuit for a decoder

An H.264 decoder predicts every intra-coded macroblock from pixels it has
already reconstructed: the row above it and the column to its left. There are
17 prediction modes:

- nine for each of the sixteen luma 4x4 blocks;
- four for the luma 16x16 block (vertical, horizontal, DC and plane);
- four for each 8x8 chroma block (the same four).

Nearly every predicted pixel is one of a few rounded sums of neighbouring
samples:

- a 3-tap filter `(p + 2q + r + 2) >> 2`;
- a 2-tap average `(p + q + 1) >> 1`;
- a DC mean `(sum + n/2) >> log2 n`;
- the plane equation.

This circuit does not give each mode its own datapath. All modes share eight
**common computation units** and seven **common registers**. A 4x4 block is
filtered in two cycles of eight pixels each. Values that both halves of the
block need are computed once and kept in the registers. A small internal
buffer holds the neighbouring pixels, so the line memory is read only once per
macroblock. At 1920x1088 the circuit needs two line SRAMs of 3.75 Kbytes in
total. It is well within the budget for 60 frames/s at about 100 MHz.

```
 mb_* syntax ──► SED ──modes──► Controller ──jobs──► PSP ──► pred_* (8 pixels/cycle)
                                   │   ▲                ▲
                 line SRAM Y ◄─────┤   │ rec_valid      │ neighbours
                 line SRAM Cb/Cr ◄─┤   │                │
                                   └─► NSB ◄────────────┴──── rec_* (reconstructed pixels)
```

| module | role |
|---|---|
| `intra_pred_top` | the whole circuit |
| `sed` | syntactic elements decoder: intra syntax to prediction modes |
| `nsb` | neighbouring samples buffer: the reference pixels of the current macroblock |
| `psp` | predict samples processor: all prediction arithmetic |
| `ccu4`, `ccu2` | the 4-input and 2-input common computation units |
| `common_regs` | the seven 14-bit common registers |
| `plane_prep` | plane-mode gradients and the terms t1, t2, t3 |
| `controller` | macroblock sequencer |
| `line_sram` | dual-port line memory (one for Y, one for Cb/Cr) |
| `intra_pkg`, `l4_plan_pkg` | shared types; the luma 4x4 unit allocation table |

## The common computation units

```
ccu4:  F = (W + X + Y + Z + 2) >> alpha      three adders in a tree, +2, shifter
ccu2:  F = (a + b + 1) >> beta               adder, +1, shifter
```

The PSP has five `ccu4` and three `ccu2`. A single unit type covers several
jobs, depending on how it is fed:

| use | fed with | shift |
|---|---|---|
| 3-tap filter | `ccu4(p, q, q, r)` | alpha = 2 |
| 2-tap average | `ccu2(p, q)` | beta = 1 |
| 2-tap average (when no ccu2 is free) | `ccu4(p, p, q, q)` | alpha = 2 |
| DC partial sum of four samples | `ccu4` | alpha = 0 |
| plane pixel | see "Plane mode" below | 5 |

Operands are 16-bit signed and results 18-bit, so no sum overflows. The DC
offsets and the plane terms need the sign.

## Luma 4x4: two cycles, eight units, reuse through the registers

A 4x4 block leaves the PSP as two **groups** of eight pixels:

- cycle 0: columns 0 and 1;
- cycle 1: columns 2 and 3.

Within a group, pixel `k` is at column `x + k/4`, row `y + k%4`.

**Vertical and horizontal** are copies of neighbouring samples. **DC** needs
one extra preparation cycle:

1. Two `ccu4` form the partial sums of the top and left samples (alpha = 0).
   They go to registers.
2. In the next cycle a `ccu4` combines them, and the DC value goes to a
   register.

The first group goes out in the same cycle as step 2, so a DC job takes three
cycles.

The six **directional modes (3 to 8)** are the interesting case. Each pixel of
such a mode is either a 3-tap value, a 2-tap value or a plain copy
(horizontal-up, lower right). Different pixels often share the same filter
value. `l4_plan_pkg` holds, for each mode and half, a fixed table that says:

- which unit gets which samples (4-bit sample index: 0 = corner, 1..8 = top
  A..H, 9..12 = left 0..3);
- which unit results are written to which register;
- where each of the eight output pixels comes from: a unit, a register or a
  sample.

The table is built by one rule:

1. List the distinct filter values that half of the block needs.
2. Give 2-tap values to the `ccu2` units first, then to `ccu4` units fed
   `(p, p, q, q)`. Give 3-tap values to `ccu4` units fed `(p, q, q, r)`.
3. In cycle 0, store every value that cycle 1 also needs in a register.
4. In cycle 1, read those values from the registers instead of computing them
   again.

Horizontal-down shows the gain. Row by row, the block is:

```
a b c d
e f a b
g h e f
i j g h
```

- Cycle 0 computes the eight values a, b, e, f, g, h, i, j. It keeps the six
  that columns 2 and 3 repeat: a, b, e, f, g, h.
- Cycle 1 computes only c and d.

The other modes need between 5 and 8 units in cycle 0, and between 0 and 4 in
cycle 1. The `reuse` output flags a group that read a register.

## Luma 16x16 and chroma

These blocks leave as columns of eight rows:

- pixel `k` is at `(x, y + k)`;
- the 16x16 block goes column by column, upper half then lower half (32
  groups);
- a chroma block takes 8 groups.

### DC

DC is built from partial sums of four samples. Each `ccu4` adds its own +2.
Those surplus rounding constants are removed by feeding a negative constant
(-2, -4 or -6) as one operand of the unit that adds the partial sums together.

- **16x16 DC** takes four preparation cycles: eight sums of four, then two of
  sixteen, then the final value.
- **Chroma DC** takes two. The four 4x4 sub-blocks each get their own DC, with
  the H.264 rule for which edges each one uses.

When neither edge is available the DC value is 128.

### Plane mode

`plane_prep` forms the gradients H and V. From them it forms:

```
t1 = 16 * (p[-1, N-1] + p[N-1, -1])
t2 = (k*H + 32) >> 6
t3 = (k*V + 32) >> 6
```

with k = 5 and N = 16 for luma, and k = 34 and N = 8 for chroma. Each pixel is
then `clip((t1 + t2*(x-c) + t3*(y-c) + 16) >> 5)`, with c = 7 for luma and 3
for chroma.

The plane mode needs two preparation cycles. They store t1, t2, t3 and the
multiples 3, 5, 6 and 7 of t3 in the seven registers. The multiples 2, 4 and
8 are shifts. As a result, `t3*(y-c)` for any row is a register read or a
shift, and never a multiplication.

Output goes one column per cycle, so every pixel of a group shares the single
product `t2*(x-c)`. That is the circuit's only general multiplier. The eight
pixels of a column are split between the two unit types:

- 5 x `ccu4(t1, t2(x-c), t3(y-c), 14)` with alpha = 5;
- 3 x `ccu2(t1 + t2(x-c) + 15, t3(y-c))` with beta = 5.

Both equal `(t1 + t2(x-c) + t3(y-c) + 16) >> 5`. The result is clipped to
0..255.

## Neighbouring samples buffer (NSB)

The NSB holds every reference pixel the current macroblock still needs. The
line SRAM is therefore read in four cycles at the start of a macroblock and
written in two at its end. Luma storage:

| name | words | content |
|---|---|---|
| `T[0..15]` | 16 | upper reference row; each reconstructed 4x4 block (or 16x16 column) overwrites its columns with its bottom row, so `T` always holds the upper neighbours of the next block in z-scan order |
| `L[0..15]` | 16 | left reference column; holds the previous macroblock's right column, then is overwritten by each block's right column |
| `TR[0..3]` | 4 | the four pixels above-right of the macroblock |
| `S` | 1 | upper-left corner of the macroblock |
| next corner | 1 | the corner of the next macroblock |
| `CT[0..2]` | 3 | corners of 4x4 blocks 1, 4, 5, copied from `T` before reconstruction overwrites them |
| `CL[0..2]` | 3 | corners of 4x4 blocks 2, 8, 10, copied from `L` |
| `CX[0..8]` | 9 | the bottom-right pixel of each interior block, which is the corner of its lower-right neighbour |

Cb and Cr each have 8 upper words, 8 left words, a corner and a next corner.

The **above-right samples** E..H of a 4x4 block follow the H.264 rules:

- In the top row of blocks: they come from `T` for blocks 0..2, and from `TR`
  (if the macroblock above-right exists) for block 3.
- Below the top row: they are available only if the block above-right was
  decoded earlier in z-scan order. Otherwise, as when they are outside the
  picture, they are replaced by copies of sample D.

## Syntactic elements decoder (SED)

The SED turns `prev_intra4x4_pred_mode_flag` and `rem_intra4x4_pred_mode` into
the mode of each 4x4 block:

1. The predicted mode is the smaller of the modes of the left and upper
   neighbouring blocks.
2. It is DC if either neighbour is outside the picture. An Intra_16x16
   neighbour counts as DC.
3. If the flag is set, the block uses the predicted mode. Otherwise it uses
   `rem` when `rem` is below the predicted mode, and `rem + 1` otherwise.

Storage:

- the sixteen modes of the current macroblock;
- the right column of the macroblock to the left;
- a line buffer with the bottom-row modes of every macroblock of the row above
  (`MB_COLS` x 16 bits).

## Controller and timing

Per macroblock the controller runs these states:

| state | cycles | work |
|---|---|---|
| IDLE | — | `mb_valid`/`mb_ready` handshake; the SED captures the syntax |
| LOAD | 4 | line SRAM words into the NSB: Y low, Y high, Y above-right, then Cb/Cr |
| LUMA | — | sixteen 4x4 jobs in z-scan order, or one 16x16 job |
| CB, CR | — | one chroma job each |
| DRAIN | — | wait for the last reconstructed groups |
| WB | 2 | the bottom rows go back to the line SRAMs; the SED files the edge modes |
| `mb_done` | — | pulse at the end of the macroblock |

A 4x4 block needs the reconstructed pixels of the block before it. The
controller therefore keeps a count of predicted groups that have not yet come
back on `rec_*`. A 4x4 job starts only when that count will be zero at the end
of the current cycle. Until then `stall` is high, and `pred_valid` stays low.

Two pieces make back-to-back blocks possible:

- **NSB bypass.** The NSB answers neighbour queries from its registers with
  this cycle's `rec_*` group already applied. The next block can therefore
  start in the very cycle the previous block's last group comes back.
- **PSP restart.** The PSP accepts a new `start` in the cycle of `grp_last`.

The controller keeps two block indices:

- `blk`: the block being queried and started;
- `pblk`: the block whose groups are leaving. This one sets `pred_x` and
  `pred_y`.

If reconstructed pixels come back in the cycle they were predicted, each 4x4
block takes two cycles (three for DC). A macroblock then takes:

| part | cycles |
|---|---|
| handshake, LOAD and the first start | 1 + 4 + 1 |
| luma output (sixteen 4x4 blocks, or one 16x16 block) | 32 |
| extra for each 4x4 DC block | +1 |
| extra for 16x16 DC or plane preparation | +4 or +2 |
| each chroma block | 9 to 11 |
| DRAIN and WB | 3 |
| **total** | **59 to 79** |

The largest count seen over a whole random 1920x1088 picture was 69.
1920x1088 at 60 frames/s is 489,600 macroblocks/s. At 79 cycles each, that
needs 38.7 M cycles/s.

## Interface of `intra_pred_top`

All signals are synchronous to `clk`. Reset is synchronous and active low
(`rst_n`).

| port | dir | width | meaning |
|---|---|---|---|
| `mb_valid` / `mb_ready` | in / out | 1 | one macroblock's syntax is transferred when both are high |
| `mb_i4` | in | 1 | Intra_4x4 (1) or Intra_16x16 (0) |
| `mb_prev_flag` | in | 16 | `prev_intra4x4_pred_mode_flag` per 4x4 block, z-scan order |
| `mb_rem` | in | 16 x 3 | `rem_intra4x4_pred_mode` per 4x4 block |
| `mb_i16_mode`, `mb_chroma_mode` | in | 2, 2 | H.264 mode numbers (chroma: 0 DC, 1 H, 2 V, 3 plane) |
| `pred_valid` | out | 1 | a group of eight predicted pixels |
| `pred_comp` | out | 2 | Y, Cb, Cr |
| `pred_x`, `pred_y` | out | 4, 4 | position of pixel 0 inside the 16x16 or 8x8 block |
| `pred_pix` | out | 8 x 8 | the pixels, in the group shapes described above |
| `rec_valid`, `rec_comp`, `rec_x`, `rec_y`, `rec_pix` | in | same | the reconstructed group |
| `mb_done` | out | 1 | the macroblock is finished |

Rules for `rec_*`:

- Each predicted group must come back, in prediction order, with the same
  shape. It may arrive in the same cycle as `pred_valid` or any time later.
- Macroblocks arrive in raster order, starting at the top-left of the picture.
- Every macroblock is intra coded. The residual path (inverse transform and
  addition) is outside this circuit.

Parameters: `MB_COLS` = 120 and `MB_ROWS` = 68, the picture size in
macroblocks (1920x1088).

## Where this design departs from its source architecture

The architecture (four blocks, five plus three common units, seven 14-bit
registers, the HD target and the 3.75 Kbyte SRAM) is followed. These points
are different, or were filled in here:

- **Cycles per macroblock.** Two cycles per 4x4 block, as in the original.
  The macroblock total is at most 79 cycles, against 112 reported for the
  original. This assumes the reconstruction path returns each group at once.
  A 4x4 DC block takes one cycle more.
- **Throughput.** Eight pixels per cycle. A figure of sixteen pixels per
  cycle also appears in the description; it is not consistent with two
  cycles per 4x4 block and was not followed.
- **NSB size.** The original manages with 42 luma words by sharing corner
  words. This NSB uses 53: the above-right pixels, the corner copies and the
  next corner have words of their own.
- **Horizontal-down reuse.** The values reused in cycle 1 are a, b, e, f, g,
  h, as the block layout demands. One list in the description names c
  instead of e.
- **Memory transfers.** In the original, the line SRAM and the internal
  buffer are filled while prediction runs. Here, loading (4 cycles) and
  write-back (2 cycles) are separate phases of each macroblock. They cost 6
  of the 59 to 79 cycles. Overlapping them would need the next macroblock's syntax
  early, and the NSB's upper row in two places at once.
- **SRAM placement.** The two line SRAMs sit outside the original predictor.
  Here they are instantiated inside `intra_pred_top`, so the top is complete
  by itself.
- **Chosen here:**
  - the chroma plane equations, the SED derivation and the availability
    rules (taken from H.264);
  - the signed 16-bit operand width;
  - the group shapes and output order;
  - the DC preparation schedules;
  - the plane-mode split between unit types;
  - the SRAM word width (8 pixels) and line organisation;
  - the handshakes.
- **Not implemented:** constrained intra prediction and any mixing with inter
  macroblocks.
- `line_sram` is an array. A real chip would use an SRAM macro in its place.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `tb/intra_ref_pkg.sv` is an independent
reference model of all 17 modes.

| testbench | what it runs |
|---|---|
| `tb_intra_pred_top` | 4x3 macroblocks, three pictures, random modes and residuals, and random delays on the reconstructed groups. Every mechanism must occur: stall, register reuse, above-right substitution, all 17 modes, and DC with and without neighbours. Checks that an Intra_4x4 macroblock never takes more than 112 cycles. |
| `tb_psp` | every mode of every block size with random samples and availability, the cycle count of each job, and chains of 4x4 jobs that must run back to back |
| `tb_intra_pred_full` | one whole 1920x1088 picture at the default parameters (about 3 million checks) |

Example:

```
verilator --binary --timing -y rtl -y tb \
  rtl/intra_pkg.sv rtl/l4_plan_pkg.sv tb/intra_ref_pkg.sv \
  tb/tb_intra_pred_top.sv --top-module tb_intra_pred_top
./obj_dir/Vtb_intra_pred_top
```

Use the same command for a unit testbench: replace the last file and the top
module (for example `tb/tb_psp.sv`, `tb_psp`).

## Changing the design

- **Picture size.** Set `MB_COLS` and `MB_ROWS`. The line SRAM depth follows
  `2 * MB_COLS` words.
- **4x4 allocation table.** `l4_plan_pkg` is the table described under "Luma
  4x4". To change it, re-derive it with the rule given there. The `psp`
  testbench checks every mode against the reference model.
