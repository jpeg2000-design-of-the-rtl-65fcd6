# Pass-parallel context formation codec for JPEG2000

JPEG2000 entropy-codes each code-block of wavelet coefficients bit-plane by
bit-plane. In each bit-plane the classic (EBCOT tier-1) coder scans the block
three times, once per coding pass:

1. significance propagation,
2. magnitude refinement,
3. cleanup.

It emits a context label and a binary decision for each sample that belongs to
the current pass. A plain implementation spends one cycle per sample per pass,
and most of those cycles find nothing to code. It also needs a "coded" state
bit per sample just to remember which pass already handled a sample.

This design is a context formation (CF) codec for one code-block of up to
32x32 samples. It encodes, turning coefficients into context/decision pairs for
an arithmetic coder, and it decodes, turning decisions from an arithmetic
decoder back into coefficients. It combines three ideas:

- **Column-based operation.** The block is processed one stripe column (four
  vertical samples) at a time, out of a five-column register window.
- **Sample skipping.** The four samples of a column are checked in parallel,
  and only the ones that belong to a pass are visited: one cycle per coded
  pair, plus one check cycle per column.
- **Pass parallelism.** The three passes of a bit-plane run at the same time on
  different columns of the window. Pass 3 runs two columns behind passes 1 and
  2. Two significance bits per sample (sigma0, sigma1) replace the
  significance, refinement and coded states, so each sample needs only a
  1024x2 significance memory besides the coefficients.

The output is exactly what a serial coder in *vertical causal* mode produces:
samples of the next stripe always count as insignificant. Each pass has its own
output channel. Concatenating the pass-1, pass-2 and pass-3 streams of a
bit-plane gives the standard order.

## Block structure

```
             coefficient memory (external, 1024 x 9: sign + 8 magnitude bits)
                 ^  |                                   ^
          CMW    |  | RG reads                          | RG reads
        (decode) |  v                                   |
   +-------------+--------+      +-----------+     +----+-----+
   | cf_cmw    cf_smw     |<-----|  cf_ctrl  |---->| cf_rg    |
   +----+---------+-------+      +-----------+     +----+-----+
        |         | writes                              | push
        |         v                                     v
        |    cf_ra2sd (1024 x 2: sigma0, sigma1)   F1/F2 ping-pong
        |                                               |
        |   cf_col_regs:  A <- B <- C <- D <- E <-------+
        |                 |    |         |
        +-----------------+    |         +-- cf_p1m (pass 1), cf_p2m (pass 2, encoding)
                   SMW/CMW     +-- cf_p3m (pass 3), cf_p2m (pass 2, decoding)
```

| module | role |
|---|---|
| `cf_codec` | top: wires everything, muxes pass 2 onto D (encode) or B (decode) |
| `cf_ctrl` | decides when the window shifts; owns `retired`, `busy`, `done`; memory-port priority |
| `cf_col_regs` | registers A..E plus the two-entry F buffer; applies pass updates |
| `cf_rg` | register data generator: reads memories in coding order and fills F |
| `cf_ra2sd` | 1024x2 significance memory (sigma0 in bit 0, sigma1 in bit 1) |
| `cf_smw` | writes changed significance states of the column leaving through A |
| `cf_cmw` | decoding only: read-modify-write of coefficient words of the column in A |
| `cf_p1m`, `cf_p2m`, `cf_p3m` | the three pass coding modules |
| `cf_nbc_index` | turns four "needs coding" flags into the list of rows to visit |
| `cf_zc`, `cf_sc`, `cf_mrc` | context tables: zero coding, sign coding, magnitude refinement |
| `cf_pkg` | shared types (`col_t` column record, `upd_t` state update) and neighbourhood helpers |

## How three passes run at once

This is the part that needs care. In the serial coder, pass 1 of a bit-plane
finishes over the whole block before pass 2 starts, and pass 2 before pass 3.
Here they overlap, so each pass must see the significance its serial
counterpart would have seen, even though the other passes have already changed
some of the states.

### The two significance bits

Each sample has two bits, `sigma0` and `sigma1`:

| sigma1 sigma0 | meaning |
|---|---|
| 0 0 | insignificant |
| 0 1 | became significant in pass 1, never refined |
| 1 0 | became significant in pass 3, never refined |
| 1 1 | refined at least once |

- Pass 1 sets `sigma0` when a sample becomes significant.
- Pass 3 sets `sigma1` when a sample becomes significant.
- Pass 2 sets both bits.

"First refinement", which picks magnitude-refinement context 14/15 versus 16,
is therefore `sigma0 XOR sigma1`. No separate refinement state is needed.

### Coded-state bookkeeping

Within one bit-plane a column is in the register window for all three passes.
So "coded in pass 1" (`p1c`) and "significant at the start of the bit-plane"
(`sp`) can live in the column registers only. They never go to memory, which
removes the coded-state memory altogether.

- `sp` is taken from memory when the column is loaded.
- `p1c` is set by pass 1.
- Pass 3 codes the rows with neither `sp` nor `p1c`.
- Pass 2 codes the rows with `sp`.

### What each pass sees

The neighbour significance a pass uses depends on where it sits in the window
and what the others have already done.

| pass | in-stripe neighbours significant if | sample above the stripe significant if |
|---|---|---|
| 1 (register D) | `sigma0 \| sigma1` | `sigma0` |
| 2, encoding (register D) | `sp \| mag` | `sigma0` |
| 2, decoding (register B) | `sp \| sigma0` | `sigma0` |
| 3 (register B) | `sigma0 \| sigma1` | `sigma0 \| sigma1` |

Why each row is right:

- **Pass 1.** In the stripe, the columns to its left and right have not yet
  been through pass 3, so every set bit there is a pass-1 result or an earlier
  bit-plane. The stripe above has already been through pass 3 of this
  bit-plane, but serial pass 1 would not see those results. Counting only
  `sigma0` above drops exactly the samples that became significant in this
  bit-plane's pass 3. Samples made significant by an earlier pass 3 have
  `sigma0` set by then, because they were refined by pass 2 of the stripe
  above.
- **Pass 2, encoding.** Serial pass 2 sees all of pass 1, including columns to
  the right that pass 1 has not reached yet. Any insignificant neighbour of a
  pass-2 sample has a significant neighbour (the pass-2 sample itself), so it
  is certainly coded in pass 1. It becomes significant exactly when its
  magnitude bit is 1. So `sp | mag` predicts pass 1 exactly, and pass 2 can run
  in step with pass 1 on register D.
- **Pass 2, decoding.** The magnitude bits are not known in advance, so pass 2
  moves back to register B next to pass 3. By then pass 1 has finished with the
  whole neighbourhood, and `sigma0` shows its results.
- **Pass 3.** Pass 3 sees everything done so far: the current states.

### Vertical causal mode

The row below a stripe always counts as insignificant. This is what lets a
column be coded completely before the next stripe is loaded.

### Pass-3 lag and the separator columns

Pass 3 lags passes 1 and 2 by two columns, so:

- Its left neighbour (A) has finished all three passes.
- Its right neighbour (C) has finished pass 1 only, as in the serial order.

After the last column of a stripe the generator inserts one empty column. This
keeps the last column of one stripe and the first column of the next from
seeing each other as neighbours.

## Column pipeline and the ordering rule

The window shifts left (E->D->C->B->A) in the cycle when every module working
on it reports done:

- pass 1 and pass 2 on D;
- pass 3 (and pass 2 while decoding) on B;
- SMW and CMW on A.

E then takes the oldest column from F1/F2. If F is empty, E takes an empty
column. While the window is being coded, the register data generator (RG)
reads the next columns into F.

RG reads each column in up to five memory cycles, both memories at the same
address:

- the sample above the stripe (from the second stripe on);
- then the stripe rows that exist.

In the first coded bit-plane it forces the stripe rows' significance to zero,
so the significance memory never has to be cleared.

A column needs the final state of the sample above it. That sample belongs to
the same column one stripe earlier, so RG may load slot *k* only after slot
*k - (width + 1)* has left register A. Slots are counted with the separators
included. Before that point, SMW has not yet written the sample back.

For blocks at least six columns wide this never costs anything. For narrower
blocks RG stalls (`blocked`). The controller then keeps shifting empty columns
in, so the stripe above can drain through A. The 8-row examples with 7, 6 and
5 columns show the normal and stalled cases.

## Sample skipping inside a pass module

Each pass module keeps a row pointer into its column. Every cycle it:

1. Recomputes the four "needs coding" (NBC) flags from the live registers.
2. Masks off rows above the pointer.
3. Feeds the flags to `cf_nbc_index`, which returns the first flagged row.

Recomputing the flags each cycle matters for decoding. There a decoded 1 can
make the rows below it join pass 1 or pass 3, which cannot be known in
advance.

- A row costs one cycle per pair it emits: zero coding plus sign coding when it
  becomes significant.
- The column ends with one check cycle that finds no flag left. A column with
  *n* pairs therefore takes *n + 1* cycles, and an empty column takes 1.

### Run-length and uniform coding in pass 3

Run-length coding applies when all of these hold for a full-height column:

- all four rows belong to pass 3;
- no row has a significant neighbour;
- no row is significant.

Pass 3 then emits context 17 with "some bit is 1". If the bit is 1, it emits
two context-18 (uniform) pairs holding the position of the first 1 row, most
significant bit first, then that row's sign. Coding continues with the rows
below it.

### Memory write-back

- **SMW** writes `{sigma1, sigma0}` of every row whose state changed in this
  bit-plane, one row per cycle, using the same flag-to-index converter. In the
  first bit-plane it writes all rows, since RG ignored the old contents.
  Significance writes have priority over RG reads.
- **CMW**, while decoding, rewrites the coefficient word of each row whose
  decoded bit is 1. It reads the word, sets bit `bp` and the sign, and writes
  it back: two port cycles per row, with priority over RG.

## Interface and timing (`cf_codec`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse; the inputs below must stay stable until `done` |
| `dec` | in | 1 | 0 encode, 1 decode |
| `band` | in | 2 | 0 LL/LH, 1 HL, 2 HH (zero-coding table) |
| `cb_w`, `cb_h` | in | 6 | code-block width and height, 1..32 |
| `num_bp` | in | 4 | bit-planes to code, 1..8, counted from the most significant non-zero one |
| `busy`, `done` | out | 1 | operation running; one-cycle pulse at the end |
| `coef_addr`, `coef_we`, `coef_wdata`, `coef_rdata` | out/in | 10, 1, 9, 9 | external coefficient memory, address row*32+column, word {sign, magnitude[7:0]}, read data one cycle after the address |
| `pN_cx_valid`, `pN_cx`, `pN_d` | out | 1, 5, 1 | pass N channel: a context (and, when encoding, the decision) is offered |
| `pN_ack`, `pN_d_in` | in | 1, 1 | pair taken; when decoding, `pN_d_in` carries the decision in the same cycle |

Channel rules:

- `cx_valid`, `cx` and `d` hold until `ack`.
- A pass may present its next pair in the cycle after an `ack`.
- The three channels are independent: the arithmetic coder side decides how to
  serialise them. For a standard code-stream, take pass 1, then 2, then 3 of
  each bit-plane.
- Decoding needs the coefficient memory cleared before `start`. Afterwards it
  holds the decoded sign-magnitude coefficients.

Sizes are set in `cf_pkg`: `CB_MAX = 32` (code-block side), `MAG_BITS = 8`
(magnitude bits). `cf_ra2sd` has `DEPTH = 1024` and `WIDTH = 2`.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`.

- `tb_cf_codec` is the end-to-end test at full size. A serial reference coder
  (`tb_cf_ref_pkg`, written independently of the RTL with the classic three
  states) produces the expected pair streams. The testbench checks them:
  - for blocks from 1x1 to 32x32, all three orientations and 1 to 8
    bit-planes;
  - with random acknowledge delays;
  - by decoding each block again from the reference decisions and comparing the
    memory with the original coefficients.

  It also counts every mechanism and fails if one never occurs: sample
  skipping, run-length 0 and 1, uniform coding, generator stall, empty-column
  shift, full F buffer, CMW write, back-pressure, and decoding-side pass 2. It
  checks the encode cycle count against a per-column bound.
- `tb_cf_p1m`, `tb_cf_p2m`, `tb_cf_p3m` compare each pass module on random
  three-column windows with column-level models (`tb_cf_col_pkg`). With
  immediate acknowledge they check that a column with *n* pairs takes *n + 1*
  cycles.
- Each pass module also carries an immediate assertion on its channel: a pair
  that was offered and not acknowledged must be offered again, unchanged, in
  the next cycle. A pass's context depends on neighbour columns that other
  passes are updating at the same time. So this assertion is the direct check
  that the passes never disturb each other's pending pair. With a deliberately
  wrong schedule (pass 2 decoding on the wrong column) it fires within a few
  blocks.
- The other testbenches check their module exhaustively (the context tables
  and the converter) or against behavioural models (memories, register
  pipeline, generator order and stall rule, write-back modules, controller).

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/cf_pkg.sv tb/tb_cf_ref_pkg.sv tb/tb_cf_col_pkg.sv rtl/*.sv tb/tb_cf_codec.sv \
  --top-module tb_cf_codec
./obj_dir/Vtb_cf_codec
```

For the other testbenches, replace the last file and the top module name.

## Performance

Measured in `tb_cf_codec` with immediate acknowledge:

| block | pairs | encode cycles | decode cycles |
|---|---|---|---|
| 32x32, 8 bit-planes, half of the coefficients zero | about 8,000 | about 14,200 | about 15,500 |
| 32x32, 8 bit-planes, 90% zero | about 6,500 | about 13,400 | about 14,000 |
| 8x7 / 8x6 / 8x5, 3 bit-planes | 110-190 | 270-365 | 280-395 |

The register data generator (RG) sets the pace. A column slot costs one cycle
per word read (up to five) plus one cycle to hand the finished column to F.
When F is empty and the ordering rule allows, the next slot starts in that
same cycle; otherwise RG waits at least one more cycle. That comes to about
6.7 cycles per slot. The coding passes usually finish their column sooner.

A 32x32 block with 8 bit-planes has 33 x 8 x 8 = 2112 slots (one separator per
stripe), so it needs about 13-14 k cycles, whatever the data. That is roughly
1.7 cycles per sample per bit-plane. Decoding adds CMW's two cycles per
decoded 1 bit.

The original chip encodes a 2304x1728 image in 0.323 s at 100 MHz, about
8 cycles per pixel over all bit-planes of a real image. That figure depends
on how many bit-planes real code-blocks carry. A dense 8-bit-plane block here
costs about 14 cycles per pixel.

## Where this design departs from the original

- **Memory reads per bit-plane.** Each sample is read once per bit-plane,
  plus the row above each stripe (1.25 reads per sample for full stripes).
  The original describes every word being read once per bit-plane.
- **Extra check cycle.** A column costs *n + 1* cycles for *n* coded pairs,
  not *n*. The last cycle confirms that no flagged row is left.
- **Interface is this design's own.** It has a separate valid/ack channel per
  pass and a `start`/`dec`/size/bit-plane command. The original does not
  specify its connection to the arithmetic coder.
- **Memory arrangement.**
  - The coefficient memory is outside the codec and must be cleared before
    decoding.
  - RG reads the significance and coefficient words of a row in the same
    cycle.
  - Significance write-back and CMW have priority.
- **Uniform coding follows the JPEG2000 standard.** The position of the first
  1 in a run-length column is sent as two bits, high bit first, so a first 1
  in the third row gives (1, 0).
- **Coefficient format.** Coefficients are sign-magnitude: bit 8 is the sign
  (1 negative), bits 7..0 the magnitude.
- **Caller's duties.** Finding the most significant non-zero bit-plane is left
  to the caller (`num_bp`). Only vertical causal mode is built.
- **Outside the codec.** The arithmetic coder, wavelet transform,
  rate-distortion stage, pads and scan chain are not part of this RTL.
