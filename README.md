# Word-level JPEG2000 encoder core without code-block memory

A JPEG2000 encoder usually has two large buffers. One is a tile memory in
front of the wavelet transform. The other is a code-block memory between the
transform and the bit-plane coder (EBCOT). The second one exists because the
transform produces whole coefficients (words) in its own order, while the
coder wants one bit-plane at a time in stripe order.

This core removes the code-block memory with two choices:

1. **The DWT produces data in the coder's order.** The tile is read in
   stripes of 8 pixel rows, one column at a time. After one level of the 5/3
   transform, each pair of input columns gives one 4-sample column of each
   sub-band (LL, HL, LH, HH). A 4-sample column is exactly one stripe column
   of a JPEG2000 code-block, so every coefficient goes straight into the
   entropy coder.
2. **The entropy coder works on words.** It codes all ten magnitude
   bit-planes of all four sub-band code-blocks at once. Each sample is coded
   as soon as its column arrives. The coder skips the parts of bit-planes
   that hold nothing to code, so it does not waste cycles on the leading zero
   planes it cannot know about in advance.

A dynamic rate-distortion stage watches the coder. It predicts which
low-order bit-planes will be thrown away at the chosen rate and stops coding
them early.

```
 pixels (8-row stripe column + 1 annexed pixel)
   |
   v
 cb_dwt ──────────────── LL column ──> to external sub-band memory (next level)
   | LL/HL/LH/HH stripe columns (4 samples each)
   v  to_coef (sign-magnitude, 10-bit magnitude)
 cs_aebc
   gozs ──packages──> zs_lane x3 ──CW──> tscf x3 ──pairs──> pisob x3 ──> psae x3 ──> code bytes
    |                     |                                              (per lane)
    └── dropped ──> scae <┘ skipped                                          |
   ^ kill                                                                    |
   └──────────── drdo <── newly significant samples, code bytes ─────────────┘
```

## Scan order and the two line buffers of the DWT

`cb_dwt` reads a TW x TH tile (default 128 x 128), stripe by stripe. Within
a stripe it reads left to right, one column per accepted cycle. A column is
the 8 pixels of the stripe plus the first pixel of the same column in the
next stripe (the *annexed* pixel). The annexed pixel completes the last
high-pass value of the stripe without waiting for the next stripe.

* **Vertical step (`dwt53_vert`).** This is pure combinational lifting of the
  nine pixels. The update step of the first low-pass row needs the last
  high-pass value of the previous stripe. That value is kept in a line buffer
  with one entry per tile column. At the top of the tile the value is mirrored
  (d[-1] = d[0]). At the bottom the annexed pixel is replaced by x6
  (x8 = x6).
* **Horizontal step (`dwt53_horz`).** The 4 low and 4 high rows are
  transformed along the row at the same time. Each row has one register set:
  the last even sample, the last odd sample and the previous high-pass value.
  That makes eight register sets in all. An output is produced on every even
  column after the first and on the last column, where the right edge is
  mirrored.

Rows 0-3 of the horizontal output are LL (low) and HL (high). Rows 4-7 are
LH (low) and HH (high). This is the sub-band switch. The lifting is the
reversible integer 5/3 filter:

```
d[n] = x[2n+1] - floor((x[2n] + x[2n+2]) / 2)
s[n] = x[2n]   + floor((d[n-1] + d[n] + 2) / 4)
```

The rate is one 8-pixel column per cycle, as long as the coder keeps up. That
gives one 4-coefficient column of each sub-band every two cycles. The LL
column is also brought out (`ll_valid`, `ll_col`), to be stored for the next
decomposition level.

## CS-AEBC: coding every bit-plane at once

### Significance without a code-block memory

In JPEG2000 a sample at bit-plane k is coded in one of three passes:

* **significance propagation (SPP)**: not yet significant, but has a
  significant neighbour;
* **magnitude refinement (MRP)**: already significant;
* **cleanup (CUP)**: everything else.

In this design "significant before plane k" means "has a 1 in a bit-plane
above k". Neighbours are judged the same way. With that definition every
(sample, plane) decision depends only on the coefficient words around the
sample. All ten planes can therefore be coded in the same pass over the data.

A decoder can repeat these decisions, because it decodes plane k only after
all higher planes. Stripes are *vertically causal*: a sample's neighbours in
the next stripe count as insignificant, because they have not arrived yet.
For the neighbours in the stripe above, `gozs` keeps a stripe line buffer with
one entry per code-block column. Each entry holds the MSB position and the
sign of the bottom sample. Significance grows monotonically towards the LSB,
so the MSB position gives that sample's significance at every plane.

### Context windows, packages, GoZS and ZS

`gozs` keeps three columns per code-block (left, centre, right). When a
column arrives, the previous one becomes the centre and can be coded.

* A **context window (CW)** is two vertically adjacent samples of one
  bit-plane of one code-block. It carries, per sample:
  * the bit, significance and refined-before flags;
  * the sign;
  * the counts of significant horizontal, vertical and diagonal neighbours;
  * the clipped horizontal and vertical sign sums.
* A CW is **insignificant** when both samples are insignificant, have no
  significant neighbour and have a 0 in that plane. Coding it would only emit
  zero decisions in the all-zero context. A CW is also insignificant when the
  RDO has truncated its plane.
* A **package** holds the three CWs of planes 3g, 3g+1 and 3g+2 of the same
  code-block and column half. These are the windows that the three
  context-formation circuits take together. A centre column gives 4
  code-blocks x 2 halves x 4 plane groups = 32 packages.
* **Group-of-zero skipping (GoZS).** A package whose CWs are all
  insignificant is dropped outright. The surviving packages go out one per
  cycle.
* **Zero skipping (ZS, `zs_lane`).** Lane j receives the CW of plane 3g+j
  of each package. The lane FIFO keeps only the significant CWs. An
  insignificant CW therefore leaves a gap that the next package's CW fills.
  A package moves only when all three lanes have room. Otherwise GoZS stalls,
  and so do the DWT and the pixel input behind it.

After the last column of the four code-blocks, a flush package closes every
lane.

### Context formation and serialisation

`tscf` turns one CW into up to four pass/context/decision pairs, two per
sample, using the JPEG2000 tables:

* zero coding, contexts 0-8, with a different table for LL/LH, HL and HH;
* sign coding, contexts 9-13, with the XOR bit;
* refinement, contexts 14-16.

A sample that becomes significant gets its sign pair right after it.
Run-length coding is not used. `pisob` holds one group of pairs and hands them
to the encoder in coding order, one per cycle, with no bubble between full
groups.

### Folding arithmetic encoder

Every (code-block, bit-plane) pair has its own MQ code stream: 4 x 10 = 40
streams. The three passes of a plane share the stream but use separate context
tables (pass switching). That is 3 x 19 contexts x 7 bits = 399 bits of
probability state per plane.

Lane j serves the planes with k mod 3 = j, so the three encoders never touch
the same stream. Each `psae` holds a register bank of the coder registers (A,
C, CT, the held byte) and the context states of its streams. Each cycle it
does the following for one pair:

1. read the stream's state;
2. do the complete MQ step (encoding, renormalisation, byte-out with bit
   stuffing), releasing up to two bytes;
3. write the state back.

The flush pair terminates every stream that coded something, one per cycle
with up to three bytes, and resets the bank. A byte leaves tagged with its
code-block (`out_blk`) and plane (`out_plane`). `out_eos` marks a stream's
final bytes.

`scae` counts, per stream, the CWs that GoZS and ZS skipped. The counts are
valid when `cb_done` pulses.

## Dynamic RDO

Rate and distortion of a plane are normally known only after the whole
code-block has been coded. So a conventional encoder stores all code bytes
before it chooses the truncation points. `drdo` estimates them while coding.
After every stripe it evaluates each (code-block, plane), one per cycle:

```
D_hat = (newly significant samples so far) * 2^k + (stripes left) * 2^(K-k)
R_hat = bytes so far + (stripes left) * (bytes per stripe so far) * p
```

K is the number of significant planes seen so far. p is the protection ratio,
with 4 fractional bits. A plane is invalid when D_hat / R_hat is below the
target slope. The comparison is done by cross-multiplying, without division.
An invalid plane is killed together with all lower planes of that
code-block, and GoZS drops their windows for the rest of the code-blocks.
`trunc[b]` reports the number of truncated planes. With `rdo_enable = 0` the
core is lossless.

## Interface of `jp2k_encoder`

| port | dir | meaning |
|---|---|---|
| `pix_valid/pix_ready`, `pix_col[8:0]` | in | one stripe column: 8 level-shifted pixels plus the annexed pixel (ignored in the last stripe); 16-bit two's complement |
| `rdo_enable`, `rdo_lambda[15:0]`, `rdo_prot[7:0]` | in | RDO on/off, target slope, protection ratio p (Q4) |
| `ll_valid`, `ll_col[3:0]` | out | LL stripe column for the external sub-band memory |
| `out_n[j]`, `out_byte[j][0..2]`, `out_blk[j]`, `out_plane[j]`, `out_eos[j]` | out | code bytes of lane j (the first `out_n` bytes are valid) |
| `trunc[b]` | out | truncation point per sub-band |
| `skip_count[b][k]` | out | skipped context windows per stream, valid at `cb_done` |
| `cb_done` | out | pulse: all streams of the tile flushed |
| `ev_gozs_drop`, `ev_zs_skip`, `ev_stall`, `ev_truncate` | out | activity of the four mechanisms, for observation |

The clock is `clk` and the reset is the asynchronous, active-low `rst_n`. A
tile is complete after TW x TH / 8 accepted columns. Send the next tile only
after `cb_done`. The flush takes 16 cycles per lane after the last column has
been coded.

## Parameters

| parameter | default | where |
|---|---|---|
| `TW`, `TH` | 128, 128 | tile size. It gives four (TW/2) x (TH/2) code-blocks, so 64 x 64 by default. TW must be even and TH a multiple of 16 |
| `DW` | 16 | DWT sample width |
| `NBP`, `MAGW` | 10 | magnitude bit-planes (`jp2k_pkg`) |
| `DEPTH` (zs_lane) | 4 | ZS FIFO depth |
| `MIN_STRIPES` (drdo) | 2 | stripes coded before the RDO may truncate |

## Where this design departs from the architecture it implements

* **Significance within a plane.** Significance comes from the higher planes
  only. A sample that becomes significant earlier in the same plane does not
  make its neighbours SPP members. This is what makes the planes independent,
  but it differs from standard EBCOT. **The code streams are not
  JPEG2000-conformant**; a decoder must use the same rule.
* **Skipping needs side information.** A skipped window's symbols are not in
  the code stream. The core counts the skipped windows but does not encode
  which windows were skipped. The architecture feeds this information to a
  single-context arithmetic coder, whose coding is not specified, and that
  coder is not built.
* **No run-length mode** in the cleanup pass, because two-sample windows
  cannot form a 4-sample run.
* **One 128-wide region.** The horizontal continuity between 128-wide regions
  of larger tiles uses a line buffer in external memory. That buffer is not
  modelled, so a wider tile needs a larger `TW` (and gets wider code-blocks).
* **Quantisation** uses a unit step (lossless path). Magnitudes are
  saturated to 10 bits.
* **Lanes.** Streams are split between the encoders by plane mod 3. The
  original arrangement stores the variables of the last two planes of each
  code-block separately instead.
* **Encoder rate.** Each of the three encoders codes one pair per cycle. A
  window can give up to four pairs (two samples, each possibly with a sign).
  So in busy areas the encoders, not GoZS, set the rate, and GoZS stalls
  while they catch up.
* **RDO units.** The distortion and rate units, the per-stripe evaluation
  and the division-free test are this design's own reading of the slope
  estimate.
* **Storage.**
  * The DWT keeps 128 x 16 bits of line buffer plus 8 x 3 x 16 bits of row
    registers, against about 2.3 kbit in the original.
  * Each of the three encoder banks holds 16 streams x (399 + 57) bits, which
    is more than the original's 1.75 KB, because every stream has its own
    registers.
  * The GoZS line buffer stores 5 bits per column (MSB position and sign)
    against 6 in the original.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The references are in `tb/tb_ref_pkg.sv`:

* a floating-point-floor 5/3 DWT of whole tiles;
* an MQ encoder written in byte-buffer style;
* a context model over whole code-block arrays.

| testbench | what it shows |
|---|---|
| `tb_dwt53_vert`, `tb_dwt53_horz`, `tb_cb_dwt` | exact sub-band values, tags, edges and stripe continuity; one output per two columns |
| `tb_gozs` | every package's content, the dropped packages, stripe/end/flush handling, with truncated planes and a stalling receiver |
| `tb_zs_lane`, `tb_pisob` | order, skipping and back-pressure; one pair per cycle |
| `tb_tscf` | 20 000 random windows against the context tables |
| `tb_psae` | interleaved streams, byte-exact against the MQ model; one pair per cycle, 16-cycle flush |
| `tb_scae`, `tb_drdo` | counts; truncation decisions against a software evaluation |
| `tb_cs_aebc` | three groups of 8 x 8 code-blocks: every stream byte-exact, skip counts, drops, skips and stalls |
| `tb_jp2k_encoder` | 32 x 32 tiles end to end: LL, all 40 streams byte-exact, then an RDO tile that must truncate and shrink |
| `tb_jp2k_encoder_full` | the same at the default 128 x 128 tile: 8995 code bytes match the reference, and all four mechanisms occur |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/jp2k_pkg.sv tb/tb_ref_pkg.sv tb/tb_jp2k_encoder_full.sv \
    --top-module tb_jp2k_encoder_full -o sim && obj_dir/sim
```

## Files

* `rtl/jp2k_pkg.sv` holds the sizes, the context-window and pair records, the
  MQ table and the MQ step functions.
* `rtl/` also holds one module per file:
  * `dwt53_vert`, `dwt53_horz` and `cb_dwt` (the DWT);
  * `gozs`, `zs_lane`, `tscf`, `pisob`, `psae`, `scae` and `cs_aebc` (the
    entropy coder);
  * `drdo` (the RDO);
  * `jp2k_encoder` (the top).
