# Scalable (SVC) intra encoder with transform-domain mode pre-selection

This RTL encodes intra luma blocks for H.264/AVC Scalable Video Coding in
three quality layers at once. It produces a base layer (BL) and two
quality enhancement layers (EL1, EL2) from one prediction. The expensive part
of intra coding is trying all nine 4x4/8x8 prediction modes. The design
avoids most of that work with **TraDED** (transform-domain edge detection):

- The original block is transformed once.
- Groups of its coefficients are summed into *edge intensities*.
- Only the two to five modes that fit the dominant edge direction are tried.

The winner is coded in the base layer. The two enhancement layers then
re-quantize what the lower layers left over.

The architecture this is based on targets 135 MHz and 454 cycles per
macroblock (MB). That rate covers CIF + SD 480p + HD 1080p at 60 fps, with
two pictures encoded in parallel. This RTL has all the datapath units and
buffers of that architecture. Its controller runs one block at a time, not
the macroblock-level pipeline, so it is slower. The section
[What this RTL does not do](#what-this-rtl-does-not-do) gives the figures.

## TraDED: choosing candidate modes from the original block's transform

The 4x4 integer DCT (or the 8x8 one) of the *original* pixels is taken, not
of a residual. Its AC coefficients at position (i, j), row frequency i and
column frequency j, are grouped by direction:

| intensity | 4x4 coefficients summed (absolute values) | 8x8 |
|---|---|---|
| I_DC | (0,0) | (0,0) |
| I_V (vertical edges) | (0,1) (0,2) (0,3) | (0,1..5) |
| I_H (horizontal edges) | (1,0) (2,0) (3,0) | (1..5,0) |
| I_D (diagonal) | (1,1) (2,2) (3,3) | (k,k), k = 1..5 |
| I_DV | (i,j), 1 <= i < j <= 3 | 1 <= i < j <= 4 |
| I_DH | (i,j), 1 <= j < i <= 3 | 1 <= j < i <= 4 |

I_AC is the sum of all AC magnitudes, and SATD is I_AC + I_DC.
The rule is in `svc_pkg::traded_nxn`. Ratios are compared as products, so
there is no divider:

1. **DC.** DC is on if the block is on a picture boundary (a neighbour is
   missing) or if I_DC >= th_off * I_AC. th_off = 2.
2. **DC dominant.** If I_DC > th_dom * I_AC, only one AC mode is kept:
   vertical if I_V >= I_H, else horizontal. th_dom is 16 for 4x4 and 64
   for 8x8.
3. **Otherwise three AC modes are picked from the dominant direction:**
   - I_V is largest and I_V > 2 I_H: V, VR, VL (modes 0, 5, 7).
   - I_H is largest and I_H > 2 I_V: H, HD, HU (modes 1, 6, 8).
   - Otherwise DDL and DDR (3, 4), plus VR/VL if I_V + I_DV >= I_H + I_DH,
     else HD/HU.
4. **MPM.** If fewer than four AC modes are on, the most probable mode is
   added. If the MPM is DC, that means turning DC on.
5. **Availability.** Modes that need a missing neighbour are removed:
   - V, DDL and VL need the top neighbour.
   - H and HU need the left neighbour.
   - DDR, VR and HD need both.

The result is a 9-bit enable word. `mode_cand_gen` turns it into one
candidate per cycle, lowest mode number first.

The same idea serves intra 16x16 and chroma, on the Hadamard of the DC terms
(`mode416c`):

- **16x16.** DC is on at a boundary, or unless I_DC < 2 I_AC. One more mode
  is taken from the largest of I_V, I_H and I_D: vertical, horizontal or
  plane.
- **Chroma.** DC is always on. The largest intensity adds horizontal (1),
  vertical (2) or plane (3).

## Three quality layers from one prediction

Each layer uses its own QP, for example 34, 22 and 10. For the winning mode
with residual coefficients W:

```
BL : L0 = Q(W, qp0)                         S0 = DQ(L0, qp0)
EL1: L1 = Q(W  - norm(S0), qp1)             S1 = DQ(L1, qp1)
EL2: L2 = Q(W  - norm(S0 + S1), qp2)        S2 = DQ(L2, qp2)
recon_BL  = clip(pred + IT(S0))
recon_top = clip(pred + IT(S0 + S1 + S2))
```

`DQ` gives coefficients on the inverse-transform scale. `norm()`
(`qe_norm_sub`) brings them back to the forward-transform scale:
`(s * N + 32) >> 6`. N depends on the position class:

- 4x4: 16, 25, 20 for classes (even, even), (odd, odd) and mixed.
- 8x8: 64, 81, 25, 72, 40, 45 for the six 8x8 classes.

Quantization follows H.264 with flat scaling:

- qbits = 15 + QP/6 for 4x4 and 16 + QP/6 for 8x8.
- The intra rounding offset is 2^qbits / 3.
- Levels saturate at ±32767.

The scaled coefficients of each layer are kept in the layer buffers:
BL coefficients, BL scaled, EL scaled, pre-quantized, BL and EL
reconstruction.

## Datapath units

All units take a one-cycle `in_valid` strobe and give a registered
`out_valid`. All use an active-low asynchronous reset.

| unit | width | does | latency |
|---|---|---|---|
| `tran4dc` | 16 px | 4x4 DCT, 4x4 Hadamard (>>1), 2x2 Hadamard | 1 |
| `tran48` | 16 px | 8x8 DCT, two rows in per cycle, two columns out per cycle, through an 8x8 register whose orientation alternates per block; also 4x4 DCT | 8x8: 4 beats in, 4 out; 4x4: 2 |
| `costcal416c` | 16 | intensities of a 4x4, the 16-entry luma-DC set or the chroma DC set | 1 |
| `costcal4816` | 16 | intensities of a 4x4, or of an 8x8 accumulated over 4 beats | 1 / after beat 3 |
| `mode416c`, `mode48` | – | TraDED decisions above | 1 |
| `mode_cand_gen` | – | one enabled mode per cycle, `cand_last` on the last | 0 after load |
| `pg416c` | 16 px | the nine 4x4 modes; 16x16/chroma V/H | 1 |
| `pg4816` | 16 px | 8x8 prediction with H.264 reference pre-filtering, four 16-pixel slices per block; 4x4 modes; 8x8 DC from the filtered edge | 1 |
| `pg_dc` | – | DC value of a 4x4, 16x16 or chroma 4x4 piece | 1 |
| `pg_pls` + `pg_plane` | 16 px | plane parameters a, b, c, then 4x4 pieces of plane prediction | 1 + 1 |
| `resid_gen` | 16 px | original minus prediction | 1 |
| `quant8`, `dequant8` | 8 | (de)quantization with QP%6 / position-class tables | 1 |
| `qe_norm_sub` | 8 | normalization and subtraction | 1 |
| `itran` | 8 | inverse 4x4/8x8 transform and inverse Hadamards, two transposition banks (ping-pong) | 4x4: 2 beats in, 2 out |
| `recon8` | 8 px | prediction + residual, clipped | 1 |

`tran48` has one scheduling rule: a 4x4 block must not enter while an 8x8
block is being read out. An assertion checks this.

## Memories

All memories are plain synchronous arrays: `sp_ram` (single port, bit write
mask) and `dp_ram` (two ports). The sizes are the architecture's:

| memory | organisation |
|---|---|
| current MB (`cur_mb_buf`) | 96 x 64, two pictures. Split into two 48-word banks so that one cycle returns a whole 4x4 block or two 8-pixel rows. |
| neighbour pixels | 960 x 64, two MB rows of 1080p |
| neighbour modes | 240 x 16 |
| best-mode coefficients | dual port 128 x 152. Two halves: the candidate being tried writes one, the best so far sits in the other, and they swap when a candidate wins. |
| BL coefficients / BL scaled / BL recon | 128 x 128 / 128 x 136 / 128 x 64 |
| EL scaled / pre-quantized / EL recon | 96 x 136 / 96 x 136 / 96 x 64 |

Address map of the current-MB buffer:

- Luma word `{pic, blk8[1:0], b4row, half, b4col}` holds four pixels of two
  rows. Picture 0 is at words 0..31, picture 1 at 32..63.
- Chroma starts at 64: `64 + 16*pic + 8*(Cr) + {b4row, half, b4col}`.

## Top level: `svc_intra_enc`

Loading and commands:

- Load the two macroblocks through `ld_*` while idle.
- Issue one command per luma block (`cmd_*`). A command carries:
  - size (4x4 or 8x8), picture, position in the MB
  - neighbour pixels and their availability flags
  - the MPM
  - three QPs
  - the neighbour-RAM slots where the block's bottom row and best mode are
    written back

The sequencer then runs these phases:

1. **Analysis.** Read the block, transform it, compute intensities, get the
   candidate enable word (`cand_en`).
2. **Candidates.** For each candidate, one at a time:
   - predict
   - form the residual
   - forward transform
   - compute the SATD
   - store the coefficients in the free half of the best-coefficient RAM
   - keep the lowest SATD (ties go to the earlier, lower mode)
3. **Result.** `best_mode` and `best_cost` are reported with `mode_valid`.
4. **Layers.** BL, then EL1, then EL2 go through quantizer → dequantizer →
   normalization, subtracting the lower layers. Levels stream out on `lvl_*`:
   8 per beat, with layer and entry number.
5. **Reconstruction.** BL and top-layer reconstruction pass through `itran`
   and `recon8`, and stream out on `rec_*`. The bottom row of the BL
   reconstruction is written to the neighbour-pixel RAM.

Cycle counts, from an accepted command to `done`:

- 4x4: 41 + 6n, where n is the number of candidates.
- 8x8: 93 + 12n.

Two side paths use otherwise idle units while no block command is pending:

- **`a16_*`:** 16x16 / chroma mode decision from DC terms. The answer comes
  3 cycles later.
- **`pl_*`:** plane prediction of a 4x4 piece. The answer comes 2 cycles
  later.

## What this RTL does not do

- **Macroblock pipeline.** The target architecture has:
  - doubled "Intra-T" hardware with 16-pixel throughput, shared "QQ-Rec" and
    "Quality Refine" stages with 8-pixel throughput
  - a two-stage macroblock pipeline that interleaves the two pictures
  - 454 cycles per MB

  Here one block goes through all phases before the next starts. For a MB
  coded both as sixteen 4x4 blocks and as four 8x8 blocks, with about 4
  candidates each, that is about 1,600 cycles rather than 454. All the
  arithmetic units exist at the architecture's widths; only the schedule
  differs.
- **16x16 and chroma coding.** Their mode decision and plane prediction are
  built and reachable through side ports. The sequencer does not run their
  prediction / quantization / reconstruction loops, and it does not choose
  between 4x4, 8x8 and 16x16 for a macroblock.
- **Neighbour data.** The host supplies neighbour pixels and the MPM with
  each command. The encoder writes results back to the neighbour RAMs, but
  it does not read them back to build the next block's neighbours. The
  off-chip frame memory is not modelled.
- **Outside the scope of the architecture:** entropy coding, deblocking,
  inter prediction and inter-layer prediction.
- **Own choices:**
  - rounding offset 1/3
  - flat scaling lists
  - ready/valid command handshake
  - candidate order
  - buffer address maps
  - 8x8 DC taken from the filtered edge, as H.264 requires

## Verification

Every unit has a self-checking testbench in `tb/`. It compares against
reference functions in `tb/tb_ref_pkg.sv`, written independently of the RTL:

- transforms as matrix products
- quantization with the table formulas
- TraDED rules written directly from the description above
- H.264 prediction equations

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Where a unit has a fixed latency, the testbench checks it.

`tb_svc_intra_enc` runs the whole top with its default parameters. It covers
12 macroblock pairs:

- 4x4 and 8x8 blocks in both pictures
- boundary blocks
- DC-dominant blocks, DC-off blocks, MPM insertion
- best-buffer swaps, clipping, non-zero EL2 levels
- the 16x16, chroma and plane side paths

For every block it checks:

- the candidate word, best mode and cost
- all levels of all three layers
- both reconstructions
- the cycle count against the formulas above
- the neighbour-RAM write-back

It counts each of these mechanisms and fails if any one never happened.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/svc_pkg.sv tb/tb_ref_pkg.sv -y rtl -y tb \
    tb/tb_svc_intra_enc.sv --top tb_svc_intra_enc -o sim
./obj_dir/sim
```

Replace the testbench name to run any other unit's testbench. Every
testbench draws its stimulus from `$urandom`, so it needs no data files.
