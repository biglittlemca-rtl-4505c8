# BigLittleMCA: mixed-resolution Gibbs sampling in hardware

Stereo matching and optical flow can be posed as Markov random fields: each
pixel carries a label (a disparity, or a motion vector), and a Gibbs sampler
repeatedly redraws every label from its conditional distribution given the
two input images and the four neighbouring labels. Most of that work goes
into *burn-in*, the iterations that walk from a random start to a plausible
state. Only the samples after burn-in matter.

BigLittleMCA makes burn-in cheap. A small **Little** accelerator runs burn-in
on a scaled-down copy of the frame, with fewer pixels and fewer labels. Its
result is enlarged by nearest-neighbour copying, and each label is rescaled
to full resolution. The enlarged map becomes the starting state of a large
**Big** accelerator, which samples at full resolution.

The two accelerators work on consecutive frames at the same time. While the
Big one samples frame *n*, the Little one is already burning in frame *n+1*.

Each accelerator (an *MCA*) is a grid of identical processing elements
(*SPEs*). Each SPE owns one rectangular tile of the image. All SPEs run the
same schedule in lockstep, so a label on a tile edge can be read from the
neighbouring SPE without arbitration, and every memory can be single-ported.

This repository holds synthesizable SystemVerilog for that architecture at
its 720p design point:

- Big MCA: 60 × 8 SPEs of 12 × 160 pixels each, 8-bit labels. That is 256
  stereo disparities, or 15 × 15 = 225 motion vectors.
- Little MCA: 30 × 4 SPEs, 6-bit labels.
- Two scale-up networks, 2× and 10×.
- A frame-level scheduler.

It also holds one self-checking testbench per module.

## The energy being sampled

For pixel (i, j) with candidate label l, the energy is

    E(l) = 2^alpha * (img2[p(l)] - img1[i][j])^2  +  2^beta * sum over neighbours n of |l - n|^2

- **Stereo:** p(l) is the pixel l columns to the left of (i, j), and
  |l − n|² is the squared difference of disparities.
- **Optical flow:** the upper half of the label bits is the horizontal
  component and the lower half the vertical one. A component value v means
  an offset of v − r, with r = 2^(L/2−1) − 1 (r = 7 for 8-bit labels). p(l)
  is (i + dy, j + dx), and |l − n|² is the squared Euclidean distance
  between the two vectors.
- **Legality:** labels that point outside the image, or at or above the
  configured label count, are illegal and can never be drawn.
- **Neighbours:** those outside the image are left out of the sum.

The conditional probability is p(l) ∝ exp(−E(l)/T). Hardware works with
integer approximations (`spu_e2p`, below).

All run-time settings are in the packed struct `mca_pkg::mca_cfg_t`:

| Field | Meaning |
|---|---|
| `app` | stereo or optical flow |
| `alpha`, `beta` | weight exponents |
| `tinv` | round(16·log2(e)/T) |
| `num_labels` | number of labels |
| `iters` | iterations per run |

## Module hierarchy

```
biglittle_top
├── frame_sched              frame-level sequencing of both MCAs
├── mca  (Little, 30 x 4)    grid of SPEs + image stream + read-out
│   └── spe  (x120)
│       ├── spe_sched        slot/phase schedule, random init
│       ├── spu              energy -> probability -> sample
│       │   ├── spu_energy   Eq. above, combinational
│       │   ├── spu_e2p      energy to weight, combinational
│       │   └── spu_sampler  one-pass weighted sampler
│       ├── prng             xorshift32
│       └── spram  (x3)      LABEL, IMG1, IMG2 banks
├── scaleup_dispatch (x120)  one per Little SPE: read, rescale, address
├── scaleup_net              fixed 2x and 10x wiring, selected at run time
└── mca  (Big, 60 x 8)       same modules, 8-bit labels
```

`mca_pkg` holds the shared widths, enums and structs.

## Inside an SPE: the sampling schedule

This is the part that takes the most care. One SPE processes one pixel label
per clock.

**Checkerboard phases.** An iteration has two phases. The first visits the
"red" pixels ((i + j) even), and the second the "black" ones. A red pixel's
four neighbours are all black, so nothing a phase writes is read in the same
phase. That makes the result identical to a sequential Gibbs sweep in
red/black order.

**Slots.** A phase is K + 3 *slots*, where K is half the tile size. Each
slot is 2^L cycles, one cycle per label, and the cycle counter `cyc` is also
the label number. A pixel takes four slots, one stage per slot, and four
pixels are in flight at once:

| Stage | Slot | What happens |
|---|---|---|
| **f** (fetch) | s | Cycles 0–3 read the N, S, W and E neighbour labels, and cycle 0 also reads IMG1. A neighbour on a tile edge is taken from the adjacent SPE's `share_out`, which in lockstep is reading exactly that label in the same cycle. |
| **a** (energy) | s+1 | Each cycle reads one IMG2 pixel (the one the label points at), computes E(l) and stores {legal, E} in an energy bank. A running minimum Emin is tracked. |
| **b** (sample) | s+2 | Each cycle reads one energy back, converts it to a weight relative to Emin, and feeds the sampler. The sample is ready one cycle after the last label. |
| **w** (write) | s+3 | The new label is written to the label bank at cycle 4, a cycle the fetch stage leaves free. |

Stages a and b alternate between two energy banks (ping-pong). One phase
takes (K + 3) · 2^L cycles, and one iteration takes 2 · (K + 3) · 2^L.

**Initialisation.** Random initialisation writes a random legal label to
every pixel, one per cycle.

**Memory sizes.** IMG2 holds the image window any label can point at:

- stereo: N × (M + 2^L − 1), extending left;
- flow: (N + 2r) × (M + 2r).

The bank is sized for the larger of the two.

**Loading images.** Images arrive as one raster stream of (IMG1, IMG2)
pixel pairs, one per cycle, broadcast to every SPE. Each SPE keeps what
falls in its tile and IMG2 window.

**Reading labels.** The MCA streams the labels out in raster order.

## Arithmetic of one sample

- **`spu_energy`** evaluates the energy with shifts for the 2^alpha and
  2^beta weights. The result is 26 bits.
- **`spu_e2p`** computes x = ((E − Emin) · tinv) >> 4 and returns a weight of
  2^15 >> x, or 0 when x ≥ 16 or the label is illegal. This is exp(−ΔE/T)
  rounded to powers of two. The best label always weighs 2^15.
- **`spu_sampler`** is a single-pass weighted reservoir. It keeps the
  running sum S and replaces its choice with label k when u · S < w_k · 2^16,
  where u is a fresh 16-bit random number. Label k ends up chosen with
  probability w_k / ΣS, with no second pass and no division.
- **`prng`** is a 32-bit xorshift generator, one per SPE. Each is seeded
  from its grid position.

## Scale-up from Little to Big

Each Little SPE has a `scaleup_dispatch` that walks its tile once. For every
Little label it computes the S × S Big pixels the label covers, rescales the
label, and issues one write per cycle, so a Little pixel takes S² + 2 cycles.
Rescaling works as follows:

- stereo: disparity × S, clamped to `num_labels` − 1;
- flow: each component × S, clamped to ±r of the Big labels.

Writes land through `scaleup_net`. The Big grid is an integer multiple of
the Little grid, and the tile sizes divide evenly, so every Big SPE has
exactly one source Little SPE for a given factor:

    source row    = q · N_big / (S · N_little)
    source column = r · M_big / (S · M_little)

The network is plain wiring plus a per-factor multiplexer selected by
`scale_sel`. All Little SPEs dispatch in parallel without conflicts.

At 10×, a 72 × 128 low-resolution frame fills only part of the 360 × 640
Little area. Writes that would fall outside the Big grid are dropped.

## Frame sequencing and top-level interface

`frame_sched` runs two small state machines:

- **Little:** idle → randomise → burn-in → hold result → transfer.
- **Big:** idle → receive transfer → sample → done, and it stays in *done*
  until `big_release`.

A transfer starts only when the Little result is ready and the Big MCA is
idle. Burn-in of the next frame therefore overlaps sampling of the current
one.

To run one frame on `biglittle_top`:

1. Stream the low-resolution pair into the Little MCA (`little_img_*`, with
   `little_img_first` on the first pixel and `little_img_ready` as
   back-pressure). Stream the full-resolution pair into the Big MCA
   (`big_img_*`) whenever `big_img_ready` is high.
2. Pulse `randomize`, wait for `little_idle`, select `scale_sel`
   (0 = 2×, 1 = 10×) and pulse `start`.
3. `frame_done` pulses when the Big MCA has finished.
4. Pulse `readout` to get `ro_valid`/`ro_row`/`ro_col`/`ro_label` in raster
   order. Then pulse `big_release`.
5. The next frame's images may be loaded into the Little MCA as soon as
   `little_idle` is high again, and into the Big MCA after `big_release`.

## Sizes and throughput at the default parameters

| | Big MCA | Little MCA |
|---|---|---|
| SPEs | 60 × 8 | 30 × 4 |
| tile | 12 × 160 | 12 × 160 |
| image area | 720 × 1280 | 360 × 640 |
| label bits / labels | 8 / 256 (flow 225) | 6 / 64 (flow 49) |
| SRAM per SPE | LABEL 1,920 B, IMG1 1,920 B, IMG2 4,980 B | LABEL 1,920 × 6 b, IMG1 1,920 B, IMG2 2,676 B |
| cycles per iteration | 2 · 963 · 256 = 493,056 | 2 · 963 · 64 = 123,264 |

The Big MCA is the bottleneck. A 720p frame with 200 iterations of
full-resolution sampling costs:

| Part | Cycles |
|---|---|
| 200 iterations of sampling | 98.6 M |
| loading the images | 0.92 M |
| 10× transfer (0.012 M at 2×) | 0.20 M |
| **total** | **99.7 M** |

That is within the 100 M cycles a 3 GHz clock allows for 30 frames/s. The
Little MCA's 200 burn-in iterations (24.7 M cycles) run in the shadow of the
previous frame. Each SPE also holds two energy banks of 256 × 27 bits.

## Where this RTL departs from the original design, and what is missing

- **Not built: blind source separation.** It would need a floating-point
  coprocessor for the mixing-matrix and noise draws and a residual reduction
  across the SPE grid. The source describes these only in outline.
- **Not built: clock gating.** SPEs whose tile holds only padding (smaller
  images are padded to 720 × 1280) are not clock-gated. They simply compute
  labels for padding.
- **Not built: collecting samples.** There is no averaging or collection of
  the post-burn-in samples. The Big MCA returns its final label map.
- **Not built: image segmentation** (a third mode of the earlier SPE design).
- **Own choices for unspecified internals:**
  - the energy-to-weight approximation and the reservoir sampler;
  - the xorshift generator;
  - the slot schedule and ping-pong energy banks;
  - the raster image stream and read-out;
  - the frame handshakes (`randomize`, `start`, `big_release`);
  - the Little label width (6 bits);
  - label rescaling during scale-up;
  - the stereo window direction (to the left).
- **Little MCA shape.** The source gives both 30 × 4 and 30 × 2 for the
  Little MCA. 30 × 4 is used here because it is the 2× scaled-down version
  of the 60 × 8 Big MCA.
- **Memories.** These are plain synthesizable arrays with a registered read
  port, standing in for compiled SRAM macros.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The references are
computed independently inside the testbenches:

| Testbench | What it checks |
|---|---|
| `tb_spram`, `tb_prng` | Against a reference array and a software xorshift. |
| `tb_spu_energy`, `tb_spu_e2p` | Random operands against integer models. |
| `tb_spu_sampler` | Weights 4:2:1:1 must be drawn in those proportions. |
| `tb_spu` | At a near-zero temperature (`tinv` = 255) every draw must be the energy minimum. |
| `tb_spe_sched` | Visiting order, stage spacing and run length. |
| `tb_spe`, `tb_mca` | After one iteration at near-zero temperature, each label must minimise the energy given the neighbour labels it saw. In `tb_mca`, many of those neighbours live in another SPE, which exercises the lockstep exchange. |
| `tb_scaleup_dispatch`, `tb_scaleup_net` | Every Big pixel is written once with the right rescaled label. |
| `tb_frame_sched` | Sequencing and overlap with stand-in MCAs. |
| `tb_biglittle_top` | End to end, below. |

`tb_biglittle_top` runs a scaled-down system:

- Little MCA 2 × 1, Big MCA 4 × 2, tiles 2 × 4;
- 4-bit Little and 6-bit Big labels;
- scale factors 2 and 4 (the 4 stands in for 10).

It runs three frames: stereo at 2×, stereo at 4× overlapping the first, and
flow at 2×. It checks every scale-up write, checks every output label
against the energy minimum, and counts each mechanism (randomisation,
burn-in, both networks, Big sampling, overlap, cross-SPE exchange, both
applications, read-out). A mechanism that never happened counts as a
failure.

**No full-size simulation.** There is no testbench of the full 600-SPE
configuration. Loading a single 720p frame takes about 0.9 M cycles, and one
iteration 0.5 M cycles, across 600 SPEs. Even one iteration is far beyond a
practical simulation time. The largest system simulated end to end is the
4 × 2 + 2 × 1 configuration above. The full-size top does pass lint and
elaboration.

Run any testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mca_pkg.sv tb/tb_biglittle_top.sv \
          --top-module tb_biglittle_top
./obj_dir/Vtb_biglittle_top +verilator+rand+reset+2
```

Lint reports a few unused signal bits (the unused Little read-out port, and
status bits of SPEs other than SPE (0,0), which run in lockstep). It also
flags `rst_n` being used by the lockstep assertion as well as by the
asynchronous resets. Neither affects the logic.
