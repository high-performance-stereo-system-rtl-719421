# Dense stereo disparity with cellular-automaton cost refinement

This design turns a rectified colour stereo pair into a dense disparity map.
It is a local, window-based matcher with one extra stage. Ordinary SAD
block matchers pick the cheapest disparity straight from the matching costs.
This design first refines the whole cost volume, the *disparity space image*
(DSI), with three cellular-automaton (CA) rules. Only then does an argmin
choose the disparity for each pixel. The rules smooth costs inside a
disparity plane, compare each cost with its neighbours along the disparity
axis, and reward or penalise a cost by how it ranks within its 5×5
neighbourhood. Together they remove many isolated wrong matches that plain
SAD leaves behind, and no post-processing of the disparity map is needed.

The default build handles images of up to 640×480 pixels and up to 70
disparity levels, with a 5×5 SAD window. Width, height and active disparity
range can be set per frame, up to those maxima.

## Dataflow

```
 in_l, in_r (RGB, raster)                                      out_disp (raster)
      │                                                               ▲
      ▼                                                               │
 ┌─────────┐   ┌──────────────┐   ┌────────┐   ┌─────────┐   ┌─────────────────────────────┐
 │   ppu   │──▶│ frame_buffer │──▶│ dsi_cu │──▶│ dsi_mem │──▶│ dsi_pu                      │
 │6 × 1-D  │   │ filtered L,R │   │ 5×5 SAD│   │ W·H ×   │   │ ca1_pu → ca2_pu → ca3_pu →  │
 │ [1 2 1] │   │              │   │ all d  │   │ D costs │   │ similarity_acc (argmin)     │
 └─────────┘   └──────────────┘   └────────┘   └─────────┘   └─────────────────────────────┘
      ▲               ▲                ▲            ▲                    ▲
      └───────────────┴──── hcu: phases, addresses, configuration ───────┘
```

A frame goes through three phases in turn. The high-level control unit
(`hcu`) runs them and generates every memory address.

1. **Load** (W·H clocks). Pixel pairs are accepted one per clock on
   `in_valid`/`in_ready`. Each one passes through the pre-processing unit and
   is written to the frame buffer. The pre-processing unit has six identical
   one-dimensional weighted-mean filters, one per colour component of each
   image. Each filter computes `(f[x-1] + 2·f[x] + f[x+1]) / 4` along the row
   and leaves the first and last pixel of a row unchanged.
2. **Cost build** (3·(W+2)·(H+2) clocks). The frame buffer is read in
   raster order into the DSI creation unit (`dsi_cu`). That unit produces the
   5×5 SAD cost of the pixel for every disparity at once. The cost vector is
   written to one word of `dsi_mem`, so the memory is pixel-major with one
   D×13-bit word per pixel.
3. **Refinement and selection** (W·H·drange + W·H + ≈3W clocks). `dsi_mem`
   is read plane-major: plane 0 of every pixel, then plane 1, and so on, one
   cost per clock. This stream runs through the three CA units and the
   similarity accumulator. The disparity map leaves in raster order while
   the last plane goes through, one value per clock with no gaps. `done`
   pulses after the last value.

Costs are 13-bit unsigned integers. That is enough for a 5×5 window of one
8-bit component (25·255 = 6375). The sum over R, G and B saturates at 8191.

## The DSI creation unit

The SAD datapath is the widest part of the design. It has `D` parallel
absolute-difference/adder-tree units (`sad_unit`), one per disparity. To keep
it at one datapath instead of three, the colour components share it through
a multiplexer. Each pixel takes three clocks: R, G, then B. The three
component SADs are accumulated and saturated to 13 bits, so the unit accepts
one pixel every third clock (`in_ready`).

The matching convention is that the left pixel at x matches the right pixel
at x − d. The memory arrangement holds three things:

* Scanline memories with the previous four rows of both images. Each column
  is packed into one word, so the storage maps onto block RAM.
* A 5-column register window for the left image.
* A (D + 4)-column shift register of right-image columns that reaches D
  pixels to the left.

The input stream is the image extended by two columns and two rows. The
hcu supplies these extra reads and their data is ignored. They let the
window centred on the last pixel of a row, and on the last row, complete.
Window taps that fall outside the image, in either image, are masked to zero
before the subtraction. So near the borders the SAD is taken over the
overlapping part of the window only.

## The three refinement rules

All three rules work on the stream in plane-major order. Each unit keeps the
input order and delays it by a fixed number of samples. Each rule reads the
output of the previous one, so every rule is applied once per frame, as a
pipeline.

**CA1: 3×3 mean in a plane (`ca1_pu`).** Each cost becomes the integer mean
(sum / 9) of its 3×3 neighbourhood in the same disparity plane. The window
comes from a `window_buffer`: two line FIFOs plus nine registers, delivering
one window per clock after a fill of about 2W + 2 samples. Cells on the image
border keep their value (fixed-value boundary).

**CA2: comparison along d (`ca2_pu`).** Let c be the cost at (x, y, d), and
p and n the costs at d − 1 and d + 1.

* If p > c/2 or n > c/2, then c' = 0.8·c.
* Otherwise, if p < c/2 or n < c/2, then c' = 0.6·c.
* Otherwise c is unchanged.

The three planes come from a `plane_buffer`, a delay line of one and two
whole planes (W·H samples each). So this unit's output trails its input by
one plane, and the source has to keep the stream going for one plane after
the last real one. c/2 is never computed: the comparisons are done as
2p vs c and 2n vs c, so they are exact. Two replacement control units
(`rcu`) evaluate the two conditions with gate-level comparators
(`bin_comparator`). Planes 0 and drange − 1 pass unchanged.

**CA3: rank against the mode (`ca3_pu`).** This rule works over the 5×5
neighbourhood in the same plane, centre included.

* k is the number of cells with value ≤ c/2, and p = 25 − k.
* mod_val is the number of times the most frequent value of the 25 occurs.
  It comes from `mode_freq`, which has one equality counter per cell, a
  maximum search and a multiplexer.
* If k ≥ mod_val, then c' = 0.4·c.
* Otherwise, if p ≥ mod_val, then c' = 1.2·c, saturated to 13 bits.
* Otherwise c is unchanged.

The window comes from a 5×5 `window_buffer` with four FIFOs. Cells within
two pixels of the border pass unchanged.

The scale factors are Q8 fixed-point constants: 0.8 → 205/256,
0.6 → 154/256, 0.4 → 102/256 and 1.2 → 307/256. Products are truncated.

**Similarity accumulator (`similarity_acc`).** This unit keeps one running
minimum and its index per pixel in a W·H memory. It updates them as each
plane streams past, and during the last plane it emits the index. On a tie
the lower disparity wins.

## Streaming, priming and the flush

Every windowed stage emits a cell only after the whole neighbourhood of that
cell has arrived. Each stage counts its input samples to know when it is
primed, and tracks the coordinates of the centre it is about to emit, so it
needs no side-band signals. The price is that the stream has to be pushed
past its end. After the last real cost, the hcu keeps `in_valid` high with
dummy costs until the processing unit reports `done`. That takes about
W·H + 3W extra samples: one plane for CA2 and a few rows for the windows.
This fill-and-flush accounts for the W·H + 3W term in the frame time.

## Control and configuration

`cfg` is a packed struct `{w[15:0], h[15:0], drange[7:0]}`. It is sampled
when the first pixel of a frame is offered, and an assertion in `hcu`
checks it against `MAX_W`, `MAX_H` and `D`. `busy` stays high from the first
pixel until `done`. A new frame is taken once `busy` has dropped. The hcu
phases are:

| State | Work |
|---|---|
| `S_IDLE` | wait for `in_valid` |
| `S_START` | one-clock `frame_start` that clears every unit |
| `S_LOAD`, `S_LFLUSH`, `S_LWAIT` | accept pixels, one flush beat for the filter, drain the frame-buffer writes |
| `S_CU` | padded raster reads into `dsi_cu`, cost vectors written to `dsi_mem` |
| `S_PU`, `S_PFLUSH` | plane-major reads into `dsi_pu`, then dummy beats until it is done |

Top-level parameters (package `stereo_pkg` holds the shared types):

| Parameter | Default | Meaning |
|---|---|---|
| `MAX_W`, `MAX_H` | 640, 480 | largest image; sizes the frame buffer, DSI memory, line FIFOs and plane buffers |
| `D` | 70 | number of SAD units and the largest disparity range |
| `WIN` | 5 | SAD window side; the CA windows stay fixed at 3×3 and 5×5 |

## Where this design departs from the reference architecture

* **Throughput.** The refinement stage handles one cost per clock. A frame
  therefore costs about W·H·(drange + 1) clocks there, plus 4·W·H for load
  and cost build: about 23.0 M clocks at 640×480×70, or 7.3 frames/s at
  168 MHz. The reference system reports 114 frames/s for that configuration.
  That figure needs about 15 costs refined per clock, so its refinement
  units must work on many planes side by side. How that parallelism is
  organised is not described, so it is not reproduced here. The SAD stage
  (all disparities in parallel, 3 clocks per pixel) is not the bottleneck.
* **Phases do not overlap.** Load, cost build and refinement of one frame
  run back to back. The multi-buffering that lets the next frame load while
  the current one is refined is left out.
* **One pass per rule.** Each CA rule is applied once. The rules are
  described as cellular-automaton time steps that may be iterated.
* **Fixed-point scale factors** (Q8, truncating) and **exact halving**
  through doubled comparisons.
* **Reading of CA3's counters.** The two tests are written as "≤ c/2" and
  "≥ c/2", which overlap at equality. Here a cell counts toward k when
  2v ≤ c and toward p otherwise.
* **Mode frequency.** mod_val is taken as the number of times the mode
  occurs in the window. A simpler per-value flag, "occurs more than 12
  times", would make the rule depend on a fixed threshold, so each
  comparator here returns its full count and the largest count wins. The
  block is combinational, not a 4-stage pipeline.
* **No Laplacian pre-filter.** Intensity normalisation by a Laplacian
  before the mean filter is mentioned only at the algorithm level. The
  pre-processing hardware has only the weighted-mean filters, so that is
  what is built.
* **Border handling.** Masked SAD taps at the image edge, unfiltered first
  and last columns, and fixed-value boundaries for the CA rules are choices
  made here.
* **Memories** are modelled as arrays with synchronous or asynchronous read,
  as each unit needs. The full-size DSI memory is 640·480 words of 910 bits,
  about 280 Mbit. A real device would place it off-chip or shrink it. Here
  it is simply an array.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -j 4 -y rtl -y tb \
    rtl/stereo_pkg.sv tb/stereo_ref_pkg.sv tb/tb_stereo_top.sv \
    --top-module tb_stereo_top -o sim
./obj_dir/sim
```

Use the same command with another `tb_*.sv` and its name as the top module.
`-Wno-fatal` keeps width and unused-signal lint warnings from stopping the
build.
`tb/stereo_ref_pkg.sv` is a plain behavioural model of the whole algorithm:
filter, SAD, the three rules and the argmin. The block and system
testbenches compare the RTL against it.

| Testbench | What it covers |
|---|---|
| `tb_wmean_filter`, `tb_ppu` | filter arithmetic, row edges, latency |
| `tb_frame_buffer`, `tb_dsi_mem` | memory write/read, read latency |
| `tb_sad_unit`, `tb_dsi_cu` | SAD for all disparities, masking, colour sequencing, 3-clock rate |
| `tb_bin_comparator`, `tb_rcu`, `tb_mode_freq` | comparator, replacement conditions, mode frequency (exhaustive and random cases) |
| `tb_window_buffer`, `tb_plane_buffer` | window and plane delay lines against a model |
| `tb_ca1_pu`, `tb_ca2_pu`, `tb_ca3_pu` | each rule on random volumes with idle gaps, including boundaries and latency; CA2 and CA3 also require every replacement outcome to occur |
| `tb_similarity_acc`, `tb_dsi_pu` | argmin with ties; the whole refinement chain against the reference |
| `tb_hcu` | phase sequencing, address order and counts, with stand-in units |
| `tb_stereo_top` | two frames at 16×12, 8 levels and 12×10, 5 levels: every disparity against the reference, gap-free output, frame time, and counts of SAD stalls, CA1 mean and boundary cases, each CA2 and CA3 outcome and accumulator updates |
| `tb_stereo_workloads` | default-size top, four frames back to back at the sizes and ranges of the usual Middlebury pairs (384×288/16, 434×380/20, 284×216/30, 450×375/65) with generated banded images; same checks as below with 12 reference pixels per frame |
| `tb_stereo_full` | one frame at the defaults (640×480, 70 levels) with banded shifts; output count, timing, ≥ 99% of band-interior pixels at the true shift, and 40 pixels against the reference (about 2 minutes in Verilator) |

## Changing the design

* Change image size or disparity range with `MAX_W`, `MAX_H` and `D` on
  `stereo_top`. Memory sizes follow. `D` also sets the number of SAD units
  and the accumulator's index width.
* `WIN` changes only the SAD window. The CA neighbourhoods are part of the
  rules.
* The scale constants live in `stereo_pkg`. `scale_q8` saturates, so larger
  factors stay safe.
* Any reordering of the cost stream has to be matched in `hcu` (read
  addresses) and in the centre-tracking counters of the window stages.
