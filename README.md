# Additive Hough Transform (AHT) accelerator

The Hough transform finds straight lines in a binary edge map by letting
every edge pixel (x, y) vote, for each angle θ, for the line distance

    ρ = x·cos θ + y·sin θ

and looking for bins with many votes. Done pixel by pixel in raster order,
this takes n² steps per angle for an n × n image, and every step needs a
sine and a cosine.

The *Additive* Hough Transform removes both costs. Cut the image into k × k
blocks of m × m pixels (n = k·m). For a pixel P inside a block whose corner
(local origin) is L, the Hough value splits into two parts:

    ρ(P) = LHT(P, L) + GHT(L)
         = (i·cos θ + j·sin θ) + m·(bx·cos θ + by·sin θ)

Here (i, j) is the pixel's position inside its block and (bx, by) is the
block's position in the grid. The local Hough transform (LHT) depends only on
(i, j), so one table of m² values per angle serves every block. The global
Hough transform (GHT) is one constant per block, k² values per angle. With
these two tables, no trigonometry is left at run time, and all k² blocks can
vote at the same time. A whole angle then needs m² voting steps instead of
n². With the default n = 256, k = 32, m = 8, that is 64 steps instead of
65,536.

This repository holds synthesizable SystemVerilog for such an accelerator.
It has three interchangeable block-module designs: two that read the LHT and
GHT from tables, and one that computes them at run time with CORDIC engines.
The result is a complete Hough space for A angles. Everything is simulated
and self-checked with Verilator.

## Structure: image modules and block modules

```
              wr_row/wr_data                      start, theta[A]
                    │                                   │
             ┌──────▼───────┐    edge_map (n×n)         │
             │ edge buffer  ├──────────┬─────────────┬──┘
             └──────────────┘          │             │
                       ┌───────────────▼───┐   ┌─────▼─────────────┐
                       │ image module θ0   │ … │ image module θA-1 │
                       │ ┌──────┐ ┌──────┐ │   │                   │
                       │ │block │…│block │ │   │   (k² blocks)     │
                       │ │0,0   │ │k-1,k-1│ │   │                   │
                       │ └──┬───┘ └──┬───┘ │   │                   │
                       │    └─merge──┘     │   │                   │
                       │  final Hough space│   │                   │
                       └────────┬──────────┘   └────────┬──────────┘
                                └──── rd_angle/rd_rho ──┴──► rd_count
```

* **`aht_edge_buffer`** holds the n × n edge map. It is written one row per
  cycle and read by all angles at once.
* **`aht_image_module`** (one per angle, `ANGLE` = 0 … A−1, θ = ANGLE·180°/A)
  holds k² block modules, the angle's two tables (`aht_angle_luts`), the
  final Hough space (`aht_hough_accum`) and a controller. All image modules
  run in lockstep, so all angles are computed in parallel.
* **Block modules** (`aht_block_small`, `aht_block_large`,
  `aht_block_cordic`) each handle one m × m block. Each one keeps a small
  *inner Hough space*: the votes of its own block only.

A run has three phases:

1. **Clear** (1 cycle). Every inner space and the final space is zeroed.
2. **Vote**. Every block walks through its m² pixel positions in row-major
   order, p = j·m + i, with one position per cycle. All blocks are at the same
   position in the same cycle, so a single LHT table read per angle is shared
   by all k² blocks. A block votes only when its pixel at that position is
   an edge pixel.
3. **Merge**. The inner spaces are moved into the final Hough space one block
   per cycle. A register stage sits between the block multiplexer and the
   accumulator. The accumulator adds all bins of a block in the same cycle.

## The three block-module variants

The variants differ in what an inner Hough space stores. That choice decides
where the GHT addition happens. Select the variant with the `VARIANT`
parameter of `aht_top` / `aht_image_module` (type `aht_pkg::aht_variant_e`).

| `VARIANT` | block module | inner space holds | where LHT + GHT is added |
|---|---|---|---|
| `AHT_SMALL_INNER` (ix) | `aht_block_small` | a count per **local** bin | in the image module's merge stage: the GHT table entry of the block being transferred is added to each local bin number |
| `AHT_LARGE_INNER` (x), default | `aht_block_large` | a count **and the final ρ index** per bin | in every block, once per edge pixel. The merge copies (index, count) pairs with no further addition |
| `AHT_CORDIC` (xi) | `aht_block_cordic` | a count and the final ρ index per bin | in every block, in fixed point, after its own CORDIC engine has computed the GHT (once) and the LHT (per edge pixel) |

**(ix)** keeps the inner spaces as small as they can be: 12 bins of 7 bits
for m = 8. The adder is shared by all blocks of an angle, but it sits in the
serial merge path.

**(x)** spends one adder and a 10-bit index per bin in every block. In return,
the merge only has to route each count to the bin its index names.

**(xi)** needs no tables at all, so the angles can be chosen at run time
(`theta[a]`). Because the angle is not known when the hardware is built, a
block cannot know how wide its local ρ range will be. Its bin window
therefore covers every angle: 20 bins around round(GHT). Each block's CORDIC
is iterative, so each pixel position takes `CORDIC_ITER`+3 = 17 cycles.

All three produce the same Hough space for the table variants' angles, with
one exception: (xi) rounds the exact sum once, while the table variants round
LHT and GHT separately (see the next section). So (xi) can differ by one bin
for pixels whose ρ lies close to a rounding boundary.

## Number formats

* **ρ index.** The final Hough space of an angle has
  `rho_bins(n) = n + ceil((n−1)·1.415) + 2` bins (619 for n = 256). Bin r
  holds ρ = r − n, which covers ρ from −255 to 361 at n = 256 plus margin.
  Counters are `$clog2(n²+1)` bits (17), so even an all-edge image cannot
  overflow them.
* **Table variants.** Each quantity is rounded half-up before it is added:
  `index = round(i·cos θ + j·sin θ) + round(m·(bx·cos θ + by·sin θ)) + n`.
  Because of this, the result can differ from `round(x·cos θ + y·sin θ)` by
  one bin. The LHT table stores `round(LHT) − lmin`, where lmin is the
  smallest rounded LHT of the angle, which gives a non-negative local bin.
  The GHT table stores `round(GHT) + lmin + n`, the final index of local bin
  0. Both tables are computed at elaboration from `$cos`/`$sin` (functions
  `lht_bin` and `ght_base` in `aht_pkg`).
* **CORDIC variant.** Angles are 16-bit binary angles (65,536 per turn)
  below half a turn. For the table variants' angle a, use
  `aht_pkg::theta_bam(a, A)`. The CORDIC uses 14 rotation-mode iterations.
  It first rotates exactly by −90° for angles of 90° or more. Coordinates
  have 8 fractional bits, and a final multiply by 1/K (Q0.16) removes the
  CORDIC gain. The measured error is below 0.09 for |x|, |y| ≤ 256. The
  block adds GHT and LHT in fixed point, rounds once, and uses
  bin = ρ − round(GHT) + m.

## Timing

Clock edges are counted after the edge that accepts `start`. `done` rises on
edge:

* **table variants:** m² + k² + 2. That is 1 clear, m² vote, k² merge and
  1 drain edge, so 1090 at the default size.
* **CORDIC variant:** (m²+1)·(`CORDIC_ITER`+3) + k² + 2. That is 2131 at
  the default size.

Merging one block per cycle makes the k² term the largest at k = 32. The
m² voting phase is the part the additive split makes independent of n.

## Using `aht_top`

Parameters: `N` (n, default 256), `K` (k, default 32, must divide N), `A`
(angles, default 8), `VARIANT` (default `AHT_LARGE_INNER`).

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset, which clears the edge map and all Hough spaces |
| `wr_en`, `wr_row`, `wr_data` | in | 1, log2 N, N | write edge-map row `wr_row`; bit x is column x. Ignored while busy |
| `start` | in | 1 | start one run over all angles; ignored while busy |
| `theta[A]` | in | 16 each | run-time angles, used only by `AHT_CORDIC` |
| `busy`, `done` | out | 1 | run in progress; one-cycle pulse at the end |
| `rd_angle`, `rd_rho` | in | log2 A, log2 rho_bins | bin to read (`rd_rho` = ρ + N) |
| `rd_count` | out | log2(N²+1) | votes in that bin (combinational) |

Typical sequence:

1. Write the N rows.
2. Pulse `start`.
3. Wait for `done`.
4. Sweep `rd_angle`/`rd_rho`.

Results stay readable until the next `start`.

## Size

At the default size, each angle has 1024 block modules and a 619 × 17-bit
final space. In variant (x), a block has 12 × (7 + 10) bits of inner space.
The inner spaces alone therefore take about 209 k flip-flops per angle. The
shared edge buffer is 64 kbit. This is why A defaults to 8: every angle adds
a full array of block modules. A smaller k (coarser grid) reduces the area
roughly in proportion to k², but lengthens voting as m² grows.

## Departures and choices to be aware of

* **Number of angles.** The original description leaves A open. A = 8
  (22.5° steps) is this design's choice, made for area.
* **Grid restrictions.** n must be a multiple of k. A 10 × 10 grid on a
  256 × 256 image (m = 25.6) cannot be built.
* **Interfaces.** The merge rate (one block per cycle), the register-based
  final Hough space, the row-per-cycle edge-map port, the readout port,
  start/busy/done, reset behaviour and all bit widths are this design's
  choices. The original description fixes only the module hierarchy, the
  table sizes ((m² + k²) entries per angle) and what each variant's blocks
  compute.
* **Speed claims.** The original work reports speed-ups of the three variants
  over raster-scan hardware (about 12×, 35× and 21×). Those figures include
  clock rates above 350 MHz on a Virtex-6 device. The cycle counts here are
  this implementation's own and are not tuned to reproduce those ratios. In
  particular, (ix) and (x) take the same number of cycles here.
* **Inner space of (x).** "Larger inner Hough space" is read as storing the
  final index next to each count.
* **GHT in (xi).** In (xi) the GHT is also computed by the block's CORDIC,
  since that variant uses no tables.
* **Not built.** The raster-scan reference architectures (CORDIC-based and
  table-based conventional Hough transform) and the CPU/GPU software
  versions are not part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_aht_edge_buffer` | row writes, visibility after one cycle, reset clear |
| `tb_aht_angle_luts` | every LHT/GHT entry of three angles against cos/sin |
| `tb_aht_block_small`, `tb_aht_block_large` | inner space after every cycle against a model, with random streams |
| `tb_aht_cordic` | 2000+ random vectors and angles within 1/8 of x·cos+y·sin; latency; start ignored while busy |
| `tb_aht_block_cordic` | per pixel: exactly one vote, at round(exact ρ) (±1 only near a rounding boundary) |
| `tb_aht_hough_accum` | random transfers, with stale indices on zero counts |
| `tb_aht_image_module` | all three variants on 32 × 32 maps (empty, full, random); full Hough space and run length |
| `tb_aht_top` | end to end, all three variants, 64 × 64 maps, 4 angles. Includes line peaks, writes and starts while busy, and counts that each mechanism happened |
| `tb_aht_top_full` | the default configuration (256 × 256, k = 32, 8 angles, variant x): one complete run of 1090 cycles, all 8 × 619 bins checked |

To run one with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aht_pkg.sv tb/tb_aht_top.sv --top-module tb_aht_top -j 8
./obj_dir/Vtb_aht_top
```

The full-size testbench compiles to a large model, about 5 minutes of C++
compilation with 8 jobs, but it simulates in about a second.
