# FPGA coprocessor for molecular-dynamics force computation

This design computes the non-bonded forces of a molecular-dynamics time step
in fixed-point hardware, using two engines that run side by side:

* **Short-range engine.** It computes Lennard-Jones forces plus the
  short-range Coulomb term for every particle pair closer than a cut-off. It
  walks a cell list. Each pair is evaluated once, and Newton's third law
  supplies the force on the partner.
* **Long-range engine.** This is a grid-based (multigrid-style) Coulomb
  solver. Charges are spread onto a 3D grid, the grid is convolved with a
  kernel, and potential and field are interpolated back to the particles.

The host works in IEEE double precision. Converters at the boundary turn each
coordinate into a 35-bit fixed-point word on the way in, and turn each result
back into a double on the way out. Inside the engines every value is a 35-bit
two's-complement word. The short-range pipeline gets floating-point-like
dynamic range through a *semi floating point* scheme: the scale of every
intermediate value is fixed per table interval and stored with the table, so
only a handful of hard-wired alignment shifts are needed, not a full
floating-point adder.

The architecture follows Gu and Herbordt's two-FPGA coprocessor: one FPGA for
the short-range forces and one for the multigrid. Where the original leaves a
detail open, this RTL makes its own choice. The section "Departures and
limits" lists those choices.

## Number formats

| quantity | format |
|---|---|
| position | unsigned 35-bit fraction of a cubic periodic box (`0` = 0, `2^35` = one box edge) |
| separation | wrapped 35-bit difference of two positions, read as signed: this is the minimum image |
| r² | 71-bit exact square sum; `x = r² >> 32` (35 bits) indexes the tables |
| table coefficients C3..C0 | 35-bit signed, each on its own scale (see below) |
| force | 35-bit signed; the host sees it as a double equal to `word / 2^20` |
| grid weights, charges, kernel, multigrid results | 35-bit signed with 24 fraction bits |

The host sends positions as doubles in `[0, 1)`, meaning a fraction of the
box edge. `dp_to_fix` truncates them toward zero to 35 fraction bits. A NaN or
an infinity raises `p_bad`.

## Short-range force pipeline

### What is computed

For a pair (i, j) with types (a, b):

```
F/r   = A_ab * r^-14  -  B_ab * r^-8  +  QQ_ab * r^-3
f_i   = (F/r) * (r_i - r_j)        f_j = -f_i
```

`A = 12 eps sigma^12`, `B = 6 eps sigma^6` and `QQ = q_a q_b` come from a
1024-entry type-pair memory addressed by `{type_i, type_j}` (5-bit types). The
host folds any unit scaling into these three numbers. A pair gets zero force
in three cases:

* it is masked: a padding particle, or `j <= i` inside the same cell;
* `r² >= RC2`, which defaults to `2^66`, one cell edge at the default 4×4×4
  cells;
* `x` lies below the first table section.

### Table interpolation (`rsq_decode`, `coef_mem`, `interp_pipe`)

The three powers of r are read from tables indexed by `x = r²`:

* **Section.** The section is the position of the leading one of `x`, so each
  section is twice as long as the one before. There are 16 sections, covering
  bits 34 down to 19 of `x`.
* **Interval.** The 7 bits after the leading one select one of 128 equal
  intervals in the section.
* **Offset.** The remaining bits, left-aligned to 24 bits, give the offset
  `t` in `[0, 1)` into the interval.

Each interval stores four coefficients and a format word. The pipeline
evaluates a third-order polynomial in Horner form:

```
a2 = C2 + ((C3 * t) >>> s1)
a1 = C1 + ((a2 * t) >>> s2)
y  = C0 + ((a1 * t) >>> s3)           term = (param * y) >>> osh
```

This takes one table read, three multiplies and three additions. Each
addition is a `sfp_adder`: its second operand is aligned by one of eight
hard-wired shifts `{0,1,2,3,4,6,8,12}`, picked by the 3-bit selectors
`s1, s2, s3` in the format word. The 6-bit `osh` sets the scale of the
product with the pair parameter.

The host fills the tables as follows. For each interval it fits a cubic `p(t)`
to `r^-k` over the interval (the original uses orthogonal-polynomial fits).
It then picks:

* an output scale `osh` that makes `y` use most of the 35 bits;
* per-coefficient scales that are powers of two. They must differ by one of
  the eight hard-wired shifts, and each coefficient is stored as
  `round(c_k * 2^(scale_k))`.

The testbenches load random tables, which exercises every selector and shift.
Results are compared bit for bit with a software model of the same
arithmetic (`tb/md_ref_pkg.sv`).

### Pipeline timing (`force_pipe`)

`force_pipe` accepts one pair per cycle and returns the force `FP_LAT = 9`
cycles later. Its stages are:

1. separation, plus the parameter-memory read;
2. exact r²;
3. three `interp_pipe`s in parallel: decode and table read, then three
   Horner stages;
4. parameter products and sum;
5. the final vector product.

The mask, the cut-off flag and the separation ride along in a delay line.

## Cell traversal (`sr_engine`)

### Memories and two-level indexing

The host groups particles by cell and writes them into the position/type
memory (`pos_mem`):

* Each row holds `N = 2` particles, one per force pipeline.
* A cell starts on a fresh row. When a cell's count is not a multiple of N,
  the last row is padded with dummy particles.
* The host also writes each cell's particle count.

A `build` pulse starts a prefix-sum pass in `cell_index`. It takes one cycle
per cell and gives every cell its first row. After the pass, `ready` rises.
`overflow` reports padded cells that do not fit into the `ROWS = 1024` rows
(2048 particles).

### The four-step schedule (`pair_ctrl`, `force_array`)

The controller visits every cell A, and for each A:

* A itself;
* its 13 "forward" neighbours: the nine cells of the +z layer, the three of
  the +y row, and +x. The grid wraps at the edges.

Each unordered pair of neighbouring cells is therefore visited exactly once.
For a cell pair (A, B):

1. **Load Pi.** One row of A (N particles) goes into the Pi array.
2. **Sweep.** One Pi particle sits in the Pi register. Each cycle, one row of
   B goes into the N Pj registers, one particle per pipeline.
3. **Next Pi.** Step 2 repeats for the next Pi-array entry.
4. **Drain, then write back.** The controller waits `DRAIN = 12` cycles for
   the pipelines to empty. It then adds the Pi acceleration array into the
   acceleration memory and continues with the next row of A.

As results leave the pipelines, two updates happen every cycle:

* The force on each Pj is **subtracted** from that particle's row in the
  acceleration memory (`acc_mem`, read-add-write in one cycle).
* The N forces on Pi are summed by `adder_tree` into the Pi acceleration
  array.

Lane masks drop padding lanes and, when A = B, every pair except `j > i`. A
`CLEAR` phase of one row per cycle zeroes the acceleration memory before the
traversal.

The drain stall is the price of a simple write-back. Without it, the
write-back could race results still in flight for the same Pi row. It costs
12 cycles per Pi row. `sr_draining` marks those cycles, `sr_issuing` marks the
cycles that issue a Pj row, and `sr_hits` counts pairs inside the cut-off.

## Multigrid engine (`lr_engine`)

One run passes through these phases. The `lr_phase` port reports the current
one.

| phase | work per cycle |
|---|---|
| CLEAR | zero 64 points of the charge grid (Q-store) |
| ASSIGN | one particle: three `basis_pipe`s give the four cubic B-spline weights per axis; the charge comes from the type→charge memory; the 1:64 `pg_converter` tree forms `q·φx·φy·φz` for the 4×4×4 neighbouring points; the 64 values are added into the Q-store |
| CONV | one grid point enters `conv3d`, and one convolved point is written to the potential grid (V-store) |
| INTERP | per particle, four passes: the 64 potentials around it are read and dotted with `φφφ`, `dφ·φφ`, `φ·dφ·φ` and `φφ·dφ`, then multiplied by the charge. This gives `q·V` and `-q·∂V/∂x,y,z`, in grid units |
| DRAIN | let the last pipeline results land before the next phase |

### Interleaved grid memory (`grid_mem`)

Grid point (x, y, z) lives in bank `(x mod 4, y mod 4, z mod 4)`, one of 64
banks, at address `(x/4, y/4, z/4)`. Any 4×4×4 block, wherever its corner and
with periodic wrap, touches each bank exactly once. A whole block can
therefore be read, or accumulated, in one cycle. A crossbar rotates the 64
values between block order and bank order. A separate single-point port
serves the convolver.

### Convolver (`conv1d`, `conv2d`, `conv3d`)

The convolver is built in three levels:

* `conv1d` is a K-tap transposed FIR.
* `conv2d` chains K `conv1d`s with line FIFOs (`sample_fifo`) between them.
* `conv3d` chains K `conv2d`s with plane FIFOs.

The line and plane lengths are run-time inputs, so the same hardware serves
any grid up to `LMAX`/`PMAX`. The convolver takes and returns one datum per
cycle.

The grid is periodic, so the engine streams an *extended* grid through the
convolver: `G + 2R` points per edge (`R = (K-1)/2`), read from the Q-store
with wrap. Only the outputs of the valid window are written. The result is

```
V[g] = sum_k h[k] * Q[(g + R - k) mod G]      (k per axis, 0..K-1)
```

CONV takes `(G + 2R)^3` cycles: 46,656 at the defaults `G = 32` and `K = 5`.

## Top level (`md_top`) and host sequence

1. Write the three coefficient tables (`tbl_we` one-hot: r^-14, r^-8, r^-3)
   and the type-pair memory. For the long-range engine, write the type→charge
   table and the K³ kernel.
2. For each particle, write a position as three doubles plus a type. Drive
   `p_row`/`p_lane` (its cell-ordered slot) and `p_idx` (its index) together:
   one write fills both engines' memories.
3. Write the per-cell counts, pulse `build`, and wait for `sr_ready`.
4. Set `np`. Pulse `sr_start` and `lr_start`, together or apart, and wait for
   `sr_done` and `lr_done`.
5. Read the results. Both read ports are registered:
   * `sr_rd_row/lane` → `sr_rd_x/y/z`
   * `lr_rd_idx/comp` → `lr_rd`

## Departures and limits

* **One cache set only.** The original keeps two sets of 2048-particle
  on-chip caches per FPGA and streams larger systems through off-chip SRAM,
  up to 256K particles. Here the whole system must fit into one on-chip set
  of 2048 particles and 4×4×4 cells. There is no SRAM controller and no
  double buffering.
* **Finest grid only.** The long-range engine builds the finest grid level
  with one host-loaded K³ kernel. The coarser levels of the multigrid method
  (restriction, prolongation, per-level kernels) are not built. The original
  does not specify them, and neither the basis order nor the grid size is
  fixed there. The cubic B-spline basis and `G = 32` are this design's
  choices.
* **Plain fixed point at the interface.** The interface converters produce
  plain fixed point, not a word with a stored exponent. Results come back
  with a fixed binary point: 20 fraction bits for short-range forces and 24
  for the multigrid.
* **Pi acceleration at write-back.** The Pi acceleration is not fetched from
  memory when Pi is loaded. The Pi array starts at zero and is added to
  memory at write-back, which gives the same sum.
* **Own choices.** The following are chosen here, not taken from the
  original:
  * the cut-off, the r² and force scalings (`R2_SH`, `F_SH`);
  * 16 table sections;
  * the hard-wired shift set;
  * the pipeline depths;
  * the drain before write-back;
  * the half-shell neighbour set;
  * the separate clear phases.
* **No split convolutions.** The original convolves grids that are too large
  for its FIFOs in pieces and sums the partial results. Here `lr_engine`
  sizes the FIFOs for its whole extended grid. A line FIFO holds the next
  power of two above `G + 2R`, and a plane FIFO the next power of two above
  `(G + 2R)^2`. Each run therefore convolves the grid in one pass.
* **Multiplier sharing.** The dot product in the interpolation phase has its
  own multipliers, rather than sharing the convolver's.
* **No host bus.** The PCI host interface is not part of the RTL. Its signals
  are plain ports on `md_top`.

## Parameters (defaults)

| parameter | default | meaning |
|---|---|---|
| `N` | 2 | force pipelines = particles per memory row |
| `ROWS` | 1024 | rows of the position and acceleration memories |
| `CDIM` | 4 | cells per box edge |
| `DATA_W` | 35 | datapath width (`md_pkg`) |
| `IVL_W` | 7 | log2 intervals per table section |
| `NSEC` | 16 | table sections |
| `FP_LAT` | 9 | force pipeline latency |
| `NP` | 2048 | long-range particle capacity |
| `GB` | 5 | log2 grid points per edge |
| `K` | 5 | kernel size per axis |
| `WF` | 24 | fraction bits of weights, charges, kernel and multigrid results |

## Verification and simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog. The references
are independent of the RTL:

* `md_ref_pkg` re-implements the short-range arithmetic in software.
* The long-range tests compare against real-arithmetic B-spline assignment,
  periodic convolution and interpolation, with tolerance 1e-3.
* `tb_sr_engine` and `tb_md_top` check every particle's short-range force
  against an all-pairs search. The tolerance is one LSB per partner, because
  the summation order differs.
* `tb_pair_ctrl` checks that every real pair is issued exactly once.

The end-to-end tests also count the mechanisms and fail if any never occurs:

* drain stalls, padded cells, empty cells and cut-off drops;
* every multigrid phase, with the exact CONV cycle count;
* overlap of the two engines.

`tb_md_top` uses reduced sizes: 3³ cells, 64 rows, an 8³ grid and a 3³
kernel. `tb_md_top_full` runs `md_top` at its defaults with about 1500
particles and finishes in under two minutes.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_md_top \
    rtl/md_pkg.sv -y rtl -y tb tb/tb_md_top.sv
./obj_dir/Vtb_md_top
```
