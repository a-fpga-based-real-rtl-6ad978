# SIFT orientation-assignment accelerator

SIFT makes a feature point rotation invariant by giving it a *major
orientation*: the gradients of the pixels around the point are collected in a
36-bin histogram of orientation (10 degrees per bin) weighted by gradient
magnitude, and the highest bins are the point's orientations. Done literally,
every pixel costs a square root, a division and an arctangent. This RTL does
the same job with none of them:

* **magnitude** — `sqrt(dx² + dy²)` is only a histogram weight, so an integer
  is enough. The sum of squares is compared with 128 constant thresholds and
  the number of thresholds exceeded *is* the rounded square root;
* **orientation** — the bin of a gradient is decided without computing its
  angle: `|dx|` is multiplied by the tangents of 10°, 20°, … 80° using only
  shifts and adds, `|dy|` is compared against the eight products, and the
  signs of `dx` and `dy` place the result in one of the four quadrants.

The accelerator reads feature points and a pre-arranged Gaussian image from
a dual-port memory, builds each point's histogram, and writes back one result
record per major orientation (at most two per point). At 130 MHz it handles
one VGA frame with 1000 feature points in about 3.9 ms (about 255 frames/s).

## Block structure

```
             start, fp_count
                   |
   +-----------> addr_mux ---------------------------> memory port A / port B
   |                                                          |
   |   add_ctrl_unit <-- feature-point record (port B) -------+
   |     | pixel address                                      | neighbour word (port A)
   +-----+                                          dx, dy registers
                                                   /           \
                                        gra_mag_comp          bin_select
                                          (magnitude)   (thd_creator -> angle_cmp -> bin_creator)
                                                   \           /
                                                   hist_create (36 bins)
                                                        |
                                                   max_select (1 or 2 orientations)
                                                        |
                                           result records -> memory port A
```

| Module | Role |
|---|---|
| `oc_top` | top level and stage sequencer |
| `addr_mux` | chooses the port-A address: feature-point record, pixel, or result write |
| `add_ctrl_unit` | walks the 13×13 window around a feature point, gives addresses and border flags |
| `gra_mag_comp` | threshold-table square root |
| `bin_select` | shift-based orientation bin, built from the three blocks below |
| `thd_creator` | `|dx|·tan(10k°)`, k = 1..8, by shift-and-add |
| `angle_cmp` | threshold signals `a1..a8` and the 0–90° bin |
| `bin_creator` | quadrant unfolding to bins 0..35 |
| `hist_create` | 36 saturating magnitude accumulators |
| `max_select` | highest bin and optional second peak |
| `oc_pkg` | widths, tangent constants, memory word layouts |

All datapath blocks except `hist_create` and `add_ctrl_unit` are purely
combinational; the sequencer in `oc_top` registers around them.

## Orientation without an arctangent

For a gradient with both components positive, bin `q` of the first quadrant
(angle 10q° … 10q+10°) is defined by

    |dx| · tan(10q°)  <=  |dy|  <  |dx| · tan(10(q+1)°)

so eight comparisons against `|dx|·tan(10°) … |dx|·tan(80°)` suffice.
`a_k = (|dy| >= |dx|·tan(10k°))` rises monotonically with `|dy|`, giving a
thermometer code; the bin is the position of the first zero:

| a1 | a2 | … | a8 | bin (0–90°) |
|---|---|---|---|---|
| 0 | x | … | x | 0 (0–10°) |
| 1 | 0 | … | x | 1 (10–20°) |
| … | | | | … |
| 1 | 1 | … | 0 | 7 (70–80°) |
| 1 | 1 | … | 1 | 8 (80–90°) |

**Tangent constants.** Each tangent is an 11-bit constant with 3 integer and
8 fraction bits (`oc_pkg::TAN_Q8`):

| angle | tan | constant | value | angle of constant |
|---|---|---|---|---|
| 10° | 0.17633 | 000.00101101 | 45/256 | 9.97° |
| 20° | 0.36397 | 000.01011101 | 93/256 | 19.97° |
| 30° | 0.57735 | 000.10010100 | 148/256 | 30.03° |
| 40° | 0.83910 | 000.11010111 | 215/256 | 40.02° |
| 50° | 1.19175 | 001.00110001 | 305/256 | 50.01° |
| 60° | 1.73205 | 001.10111100 | 444/256 | 60.03° |
| 70° | 2.74748 | 010.10111111 | 703/256 | 69.99° |
| 80° | 5.67128 | 101.10101100 | 1452/256 | 80.00° |

The bin edges therefore move by at most 0.03°. `thd_creator` multiplies by
adding one shifted copy of `|dx|` for every set bit of a constant; bits above
the binary point are left shifts (×2, ×4), bits below it right shifts (÷2 …
÷256). To lose no fraction bits, every copy is shifted relative to 2⁻⁸,
i.e. all thresholds and `|dy|` are scaled by 256 (19-bit values).

**Quadrants.** `bin_creator` turns the first-quadrant bin `q` and the signs
into a bin of θ = atan2(dy, dx) in 0..360°, bin *b* covering 10b…10b+10°:

| signs | θ | bin |
|---|---|---|
| dx > 0, dy ≥ 0 | φ | q |
| dx ≤ 0, dy > 0 | 180° − φ | 17 − q |
| dx < 0, dy ≤ 0 | 180° + φ | 18 + q |
| dx ≥ 0, dy < 0 | 360° − φ | 35 − q |
| dx = dy = 0 | — | 0 (weight 0) |

The mirrored quadrants are the reason for `17 − q` and `35 − q`: there the
angle decreases as φ grows. The four axis directions land in bins 0, 9, 18
and 27. Gradients exactly on a bin edge of a mirrored quadrant go to the
lower of the two bins; every other gradient gets exactly `floor(θ/10°)` up to
the 0.03° edge shift.

## Magnitude by threshold counting

`gra_mag_comp` forms `s = dx² + dy²` (18 bits for 9-bit differences) and
compares it with the thresholds `k² + k`, k = 0..127. `round(sqrt(s)) = k`
exactly when `k² − k + 1 <= s <= k² + k`, so the number of thresholds that `s`
exceeds is the rounded square root, and anything above 16256 (127² + 127)
gives 128. Magnitudes are thus 0..128 in 8 bits; larger gradients (possible,
since differences reach ±255) saturate at 128. The comparator outputs are a
thermometer code and are summed into the result; a synthesis tool may turn
this into a priority encoder.

## Histogram and major orientations

`hist_create` adds each in-image window pixel's magnitude to its bin. There
is no Gaussian weighting over the window and no smoothing of the histogram.
Bins are 16 bits (a 13×13 window needs at most 169·128 = 21632) and saturate.

`max_select` reports:

1. the highest bin (lowest index on a tie), always;
2. a second orientation if another bin is a local peak (strictly above both
   circular neighbours) and at least 80 % of the highest (`5h >= 4·hmax`,
   exact); the highest such bin is taken.

At most two orientations per feature point are produced. The orientation is
the bin index itself (no sub-bin interpolation).

## Memory organisation

The accelerator sits on the two 36-bit ports of a dual-port memory in which
a read returns its word on the clock after the request. Three regions (all
bases are parameters):

| Region | Address | Word (`oc_pkg`) | Content |
|---|---|---|---|
| Gaussian image | `GAUSS_BASE + y·IMG_W + x` | `nbr_word_t` | the four neighbours of (x,y): `right` [7:0] = L(x+1,y), `left` [15:8] = L(x−1,y), `down` [23:16] = L(x,y+1), `up` [31:24] = L(x,y−1) |
| feature points | `FP_BASE + i` | `fp_rec_t` | `x` [9:0], `y` [18:10], pixel value [26:19] |
| results | `OUT_BASE + n` | `ori_rec_t` | `bin` [5:0], `x` [15:6], `y` [24:16], pixel value [32:25] |

Storing the four neighbours of a pixel in one word lets a single read give
both `dx = L(x+1,y) − L(x−1,y)` and `dy = L(x,y+1) − L(x,y−1)`. The stage
that writes the Gaussian image must produce this layout. Note that `dy` uses
y+1 minus y−1, with y counting rows downwards.

Results are written in feature-point order, one record per orientation; a
point with two orientations gives two consecutive records with the same
position.

## Schedule and throughput

Per feature point (`oc_top`):

| Stage | Clocks | Port A | Port B |
|---|---|---|---|
| Initiation | 1 | read first window pixel | read next feature-point record |
| per window pixel: load, difference, accumulate | 3 × 169 (the first load is the initiation clock) | read neighbour word | — |
| Writing | 1 per orientation | write result record | — |

A feature point takes 508 clocks (one orientation) or 509 (two); a run adds 2
clocks to fetch the first record. The next record is prefetched during the
current point, so port B is used once per point. `add_ctrl_unit` shows the
first window address while it is being loaded, which is what lets the first
pixel be read in the initiation clock.

One frame of 1000 feature points, all with two orientations, takes
2 + 1000·509 = 509,002 clocks = 3.92 ms at 130 MHz, or 255.4 frames/s
(about 255,000 feature points per second). The stages are not overlapped:
the histogram of a point is complete before the next point starts. The
130 MHz clock rate itself is a target for an FPGA implementation and is not
something simulation can confirm; the comparator tree of `max_select` sits
between the histogram registers and the result write in one clock.

## Interfaces

`oc_top` parameters: `IMG_W` = 640, `IMG_H` = 480, `WIN_R` = 6 (window
13×13), `ADDR_W` = 20, `GAUSS_BASE` = 0, `FP_BASE` = 0x80000,
`OUT_BASE` = 0xC0000, `HIST_W` = 16, `FPCNT_W` = 16. Image coordinates are
10 and 9 bits (`oc_pkg::XW`, `YW`), enough for VGA.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, active-low asynchronous reset |
| `start` | in | 1 | one-clock pulse while idle starts a run |
| `fp_count` | in | 16 | feature points to process (0 ends at once) |
| `busy` / `done` | out | 1 | run in progress / one-clock pulse at the end |
| `rec_count` | out | 17 | result records written in the last run |
| `mem_a_addr`, `mem_a_re`, `mem_a_we`, `mem_a_wdata`, `mem_a_rdata` | | 20/1/1/36/36 | port A: pixel reads, result writes |
| `mem_b_addr`, `mem_b_re`, `mem_b_rdata` | | 20/1/36 | port B: feature-point reads |

Port A never reads and writes in the same clock (asserted in `oc_top`).

## Choices and departures

Taken from the design description: 8-bit pixels, the 128 square-root
thresholds and the saturation at 128, the eight tangent constants and the
threshold-signal bin table, shift-and-add threshold generation, 36 bins, at
most two orientations, two 36-bit memory ports with one-clock access, three
clocks per window pixel, and port use (port B only at initiation, results
written on port A, one clock per write).

Choices of this RTL, where the description gives none:

* **Window** 13×13 (`WIN_R` = 6). Three clocks per pixel at 130 MHz and the
  stated rate of about 256,000 feature points per second give ≈ 508 clocks per
  point, i.e. ≈ 169 pixels.
* **Square root rounding.** The magnitude is `round(sqrt(s))`, matching the
  threshold ranges (1 for s = 1..2, 127 up to 16256) rather than truncation.
  The 127 range starts at 16003 here.
* **Shift directions.** The shift units work on `|dx|` with fraction bits kept.
  A ×4 copy is included because tan 80° = 101.101011₂ needs it. A drawing of
  the same structure feeds the shifts from `|dy|`. The form used here,
  `|dx|·tan ≤ |dy|`, is the one the comparison formula states.
* **Second orientation**: the usual SIFT 80 % local-peak rule.
* **No Gaussian weighting, no smoothing, no peak interpolation.**
* **Border**: window pixels whose neighbours leave the image are read (the
  address is clamped) but not counted.
* **One Gaussian image**: there is no scale or octave field in the
  feature-point record.
* **Prefetch**: the record read at initiation is that of the *next* feature
  point, so the current one is already known when its window starts.
* Word layouts, address map, reset and start/done handshake.

The resulting size is about 775 flip-flop bits (576 of them the histogram),
against about 1220 slice registers reported for the original FPGA build.
The accuracy figure of the original (98.9 % of orientations matching a
floating-point software implementation, on 50 photographs) cannot be checked
without its images. The tests below compare with an exact model instead.

## Verification

Every module has a self-checking testbench in `tb/` ending with a
`TB_RESULT checks=N failures=M` line and guarded by a watchdog:

* `gra_mag_comp_tb` — all 261,121 (dx, dy) pairs against the real square root;
* `bin_select_tb` — all (dx, dy) pairs against `floor(atan2/10°)` from the real
  arctangent (gradients within 0.05° of a bin edge may take either neighbour);
* `thd_creator_tb`, `angle_cmp_tb`, `bin_creator_tb`, `hist_create_tb` (also
  saturation at a narrow width), `max_select_tb`, `add_ctrl_unit_tb`,
  `addr_mux_tb` — against independent models;
* `oc_top_tb` — the whole accelerator at its default size: a 640×480 image of
  noise with planted ramps, 1000 feature points including border points, the
  memory modelled by `tb/ddr2_dp_model.sv`. Every result record is compared
  with a reference computed with real square roots and multiplied tangent
  constants. The test checks the exact clock count of the frame
  (508 per point plus 1 per second orientation). It also checks that points with
  one and two orientations, border windows, saturated magnitudes and all four
  quadrants each occur. A frame simulates in about a second.

## Simulating

With Verilator 5 (package first, testbench and memory model from `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/oc_pkg.sv rtl/*.sv \
    tb/ddr2_dp_model.sv tb/oc_top_tb.sv --top-module oc_top_tb -o sim
./obj_dir/sim
```

A unit test needs only the package, the RTL and its own testbench, e.g.
`--top-module bin_select_tb tb/bin_select_tb.sv`. The simulator has no X
state: the testbenches reset or initialise everything they read.

To change the window, image size or memory map, override the `oc_top`
parameters. `oc_top_tb` assumes the defaults: change its local parameters to
match. Different tangent constants (other bin counts) mean changing
`oc_pkg::TAN_Q8`, `NTHD` and the quadrant formulas in `bin_creator` together.

## Outside this RTL

The memory itself (a board memory in the original system) is not part of the
RTL. Its ports are the `mem_a_*`/`mem_b_*` ports of `oc_top`, and the
behavioural model in `tb/` stands in for it. The earlier SIFT stages are also
outside this RTL: Gaussian and difference-of-Gaussian pyramids and
feature-point detection, which must supply the neighbour-word image and the
feature-point list. So is the descriptor stage that follows.
