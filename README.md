# GRET: gray-level anti-aliasing for high-speed printing

Low-resolution binary text and line art printed as binary dots show stair
steps on every slanted or curved edge. A printhead that can expose each dot at
several levels, such as a multi-level LED printhead, can hide the steps. It
prints edge pixels at intermediate gray levels. GRET (gray resolution
enhancement anti-aliasing) decides, pixel by pixel, which gray level each edge
pixel should get:

1. It binarises the image with a threshold.
2. It extracts edge features from a 9x9 neighbourhood: the gradient direction
   and amplitude of every pixel.
3. It turns the neighbourhood so that the edge always faces the same way.
4. It runs a set of template rules in parallel. The highest-priority rule that
   matches selects a gray level from a look-up table.

Pages often mix binary text with gray halftones or photos. Where a pixel's
3x3 neighbourhood holds real gray values, GRET leaves the pixel unchanged.
Binary strokes buried in a halftone are still enhanced, but the halftone keeps
its structure and tone.

Every stage works on one pixel per clock. For wider or faster printers,
several GRET cores each take a slice of the line. The slices overlap by 4
pixels on each side, so the joined result is identical to what one core would
produce over the whole line.

This repository holds synthesizable SystemVerilog for:

* the GRET core;
* its sub-blocks;
* the four-segment multiple-core system, with its line splitter and merger;
* self-checking testbenches that compare the RTL with an independent
  behavioural model.

## Data path of one core

```
pixel in ─► 9-line FIFO ─► page mask ─┬─► threshold ─► 9x9 binary window ─► 49 gradient LUTs ─► rotation ─► decision matrix ─► output LUT ─┐
                                      ├─► 3x3 original-value window ─► gray detect ─────────────── delay ──────────────────────────────────────┤─► select ─► pixel out
                                      └─► centre original value (bypass) ───────────────────────── delay ──────────────────────────────────────┘
```

| Stage | Register | What happens |
|-------|----------|--------------|
| beat | – | An input pixel is accepted, or a white flush pixel is made internally. |
| S1 | line-FIFO read | The 8 stored lines are read at this column, and the oldest is overwritten (read before write). Together with the new pixel they form a 9-pixel column. |
| S2 | windows | Rows above the page are forced to white. The column is binarised and shifted into the 9x9 binary window. The centre 3 rows keep their 8-bit values for the gray detect. |
| S3 | features | Columns outside the line are forced to white. Gray detect and 49 gradient LUTs run in the same clock. |
| S4 | rotation | The window is turned so that the centre's gradient points north. |
| S5 | decision | All rules run at once. The lowest-numbered match wins. |
| S6 | output | Output LUT and the select between enhanced and original values. |

The output pixel is the one 4 lines and 4 columns behind the input pixel that
completes its window. It leaves the core 5 clocks after that input beat. The
core keeps up one pixel per clock with no gaps.

### Edges of the page

Every neighbour outside the page reads as white (0). Each edge is handled
differently:

* **Top.** A count of the lines seen on this page (saturating at 8) masks the
  FIFO rows that still hold the previous page.
* **Left and right.** The window is a plain shift register, so near the end of
  a line it already holds the first columns of the next line. The centre
  column is known, so window columns that fall outside `0..LINE_W-1` are
  masked.
* **Bottom.** The core flushes itself. After the pixel marked `in_eof` it
  pulls `in_ready` low and inserts `4*LINE_W+4` white pixels. This pushes out
  the last four lines and the last four pixels. The output stream therefore
  holds exactly one pixel per input pixel, with `out_sof`, `out_sol` and
  `out_eof` on the first pixel of the page, of each line, and of the last
  pixel.

## Gradient LUT

Each of the 49 pixels with a complete 3x3 neighbourhood inside the 9x9 window
gets a gradient. The 512-entry LUT (`gret_pkg::grad_lut`, instantiated 49
times) uses the Sobel operator on the binary neighbourhood. Its outputs are:

* **Amplitude.** `|gx| + |gy|`, from 0 to 8.
* **Direction.** The direction in which the image gets darker, as one of eight
  compass codes (`N=1, NE=2, E=3, SE=4, S=5, SW=6, W=7, NW=8`), or `0` when
  there is no gradient. A vector is axial when its smaller component is at most
  2/5 of the larger one, and diagonal otherwise. Binary Sobel components never
  fall exactly on these boundaries.

The table is computed by a function rather than stored, so synthesis turns it
into combinational logic.

## Rotation: one rule set for eight orientations

An edge can face any of eight directions. Rather than repeating every rule for
each direction, the whole feature set is turned so that the centre pixel's
gradient points north. The turn covers the 81 binary pixels, the 49
directions and the 49 amplitudes. The rules then only ever see north-facing
edges.

The turn works on concentric square rings around the centre:

* The ring of radius `r` holds `8r` pixels, walked clockwise from its top-left
  corner.
* A counter-clockwise turn by `k` steps of 45 degrees moves every pixel `k*r`
  places along its ring.
* `k` is the centre direction code minus 1. A centre with no direction is not
  turned.
* Each rotated direction code is also turned by `k` steps.

Turns by 90, 180 and 270 degrees are exact rotations. The 45-degree turns are
the usual approximation on a square grid: corners map to edge midpoints. In
hardware each output bit is an 8-to-1 multiplexer. The selects come from
constant tables (`gret_pkg::rot_src`), evaluated when the design is
elaborated.

## Decision matrix and rule format

The decision matrix holds `NRULES` (16) programmable rules, typed `rule_t` in
`gret_pkg`. A rule matches the turned window when all of these hold:

* `en` is set;
* each pixel with `pix_care` set equals `pix_val`;
* each gradient position with `dir_care` set has direction `dir_val`;
* the centre amplitude is at least `amp_min`.

All rules are checked in the same clock. A pixel often fits several rules, for
example a general "edge pixel" rule and a more specific "corner of a step"
rule. The priority sorter then passes on the lowest-numbered match, so
specific rules belong at low indices. The index of that rule is the
enhanced-data address.

Window indexing in `rule_t`:

* Pixel `i*9+j` is row `i` (0 = top) and column `j` (0 = left). The centre is
  40; the pixel above it is 31 and the one below is 49.
* Gradient `i*7+j` belongs to window pixel `(i+1, j+1)`. The centre is 24.

The rule contents decide the look of the print. The design does not fix them;
it only provides the table. The testbenches use a small example set
(`gret_ref_pkg::std_rules`).

## Output LUT and gray bypass

The output LUT has one 8-bit exposure value per rule. It is written through
`lut_we/lut_idx/lut_val` and is meant to be tuned to the printhead and the
electrophotographic process, for example to keep line widths unchanged. The
select works as follows:

* If the delayed gray-detect flag is set (some pixel in the 3x3 neighbourhood
  lies strictly between `gray_lo` and `gray_hi`), the original pixel is
  printed.
* Otherwise, if a rule matched, the LUT value is printed.
* Otherwise the original pixel is printed.

The original value and the flag travel to the select through a delay chain
(`gret_delay`) that is as deep as the enhancement path.

## Multiple cores for wide and fast lines

`gret_multichip_top` takes a line of `LINE_W = N` pixels, `SEG = 4` pixels per
clock.

* **Splitter.** `gret_segment_splitter` stores one line in one of two banks
  while the other is read out. It sends core `k` the segment made of the last
  4 pixels of region `k-1`, region `k` (`N/4` pixels), and the first 4 pixels
  of region `k+1`. That is `N/4+8` pixels in all, white beyond the ends of the
  line. All cores get one pixel per clock in lock step. Each region bank also
  keeps its first and last 4 pixels in registers, so neighbouring segments can
  read them in the same clock.
* **Cores.** Each core enhances its segment as if it were a whole line.
* **Merger.** In every segment only pixels 5 to `N/4+4` (counting from 1) have
  their full neighbourhood from real data, and these are exactly region `k`.
  `gret_segment_merger` keeps those pixels of all cores in one of two banks and
  streams the joined line out, 4 pixels per clock.

A line takes `N/4` input clocks and `N/4+8` core clocks. When the input
arrives at full rate, the splitter applies back-pressure about 8 clocks per
line. It also holds the input while the cores flush at the end of a page. The
merger needs no back-pressure: a bank is read out in `N/4` clocks, which is
less than the `N/4+8` clocks it takes the cores to fill the other bank.

## Interfaces

`gret_multichip_top` (the top level):

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `cfg_bin_th` | in | 8 | binarisation threshold (pixel ≥ threshold is black) |
| `cfg_gray_lo`, `cfg_gray_hi` | in | 8 | gray band for the gray detect |
| `cfg_rule_we`, `cfg_rule_idx`, `cfg_rule` | in | 1, 4, `rule_t` | write one rule, broadcast to all cores |
| `cfg_lut_we`, `cfg_lut_idx`, `cfg_lut_val` | in | 1, 4, 8 | write one output-LUT entry |
| `in_valid`, `in_ready` | in/out | 1 | raster input handshake |
| `in_sof`, `in_eof` | in | 1 | first and last beat of a page |
| `in_data` | in | 4 x 8 | 4 consecutive pixels |
| `out_valid`, `out_sof`, `out_eof` | out | 1 | raster output, no back-pressure |
| `out_data` | out | 4 x 8 | 4 enhanced pixels |
| `ev_gray`, `ev_enh`, `ev_conflict` | out | 4 | per-core events: pixel bypassed as gray, pixel enhanced, more than one rule matched |

`gret_core` has the same configuration ports, a one-pixel input and output,
and an extra `out_sol` marker. Rules and LUT reset to disabled and zero, so
after reset a core passes its input through unchanged until it is programmed.
Thresholds are meant to stay constant during a page.

## Parameters

| Parameter | Default | Where | Origin |
|-----------|---------|-------|--------|
| `SEG` | 4 | top, splitter, merger | four segments, as in the method |
| `LINE_W` | 7200 (top), 1808 (core) | all | N is not fixed by the method; 7200 is 12 in at 600 dpi, 1808 = 7200/4 + 8 |
| window | 9 lines, 9x9 binary, 3x3 gray | core | as in the method |
| `NRULES` | 16 | core, top | this design's choice |
| `PIX_W` | 8 | all | this design's choice |

`LINE_W/SEG` must be a multiple of `SEG` and at least 8. The line memories
(8 lines per core, two line banks each in the splitter and merger) are plain
arrays. At the defaults they hold about 694 kbit.

## Where this design makes its own choices

The order of functions follows the GRET method: 9-line buffering, 3x3 gray
detect, threshold, 9x9 window, gradient LUT with eight directions plus zero,
rotation to the centre direction, parallel rules with priority, output LUT,
bypass select, and four overlapping segments of N/4+8 pixels. The method does
not publish the following, so they are this design's own:

* the Sobel operator and sector limits in the gradient LUT;
* the ring-shift geometry of the rotation;
* the rule format, with the rules and LUT left programmable;
* the gray band test;
* 8-bit pixels, with 0 = white;
* white outside the page, and the self-flush at the end of a page;
* the handshakes, the configuration ports and the number of rules;
* the splitter and merger structure.

Not built: the extension of the segmented arrangement to two dimensions, and a
display back end. The physical ASIC (memory macros, pads, printhead interface)
is outside this RTL.

## Verification

Each testbench checks its block against an independent model in
`tb/gret_ref_pkg.sv`. In that model:

* gradient sectors come from an arctangent;
* the rotation walks each ring step by step;
* the whole algorithm is evaluated per pixel straight from a stored image.

| Testbench | What it shows |
|-----------|---------------|
| `tb_gret_gradient_lut` | all 512 neighbourhoods; every direction code occurs |
| `tb_gret_feature_extract` | random, straight-edge and disc windows |
| `tb_gret_rotator` | all nine centre directions; 90-degree turns against the exact formula |
| `tb_gret_decision_matrix` | sparse random rules: misses, single and multiple hits, priority |
| `tb_gret_threshold`, `tb_gret_gray_detect`, `tb_gret_delay`, `tb_gret_output_stage`, `tb_gret_line_buffer` | the small blocks, including band limits and random write gaps |
| `tb_gret_core` | two pages on a 20-pixel line; every pixel, marker and event flag; flush length; 5-clock latency; all mechanisms occur |
| `tb_gret_segment_splitter`, `tb_gret_segment_merger` | overlap contents, white ends, stalls, markers, line timing |
| `tb_gret_multichip_top` | 4 cores on a 64-pixel line, compared with a single-line reference; counts gray bypass, enhancement, conflicts, overlap-dependent pixels, back-pressure, flush and all eight turns |
| `tb_gret_full_size` | the top at its default size (7200-pixel lines, 4 x 1808) for a 10-line page |
| `tb_gret_workload_text` | a binary "6" beside a halftone with a buried line: halftone pixels unchanged, edge-free pixels unchanged, character edges enhanced |

Each prints `TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_gret_core \
  rtl/gret_pkg.sv tb/gret_ref_pkg.sv $(ls rtl/*.sv | grep -v gret_pkg) tb/tb_gret_core.sv
./obj_dir/Vtb_gret_core
```

Building and running the full-size test takes about 20 s. Coarse synthesis of
the top with Yosys takes about 8 minutes.
