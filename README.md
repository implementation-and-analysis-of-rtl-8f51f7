# Stereo depth on an FPGA: census matching with MGM aggregation

This RTL turns a calibrated pair of 640x480 grey-scale camera images into a
disparity image, at about 17 frames per second at 100 MHz. A disparity image
is an inverse depth map. The system has three stages, and all data moves
through shared external memory:

1. **Rectification.** Two remap units correct lens distortion and align the
   two images row by row. Each follows a per-pixel calibration map and uses
   bilinear interpolation.
2. **Matching.** Five identical matching engines each take one horizontal
   band of the rectified pair. For every pixel and every disparity from 0 to
   91, an engine computes a 7x7 census matching cost and smooths it over the
   image with a simplified semi-global method. It then outputs the disparity
   of lowest cost.
3. **Display.** A VGA controller keeps reading the disparity image and shows
   it as grey levels.

The design targets a Zynq-class device, where an ARM processor captures
camera frames, writes the images into DDR and starts the units. The
processor, the DDR and its controller, the AXI interconnect and the cameras
are not part of this RTL. Instead, each unit has a simple memory port, and
the testbenches supply a behavioural memory.

## Module map

| file | role |
|---|---|
| `rtl/stereo_top.sv` | the system: 2 x `remap_ip`, `SECTIONS` x `sgm_ip`, `vga_display`, one memory port each |
| `rtl/sgm_ip.sv` | matching unit: reads one band from memory, runs `sgm_core`, writes disparities |
| `rtl/sgm_core.sv` | matching engine: line buffers, census, MGM aggregation, cost storage, argmin |
| `rtl/census_cost.sv` | census transform of two 7x7 windows and their Hamming distance |
| `rtl/mgm_cost_aggregator.sv` | new aggregated cost from the census cost and four neighbour vectors |
| `rtl/sgm_path_cost.sv` | smoothing term of one path (P1/P2 penalty rule) |
| `rtl/remap_ip.sv` | rectification unit: map read, four-neighbour fetch, interpolate, write |
| `rtl/bilinear_interp.sv` | fixed-point bilinear interpolation, 5 fractional bits |
| `rtl/vga_display.sv` | 640x480 VGA raster fed from memory through a two-line buffer |
| `rtl/sdp_ram.sv` | simple dual-port RAM (one write, one synchronous read); maps to block RAM |
| `rtl/sgm_pkg.sv` | memory-port types `mem_req_t` / `mem_rsp_t` |

## The matching cost

For a pixel, each camera's 7x7 window becomes a 49-bit census vector. A bit
is 1 where the pixel is brighter than the window centre. The matching cost
`C(p, d)` is the Hamming distance between the left vector at column `x` and
the right vector at column `x - d`. This gives a value from 0 to 49. Census
compares only intensity order, so it tolerates the gain and offset
differences between two cameras.

## Aggregation: MGM with one stored vector per pixel

This is the core of the design and the part that needs the most explanation.

### The recurrence

Classic semi-global matching (SGM) keeps a separate cost volume for each
path direction. Each volume is updated from the previous pixel along that
direction:

    L_r(p, d) = C(p, d) + min( L_r(p-r, d),
                               L_r(p-r, d-1) + P1,
                               L_r(p-r, d+1) + P1,
                               min_k L_r(p-r, k) + P2 ) - min_k L_r(p-r, k)

In hardware this means one `W x D` row of costs per direction, and a second
pass for the directions that run bottom-up or right-to-left. This design
uses the more-global-matching (MGM) variant and simplifies it further. It
keeps only the four causal neighbours of a raster scan: top-left (TL), top
(T), top-right (TR) and left (L). All four are treated as one group, so each
pixel stores a single cost vector:

    S(p, d) = min( C(p, d) + ( sum over r in {TL,T,TR,L} of term_r(d) ) / 4 , 255 )
    term_r(d) = min( S(q, d), S(q, d-1) + P1, S(q, d+1) + P1, minS(q) + P2 ) - minS(q),
                q = p - r

The defaults are P1 = 2 and P2 = 20. The division by 4 is a right shift by
2, applied to the sum of the four terms. The result is then added to the
census cost and clipped to 8 bits. The disparity is the `d` of lowest
`S(p, d)`; on a tie, the first (smallest `d`) wins.

Each `term_r` lies in 0 .. P2, and the neighbour costs are offset by their
own minimum. So `S` stays bounded (at most 49 + 20 = 69), and the 8-bit clip
is a safety net only. The scheme is a single pass, so it needs no frame
buffer of costs. It stores `W x D` bytes (640 x 92 = 58,880 bytes) per
engine, plus one minimum per column.

### Edges and the first row

A neighbour outside the image, or above the first output row of a band,
counts as having cost 255 at every disparity. Its smoothing term is then 0.
The same holds for the `d-1` / `d+1` values beyond the ends of the range.
The engine does this with edge and first-row flags that select 255 in place
of the RAM data, so no pass is needed to clear the cost RAMs before each
frame.

### How the stored vectors move (`sgm_core`)

The cost-row RAM (`W*D` entries, 8 bit) always holds, for each column, the
most recent vector computed in that column. Columns left of the current
pixel hold values from the current row; the rest hold values from the row
above. The min-row RAM holds each column's minimum. Around the current
column `C` the engine keeps six D-entry register vectors:

* `v_tl`, `v_t`, `v_tr`: the row-above vectors of columns C-1, C, C+1.
* `v_l`: the vector just computed for column C-1.
* `v_cur`: the vector being computed for column C.
* `v_nx`: the row-above vector of column C+2, fetched during the current
  pixel.

Each clock of the disparity loop handles one `d`. It does the following:

* computes the census cost of `d` (see the next section);
* feeds `v_tl/v_t/v_tr/v_l` at `d-1, d, d+1` with their minima into
  `mgm_cost_aggregator` and stores the result in `v_cur[d]`;
* writes `v_l[d]` back into the cost-row RAM at column C-1, since the row
  above no longer needs that slot;
* reads the cost-row RAM at column C+2 for the next top-right vector.

When the pixel is done the vectors shift: `TL <- T`, `T <- TR`,
`TR <- next`, `L <- cur`. The argmin and the new minimum are tracked during
the loop. Every RAM therefore needs one read and one write per clock.

At the start of each row, `2*D` clocks write back the last column of the
previous row and load columns 0 and 1 of the row above.

### The shifted right window

The left window is fixed for a pixel. The right window has to visit columns
`x, x-1, ..., x-D+1`. The engine keeps a second copy of the right window and
shifts it one column per clock, away from the current pixel. Each new column
is read from the right line buffer. Each of the two images has a 7-row line
buffer: image row `r` is stored in RAM `r mod 7`, and the rows are rotated
as the window is assembled. Positions left of column 0 read as 0.

### Timing

While the first 6 rows of a band fill the line buffers, the engine accepts
one pixel pair per clock. In `sgm_ip`, the memory reads then set the pace:
about 7 clocks per pixel with a 3-clock memory latency. Each later row takes `2*D + W*(D+3)` clocks:

* `2*D` clocks for the row set-up;
* `D` clocks per pixel for the disparity loop;
* 3 clocks per pixel for accept, window build and result.

The default band has 100 input rows and 94 output rows. Through `sgm_ip`
that takes 6·640·7 + 94·(185 + 640·95) ≈ 5.76 M clocks. The full-size testbench
measures 5,759,474 clocks, or 57.6 ms at 100 MHz. All five bands run at the
same time, so this is the matching time per frame.

### Output convention

Output pixel `(r, c)` of a band is the disparity of the window centred on
band row `r+3` and column `c+3`. The three rightmost columns of each row are
not written. Disparities whose right window would leave the image are still
computed, with the missing pixels set to 0. Their values are unreliable,
which is the usual behaviour at the left border of a disparity map.

## Cutting the image into sections

Each band needs three extra rows above and below its output rows, because
that is where its windows reach. With `SECTIONS = 5`, a 480-row image gives
`OUT_ROWS = (480 - 6) / 5 = 94` output rows per band and `SEC_H = 100` input
rows. Band `s` reads rectified rows `94·s .. 94·s + 99` and writes
disparity rows `94·s .. 94·s + 93`. The disparity image is 640 x 470, and
its row `g` corresponds to rectified row `g + 3`.

Each band restarts the aggregation, with its first row seeing a
maximum-cost row above it. So the smoothing carried from above is lost at
each band seam. Compared with a single engine, the results differ slightly
near seams.

## Rectification (`remap_ip`, `bilinear_interp`)

The calibration map has one entry per rectified pixel. An entry gives the
source coordinates `(x, y)` in the raw image, in fixed point with 5
fractional bits. Each entry is 4 bytes: x first, then y, each a
little-endian signed 16-bit value. For every pixel the unit does the
following:

* reads the 4 map bytes;
* reads the 4 raw pixels around `(floor x, floor y)`;
* writes one rounded bilinear result.

A neighbour outside the raw image counts as 0. Its read is still issued, to
a clamped address, so every pixel costs the same 9 memory operations. With
the testbench memory (3-clock latency) a 640x480 image takes 4.9 M clocks.
The two remap units run in parallel, one per camera.

## Display (`vga_display`)

The raster is standard 640x480 at 60 Hz: 800 x 525 pixel periods, and one
pixel every `CLK_DIV = 4` clocks of the 100 MHz clock. While line `y` is on
screen, line `y + 1` is fetched into the other half of a two-line buffer.
Line 0 is fetched during the last blanking line. The upper four bits of a
disparity byte drive all three 4-bit colour outputs. Lines 470 to 479 are
black. If a line starts before its fetch has finished, `late` pulses and the
line shows stale data. This happens only when the memory port is starved.

## Memory port

Each unit has one byte-wide port (`sgm_pkg`):

* `mem_req_t`: `valid`, `we`, `addr[31:0]`, `wdata[7:0]`. A request is
  accepted in a cycle where `valid && ready`.
* `mem_rsp_t`: `ready`, `rvalid`, `rdata[7:0]`. Read data returns in
  request order, any number of cycles later.

`sgm_ip` gives its disparity writes priority over its reads. A SoC
integration would put an AXI master, with burst transfers, behind each port.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `IMG_W`, `IMG_H` | 640, 480 | image size |
| `D` | 92 | disparity range, 0 .. D-1 |
| `WIN` | 7 | census window |
| `SECTIONS` | 5 | number of matching engines and bands |
| `P1`, `P2` | 2, 20 | smoothness penalties |
| `FRAC` | 5 | fractional bits of the map |
| `CLK_DIV`, `V_*` | 4, VGA 640x480@60 | display raster |

`(IMG_H - 2*(WIN/2))` must be divisible by `SECTIONS` for the bands to
cover the image exactly. A configuration with range 64 and 9 bands, which
suits a larger device, is `D=64, SECTIONS=9`. There, 474 rows do not divide
by 9: the bands cover output rows 0 to 467, and matching a frame takes
2.26 M clocks (about 44 frames/s at 100 MHz). Each engine needs about
`W*D + 2*WIN*W + W` bytes of RAM.

## How this relates to the reference design

The following follow the reference design:

* the algorithm (7x7 census, Hamming cost, four grouped causal paths, P1 = 2,
  P2 = 20, division by 4 with a shift);
* the one-vector storage scheme;
* the 8-bit costs;
* the 640x480 image, range 92 and five bands of 94 output rows;
* the remap with 5 fractional bits;
* the VGA output.

The following are choices made for this RTL:

* **Order of the division.** The sum of the four path terms is shifted
  right by 2, then added to the census cost. The census cost itself is not
  divided.
* **Upper bound.** The aggregated cost is clipped to 255, so it fits the
  8-bit store.
* **Range 0 .. 91.** The range is 92 disparities, starting at 0.
* **Edges.** Edge and first-row neighbours are presented as maximum cost by
  multiplexers, not by clearing memory.
* **Own choices elsewhere:** the handshakes, the memory port, the map-entry
  format, out-of-image pixels reading as 0, the output alignment, the VGA
  timing and the grey mapping.
* **Speed.** Only the disparity loop is pipelined (one disparity per
  clock). A version that also pipelines the pixel loop, which the reference
  design estimates at far higher frame rates on larger devices, is not
  built. The reference implementation needs about 9.4 M clocks per frame;
  this engine takes 5.76 M clocks per band, because its per-pixel overhead
  is 3 clocks.

The processor software is not part of this RTL. That includes camera
capture, software rectification of some camera formats, and starting the
units in order (remap, then matching).

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. For example, with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/sgm_pkg.sv tb/sgm_ref_pkg.sv tb/tb_stereo_top.sv --top-module tb_stereo_top
    ./obj_dir/Vtb_stereo_top

`tb/sgm_ref_pkg.sv` holds a behavioural reference for matching and
rectification, written independently of the RTL, and `tb/ddr_model.sv` is a
multi-port memory with latency and random stalls.

| testbench | what it checks |
|---|---|
| `tb_census_cost` | Hamming distance of random and corner-case windows |
| `tb_sgm_path_cost` | penalty rule against a direct formula, all branches |
| `tb_mgm_cost_aggregator` | four-path sum, shift, clip |
| `tb_sgm_core` | every disparity of a 20x12 image with range 8 against a reference, back-pressure on both sides, exact clock count |
| `tb_sgm_ip` | one band through memory with a stalling memory |
| `tb_bilinear_interp` | all fractional positions with random pixels against the formula |
| `tb_remap_ip` | rectified image against the reference, including map entries outside the image |
| `tb_vga_display` | sync timing, pixel values per line, late-line detection |
| `tb_stereo_top` | whole system at 24x20, range 8, 2 bands; exact rectified and disparity images; counts border samples, memory stalls, write-over-read arbitration, parallel bands, display fetches, late lines and frames |
| `tb_stereo_top_full` | default parameters: 640x480 synthetic pair shifted by 10 pixels; every rectified pixel exact, disparity 10 on the interior, one whole band exact against the reference, matching-time budget, one clean VGA frame; about 2.5 minutes |
| `tb_stereo_top_range64` | `D=64, SECTIONS=9` on a 640x480 rectified pair: disparity 10 on the interior, one whole band exact against the reference, matching-time budget |

To change the design, edit the parameters of `stereo_top`. The small
testbenches show which overrides are consistent with each other.
