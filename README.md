# Vario-power motion estimator with content-based subsampling

A block-matching motion estimator spends most of its energy in the adders
that compute the sum of absolute differences (SAD) between the current
macro-block and every candidate block in the search area. This design lets a
host trade that energy against picture quality while it runs. For each
macro-block it decides which pixels take part in the match, and it switches
off the processing element of every pixel left out.

Which pixels take part is decided by the block's content, not by a fixed
pattern alone:

* a **regular 8-to-m pattern** keeps 2m pixels of every 4 x 4 tile
  (m = 2 keeps a quarter of the block, m = 8 keeps all of it);
* an **edge mask** keeps every pixel whose gradient reaches a threshold,
  because a plain subsample pattern aliases exactly where the block has
  high-frequency detail;
* the **content-based subsample mask (CSM)** is the OR of the two.

The threshold is `m1 * max(G) + m2 * min(G)` over the block's gradients G.
The host sets it by choosing one of eight **power modes**. Mode 0
(m1 = 1, m2 = 0) keeps only the strongest edge pixels, which is about the
4-to-1 rate. Mode 7 (m1 = 0, m2 = 1) makes every pixel an edge pixel, which
is a full search. Because the data flow and the control are the same in
every mode, the mode can change from one macro-block to the next without
any interruption.

The result for each block is the offset (u, v), with -p <= u, v <= p-1, that
minimises

    SSAD(u,v) = sum over i,j of CSM(i,j) * |S(i+u, j+v) - R(i,j)|

where R is the current block and S the reference frame. The default size is
16 x 16 blocks with p = 32, so the search range is -32..31.

## Block diagram

```
                 power_mode ──► vp_mode_table ──► (m1, m2)
                                                     │
 cmb_pix ──► vp_pe_array (N x N PEs, holds the block)│
                │  r_out (whole block)               ▼
                └─────────────► vp_exu: vp_gradient_filter ─► vp_csm_gen ──┐
                                                     (uses vp_subsample_mask)
                                                                           │ CSM, N*N bits
 ref_pix ──► vp_sra column N-1 ──► PE column N-1 ──► vp_sra column N-2 ──► ...
                                                                           ▼
            PE columns ─ column sums ─► vp_pat (adder tree) ─► vp_mvs (minimum) ─► mv_u, mv_v, min_ssad
 vp_ctrl: phases, handshakes, window counting, (u,v) tags, stall
```

## One macro-block, phase by phase

| phase | what happens | clocks (N=16, p=32) |
|---|---|---|
| initial CMB | the N*N block pixels are written into the PEs in raster order | N*N = 256 |
| filtering | the EXU computes one gradient per clock | N*N + 1 |
| edge determination | threshold, then one CSM bit per clock | N*N + 1 |
| initial RMB | N*(N+2p-1) search pixels fill the PE array and the shift registers | 16*79 = 1264 |
| SSAD | one search pixel per clock; one candidate evaluated per clock where a window is complete | 63*79 + 63 = 5040 |

Filtering and edge determination run **at the same time** as the initial
RMB phase. The EXU starts as soon as the last block pixel is written. At the
default size it finishes after 514 clocks, well before the 1264-clock fill.
So the mask costs no time, and the schedule is that of an estimator without
subsampling. At small search ranges the fill can be shorter than the EXU.
The array then **stalls**: `ref_ready` drops and `stall` rises until the
mask is loaded. This cannot happen at the default size.

Without source gaps, `done` is high in the clock

    N*N + (N+2p-1)^2 + 2p + 2   after the clock that takes start

which is 6563 clocks at the default size. Stall clocks are added to this.

## The moving search window (PE array + shift register array)

This is the part that takes most thought. Each PE (i, j) keeps the block
pixel R(i, j) fixed. The search pixels move **upward** through each PE
column, one row per shift. Each column is extended downward by a chain of
2p-1 registers, the shift register array (`vp_sra`). A PE column plus its
chain therefore holds N + 2p - 1 = H pixels, one whole column of the
H x H search area. The pixel leaving the top PE of column j+1 enters the
bottom of the chain of column j. The whole structure is one long shift
path, and the area is sent into the bottom of the last column.

The search area must be streamed **column by column, top to bottom**:
pixel (r, c) of the area, which is S(r-p, c-p) relative to the block, is
number c*H + r. After N*H pixels, PE (i, j) holds area pixel (i, j). This is
the candidate (u, v) = (-p, -p). From there:

* every further shift moves the window down by one row (u + 1);
* after H shifts the window has moved one column to the right (v + 1) and
  is back at the top;
* of the H row positions in each column, the first 2p are complete windows.
  The other N-1 contain pixels of two area columns and are skipped: no SSAD
  is taken and the array keeps shifting.

So the scan order is v outer, u inner. The controller counts the window
position and evaluates each of the 4p^2 complete windows exactly once. The
last window needs 2p-1 shifts beyond the end of the area. The controller
inserts those as zero pixels by itself, so the source sends exactly H*H
pixels.

Each PE column sums `CSM * |S - R|` downward within the clock
(semi-systolic). The parallel adder tree adds the N column sums, and its
registered output goes with the (u, v) tag to the selector. The selector
keeps the first candidate with the smallest SSAD: a later equal SSAD does
not replace it.

## The mask: gradient filter and CSM generator

`vp_gradient_filter` computes one of three 3 x 3 gradients, chosen by the
`FILTER` parameter:

* `FILT_HPF` (default): |8c - sum of the 8 neighbours|;
* `FILT_SOBEL`: |Sx| + |Sy|, with 1-2-1 weights across rows and columns;
* `FILT_MORPH`: 3 x 3 maximum minus 3 x 3 minimum, a morphological gradient
  with a flat structuring element.

At the block border, multiplexers replace a neighbour outside the block by
the nearest pixel inside it. The filter reads the block that is already
stored in the PE array, so no second copy of it is kept.

`vp_csm_gen` keeps all N*N gradients and their maximum and minimum. It then
forms the threshold `floor((m1*max + m2*min) / 256)`, with m1 and m2 in
Q1.8 format. After that it writes one CSM bit per clock:
`(G >= threshold) OR SM(i,j)`, where SM is the regular pattern from
`vp_subsample_mask`. That pattern repeats over the block the 4 x 4 base

    u(m-2) u(m-5) u(m-2) u(m-6)
    u(m-3) u(m-7) u(m-4) u(m-8)
    (rows 2, 3 repeat rows 0, 1)

where u is the unit step. The generator also counts the ones (`csm_count`).
The block's subsample rate is then N*N to `csm_count`.

`vp_mode_table` holds the eight (m1, m2) operating points, rounded to Q1.8:

| mode | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| m1 | 1 | 0.75 | 0.5 | 0.4 | 0.3 | 0.2 | 0.1 | 0 |
| m2 | 0 | 0.25 | 0.5 | 0.6 | 0.7 | 0.8 | 0.9 | 1 |

## Switching a PE off

When the CSM is loaded, each PE latches its bit. The absolute-difference
unit does not read the moving search register directly. It reads a
**blocking register** copy of it (and of R), and that copy is loaded only
while the PE's bit is 1. An inactive PE therefore keeps its AD inputs
constant while the search data streams past, and it forwards the partial
sum from above unchanged. When a bit goes from 0 to 1, the copy is reloaded
in the same clock, so an active PE always computes with current data. The
saving shows up as reduced switching. In RTL simulation it is visible only
as the number of active PEs, not as a power figure.

## Interface of `vp_top`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| start | in | 1 | begin one macro-block (taken when idle) |
| power_mode | in | 3 | 0 = lowest power ... 7 = full search; sampled at start |
| sub_m | in | 4 | m of the regular 8-to-m pattern, 2..8 (2 for the operating points above); sampled at start |
| cmb_valid / cmb_pix / cmb_ready | in/in/out | 1/8/1 | current block, raster order, valid-ready |
| ref_valid / ref_pix / ref_ready | in/in/out | 1/8/1 | search area (N+2p-1)^2 pixels, column by column, valid-ready |
| busy, stall, done | out | 1 | in operation; waiting for the mask; one-clock end pulse |
| mv_valid, mv_u, mv_v, min_ssad | out | 1, 7, 7, 16 | result, held until the next start |
| csm_count, threshold | out | 9, 11 | active PEs and edge threshold of the block |

Both sources may pause at any time. `power_mode` may change at any time and
takes effect at the next start. Widths above are for the defaults. The
package `vp_pkg` gives the width functions `col_w`, `sad_w` and `mv_w`.

Parameters of `vp_top`: `N` (block size, 16), `P` (search range -P..P-1,
32) and `FILTER` (`FILT_HPF`).

## Files

| file | contents |
|---|---|
| `rtl/vp_pkg.sv` | widths, pixel/gradient/weight types, filter enum |
| `rtl/vp_top.sv` | the estimator |
| `rtl/vp_ctrl.sv` | phase controller, window counting, stall, padding |
| `rtl/vp_pe.sv`, `rtl/vp_pe_array.sv` | processing element and N x N array |
| `rtl/vp_sra.sv` | shift register array |
| `rtl/vp_pat.sv` | parallel adder tree |
| `rtl/vp_mvs.sv` | motion-vector selector |
| `rtl/vp_exu.sv`, `rtl/vp_gradient_filter.sv`, `rtl/vp_csm_gen.sv`, `rtl/vp_subsample_mask.sv` | edge-extraction unit |
| `rtl/vp_mode_table.sv` | power mode to (m1, m2) |
| `tb/tb_vp_ref_pkg.sv` | reference model (filters, threshold, mask, full search) |
| `tb/tb_vp_<block>.sv` | one self-checking testbench per block |
| `tb/tb_vp_top_drv.sv` | stimulus/checker used by the two top-level testbenches |
| `tb/tb_vp_top.sv` | end to end at three small sizes, one per filter |
| `tb/tb_vp_top_full.sv` | end to end at the default size, eight blocks over all modes |
| `tb/tb_vp_frame.sv` | a whole 352 x 288 frame (396 blocks) at the default size, high-pass and Sobel estimators side by side, with plain-subsampling and full-search baselines |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by
itself (each also has a watchdog). With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/vp_pkg.sv tb/tb_vp_ref_pkg.sv tb/tb_vp_top.sv --top-module tb_vp_top
./obj_dir/Vtb_vp_top
```

Replace `tb_vp_top` with any other testbench name. Runtimes are seconds,
except `tb_vp_frame` (about two minutes).

What is checked:

* each block is compared with values computed independently from the
  equations in `tb_vp_ref_pkg`;
* latencies are checked: the EXU takes 2*N*N + 2 clocks, the controller and
  the top take exactly the clock count given above;
* `tb_vp_top` makes sure that each mechanism occurs at least once: stall,
  source gaps, PEs switched off, full search, mode switches (including a
  change during a block), equal minima and edge pixels on the block border.

`tb_vp_frame` also reports the mean number of active PEs for each filter
and mode, and the resulting load in equivalent additions, `3*A*(2p)^2 + (N-1)*(2p)^2 + 9*N^2`
per block with A active PEs. The last term is the high-pass filter, which
is counted for both filters. On its synthetic frame the mean goes from 66
of 256 PEs in mode 0 (about 0.87 M equivalent additions per block) to 256
in mode 7 (about 3.21 M), for both filters. In between, the Sobel mask is
smaller in modes 1 and 2 and larger in modes 5 and 6. In both cases the
filter's share is below 0.3 % of the load even in mode 0.

For quality, the frame testbench also searches every block with the plain
4-to-1 pattern (no edge pixels) and with all pixels. At each vector it takes
the mean absolute difference over the whole block. On the synthetic frame
this comes to 14.11 per pixel for the plain pattern and 11.47 for full
search. With the high-pass filter, mode 0 gives 14.11 and modes 1 to 7 give
11.47 to 11.49. With the Sobel filter, every mode gives 11.47 to 11.49.

## Interpretations and design choices

The algorithm, the PE with blocking registers, the EXU split, the five
phases and the eight operating points come from the published description.
The following were not specified there and are choices of this design:

* **Array data movement.** The data movement (block stationary, search data
  moving up, 2p-1 registers per column linked column to column), the stream
  orders and the valid-ready handshakes are reconstructed. They follow the
  Hsieh-Lin style array that the architecture is based on.
* **Search-area size.** The area is (N+2p-1) pixels per side, which the
  SSAD equation needs for offsets -p..p-1. It is not the 2p x 2p one might
  read from a loose description.
* **Borders.** The gradient filter replicates border pixels. Search areas
  that reach past the frame edge are the source's business; the frame
  testbench replicates frame-edge pixels.
* **Number formats.** m1 and m2 use Q1.8 with floor rounding of the
  threshold. Mode numbering is 0..7 in the order of the table.
* **Ties.** The selector keeps the first candidate in scan order.
* **Stall and padding.** The stall when the mask is late, the zero padding
  after the area, and the single register stage after the adder tree are
  choices of this design.
* **Regular pattern always on.** The edge mask is always ORed into the
  pattern. A pure regular subsampling mode (no edge pixels) is not a mode
  of this design: mode 0 still adds the pixels of maximum gradient.
* **Outside the design.** The host processor that picks the mode and the
  frame memory that supplies the pixels are outside the design and appear
  only as ports.
* **Synthesis.** The design is written for synthesis, but power was not
  measured. The blocking registers reduce switching only if synthesis
  keeps them, so the AD inputs of an inactive PE stay constant.
