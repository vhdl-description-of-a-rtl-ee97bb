# Real-time stereo vision processor (SAD block matching)

This is a streaming processor that turns two synchronised camera streams into
a dense disparity map. It produces one disparity per pixel clock and needs no
frame buffer. For every pixel of the left image it compares a
(2m+1) x (2n+1) window with the windows of the right image displaced by
d = 0 … D_L−1 pixels along the same line. It reports the d whose sum of
absolute differences (SAD) is smallest.

The design follows the architecture of *"VHDL Description of a Synthetizable
and Reconfigurable Real-Time Stereo Vision Processor"* (RTSVP). That
architecture has three blocks: window delayers, one correlator per
disparity, and a minimum comparator. This SystemVerilog version is an
independent implementation of that architecture. The section
"Departures and own choices" lists what was decided here.

Default configuration (the 256-pixel, 32-disparity configuration of the
published synthesis results):

| parameter | meaning | default |
|---|---|---|
| `IB` | pixel bits (I_B) | 8 |
| `DL` | disparity limit (D_L), number of correlators | 32 |
| `N` | pixels per line | 256 |
| `M` | lines per frame (only used for the output coordinates) | 256 |
| `WM`, `WN` | window half height m, half width n (window 11 x 11) | 5, 5 |
| `OW` | bits of each reduced correlation value | `IB` |
| `CROSS_AHEAD` | 1: c = \|L(x) − R(x+d)\|; 0: c = \|L(x) − R(x−d)\| | 1 |
| `LR_CHECK` | add the reverse correlator bank and the left-right check | 0 |

## The recursive SAD: why four pixels per clock are enough

A direct SAD over an 11 x 11 window needs 121 absolute differences per
pixel and disparity. The correlators never do that. They split the window
sum into column sums and update both sums incrementally:

```
c(x,y,d)  = |L(x,y) − R(x+d,y)|
VC(x,y,d) = VC(x,y−1,d) + c(x,y+m,d) − c(x,y−m−1,d)      column of 2m+1 differences
C(x,y,d)  = C(x−1,y,d)  + VC(x+n,y,d) − VC(x−n−1,y,d)    window of 2n+1 columns
δ(x,y)    = argmin_d C(x,y,d)
```

* The column-sum update needs the difference entering the window at the
  bottom ("head", row y+m) and the one leaving at the top ("tail",
  row y−m−1). So each correlator only receives four pixels per clock:
  reference head and tail, and crossed head and tail.
* The column sum of the same column one line earlier comes from a FIFO of
  N column sums. Each sum is written back into that FIFO in the same clock
  it is computed.
* The window-sum update needs the column sum 2n+1 columns back. A second,
  short FIFO of 2n+1 column sums supplies it.
* Widths: a column sum has `IB + ⌈log2(2m+1)⌉` bits (12 by default). A
  window sum has `IB + ⌈log2((2n+1)(2m+1))⌉` bits (15). The add-then-subtract
  wraps modulo 2^width, which is exact because the true result always fits.
* Before the comparator, each window sum is shifted right by `CW − OW` bits.
  With `OW = IB` that is ⌈log2(window area)⌉ bits, i.e. roughly the mean
  absolute difference. This keeps the comparator input at D_L x 8 bits. It
  truncates, so near-equal SADs can become ties (see the comparator).

All recursive state starts from zero. Line delays and column FIFOs report
zero until they have been filled once after reset, and all registers reset
to zero. The result is exactly what a direct SAD gives if every pixel before
the first one after reset is taken as 0. The testbenches use that model.

## Data path

```
pix_l, pix_r ──► cwd ──(ref head/tail, D_L x crossed head/tail)──► sdc[0..D_L-1] ──► dc ──► disp
                  │                                                                    out_corr
                  └─(reverse taps)──► sdc_rev[0..D_L-1] ──► dc ──► lr_check ──► lr_ok   (LR_CHECK=1)
```

**Window delayers (`cwd`).** Two line delays of (2m+1)·N pixels
(`delay_fifo`) give the tail row of each image. Four D_L-long shift
registers hold the recent head and tail pixels of both images.
* With `CROSS_AHEAD = 1` the reference is the left pixel delayed by D_L−1.
  Disparity d takes the right pixel d positions ahead of it, i.e. shift
  register tap D_L−1−d.
* With `CROSS_AHEAD = 0` the reference is undelayed and disparity d takes
  the right pixel d positions back. Use this for the opposite camera
  arrangement.

The block outputs 2·D_L + 2 pixel lines. The same registers also hold every
pixel a reverse bank needs: right image as reference, left image crossed.
They are brought out as `rev_*` ports, so the left-right check costs no
delayer storage.

**Stereo disparity correlator (`sdc`).** It has three register stages:
* `sdc_ad`: the two absolute differences.
* `sdc_vc`: the column sum with its N-deep FIFO.
* `sdc_c`: the window-sum register with its (2n+1)-deep FIFO and the bit
  reduction.

All D_L correlators see the same reference pixels and run in lock step. An
assertion in `rtsvp` checks this.

**Disparity comparator (`dc`).** This is a pipelined binary tree of
compare-select nodes, with one register level per tree level, i.e. ⌈log2 D_L⌉
stages. Inputs are padded to a power of two with all-ones values. On equal
values the lower disparity wins.

**Left-right check (`lr_check`, optional).** A disparity d_L found at left
pixel p is confirmed when the reverse map gives the same disparity at the
matching right pixel: d_R(p + d_L) = d_L.
* With `CROSS_AHEAD = 1` the reverse map comes out D_L−1 pixels ahead of the
  forward map. A (D_L−1)-entry history of reverse disparities therefore holds
  every candidate.
* `lr_ok` is 0 for unconfirmed pixels, which are typically occlusions and
  the image border.
* The check requires `CROSS_AHEAD = 1`.

## Interface and timing (`rtsvp`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | pixel clock; asynchronous active-low reset |
| `in_valid` | in | 1 | a pixel pair is present; may drop at any time (blanking) |
| `pix_l`, `pix_r` | in | IB | left (reference) and right pixel of the same position |
| `out_valid` | out | 1 | a result is present |
| `disp` | out | ⌈log2 D_L⌉ | disparity of the smallest SAD |
| `out_corr` | out | OW | that reduced SAD |
| `out_x`, `out_y` | out | ⌈log2 N⌉, ⌈log2 M⌉ | window centre the result belongs to |
| `lr_ok` | out | 1 | left-right check passed (constant 1 if `LR_CHECK = 0`) |

* **Raster.** The input is a continuous raster of N x M frames. The first
  accepted pair after reset is pixel (0,0). There is no line or frame sync
  input, and there is no backpressure.
* **Rate.** One result per accepted input, in order.
* **Latency in pixels.** A result refers to the window centred
  L = n + m·N (+ D_L−1 with `CROSS_AHEAD = 1`) pixels before the newest
  input. `out_x`/`out_y` give that centre. The first L results of the first
  frame belong to positions before (0,0).
* **Latency in clocks.** `out_valid` follows the accepted input that
  completes the window by 1 (cwd) + 3 (sdc) + ⌈log2 D_L⌉ (dc) clocks. That is
  9 clocks by default and 7 in the reduced end-to-end test.
* **Borders.** Windows are not clipped. Within m lines or n columns of a
  border, the window wraps into the neighbouring line or frame, so those
  disparities are not meaningful. With `LR_CHECK`, pixels whose match falls
  outside the line usually fail the check.

## Cost

With the default parameters, coarse synthesis gives about 1.5k word-level
cells, 3.3k flip-flops and 147,584 memory bits. The memory splits into:
* window delayers: 2 x 2,816 x 8 bits;
* line FIFOs: 32 x 256 x 12 bits;
* column FIFOs: 32 x 11 x 12 bits.

The memory formula is
`2·(2m+1)·N·IB + D_L·(N + 2n+1)·(IB + ⌈log2(2m+1)⌉)` bits. It comes within
80–93 % of the on-chip memory reported for the original FPGA
implementations:

| I_B | D_L | N | m=n | this RTL (bits) | published (bits) |
|---|---|---|---|---|---|
| 6 | 16 | 128 | 3 | 30,192 | 32,796 |
| 8 | 16 | 128 | 5 | 49,216 | 61,648 |
| 6 | 32 | 256 | 3 | 97,248 | 104,508 |
| 6 | 32 | 256 | 5 | 119,232 | 140,092 |
| 8 | 32 | 256 | 5 | 147,584 | 175,184 |
| 8 | 64 | 512 | 5 | 491,776 | 557,904 |
| 8 | 64 | 1024 | 5 | 975,104 | 1,082,192 |

The window delayers hold 18–46 % of the memory. They are plain FIFOs, so
they can move off-chip if on-chip memory is short. The published figures
report a pixel clock of 73–82 MHz on Altera FPGAs. This RTL has
not been timed.

Each configuration of that table is a parameter override, e.g.
`-GDL=64 -GN=1024`. One pixel per clock means 128 x 128 frames at
150 frames/s need only a 2.5 MHz pixel clock.

## Departures and own choices

* **Handshake, reset and borders** are not part of the original
  description. They are chosen here: `in_valid` without sync, asynchronous
  reset, zero history and unclipped windows.
* **Second FIFO of the correlator.** It holds 2n+1 column sums, the length
  the window recursion needs. The original text describes both correlator
  FIFOs as holding N column sums.
* **Comparator.** A pipelined tree with lower-disparity-wins ties. The
  original comparator is described only as FIFOs, comparators and
  multiplexers choosing the minimum.
* **Reduction.** It truncates (shift right) and does not round.
* **Reference image.** The left image is the reference. Only the direction
  of the displacement is selectable (`CROSS_AHEAD`). Other camera
  arrangements (convergent rigs, right reference) are obtained by swapping
  or mirroring the inputs outside.
* **Added ports.** The centre coordinates `out_x`/`out_y` and `out_corr`
  are additions.
* **Not built.** Systems made of several processors are not built:
  multi-scale (one processor per window size), multi-baseline (one per
  camera pair) and colour (one per channel). The rule for combining their
  outputs is not specified. Each member of such a system is an `rtsvp`
  instance with its own parameters.

## Files

`rtl/`, one module or package per file:

* `rtsvp_pkg.sv`: defaults and width functions.
* `delay_fifo.sv`: the circular-buffer delay line used for all FIFOs.
* `cwd.sv`: the window delayers.
* `sdc_ad.sv`, `sdc_vc.sv`, `sdc_c.sv`, `sdc.sv`: the correlator and its
  sub-blocks.
* `dc.sv`: the comparator.
* `lr_check.sv`: the left-right check.
* `rtsvp.sv`: the top level.

`tb/`: every block has a self-checking testbench `tb_<block>.sv`. Each one
compares against values computed independently in the testbench, checks
latencies and has a watchdog. Each prints
`TB_RESULT checks=<n> failures=<n>`.

* `tb_rtsvp.sv` runs three reduced processors end to end:
  * 16 x 12 frames, 8 disparities, 3 x 5 window;
  * both displacement directions, plus one with the left-right check;
  * four frames of a generated scene: random texture with a background
    plane and a nearer square;
  * every result is checked against a direct SAD evaluation;
  * it also counts that blanking gaps, frame wrap, comparator ties, both
    extreme disparities and passing and failing left-right checks all occur.
* `tb_rtsvp_full.sv` runs the default configuration over one full
  256 x 256 frame and checks every result. About 92 % of interior pixels
  recover the scene's true disparity.
* `tb_rtsvp_configs.sv` runs all seven published configurations of the
  cost table above, plus one colour channel (D_L = 16, N = 256), side by
  side. Each uses its own `rtsvp_cfg_run.sv` driver and checks sampled
  results against a direct SAD evaluation.
  * The 128- and 256-pixel configurations get a full frame.
  * The 512- and 1024-pixel configurations get a band of 40 and 24 lines.

To simulate with Verilator 5 (run from the folder that holds `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/rtsvp_pkg.sv tb/tb_rtsvp.sv --top-module tb_rtsvp -o sim
./obj_dir/sim
```

Replace `tb_rtsvp` with any other testbench name. The full-size run takes
about 15 seconds. To lint the RTL, run
`verilator --lint-only -Wall -Irtl rtl/rtsvp_pkg.sv rtl/rtsvp.sv`.
