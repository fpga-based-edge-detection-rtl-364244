# Subpixel edge detection front end: gradient, second directional derivative and gradient histogram at one pixel per clock

Subpixel edge extraction locates an edge where the second derivative of the
image, taken along the direction of the gradient, crosses zero, and keeps only
edges whose gradient is strong enough. Finding those edges (scanning for start
points, tracing contours) is cheap once three images are known for every
pixel:

* the gradient `dx`, `dy`;
* the second directional derivative along the gradient

  ```
        dxx*dx^2 + 2*dxy*dx*dy + dyy*dy^2
  R  =  ---------------------------------
                 dx^2 + dy^2
  ```
* a histogram of the gradient magnitude `floor(sqrt(dx^2 + dy^2))`, from which
  the tracing software picks a threshold that leaves a fixed number of pixels
  below it (an adaptive threshold that works without knowing the contrast).

This RTL computes all three in one streaming pipeline that takes one 8-bit
pixel per clock. The derivatives are Sobel operators; the second derivatives
are Sobel operators applied again to `dx` and `dy`. The design follows the
FPGA design described in *FPGA-Based Edge Detection with Subpixel Accuracy*
(VirtexE600, 80 MHz); the contour tracing that consumes its results runs in
software and is not part of it.

```
 pix ─► window ─┬─► Sobel X ─► dx ─► window ─┬─► Sobel X ─► dxx ─┐
                │                            ├─► Sobel Y ─► dxy ─┤
                │                            └─► centre, delay 4 ─► dx ─┤
                └─► Sobel Y ─► dy ─► window ─┬─► Sobel Y ─► dyy ─┤
                                             └─► centre, delay 4 ─► dy ─┤
                                                                        ▼
                                   ┌────────────── derivator (32 steps) ─► R
                                   └─ dx²+dy² (10) ─► sqrt (3) ─► delay 19 ─► gradient ─► histogram
 output mux (per frame): pixel | dx | dy | R ─► pix_out
```

## Steps, latencies and frames

Every register of the datapath is enabled by one signal, `ce`, produced by the
control unit `pipe_ctrl`. One enabled clock is a *step*: one pixel enters and
every partial result moves one stage on. Because nothing moves without a step,
all latencies are counted in steps and hold however irregularly pixels arrive.

A frame is `HRES*VRES` input steps followed by `2*HRES+44` flush steps. During
the input part a step happens whenever `pix_in_valid` is high (`pix_in_ready`
is high); during the flush `pix_in_ready` is low, a zero pixel is pushed each
clock, and the last pixels' results come out. Each output stream delivers
exactly `HRES*VRES` values per frame, in pixel order, each flagged by a
one-clock valid pulse.

| stream | latency in steps after its pixel's input step |
|---|---|
| `pix_out`, mode 0 (pixel) | 0 |
| `pix_out`, modes 1/2 (`dx`/`dy`) | `HRES + 6` |
| `pix_out`, mode 3 (`R`) | `2*HRES + 44` |
| `gradient` (and histogram input) | `2*HRES + 43` |

These follow from the parts: a 3x3 window puts its centre `HRES+1` steps
behind the newest pixel, a Sobel unit takes 4 steps, the derivator 32, the
square root 3, and the output multiplexer is one register.

At the default size (1024 x 256) a frame takes 262,144 + 2,092 = 264,236
clocks with a continuous input, 3.3 ms at 80 MHz.

## The 3x3 window: line memories as rings (`neighbourhood`, `shift_mem`)

The window around pixel `phi` spans pixels `phi-HRES-1 .. phi+HRES+1`, a
register chain `2*HRES+3` long. Each window row is three registers (`A?3`
newest, `A?1` oldest); the other `HRES-3` pixels of each line live in a
`shift_mem`, so every line-to-line link is exactly `HRES` steps long.
`win[r][c]` is tap `A(r+1)(c+1)`; `win[1][1]` (A22) is the centre.

`shift_mem` is a delay line of `DEPTH` steps on a simple dual-port RAM of
`DEPTH` words. A write counter starting at 0 and a read counter starting at 1
both advance on each step, wrapping at `DEPTH`, so the reader trails the
writer by `DEPTH-1` words; with the RAM's registered read port the total is
`DEPTH` steps, the same as `DEPTH` chained registers. A same-address read and
write returns the old word (read first), which the one-word gap relies on.
`DEPTH` must be at least 2, so `HRES` at least 5.

Borders are not special-cased: at the left and right edges the window wraps
onto the neighbouring line, and the top lines of a frame see the previous
frame's tail (zeros from the flush). Pixels whose windows touch the border
therefore have meaningless derivatives; the published description does not treat
borders either.

## Sobel units (`sobel`)

`dx = ((A13-A11) + 2(A23-A21) + (A33-A31)) / 8` and
`dy = ((A31-A11) + 2(A32-A12) + (A33-A13)) / 8`, so `dx` is right minus left
and `dy` bottom minus top. The kernel needs no multiplier: the factor 2 is a
shift and the zero column/row is never read. Four stages: extend the six taps
to 11 bits (zero-extension for pixels, sign-extension for derivatives, chosen
by `IN_SIGNED`) and double the middle pair; three subtractions; add the outer
two; final sum. `result_x8` is the sum, `result` the sum shifted right by 3
arithmetically (rounding toward minus infinity). For 8-bit inputs of either
kind the result lies in -128..127, so every derivative in the design is an
8-bit two's-complement number.

## The second directional derivative (`derivator`)

The expression needs six products and one division per pixel. The multipliers
and the divider are unsigned, so the pipeline converts to sign-magnitude
before them and back to two's complement after, tracking the signs beside the
data. `|v|` of an 8-bit value fits 8 unsigned bits (|-128| = 128).

| stage | steps | work |
|---|---|---|
| 1 | 1 | two's complement to sign-magnitude for `dx dy dxx dxy dyy` |
| 2 | 3 | `A = dx^2`, `B = dy^2`, `C = abs(dx*dy)` on 8x8 multipliers; sign of C = sign dx XOR sign dy |
| 3 | 4 | `D = A*abs(dxx)`, `E = B*abs(dyy)`, `F = C*abs(dxy)` on 8x16 multipliers |
| 4 | 1 | `D E F` back to two's complement (27 bits) |
| 5 | 1 | `M = D + E`, `N = 2F`, `Q = A + B` (Q is `gradient_sqr`) |
| 6 | 1 | `P = M + N` |
| 7 | 1 | `P` to sign-magnitude; note whether `Q = 0` |
| 8 | 19 | `abs(P) / Q` in the array divider |
| 9 | 1 | apply the sign; `R = 0` when `Q = 0` |

Total: 32 steps. `R` is a 20-bit signed number truncated toward zero. Since
`abs(P) <= 128*(abs(dx)+abs(dy))^2 <= 256*Q`, `abs(R)` never exceeds 256 and
the 19-bit quotient never overflows. When `dx = dy = 0` the quotient is
undefined (the divider returns all ones); this design outputs 0 there, which
is also what a flat region should give.

**Tree multiplier (`pipe_mult`).** Operand `b` of width `WIDTH_B` selects
`WIDTH_B` partial products `a << j`. They are the leaves of a complete binary
tree held as one vector: node `i` adds nodes `2i` and `2i+1`, the leaves are
nodes `WIDTH_B .. 2*WIDTH_B-1`, the product is node 1. Each internal node is a
register, so the latency is `log2(WIDTH_B)` steps (3 for 8 bits, 4 for 16)
and a new product can start every step. `WIDTH_B` must be a power of two.

**Array divider (`pipe_div`).** One stage per quotient bit, most significant
first: stage `k` subtracts `b << (QW-1-k)` from the running remainder; if the
difference is not negative it becomes the new remainder and the bit is 1,
otherwise a multiplexer passes the old remainder on (no restoring addition).
The divisor and the partial quotient travel with the remainder. The result
`floor(a/b)` is exact whenever `a < b * 2^QW`.

## Integer square root from small tables (`sqrt_lut`)

`gradient_sqr` is at most 2*128^2, too large for one lookup table. Above
x = 256 the slope of `sqrt` is below 1/32, so over any 32 consecutive values
the integer root rises at most once; above 16384 the same holds for 128
values. Each range therefore needs a table of the root at the start of each
block plus a table of where inside the block the root steps up:

```
x < 256            r = V1[x]
256 <= x < 16384   k = x[13:5]   r = V2[k] + (x[4:0] >= C2[k])
16384 <= x         k = x[15:7]   r = V3[k] + (x[6:0] >= C3[k])

V2[k] = floor(sqrt(32k))    C2[k] = (V2[k]+1)^2 - 32k
V3[k] = floor(sqrt(128k))   C3[k] = (V3[k]+1)^2 - 128k
```

The five tables (256 + 4 x 512 words) are computed at elaboration by
constant functions and read as registered ROMs. Three steps: read all tables
and register `x`; compare and add the two corrections; select by range. The
result is the exact `floor(sqrt(x))` for every 16-bit `x` (the testbench
checks all 65,536).

## Histogram at one value per clock (`histogram`)

Counting a value means read `hist[p]`, add one, write `hist[p]`. At one value
per clock these three steps overlap, on a dual-port RAM (read port for
stage 1, write port for stage 3), and two read-after-write hazards appear:

* **`[x x]`**: the same bin twice in a row. When the second value reaches the
  adder, the first value's new count is still in the stage-3 register.
  A comparator between the stage-2 and stage-3 bins *forwards* that count.
* **`[x y x]`**: the same bin two values apart. The second read happens in the
  very cycle the first value's count is written, and returns the old count.
  A comparator between the address being read and the address being written
  catches this; the count being written is saved in a bypass register and
  used instead (*bypassing*).

Forwarding wins when both apply (`[x x x]`), having the newer count.
`fwd_hit` and `byp_used` show when each path is taken.

A small control unit keeps a valid bit per stage; `hist_ready` is high when no
value is in flight. A host then reads bins (`hist_raddr`, `hist_ren`, data on
`hist_rdata` one clock later) and writes them (`hist_waddr`, `hist_wdata`,
`hist_wen`), e.g. to clear all 256 bins between frames. The RAM is not reset:
clear it before the first frame. In `edge_top` the histogram counts the
`gradient` stream, 256 bins of up to `HRES*VRES` counts.

## Top level (`edge_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of the control state and address counters |
| `pix_in`, `pix_in_valid`, `pix_in_ready` | in/in/out | 8/1/1 | raster pixel stream; a pixel is taken when valid and ready |
| `mode` | in | 2 | output select, sampled at each frame's first pixel: 0 pixel, 1 dx, 2 dy, 3 R |
| `pix_out`, `pix_out_valid` | out | 20/1 | selected stream, signed (pixel zero-extended, dx/dy sign-extended) |
| `gradient`, `gradient_valid` | out | 8/1 | `floor(sqrt(dx^2+dy^2))`, aligned with R |
| `frame_done` | out | 1 | pulse after a frame's last flush step |
| `hist_*` | | 8/1/19/8/19/1/1 | histogram host ports, see above |

Parameters: `HRES` (line length, default 1024), `VRES` (lines per frame,
default 256), `PIX_W` (8; the 20-bit output and the square-root input assume
8). The multiplexer's inputs are not brought to a common latency; instead
`pix_out_valid` uses the latency of the selected source, so mode 0 is a pure
pass-through of the input pixels.

## Where this design fills in or departs from the published description

* Frame height `VRES` = 256 is chosen so one frame is close to the reported
  3.2 ms at 80 MHz; only the line length 1024 is given.
* The control unit (step enable, flush, valid pulses, input handshake) is this
  design's own; the original only states that one loads and flushes the
  pipeline.
* The histogram is fed from the square-root output; the published top-level
  drawing does not show where it connects. The bypass register, host-port
  timing and priorities are this design's.
* The multiplexer's select encoding and its inputs other than the pixel and R
  (read as dx and dy) are this design's reading.
* The square root's middle range runs up to 16384, following the published
  pipeline drawing; the published algorithm listing switches at 8192. Both
  give the exact root.
* The fourth Sobel stage is the registered input extension; the published
  drawing shows three register columns for a four-stage unit.
* `R = 0` for a zero gradient, rounding of `/8` toward minus infinity and of
  `R` toward zero, and the synchronous reset are this design's choices.
* The PCI link to the host and the software contour tracing are outside the
  RTL; the pixel and result streams are plain ports.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Reference results come from an independent
model: `tb_edge_model` recomputes dx, dy, the second derivatives, R and the
gradient directly from the pixel stream with integer arithmetic.

* `tb_edge_top`: five 16x6 frames, one per mode plus a back-to-back R frame,
  random input gaps; checks every output, the histogram after each frame,
  the R latency (2*HRES+44 steps) and the frame time, and that stalls,
  flushes, all four modes, forwarding, bypassing and zero divisors all occur.
* `tb_edge_full`: the top at its default size, two 1024x256 frames (about a
  second with Verilator).
* unit tests: `tb_dual_port_ram`, `tb_shift_mem`, `tb_delay_line`,
  `tb_neighbourhood`, `tb_sobel`, `tb_pipe_mult`, `tb_pipe_div`,
  `tb_derivator` (random inputs incl. extremes and zeros, latency 32 and 10),
  `tb_sqrt_lut` (all 16-bit inputs), `tb_histogram` (hazard-rich streams),
  `tb_pipe_ctrl`.

With plain Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_edge_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/edge_pkg.sv tb/tb_edge_model.sv \
  tb/tb_edge_top.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Other testbenches build the same way with their own `--top-module` and file
(`tb_edge_model.sv` is needed only by the two top-level tests). Running with
random initial values (`+verilator+rand+reset+2`) checks that nothing depends
on uninitialised state: the testbenches clear the histogram and ignore
results whose window reaches before the start of the stream.

## Files

`rtl/edge_pkg.sv` (shared enums and latencies), `edge_top`, `pipe_ctrl`,
`neighbourhood`, `shift_mem`, `dual_port_ram`, `sobel`, `delay_line`,
`derivator`, `pipe_mult`, `pipe_div`, `sqrt_lut`, `histogram`; testbenches
`tb/tb_<module>.sv`, `tb/tb_edge_full.sv` and the model `tb/tb_edge_model.sv`.
