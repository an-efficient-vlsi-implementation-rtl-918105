# Sobel edge detector and radix-2 Montgomery multiplier

This design has two pieces of hardware for a low-cost vision and security
device. They sit side by side on one clock:

* a **pipelined Sobel edge detector**. It holds a grey-level picture in
  on-chip RAM and turns it into an edge map at one pixel per clock.
* a **bit-serial Montgomery modular multiplier (MMM)**. It computes
  `A·B·2^-K mod M`, the core operation of prime-field elliptic-curve
  cryptography. It has a single adder in its loop and no subtractor.

The published design presents the two together, but it never defines a
signal that passes from one to the other. The Sobel masks need no
multiplier. So the top level `edge_mmm_top` gives each unit its own ports,
and the two share only `clk` and `rst_n`.

All code is synthesizable SystemVerilog-2017. Every RTL file starts with a
comment that gives its function, its timing, and which parts come from the
published design and which are choices made here.

## The Montgomery multiplier (`mmm`, `mmm_ctrl`)

### The recurrence

For an odd modulus `M < 2^K`, an operand `B < M` and any K-bit `A`, the
radix-2 Montgomery product is computed one bit of `A` at a time:

```
Z = 0
for i = 0 .. K-1:
    q = Z[0] xor (a_i and B[0])     -- makes Z + a_i*B + q*M even
    Z = (Z + a_i*B + q*M) >> 1
P = Z                                -- P ≡ A·B·2^-K (mod M), 0 <= P < 2M
```

Each step adds one of only four values, and the pair `(a_i, q)` picks which
one:

| a_i | q | addend |
|-----|---|--------|
| 0   | 0 | 0      |
| 0   | 1 | M      |
| 1   | 0 | B      |
| 1   | 1 | B + M  |

The design's main idea is to form `B + M` **once**, when the operands are
loaded. The loop then needs a 4-way multiplexer, one (K+2)-bit adder and a
wired one-bit shift. There is no second adder, no multiplier and no
subtractor in the critical path.

### Datapath

```
          +-----------+  a_i
   A ---->| mmm_ctrl  |----------+
          | shift reg |          v
          | + counter |     q = z0 ^ (a_i & b0)
          +-----------+          |
   B ---> b_q ---------------+   |  sel = {a_i, q}
   M ---> m_q ------------+  |   v
   B+M -> bm_q (at load)  |  |  MUX(0, M, B, B+M) --> (+) --> Y[K+1:0] --> >>1 --> Z[K:0] = P
                          |  |                        ^                            |
                          +--+------------------------+----------------------------+
```

* `b_q`, `m_q`: K-bit operand registers. `bm_q`: the (K+1)-bit precomputed
  sum.
* `Y` is the (K+2)-bit sum (bits `K+1..0`). `Z`, the result register `P`,
  has K+1 bits (`K..0`). These ranges follow the published datapath
  drawing.
* `mmm_ctrl` holds `A` in a shift register, supplies `a_i` (LSB first) and
  counts the K iterations.

### No final subtraction

The textbook algorithm ends with `if Z >= M: Z -= M`. This design leaves
that step out. The result is therefore **correct modulo M but may equal the
reduced value plus M**: `P < 2M`, and it is K+1 bits wide. If `P` is fed
back as operand `B`, reduce it below `M` first, because `B < M` keeps `Z`
below `2M`. The multiplier does not check `B < M` or that `M` is odd. An
assertion flags an odd partial sum, which an even modulus would cause.

### Timing and handshake

* `start` is accepted only while `busy` is low. Taking `start` samples `a`,
  `b` and `m` and registers `B+M`.
* If `start` is high in clock cycle 0, iterations run in cycles 1..K and
  `done` pulses in cycle **K+1**.
* `p` then holds until the next accepted `start`.
* A `start` while busy is ignored.
* At K = 256 one product takes 257 clocks.

## The Sobel edge detector (`sobel_edge`)

### What it computes

For each interior pixel `(x, y)` the detector uses its 3×3 neighbourhood
`p[r][c]`, where `r = 0` is the upper row and `c = 0` the left column:

```
Gx = (p00 + 2·p10 + p20) − (p02 + 2·p12 + p22)     mask  1 0 -1 / 2 0 -2 / 1 0 -1
Gy = (p20 + 2·p21 + p22) − (p00 + 2·p01 + p02)     mask -1 -2 -1 / 0 0 0 / 1 2 1
mag  = |Gx| + |Gy|
edge = mag > thresh
```

The true gradient norm is `sqrt(Gx² + Gy²)`. It is replaced by `|Gx|+|Gy|`,
which is cheap in hardware and never smaller than the norm. The weight 2 is
a shift, so the gradient unit is adders only. With 8-bit pixels, `Gx` and
`Gy` are 11-bit signed values and `mag` is an 11-bit unsigned value. None of
them can overflow.

### Pipeline

```
 wr port ─> image_ram ─> window_3x3 ─> sobel_grad ─> [Gx,Gy reg] ─> sobel_mag ─> [out reg]
            (stage 1)    (stage 2:      (comb.)       (stage 3)      (comb.)      (stage 4)
                          2 line buffers
                          + 3x3 regs)
     scan controller: raddr = 0 .. W·H−1, one per clock
```

1. **Load.** Write the picture through `wr_en/wr_addr/wr_data`, with
   `wr_addr = y·IMG_W + x`. Writes are not allowed while `busy`; an
   assertion checks this.
2. **Scan.** A `start` pulse makes the controller read the RAM in raster
   order, one pixel per clock. The RAM has a one-clock registered read.
3. **Window.** `window_3x3` keeps the two previous rows in line buffers. For
   each pixel it shifts its 3×3 register window left by one column. The new
   right column is the incoming pixel plus the two pixels above it. When the
   newest pixel `(x, y)` has `x ≥ 2` and `y ≥ 2`, the window is centred on
   `(x−1, y−1)`.
4. **Gradients and magnitude**, each followed by a register.

### Output stream

* Each interior pixel (`1 ≤ x ≤ W−2`, `1 ≤ y ≤ H−2`) comes out **exactly
  once**, with `out_valid`, `out_x`, `out_y`, `out_mag` and `out_edge`.
* The one-pixel border has no full neighbourhood and is not emitted. A
  consumer that builds an image should fill the border with 0.

### Timing

* If `start` is high in cycle 0, `done` pulses in cycle **W·H + 4**, together
  with the last result.
* `busy` covers cycles 1 to W·H+4.
* At 256×256 a frame takes 65,540 clocks.
* `thresh` must stay stable during a frame.
* A `start` while busy is ignored.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `edge_mmm_top`, `sobel_edge`, `window_3x3` | `IMG_W`, `IMG_H` | 256, 256 | picture size |
| `edge_mmm_top`, `mmm`, `mmm_ctrl` | `K` | 256 | operand width |
| `image_ram` | `DEPTH` | 65536 | pixels |
| `sobel_pkg` | `PIX_W` | 8 | pixel bits; `GRAD_W = MAG_W = PIX_W+3` |

Derived widths (`AW`, `XW`, `YW`, `CW`) default to the matching `$clog2`. The
published design gives none of these numbers: no image size, no pixel width
and no operand width. The defaults were chosen here:

* 256×256 is the size of common test pictures such as the camera-man image.
* 256 bits is a usual prime-field ECC size.

`IMG_W` need not be a power of two. Change `K` and the picture size freely.
Memory grows as `IMG_W·IMG_H·8` bits for the frame store plus `2·IMG_W·8`
bits for the line buffers.

## How far it follows the published design

These parts follow the published design:

* the Sobel masks and the Gx/Gy assignment;
* the flow: picture in RAM, window extraction, x/y gradients, then
  magnitude, pipelined;
* the radix-2 MMM with a precomputed `B+M`, one adder in the loop and no
  final subtraction, organised as in its datapath drawing (control unit,
  4-input MUX with a zero input, `Y` register of `k+1..0`, `>>1`, output
  register of `k..0`).

These are choices made here, because the published design is silent on them:

* all widths and sizes (see above);
* `|Gx|+|Gy|` as the "approximation" of the magnitude;
* the run-time threshold and the strict `>` comparison;
* dropping the border pixels, with coordinates attached to each output;
* the RAM's write port. In the published flow the picture is prepared as a
  text file by an offline script. Here it is written through a port;
* the stage boundaries of the pipeline;
* the `q` select logic, which is the standard radix-2 rule;
* `start`/`busy`/`done` handshakes and an asynchronous active-low reset.

These parts are not included:

* the offline image preparation (colour to grey to binary, resize), which is
  software;
* the segmented variant of the multiplier, which is only named;
* a pulse-width-modulation output, which is mentioned once with no
  specification;
* separate "multiplication" and "modulo" units. Only their names are known,
  and the reduction that exists is the one inside the MMM.

The published design also speaks of a *binary* picture, while its example
results are grey. The detector takes 8-bit grey pixels. Load a binary
picture as 0/255.

## Verification

Each RTL module has a self-checking testbench in `tb/`. Reference results
come from `tb/tb_ref_pkg.sv`:

* an integer Sobel model;
* a Montgomery check: `P·2^K ≡ A·B (mod M)` and `P < 2M`, evaluated with
  wide integer arithmetic rather than by re-running the recurrence.

| testbench | what it covers |
|---|---|
| `mmm_tb` | corner operands (0, 1, all-ones, `B = M−1`, `M = 3`, `M = 2^K−1`) and 40 random 256-bit products; latency K+1; start while busy; all four addends used |
| `mmm_ctrl_tb` | bit order of `a_i`, K steps, `last`, latency, start while busy |
| `image_ram_tb` | write/readback, read latency, read-during-write returns old data |
| `window_3x3_tb` | three 9×7 frames with random gaps in `in_valid`, every window and centre, a `clear` between frames |
| `sobel_grad_tb`, `sobel_mag_tb` | random and extreme windows and gradients, threshold at `mag` and `mag−1` |
| `sobel_edge_tb` | 16×12 picture, two frames, every output pixel, exactly-once coverage, `done` at W·H+4 |
| `edge_mmm_top_tb` | whole design at default size (256×256, K = 256), see below |

`edge_mmm_top_tb` runs the whole design with no parameter overridden:

* It loads a generated 256×256 picture (disc, rectangle, ramp, noise).
* It runs two frames at different thresholds and checks all 64,516 output
  pixels.
* Meanwhile it keeps the multiplier running on several hundred random
  256-bit products, checking each one.
* It counts each mechanism and fails if one never happened: load, frame,
  edge and non-edge pixels, a start refused while busy, both units busy
  together, and each addend.

It simulates in a few seconds.

### Running with Verilator

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sobel_pkg.sv tb/tb_ref_pkg.sv tb/edge_mmm_top_tb.sv --top-module edge_mmm_top_tb
./obj_dir/Vedge_mmm_top_tb
```

Replace the testbench file and top name to run another testbench. Each one
prints `TB_RESULT checks=N failures=F` and ends with `$finish`. Lint with:

```
verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl rtl/sobel_pkg.sv rtl/edge_mmm_top.sv
```

`-Wno-fatal` is needed because lint reports two kinds of warning, both
expected:

* `SYNCASYNCNET`, because the reset is used both as the flip-flops'
  asynchronous reset and in the assertions' `disable iff`;
* `PINCONNECTEMPTY`, for the `last` output of `mmm_ctrl`, which `mmm` does
  not use.

## Files

| file | content |
|---|---|
| `rtl/sobel_pkg.sv` | pixel, gradient, magnitude and window types |
| `rtl/image_ram.sv` | frame store, 1 write + 1 registered read port |
| `rtl/window_3x3.sv` | line buffers and 3×3 window |
| `rtl/sobel_grad.sv` | Gx, Gy |
| `rtl/sobel_mag.sv` | \|Gx\|+\|Gy\|, threshold |
| `rtl/sobel_edge.sv` | scan controller and pipeline |
| `rtl/mmm_ctrl.sv` | multiplier control unit |
| `rtl/mmm.sv` | Montgomery multiplier datapath |
| `rtl/edge_mmm_top.sv` | top level |
| `tb/*.sv` | testbenches and `tb_ref_pkg` |
