# Lifting-based wavelet transform IP: 2-D DWT/IDWT and 3-D DWT on a low-power multiplier

This is synthesizable SystemVerilog for a wavelet-transform engine for image
and video compression. It has two parts that share one arithmetic datapath:

* a **2-D DWT/IDWT** for 512 x 512 images. It is multilevel, works row by row
  and then column by column, and transforms the image in place in a frame
  memory. The inverse restores the image bit for bit;
* a **one-level 3-D DWT** for 8 x 8 x 8 video blocks (eight frames of 8 x 8
  pixels) with the 9/7 wavelet.

Both are built on the **lifting scheme**. A wavelet filter pair is split into
a short chain of "predict" and "update" steps. Each step adds a scaled sum of
two neighbours to a sample: `y = c + k*(a + b)`. Every multiplication in the
design goes through one kind of multiplier, a **modified BZ-FAD multiplier**.
It is a sequential shift-and-add multiplier, rearranged so that fewer nodes
toggle per cycle. The design trades speed for low switching activity: each
product takes 18 clock cycles (17-bit operands).

## The arithmetic: the BZ-FAD multiplier (`bzfad_mult`, `ring_counter`, `rca`)

A textbook shift-and-add multiplier of W-bit operands works like this. Each
cycle it tests the LSB of the multiplier register B, adds A to the
accumulator when that bit is 1, and shifts B and the accumulator right. A
binary counter stops it after W cycles. Most of its power goes into the
shifting and the counter. The BZ-FAD version removes both:

| textbook shift-and-add | `bzfad_mult` |
|---|---|
| B shifted right each cycle | B never moves. A one-hot ring counter walks over its bits, and mux **M1** picks bit `B[i]` |
| binary iteration counter | `ring_counter`: two bits change per step. Its last position ends the product |
| A added whenever the LSB is 1 | A feeds the ripple-carry adder (`rca`) directly |
| accumulator shifted when the bit is 0 | mux **M2** bypasses the adder: the upper partial product passes on with a 0 entering at its top |
| low product half shifted in bit by bit | bit *i* of the product is written into latch *i*, selected by the ring counter. The low half never shifts |

The ripple-carry adder is used because it has the fewest transitions per
addition of the usual adder styles. The adder really is built from full
adders.

What the reorganisation buys was measured in simulation (`tb_bzfad_normal`).
The test used 2000 products of normally distributed 8-bit operands (mean 128).
Results:

* The adder was bypassed in half of all iterations (8004 of 16000), exactly
  once per zero multiplier bit.
* The in-place low product half flipped 13,153 bits, against 27,717 for a
  low half that is shifted every cycle.
* The one-hot ring counter flipped about 32,000 bits, against 28,000 for a
  3-bit binary counter. Its benefit is decode-free bit selection, not fewer
  flips.

These are toggle counts, not power figures.

Timing: a `start` pulse (while `ready` is high) loads A and B. `done` pulses
exactly W + 1 clock edges later, and `p` holds the 2W-bit product. The block
defaults to W = 8, the size at which the multiplier was characterised for
power and area. The DWT datapath uses it at W = 17.

## One lifting step (`lift_step`)

`lift_step` computes `y = c ± round(k * (a + b))` with one BZ-FAD multiplier:

* Samples are 16-bit two's complement (`dwt_pkg::DW`). Coefficients are
  sign-magnitude with 12 fractional bits (`dwt_pkg::coef_t`), because the
  multiplier is unsigned.
* The sum `a + b` has 17 bits. Its magnitude times the coefficient magnitude
  is rounded half away from zero. The sign is set from the signs of the sum
  and the coefficient, and from `sub`.
* `sub = 1` subtracts instead of adds, which gives an inverse lifting step.
  The rounded product depends only on `a + b`, which is unchanged between the
  forward and inverse step. Results wrap modulo 2^16. Together these make
  forward followed by inverse an exact identity, whatever the rounding. This
  is why the 2-D IDWT is lossless.
* Latency: `done` comes CW + 2 = 19 cycles after `start`.
* A scaling step is the same operation with `b = c = 0`.

Coefficients (`dwt_pkg`, value × 4096 rounded):

| | alpha | beta | gamma | delta | zeta | 1/zeta |
|---|---|---|---|---|---|---|
| value | -1.58613 | -0.0529 | 0.882911 | 0.44350 | 1.1496 | 0.86987 |
| stored | -6497 | -217 | 3616 | 1817 | 4709 | 3563 |

## The line processor (`lift_line`): two processing elements, in place

This part takes the most care to understand. A `lift_line` holds one line of
up to `MAXN` samples in a buffer. The line is loaded serially through a
shift register: after n `shift_in` pulses, sample k sits at index k. Lifting
is done **in place**:

* even samples stay at even indices and become the low band `l(i)`;
* odd samples stay at odd indices and become the high band `h(i)`.

The line therefore comes out interleaved (l0 h0 l1 h1 …), and the caller
de-interleaves it when writing it back.

A line processor contains **two processing elements** (two `lift_step`s): a
predict processor and an update processor. They work in lock-step. In step
`s` both start together, each on a different sample pair:

| pass | element 0, pair k = s | element 1, pair k = s − 2 |
|---|---|---|
| `OP_FWD` | predict `h(k) = x(2k+1) + c1·(x(2k) + x(2k+2))` | update `l(k) = x(2k) + c2·(h(k) + h(k−1))` |
| `OP_INV` | `x(2k) = l(k) − c2·(h(k) + h(k−1))` | `x(2k+1) = h(k) − c1·(x(2k) + x(2k+2))` |
| `OP_SCALE` | `x(2k) = c1·x(2k)` (k = s) | `x(2k+1) = c2·x(2k+1)` (k = s) |

The second element trails by two pairs. Everything it reads has then been
written in an earlier step, and nothing it reads is overwritten in the same
step. At the line ends the samples are mirrored: `x(n) := x(n−2)` and
`h(−1) := h(0)`. A lifting pass over n samples takes n/2 + 2 steps, and a
scaling pass takes n/2 steps. Each step takes CW + 4 = 21 cycles: one issue
cycle, 19 cycles in the elements, and one write-back cycle. `done` follows
one cycle after the last step. Immediate assertions check the handshake rules:
no step is issued to a busy element, and no shift-in happens during a pass.

## 1-D 9/7 DWT (`dwt97_1d`)

The 9/7 transform is two predict/update pairs followed by scaling:

```
P1  d1(i) = x(2i+1) + alpha·(x(2i) + x(2i+2))      U1  a1(i) = x(2i) + beta ·(d1(i) + d1(i−1))
P2  d2(i) = d1(i)   + gamma·(a1(i) + a1(i+1))      U2  a2(i) = a1(i) + delta·(d2(i) + d2(i−1))
S   a(i)  = zeta·a2(i)                             d(i) = d2(i) / zeta
```

`dwt97_1d` runs these six stages in order on one `lift_line`:

1. a forward pass with (alpha, beta);
2. a forward pass with (gamma, delta);
3. a scaling pass with (zeta, 1/zeta).

For the 8-sample lines of the 3-D transform, a line takes
(3·4 + 4)·21 + 7 = 343 cycles from `start` to `done`.

## 2-D DWT/IDWT (`dwt2d_proc`)

One level of the forward transform works in two passes:

1. **Rows.** Each row is lifted with a single predict/update pair,
   `h(i) = x(2i+1) + alpha·(x(2i)+x(2i+2))` and
   `l(i) = x(2i) + beta·(h(i)+h(i−1))`, and written back as `[l | h]`.
2. **Columns.** Each column is lifted the same way. A column from the left
   (L) half gives `lh` (predict) and `ll` (update). A column from the right
   (H) half gives `hh` (predict) and `hl` (update).

The frame then holds four quadrants: `ll` top-left, `hl` top-right, `lh`
bottom-left, `hh` bottom-right. Level 2 repeats this on the `ll` quadrant,
and so on. The number of levels is a run-time input (1 … log2(N) − 1).

The inverse transform runs the levels in reverse order, with columns first
and then rows. Each line is read in interleaved order from the quadrant
layout, inverse-lifted (undo update, then undo predict) and stored in
natural order.

The processor has six processing elements:

* one `lift_line` for rows: the **two row processors**, predict and update;
* two `lift_line`s for columns: the **four column processors**. They handle
  an L column and the matching H column at once, on frame-memory ports A
  and B.

Rows and columns are not overlapped: the column pass of a level starts when
its row pass has finished.

Cycle count of a run:
`1 + Σ over levels (n + n/2) · (2n + 4 + (n/2 + 2)·21)`, with n = 512 >> level.
A 2-level forward or inverse transform of a 512 x 512 image takes
**6,196,993 cycles**: 31 ms at 200 MHz.

## 3-D DWT (`dwt3d`, `dwt3d_stage`)

The 3-D transform is three 1-D 9/7 transforms, one along each axis:

* x, along a row;
* y, down a column;
* z, across the eight frames, the time axis.

Each axis has its own `dwt3d_stage`, which holds a `dwt97_1d`. Between the
stages, intermediate memories reorder the data, because each axis reads the
previous result in a different order:

```
input memory → x stage → memory X → y stage → memory Y → z stage → output memory
```

Each stage writes the low half of every line to axis coordinates 0–3 and the
high half to 4–7. The eight sub-bands end up as octants of the output
volume: LLL is x, y, z < 4 and HHH is x, y, z ≥ 4. The address of (x, y, z)
is `z·64 + y·8 + x`. The three stages run one after the other, and a block
takes 3·64·(2·8 + 1 + 343) + 4 = **69,124 cycles**.

Generic synthesis of `dwt3d` gives about 950 flip-flop bits of control and
datapath. The seven small memories come on top of that: the four 512 x 16
block memories and the three 8-sample line buffers. This is in the same range
as the roughly 1,150 registers that FPGA implementations of this 3-D scheme
are reported to use.

## The top (`dwt_idwt_top`) and its interface

The top holds the 2-D processor with its 512 x 512 x 16-bit two-port frame
memory (`bank_mem`), and the 3-D engine with its four 512-word memories. The
two run independently. All memory reads are asynchronous, and writes happen
on the rising clock edge. Reset (`rst_n`) is asynchronous and active low.
The data memories are not reset.

| port group | use |
|---|---|
| `img_we`, `img_waddr`, `img_wdata` | write the image (address `row·512 + col`) while `busy2d` is low |
| `img_raddr` → `img_rdata` | read the frame memory while `busy2d` is low |
| `start2d`, `inverse`, `levels` → `busy2d`, `done2d` | run a forward (`inverse` = 0) or inverse transform of `levels` levels, in place |
| `vol_we`, `vol_waddr`, `vol_wdata` | write the 8 x 8 x 8 input block |
| `vol_raddr` → `vol_rdata` | read the sub-band volume |
| `start3d` → `busy3d`, `done3d` | run the 3-D transform |

A typical 2-D use:

1. Load the pixels (8-bit values in 16-bit words).
2. Pulse `start2d` with `inverse = 0` and `levels = 2`, then wait for
   `done2d`.
3. Read the sub-bands in quadrant layout.
4. Optionally, pulse `start2d` with `inverse = 1` and the same `levels` to
   get the image back.

## Where this design departs from, or adds to, the architecture it implements

* **Speed.** The architecture it implements is reported at 200 MHz, with a
  latency of 1536 cycles for a 512 x 512 image and a computation time of
  `(4N²(1 − 4^−i) + 9N)/6`. A datapath whose multipliers need W + 1 cycles per
  product cannot reach those numbers. This design takes about 6.2 million
  cycles for two levels. No timing or power figure was measured.
* **One processor for DWT and IDWT.** The forward and inverse cores are
  merged into one processor with a mode input.
* **Choices not fixed by the architecture description**, and made here:
  * 16-bit samples and 12-bit coefficient fractions;
  * rounding half away from zero, with wrap-around on overflow;
  * symmetric extension at line ends;
  * a whole-line buffer with serial load;
  * a non-overlapped row/column schedule;
  * a two-port frame memory as the "memory banks";
  * in-place quadrant layout of the sub-bands;
  * axis order x, y, z and full-volume intermediate memories for 3-D;
  * the handshakes.
* **Scaling constant.** zeta is used as +1.1496, the usual 9/7 scaling
  constant. A negative zeta would only flip the sign of both bands.
* **2-D coefficients.** The 2-D transform uses the single predict/update pair
  (alpha, beta) of the 9/7 set, as its equations state. It is therefore not
  the full 9/7 filter, and it applies no scaling step.
* **Circuit-level measures.** The multiplier's pass-transistor versus mux
  implementation, and the XOR gates of the final multiplier version, are
  circuit-level details with no RTL counterpart beyond the muxes M1/M2.
* **Not built.** The convolution-based multipliers the BZ-FAD is compared with
  (shift-and-add, Booth, array, Wallace tree) are not part of the design.

## How far it is verified

Every module has a self-checking testbench in `tb/` that compares results
with models in `tb/dwt_ref_pkg.sv`. These models are integer lifting
reference models written separately from the RTL. The 9/7 line is also
checked against a floating-point 9/7 transform, to within ±3.

| testbench | what it covers |
|---|---|
| `tb_bzfad_mult` | 406 products, including corner cases. Checks the exact latency, that `ready` stays low while busy, and that a start while busy is ignored |
| `tb_bzfad_normal` | 2000 products of normally distributed operands. Checks the products and the bypass count, and compares bit flips with a shifting multiplier (see above) |
| `tb_rca` | all 2^17 cases |
| `tb_ring_counter` | 200 random clear/enable cycles |
| `tb_lift_step` | 300 forward steps with every coefficient. Checks that each inverse step restores `c` and checks the latency |
| `tb_lift_line` | lines of 2, 4, 10 and 16 samples: forward, inverse, scaling, exact round trip, cycle count |
| `tb_dwt97_1d` | 40 lines, compared with both reference models, plus the latency |
| `tb_bank_mem` | random two-port traffic |
| `tb_dwt2d_proc` | 16 x 16 frames at 1, 2 and 3 levels. Forward results are checked word by word, the inverse must restore the frame exactly, and the cycle formula is checked |
| `tb_dwt3d` | three 8 x 8 x 8 blocks. All 512 outputs are checked, high bands must be near zero for a constant block, and the cycle count is checked |
| `tb_dwt_idwt_top` | the whole IP through its ports only, with a 32 x 32 image (parameter override): 2-level DWT while the 3-D DWT runs, then IDWT, then a 1-level round trip. It also checks that each mechanism occurred: multiplier add and bypass, row and column passes, forward and inverse runs, a second level, each 3-D axis exactly once |
| `tb_dwt_idwt_top_full` | the same at the default sizes, 512 x 512 and 8 x 8 x 8: 2-level DWT, then IDWT. About 12.4 M cycles, roughly 20 s with Verilator |

What is not verified: timing closure, power and area, and behaviour for
inputs outside 8-bit pixels (for those, 16-bit wrap-around could in principle
occur after several levels).

## Files and how to simulate

`rtl/` holds one module or package per file:

* `dwt_pkg` (types, coefficients);
* `ring_counter`, `rca`, `bzfad_mult`;
* `lift_step`, `lift_line`, `dwt97_1d`;
* `bank_mem`, `dwt2d_proc`;
* `dwt3d_stage`, `dwt3d`;
* `dwt_idwt_top`.

`tb/` holds the testbenches and `dwt_ref_pkg`.

Any testbench runs with Verilator 5. List the packages first:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv rtl/*.sv tb/tb_dwt_idwt_top.sv \
  --top-module tb_dwt_idwt_top -Mdir obj && ./obj/Vtb_dwt_idwt_top
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`.

To change sizes:

* `N2D`/`N3D` on the top, or `N` on `dwt2d_proc`/`dwt3d`. Sizes must be
  powers of two.
* `DW` and `FRAC` in `dwt_pkg` for the sample and coefficient precision. The
  coefficient constants there are stored as values × 2^FRAC and must be
  recomputed if `FRAC` changes.
