# Inverse Haar transform processor: programmable 1-D core and 256 x 256 2-D system

This is synthesizable SystemVerilog for an inverse fast Haar transform (IFHT)
processor. It needs one adder/subtracter and stores only log2 N intermediate
words, because it reads its input coefficients in a special order.
The 1-D processor handles any length N = 2^n from 8 to 1024, chosen at run
time. It takes one coefficient per clock and delivers two output samples per
leaf cycle, in natural order. Around it sit:

- the chip wrapper, which puts both output samples on one bus driven at twice
  the processor rate;
- a 2-D processor for 256 x 256 images, built from two such chips and two
  64k x 16 RAMs used as ping-pong buffers.

## The transform

The normalised Haar functions of length N take values in {0, +1, -1}:

- H_0(i) = 1.
- For k > 0, let p = floor(log2 k), r = k - 2^p and L = N / 2^p.
  Then H_k(i) = +1 on [rL, rL + L/2), -1 on [rL + L/2, (r+1)L), and 0 elsewhere.

Forward and inverse transforms:

    X_k = sum_i H_k(i) x_i
    x_i = (1/N) sum_k A_k H_k(i) X_k,      A_0 = 1,  A_k = 2^p

The fast inverse is a tree of 2(N-1) additions and subtractions.

- X0 starts the tree.
- X1 splits it into a sum for the left half of the output and a difference
  for the right half.
- Each coefficient X_k at level p splits the value of its block once more,
  after scaling by 2^p.
- The sum and difference formed at a leaf (k >= N/2), divided by N, are the
  output samples x_{2j} and x_{2j+1}.

## Minimum-latency input order

The coefficients form a binary tree:

- X0 is the root, and X1 is its only child.
- X_k has the children X_2k and X_2k+1.
- The leaves are X_{N/2} ... X_{N-1}.

The processor reads the coefficients in **preorder** of this tree. For N = 8
the order is X0 X1 X2 X4 X5 X3 X6 X7. For N = 16 it is
X0 X1 X2 X4 X8 X9 X5 X10 X11 X3 X6 X12 X13 X7 X14 X15.

In this order, the value a coefficient must combine with is always one of
two things:

- **The sum just computed**, if the coefficient is a left child (even k, or X1).
  It is kept in one register, RSUM.
- **The most recent difference not yet used**, if it is a right child (odd k > 1).
  Differences wait on a last-in first-out stack.

The stack never holds more than log2 N - 1 differences. That is 9 registers,
R0..R8, for N = 1024. Apart from the output registers, these words plus RSUM
are the only storage. Outputs come out in natural order, and the first pair
is ready after log2 N + 1 coefficients.

## The data path, cycle by cycle

Each processor cycle takes one coefficient X_k. The shifter ASL[p] scales it
by 2^p. The adder/subtracter (A/S) then forms `operand + X_k*2^p` and
`operand - X_k*2^p` at the same time. What happens next depends on where k
sits in the tree:

| position of k          | operand (SELREG) | sum goes to  | difference goes to        | stack      |
|------------------------|------------------|--------------|---------------------------|------------|
| X0                     | none             | RSUM <= X0 (DIV2 = 1) | not used         | none       |
| X1 or left internal    | RSUM             | RSUM         | R0 (push)                 | push       |
| right internal         | R0               | RSUM         | R0 (overwritten)          | none       |
| left leaf              | RSUM             | output x_2j  | output x_2j+1             | none       |
| right leaf             | R0               | output x_2j  | output x_2j+1             | pull       |

Two right shifters, ASR[log2 N], divide both leaf results by N on the way to
the output registers: ROUT1 takes the even sample, ROUT2 the odd one.

This table shows the 8-point example with coefficients
X = {14, 20, -5, -15, 2, 5, 5, -16}, read as 14 20 -5 2 5 -15 5 -16:

| cycle | k | X_k·2^p | operand   | sum        | difference | stack after |
|-------|---|---------|-----------|------------|------------|-------------|
| 1     | 0 | 14      | none      | RSUM = 14  | none       | empty       |
| 2     | 1 | 20      | RSUM 14   | RSUM = 34  | -6 pushed  | -6          |
| 3     | 2 | -10     | RSUM 34   | RSUM = 24  | 44 pushed  | 44, -6      |
| 4     | 4 | 8       | RSUM 24   | 32/8 = 4 = x0  | 16/8 = 2 = x1 | 44, -6 |
| 5     | 5 | 20      | R0 44     | 64/8 = 8 = x2  | 24/8 = 3 = x3 | -6 (pull) |
| 6     | 3 | -30     | R0 -6     | RSUM = -36 | 24 into R0 | 24          |
| 7     | 6 | 20      | RSUM -36  | -16/8 = -2 = x4 | -56/8 = -7 = x5 | 24  |
| 8     | 7 | -64     | R0 24     | -40/8 = -5 = x6 | 88/8 = 11 = x7 | empty (pull) |

## Control: a counter and a cascade of elemental modules

Every control signal is derived from one counter, t, which counts the
cycles of the current transform and returns to 0 after N - 1. The
addressing generator (`haar_addr_gen`) turns t into the index k of the
coefficient of this cycle and its level p. It drives k on the address lines
ADD_0..ADD_9; for a given N, only the low log2 N lines ever change.

The generator is recursive, one stage per doubling of N:

- **Initial stage.** The 8-point sequence 0 1 2 4 5 3 6 7 is a table indexed
  by the three low counter bits.
- **Elemental module** (`haar_ctrl_stage`). It builds the 2N sequence from
  the N sequence, using the preorder structure. Positions 0 and 1 are X0 and
  X1. Positions 2..N are the left subtree under X2, and positions
  N+1..2N-1 are the right subtree under X3.
- **Subtree indices.** Each subtree repeats the N sequence without its X0,
  one level deeper. A node with binary index 1·rest becomes 10·rest on the
  left, which is k + 2^p. On the right it becomes 11·rest, which is
  k + 2^(p+1). Its level becomes p + 1.
- **Why each module needs only one register.** The left half lags the N
  sequence by one position, so the module feeds it through a one-cycle delay
  register. The N sequence repeats with period N, so the right half is the
  N sequence as it stands.
- **Length multiplexer.** Seven modules give the lengths 16 to 1024, and a
  multiplexer picks the sequence of the programmed length.
- **Extending the range.** A longer maximum length adds one module per
  doubling.

The data-path controller (`haar_dp_ctrl`) turns k and p into the control
word of the table above. A leaf is a node at level log2 N - 1. A right
child is an odd k greater than 1. The control word holds START, DIV2,
SELREG, WRITE, PUSH, PULL, the output strobe and the ASL amount.

The original control unit is described the same way: a counter, an initial
stage for N = 8, seven elemental modules and a multiplexer by length. The
gate-level contents of its stages are not available, so the stage logic
above is this design's own. It recursively generates the coefficient index
and level, and decodes the individual control signals from them. It does
not generate each control signal by its own recursion. The testbenches
check the address sequence against an independent preorder walk.

The length code `log2n` (3..10; other values are clamped) is sampled together
with X0. It may therefore change between consecutive transforms, with no idle
cycle.

## Timing

**Processor (`haar_ifht_proc`)**

- One coefficient is taken on every rising clock edge with `en` high.
- `add` is valid for the whole processor cycle, and `x_in` must be valid by
  the edge that ends the cycle.
- A transform of length N takes N cycles.
- Each output pair is registered. It is visible in ROUT1/ROUT2 (`x_even`,
  `x_odd`) for the processor cycle after its leaf coefficient, with `valid`
  set. The first pair appears log2 N + 1 cycles after X0.
- `ms` marks the last pair of a transform.

**Chip (`haar_ifht_chip`)**

- The chip is clocked at the output bus rate. An internal phase bit halves
  that rate to make the processor enable.
- During phase 0 the bus `dout` carries the even sample, during phase 1 the
  odd one. The processor takes its coefficient at the end of phase 1.
- `eo` marks every valid bus sample. `ms` marks the two samples of the last
  pair of a transform.
- `add` changes at the start of phase 0. An external memory therefore has two
  bus clocks to answer, which is enough for a registered read.
- `run` low holds the chip at X0 in phase 0.

## The 2-D processor (`ifht2d_top`)

The 2-D inverse transform is separable, and both passes use the same chip.
Take an S x S frame, S = 256, with coefficient c(l, k) stored at address
{l, k}. The chips compute:

    d(l, m)   = IFHT over k of c(l, ·)      chip 1, written to RAM at row m, column l
    pix(m, n) = IFHT over l of d(·, m)      chip 2, read row m in preorder of l

**Chip 1** fetches its coefficients through `coef_addr` = {line counter,
chip address}. It writes its output samples into the current write bank at
the **transposed** address {sample index, line}.

**Chip 2** reads the other bank at {row counter, chip address}. Its bus is the
output image in raster order.

**Bank swap.** The addressing circuit (`ifht2d_addr`) swaps the banks after
chip 1 has written the last sample of a frame. At the first swap it also
starts chip 2, so chip 2 always begins exactly at a frame boundary. Because
both chips take exactly S·S processor cycles per frame, frames stream back to
back.

**Latency.**

- The first pixel of frame 0 comes 2·S² + 2 + 2(log2 S + 1) bus clocks after
  reset.
- After that, each frame follows the previous one after 2·S² bus clocks.

**Output markers.** `row_end` (chip 2's `ms`) marks the last two pixels of a
row. `frame_end` marks the last pixel of a frame.

## Number formats and their limits

All data are two's-complement integers. The original description gives no
word widths, so these are this design's choices:

| quantity | width |
|----------|-------|
| chip input coefficient (`IN_W`) | 16 bits by default, 25 bits for chip 1 of the 2-D system (`COEF_W`) |
| output sample (`OUT_W`) | 16 bits |
| internal A/S, RSUM and stack word (`ACC_W`) | `OUT_W + 10` = 26 bits |
| 2-D intermediate RAM word | 16 bits, as in the original system |

- **Internal width.** For coefficients that are the transform of a signal
  fitting `OUT_W`, every intermediate value is bounded by N times an output
  sample, so 26 bits never overflow.
- **Other inputs.** Arbitrary inputs wrap modulo 2^26. The results are then
  still exactly `((sum_k A_k H_k(i) X_k) mod 2^26) >>> log2 N`, cut to 16 bits.
  The testbenches check this modular result.
- **Division by N** is an arithmetic shift, so it rounds towards minus
  infinity. It is exact for coefficients of integer signals.
- **2-D pixels are signed, from -127 to 127.** Pixels must be level-shifted
  this way. A first-pass value can reach 256 times a pixel, and only signed
  8-bit pixels keep it within the 16-bit RAM word. Unsigned 0..255 pixels
  would need 17 bits.
- **2-D coefficient width.** The 2-D coefficients of such an image need 25
  bits, which is why `COEF_W` = 25.

## Module hierarchy

    ifht2d_top            2-D processor (top)
      haar_ifht_chip x2   chip: processor + double-rate output bus
        haar_ifht_proc    1-D processor
          haar_addr_gen   counter, initial stage, length mux, ADD_0..ADD_9
            haar_ctrl_stage x7  elemental module (N -> 2N)
          haar_dp_ctrl    control word (haar_pkg::haar_ctrl_t)
          haar_asl        ASL[p] input scaling
          haar_addsub     A/S (two haar_csel_add carry-select adders)
          haar_rsum       RSUM and its input multiplexer
          haar_stack      R0..R8
          haar_asr x2     ASR[log2 N] output scaling
          haar_outreg     ROUT1, ROUT2, valid, last
      ifht2d_addr         counters and multiplexers of the 2-D system
      ifht2d_ram x2       64k x 16 single-port RAM, registered read
    haar_pkg              shared constants and the control-word struct

Every module's parameters default to the sizes above: N up to 1024,
9 stack registers, a 256 x 256 image and 64k x 16 RAMs. The stack, the
datapath widths and the image size are parameters.

The original chip's I/O pads are not modelled; the chip's ports stand for
them.

## Simulation

The testbenches in `tb/` check themselves. Each ends by printing
`TB_RESULT checks=N failures=M`. They need `tb/haar_ref_pkg.sv`, a reference
model written directly from the definition of H_k. The end-to-end tests also
need `tb/ifht2d_env.sv`, which generates frames and checks the pixels.

Example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/haar_pkg.sv tb/haar_ref_pkg.sv tb/tb_haar_ifht_proc.sv --top-module tb_haar_ifht_proc
    ./obj_dir/Vtb_haar_ifht_proc

| testbench | what it shows |
|-----------|---------------|
| `tb_haar_example8` | the 8-point example above, cycle by cycle: addresses, RSUM, R0, R1, stack depth and output pairs |
| `tb_haar_ifht_proc` | the 8-point example above; exact reconstruction and modular reference for every N from 8 to 1024; length changes between back-to-back transforms; the address sequence; latency log2 N + 1; N cycles per transform; random clock-enable stalls |
| `tb_haar_ifht_chip` | multiplexed bus order, `eo` and `ms`; transforms of N = 8, 16, 64, 256, 1024 back to back from a registered-read memory; first-sample latency; total cycle count |
| `tb_ifht2d_top` | 8 x 8 and 16 x 16 systems, three frames each (exact reconstruction of random images and a bit-exact reference for random coefficients); raster order, row and frame markers, latency, frame period; counts stack push, overwrite and pull, RSUM loads, output pairs, bank swaps, the second chip's start and odd bus samples, and fails if any never happens |
| `tb_ifht2d_full` | the default 256 x 256 system, two frames, same checks; runs in about a second after a 30-second build |
| others | one per unit: A/S, ASL, ASR, stack, RSUM, output registers, address generator, control decoder, RAM, 2-D addressing |

Assertions in the stack and the processor check the following:

- no stack overflow or underflow;
- an empty stack at the end of every transform;
- chip 1 is at a line end whenever the banks swap.

## Departures from the original description

**Control unit.** The counter-and-cascade structure follows the original,
but the contents of the initial stage and of the elemental modules are this
design's own. The recursion is applied once, to the coefficient index and
level, and the control signals are decoded from them (see "Control" above).

**Output latency.** Outputs are registered, so a pair appears one cycle after
its leaf coefficient: log2 N + 1 cycles after X0. The original timing diagram
shows the pair during the leaf cycle itself.

**Output bus.** The double-rate bus uses one bus-rate clock with an internal
divide-by-two, and the even sample comes first. The original does not say how
its double-rate clock is made.

**Added signals.** None of these come from the original description:

- `en` on the processor;
- `run` on the chip;
- `frame_end` on the 2-D system;
- the stack occupancy count.

**Assumed behaviour.** Word widths, rounding, reset (asynchronous,
active-low) and the 2-D address mapping (transposed write, ping-pong banks,
second chip started at the first swap) are this design's choices.

**RAMs.** The RAMs are plain arrays. In the original system they are
off-the-shelf memory chips.
