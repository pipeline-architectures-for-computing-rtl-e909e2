# Pipelined floating-point engines for 2-D image moments

The moment of order (m, n) of an N-line, M-column grey-level image f is

    M(m,n) = sum over x = 1..N, y = 1..M of  x^m * y^n * f(x,y)

where x is the line number and y the position in the line. Low orders give
area, centre of gravity and orientation. High orders feed moment invariants
for shape recognition. A direct evaluation costs (m+n) multiplications per
pixel. The values also grow like N^(m+1) * M^(n+1), so integer arithmetic runs
out of range after a few orders.

This RTL computes such moments on a stream of pixels arriving in raster
order. It contains two engines of one family of architectures:

* a **serial pipeline processor**: one power generator, one multiply and one
  accumulate. It handles one pixel per clock.
* a **parallel wavefront array** of BETA processing elements. It can also
  produce a whole set M(m,0) .. M(m,n) from one pass over the image.

Three ideas carry both engines:

1. **Powers by binary decomposition.** x^e is the product of the x^(2^i) for
   which bit i of e is set. A K-stage pipeline squares x at each stage and
   multiplies the selected squares into a running product. It delivers one
   power per clock after K clocks, for any exponent below 2^K.
2. **Factor the double sum.** M(m,n) = sum_y y^n * H_y, with
   H_y = sum_x x^m * f(x,y). For each line only one new x^m is needed. The
   y^n weights are applied once per column at the very end, not once per
   pixel.
3. **Tokens instead of a global schedule.** Every link between units is a
   small FIFO with a valid/ready handshake. A unit fires as soon as its
   operands are present. Irregular pixel timing, such as line and frame
   blanking, costs no input buffer, and units of different speed can be
   combined.

All arithmetic is IEEE-754 floating point. The format is set once in
`moments_pkg` and is binary64 by default (see *Number format*).

## Top level

`moments_top` puts the two engines side by side. They share only the clock,
the reset and the orders `m`, `n`. Each engine has its own pixel stream and
its own result stream.

| port group | signals | meaning |
|---|---|---|
| common | `clk`, `rst_n` (asynchronous, active low), `m`, `n` (K bits) | orders of the moment |
| serial | `s_pix_valid/ready`, `s_pix` (8 bits) | pixels, raster order |
| serial | `s_mom_valid/ready`, `s_mom` (fp_t) | one M(m,n) per image |
| parallel | `p_set_mode` | 0: one moment per image. 1: M(m,0) .. M(m,n) |
| parallel | `p_pix_valid/ready`, `p_pix` (8 bits) | pixels, raster order |
| parallel | `p_mom_valid/ready`, `p_mom` (fp_t) | one moment, or n+1 moments with g = 0 first |

Default parameters: `N = M = 1024`, `BETA = 8` (so MU = M/BETA = 128
columns per PE), `K = 4` (orders 0..15), `PIX_W = 8`. M must be a multiple
of BETA.

**Rule for configuration.** `m`, `n` and `p_set_mode` may change only
between images: after the last result of one image has been taken and
before the first pixel of the next one is offered. Images of the same
configuration can follow each other with no gap.

## Number format

`moments_pkg` defines `fp_t` from `FP_EXP_W` and `FP_FRAC_W`: 11 and 52
(binary64) by default, 8 and 23 for binary32. Everything, testbenches
included, follows these two constants.

The default is binary64 because of range. A 1024 x 1024 moment of 8-bit
pixels is about 1024^(m+n+2) * 255. That leaves binary32 at m + n <= 10,
while binary64 holds every order the K = 4 power core can produce (15, 15).
Binary32 halves the multiplier cost. If you switch to it, keep m + n small
and expect about 1e-4 relative error from accumulating a million terms.

`fp_mul` and `fp_add` are combinational. They round to nearest, ties to
even. For simplicity they flush subnormals to zero, return infinity on
overflow and never produce NaN. All values in this design are
non-negative, apart from an intermediate cancellation that cannot occur
here, so none of these corner cases arise in normal use. `int_to_fp` turns
counter values and pixels into fp_t.

## The power core (`power_core`, `power_core_pe`)

Stage i receives three things: the running product, x^(2^i), and the token's
exponent.

* One multiplier squares x^(2^i) for the next stage.
* The other multiplies the running product by x^(2^i). A multiplexer keeps
  that product when exponent bit i is 1, or passes the running product on
  unchanged when it is 0.

Each stage is registered, so the core has a latency of K clocks and
accepts a token every clock. It uses 2K multipliers.

Two details make the core reusable:

* **Per-token exponent and tag.** Every token carries its own exponent and
  a tag through the stages. x^m and y^n tokens can therefore be interleaved
  freely, and the tag says where each result must go.
* **Initial value.** The running product starts from an input `in_init`
  rather than from a fixed 1.0. The serial engine puts the pixel there and so
  gets f(x,y) * y^n from the core with no extra multiplier.

The whole core stalls when its last stage holds a result that nobody takes.

## Serial engine (`serial_moment`)

A line counter (1..N) and a slot counter (0..M) step through N*(M+1)
slots, one per clock:

* **Slot 0 of line x** computes 1.0 * x^m and stores it in the x^m
  register.
* **Slot y > 0** starts the core with the pixel f(x,y) and exponent n,
  giving f(x,y) * y^n.
* One more multiplier scales that by the stored x^m.
* One adder accumulates the products. The first pixel of an image replaces
  the accumulator instead of adding to it.

This is 2K + 1 multipliers and one adder. From the first slot of an image to
its result takes N(M+1) + K + 2 clocks: 1,049,606 clocks for a 1024 x 1024
image.

The x^m slot of a line is issued only once that line's first pixel is
present. This is what lets `m` and `n` change between images.

## Parallel engine (`parallel_moment`)

```
 pixels -> int_to_fp -> input buffer -> R_beta -> R_beta-1 -> ... -> R_1     (pixel routers)
                                          |          |               |
                                        queue      queue           queue
                                          v          v               v
 shared power core --x^m--> FIFO ----->  B_1  --->  B_2  --> ... --> B_beta --> moment(s)
        |                                 ^          ^               ^
        +--y^n--> R_beta -> ... -> R_1  (queues of MU+1 places, one per PE)
```

### Who gets which pixel

Router R_i keeps the first of every i tokens it receives for its own PE and
passes the other i-1 on. The chain R_BETA .. R_1 therefore deals a line out
round-robin. PE B_j receives columns j, j+BETA, j+2*BETA and so on: MU
columns per PE, spread across the whole line. Because a PE's share of each
line arrives early in the line, the input buffer can stay small (16 words
by default), even though the image comes in raster order. The y^n stream
is dealt out the same way, so B_j also receives exactly the weights of its
own columns.

### The PE B activity cycle (`pe_b`)

Each PE has one multiplier, one adder, MU accumulators H (one per owned
column), and a y buffer used in set mode. Its work per image comes in three
phases.

1. **Lines (N x MU operations).** At the start of each line the PE takes
   x^m from its left link and at once passes a copy to its right
   neighbour. For each of its MU pixels it then computes
   `H[k] <- H[k] + x^m * f`. On line 1 the old contents of H are ignored.
   At the end, H[k] is the column sum H_y for y = j + k*BETA.
2. **Dot product (MU operations).** It forms `P_j = sum_k yn_k * H[k]`,
   taking MU tokens from its y^n queue.
3. **Chain (1 operation).** It waits for the partial sum P_1 + .. + P_(j-1)
   to arrive on the same left link that carried x^m, adds P_j and sends the
   result right.
   * B_1 adds 0 instead of waiting.
   * B_BETA's result is the moment. B_BETA also does not pass x^m on.

Multiply and add form a two-stage pipeline: the product is registered and
added one clock later. Phase 1 therefore takes one pixel per clock. When the
phase changes, the PE waits one clock (the DRAIN state) so that the last
write to H or P has landed.

**Moment-set mode.** Phases 2 and 3 run n+1 times, for g = 0..n. The y
queue then carries the plain column numbers y, computed by the power core
with exponent 1.

* In pass 0 the PE copies these into its y buffer and forms
  P^(0) = sum H (the multiplier sees 1.0).
* In every later pass it replaces each H[k] by y_k * H[k] and accumulates
  the new values. After pass g the buffer holds y^g * H_y, so P^(g) is the
  g-th weighted sum.

B_BETA thus emits M(m,0), M(m,1), ..., M(m,n) in that order. The power core
never computes y^n in this mode. The extra time is (n+1)*(MU+1) clocks in
each PE, plus the ripple through the chain.

### The shared power core (`mod_power_core`)

x^m is needed once per line, and the y^n values are needed only after the
last line. One core therefore serves both streams:

* A y counter (1..M), an x counter (1..N) and a group counter (1..MU)
  choose what enters the core. Within each group of MU tokens the first
  MU-1 are y values with exponent n and the last is an x value with
  exponent m.
* Once the y counter is exhausted, only x values follow. If instead the x
  counter runs out first, the remaining y values follow.
* A one-bit tag rides through the core and steers its output to the x^m
  stream or the y^n stream.

Per image the core computes N + M powers instead of the N*M a per-pixel
scheme would need. It starts an image when that image's first pixel reaches
the head of the input buffer.

### Why it cannot deadlock

The y^n tokens are produced long before the PEs consume them. Each PE's y
queue has MU+1 places, so all M tokens of an image fit, and the power core
is never blocked behind them for long.

PE B_j takes x^m at the *start* of a line and forwards it immediately. B_j+1
can therefore begin the same line as soon as its own pixels arrive, and a
pixel queue of 2 places is enough. If x^m were forwarded only after B_j had
finished its pixels of the line, B_j+1's pixels would back up into the
router chain and block B_j's next pixels. Every pixel queue would then need
about MU places.

### Timing

Inside the array one operation takes one clock and a router moves one token
per clock. A 1024 x 1024 image therefore needs about N*M clocks (1,048,835
measured). In this model the pixel stream, not the PEs, sets the pace.

The speed-up of BETA belongs to the case the architecture is meant for:
floating-point units that are much slower than the pixel clock. There each
PE needs only N*MU + MU + 1 operation times per image, against N*(M+1) for
the serial engine. If you build this with multi-cycle floating-point units,
the token handshakes already allow each PE to run at its own rate.

## Interfaces between units

Every stream uses the same rule: a token moves in a cycle where `valid` and
`ready` are both high. `token_fifo` is the link element. Its `in_ready`
depends only on its fill level, so chains of FIFOs have no combinational
ready path, and 2 places sustain one token per clock. The FIFO asserts that
it is never written when full or read when empty.

## Files

| file | content |
|---|---|
| `rtl/moments_pkg.sv` | number format, `fp_t`, constants, PE phase enum |
| `rtl/fp_mul.sv`, `rtl/fp_add.sv`, `rtl/int_to_fp.sv` | arithmetic |
| `rtl/token_fifo.sv` | link FIFO / input buffer |
| `rtl/power_core_pe.sv`, `rtl/power_core.sv` | power generator |
| `rtl/serial_moment.sv` | serial engine |
| `rtl/router.sv`, `rtl/pe_b.sv`, `rtl/mod_power_core.sv`, `rtl/parallel_moment.sv` | parallel engine |
| `rtl/moments_top.sv` | both engines |
| `tb/tb_fp_pkg.sv` | reference conversions real <-> fp_t for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_moments_top_full.sv` | both engines at default size |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by
itself. A watchdog counts a failure if the test hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_moments_top \
    rtl/moments_pkg.sv tb/tb_fp_pkg.sv tb/tb_moments_top.sv -o sim
./obj_dir/sim
```

Replace `tb_moments_top` by any other testbench name. Modules are found
through `-Irtl -Itb`.

What the testbenches cover:

* **Arithmetic.** `tb_fp_mul` and `tb_fp_add` compare thousands of random
  and corner-case operations bit for bit with the simulator's double
  arithmetic rounded to the design format. This includes near-cancellation,
  zero and overflow.
* **Units.** The unit tests check the FIFO, the router's dealing order, the
  power core (values, tags, a latency of exactly K, back-pressure), the
  shared core's x/y interleaving, and a single PE B in both modes.
* **Engines.**
  * `tb_serial_moment` checks its cycle count against N(M+1) + t_pow + 2
    with t_pow = K + 2.
  * `tb_parallel_moment` runs images in both modes with random pixel gaps
    and output stalls.
  * `tb_moments_top` runs both engines together at N = 6, M = 8, BETA = 2.
    It counts, and requires, each of: pixel gaps, input and output
    back-pressure, x^m interleaved with y^n and issued after y finished,
    switches to and from set mode, and set-mode results.
* **Full size.** `tb_moments_top_full` uses the defaults with no parameter
  overrides and finishes in well under a minute:
  * both engines compute M(5,7) of a 1024 x 1024 image;
  * the parallel engine then computes the set M(3,0) .. M(3,15) of a second
    image.

  All results match a double-precision reference to better than 1e-9.

References are computed from the moment definition in double precision. The
tolerance is 1e-5 or tighter, far below any logic error, which shows up as
a gross mismatch.

## Departures and limits

* **Fixed choices.** The number format, the 8-bit pixels, BETA = 8, K = 4,
  the queue depths (2 for links, 16 for the input buffer) and the
  valid/ready protocol are choices made here. The architecture leaves them
  open. Change them through parameters or `moments_pkg`.
* **Maximum order.** Orders are limited to 2^K - 1. Raise K for more; the
  power core grows by two multipliers per stage.
* **Where x^m is forwarded.** PE B forwards x^m at the start of a line
  rather than after it (see *Why it cannot deadlock*).
* **Phase counters.** PE B uses a phase register and separate line and
  column counters rather than one counter running to N+2, and an addressed
  array for H rather than a circulating queue. The behaviour is the same.
* **y values in set mode.** They come through the y^n distribution routers
  into a per-PE y buffer of MU words, rather than being loaded in a separate
  set-up phase. This costs MU words per PE beyond what the single-moment
  engine needs.
* **Serial pixel path.** The serial engine has no pixel delay line in front
  of the power core. The pixel enters the core together with its slot, so
  no alignment is needed.
* **Wavefront operation.** It is modelled synchronously: one clock, with
  every transfer flow-controlled.
* **Not built.** An earlier form of the parallel array has a second row of
  PEs (type A) that only compute the final dot products, so it needs
  2*BETA multipliers and adders. It is not built. The engine here folds that
  work into PE B, as its phases 2 and 3.
