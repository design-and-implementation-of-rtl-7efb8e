# Quaternary pipelined image processor for 3x3 near-neighbour operations

This processor runs cellular-logic operations on images whose pixels take one of four values
(four gray levels or four colours). Each pixel is one quaternary digit, so the image is never
split into binary bit planes. The key idea is *double pattern matching*. A single
quaternary match digit tracks two templates at once: bit 0 means "still matches template P"
and bit 1 means "still matches template Q". So one chain of nine matching cells tests a
3x3 window against two templates in the same pass. A binary array needs 18 cells for the
same job: two chains of nine, each carrying 2-bit pixels. It also needs four times as many
wires between cells (72 against 18).

The original is an NMOS circuit built from multiple-threshold transistors and dynamic,
two-phase clocked logic. This RTL keeps its logic and pipeline structure. Each quaternary
wire becomes a 2-bit code. Each phi1/phi2 storage pair becomes one register on a single
clock.

## The building block: the T gate

Everything is built from one primitive, the quaternary T gate (`t_gate`). It is a four-way
multiplexer whose data inputs and control input are all quaternary:

    T(p0, p1, p2, p3; x) = p_x

The other parts are all T gates with constant data inputs:

- The **quantizer** is `T(0,1,2,3; x)`. In silicon it restores voltage levels. On logical
  values it is the identity. Every register stage applies it (`qmvl_pkg::QUANT_CONST`).
- A **shift register element** (`dyn_shift_reg`) is a quantizer pair with phi1 and phi2
  pass transistors. Here it is one register per element.
- The **comparator** and the **accumulator** (below) are T gates with programmed or fixed
  constants.

## Double matching in one digit

A pattern matching cell (`pm_cell`) does two things:

1. **Comparator** (`digit_comparator`): `b = T(alpha0, alpha1, alpha2, alpha3; a)`. The
   four constants hold, for each possible pixel value `a`, whether that value is acceptable
   to template P (bit 0), to template Q (bit 1), or to both. `qmvl_pkg::alpha_from_sets`
   builds them from two 4-bit "accepted values" masks. So a template position can be a
   single value, a set such as "0 or 3", or don't-care (`4'b1111`).
2. **Accumulator** (`accumulator`):
   `c = T(0, T(0,1,0,1; c_prev), T(0,0,2,2; c_prev), c_prev; b)`.
   On the 2-bit code this is `c_prev & b`: each template survives only if it survived so
   far and also accepts this pixel.

The cell registers `c`, so a chain of cells is a pipeline. Each cell adds one clock and
looks at one more pixel. The chain's final digit means 0 = no match, 1 = P only,
2 = Q only, 3 = both.

Example from the three-cell demonstrator (`pm_linear_array`):

| cell | P accepts | Q accepts | constants (alpha0..alpha3) |
|------|-----------|-----------|----------------------------|
| 1    | 0 or 1    | 1 or 2    | 1, 3, 2, 0                 |
| 2    | 0 or 3    | 1 or 3    | 1, 2, 0, 3                 |
| 3    | 2         | 0         | 2, 0, 1, 0                 |

All cells see the same input stream, and the first cell's chain input is 3. `out[2]`
reports 1 after the stream has carried (0,3,2) or (1,3,2), and 2 after (2,1,0) or similar.

## The 3x3 pipeline: data shifter, PM array, output selector

This is the part that needs the most care. The window is numbered

    x1 x2 x3
    x8 x0 x4
    x7 x6 x5

**PM array** (`pm_array`). Nine cells form one chain in the order
PM1 PM2 PM3 PM8 PM0 PM4 PM7 PM6 PM5, snaking through the rows. Cells PM1..PM3 read row
stream 0, PM8/PM0/PM4 read row stream 1, and PM7/PM6/PM5 read row stream 2. Each cell reads
its pixel one clock after the cell before it. So along a row, successive cells see
successive pixels of the stream. When the chain moves to the next row, it is three clocks
further on.

**Data shifter** (`data_shifter`). It turns the raster stream into those three row streams.
It has three window registers, and between them two line delays of N+2 elements. So the
streams are N+3 clocks apart. The chain's three-clock step between rows cancels three of
those clocks, which leaves an offset of exactly N pixels, one scan line. The result is that
the nine cells see one coherent 3x3 window.

**Window geometry.** Stream pixel `s[t]` enters `in1` at clock t. The window for centre
pixel `c` is:

    x1 x2 x3 = s[c+N-1] s[c+N] s[c+N+1]   (the line scanned after the centre line)
    x8 x0 x4 = s[c-1]   s[c]   s[c+1]
    x7 x6 x5 = s[c-N-1] s[c-N] s[c-N+1]   (the line scanned before it)

So the template's top row (x1..x3) is the *later* scan line. If your image is scanned from
top to bottom, mirror the templates vertically. Windows at the ends of a line wrap into the
neighbouring lines, and pixels outside the stream read as 0. Border handling is left to
whoever supplies the stream.

**Output selector** (`output_selector`). It is one T gate controlled by the array result c5:

    d = d_prev (c5 = 0), V1 (c5 = 1), V2 (c5 = 2), V12 (c5 = 3)

`V12` is the user's choice of V1 or V2 for a window that matches both templates. The first
stage's `d_prev` is the centre pixel, taken from the middle row stream through 5 elements,
so an unmatched pixel passes through unchanged.

**Latency.** PM5's result comes nine clocks after PM1 read the window's first pixel, and the
output selector adds one more clock. At the top level, `out` at clock t is the new value of
pixel `c = t - (N + 10 + STAGES - 1)`. The throughput is one pixel per clock.

## More templates: stages

`image_processor` chains `STAGES` copies of `pm_stage` (PM array + output selector) through
their output selectors: `d_prev` of stage i is `d` of stage i-1. Stage i reads the row
streams and `in2` through i extra one-element delays, which keeps it aligned with the
one-clock-per-stage selector chain. STAGES stages apply 2*STAGES templates. When several
stages match, **the last matching stage wins**.

## Recursive operation

A recursive operation updates a state image R using R's 3x3 window plus a condition on the
centre pixel `a0` of a fixed input image A. It is repeated until R stops changing. For this,
each stage has a T2 comparator on `in2` with constants `b0`. Its result goes through one
element and becomes the chain input of PM1. So the window can match only if `a0` is accepted
as well. With `b0 = (3,3,3,3)` the chain input is always 3, and `in2` is ignored: that is a
plain operation.

To run a recursive pass, drive R on `in1` and A on `in2`, N-1 clocks later:
`in2(t) = A[t-N+1]` while `in1(t) = R[t]`. Collect `out` as the next R, and repeat. The
external controller owns this feedback loop and decides when R has converged.

## Top level and the demonstration chip

`quaternary_image_system` is the top. It holds two designs side by side, and they share only
clock and reset:

- `image_processor`, reached through the `ip_` ports. This is the full processor.
- `test_chip`, reached through the `tc_` ports. This is the logic of the small NMOS chip on
  which the parts were first proven. It has:
  - the three-cell linear array;
  - one separate PM cell;
  - two dual multiplexers, i.e. four T gates;
  - a three-digit shift register.

  Each part has its own pins. The chip's test circuits are not included.

## Programming

Templates, `b0` and the transition values are static input ports:

- `alpha[stage][j]` is the constant set for window position `x_j`. Use
  `qmvl_pkg::alpha_from_sets(P_mask, Q_mask)` to build it.
- `b0[stage]` is the centre condition. Use `alpha_from_sets(4'hF, 4'hF)` for a plain
  operation.
- `v[stage] = '{V1, V2, V12}` are the transition values.

They are meant to be held constant while an image streams through.

## Parameters and sizes

| module | parameter | default | origin |
|---|---|---|---|
| `image_processor`, `data_shifter` | `N` (pixels per line) | 64 | own choice, the original gives only "N" |
| `image_processor` | `STAGES` | 2 | own choice, the original draws "stage 1 .. stage k" |
| `pm_linear_array` | `STAGES` | 3 | the three-cell array on the original chip |
| `dyn_shift_reg` | `DEPTH` | 3 | the three-digit shift register on the original chip |

At the defaults the image processor has 18 PM cells and about 320 flip-flops.

## Where this RTL departs from the original

- **Digits are 2-bit binary codes.** Multi-level voltages, threshold design, ion implants,
  level restoration and analog delays are not modelled.
- **One clock instead of phi1/phi2.** A phi1 sample followed by a phi2 transfer becomes one
  rising-edge register. Pipeline depth in clocks is the same as in the original.
- **Reset.** All storage gets an asynchronous active-low reset to 0. The dynamic original
  has none.
- **Static configuration ports.** The original leaves template loading to its master
  control processor.
- **Own readings of the block diagrams:**
  - The first line delay is fed from the first window register's output.
  - T2's delayed result feeds PM1's chain input.
  - `in2` is skewed per stage like the row streams.
  - The `in2` timing for recursive operation is derived from the pipeline, not given.
- **Not built.** The two-phase clock generator, the master control processor, image sensor,
  display and image memory are outside this RTL. The user supplies the pixel streams and
  the recursive feedback.

## Files

| file | content |
|---|---|
| `rtl/qmvl_pkg.sv` | digit type, T-gate function, comparator-constant helpers |
| `rtl/t_gate.sv` | quaternary T gate |
| `rtl/dyn_shift_reg.sv` | quaternary shift register |
| `rtl/digit_comparator.sv`, `rtl/accumulator.sv`, `rtl/pm_cell.sv` | pattern matching cell |
| `rtl/pm_linear_array.sv` | linear PM array (three-cell demonstrator) |
| `rtl/data_shifter.sv`, `rtl/pm_array.sv`, `rtl/output_selector.sv`, `rtl/pm_stage.sv` | 3x3 pipeline parts |
| `rtl/image_processor.sv` | the image processor |
| `rtl/test_chip.sv` | demonstration chip |
| `rtl/quaternary_image_system.sv` | top level: both side by side |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself; a watchdog ends
it with a failure if it hangs. For example:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
        rtl/qmvl_pkg.sv tb/tb_quaternary_image_system.sv --top-module tb_quaternary_image_system
    ./obj_dir/Vtb_quaternary_image_system

`tb_quaternary_image_system` runs the top at its default parameters in a few seconds. On the
processor side it runs:

- three plain passes over random 64 x 16 images, each with four random templates;
- a recursive region fill that takes 27 passes to converge.

It checks every output pixel against a reference model of the window geometry above, which
also checks the latency. It also counts that these all happened:

- each match outcome in each stage;
- a pixel passing through unmatched;
- a later stage overriding an earlier one;
- the centre condition blocking a match;
- convergence.

In parallel, it runs the demonstration chip's linear array on the two-template example, and
the chip's shift register on a random stream. `tb_image_processor` runs the same processor
scenario on `image_processor` alone.

The other testbenches check each part separately:

- the T gate, comparator and accumulator exhaustively;
- the cell, selector, shift register and data shifter with random streams;
- the PM array and a stage against set-based references;
- the three-cell array with the two-template example above, and `tb_test_chip` all chip
  parts at once.

## How far to trust it

Every module passes its own testbench. Each testbench has also been shown to fail when its
module is broken deliberately: a swapped constant, a delay one element short, a reordered
chain. The reference models are written from the window and timing definitions in this
document, not from the RTL. The wrap-around at line ends and the vertical orientation are
properties of this design, so check them against how your images are scanned.
