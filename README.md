# Bidirectional bit-serial 3x3 image convolver

This is a 3x3 image convolver in which every signal is one bit wide. Pixels
and weights enter one bit per clock, LSB first. The arithmetic works on single
bits, so a register can follow every adder. The array is made of nine
identical cells. Each cell holds one kernel weight and one bit-serial
multiplier. Each multiplier runs two multiplications at the same time, one in
each direction along its chain of sections. This is why the convolver
produces one full-precision 20-bit result every 10 clock cycles, although a
result takes 20 cycles to shift out.

The chip computes, for every pixel slot `s`:

    R[s] = sum over r = 0..2, c = 0..2 of  w[r][c] * p_r[s - c]

Here `p_r` is the pixel stream of row input `r`. The host feeds three adjacent
image lines in parallel. `w[r][c]` are 8-bit sign-magnitude weights, and the
pixels are 8-bit unsigned. No bit is dropped anywhere: the largest magnitude
is 9 * 255 * 127 = 291465, so `R` is exact in 20-bit two's complement.

The top module has seven signal pins plus the clock:

| pin | dir | meaning |
|-----|-----|---------|
| `row_in[2:0]` | in | one bit-serial stream per kernel row: pixels, or weights while `load` is high |
| `load` | in | kernel loading |
| `sync` | in | restarts the 20-cycle control period and clears the datapath |
| `out_left` | out | results of even slots, LSB first |
| `out_right` | out | results of odd slots, LSB first |

## Data format and pin timing

Time is counted in **slots** of 10 cycles. Cycle 0 is the cycle after the
last cycle in which `sync` is high. Slot `s` covers cycles `10s .. 10s+9`.

* **Pixels.** In slot `s`, row input `r` carries pixel `p_r[s]`. Bit `i` of
  the pixel is in cycle `10s + i`, for i = 0..7. Positions 8 and 9 of a slot
  are ignored.
* **Results.** Bit `i` of `R[s]` (i = 0..19) is on `out_left` in cycle
  `10s + 4 + i` when `s` is even, and on `out_right` at that time when `s` is
  odd. Each pin therefore carries one 20-bit word every 20 cycles. The two
  pins are offset by 10 cycles. A convolution takes 24 cycles from the first
  bit of its newest pixel to the last bit of its result.
* **Loading the kernel.** Hold `load` high for `10*(COLS-1)+8` cycles, which
  is 28 cycles for a 3x3 kernel, starting at a slot boundary. Use cycles 0..27
  after `sync`, for example. Row input `r` carries, in consecutive slots, the
  weights `w[r][2]`, `w[r][1]` and `w[r][0]`. Each weight is 8 bits in slot
  positions 0..7: the magnitude LSB first, then the sign (1 = negative). The
  weights travel through the same delay lines as pixels. Every cell captures
  the last 8 bits that pass it before `load` falls.
* **Kernel and `sync`.** The weight memories are not cleared by `sync`. Their
  loops keep circulating, so a kept kernel stays in step with the restarted
  control period only if the `sync` cycle falls a whole number of slots after
  the previous restart. To be safe, load again after a `sync`.
* **The first results.** After `sync` the delay lines hold zeros, and these
  act as zero pixels. After a load the delay lines hold weight bits instead.
  The first valid window is then the one whose three columns all saw
  streamed pixels.

A 2-D picture is processed as bands. For output line `y`, the host streams
lines `y`, `y+1` and `y+2` on the three rows. Bands can follow one another
without a gap. The first two windows of each band straddle two bands and are
discarded.

## The array

```
 row_in[0] ──► cell(0,0) ──10──► cell(0,1) ──10──► cell(0,2)
                  │                 │                 │
 row_in[1] ──► cell(1,0) ──10──► cell(1,1) ──10──► cell(1,2)
                  │                 │                 │
 row_in[2] ──► cell(2,0) ──10──► cell(2,1) ──10──► cell(2,2)
                  │ (left,right)    │                 │
               ┌──▼─────────────────▼─────────────────▼──┐
               │ out_adder (left)      out_adder (right) │
               └──────┬───────────────────────┬──────────┘
                   out_left                out_right
```

Each row's data line passes straight into a cell's multiplier. It also goes
through that cell's 10-bit delay line, so the next cell receives it one slot
later. In slot `s`, cell `(r,c)` therefore multiplies `p_r[s-c]` by `w[r][c]`.
Every cell sends two partial-sum streams down its column: a "left" stream and
a "right" stream. A cell adds its signed product to the stream coming from
above. This addition is combinational, with only the carry registered, because
the three cells of a column work in the same cycle. At the foot of the array
two `out_adder` units sum the three column streams. One unit serves the left
streams and the other the right streams.

## The bidirectional multiplier (the hard part)

### Splitting the product

Let X be the pixel (8 bits) and Y the weight magnitude (8 bits, MSB 0). The
sum `Z = X*Y = sum_k z_k 2^k` is divided between two arrays that work in
parallel:

* `z'` gathers the terms `x_i * y_l` with i <= l;
* `z''` gathers the terms `y_i * x_l` with i < l.

Section `j` stores `x_j` and `y_j` in the cycle in which they pass on the
buses, which is cycle `j` of the multiplication. In a later cycle `k` it forms
`x_j * y_k` in its z' half and `y_j * x_k` in its z'' half. Both terms have
weight `2^(j+k)`. The z' half also uses the bus value of `x` in the latching
cycle itself, so it forms `x_j * y_j` as well. The z'' half uses only the
stored `y_j`, so it never counts that term twice.

Each half adds three bits in a (3,2) full adder:

* its new partial product;
* its own carry from the previous cycle, which now has the same weight;
* the registered sum of a neighbour section.

For a forward multiplication the neighbour is section `j+1`. A sum bit moving
from `j+1` to `j` also moves one cycle later, so its weight stays the same.
The sums therefore drain toward section 0. Bit `k` of `z'` and of `z''` leaves
section 0 at cycle `k+1`. An external full adder, which sits in the
addition/conversion unit, forms `Z = z' + z''`.

### Two multiplications in one array

After the last operand bit (cycle 7), the sections empty from the far end.
Section `j` holds nothing after cycle `16 - j`. The reason is that every bit
still stored there has weight at least `2^15`, and `z'` and `z''` are each
below `2^15`. This holds because Y < 128, which is why the weight's MSB must
be zero.

Ten cycles after a forward multiplication starts, a **backward**
multiplication starts. It uses the sections in mirror order: section 7 plays
section 0, and its sums drain toward section 7. It claims section `7-i` in its
cycle `i`. That is exactly when the forward multiplication releases it. In
each 20-cycle period, section `j` works:

| phases (mod 20) | section j works for |
|-----------------|---------------------|
| `j .. 16-j` | the forward multiplication (started at phase 0) |
| `17-j .. 19+j` | the backward multiplication (started at phase 10) |

Every section is busy all the time. Forward products leave on the left and
feed the left partial-sum channel. Backward products leave on the right and
feed the right channel.

### Control signals of the multiplier

* **Latching bus** (`latch_ctrl_bus`). Two 7-stage shift registers run in
  opposite directions, and their outputs are OR-ed per section. A pulse
  entering the left end at phase 0 gives section `j` its latch enable at phase
  `j`. A pulse entering the right end at phase 10 gives section `j` its latch
  enable at phase `17-j`.
* **Direction register** (`dir_ctrl_gen`). This is an 8-bit bidirectional
  shift register. Bit `j` selects whether section `j` takes its incoming sums
  from the right neighbour (forward) or from the left neighbour (backward).
  From phase 19 to phase 8 it shifts away from section 0 with a 1 entering,
  so a wave of "forward" claims the sections. From phase 9 to phase 18 it
  shifts toward section 0 with a 0 entering, so the sections pass to the
  backward multiplication as they become free.
* **Latch reset** (phases 8 and 18). In the cycle after a multiplication's
  last operand bit, the stored bits are gated to zero and then cleared. From
  then on the sections only pass sums on, and the padding bits in slot
  positions 8 and 9 have no effect.

## Weights and signs

`weight_mem` is a shift register that the data line feeds while `load` is
high. The sign bit stays in a register of its own, which drives the two
conversion units of the cell. The seven magnitude bits and three zeros
circulate in a 10-bit loop. The multiplier therefore sees an 8-bit weight
with a zero MSB once per slot. The multiplier input is taken after the second
of the three return registers. This places magnitude bit 0 at slot position 0
when `load` falls at slot position 8.

`add_conv_unit` (two per cell) handles each product stream in three steps:

1. It adds `z' + z''`. Its inputs are forced to zero outside the 16-bit
   product window. This stops the bits that follow the product out of the end
   section from being added in.
2. If the weight is negative, it negates the product by inverting it and
   adding one. The add-one carry is preset to 1 at bit 0. Above bit 15 the
   inverted zeros supply the sign extension to 20 bits. If the weight is
   positive, the product passes unchanged.
3. It adds the result to the partial sum coming from above.

All carries are cleared at the word-start strobes. Carries out of bit 19 are
dropped.

## Control unit and schedule

`conv_ctrl` holds a 20-bit one-hot ring counter that marks the phase. It also
contains the latching bus and the direction register. Combinational decoding
of the ring produces every strobe:

| signal | phases |
|--------|--------|
| latching bus, left / right input | 0 / 10 |
| direction register shifts toward section 0 | 9..18 |
| latch reset | 8, 18 |
| left product window / right product window | 1..16 / 11..6 (wrapping) |
| word start at the converters, left / right | 1 / 11 |
| word start at the cell adders and first output adder, left / right | 2 / 12 |

For a result word that starts at phase 0, the pipeline is:

* cycle `k`: section 0 forms bit `k`;
* cycle `k+1`: the converter register takes the bit;
* cycle `k+2`: the column sum is formed, combinationally, and the first output
  adder registers it;
* cycle `k+3`: the second output adder registers it;
* cycle `k+4`: the bit is on the pin.

## Files

| file | contents |
|------|----------|
| `rtl/bsconv_pkg.sv` | word sizes (8, 10, 20, 16) and the control bundle `ctrl_t` |
| `rtl/bs_convolver.sv` | top: control unit, ROWS x COLS cells, two output adders |
| `rtl/conv_ctrl.sv` | ring counter and decoding; instantiates the two blocks below |
| `rtl/latch_ctrl_bus.sv` | latching-signal bus |
| `rtl/dir_ctrl_gen.sv` | direction register |
| `rtl/conv_cell.sv` | basic cell: memory, multiplier, delay, two addition/conversion units |
| `rtl/weight_mem.sv` | weight memory |
| `rtl/bs_mult.sv` | 8-section bidirectional multiplier |
| `rtl/bs_mult_section.sv` | one multiplier section |
| `rtl/delay_line.sv` | 10-bit delay |
| `rtl/add_conv_unit.sv` | product adder, sign conversion and cell adder |
| `rtl/out_adder.sv` | column adder at the foot of the array |

Each module has a testbench `tb/tb_<module>.sv`. In addition,
`tb/tb_frame_workload.sv` convolves a whole 512x512 picture, and
`tb/tb_enlarged_array.sv` (with its helper `tb/array_checker.sv`) checks
other array sizes.

## Simulation

Every testbench checks itself. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. To build and run
one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_bs_convolver \
    rtl/bsconv_pkg.sv tb/tb_bs_convolver.sv -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Verilator finds the other
modules through `-Irtl`.

What the testbenches establish:

* **`tb_bs_convolver`** runs the top at its default size. Its runs cover:
  * random kernels;
  * a restart that keeps the kernel;
  * all weights -127 and all weights +127 with saturated pixels, which gives
    the extreme results of plus and minus 291465;
  * a second random kernel.

  It also uses a minus-zero weight and random padding bits. Every window is
  compared with an integer model at the exact cycles given above. This checks
  the 24-cycle latency and the rate of one result per 10 cycles.
* **`tb_frame_workload`** streams all 510 bands of a 512x512 picture without
  a gap, through a high-pass kernel, and checks 260100 output pixels. This
  takes a few seconds. At one pixel per 10 cycles, 30 frames per second needs
  a clock of about 78 MHz.
* **`tb_enlarged_array`** checks a 4x4 array, including its extreme result
  of -518160, and a 2x1 array, whose single column uses the one-register
  path of the output adder.
* **`tb_bs_mult`** checks 200 back-to-back products, forward and backward
  alternating, against `X*Y`. The control signals are generated from their
  closed form, without the control unit.
* The remaining unit testbenches compare their module with an independent
  model at every cycle or for every word.

## What follows the original design, and what is this design's own

Taken from the original convolver:

* the 3x3 array;
* the 8-bit formats and the 20-bit full-precision result;
* the bit-serial, LSB-first operation;
* the 8-section multiplier built from (3,2)-adder halves, with direction
  multiplexers on the sum lines;
* the 10-cycle throughput with bidirectional reuse of the sections;
* the dual shift-register latching bus and the bidirectional shift-register
  direction generator;
* the latch reset in cycle 8;
* the sign-magnitude weight memory with a 10-bit circulating loop, loaded
  over the pixel pin;
* the invert, add-one and bypass sign conversion, merged with the product
  adder and the cell adder, two per cell;
* the 10-bit delay lines;
* the 20-bit circular counter;
* the pin count;
* the 24-cycle latency.

This design's own choices:

* **Registers and sequencing.**
  * The multiplier latches are edge-triggered flip-flops.
  * In the latching cycle, a bypass feeds the z' half with the bus bit.
  * The reset gates the stored bits in its own cycle.
* **Control pins.**
  * The two control pins are `load` and `sync`.
  * `sync` is a synchronous clear of everything except the weights.
* **Bit order and load protocol.**
  * Weights are sent LSB first with the sign last.
  * The load window is the 28-cycle window described above.
* **Pipeline.**
  * The product window masks the product stream.
  * The pipeline registers sit after the converter and in the output adders.
  * The column additions are combinational.
  * These choices set the result timing at `10s + 4`.
* **Output adder.** Its inner structure, a chain of registered bit-serial
  adders, is this design's own.
* **The direction register's fill values.** The original shows constant
  inputs at the two ends. Here 1 enters at section 0 and 0 enters at section
  7. These values were chosen so that the register produces the busy windows
  derived above.

Physical aspects are outside this RTL: the pads, the standard-cell layout and
the 2 um CMOS implementation.

## Changing the size

`bs_convolver` takes `ROWS` and `COLS` parameters, and every cell is the
same. When you change them, keep the following in mind:

* The first result bit of window `s` appears in cycle `10s + 2 + max(COLS-1, 1)`.
* The load window becomes `10*(COLS-1)+8` cycles.
* Results stay exact as long as the kernel has at most 16 cells. Beyond that,
  `9 * 255 * 127` no longer bounds the sum, and 20 bits can overflow.

The operand width, the slot length and the period are package constants. The
multiplier's timing proof depends on them together (slot = width + 2, and a
zero weight MSB), so change them only together.
