# Gabor-type filter processor in 16-bit floating point

A Gabor filter picks out image structure of one spatial frequency and
orientation; it is a band-pass filter used for texture analysis, character,
face and licence-plate recognition. Built as an FIR filter it needs large
kernels and careful fixed-point scaling. The *Gabor-type filter* (GTF) gets a
similar response from a tiny recurrent network instead: every pixel is a cell
of a discrete-time cellular neural network (DT-CNN) coupled only to its four
neighbours, and iterating the cell update to its fixed point yields the
filtered image.

This RTL implements the processing element of that network: one unit that
computes a cell's new complex output from its four neighbours in binary16
floating point. One pipelined arithmetic tree is time-shared between the real
and the imaginary part, so the unit needs four multipliers instead of eight
and runs at twice the pixel clock.

## The cell update

With filter parameter `l` (lambda) and centre frequencies `wx0`, `wy0`, the
coefficients are

    ax = cos(wx0)/(4+l^2)   ay = sin(wx0)/(4+l^2)
    bx = cos(wy0)/(4+l^2)   by = sin(wy0)/(4+l^2)   b = l^2/(4+l^2)

One forward-Euler (Jacobi) step of the network sets each cell's complex output
`y = R + jI` to

    y_ij = b*u_ij + ( e^{+j wx0} y_W + e^{-j wx0} y_E
                    + e^{+j wy0} y_N + e^{-j wy0} y_S ) / (4+l^2)

where `u` is the input image and W/E/N/S the neighbours at x-1, x+1, y-1, y+1
(outputs outside the image are 0). Split into parts:

    R = b*u + ax*(RW+RE) + bx*(RN+RS) + ay*(IE-IW) + by*(IS-IN)
    I =   0 + ax*(IW+IE) + bx*(IN+IS) + ay*(RW-RE) + by*(RN-RS)

Each neighbour enters with a complex weight of magnitude `1/(4+l^2)`, so the
four together have a gain of `4/(4+l^2) < 1`: the iteration contracts and
converges for any `l > 0`.

## One tree for both parts

Both lines have the same shape, `c0 + ax*s1 + bx*s2 + ay*d1 + by*d2`, with two
sums and two differences of neighbour values. `gtf_input_mux` therefore only
reroutes operands according to the select line `s`:

| s | s1      | s2      | d1      | d2      | c0 |
|---|---------|---------|---------|---------|----|
| 0 (real)      | RW+RE | RN+RS | IE-IW | IS-IN | bu |
| 1 (imaginary) | IW+IE | IN+IS | RW-RE | RN-RS | 0  |

The weighted input `bu = b*u` is an input of the unit; it is replaced by zero in
the imaginary phase because only the real part has it. With `b` applied outside,
the tree has four multipliers, four pre-adders and three post-adders.

## Pipeline and timing

Every adder and multiplier has a register on its output. `gtf_unit` is six
stages deep:

| stage | work | units |
|-------|------|-------|
| 1 | pre-add: s1, s2, d1, d2 | 4 `fp16_add` |
| 2 | multiply by ax, bx, ay, by | 4 `fp16_mul` |
| 3 | ax*s1 + bx*s2, ay*d1 + by*d2 | 2 `fp16_add` |
| 4 | sum of the two | 1 `fp16_add` |
| 5 | + c0 | 1 `fp16_add` |
| 6 | write Rterm (s=0) or Iterm (s=1) | `gtf_output_demux` |

The coefficients, `c0`, the valid bit and the select tag travel down the
pipeline with the data, so any operand set may enter on any clock. A result is
in its output register six clocks after its operands, i.e. three pixel clocks.

`gtf_phase_ctrl` toggles `s` every clock from reset. A pixel occupies two
clocks, real then imaginary:

    clock      t     t+1   t+2   ...  t+6      t+7
    s          0     1     0          0        1
    pix_valid  1     1     (next pixel may start)
    operands   held  held
    rterm                             pixel t
    iterm                                      pixel t
    pix_done                                   1

`pix_ready` (= `~s`) marks the clocks in which a pixel may start; pixel inputs
must stay stable for that clock and the next. `pix_done` is a one-clock pulse
when both output registers hold the same pixel; pixels can follow back to back,
one every two clocks. An assertion in `gtf_top` checks that `pix_done` always
coincides with the imaginary write.

## Number format

All data and coefficients are IEEE 754 binary16 words (1 sign, 5 exponent,
10 fraction bits). `fp16_add` and `fp16_mul` round to nearest, ties to even.
Simplifications, chosen to keep the units small:

- subnormal operands are read as zero, and results whose rounded magnitude is
  below 2^-14 become a signed zero (flush-to-zero);
- overflow gives infinity; `inf-inf`, `inf*0` and NaN operands give the quiet
  NaN `0x7E00`;
- an exact cancellation `x-x` gives +0.

Apart from flush-to-zero, results are bit-identical to correctly rounded IEEE
binary16. The adder aligns with guard, round and sticky bits and normalises
with a leading-zero count; the multiplier forms the full 22-bit significand
product (one 18x18 hardware multiplier on an FPGA).

## Using the processor

`gtf_top` has no parameters. Ports (arrays are `logic [3:0][15:0]`):

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | computation clock (2x pixel clock), synchronous active-low reset |
| `pix_valid` / `pix_ready` | in / out | start a pixel in a clock where both are high |
| `yr`, `yi` | in | real / imaginary outputs of neighbours, index 0..3 = W, E, N, S |
| `bu` | in | `b*u` of the cell |
| `coef` | in | index 0..3 = ax, ay, bx, by |
| `s` | out | current phase (0 real, 1 imaginary) |
| `rterm`, `iterm` | out | result registers |
| `pix_done` | out | both result registers hold the last started pixel |

The processor is one cell engine. Storing the image state between iterations,
scanning it and supplying the four neighbours is left to the surrounding
system; the end-to-end testbench does this in SystemVerilog. `gtf_unit` can
also be used directly with its own `s` and `in_valid` inputs, e.g. to compute
only real parts.

## Modules

| file | content |
|------|---------|
| `rtl/fp16_pkg.sv` | binary16 type, constants, neighbour/coefficient indices, latency |
| `rtl/fp16_add.sv` | registered adder/subtractor |
| `rtl/fp16_mul.sv` | registered multiplier |
| `rtl/gtf_input_mux.sv` | operand selection by `s`, bu/zero |
| `rtl/gtf_output_demux.sv` | Rterm/Iterm registers |
| `rtl/gtf_unit.sv` | the six-stage shared tree |
| `rtl/gtf_phase_ctrl.sv` | select-line sequencer, pixel valid/done |
| `rtl/gtf_top.sv` | sequencer + unit |

Synthesised with a generic flow, `gtf_top` is about 5,500 word-level cells and
297 flip-flop bits, with four multipliers.

## Verification

Each module has a self-checking testbench in `tb/`; they share the reference
arithmetic in `tb/fp16_ref_pkg.sv`, which computes in double precision (exact
for one binary16 addition or multiplication) and rounds back through the
double's bit fields. Every testbench prints `TB_RESULT checks=N failures=M`.

- `tb_fp16_add`, `tb_fp16_mul`: directed corner cases and 40,000+ random
  operand pairs each, bit-exact, with the one-clock latency.
- `tb_gtf_input_mux`, `tb_gtf_output_demux`, `tb_gtf_phase_ctrl`: every output
  every clock against a model, random stimulus.
- `tb_gtf_unit`: 20,000 clocks of random operands, random `s` and bubbles;
  each result is checked bit-exactly in the right register exactly six clocks
  later.
- `tb_gtf_top`: filters a 12x12 image (a bar and an impulse, `l = 1`,
  `wx0 = pi/4`, `wy0 = pi/8`) with 30 iterations, pixels streamed back to back
  with random idle periods. Every pixel result is checked bit-exactly and for
  its 7-clock timing; the final image is compared with the same iteration in
  double precision (error about 0.001 on values up to 2) and convergence is
  checked. It also counts that real and imaginary phases, back-to-back pixels,
  idle periods and non-zero `bu` all occurred.

Run one with plain Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/fp16_pkg.sv tb/fp16_ref_pkg.sv tb/tb_gtf_top.sv --top-module tb_gtf_top
    ./obj_dir/Vtb_gtf_top

## Choices that are this design's own

The architecture (DT-CNN cell, coefficients, one tree shared between real and
imaginary parts at twice the pixel rate, bu multiplexed with zero, registered
adders and multipliers, six stages, demultiplexed Rterm/Iterm registers, four
multipliers) follows the original GTF processor. Not specified there, and
chosen here:

- binary16 with flush-to-zero, the rounding mode and special-value handling;
- which neighbour carries `e^{+jw}` (W and N) - swapping it mirrors the filter's
  orientation;
- how the work is split over the six stages and the order of the additions,
  which determines the exact rounding of results;
- that `bu` is an input rather than computed in the unit;
- how `s` is generated, the `pix_valid`/`pix_ready`/`pix_done` handshake and the
  reset values (all registers clear to +0);
- the coefficients are plain inputs: nothing here evaluates `cos`, `sin` or the
  division, and no image memory is included.

The original unit reached 50 MHz on a Spartan-3 class FPGA; this RTL has not
been timed on an FPGA. Stage 1 and 3-5 each hold a full floating-point adder
in one clock, which is the critical path.
