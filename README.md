# A 256-point radix-4 FFT engine built from 16 reusable cores

This engine computes continuous 256-point complex FFTs without building a
fully parallel flow graph. It uses only 64 radix-4 butterflies, one stage's
worth: sixteen identical *FFT cores*, each with four butterflies. The same
butterflies compute all four stages of the decimation-in-frequency (DIF)
transform. Between stages the cores exchange intermediate results with
their neighbours in a 4 x 4 grid, over per-row and per-column buses. Each
core has two input buffers. While one frame is computed, the next frame is
loaded and the previous frame's results are written out, so loading,
computation and output overlap.

```
              input system  (4 input buses, one per grid column)
                 |        |        |        |
   GCCU ---->  core 0   core 1   core 2   core 3    <- horizontal bus, row 0
   (global     core 4   core 5   core 6   core 7    <- row 1
    control)   core 8   core 9   core 10  core 11   <- row 2
               core 12  core 13  core 14  core 15   <- row 3
                 |        |        |        |       vertical buses (columns)
              output system  (4 output channels)
```

## Number format and scaling

* Data: each real and imaginary part is an 18-bit two's complement word
  with 1 sign bit, 1 integer bit and 16 fraction bits. Inputs are expected
  in [-1, +1].
* Twiddle factors: 8-bit two's complement words with 6 fraction bits, so
  1.0 = 64 is exact. Entry k of the table is
  `round(64*cos(2*pi*k/256))` and `round(-64*sin(2*pi*k/256))`. The table is
  computed at elaboration (`fft_pkg::twiddle_table`), not stored in a file.
* Every butterfly divides by 4, using an arithmetic shift right by 2, so the
  engine delivers `X(k) = (1/256) * sum_n x(n) exp(-j 2 pi n k / 256)`.
  There is no block floating point and no saturation. With inputs in
  [-1, +1] nothing overflows.
* A twiddle product is 26 bits (18 x 8). Dropping its 6 twiddle fraction
  bits (rounding toward minus infinity) brings it back to 18 bits.

Against an exact floating-point DFT/256, random full-scale frames show a
maximum error of about 100 LSB (of 2^-16), mostly from the 6-bit twiddles.
A single-tone frame shows about 250 LSB.

## The butterfly (`br4b`) and its multiplier

Each butterfly element holds its four complex operands
`a, b, c, d = x(n), x(n+N/4), x(n+N/2), x(n+3N/4)` in eight 18-bit operand
registers. The operands are written one complex word per cycle. The element
then computes, combinationally:

```
y0 =  (a + b + c + d)/4
y1 = ((a - jb - c + jd)/4) * W^p
y2 = ((a - b + c - d)/4)   * W^2p
y3 = ((a + jb - c - jd)/4) * W^3p
```

The sums are 20 bits wide before the shift. `p` (`tw_base`) comes from the
core's controller. Each of the three complex multipliers has its own
coefficient ROM (`twiddle_rom`), addressed by `p`, `2p` and `3p` mod 256.

A complex multiplier (`cmplx_mult`) uses three real multipliers instead of
four:

```
k1 = wr*(xr + xi)   k2 = xi*(wr + wi)   k3 = xr*(wi - wr)
re = k1 - k2        im = k1 + k3
```

Each real multiplier (`booth_mult`) is a parallel radix-4 Booth multiplier.
The multiplier operand is recoded into digits in {-2..+2}, and the partial
products are summed in a single combinational array. No FPGA DSP blocks are
assumed.

## Where every point lives: the data placement

This is the part of the design that takes the most care. Write the input
index in base 4 as `n = 64*n3 + 16*n2 + 4*n1 + n0`. Stage s of a radix-4
DIF FFT combines the four points that differ only in one digit: n3, then n2,
then n1, then n0. A core holds 16 points, so two digits vary inside a core
and two are fixed by the core's grid position (row r, column q).

| stage | core (r, q) holds          | butterfly digit (operand i) | butterfly b = | twiddle exponent p of butterfly b |
|-------|----------------------------|-----------------------------|---------------|-----------------------------------|
| 0     | n1 = r, n0 = q             | n3                          | n2            | 16b + 4r + q                      |
| 1     | n3 = r, n0 = q             | n2                          | n1            | 4 * (4b + q)                      |
| 2     | n3 = r, n2 = q             | n1                          | n0            | 16b                               |
| 3     | n3 = r, n2 = q             | n0                          | n1            | 0                                 |

From stage 0 to stage 1 the fixed digit n0 = q stays the same, so points
move only within a grid column: a vertical-bus exchange. From stage 1 to
stage 2, n3 = r stays, so points move within a row: a horizontal-bus
exchange. Stages 2 and 3 hold the same points, so no exchange is needed.

The butterflies work in place. Output i of butterfly b lands at the position
whose butterfly digit is i, and it is captured at entry `4b + i` of the
core's local buffer.

**Exchange schedule.** An exchange takes 16 cycles, j = 4g + h. In cycle j
every core of a group (a column for stage 1, a row for stage 2) does two
things:

* It puts its local-buffer entry `4g + ((pos - h) mod 4)` on its own bus
  lane. `pos` is the core's row for the vertical exchange and its column
  for the horizontal one.
* It reads the lane of neighbour `(pos + h) mod 4` into operand `g` of its
  butterfly `(pos + h) mod 4`.

In every cycle the four senders serve four different receivers. After 16
cycles each core has received 4 words from each member of its group,
itself included. `tb_lccu` checks this point by point against the table
above.

**Loading** needs no reordering memory. Each cycle the input system takes
the samples `x(4t+q)`, q = 0..3, one per input bus. Bus q serves grid
column q, and only the core in row `t mod 4` pushes the sample. Core
(n1, n0) therefore receives `x(n)` as its word number `4*n3 + n2`, which is
exactly the stage-0 operand order.

**Output.** After stage 3, core (r, q) holds at its word j the result for
flow-graph position `64r + 16q + 4*(j/4) + (j mod 4)`. In a DIF FFT that
position holds `X(k)` with k its base-4 digit reversal:
`k = 64*(j mod 4) + 16*(j/4) + 4q + r`. The output system computes k and
sends it with each result. Each of the four output channels carries the
results whose k has middle digit q, and consecutive channel writes are not
in address order. The external memories must therefore be written by
address.

## One frame, cycle by cycle

The global controller (`gccu`) broadcasts a control word to all cores. The
word holds the phase, the stage, the cycle j, and which buffer set is being
computed.

| phase    | cycles      | what happens in every core                                                  |
|----------|-------------|------------------------------------------------------------------------------|
| `PH_OPS` | 16 per stage | one word per cycle into one operand register: from the input buffer (stage 0), a bus lane (stages 1, 2) or the own local buffer (stage 3) |
| `PH_COMP`| 1 per stage  | the 16 butterfly results are captured in the local buffer                   |
| `PH_WB`  | 16          | the local buffer is written back into the input buffer set it came from    |

A computation takes 4 x 17 + 16 = 84 cycles. The controller swaps the two
buffer sets one cycle after a computation ends, provided the other set holds
a complete frame. A frame can therefore start every **85 cycles**. Loading a
frame takes 64 cycles. When frames arrive faster than the engine computes
them, `in_ready` goes low until the swap.

At a swap the set that was just computed becomes the loaded set. If it holds
results, the output system drains them in 64 cycles: in cycle t the core in
row `t mod 4` of each column pops one word. New samples are pushed into the
same buffers in the same order, never ahead of the drain. A full buffer can
pop and push in the same cycle, so one 16-entry buffer holds both the
outgoing results and the incoming frame.

**Latency.** The results of frame f leave the engine while frame f+2 is
being loaded. To flush the last real frame out of a stream, send one more
frame, for example zeros.

## Inside a core (`fft_core`)

* `fifo16` x 2: the two input-buffer sets (16 complex points each, with
  first-word fall-through).
* MUX1, one per set: chooses between input-bus data and write-back data.
* MUX2: picks one of the four horizontal or four vertical bus lanes.
* MUX3: chooses the operand source (set 0, set 1, MUX2 or the core's own
  local buffer).
* `br4b` x 4: the four butterflies.
* `local_buffer`: takes the 16 results in parallel and is read one word per
  cycle at an address.
* DMUX: routes the local-buffer word to the core's horizontal lane, its
  vertical lane, or the write-back path.
* MUX4: chooses which set feeds the vertical output bus.
* `lccu`: a combinational decoder that turns the global control word and the
  core's `ROW`/`COL` parameters into all of the selects, enables, read
  addresses and twiddle exponents above.

Each bus is made of one lane per core, the local-buffer output of that core.
A reader picks one lane with MUX2. The vertical output channel is separate
from the exchange lanes, so output can overlap the stage-1 exchange of the
next frame.

## Top-level interface (`fft_engine`)

| port                        | dir | width         | meaning |
|-----------------------------|-----|---------------|---------|
| `clk`, `rst_n`              | in  | 1             | clock, asynchronous active-low reset |
| `in_valid` / `in_ready`     | in/out | 1          | four samples are transferred when both are high |
| `in_data[4]`                | in  | 2 x 18 each   | `in_data[q]` = x(4t+q), t = 0..63 within a frame |
| `out_valid[4]`              | out | 4             | result valid on channel q |
| `out_addr[4]`               | out | 8 each        | frequency index k |
| `out_data[4]`               | out | 2 x 18 each   | X(k) = DFT/256 |
| `frame_done`                | out | 1             | pulse when a frame's computation has finished |
| `busy`                      | out | 1             | a computation is running |

The complex type is `fft_pkg::cplx_t`, a packed struct `{re, im}` of two
18-bit signed words.

## Files

| file | content |
|------|---------|
| `rtl/fft_pkg.sv` | widths, `cplx_t`, control word, selects, twiddle-table function |
| `rtl/booth_mult.sv` | radix-4 Booth multiplier |
| `rtl/cmplx_mult.sv` | three-multiplier complex product |
| `rtl/twiddle_rom.sv` | 256 x (8+8) twiddle ROM |
| `rtl/br4b.sv` | radix-4 butterfly with operand registers |
| `rtl/fifo16.sv` | 16-entry input buffer |
| `rtl/local_buffer.sv` | local result buffer |
| `rtl/lccu.sv` | local controller of one core |
| `rtl/fft_core.sv` | one core |
| `rtl/gccu.sv` | global controller |
| `rtl/input_system.sv`, `rtl/output_system.sv` | input and output systems |
| `rtl/fft_engine.sv` | top: 16 cores, controllers, buses |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fft_stream` |
| `tb/fft_ref_pkg.sv` | reference twiddles and butterfly used by testbenches |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Build and run one with plain Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fft_pkg.sv tb/fft_ref_pkg.sv tb/tb_fft_engine.sv \
    --top-module tb_fft_engine -Mdir obj -o sim
./obj/sim
```

Other testbenches are built the same way, with `tb_<module>.sv`.

* `tb_fft_engine` streams six frames through the full-size engine: four
  random, one tone, one flush. It compares every result bit-exactly with a
  separately written integer radix-4 FFT, and within 400 LSB with a
  floating-point DFT/256. It checks the 85-cycle frame period. It also counts
  the engine's mechanisms, and each must occur at least once: buffer-set
  swaps, input stalls, output overlapping computation, vertical and
  horizontal exchanges, a pop and push together on a full buffer, and gaps in
  the input stream. It runs in well under a second.
* `tb_fft_stream` runs the engine as a continuous processor. It sends 8
  frames back to back at full input rate and then 8 frames with random gaps,
  and checks every result bit-exactly. It also checks that the engine
  sustains one frame per 85 cycles, with exactly 64 input transfers per
  period.
* `tb_lccu` checks the whole 4 x 4 grid's exchange schedule against the
  placement table above.
* `tb_fft_core` takes one core (row 1, column 2) through a whole frame. Its
  bus neighbours are replaced by random data.
* The other testbenches check each block against independent models: `*`
  for the Booth multiplier, direct four-multiplier products, `$cos`/`$sin`
  tables, a queue model of the FIFO, and so on.

## Design choices and limits

These points are choices of this implementation. They are not fixed by the
architecture it follows:

* The twiddle words have 6 fraction bits. Rounding is toward minus infinity
  after the 1/4 scaling and after the twiddle product.
* Operands load at one complex word per cycle. Together with the 16-cycle
  write-back this sets the 85-cycle frame period.
* Sequencing is split between one global controller, which broadcasts the
  phase, stage and cycle, and a combinational local decoder in each core.
* MUX1 is duplicated, one per buffer set, so write-back and loading can
  overlap.
* The vertical output channel is separate from the exchange lanes.
* The external ports use a valid/ready input stream and an addressed output
  stream. A trailing frame is needed to flush the last result.
* Results are written to their natural-order address. The output stream
  itself is not in natural order.
* Each coefficient ROM holds the full 256-entry table. A butterfly needs
  only a handful of entries per stage, so an area-optimised version would
  store a per-core subset.
* The complex multiplier forms `wr+wi` and `wi-wr` in logic, which makes
  five adders. Precomputing them in the ROM would leave three.
* Clock generation and the external memories are not part of the RTL. The
  engine uses a single clock, and the memories sit outside its ports.
* No FPGA area figures are reproduced. The RTL is technology independent.
  It uses no vendor primitives or embedded multipliers.
