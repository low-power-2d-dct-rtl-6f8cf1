# Low-power 8x8 2-D DCT processor (direct method, parallel distributed arithmetic)

This is synthesizable SystemVerilog for an 8x8 two-dimensional DCT processor
aimed at battery-powered video terminals. It is an RTL rendering of a
published low-power chip architecture. It saves work at the algorithm level.
A row-column DCT needs 16 one-dimensional 8-point transforms per block. This
design uses the *direct* 2-D method, which needs only 8 of them plus
additions. The eight transforms run side by side in bit-serial distributed
arithmetic (DA): per input bit, each output takes one table look-up and one
add. So the whole block is transformed in about ten clock cycles at a low
internal switching rate. Transpose SRAMs on each side turn the word-serial
pixel stream into bit planes for the core, and turn the core's parallel
results back into a word stream.

It computes the unnormalised transform

    Y[k1][k2] = sum_{n1,n2} x[n1][n2] cos(pi(2n1+1)k1/16) cos(pi(2n2+1)k2/16)

for 9-bit inputs (-255..255), giving 16-bit outputs (|Y| <= 16320). The usual
scale factor `2c(k1)c(k2)/N` is left to the next stage, which normally does
quantisation and zig-zag scan anyway.

## The direct 2-D method

This is the part of the design that is least obvious, and the index wiring in
`dct_pkg.sv` and `dct_post.sv` only makes sense with it.

1. **Permutation.** Rows and columns are each reordered as even indices
   ascending, then odd indices descending: `y[n1][n2] = x[p(n1)][p(n2)]`,
   with `p(n) = 2n` for n < 4 and `p(n) = 15 - 2n` for n >= 4. The cosine
   argument then becomes `(4n+1)k`.
2. **Complex form.** Set `W = exp(-j 2pi/32)` and
   `U[k1][k2] = sum y[n1][n2] W^((4n1+1)k1 + (4n2+1)k2)`. Then the real
   coefficients are
   `Y[k1][k2] = (Re U[k1][k2] - Im U[8-k1][k2]) / 2` and
   `Y[k1][8-k2] = (-Im U[k1][k2] - Re U[8-k1][k2]) / 2`.
   So U is needed for only one member of each column pair {k2, 8-k2}. This
   design uses k2 in {0, 1, 2, 4, 5}. For k1 = 0 the partner `U[8][k2]` is
   `-j U[0][k2]`. This gives `Y[0][k2] = Re U[0][k2]` and
   `Y[0][8-k2] = -Im U[0][k2]`: no halving, and a sign flip for the second.
3. **Twiddle re-indexing.** For a fixed n1, the map `4n2+1 = (4t+1)(4n1+1) mod 32`
   is a one-to-one map from n2 to t. Write the sequence y[n1][.] in the order
   of t, and set `k1 + (4t+1)k2 = 8a + b` with 0 <= b < 8. Then
   `U[k1][k2] = sum_t (-j)^a V_t(b)`, where
   `V_t(b) = sum_n1 y[n1][t] W^((4n1+1)b)`.
   So each t needs one 8-point transform, and multiplying by `(-j)^a` only
   swaps and negates real and imaginary parts. That is wiring, not
   arithmetic.
4. **Only real parts.** The inputs are real, so
   `V_t(8-b) = -j conj(V_t(b))`. This gives `Im V_t(b) = -Re V_t(8-b)` and
   `Im V_t(0) = 0`. Each "complex 1-D DCT" therefore produces just 8 real
   numbers, `R_t(b) = sum_n y_n cos(pi(4n+1)b/16)`. This is an ordinary
   8-point DCT-II of the row, taken in the permuted order.

In hardware, steps 1 and 3 together are a fixed input wiring. Transform t,
input n1, takes the sample at raster address `x_addr(t, n1)`. Transform 0,
for example, gets x at (0,0),(2,2),(4,4),(6,6),(7,7),(5,5),(3,3),(1,1).
Steps 2 and 4 are the combination network in `dct_post`. Every sequence
involved extends past b = 7 by `X(b+8) = -j X(b)`. Evaluating it at any
index m is therefore a look-up of `X(m mod 8)` plus a swap/negate, which is
routing. With `t = t0 + 2 t1 + 4 t2` and `c = k1 + k2`, the sum
`U = sum_t V_t(c + 4 t k2)` splits radix-2 over t into three adder layers:

* layer 1 pairs t with t+4 (0-4, 2-6, 1-5, 3-7). The factor is `(-1)^k2`, so
  it forms `R_t + R_{t+4}` for even and `R_t - R_{t+4}` for odd columns.
* layer 2 pairs t1 = 0 and 1 with the factor `(-j)^k2`, for each `k2 mod 4`.
* layer 3 adds the t0 = 0 and t0 = 1 halves, the second taken at index
  `c + 4 k2`.

The eq.-4 stage then forms the 64 outputs from the 40 U values.
All index arithmetic is done at elaboration time by constant
functions.

## Datapath

```
 in_data 9b ─► [64x9 transpose SRAM]x2 ─► mux ─► 64 bit-planes ─► dct_core ─► 64 bit-planes ─► [16x64 transpose SRAM]x2 ─► mux ─► out_data 16b
 (word-serial, 1/clk)   ping-pong         (LSB first, 10 cycles)               (16 cycles)        ping-pong               (1/clk)
```

Inside `dct_core`, all eight `dct_cplx_1d` work on the same bit plane at the
same time:

* **Butterfly (`dct_bs_alu`, 8 per transform).** Bit-serial adders and
  subtractors form `s_n = y_n + y_{n+4}` and `d_n = y_n - y_{n+4}`, n = 0..3.
  They can do this because `cos(pi(4(n+4)+1)b/16) = (-1)^b cos(pi(4n+1)b/16)`.
  Even outputs then depend only on s and odd outputs only on d. Each output
  is a 4-input inner product, and its ROM has 16 words instead of 256. The
  9-bit sign plane is presented twice, so the 10-bit butterfly results keep
  their sign.
* **DA unit (`dct_da_unit`, 8 per transform, 64 in all).** In each cycle the
  four current bits of s (or d) address the unit's ROM. The word is added to
  the accumulator, or subtracted for the sign bit, and the accumulator shifts
  right one place. The bits shifted out go into a 9-bit side register, so
  the 13-bit adder gives the exact sum of the ROM words over all ten bits.
* **ROM (`dct_da_rom`).** Word `a` is the sum of `cos(pi(4n+1)b/16)` over the
  set bits n of a. It has 12 bits with 8 fractional. The table is computed
  at elaboration from 16-bit cosine constants and rounded once. A
  precharged ROM burns power only when it evaluates. To model that, an
  address-transition detector (`eval`) reads the array and loads the output
  latch only when the address has changed. Otherwise the latched word is
  reused. In the test stream roughly a third of all look-ups are skipped
  this way.
* **Accumulator adder (`dct_csel_adder`).** A 13-bit square-root
  carry-select adder with stages of 2, 3, 4 and 4 bits (bits 0-1, 2-4, 5-8,
  9-12). Each stage has two `dct_manchester` carry-chain adders, one for
  carry-in 0 and one for 1, and a mux picks between them on the real carry.
* **Combination (`dct_post`).** Combinational, at 24 bits. Its results are
  registered in `dct_core` and then read out bit plane by bit plane
  (`plane_sel`).

## Schedule and timing

`dct_ctrl` runs one event-driven sequence per block. Take L as the cycle in
which the 64th sample of a block is accepted:

| cycles after L | activity |
|---|---|
| 1 .. 10   | input bank read, bit planes 0..8 then plane 8 again |
| 2 .. 11   | core receives the planes (`core_valid`, `first` at 2, `last` at 11) |
| 14        | coefficients registered in the core (`y_valid`) |
| 15 .. 30  | 16 bit planes written into the current output bank |
| 31 .. 94  | output bank read, one coefficient per cycle |
| 32 .. 95  | `out_valid` / `out_data` |

* **Throughput.** One sample per clock, one block per 64 cycles, with no
  gaps in the output when the input is continuous. The core is busy only 13
  cycles per block.
* **Latency.** 32 cycles from the last sample of a block to its first
  coefficient. It is 159 cycles from the first sample to the last
  coefficient, at full rate.
* **Input gaps.** `in_valid` may drop at any time. A block starts as soon as
  its 64th sample is in.
* **Ping-pong.** Input banks swap after every 64 samples. Output banks swap
  after every 16-plane write. The reader moves straight on to the other bank
  when it is full.
* **No backpressure.** There is no `out_ready`. `overrun` (sticky) flags a
  schedule violation: a second `y_valid` while the writer is busy, or a write
  into an output bank not yet read out. This cannot happen at one sample per
  clock or less.

Outputs appear in raster order: word i is `Y[i/8][i%8]`, with k1 the row
(vertical frequency of x[n1][n2]) and k2 the column.

## Number formats and accuracy

| quantity | format |
|---|---|
| input sample | 9-bit two's complement |
| butterfly result | 10-bit, bit-serial |
| ROM word | 12-bit signed, 8 fractional bits |
| DA accumulator | 13 bits, plus 9-bit shift-out register |
| 1-D result `R_t(b)` | 16-bit signed, 4 fractional bits (|R| <= 2040) |
| combination sums | 24 bits |
| output | 16-bit signed integer, round half up |

The only significant error is the quantisation of the ROM words. It is at
most 2^-9 per word, weighted by 1 + 2 + ... + 2^9, so a 1-D result is off by
at most about 2.0 (measured maximum 1.9). An output sums 16 such terms and
halves them, so its worst case is about 17 LSB. Against a floating-point
reference the measured maximum over random and full-scale blocks is about 8
LSB of the 16-bit unnormalised output. After the usual 1/4 (AC) or 1/8 (DC)
normalisation that is about 2 LSB. If you need more accuracy, widen
`ROM_W`/`ROM_FRAC` and `ACC_W` together in `dct_pkg` (for example 16/12 and
17). The adder instance in `dct_da_unit` must then get a `STAGE_W` list
that adds up to the new `ACC_W`.

## Files

| file | content |
|---|---|
| `rtl/dct_pkg.sv` | constants, word types, permutation / twiddle index functions, ROM word function |
| `rtl/dct2d_top.sv` | top level: buffers, muxes, core, controller |
| `rtl/dct_ctrl.sv` | ping-pong and sequencing controller |
| `rtl/dct_tp_sram.sv` | two-port transpose SRAM (row write, column read) |
| `rtl/dct_bank_mux.sv` | bank select |
| `rtl/dct_core.sv` | direct 2-D DCT core |
| `rtl/dct_cplx_1d.sv` | one 8-point transform: butterflies + 8 DA units |
| `rtl/dct_da_unit.sv` | DA shift-accumulate unit |
| `rtl/dct_da_rom.sv` | DA look-up ROM with address-transition detection |
| `rtl/dct_csel_adder.sv` | 13-bit square-root carry-select adder |
| `rtl/dct_manchester.sv` | Manchester carry-chain stage |
| `rtl/dct_bs_alu.sv` | 1-bit serial adder/subtractor |
| `rtl/dct_post.sv` | routing and combination network |
| `tb/tb_<module>.sv` | self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. It
compares against floating-point evaluations of the defining formulas, not
against a copy of the RTL arithmetic. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/dct_pkg.sv tb/tb_dct2d_top.sv --top-module tb_dct2d_top
./obj_dir/Vtb_dct2d_top
```

Replace the testbench name to run any other one.

`tb_dct2d_top` runs the chip at its only configuration. It streams 16
blocks and checks every coefficient (tolerance 12 LSB), the 32-cycle
latency, gap-free output and `overrun`. It also checks that each mechanism
occurred: both banks on each side, input gaps, a new block arriving while
the previous one is still being output, and skipped ROM evaluations. It
takes well under a second.

`tb_dct_hdtv_frame` is a workload test. It pushes a synthetic 1920x1080
4:2:2 frame, 64,800 blocks, through without a single idle cycle, and checks
all 4.1 million coefficients. It also checks that the frame takes exactly
64 cycles per block plus the 95-cycle pipeline. That rate is what real-time
HDTV 4:2:2 at 30 frames/s needs at about 124 MHz; 4:2:0 needs 93 MHz. The
test takes about a minute.

## Where this RTL departs from the original chip

* **Latency.** The original reports 198 cycles. This schedule, which is its
  own design, reaches 32 cycles to the first and 95 cycles to the last
  output after a block is complete.
* **Combination network.** The original draws layered butterflies around a
  routing module, but its wiring is not given in detail. The three layers
  here are derived from the same algorithm. Only the first layer's pairing
  (t with t+4) is taken from the original drawing.
* **Fast 1-D algorithm.** Only the first even/odd butterfly of the 1-D
  transform is built. The original counts 320 one-bit ALUs without saying
  how they are used. This design has 64.
* **Fixed-point widths.** The ROM word width, the fractional bits and the
  rounding were chosen to fit the 13-bit accumulator adder and the 16-bit
  internal word length.
* **SRAM organisation.** Each 64x16 output bank is modelled as one 16x64
  array. The original builds it from two 32x16 macros.
* **Circuit-level parts.** Sense amplifiers, write buffers, precharge
  circuits, the dynamic ROM core, clock buffers and the low-voltage operation
  are not modelled. The ROM's evaluate-on-address-change behaviour is kept.
* **Zig-zag scan.** Not part of this design. The output is raster order.

The block size is fixed at 8x8. The index functions are written for general
N, but several widths and counters in the controller and the 4-input DA
split assume N = 8.
