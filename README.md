# Digit-serial 16-tap FIR filter with a shift-add multiplier block

A transposed-form FIR filter needs every input sample multiplied by all of
its coefficients at once. Because the coefficients are constants, these
products can share one multiplier block built only from shifts, adders and
subtractors (multiple constant multiplication, MCM), and partial products
that several coefficients need can be computed once. This design builds
such a block, with the graph-based (GB) sharing of 29x and 43x at its
heart, and runs the whole filter digit-serially: every word moves two bits
per clock, least significant digit first. An adder is then two full adders
and one carry flip-flop, and a shift is a short delay instead of a wide
bus.

```
 x_in[7:0] --> ds_p2s --x digit--> fir_mcm ==16 product digits==> fir_ds_chain --y digit--> ds_s2p --> y_out[17:0]
                  ^                   ^                               ^                      ^
                  +------------- ds_ctrl (digit index, take, done) ---+----------------------+
```

## Numbers and timing at a glance

| item | value | origin |
|---|---|---|
| taps | 16 | source design |
| digit size D | 2 bits per clock | source design |
| coefficients h[0..15] | 0, 3, 4, 5, 8, 9, 15, 16, 18, 23, 29, 32, 43, 64, 128, 4 | see "Coefficients" |
| input x_in | 8-bit two's complement | width from the source design, signedness chosen here |
| word length W | 18 bits, NDIG = 9 digits | chosen here: the output can never overflow |
| throughput | one sample per 9 clocks | follows from W and D |
| latency | y[n] valid 9 clock edges after x[n] is captured | chosen here |
| output y_out | 18-bit two's complement, exact | chosen here |

All sizes live in `rtl/fir_pkg.sv`.

## How a digit-serial word works

A word of W = 18 bits takes NDIG = 9 consecutive clock cycles. Its digits
are numbered 0 (least significant) to 8, and the counter in `ds_ctrl` tells
every block which digit is passing (`dig`). All blocks run on the same
word rhythm, so a result digit leaves in the same cycle as the input digit
that produced it. Nothing inside the datapath is pipelined except the carries
and the shift/delay registers.

Three rules keep the words apart. They are the part of the design that is
easiest to get wrong:

1. **Adders restart at digit 0.** `ds_adder` holds the carry out of one
   digit in a flip-flop and feeds it into the next. When `dig` is 0 the
   stored carry belongs to the previous word, so it is replaced by 0 (adder)
   or 1 (subtractor, which computes a + ~b + 1). With D = 1 the same module is
   the classic bit-serial adder.
2. **Shifts are delays with a mask.** Multiplying by 2^K means every bit
   arrives K bit positions later. `ds_shl` keeps the last K bits of the stream
   and takes each output digit from the window {current digit, last K bits}.
   Output bit j of digit `dig` is forced to 0 while `dig*D + j < K`, because
   its source would be the top of the previous word. The top K bits of each
   word fall off, so the result is (x << K) mod 2^W.
3. **Reset looks like zeros already flowing.** After reset the counter starts
   at digit 8, not 0, so the datapath first sees the top digit of an all-zero
   word. A subtractor's carry flip-flop therefore resets to 1, the carry that
   0 - 0 leaves behind. With a reset value of 0 a subtractor would output
   digit "11" here, and that stray digit would reach the top of the first
   real output word.

Because all arithmetic is modulo 2^W and W is wide enough for the largest
possible output (401 x -128 = -51328 needs 17 bits plus sign), intermediate
results such as 7x = 8x - x wrap harmlessly and every output is exact.

## The multiplier block (`fir_mcm`)

For every input digit the block produces 16 product digits, prod[k] for
h[k]*x. The central pair 29x and 43x is built by one of two shift-add graphs,
selected by the `ALGO` parameter of `fir_ds_top` / `fir_mcm`:

| ALGO | graph | adders | module |
|---|---|---|---|
| `MCM_GB` (default) | 7x = (x<<3) - x; 29x = (7x<<2) + x; 43x = 29x + (7x<<1) | 3 | `mcm_29_43_gb` |
| `MCM_CSE` | 5x = (x<<2) + x; 3x = (x<<1) + x; 29x = 5x + (3x<<3); 43x = 3x + (5x<<3) | 4 | `mcm_29_43_cse` |

The GB graph reuses its own intermediate 7x twice; the CSE graph shares the
common subexpressions 3x and 5x between both outputs. Both graphs come from
the source design.

The graph for the other coefficients is this design's own, a small one that
reuses what the pair block already makes:

| coefficient | built as |
|---|---|
| 0 | no product (the chain has no adder there) |
| 4, 8, 16, 32, 64, 128 | x shifted by 2..7 bits |
| 3, 5 | x + (x<<1), x + (x<<2) (GB); taken from the pair block (CSE) |
| 9 | x + (x<<3) |
| 15 | (x<<4) - x |
| 18 | 9x << 1 |
| 23 | 7x + (x<<4) (GB); 15x + (x<<3) (CSE) |

With GB the block has 8 adders or subtractors in all, with CSE also 8.

## The transposed chain (`fir_ds_chain`)

The filter is the transposed form:

```
s[15] = h[15] x[n]
s[k]  = h[k] x[n] + z^-1 s[k+1]     k = 14 .. 0
y[n]  = s[0]
```

Each `+` is a `ds_adder` and each z^-1 a `ds_delay`, a shift register 9
digits deep: one sample period is 9 clocks, so the digit that leaves it is
the same digit of the previous word. A tap with coefficient 0 keeps only its
delay.

## Interface (`fir_ds_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst | in | 1 | synchronous reset, active high |
| x_in | in | 8 | next sample, two's complement |
| x_take | out | 1 | high in the cycle whose closing edge captures x_in |
| y_out | out | 18 | last output y[n], two's complement |
| y_valid | out | 1 | one-cycle pulse when y_out has just been updated |

The filter runs at a fixed rate: `x_take` is high once every 9 cycles, the
first time in the first cycle after reset. There is no back-pressure: the
sample must be on `x_in` when `x_take` is high. `y_out` for the sample
captured at edge t is written at edge t + 9 with `y_valid`.

## Coefficients

The source publication states that the filter has 16 taps and draws the
graphs for 29 and 43, but prints no coefficient table. The values used
here come from its simulation listings for a constant input of 2: the
products of taps 1..5 and 10..15 are listed by tap (3, 4, 5, 8, 9 and 29,
32, 43, 64, 128, 4), and products 15x, 16x, 18x and 23x appear as well.
These four are placed on taps 6..9 in the order they are listed, which is
an assumption. The listings show a steady output of 802 for that input, so
the coefficients sum to 401, which makes h[0] = 0. The test for the whole
filter checks that 802.

To use other coefficients, change `H` in `fir_pkg.sv` and the graph in
`fir_mcm.sv` together: `tb_fir_mcm` compares every product with `H`, so it
catches a graph that does not match. Keep W at least the bit count of
sum|h| x 2^(XW-1) plus sign, rounded up to a multiple of D.

## Where this design departs from the source

- The source reports a much smaller FPGA implementation (17 flip-flops, 14
  I/O pins, an 11-bit output fed by one 2-bit input digit). A filter with
  15 real one-sample delays cannot be that small, so these figures are not
  reproduced here. This design stores 15 x 18 delay bits and gives the
  exact 18-bit result.
- The word length, the serial/parallel converters, the framing counter,
  the reset style, the input number format and the graph for coefficients
  other than 29 and 43 are this design's own choices; the source does not
  describe them.
- The source's bit-parallel filter with generic multipliers, and the
  shift-add graph without sharing, are reference designs it only compares
  with. They are not included.

## Files

| file | content |
|---|---|
| `rtl/fir_pkg.sv` | sizes, coefficients, `mcm_algo_e` |
| `rtl/ds_adder.sv` | digit-serial adder / subtractor |
| `rtl/ds_shl.sv` | constant shift as a masked bit delay |
| `rtl/ds_delay.sv` | one-sample (z^-1) delay |
| `rtl/mcm_29_43_gb.sv`, `rtl/mcm_29_43_cse.sv` | the two graphs for 29x, 43x |
| `rtl/fir_mcm.sv` | 16-product multiplier block |
| `rtl/fir_ds_chain.sv` | transposed adder/delay chain |
| `rtl/ds_ctrl.sv` | digit counter, sample request, word done |
| `rtl/ds_p2s.sv`, `rtl/ds_s2p.sv` | parallel-to-digit and digit-to-parallel converters |
| `rtl/fir_ds_top.sv` | the filter |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fir_ds_top_cse.sv` | the whole filter built with the CSE graph |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself;
each has a watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fir_pkg.sv tb/tb_fir_ds_top.sv \
          --top-module tb_fir_ds_top -Mdir obj_top
./obj_top/Vtb_fir_ds_top
```

Replace the testbench name for any other block; the tools find the
modules through `-Irtl`.

What the tests check, each against values computed in the testbench:

- `tb_ds_adder`: random and all-ones/zero words back to back, D = 2 add
  and subtract, D = 1 add.
- `tb_ds_shl`: shifts by 1, 2, 3, 7 on back-to-back words; the low bits must
  not pick up the previous word.
- `tb_ds_delay`: every digit reappears exactly 9 cycles later.
- `tb_mcm_29_43_gb`, `tb_mcm_29_43_cse`, `tb_fir_mcm`: every product for
  random signed inputs and for -128 and 127, with both graphs; for input 2
  the products must be the values of the source's listing (58, 86, 30, 32,
  36, 46, 64, 128, 8, 6).
- `tb_fir_ds_chain`: the chain against a convolution, driven with
  reference products.
- `tb_ds_ctrl`, `tb_ds_p2s`, `tb_ds_s2p`: framing sequence, sign
  extension, word assembly and valid timing.
- `tb_fir_ds_top` (all defaults) and `tb_fir_ds_top_cse`: 704 samples
  through the whole filter. The run covers constant input 2 (output 802),
  an impulse (outputs replay h[0..15]), 16 x +127 and 16 x -128 (the
  extreme outputs +50927 and -51328), and random data. Every output value
  is checked, and so is the 9-edge latency.

Each test has been run against a deliberately broken copy of its module,
and each caught the fault.
