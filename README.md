# Parallel 8-input Haar wavelet pipeline

This is a small, fully pipelined circuit that takes eight signed samples at once and
returns their complete three-level Haar wavelet-packet decomposition. It is meant as the
front end of an image-recognition chain: rows of pixels go in eight at a time, and the
averages and differences that come out are what later stages filter, threshold and
classify. Nothing is sequenced or shared. Every pair of values has its own average unit
and its own difference unit, so a new group of eight samples can enter on every clock.

The design follows a published 8-input architecture and reproduces every coefficient
printed in that design's simulation results. The bit widths, reset and valid flag are
this implementation's own choices (see "Where this design departs").

## The transform

There are four ranks of registers:

```
 din[0..7] ──► R R R R R R R R                      input registers
               │ pairs (0,1)(2,3)(4,5)(6,7)
               ▼
 level 1       A A A A | D D D D                    group of 8
               │ pairs inside each group of 4
               ▼
 level 2       A A D D | A A D D                    groups of 4
               │ pairs inside each group of 2
               ▼
 level 3       A D | A D | A D | A D                groups of 2 ──► dout[0..7]
```

* **A** (average) computes `(a + b) / 2`, with the quotient truncated **toward zero**.
  For example, `(7 + -20) / 2 = -6`, not -7.
* **D** (difference) computes `a - b`. It is *not* halved.

At each level, the values are split into groups. The first level has one group of
eight, and each later level halves the group size. Inside a group, the values are taken
in pairs `(2i, 2i+1)`. The average of pair `i` goes to position `i`, and its difference
goes to position `G/2 + i`. So each group ends up with its averages in the first half
and its differences in the second half.

The differences are transformed again at every level, just like the averages. The
result is therefore a full wavelet-packet tree, not the usual dyadic pyramid. Output `k`
is the coefficient reached by the path of A/D choices given by the bits of `k`, with
level 1 as the most significant bit:

Write `m(i,j)` for the truncated average of `xi` and `xj` (x = din), and
`dk = x(2k) - x(2k+1)` for the four level-1 differences:

| dout | path | value (each average truncated) |
|---|---|---|
| 0 | AAA | average of the eight samples |
| 1 | AAD | average of x0..x3 minus average of x4..x7 |
| 2 | ADA | avg( m(0,1) - m(2,3), m(4,5) - m(6,7) ) |
| 3 | ADD | (m(0,1) - m(2,3)) - (m(4,5) - m(6,7)) |
| 4 | DAA | average of d0..d3 |
| 5 | DAD | avg(d0, d1) - avg(d2, d3) |
| 6 | DDA | avg(d0 - d1, d2 - d3) |
| 7 | DDD | (d0 - d1) - (d2 - d3) |

Worked example, taken from the published simulation and checked by the testbench:

```
din   = 18   5   1   9  13   6   2   3
lvl 1 = 11   5   9   2  13  -8   7  -1
lvl 2 =  8   5   6   7   2   3  21   8
dout  =  6   3   6  -1   2  -1  14  13
```

## Timing

* **Latency:** samples presented before rising edge *k* are captured by the input
  registers at edge *k*. Their coefficients are on `dout` after edge *k + 3*. That makes
  four register ranks for N = 8, or `log2(N) + 1` in general.
* **Throughput:** one vector per clock, with no stalls and no back-pressure.
* **`in_valid` / `out_valid`:** a flag that travels down a shift register of the same
  depth. It only labels which output cycles carry real data. The datapath computes on
  every clock whether the flag is set or not.
* **Reset:** `rst_n` is asynchronous and active low. It clears every register, including
  the valid flags, to zero.

## Widths and overflow

The inputs are `IN_W` = 8-bit two's complement values. Each level is carried one bit
wider than the level before it, so `dout` is `IN_W + log2(N)` = 11 bits. The widest
value is a difference of differences of differences. With full-range inputs it reaches
±1020, so no coefficient can wrap.

The published design declares every signal, outputs included, as an integer in
-127..127, which is 8 bits. Its coefficients would wrap for large input differences.
Every value in its published examples fits in 8 bits, so the two designs agree on those
examples. If you need the 8-bit interface, take the low bits of `dout` or saturate them.

## Modules

| file | role |
|---|---|
| `rtl/haar_pkg.sv` | default size (`HAAR_N = 8`, `HAAR_IN_W = 8`), the per-level width function |
| `rtl/haar.sv` | top: input register rank, `log2(N)` levels, valid pipeline |
| `rtl/haar_stage.sv` | one level. Parameters: `N` values, group size `G`, input width `IN_W`. Output is `IN_W + 1` bits wide |
| `rtl/haar_adddiv.sv` | registered average unit (A) |
| `rtl/haar_difference.sv` | registered difference unit (D) |
| `rtl/haar_reg.sv` | input register (R) |

How the average unit rounds: it forms the sum `a + b` at full width. If the sum is
negative, it adds 1. It then shifts right arithmetically by one bit. That gives the same
result as integer division by two, truncated toward zero, at the cost of one adder and
the carry-in.

`haar` accepts any power-of-two `N` (it checks this with an assertion), and any `IN_W`.
The group size at level `lv` is `N >> (lv - 1)`. Only N = 8 comes from the published
design. Larger N follows the same rule that design's reference software uses for any
power-of-two length.

At the default size, the RTL has 308 flip-flop bits: 64 input bits, 72 + 80 + 88
level bits and 4 valid bits. Synthesis merges the duplicated sign bits of the average
registers and leaves 291. There are 24 average units and 24 difference units in all.

## Where this design departs

* **Output widths grow** by one bit per level, instead of staying at 8 bits (see above).
* **Reset and valid flag were added.** The published design has neither.
* **Clock buffer:** the published design routes the clock through a global clock-buffer
  primitive. Here `clk` drives the registers directly. Place a clock buffer in your own
  top level if your technology needs one.
* **Not included:** the rest of the recognition chain. That covers wavelet-domain
  filtering, locating the object, segmenting, and the neural-network classifier, plus
  any frame buffer or row/column sequencing that would run this core over a whole image.
  Their hardware is not specified. This block only computes the 8-point transform.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if
it hangs.

* `tb/tb_haar.sv` tests the top at its default size. It sends the three published input
  vectors back to back and compares the outputs with the published coefficients. It then
  sends range extremes, and 400 random vectors with random idle gaps, and compares them
  with an integer reference model of the packet tree. It checks that every output
  appears exactly three clocks after its input was registered. It also counts
  back-to-back vectors, idle gaps, negative odd sums (where the rounding matters) and
  coefficients outside 8 bits, and fails if any of these never occurs.
* `tb/tb_haar_adddiv.sv`, `tb/tb_haar_difference.sv` and `tb/tb_haar_reg.sv` test the
  units one at a time. They use the published pairs, the range extremes, random
  operands, one-clock latency and asynchronous reset.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/haar_pkg.sv tb/tb_haar.sv --top-module tb_haar
./obj_dir/Vtb_haar
```

Replace `tb_haar` with the name of another testbench to run that one. The full top-level
test runs in well under a second.
