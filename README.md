# Flipping-structure lifting DWT: (9,7) and integer (9,7) filters

A lifting-based discrete wavelet transform takes about a quarter of the
arithmetic of the convolution form, but it builds a long critical path. Each
lifting step adds a multiple of its neighbours to a sample, and the result
feeds the next step. Unpipelined, the four lifting steps of the (9,7) filter
chain four multipliers and eight adders (4Tm + 8Ta). The convolution form needs
only Tm + 4Ta. Pipelining a lifting datapath fixes the timing, but it adds
registers quickly. In a line-based 2-D transform, every such register becomes a
whole line of temporal buffer.

The **flipping structure** shortens the path without adding any arithmetic. In
each computing unit the multiplier moves off the path that runs from one unit to
the next. It is put on the unit's own "vertical" input instead, with the
coefficient inverted. After that, the chain from input to output passes through
only one multiplier plus adders. The scale factors this leaves behind are taken
out once, in the final normalization multiply.

This repository contains synthesizable SystemVerilog for:

* `flip97_core`: the JPEG2000 (9,7) lifting filter with all four units flipped.
  Its critical path is one multiplier and five adders (Tm + 5Ta).
  * It can also be built with pipeline cuts: `PIPE = 3` gives Tm + Ta and
    `PIPE = 5` gives Tm.
* `flip97_normalize`: multiplies the core's outputs back to normalized
  lowpass/highpass coefficients (K and 1/K included).
* `int97_flip_core`: the integer (9,7) filter (a = -3/2, b = -1/16, c = 4/5,
  d = 15/32).
  * Its c unit is flipped, so 4/5 becomes 5/4 and the whole filter is shifts
    and 13 adders.
  * The critical path is 7 adders.
* `flipping_dwt_top`: both filters side by side.

All of them are 1-D, forward transforms. They take two input samples and give
two output coefficients per clock.

## 1. Flipping a computing unit

A lifting step (a "computing unit") updates one sample stream with a weighted
sum of two neighbours from the other stream:

    y = x + a * (u[k-1] + u[k])

Here `x` is the vertical input and `u[k]` is the output of the unit below. In
the conventional structure `u[k]` passes through the multiplier `a` before it
reaches the adder. In a chain of units, every multiplier is therefore in series.

Flipping divides the unit by its coefficient:

    y / a = x * (1/a) + u[k-1] + u[k]

The multiplier now sits on the vertical input `x`, which comes from a register
node. Its value is ready at the start of the cycle, so the product is formed in
parallel with everything else. Each computing node is then split into two
adders:

* first adder: `x * (1/a) + u[k-1]`. This is off the chain, because `u[k-1]` is
  also a register.
* second adder: `+ u[k]`. This one is on the chain.

The output is now scaled by 1/a. The next unit must use coefficients divided by
the same factor, so the inverses accumulate. For the (9,7) filter, with
`b' = 16 b` and `d' = 2 d`:

| unit | conventional | flipped (this design) |
|------|--------------|------------------------|
| a (predict 1) | h1 = xo + a (xe[k-1] + xe[k]) | h1' = xo/a + xe[k-1] + xe[k] |
| b (update 1)  | l1 = xe[k-1] + b (h1[k-1] + h1[k]) | l1' = xe[k-1]/(a b') + h1'[k-1]>>4 + h1'[k]>>4 |
| c (predict 2) | h2 = h1[k-1] + c (l1[k-1] + l1[k]) | h2' = h1'[k-1]/(b' c) + l1'[k-1] + l1'[k] |
| d (update 2)  | l2 = l1[k-1] + d (h2[k-1] + h2[k]) | l2' = l1'[k-1]/(c d') + h2'[k-1]>>1 + h2'[k]>>1 |

The outputs come out scaled: `l2' = l2 / (a b' c d')` and `h2' = h2 / (a b' c)`.

* **Why `b'` and `d'`:** b is small (about -0.053). So 1/(a b) would be large
  (about 12), and a 12-bit fixed-point word would hold it badly. Scaling b by 16
  and d by 2 keeps every flipped coefficient between 0.6 and 1.4. The
  compensating /16 and /2 become plain right shifts on the chain inputs.
* **Coefficients:** every coefficient is rounded to 12 fraction bits, as below.

  | coefficient | value | Q12 word |
  |-------------|-------|----------|
  | 1/a | -0.630464 | -2582 |
  | 1/(a b') | 0.743750 | 3046 |
  | 1/(b' c) | -1.336134 | -5473 |
  | 1/(c d') | 1.276888 | 5230 |

* **Critical path:** the unpipelined path is the 1/a product, `+ xe[k-1]`,
  `+ xe[k]`, and then one chain adder in each of units b, c and d. That is
  Tm + 5Ta, down from 4Tm + 8Ta. The conventional structure has 4 multipliers,
  8 adders and 4 registers, and the flipped one has exactly the same.

## 2. Normalization (`flip97_normalize`)

The conventional (9,7) outputs are `K * l2` (lowpass) and `h2 / K` (highpass),
with K = 1.149604398. The flipped core delivers `l2'` and `h2'`, so one multiply
per output restores both the flipping factor and K:

    lowpass  = l2' * (a b' c d' K)   = l2' * 1.210511   (Q12 4958)
    highpass = h2' * (a b' c / K)    = h2' * 1.032622   (Q12 4230)

The products without K are `a b' c d' = 1.052980` and `a b' c = 1.187107`. If K
is applied somewhere else, for example folded into a quantizer, only these two
constants in `dwt_pkg` change.

## 3. Pipelined forms (`PIPE` parameter of `flip97_core`)

The flipped datapath pipelines cheaply. The first adder of every split node
depends only on register nodes, and each product depends on a single register.
So the pipelined forms are plain retimings of the same signal-flow graph:

* registers move onto product and first-adder edges;
* some z^-1 nodes become redundant and disappear;
* the outputs are delayed by whole sample pairs.

| PIPE | critical path | data registers | results delayed by |
|------|---------------|----------------|--------------------|
| 0 | Tm + 5Ta | 4 (r1..r4) | - |
| 3 | Tm + Ta  | 6 | 1 pair |
| 5 | Tm (no multiplier and adder in series, at most 3 adders in series) | 10 | 2 pairs |

`PIPE = 3`. Pair t is on the inputs, and the comments name the pair each value
belongs to:

    h1 = xo*(1/a) + (r1 + xe)          unit a, t       -> r2
    q2 = r1*(1/ab') + r2>>4            unit b first adder, t -> q2r
    l1 = q2r + r2>>4                   unit b, t-1
    q3 = r2*(1/b'c) + l1               unit c first adder, t -> q3r
    h2 = q3r + l1                      unit c, t-1     -> r4, highpass out
    m4 = l1*(1/cd')                    unit d product, t -> m4r
    l2 = (m4r + r4>>1) + h2>>1         unit d, t-1     -> lowpass out

Here `r2` (the previous h1) serves two roles at once: it is the z^-1 node of
unit b, and it is the pipeline register on the chain. Unit c reads l1 while it
is current, so it needs no z^-1 register of its own. `PIPE = 5` additionally
registers three things:

* the 1/a product;
* the `r1 + xe` pre-sum;
* the 1/(a b') product.

It also registers the products of units c and d, and keeps l1 for two pairs.

All three settings compute exactly the same numbers. Addition wraps modulo
2^16, so reordering the adds does not change the result, and the testbench
checks this bit for bit.

The original flipping-structure work reaches Tm + Ta with 7 registers and Tm
with 11. The retimed placement here needs 6 and 10. Because the pipelined forms
drop some z^-1 copies, `in_valid` is a clock enable for the whole core. It does
not mark bubbles that travel through the pipeline.

## 4. Integer (9,7) filter (`int97_flip_core`)

The integer (9,7) filter comes close to the (9,7) filter's performance with
dyadic coefficients, except for c = 4/5. Flipping only the c unit turns 4/5 into
5/4 = 1 + 1/4. From there up, all data is scaled by 5/4. So the d unit also
multiplies its vertical input by 5/4, while its neighbour weight stays 15/32.
Both outputs carry the factor 5/4, and the filter's normalization
(K = 4√2/5) absorbs it.

Each node is split so that only the current neighbour's term is on the chain:

    h1 = xo - (s + s>>1)                      s = r1 + xe           (-3/2)
    l1 = (r1 - r2>>4) - h1>>4                                        (-1/16)
    h2 = (r2 + r2>>2 + r3) + l1                                      (5/4)
    l2 = (r3 + r3>>2 + r4>>1 - r4>>5) + (h2>>1 - h2>>5)               (5/4, 15/32)

* **Cost:** 13 adders, no multipliers.
* **Longest chain:** xe -> s -> s + s>>1 -> h1 -> l1 -> h2 -> h2>>1 - h2>>5 ->
  l2, which is 7 adders.
* **Rounding:** every shift is arithmetic and rounds towards minus infinity.
  This rounding rule and the exact way the nodes are split are this design's
  choices.

## 5. Stream interface and timing

Both cores (and the two paths of the top) use the same convention.

* **Input pairs:** on each clock with `in_valid` high, the core accepts pair k.
  That is `x_odd = x(2k-1)` and `x_even = x(2k)`. So the odd sample comes one
  position before the even one, and `r1` keeps `x(2k-2)`.
* **Outputs:** for pair k, the core produces the lowpass coefficient of sample
  2k-4 and the highpass coefficient of sample 2k-3. They appear on `low`/`high`
  with `out_valid` one cycle after pair k + LAT_EXTRA is accepted:
  * LAT_EXTRA = 0 for `PIPE = 0` and in `int97_flip_core`;
  * LAT_EXTRA = 1 for `PIPE = 3`;
  * LAT_EXTRA = 2 for `PIPE = 5`.

  On the (9,7) path of the top, normalization adds one more cycle. A stream
  therefore needs LAT_EXTRA trailing pairs to flush its last result.
* **Throughput and stalls:** one pair per clock. `in_valid` is a clock enable.
  While it is low, nothing in the core moves, and the z^-1 history is kept.
* **Warm-up:** after reset, `out_valid` stays low for the results of the first
  four pairs, while the register nodes still hold zeros. After that, every accepted
  pair produces one output pair.
* **Rows:** rows can follow each other with no reset in between. The first four
  outputs after a row change still mix in the previous row. With symmetric
  extension of four or more samples at the row start, they fall inside the
  extension and are discarded.
* **Boundary extension:** this is the feeder's job. To transform a finite row
  of N samples, extend it symmetrically, for example with 6 samples on each
  side (`x(-i) = x(i)`, `x(N-1+i) = x(N-1-i)`). Stream the extended row and keep
  the outputs whose sample index falls in 0..N-1. `tb_flipping_dwt_top` does
  exactly this.
* **Assertion:** each block asserts this handshake rule: `out_valid` is high
  only in the cycle after an accepted input.
* **Reset:** `rst_n` is asynchronous and active low. All registers clear to
  zero.

## 6. Number formats and accuracy

* **Data:** every data word is 16-bit two's complement, set by `DATA_W` in
  `dwt_pkg`.
* **Coefficients:** coefficients have 12 fraction bits in a 16-bit word
  (`COEF_FRAC`, `COEF_W`).
* **Rounding:** products are rounded to nearest. The >>4 and >>1 shifts round
  down.
* **Overflow:** sums wrap around. There is no saturation, so the input range
  must leave headroom. In the flipped domain the worst-case gain is about 8.2,
  so inputs up to ±3900 are safe. The testbenches use 12-bit samples (±2048),
  or 8-bit pixels scaled by 16.
* **Observed accuracy:**
  * Against a floating-point model of the conventional lifting, the (9,7) core
    stays within 8 LSB in the flipped domain. At 4 fraction bits of input, that
    is half a pixel step.
  * The integer core stays within 6 LSB of the exact integer filter times 5/4.

## 7. Files

| file | content |
|------|---------|
| `rtl/dwt_pkg.sv` | data/coefficient types and widths, (9,7) constants, Q12 quantization, fixed-point multiply |
| `rtl/flip97_core.sv` | flipped (9,7) lifting core, `PIPE` = 0, 3, 5 |
| `rtl/flip97_normalize.sv` | output scaling by a b' c d' K and a b' c / K |
| `rtl/int97_flip_core.sv` | integer (9,7) core with the c unit flipped, parameter `W` |
| `rtl/flipping_dwt_top.sv` | both filters side by side; parameters `F97_PIPE`, `INT_W` |
| `tb/tb_flip97_core.sv` | three cores (PIPE 0/3/5) against a floating-point model of conventional lifting; latency in pairs, warm-up, stalls, bit equality |
| `tb/tb_flip97_normalize.sv` | scaling constants and one-cycle latency |
| `tb/tb_int97_flip_core.sv` | exact integer model plus conventional integer filter times 5/4 |
| `tb/tb_flipping_dwt_top.sv` | three 64-pixel rows, symmetric extension, both paths with random stalls, end-to-end check against normalized reference |

## 8. Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

    verilator --binary --timing --assert -Irtl --top-module tb_flipping_dwt_top \
        rtl/dwt_pkg.sv rtl/flip97_core.sv rtl/flip97_normalize.sv \
        rtl/int97_flip_core.sv rtl/flipping_dwt_top.sv tb/tb_flipping_dwt_top.sv
    ./obj_dir/Vtb_flipping_dwt_top

For a single block, list `rtl/dwt_pkg.sv`, the block's file and its testbench.
The testbenches randomize their stimulus with `$urandom`. Pass
`+verilator+seed+N` to vary it.

## 9. Where this RTL departs from the original flipping structure, and what it leaves out

* **Pipelined forms:** the register placement for `PIPE = 3` and `PIPE = 5` is
  this design's own retiming. It uses 6 and 10 data registers where the
  original uses 7 and 11, and it reaches the same critical paths.
* **Normalization constants:** these include K. The original drawing labels the
  output factors `ab'cd'K` and `ab'c/K`. The values printed next to those
  labels (1.0528 and 1.187104) are the products without K.
* **Integer filter node splitting:** the split of the nodes into 13 adders is a
  reconstruction that reaches the stated 13 adders and 7Ta. The original
  arrangement is not reproduced.
* **This design's own choices:**
  * the handshake (`in_valid`/`out_valid`);
  * the output registers;
  * the warm-up suppression;
  * the reset;
  * the rounding;
  * the wrap-around.
* **Not included:**
  * the inverse DWT, which flips the same way;
  * a 2-D line-based transform and its line buffers;
  * boundary-extension hardware;
  * the convolution and conventional lifting structures that serve as the
    baselines for comparison.
