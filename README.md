# Approximate shift-and-add arithmetic for CNN convolution and FIR filtering

Convolution layers and FIR filters spend nearly all their energy in
multiply-and-accumulate. Both can be built without multipliers, from shifts and
adders, and both tolerate small arithmetic errors. This RTL uses one idea in
both places. Every adder in the datapath is an **accuracy-configurable
approximate adder/subtractor**. Its low `AP` bits are computed without carry
propagation. All adders at the same depth from the inputs (the same *adder
step*, AS) share one `AP` value. So a whole datapath is tuned by a short list
of numbers, one per adder step, instead of one number per adder.

Three datapaths are provided, each at the AP list that a sensitivity-driven
search selected for it (the search itself is a synthesis/simulation software
flow and is not part of this RTL):

| datapath | what it computes | widths | adder steps | AP list (step 1 first) |
|---|---|---|---|---|
| 3x3 MAC | sum of 9 pixel x weight products | 8-bit pixel, 8-bit weight, 20-bit result | 5 | {9, 8, 9, 10, 11} |
| 5x5 MAC | sum of 25 products | 8/8 bit, 21-bit result | 6 | {9, 7, 10, 9, 11, 12} |
| 4-tap FIR | y[n] = 105x[n] + 831x[n-1] + 621x[n-2] + 815x[n-3] | 15-bit unsigned in, 28-bit adders and out | 3 | {11, 16, 14} |

`approx_synth_top` places the three side by side. They share only the clock
and reset.

## The approximate adder/subtractor (`approx_addsub`)

An `N`-bit word is split into an upper *accurate part* (N-AP bits) and a lower
*approximate part* (AP bits).

* The accurate part is an ordinary adder. It receives **no carry** from the
  approximate part.
* In the approximate part a flag runs from its MSB down to its LSB. This is the
  reverse of a normal carry chain. At bit k the flag is set if it was set at
  bit k+1, or if both operand bits at k are 1. The sum bit is 1 when the flag is
  set, and `a XOR b` otherwise. In other words: scanning down from the top of
  the low part, once the first position with two 1s is found, that bit and all
  bits below it become 1.

Example with N = 8, AP = 4: `0110_1111 + 0001_1111`. The upper nibbles give
`0111`. In the lower nibbles both bit 3s are 1, so the lower nibble is `1111`.
The result is `0111_1111` = 127. The exact sum is 142, so the error is
15 = 2^AP - 1, which is the worst case. Truncating the low part would lose up
to twice that. For addition the result is never above the exact sum and never
more than 2^AP - 1 below it. A simulation assertion inside the module checks
this on every addition.

Subtraction inverts `b` with XOR gates. The "+1" of two's complement is added
only when `AP = 0`, in which case the unit is an exact adder/subtractor. When
`AP > 0` the +1 would have to enter the approximate part, which passes no carry
upward, so it is dropped and a subtraction is one LSB (or more) low. `AP` can
be anything from 0 (exact) to N (fully approximate).

## The CNN MAC (`approx_mac`)

```
pix[i], wgt[i] --> man_neuron (x K*K) --> approx_adder_tree --> acc register
                    adder step 1            adder steps 2..FAS
```

**Multiplier-less neuron (`man_neuron`, `man_weight_encoder`).** The weight's
magnitude is cut into two 4-bit units. Each unit is rounded to the nearest
value with a single 1 bit, from {0, 1, 2, 4, 8}. Ties (3 and 6) round up, and
9..15 become 8. The product is then
`(x << (4 + s_hi)) + (x << s_lo)`. Either term is left out if its unit rounded
to 0. One approximate adder (adder step 1) forms that sum. A negative weight
negates the sum exactly in two's complement. For example, weight 105
(`0110_1001`) becomes 128 + 8 = 136, and weight 35 becomes 32 + 4.

Note that the weight rounding is itself an approximation, independent of the
adders. Even with every AP set to 0, the MAC computes
`sum(pix * rounded(wgt))`, not `sum(pix * wgt)`.

**Adder tree (`approx_adder_tree`).** The K*K signed products are added in
pairs, level by level. An odd value at the end of a level moves to the next
level unchanged. Nine products need 4 levels and 25 need 5. With the neuron
step, that gives the 5 and 6 adder steps of the two MACs. All adders are as
wide as the result (20 or 21 bits). Level *l* uses `AP[l+1]`.

**Widths.** Pixels are unsigned 8 bit and weights are signed 8 bit. The
largest product magnitude is 255 x 136 = 34 680. So the largest 3x3 sum
(312 120) needs exactly 20 signed bits and the largest 5x5 sum (867 000) needs
exactly 21.

**Timing.** The datapath is combinational with one output register. When
`in_valid` is high at a clock edge, `acc` and `out_valid = 1` appear after that
edge. The MAC accepts one window per cycle with no stalls. `acc` holds its value
while `in_valid` is low. Reset is active-low and asynchronous.

**Parameters.** `K` (3 or 5), `W` (result and adder width), and `AP`, an
`approx_pkg::ap_vec_t` whose entry `[0]` is adder step 1. The package holds
`AP_MAC3` and `AP_MAC5`.

## The 4-tap FIR (`approx_fir4`, `fir4_mcm`)

The filter is built in transposed form. Each new sample feeds a *multiplier
block*, which forms all four coefficient products from shared subexpressions:

| adder step | adders (all 28 bit) |
|---|---|
| 1 | 15x = (x<<4) - x,  129x = (x<<7) + x |
| 2 | 105x = (15x<<3) - 15x,  831x = (15x<<6) - 129x |
| 3 | 815x = 831x - (x<<4),  621x = 831x - (105x<<1) |

Five of the six adders subtract, so this block exercises the subtractor path.
Its adders use AP = 11, 16 and 14 for steps 1, 2 and 3. The products then go
through the delay line:

```
z3 <= 815x;   z2 <= 621x + z3;   z1 <= 831x + z2;   y <= 105x + z1
```

The three structural adders in that chain are not among the six tuned adders.
They are exact by default; the `AP_STRUCT` parameter can approximate them. The
input is an unsigned 15-bit sample, zero-extended to 28 bits. Set
`IN_SIGNED = 1` for a two's-complement input. `y` and `out_valid`
follow a sample accepted with `in_valid` by one cycle. The delay line advances
only on `in_valid`.

## How far to trust it, and where it departs from the source description

Taken directly from the design description:

* the adder/subtractor's structure, including the worked example and the
  error bound;
* the FIR decomposition, widths and AP list;
* the MAC widths, the neuron count, the number of adder steps and the AP lists;
* one AP per adder step.

Chosen here, because the description leaves them open:

* signed weights and unsigned pixels for the MAC, and an unsigned FIR input;
* exact negation of the neuron product for negative weights;
* rounding each 4-bit weight unit on its own, with ties rounding up;
* how the adder tree pairs its inputs;
* the transposed FIR form, with exact structural adders;
* the valid/register/reset interface and the single output register.

Only the convolution MAC is hardware. Pooling, ReLU, the fully connected
layers, accumulation across input channels, and weight training are not
implemented. Neither are the 25-tap filter and the other evaluated filters,
whose coefficient decompositions are not given.

### Accuracy depends on the data

The AP values are large compared with small results. The testbenches measure
the worst-case accuracy figure `min(1 - |approx - exact| / |exact|)` on random
data. The FIR is measured against the true convolution. The MACs are measured
against `sum(pix * rounded(wgt))`, so the error of weight rounding is not
counted.

| data | worst-case accuracy |
|---|---|
| FIR, unsigned 15-bit input (the default) | 92-95 %, close to the 95 % target its AP list was chosen for |
| FIR, signed input | far below 0 % (outputs near zero) |
| MACs, non-negative weights | about 80-90 % |
| MACs, signed zero-mean weights | far below 0 % |

The unsigned FIR input is the default because of the first row. A signed input
is available with `IN_SIGNED = 1`.

With zero-mean weights many MAC outputs lie close to zero. There, the absolute
error exceeds the result itself. For the 5x5 configuration that error is up to
a few thousand LSBs out of a 21-bit range. So use these AP lists on data that
keep results large, or choose smaller APs for signed workloads. The testbenches
print these figures but do not judge them. They judge bit-exactness against an
independent model of the intended approximate arithmetic.

## Files

`rtl/` holds one module or package per file:

* `approx_pkg` holds the AP-list type `ap_vec_t` (entry [0] = adder step 1),
  the configurations `AP_MAC3`, `AP_MAC5` and `AP_FIR4`, the widths and the
  rounded-weight struct.
* `approx_addsub`, `man_weight_encoder`, `man_neuron`, `approx_adder_tree` and
  `approx_mac` make up the MAC.
* `fir4_mcm` and `approx_fir4` make up the FIR.
* `approx_synth_top` is the top level.

`tb/` holds one self-checking testbench per module, named `tb_<module>`.
`approx_ref_pkg` is the bit-level reference model they share. It is written
independently of the RTL: it scans for the first 1-1 pair, and it rounds by
measuring distances. `tb_mnist_conv_workload` runs both convolution layers of
a small MNIST-style network window by window on the 5x5 MAC:

* layer 1 is 24x24x20 = 11 520 windows;
* layer 2 is 8x8x50 outputs x 20 channels = 64 000 windows.

The testbench performs ReLU, 2x2 pooling, requantisation and the channel sums
itself. Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/approx_pkg.sv tb/approx_ref_pkg.sv tb/tb_approx_synth_top.sv \
    --top-module tb_approx_synth_top -Mdir obj
./obj/Vtb_approx_synth_top
```

Substitute any other `tb_*.sv` for a single block. `-Wno-fatal` is needed
only because the testbenches pass narrow signals to 64-bit checking functions;
the RTL itself lints cleanly apart from unused package constants. `tb_approx_synth_top` uses
the top at its default (full) configuration. It reports how often each
mechanism occurred: negative and positive weights, units rounded up, rounded
down and to zero, approximation errors in the MACs and the FIR, and idle input
cycles. Each run takes well under a second.

To try another configuration, override `AP` on `approx_mac` or `approx_fir4`.
For example, `.AP('0)` gives exact adders, which the testbenches use as a
cross-check against plain integer arithmetic.
