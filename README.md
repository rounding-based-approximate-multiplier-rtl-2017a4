# RoBA: a rounding-based approximate multiplier, and an FIR filter built from it

A multiplier spends most of its area, delay and power summing partial
products. Multiplying by a power of two costs nothing but a shift. The RoBA
(rounding-based approximate) multiplier uses this fact. It rounds each operand
to its nearest power of two and keeps only the products that involve a rounded
value. Those products are all shifts. The one product that needs a real
multiplier is dropped.

This repository holds synthesizable SystemVerilog for that multiplier, in an
unsigned and a signed version. It also holds a direct-form FIR filter whose tap
multipliers are signed RoBA multipliers. The filter is the top of the design.

## The arithmetic

Let `Ar` and `Br` be `A` and `B` rounded to powers of two. The identity

    A*B = (Ar-A)*(Br-B) + Ar*B + Br*A - Ar*Br

is exact. RoBA drops the first term:

    P = Ar*B + Br*A - Ar*Br          (so P = A*B - (Ar-A)*(Br-B))

With `Ar = 2^na` and `Br = 2^nb`, every remaining term is a shift:
`Ar*B = B << na`, `Br*A = A << nb` and `Ar*Br = Ar << nb`.

The sign of the error is set by the directions of the two roundings:

* If one operand rounds up and the other rounds down, the dropped term is
  negative, so `P` is above the exact product.
* If both operands round the same way, `P` is below it.
* If either operand is already a power of two, `P` is exact.

### Rounding to the nearest power of two

Say `A` has its leading one at bit `k`, so `2^k <= A < 2^(k+1)`. The midpoint of
that range is `3*2^(k-1)`, and `A` is at or above the midpoint exactly when bit
`k-1` is set. The rounding unit (`roba_round`) therefore needs only two things:

* a leading-one detector that finds `k`;
* a test of the bit just below it, which decides between `2^k` and `2^(k+1)`.

The values `3*2^(p-2)` lie exactly halfway between two powers. They are rounded
**up**, because that gives the smaller logic. The one exception is `A = 3`,
which rounds **down** to 2. In the logic this means a round-up needs `k >= 2`.

Two more cases:

* An all-ones operand rounds to `2^WIDTH`. For this reason the exponent has
  `$clog2(WIDTH+1)` bits, not `$clog2(WIDTH)`.
* Zero has no nearest power of two. It raises `is_zero`, and the multiplier
  then forces the product to 0, which is also the exact result.

### Output range

The unsigned product always lies in `[0, 2^(2*WIDTH))`, so no result bits are
needed beyond those of an exact multiplier:

* If both operands round the same way, the dropped term is at most `A*B/4`.
* If they round in opposite directions, `P <= Ar*B < 2^(2*WIDTH)`.

Because the result is known to lie in this range, the add and subtract can be
done modulo `2^(2*WIDTH)`. The `Ar*Br` term can equal `2^(2*WIDTH)` and then
wraps to 0, which does no harm.

### Signed operands

A negative two's complement value rounded to `-2^n` is not a simple shift
pattern. The signed multiplier (`roba_multiplier_signed`) therefore works in
sign and magnitude:

1. A sign detector takes `|A|` and `|B|` by two's complement negation.
2. The unsigned core multiplies the `WIDTH`-bit magnitudes. The magnitude of
   `-2^(WIDTH-1)` still fits in `WIDTH` bits.
3. A sign-set stage negates the result if the operand signs differ.

The magnitude product is at most `2^(2*WIDTH-2)`, so a `2*WIDTH`-bit signed
result always holds it.

## Hardware structure

```
roba_fir_filter                 (top; clocked)
 └─ roba_multiplier_signed  x TAPS
     └─ roba_multiplier_unsigned
         ├─ roba_round           x2   leading one + next bit -> exponent, zero flag
         └─ roba_barrel_shifter  x3   B<<na, A<<nb, Ar<<nb
roba_pkg                         default sizes, exponent width helper
```

Both multipliers are purely combinational. The datapath inside them is:

* two rounding units;
* three logarithmic barrel shifters, each with one mux stage per exponent bit;
* one adder and one subtractor, written as word-level `+` and `-` so that
  synthesis picks the adder architecture.

### The FIR filter (`roba_fir_filter`)

The filter computes `y[n] = sum_{k<TAPS} c[k] (*) x[n-k]`, where `(*)` is the
signed RoBA product. It has three parts:

* a delay line of `TAPS-1` sample registers;
* one signed RoBA multiplier per tap;
* an adder that sums all the tap products.

Ports:

| port        | dir | width                    | meaning                                |
|-------------|-----|--------------------------|----------------------------------------|
| `clk`       | in  | 1                        | clock                                  |
| `rst_n`     | in  | 1                        | synchronous, active-low reset          |
| `in_valid`  | in  | 1                        | `x_in` carries a sample this cycle     |
| `x_in`      | in  | `WIDTH` signed           | input sample                           |
| `coeff`     | in  | `TAPS` x `WIDTH` signed  | tap coefficients `c[0..TAPS-1]`        |
| `out_valid` | out | 1                        | `y_out` was loaded at the last edge    |
| `y_out`     | out | `2*WIDTH+$clog2(TAPS)`   | filter output (cannot overflow)        |

Timing:

* A sample is taken on a rising edge with `in_valid` high. On that same edge:
  * the delay line shifts;
  * `y_out` is loaded with the output for that sample, because `x_in` itself
    feeds tap 0;
  * `out_valid` goes high for the next cycle.
* Latency is therefore one clock, and the filter takes one sample per clock.
* With `in_valid` low, the delay line and `y_out` hold their values and
  `out_valid` is low.
* Coefficients are read every cycle. Keep them constant while samples stream.
* Reset clears the delay line, `y_out` and `out_valid`.

The critical path runs through a rounding unit, a shifter, the add/subtract,
the sign set and the tap adder, all in one cycle. No pipelining is built in.

## Parameters

| parameter | default | where                   | note                         |
|-----------|---------|-------------------------|------------------------------|
| `WIDTH`   | 16      | all multiplier modules, filter | operand / sample width |
| `TAPS`    | 8       | `roba_fir_filter`       | number of filter taps        |

The source of this design fixes neither the word length nor the tap count. The
defaults are chosen here and are set in `roba_pkg`.

## What follows the RoBA scheme, and what is chosen here

These parts follow the RoBA scheme as it is defined:

* the approximation `Ar*B + Br*A - Ar*Br`;
* rounding to the nearest power of two, with ties rounded up and the
  exception for 3;
* building the products from shifts;
* sign-and-magnitude handling for signed operands;
* using RoBA multipliers in place of the multipliers of an FIR filter.

These are choices of this implementation:

* the leading-one-plus-next-bit rounding logic and the zero flag;
* the logarithmic shifters and the plain `+`/`-` adders;
* the exact two's complement absolute value;
* the direct-form filter structure;
* the 16-bit width and the 8 taps;
* the coefficient port, the valid handshake, the one-cycle latency and the
  synchronous reset.

What is not here:

* **A second signed architecture.** The scheme calls for two signed variants,
  but only one is described well enough to build. The one built uses an exact
  absolute value.
* **Compressor-based exact multipliers and their cells.** Compressor trees and
  XOR-XNOR cells come up only as background. The RoBA multiplier has no
  partial-product reduction stage, so it does not use them.
* **An exact (for example Booth) multiplier.** Exact multipliers serve only as a
  basis for comparison and are not part of the design.
* **2-D image filtering.** Image sharpening and smoothing are named as
  applications. The RoBA multiplier handles 8-bit pixels times small kernel
  weights with room to spare. The line buffers and 2-D windowing such a filter
  needs are not part of this design.

## Verification

Each module has a self-checking testbench in `tb/`. Each one:

* compares against a reference model in `tb_roba_ref_pkg`, written separately
  from the RTL (brute-force search for the nearest power of two, products in
  64-bit integers);
* ends by printing `TB_RESULT checks=N failures=M`;
* has a watchdog that stops a run that hangs.

| testbench                     | what it covers |
|-------------------------------|----------------|
| `tb_roba_round`               | all 65536 16-bit operands; up, down, exact and tie cases each seen |
| `tb_roba_barrel_shifter`      | every shift amount with random, all-ones and single-bit data |
| `tb_roba_multiplier_unsigned` | all 8-bit pairs, plus 220k random and corner 16-bit pairs; also checks that the error equals `-(Ar-A)*(Br-B)` |
| `tb_roba_multiplier_signed`   | all 8-bit signed pairs, plus 200k random 16-bit pairs including `-32768` |
| `tb_roba_fir_filter`          | the filter at default size (see below) |
| `tb_roba_image_filters`       | image smoothing (5x5 Gaussian) and sharpening (3x3) on a generated 48x48 8-bit image; every product checked, PSNR against exact filtering reported |

`tb_roba_fir_filter` runs the filter at its default size, with no parameters
overridden. Across three phases it:

* streams about 9000 samples with random idle cycles and two resets;
* checks every cycle that `out_valid` comes one clock after `in_valid`, that
  `y_out` matches the model, and that `y_out` holds while idle;
* ends with an 8-tap smoothing (low-pass) filter run on a noisy triangle wave.

It counts each mechanism and fails if any one never occurs: rounding up,
rounding down, ties, the 3 -> 2 exception, zero operands, negative products,
idle cycles and resets. On the smoothing run it reports the mean absolute
relative error against an exact FIR, which comes out near 1 %.

`tb_roba_image_filters` measures the approximation on the image tasks RoBA
targets. Smoothing reaches about 46 dB PSNR against exact arithmetic.
Sharpening reaches about 25 dB, because its centre weight 9 rounds to 8 and
errs on most pixels. The test fails below 20 dB.

To run a testbench with Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_roba_fir_filter rtl/roba_pkg.sv tb/tb_roba_ref_pkg.sv \
  tb/tb_roba_fir_filter.sv -o sim && ./obj_dir/sim
```

Use the same command for the other testbenches, with the name changed. Each one
finishes in a few seconds.

## Changing the design

* To change the word length or tap count, override `WIDTH` and `TAPS` on
  `roba_fir_filter`, or change the defaults in `roba_pkg`.
* The multipliers are written for any `WIDTH`; they are tested at 8 and 16 bits.
* To try a different rounding rule, edit the round-up condition in
  `roba_round`. The testbenches' reference model (`round_pow2`) must change
  with it.
* For a higher clock rate, put a pipeline register between the tap products
  and the tap adder in `roba_fir_filter`. This adds one cycle of latency, and
  the testbench's latency check must change to match.
