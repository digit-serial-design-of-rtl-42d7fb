# Digit-serial shift-add FIR filter, constant multipliers and a delayed-LMS adaptive filter

A filter with fixed coefficients does not need general multipliers. Each product
`h_k * x` can be built from shifts and additions of `x`, and when several constants
multiply the same input (the *multiple constant multiplication*, MCM, problem) the
partial products can be shared between them. In a bit-parallel circuit the shifts
are free wiring and only the adders cost area. In a **digit-serial** circuit a word
enters `d` bits per clock. An adder is then only `d` full adders plus a carry
flip-flop, whatever the word length, but every shift costs flip-flops.

This RTL builds that idea in SystemVerilog:

* a library of digit-serial operators: add, subtract, left shift;
* a digit-serial MCM block that forms 29x and 43x with one shared partial product, 7x;
* a digit-serial transposed-form FIR filter whose multiplier block is that MCM;
* a bit-serial multiplier by 45, built as two cascaded shift-add stages (45 = 5 · 9);
* a conventional delayed-LMS (DLMS) adaptive filter, in bit-parallel arithmetic.

The top module `dsp_top` puts the three datapaths side by side. They share only the clock and the reset.

## Digit-serial streams and word framing

Every serial signal in this design uses the same format:

* A sample is a word of `WL` bits in two's complement. It is cut into `WL/D` digits of `D` bits.
* Digits travel least significant first, one per clock. Words follow each other with no gaps.
* A one-bit `first` input is high in the clock that carries the least significant digit of a word.
* Each operator's output digit appears **in the same clock** as the input digits of the same weight. There is no pipeline register on the data path; the only flip-flops hold carries and shifted bits. A word therefore takes exactly `WL/D` clocks at every point of a network.
* All arithmetic wraps modulo `2**WL`. The caller must sign-extend inputs so that the products fit. Defaults are `D = 2` and `WL = 16`. For example, 8-bit samples give `|29x + 43x'| <= 72·128 < 2**15`.

The flip-flops that carry state from one digit to the next must be initialised at every
word boundary. Otherwise the carry or the top bits of one word leak into the next. Here this
is done combinationally: in the `first` clock each operator reads the initial value
instead of its stored bit. This is the part most easily got wrong when changing the design,
so the testbenches drive words back to back with values chosen to leave a carry or
high bits behind.

| operator | module | hardware | initial value at `first` |
|---|---|---|---|
| `a + b` | `ds_add` | D full adders in a ripple, 1 carry flip-flop | carry = 0 |
| `a - b` | `ds_sub` | D inverters on `b`, D full adders, 1 carry flip-flop | carry = 1 (two's complement +1) |
| `a << S` | `ds_shl` | exactly S flip-flops spread over the D bit positions | held bits = 0 |

A left shift by `S` delays the bit stream by `S` bit positions. Inside `ds_shl`, the current
digit is joined with the `S` held bits. The output takes the low `D` bits of that vector,
and the top `S` bits become the new held bits. With `D = 2, S = 1` the upper output bit is a plain
wire from the lower input bit, and the lower output bit is the previous digit's upper bit
from one flip-flop. With `D = 2, S = 2` each bit passes through one flip-flop.

## The MCM block: 29x and 43x sharing 7x

Multiplying by each constant separately from its binary digits (29 = 11101b, 43 = 101011b)
takes six additions. The graph-based solution built here takes three operations:

```
7x  = (x << 3) - x          one subtractor
29x = (7x << 2) + x         one adder
43x = (7x << 1) + 29x       one adder
```

In digit-serial form, `x << 3` needs 3 flip-flops. `7x << 1` needs 1, and `7x << 2` reuses it
and adds 1 more. That makes 5 shift flip-flops, plus the 3 carry flip-flops of the
adders and subtractor. `ds_mcm_29_43` is exactly this network. It also brings out 7x. It works
for any digit size; the testbench runs `D = 1, 2, 4`.

Sharing 7x and the operator counts are those of the classic example. The individual shift
amounts are this design's reading: the three-operation decomposition through 7x with two
additions, one subtraction and five shift flip-flops.

## Digit-serial FIR filter

`ds_fir` is the 2-tap transposed-form filter

```
y(n) = 29·x(n) + 43·x(n-1)
```

The MCM block supplies the product streams. `ds_tdl` is the transposed delay-and-add chain:
`acc[k] = p[k] + z^-1 acc[k+1]`, `y = acc[0]`. `ds_tdl` is written for any number of taps.
In a digit-serial filter, `z^-1` means one *sample* period, that is `WL/D` clocks. So each
delay is a shift register of `WL/D` digit registers (`ds_word_delay`). The digit that leaves
it in a clock is the digit of the same weight from the previous word, and this keeps it aligned
with the adder that follows. Reset clears the delays, so `x(-1) = 0`.

The coefficients 29 and 43 are this design's choice. They are the constants of the MCM
example, used as `h0` and `h1`. To build another filter, write its MCM network from
`ds_add`/`ds_sub`/`ds_shl` and connect its products to `ds_tdl`.

Resources at the defaults (`D = 2`, `WL = 16`): 3 digit-serial adder/subtractors in the MCM,
1 in the chain, 8 shift and carry flip-flops, and 16 flip-flops for the word delay. The word delay is the
only part that grows with the word length.

## Bit-serial multiplier by 45

`ds_mul45` (default `D = 1`, one bit per clock) factors 45 = (1 + 2^2)(1 + 2^3):

```
5x  = x  + (x  << 2)      shift by two in the first stage
45x = 5x + (5x << 3)      shift by three in the second stage
```

This is two adders and five shift flip-flops. The first-stage result is also an output (`y5`).

## Delayed-LMS adaptive filter

The adaptive weights change at run time, so they cannot be shift-add constants.
`dlms_filter` therefore uses ordinary bit-parallel multipliers. It takes one sample per clock
in which `en` is high:

```
y(n)     = ( sum_k w_k(n) · x(n-k) ) >>> 15          dlms_fir_block
e(n)     = d(n) - y(n)                               (17 bits, cannot overflow)
w_k(n+1) = w_k(n) + ( e(n-m) · x(n-m-k) ) >>> (15+4) dlms_weight_update
```

The input sample and the error each pass through an `m`-stage delay (`dly_line`) before they reach the
weight update. This adaptation delay lets the filtering and the update be pipelined
apart. After reset the weights are zero. The error of sample 0 first changes the weights
at the clock edge of sample `m`, so the change is visible at sample `m+1`.

The following are this design's choices:

| what | value |
|---|---|
| taps `N` | 8 |
| adaptation delay `m` | 2 |
| sample width | 16-bit signed |
| weights | Q1.15 |
| step size | mu = 1/16, applied as a shift |
| rounding | truncation toward minus infinity |
| overflow | wraps, no saturation |
| `y(n)`, `e(n)` | combinational from `x(n)` and `d(n)`, same clock |

## Top level (`dsp_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, active-low asynchronous reset |
| `fir_first`, `fir_x`, `fir_y` | in/in/out | 1/2/2 | FIR word start, input digit, output digit |
| `m45_first`, `m45_x`, `m45_y` | in/in/out | 1/1/1 | ×45 word start, input bit, 45x bit |
| `lms_en`, `lms_x`, `lms_d` | in | 1/16/16 | DLMS sample valid, input, desired signal |
| `lms_y`, `lms_e`, `lms_w` | out | 16/17/16×8 | DLMS output, error, weights |

Parameters: `FIR_D`, `FIR_WL`, `M45_D`, `LMS_N`, `LMS_M`, `LMS_XW`, `LMS_WW`. Their defaults
come from `ds_pkg`. The package also holds the LMS fraction bits and the step-size shift.

## How far it can be trusted

Every module has a self-checking testbench. Each compares the outputs with values computed
independently in the testbench: integer multiplication for the serial operators and filters,
and a cycle-exact model of the DLMS equations for the adaptive filter. Each testbench was
also shown to fail on a deliberately broken copy of its module.

`tb_dsp_top` runs all three datapaths at the default parameters at the same time. It checks
every output word and the word timing (8 clocks per FIR word, 16 per ×45 word). It counts that
each mechanism occurs:

* back-to-back words;
* non-zero delayed samples and negative FIR outputs;
* idle DLMS clocks;
* weight updates;
* the adaptation delay;
* convergence.

In both DLMS testbenches the adaptive filter identifies a 4-tap plant. In `tb_dsp_top` the mean
error falls from about 2900 LSB over the first 200 samples to about 60 LSB over the last 200, and the weights settle within 0.3 % of full scale of the plant
coefficients.

Not covered:

* Gate counts, timing and power of the digit-serial designs. No synthesis results are claimed here.
* Filters other than the example coefficient set.
* Saturation or rounding modes in the LMS filter.

## Simulating

All modules read `ds_pkg`, so list it first. The other files are found by library search:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
          rtl/ds_pkg.sv tb/tb_dsp_top.sv --top-module tb_dsp_top -o sim
./obj_dir/sim
```

Replace `tb_dsp_top` with any testbench in `tb/`, for example `tb_ds_mcm_29_43` or
`tb_dlms_filter`. Each testbench prints one line
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog that ends the run as a failure
if it hangs.

## Files

| file | contents |
|---|---|
| `rtl/ds_pkg.sv` | shared default sizes |
| `rtl/ds_add.sv`, `rtl/ds_sub.sv`, `rtl/ds_shl.sv` | digit-serial operators |
| `rtl/ds_mcm_29_43.sv` | MCM block, 29x and 43x via 7x |
| `rtl/ds_word_delay.sv`, `rtl/ds_tdl.sv`, `rtl/ds_fir.sv` | digit-serial transposed FIR |
| `rtl/ds_mul45.sv` | bit-serial ×45 |
| `rtl/dly_line.sv`, `rtl/dlms_fir_block.sv`, `rtl/dlms_weight_update.sv`, `rtl/dlms_filter.sv` | DLMS adaptive filter |
| `rtl/dsp_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module above (except the two delay helpers, covered through their users) |
