# Multiplierless low-power FIR filters with radix-2^r coefficients

A linear-phase FIR filter spends most of its hardware, and most of its power,
on coefficient multiplications. When the coefficients are fixed, each
multiplication can be replaced by a few hard-wired shifts and additions. This
RTL builds five such filters: the G1, Y1, Y2, A1 and L2 low-pass benchmarks,
16 to 63 taps long. Two ideas set it apart from a plain shift-and-add filter:

* **Radix-2^r recoding for a shallow adder tree.** Each coefficient is split
  into r-bit slices. Each slice is written as `±m·2^k`, with `m` a small odd
  number (a *fundamental*). So every coefficient is at most three shifted
  fundamentals, and every fundamental is one adder away from the input. The
  radix was chosen per filter for the smallest adder depth (r = 4 for G1 and
  A1, 6 for Y1, 5 for Y2 and L2). Fewer adders in series means fewer glitches,
  and so less switching power.
* **Registers on the fundamentals.** One register per fundamental sits between
  the multiplier block and the structural adders. Glitches from the multiplier
  block stop there instead of spreading down the accumulation chain. Only the
  few odd fundamentals are registered, not every coefficient product, so the
  overhead is small.

The filters use the transposed direct form. Every register-to-register path
crosses one structural adder, whatever the filter length.

## Datapath of one filter

```
          +-----------+   +---------------+   +--------------+   +-----------------+
 x ------>|  r2r_mcm  |-->| r2r_fund_regs |-->| r2r_products |-->|     r2r_pab     |--> y
 (XW bits)| m*x, odd m|   | one reg per m |   | h(u)*x from  |   | transposed-form |
          | 1 adder   |   |  (clocked)    |   | <=3 shifted  |   | adders + delays |
          |  each     |   |               |   | fundamentals |   |                 |
          +-----------+   +---------------+   +--------------+   +-----------------+
            multiplier block adders            coefficient products  structural adders
```

1. **Multiplier block (`r2r_mcm`).** Computes each fundamental as
   `m = a<<sa ± b<<sb`, where `a` and `b` are the input or earlier
   fundamentals. For example, `7x = (x<<3) − x` and `23x = 15x + (x<<3)`. This
   block is combinational.
2. **Fundamental registers (`r2r_fund_regs`).** Register every fundamental,
   including `x` itself. This is the low-power technique.
3. **Coefficient products (`r2r_products`).** For every distinct coefficient
   `h(u)`, adds up its recoding `Σ ±(m_t·x) << k_t` using the registered
   fundamentals. Shifts are wiring, a minus sign is a subtraction, and a zero
   coefficient gives a constant zero. An elaboration-time check rejects any
   recoding that does not sum to its coefficient.
4. **Product accumulation (`r2r_pab`).** Implements the transposed form:
   `z[L-1] <= h(L-1)x`, `z[k] <= h(k)x + z[k+1]`, and `y = h(0)x + z[1]`. The
   impulse response is symmetric (`h(L-1-k) = h(k)`), so only `ceil(L/2)`
   products are formed, and each one feeds two taps.

`r2r_fir` chains these four blocks for the filter chosen by its `FILT`
parameter. `r2r_fir_bank`, the top level, instantiates all five filters on a
shared input.

### Example recoding

Take A1's coefficient `171 = −5<<0 − 5<<4 + 1<<8`. The product `171·x` is
formed as `−(5x) − (5x<<4) + (x<<8)`:

* `5x = (x<<2) + x` is one multiplier-block adder, registered.
* Combining the three terms takes two more adders.

The whole recoding of every filter is in `r2r_pkg`, in tables that read like
the recodings above.

## The five filters

| filter | taps L | r | fundamentals (besides x) | adder depth (bound) | output bits | settle (cycles) |
|--------|-------:|--:|--------------------------|--------------------:|------------:|----------------:|
| G1     | 16     | 4 | 3, 5, 7                  | 3 (3)               | 21          | 16              |
| Y1     | 30     | 6 | 3, 13, 15, 17, 23        | 3 (3)               | 22          | 30              |
| Y2     | 34     | 5 | 3, 5, 9, 11, 15          | 3 (3)               | 23          | 34              |
| A1     | 59     | 4 | 3, 5, 7                  | 3 (3)               | 23          | 59              |
| L2     | 63     | 5 | 3, 5, 9, 11, 13, 15      | 3 (4)               | 22          | 63              |

The adder depth counts the adders in series from `x` to a coefficient
product. It covers the multiplier block and the product adders, and leaves
out the one structural adder that follows. `filt_adder_depth` in `r2r_pkg`
computes it. The bound in brackets is the one published for each recoding.

Band edges of the specifications (ωp / ωs): G1 0.2π / 0.5π, Y1 and Y2
0.3π / 0.5π, A1 0.125π / 0.225π, L2 0.2π / 0.28π.

The input `x` is an 8-bit signed sample, one per clock. The output is
`XW + ceil(log2 Σ|h(k)|) + 1` bits wide, so it cannot overflow for any input
sequence. With XW = 8 this gives the 23-bit A1 output and the 22-bit L2 output
of the published implementation.

This structure needs the following adders. Zero coefficients are not
subtracted from the structural-adder count.

| filter | multiplier block | products | structural | total |
|--------|-----------------:|---------:|-----------:|------:|
| G1     | 3                | 8        | 15         | 26    |
| Y1     | 5                | 6        | 29         | 40    |
| Y2     | 5                | 10       | 33         | 48    |
| A1     | 3                | 21       | 58         | 82    |
| L2     | 6                | 19       | 62         | 87    |

The published design reports 24, 45, 50, 88 and 89 adders. The two sets of
counts are close, but they were not counted the same way.

## Timing

* A sample is taken at a rising clock edge, into the fundamental registers.
* Its `h(0)` term appears on `y` right after that edge, through combinational
  logic from the registers: the product adders and the last structural adder.
* Its `h(L-1)` term appears `L−1` edges later.
* So a step at the input settles on the output after exactly `L` clock edges:
  59 cycles for A1 and 63 for L2 (295 ns and 315 ns at 200 MHz).

The published cycle counts for Y1, Y2, A1 and L2 match this. The published
count for G1 is 15, one less than its 16 taps.

`y` has no output register. Add one if `y` feeds logic in another clock
domain, or goes off chip.

`rst_n` is an asynchronous, active-low reset that clears all registers.

## Where this RTL departs from, or adds to, the source design

* **Filter lengths.** The benchmark "orders" are 15, 30, 33, 58 and 62. The
  lengths built are 16, 30, 34, 59 and 63 taps. These are the lengths that fit
  the number of coefficients in each recoding table and the published settling
  times.
* **L2 centre tap.** The centre tap `h(31)` of L2 is this design's choice:
  996 (`+1<<10 −1<<5 +1<<2`). This is the integer that gives the lowest
  stop-band peak with the other 31 coefficients.
* **Y2 coefficient 9.** It is recoded as `+1<<3 +1<<0`.
* **Unlisted fundamentals.** Some recodings use fundamentals whose
  construction is not listed: Y1's 17, Y2's 9, A1's 3, and L2's 9, 13 and 15.
  Each is built with one adder.
* **Coefficient quality.** Measured against the DC gain, the coefficients
  give these stop-band peaks:
  * Y1: 0.0028 (specification 0.00316);
  * A1: 0.0036 (specification 0.001);
  * L2, with the chosen centre tap: 0.0014 (specification 0.001);
  * G1: about 0.65;
  * Y2: about 0.055.

  The filters are built with exactly these coefficients. Check the G1 and Y2
  coefficients before using them as real filters.
* **Which outputs are registered.** There are two ways to apply the low-power
  technique: register every fundamental, or register only the heavily reused
  ones and balance the multiplier-block pipeline. This RTL registers every
  fundamental.
* **Shared symmetric products.** `h(k)·x` and `h(L-1-k)·x` are formed once and
  feed both taps. This is this design's choice.
* **Input width and reset.** The 8-bit signed input and the asynchronous reset
  are this design's choices. The input width was picked to agree with the
  published output widths.
* **Power is not modelled.** The power figures for the technique (savings of
  7.6 % to 14.1 % in switching power, growing with filter length) come from
  gate-level analysis. The RTL contains the registers that produce the
  savings, but nothing here measures them.

## Files

| file | contents |
|------|----------|
| `rtl/r2r_pkg.sv`        | filter enum, coefficient and recoding tables, fundamentals, width and length functions |
| `rtl/r2r_mcm.sv`        | multiplier block (fundamentals) |
| `rtl/r2r_fund_regs.sv`  | registers for fundamentals |
| `rtl/r2r_products.sv`   | shift-and-add coefficient products |
| `rtl/r2r_pab.sv`        | transposed-form product accumulation block |
| `rtl/r2r_fir.sv`        | one complete filter, chosen by `FILT` |
| `rtl/r2r_fir_bank.sv`   | top level: the five filters side by side |
| `tb/tb_*.sv`            | one self-checking testbench per module |

### Changing or adding a filter

Add the filter to `filt_e` in `r2r_pkg`. Then add two tables, `<NAME>_REC` and
`<NAME>_FUND`, in the same format as the existing ones, and extend the `case`
statements in `filt_taps`, `rec_field` and `fund_field`. Each `_REC` row is
`'{h(u), m0, s0, m1, s1, m2, s2}`: the coefficient and up to three signed,
shifted fundamentals. Each `_FUND` row is `'{m, a, a_shift, b, b_shift}`.
Elaboration fails if a recoding does not add up, or if a fundamental is
missing or is defined in terms of a later one.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Run them with Verilator 5, for example the whole design:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl +libext+.sv rtl/r2r_pkg.sv tb/tb_r2r_fir_bank.sv \
  --top-module tb_r2r_fir_bank -o sim
./obj_dir/sim
```

What each testbench checks:

* `tb_r2r_fir_bank` runs the top level at its default parameters. Every cycle,
  it compares all five outputs with a direct-form convolution. It drives:
  * a unit impulse, whose response must replay `h(0..L-1)`;
  * a full-scale step, which must settle after exactly `L` cycles;
  * a worst-case sign pattern per filter, reaching the largest possible output
    with no overflow;
  * an asynchronous reset in the middle of random data.

  The testbench counts each of these events per filter, and fails if one never
  happens.
* `tb_r2r_fir` does the same for a single filter (A1).
* The block testbenches check their module against reference values computed
  without the module: fundamentals against `m·x`, products against `h·x`, and
  the accumulation block against a direct-form sum with random products.

Every simulation finishes in well under a second.
