# Look-ahead pipelined sliding DCT

This design computes a DCT-II over a window that moves forward by one
sample for every input sample. For each new sample `x(n)` it outputs all `M`
coefficients of the DCT of the last `M` samples, at one sample per clock.

A direct transform needs O(M log M) work for every window position. A
sliding DCT (SDCT) reuses the previous window instead. Each coefficient is
updated by a first-order complex recursion, and a comb cancels the sample
that has just left the window. The cost is a feedback loop, and a feedback
loop limits the clock rate: pipeline registers cannot simply be added inside
it. This design unrolls the recursion twice (a *look-ahead transformation of
degree two*). The loop then holds three registers instead of one, and the
datapath becomes a pipeline of eight stages. No stage has more than one real
add or multiply.

## What is computed

With window length `M`, damping factor `beta` and `W = exp(-j*pi/M)`, bin `m`
outputs

```
X_m(n) = k_m * sum_{k=0}^{M-1} beta^k * x(n-k) * cos(m*(M-k-1/2)*pi/M)
k_0 = 1/sqrt(2),  k_m = 1 for m > 0
```

With `beta = 1` this is the plain DCT-II of the window `x(n-M+1) .. x(n)`,
without normalisation. With `beta < 1`, older samples are weighted down
slightly. The reason is stability. The undamped recursion has its poles
exactly on the unit circle, so rounding errors can pile up without bound.
`beta` moves the poles just inside the circle. The default is `beta = 0.99`.

The transform is built from two recursions per bin that share one comb
input:

```
c_m(n)  = x(n) - beta^M (-1)^m x(n-M)                  comb
P1(n)   = beta W^m  P1(n-1) + c_m(n)
P2(n)   = beta W^-m P2(n-1) + W^-m c_m(n)
X_m(n)  = Re{ 1/2 k_m (-1)^m W^{m/2} (P1(n) + P2(n)) }
```

The comb term removes the contribution of `x(n-M)` exactly: its weight
`beta^M` matches the weight that sample has reached inside the recursion.
`c_m` depends on `m` only through `(-1)^m`. One comb therefore serves all
even bins and one all odd bins, and both use the same delay line.

## The look-ahead transformation

Substitute the recursion into itself twice:

```
P1(n) = c(n) + beta W^m c(n-1) + beta^2 W^{2m} c(n-2)     + beta^3 W^{3m}  P1(n-3)
P2(n) = W^-m c(n) + beta W^-2m c(n-1) + beta^2 W^-3m c(n-2) + beta^3 W^-3m P2(n-3)
```

All the new terms depend only on past comb outputs, so they are computed
feed-forward and can be pipelined freely. The loop now reaches back three
samples instead of one. It can hold three registers while it still does only
one complex multiply and one add per trip. The design uses this as follows:

* The loop adder is followed by one register.
* The complex multiplier `beta^3 W^{+-3m}` holds the other two. One register
  sits between its real multipliers and its adders, the other after the
  adders.

So each of the three loop stages does one real operation. The loop is no
longer slower than any other stage. The price is extra constant multipliers:
five real-by-complex multipliers per bin instead of one.

## Pipeline of one bin

Registers are marked `|`. `u` is the registered comb output, `a` is `u`
delayed by one clock, and `ad2` is `a` delayed by two more clocks.

```
x ─ beta^M·x ─ z^-M ─┐
x ───────────────────(∓)─|u                                         (sdct_comb)

path 1:  S1 = a + (beta W^m · a)|       ─|─  S2 = S1 + (beta^2 W^2m · ad2)| ─|─ loop(beta^3 W^3m)
path 2:  S1 = (W^-m · u)| + (beta W^-2m · a)| ─|─ S2 = S1 + (beta^2 W^-3m · ad2)| ─|─ loop(beta^3 W^-3m)
P = P1 + P2 ─| ─ Re{G·P}: products| ─ round, subtract ─| ─ X_m
```

The multipliers have a constant operand. Each one registers its
full-precision products, and the rounding follows the register. The
registers are thus placed where the words are widest, and the rounding shares
a stage with the following adder. The index bookkeeping works out as follows:
the direct term of path 1 goes through the same one-clock delay as the
multiplier outputs, so every sum adds terms of the right sample.

Latency from `x(n)` at the input to `X_m(n)` at the output is **8 clocks**:

| stages | where |
|---|---|
| 1 | comb register |
| 2 | first column: multiply, then add |
| 1 | second column: add |
| 1 | loop adder register |
| 1 | `P1 + P2` |
| 2 | output multiplier |

## Number formats, rounding and saturation

`Qi.f` means `i` integer bits, including the sign, and `f` fraction bits.

| signal | format |
|---|---|
| input `x`, comb, delay line, feed-forward sums | Q7.7 (14 bits) |
| `beta^M` | Q1.7 |
| rotation coefficients `beta^k W^{+-km}` | Q2.10 |
| loop state `P1`, `P2`, loop multiplier output | Q7.8 |
| `P1 + P2`, output `X_m` | Q8.8 |
| output coefficient `1/2 k_m (-1)^m W^{m/2}` | Q1.11 |

Inside a complex multiplier, each real product is rounded to the output
format of that multiplier before it is added.

Wherever bits are dropped, the value is rounded to nearest with ties to even
(convergent rounding). Unlike truncation, this rounding has no bias. Wherever
a value can leave its range, it is clipped to the largest or smallest
representable value rather than wrapped. Both jobs are done by one
combinational unit, `sdct_rnd_sat`, which every stage instantiates.

Coefficients are not stored in a table. `sdct_pkg` computes them at
elaboration from `M`, `beta` and `m` using real arithmetic (`$cos`, `$sin`,
`**`), and rounds them to nearest into their format. Each bin therefore gets
multipliers with constant operands.

Headroom: at the defaults, the standard deviation of `P1` in bin 0 is about
5.3 times that of the input. With Gaussian input of σ = 3 it stays well
inside ±64, the limit of Q7.8. Around σ = 4 and above, peaks reach that
limit. Then the loop saturates,
and the output stays wrong until the damped state recovers, roughly 100
samples later. Scale the input to suit.

## Modules

| module | role |
|---|---|
| `sdct_pkg` | formats, types, coefficient functions, `LATENCY = 8` |
| `sdct_top` | one comb and `M` bins; the top level |
| `sdct_comb` | `beta^M` multiply, `M`-deep delay line, even and odd adders, register |
| `sdct_bin` | one bin: both look-ahead paths, two loops, `P1+P2`, output scaling |
| `sdct_rc_mul` | real × constant complex, one register (five per bin) |
| `sdct_loop` | loop adder with register, plus `sdct_cc_mul` in the feedback |
| `sdct_cc_mul` | complex × constant complex, two stages |
| `sdct_out_scale` | `Re{G·P}`, two stages |
| `sdct_rnd_sat` | convergent rounding and saturation |

Interface of `sdct_top`:

* `clk`, `rst_n`: synchronous active-low reset. It clears every register,
  the delay line included, so the window starts out filled with zeros.
* `x_in`: one Q7.7 sample per clock.
* `x_out[M]`: Q8.8. `x_out[m]` is `X_m` of the sample that entered 8 clocks
  earlier.
* `in_valid` → `out_valid`: `in_valid` delayed by 8 clocks. It only marks the
  latency. The datapath cannot stall: a sliding transform needs an unbroken
  sample stream, so the source must deliver a sample on every clock.

Parameters: `M` (default 32) and `beta` (`BETA`, default 0.99). The whole
design is tested at `M = 32` with `beta = 0.99`. Single bins are tested at
`M = 8` with `beta = 0.95`, and the comb at `M = 5` with `beta = 0.9`. For
`beta`, stay a little below 1:

* `beta^M` must fit in Q1.7, so it must be below 1.
* The loop poles are quantised to 10 fraction bits, which can move them by
  about 0.001. They must stay inside the unit circle.

## How far it can be trusted

Every module has a self-checking testbench in `tb/`:

* **Bit-exact tests.** `sdct_rnd_sat`, `sdct_comb`, `sdct_rc_mul`,
  `sdct_cc_mul`, `sdct_loop` and `sdct_out_scale` are compared bit for bit
  with reference arithmetic written separately. That reference rounds real
  numbers rather than bits. These tests also check latency, ties and
  saturation.
* **`tb_sdct_bin`.** Runs five bins of an `M = 8` transform against the
  original, un-unrolled recursion in floating point. The maximum error is
  about 0.03, and the response starts exactly 7 clocks after the comb output.
* **`tb_sdct_top`.** Runs at the default size (`M = 32`, `beta = 0.99`):
  * An impulse checks the 8-clock latency and every bin's first response.
  * 1000 white Gaussian samples (σ = 3) are compared, in all 32 bins, with a
    floating-point damped window sum. This reference is independent of the
    recursion. RMS error is about 0.06 and the worst error about 0.25. The
    RMS error over the 32 bins at any single position stays below 0.09.
    All of these are in real units: one output LSB is 1/256.
  * A full-scale input checks that the loop state clips instead of wrapping.

  It takes well under a second in Verilator.
* **`tb_sdct_fig7`.** Follows bins 1, 11 and 21 over the first 101 sliding
  positions of a Gaussian input. The hardware stays within 0.12 of the
  floating-point damped transform. It differs from the exact, undamped block
  DCT by about 15 % RMS. That difference is the price of `beta = 0.99`: it
  shrinks as `beta` approaches 1.

What has not been verified:

* Timing on an FPGA.
* Any clock frequency.
* Resource counts beyond a generic synthesis: about 18.5k flip-flop bits and
  412 multiplier cells at the defaults.

The loop multiplier uses the direct four-multiplier form. The design also
does not reproduce the multiplier sharing that an FPGA synthesis tool may
find among the constant multipliers.

## Choices made here

These points are not fixed by the algorithm. They are choices of this
implementation:

* `M = 32` and `beta = 0.99`.
* Input amplitude in the tests.
* Synchronous reset, and the valid flag that is only delayed.
* Constants are rounded to nearest.
* Only the real part of the output product is built. The imaginary part is
  zero in exact arithmetic.
* Saturation uses the full two's-complement range.
* The delay copies `a`, `ad1` and `ad2` exist once per bin, as in the
  per-bin structure. Bins of equal parity could share them.

Not included: the conventional, non-look-ahead pipeline that the look-ahead
version is usually compared with. It uses the same comb and output stage but
has a single-register loop.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/sdct_pkg.sv tb/sdct_tb_pkg.sv tb/tb_sdct_top.sv --top-module tb_sdct_top
./obj_dir/Vtb_sdct_top
```

Each testbench prints one line, `TB_RESULT checks=N failures=F`. Replace
`tb_sdct_top` with any other `tb_sdct_*` to run a unit test. To change the
transform, override `M` and `BETA` on `sdct_top`. The coefficients and the
delay line follow automatically.
