# P-LCM: a pseudo-random bit generator on a simplified lemniscate chaotic map

The lemniscate chaotic map is a two-variable chaotic system:

    x(n+1) = cos(2^r y(n)) / (1 + sin^2(2^r y(n)))
    y(n+1) = 2*sqrt(2) sin(2^r x(n)) cos(2^r x(n)) / (1 + sin^2(2^r x(n)))

It is attractive for ciphers because it stays chaotic over a wide range of the
control parameter r (r > 3 is the hyperchaotic regime). The initial values x0
and y0 lie in [-1, 1]. Built literally, though, the map needs four sine/cosine
tables, and those tables dominate area and power.

This RTL implements the *practical* variant of the map (P-LCM), which needs
only two tables. It then turns the map into a bit generator that produces one
bit per clock.

## Why two tables are enough

The practical map rewrites both equations with trigonometric identities:

* **x equation.** The denominator uses sin^2 + cos^2 = 1:

      x(n+1) = c / (2 - c^2),   c = cos(2^r y(n))

  A single cosine table gives both numerator and denominator. Because |c| <= 1,
  the denominator lies in [1, 2] and x stays in [-1, 1].

* **y equation.** The numerator folds into sqrt(2) sin(2t), with t = 2^r x(n).
  The 1 + sin^2(t) of the denominator equals 1.5 - 0.5 cos(2t). That cos(2t) is
  the derivative of sin(2t), and in discrete time a derivative is a one-step
  difference. So the denominator is formed from the *same* sine samples, using
  a delay register and a subtractor:

      s(n)   = sin(2 * 2^r x(n))
      y(n+1) = sqrt(2) s(n) / (1.5 - 2^r (s(n) - s(n-1)))

  The derivative is taken along the iteration index n, not along x. The result
  is therefore a different map from the original, not an approximation of it.
  It is the map built here. The 2^r gain on the difference is as the design
  specifies it. A derivation from the identity would give 1/(4*2^r) instead.
  This matters for the next section.

## The y divisor can cross zero

With the 2^r gain, the divisor 1.5 - 2^r (s(n) - s(n-1)) ranges over about
1.5 +- 2^(r+1). It passes through zero whenever consecutive sine samples differ
by about 1.5 / 2^r. The quotient can then be arbitrarily large.

`fx_div` handles this by saturation:

* The quotient is clipped to the Q4.28 range [-8, 8).
* A divisor of exactly zero gives the extreme value with the dividend's sign.
* 0/0 gives 0.

The `sat` output reports a clipped iteration. In the end-to-end test about one
iteration in 2000 saturates.

The divisor is held in WORD + 2^RW + 4 bits (52 bits), so 2^r times the
difference never overflows before the division.

## Number format and angle reduction

All map values are 32-bit signed fixed point, Q4.28 (package `lcm_pkg`). The
32-bit word is the specified format; the 4/28 split is this design's choice.

A table can only be indexed by the angle modulo 2*pi, so `angle_scaler` works
as follows:

* It multiplies the variable by 1/(2*pi), a Q0.32 constant. The product is the
  angle in turns, with 60 fraction bits.
* It applies the gain 2^r (or 2*2^r for the sine) as a left shift of that
  product.
* The top 10 fraction bits of the shifted product are the table address.

Two's complement wrap-around does the modulo for free, negative angles
included. Because of this, r is an integer, 0..15 (4 bits).

The tables (`trig_rom`) hold one full period in 1024 entries, rounded to Q4.28.
They are computed at elaboration with `$sin`/`$cos`, so no data files are
needed. Entry k holds round(f(2*pi*k/1024) * 2^28).

The table read is asynchronous (distributed ROM). A whole iteration is
therefore combinational between the x/y registers: angle scaling, table,
products, divider.

## Bit extraction

Two threshold units compare x and y with 0.5. Each is a signed comparison,
strictly greater:

    d0 = x > 0.5
    d1 = y > 0.5

A multiplexer outputs rn = sel ? d1 : d0. The select `sel` is a toggle flip-flop
that changes with every bit, so output bits alternate between the x and the y
comparison.

## Block map

| module | role |
|---|---|
| `lcm_pkg` | word format, constants (1/(2*pi), sqrt 2, 0.5, 1.5, 2), `trig_fn_e` |
| `angle_scaler` | 2^shift * v modulo 2*pi -> table address |
| `trig_rom` | 1024-entry sine or cosine table (`FUNC`) |
| `fx_div` | saturating signed fixed-point divider |
| `differentiator` | one-iteration delay and subtractor, d = s(n) - s(n-1) |
| `x_update` | x equation: cosine table, square, divide |
| `y_update` | y equation: sine table, differentiator, shift by r, divide |
| `plcm_map` | x, y, r registers; one iteration per enabled clock |
| `threshold_unit` | v > 0.5 |
| `bit_selector` | toggling select and the output multiplexer |
| `plcm_rng` | top: map, two thresholds, selector |

## Interface and timing of `plcm_rng`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `load` | in | 1 | seed strobe: takes `x0`, `y0`, `r_in`, empties the differentiator and restarts `sel` at 0 |
| `en` | in | 1 | take one bit this cycle and iterate the map at the clock edge |
| `x0`, `y0` | in | 32 | seed, Q4.28, meant to be in [-1, 1] |
| `r_in` | in | 4 | control parameter r (0..15; above 3 for chaos) |
| `rn`, `rn_valid` | out | 1 | the bit and its strobe (`en`, once seeded, not during `load`) |
| `x`, `y`, `r` | out | 32/32/4 | map state |
| `d0`, `d1`, `sel` | out | 1 | threshold outputs and multiplexer select |
| `sat` | out | 1 | the y division of the current iteration clips |

Timing and reset behaviour:

* **Throughput.** One bit per clock while `en` is high. `rn` is valid in the
  same cycle as `en`; x, y and `sel` advance on that edge.
* **Stall.** With `en` low, everything holds.
* **Priority.** `load` wins over `en`.
* **Reset.** Reset leaves x = y = 0, r = 4 and the generator unseeded: no
  `rn_valid` until the first `load`.
* **First iteration after a seed.** The differentiator's delay is zero, so the
  first difference is s(0) itself.

An assertion in `plcm_map` checks that an iterated x never leaves [-1, 1].

## Parameters

All modules take `WORD_W` (32), `FRAC_W` (28), `ADDR_W` (10) and `RW_W` (4),
with defaults from `lcm_pkg`. `fx_div` and `trig_rom` may be used alone with
their own parameters. Changing `FRAC_W` or `ADDR_W` changes every number the
generator produces.

The reference model in `tb/plcm_ref_pkg.sv` assumes the defaults.

## What follows the specification and what is this design's own

These parts follow the specification:

* the practical equations
* the two tables (one cosine, one sine)
* the delay-and-subtract differentiator
* the 2^r gain on the difference
* the 32-bit fixed-point word
* the two thresholds at 0.5 and the multiplexer

These parts are this design's own choices:

* the Q4.28 split
* the angle reduction through 1/(2*pi), and the integer r it implies
* the table depth and rounding
* truncating products
* the saturating divider
* the zero initial delay
* the toggling select (the specified waveform shows `sel` alternating)
* the assignment of d0 to x and d1 to y
* the load/enable/valid interface
* single-cycle iteration

The reference implementation ran at 80.592 MHz on a Spartan-6. This RTL has no
pipelining: its critical path is a 61-bit by 52-bit combinational divide. It
will not reach that frequency without pipelining the divider, and a pipelined
divider changes the iteration rate. Area and power were not compared.

## How far the output can be trusted as random

The RTL matches an independent bit-exact model. Its statistics, however, are
those of this reconstruction. Measured in simulation:

* A 1,000,000-bit sequence (seed 0.32, -0.70, r = 4) has 23.9 % ones.
* Its longest run of ones is 3.
* Other seeds and r values give 17-25 % ones.

The reason is the threshold. If the angle is spread evenly, x > 0.5 holds for
c > sqrt(3) - 1, which is about 24 % of the time. y exceeds 0.5 even less
often, because the large 2^r divisor keeps |y| small. A sequence this biased
fails the frequency test of a standard randomness suite.

The specified design is reported to pass such a suite. This RTL does not
reproduce that result. Reading the threshold as "fractional part above 0.5"
does not fix the bias: it gives 47-69 % ones. The likely causes are details
not available here: the exact fixed-point format, the table addressing, and
how `sel` is driven. Use `rn` as the specified structure's output, not as a
vetted random source.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The shared reference model is
`tb/plcm_ref_pkg.sv`. It uses 64-bit integers and run-time `$sin`/`$cos`,
written apart from the RTL.

With plain Verilator:

    verilator --binary --timing --assert -y rtl -y tb --Mdir obj \
        rtl/lcm_pkg.sv tb/plcm_ref_pkg.sv tb/plcm_rng_tb.sv --top-module plcm_rng_tb -o sim
    ./obj/sim

Replace the testbench name for the others.

* `plcm_rng_tb` runs the top at its default parameters. It uses six seeds with
  r = 4..14 and 20,000 bits each, with random stalls. It checks every bit,
  every state value and the one-bit-per-clock rate. It also requires each
  mechanism to occur: seeding, stalls, both select values, ones from both
  thresholds, and divider saturation.
* `plcm_rng_stream_tb` draws one 1,000,000-bit sequence, checks it bit by bit
  and prints its frequency, runs and longest-run figures.
* The block testbenches (`angle_scaler_tb`, `trig_rom_tb`, `fx_div_tb`,
  `differentiator_tb`, `x_update_tb`, `y_update_tb`, `plcm_map_tb`,
  `threshold_unit_tb`, `bit_selector_tb`) compare against real arithmetic or
  the reference model.

All run in a few seconds.
