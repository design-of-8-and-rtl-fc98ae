# Maximum-length LFSR pseudo-random generators, 8 and 16 bits

A linear feedback shift register (LFSR) is a chain of flip-flops in which each
stage copies its neighbour on every clock and the first stage is fed with the
exclusive-or of a few chosen stages (the *taps*). The only logic in it is one
XOR, so it runs at the full clock rate and produces one new pseudo-random state
per clock. When the taps match a primitive polynomial over GF(2), an n-stage
register runs through all 2^n - 1 non-zero states before repeating. This is a
*maximum-length* sequence, also called an m-sequence.

This RTL provides two such generators:

| generator | polynomial                 | taps               | period |
|-----------|----------------------------|--------------------|--------|
| `lfsr8`   | x^8 + x^6 + x^5 + x^4 + 1   | X8, X6, X5, X4     | 255    |
| `lfsr16`  | x^16 + x^15 + x^13 + x^4 + 1 | X16, X15, X13, X4 | 65535  |

Both are built from one generic core, `lfsr_fib`. The top, `lfsr_top`, places
the two generators side by side on a common clock.

## How the feedback is wired

The register is in the Fibonacci form: the taps are all XORed into a single
feedback bit, and that bit enters at one end of the chain.

- The stages are numbered X1 to Xn. X1 is the input end and Xn is the output
  end. The state shifts from X1 toward Xn.
- The polynomial term x^k means that stage Xk is tapped. The "+1" term is the
  input of X1. The highest term, x^n, is always present, so the last stage is
  always tapped.
- The new X1 is the XOR of the tapped stages. For the 8-bit generator,
  X1 <= X8 ^ X6 ^ X5 ^ X4.
- The serial pseudo-noise output `pn` is the last stage, Xn.

In the state vector, stage Xk is bit k-1. So `q[0]` is X1 and `q[n-1]` is Xn,
and a shift is `q <= {q[n-2:0], feedback}`. The tap set is a mask with the same
bit order. For example, `8'b1011_1000` has bits 7, 5, 4 and 3 set, which are
stages X8, X6, X5 and X4.

This bit order is a choice. It matters whenever the parallel state `q` is
compared with another implementation, because the reverse order gives the same
serial sequence but different parallel words. With this order and an all-ones
seed, the states are:

| shifts | 8-bit `q` | 16-bit `q` |
|--------|-----------|------------|
| 0      | FF        | FFFF       |
| 1      | FE        | FFFE       |
| 2      | FC        | FFFC       |
| 5      | E1        | FFE1       |
| 9      | 17        | FE1E       |
| 33     | 1C (00011100) | –      |
| 71     | –         | B5AB (1011010110101011) |

The 33-shift and 71-shift values are the states that the waveforms of the
original design show for an all-ones seed. They are used as check points in the
testbenches.

## Choosing taps

The core checks three rules on `TAPS` while it elaborates. If a rule fails,
elaboration stops with `$error`:

1. The last stage is tapped (`TAPS[WIDTH-1]` is 1).
2. The number of taps is even.
3. The tap positions (counting from 1) have no common divisor greater than 1.

These rules are necessary for a maximum-length sequence, but they are not
sufficient. For example, x^4 + x^2 + 1 fails rule 3, and it is indeed not
maximal. But some tap sets pass all three rules and are still not maximal.
Take new taps from a table of primitive polynomials. Then confirm the period
in simulation, as `tb_lfsr_fib` does for 3, 4 and 5 stages.

## Interface and timing

All three generator modules (`lfsr_fib`, `lfsr8`, `lfsr16`) have the same ports:

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1     | rising-edge clock |
| `start` | in  | 1     | while high, `q` is loaded with `seed` on each rising edge |
| `seed`  | in  | n     | initial value; bit k-1 is stage Xk |
| `q`     | out | n     | register state; bit k-1 is stage Xk |
| `pn`    | out | 1     | serial output, equal to `q[n-1]` |

- The load is synchronous. The seed appears in `q` after the rising edge at
  which `start` is high.
- On each later rising edge at which `start` is low, `q` advances by one state.
  There is no enable: the register shifts on every clock.
- There is no reset. Until the first load, `q` holds whatever value the
  flip-flops power up with. Drive `start` for at least one clock before using
  the output.
- Do not load an all-zero seed. With XOR feedback the all-zero state leads back
  to itself, so the register would stay at zero forever. An immediate assertion
  in `lfsr_fib` reports such a load in simulation.

`lfsr_top` has one `clk` and two groups of these ports: `start8`, `seed8`,
`q8`, `pn8` and `start16`, `seed16`, `q16`, `pn16`. The two generators share
nothing else. Either one can be reloaded while the other keeps running.

## Hardware cost

Each generator is n D flip-flops, an n-bit 2:1 multiplexer for the seed load,
and one 4-input XOR. In FPGA terms that is one flip-flop per stage plus
roughly one LUT per stage for the load multiplexer and feedback.
The original FPGA implementation reported these counts:

| resource              | 8-bit | 16-bit |
|-----------------------|-------|--------|
| slices                | 4     | 10     |
| slice flip-flops      | 8     | 16     |
| 4-input LUTs          | 8     | 16     |
| global clock buffers  | 1     | 1      |

Those counts were taken on a Xilinx device and have not been reproduced here.
The flip-flop and clock counts follow directly from the structure above.

## Files

| file | contents |
|------|----------|
| `rtl/lfsr_pkg.sv`  | widths and tap masks of the two polynomials; helper functions for the tap rules |
| `rtl/lfsr_fib.sv`  | generic n-stage Fibonacci LFSR (parameters `WIDTH`, `TAPS`) |
| `rtl/lfsr8.sv`     | 8-bit generator, x^8 + x^6 + x^5 + x^4 + 1 |
| `rtl/lfsr16.sv`    | 16-bit generator, x^16 + x^15 + x^13 + x^4 + 1 |
| `rtl/lfsr_top.sv`  | both generators side by side |
| `tb/tb_lfsr_fib.sv` | 3-, 4- and 5-stage instances against hand-written models; period and state coverage |
| `tb/tb_lfsr8.sv`   | 8-bit generator: model comparison every clock, 33-shift check point, full period for six seeds, reload during a run |
| `tb/tb_lfsr16.sv`  | the same for the 16-bit generator, with the 71-shift check point and four full periods |
| `tb/tb_lfsr_top.sv` | both generators at full size for one complete 16-bit period (65535 clocks) |

Each testbench compares the design against a reference model with its own
stage-by-stage feedback equation. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog that counts a
failure if the run hangs. `tb_lfsr_top` also does the following:

- It checks that the 8-bit generator wraps exactly 257 times within one 16-bit
  period.
- It checks the m-sequence balance: each serial output has 2^(n-1) ones per
  period.
- It reloads each generator while the other runs and checks that the other is
  not disturbed.
- It counts how often each of these happened: seed loads, period wraps and
  independent reloads.

## Simulating

With Verilator 5 (the testbenches use `--timing` delays for the clock):

```sh
verilator --binary --timing --assert --top-module tb_lfsr_top \
    -y rtl -y tb +libext+.sv rtl/lfsr_pkg.sv tb/tb_lfsr_top.sv
./obj_dir/Vtb_lfsr_top
```

Replace `tb_lfsr_top` with `tb_lfsr8`, `tb_lfsr16` or `tb_lfsr_fib` to run the
other testbenches. All of them finish in well under a second of wall time.

To lint a module on its own:

```sh
verilator --lint-only -Wall -y rtl +libext+.sv rtl/lfsr_pkg.sv rtl/lfsr_top.sv
```

The lint reports that the unused polynomial constant of `lfsr_pkg` is unused in
each single-generator build. That warning is harmless.

## Changing the design

- **Another polynomial or width.** Instantiate `lfsr_fib` with `WIDTH` and a
  `TAPS` mask: bit k-1 set for each term x^k, always including x^n. `WIDTH`
  may be 2 to 64.
- **A different seed.** Any non-zero value works. Changing the seed only
  changes where in the same 2^n - 1 cycle the sequence starts.
- **A reset.** To start from a known state without a load cycle, add an
  asynchronous or synchronous reset to the `always_ff` in `lfsr_fib` that loads
  a fixed non-zero constant.

## Where this implementation makes its own choices

These points were not specified in the original design and were decided here:

- The `start` input is a synchronous, active-high parallel load.
- There is no reset.
- Stage Xk is bit k-1 of `q`.
- The feedback is one reduction XOR instead of a chain of two-input gates. The
  logic function is the same.
- The two generators share one clock in `lfsr_top`.
- The elaboration checks of the tap rules and the zero-seed assertion were
  added.
