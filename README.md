# Gated-clock LFSR with reduced XOR feedback

A linear feedback shift register (LFSR) normally clocks all of its flip-flops
on every cycle. In a pseudo-random sequence, though, each bit keeps its
value about half the time, so half of those clock pulses are wasted energy.
This design gives every flip-flop its own clock gate, which passes the clock
only when the flip-flop's next value (D) differs from its present one (Q).
The sequence is the same as for an ordinary LFSR.

The gate also produces the XOR of D and Q. For stage `i` that is
`x^(i+1) xor x^i`. The feedback network reuses these signals, so it needs
fewer XOR gates than a conventional feedback chain.

The RTL models the logic of a design made at transistor level: the
pass-transistor clock gate, the master-slave flip-flop and the XOR cell. Each
is written as its Boolean or edge-triggered behaviour. Power cannot be
measured at this level. The testbenches instead count how many flip-flop
clock pulses are delivered and how many are suppressed.

## Register structure

`gated_lfsr` is an `N`-stage Fibonacci LFSR for the polynomial
`x^N + c_(N-1) x^(N-1) + ... + c_1 x + 1`.

- Stage `i` holds the term `x^i`.
- On each clock, stage `i` takes the value of stage `i+1`.
- The top stage, `N-1`, takes the feedback `x^N`, which is the XOR of every
  stage `x^j` with `c_j = 1`.
- Stage 0 is the serial output `out`.

```
            +-------------- feedback network (lfsr_feedback) <---------+
            |                    ^ binomials x^(i+1)^x^i, stage bits   |
            v                                                          |
  fb -> [FF N-1] -> [FF N-2] -> ... -> [FF 1] -> [FF 0] -> out         |
          ^ gclk      ^ gclk              ^ gclk   ^ gclk              |
       gate(fb,q6)  gate(q6,q5) ...    gate(q2,q1) gate(q1,q0) --------+
          ^ clk ...
```

Each stage is an `ms_dff` flip-flop driven by its own `xorand_clock_gate`.
The gate's inputs are the stage's D and Q in both polarities:

- Q and Q-bar come straight from the flip-flop.
- The complement of D is the next stage's Q-bar.
- For the top stage, the complement of D is an inverted copy of the feedback.

Defaults: `N = 7` and `TAPS = 7'b0001111`, which is
`x^7 + x^3 + x^2 + x + 1`. This polynomial is primitive, so the period is
2^7 - 1 = 127 cycles.

## The clock gate and its resting level

`xorand_clock_gate` has two parts.

1. **Complementary pass-transistor XOR/XNOR.** Each output node picks one of
   two inputs, steered by `b` and `b_n`:
   - `x_n = b ? a : a_n`
   - `x = b ? a_n : a`

   Both polarities of both inputs are required. Both polarities of the
   result are produced.
2. **Transmission gate.** It passes `clk` to `clk_gated` while `x = 1`.

The hard part is what `clk_gated` does while the gate is off. A bare
transmission gate leaves the node floating. This design holds it **high**:
`clk_gated = x ? clk : 1`. The reason is the timing of the enable:

- The enable `x` is computed from flip-flop outputs, so it changes only just
  after a rising edge of `clk`, while `clk` is high.
- With a high resting level, an enable that changes during the high phase
  can never produce an edge. `clk_gated` is already high and stays high.
- Once `clk` goes low, an enabled stage's gated clock falls with it, and the
  next rising edge of `clk` clocks the stage.

If the gate rested low (a plain AND of clock and enable), the design would
fail. Suppose stage `i` is disabled, and its upper neighbour toggles at the
edge. The enable of stage `i` then rises while `clk` is still high. That
makes a late rising edge on stage `i`, which captures the neighbour's *new*
value and shifts two places in one cycle. To see this, change the assignment
in `rtl/xorand_clock_gate.sv` to `x & clk`: `tb_gated_lfsr` then fails.

This reasoning needs every input of the gate to come from flip-flops clocked
by rising edges of the same `clk`, which is true inside `gated_lfsr`. Do not
reuse the gate with an enable that can change while `clk` is low.

Note for synthesis: the gate is combinational logic on the clock path. A
standard flow will treat `clk_gated` as a derived clock. In a real
implementation the gate would be a custom or library clock-gating cell, and
timing has to be signed off with that in mind.

## Reduced XOR feedback

A conventional feedback chain needs `n_t = (number of taps) - 1` XORs.
The binomial `x^(i+1) xor x^i` already exists at the XOR output of stage
`i`'s gate, for `i = 0 .. N-2`. (Stage `N-1`'s binomial contains the
feedback itself, so it cannot be used.) A couple of adjacent taps `(i+1, i)`
can therefore enter the chain as one term, that binomial. The number of XORs
drops to

    n_t'' = n_t - m_c

where `m_c` is the number of couples of adjacent taps, with each tap in at
most one couple.

`lfsr_pkg` finds the couples when the design is elaborated. It scans from
`x^0` upward and pairs greedily, which gives the largest possible `m_c`.
`lfsr_feedback` then builds a chain of `xor2` cells over the terms.
`lfsr_feedback.N_XOR` holds the resulting XOR count.

| polynomial                   | taps        | n_t | m_c | XORs built |
|------------------------------|-------------|-----|-----|------------|
| x^7 + x^3 + x^2 + x + 1      | 3,2,1,0     | 3   | 2   | 1          |
| x^10 + x^4 + x^3 + x + 1     | 4,3,1,0     | 3   | 2   | 1          |
| x^8 + x^6 + x^5 + x^4 + 1    | 6,5,4,0     | 3   | 1   | 2          |

For example, the 7-stage default computes
`fb = (x^3 xor x^2) xor (x xor 1)`, using the gate outputs of stages 2 and 0.

The XOR chain reads the gate outputs. Its delay adds to the gates' XOR delay
on the feedback path, but there are fewer XOR levels.

## Modules

| file                       | what it is |
|----------------------------|------------|
| `rtl/gated_lfsr.sv`        | top: N stages, N clock gates, feedback network |
| `rtl/xorand_clock_gate.sv` | per-stage XOR/XNOR + clock pass gate |
| `rtl/lfsr_feedback.sv`     | reduced-XOR feedback, built at elaboration |
| `rtl/ms_dff.sv`            | rising-edge D flip-flop with Q and Q-bar, async reset |
| `rtl/xor2.sv`              | two-input XOR cell of the feedback chain |
| `rtl/lfsr_pkg.sv`          | functions: couples, single taps, n_t, m_c, n_t'' |

### `gated_lfsr` interface

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| `clk`    | in  | 1     | free-running clock |
| `rst_n`  | in  | 1     | asynchronous active-low reset; loads `SEED` |
| `out`    | out | 1     | serial output, stage 0 |
| `state`  | out | N     | all stages, bit `i` = `x^i` |
| `clk_en` | out | N     | 1 where the stage will be clocked at the next rising edge |

Parameters:

- `N`: number of stages, 2 to 64.
- `TAPS`: bit `j` is the coefficient of `x^j`. Bit 0 must be 1.
- `SEED`: the reset state. It must not be zero.

Timing: the register shifts once per rising edge of `clk`. The outputs
change just after the edge. There is no enable input, so the register runs
whenever `clk` runs.

## What is this design's own choice

The following points are not fixed by the underlying circuit description:

- **Reset.** The asynchronous reset and the default `SEED = 1`. The circuit
  as described has no reset, but an LFSR needs a non-zero start state.
- **Gate resting level.** The high resting level of the gated clock (see
  above).
- **Default polynomial.** Two example polynomials are given and neither is
  called the main one. The default is the 7-stage one. Set `N = 10,
  TAPS = 10'b0000011011` for the other.
- **Couple selection.** Couples are picked greedily from the bottom, and the
  terms are chained from the lowest upward. The method also mentions using
  `x^i xor x^i = 0` for taps that are not adjacent. That does not change the
  stated XOR count, so taps outside a couple enter as plain stage bits.
- **Transistor-level cells.** The flip-flop, XOR cell and clock gate are
  written as their logic functions. Their circuit-level properties (full
  voltage swing, no restoring transistors, drive strength) have no RTL
  counterpart.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end.

| testbench                 | what it checks |
|---------------------------|----------------|
| `tb_gated_lfsr`           | default 7-stage design over three periods: state against an ungated reference LFSR every cycle, period 127, one clock pulse per stage exactly when the stage changes, `clk_en`, XOR count 1, mid-run reset |
| `tb_gated_lfsr_x10`       | 10-stage polynomial over two periods: reference match, period 1023, XOR count 1 |
| `tb_lfsr_feedback`        | all states of 7-, 8- and 10-stage networks; XOR counts 1, 2, 1 |
| `tb_xorand_clock_gate`    | full truth table; gated-clock edge count over random inputs |
| `tb_ms_dff`               | rising-edge capture, Q-bar, async reset to 0 and to 1 |
| `tb_xor2`                 | truth table |

At the default size, `tb_gated_lfsr` reports 1404 stage-cycles clocked and
1403 gated off, so about 50% of flip-flop clock pulses are removed. The
10-stage run delivers 50% of the pulses too.

Run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  --top-module tb_gated_lfsr -y rtl -y tb +libext+.sv \
  rtl/lfsr_pkg.sv tb/tb_gated_lfsr.sv
./obj_dir/Vtb_gated_lfsr
```

The package must come first on the command line. `-y rtl` finds the other
modules by file name. Some testbenches look inside the design through
hierarchical names: `dut.gclk` for the gated clocks and `dut.u_fb.N_XOR` for
the XOR count. If you rename those, change the testbenches too.

Lint gives a few unused-signal notes. They depend on the parameters:

- the gates' XNOR outputs are not needed outside the gates;
- the feedback network leaves unused any stage bit or binomial that no tap
  selects.
