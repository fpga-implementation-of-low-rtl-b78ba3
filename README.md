# Low-area integer square root calculator

This is a small integer square root unit for designs that need a square root
now and then, but not at full clock rate: motor control loops with
microsecond sampling periods, sensor post-processing and similar jobs. It
computes

    root = floor(sqrt(radicand))

for an N-bit unsigned radicand, giving an N/2-bit root. It trades speed for
area. A fully parallel digit-by-digit square root needs one remainder/root
stage per root bit, so N/2 stages. This unit has one such stage and reuses it
on N/2 consecutive clock cycles, producing one root bit per cycle.

The arithmetic is the *modified non-restoring* digit-by-digit method. It uses
only a subtractor and a multiplexer per step: no adder and no restore step.

The RTL follows the architecture published in "FPGA Implementation of
Low-Area Square Root Calculator" (TELKOMNIKA, Vol. 13, No. 4, 2015). That
article defines the method, the split into a remainder part and a root part,
the sharing of one pair of them and the N/2-cycle latency. The control logic,
the handshake and the exact register layout are this implementation's own.
They are listed under "Choices made here" below.

## The recurrence

Split the radicand into bit pairs, most significant pair first. Keep a partial
root `Q` (the root of the radicand bits used so far) and a partial remainder
`R` (those bits minus `Q*Q`). Both start at zero. For each pair `p`:

    S = 4*R + p             -- shift the remainder, append the pair
    T = 4*Q + 1             -- the partial root with "01" appended
    if S >= T:  R = S - T,  Q = 2*Q + 1      -- subtraction kept, root bit 1
    else:       R = S,      Q = 2*Q          -- subtraction dropped, root bit 0

After N/2 pairs, `Q` is the root and `R = radicand - Q*Q` is the remainder.

Why this works: appending a bit `b` to `Q` changes the square from `(2Q)^2` to
`(2Q+b)^2`. The difference for `b = 1` is `4Q + 1`. The step therefore asks
whether the remaining part of the radicand is large enough to pay for a 1 bit.
If it is not, nothing is subtracted. That is the difference from the classic
non-restoring method. The classic method subtracts anyway, lets the remainder
go negative, and adds on the next step (appending "11" instead of "01"). The
modified form needs no adder and no signed remainder, at the price of a
multiplexer that chooses between `S` and `S - T`.

Worked example, radicand 169 = `10 10 10 01`:

| step | pair | S = 4R+p | T = 4Q+1 | S >= T? | new R | new Q   |
|------|------|----------|----------|---------|-------|---------|
| 1    | 10   | 2        | 1        | yes     | 1     | 1       |
| 2    | 10   | 6        | 5        | yes     | 1     | 11      |
| 3    | 10   | 6        | 13       | no      | 6     | 110     |
| 4    | 01   | 25       | 25       | yes     | 0     | 1101=13 |

A difference of exactly zero counts as "not negative", so the root bit is 1
(step 4).

### Widths

The remainder is never more than twice the partial root
(`R <= 2Q`, because `(Q+1)^2 - Q^2 = 2Q + 1`). For an M-bit root (M = N/2),
`R` therefore fits in M+1 bits. `S` is formed on M+3 bits and the difference
on M+4 bits, so the sign bit is exact and nothing is truncated until the
result is known to fit back into M+1 bits. The trial value `T` is M+1 bits:
before the last step, `Q` has at most M-1 significant bits.

## The two halves of a step: PRC and PSC

One step is split the way the published design splits it:

* **`sqrt_prc`, the Partial Remainder Calculator.** It forms `S` from the
  remainder and the next pair, subtracts `T`, and passes on either `S - T` or
  `S`. It also outputs the sign, `neg_o`. Parameter `RW` is the remainder
  width, M+1.
* **`sqrt_psc`, the Partial Square Root Calculator.** It keeps the partial
  root `Q` in a register and forms `T = {Q, 01}` from it. From `neg_o` it
  forms the new partial root `{Q, ~neg}`. After the last step it writes the
  complete root to its output register. Parameter `M` is the root width.

The PRC is purely combinational. In the PSC, only the registers are clocked.
Within a cycle the path goes PSC (`T`), then PRC (`neg`), then the PSC's
register input. It is not a loop, because `T` does not depend on `neg`. The
critical path of the whole unit is this chain: a subtractor of about M+4 bits
followed by a 2:1 multiplexer.

## Sharing one step: `sqrt_lowarea` and `sqrt_ctrl`

`sqrt_lowarea` is the top level. The state of a calculation sits in four
registers:

| register | in | width | contents |
|----------|----|-------|----------|
| `rad_q`  | `sqrt_lowarea` | N   | radicand pairs not yet used; shifts up two bits per step |
| `rem_q`  | `sqrt_lowarea` | M+1 | partial remainder `R` |
| `part_q` | `sqrt_psc`     | M-1 | partial root `Q` (the last bit goes straight to the output) |
| `root_o` | `sqrt_psc`     | M   | last complete root, drives `root` |

`sqrt_ctrl` is a two-state sequencer, idle and running, with a step counter.
When a radicand is accepted, it issues a step on each of M consecutive
cycles. It flags the first and the last step. It pulses `done_o` in the cycle
after the last step.

The first step does not wait for the radicand to be loaded. In the cycle the
radicand is accepted, a multiplexer feeds the PRC/PSC pair with the input's
top pair, a zero remainder and a zero root. Meanwhile the remaining pairs are
written into `rad_q`. As a result the result takes exactly M = N/2 cycles, as
the published design specifies. A new radicand can be accepted in the same
cycle the previous result appears, so the throughput is one root every M
cycles.

```
cycle        c      c+1    ...   c+M-1   c+M
in_valid     1
in_ready     1      0      0     0       1       (next radicand may enter here)
step         first  2      ...   last
out_valid                                1
root         old    old    ...   old     new     (held until the next result)
```

## Interface of `sqrt_lowarea`

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock, rising edge |
| `rst_n`     | in  | 1     | asynchronous reset, active low; clears `root` to 0 |
| `in_valid`  | in  | 1     | `radicand` is valid |
| `in_ready`  | out | 1     | the unit is idle; `in_valid && in_ready` accepts the radicand |
| `radicand`  | in  | N     | unsigned radicand; sampled only in the accepting cycle |
| `out_valid` | out | 1     | one-cycle pulse: `root` holds a new result |
| `root`      | out | N/2   | floor(sqrt(radicand)); stays valid until the next result |

Parameter `N` is the radicand width: even, at least 4, default 8. Any even
width works. The tests run 8, 12, 16, 32 and 64. There is no back-pressure on
the result. A consumer that needs one must capture `root` when `out_valid` is
high.

## Size and speed

Latency is N/2 clock cycles, one root bit per cycle. This matches the latency
column the published design reports for its area-optimized version (4, 8, 16
and 32 cycles for 8, 16, 32 and 64 bits). Flip-flop counts of this RTL after
generic synthesis (yosys `synth`, two low radicand bits optimized away):

| N (radicand bits) | root bits | latency (cycles) | flip-flops |
|-------------------|-----------|------------------|------------|
| 8                 | 4         | 4                | 22         |
| 16                | 8         | 8                | 43         |
| 32                | 16        | 16               | 84         |
| 64                | 32        | 32               | 165        |

This is roughly 2.5 N + log2(N/2) flip-flops. The published FPGA
implementation reports 27, 48, 89 and 170 registers for the same widths, so
the register structure is comparable. The logic is one (N/2+4)-bit
subtractor, a few multiplexers and a small counter. It grows linearly with N.
A fully parallel version grows roughly with N squared.

## Choices made here

The published design fixes the method, the PRC/PSC pair, the sharing and the
latency. The following are choices made in this implementation:

* The valid/ready input and the `out_valid` pulse. The published design
  shows only a clock, a reset, the radicand and the root.
* An asynchronous, active-low reset.
* Feeding the first step directly from the input, to keep the latency at
  exactly N/2 cycles.
* The register layout above, including the separate output register that
  holds the root between results.
* The exact split of ports between PRC and PSC. The published design names
  the two parts and what each computes, but not their ports.
* The final remainder is computed but not brought out as a port.

Only the area-optimized, shared-pair design is implemented. The fully
parallel version (N/2 PRC/PSC pairs, one-cycle latency) is what the area
savings are measured against, and it is not part of this RTL. It can be
built from the same two modules by chaining N/2 copies of them.

## Files

| file | contents |
|------|----------|
| `rtl/sqrt_pkg.sv`      | sequencer state type and remainder-width helper |
| `rtl/sqrt_prc.sv`      | Partial Remainder Calculator (combinational) |
| `rtl/sqrt_psc.sv`      | Partial Square Root Calculator: partial-root and result registers |
| `rtl/sqrt_ctrl.sv`     | iteration sequencer with handshake |
| `rtl/sqrt_lowarea.sv`  | top level: radicand and remainder registers, first-step multiplexer, shared PRC/PSC pair |
| `tb/tb_sqrt_prc.sv`    | exhaustive test of the PRC at RW = 5 |
| `tb/tb_sqrt_psc.sv`    | test of the PSC at M = 4 with every sequence of subtraction signs |
| `tb/tb_sqrt_ctrl.sv`   | cycle-exact test of the sequencer: step timing, busy, back to back, reset |
| `tb/tb_sqrt_lowarea.sv`| end-to-end test at the default N = 8 |
| `tb/tb_sqrt_runner.sv` | helper: drives and checks one instance of any width |
| `tb/tb_sqrt_workloads.sv` | widths 8, 12, 16, 32 and 64 side by side |

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Results are checked against the
definition of the integer square root, `r*r <= d < (r+1)*(r+1)`. This is
computed on wide integers in the testbench, not by a second square root
algorithm.

* `tb_sqrt_lowarea` uses the default parameters. It sends all 256 radicands
  three times: with random idle gaps, back to back with `in_valid` held high,
  and in random order. It checks every root and checks that every latency is
  exactly 4 cycles. It checks that `root` does not change between results. It
  resets in the middle of an operation and checks that the result is dropped.
  It also counts that each mechanism happened: subtractions kept and dropped,
  back-to-back acceptance, a radicand held off while busy, and the mid-operation
  reset.
* `tb_sqrt_workloads` runs five instances at once:
  * 8 bits: the sequence 196, 225, 121, 36, 9, 4, 25, expecting 14, 15, 11,
    6, 3, 2, 5, then 300 random values.
  * 12 bits: 4, 16, 81, 225, 900, 1600, 400, 49, expecting 2, 4, 9, 15, 30,
    40, 20, 7, then 500 random values.
  * 16, 32 and 64 bits: 1000 random values each, including 0 and the
    all-ones radicand.

  The random magnitudes are spread so that small roots occur as well as large
  ones. Latency is checked at every width.

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sqrt_pkg.sv tb/tb_sqrt_lowarea.sv --top-module tb_sqrt_lowarea
./obj_dir/Vtb_sqrt_lowarea
```

Replace `tb_sqrt_lowarea` with any other testbench name. `sqrt_pkg.sv` must
be listed first. Each testbench finishes in well under a second.

To change the width, set `N` on `sqrt_lowarea`. The top level, `sqrt_ctrl`
and `sqrt_psc` require N/2 >= 2. Each checks this with an assertion at the
start of simulation.
