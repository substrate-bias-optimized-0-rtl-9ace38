# 32-bit Han-Carlson adder test chip

A 32-bit adder meant to run at 2.56 GHz in a 0.18 um bulk CMOS process,
together with the on-chip test circuit that proves it. The adder is a
Han-Carlson parallel-prefix adder. Its carry-merge tree alternates static
and dynamic gates so that the signal polarity flips at every stage, which
means no inverters are needed between stages. The test circuit makes the
adder an accumulator: an LFSR supplies one operand, a register feeds the sum
back as the other, and every 16 additions a copy goes to the pins at 40 MHz.
A logic analyser can capture that rate. Four clock buffers can be tuned
after fabrication from pads, so clock skew between the fast and slow parts
can be corrected on the finished chip.

This RTL describes the logic function and the cycle timing. Transistor-level
matters are not modelled: dynamic precharge, wave pipelining inside the
adder, substrate bias, the PLL and the power grid. The four tunable clock
buffers are written as behavioural delay models.

## Structure

```
clk_pll (f) ──► hca_clk_div ──► f/4 ──► deskew ──► hca_lfsr  ─┐ A
                     │                     └─────► hca_reg_b ─┤ B ◄──────┐
                     ├─ f/2 ─► invert ─► deskew ──► Register-C │           │
                     └─ f/64 ────────► deskew ──► Register-O   ▼           │
clk_pll ─────────────────────────────► deskew ──► hca_adder32 ─► Register-C ─┴─► Register-O ─► reg_o
```

| module | role |
|---|---|
| `hca_chip` | top: test chip |
| `hca_adder32` | adder core: input latch, P/G/Psum, carry-merge tree, CSG, output latch |
| `hca_input_latch` | captures operands of one two-bit pipeline, drives them complemented |
| `hca_pg_gen` | propagate, generate, partial sum per bit |
| `hca_cm_tree` | five carry-merge stages (static, dynamic, static, dynamic, static) |
| `hca_cms`, `hca_cmd` | static and dynamic carry-merge cells |
| `hca_csg` | carry-sum generator: last merge stage plus sum XOR |
| `hca_output_latch` | captures the sum bits of one two-bit pipeline |
| `hca_clk_div` | f/2, f/4, f/64 |
| `hca_lfsr` | operand A: serial shift register / LFSR |
| `hca_reg_b` | operand B: cleared or loaded from Register-C |
| `hca_reg` | Register-C and Register-O |
| `hca_deskew_buf` | behavioural model of the tunable clock buffer |
| `hca_pkg` | widths, division ratios, mode type |

## The adder core

### Propagate, generate and partial sum

The input latch drives the operands complemented (`a_n`, `b_n`). The
first gates are therefore a NAND and a NOR:

    p    = ~(a_n & b_n) = a | b
    g    = ~(a_n | b_n) = a & b
    psum = p ^ g        = a ^ b

In silicon, `p` and `g` are dynamic gates on the critical path. `psum` is
off the critical path and is built as a static gate from `p` and `g`.

### Carry-merge tree and its polarity

The tree is Han-Carlson: a Kogge-Stone tree over the odd bits only, with
one extra stage before it and one after it.

| stage | cell | merges | output polarity |
|---|---|---|---|
| 1 | static (`hca_cms`) | odd bit i with bit i-1 | active low |
| 2 | dynamic (`hca_cmd`) | odd i with odd i-2 | active high |
| 3 | static | odd i with odd i-4 | active low |
| 4 | dynamic | odd i with odd i-8 | active high |
| 5 | static | odd i with odd i-16 | active low |
| 6 | in `hca_csg` | even i with odd i-1 | carry |

A static merge cell is an AOI/NAND pair. It takes active-high signals and
gives active-low ones: `g_n = ~(g_hi | p_hi & g_lo)`, `p_n = ~(p_hi & p_lo)`.
A dynamic cell is a precharged node. It takes active-low signals and gives
active-high ones: `g = ~(g_hi_n & (p_hi_n | g_lo_n))`, `p = ~(p_hi_n | p_lo_n)`.
Because the two cell types alternate, every stage's output already has the
polarity the next stage needs. A column that does not merge in a stage goes
through one inverter, so it keeps the same polarity as its neighbours.
After stage 5:

- odd bits hold `~G[i:0]` and `~P[i:0]`;
- even bits hold their own `~g[i]` and `~p[i]`.

In this RTL the cells are combinational and give the value the dynamic
gate has during evaluation. Precharge is not modelled.

### Carry-sum generator

The last merge is folded into the sum stage. For each even bit i ≥ 2 it
forms

    G[i:0] = g[i] | p[i] & G[i-1:0]

from the active-low stage-5 outputs. Odd bits already hold `G[i:0]`. The
carry into bit i is `G[i-1:0]`, and the carry into bit 0 is 0. The outputs
are `sum = psum ^ carry` and its complement `sum_n`. The adder has no carry
in and no carry out.

### Latency

The operands are captured at adder clock edge n, and the sum is in the
output latch after edge n+1. Counted from the registers that launch the
operands at edge n-1, that makes two adder clock cycles. The silicon uses
delayed clock phases to drive each stage between the two latches. Here that
logic is one combinational path.

The 32 bits are organised as 16 parallel two-bit pipelines. Each pipeline
has its own clock line: `clk[k]` clocks the input and output latches of
bits 2k+1:2k. The test chip drives all 16 lines from the adder's tunable
buffer. The carry tree itself crosses pipeline boundaries, so the pipelines
differ only in their latches and their clock lines.

## The test chip

### Clock branches

All registers trigger on rising edges. The divider is a 6-bit counter. Its
outputs are the inverted counter bits, so f/2, f/4 and f/64 all rise
together on the edge where the counter wraps.

| branch | clock | drives |
|---|---|---|
| operand | f/4 | LFSR, Register-B |
| adder | f | adder latches |
| capture | inverted f/2 | Register-C |
| output | f/64 | Register-O |

Each branch passes through its own tunable buffer (`sel_*`, 3 bits each).

### One accumulation step

With equal buffer settings, one step of the accumulator takes exactly one
f/4 period. Times are counted in f cycles after an f/4 rising edge t:

| time | event |
|---|---|
| t | LFSR and Register-B launch new operands |
| t+1 | adder input latch captures them |
| t+2 | adder output latch holds the sum |
| t+3 | Register-C captures the sum (rising edge of inverted f/2) |
| t+4 | Register-B loads Register-C; the next step starts |

The inverted f/2 clock also rises at t+1. At that edge Register-C captures
a stale value, which is overwritten at t+3 before Register-B uses it. Every
64 f cycles Register-O takes Register-C on an edge that is also an f/4
edge, so it sees the result of the previous 16 additions.

### Modes

The `mode` pin (`hca_pkg::test_mode_e`) selects one of two modes.

- **Shifting** (`MODE_SHIFT`): `serial_in` is shifted into the LFSR on
  every f/4 edge, MSB first. The standard test shifts in 32 ones.
  Register-B is cleared.
- **Testing** (`MODE_TEST`): Register-B loads Register-C, so Register-B
  accumulates. The LFSR steps with XNOR feedback, taps 32, 22, 2 and 1.
  For XNOR feedback, all ones is the lock-up state. An LFSR full of ones
  therefore keeps supplying the constant 0xFFFFFFFF. After 16 additions
  Register-O shows 0xFFFFFFF0. Any other seed gives a pseudo-random operand
  stream, and the testbench checks that stream against its own model.

Change `mode` and `serial_in` away from the operand-branch rising edges.
`rst_n` resets only the clock divider. No other register needs a reset:
shifting mode defines the LFSR and Register-B, and the other registers are
overwritten every cycle.

### Tunable clock buffers

In silicon, each buffer drives a line that carries three RC branches. Each
branch is switched on by a transmission gate controlled from a pad, and
every branch that is switched on adds load and therefore delay. The tuning
range is about 50 ps.

`hca_deskew_buf` models this as a transport delay:

    delay = BASE_PS + STEP_PS * (sel[0] + 2*sel[1] + 4*sel[2])

The defaults are 100 ps and 7 ps, which gives 8 settings spanning 49 ps.
The binary weighting of the three branches, the base delay and the step are
this model's choices. Rise and fall delays are equal. The delay is taken
when an edge enters the buffer.

With all four settings equal, the chip behaves as in the timing table
above. Unequal settings move the branches against each other by up to
49 ps. In this RTL, which has no gate delays, the accumulation loop holds
for any combination of settings, and the top-level testbench checks random
ones. On the chip, the settings are there to cancel the real skew that the
logic and the wiring add.

## Where this departs from the circuit

- **Dynamic logic:** modelled by its evaluate-phase function. Wave
  pipelining inside the adder becomes one combinational stage between two
  flip-flops.
- **Partial sum:** an XNOR of the latched complemented inputs,
  `~(a_n ^ b_n)`, would give the complement of the half sum. This RTL uses
  `psum = p ^ g = a ^ b`, because the sum is formed as carry XOR partial sum.
- **CSG circuit details:** the locally inverted clock, the P-latch and the
  pull-up transistors have no logic function and are left out.
- **Choices where nothing is specified:**
  - the divider's phase alignment;
  - the LFSR polynomial and feedback type;
  - the mode-pin encoding;
  - the divider reset;
  - the buffer weighting and delay values.
- **Not present:** the PLL, the substrate bias (NMOS 0.55 V, PMOS 1.45 V
  on the carry-merge stages), the power grid and the clock-tree buffers.
  The PLL output is the `clk_pll` input.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hca_pkg.sv tb/tb_hca_chip.sv \
          --top-module tb_hca_chip -o sim && ./obj_dir/sim
```

`--timing` is required, because the tunable buffers use delays.

- **`tb_hca_chip`** runs the whole chip at its default parameters:
  - 32 ones are shifted in, then 64 accumulations run, including the
    add-16-times value on Register-O;
  - the buffers are retuned and the delay change is checked;
  - a random seed is shifted in, then 64 pseudo-random accumulations run;
  - the four buffers get different random settings, then 64 more
    accumulations run.

  After every f/4 edge it compares the LFSR, Register-B, Register-O and the
  adder's two-cycle latency against its own model. It also counts each
  mechanism: shifting, accumulation, Register-O updates, wrap-around,
  retuning, the add-16 result and skewed settings. A mechanism that never
  happens counts as a failure.
- **Block testbenches:**
  - the merge cells are tested exhaustively;
  - the tree is checked against integer carries for every odd bit;
  - the adder is run at full throughput with a latency check;
  - the divider's periods, duty cycle and edge alignment are checked;
  - the LFSR is checked against a reference model;
  - the buffer delay is checked for every setting.

Clock in the testbenches: a 390 ps period, about 2.56 GHz.

## Changing it

- The width is fixed at 32 by the five-stage tree. `hca_pkg` holds the
  width, the division ratios and the number of buffer bits.
- To compare buffer settings, change `BASE_PS` and `STEP_PS` on
  `hca_deskew_buf`, or drive different `sel_*` values in `tb_hca_chip`.
- Everything except `hca_deskew_buf` is synthesizable. For synthesis,
  replace the buffers with real delay cells, or with wires.
