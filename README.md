# Adaptive column-bypass multiplier with hold logic and Razor correction

A combinational array multiplier is normally clocked at its worst-case delay,
although the worst case is rarely exercised. In a *column-bypass* array the
delay depends strongly on the operands: every zero bit of the multiplicand
switches off a whole column of adders, so a multiplicand with many zeros
finishes much earlier than one with few. This design exploits that with
**variable latency**:

* the clock period is chosen shorter than the worst case;
* an **adaptive hold logic (AHL)** counts the zero bits of the multiplicand
  and, for "dense" multiplicands, holds the operands one extra cycle, so
  those multiplications get two cycles and all others one;
* a **Razor register** at the output catches the rare case in which the
  prediction was too optimistic (or the circuit has slowed down), corrects
  the stored product one cycle later and re-executes the operation that was
  in flight;
* an **aging indicator** watches how often that happens and, when errors
  become frequent (transistor aging through NBTI/PBTI has made the array
  slower), switches the hold logic to a stricter zero-count threshold.

The array's last adder row is a carry look-ahead adder instead of a ripple
chain, which shortens the longest path of the array itself. The default
configuration is 16 x 16 bits, unsigned, with a 32-bit product.

All RTL is SystemVerilog (IEEE 1800-2017) and synthesizable; the testbenches
are self-checking and run under Verilator 5 with `--timing`.

## Module hierarchy

```
aclb_cla_multiplier            top: operands in, product out, variable latency
├── input_dff  u_dff1           multiplicand register (DFF1), clock-enabled
├── input_dff  u_dff2           multiplicator register (DFF2), clock-enabled
├── clb_cla_multiplier u_mult   combinational column-bypass array
│   ├── bypass_fa  (15 x 15)    adder cell with bypass multiplexer
│   └── cla_adder  u_final      15-bit last row from 4-bit CLA groups
│       └── cla4   (4)
├── razor_ff   u_razor          32-bit output register with shadow copy
└── ahl        u_ahl            zero-count prediction and !(gating)
    └── aging_indicator u_aging error-rate monitor
ahl_pkg                         shared constants and the latency_e enum
```

## The column-bypass array (`clb_cla_multiplier`, `bypass_fa`)

The array is the classic carry-save array multiplier. For W-bit operands
`a` (multiplicand) and `b` (multiplicator) it has W-1 rows of W-1 cells.
Cell (i, j), with i = 0..W-2 and j = 1..W-1, is a full adder of weight
i+j that adds

* the partial product `a[i] & b[j]`,
* the sum coming from above, which is the sum of cell (i+1, j-1), or
  `a[i+1] & b[0]` in the first row, or `a[W-1] & b[j-1]` at the left edge,
* the carry of cell (i, j-1) in the row above (0 in the first row).

`p[0] = a[0] & b[0]` and `p[j]` is the sum of cell (0, j).

The cells that add `a[i] & b[j]` for one fixed `i` form the **column of
multiplicand bit `a[i]`**. When `a[i] = 0` every partial product in that
column is zero, and so is every carry entering the column (the first cell
gets a 0, and each cell passes its zero carry on). Each cell therefore only
has to forward the sum from above. `bypass_fa` does exactly that: its three
adder inputs are ANDed with `a[i]`, which isolates the adder so it does not
switch, and a 2:1 multiplexer selects the upper sum instead of the adder's
sum. The isolated adder yields carry 0, so no carry multiplexer is needed.
The more zeros the multiplicand has, the fewer adders the signal crosses,
and the shorter the path.

The last row adds the carries of the last array row to its sums (and
`a[W-1] & b[W-1]` at the top) to form `p[2W-1:W]`. Here this is a 15-bit
adder (`cla_adder`) made of four 4-bit carry look-ahead groups (`cla4`).
Inside a group all carries are two-level functions of the generate
(`A&B`) and propagate (`A^B`) terms and the carry in, for example
`C2 = G1 | P1·G0 | P1·P0·Cin`. Between groups the carry ripples. The last
group is padded with zero bits, and the carry out of bit 14 is taken from
the first padding bit.

## Predicting the latency (`ahl`)

The hold logic sees the multiplicand as it sits in DFF1, i.e. it works in
parallel with the array. Two decision blocks count its zero bits:

| block | true when | meaning |
|---|---|---|
| first  | zeros > n     | short enough for one cycle while the circuit is fresh |
| second | zeros > n + 1 | short enough for one cycle once the circuit has aged |

A multiplexer takes the first block normally and the second once `aged` is
set. Its output (`decision`, `ahl_pkg::LAT_ONE_CYCLE` = 1) is ORed with the
inverted output of a D flip-flop and stored in that flip-flop, whose output
is `gating_n` (the !(gating) signal):

* `gating_n` was 1 and the pattern is one-cycle: it stays 1 and the next
  operands are taken on the next edge;
* `gating_n` was 1 and the pattern is two-cycle: it drops to 0, the next edge
  of the operand registers is suppressed and the array gets a second cycle;
* `gating_n` was 0: the inverted output forces it back to 1. No pattern is
  ever held longer than two cycles, and an assertion (`a_hold_once`) checks
  this.

**Why the flip-flop uses the falling edge.** The operand registers take a
pattern on a rising edge, and the hold decision for it must already block the
*next* rising edge. A flip-flop on the rising edge would act one edge too
late. Updating on the falling edge gives the zero count and comparison half a
cycle. The gating enable then changes only while the clock is low, which is
also the condition for glitch-free AND-gating of a clock. The default
threshold is n = 7: of 16 multiplicand bits, more than 7 must be zero (at
least half the columns bypassed) for one-cycle execution, and more than 8
once aged. This is a design choice to be re-tuned against real timing.

## Catching wrong predictions (`razor_ff`)

The output register has, per bit, a main flip-flop on `clk` and a shadow
register on `dclk`, a copy of the clock that is delayed by less than a cycle.
Both sample the array output `d`. If the array result arrives after the
`clk` edge but before the `dclk` edge, the main flip-flop holds a stale value
and the shadow the correct one. An XOR per bit and an OR over all bits then
raise `error`. On the next enabled edge a multiplexer in front of the main
flip-flop loads the shadow value, so the correct product appears one cycle
late. During that correcting cycle (`restoring`) the comparison is masked,
because the shadow has meanwhile sampled the next operation's result.

The short-path rule of any Razor register applies: `d` must not change
between the `clk` edge and the `dclk` edge except through a late arrival.
So the minimum delay through the operand registers and the array must
exceed the `dclk` delay. `dclk` may also simply be `clk`; the register then
never sees a late arrival, but the correction logic still works.

## Putting it together (`aclb_cla_multiplier`)

Operands are taken on a rising edge when `in_ready = gating_n & ~error` is
high. They must be held stable until such an edge. The gated clock of the
operand registers is written as a clock enable on the one clock net; the
Razor register is enabled by `gating_n | error`. So the Razor register does
not sample the half-finished product of a pattern that is being held, but it
does perform its correction. When `error` is high, the operand registers are
held for a cycle. That cycle is the re-execution: the operation taken on the
failing edge gets two cycles, while the Razor register writes back the
corrected product of the previous operation. `re_execute` equals `error`.

`product_valid` is high for one cycle per result, and products leave in issue
order. A product shown together with `error` is wrong; the corrected one
follows on the next cycle, again with `product_valid`. Latency, counted from
the edge that takes the operands to the edge after which the product is
valid:

| case | cycles |
|---|---|
| multiplicand has more than n zeros (n+1 once aged) | 1 |
| otherwise | 2 |
| operands taken on the edge where the previous result proved late | 2 |
| result found late by the Razor register | +1 |

Example with `mr = 1`, default threshold (product = `md`):

| md | zeros | cycles |
|---|---|---|
| 0x0001 | 15 | 1 |
| 0x0FE0 | 9 | 1 |
| 0xFFFF | 0 | 2 |
| 0x00FF | 8 | 1 |
| 0xFFFC | 2 | 2 |
| 0xAAAA | 8 | 1 |
| 0xFFF8 | 3 | 2 |

### Ports of the top

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; everything but the AHL flip-flop uses the rising edge |
| `dclk` | in | 1 | delayed clock for the Razor shadow register (may equal `clk`) |
| `rst` | in | 1 | synchronous reset, active high, at least one full clock cycle |
| `md`, `mr` | in | W | multiplicand, multiplicator (unsigned) |
| `in_ready` | out | 1 | operands are taken on this rising edge |
| `product` | out | 2W | product |
| `product_valid` | out | 1 | `product` holds a new or corrected result |
| `error` | out | 1 | Razor error: the shown product is wrong |
| `re_execute` | out | 1 | the operation in flight is being re-executed |
| `one_cycle` | out | 1 | hold-logic prediction for the registered operands |
| `gating_n` | out | 1 | !(gating) |
| `aged` | out | 1 | aging indicator |

### Parameters

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 16 | operand width (at least 3) |
| `ZERO_THRESH` | 7 | n of the first decision block |
| `AGING_WINDOW` | 64 | operations per aging observation window |
| `AGING_ERRORS` | 4 | Razor errors within one window that set `aged` |

## The aging indicator (`aging_indicator`)

The aging indicator sits inside the hold logic and is fed by the Razor
`error` and by the top's completed-operation strobe. Completed operations are counted in windows of `AGING_WINDOW`. When
`AGING_ERRORS` Razor errors occur within one window, `aged` is set and stays
set until reset, because aging is not reversed in operation. Both counters
restart at the end of each window, so isolated errors (for example from
noise) never accumulate into an aging verdict.

## Departures and own choices

These points are not fixed by the original description of the design and
were chosen here:

* the value of the zero-count threshold n (7) and the whole aging policy
  (window, error count, sticky flag);
* tri-state input isolation in the bypass cell modelled by AND gates;
* the joining of 4-bit CLA groups into the 15-bit last row (group carries
  ripple);
* the falling-edge hold flip-flop, and the gated clock written as a clock
  enable;
* in the Razor register: a shadow *register* instead of a level-sensitive
  latch; the shadow samples the array output directly instead of the
  multiplexer output; the comparison is masked while correcting;
* re-execution implemented as a one-cycle operand hold, plus the `in_ready`,
  `product_valid`, `one_cycle` and `aged` outputs;
* unsigned operands, synchronous active-high reset.

The delayed clock itself is not part of the RTL: it comes from the clock
tree or a delay line and enters as `dclk`.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_bypass_fa` | all 16 input combinations of the cell |
| `tb_cla4` | all 512 additions and the group generate/propagate |
| `tb_clb_cla_multiplier` | 16x16: corner cases and random operands with every zero count 0..16, and in every case that each cell of a zero column is isolated, forwards the upper sum and gives carry 0; 5x5: exhaustive |
| `tb_razor_ff` | real late arrivals (`dclk` 3 ns after `clk`): detection, correction, hold |
| `tb_ahl` | prediction and !(gating) for every zero count, fresh and aged, single hold |
| `tb_aging_indicator` | random error streams against a reference model |
| `tb_input_dff` | enable and reset |
| `tb_aclb_cla_multiplier` | top at default parameters: 700 operations, products and latencies, 7 Razor errors, aging, stricter threshold |
| `tb_waveform_sequence` | the operand sequence of the example table above |

A zero-delay simulation never produces a late result. So the top-level test
emulates a timing violation: right after an edge that stored a product, it
overwrites the main flip-flop of the Razor register with a wrong value and
leaves the shadow intact, which is the state a late arrival leaves behind.
This uses `force`/`release` on `dut.u_razor.main_q`. Real late arrivals,
with a delayed `dclk`, are exercised in `tb_razor_ff`. The timing behaviour
itself (which patterns are truly slow at a given clock, and how aging moves
that boundary) can only be judged with gate-level timing analysis of a
synthesized netlist.

To run a testbench with Verilator (from the directory that holds `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/ahl_pkg.sv \
    tb/tb_aclb_cla_multiplier.sv --top-module tb_aclb_cla_multiplier -o sim
./obj_dir/sim
```

Replace the testbench name for the others. To lint the RTL alone:
`verilator --lint-only -Wall -y rtl rtl/ahl_pkg.sv rtl/aclb_cla_multiplier.sv`.
The one remaining lint warning is an unused padding carry in `cla_adder`.

## Reported results of the original implementation

In a 90 nm standard-cell implementation of the 16-bit design, the original
work reports an effective delay of 9.29 ns for this adaptive column-bypass
multiplier with CLA last row. That compares with 16.82 ns for a plain
column-bypass multiplier, 9.98 ns for the adaptive one with a ripple last
row, and 11.13 ns for the non-adaptive one with a CLA last row. Its area was
reported at about 139 % of the plain column-bypass multiplier. These figures
are not reproduced by this RTL.
