# Self-repairing full adder and fault-tolerant array multiplier

A full adder has a property that makes it cheap to check: whenever its two
addends agree (a = b), the carry-out equals that common value and the sum
equals the carry-in; whenever they differ, the carry-out equals the carry-in
and the sum is its complement. Two short XNOR trees can therefore tell,
from the inputs and the adder's own outputs, whether the sum is wrong and
whether the carry is wrong. Since each output is a single bit, a wrong
output can be repaired by inverting it. This design builds that scheme
around a hybrid XNOR/multiplexer full adder:

```
hybrid_fa            1-bit full adder: XNOR-XNOR sum, multiplexer carry
  + functional_unit  reference term for the carry check
  = self_checking_fa adds five XNORs -> flags fs (sum) and fc (carry)
  + 2 muxes, 2 NOTs  = self_repairing_fa  (corrected sum and carry)
56 x self_repairing_fa = sr_mult8  (8 x 8 unsigned multiplier)
```

Everything is combinational. There is no clock, reset or latency. The
original cell targets a 45 nm transistor-level implementation at 1 V, where
the point of the hybrid adder is full voltage swing on both outputs at low
power. The RTL captures the logic of that circuit. It does not capture its
swing, power or transistor count.

## The hybrid full adder (`hybrid_fa`)

With `x = XNOR(a, b)`:

- `sum = XNOR(x, cin)`, which is `a ^ b ^ cin`;
- `cout = x ? a : cin`: a 2:1 multiplexer selected by `x`, with `cin` on
  input 0 and `a` on input 1.

In silicon the multiplexer is a transmission gate followed by a buffer.
The buffer restores the swing that the pass gate loses. It has no logic
function, so the RTL leaves it out.

## Detecting a fault (`self_checking_fa`, `functional_unit`)

The self-checking adder computes two flags with five XNOR gates:

| flag | gates | fault-free value | faulty value |
|------|-------|------------------|--------------|
| `fs` (sum)   | `G2 = XNOR(a, b)`, `G3 = XNOR(sum, cin)`, `fs = XNOR(G2, G3)` | 1 | 0 |
| `fc` (carry) | `G1 = XNOR(cout, cin)`, `F1` from functional unit, `fc = XNOR(G1, F1)` | 0 | 1 |

How the sum check works: a correct sum satisfies `sum ^ cin = a ^ b`. So
`G3` equals `G2` and `fs` is 1. If the sum bit is wrong, `G3` flips and
`fs` drops to 0.

How the carry check works: `F1` is the value that `cout ^ cin` should have.
From the property above it is 1 only when `a = b != cin`:

```
F1 = a & b & ~cin  |  ~a & ~b & cin
```

A correct carry gives `G1 = ~F1`, so `fc = 0`. A wrong carry flips `G1`, so
`fc = 1`. `F1` depends only on the primary inputs, never on the adder, so
the check stays independent of the adder under test.

The polarities are fixed by the intended fault-free values (`fs = 1`,
`fc = 0`). That requirement is what fixes the functional unit's function.
Computing `F1` as `a ^ b ^ cin` gives the wrong answer. For example,
a=1, b=0, cin=0 on a healthy adder would then raise `fc`.

The two flags are independent, so they also locate the fault. `fs = 0`
alone means the sum is wrong. `fc = 1` alone means the carry is wrong.
Both together mean both outputs are wrong (a double fault). The
`self_checking_fa` ports `sum` and `cout` carry the raw adder outputs,
including any injected fault.

## Repairing it (`self_repairing_fa`)

Each raw output feeds a 2:1 multiplexer twice: once directly and once
through an inverter. Its flag picks between the two:

```
sum  = fs ? raw_sum  : ~raw_sum
cout = fc ? ~raw_cout : raw_cout
```

A single wrong bit can only be wrong in one way, so inverting it always
gives the right value. The two repairs do not interact, so a fault on the
sum and a fault on the carry at the same time are both corrected. The flags
remain available as outputs for logging.

The scheme protects against faults on the adder's own outputs, and on any
internal adder node whose effect reaches those outputs. It does not protect
the checker and repair gates themselves. A fault on a flag would invert a
correct output.

## The multiplier (`sr_mult8`)

`sr_mult8` is an unsigned `WIDTH x WIDTH` array multiplier (`WIDTH = 8` by
default). Every adder in it is a `self_repairing_fa`:

- Partial products are `a & {WIDTH{b[i]}}`, from plain AND gates.
- Row `r` (0 to `WIDTH-2`) is a `WIDTH`-bit ripple-carry chain. Each cell's
  repaired carry drives the next cell's `cin`. Column 0 has `cin = 0`.
- Row 0 adds partial product 1 to partial product 0 shifted right by one
  bit. Each later row adds the next partial product to the previous row's
  result, shifted right by one bit, with that row's carry-out as the new
  top bit.
- Bit 0 of each row's sum is one product bit. The last row gives the upper
  `WIDTH` bits.

That is `(WIDTH-1)*WIDTH` = 56 cells. Cell `k = r*WIDTH + j` sits in row
`r`, column `j`. Its flags come out as `det_sum[k]` (which is `~fs`) and
`det_cout[k]` (which is `fc`). `fault_seen` is the OR of all flags. The
product is exact as long as each cell has at most one fault per output.
The partial-product AND gates are not protected.

The worst path ripples through about `2*WIDTH-1` cells.

## Fault injection

Every cell has two inputs of type `ft_pkg::fault_e`. They act on the raw
sum and carry, before the checkers:

| value | effect |
|-------|--------|
| `FLT_NONE`   | no fault |
| `FLT_STUCK0` | output stuck at 0 |
| `FLT_STUCK1` | output stuck at 1 |
| `FLT_FLIP`   | output inverted (transient upset) |

A stuck-at fault only shows, and is only flagged, when it differs from the
correct value. In `sr_mult8` these inputs are packed arrays indexed by cell
number. Tie them all to `FLT_NONE` (zero) in use. The injection hook,
the fault model and its encoding are part of this RTL only, for
verification; they are not part of the underlying circuit.

## Departures and choices

These points follow the intended function where the original description
is loose or says nothing:

- **Gate polarity.** The check equations are sometimes written with XOR.
  The check gates here are XNOR, as the gate count (five XNORs) and the
  fault-free flag values require.
- **Functional unit.** Its function (`F1` above) is derived from the
  fault-free flags. The original gives only its transistor count (14). The
  sum-of-products form is this design's own choice.
- **Inverter count.** The repair stage is described with two inverters in
  one place and four in another. The RTL has one inverted path per output.
  The extra pair is taken to drive the complementary selects of
  transmission-gate multiplexers, which has no logic meaning.
- **Multiplier structure.** The 8-bit fault-tolerant multiplier is named as
  the target application of the cell. Its structure is not given. The
  ripple-carry array, full adders in place of half adders, unsigned
  operands and unprotected partial products are all choices made here.
- **Fault model.** Single and double faults are read as one or both of a
  cell's two outputs being wrong.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it does |
|-----------|--------------|
| `tb_hybrid_fa` | all 8 input combinations against `a + b + cin` |
| `tb_functional_unit` | all 8 combinations against `carry(a+b+cin) ^ cin` |
| `tb_self_checking_fa` | 8 inputs x 16 fault pairs. Raw outputs must match the injected fault. `fs` and `fc` must flag exactly the corrupted outputs. |
| `tb_self_repairing_fa` | the same 128 cases. The repaired outputs must always be correct. Fault-free, single and double repairs are counted. |
| `tb_sr_mult8` | full 8-bit design, all 65,536 operand pairs. Three pairs in four carry random faults on about a quarter of all cell outputs. Checks the product, and that no flag is raised without a fault. Checks that every flip is flagged. Requires stuck-at-0, stuck-at-1, flip and double-in-cell repairs each to occur. |

A typical `tb_sr_mult8` run repairs roughly 900,000 faulted cell outputs,
including about 76,000 double faults within a cell. It runs in under a
second.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ft_pkg.sv \
          tb/tb_sr_mult8.sv --top-module tb_sr_mult8
./obj_dir/Vtb_sr_mult8
```

Replace `sr_mult8` with any other module name to run its testbench. The
package `rtl/ft_pkg.sv` must come first. For a different width, set
`WIDTH` on `sr_mult8` and the local `W` in `tb_sr_mult8`.

## Files

- `rtl/ft_pkg.sv`: `fault_e` and `apply_fault()`
- `rtl/hybrid_fa.sv`, `rtl/functional_unit.sv`, `rtl/self_checking_fa.sv`,
  `rtl/self_repairing_fa.sv`: the cell, bottom-up
- `rtl/sr_mult8.sv`: the multiplier (top)
- `tb/tb_*.sv`: one testbench per module
