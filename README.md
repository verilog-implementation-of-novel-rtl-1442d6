# Error-tolerant adder (ETA)

Many signal-processing systems, such as image or audio pipelines, can accept a
sum that is almost right. In those systems, an exact adder spends delay and
power on something nobody needs: the carry chain from the least to the most
significant bit. The error-tolerant adder cuts that chain at a fixed split
point:

* The **accurate part** is the high-order bits. It adds them normally, in a
  ripple-carry adder whose carry-in is tied to 0.
* The **inaccurate part** is the low-order bits. It adds them with no carry at
  all. It scans from its top bit downward and writes `a ^ b` at each position.
  At the first position where both operand bits are 1, it stops adding and
  sets that sum bit and every bit below it to 1.

Both parts start at the split point and work at the same time. The delay is
the larger of the two parts' delays, not the delay of a full-width carry
chain.

The default build is a 40-bit adder with 20 accurate and 20 inaccurate bits.
All logic is combinational: there is no clock, no reset and no register.

## Worked example (16 bits, split 8 + 8)

```
            accurate | inaccurate
  A = 45978  10110011 | 10011010
  B = 26899  01101001 | 00010011
                        ^ first position with 1+1 (bit 4)
  sum      1 00011100 | 10011111   = 72863   (true sum 72877)
```

In the low byte, bits 7..5 are added with XOR (`100`). Bit 4 holds two ones,
so bits 4..0 become `11111`. The carry that bit 4 would have sent upward is
lost, which costs 14 (accuracy 99.98 %).

## Error behaviour

These properties follow from the rule above, and the testbenches check them:

* The result is **exact if and only if no inaccurate position holds two
  ones**. For uniformly random operands this happens with probability
  (3/4)^N_INACC.
* When the result is not exact, it is **always below** the true sum, by less
  than 2^N_INACC. The only thing lost is the one carry out of the inaccurate
  part. Forcing the lower bits to 1 recovers most of that carry's value.
* `ctl[0]` is 1 exactly when the result is approximate. The adder therefore
  flags its own inexact results at no extra cost.

Accuracy is measured as `ACC = 1 - |Rc - Re| / Rc`. A result is *acceptable*
when ACC is greater than a minimum acceptable accuracy (MAA). The acceptance
probability (AP) is the fraction of acceptable results. The table shows AP
measured on 10000 random operand pairs (`tb_eta_accuracy`):

| adder (accurate-inaccurate) | MAA 90 % | 95 % | 99 % |
|-----------------------------|----------|------|------|
| 16-bit 8-8                  | 1.000    | 1.000| 0.994|
| 16-bit 6-10                 | 0.999    | 0.997| 0.895|
| 16-bit 4-12                 | 0.987    | 0.935| 0.566|
| 16-bit 2-14                 | 0.811    | 0.615| 0.309|
| 8-bit 2-6                   | 0.806    | 0.612| 0.313|
| 32-bit 8-24                 | 1.000    | 0.999| 0.991|

The more bits go into the inaccurate part, the lower the accuracy. For a fixed
accurate:inaccurate ratio, accuracy gets better as the adder gets wider,
because most of a large sum's value lies in the exact high part. The values
agree with the published accuracy curves for this adder to within a few
hundredths.

## Structure

```
eta (WIDTH=40, N_INACC=20, GROUP=4)
├── rca              accurate part: 20 x full_adder, carry-in = 0, carry-out = sum[40]
└── inaccurate_part  20 low bits
    ├── control_block    20 CSGCs (csgc_type1 / csgc_type2) -> ctl[19:0]
    └── carry_free_adder 20 x modified_xor, bit i = ctl[i] ? 1 : a[i]^b[i]
```

`sum = {rca carry-out, rca sum[19:0], inaccurate sum[19:0]}`, 41 bits.

### Modified XOR

In normal mode (`ctl = 0`) the cell is a plain XOR. In forced mode
(`ctl = 1`) its output is 1. The cell it stands for is an XOR gate with
three extra transistors: two cut the XOR off from the supply and ground, and
one pulls the output high. Here it is modelled at logic level only.

### Control block: the part worth understanding

The control block needs `ctl[i] = OR(a[j] & b[j], j >= i)`, a prefix-OR that
runs from the top of the inaccurate part downward. A plain chain of 20 cells
would make this the critical path of the whole adder. Instead:

* Each **control signal generating cell (CSGC)** computes
  `ctl_i = (a_i & b_i) | ctl_(i+1)`. This is the **type I** cell.
* The 20 cells form **5 groups of 4**, counted from the most significant bit:
  bits 19-16, 15-12, 11-8, 7-4 and 3-0.
* The leftmost cell of every group except the first is a **type II** cell
  (bits 15, 11, 7, 3). It also ORs in `ctl_(i+4)`, the output of the previous
  group's leftmost cell. A high control signal can then jump from group to
  group along bits 19 → 15 → 11 → 7 → 3 instead of passing through every cell.
* The leftmost cell (bit 19) has its left input tied to 0.

Logically, the jump wires are redundant: `ctl_(i+4)` high already implies
`ctl_(i+1)` high. They exist only to shorten the path. The longest path is
now 10 cells, not 20: generated at bit 18, through 17 and 16 to 15, then
jumping to 11, 7 and 3, then through 2, 1 and 0. Simulation cannot observe
this difference, so the gain appears only in timing analysis of a
synthesised netlist. If synthesis flattens and re-optimises the logic, it may
remove the redundant jump wires or restructure the prefix-OR. Keep the
hierarchy if the structure matters.

If `N_INACC` is not a multiple of `GROUP`, the least significant group is the
short one.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `eta` | `WIDTH` | 40 | operand width |
| `eta` | `N_INACC` | 20 | bits in the inaccurate part; `1 <= N_INACC < WIDTH` |
| `eta`, `inaccurate_part`, `control_block` | `GROUP` | 4 | CSGCs per control group |

The defaults live in `eta_pkg`. Choosing the split is a design trade-off.
More inaccurate bits save power and shorten the accurate part, but lower the
accuracy. A suggested procedure is to pick a target MAA and AP (for example,
98 % of inputs more accurate than 95 %), start from a split that balances the
two parts' delays, and move bits from the inaccurate part to the accurate part
until the target is met. `tb_eta_accuracy` shows how to measure AP for any
split.

## Interface of `eta`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b` | in | WIDTH | unsigned operands |
| `sum` | out | WIDTH+1 | approximate sum; the top bit is the accurate part's carry-out |
| `ctl` | out | N_INACC | control vector; `ctl[0]` = 1 means the result is approximate |

## What is this implementation's own choice

* Purely combinational. No registers, clock or reset.
* Operands are unsigned, and the carry-out is kept as sum bit WIDTH.
* `ctl` is a port so that users and tests can see the mode vector.
* The full adder of the ripple-carry part is written at gate level. The
  modified XOR and the CSGCs are written as their logic functions, not as
  transistors. Power and delay figures for this adder depend on that
  transistor-level design and on the target library, and no claim about them
  is made here.
* Uneven last group when `N_INACC % GROUP != 0`.
* The split is set at elaboration time. No run-time mode switches between
  exact and approximate addition.

Not included: the image FFT/IFFT application that the adder was evaluated in.
Its size, number format and architecture are not specified, so it could not
be built without invention.

## Testbenches

All testbenches are self-checking and end with a `TB_RESULT checks=N failures=M`
line. The combinational blocks are driven with `#1` steps. Each testbench has
a time-based watchdog.

| testbench | covers |
|-----------|--------|
| `tb_modified_xor`, `tb_csgc_type1`, `tb_csgc_type2` | exhaustive truth tables |
| `tb_rca` | 20-bit adder against `a + b`, full ripple |
| `tb_carry_free_adder` | `(a ^ b) \| ctl` with directly driven `ctl` |
| `tb_control_block` | 20-bit prefix-OR across all group boundaries; a 7-bit instance (groups 4 + 3) exhaustively |
| `tb_inaccurate_part` | 20-bit carry-free part against the bit-scan reference model |
| `tb_eta` | the 40-bit adder at default parameters. Compares 22,000+ vectors with the reference model and the error bounds, and counts every mechanism: exact addition, forcing, forcing from the top bit, forcing across a group boundary, carry-out, full ripple |
| `tb_eta_accuracy` | worked example above, then AP versus MAA for 16-bit splits and AP versus width (4-32 bits, split 1:3) |

`tb/eta_ref_pkg.sv` holds the reference model: a direct bit scan with none of
the RTL's structure.

Simulating with Verilator (example for `tb_eta`; swap the top module name for
the others):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/eta_pkg.sv tb/eta_ref_pkg.sv tb/tb_eta.sv --top-module tb_eta -o sim
./obj_dir/sim
```

Lint a module on its own with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/eta_pkg.sv rtl/eta.sv`.
The only warnings are for package parameters that a given module does not
use.
