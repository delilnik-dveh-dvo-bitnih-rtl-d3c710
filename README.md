# Two-bit integer divider, as gates and as a QCA pipeline

This design divides one 2-bit unsigned number by another and returns the integer
quotient, with no remainder, plus a flag for a zero divisor. The circuit started as a
small sum-of-products gate network. It was then redrawn for quantum-dot cellular
automata (QCA). In QCA every gate is a three-input majority gate and every wire is
clocked, so the same logic becomes a four-clock pipeline. The RTL here gives both forms:

- `div2_gates`: the gate network. Combinational.
- `qca_divider`: a clocked digital model of the QCA version. It is built from majority
  gates and gives its result 4 clocks after the inputs.
- `div2_top`: both of the above, side by side, on the same input buses.

## The function

The dividend is `{a,b}` and the divisor is `{c,d}`, with `a` and `c` as the MSBs. The
quotient is `{R1,R0}`.

| dividend \ divisor | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| 0 | 0, flag 0 | 0 | 0 | 0 |
| 1 | 0, flag 0 | 1 | 0 | 0 |
| 2 | 0, flag 0 | 2 | 1 | 0 |
| 3 | 0, flag 0 | 3 | 1 | 1 |

Minimised from the 16-row truth table:

    R1 = a c' d
    R0 = a b c  +  b c' d  +  a c d'
    zero_flag = c | d

**The zero flag is active low.** It is 0 when the divisor is zero and 1 for any other
divisor. It reads best as "the divisor is usable". For a zero divisor the quotient has no
meaning, but the equations give 0 there, and the RTL shows 0.

## Gate-level divider (`div2_gates`)

Each three-literal product is built as two cascaded two-input ANDs:

- `a&c'`, then `&d`
- `a&b`, then `&c`
- `a&c`, then `&d'`
- `b&c'`, then `&d`

R0 is the OR of the three R0 products. Only `c` and `d` are inverted. The module has no
clock.

## QCA divider (`qca_divider`): the part that needs explaining

A QCA circuit has no static gates. Each gate is a majority of three cells:

- With one input held at polarization −1, the gate acts as a two-input AND.
- With one input held at +1, it acts as a two-input OR.

The divider needs 8 ANDs and 3 ORs. Two of the ORs form R0; the third forms the flag.
`maj3` is that gate. `div2_pkg::MAJ_AND` and `MAJ_OR` are its fixed inputs, written as
logic levels.

A QCA wire moves a value forward only while its clock zone is active. As a result, the
layout behaves like a pipeline, and the divider has a delay of four clocks. This model
places one register at each clock, after each gate level:

| clock | logic done in that stage | carried alongside |
|---|---|---|
| 1 | `a&c'`, `a&b`, `a&c`, `b&c'`, flag = `c\|d` | `c`, `d` |
| 2 | `R1=(a&c')&d`, `(a&b)&c`, `(a&c)&d'`, `(b&c')&d` | flag |
| 3 | `abc \| bc'd` | R1, `acd'`, flag |
| 4 | `R0 = (abc \| bc'd) \| acd'` | R1, flag |

R1 is finished after two gate levels, and the flag after one. In the QCA layout their
wires are drawn longer, so that all three outputs arrive on the same clock. The
"carried alongside" registers play that part here. If one of them is removed, R1 and R0
of the same operand pair no longer come out together. The fault copy used in testing
breaks exactly this.

Timing:

- The block accepts one operand pair per clock, every clock.
- The result of the pair sampled at edge *n* appears after edge *n+3*. The outputs
  therefore lag the inputs by `div2_pkg::QCA_LATENCY = 4` samples.
- `out_valid` is `in_valid` delayed by the same 4 clocks.
- `rst_n` is a synchronous, active-low reset that clears every stage.

The valid bit and the reset were added for this model. A QCA array has neither: its first
four outputs after start-up are simply ignored.

### How far the QCA model goes

The following come from the original QCA layout:

- the logic function;
- the gate count (8 ANDs, 3 ORs);
- the order of the R0 ORs (abc with bc'd first, then acd');
- the four-clock delay;
- the rule that all outputs leave on the same clock.

The following are choices made for this model:

- where the registers sit: one per gate level;
- inverters folded into the first level;
- valid and reset.

The layout's 397 cells, its wire crossings and its four-phase analog clock have no RTL
counterpart. They are not modelled.

## Top level (`div2_top`)

Ports: `clk`, `rst_n`, `in_valid`, `dividend[1:0]`, `divisor[1:0]`; outputs
`gate_quotient`, `gate_zero_flag` (combinational) and `qca_valid`, `qca_quotient`,
`qca_zero_flag` (4 clocks late). Once the pipeline is full, the `qca_*` outputs equal the
`gate_*` outputs of four samples earlier.

## Files

- `rtl/div2_pkg.sv`: operand/result types, majority-gate constants, `QCA_LATENCY`.
- `rtl/maj3.sv`: majority gate.
- `rtl/div2_gates.sv`: combinational divider.
- `rtl/qca_divider.sv`: four-stage majority-gate pipeline.
- `rtl/div2_top.sv`: top level.
- `tb/tb_div2_gates.sv`: all 16 operand pairs, compared with integer division.
- `tb/tb_qca_divider.sv`: a sweep plus 300 random pairs with random `in_valid`. It checks
  each output against the pair sent exactly 4 clocks earlier, and checks a reset in the
  middle of the run.
- `tb/tb_div2_top.sv`: runs at the default parameters. It replays the reference sweep
  twice (dividend 0..3 outer, divisor 0..3 inner, one pair per clock), then 200 random
  pairs, and checks both outputs every clock. It also counts how often each mechanism
  occurs: zero divisor, each product term, pipeline fill exactly 4 clocks after the first
  input, and a QCA output that differs from the gate output shown at the same time. A
  mechanism that never occurs counts as a failure.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

    verilator --binary --timing --assert -Irtl rtl/div2_pkg.sv tb/tb_div2_top.sv \
        --top-module tb_div2_top -Mdir obj_top -o sim
    ./obj_top/sim

The same command works for the other testbenches; only the file and `--top-module` change.
Each runs in well under a second.

## Changing it

The structure is fixed at 2-bit operands, as in the original circuit. A wider divider
would need new equations, not a new parameter. `QCA_LATENCY` describes the pipeline
depth; it does not set it. To change the depth, add or remove stages in `qca_divider`
and update the constant to match.
