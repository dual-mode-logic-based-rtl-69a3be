# Double-precision carry-save multiplier for dual-mode logic

This is an unsigned multiplier that computes either one 16x16-bit product or two
independent 8x8-bit products per clock, at the same clock rate in both cases. It
is meant to be built in *dual-mode logic* (DML). A DML gate is a static CMOS
gate with one extra clocked pre-charge (or pre-discharge) transistor. With that
transistor held off, the gate works statically: it is slow but uses little
energy. With its clock toggling, the gate works like a dynamic gate: it is fast
but costs clock energy. The mode can be changed from one cycle to the next.

Precision and mode are controlled separately:

- **`prec`** picks the arithmetic: one 16x16 product, or two 8x8 products.
- **`mode`** picks static or dynamic operation of the DML gates.

The clock period is set by the 16x16 case. The intended operating point is the
*mixed* one: run 16x16 operations in dynamic mode, which meets the period, and
8x8 operations in static mode, which saves energy.

The RTL here describes that architecture at logic level. It is synthesizable,
and it simulates exactly, bit for bit. Two things are not modelled: the
transistor-level behaviour of the gates (pre-charge, evaluation, sizing) and the
delays of the clock buffer chain, which is a behavioural model. See
*What the model does not capture*.

## Interface and behaviour

| port | dir | width | meaning |
|---|---|---|---|
| `clock` | in | 1 | external clock; every register loads on its **falling** edge |
| `rst_n` | in | 1 | asynchronous active-low clear of all registers |
| `mode` | in | 1 | 0 = static DML, 1 = dynamic DML |
| `prec` | in | 1 | 0 = one 16x16 product, 1 = two 8x8 products |
| `a`, `b` | in | 16 | multiplicand, multiplier |
| `o` | out | 32 | product |
| `dml_clk`, `dml_clk_n` | out | 1 | DML clock for Type-A gates and its complement for Type-B gates |
| `clk_row` | out | 16 | the 16 delayed row clocks of the partial-product array |

Results:

- `prec = 0`: `o = a * b`
- `prec = 1`: `o[15:0] = a[7:0] * b[7:0]` and `o[31:16] = a[15:8] * b[15:8]`

The DML clock is held at 1 when `mode = 0`, so every pre-charge transistor stays
off. When `mode = 1`, the DML clock equals `clock`: gates pre-charge while
`clock` is low and evaluate while it is high.

## Datapath

```
 a ─► [A reg 16] ─┐                     ┌─► [S reg 31] ─┐
                  ├─► csa_pp_array ─────┤               ├─► csk_adder ─► [O reg 32] ─► o
 b ─► [B reg 16] ─┘        ▲            └─► [C reg 31] ─┘       ▲
                          prec ─────────────────────────────────┘
 clock, mode ─► mode_ctrl ─► dml_clk ─► clk_buffer_tree ─► clk_row[15:0]
                         └─► clock_n (clock of all five registers)
```

The pipeline has two stages. The first stage generates and reduces the partial
products into carry-save form: a 31-bit sum vector `S` and a 31-bit carry vector
`C`, where bit k of each has weight 2^k. The second stage adds `S + C` in a
carry-skip adder.

## The partial-product array (`csa_pp_array`)

This is the part that takes the most care to follow. Cell (i, j) forms
`A_j & B_i` and sits at weight i+j. The array is a parallelogram of 256 cells:

- **AND gates only** in row 0 and in column 15 (the A MSB edge). These
  products have nothing yet to be added to.
- **Half adders (`mha`)** fill row 1 (columns 0..14), because row 0 produced no
  carries. In every later row there is one more half adder, at column 0.
- **Full adders (`mfa`)** fill rows 2..15, columns 1..14.
- **Wiring.** Cell (i, j) adds its product, the sum from cell (i-1, j+1) and the
  carry from cell (i-1, j). All three have weight i+j.
- **Right-hand edge.** Column 0 of each row is final. Its sum becomes `S[i]`.
  Its carry does not go down to the next row: it leaves the array as `C[i+1]`.
  That is why column 0 needs only a half adder.
- **Bottom edge.** The last row gives `S[30:15]` and `C[30:16]`. `C[1:0]` are
  always 0.

There are 31 plain AND cells, 29 half adders and 196 full adders, and each
contains its own partial-product AND gate.

**Precision gating.** Cells in two quadrants build their AND gate as
NAND-then-NOR with `prec`, so `prec = 1` forces their product to 0. The two
quadrants are upper-left (A bits 15..8 with B bits 7..0) and lower-right
(A bits 7..0 with B bits 15..8). All other cells use NAND-then-inverter and
ignore `prec`. With the two cross quadrants zeroed, the array holds
`a_lo*b_lo + 2^16 * a_hi*b_hi`.

No carry leaks from the low product into bit 16. The bits at weights 0..15 only
ever hold part of `a_lo*b_lo`, which is below 2^16. A carry out of weight 15
would make that part negative, so none can occur. As a result, `S + C` is
exactly the two 16-bit products side by side.

## The final adder (`csk_adder`, `rca4`, `carry_gen`, `skip_logic`)

The final adder is eight 4-bit blocks. Each block has:

- a ripple-carry adder (`rca4`), which also outputs its propagate bits
  `P = S ^ C`;
- skip logic (`skip_logic`): `SEL = &P`;
- a 2:1 multiplexer that passes the block's carry-in instead of its ripple
  carry when `SEL` is high.

After block 3 (bits 12..15), one more multiplexer, selected by `~prec`, passes
that block's carry-out when `prec = 0` and a constant 0 when `prec = 1`. This
splits the adder into two 16-bit adders. `S[31]` and `C[31]` do not exist, so
`o[31]` is the last carry.

Inside `rca4`, the carry generators alternate polarity to avoid an inverter in
the carry path:

- **Bits 0 and 2** feed the true `S`, `C` and carry into an inverting majority
  gate, the Type-A CG. It returns the complemented carry.
- **Bits 1 and 3** first invert their `S` and `C`, then use the same inverting
  majority, the Type-B CG. Majority is self-dual, so from complemented inputs it
  returns the true carry.
- **Sum restore.** The odd bits receive the complemented carry and re-invert it
  before their sum XOR.

`carry_gen` is therefore a single module, `~maj(s, c, cin)`, used in both roles.

## Timing: latency and the `prec` rule

**Latency.** Operands present at falling edge t appear as a product on `o` after
falling edge t+2. A new pair can be issued every cycle.

**`prec` timing.** `prec` is not registered with the operands: it drives the
array and the final adder directly. So `prec` for the pair captured at edge t
must be driven between edges t and t+1 (the array's cycle) and held until edge
t+2 (the adder's cycle). In a stream, the array works on pair k while the adder
works on pair k-1, and both see the same `prec`. That gives two cases:

- **8x8 followed by 16x16 is safe.** The adder sees `prec = 0` for an 8x8 pair,
  but an 8x8 pair never carries across bit 16, so the result is the same.
- **16x16 followed by 8x8 needs one bubble.** Issue a zero operand pair between
  them. Its product is 0 in either precision.

Both testbenches follow this rule. The concurrent assertion `a_prec_rule` in
the top catches a breach in simulation. A carry from bit 15 into bit 16 in the
final adder while `prec` is high can only come from a 16x16 product that is
being split. To remove the rule, pipeline `prec` alongside the
operands. That change is small, but it departs from the architecture described
here.

**Mode switching.** Change `mode` while `clock` is high, so `dml_clk` does not
get a short pulse. For the mixed operating point, drive `mode = ~prec` for each
operation.

## Dual-mode clocking (`mode_ctrl`, `clk_buffer_tree`)

`mode_ctrl` is a NAND of `mode` with the inverted clock:

- `dml_clk = ~(mode & ~clock)`
- `dml_clk_n = ~dml_clk`
- `clock_n = ~clock` clocks the registers.

Which phase of `clock` drives evaluation is this design's choice. Evaluating
while `clock` is high means the falling-edge registers capture at the end of
evaluation.

`clk_buffer_tree` is a chain of 16 buffers. Row clock i is `dml_clk` delayed by
i+1 buffer delays. Row i of a silicon array uses `clk_row[i-1]` and `clk_row[i]`,
so each row evaluates only after the row above it can be valid. The model is
behavioural: each buffer is a continuous assignment with delay `BUF_DELAY`
(default 1 time unit, a placeholder). Synthesis reduces it to wires.

## What the model does not capture

- **Transistor-level behaviour.** Pre-charge and evaluation, the smaller
  self-restore networks, and footed versus footless gates are not modelled.
  Only the logic function of each gate is. A DML gate has the same logic
  function in both modes, so the datapath ignores the DML clocks. They are
  produced and brought out as ports for a physical implementation.
- **The `mode` input has no effect on `o`.** Only `dml_clk`, `dml_clk_n` and
  `clk_row` change with it. Speed and energy differences between modes do not
  exist at this level.
- **Timing values.** Delays, clock frequency and energy figures cannot come
  from this RTL. The buffer delay is a placeholder.

## Choices made where the architecture leaves freedom

- Unsigned operands.
- The asynchronous reset `rst_n`.
- Registers load on the falling edge of `clock` (the rising edge of its
  inverse).
- Skip condition `SEL = &P`, with the multiplexer passing the carry-in when
  `SEL = 1`.
- Carry-in of the final adder is 0, and its last carry-out is dropped.
- Row clock 0 is one buffer delay after `dml_clk`.

## Files

`rtl/` (one module or package per file):

- `dml_pkg.sv`: widths (N = 16, CS_W = 31, P_W = 32), `prec_e` / `mode_e`
  encodings, and `ref_product()`, a reference model used by the testbenches.
- `dml_multiplier.sv`: the top.
- `mode_ctrl.sv`, `clk_buffer_tree.sv` (behavioural), `pipe_reg.sv`.
- `csa_pp_array.sv`, with its cells `pp_and.sv`, `mha.sv`, `mfa.sv`.
- `csk_adder.sv`, with `rca4.sv`, `carry_gen.sv`, `skip_logic.sv`.

`tb/`: `tb_<module>.sv` for each module, plus `tb_mix_workload.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

- The small cells (`pp_and`, `mha`, `mfa`, `carry_gen`, `rca4`, `skip_logic`)
  are checked exhaustively.
- The array and the final adder are checked on corner and random vectors in
  both precisions.
- `tb_dml_multiplier` runs the full-size top end to end. It issues about 3000
  operations with random precision and `mode` toggling. It checks every product,
  the two-cycle latency, that `o` changes only at falling edges, and the DML
  clock in both modes. It also fails if any of these never happened: precision
  switches either way, mode switches either way, bubbles, carries across bit 16,
  and skipped adder blocks.
- `tb_mix_workload` runs 500 random 16x16 operations in dynamic mode and 500
  random 8x8 operations in static mode, shuffled together.

## Simulating

With Verilator 5 (two-state; the testbenches reset everything they read):

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl rtl/dml_pkg.sv tb/tb_dml_multiplier.sv \
  --top-module tb_dml_multiplier -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. The package must be listed first.
Each testbench finishes in well under a second. Lint the RTL with
`verilator --lint-only -Wall -Irtl rtl/dml_pkg.sv rtl/<module>.sv`. The
remaining warnings are:

- unused package constants;
- the unused `prec` pin of ungated AND cells;
- the dropped final carry of the adder;
- `rst_n` being used both as the registers' asynchronous clear and as the
  assertion's disable condition.

## Not included

- **The NAND/NOR test chain.** This was a 10-level, 11-stage chain of DML gates
  used to characterise static, dynamic and mixed operation. It is a measurement
  vehicle, and what drives its second gate inputs is not defined.
- **The static CMOS reference multiplier.** It has the same logic function as
  this one.
