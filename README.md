# 8-bit ALU with a Ladner-Fischer adder, a folded-tree multiplier and per-unit clock gating

This is a small 8-bit arithmetic and logic unit that aims at speed and low dynamic power. It has
three main ideas:

* **Addition uses a parallel-prefix adder** (Ladner-Fischer) instead of a ripple-carry adder.
  All carries are computed in a logarithmic-depth tree.
* **Multiplication uses a folded tree.** The adder tree of an array multiplier is folded onto a
  single row of half-adder/full-adder processing elements (PEs), which is reused once per
  multiplier bit. A counter and a small FSM control the reuse.
* **Every functional unit has its own gated clock.** The opcode selects one unit, and only that
  unit's clock runs. The other units do not switch at all.

It supports five operations on two 8-bit operands and gives a 16-bit result:

| opcode | operation | ALU_OUT |
|--------|-----------|---------|
| 000 | A + B | 9-bit sum, zero-extended |
| 001 | A − B | 9-bit two's-complement difference, sign-extended (1 − 2 = 0xFFFF) |
| 010 | A × B | 16-bit product |
| 011 | A AND B | zero-extended |
| 100 | A OR B | zero-extended |
| 101–111 | none | 0 |

## Top-level interface (`alu`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; every register works on its rising edge |
| `rst` | in | 1 | **active-low** synchronous reset. While `rst = 0`, the enables, the operand registers and `ALU_OUT` are cleared on each edge |
| `opcode` | in | 3 | operation, see the table above |
| `A`, `B` | in | 8 | operands |
| `ALU_OUT` | out | 16 | registered result |

The parameters are `WIDTH = 8` (operand width) and `OUT_WIDTH = 16`. The prefix adder needs
`WIDTH` to be a power of two. `OUT_WIDTH` must be at least `2*WIDTH` to hold the full product.

## Structure

```
            +---------------+  sel (one-hot)   +------------+ en_add  +----------------+
 opcode --->| alu_controller|----------------->| clock_gate |-------->| ladner_fischer |--+
 A, B ----->|  enable regs  |   x5 enables     |    x5      | en_sub  | sub_unit       |--+
 rst ------>|  operand regs |----------------->|            |-------->| folded_tree_   |--+--> ALU_OUT
            |  mul_start    |   a_q, b_q       +------------+ en_mul  |   multiplier   |  |    register
            +---------------+-------------------------------> en_and  | and_unit       |--+    (select
                                                              en_or   | or_unit        |--+     = sel, 1 cycle late)
```

* `alu_controller` samples the opcode and operands on each edge. It decodes the opcode into five
  one-hot enables (`add_sel`, `sub_sel`, `mul_sel`, `and_sel`, `or_sel`) and keeps the operands
  in registers. It also produces `mul_start`, described below.
* Five `clock_gate` cells make the gated clocks `en_add`, `en_sub`, `en_mul`, `en_and` and
  `en_or` from `clk` and the enables.
* Each functional unit computes from the registered operands. It stores its result in a register
  clocked by its own gated clock.
* The output register takes the result of the unit that was selected one cycle earlier. This
  extra cycle of delay on the select matters: a unit is clocked one edge after its enable
  rises. Without the delay, `ALU_OUT` would show that unit's old result for one cycle.

## Clock gating

The gated clock is `clk AND enable`. The enable comes from a flip-flop, so it changes just after
a rising edge, while `clk` is still high. A bare AND gate would then pass a shortened pulse,
or clip one. To prevent that, `clock_gate` holds the enable in a latch that is transparent only
while `clk` is low. This is the structure of a standard integrated clock-gating cell. The
result:

* an enable set at edge *k* opens the gate from edge *k+1* onward;
* a disabled unit sees no edge at all, so its registers and its logic keep still.

Synthesis reports this latch, once per gate. That is intentional.

The units have no reset. While `rst = 0` every enable is low, so their clocks do not run and a
reset could not reach them anyway. The ALU reads a unit only after clocking it with the current
operands, so an uninitialised unit register never reaches `ALU_OUT`. The multiplier puts itself
in order on every `start`.

For simulation, the gated clocks come from `clk` through a latch and an AND gate. Units on a
gated clock read registers that are clocked by `clk` on the same edge. This is normal for
clock-gated logic. It simulates correctly because the gated edge is computed from `clk` by
continuous logic, in the same time step and before any non-blocking update. So both domains
sample the values from before the edge. The testbenches check this in Verilator 5.

## Ladner-Fischer adder (`lf_prefix_adder`, `ladner_fischer`)

The adder has three stages:

1. **Pre-processing:** `g_i = a_i & b_i` (generate) and `p_i = a_i ^ b_i` (propagate).
2. **Carry tree:** black cells merge two (G, P) pairs as `G = G_hi | (P_hi & G_lo)` and
   `P = P_hi & P_lo`. Gray cells compute only G.
3. **Post-processing:** `s_i = p_i ^ c_(i-1)`.

The tree has the Ladner-Fischer shape:

* a row of black cells pairs every odd bit with the even bit below it;
* a Sklansky (divide-and-conquer) tree then runs over the odd bits only;
* a last row of gray cells completes each even bit from its odd neighbour.

For 8 bits that makes 4 cell levels (log2 N + 1). The Sklansky fan-out is about half that of a
full Sklansky tree. The carry-in goes into bit 0's generate term, so the same module also
serves the subtractor.

`ladner_fischer` is the add unit. It keeps the carry (255 + 158 = 413) and registers the result
on `en_add`.

## Subtractor (`sub_unit`)

The subtractor computes A + ~B + 1 on the same prefix adder. The adder's carry-out means "no
borrow", so `{~cout, diff}` is the exact 9-bit signed difference. It is sign-extended to 16 bits.

## Folded-tree multiplier (`folded_tree_multiplier`)

A tree multiplier has one row of adders for each partial product. The folded version keeps a
single row of `WIDTH` PEs: a half adder at bit 0 and full adders above it. It sends the data
through that row `WIDTH` times.

On each iteration:

1. AND gates form the partial product `A & {WIDTH{b_i}}`, where `b_i` is the current multiplier
   bit.
2. The PE row adds the partial product to the upper half of the running product.
3. The row's carry-out and sum bits, together with the lower half, shift right by one bit. The
   next multiplier bit moves into position as they do.

An FSM (idle → run → done) runs the iterations. Its iteration counter goes up by one per
iteration and is compared with the iteration count (`WIDTH`). When they match, the 16-bit
product is copied to `result` and `done` goes high.

* `start` on a gated edge loads the operands and begins a multiplication. A `start` during a
  run restarts it.
* The product is ready `WIDTH` gated edges after the start edge.
* If the clock is gated off during a multiplication, the FSM pauses and resumes where it stopped.

The controller raises `mul_start` in two cases: when opcode 010 is newly selected, and when A or
B change while 010 stays selected. While a product is being computed, `ALU_OUT` reads 0.

## Timing

Take *k* as the rising edge that samples the opcode and operands.

| operation | `ALU_OUT` valid after edge |
|-----------|----------------------------|
| add, sub, AND, OR, invalid opcode | k+2 |
| multiply | k+WIDTH+2 (k+10 at 8 bits); before that, 0 |

The three edges are:

* edge k: the enable and operand registers load;
* edge k+1: the selected unit is clocked;
* edge k+2: `ALU_OUT` loads.

For a multiply, the start edge is k+1 and the iterations take edges k+2 to k+9. `ALU_OUT` shows
the product from edge k+10 on. If the opcode and operands stay the same, `ALU_OUT` stays the
same.

## What is fixed and what is this implementation's choice

These parts follow the ALU's definition:

* the operation table;
* 8-bit operands and a 16-bit output;
* the active-low reset that zeroes the output;
* one gated clock per unit, selected by the opcode;
* the three-stage Ladner-Fischer adder;
* a multiplier that reuses half-adder/full-adder PEs under a counter and an FSM.

These are choices made here, where the definition is silent:

* **Prefix-tree shape.** The usual Ladner-Fischer form, with odd-bit pairing, a Sklansky tree on
  the odd bits and a gray-cell row. The group generate uses the correct
  `G = g1 | (p1 & g0)`.
* **Clock-gate latch.** Added to avoid clipped pulses.
* **Registers.** The operand registers, the result register in each unit and the
  one-cycle-delayed output select are all choices made here. So are the resulting latencies.
* **Subtraction.** Built on the prefix adder, with a sign-extended negative result.
* **Multiplier.** The shift-and-add schedule on one PE row, with `WIDTH` iterations. The
  start/done handshake and the restart rule are also choices made here. A multiply shows 0
  until it is done, instead of an undefined value.
* **Reset scope.** Only the controller and the output register are reset. The gated units have
  no reset.

Not modelled: power and timing. The published timing figure for this ALU is a maximum
combinational path delay of 8.066 ns. Against a ripple-carry/Dadda version it saves about
3.6 ns. On a Spartan-6 it reaches 226 MHz and draws 15 mW, of which 1 mW is dynamic. These
numbers depend on the FPGA and its tools, and this RTL does not reproduce them. The top level
has 37 signal pins (8 + 8 + 3 + 1 + 1 + 16). That matches the 37 I/Os of that FPGA
implementation.

## Files

| file | content |
|------|---------|
| `rtl/alu_pkg.sv` | opcode enum, one-hot enable struct, opcode decoder |
| `rtl/alu.sv` | top level |
| `rtl/alu_controller.sv` | enable and operand registers, multiplier start |
| `rtl/clock_gate.sv` | latch-based clock gate |
| `rtl/lf_prefix_adder.sv` | combinational Ladner-Fischer adder |
| `rtl/ladner_fischer.sv` | add unit |
| `rtl/sub_unit.sv` | subtract unit |
| `rtl/folded_tree_multiplier.sv`, `rtl/half_adder.sv`, `rtl/full_adder.sv` | multiplier and its PEs |
| `rtl/and_unit.sv`, `rtl/or_unit.sv` | logic units |
| `tb/tb_*.sv` | one self-checking testbench per module above |

## Verification

Every testbench checks itself. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

* **Add, subtract, AND and OR units:** all 65,536 operand pairs at 8 bits, plus random 16-bit
  operands. Each test also checks that the result holds while the clock is stopped.
* **Multiplier:** all 65,536 pairs. It checks each product, and that `done` comes exactly `WIDTH`
  edges after the start edge. It also covers a restart during a run, a pause of the clock
  during a run, and random 16-bit operands.
* **Clock gate:** the enable toggles at random times in both clock phases. Every nanosecond the
  test compares `gclk` with the ideal gated clock and counts the edges.
* **Controller:** a random stimulus is compared with a reference model, cycle by cycle.
* **`tb_alu`:** runs at the default parameters. It first replays published operation sequences
  with exact latency checks, for example 255+158 = 413, 200−45 = 155, 9×8 = 72, 12×5 = 60,
  15 AND 8 = 8 and 255 OR 50 = 255. It then runs 30,000 random cycles against a cycle model of
  the whole ALU. It checks that a gated clock ticks only while its unit is selected. It also
  counts each mechanism (each opcode, reset, invalid opcodes, multiply restart and multiply
  interrupted by another opcode) and fails if one never happened.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/alu_pkg.sv tb/tb_alu.sv --top-module tb_alu -Mdir obj_alu
./obj_alu/Vtb_alu
```

Replace `tb_alu` with any other testbench name. Verilator finds the modules it needs in `rtl/`
through `-I`.
