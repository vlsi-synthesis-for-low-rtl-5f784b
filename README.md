# Clock-gated 8-bit ALU with a tri-state/NAND clock gate

A register that is clocked but loads a value it already holds still burns
dynamic power: its clock pin, its internal clock buffers and the clock net
toggle on every edge. This design is an 8-bit ALU that clocks only what has
work to do. Its arithmetic unit and its logic unit each have their own input
registers, and each group gets its own gated clock. An add or subtract request
clocks only the arithmetic registers. A logic request clocks only the logic
registers. With no request, every gated clock sits at a constant 1.

The gated clocks come from a small gate cell: a tri-state buffer switched by
the clock, followed by a NAND gate. This is the part that needs the most
explanation, so it comes first.

## The clock gate (`cg_tristate`)

```
              tri-state buffer
  en ──────────▷──────┬──── En node ───┐
                 ○    │                │ NAND ○── gclk
  clk ───────────┴────┼────────────────┘
                      (holds its charge while the buffer is off)
```

The buffer's enable is active low and is driven by the clock:

* **clk low:** the buffer conducts, and the En node follows the request `en`.
  The NAND sees clk = 0, so `gclk` = 1 whatever `en` is.
* **clk high:** the buffer goes high-impedance. The En node keeps the value it
  had when the clock rose. `gclk = ~(En & clk) = ~En`.

So the gated clock is the inverted clock for every cycle in which `en` was 1
at the rising edge. It stays high for every cycle in which `en` was 0. En
cannot change while the clock is high, so a request that changes mid-cycle
cannot cut a pulse short or add one. `tb_cg_tristate` checks this by toggling
`en` in the middle of high phases.

In a two-state RTL description, a node that floats and keeps its charge is a
latch. `cg_tristate` therefore writes the buffer as an `always_latch` that is
transparent while `clk` is low. Synthesis gives one latch and one NAND per
gate, the same structure as a conventional integrated clock-gating cell. The
latch that synthesis infers for this module is intended.

```
clk      __/‾‾\__/‾‾\__/‾‾\__/‾‾\__
en       ‾‾‾‾‾‾\___________/‾‾‾‾‾‾‾   (sampled at each rising edge)
gclk     ‾‾\__/‾‾‾‾‾‾‾‾‾‾‾‾‾‾\__/‾‾
```

**Active edge.** Registers fed by `gclk` capture on its *falling* edge. That
edge coincides with the rising edge of `clk`, so the whole ALU behaves like an
ordinary rising-edge design. The enable is sampled at that same rising edge.

## The ALU

Operation codes (`alu_pkg::alu_op_e`, 3-bit `sel`):

| sel | operation | unit       |
|-----|-----------|------------|
| 000 | A + B + cin | arithmetic |
| 001 | A − B − cin | arithmetic |
| 010 | NOT A     | logic      |
| 011 | A NAND B  | logic      |
| 100 | A NOR B   | logic      |
| 101 | A AND B   | logic      |
| 110 | A OR B    | logic      |
| 111 | A XOR B   | logic      |

* **Arithmetic unit (`arith_unit`).** One adder serves both codes. Subtraction
  adds the one's complement of B and of `cin`, which equals A − B − cin.
  `cout` is the carry out for addition and the borrow out for subtraction.
  There are no separate codes for increment and decrement. Increment is code
  000 with B = 0 and cin = 1. Decrement is code 001 with B = 0 and cin = 1.
  With cin = 0 the two codes give plain A + B and A − B.
* **Logic unit (`logic_unit`).** Plain bitwise operations. It outputs zero for
  the two arithmetic codes, which never reach it in the ALU anyway.
* **Output stage (`alu_out_stage`).** A 2-way multiplexer selects the result
  of the unit that did the last operation. An output register stores it
  together with `cout`, which is forced to 0 for logic operations.

### Register groups and their gates (`alu8_cg_top`)

| group | bits | gate enable | loads |
|---|---|---|---|
| arithmetic input registers | a, b, cin, sub (18) | `en` and sel ∈ {000, 001} | operands of an arithmetic op |
| logic input registers | a, b, op (19) | `en` and sel ∉ {000, 001} | operands of a logic op |
| control | pending, use_logic, y_valid (3) | `en` or pending or y_valid | which unit ran, whether y is due |
| output register | y, cout (9) | pending | mux output, one cycle after the op |

Each group has its own `cg_tristate`. With a steady stream of logic operations,
the arithmetic registers see no clock at all, and the reverse also holds. When
the ALU is idle, all four gated clocks stay high once the pipeline has drained
(two cycles).

### Timing

* Inputs (`en`, `a`, `b`, `cin`, `sel`) are sampled at a rising edge of `clk`,
  say edge *n*. Change them while `clk` is low, after the falling edge. The
  enable latch of the gate is open during the low phase, and the testbenches
  drive inputs at that point.
* `ya` (arithmetic result) or `yl` (logic result) settles after edge *n*. The
  other unit's output does not move.
* `y`, `cout` and `y_valid` = 1 appear after edge *n + 1*. When nothing was
  accepted, `y` and `cout` hold and `y_valid` is 0.
* Throughput: one operation per cycle, including back-to-back operations that
  switch between the units.
* `rst_n` is asynchronous and active low. It clears every register. The gate
  latches need no reset: they are transparent in every low phase.

### Ports of `alu8_cg_top`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | free-running clock; asynchronous active-low reset |
| en | in | 1 | perform the operation this cycle |
| a, b | in | 8 | operands |
| cin | in | 1 | carry in / borrow in |
| sel | in | 3 | operation code (table above) |
| ya, yl | out | 8 | arithmetic and logic unit outputs, from their registered operands |
| y, cout | out | 8, 1 | output register |
| y_valid | out | 1 | y was loaded at the last rising edge |

`WIDTH` (default 8) sets the operand width of every module. The reference
models in the testbenches assume 8 bits.

## How much clock activity the gating removes

`tb_alu8_activity` holds a = 10101000 and b = 00110111, steps `sel`
through all eight codes every cycle, and switches `en` on and off in blocks of
24 cycles. The testbench counts flip-flop clock events: the pulses of each
gate times the number of bits it clocks. Over 4800 cycles the result is 74 400
events, against 235 200 if all 49 flip-flops were clocked on every edge. That
is 31 %. Two things cause the drop: only one unit's input registers load per
operation, and nothing is clocked during idle blocks. This is a count of clock
events, not a power figure. The gates and the duplicated input registers have
a cost of their own that the count does not include.

## How far to trust it, and what differs from the source

The operation table, the 8-bit width, the block structure and the clock-gate
circuit follow the published design: input registers, an arithmetic unit, a
logic unit, an output multiplexer and an output register, with the registers
on gated clocks so that only the target unit is clocked. The gate is a
tri-state buffer switched by the clock, feeding a NAND with the clock. The
following are this design's own decisions:

* **The tri-state buffer passes the enable request.** The published schematic
  draws the buffer's data input at ground. A buffer that can only drive 0 onto
  En gives the request no path to the NAND. Here the buffer's data input is
  `en`, and the floating node holds its value. That makes the cell glitch-free.
* **The NOT, NAND, NOR, AND, OR and XOR codes all go to the logic unit.** The
  source also lists a logic unit with only four operations on a 2-bit code.
  The 3-bit code of the full ALU table was used instead, because it contains
  those four.
* **Increment and decrement are reached through B = 0 and cin = 1.** The
  source lists them as arithmetic-unit operations but gives them no code.
  Multiplication and shifts are mentioned in passing but have no code either.
  They are not built.
* **Per-unit input registers, the control register, the output-register gate,
  `y_valid`, the reset, the carry/borrow output and the two-edge latency** are
  not specified by the source. The source reports 16 flip-flops for its
  synthesized ALU, which fits input registers for A and B only. This design has
  49 flip-flop bits, because it has per-unit input registers and the output
  register the source also describes.
* **Not built:** the ungated reference ALU, and the AND-gate and XOR-gate
  clock-gating variants the source compares against. Their internals are not
  described. The source's delay, area and power results come from a 130 nm
  library and an FPGA flow, and nothing in this RTL reproduces them.

What is verified: each module against an independent reference in its own
testbench. The adder/subtractor is checked exhaustively over all 8-bit
operands, both operations and both carry values. The top level is checked
over 20 000 random cycles with idle stretches, and the testbench confirms that
each gate pulses exactly once per operation of its unit. Each testbench
fails when its module is broken in a way that matters (for example, the gate
without its held En node, or subtraction ignoring the borrow). Nothing
has been checked at gate level or for timing. In silicon, the glitch-freedom
of the gate depends on the En node holding its charge for a clock high phase.
The latch in the RTL stands in for that.

## Files

| file | content |
|---|---|
| `rtl/alu_pkg.sv` | operation codes, default width, `is_arith()` |
| `rtl/cg_tristate.sv` | tri-state/NAND clock gate |
| `rtl/arith_unit.sv` | adder/subtractor |
| `rtl/logic_unit.sv` | bitwise logic |
| `rtl/alu_out_stage.sv` | output multiplexer and register |
| `rtl/alu8_cg_top.sv` | the ALU: gates, register groups, units, output stage |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_alu8_activity.sv` | fixed-operand sweep with clock-activity count |

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own. A
watchdog ends any run that hangs.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/alu_pkg.sv tb/tb_alu8_cg_top.sv --top-module tb_alu8_cg_top
./obj_dir/Vtb_alu8_cg_top
```

Replace `tb_alu8_cg_top` with any other testbench name. Each run takes well
under a second. The top-level testbenches read the gated clocks through
hierarchical names (`dut.gclk_arith` and the like) to count pulses. If you
rename those signals, update the testbenches too.
