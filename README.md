# Reconfigurable integer / floating-point ALU (R-ALU)

A processor usually has separate integer ALUs and floating-point adders, and
whichever kind the instruction stream does not need at the moment stands
idle. The R-ALU is a single functional unit that can serve either way. It
is built as a double-precision floating-point adder whose hardware is
stretched so that the same parts also do integer work:

* the significand adder is widened from 54 to 64 bits, so it is also the
  64-bit integer adder;
* the alignment right-shifter becomes a 64-bit barrel shifter, so it also
  does the integer shifts SLL and SRL;
* a small logic unit (AND, OR, XOR, NOR) is added beside the datapath;
* four **programmable switches** (RS1a, RS1b, RS2a, RS2b) reroute the
  operands and controls between the two uses.

Integer operations complete in **one cycle**. FP-ADD (IEEE 754 binary64) runs
in a **three-stage pipeline** and can issue every cycle. The unit has two
result ports: one for the integer register file, one for the floating-point
register file.

Each switch holds its setting in a one-bit memory, so changing mode takes
time. This cost is the heart of the design. The RTL here contains the
datapath and a controller that reconfigures the switches only in cycles when
the hardware behind them is idle. A mode change therefore costs between 0
and 2 cycles, depending on the instructions around it.

## Files

| file | contents |
|---|---|
| `rtl/ralu_pkg.sv` | opcodes, instruction classes, `instr_t`, `ctrl_t`, widths |
| `rtl/ralu_top.sv` | top: instruction queue + controller + datapath |
| `rtl/ralu_reconfig_ctrl.sv` | switch reconfiguration and issue control |
| `rtl/ralu_datapath.sv` | the R-ALU itself (three stages, switches, output ports) |
| `rtl/ralu_switch.sv` | one programmable switch with its configuration bit |
| `rtl/ralu_swap.sv` | exponent subtractors, alignment distance, operand swap |
| `rtl/ralu_barrel_shifter.sv` | 64-bit left/right shifter with sticky output |
| `rtl/ralu_adder.sv` | 64-bit compound adder (sum and sum+1) |
| `rtl/ralu_lop.sv` | leading-one predictor beside the adder |
| `rtl/ralu_sign.sv` | sign of the FP sum |
| `rtl/ralu_normalize.sv` | stage 3: select, normalise, round, pack |
| `rtl/ralu_logic_unit.sv` | AND/OR/XOR/NOR |
| `rtl/ralu_decoder.sv` | opcode to datapath controls |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/ralu_tb_pkg.sv` | reference models used by the testbenches |

## The datapath

```
            A ──► A1 ─┬──────────────┐             B ──► B1
                      │  exponents   │                    │
                      ▼              ▼                    │
        A-B / B-A ─► mux ─► shift distance ─┐             │
              │                       RS1b ◄┴─ instruction shamt/dir
              └─► RS1a (or 0) ─► SWAP ─┬─► greater ─► A2 ──► RS2a (or A1) ─┐
                                       └─► lesser ─► BARREL ─► B2 ─► RS2b (or B1) ─┤
  stage 1                                             │                            │
 ─────────────────────────────────────────────────────┼────────── integer port ◄───┤
  stage 2                                             ▼                  ADD/SUB: sum, sum+1, CY
                                                                         LOP (predicted lz)
 ─────────────────────────────────────────────────────────────────────────────────────
  stage 3      sel 1comp ─► SHIFT LEFT ─► round ─► pack ─► FP port
               exponent − shift, SIGN
```

**Stage 1** holds the operands in A1/B1.

* FP mode: two subtractors compare the exponents, and the swap unit sends
  the operand with the larger exponent toward A2. The other operand goes
  through the barrel shifter, which aligns it by the exponent difference.
* Integer mode: RS1a ties the swap control to 0, so B1 goes straight into
  the barrel shifter. RS1b gives the shifter the shift amount and direction
  from the instruction instead of the exponent difference. The shifter's
  output is the SLL/SRL result.
* The logic unit also reads A1/B1 and produces its result in this cycle.

**Stage 2** holds the adder.

* FP mode: RS2a/RS2b feed the adder from the A2/B2 pipeline registers.
* Integer mode: RS2a/RS2b feed the adder directly from A1/B1. This is why
  an integer ADD/SUB completes in the same cycle as a shift or logic
  operation: one cycle after issue.

The adder computes `a + b'` and `a + b' + 1` together. ADD uses the first
result. SUB uses the second result with b inverted. In FP mode the leading-one
predictor (LOP) works from the same two operands in parallel with the adder,
so the normalisation distance is ready when the sum is.

For an FP effective subtraction the pair gives the magnitude |A − B| without
a second adder:

* if the carry CY of `sum+1` is set, the magnitude is `sum+1` (= A − B);
* otherwise it is the complement of `sum` (= B − A), and the result sign
  flips.

**Stage 3** does the following:

* selects the magnitude ("sel 1comp");
* normalises it with a second shifter, using the leading-zero count
  predicted in stage 2, then fixes the prediction by one position when it
  was one short (or shifts right once when an addition carried into bit 63);
* subtracts that shift from the larger exponent;
* rounds and packs the result.

### Significand layout and rounding

Inside the 64-bit datapath a binary64 significand sits at bits 62..10:

| bits | use |
|---|---|
| 63 | carry of an addition |
| 62 | hidden one |
| 61..10 | fraction |
| 9..1 | guard bits |
| 0 | sticky bit |

The alignment shifter folds every bit it shifts out into bit 0. When the
operands are more than 63 exponents apart, the distance saturates at 63 and
the whole smaller operand ends up in the sticky bit.

Rounding is round to nearest, ties to even. Bit 9 is the round bit and bits
8..0 act as sticky. The rounding increment is added to the packed
exponent-and-fraction word, so an overflow of the significand carries into
the exponent, and the largest finite number rounds up to infinity.

Special values:

* Subnormal inputs and outputs are handled: gradual underflow, with a
  stored exponent field of 0 counting as exponent 1.
* Any NaN operand, and inf + (−inf), give the quiet NaN
  `0x7FF8000000000000`.
* An exact zero from a subtraction is +0. Two zeros of the same sign keep
  that sign.

Only round to nearest is provided. There is no FP subtraction opcode; negate
the sign bit of B instead.

## Reconfiguration: when the unit may switch, and what it costs

The four switches form two groups:

* stage 1: RS1a and RS1b;
* stage 2: RS2a and RS2b.

Each group is rewritten in a cycle of its own, and only in a cycle when the
hardware it steers is idle. Reconfiguration is pipelined: stage 2 can only
change after stage 1 has. The timing of writing a group:

* it is written at the clock edge ending its reconfiguration cycle;
* the new setting takes effect from the next cycle.

Each instruction class occupies this hardware:

| class | operations | occupies | needs |
|---|---|---|---|
| LOG | AND OR XOR NOR | logic unit only | nothing; may issue in either mode |
| SHIFT | SLL SRL | barrel shifter, issue cycle | stage 1 in integer mode |
| ADD | ADD SUB | adder, issue cycle | stage 2 in integer mode |
| FP-ADD | FP add | shifter in issue cycle, adder in the next | stage 1 FP, stage 2 FP by the next cycle |

These rules produce the following costs. Instruction i is the last
instruction before the switch.

| i | i+1 | i+2 | extra cycles |
|---|---|---|---|
| LOG or ADD | FP-ADD | FP-ADD | 0 |
| SHIFT | FP-ADD | FP-ADD | 1 |
| FP-ADD | LOG | not ADD | 0 |
| FP-ADD | LOG | ADD | 1 |
| FP-ADD | SHIFT | any integer | 1 |
| FP-ADD | ADD | any integer | 2 |

For example, the last row plays out like this:

* cycle i: the FP-ADD is in the shifter.
* cycle i+1: the FP-ADD is in the adder. Stage 1 can be rewritten, but
  stage 2 cannot.
* cycle i+2: stage 2 is rewritten.
* cycle i+3: the integer ADD can run.

If most integer work is ADD/SUB, a round trip (0 + 2 cycles) averages one
cycle per switch.

The controller (`ralu_reconfig_ctrl`) has no fixed policy. It switches on
demand, looking one instruction ahead.

* Stage 1 is steered toward the mode of the first instruction, among the
  head and the one behind it, that needs a mode.
* A LOG needs no mode.
* An ADD that can issue right now does not need stage 1. So, in ADD then
  FP-ADD, stage 1 is rewritten under the ADD.
* Stage 2 follows as soon as the adder is free.

The look-ahead is what makes the zero-cost cases zero. Two examples:

* In LOG then FP-ADD, stage 1 is rewritten while the LOG executes.
* In FP-ADD, LOG, SHIFT, the integer configuration is set up under the LOG.

In `ralu_top` the instruction behind the head is either the second queue
entry or, when the queue holds only the head, the instruction waiting on
the input. Instructions usually arrive one per cycle, so the queue usually
holds only the head.

The controller makes its decisions in the cycle an instruction waits at the
head of the queue. `issue` loads the instruction into A1/B1 at the next
edge. The switch writes (`rs1_load`, `rs2_load`) are registered, so they
reach the datapath one cycle later. That is exactly the cycle the
neighbouring instructions see as the reconfiguration cycle. Assertions in
the datapath check that no instruction ever meets a wrongly set or busy
stage.

## Interface of `ralu_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (both stages reset to integer mode) |
| `in_valid` / `in_ready` | in / out | 1 | instruction handshake; transfer when both are high at a rising edge |
| `in_instr` | in | `instr_t` | `op` (`op_e`), `shamt` (6 bits, for SLL/SRL), `a`, `b` (64 bits) |
| `int_valid`, `int_result` | out | 1, 64 | integer port: one cycle after issue, in issue order |
| `fp_valid`, `fp_result` | out | 1, 64 | FP port: three cycles after issue, in issue order |
| `stall` | out | 1 | head instruction waits for a reconfiguration |
| `recfg1`, `recfg2` | out | 1 | stage-1 / stage-2 switches being rewritten this cycle |
| `rs1_mode`, `rs2_mode` | out | 1 | switch settings in force (0 integer, 1 FP) |

Operand conventions:

* SLL and SRL shift **b** by `shamt`.
* SUB computes a − b.
* The shifts are logical. There is no arithmetic right shift.

Results on the two ports can overtake each other. For example, a logic
operation issued right after an FP-ADD delivers its result two cycles
before the FP-ADD's result. Within each port, results come in issue order.

## Verification

Every module has a self-checking testbench. Each one ends with a line
`TB_RESULT checks=N failures=M`.

* The leaf testbenches compare against SystemVerilog's own operators.
* `tb_ralu_lop` aligns random significand pairs, with near and exact
  cancellation. The predicted count must be the true leading-zero count of
  the result or one less; about 40% of cases come out one short.
* `tb_ralu_normalize` builds the stage-3 inputs from random operand pairs in
  plain arithmetic. It compares the packed result with the simulator's
  double-precision addition. The pairs include cancellation, ties,
  subnormals, overflow and infinities. The count handed in is at random
  the exact one or one short, as the predictor delivers it.
* `tb_ralu_datapath` drives the switches itself. It checks integer results
  at one cycle, back-to-back FP-ADDs at three cycles, and logic operations
  issued in FP mode.
* `tb_ralu_reconfig_ctrl` checks every row of the cost table, plus the
  per-cycle issue rules.
* `tb_ralu_top` is the end-to-end test, run at the design's only size. It
  does three things:
  * replays the cost table with real operands, measuring issue cycles from
    when results appear;
  * measures the ADD/FP-ADD alternation, which gives 40 cycles over 40
    switches;
  * runs about 6,000 random, clustered instructions with input gaps.

  It counts stalls, stage-1 and stage-2 rewrites in both directions,
  overtaking results, back-pressure, subnormal, infinite and NaN sums, and
  negative differences. A mechanism that never happens is a failure.

To simulate, for example the top:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
  rtl/ralu_pkg.sv tb/ralu_tb_pkg.sv tb/tb_ralu_top.sv --top-module tb_ralu_top
./obj_dir/Vtb_ralu_top
```

## Where this RTL goes beyond or departs from the architecture it follows

* **Rounding and special values are this design's.** The original
  architecture omits rounding. Here the guard and sticky bits use the 64-bit
  width: the significand sits at bits 62..10, not in the 54 low bits.
* **Leading-one prediction.** The predictor sits beside the adder, as in the
  original, and looks at the adder operands (B already inverted for a
  subtraction). The original does not give its equations. This one uses a
  one-sided indicator string: the count is exact or one short, never too
  large. Stage 3 then makes one extra one-position left shift when bit 62 is
  still clear. The test bench checks both the error bound and the rounded
  result.
* **Adder and shifter structure.** The compound adder is written as two
  carry chains over one generate/propagate network. The barrel shifter has
  six logarithmic stages. Both are left to synthesis for speed.
* **Switches.** Each switch is a multiplexer plus a configuration
  flip-flop. The pass-transistor circuit and the resized drivers, which make
  a switch cost no delay, have no logic function and are not modelled.
* **Switching policy.** The on-demand policy with one instruction of
  look-ahead, the two-entry queue in `ralu_top` and the reset state are
  choices of this implementation. The architecture leaves the switching
  strategy open, apart from the general idea of following whichever kind of
  operation dominates the stream. Because this unit is the only one that
  executes either kind, it switches whenever the next instruction needs the
  other mode, and the look-ahead hides the cost wherever the cost table
  allows. The register files and the instruction source around the unit
  are outside it.
* **Result buses.** Three-state drivers onto the result buses are
  multiplexers here.
* **Sign and pipeline flags.** The sign logic also uses the swap flag. The
  pipeline carries swap, effective-subtraction and special-value flags.
* **Added operation.** NOR is the one logic operation added beyond AND, OR
  and XOR.
