# Bit-serial SFQ ALU with a reconfigurable AND/OR gate

This is a cycle-level RTL model of a small arithmetic logic unit for
single-flux-quantum (SFQ) superconducting logic. In SFQ logic a "1" is a
picosecond voltage pulse. Almost every gate is clocked, so a gate both computes
and acts as a pipeline register. Gates cost a lot of area, so the ALU is
bit-serial and has very few of them.

The main idea is to reuse one gate. The carry of a serial adder is

    c(i+1) = c(i) ? (a | b) : (a & b)

so a gate that can be switched between AND and OR computes the next carry when
the present carry selects its mode. That one gate also gives the bitwise AND and
OR functions. Five non-destructive read-out (NDRO) gates hold the selected
function and turn parts of the datapath on or off. With them the same few gates
do six functions:

| Function | Result | Control pulses |
|----------|--------|----------------|
| ADD  | A + B | Set4, Set6 |
| SUB1 | A − B | Set2, Set4, Set6, plus one Set3 carry-in pulse |
| SUB2 | B − A | Set1, Set4, Set6, plus one Set3 carry-in pulse |
| AND  | A & B | Set4, Set5 |
| OR   | A \| B | Set3, Set4, Set5, with Set3 pulsed on every bit |
| XOR  | A ^ B | Set6 |

Operands enter LSB first, one bit per clock. Each result bit leaves three clocks
after its operand bits. The measured hardware ran at up to 30 GHz. This model is
synchronous and cycle-based, so it has no frequency of its own.

## Datapath

```
 stage 1                 stage 2                          stage 3
 A ─► XOR_a ─ xa ─┬─────► AND/OR ─ g ─► NDRO4 ─ c ─► DFF ─ cq ─┬─► NDRO5 ─┐
      ▲ NDRO1     │  ┌──►  ▲    ▲      (Set4)  │               │  (Set5)  ├─► dout
 B ─► XOR_b ─ xb ─┼──┤     │    └ clock (Set_to_AND)           ▼           │
      ▲ NDRO2     │  │   Set_to_OR = Set3 | (c & NDRO6 set)   XOR_s ─► NDRO6
                  └──┴─► XOR_p ─ p ──────────────────────────► (p^cq)   (Set6)
```

- **Stage 1: operand inversion.** Each operand passes through a clocked XOR. The
  XOR's second input is an NDRO read by the clock. While Set1 (or Set2) is
  stored, the NDRO sends a pulse every clock, so A (or B) is inverted. This is
  how subtraction forms ~A or ~B.
- **Stage 2: carry and propagate.** The AND/OR gate (`sfq_andor`) and a clocked
  XOR work on the same bit pair. The XOR gives p = a ^ b. The clock drives the
  gate's Set_to_AND input, so the gate returns to AND mode after every
  evaluation. A pulse on Set_to_OR puts it into OR mode for the next evaluation.
- **Stage 3: sum and output.** A DFF delays the gate's result by one bit. The
  carry out of bit i then meets p of bit i+1 in the third XOR, which gives the
  sum. NDRO5 passes the delayed gate result to the output (for AND and OR).
  NDRO6 passes the sum (for ADD, SUB and XOR). The two branches are merged
  onto `dout`.

`bit_serial_adder` groups the stage-2 and stage-3 gates. Its carry loop (the
NDRO between the gate and the DFF, and the feedback to Set_to_OR) is closed in
`sfq_alu`, because the ALU gates it.

## The carry loop and the function control

This is the part that needs the most care. It is also where the model departs
from a literal reading of the block diagram.

**Carry as a mode switch.** In ADD the gate starts each bit in AND mode. If bit
i produced a carry, that carry pulse goes through NDRO4 back to Set_to_OR, so
the gate is in OR mode for bit i+1. The gate output for bit i+1 is then
majority(a, b, c), the next carry. A carry is on the gate output one clock
after its bit reaches stage 2, and it acts on the next bit in the same clock.
So the loop has exactly one bit of delay and needs no extra storage.

**What NDRO4 and NDRO6 do here.** With the wiring taken literally, two
functions break:

1. *XOR.* Without Set4, the gate still computes a & b, and the DFF would fold
   it into the next bit. For A = 01100 and B = 00101 the XOR would come out as
   00001 instead of 01001. This model therefore lets the gate result reach the
   DFF only through NDRO4. Without Set4 the stage-3 XOR sees p alone.
2. *AND and OR.* These use Set4 just as ADD does. If the carry were fed back,
   AND would turn into a carry chain. So the Set_to_OR feedback is taken only
   while NDRO6 (the sum output) is set. AND and OR then output the gate result
   bit by bit.

**Set3.** Set3 goes straight into Set_to_OR and is not stored in an NDRO. The
clock resets the gate to AND after every evaluation, so one Set3 pulse gives OR
mode for one bit only. OR therefore needs a Set3 pulse for every operand bit.
Set3 acts in stage 2, so the pulse for bit k comes one clock after bit k is on
`a_i`/`b_i`.

**Carry-in for subtraction.** A − B = A + ~B + 1, and the "+1" must come from
somewhere. Give one Set3 pulse after configuration, while the inputs are still
idle (zero). With one operand inverted, the idle bits look like 0 + 1, so the
planted carry circulates (in OR mode, 0|1 = 1) until the first real bit. The
idle result bits are 0, and the word that follows is exactly A − B in two's
complement. A negative difference borrows from whatever comes next. Give every
subtraction word its own carry-in: reconfigure, or pulse Set3 again while the
inputs are idle.

**Reconfiguration.** Pulse `ndro_reset_i` to clear all five NDROs. Wait about
four clocks, so that a carry still circulating from a subtraction drains out.
Then apply the new Set pulses. A set pulse takes effect one clock later. An
inversion (Set1, Set2) reaches stage 2 two clocks after its pulse. That is why
the subtraction carry-in pulse comes at least two clocks after Set1 or Set2.

`sfq_alu` asserts the reconfiguration order: a Set pulse other than Set3 in the
same cycle as `ndro_reset_i` is reported as an error.

**Word boundaries.** The datapath has no word length. Operands are
zero-extended. The carry out of an addition appears as the result bit after the
MSB, so consecutive addition words need one idle bit between them.

## Modules

| File | Content |
|------|---------|
| `rtl/sfq_alu_pkg.sv` | function enum, `set_mask_t` (bit k = Set k), the control table, `PIPE_STAGES = 3`, driver helpers `set3_every_bit`, `set3_carry_in` |
| `rtl/sfq_alu.sv` | top: three-stage ALU |
| `rtl/bit_serial_adder.sv` | AND/OR gate, propagate XOR, carry DFF, sum XOR |
| `rtl/sfq_andor.sv` | reconfigurable AND/OR gate |
| `rtl/sfq_ndro.sv` | NDRO gate: set, reset, read |
| `rtl/sfq_xor.sv`, `rtl/sfq_dff.sv` | clocked XOR, delay flip-flop |

Top-level ports of `sfq_alu`: `clk`, `rst_n` (synchronous, active low),
`a_i`, `b_i`, `set_i[6:1]`, `ndro_reset_i`, `dout_o`. All pulses are one cycle
high.

## Modelling conventions

- An SFQ pulse is a signal that is high for one clock cycle. Every clocked SFQ
  gate (XOR, AND/OR, DFF) is a flip-flop with one clock of latency.
- An NDRO whose read input is a data pulse passes that pulse in the same cycle.
  Its stored bit changes one clock after a set or reset pulse. A set wins over
  a reset in the same cycle.
- The gate's Set_to_OR acts on the evaluation in the same clock. Set_to_AND
  acts after it.
- `rst_n` exists only so that simulation starts in a known state; SFQ gates
  have no reset. The clock output of the original circuit is only the input
  clock passed on, so it is not a port.
- Not modelled: the Josephson-junction circuits, their dc bias (2.5 mV), the
  shielded layout of the AND/OR cell, bias margins, and the on-chip
  high-speed clock generator used in testing.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_sfq_alu`: the end-to-end test. It runs both measured examples, then 240
  random configurations over all six functions with 1–24-bit operands. Every
  result bit is checked in the exact cycle it is due, against plain integer
  arithmetic. It also counts operand inversions, carry feedbacks, Set3 OR
  modes, NDRO4 carry passes, NDRO5/NDRO6 outputs and reconfigurations, and
  fails if any of them never happened. It runs at the default (and only) size.
- `tb_sfq_alu_measured`: replays the measured sequences pulse by pulse. It
  checks that the outputs are 10001 for ADD and 01001 for XOR and that `dout`
  has no stray pulses.
- `tb_bit_serial_adder`, `tb_sfq_andor`, `tb_sfq_ndro`, `tb_sfq_xor`,
  `tb_sfq_dff`: unit tests against reference models.

To simulate with Verilator (list the package first):

```
verilator --binary --timing --assert rtl/sfq_alu_pkg.sv rtl/*.sv tb/tb_sfq_alu.sv \
          --top-module tb_sfq_alu -Mdir obj_alu && ./obj_alu/Vtb_sfq_alu
```

## How far to trust it

The block structure, the three-stage timing, the function table and the two
measured results are matched. The gate-level wiring is not: the NDRO4 gating,
the NDRO6 condition on the feedback, and the timing of the Set3 pulses are
choices made so that all six functions give their stated results. A literal
wiring of the block diagram fails XOR on the measured operands and turns AND
into a carry chain. Subtraction depends on the Set3 carry-in pulse. Without it
the ALU computes A + ~B = A − B − 1.
