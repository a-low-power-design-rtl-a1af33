# A low-power 32-bit integer ALU with fast and slow functional units

Many instructions in a program do not need their result right away. Nothing
may read the result for several cycles, or the instruction was moved earlier
in the schedule. The ALU here exploits that. Every arithmetic operation
exists twice:

- a **fast** unit: large and power-hungry, done in few cycles;
- a **slow** unit: small and frugal, done in more cycles.

The instruction word says which one to use. An offline scheduler sets that
choice: it picks the slow unit wherever the extra latency costs nothing.
Issue stays in order, one instruction per cycle, but instructions finish out
of order. Several of them can retire in the same cycle, and the register file
writes all of their results in that cycle.

The hardware does not check dependencies. The scheduler resolves hazards in
software. Where nothing useful can fill a gap, the scheduler does not insert
NOPs. It writes a **wait-state count** into the instruction itself, and the
decoder holds the instruction for that many cycles before issue. A NOP would
be fetched, decoded and executed, and would spend power on each step; the
embedded count costs none of that.

The RTL is written for synthesis in SystemVerilog (IEEE 1800-2017) and
simulates with Verilator 5.

## Block diagram

```
 instruction stream          +---------+   +-----------------+
 (valid/ready, 32 bit) ----> | decoder | ->| control unit    |-- issue, state
                             | + wait  |   | per-unit counters|
                             |  count  |   +---+---------+---+
                             +---------+       | iss_en  | cap / destination
                                               v         v
  +-------------------+  Reg1/Reg2   +------------------------------------+
  | register file     |------------->| operand regs -> functional units   |
  | 16 x 32 + flag    |              | grouped by latency, one COR/group  |
  | multi-write port  |<-------------| COR0 .. COR5                        |
  +-------------------+  up to 6 CORs+------------------------------------+
        ^   |
   data port (write/read one register)
```

*COR* means Common Output Register. A COR is shared by all the functional
units that have the same latency. Only one instruction issues per cycle, so
two units of one group never finish in the same cycle, and one register per
group is enough.

## Functional units and latency groups

The clock period is 5 ns. Each unit is a purely combinational block. It sits
between an operand register, loaded at issue, and its group's COR, loaded when
its latency has elapsed. In other words, it is a multicycle path of *L*
cycles.

| group | latency | units | opcodes |
|---|---|---|---|
| 0 | 1 | logic (MOV, AND, OR, XOR, NOT); fast add/sub (carry look-ahead) | 01-05, 08, 09 |
| 1 | 2 | compare (EQ, unsigned LT to the flag); fast multiplier | 18, 19, 20 |
| 2 | 3 | slow add/sub (ripple carry); shift/rotate (SHL, SHR, ROL, ROR) | 0A, 0B, 10-13 |
| 3 | 6 | slow multiplier | 21 |
| 4 | 7 | fast divider (quotient) | 28 |
| 5 | 11 | slow divider (quotient; DIVRS also the remainder) | 29, 2A |

Where the latencies come from:

- **Add, subtract, multiply and divide** use the cycle counts the original
  design measured for its synthesized fast and slow circuits at a 5 ns clock.
- **Logic, shift and compare** units were only characterised by their delay:
  about 2–2.5 ns, 11 ns and 8 ns. Here those delays are rounded up to whole
  cycles.

The circuits behind each unit:

- **Fast adder (`cla_adder`):**
  - eight 4-bit carry look-ahead blocks (`cla4`);
  - a second look-ahead level on their block generate/propagate signals.
- **Slow adder (`ripple_adder`):** a chain of full adders.
- **Subtraction (`addsub`):**
  - inverts the second operand;
  - forces the carry in.
- **Slow multiplier (`mul_slow`):**
  - forms the 32 partial products `a AND b[k]`;
  - adds them in pairs in 5 levels of adders;
  - level *l* shifts the upper operand by 2^(l-1) places.
- **Fast multiplier and fast divider:** behavioural (`*`, `/`). They are left
  to the synthesis tool.
- **Slow divider (`div_slow`):**
  - is the non-performing shift-and-subtract algorithm,
    unrolled over 32 steps;
  - at each step, subtracts the divisor shifted into position;
  - keeps the difference only when it is not negative, and sets that quotient
    bit;
  - leaves the remainder in the accumulator at the end.

  A zero difference counts as non-negative, which is needed for exact
  divisions.
- **Division by zero** gives an all-ones quotient, and the remainder equals
  the dividend.

## Instruction (MIn) format

```
 31      26 25  22 21           8 7    4 3    0
+----------+------+--------------+------+------+
|  opcode  | wait |   (unused)   | op1  | op2  |
+----------+------+--------------+------+------+
```

- `op1` is both the destination and the first source. `op2` is the second
  source.
- Compares write only the flag.
- MULF and MULS write the 64-bit product: the low word to `op1`, the high word
  to `op2`.
- DIVRS writes the quotient to `op1` and the remainder to `op2`.
- If `op1 == op2`, the low word / quotient wins.
- MOV copies `op2` to `op1`.
- NOT complements `op1`.
- `wait` is the number of cycles the instruction waits in the decoder before
  it may issue (0–15).
- Any opcode not listed in the table is illegal. It is dropped after its wait
  states, writes nothing, and raises `illegal` for one cycle.

`alu_pkg::mk_min(op, op1, op2, wait)` assembles an instruction word.

## Pipeline timing: issue, deferred write-back, retirement

This is the part to understand before writing programs for the ALU.

Take an instruction that enters the decoder in cycle *t* with wait count *d*:

| cycle | what happens |
|---|---|
| t .. t+d-1 | the control unit is in WAIT; nothing issues |
| i = t+d | issue: the unit's operand registers load the two register values read this cycle |
| i+1 .. i+L | the unit computes; its counter runs down from L |
| end of i+L | the group COR captures the result and the destination |
| i+L+1 | write-back: the register file writes the COR (the instruction retires) |

Timing rules that follow from this:

- **Forwarding.** An instruction may issue in the cycle *before* its
  producer's write-back, which is *L* cycles after the producer's issue. In
  that cycle the producer's result is being loaded into its COR. The same
  value goes straight into the consumer's operand register, so the consumer
  executes in the producer's write-back cycle. The forwarded values are
  applied in the same order as the register file applies its writes. With no
  wait states, a fetch in cycle 0 gives decode/issue in 1, execute in 2..1+L
  and write-back in 2+L, the classic F-D-E-W diagram. Two dependent 1-cycle
  instructions (`MOV r0,r3` then `ADDF r0,r3`) run back to back without a
  wait state. The register file also returns values after the writes of the
  same cycle, so reading one cycle later than necessary is always safe.
- **Back-to-back issue.** The next instruction enters the decoder in the cycle
  after the previous one issues. Without wait states, one instruction issues
  every cycle.
- **Concurrent retirement.** Long and short instructions overlap, so up to six
  CORs can retire in one cycle (`retire_count`). For example, with latencies
  1,1,2,3,3,2,1,1 issued back to back, write-backs land in cycles
  3,4,6,8,9,9,9,10, and three instructions retire together in cycle 9.
- **Busy units.** Units are not pipelined. A unit takes a new instruction in
  the cycle its previous result is being captured, so one of latency *L*
  accepts one every *L* cycles. If an instruction arrives for a unit that is
  still busy, the control unit holds it (state BUSY) until the unit frees.
  This structural interlock is the design's own addition. The scheduler
  normally avoids the case, and the interlock keeps the result correct if it
  does not.
- **Data hazards are not checked** (RAW: read-after-write; WAW:
  write-after-write). A program is correct only if its wait counts satisfy
  both rules:
  - RAW: a reader issues no earlier than the cycle before the producer's
    write-back;
  - WAW: a later writer of the same register writes back after the earlier
    one, or in the same cycle from a shorter-latency group (see below).

## Register file with multiple writes per cycle

There are 16 registers of 32 bits, a one-bit flag, and a data port for one
write and one read. They act as the interface to data memory. The write port
takes every valid COR in the same cycle. The writes are applied **one after
another** within that cycle, in this order:

1. data port;
2. COR5 down to COR0, each COR's high word before its low word.

A later write to the same register overwrites an earlier one. The longer
latency was issued earlier, so the write that survives belongs to the
instruction issued last.

`write_count` reports how many register writes happened in the cycle. It can
be up to 13. All registers reset to zero.

## Power-saving structure

- Each functional unit has its own operand registers. They load only when the
  control unit issues to that unit (`iss_en`). Idle units therefore see
  constant inputs and do not switch.
- `unit_busy` is high while a unit is computing. It is the clock-enable a
  clock-gating cell would use.
- Sharing one COR per latency group saves output registers compared with one
  register per unit.

## Top-level interface (`lp_alu`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; active-low asynchronous reset |
| `ins_valid`, `ins_word`, `ins_ready` | in/in/out | instruction stream. A word is taken when valid and ready are both high. The word must be held while `ins_ready` is low. |
| `ext_we`, `ext_waddr`, `ext_wdata` | in | data port write |
| `ext_raddr`, `ext_rdata` | in/out | data port read (sees this cycle's writes) |
| `flag` | out | flag register |
| `issue`, `cu_state` | out | an instruction issued; control state (0 idle, 1 issue/drop, 2 wait, 3 busy) |
| `retire_count`, `write_count` | out | CORs retiring / register writes this cycle |
| `unit_busy[8:0]`, `illegal`, `idle` | out | per-unit activity; illegal drop; nothing in flight |

Unit order in `unit_busy`: logic, fast add, compare, fast multiply, slow
add, shift, slow multiply, fast divide, slow divide.

## Files

- `rtl/alu_pkg.sv`: sizes, latencies, opcodes, records.
- Datapath cells: `full_adder`, `ripple_adder`, `cla4`, `cla_adder`, `addsub`,
  `logic_unit`, `shift_unit`, `compare_unit`, `mul_fast`, `mul_slow`,
  `div_fast`, `div_slow`.
- Pipeline: `decoder`, `control_unit`, `exec_units` (the units, their operand
  registers and the CORs), `reg_file`, and the top `lp_alu`.
- `tb/tb_<module>.sv`: a self-checking testbench for every module. Each prints
  `TB_RESULT checks=N failures=M`.
  - `tb_lp_alu` runs a random program of 20000 instructions, scheduled by a
    model of the offline scheduler. It checks every issue cycle, every
    retirement count, every COR value and the final registers. It also
    requires that every mechanism occurs: wait states, busy stalls, 2 and 3
    retirements in one cycle, out-of-order completion, same-cycle writes to
    one register, illegal drops, and all units used.
  - `tb_pipeline_fig22` replays the three concurrent-retirement examples
    (execution times of 1; 1–2; 1–3 cycles) and checks their retirement
    profiles.
  - `tb_pipeline_fig1` replays the slow-adder example. Its two memory
    instructions (push, pop) are replaced by register operations. The
    example draws a 4-cycle slow add; here it takes 3 cycles, so that one
    write-back lands a cycle earlier than drawn.

## Simulating

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/alu_pkg.sv tb/tb_lp_alu.sv --top-module tb_lp_alu -Mdir obj -o sim
./obj/sim
```

Replace `tb_lp_alu` with any other testbench name. The testbenches reset
everything they read, so they give the same result in a two-state simulator.

## Departures from the original design and own choices

- **Register count, instruction format, opcode set and encodings** are this
  design's own choices. The original only says that unused instruction bits
  carry the delay.
- **Logic, shift and compare latencies** are derived from their quoted
  delays, not measured.
- **MOV and a 64-bit multiply write-back** (two registers) are additions.
  - The slow multiply also returns both halves.
  - The fast divider gives only the quotient, as in the original.
  - The slow divider gives quotient and remainder.
- **Busy-unit interlock:** added.
- **Forwarding path:** the original only shows the resulting timing. The
  path from the COR input to the operand registers is this design's way of
  getting it.
- **Illegal opcodes:** dropped.
- **Behavioural fast units:** the fast multiplier and fast divider are
  behavioural models. Their real cycle timing depends on synthesis meeting
  the 2- and 7-cycle multicycle paths.
- **Power:** power measurements and transistor-level characterisation are
  outside the RTL. So are the instruction and data memories, and the offline
  scheduler and assembler.
- **Unsigned arithmetic:** compare, multiply and divide are unsigned.
- **Flag writes:** only the compare unit writes the flag. Adders produce no
  carry flag.
