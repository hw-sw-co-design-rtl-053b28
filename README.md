# Low-power ALU with duplicated fast and slow functional units

Fast arithmetic circuits burn much more energy per operation than slow ones of
the same function: a parallel-prefix adder switches far more nodes than a
ripple-carry adder. Yet most instructions in real code do not need their result
at once, because the instruction that reads it comes several slots later.
This ALU gives each arithmetic function two units, a fast one and a slow,
low-energy one. Each unit has an opcode of its own. Software, not hardware,
picks the unit: an offline pass over the assembly code rewrites a fast opcode
into the slow one wherever the longer latency does not delay any later
instruction. The hardware only has to let units of different latency run side
by side and finish out of order.

Per-operation figures for the two kinds of unit in a 0.35 µm process, as
reported for the original design. They are not measured on this RTL:

| function | fast: energy / data arrival | slow: energy / data arrival |
|----------|-----------------------------|-----------------------------|
| add      | 56 pJ / 3.77 ns             | 23 pJ / 12.00 ns            |
| subtract | 57 pJ / 4.13 ns             | 24 pJ / 12.51 ns            |
| multiply | 703 pJ / 8.17 ns            | 394 pJ / 27.11 ns           |
| divide   | 1218 pJ / 30.26 ns          | 1049 pJ / 54.68 ns          |

## Pipeline

```
 fetch port ──► issue stage ─────────────────────► FU groups ─────────► register file
 (instr,        decoder                            group 0: fast +, fast -, logic  ─► out reg ─► write port 0
  valid/ready)  register read (Reg1, Reg2)         group 1: fast ×                 ─► out reg ─► write port 1
                control unit (scoreboard,          group 2: slow +, slow -         ─► out reg ─► write port 2
                 issue, stall)                     group 3: slow ×                 ─► out reg ─► write port 3
                                                   group 4: fast ÷                 ─► out reg ─► write port 4
                                                   group 5: slow ÷                 ─► out reg ─► write port 5
 data cache side: In/Out port of the register file (one write, one read)
```

* **One instruction is issued per clock, at most.** Its operands are read from
  the register file in the issue cycle. They are copied into the operand
  register of the unit the opcode names.
* **Each unit is combinational and spans several cycles.** Its operand register
  holds still while it computes. After the group's cycle time *D*, the result
  is sampled into the group's common output register.
* **Units with the same cycle time form a group.** A group has one output
  register and one register-file write port. With single issue, two units of
  one group can never finish in the same cycle, so they never clash on that
  register.
* **Groups finish out of order and can write back in the same cycle.** The
  register file therefore has one write port per group (six).

### Groups and cycle times

Cycle times assume a 5 ns clock. Each unit's data-arrival time is rounded up to
whole cycles. All six are parameters of `lp_alu_top`.

| group | units                                   | parameter         | default |
|-------|-----------------------------------------|-------------------|---------|
| 0     | fast adder, fast subtractor, logic unit | `CYC_FAST_ADDSUB` | 1       |
| 1     | fast multiplier                         | `CYC_FAST_MUL`    | 2       |
| 2     | slow adder, slow subtractor             | `CYC_SLOW_ADDSUB` | 3       |
| 3     | slow multiplier                         | `CYC_SLOW_MUL`    | 6       |
| 4     | fast divider                            | `CYC_FAST_DIV`    | 7       |
| 5     | slow divider                            | `CYC_SLOW_DIV`    | 11      |

If you change the clock, recompute these parameters. The grouping in
`lp_alu_top` is fixed. Two groups may end up with equal cycle times; that still
works, they just keep separate output registers.

### Timing of one instruction

For an instruction issued in cycle *t* to a group with cycle time *D*:

| cycle      | what happens                                                             |
|------------|--------------------------------------------------------------------------|
| t          | issue: operands read, loaded into the unit's operand register at the clock edge |
| t+1 … t+D  | the unit computes; at the end of t+D its result goes into the group output register |
| t+D+1      | output register drives the write port; register file written at the end of the cycle |
| t+D+2      | earliest issue of an instruction that reads the result                   |

There is no forwarding. A consumer therefore issues at least D+2 cycles after
its producer. This is 3 cycles after a fast add and 5 after a slow add.

The unit itself is busy in cycles t+1 … t+D−1. It can take a new instruction
in cycle t+D, the cycle its previous result is sampled. One-cycle units are
never busy.

## Choosing the slow unit without losing a cycle

The slow opcode costs nothing when enough independent instructions already sit
between a producer and its first consumer. With single issue, each of them
fills one cycle. Example with the default cycle times:

```
ADD_S r3, r1, r2     ; slow add, result at issue + 5
XOR   r8, r9, r10    ; independent
OR    r11, r9, r10   ; independent
AND   r12, r9, r10   ; independent
MOV   r13, r9        ; independent
SUB_F r4, r3, r5     ; first reader of r3: issue slot 5, no stall
```

With `ADD_F` the reader could issue at slot 3. But slot 5 is where it lands
anyway behind the four independent instructions. So the slow adder saves
33 pJ at no cost. When the gap is shorter, the offline pass can move
independent instructions from elsewhere in the same branch-free block into it.
It uses the slow code only where this removes the stall; otherwise it keeps
the fast code.

The hardware takes no part in this choice. It sees two different opcodes. The
offline pass is not included here. `tb/tb_lp_alu_top.sv` runs its acceptance
rule directly on the RTL instead, for generated programs:

1. Switch one fast instruction to its slow opcode.
2. Re-run the program.
3. Keep the switch only if the cycle count did not grow.

On its generated programs about half of the add/sub/mul/div instructions end
up on slow units, saving roughly 10 % of the arithmetic energy according to
the table above. The exact figure depends on the random seed.

Switching can even shorten a program by a cycle or two. The slow unit sits in
another group, so a busy fast unit no longer blocks it.

`tb/tb_scheduled_workload.sv` goes one step further and models the whole
offline pass on generated branch-free segments:

1. Every add, sub, mul and div starts on its slow unit.
2. Walking the segment in order, before placing an instruction that depends
   on an earlier one, it asks a cycle model whether the instruction would
   stall. If so, it pulls *independent* instructions forward from later in
   the segment into the gap. An independent instruction is one that writes
   nothing another instruction reads or writes, and reads nothing another
   writes.
3. Where a stall remains, it switches slow instructions back to fast.
4. A final pass makes sure that no instruction issues later than it would
   with all-fast code in the same order.
5. The reordered segment is kept only if it ends no later than the original
   order.

The cycle model is simple:

* An instruction issues one cycle after the previous one at the earliest.
* It waits D+2 cycles after the issue of the last writer of any register it
  uses (D is that writer's group cycle time).
* It waits D cycles after the previous use of its own unit.

The testbench checks that the RTL issues every instruction in exactly the
cycle this model predicts. It also checks that the scheduled code gives the
same register contents as the original, and never issues its last
instruction later than the all-fast original. With its generator, about half
of the adds and subtracts run on slow units, which is roughly 30 % less
add/subtract energy.

## Hazards: what the hardware still checks

Results finish out of order, so the control unit keeps a scoreboard: one
pending bit per register. The bit is set when an instruction that writes the
register issues, and cleared when its group writes it back. The instruction
waiting in the issue stage is held when any of these is true:

* **read after write:** a source register is pending;
* **write after write:** its destination register is pending. This also
  guarantees that two groups never write the same register in one cycle;
* **structural:** its unit is still busy with an earlier instruction.

Operands are read at issue, so write-after-read needs no check. NOPs and
unknown opcodes leave the issue stage without taking a unit. A well-scheduled
program meets few of these stalls; the interlock only keeps a program correct
when the schedule leaves a hazard behind.

## Instruction format

All instructions have the generic form *op rd, rs1, rs2*. The register file
has 32 registers of `W` = 32 bits.

```
 31      26 25  21 20  16 15  11 10        0
 [ opcode ][ rd  ][ rs1 ][ rs2 ][ 0 ... 0 ]
```

| opcode | mnemonic | unit            | group | result                    |
|--------|----------|-----------------|-------|---------------------------|
| 0x00   | NOP      | none            | none  | none                      |
| 0x01   | AND      | logic unit      | 0     | rs1 & rs2                 |
| 0x02   | OR       | logic unit      | 0     | rs1 \| rs2                |
| 0x03   | XOR      | logic unit      | 0     | rs1 ^ rs2                 |
| 0x04   | MOV      | logic unit      | 0     | rs1                       |
| 0x08   | ADD_F    | fast adder      | 0     | rs1 + rs2                 |
| 0x09   | ADD_S    | slow adder      | 2     | rs1 + rs2                 |
| 0x0A   | SUB_F    | fast subtractor | 0     | rs1 − rs2                 |
| 0x0B   | SUB_S    | slow subtractor | 2     | rs1 − rs2                 |
| 0x0C   | MUL_F    | fast multiplier | 1     | low 32 bits of rs1 × rs2  |
| 0x0D   | MUL_S    | slow multiplier | 3     | low 32 bits of rs1 × rs2  |
| 0x0E   | DIV_F    | fast divider    | 4     | rs1 / rs2, unsigned       |
| 0x0F   | DIV_S    | slow divider    | 5     | rs1 / rs2, unsigned       |

Each slow opcode is its fast opcode + 1. Division by zero returns all ones.
`lpalu_pkg::encode()` builds an instruction word.

## The functional units

Each pair computes the same function with a different amount of logic. The
circuits are this design's choice; the pairing is the point.

| unit              | module            | structure                                                        |
|-------------------|-------------------|------------------------------------------------------------------|
| fast add / sub    | `prefix_adder`    | Kogge-Stone carry network, log2(W) levels                         |
| slow add / sub    | `ripple_adder`    | one full adder per bit, carry ripples through all bits            |
| fast multiply     | `multiplier_fast` | radix-4 Booth recoding, W/2 partial products, balanced adder tree |
| slow multiply     | `multiplier_slow` | W rows of shift-and-add, a ripple adder in every row              |
| fast divide       | `divider_fast`    | radix-4 restoring array: W/2 rows, three trial subtractions each  |
| slow divide       | `divider_slow`    | radix-2 restoring array: W rows, one trial subtraction each       |
| logic             | `logic_unit`      | AND / OR / XOR / MOV, for instructions with one implementation    |

Subtraction adds the inverted operand with a carry-in of one (parameter
`SUBTRACT`).

## Interfaces of `lp_alu_top`

| port                                                   | meaning |
|--------------------------------------------------------|---------|
| `instr_valid`, `instr[31:0]`, `instr_ready`            | instruction fetch (instruction-cache side). Taken when valid and ready are high at a clock edge. |
| `dc_we`, `dc_waddr`, `dc_wdata`                        | write into the register file from the data cache |
| `dc_raddr`, `dc_rdata`                                 | combinational register read towards the data cache |
| `issued[5:0]`, `wrote_back[5:0]`                       | per group: an instruction issued / a result written this cycle |
| `retired_nop`, `stall_raw`, `stall_waw`, `stall_busy`  | issue-stage events |
| `idle`                                                 | no register write pending |

Reset is asynchronous and active low. It clears the register file, the
scoreboard and all pipeline registers.

The data-cache write port has the lowest priority against group write-backs
to the same register. Use it while the pipeline is idle, or for registers no
instruction in flight writes.

## Files

| file | content |
|------|---------|
| `rtl/lpalu_pkg.sv` | opcodes, group numbers, decoded-instruction struct, `encode()` |
| `rtl/lp_alu_top.sv` | top level: issue stage, control unit, register file, six groups, nine units |
| `rtl/decoder.sv` | opcode → group, unit, sub-function; register fields |
| `rtl/control_unit.sv` | scoreboard, stall decision, issue strobes, register read addresses |
| `rtl/fu_group.sv` | operand registers of a group's units, completion tracker, common output register |
| `rtl/register_file.sv` | 32 × W, two read ports, one write port per group, data-cache port |
| `rtl/prefix_adder.sv`, `rtl/ripple_adder.sv`, `rtl/multiplier_*.sv`, `rtl/divider_*.sv`, `rtl/logic_unit.sv` | functional units |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_scheduled_workload.sv` | offline-scheduler model plus execution of the scheduled code on `lp_alu_top` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog that counts a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/lpalu_pkg.sv tb/tb_lp_alu_top.sv --top-module tb_lp_alu_top
./obj_dir/Vtb_lp_alu_top
```

Use the same command with any other testbench in `tb/` (`tb_<module>` tests `rtl/<module>.sv`).

`tb_lp_alu_top` runs the top at its default parameters. It covers:

* **Correctness.** Registers are loaded through the data-cache port and read
  back the same way. Results are compared with an in-order reference model.
* **Latency and throughput.** For every opcode, the dependent-issue distance
  must be exactly D+2. Independent instructions must issue one per cycle.
  Two back-to-back slow adds must be spaced by the unit's busy time.
* **Random programs, with gaps in the fetch stream.** Each of these must occur
  at least once: read-after-write, write-after-write and busy stalls, several
  write-backs in one cycle, out-of-order completion, NOPs and fetch bubbles.
* **Slow-unit assignment.** The rule described above, with an energy estimate.

The arithmetic unit testbenches compare 32-bit results with the simulator's
own operators, and they also sweep a narrow width exhaustively.

## Where this design departs from, or adds to, the original

The original describes the organisation: duplicated units, grouping by cycle
time, a shared output register per group, a register file with several write
ports, a control unit and a decoder, all inside a generic five-stage pipeline.
The following are this design's own choices:

* **Clock and widths.** The 5 ns clock, and the cycle times derived from it.
  The 32-bit data width and the 32 registers.
* **Instruction set and encoding.** The logic instructions (AND, OR, XOR, MOV)
  stand for "instructions that have a single implementation".
* **Arithmetic conventions.** Unsigned division, the low-word-only product and
  the divide-by-zero value.
* **Unit circuits.** The circuits in the table above. The original gives only
  their energy and delay.
* **Interlock.** The scoreboard interlock and the absence of forwarding. The
  original relies mainly on the offline schedule, and names delayed issue as
  the fallback.
* **What is left out.** There are no branches, condition flags or load/store
  instructions. Memory traffic is reduced to the register file's data-cache
  port. Instruction fetch is reduced to a valid/ready port. Neither cache is
  modelled.
* **Offline scheduler.** The offline scheduler that splits code into
  branch-free segments, builds the dependence table and reorders instructions
  is software and is not included. The testbench applies only its final
  acceptance rule: slow only if no cycle is lost.
* **Energy.** The energy numbers come from the original's circuit simulation.
  This RTL has no power model.
