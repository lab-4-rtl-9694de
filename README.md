# Micro6: a CPU with a split fetch / decode / execute control unit

Micro6 is a small 32-bit-instruction CPU whose control unit is split into
three parts that work as independently as possible:

* a **fetch unit** that always tries to have the next instruction word ready,
* a **decode function**, a pure combinational function that turns an
  instruction word into a *decode bundle* of fields and selects, and
* an **execute unit**, a state machine that turns the decode bundle into the
  *execute bundle*, the clocked control signals of the datapath.

This RTL implements the instruction side and a datapath for it:

* **Instruction side:** fetch unit, instruction register (IR), program
  counter (PC), decode function and execute state machine.
* **Datapath:** register file, ALU, condition flags, accumulator (ACC),
  memory address and buffer registers (MAR, MBR), return-address stack, and
  the multiplexed data bus that joins them.

Two parts stay outside the CPU and connect through ports: the memory traffic
controller (one request/acknowledge channel for instructions, one for data)
and the condition check, which turns the flags into the branch condition
`cTrue`.

The following come from the Micro6 description:
* the split into fetch, decode and execute, and the fetch handshake;
* the signal lists and widths of the two bundles;
* the 5-bit opcode in bits 31:27 and the field names of the three
  instruction formats;
* the two-case structure of the decoder;
* the Idle/Reading/Decoding/group-state structure of the state machine;
* the datapath's blocks and connections.

The rest was not specified and is this design's own:
* the opcode values and the exact bit positions of most fields;
* the instruction groups, the ALU operation list and the micro-steps each
  group runs;
* the 16-bit data width and the stack depth.

See [Departures and own choices](#departures-and-own-choices).

## Files

| file | contents |
|---|---|
| `rtl/micro_control_pkg.sv` | types shared by all blocks: opcodes, ALU operations, instruction groups, bundle structs, format structs, and `decodeInstr()` |
| `rtl/decode_unit.sv` | module wrapper around `decodeInstr()` |
| `rtl/fetch_unit.sv` | fetch unit with the ReadInstr/vldInstr handshake |
| `rtl/instr_reg.sv` | instruction register |
| `rtl/pc_reg.sv` | program counter |
| `rtl/execute_unit.sv` | control state machine |
| `rtl/micro6_control.sv` | instruction side: the five blocks above wired together |
| `rtl/regfile.sv` | 32 x 16-bit register file, two read ports, one write port |
| `rtl/alu.sv` | ALU with neg/ovf/zro flags |
| `rtl/stack.sv` | 16-entry return-address stack |
| `rtl/enable_reg.sv` | register with load enable (CF, ACC, MAR, MBR) |
| `rtl/micro6_datapath.sv` | datapath: the four blocks above, port muxes and data bus |
| `rtl/micro6_cpu.sv` | top: instruction side plus datapath |
| `tb/tb_<block>.sv` | one self-checking testbench per module |

## Instruction formats

All instructions are 32 bits, with the opcode in bits 31:27. The three
formats are overlaid on the word as packed structs (`format1_t`, `format2_t`,
`format3_t`). This is the SystemVerilog counterpart of declaring one alias
per field.

```
Format1  register / shift
  31:27 OPCODE | 26 IX | 25 S | 24 D | 23:19 CNT | 18 AACC | 17 BACC |
  16 StoreC | 15 - | 14:10 A | 9:5 B | 4:0 C
Format2  branch / call
  31:27 OPCODE | 26:11 PAGE-0 ADDRESS | 10:8 C-MASK | 7 ST | 6:0 -
Format3  load / store
  31:27 OPCODE | 26:11 PAGE-0 ADDRESS | 10:6 C | 5:0 -
```

| field | meaning |
|---|---|
| IX | index register (decoded but unused: nothing in the bundles carries it) |
| S, D, CNT | shift count source, shift direction (1 = right), shift count |
| AACC, BACC | ALU port A / B takes the accumulator instead of the register file |
| StoreC | also write the result to register C |
| A, B, C | register file read ports A and B, write port C |
| PAGE-0 ADDRESS | 16-bit address in the first memory page (operand or branch target) |
| C-MASK | condition mask, used only by the external condition check |
| ST | branch is a call (push the return address) |

Only the opcode position and the field widths (5-bit register and shift
fields, 16-bit address) are fixed by the description. The field order
follows the Micro6 format layout. The individual bit positions are this
design's choice.

### Instruction set

| opcode | mnemonic | format | group |
|---|---|---|---|
| 0 | NOP | - | `G_NOP` |
| 1..7 | ADD, SUB, AND, OR, XOR, NOT, MOV | 1 | `G_ALU`, or `G_ALU_ST` if StoreC |
| 8 | SHIFT (D=0 left, D=1 right) | 1 | `G_ALU` / `G_ALU_ST` |
| 9 | LOAD  C <- mem[PAGE0] | 3 | `G_LOAD` |
| 10 | STORE mem[PAGE0] <- C | 3 | `G_STORE` |
| 11 | BRA (conditional; a call if ST=1) | 2 | `G_JUMP` / `G_CALL` if `cTrue`, else `G_NOP` |
| 12 | RET | - | `G_RET` |
| 13..31 | undefined | - | `G_NOP` |

## The decode function

`decodeInstr(instReg, cTrue)` in `micro_control_pkg` returns a
`decode_bundle_t`. It has three parts:

1. **Defaults.** Every field is first taken straight from the Format1 field
   positions: A, B and C go to `Asel`, `Bsel` and `Csel`; CNT and S to
   `shiftCnt` and `shiftCntSrc`; AACC and BACC to `portAsel` and `portBsel`.
   `memAddr` gets the page-0 address, and `ALUsel` is PASSA. The execute unit
   ignores the fields an instruction does not use, so these defaults need no
   per-opcode masking.
2. **case_1** is compact: one choice covers several opcodes. It produces only
   `instrGroup` and `CFen`. A group collects all instructions that need the
   same sequence of clocked control signals, which keeps the execute state
   machine small. This is why StoreC splits the ALU instructions into two
   groups, and why a branch whose condition is false (`cTrue` = 0) falls
   into the NOP group.
3. **case_2** has one choice per opcode and overrides the rest:
   * the ALU operation (for SHIFT, chosen by D);
   * for LOAD and STORE, `Csel` (and for STORE also `Asel`) from the Format3
     C field;
   * `MBRsel`, `DATAsel` and `STKen`.

`DATAsel` chooses the data bus source: `DS_ACC` (accumulator), `DS_MBR`,
`DS_STK` (stack output) or `DS_CTRL` (the control unit's `memAddr`).
`MBRsel` = 1 loads the MBR from memory, 0 from the data bus.

`decode_unit` wraps the function as a module. The result depends only on
the IR and `cTrue`, and is valid in the same cycle.

## The control state machine

```
      vldInstr                                     vldInstr (and no ReadInstr this cycle)
Idle ---------> Reading -> Decoding -> gxs1 -> ... -> gxsn ---------> Reading
 ^                                                  |
 +--------------------------------------------------+ otherwise
```

* **Reading** lasts one cycle. It asserts `IRen`, which copies the word held
  by the fetch unit into the IR, and pulses `ReadInstr`, which sends the
  fetch unit off for the next word.
* **Decoding** lasts one cycle. The decode bundle of the new IR contents is
  stored in the execute unit for the whole instruction.
* **gxs1..gxsn** are the group's execute states. They are implemented as
  one state, `S_EXEC`, plus a step counter (`step` = 1..n).
* After gxsn the machine goes straight back to Reading if a word is waiting.
  Otherwise it goes to **Idle** and stalls there until `vldInstr` rises.

The shared bundle fields (`Asel`, `Bsel`, `Csel`, `ALUsel`, `DATAsel`,
`MBRsel`) come from the stored decode bundle by default. A step may override
them.

| group | states | per step |
|---|---|---|
| `G_NOP` | 1 | nothing |
| `G_ALU` | 1 | ACCen, CFen |
| `G_ALU_ST` | 2 | ACCen, CFen; then DATAsel=ACC, RegFileWr |
| `G_LOAD` | 3 | DATAsel=CTRL, MARen; memRd until memAck (MBRen with it); DATAsel=MBR, RegFileWr |
| `G_STORE` | 4 | DATAsel=CTRL, MARen; ALUsel=PASSA, ACCen; DATAsel=ACC, MBRen; memWr until memAck |
| `G_JUMP` | 2 | wait for vldInstr; DATAsel=CTRL, PCen, ReadInstr |
| `G_CALL` | 3 | wait for vldInstr; STKpush, stkInc; DATAsel=CTRL, PCen, ReadInstr |
| `G_RET` | 3 | wait for vldInstr; stkDec; DATAsel=STK, STKpop, PCen, ReadInstr |

An instruction therefore takes 3 to 6 cycles, plus data-memory wait cycles,
plus Idle cycles while the next word is still being fetched.

## Fetch overlap and taken branches

Running the fetch unit ahead of the execute unit is the main point of the
design, and also the trickiest part.

**Handshake.** After reset, and after every `ReadInstr` pulse, the fetch
unit drops `vldInstr` and requests the word at the PC. `memRd` stays high
until a one-cycle `memAck`. When the word arrives, the fetch unit stores it
and raises `vldInstr`, which stays high until the next `ReadInstr`. Because
the control unit pulses `ReadInstr` in its Reading state, the fetch of
instruction *n+1* overlaps the decoding and execution of instruction *n*.
Two assertions in `fetch_unit` check the rules: `ReadInstr` only while
`vldInstr`, and `memAck` only while `memRd`.

**PC timing.** `PCInc` is pulsed together with each accepted `ReadInstr`.
The PC therefore always holds the address of the word the fetch unit is
fetching or holding. While instruction *n* executes, the PC is *n*+1, which
is exactly the return address a call must push. A `PCen` load takes
priority over `PCInc`.

**Taken branches.** When a branch, call or return executes, the fetch unit
has already started on the fall-through word. The group therefore:

1. waits in gxs1 until `vldInstr` is high, so that no memory read is in
   flight;
2. in its last state, loads the PC from the data bus and pulses
   `ReadInstr`. This discards the stale word, and the fetch unit restarts at
   the new PC.

After such a discard, `vldInstr` is about to fall, so the machine goes to
Idle rather than Reading. It waits there for the word at the target.

## The datapath

```
            +-----------+  busA -> [portAsel: ACC | busA] -> alu_porta -+
 data bus ->| regfile   |  busB -> [portBsel: ACC | busB] -> alu_portb -+-> ALU -> cf_in -> CF
  (busC)    | 32 x 16   |                                               |
            +-----------+                                               +-> result -> ACC
 data bus = DATAsel ? { ACC, MBR, stack top, control unit (memAddr) }
 data bus -> MAR -> data address     data bus | memory data -> MBR -> write data
 data bus -> PC (on PCen)            PC -> stack (on STKpush)
```

* **Register file.** The two read ports (selected by `Asel` and `Bsel`) are
  combinational. The write port (`Csel`, `RegFileWr`) takes the data bus.
* **ALU ports.** Each ALU port reads either its register-file port or the
  accumulator, as chosen by `portAsel` / `portBsel` (the AACC and BACC
  instruction bits).
* **ALU.** It computes PASSA, PASSB, ADD, SUB, AND, OR, XOR, NOT, and
  logical SHL/SHR.
  * The shift count is either the CNT field, or bits 4:0 of ALU port B when
    S = 1.
  * The flags are `{neg, ovf, zro}`. `ovf` is two's-complement overflow of
    ADD and SUB, and zero otherwise.
* **CF and ACC** latch the ALU flags and result on `CFen` and `ACCen`.
* **MAR** loads from the data bus. **MBR** loads from the data bus
  (`MBRsel` = 0) or from memory (`MBRsel` = 1).
* **Stack.** The stack pointer points at the next free entry:
  * `STKpush` writes the PC there;
  * `stkInc` and `stkDec` move the pointer;
  * the entry at the pointer is always on the stack output.

  The pointer wraps at 16 entries: deeper nesting overwrites the oldest
  return addresses.

Every datapath register loads at the clock edge that ends the cycle in which
its enable is high.

## Top level: `micro6_cpu`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, synchronous active-low reset |
| `fetchAddr`, `imemRd` / `imemAck`, `imemData` | out / in | instruction fetch: address (PC), request held until a one-cycle acknowledge, word |
| `dmemAddr`, `dmemWdata`, `dmemRd`, `dmemWr` / `dmemAck`, `dmemRdata` | out / in | data access: address (MAR), write data (MBR), read or write request held until a one-cycle acknowledge, read data |
| `cf` / `cTrue` | out / in | flags to the condition check, and its verdict back. `cTrue` must be stable at least through the Decoding cycle |
| `AccOut`, `ctrlState`, `instrRegOut` | out | observation |

Parameters: `DATA_W` (16), `NREGS` (32), `STACK_DEPTH` (16). The address
width is 16 bits, set by `memAddr`.

`micro6_control`, the instruction side on its own, can also be used without
the datapath. It outputs:

* the execute bundle and the decode bundle. The datapath takes `shiftCnt`,
  `shiftCntSrc`, `portAsel` and `portBsel` straight from the decode bundle.
* `ctrlData`, the value the control unit puts on the data bus.

It takes `dataBus` back as the PC's load value.

## Departures and own choices

* **Instruction set.** The opcode values, the ALU operation list and the
  eight instruction groups were not specified. They are chosen here and can
  be changed in `micro_control_pkg`.
* **Field positions.** Apart from the opcode position and the field widths,
  the bit positions were not fixed and are chosen here. C-MASK is taken as
  3 bits, one per flag (negative, overflow, zero).
* **IX.** The index-register bit is decoded but drives nothing.
* **Group state sequences.** The micro-steps of each group were not
  specified and are this design's own, as is the rule that `CFen` is
  asserted only when the accumulator captures an ALU result.
* **Protocols.** These were not specified either:
  * the memory request/acknowledge protocol;
  * the `PCInc` timing;
  * the discard of a prefetched word on taken branches;
  * all reset values.
* **Datapath sizes and semantics.** The 16-bit data width, the 16-entry
  wrapping stack, the meaning of the shift count source, the flag rules, and
  the reset-to-zero of all registers are this design's choice.
* **Not used.** The MBR's IO data input and output are not used.
* **Not built.** The condition check (how C-MASK combines with the flags)
  and the memory traffic controller are not included. Both are left as
  ports.

## Simulation

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and ends with `$finish`, and each has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/micro_control_pkg.sv tb/tb_micro6_cpu.sv --top-module tb_micro6_cpu
./obj_dir/Vtb_micro6_cpu
```

* `tb_decode_unit` runs every opcode with both `cTrue` values, plus 2000
  random words. It checks each bundle field against a reference that slices
  the word by hand.
* `tb_fetch_unit` runs the handshake against a memory with 0 to 3 wait
  cycles. It checks the held word, `vldInstr`/`memRd` timing and `PCInc`.
* `tb_execute_unit` uses a cycle-level reference of the state machine. It
  checks every execute bundle signal in every cycle and the cycle count of
  each instruction, over all eight groups. It also requires the Idle stall,
  memory wait cycles and the direct gxsn -> Reading transition to occur.
* `tb_instr_reg`, `tb_pc_reg` and `tb_enable_reg` check load, hold,
  increment and priority.
* `tb_regfile`, `tb_alu` and `tb_stack` check their modules against
  models: every ALU operation on corner and random operands, flags included;
  stack overflow wrap.
* `tb_micro6_datapath` drives random bundles every cycle. It checks the
  data bus, ACC, CF, MAR and MBR against a register-transfer model.
* `tb_micro6_control` runs the instruction side on its own.
  * **Program.** A pseudo-random program spans the whole 16-bit address
    space: each word is computed from its address.
  * **Stand-ins.** The testbench provides memories with wait cycles, a
    return-address stack and a data bus.
  * **Reference.** An architectural model predicts the address of every
    instruction. It checks the IR contents, branch and return targets,
    pushed return addresses, MAR addresses, and register-file and memory
    accesses per instruction.
  * **Coverage.** It runs 4000 instructions, and it fails unless every group,
    taken and untaken branches, stalls, instruction and data memory waits,
    and prefetch discards all occurred.
* `tb_micro6_cpu` runs the whole CPU at its default parameters for 6000
  instructions.
  * **Model.** An instruction-level model of the CPU executes the same
    random program.
  * **Boundary checks.** At every instruction boundary the testbench compares
    the IR, ACC, the flags and all 32 registers with the model.
  * **Data accesses.** It checks the address and data of every data-memory
    access.
  * **Coverage.** It fails unless every group, both shift-count sources,
    ACC operands, taken and untaken branches, more than 16 nested calls,
    stalls and memory waits all occurred.

All of this is verified in simulation only. The RTL is synthesizable (plain
flip-flops, multiplexers and small arrays, with no latches), but it has not
been taken through timing on any target technology.
