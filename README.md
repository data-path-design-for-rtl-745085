# Asynchronous two-way VLIW core: dual-rail datapath

This is a 32-bit processor core with no global clock in its pipeline. Every stage
boundary is a dual-rail latch built from Muller C-elements, and stages talk only
through four-phase handshakes. An instruction packet holds two 32-bit
instructions. They either issue together, one to each of two datapaths, or one
after the other. The ISA is close to MIPS and adds SIMD halfword operations,
PACK/UNPACK and a multiply-accumulate into a 40-bit accumulator.

The design follows a published thesis on the datapath of such a processor. The
thesis describes the pipeline, the instruction set and most datapath blocks.
Some circuits it gives in detail: the C-element, the dual-rail gates, DeMUX,
MERGE and the memory interface. Others it only names or describes by
function. Where it was silent, this design makes its own choices; they are
listed under "Design choices" below.

## Dual-rail words and the four-phase handshake

Each data bit travels on two wires, `t` and `f`:

| t f | meaning |
|-----|---------|
| 0 0 | empty (spacer) |
| 1 0 | 1 |
| 0 1 | 0 |
| 1 1 | never occurs |

A word is **valid** when every bit is 1 0 or 0 1. It is **empty** when every bit is 0 0.
The macros in `rtl/dr_macros.svh` encode, decode and test these states.

One transfer between two stages takes four phases:
1. The sender drives a valid word.
2. The receiver captures it and raises its acknowledge.
3. The sender returns the word to empty.
4. The receiver drops its acknowledge once it is completely empty.

There is no request wire: the data itself signals validity (completion detection).

### Timing model: `clk` as a gate-delay tick

The circuits are quasi-delay-insensitive, so they must work for any gate delay.
This RTL fixes one admissible choice: every state-holding element updates on
the rising edge of `clk`. These elements are the C-elements, the completion
detectors and the sampling stages. One `clk` period stands for one gate delay.
This makes the whole core synthesizable with ordinary flip-flops and free of
combinational loops, and simulation becomes deterministic.

The synchronous instruction and data memories use the same `clk`. The stage
*logic* is still fully delay-insensitive: no stage counts ticks to decide that
data is ready. The only exception is the memory interface, which waits a fixed
number of ticks for the synchronous memory, as the thesis describes.

### Building blocks

- **`c_element`**: output goes to 1 when both inputs are 1, goes to 0 when both are 0,
  and otherwise holds. Has an asynchronous reset to 0.
- **`c_latch`**: one C-element per rail, with inputs (incoming rail, NOT acknowledge
  from the next stage). This is the Muller pipeline. A `dr_completion` on its
  output gives the acknowledge it sends backwards.
  - A word is held until the next stage has acknowledged it *and* the input
    has returned to empty.
  - In a full pipeline only every other latch holds a word.
- **`dr_completion`**: a per-bit OR of the two rails, followed by a C-element across all
  bits. Its output rises when the word is fully valid and falls when it is fully empty.
- **`dr_gate2`**: dual-rail AND/OR/XOR.
  - Four C-elements detect the four input combinations.
  - For AND, one of them drives the true rail and an OR of the other three drives
    the false rail. OR and XOR regroup the same four terms.
  - These gates are delay-insensitive. Their result arrives two ticks after their
    operands (demux plus minterm C-element).
- **`dr_demux`**: a C-element per rail on (data, select line). Only the selected output
  becomes valid; the others stay empty.
- **`dr_merge`**: an OR per rail across N channels. Correct because exactly one channel
  is non-empty at a time.
- **`hs_sample`** (helper): a sampling handshake stage. It is needed where a stage's
  result depends on state that changes under it: the register file, the lock queues
  and the accumulator.
  - When its input is valid, its output channel is free and a condition holds, it
    snapshots the value, drives it as a valid word and acknowledges the input.
  - It releases the word when the next stage acknowledges it.
  - It drops its own acknowledge only when its input is *completely* empty.

## The pipeline

```
PF -> [PF latch] -> DP -> [DP latch] -> ID/OF -> [ID latch] -+-> EX1 A -> [EX1 latch A] -> EX2 A -+-> [WB latch] -> WB
                                                             +-> EX1 B -> [EX1 latch B] -> EX2 B -+
```

- **PF** (`pc_module`, a `mem_if` and the instruction `sync_mem`):
  - The PC module emits a dual-rail PC token.
  - The memory interface reads the 64-bit packet.
  - The PC advances by one packet when the PF latch acknowledges.
  - A taken branch redirects it. If the redirect arrives while a token is
    outstanding, it is remembered and applied to the next token.
  - Fetch is speculative: it keeps prefetching past an unresolved branch.
- **DP** (`dispatch`): decompresses and routes packets.
  - If the **P bit** (bit 0) of the first instruction is 1, the pair issues together:
    the first instruction goes to the MAC path (B), the second to the LDST path (A).
  - Otherwise the two issue one after the other, each with a NOP in the other
    slot. A lone LW/SW goes to path A; anything else goes to path B.
  - After issuing a branch (BEQ, BNEQ, CALL, RETURN) DP stalls until EX1 of
    path B reports the outcome.
  - Packets whose PC is not the expected next PC are acknowledged and
    dropped. These are the wrong-path packets prefetched after a taken branch.
  - A taken branch issued from the first half of a split packet cancels the second half.
- **ID/OF** (`id_stage` with two `inst_decoder`s, `regbank`, `lock_module`):
  - Each slot first passes a 2-way DeMUX. A NOP takes the bypass line and becomes an
    all-zero bundle, without using a decoder or register port. A MERGE rejoins the
    two lines.
  - The other instructions are decoded, and four register read ports supply their operands.
  - The lock queues are checked for read-after-write hazards.
  - An `hs_sample` takes the snapshot only when there is no hazard and the queues are
    not full. In the same tick it pushes both destination registers into the lock queues.
- **EX1** (`fu_ex1` inside `ldst_fu` and `mac_fu`): an 11-way DeMUX steers the operand
  word to one unit. The units are: bypass, ALU, AND, OR, XOR, barrel shifter, 16x16
  multiplier, divider, pack, unpack, and (path B only) the branch/address unit.
  - A MERGE collects the result.
  - Only the selected unit switches, which is the point of the DeMUX/MERGE
    structure.
  - Path B's branch unit also emits a branch-outcome channel. It produces one
    `br_evt` pulse per branch, carrying taken/not-taken and the target.
- **EX2**: the two paths differ here.
  - *Path A* uses a 3-way DeMUX by memory kind. Data pass forwards the EX1 result.
    A load raises the read request. A store raises the write request and produces an
    all-zero (no write-back) word when the memory reports done. A MERGE recombines them.
  - *Path B* is an `hs_sample` that reads the 40-bit accumulator. MAC computes
    `acc + sext(Rs.L * Rt.L)`; ACCLDH/ACCLDL return `acc[39:32]` / `acc[31:0]`.
- **WB** (`wb_stage`): when the combined WB latch is valid, both paths write their
  register (one write port each) and path B writes the accumulator. Both lock queues
  are popped once.

### Fork and join

The ID latch feeds both paths. Its acknowledge is a C-element of the two EX1
latches' acknowledges, so it changes only when both paths agree. The paths join
again in the single WB latch, whose completion needs both halves. A fast path
therefore waits for the slow one only at write-back. Between those points, the
two EX1 latches let the paths run at their own speed.

### Why the lock queues, and why push after the read

Each datapath has a lock queue of destination registers for packets between ID/OF and
WB. A source register that matches an entry in *either* queue stalls the packet in
ID/OF. Entries are pushed in the same tick that the operands are sampled, not before.
Otherwise an instruction such as `ADD $g3, $g3, $g1` would lock against itself.
Each packet pushes one entry into each queue (register 0 when the slot writes nothing),
so WB pops both queues once per packet. The queue depth is 4. With this latch style at
most three packets can sit between ID/OF and WB.

### Subtle points of the acknowledge logic

Two places needed more than "acknowledge = completion of my output":

1. **State-dependent stages** (ID/OF, path B EX2) cannot be plain combinational
   logic between latches. A register could change while the word is valid, and the
   next latch would then see a bit flip from 1 to 0 in mid-word. `hs_sample` freezes
   the value.
2. **Path A EX2 acknowledge.**
   - EX2 treats its input as gone as soon as any bit is no longer valid. But the
     result bits from the dual-rail gate units empty two ticks *after* the
     pass-through fields of the same word.
   - If EX2's acknowledge dropped at once, the EX1 latch would capture those late
     result bits as a new, partial word and the pipeline would deadlock.
   - The acknowledge is therefore a C-element of (WB-latch acknowledge, EX1 latch not
     empty). It falls only once the whole EX1 latch is empty.

## Instruction set summary

Field layout, 32 bits:

| bits | 31:27 | 26:22 | 21:17 | 16:12 | 11:7 | 6:1 | 0 |
|------|-------|-------|-------|-------|------|-----|---|
| field | opcode | Rd | Rs | Rt | shamt | funct | P |

In I-type instructions the immediate is bits 16:1. Registers are numbered 0–31:

| register | number |
|----------|--------|
| `$0` | 0 |
| `$sp` | 1 |
| `$rp` | 2 |
| `$ra` | 3 |
| `$bb` | 4 |
| `$sd0`–`$sd11` | 5–16 |
| `$g0`–`$g14` | 17–31 |

`$0` reads as zero. The opcode and funct constants are in `rtl/avliw_pkg.sv`, with
encoder functions (`enc_r`, `enc_i`, `enc_m`) for writing test programs.

- **Arithmetic:** ADD(U), SUB(U), ADDI, ADDIU, SUBI, MOVI, MOV, MOV.l, MOV.h, MIN, MAX,
  ABS, SLT, NOT.
- **Logic:** AND, OR, XOR, ANDI, ORI, XORI.
- **Shifts:** SRL, SRA.
- **Multiply and divide:** MUL (signed 16x16), DIVU (quotient).
- **SIMD (two 16-bit halves):** ADD.D, ADDU.D, SUB.D, SUBU.D, MIN.D, MAX.D, ABS.D,
  PACK, UNPACK.
- **MAC group:** MAC, ACCLDH, ACCLDL.
- **Memory:** LW, SW. Word addresses; SW stores Rd.
- **Control:** BEQ, BNEQ (target = packet PC + imm), CALL (target = imm, link
  PC+1 in `$ra`), RETURN (target = Rs). There is no delay slot.

## Design choices where the thesis is silent

- **Timing model:** the `clk` gate-delay tick described above.
- **Memory sizes:** both memories have 1024 words (the thesis gives only
  the widths: 64-bit instructions, 32-bit data).
  - The instruction memory has 1024 x 64 bits; the data memory 1024 x 32 bits.
  - Each has a second port (`imem_*`, `dmem_*`) for loading and inspection.
- **Memory interface:**
  - A read takes `DELAY1` = 2 ticks and a write `DELAY2` = 1 tick of waiting on the
    synchronous memory.
  - `Read_Req.f` serves as the write request.
  - Write-done is signalled on its true rail only.
- **Encodings the thesis does not print:** MUL (funct 011100) and DIVU (011110).
  - UNPACK writes one register per instruction: funct[0] selects Rs or Rt as
    target, and two funct bits select source and destination halves.
  - PACK takes its two half-selects from funct[5] and funct[2].
- **Signedness:**
  - Immediates: sign-extended for arithmetic, memory and branch instructions;
    zero-extended for logic instructions, ADDIU and CALL.
  - MIN/MAX/SLT compare signed values.
  - The MAC product is sign-extended into the accumulator; ACCLDH zero-extends
    `acc[39:32]`.
  - Divide by zero returns an all-ones quotient.
  - Signed and unsigned add/subtract give the same bits (no traps).
- **Register bank:**
  - Registers reset to 0.
  - If both paths write the same register in one packet, the MAC path wins.
- **Speculative fetch with PC-compare dropping:** this is this design's own way to
  realise "stall in DP until the branch resolves in EX1".
- **Structural simplifications:**
  - The multiplier is a sign-corrected shift-and-add array. It is not split into
    four carry-save adder groups.
  - The divider is a restoring array.
  - The barrel shifter shifts right only, since only SRL/SRA exist.
- **NOP detection:** the ID/OF bypass line is taken by any instruction with opcode 0,
  whatever its other bits.

## Files

| file | contents |
|------|----------|
| `rtl/avliw_pkg.sv` | types, opcodes, bundles, encoders |
| `rtl/dr_macros.svh` | dual-rail macros |
| `rtl/c_element.sv`, `c_latch.sv`, `dr_completion.sv`, `dr_gate2.sv`, `dr_demux.sv`, `dr_merge.sv`, `hs_sample.sv` | asynchronous primitives |
| `rtl/alu.sv`, `barrel_shifter.sv`, `multiplier.sv`, `divider.sv`, `pack_unit.sv`, `unpack_unit.sv` | execution units (single-rail logic, wrapped in dual-rail encode by `fu_ex1`) |
| `rtl/inst_decoder.sv`, `regbank.sv`, `lock_module.sv` | ID/OF parts |
| `rtl/mem_if.sv`, `sync_mem.sv` | memory interface and synchronous memory |
| `rtl/pc_module.sv`, `dispatch.sv`, `id_stage.sv`, `fu_ex1.sv`, `ldst_fu.sv`, `mac_fu.sv`, `wb_stage.sv` | stages |
| `rtl/avliw_top.sv` | the core |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_util.svh` | testbench clock, check counter, watchdog |

## Using the core

The top-level ports of `avliw_top`:

| port | use |
|------|-----|
| `clk`, `rst_n` | the tick and an active-low reset. |
| `imem_we/addr/wdata[63:0]` | load packets while `rst_n` is low. The first instruction of a packet is `wdata[63:32]`. Execution starts at packet 0. |
| `dmem_we/addr/wdata`, `dmem_rdata` | preload and inspect data memory. The read is registered. |
| `dbg_reg_idx` / `dbg_reg_val`, `acc_val` | observe registers and the accumulator. |
| `evt_*` | one-tick pulses. <ul><li>Pipeline: fetch, issue, split, drop, br_stall, lock_stall, nop_bypass, retire.</li><li>Branches: br_taken, br_not_taken.</li><li>Datapath: mac, load, store.</li></ul> |

Simulate a testbench with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/avliw_pkg.sv tb/tb_avliw_top.sv --top-module tb_avliw_top -o sim
./obj_dir/sim
```

Every testbench ends with `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

## Verification

- **Unit testbenches:** each compares its module with a reference written
  independently in the testbench, using `$urandom` stimulus.
  - Arithmetic units run thousands of random operands plus corner cases.
  - Handshake stages run against random-delay source and sink models. They check
    the four-phase protocol, in-order delivery, and values (including memory
    contents and accumulator sums).
  - The dispatch test walks a random program with random branch outcomes.
    It checks every issued word, the P-bit split, the routing and the
    wrong-path drop.
  - Memory latencies are checked in ticks.
- **`tb_avliw_top`:** runs the full core at default sizes on a 17-packet program.
  - The program has a MAC dot-product loop, accumulator moves and stores, and a
    CALL/RETURN subroutine using PACK, ADD.D, UNPACK, MUL, DIVU, shifts, logic
    and MAX. It ends in a self-loop.
  - It checks registers, memory and the accumulator against hand-worked values.
  - It counts each mechanism and fails if any never happened. The mechanisms are:
    parallel and split issue, lock stall, branch stall, taken and not-taken branch,
    wrong-path drop, NOP bypass in ID/OF, MAC, load and store.
  - It completes in about 570 ticks.

## Limits

- The tick model checks the logic for one delay assignment (unit delay). It does not
  prove delay insensitivity for every delay.
- There are no exceptions, interrupts or overflow traps (none are described).
- Speed and area depend on the target technology. The tick model says nothing about
  real stage latencies.
