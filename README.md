# Multi-cycle MIPS-lite: one datapath, nine control units

A multi-cycle processor reuses one ALU and one memory across several clock
cycles per instruction. The datapath therefore does nothing by itself: a
control unit must say, in every cycle, which mux input to take, which
register to write and what the ALU does. This RTL builds the classic
multi-cycle MIPS-lite datapath once and drives it with nine control units:

* six styles of control unit;
* a short-word version of the first microcoded one;
* two further microcoded sequencers, one with two dispatch maps and one with
  conditional branching.

All nine implement the same table of control steps in different hardware:

| core | control unit | how the next step is chosen |
|---|---|---|
| `CU_FSM1` | hardwired Moore FSM, 4-bit binary state, PLA logic, exception states | PLA next-state terms from state + opcode (+ overflow) |
| `CU_FSM2` | hardwired FSM with LW/SW address computation merged | case statement on state + opcode |
| `CU_ONEHOT` | one flip-flop per state | a token passes along per-instruction chains of flip-flops |
| `CU_SEQCNT` | sequence/jump counter + 4:16 decoder | count up, reset to T0, or micro-jump (load) |
| `CU_MICRO_V1` | micro-programmed, 23-bit horizontal microcode | unconditional mux select stored in the microword |
| `CU_MICRO_V2` | micro-programmed, next-address codes + jump logic | conditional select from the microword and datapath status |
| `CU_MICRO_V1E` | V1 with a 19-bit microword | as V1, but fetch is reached through the external source |
| `CU_MICRO_V3` | micro-programmed, two opcode maps, FSM2 flow | unconditional select among µPC+1, MAP1, MAP2, fetch |
| `CU_MICRO_V4` | micro-programmed, V1's inputs + condition codes | V1's select if a condition on ZeroC/Zero holds, else µPC+1 |

The top level, `mips_multicycle_top`, puts all nine cores side by side. They
share a clock and reset, and each core has its own memory. If you load the
same program into each, you can compare the control units cycle by cycle.

## Instruction set and timing

All cores run `ori`, `lw`, `sw`, `beq`, `j` and the R-type `add`, `sub`,
`and`, `or`, `slt`, with standard MIPS32 encodings. Every instruction starts
with two common steps:

* **IF**: IR ← M[PC] and PC ← PC+4, in the same cycle.
* **ID**: A ← RF[rs] and B ← RF[rt]. ALUOut ← PC + (S_Ext(imm) << 2), the
  branch target, computed speculatively.

Then comes execution, memory access and write-back, as needed:

| instruction | steps after IF, ID | cycles |
|---|---|---|
| R-type | ALUOut ← A op B; RF[rd] ← ALUOut | 4 |
| ori | ALUOut ← A \| Z_Ext(imm); RF[rt] ← ALUOut | 4 |
| lw | ALUOut ← A + S_Ext(imm); MDR ← M[ALUOut]; RF[rt] ← MDR | 5 |
| sw | ALUOut ← A + S_Ext(imm); M[ALUOut] ← B | 4 |
| beq | if A == B: PC ← ALUOut | 3 |
| j | PC ← {PC[31:28], IR[25:0], 00} | 3 |
| sll (one-hot, seq. counter) | see below | 3 + max(sa, 1) |
| sll (V4) | see V4 below | 4 + sa |
| overflow (FSM1 only) | ALUOut ← A op B; exception step | 4 |
| undefined opcode | FSM1: exception step. Seq. counter: one idle step. Others: back to IF | 3 / 3 / 2 |

The one-hot core needs one extra cycle after reset for its Start pulse. When
`mem_busy` is high in the LW Memory step, the V2 core waits there one cycle
per busy cycle.

## The control word

`mips_pkg::ctrl_t` holds one field per control line:

* **From the control-signal table:** IorD, MemRead, MemWrite, IRWrite,
  RegDst, MemtoReg, RegWrite, ExtOp, ALUSrcA, ALUSrcB, ALUOp, PCSrc, PCWrCd
  and PCWr.
* **For exceptions:** EPCWrite, CauseWrite and IntCause.
* **For the shift counter:** SCWrite and SCEn.

Mux codes:

* **ALUSrcA:** 0 PC, 1 A, 2 ALUOut. Input 2 is used only by sll.
* **ALUSrcB:** 0 B, 1 the constant 4, 2 Ext(imm), 3 Ext(imm)<<2.
* **PCSrc:** 0 ALU result, 1 ALUOut, 2 jump address, 3 the exception vector
  0x8000_0180.
* **ALUOp:** add 00, sub 01, fun 10, or 11. `fun` lets the funct field
  decide.
* **ExtOp:** 1 sign-extends, 0 zero-extends.

The PC is written when `PCWr | (PCWrCd & Zero)`. MDR, A, B and ALUOut have no
write enable and are rewritten on every clock edge. This matters for any
control step that wants to wait (see V2).

## The control units

### FSM1 with PLA control logic and exceptions (`ctrl_fsm1`, `fsm1_pla`)

FSM1 has one state per row of the control table, numbered top to bottom and
left to right: IF 0, ID 1, R-exec 2, R-wb 3, ORI 4/5, LW 6/7/8, SW 9/10,
BEQ 11, J 12. Two exception states are added: IllegalOp 13 and Overflow 14.

`fsm1_pla` is written as a PLA:

* **AND plane:** decodes the state into one line per state.
* **OR plane:** ORs those lines into each control signal. For example,
  PCWrite = state 0 | state 12 | state 13 | state 14.
* **Next state:** an OR of product terms over state, opcode and overflow.

An undefined opcode in ID goes to IllegalOp. An ALU overflow in R-type
execution goes to Overflow, and the result is never written back. Both
exception states do three things:

* EPC ← PC − 4, computed by the ALU (PC − 4 is the faulting instruction,
  because PC was already incremented).
* Cause ← 0 for an undefined opcode, 1 for overflow.
* PC ← 0x8000_0180.

### FSM2 (`ctrl_fsm2`)

FSM2 is FSM1 with one change: the LW and SW execute states become a single
Address Computation state, after which the opcode picks LW Memory or SW
Memory. It has 12 states and no exceptions.

### One flip-flop per state (`ctrl_onehot`)

Every control step is its own flip-flop, and one token moves through them:

* A Start pulse, or the end of any instruction, sets IF0. IF0 feeds IF1.
* From IF1, the instruction decoder line (`instr_decoder`) gates the token
  into that instruction's chain: R 2 flip-flops, ORI 2, LW 3, SW 2, BEQ 1,
  J 1, sll 2.
* Each control signal is the OR of the flip-flops that assert it.

Fetch and decode are independent of the chains, so adding an instruction
means adding a chain. The sll chain is the variable-length one: its second
flip-flop keeps the token while the shift counter's ZeroC is low.

### Sequence/jump counter (`ctrl_seqcnt`, `seq_counter`)

A 4-bit counter drives a 4:16 decoder, giving time steps T0..T15. Each
control signal is an OR of (instruction line AND Tk) terms; for example,
RegWrite includes R-type·T3. The counter has three controls:

* **Reset:** back to T0. Driven by the `ldT0` line, which the last step of
  every instruction asserts.
* **Load:** a micro-jump to the jump address. Driven by `ldT3`, asserted
  only by sll. The jump address is 0011: bits 1 and 0 are ORs of the active
  micro-jump lines.
* **Up:** implicit. Asserted whenever neither Reset nor Load is.

Reset beats Load, and both beat Up.

### Variable-length sll (one-hot and sequence-counter cores; V4 below)

The ALU shifts by only one bit per cycle, so `sll rd, rs, sa` loops:

* **ID:** loads sa (IR[10:6]) into the 5-bit down-counter SCnt.
* **T2:**
  * ZeroC = 0: ALUOut ← A << 1, SCnt−−.
  * ZeroC = 1 (sa = 0): ALUOut ← A.
* **T3, repeated:**
  * ZeroC = 0: ALUOut ← ALUOut << 1, SCnt−−, stay in T3 (`ldT3`).
  * ZeroC = 1: RF[rd] ← ALUOut, back to T0 (`ldT0`).

These control values depend on ZeroC, so in these steps the output is not a
pure function of the state.

**Encoding rule:** the source register is in the **rs** field, and **rt must
be $zero**. The ALU has no pass-through operation, so the sa = 0 step is done
as A + B with B = $zero. This rule holds for V4 too. The FSM cores and the
microcoded V1, V1E, V2 and V3 cannot loop on ZeroC. For them, funct 0 is a
single 1-bit shift of rs.

### Micro-programmed V1 (`ctrl_micro_v1`, `ucode_rom_v1`, `ucode_dispatch`)

The 4-bit µPC addresses 13 horizontal microinstructions of 23 bits:

| bits | 22..14 | 13..12 | 11..10 | 9..8 | 7 | 6 | 5..2 | 1..0 |
|---|---|---|---|---|---|---|---|---|
| field | IorD, MemRead, MemWrite, IRWrite, RegDst, MemtoReg, RegWrite, ExtOp, ALUSrcA | ALUSrcB | ALUOp | PCSrc | PCWrCd | PCWr | µBranch address | µBranch control |

µBranch control selects the next µPC: 0 the µBranch address, 1 the external
source (tied to 0), 2 the dispatch map of the opcode, 3 µPC+1.

The dispatch map sends R to 2, ORI to 4, LW to 6, SW to 9, BEQ to 11, J to
12, and any other opcode to 0. Fetch uses code 3, decode code 2, and the
last step of every instruction uses µBranch address 0 with code 0. The
select never looks at datapath status, so V1 cannot run the looping sll or
take exceptions.

**Short-word variant (`EXT_IF = 1`, `ucode_rom_v1e`).** In V1 the 4-bit
µBranch address field only ever holds 0000, the fetch address. If the mux's
external source input carries that address instead, the field can go. The
words shrink to 19 bits, and the last step of each instruction uses code 1
instead of code 0. The core ties the external source to 0, and
`CU_MICRO_V1E` selects this variant. Its timing is identical to V1.

### Micro-programmed V2 (`ctrl_micro_v2`, `ucode_rom_v2`, `jump_logic_v2`)

V2 keeps the 17 datapath bits but replaces the two sequencing fields with a
3-bit next-address code, giving 20-bit words. The sequencing mux takes the
absolute fetch address, the dispatch map, µPC and µPC+1. The jump logic
picks among them:

| code | next µPC |
|---|---|
| next | µPC+1 |
| spin | Busy ? µPC : µPC+1 |
| fetch | absolute |
| dispatch | map(opcode) |
| feqz | Zero ? absolute : µPC+1 |
| fnez | Zero ? µPC+1 : absolute |

LW Memory uses `spin`, so a load waits while the memory is busy
(`mem_busy`). The `feqz` and `fnez` codes exist in the jump logic, but no
microinstruction in this instruction set uses them.

Because ALUOut is rewritten every cycle, a spinning LW Memory step would
lose its address. So the V2 word for that step also keeps the ALU computing
A + S_Ext(imm). The address stays valid, and MDR holds the word read in the
last (not busy) cycle.

### Micro-programmed V3 (`ctrl_micro_v3`, `ucode_rom_v3`, `ucode_dispatch_v3`)

V3's sequencing mux has four inputs: µPC+1, two opcode maps MAP1 and MAP2,
and the fetch address. A 2-bit code in each microword selects the input
unconditionally (0 µPC+1, 1 MAP1, 2 MAP2, 3 fetch).

The second map lets one microinstruction serve several instructions. Here
LW and SW share their address computation, as in FSM2:

* decode dispatches through MAP1: R 2, ORI 4, LW and SW 6, BEQ 10, J 11;
* the shared address step 6 dispatches through MAP2: LW 7, SW 9.

So V3 uses 12 words instead of 13, and it matches FSM2 cycle for cycle.
V3 is meant for vertical microcode, with encoded data-path fields. No
encoding is specified for them, so this build keeps the 17 one-bit-per-signal
data-path bits of V1. Words are 19 bits.

### Micro-programmed V4 (`ctrl_micro_v4`, `ucode_rom_v4`)

V1 cannot run sll because its select never looks at the datapath. V4 keeps
V1's four mux inputs (µBranch address, external source, dispatch map,
µPC+1) and adds a condition code to each microword:

| code | condition |
|---|---|
| 0 | always |
| 1 | ZeroC |
| 2 | not ZeroC |
| 3 | ALU Zero (unused by this microcode) |

If the condition holds, the µBranch control field picks the next address,
as in V1. Otherwise the sequencer falls through to µPC+1. Each word is
28 bits:

* 17 V1 data-path bits;
* ALUSrcA bit 1, SCWrite and SCEn;
* the µBranch address (4 bits) and µBranch control (2 bits);
* the condition code (2 bits).

Words 0–12 are the V1 program. Decode also loads sa into SCnt, and the
decoder's sll line makes the dispatch map return 13. The sll program:

| µPC | action | next |
|---|---|---|
| 13 | ALUOut ← A (A + $zero), SCnt−− | ZeroC ? 15 : 14 |
| 14 | ALUOut ← ALUOut << 1, SCnt−− | not ZeroC ? 14 : 15 |
| 15 | RF[rd] ← ALUOut | fetch |

**Why there is an extra step.** A microword cannot change its data-path
bits with ZeroC the way the hardwired T2 step does. So word 13 always
passes A through and counts down once. The loop then works on the count
that is left: after word 13, SCnt = sa − 1. Each pass of word 14 shifts
once. The pass that sees SCnt = 0 shifts for the last time and leaves the
loop, so word 14 runs exactly sa times.

For sa = 0, word 13 sees ZeroC = 1 and goes straight to write-back. The
last count-down of an sll wraps SCnt to 31. Nothing reads SCnt before the
next decode reloads it. sll costs 4 + sa cycles, one more than on the sequence counter.

## Where this design fills gaps or departs from the lecture material

* **Decode selects PC as ALU operand A.** The control tables list ALUSrcA = 1
  in decode, but the step's own RTL is ALUOut ← PC + offset, and A is not yet
  loaded in that cycle. The RTL follows the RTL step.
* **Don't-care entries are driven as 0.** beq executes as A − B
  (ALUSrcA = 1, ALUSrcB = 0).
* **Encodings are this design's choice:** the ALUOp encoding, the FSM2 state
  numbers, the exception state numbers 13/14 and the V2 code encoding. The
  extra R-type functions `and` and `slt` are also added here.
* **Undefined opcodes without exceptions:** every unit other than FSM1
  simply returns to fetch.
* **Memory:** 1024 words per core, combinational read, write on the clock
  edge. Upper address bits wrap, so the vector 0x8000_0180 executes from byte
  address 0x180.
* **Reset:** synchronous and active-high. All datapath registers and the
  register file clear, and every control unit starts in instruction fetch.
* **V2 LW Memory:** holds the address computation while it spins (see
  above).
* **V3:** the contents of MAP1 and MAP2 and the FSM2-style microprogram are
  this design's. The data-path fields are not vertically encoded.
* **V4:** the condition codes, the fall-through-to-µPC+1 rule, the 28-bit
  word and the sll microprogram are this design's.

## Not included

* **Nano-coding and subroutine call/return sequencing:** each is only
  named, and no format is given.
* **Exception handling in the microcoded units.**
* **A vertically encoded microword for V3.**
* **Vectored interrupts and external I/O interrupts:** this design uses the
  EPC/Cause scheme instead.
* **The 1-, 2- and 3-bus datapaths and the larger instruction set** (srl,
  sra, bne, jr, jal, …).

## Files

Files in `rtl/`, one module or package per file:

* `mips_pkg.sv`: the control word, opcodes, microword layouts and the
  control words of each table row.
* `mips_multicycle_top.sv`: the nine cores side by side.
* `mips_core.sv`: the datapath plus the control unit chosen by `CTRL`.
* `mips_datapath.sv`, with `alu.sv`, `alu_control.sv`, `regfile.sv`,
  `unified_memory.sv` and `shift_counter.sv`.
* `ctrl_fsm1.sv` + `fsm1_pla.sv`, `ctrl_fsm2.sv`, `ctrl_onehot.sv`,
  `ctrl_seqcnt.sv` + `seq_counter.sv`, and `instr_decoder.sv`.
* `ctrl_micro_v1.sv` + `ucode_rom_v1.sv` (or `ucode_rom_v1e.sv`),
  `ctrl_micro_v2.sv` + `ucode_rom_v2.sv` + `jump_logic_v2.sv`,
  `ctrl_micro_v3.sv` + `ucode_rom_v3.sv` + `ucode_dispatch_v3.sv`,
  `ctrl_micro_v4.sv` + `ucode_rom_v4.sv`, and `ucode_dispatch.sv`.

In `tb/`, every module has a self-checking testbench `tb_<module>.sv`.
`tb_ref_pkg.sv` holds what they share:

* instruction encoders;
* the control table written out row by row, independently of the RTL's
  helpers;
* the expected control-word sequence per instruction and control-unit style;
* an instruction-level reference model that also counts cycles;
* a demo program. It covers every instruction, taken and not-taken
  branches, a loop, sll by 3 and by 0, an overflowing add and an undefined
  opcode. Its exception handler at 0x180 resumes the program after each
  exception.

`tb_mips_multicycle_top` runs the demo on all nine cores at the default size.
It checks each core's registers, memory word, EPC, Cause and cycles to halt
against the model. It also checks that every mechanism occurs at least
once: both exceptions, the sll repeat, the `ldT3` micro-jump, FSM2's merged
address state, V2 spinning, returns to fetch through V1E's external source,
V3's MAP2 dispatch, V4's conditional sll loop, branches, jumps, loads and
stores.

## Simulating

With Verilator 5, from the repository root. Each testbench prints
`TB_RESULT checks=N failures=M`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mips_multicycle_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/mips_pkg.sv tb/tb_ref_pkg.sv \
  tb/tb_mips_multicycle_top.sv --Mdir obj_top -o sim
./obj_top/sim
```

For another test, replace the testbench name. To load your own program,
write words into `<core>.u_dp.u_mem.mem[]` before releasing reset, as the
testbenches do. The program must follow the sll encoding rule above.

## Changing it

* **Adding an instruction to the hardwired units:** FSM1 needs new states,
  PLA terms and next-state terms. The one-hot unit needs a new chain. The
  sequence counter needs new (instruction line · Tk) terms and an `ldT0` term.
* **Microcoded units:** change the microcode words and the dispatch maps.
  The µPC is 4 bits, which leaves free words as follows:
  * V1, V1E and V2: 3;
  * V3: 4;
  * V4: none.

  To grow further, widen the µPC and the address fields.
* **New datapath lines:** add them to `ctrl_t`. Every unit starts from
  `CTRL_IDLE`, so a new field defaults to 0 everywhere.
