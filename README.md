# Multicycle MIPS processor with a microcoded controller

This is a small 32-bit MIPS processor that executes each instruction over
several clock cycles instead of one. Because the steps of an instruction are
spread over time, one ALU does every addition (PC + 4, branch target, memory
address, arithmetic) and one memory holds both the program and its data. The
price is a controller that must remember where in an instruction it is. Here
that controller is a **microprogram**: a 16-word ROM of 18-bit control words
stepped through by a 4-bit microprogram counter, with two small opcode-indexed
"dispatch" tables for the branch points.

Supported instructions: `lw`, `sw`, R-type `add`, `sub`, `and`, `or`, `slt`,
`beq`, `j` and `addi`. Execution starts at address 0 after reset.

## The four units

| unit   | module   | contents |
|--------|----------|----------|
| cunit  | `cunit`  | microcode sequencer, ALU decoder, PC-enable logic |
| iunit  | `iunit`  | PC register and PC source mux |
| eunit  | `eunit`  | register file, A/B registers, sign extend, shift-by-2, ALU source muxes, ALU, ALUOut register |
| munit  | `munit`  | address mux, shared instruction/data memory, instruction register (IR), memory data register (MDR) |

`mips_multicycle` wires them together. The opcode seen by the controller is
`Instruction[31:26]` and the funct code is only its low four bits,
`Instruction[3:0]`. That is enough to tell apart the five R-type operations.

Datapath select codes:

| control   | 0 / 00              | 1 / 01                 | 10                           | 11 |
|-----------|---------------------|------------------------|------------------------------|----|
| IorD      | address = PC        | address = ALUOut       |                              |    |
| ALUSrcA   | SrcA = PC           | SrcA = A               |                              |    |
| ALUSrcB   | SrcB = B            | SrcB = 4               | sign-extended imm            | imm << 2 |
| RegDst    | write rt            | write rd               |                              |    |
| MemtoReg  | write ALUOut        | write MDR              |                              |    |
| PCSource  | PC ← ALUResult      | PC ← ALUOut            | PC ← {PC[31:28], instr[25:0], 00} | (unused, acts as 00) |

A, B and ALUOut are loaded on every clock edge. The PC loads only when
`PCEnable = PCWrite | (PCWriteCond & Zero)`. The IR loads on `IRWrite` and the
MDR on `MemRead`.

## The microprogram

Each state is one ROM word. From the most significant bit down, the fields are:

```
17:16 ALUOp   15 ALUSrcA   14:13 ALUSrcB   12 RegWrite   11 RegDst
10 MemtoReg   9 IorD   8 MemRead   7 MemWrite   6 IRWrite
5:4 PCSource   3 PCWrite   2 PCWriteCond   1:0 Seq
```

This is `mips_mc_pkg::microword_t`. The ROM contents are below. Fields the
state does not use are stored as 0.

| state | word  | what it does | Seq |
|-------|-------|--------------|-----|
| 0 | 02148 | fetch: IR ← Mem[PC], PC ← PC+4 | next |
| 1 | 06002 | decode: A, B ← registers; ALUOut ← PC + (imm<<2) | dispatch 1 |
| 2 | 0C003 | lw/sw: ALUOut ← A + imm | dispatch 2 |
| 3 | 00300 | lw: MDR ← Mem[ALUOut] | next |
| 4 | 01401 | lw: rt ← MDR | fetch |
| 5 | 00281 | sw: Mem[ALUOut] ← B | fetch |
| 6 | 28000 | R-type: ALUOut ← A op B | next |
| 7 | 01801 | R-type: rd ← ALUOut | fetch |
| 8 | 18015 | beq: A − B; PC ← ALUOut if Zero | fetch |
| 9 | 00029 | j: PC ← jump address | fetch |
| A | 0C000 | addi: ALUOut ← A + imm | next |
| B | 01001 | addi: rt ← ALUOut | fetch |

The two-bit `Seq` field picks the next microprogram address (`address_select`):

| Seq | next state |
|-----|------------|
| 00 | current state + 1 |
| 01 | 0 (fetch the next instruction) |
| 10 | Dispatch1[opcode]: R-type → 6, lw/sw → 2, beq → 8, j → 9, addi → A |
| 11 | Dispatch2[opcode]: lw → 3, sw → 5 |

An opcode that is not in a dispatch table maps to state 0, so an unknown
instruction does nothing and the processor fetches the next one.

`ALUOp` goes through `alu_decoder`. 00 gives add and 01 gives subtract. 10
means "look at funct": `0000` is add, `0010` sub, `0100` and, `0101` or, and
`1010` slt. The resulting 3-bit ALUControl drives `alu`. Bit 2 of ALUControl
inverts B and adds 1. Bits 1:0 select and, or, sum or set-less-than. slt takes
the sign bit of A − B, which is correct as long as the subtraction does not
overflow.

## Timing

All state is held in rising-edge flip-flops. Reset is asynchronous and active
high. It clears the microprogram counter, the PC, IR, MDR, A, B and ALUOut. It
does not clear the register file or the memory. Memory and register-file reads
are combinational, so a word read in one state is captured by IR or MDR at the
end of that same state. The instruction register therefore changes only at the
end of state 0, and Op/Funct are stable from state 1 on.

Cycles per instruction: beq and j take 3, R-type, addi and sw take 4, and lw
takes 5.

## Interface of the top level

`mips_multicycle #(MEM_WORDS = 64)` has inputs `Clk` and `Reset`. Its outputs
let you watch the processor: `PC`, `Instruction` (the IR), `State`,
`ALUResult`, `Zero`, `ALUOut`, `WriteData` (the B register, i.e. store data)
and `MemWrite`. There is no port for loading a program. A testbench writes the
memory array `u_munit.u_mem.mem` directly, for example with `$readmemh`, before
it releases reset.

## Choices this design makes

The processor's structure, unit ports, microcode table, sequencing codes,
Dispatch2 contents and the 4-bit state / 18-bit word sizes are those of the
architecture being modelled. The following were not specified and are choices
of this implementation:

- The memory is 64 words (256 bytes) and only accepts word accesses. The low two
  address bits and the bits above bit 7 are ignored.
- Dispatch1 contents were derived from what each state does.
- The ALUControl encoding and the ALU structure are the usual ones for this
  processor.
- PCSource 11 behaves like 00.
- The MDR loads only while MemRead is high, and the IR only while IRWrite is high.
- The register file has 32 registers, no reset, and `$0` reads 0.
- `State` on the controller and `SrcA`/`SrcB` on the execution unit are extra
  outputs that exist only so the processor can be observed.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops. Run them from the project
root (the testbenches load `tb/*.hex` by relative path):

```
verilator --binary --timing --assert -Irtl -Itb rtl/mips_mc_pkg.sv \
    tb/tb_mips_multicycle.sv --top tb_mips_multicycle -Mdir obj_dir
./obj_dir/Vtb_mips_multicycle
```

- `tb_mips_multicycle` runs the nine-instruction test program below at the
  default size. It compares 37 cycles against a hand-derived trace (state, PC,
  IR, SrcA, SrcB, ALUResult, Zero), then checks the final registers and
  memory. It also counts every microcode state, both dispatches, the taken
  branch, the jump and the store, and fails if any of them never happens.

  ```
  00 addi $t0,$0,0x42    20080042     14 sw  $t3,0x2C($0)   ac0b002c
  04 j    later          08000008     18 lw  $t4,0x28($t1)  8d2c0028
  08 addi $t1,$0,4       20090004     1C done: j done       08000007
  0C sub  $t2,$t0,$t1    01095022     20 later: beq $0,$0,earlier  1000fff9
  10 or   $t3,$t2,$t0    01485825
  ```

  It ends looping at `done` with `$t4 = 0x7E`.
- `tb_mips_instr_mix` covers add, and, slt, negative immediates, and both a
  taken and a not-taken beq. It also checks the total cycle count.
- The unit testbenches (`tb_cunit`, `tb_eunit`, `tb_iunit`, `tb_munit`) and
  the leaf testbenches (`alu`, `regfile`, `shared_memory`, ROMs, sequencer,
  decoder) check against reference models or tables written in the
  testbench. `tb/ucode_table.svh` holds the microcode table as text, with
  don't-cares, for the controller tests.

## Changing it

- **Add an instruction**: add its states to `microcode_rom` (words C–F are
  free) and its opcode to `dispatch1_rom` (and `dispatch2_rom` if it shares
  the memory-address state). Widen the mux or ALU only if it needs a new
  operand or operation.
- **Memory size**: set `MEM_WORDS` on `mips_multicycle`. The word index is
  taken from address bits `[log2(MEM_WORDS)+1 : 2]`.
