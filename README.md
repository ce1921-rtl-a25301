# A single-cycle processor for a small ARMv4 subset

This is a 32-bit processor that runs ARMv4 machine code directly, one instruction per clock
period. It supports only a small core of the instruction set: data processing, compare,
word load/store, and three branches. Every instruction passes through fetch, decode, execute,
memory and write-back in the same clock period. The state is the program counter, sixteen
general registers, a four-bit flag register and the data memory, and all of it updates on
the rising clock edge that ends the period. The clock period is therefore set by the slowest
instruction (a load: ROM, register read, ALU, memory read, register write-back). In exchange
the control logic is purely combinational: one equation per control signal, with no state
machine.

The organisation differs from the usual textbook ARM single-cycle datapath in one main way.
The branch target is not built by routing PC+8 through register R15 and the ALU. A dedicated
adder in the decode stage computes `PC+8 + (sign-extended imm24 << 2)`. As a result the
register file holds sixteen plain registers, the ALU never sees the PC, and a branch needs
only one control bit: take it or not.

## Instruction set

| Instruction                  | Encoding used        | Effect                                  |
|------------------------------|----------------------|-----------------------------------------|
| `ADD/SUB/AND/ORR/EOR Rd, Rn, Rm` | op 00, I = 0      | `Rd = Rn op Rm`                         |
| `ADD/SUB/AND/ORR/EOR Rd, Rn, #imm` | op 00, I = 1    | `Rd = Rn op (imm8 ror 2*rot)`           |
| `MOV Rd, Rm` / `MOV Rd, #imm` | op 00, cmd 1101     | `Rd = operand`                          |
| `CMP Rn, Rm` / `CMP Rn, #imm` | op 00, cmd 1010     | flags `C,V,N,Z` from `Rn - operand`     |
| `LDR Rd, [Rn, #imm12]`       | op 01, L = 1         | `Rd = mem[Rn + imm12]`                  |
| `STR Rd, [Rn, #imm12]`       | op 01, L = 0         | `mem[Rn + imm12] = Rd`                  |
| `B label`                    | op 10, cond 1110     | `PC = PC+8 + offset`                    |
| `BEQ label` / `BNE label`    | op 10, cond 0000/0001 | as B when Z is set / clear             |

Limits to know before writing a program for it:

* Only `CMP` writes the flags. The S bit of other data-processing instructions is ignored,
  so `ADDS` behaves like `ADD`.
* `COND` is honoured only on branches. A data-processing or memory instruction always
  executes, whatever its condition field.
* Register operands are used unshifted. The shift field, bits 11:4, is ignored.
* `LDR`/`STR` always add the unsigned 12-bit offset. The P, U, B and W bits are ignored.
* Any other instruction (TST, MUL, BL, other branch conditions, coprocessor space) writes
  nothing and falls through to PC+4.

## Datapath

```
          +--------- PCSRC mux (1 = BRADDR, 0 = PC4) <---------------+
          v                                                          |
 fetch:  PC --> irom --> INSTR ------------------------------+       |
          |--> +4 --> PC4 ------------------------------------------>+
          '--> +8 --> PC8 --+                                |       |
                            v                                v       |
 decode:  regfile A1=Rn, A2=(REGDST ? Rd : Rm), A3=Rd  ;  extimm -> barrel -> IMM32
          BRADDR = PC8 + extimm output --------------------------------+
          RD1, RD2, IMM32
                            v
 execute: B = ALUSRCB ? RD2 : IMM32 ;  F = ALU(RD1, B, ALUS) ; flags <- C,V,N,Z if CPSRWR
                            v
 memory:  dmem A = F, WD = RD2, write if MEMWR
                            v
 write-back: WD3 = REGSRC ? F : dmem.RD  --> regfile WD3 (write if REGWR)
```

The module hierarchy follows that picture:

* `scp` (top): `busmux2to1` for PCSRC, `fetch`, `decode`, `execute`, `dmem`,
  `busmux2to1` for REGSRC, and `controller`.
* `fetch`: `pc`, two `adder`s (PC+4 and PC+8), `irom`. The constant 8 has its own adder, so
  PC+8 is not chained behind PC+4 and waits for only one adder delay.
* `decode`: `regsrcbmux` (the 4-bit A2 select), `regfile`, `extimm`, `barrel`, and the
  branch `adder`.
* `execute`: `busmux2to1` for ALUSRCB, `alu`, `reg4` (the flag register).

`scp_pkg` holds the shared enums (`alus_t`, `exts_t`, `op_t`, `cmd_t`), the condition codes
and the default program.

**Operand routing.** The second register read port serves two purposes. For data processing,
`REGDST = 0` selects Rm (bits 3:0). For `STR`, `REGDST = 1` selects Rd (bits 15:12), which is
the register being stored. So `RD2` is both the ALU's register operand and the memory's write
data. The write port always targets Rd (bits 15:12).

**Immediates.** `extimm` widens the low 24 instruction bits in one of three ways, and
`barrel` then rotates the result right by `2*ROTATE`:

| `EXTS` | Extension                              | Used by            |
|--------|----------------------------------------|--------------------|
| `00`   | `{24'b0, INSTR[7:0]}`                  | data processing    |
| `01`   | `{20'b0, INSTR[11:0]}`                 | LDR / STR offset   |
| `10`   | `{{6{INSTR[23]}}, INSTR[23:0], 2'b00}` | branch offset      |

The controller passes `ROT = INSTR[11:8]` through only for immediate data-processing
instructions and gives 0 otherwise. The branch adder takes the extender's output before the
rotator. Since the rotate is 0 on branches, either point would give the same address.

**Flags.** The ALU sets N and Z from its result. C is the carry out of ADD, or "no borrow"
(A ≥ B, unsigned) for SUB, and V is signed overflow. The logic functions and pass-B give
C = V = 0. These flags go into the flag register (bits 3..0 = C, V, N, Z) only when
`CPSRWR` is high, and that happens only for CMP. A conditional branch therefore tests the Z
of the most recent CMP, which was stored at the end of an earlier clock period. It never
sees a flag from its own period, so there is no combinational path from the ALU to PCSRC.

## Control

The controller is a combinational decode of `COND = INSTR[31:28]`, `OP = INSTR[27:26]`,
`FUNCT = INSTR[25:20]`, `ROT = INSTR[11:8]` and the stored Z flag. The C, V and N inputs are
present but unused, for later condition codes. The full table (`x` = no effect):

| Instruction         | PCSRC | PCWR | REGDST | REGWR | EXTS | ROTATE | ALUSRCB | ALUS  | CPSRWR | MEMWR | REGSRC |
|---------------------|-------|------|--------|-------|------|--------|---------|-------|--------|-------|--------|
| ADD Rd, Rn, Rm      | 0 | 1 | 0 | 1 | 00 | 0   | 1 | ADD   | 0 | 0 | 1 |
| ADD Rd, Rn, #imm    | 0 | 1 | 0 | 1 | 00 | ROT | 0 | ADD   | 0 | 0 | 1 |
| AND / EOR / ORR / SUB (reg or #imm) | 0 | 1 | 0 | 1 | 00 | 0 / ROT | 1 / 0 | AND / EOR / ORR / SUB | 0 | 0 | 1 |
| MOV Rd, Rm / #imm   | 0 | 1 | 0 | 1 | 00 | 0 / ROT | 1 / 0 | PASSB | 0 | 0 | 1 |
| CMP Rn, Rm / #imm   | 0 | 1 | 0 | 0 | 00 | 0 / ROT | 1 / 0 | SUB | 1 | 0 | x |
| LDR Rd, [Rn, #imm]  | 0 | 1 | 0 | 1 | 01 | 0   | 0 | ADD   | 0 | 0 | 0 |
| STR Rd, [Rn, #imm]  | 0 | 1 | 1 | 0 | 01 | 0   | 0 | ADD   | 0 | 1 | x |
| B                   | 1 | 1 | x | 0 | 10 | 0   | x | x     | 0 | 0 | x |
| BEQ                 | Z | 1 | x | 0 | 10 | 0   | x | x     | 0 | 0 | x |
| BNE                 | !Z | 1 | x | 0 | 10 | 0  | x | x     | 0 | 0 | x |

ALUS codes: `000` ADD, `001` SUB, `010` AND, `011` ORR, `100` EOR, `101` pass B. The rules
behind the table are these:

* Only CMP writes flags.
* Only instructions with a destination register write the register file.
* Only STR writes memory.
* Branches write neither the registers nor memory.
* The PC is written every clock.

## Timing and reset

`RST` is active high and asynchronous. It clears the PC, all registers, the flags and the
whole data memory, and execution starts at ROM address 0 once it is released. After that the
processor needs no handshake: the instruction at `PC` completes on every rising edge of
`CLK`. Instruction ROM, register and data memory reads are combinational. Register, flag,
memory and PC writes happen on the rising edge.

Top-level ports: `CLK` and `RST` in. Out: the write-back bus `WD3`, every controller output,
`MEMADDR` (ALU result), `MEMDATA` (store data), `PC4`, and, for observation, `INSTR`,
`BRADDR` and `PC`.

## Parameters

| Module  | Parameter    | Default              | Meaning                                    |
|---------|--------------|----------------------|--------------------------------------------|
| `scp`, `fetch`, `irom` | `PROG_WORDS`, `PROGRAM` | 18, sumn program | ROM contents, packed `[PROG_WORDS-1:0][31:0]`, word *i* at byte address 4*i* |
| `scp`   | `DMEM_WORDS` | 64                   | data memory depth in words                 |
| `regfile` | `NREGS`    | 16                   | number of registers                        |
| most    | `WIDTH`      | 32                   | datapath width                             |

Only the 32-bit width is meaningful for the processor as a whole, since instructions are
32 bits. `WIDTH` exists so that the leaf blocks can be reused. Data memory addresses wrap at
`DMEM_WORDS`. ROM addresses past the program read `0x00000000`.

## The built-in program

The ROM holds *sumn*, which sums `i = 10, 9, ..., 1` into R9. It then tests whether the sum is
at least 32 by ANDing it with -32 (`0xFFFFFFE0`). If the sum passes, it stores 1 at byte
address 4 (data word 1). It ends in a loop that reloads that word into R6. With n = 10 the
program:

* runs 2 setup instructions, 10 loop passes of 6 instructions, then 8 more up to the store;
* performs the store on the 70th clock after reset and the first load on the 71st;
* ends with R8 = 0, R9 = 55, R10 = 32, R11 = 1, R12 = 4, R6 = 1, and data word 1 = 1.

## Where this design goes beyond its source

The overall organisation comes from the laboratory description this design follows. That
includes the block list, the port names and the stage boundaries, and the wiring of the
fetch, decode, execute and top-level schematics. It also includes the separate branch
adder, the constant-8 adder, the instruction subset, the rules for the control table, the
rule that only the L bit and opcode 01 separate loads and stores, and the sumn program. The
rest is this design's choice, because the source leaves it open:

* the polarities of PCSRC (1 = branch) and REGSRC (1 = ALU result);
* the ALUS and EXTS codes;
* the ALU flag values for logic functions;
* the reset behaviour of every storage element, including clearing the data memory;
* the 64-word data memory size;
* ignoring the condition field on non-branch instructions, and ignoring the S bit and shift
  fields;
* treating unsupported encodings as no-ops.

The control table is left blank in the source and was filled in here from its rules.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs. The
testbenches need `rtl/scp_pkg.sv` read first:

```
verilator --binary --timing --assert -Irtl -Itb rtl/scp_pkg.sv tb/tb_scp.sv --top-module tb_scp
./obj_dir/Vtb_scp
```

* `tb_scp` runs four processors side by side. One has the default sumn ROM. Two have sumn
  with n = 5 (the sum is below 32, so the store is skipped) and with n = 0 (the loop exits
  at once). The fourth has a 20-word program defined in the testbench, which uses rotated immediates (`0xFF ror 8`,
  `0x3F ror 28`), register operands, ORR, EOR, LDR/STR at a non-zero offset, and BEQ/BNE both
  taken and not taken. On every clock each processor is checked against an instruction-level
  model in the testbench: the PC, the write enables, and the value and address of every
  register or memory write. At the end it checks the hand-worked final state, and that each
  mechanism (taken and untaken branches, B, CMP, load, store, non-zero rotate, register and
  immediate operands) occurred.
* `tb_scp_full` runs the top with no parameter overrides. It checks the store and load clock
  numbers (70 and 71), the number of taken branches (19 in 90 clocks) and the final values.
* The leaf testbenches compare against independent arithmetic: 64-bit sums for the adder
  and the ALU flags, bit-by-bit rotation for `barrel`, array models for `regfile` and
  `dmem`, and a signal-by-signal control table for `controller`.

All testbenches run in well under a second. To run your own program, pass `PROG_WORDS` and
`PROGRAM` to `scp`, as `tb_scp` does for its second instance.
