# Single-cycle 32-bit MIPS processor with multiply/divide

This is a 32-bit MIPS-style RISC processor that completes every instruction in
one clock cycle. The cycle reads the instruction, decodes it, reads the
registers, runs the ALU or the multiply/divide unit, accesses data memory and
writes back. There is no pipeline, no hazard logic and no stall. The price is a
clock period long enough for the slowest instruction.

Besides the usual single-cycle core (add, sub, logic, slt, lw, sw, beq, j), it
provides:

- the full set of logical and shift operations, including variable shifts;
- byte and half-word loads and stores, signed and unsigned;
- the branches bne, blez, bltz and bgtz;
- jal, jr and jalr;
- a combinational multiply/divide unit with hi/lo registers (mult, multu, div,
  divu, mfhi, mflo, mthi, mtlo).

The processor sits between a separate instruction memory and data memory
(Harvard arrangement). Each memory holds 64 words of 32 bits.

## Instruction formats

| format | 31:26 | 25:21 | 20:16 | 15:11 | 10:6  | 5:0   |
|--------|-------|-------|-------|-------|-------|-------|
| R      | op    | rs    | rt    | rd    | shamt | funct |
| I      | op    | rs    | rt    | imm (15:0) |  |       |
| J      | op    | addr (25:0) |  |       |       |       |

## What happens in one cycle

`datapath.sv` holds the whole cycle:

1. The PC (`pc_reg`) addresses the instruction memory (`imem`). The
   instruction comes back combinationally.
2. Register file (`regfile`, 32 × 32 bits): rs and rt are read on two
   combinational ports. Register 0 always reads 0.
3. Operand B of the ALU is chosen by `alusrc` from one of four values:
   - rt;
   - the sign-extended immediate (`sign_ext`);
   - the zero-extended immediate (`zero_ext`), for andi/ori/xori;
   - the immediate shifted left by 16 bits, for lui, which adds it to `$0`.
4. The ALU (`alu`) computes the result. The result is also the data-memory
   byte address.
5. In parallel, the multiply/divide unit (`muldiv`) works on rs and rt. Its
   64-bit result is stored in `hilo` at the clock edge.
6. The register write data is chosen in two steps:
   - `memtoreg` picks the ALU result, the loaded word, the loaded half-word or
     the loaded byte. Loaded halves and bytes are sign-extended, or
     zero-extended for lbu/lhu.
   - Then hi (mfhi), lo (mflo) or pc+4 (jal, jalr) override that choice.
7. The destination register is rt, rd or r31 (jal).
8. The next PC is chosen by priority:
   - rs, for jr and jalr;
   - otherwise the jump target `{pc+4[31:28], addr, 00}`;
   - otherwise, if the branch is taken, `pc+4 + (simm << 2)`;
   - otherwise `pc+4`.

   There is no branch delay slot.

Branch decisions reuse the ALU's subtraction, because every branch has ALUop
"sub":

- beq and bne test the zero flag of rs − rt.
- blez, bltz and bgtz have rt = 0 in their encoding, so the ALU computes
  rs − $0 = rs. Their conditions come from the zero flag and bit 31 of the
  result:
  - blez: zero or negative;
  - bltz: negative;
  - bgtz: neither zero nor negative.

## The two-level decoder

The control unit (`control_unit.sv`) has two combinational decoders:
`main_control` decodes the opcode, and `rtype_control` decodes ALUop and
funct. The signal bundles are the structs `main_ctrl_t` and `rtype_ctrl_t` in
`mips_pkg.sv`.

### Main control

The main control turns the opcode into one row of this table. `–` is a
don't-care, driven as 0.

| instr | opcode | sh_b | lbu | lhu | regwrite | regdst | alusrc | branch | memwrite | memtoreg | jump | jal | ALUop |
|-------|--------|------|-----|-----|----------|--------|--------|--------|----------|----------|------|-----|-------|
| R-type| 000000 | –  | – | – | 1 | 01 rd | 00 rt   | –    | 0 | 00 alu  | 0 | 0 | 110 funct |
| lw    | 100011 | –  | – | – | 1 | 00 rt | 01 simm | –    | 0 | 01 word | 0 | 0 | 000 add |
| sw    | 101011 | 11 | – | – | 0 | –     | 01 simm | –    | 1 | –       | 0 | 0 | 000 add |
| sh    | 101001 | 01 | – | – | 0 | –     | 01 simm | –    | 1 | –       | 0 | 0 | 000 add |
| sb    | 101000 | 00 | – | – | 0 | –     | 01 simm | –    | 1 | –       | 0 | 0 | 000 add |
| lh/lhu| 100001/100101 | – | 0 | 0/1 | 1 | 00 rt | 01 simm | – | 0 | 10 half | 0 | 0 | 000 add |
| lb/lbu| 100000/100100 | – | 0/1 | 0 | 1 | 00 rt | 01 simm | – | 0 | 11 byte | 0 | 0 | 000 add |
| beq   | 000100 | – | – | – | 0 | – | 00 rt | beq  | 0 | – | 0 | 0 | 001 sub |
| bne   | 000101 | – | – | – | 0 | – | 00 rt | bne  | 0 | – | 0 | 0 | 001 sub |
| blez  | **000111** | – | – | – | 0 | – | 00 | blez | 0 | – | 0 | 0 | 001 sub |
| bgtz  | **000110** | – | – | – | 0 | – | 00 | bgtz | 0 | – | 0 | 0 | 001 sub |
| bltz  | 000001 | – | – | – | 0 | – | 00 | bltz | 0 | – | 0 | 0 | 001 sub |
| addi, addiu | 001000, 001001 | – | – | – | 1 | 00 rt | 01 simm | – | 0 | 00 | 0 | 0 | 000 add |
| slti, sltiu | 001010, 001011 | – | – | – | 1 | 00 rt | 01 simm | – | 0 | 00 | 0 | 0 | 101 slt |
| andi  | 001100 | – | – | – | 1 | 00 rt | 10 zimm | – | 0 | 00 | 0 | 0 | 010 and |
| ori   | 001101 | – | – | – | 1 | 00 rt | 10 zimm | – | 0 | 00 | 0 | 0 | 011 or  |
| xori  | 001110 | – | – | – | 1 | 00 rt | 10 zimm | – | 0 | 00 | 0 | 0 | 100 xor |
| lui   | 001111 | – | – | – | 1 | 00 rt | 11 imm<<16 | – | 0 | 00 | 0 | 0 | 000 add |
| j     | 000010 | – | – | – | 0 | – | – | – | 0 | – | 1 | 0 | – |
| jal   | 000011 | – | – | – | 1 | 10 r31 | – | – | 0 | – | 1 | 1 | – |

An unknown opcode gives an all-zero row: no write, no branch and no jump.

### R-type control

The R-type control maps ALUop directly to an ALU code: add, sub, and, or, xor
or slt. For ALUop 11x it decodes funct instead. It produces the 6-bit ALU code
and the side signals jr, jalr, mult, div, sign, mthi, mtlo, mfhi and mflo:

- add, addu, sub, subu, and, or, xor, nor, slt, sltu: an ALU code only.
- sll, srl, sra, sllv, srlv, srav: an ALU code only.
- jr (001000): jr.
- jalr (001001): jr and jalr.
- mult and div: mult or div, plus sign.
- multu and divu: mult or div, without sign.
- mthi, mtlo, mfhi, mflo: their own signals.

Every R-type instruction has regwrite = 1, including jr, mult, div, mthi and
mtlo. In their normal encodings rd is `$0`, so the write goes nowhere.

An assertion in `control_unit` checks that an instruction never selects two
next-PC sources.

## The extended ALU

The 6-bit ALU code is decoded by fields:

- Bit 4 inverts B and sets the adder's carry-in. The adder then computes
  A − B, and the logic unit works on B'.
- Bit 5 takes the shift amount from A[4:0] instead of shamt.
- Bits 3:0 pick the result.

| code | result | code | result |
|------|--------|------|--------|
| 000000 | A and B | 010000 | A and B' |
| 000001 | A or B  | 010001 | A or B'  |
| 000010 | A + B   | 010010 | A − B    |
| 000100 | B << shamt | 010011 | slt (signed) |
| 000101 | A xor B | 010101 | A xor B' |
| 000110 | A nor B | 010110 | A nor B' |
| 000111 | B >> shamt (logical) | 100100 | B << A[4:0] |
| 001000 | B >>> shamt (arith.) | 100111 | B >> A[4:0] |
|        |         | 101000 | B >>> A[4:0] |

Codes not in this table give 0. slt takes the sign of A − B and corrects it
for signed overflow. `zero` is 1 when the result is 0.

## Multiply/divide and hi/lo

`muldiv` is fully combinational:

- When `mult` is set, `y = a × b`, a 64-bit product.
- When `div` is set, `y = {remainder, quotient}`.
- `sign` selects two's-complement operands instead of unsigned ones.

`hilo` stores `y[63:32]` in hi and `y[31:0]` in lo.

The multiplier widens each operand by one bit: its sign bit, or 0 when
unsigned. One signed 33 × 33 multiply then covers both cases. Division works
on magnitudes in one unsigned divider, and then corrects the signs:

- The quotient is negated when the operand signs differ, so it truncates
  toward zero.
- The remainder takes the sign of the dividend.
- −2³¹ ÷ −1 gives 0x80000000 with remainder 0.
- Division by zero gives quotient all ones and remainder = dividend, before
  the sign correction. MIPS leaves this result undefined.

Because the unit is combinational, the 32-bit divider is by far the longest
path in the design and sets the clock period.

## Memories and byte lanes

`imem` is a read-only array loaded with `$readmemh` from `IMEM_FILE`. Words
the file does not fill read as 0, which is a no-op.

`dmem` is a byte-addressed array of words:

- It always returns the whole word that holds the addressed byte. The datapath
  picks the byte or half-word out of that word.
- Stores write the lanes selected by `size_in`: `11` word, `01` half-word,
  `00` byte.
- Lanes are big-endian: byte offset 0 is bits 31:24.
- Low address bits are ignored on misaligned accesses. There are no alignment
  traps.

## Departures from standard MIPS

The design follows its own decode tables, which differ from the MIPS32
definition in a few places:

- **blez is opcode 000111 and bgtz is 000110.** In MIPS32 these two are the
  other way round. Code from a standard assembler will swap these two
  branches.
- **sltu and sltiu compare as signed.** They use the same ALU code as slt.
- addu and subu are the same as add and sub. No instruction raises an
  overflow exception. The processor has no exceptions or interrupts at all.
- bltz decodes on the opcode alone. bgez, which shares opcode 000001, is not
  supported and executes as bltz.
- There are no branch or load delay slots.

Choices made by this design where the tables are silent:

- Reset is synchronous and active high:
  - The PC, hi and lo go to 0.
  - Register, hi/lo and memory writes are held off while reset is asserted.
  - The register file is not reset.
- Register 0 is hard-wired to zero.
- Byte lanes are big-endian.
- The result-multiplexer order and next-PC priority are as described above.
- Unused ALU codes give 0.
- The division-by-zero result is as described above.

## The demonstration program

By default, `imem` loads `rtl/mult_prog.hex`. The program calls a procedure
that multiplies 0xfffffffe by 4 with `multu`. It stores lo (0xfffffff8) at byte
address 0x80 and hi (0x00000003) at 0x84.

The `jal` word in this program is `0c000007`. It jumps to 0x1c, one word past
the procedure's first instruction (`multu` at 0x18). The run therefore goes
like this:

1. The first call skips the multiply. The procedure returns.
2. The processor stores the reset values of hi and lo (0) in cycles 7 and 8
   after reset.
3. Execution falls through into the procedure. The processor multiplies,
   returns and stores the correct product in cycles 13 and 14.
4. The program then loops, storing the same values again and again.

Replace the word with `0c000006` if the first pass should multiply too.

## Files

| file | contents |
|------|----------|
| `rtl/mips_pkg.sv` | opcodes, funct codes, ALU codes, control structs |
| `rtl/mips_top.sv` | processor + instruction and data memories (top) |
| `rtl/mips.sv` | processor: control unit + datapath |
| `rtl/control_unit.sv` | `main_control` + `rtype_control` |
| `rtl/main_control.sv`, `rtl/rtype_control.sv` | the two decoders |
| `rtl/datapath.sv` | PC, register file, extenders, ALU, mul/div, hi/lo, muxes, branch logic |
| `rtl/pc_reg.sv`, `rtl/regfile.sv`, `rtl/hilo.sv` | state |
| `rtl/alu.sv`, `rtl/muldiv.sv` | arithmetic |
| `rtl/sign_ext.sv`, `rtl/zero_ext.sv`, `rtl/mux_n.sv` | small datapath elements |
| `rtl/imem.sv`, `rtl/dmem.sv`, `rtl/mult_prog.hex` | memories and default program |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_mips_top_full.sv` | default-size top running the demonstration program |
| `tb/mips_ref_pkg.sv` | encoders, instruction-level reference model, program generator |

Parameters of `mips_top`:

- `IMEM_WORDS` (default 64);
- `DMEM_WORDS` (default 64);
- `IMEM_FILE` (default `rtl/mult_prog.hex`, a path relative to the directory
  the simulator runs in; `""` leaves the memory zeroed).

## Simulating

Run from the directory that holds `rtl/` and `tb/`. For example, the
demonstration program:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    +libext+.sv rtl/mips_pkg.sv tb/tb_mips_top_full.sv --top-module tb_mips_top_full
./obj_dir/Vtb_mips_top_full
```

For the random end-to-end test, add `tb/mips_ref_pkg.sv` after
`rtl/mips_pkg.sv` and use `tb_mips_top`. This also applies to `tb_mips` and
`tb_datapath`. Every testbench ends by printing
`TB_RESULT checks=N failures=M`.

## How it is verified

- **Decoders.** `tb_main_control` and `tb_rtype_control` hold the decode
  tables as strings, don't-cares included. They compare every row, and
  `tb_main_control` also checks that unknown opcodes do nothing.
- **Control unit.** `tb_control_unit` checks the two decoders together,
  instruction by instruction.
- **ALU.** `tb_alu` checks all 64 codes on corner and random operands.
- **Multiply/divide.** `tb_muldiv` checks all four operations against 64-bit
  arithmetic, including division by zero and −2³¹ ÷ −1.
- **Storage and small elements.** The register file, data memory, hi/lo, PC,
  multiplexer and extenders are checked against simple behavioural models.
  The extenders are checked exhaustively.
- **Whole processor.** `tb_datapath`, `tb_mips` and `tb_mips_top` run
  generated programs in lockstep with an instruction-level reference model
  (`mips_ref_pkg::mips_iss`). Every cycle they compare the PC, all registers
  and hi/lo, and they compare the data memory at the end. This also checks
  that exactly one instruction completes per cycle.
  - Each program starts with a directed part. It takes every branch kind both
    ways and runs a backward loop, j, jal/jr and jalr.
  - Then come random ALU, shift, immediate, load/store and multiply/divide
    instructions.
  - Each program ends with a division by zero and the signed-overflow divide.
  - The testbenches count how often each instruction class ran, and fail if
    one never did.
- **Demonstration program.** `tb_mips_top_full` runs the default top and
  program. It checks the cycle, address and data of each store and the final
  memory words.

The reference model was written from the instruction semantics and shares
only the encodings with the RTL. If the tables are wrong, both will agree.
The decoder testbenches, written from the tables, are the check on that.
