// main_control: first half of the control unit. Decodes the 6-bit opcode
// (instr[31:26]) into one row of control signals (mips_pkg::main_ctrl_t):
//   sh_b      store size for data memory (11 word, 01 half, 00 byte)
//   lbu, lhu  zero- instead of sign-extend a loaded byte / half-word
//   regwrite  write the register file
//   regdst    destination register: 00 rt, 01 rd, 10 $ra (r31)
//   alusrc    ALU operand B: 00 rt, 01 sign-ext imm, 10 zero-ext imm,
//             11 imm << 16 (lui)
//   beq, bne, blez, bltz, bgtz   branch kind
//   memwrite  write data memory
//   memtoreg  register write data: 00 ALU, 01 word, 10 half, 11 byte
//   jump, jal jump to the 26-bit target, and link
//   aluop     3-bit operation class for the R-type control (110: use funct)
// Purely combinational. The rows follow the processor's opcode table,
// including its blez = 000111 and bgtz = 000110; bltz is decoded from the
// opcode alone. Don't-care entries are driven as 0 and unknown opcodes
// give an all-zero row (no writes, no branch): both this design's choices.
module main_control
  import mips_pkg::*;
(
  input  logic [5:0]  op,
  output main_ctrl_t  mc
);

  always_comb begin
    mc       = '0;
    mc.sh_b  = SZ_WORD;
    mc.aluop = AOP_ADD;
    unique case (opcode_e'(op))
      OP_RTYPE: begin
        mc.regwrite = 1'b1; mc.regdst = RD_RD; mc.aluop = AOP_FUNCT;
      end
      OP_LW: begin
        mc.regwrite = 1'b1; mc.alusrc = SRC_SIMM; mc.memtoreg = WB_WORD;
      end
      OP_SW: begin
        mc.sh_b = SZ_WORD; mc.alusrc = SRC_SIMM; mc.memwrite = 1'b1;
      end
      OP_SH: begin
        mc.sh_b = SZ_HALF; mc.alusrc = SRC_SIMM; mc.memwrite = 1'b1;
      end
      OP_SB: begin
        mc.sh_b = SZ_BYTE; mc.alusrc = SRC_SIMM; mc.memwrite = 1'b1;
      end
      OP_BEQ:  begin mc.beq  = 1'b1; mc.aluop = AOP_SUB; end
      OP_BNE:  begin mc.bne  = 1'b1; mc.aluop = AOP_SUB; end
      OP_BLEZ: begin mc.blez = 1'b1; mc.aluop = AOP_SUB; end
      OP_BLTZ: begin mc.bltz = 1'b1; mc.aluop = AOP_SUB; end
      OP_BGTZ: begin mc.bgtz = 1'b1; mc.aluop = AOP_SUB; end
      OP_ADDI, OP_ADDIU: begin
        mc.regwrite = 1'b1; mc.alusrc = SRC_SIMM;
      end
      OP_J: begin
        mc.jump = 1'b1;
      end
      OP_JAL: begin
        mc.regwrite = 1'b1; mc.regdst = RD_RA; mc.jump = 1'b1; mc.jal = 1'b1;
      end
      OP_ANDI: begin mc.regwrite = 1'b1; mc.alusrc = SRC_ZIMM; mc.aluop = AOP_AND; end
      OP_ORI:  begin mc.regwrite = 1'b1; mc.alusrc = SRC_ZIMM; mc.aluop = AOP_OR;  end
      OP_XORI: begin mc.regwrite = 1'b1; mc.alusrc = SRC_ZIMM; mc.aluop = AOP_XOR; end
      OP_SLTI, OP_SLTIU: begin
        mc.regwrite = 1'b1; mc.alusrc = SRC_SIMM; mc.aluop = AOP_SLT;
      end
      OP_LUI: begin
        mc.regwrite = 1'b1; mc.alusrc = SRC_LUI;
      end
      OP_LB:  begin mc.regwrite = 1'b1; mc.alusrc = SRC_SIMM; mc.memtoreg = WB_BYTE; end
      OP_LBU: begin mc.regwrite = 1'b1; mc.alusrc = SRC_SIMM; mc.memtoreg = WB_BYTE; mc.lbu = 1'b1; end
      OP_LH:  begin mc.regwrite = 1'b1; mc.alusrc = SRC_SIMM; mc.memtoreg = WB_HALF; end
      OP_LHU: begin mc.regwrite = 1'b1; mc.alusrc = SRC_SIMM; mc.memtoreg = WB_HALF; mc.lhu = 1'b1; end
      default: ;
    endcase
  end

endmodule
