// rtype_control: second half of the control unit. From the 3-bit ALUop of
// the main control and the funct field (instr[5:0]) it produces the 6-bit
// ALU control code and the signals of the R-type instructions that do more
// than an ALU operation: jr, jalr, mult, div, sign (signed mult/div), mthi,
// mtlo, mfhi, mflo (mips_pkg::rtype_ctrl_t).
//   ALUop 000..101  add, sub, and, or, xor, slt; funct ignored
//   ALUop 11x       decode funct (the main control only ever sends 110)
// Purely combinational; the rows follow the processor's funct table. As
// there, addu/subu share add/sub, and sltu (and sltiu, via ALUop 101) use
// the signed slt code. Unknown funct codes give add with no side effects
// (this design's choice).
module rtype_control
  import mips_pkg::*;
(
  input  logic [2:0]   aluop,
  input  logic [5:0]   funct,
  output rtype_ctrl_t  rc
);

  always_comb begin
    rc            = '0;
    rc.alucontrol = ALU_ADD;
    unique case (aluop)
      AOP_ADD: rc.alucontrol = ALU_ADD;
      AOP_SUB: rc.alucontrol = ALU_SUB;
      AOP_AND: rc.alucontrol = ALU_AND;
      AOP_OR:  rc.alucontrol = ALU_OR;
      AOP_XOR: rc.alucontrol = ALU_XOR;
      AOP_SLT: rc.alucontrol = ALU_SLT;
      AOP_FUNCT, AOP_NA: begin
        begin
          unique case (funct_e'(funct))
            F_ADD, F_ADDU: rc.alucontrol = ALU_ADD;
            F_SUB, F_SUBU: rc.alucontrol = ALU_SUB;
            F_AND:         rc.alucontrol = ALU_AND;
            F_OR:          rc.alucontrol = ALU_OR;
            F_XOR:         rc.alucontrol = ALU_XOR;
            F_NOR:         rc.alucontrol = ALU_NOR;
            F_SLT, F_SLTU: rc.alucontrol = ALU_SLT;
            F_SLL:         rc.alucontrol = ALU_SLL;
            F_SRL:         rc.alucontrol = ALU_SRL;
            F_SRA:         rc.alucontrol = ALU_SRA;
            F_SLLV:        rc.alucontrol = ALU_SLLV;
            F_SRLV:        rc.alucontrol = ALU_SRLV;
            F_SRAV:        rc.alucontrol = ALU_SRAV;
            F_JR:          rc.jr = 1'b1;
            F_JALR:        begin rc.jr = 1'b1; rc.jalr = 1'b1; end
            F_MULT:        begin rc.alucontrol = ALU_AND; rc.mult = 1'b1; rc.sign = 1'b1; end
            F_MULTU:       begin rc.alucontrol = ALU_AND; rc.mult = 1'b1; end
            F_DIV:         begin rc.alucontrol = ALU_AND; rc.div  = 1'b1; rc.sign = 1'b1; end
            F_DIVU:        begin rc.alucontrol = ALU_AND; rc.div  = 1'b1; end
            F_MTHI:        begin rc.alucontrol = ALU_AND; rc.mthi = 1'b1; end
            F_MTLO:        begin rc.alucontrol = ALU_AND; rc.mtlo = 1'b1; end
            F_MFHI:        begin rc.alucontrol = ALU_AND; rc.mfhi = 1'b1; end
            F_MFLO:        begin rc.alucontrol = ALU_AND; rc.mflo = 1'b1; end
            default:       ;
          endcase
        end
      end
      default: ;
    endcase
  end

endmodule
