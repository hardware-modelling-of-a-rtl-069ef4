// tb_control_unit: the two-level control unit as a whole. For each
// instruction of the set, given as (opcode, funct), it checks the ALU code
// that reaches the ALU together with the register/memory write enables,
// the jump and R-type side signals, written here per instruction:
//   op funct alucontrol regwrite memwrite jump jal jr jalr mult div sign mthi mtlo mfhi mflo
// A funct of xxxxxx is randomised: it must not matter.
`timescale 1ns/1ps
module tb_control_unit;
  import mips_pkg::*;
  logic [5:0] op, funct;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.op(op), .funct(funct), .ctrl(ctrl));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string rows [] = '{
    "000000 100000 000010 1 0 0 0 0 0 0 0 0 0 0 0 0",  // add
    "000000 100011 010010 1 0 0 0 0 0 0 0 0 0 0 0 0",  // subu
    "000000 100111 000110 1 0 0 0 0 0 0 0 0 0 0 0 0",  // nor
    "000000 101011 010011 1 0 0 0 0 0 0 0 0 0 0 0 0",  // sltu
    "000000 000011 001000 1 0 0 0 0 0 0 0 0 0 0 0 0",  // sra
    "000000 000100 100100 1 0 0 0 0 0 0 0 0 0 0 0 0",  // sllv
    "000000 001000 000010 1 0 0 0 1 0 0 0 0 0 0 0 0",  // jr
    "000000 001001 000010 1 0 0 0 1 1 0 0 0 0 0 0 0",  // jalr
    "000000 011000 000000 1 0 0 0 0 0 1 0 1 0 0 0 0",  // mult
    "000000 011011 000000 1 0 0 0 0 0 0 1 0 0 0 0 0",  // divu
    "000000 010001 000000 1 0 0 0 0 0 0 0 0 1 0 0 0",  // mthi
    "000000 010010 000000 1 0 0 0 0 0 0 0 0 0 0 0 1",  // mflo
    "100011 xxxxxx 000010 1 0 0 0 0 0 0 0 0 0 0 0 0",  // lw
    "101000 xxxxxx 000010 0 1 0 0 0 0 0 0 0 0 0 0 0",  // sb
    "000100 xxxxxx 010010 0 0 0 0 0 0 0 0 0 0 0 0 0",  // beq
    "000110 xxxxxx 010010 0 0 0 0 0 0 0 0 0 0 0 0 0",  // bgtz
    "001100 xxxxxx 000000 1 0 0 0 0 0 0 0 0 0 0 0 0",  // andi
    "001101 xxxxxx 000001 1 0 0 0 0 0 0 0 0 0 0 0 0",  // ori
    "001110 xxxxxx 000101 1 0 0 0 0 0 0 0 0 0 0 0 0",  // xori
    "001011 xxxxxx 010011 1 0 0 0 0 0 0 0 0 0 0 0 0",  // sltiu
    "001111 xxxxxx 000010 1 0 0 0 0 0 0 0 0 0 0 0 0",  // lui
    "000011 xxxxxx xxxxxx 1 0 1 1 0 0 0 0 0 0 0 0 0",  // jal
    "000010 xxxxxx xxxxxx 0 0 1 0 0 0 0 0 0 0 0 0 0"   // j
  };

  function automatic logic [18:0] cols(ctrl_t c);
    return {c.r.alucontrol, c.m.regwrite, c.m.memwrite, c.m.jump, c.m.jal, c.r.jr, c.r.jalr,
            c.r.mult, c.r.div, c.r.sign, c.r.mthi, c.r.mtlo, c.r.mfhi, c.r.mflo};
  endfunction

  initial begin
    foreach (rows[r]) begin
      repeat (4) begin
        string s, bits;
        logic [18:0] got;
        bit ok;
        s = rows[r];
        for (int i = 0; i < 6; i++) op[5-i] = (s[i] == "1");
        for (int i = 0; i < 6; i++) funct[5-i] = (s[7+i] == "x") ? 1'($urandom) : (s[7+i] == "1");
        bits = "";
        for (int i = 13; i < s.len(); i++) if (s[i] != " ") bits = {bits, s.substr(i, i)};
        #1;
        got = cols(ctrl);
        ok = (bits.len() == 19);
        for (int i = 0; i < 19 && ok; i++)
          if (bits[i] != "x" && got[18-i] != (bits[i] == "1")) ok = 0;
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL op=%b funct=%b got %b exp %s", op, funct, got, bits);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
