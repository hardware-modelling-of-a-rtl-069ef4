// tb_main_control: compares the main control with the opcode truth table,
// written here as strings in the table's column order
//   opcode  sh_b lbu lhu regwrite regdst alusrc beq bne blez bltz bgtz
//           memwrite memtoreg jump jal aluop
// where x marks a don't-care bit that is not compared. Unknown opcodes
// must produce no register write, memory write, branch or jump.
`timescale 1ns/1ps
module tb_main_control;
  import mips_pkg::*;
  logic [5:0] op;
  main_ctrl_t mc;
  int checks = 0, failures = 0;

  main_control dut (.op(op), .mc(mc));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string rows [24] = '{
    "000000 xx x x 1 01 00 0 0 0 0 0 0 00 0 0 110",  // R-type
    "100011 xx x x 1 00 01 0 0 0 0 0 0 01 0 0 000",  // lw
    "101011 11 0 0 0 xx 01 0 0 0 0 0 1 xx 0 0 000",  // sw
    "000100 xx x x 0 xx 00 1 0 0 0 0 0 xx 0 0 001",  // beq
    "000101 xx x x 0 xx 00 0 1 0 0 0 0 xx 0 0 001",  // bne
    "000111 xx x x 0 xx 00 0 0 1 0 0 0 xx 0 0 001",  // blez
    "000001 xx x x 0 xx 00 0 0 0 1 0 0 xx 0 0 001",  // bltz
    "000110 xx x x 0 xx 00 0 0 0 0 1 0 xx 0 0 001",  // bgtz
    "001000 xx x x 1 00 01 0 0 0 0 0 0 00 0 0 000",  // addi
    "001001 xx x x 1 00 01 0 0 0 0 0 0 00 0 0 000",  // addiu
    "000010 xx x x 0 xx xx x x x x x 0 xx 1 0 xxx",  // j
    "000011 xx x x 1 10 xx x x x x x 0 xx 1 1 xxx",  // jal
    "001100 xx x x 1 00 10 0 0 0 0 0 0 00 0 0 010",  // andi
    "001101 xx x x 1 00 10 0 0 0 0 0 0 00 0 0 011",  // ori
    "001110 xx x x 1 00 10 0 0 0 0 0 0 00 0 0 100",  // xori
    "001010 xx x x 1 00 01 0 0 0 0 0 0 00 0 0 101",  // slti
    "001011 xx x x 1 00 01 0 0 0 0 0 0 00 0 0 101",  // sltiu
    "001111 xx x x 1 00 11 0 0 0 0 0 0 00 0 0 000",  // lui
    "100000 xx 0 0 1 00 01 0 0 0 0 0 0 11 0 0 000",  // lb
    "100100 xx 1 0 1 00 01 0 0 0 0 0 0 11 0 0 000",  // lbu
    "100001 xx 0 0 1 00 01 0 0 0 0 0 0 10 0 0 000",  // lh
    "100101 xx 0 1 1 00 01 0 0 0 0 0 0 10 0 0 000",  // lhu
    "101000 00 x x 0 xx 01 0 0 0 0 0 1 xx 0 0 000",  // sb
    "101001 01 x x 0 xx 01 0 0 0 0 0 1 xx 0 0 000"   // sh
  };

  // Flatten the struct in the table's column order.
  function automatic logic [21:0] cols(main_ctrl_t m);
    return {m.sh_b, m.lbu, m.lhu, m.regwrite, m.regdst, m.alusrc, m.beq, m.bne,
            m.blez, m.bltz, m.bgtz, m.memwrite, m.memtoreg, m.jump, m.jal, m.aluop};
  endfunction

  initial begin
    bit listed [64];
    foreach (listed[i]) listed[i] = 0;
    foreach (rows[r]) begin
      string s, bits;
      logic [21:0] got;
      bit ok;
      s = rows[r];
      bits = "";
      for (int i = 7; i < s.len(); i++) if (s[i] != " ") bits = {bits, s.substr(i, i)};
      op = '0;
      for (int i = 0; i < 6; i++) op[5-i] = (s[i] == "1");
      listed[op] = 1;
      #1;
      got = cols(mc);
      ok = (bits.len() == 22);
      for (int i = 0; i < 22 && ok; i++)
        if (bits[i] != "x" && got[21-i] != (bits[i] == "1")) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL op=%b got %b exp %s", op, got, bits);
      end
    end
    for (int o = 0; o < 64; o++) if (!listed[o]) begin
      op = 6'(o);
      #1;
      checks++;
      if (mc.regwrite || mc.memwrite || mc.beq || mc.bne || mc.blez || mc.bltz || mc.bgtz || mc.jump) begin
        failures++;
        $display("FAIL unlisted op=%b acts", op);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
