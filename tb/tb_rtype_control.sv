// tb_rtype_control: compares the R-type control with its truth table,
// written here as strings
//   aluop funct alucontrol jr jalr div mult sign mthi mtlo mfhi mflo
// (x = don't care). The 11x rows are checked with ALUop 110 and 111. The
// funct field must be ignored for ALUop 000..101, checked with random
// funct values.
`timescale 1ns/1ps
module tb_rtype_control;
  import mips_pkg::*;
  logic [2:0]  aluop;
  logic [5:0]  funct;
  rtype_ctrl_t rc;
  int checks = 0, failures = 0;

  rtype_control dut (.aluop(aluop), .funct(funct), .rc(rc));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string rows [32] = '{
    "000 xxxxxx 000010 0 0 0 0 0 0 0 0 0",
    "001 xxxxxx 010010 0 0 0 0 0 0 0 0 0",
    "010 xxxxxx 000000 0 0 0 0 0 0 0 0 0",
    "011 xxxxxx 000001 0 0 0 0 0 0 0 0 0",
    "100 xxxxxx 000101 0 0 0 0 0 0 0 0 0",
    "101 xxxxxx 010011 0 0 0 0 0 0 0 0 0",
    "11x 100000 000010 0 0 0 0 0 0 0 0 0",
    "11x 100001 000010 0 0 0 0 0 0 0 0 0",
    "11x 100010 010010 0 0 0 0 0 0 0 0 0",
    "11x 100011 010010 0 0 0 0 0 0 0 0 0",
    "11x 100100 000000 0 0 0 0 0 0 0 0 0",
    "11x 100101 000001 0 0 0 0 0 0 0 0 0",
    "11x 100110 000101 0 0 0 0 0 0 0 0 0",
    "11x 100111 000110 0 0 0 0 0 0 0 0 0",
    "11x 101010 010011 0 0 0 0 0 0 0 0 0",
    "11x 101011 010011 0 0 0 0 0 0 0 0 0",
    "11x 000000 000100 0 0 0 0 0 0 0 0 0",
    "11x 000010 000111 0 0 0 0 0 0 0 0 0",
    "11x 000011 001000 0 0 0 0 0 0 0 0 0",
    "11x 000100 100100 0 0 0 0 0 0 0 0 0",
    "11x 000110 100111 0 0 0 0 0 0 0 0 0",
    "11x 000111 101000 0 0 0 0 0 0 0 0 0",
    "11x 001000 000010 1 0 0 0 0 0 0 0 0",
    "11x 001001 000010 1 1 0 0 0 0 0 0 0",
    "11x 011000 000000 0 0 0 1 1 0 0 0 0",
    "11x 011001 000000 0 0 0 1 0 0 0 0 0",
    "11x 011010 000000 0 0 1 0 1 0 0 0 0",
    "11x 011011 000000 0 0 1 0 0 0 0 0 0",
    "11x 010001 000000 0 0 0 0 0 1 0 0 0",
    "11x 010011 000000 0 0 0 0 0 0 1 0 0",
    "11x 010000 000000 0 0 0 0 0 0 0 1 0",
    "11x 010010 000000 0 0 0 0 0 0 0 0 1"
  };

  function automatic logic [14:0] cols(rtype_ctrl_t r);
    return {r.alucontrol, r.jr, r.jalr, r.div, r.mult, r.sign, r.mthi, r.mtlo, r.mfhi, r.mflo};
  endfunction

  initial begin
    foreach (rows[r]) begin
      string s, bits;
      logic [14:0] got;
      bit ok;
      int reps;
      s = rows[r];
      bits = "";
      for (int i = 11; i < s.len(); i++) if (s[i] != " ") bits = {bits, s.substr(i, i)};
      reps = (s[2] == "x") ? 2 : 8;
      for (int k = 0; k < reps; k++) begin
        aluop = {s[0] == "1", s[1] == "1", (s[2] == "x") ? k[0] : (s[2] == "1")};
        for (int i = 0; i < 6; i++) funct[5-i] = (s[4+i] == "x") ? 1'($urandom) : (s[4+i] == "1");
        #1;
        got = cols(rc);
        ok = (bits.len() == 15);
        for (int i = 0; i < 15 && ok; i++)
          if (bits[i] != "x" && got[14-i] != (bits[i] == "1")) ok = 0;
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL aluop=%b funct=%b got %b exp %s", aluop, funct, got, bits);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
