// mips_ref_pkg: testbench support for the single-cycle MIPS processor.
//  * Encoders (r_type, i_type, j_type) that build machine words.
//  * mips_iss, an instruction-level reference model written directly from
//    the instruction set rules (not from the RTL's structure). step()
//    executes one instruction and records the register, hi/lo and memory
//    effects so a testbench can compare them with the hardware cycle by
//    cycle. It models the processor's documented decode choices: blez and
//    bgtz use opcodes 000111 and 000110, sltu/sltiu compare as signed, byte
//    lanes are big-endian, division by zero gives quotient all ones and
//    remainder equal to the dividend.
//  * gen_program(), which writes a self-contained test program: a directed
//    part that takes every branch kind both ways and every jump kind, then
//    random straight-line arithmetic, logic, shift, load/store and
//    multiply/divide instructions, ending in a jump-to-self.
package mips_ref_pkg;
  import mips_pkg::*;

  function automatic logic [31:0] r_type(logic [5:0] funct, int rs, int rt, int rd, int sh = 0);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'(sh), funct};
  endfunction

  function automatic logic [31:0] i_type(logic [5:0] op, int rs, int rt, logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction

  function automatic logic [31:0] j_type(logic [5:0] op, logic [31:0] target);
    return {op, target[27:2]};
  endfunction

  // Instruction classes counted by the testbenches.
  typedef enum int {
    C_ALU_R, C_SHIFT, C_SHIFTV, C_ALU_I, C_LUI,
    C_LW, C_LH, C_LHU, C_LB, C_LBU, C_SW, C_SH, C_SB,
    C_BEQ_T, C_BEQ_N, C_BNE_T, C_BNE_N, C_BLEZ_T, C_BLEZ_N,
    C_BLTZ_T, C_BLTZ_N, C_BGTZ_T, C_BGTZ_N,
    C_J, C_JAL, C_JR, C_JALR,
    C_MULT, C_MULTU, C_DIV, C_DIVU, C_MTHI, C_MTLO, C_MFHI, C_MFLO,
    C_NUM
  } iclass_e;

  class mips_iss;
    logic [31:0] r [32];
    logic [31:0] hi, lo, pc;
    logic [31:0] mem [];
    // effects of the last step
    logic        st_valid;
    logic [31:0] st_addr;
    int          counts [C_NUM];

    function new(int words);
      mem = new[words];
      foreach (mem[i]) mem[i] = '0;
      foreach (r[i]) r[i] = '0;
      hi = '0; lo = '0; pc = '0;
      foreach (counts[i]) counts[i] = 0;
    endfunction

    function automatic void wr(int idx, logic [31:0] v);
      if (idx != 0) r[idx] = v;
    endfunction

    function automatic logic [31:0] mw(logic [31:0] a);
      return mem[(a >> 2) % mem.size()];
    endfunction

    function automatic void step(logic [31:0] ins);
      logic [5:0]  op, fn;
      int          rs, rt, rd, sh;
      logic [31:0] a, b, simm, zimm, npc, addr, word;
      logic [63:0] p;
      logic [7:0]  bt;
      logic [15:0] hw;
      op = ins[31:26]; fn = ins[5:0];
      rs = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]); sh = int'(ins[10:6]);
      a = r[rs]; b = r[rt];
      simm = {{16{ins[15]}}, ins[15:0]};
      zimm = {16'h0, ins[15:0]};
      npc  = pc + 4;
      addr = a + simm;
      word = mw(addr);
      st_valid = 1'b0;
      st_addr  = addr;
      case (op)
        OP_RTYPE: begin
          case (fn)
            F_ADD, F_ADDU: begin wr(rd, a + b); counts[C_ALU_R]++; end
            F_SUB, F_SUBU: begin wr(rd, a - b); counts[C_ALU_R]++; end
            F_AND: begin wr(rd, a & b); counts[C_ALU_R]++; end
            F_OR:  begin wr(rd, a | b); counts[C_ALU_R]++; end
            F_XOR: begin wr(rd, a ^ b); counts[C_ALU_R]++; end
            F_NOR: begin wr(rd, ~(a | b)); counts[C_ALU_R]++; end
            F_SLT, F_SLTU: begin wr(rd, {31'b0, $signed(a) < $signed(b)}); counts[C_ALU_R]++; end
            F_SLL:  begin wr(rd, b << sh); counts[C_SHIFT]++; end
            F_SRL:  begin wr(rd, b >> sh); counts[C_SHIFT]++; end
            F_SRA:  begin wr(rd, $signed(b) >>> sh); counts[C_SHIFT]++; end
            F_SLLV: begin wr(rd, b << a[4:0]); counts[C_SHIFTV]++; end
            F_SRLV: begin wr(rd, b >> a[4:0]); counts[C_SHIFTV]++; end
            F_SRAV: begin wr(rd, $signed(b) >>> a[4:0]); counts[C_SHIFTV]++; end
            F_JR:   begin npc = a; counts[C_JR]++; end
            F_JALR: begin wr(rd, pc + 4); npc = a; counts[C_JALR]++; end
            F_MULT: begin
              p = 64'($signed(a) * $signed(b)); {hi, lo} = p; counts[C_MULT]++;
            end
            F_MULTU: begin p = 64'(a) * 64'(b); {hi, lo} = p; counts[C_MULTU]++; end
            F_DIV: begin
              if (b == 0) begin
                lo = ($signed(a) < 0) ? 32'h1 : 32'hffffffff;  // -(all ones) when signs differ
                hi = a;
              end else if (a == 32'h80000000 && b == 32'hffffffff) begin
                lo = 32'h80000000; hi = 0;
              end else begin
                lo = $signed(a) / $signed(b); hi = $signed(a) % $signed(b);
              end
              counts[C_DIV]++;
            end
            F_DIVU: begin
              if (b == 0) begin lo = 32'hffffffff; hi = a; end
              else begin lo = a / b; hi = a % b; end
              counts[C_DIVU]++;
            end
            F_MTHI: begin hi = a; counts[C_MTHI]++; end
            F_MTLO: begin lo = a; counts[C_MTLO]++; end
            F_MFHI: begin wr(rd, hi); counts[C_MFHI]++; end
            F_MFLO: begin wr(rd, lo); counts[C_MFLO]++; end
            default: wr(rd, a + b);
          endcase
        end
        OP_ADDI, OP_ADDIU: begin wr(rt, a + simm); counts[C_ALU_I]++; end
        OP_SLTI, OP_SLTIU: begin wr(rt, {31'b0, $signed(a) < $signed(simm)}); counts[C_ALU_I]++; end
        OP_ANDI: begin wr(rt, a & zimm); counts[C_ALU_I]++; end
        OP_ORI:  begin wr(rt, a | zimm); counts[C_ALU_I]++; end
        OP_XORI: begin wr(rt, a ^ zimm); counts[C_ALU_I]++; end
        OP_LUI:  begin wr(rt, {ins[15:0], 16'h0}); counts[C_LUI]++; end
        OP_LW:   begin wr(rt, word); counts[C_LW]++; end
        OP_LH, OP_LHU: begin
          hw = addr[1] ? word[15:0] : word[31:16];
          wr(rt, (op == OP_LH) ? {{16{hw[15]}}, hw} : {16'h0, hw});
          if (op == OP_LH) counts[C_LH]++; else counts[C_LHU]++;
        end
        OP_LB, OP_LBU: begin
          bt = word[8*(3-int'(addr[1:0])) +: 8];
          wr(rt, (op == OP_LB) ? {{24{bt[7]}}, bt} : {24'h0, bt});
          if (op == OP_LB) counts[C_LB]++; else counts[C_LBU]++;
        end
        OP_SW: begin
          mem[(addr >> 2) % mem.size()] = b; st_valid = 1'b1; counts[C_SW]++;
        end
        OP_SH: begin
          if (addr[1]) word[15:0] = b[15:0]; else word[31:16] = b[15:0];
          mem[(addr >> 2) % mem.size()] = word; st_valid = 1'b1; counts[C_SH]++;
        end
        OP_SB: begin
          word[8*(3-int'(addr[1:0])) +: 8] = b[7:0];
          mem[(addr >> 2) % mem.size()] = word; st_valid = 1'b1; counts[C_SB]++;
        end
        OP_BEQ: begin
          if (a == b) begin npc = pc + 4 + (simm << 2); counts[C_BEQ_T]++; end else counts[C_BEQ_N]++;
        end
        OP_BNE: begin
          if (a != b) begin npc = pc + 4 + (simm << 2); counts[C_BNE_T]++; end else counts[C_BNE_N]++;
        end
        OP_BLEZ: begin
          if ($signed(a) <= 0) begin npc = pc + 4 + (simm << 2); counts[C_BLEZ_T]++; end else counts[C_BLEZ_N]++;
        end
        OP_BLTZ: begin
          if ($signed(a) < 0) begin npc = pc + 4 + (simm << 2); counts[C_BLTZ_T]++; end else counts[C_BLTZ_N]++;
        end
        OP_BGTZ: begin
          if ($signed(a) > 0) begin npc = pc + 4 + (simm << 2); counts[C_BGTZ_T]++; end else counts[C_BGTZ_N]++;
        end
        OP_J:   begin npc = {npc[31:28], ins[25:0], 2'b00}; counts[C_J]++; end
        OP_JAL: begin wr(31, pc + 4); npc = {npc[31:28], ins[25:0], 2'b00}; counts[C_JAL]++; end
        default: ;
      endcase
      pc = npc;
    endfunction
  endclass

  // Fill prog (word-indexed) with the test program. Data memory addresses
  // used by the random part stay within dwords words.
  function automatic void gen_program(ref logic [31:0] prog [], input int n_random,
                                      input int dwords, input int unsigned seed);
    int k, t;
    int unsigned s;
    logic [31:0] v;
    int reg_a, reg_b, reg_d, off;
    logic [5:0] rf [13] = '{F_ADD, F_ADDU, F_SUB, F_SUBU, F_AND, F_OR, F_XOR, F_NOR,
                           F_SLT, F_SLTU, F_SLLV, F_SRLV, F_SRAV};
    logic [5:0] io [6]  = '{OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI};
    logic [5:0] md [4]  = '{F_MULT, F_MULTU, F_DIV, F_DIVU};
    s = seed;
    foreach (prog[i]) prog[i] = '0;
    k = 0;
    // --- directed control flow ------------------------------------------
    prog[k++] = i_type(OP_ADDI, 0, 1, 16'd5);          // r1 = 5
    prog[k++] = i_type(OP_ADDI, 0, 2, 16'hfffd);       // r2 = -3
    prog[k++] = i_type(OP_BEQ,  1, 2, 16'd1);          // not taken
    prog[k++] = i_type(OP_BNE,  1, 2, 16'd1);          // taken, skip next
    prog[k++] = i_type(OP_ADDI, 0, 9, 16'd99);         // skipped
    prog[k++] = i_type(OP_BEQ,  1, 1, 16'd1);          // taken
    prog[k++] = i_type(OP_ADDI, 0, 9, 16'd98);         // skipped
    prog[k++] = i_type(OP_BNE,  1, 1, 16'd1);          // not taken
    prog[k++] = i_type(OP_BLEZ, 1, 0, 16'd1);          // 5 <= 0? not taken
    prog[k++] = i_type(OP_BLEZ, 2, 0, 16'd1);          // -3 <= 0 taken
    prog[k++] = i_type(OP_ADDI, 0, 9, 16'd97);         // skipped
    prog[k++] = i_type(OP_BLEZ, 0, 0, 16'd1);          // 0 <= 0 taken
    prog[k++] = i_type(OP_ADDI, 0, 9, 16'd96);         // skipped
    prog[k++] = i_type(OP_BLTZ, 1, 0, 16'd1);          // not taken
    prog[k++] = i_type(OP_BLTZ, 2, 0, 16'd1);          // taken
    prog[k++] = i_type(OP_ADDI, 0, 9, 16'd95);         // skipped
    prog[k++] = i_type(OP_BGTZ, 2, 0, 16'd1);          // not taken
    prog[k++] = i_type(OP_BGTZ, 0, 0, 16'd1);          // 0 > 0 not taken
    prog[k++] = i_type(OP_BGTZ, 1, 0, 16'd1);          // taken
    prog[k++] = i_type(OP_ADDI, 0, 9, 16'd94);         // skipped
    // counted loop: r3 = 3 down to 0, backward bne taken twice
    prog[k++] = i_type(OP_ADDI, 0, 3, 16'd3);
    prog[k++] = i_type(OP_ADDI, 3, 3, 16'hffff);       // loop: r3--
    prog[k++] = i_type(OP_BNE,  3, 0, 16'hfffe);       // back to loop
    // j over one word
    prog[k] = j_type(OP_J, 32'((k + 2) * 4)); k++;
    prog[k++] = i_type(OP_ADDI, 0, 9, 16'd93);         // skipped
    // jal to a subroutine two words ahead; it returns with jr
    prog[k] = j_type(OP_JAL, 32'((k + 3) * 4)); k++;
    t = k;                                             // return point
    prog[k] = j_type(OP_J, 32'((k + 3) * 4)); k++;     // skip over subroutine
    prog[k++] = i_type(OP_ADDI, 0, 9, 16'd92);         // never executed
    prog[k++] = r_type(F_JR, 31, 0, 0);                // subroutine: jr $ra
    // jalr through a register to a word that sets r10 and returns via r11
    prog[k++] = i_type(OP_ADDI, 0, 12, 16'(4 * (k + 3)));  // r12 = target
    prog[k++] = r_type(F_JALR, 12, 0, 11);             // r11 = return, jump r12
    prog[k] = j_type(OP_J, 32'((k + 3) * 4)); k++;     // after return: continue
    prog[k++] = i_type(OP_ADDI, 0, 10, 16'd77);        // target: r10 = 77
    prog[k++] = r_type(F_JR, 11, 0, 0);                // return
    if (t < 0) t = 0;
    // mthi / mtlo / mfhi / mflo
    prog[k++] = r_type(F_MTHI, 2, 0, 0);
    prog[k++] = r_type(F_MTLO, 1, 0, 0);
    prog[k++] = r_type(F_MFHI, 0, 0, 13);
    prog[k++] = r_type(F_MFLO, 0, 0, 14);
    // --- random registers ---------------------------------------------
    for (int i = 1; i < 16; i++) begin
      v = $urandom(s); s = s * 1103515245 + 12345;
      v = {$urandom(s)} ^ v;
      prog[k++] = i_type(OP_LUI, 0, i, v[31:16]);
      prog[k++] = i_type(OP_ORI, i, i, v[15:0]);
    end
    // --- random straight-line instructions ------------------------------
    for (int i = 0; i < n_random && k < prog.size() - 2; i++) begin
      s = s * 1103515245 + 12345;
      v = $urandom(s);
      reg_a = 1 + (int'(v[3:0]) % 15);
      reg_b = 1 + (int'(v[7:4]) % 15);
      reg_d = 1 + (int'(v[11:8]) % 15);
      t = int'(v[31:28]);
      off = int'(v[27:12]) % dwords;
      case (t)
        0, 1:   prog[k++] = r_type(rf[int'(v[19:16]) % 13], reg_a, reg_b, reg_d);
        2:      prog[k++] = r_type(v[13] ? (v[12] ? F_SRA : F_SRL) : F_SLL, 0, reg_b, reg_d, int'(v[24:20]));
        3, 4:   prog[k++] = i_type(io[int'(v[18:16]) % 6], reg_a, reg_d, v[27:12]);
        5:      prog[k++] = i_type(v[12] ? OP_XORI : OP_LUI, v[12] ? reg_a : 0, reg_d, v[27:12]);
        6:      prog[k++] = i_type(OP_SW, 0, reg_b, 16'(4 * off));
        7:      prog[k++] = i_type(v[13] ? OP_SH : OP_SB, 0, reg_b, 16'(4 * off + (v[13] ? 2 * int'(v[14]) : int'(v[15:14]))));
        8:      prog[k++] = i_type(OP_LW, 0, reg_d, 16'(4 * off));
        9:      prog[k++] = i_type(v[13] ? OP_LH : OP_LHU, 0, reg_d, 16'(4 * off + 2 * int'(v[14])));
        10:     prog[k++] = i_type(v[13] ? OP_LB : OP_LBU, 0, reg_d, 16'(4 * off + int'(v[15:14])));
        11, 12: prog[k++] = r_type(md[int'(v[17:16])], reg_a, reg_b, 0);
        13:     prog[k++] = r_type(v[12] ? F_MFHI : F_MFLO, 0, 0, reg_d);
        14:     prog[k++] = r_type(v[12] ? F_MTHI : F_MTLO, reg_a, 0, 0);
        default: prog[k++] = r_type(F_ADD, reg_a, reg_b, reg_d);
      endcase
    end
    // a divide by zero and the signed overflow case
    prog[k++] = r_type(F_DIV, 5, 0, 0);
    prog[k++] = r_type(F_MFLO, 0, 0, 6);
    prog[k++] = i_type(OP_LUI, 0, 7, 16'h8000);
    prog[k++] = i_type(OP_ADDI, 0, 8, 16'hffff);
    prog[k++] = r_type(F_DIV, 7, 8, 0);
    prog[k++] = r_type(F_MFLO, 0, 0, 6);
    prog[k++] = r_type(F_MFHI, 0, 0, 5);
    prog[k] = j_type(OP_J, 32'(k * 4));                // halt: jump to self
  endfunction

endpackage
