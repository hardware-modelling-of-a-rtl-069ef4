// datapath: the 32-bit single-cycle datapath. Every instruction is fetched,
// decoded, executed and retired in one clock cycle; the only state is the
// program counter, the register file and the hi/lo pair (the memories sit
// outside the processor).
//
// Within a cycle: the PC addresses the instruction memory; rs and rt are
// read from the register file; the ALU combines rs with operand B, chosen
// by alusrc from rt, the sign- or zero-extended immediate or the immediate
// shifted up 16 bits (lui); the ALU result is also the data-memory address.
// The mul/div unit works on rs and rt in parallel and its 64-bit result is
// captured in hi/lo at the clock edge. The register write data is chosen
// from the ALU result, the loaded word, half-word or byte (sign- or
// zero-extended, lanes picked by the address's low bits, big-endian), hi
// (mfhi), lo (mflo) or pc+4 (jal, jalr). The write register is rt, rd or
// r31 (jal).
//
// Next PC: the rs register for jr/jalr, else the jump target
// {pc+4[31:28], addr, 00}, else the branch target pc+4 + (simm << 2) when
// the branch condition holds, else pc+4. Branches use the ALU's subtract:
// beq/bne test its zero flag; blez, bltz and bgtz compare rs - $0 with zero
// through the zero flag and the result's sign bit.
//
// The element list and control signals follow the processor's published
// datapath; the result-multiplexer order, next-PC priority and byte-lane
// order are this design's choices.
module datapath
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  ctrl_t       ctrl,
  input  logic [31:0] instr,
  input  logic [31:0] readdata,
  output logic [31:0] pc,
  output logic [31:0] aluout,
  output logic [31:0] writedata
);

  // ------------------------------------------------------- instruction fields
  logic [4:0]  rs, rt, rd, shamt;
  logic [15:0] imm;
  logic [25:0] addr;

  assign rs    = instr[25:21];
  assign rt    = instr[20:16];
  assign rd    = instr[15:11];
  assign shamt = instr[10:6];
  assign imm   = instr[15:0];
  assign addr  = instr[25:0];

  // --------------------------------------------------------- program counter
  logic [31:0] pcnext, pcplus4, pcbranch, pcjump;
  logic [31:0] signimm, zeroimm, luiimm;
  logic        zero, neg, take;
  logic [1:0]  pcsel;

  pc_reg #(.WIDTH(32)) u_pc (.clk(clk), .reset(reset), .pcnext(pcnext), .pc(pc));

  assign pcplus4  = pc + 32'd4;
  assign pcbranch = pcplus4 + {signimm[29:0], 2'b00};
  assign pcjump   = {pcplus4[31:28], addr, 2'b00};

  // ------------------------------------------------------------ register file
  logic [4:0]  writereg;
  logic [31:0] rd1, rd2, result;
  logic        regwrite;

  assign regwrite = ctrl.m.regwrite;

  mux_n #(.WIDTH(5), .N(3)) u_regdst_mux (
    .d({5'd31, rd, rt}), .sel(ctrl.m.regdst), .y(writereg)
  );

  regfile #(.NREGS(32), .WIDTH(32)) u_rf (
    .clk(clk), .we3(regwrite), .a1(rs), .a2(rt), .a3(writereg),
    .wd3(result), .rd1(rd1), .rd2(rd2)
  );

  assign writedata = rd2;

  // --------------------------------------------------------------- extenders
  sign_ext #(.IN_W(16), .OUT_W(32)) u_sext (.a(imm), .y(signimm));
  zero_ext #(.IN_W(16), .OUT_W(32)) u_zext (.a(imm), .y(zeroimm));
  assign luiimm = {imm, 16'h0000};

  // --------------------------------------------------------------------- ALU
  logic [31:0] srcb;

  mux_n #(.WIDTH(32), .N(4)) u_srcb_mux (
    .d({luiimm, zeroimm, signimm, rd2}), .sel(ctrl.m.alusrc), .y(srcb)
  );

  alu #(.WIDTH(32)) u_alu (
    .a(rd1), .b(srcb), .shamt(shamt), .alucontrol(ctrl.r.alucontrol),
    .y(aluout), .zero(zero)
  );

  // ---------------------------------------------------------- mul/div, hi/lo
  logic [63:0] mdy;
  logic [31:0] hi, lo;

  muldiv #(.WIDTH(32)) u_muldiv (
    .a(rd1), .b(rd2), .mult(ctrl.r.mult), .div(ctrl.r.div), .sign(ctrl.r.sign),
    .y(mdy)
  );

  hilo #(.WIDTH(32)) u_hilo (
    .clk(clk), .reset(reset), .mult(ctrl.r.mult), .div(ctrl.r.div),
    .mthi(ctrl.r.mthi), .mtlo(ctrl.r.mtlo), .y(mdy), .wd(rd1), .hi(hi), .lo(lo)
  );

  // ---------------------------------------------------------- load alignment
  logic [7:0]  ldbyte;
  logic [15:0] ldhalf;
  logic [31:0] byte_s, byte_z, half_s, half_z, byteval, halfval;

  always_comb begin
    unique case (aluout[1:0])
      2'd0: ldbyte = readdata[31:24];
      2'd1: ldbyte = readdata[23:16];
      2'd2: ldbyte = readdata[15:8];
      default: ldbyte = readdata[7:0];
    endcase
  end
  assign ldhalf = aluout[1] ? readdata[15:0] : readdata[31:16];

  sign_ext #(.IN_W(8),  .OUT_W(32)) u_bsext (.a(ldbyte), .y(byte_s));
  zero_ext #(.IN_W(8),  .OUT_W(32)) u_bzext (.a(ldbyte), .y(byte_z));
  sign_ext #(.IN_W(16), .OUT_W(32)) u_hsext (.a(ldhalf), .y(half_s));
  zero_ext #(.IN_W(16), .OUT_W(32)) u_hzext (.a(ldhalf), .y(half_z));

  assign byteval = ctrl.m.lbu ? byte_z : byte_s;
  assign halfval = ctrl.m.lhu ? half_z : half_s;

  // ------------------------------------------------------- write-back value
  logic [31:0] memres;
  logic [1:0]  ressel;

  mux_n #(.WIDTH(32), .N(4)) u_memtoreg_mux (
    .d({byteval, halfval, readdata, aluout}), .sel(ctrl.m.memtoreg), .y(memres)
  );

  always_comb begin
    if (ctrl.m.jal || ctrl.r.jalr) ressel = 2'd3;
    else if (ctrl.r.mflo)          ressel = 2'd2;
    else if (ctrl.r.mfhi)          ressel = 2'd1;
    else                           ressel = 2'd0;
  end

  mux_n #(.WIDTH(32), .N(4)) u_result_mux (
    .d({pcplus4, lo, hi, memres}), .sel(ressel), .y(result)
  );

  // ------------------------------------------------------------ next PC
  assign neg  = aluout[31];
  assign take = (ctrl.m.beq  &  zero)
              | (ctrl.m.bne  & ~zero)
              | (ctrl.m.blez & (zero | neg))
              | (ctrl.m.bltz &  neg)
              | (ctrl.m.bgtz & ~zero & ~neg);

  always_comb begin
    if (ctrl.r.jr)       pcsel = 2'd3;
    else if (ctrl.m.jump) pcsel = 2'd2;
    else if (take)       pcsel = 2'd1;
    else                 pcsel = 2'd0;
  end

  mux_n #(.WIDTH(32), .N(4)) u_pc_mux (
    .d({rd1, pcjump, pcbranch, pcplus4}), .sel(pcsel), .y(pcnext)
  );

endmodule
