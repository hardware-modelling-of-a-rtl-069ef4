// mips: the single-cycle 32-bit MIPS processor, the datapath and the
// control unit joined. The control unit decodes the opcode and funct
// fields of instr and drives the datapath's selects and enables in the
// same cycle. Each instruction takes exactly one clock cycle, so the clock
// period must cover the slowest one (a load: instruction fetch, register
// read, ALU, data-memory read, register write set-up).
// Memory interface (memories are external): pc addresses the instruction
// memory, which returns instr combinationally; aluout addresses the data
// memory, writedata is the store data, memwrite the write enable, size_in
// the store size (11 word, 01 half, 00 byte); readdata is the addressed
// word, read combinationally. Reset is synchronous and active high; while
// it is held, register, hi/lo and memory writes are suppressed (this
// design's choice).
module mips
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  output logic [31:0] pc,
  input  logic [31:0] instr,
  output logic        memwrite,
  output logic [1:0]  size_in,
  output logic [31:0] aluout,
  output logic [31:0] writedata,
  input  logic [31:0] readdata
);

  ctrl_t ctrl, ctrl_q;

  control_unit u_ctrl (.op(instr[31:26]), .funct(instr[5:0]), .ctrl(ctrl));

  // No register or memory writes while reset is held: the PC sits at 0
  // and the instruction there must not take effect until reset is released.
  always_comb begin
    ctrl_q            = ctrl;
    ctrl_q.m.regwrite = ctrl.m.regwrite & ~reset;
    ctrl_q.m.memwrite = ctrl.m.memwrite & ~reset;
    ctrl_q.r.mult     = ctrl.r.mult & ~reset;
    ctrl_q.r.div      = ctrl.r.div  & ~reset;
    ctrl_q.r.mthi     = ctrl.r.mthi & ~reset;
    ctrl_q.r.mtlo     = ctrl.r.mtlo & ~reset;
  end

  datapath u_dp (
    .clk(clk), .reset(reset), .ctrl(ctrl_q), .instr(instr), .readdata(readdata),
    .pc(pc), .aluout(aluout), .writedata(writedata)
  );

  assign memwrite = ctrl_q.m.memwrite;
  assign size_in  = ctrl.m.sh_b;

endmodule
