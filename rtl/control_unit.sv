// control_unit: the processor's controller. It takes the opcode and funct
// fields of the current instruction and tells the datapath what to do in
// the same cycle: the main control decodes the opcode into multiplexer
// selects, write enables, branch and jump flags and a 3-bit ALUop; the
// R-type control turns ALUop and funct into the ALU code and the R-type
// side signals (jr, jalr, mult, div, sign, mthi, mtlo, mfhi, mflo).
// Purely combinational; the two-level split is the processor's own. An
// assertion checks that no instruction selects two next-PC sources.
module control_unit
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  main_ctrl_t  mc;
  rtype_ctrl_t rc;

  main_control  u_main  (.op(op), .mc(mc));
  rtype_control u_rtype (.aluop(mc.aluop), .funct(funct), .rc(rc));

  // At most one way of changing the flow of control per instruction.
  always_comb begin
    assert ($onehot0({mc.beq, mc.bne, mc.blez, mc.bltz, mc.bgtz, mc.jump, rc.jr}))
      else $error("control_unit: several next-PC sources selected (op=%b funct=%b)", op, funct);
  end

  assign ctrl.m = mc;
  assign ctrl.r = rc;

endmodule
