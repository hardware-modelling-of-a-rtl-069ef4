// tb_datapath: the datapath, steered by the control unit, with memories modelled
// in the testbench (combinational reads, byte/half/word writes on the
// rising edge as selected by size_in). Generated programs (see
// mips_ref_pkg::gen_program) run in lockstep with the reference model:
// each cycle the PC, the registers and hi/lo must match and any store must
// match the model's address and memory effect. At the end the data memory
// is compared and every instruction class must have executed.
`timescale 1ns/1ps
module tb_datapath;
  import mips_pkg::*;
  import mips_ref_pkg::*;

  localparam int IW = 256;
  localparam int DW = 64;
  localparam int SEEDS = 4;
  ctrl_t       ctrl;

  logic        clk = 1'b0, reset = 1'b1;
  logic [31:0] pc, instr, aluout, writedata, readdata;
  logic        memwrite;
  logic [1:0]  size_in;
  logic [31:0] dm [DW];
  logic [31:0] prog [];
  int          checks = 0, failures = 0;
  mips_iss     iss;
  int          total [C_NUM];

  // The control unit drives the datapath; writes are held off in reset.
  control_unit u_ctrl (.op(instr[31:26]), .funct(instr[5:0]), .ctrl(ctrl));

  ctrl_t ctrl_q;
  always_comb begin
    ctrl_q = ctrl;
    if (reset) begin
      ctrl_q.m.regwrite = 1'b0; ctrl_q.m.memwrite = 1'b0;
      ctrl_q.r.mult = 1'b0; ctrl_q.r.div = 1'b0; ctrl_q.r.mthi = 1'b0; ctrl_q.r.mtlo = 1'b0;
    end
  end
  assign memwrite = ctrl_q.m.memwrite;
  assign size_in  = ctrl_q.m.sh_b;

  datapath dut (
    .clk(clk), .reset(reset), .ctrl(ctrl_q), .instr(instr), .readdata(readdata),
    .pc(pc), .aluout(aluout), .writedata(writedata)
  );

  always #5 clk = ~clk;

  assign instr    = (prog.size() > 0) ? prog[(pc >> 2) % IW] : 32'h0;
  assign readdata = dm[(aluout >> 2) % DW];

  always @(posedge clk) begin
    if (memwrite) begin
      case (size_in)
        2'b00: dm[(aluout >> 2) % DW][8*(3-int'(aluout[1:0])) +: 8] <= writedata[7:0];
        2'b01: dm[(aluout >> 2) % DW][(aluout[1] ? 0 : 16) +: 16]     <= writedata[15:0];
        default: dm[(aluout >> 2) % DW] <= writedata;
      endcase
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (pc=%h instr=%h)", what, pc, instr);
    end
  endtask

  initial begin : watchdog
    #(10 * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prev_pc;
    int stuck;
    bit ok;
    prog = new[IW];
    foreach (total[i]) total[i] = 0;
    for (int s = 0; s < SEEDS; s++) begin
      reset = 1'b1;
      gen_program(prog, 150, DW, 32'(s * 15485863 + 5));
      #1;
      foreach (dm[i]) dm[i] = '0;
      for (int i = 0; i < 32; i++) dut.u_rf.rf[i] = '0;
      iss = new(DW);
      repeat (2) @(posedge clk);
      #1 reset = 1'b0;
      stuck = 0;
      while (stuck < 2) begin
        @(negedge clk);
        check(pc == iss.pc, $sformatf("pc %h exp %h", pc, iss.pc));
        ok = 1'b1;
        for (int i = 1; i < 32; i++) if (dut.u_rf.rf[i] !== iss.r[i]) ok = 1'b0;
        check(ok, "register file");
        check(dut.u_hilo.hi == iss.hi && dut.u_hilo.lo == iss.lo, "hi/lo");
        prev_pc = iss.pc;
        iss.step(prog[(iss.pc >> 2) % IW]);
        check(memwrite == iss.st_valid, "store enable");
        if (memwrite) check(aluout == iss.st_addr, "store address");
        if (iss.pc == prev_pc) stuck++;
      end
      foreach (dm[i]) check(dm[i] == iss.mem[i], $sformatf("dmem[%0d] %h exp %h", i, dm[i], iss.mem[i]));
      for (int c = 0; c < C_NUM; c++) total[c] += iss.counts[c];
    end
    for (int c = 0; c < C_NUM; c++)
      check(total[c] > 0, $sformatf("instruction class %s never executed", iclass_e'(c)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
