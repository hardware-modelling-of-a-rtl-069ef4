// tb_mips_top: end-to-end test of the processor with its memories.
// For several seeds it generates a program (mips_ref_pkg::gen_program:
// every branch kind taken and not taken, j, jal, jr, jalr, the hi/lo moves,
// then random ALU, shift, immediate, load/store and multiply/divide
// instructions, a divide by zero and the signed-overflow divide), loads it
// into the instruction memory and runs it in lockstep with the reference
// model. Every cycle it checks that exactly one instruction retired: the PC,
// all 31 registers and hi/lo must equal the model's, and any store must
// match the model's address. At the end it compares the data memory.
// It counts each instruction class executed and fails if any never ran.
// The instruction memory is enlarged to 256 words to hold the program.
`timescale 1ns/1ps
module tb_mips_top;
  import mips_pkg::*;
  import mips_ref_pkg::*;

  localparam int IW = 256;
  localparam int DW = 64;
  localparam int SEEDS = 12;

  logic        clk = 1'b0, reset = 1'b1;
  logic [31:0] pc, instr, dataadr, writedata, readdata;
  logic        memwrite;
  int          checks = 0, failures = 0, cycles = 0;
  logic [31:0] prog [];
  mips_iss     iss;
  int          total [C_NUM];

  mips_top #(.IMEM_WORDS(IW), .DMEM_WORDS(DW), .IMEM_FILE("")) dut (
    .clk(clk), .reset(reset), .pc(pc), .instr(instr), .memwrite(memwrite),
    .dataadr(dataadr), .writedata(writedata), .readdata(readdata)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (pc=%h instr=%h cycle %0d)", what, pc, instr, cycles);
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
    logic [31:0] halt_pc;
    int stuck;
    bit  ok;
    prog = new[IW];
    foreach (total[i]) total[i] = 0;
    for (int s = 0; s < SEEDS; s++) begin
      reset = 1'b1;
      gen_program(prog, 150, DW, 32'(s * 7919 + 1));
      #1;
      for (int i = 0; i < IW; i++) dut.u_imem.mem[i] = prog[i];
      for (int i = 0; i < DW; i++) dut.u_dmem.mem[i] = '0;
      for (int i = 0; i < 32; i++) dut.u_mips.u_dp.u_rf.rf[i] = '0;
      iss = new(DW);
      repeat (2) @(posedge clk);
      #1 reset = 1'b0;
      stuck = 0;
      while (stuck < 2) begin
        @(negedge clk);
        cycles++;
        check(pc == iss.pc, $sformatf("pc %h exp %h", pc, iss.pc));
        check(instr == prog[(pc >> 2) % IW], "instruction fetch");
        ok = 1'b1;
        for (int i = 1; i < 32; i++)
          if (dut.u_mips.u_dp.u_rf.rf[i] !== iss.r[i]) begin
            ok = 1'b0;
            if (failures < 20) $display("  r%0d = %h exp %h", i, dut.u_mips.u_dp.u_rf.rf[i], iss.r[i]);
          end
        check(ok, "register file");
        check(dut.u_mips.u_dp.u_hilo.hi == iss.hi && dut.u_mips.u_dp.u_hilo.lo == iss.lo, "hi/lo");
        halt_pc = iss.pc;
        iss.step(prog[(iss.pc >> 2) % IW]);
        check(memwrite == iss.st_valid, "store enable");
        if (memwrite) check(dataadr == iss.st_addr, "store address");
        if (iss.pc == halt_pc) stuck++;
      end
      for (int i = 0; i < DW; i++) begin
        check(dut.u_dmem.mem[i] == iss.mem[i], $sformatf("dmem[%0d] %h exp %h", i, dut.u_dmem.mem[i], iss.mem[i]));
      end
      for (int c = 0; c < C_NUM; c++) total[c] += iss.counts[c];
    end
    for (int c = 0; c < C_NUM; c++) begin
      $display("  %-10s executed %0d times", iclass_e'(c), total[c]);
      check(total[c] > 0, $sformatf("instruction class %s never executed", iclass_e'(c)));
    end
    $display("  %0d cycles, one instruction each", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
