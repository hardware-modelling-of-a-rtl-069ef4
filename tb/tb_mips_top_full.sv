// tb_mips_top_full: the processor and memories at their default sizes
// (64-word memories) running the default program: a procedure call that
// multiplies 0xfffffffe by 4 with multu and stores the product, lo at byte
// address 0x80 and hi at 0x84. The program's jal lands on the word after
// the procedure's multu, so the first pass stores the reset values of hi
// and lo (0); the program then falls into the procedure, multiplies,
// returns and stores again. With one instruction per cycle the second pair
// of stores falls in cycles 13 and 14 after reset (the first in 7 and 8). The test checks the
// store cycles, addresses and data, and the final memory words
// 0xfffffff8 (0x80) and 0x00000003 (0x84).
`timescale 1ns/1ps
module tb_mips_top_full;
  logic        clk = 1'b0, reset = 1'b1;
  logic [31:0] pc, instr, dataadr, writedata, readdata;
  logic        memwrite;
  int          checks = 0, failures = 0;

  mips_top dut (
    .clk(clk), .reset(reset), .pc(pc), .instr(instr), .memwrite(memwrite),
    .dataadr(dataadr), .writedata(writedata), .readdata(readdata)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #(10 * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected stores: cycle, address, data
  int          exp_cyc [4] = '{7, 8, 13, 14};
  logic [31:0] exp_adr [4] = '{32'h80, 32'h84, 32'h80, 32'h84};
  logic [31:0] exp_dat [4] = '{32'h0, 32'h0, 32'hfffffff8, 32'h3};

  initial begin
    int n;
    n = 0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    for (int cyc = 0; cyc < 40; cyc++) begin
      @(negedge clk);
      if (memwrite) begin
        if (n < 4) begin
          check(cyc == exp_cyc[n], $sformatf("store %0d in cycle %0d, expected %0d", n, cyc, exp_cyc[n]));
          check(dataadr == exp_adr[n], $sformatf("store %0d address %h", n, dataadr));
          check(writedata == exp_dat[n], $sformatf("store %0d data %h", n, writedata));
          $display("  cycle %0d: mem[%h] <= %h", cyc, dataadr, writedata);
        end
        n++;
      end
    end
    check(n >= 4, "too few stores");
    check(dut.u_dmem.mem[32'h80 >> 2] == 32'hfffffff8, "final word at 0x80");
    check(dut.u_dmem.mem[32'h84 >> 2] == 32'h00000003, "final word at 0x84");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
