// tb_pc_reg: the program counter must load pcnext on every rising edge and
// return to 0 on a synchronous reset, whatever pcnext is.
`timescale 1ns/1ps
module tb_pc_reg;
  logic clk = 1'b0, reset = 1'b1;
  logic [31:0] pcnext, pc, last;
  int checks = 0, failures = 0;

  pc_reg dut (.clk(clk), .reset(reset), .pcnext(pcnext), .pc(pc));
  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    pcnext = 32'hdeadbeef;
    @(posedge clk); #1;
    check(pc == 32'h0, "reset value");
    reset = 1'b0;
    repeat (200) begin
      pcnext = $urandom;
      last = pcnext;
      @(posedge clk); #1;
      check(pc == last, $sformatf("pc %h exp %h", pc, last));
      if ($urandom % 10 == 0) begin
        reset = 1'b1; pcnext = $urandom;
        @(posedge clk); #1;
        check(pc == 32'h0, "reset mid-run");
        reset = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
