// tb_regfile: random writes and reads against an array model: writes land
// only on a rising edge with we3 = 1, both read ports are combinational,
// register 0 always reads as zero.
`timescale 1ns/1ps
module tb_regfile;
  logic clk = 1'b0;
  logic we3;
  logic [4:0] a1, a2, a3;
  logic [31:0] wd3, rd1, rd2;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk(clk), .we3(we3), .a1(a1), .a2(a2), .a3(a3), .wd3(wd3), .rd1(rd1), .rd2(rd2));
  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we3 = 1'b1; a1 = 0; a2 = 0;
    for (int i = 0; i < 32; i++) begin
      a3 = 5'(i); wd3 = $urandom; model[i] = (i == 0) ? 32'h0 : wd3;
      @(posedge clk); #1;
    end
    repeat (2000) begin
      we3 = 1'($urandom); a3 = 5'($urandom); wd3 = $urandom;
      a1 = 5'($urandom); a2 = ($urandom % 4 == 0) ? a3 : 5'($urandom);
      #1;
      checks++;
      if (rd1 !== model[a1] || rd2 !== model[a2]) begin
        failures++;
        if (failures < 10) $display("FAIL a1=%0d rd1=%h exp %h a2=%0d rd2=%h exp %h", a1, rd1, model[a1], a2, rd2, model[a2]);
      end
      @(posedge clk);
      if (we3 && a3 != 0) model[a3] = wd3;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
