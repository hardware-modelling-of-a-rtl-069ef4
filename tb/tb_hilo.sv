// tb_hilo: random mult/div/mthi/mtlo requests against a model: mult or div
// loads both halves of y, mthi/mtlo load wd into one register, reset
// clears both.
`timescale 1ns/1ps
module tb_hilo;
  logic clk = 1'b0, reset = 1'b1;
  logic mult, div, mthi, mtlo;
  logic [63:0] y;
  logic [31:0] wd, hi, lo, ehi, elo;
  int checks = 0, failures = 0;

  hilo dut (.clk(clk), .reset(reset), .mult(mult), .div(div), .mthi(mthi), .mtlo(mtlo),
            .y(y), .wd(wd), .hi(hi), .lo(lo));
  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mult = 0; div = 0; mthi = 0; mtlo = 0; y = '0; wd = '0;
    @(posedge clk); #1;
    reset = 1'b0; ehi = 0; elo = 0;
    repeat (1000) begin
      case ($urandom % 6)
        0: begin mult = 1; div = 0; mthi = 0; mtlo = 0; end
        1: begin mult = 0; div = 1; mthi = 0; mtlo = 0; end
        2: begin mult = 0; div = 0; mthi = 1; mtlo = 0; end
        3: begin mult = 0; div = 0; mthi = 0; mtlo = 1; end
        default: begin mult = 0; div = 0; mthi = 0; mtlo = 0; end
      endcase
      y = {$urandom, $urandom}; wd = $urandom;
      @(posedge clk);
      if (mult || div) begin ehi = y[63:32]; elo = y[31:0]; end
      if (mthi) ehi = wd;
      if (mtlo) elo = wd;
      #1;
      checks++;
      if (hi !== ehi || lo !== elo) begin
        failures++;
        if (failures < 10) $display("FAIL hi=%h lo=%h exp %h %h", hi, lo, ehi, elo);
      end
    end
    reset = 1'b1; @(posedge clk); #1;
    checks++;
    if (hi !== 0 || lo !== 0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
