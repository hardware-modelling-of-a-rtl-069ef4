// tb_dmem: random word, half-word and byte stores and word reads against a
// byte-array model with big-endian lanes (byte offset 0 = bits 31:24);
// nothing changes when we = 0.
`timescale 1ns/1ps
module tb_dmem;
  logic clk = 1'b0;
  logic we;
  logic [1:0] size_in;
  logic [31:0] a, wd, rd, e;
  logic [7:0] bytes [256];
  int checks = 0, failures = 0;

  dmem dut (.clk(clk), .we(we), .size_in(size_in), .a(a), .wd(wd), .rd(rd));
  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (bytes[i]) bytes[i] = 8'h0;
    repeat (3000) begin
      we = 1'($urandom);
      case ($urandom % 4) 0: size_in = 2'b00; 1: size_in = 2'b01; default: size_in = 2'b11; endcase
      a = $urandom % 256;
      if (size_in == 2'b01) a[0] = 1'b0;
      if (size_in == 2'b11) a[1:0] = 2'b00;
      wd = $urandom;
      #1;
      e = {bytes[{a[7:2], 2'd0}], bytes[{a[7:2], 2'd1}], bytes[{a[7:2], 2'd2}], bytes[{a[7:2], 2'd3}]};
      checks++;
      if (rd !== e) begin
        failures++;
        if (failures < 10) $display("FAIL read a=%h rd=%h exp %h", a, rd, e);
      end
      @(posedge clk);
      if (we) begin
        case (size_in)
          2'b00: bytes[a[7:0]] = wd[7:0];
          2'b01: begin bytes[a[7:0]] = wd[15:8]; bytes[8'(a[7:0] + 8'd1)] = wd[7:0]; end
          default: for (int k = 0; k < 4; k++) bytes[8'(int'(a[7:0]) + k)] = wd[31 - 8*k -: 8];
        endcase
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
