// tb_sign_ext: exhaustive check of the 16-to-32-bit and 8-to-32-bit
// sign extenders: the output keeps the input in its low bits and
// copies bit 15 (bit 7) into the upper bits.
`timescale 1ns/1ps
module tb_sign_ext;
  logic [15:0] a16;
  logic [7:0]  a8;
  logic [31:0] y16, y8;
  logic [15:0] x;
  int checks = 0, failures = 0;

  sign_ext #(.IN_W(16), .OUT_W(32)) u16 (.a(a16), .y(y16));
  sign_ext #(.IN_W(8),  .OUT_W(32)) u8  (.a(a8),  .y(y8));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      a16 = 16'(i); a8 = 8'(i);
      x = 16'(i);
      #1;
      checks++;
      if (y16 !== 32'({{16{x[15]}}, x}) || y8 !== 32'({{24{x[7]}}, x[7:0]})) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h y16=%h y8=%h", a16, y16, y8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
