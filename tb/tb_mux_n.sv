// tb_mux_n: a 4-input and a 3-input multiplexer with random data; y must
// equal the selected input, and 0 for the unused select value of the
// 3-input one.
`timescale 1ns/1ps
module tb_mux_n;
  logic [3:0][31:0] d4;
  logic [2:0][4:0]  d3;
  logic [1:0] s4, s3;
  logic [31:0] y4;
  logic [4:0]  y3;
  int checks = 0, failures = 0;

  mux_n #(.WIDTH(32), .N(4)) u4 (.d(d4), .sel(s4), .y(y4));
  mux_n #(.WIDTH(5),  .N(3)) u3 (.d(d3), .sel(s3), .y(y3));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) begin
      for (int i = 0; i < 4; i++) d4[i] = $urandom;
      for (int i = 0; i < 3; i++) d3[i] = 5'($urandom);
      s4 = 2'($urandom); s3 = 2'($urandom);
      #1;
      checks += 2;
      if (y4 !== d4[s4]) begin failures++; $display("FAIL mux4 sel=%0d", s4); end
      if (y3 !== ((s3 == 3) ? 5'd0 : d3[s3])) begin failures++; $display("FAIL mux3 sel=%0d", s3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
