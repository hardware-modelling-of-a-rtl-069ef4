// tb_imem: the instruction memory at its default size and contents must
// return the ten words of the demonstration program at byte addresses
// 0x00..0x24 and zero above, ignoring the two byte-offset bits and the
// address bits above the memory.
`timescale 1ns/1ps
module tb_imem;
  logic [31:0] a, rd;
  int checks = 0, failures = 0;

  imem dut (.a(a), .rd(rd));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [10] = '{32'h3c04ffff, 32'h3484fffe, 32'h20050004, 32'h0c000007,
                             32'hac020080, 32'hac030084, 32'h00850019, 32'h00001810,
                             32'h00001012, 32'h03e00008};

  initial begin
    logic [31:0] e;
    for (int w = 0; w < 64; w++) begin
      e = (w < 10) ? prog[w] : 32'h0;
      for (int off = 0; off < 4; off++) begin
        a = {$urandom} << 8 | 32'(w * 4 + off);
        #1;
        checks++;
        if (rd !== e) begin failures++; $display("FAIL a=%h rd=%h exp %h", a, rd, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
