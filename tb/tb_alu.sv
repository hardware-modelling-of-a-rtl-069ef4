// tb_alu: checks every ALU control code on directed corner values and on
// random operands, against results computed here with plain operators, and
// the zero flag. Unused codes must give 0.
`timescale 1ns/1ps
module tb_alu;
  logic [31:0] a, b, y, e;
  logic [4:0]  shamt;
  logic [5:0]  ac;
  logic        zero;
  int          checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .shamt(shamt), .alucontrol(ac), .y(y), .zero(zero));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(logic [5:0] c, logic [31:0] x, logic [31:0] z, logic [4:0] s);
    case (c)
      6'b000000: return x & z;
      6'b000001: return x | z;
      6'b000010: return x + z;
      6'b000100: return z << s;
      6'b000101: return x ^ z;
      6'b000110: return ~(x | z);
      6'b000111: return z >> s;
      6'b001000: return $signed(z) >>> s;
      6'b010000: return x & ~z;
      6'b010001: return x | ~z;
      6'b010010: return x - z;
      6'b010011: return ($signed(x) < $signed(z)) ? 32'd1 : 32'd0;
      6'b010101: return x ^ ~z;
      6'b010110: return ~(x | ~z);
      6'b100100: return z << x[4:0];
      6'b100111: return z >> x[4:0];
      6'b101000: return $signed(z) >>> x[4:0];
      default:   return 32'd0;
    endcase
  endfunction

  logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffffffff, 32'h7fffffff, 32'h80000000, 32'h12345678};

  task automatic run_one();
    #1;
    e = model(ac, a, b, shamt);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      if (failures < 20) $display("FAIL ac=%b a=%h b=%h sh=%0d y=%h exp %h zero=%b", ac, a, b, shamt, y, e, zero);
    end
  endtask

  initial begin
    for (int c = 0; c < 64; c++) begin
      ac = 6'(c);
      foreach (corner[i]) foreach (corner[j]) begin
        a = corner[i]; b = corner[j]; shamt = 5'(i * 7 + j);
        run_one();
      end
      repeat (200) begin
        a = $urandom; b = $urandom; shamt = 5'($urandom);
        if ($urandom % 4 == 0) b = a;
        run_one();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
