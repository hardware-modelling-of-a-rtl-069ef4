// tb_muldiv: checks signed and unsigned multiply and divide against 64-bit
// arithmetic done here, on corner operands (zero, one, minus one, the most
// negative number, divide by zero, the signed overflow divide) and random
// ones, including y = 0 when neither operation is requested.
`timescale 1ns/1ps
module tb_muldiv;
  logic [31:0] a, b;
  logic        mult, div, sign;
  logic [63:0] y, e;
  int          checks = 0, failures = 0;

  muldiv dut (.a(a), .b(b), .mult(mult), .div(div), .sign(sign), .y(y));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] model(logic m, logic d, logic s, logic [31:0] x, logic [31:0] z);
    longint sx, sz, q, r;
    if (m) begin
      if (s) return 64'($signed(x)) * 64'($signed(z));
      return {32'h0, x} * {32'h0, z};
    end
    if (d) begin
      sx = s ? longint'($signed(x)) : longint'({32'h0, x});
      sz = s ? longint'($signed(z)) : longint'({32'h0, z});
      if (sz == 0) begin
        // quotient of magnitudes is all ones, negated if the dividend is negative
        q = (s && sx < 0) ? 1 : 64'hffffffff;
        r = sx;
      end else begin
        q = sx / sz;   // 64-bit arithmetic: no overflow, truncates toward zero
        r = sx % sz;
      end
      return {r[31:0], q[31:0]};
    end
    return 64'h0;
  endfunction

  logic [31:0] corner [7] = '{32'h0, 32'h1, 32'hffffffff, 32'h7fffffff, 32'h80000000, 32'hfffffffe, 32'd4};

  task automatic run_one();
    #1;
    e = model(mult, div, sign, a, b);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 20) $display("FAIL m=%b d=%b s=%b a=%h b=%h y=%h exp %h", mult, div, sign, a, b, y, e);
    end
  endtask

  initial begin
    for (int op = 0; op < 6; op++) begin
      mult = (op < 2); div = (op >= 2 && op < 4); sign = op[0];
      foreach (corner[i]) foreach (corner[j]) begin a = corner[i]; b = corner[j]; run_one(); end
      repeat (500) begin
        a = $urandom; b = $urandom;
        if ($urandom % 3 == 0) b = b >> ($urandom % 32);
        run_one();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
