// alu: the extended ALU. One 6-bit code, alucontrol, selects the operation
// (the codes are listed in mips_pkg::alucontrol_e). The code is decoded
// by fields:
//   bit 4     invert B and feed a carry-in of 1, so the adder computes
//             A - B and the logic unit works on B' (A&B', A|B', ...);
//   bits 3:0  pick the result: and, or, add, slt, sll, xor, nor, srl, sra;
//   bit 5     take the shift amount from A[4:0] (sllv/srlv/srav) instead
//             of the instruction's shamt field.
// Shifts act on B. slt is signed: the sign of A-B corrected for overflow.
// zero is 1 when the result is 0; the datapath uses it, and the result's
// sign bit, for its branch decisions. Combinational. Codes the table marks
// unused, and codes it does not list, give 0 (this design's choice).
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [4:0]       shamt,
  input  logic [5:0]       alucontrol,
  output logic [WIDTH-1:0] y,
  output logic             zero
);

  logic             invb, varshift;
  logic [WIDTH-1:0] bb, sum;
  logic [4:0]       sa;
  logic             ovf, lt;
  logic             legal;

  assign invb     = alucontrol[4];
  assign varshift = alucontrol[5];
  assign bb       = invb ? ~b : b;
  assign sum      = a + bb + WIDTH'(invb);
  // Signed overflow of a + bb: operands agree in sign, result does not.
  assign ovf      = (a[WIDTH-1] == bb[WIDTH-1]) && (sum[WIDTH-1] != a[WIDTH-1]);
  assign lt       = sum[WIDTH-1] ^ ovf;
  assign sa       = varshift ? a[4:0] : shamt;

  // Only the codes of the ALU table are defined.
  always_comb begin
    unique case (alucontrol)
      ALU_AND, ALU_OR, ALU_ADD, ALU_SLL, ALU_XOR, ALU_NOR, ALU_SRL, ALU_SRA,
      ALU_ANDN, ALU_ORN, ALU_SUB, ALU_SLT, ALU_XORN, ALU_NORN,
      ALU_SLLV, ALU_SRLV, ALU_SRAV: legal = 1'b1;
      default:                      legal = 1'b0;
    endcase
  end

  always_comb begin
    y = '0;
    if (legal) begin
      unique case (alucontrol[3:0])
        4'b0000: y = a & bb;
        4'b0001: y = a | bb;
        4'b0010: y = sum;
        4'b0011: y = WIDTH'(lt);
        4'b0100: y = b << sa;
        4'b0101: y = a ^ bb;
        4'b0110: y = ~(a | bb);
        4'b0111: y = b >> sa;
        4'b1000: y = WIDTH'($signed(b) >>> sa);
        default: y = '0;
      endcase
    end
  end

  assign zero = (y == '0);

endmodule
