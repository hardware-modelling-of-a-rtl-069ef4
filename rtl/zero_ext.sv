// zero_ext: zero extender. Places the IN_W-bit input in the low bits of the
// OUT_W-bit output and fills the upper bits with zeros (16 to 32 bits by
// default, for the logical immediates of andi/ori/xori; also used for lbu
// and lhu). Purely combinational.
module zero_ext #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  a,
  output logic [OUT_W-1:0] y
);

  assign y = {{(OUT_W-IN_W){1'b0}}, a};

endmodule
