// sign_ext: sign extender. Copies the most significant bit of the IN_W-bit
// input into all upper bits of the OUT_W-bit output (16 to 32 bits by
// default, for immediates; also used for loaded bytes and half-words).
// Purely combinational.
module sign_ext #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  a,
  output logic [OUT_W-1:0] y
);

  assign y = {{(OUT_W-IN_W){a[IN_W-1]}}, a};

endmodule
