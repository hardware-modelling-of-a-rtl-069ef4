// regfile: the register file, NREGS registers of WIDTH bits (32 x 32).
// Two read ports: rd1 and rd2 show, combinationally, the registers selected
// by the 5-bit addresses a1 and a2. One write port: on a rising clock edge,
// when we3 is 1, wd3 is written to the register selected by a3. A read of
// the register being written returns the old value until the edge.
// Register 0 is the MIPS zero register: it always reads as 0 and writes to
// it are dropped (this design's choice, which the instruction set relies
// on). The registers are not reset.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             we3,
  input  logic [AW-1:0]    a1,
  input  logic [AW-1:0]    a2,
  input  logic [AW-1:0]    a3,
  input  logic [WIDTH-1:0] wd3,
  output logic [WIDTH-1:0] rd1,
  output logic [WIDTH-1:0] rd2
);

  logic [WIDTH-1:0] rf [NREGS];

  always_ff @(posedge clk) begin
    if (we3 && a3 != '0) rf[a3] <= wd3;
  end

  assign rd1 = (a1 == '0) ? '0 : rf[a1];
  assign rd2 = (a2 == '0) ? '0 : rf[a2];

endmodule
