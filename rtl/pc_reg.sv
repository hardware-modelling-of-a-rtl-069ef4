// pc_reg: the program counter. A WIDTH-bit register whose output pc is the
// address of the instruction being executed and whose input pcnext is the
// address of the next one. It loads pcnext on every rising clock edge, since
// the processor completes one instruction per cycle. A synchronous,
// active-high reset returns it to RESET_VALUE (0 by default, where programs
// start); the reset is this design's choice.
module pc_reg #(
  parameter int unsigned        WIDTH       = 32,
  parameter logic [WIDTH-1:0]   RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] pcnext,
  output logic [WIDTH-1:0] pc
);

  always_ff @(posedge clk) begin
    if (reset) pc <= RESET_VALUE;
    else       pc <= pcnext;
  end

endmodule
