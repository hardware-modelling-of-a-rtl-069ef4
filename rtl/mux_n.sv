// mux_n: an N-input, WIDTH-bit multiplexer. y is d[sel]; a select value
// past the last input gives zero. The processor uses it for every choice a
// control signal makes in the datapath: register destination, ALU operand
// B, register write data and the next program counter.
module mux_n #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned N     = 4,
  localparam int unsigned SW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][WIDTH-1:0] d,
  input  logic [SW-1:0]           sel,
  output logic [WIDTH-1:0]        y
);

  always_comb begin
    y = '0;
    for (int i = 0; i < int'(N); i++)
      if (sel == SW'(i)) y = d[i];
  end

endmodule
