// hilo: the hi and lo registers that receive the multiply/divide unit's
// 64-bit result. On a rising clock edge: mult or div loads hi <= y[63:32]
// and lo <= y[31:0]; mthi loads hi <= wd and mtlo loads lo <= wd (wd is the
// rs register). mfhi and mflo read the outputs directly. A synchronous,
// active-high reset clears both (this design's choice).
module hilo #(
  parameter int unsigned WIDTH = 32
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               mult,
  input  logic               div,
  input  logic               mthi,
  input  logic               mtlo,
  input  logic [2*WIDTH-1:0] y,
  input  logic [WIDTH-1:0]   wd,
  output logic [WIDTH-1:0]   hi,
  output logic [WIDTH-1:0]   lo
);

  always_ff @(posedge clk) begin
    if (reset) begin
      hi <= '0;
      lo <= '0;
    end else if (mult || div) begin
      hi <= y[2*WIDTH-1:WIDTH];
      lo <= y[WIDTH-1:0];
    end else begin
      if (mthi) hi <= wd;
      if (mtlo) lo <= wd;
    end
  end

endmodule
