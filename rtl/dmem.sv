// dmem: data memory, WORDS words of 32 bits (64 by default), byte
// addressed. Read port: rd always shows the whole aligned word holding byte
// address a (combinational); the datapath picks bytes or halves out of it.
// Write port: on a rising clock edge with we = 1, wd is stored at a, limited
// by size_in: 11 writes the word, 01 the half-word selected by a[1]
// (from wd[15:0]), 00 the byte selected by a[1:0] (from wd[7:0]); 10 is
// treated as a word. Lanes are big-endian: byte offset 0 is bits 31:24.
// The size codes are the processor's; the lane order, the ignored low
// address bits on misaligned accesses and the zeroed initial contents are
// this design's choices.
module dmem
  import mips_pkg::*;
#(
  parameter int unsigned WORDS = 64
) (
  input  logic        clk,
  input  logic        we,
  input  logic [1:0]  size_in,
  input  logic [31:0] a,
  input  logic [31:0] wd,
  output logic [31:0] rd
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];
  logic [AW-1:0] idx;
  logic [3:0]    lanes;     // byte enables, bit 3 = bits 31:24
  logic [31:0]   wdata;     // write data placed on its lanes

  initial for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;

  assign idx = a[AW+1:2];

  always_comb begin
    unique case (size_e'(size_in))
      SZ_BYTE: begin
        lanes = 4'b1000 >> a[1:0];
        wdata = {4{wd[7:0]}};
      end
      SZ_HALF: begin
        lanes = a[1] ? 4'b0011 : 4'b1100;
        wdata = {2{wd[15:0]}};
      end
      default: begin
        lanes = 4'b1111;
        wdata = wd;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (we) begin
      for (int b = 0; b < 4; b++)
        if (lanes[b]) mem[idx][8*b +: 8] <= wdata[8*b +: 8];
    end
  end

  assign rd = mem[idx];

endmodule
