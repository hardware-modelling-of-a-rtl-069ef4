// mips_top: the processor with its separate instruction and data memories
// (a Harvard arrangement), each of 64 words of 32 bits by default. The
// instruction memory is preloaded from IMEM_FILE; by default it holds a
// demonstration program that multiplies 0xfffffffe by 4 in a procedure
// (multu, mfhi, mflo, jr) and stores the 64-bit product, lo at byte address
// 0x80 and hi at 0x84. The buses are brought out so a testbench can watch
// stores: memwrite, dataadr and writedata are valid during the cycle of a
// store and the memory takes them at the rising edge. One instruction
// completes per cycle after reset is released.
module mips_top #(
  parameter int unsigned IMEM_WORDS = 64,
  parameter int unsigned DMEM_WORDS = 64,
  parameter string       IMEM_FILE  = "rtl/mult_prog.hex"
) (
  input  logic        clk,
  input  logic        reset,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        memwrite,
  output logic [31:0] dataadr,
  output logic [31:0] writedata,
  output logic [31:0] readdata
);

  logic [1:0] size_in;

  mips u_mips (
    .clk(clk), .reset(reset), .pc(pc), .instr(instr), .memwrite(memwrite),
    .size_in(size_in), .aluout(dataadr), .writedata(writedata), .readdata(readdata)
  );

  imem #(.WORDS(IMEM_WORDS), .INIT_FILE(IMEM_FILE)) u_imem (.a(pc), .rd(instr));

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .we(memwrite), .size_in(size_in), .a(dataadr), .wd(writedata),
    .rd(readdata)
  );

endmodule
