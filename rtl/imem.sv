// imem: instruction memory. WORDS words of 32 bits (64 by default), read
// combinationally: rd is the word at byte address a, indexed by a[AW+1:2]
// (the two low bits are the byte offset, higher bits are ignored). It is a
// read-only array loaded at start-up with $readmemh from INIT_FILE; the
// default file holds the multiply-procedure demonstration program. Words
// the file does not fill read as zero (a sll $0,$0,0, i.e. a no-op). The
// path is relative to the directory the simulator runs in; an empty string
// leaves the memory zeroed for a testbench to fill.
module imem #(
  parameter int unsigned WORDS     = 64,
  parameter string       INIT_FILE = "rtl/mult_prog.hex"
) (
  input  logic [31:0] a,
  output logic [31:0] rd
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign rd = mem[a[AW+1:2]];

endmodule
