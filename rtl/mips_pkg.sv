// mips_pkg: encodings and control-signal bundles shared by the single-cycle
// MIPS processor. Opcode and funct values, the 6-bit ALU control codes of
// the extended ALU, the 3-bit ALUop passed from the main control to the
// R-type control, and the structs that carry each decoder's outputs.
// The codes follow the processor's published decode tables; blez and bgtz
// keep the table's encodings (000111 and 000110), which are swapped with
// respect to the usual MIPS assignment.
package mips_pkg;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [5:0] {
    OP_RTYPE = 6'b000000,
    OP_BLTZ  = 6'b000001,
    OP_J     = 6'b000010,
    OP_JAL   = 6'b000011,
    OP_BEQ   = 6'b000100,
    OP_BNE   = 6'b000101,
    OP_BGTZ  = 6'b000110,
    OP_BLEZ  = 6'b000111,
    OP_ADDI  = 6'b001000,
    OP_ADDIU = 6'b001001,
    OP_SLTI  = 6'b001010,
    OP_SLTIU = 6'b001011,
    OP_ANDI  = 6'b001100,
    OP_ORI   = 6'b001101,
    OP_XORI  = 6'b001110,
    OP_LUI   = 6'b001111,
    OP_LB    = 6'b100000,
    OP_LH    = 6'b100001,
    OP_LW    = 6'b100011,
    OP_LBU   = 6'b100100,
    OP_LHU   = 6'b100101,
    OP_SB    = 6'b101000,
    OP_SH    = 6'b101001,
    OP_SW    = 6'b101011
  } opcode_e;

  // ------------------------------------------------------ R-type funct codes
  typedef enum logic [5:0] {
    F_SLL   = 6'b000000,
    F_SRL   = 6'b000010,
    F_SRA   = 6'b000011,
    F_SLLV  = 6'b000100,
    F_SRLV  = 6'b000110,
    F_SRAV  = 6'b000111,
    F_JR    = 6'b001000,
    F_JALR  = 6'b001001,
    F_MFHI  = 6'b010000,
    F_MTHI  = 6'b010001,
    F_MFLO  = 6'b010010,
    F_MTLO  = 6'b010011,
    F_MULT  = 6'b011000,
    F_MULTU = 6'b011001,
    F_DIV   = 6'b011010,
    F_DIVU  = 6'b011011,
    F_ADD   = 6'b100000,
    F_ADDU  = 6'b100001,
    F_SUB   = 6'b100010,
    F_SUBU  = 6'b100011,
    F_AND   = 6'b100100,
    F_OR    = 6'b100101,
    F_XOR   = 6'b100110,
    F_NOR   = 6'b100111,
    F_SLT   = 6'b101010,
    F_SLTU  = 6'b101011
  } funct_e;

  // ------------------------------------------------------ ALU control codes
  // bit 5: shift amount taken from A[4:0]; bit 4: B inverted (carry-in 1
  // for the adder); bits 3:0: operation.
  typedef enum logic [5:0] {
    ALU_AND  = 6'b000000,
    ALU_OR   = 6'b000001,
    ALU_ADD  = 6'b000010,
    ALU_SLL  = 6'b000100,
    ALU_XOR  = 6'b000101,
    ALU_NOR  = 6'b000110,
    ALU_SRL  = 6'b000111,
    ALU_SRA  = 6'b001000,
    ALU_ANDN = 6'b010000,
    ALU_ORN  = 6'b010001,
    ALU_SUB  = 6'b010010,
    ALU_SLT  = 6'b010011,
    ALU_XORN = 6'b010101,
    ALU_NORN = 6'b010110,
    ALU_SLLV = 6'b100100,
    ALU_SRLV = 6'b100111,
    ALU_SRAV = 6'b101000
  } alucontrol_e;

  // -------------------------------------------------------------- ALUop
  typedef enum logic [2:0] {
    AOP_ADD   = 3'b000,
    AOP_SUB   = 3'b001,
    AOP_AND   = 3'b010,
    AOP_OR    = 3'b011,
    AOP_XOR   = 3'b100,
    AOP_SLT   = 3'b101,
    AOP_FUNCT = 3'b110,
    AOP_NA    = 3'b111
  } aluop_e;

  // Store size (Sh_B column): selects the lanes written in data memory.
  typedef enum logic [1:0] {
    SZ_BYTE = 2'b00,
    SZ_HALF = 2'b01,
    SZ_WORD = 2'b11
  } size_e;

  // Register destination select (Regdst).
  typedef enum logic [1:0] {
    RD_RT = 2'b00,
    RD_RD = 2'b01,
    RD_RA = 2'b10
  } regdst_e;

  // ALU B-operand select (Alusrc).
  typedef enum logic [1:0] {
    SRC_REG  = 2'b00,
    SRC_SIMM = 2'b01,
    SRC_ZIMM = 2'b10,
    SRC_LUI  = 2'b11
  } alusrc_e;

  // Register write-data select (Memtoreg).
  typedef enum logic [1:0] {
    WB_ALU  = 2'b00,
    WB_WORD = 2'b01,
    WB_HALF = 2'b10,
    WB_BYTE = 2'b11
  } memtoreg_e;

  // Outputs of the main control (one row of the opcode table).
  typedef struct packed {
    size_e     sh_b;
    logic      lbu;
    logic      lhu;
    logic      regwrite;
    regdst_e   regdst;
    alusrc_e   alusrc;
    logic      beq;
    logic      bne;
    logic      blez;
    logic      bltz;
    logic      bgtz;
    logic      memwrite;
    memtoreg_e memtoreg;
    logic      jump;
    logic      jal;
    aluop_e    aluop;
  } main_ctrl_t;

  // Outputs of the R-type control (one row of the funct table).
  typedef struct packed {
    alucontrol_e alucontrol;
    logic        jr;
    logic        jalr;
    logic        div;
    logic        mult;
    logic        sign;
    logic        mthi;
    logic        mtlo;
    logic        mfhi;
    logic        mflo;
  } rtype_ctrl_t;

  // Everything the control unit hands to the datapath.
  typedef struct packed {
    main_ctrl_t  m;
    rtype_ctrl_t r;
  } ctrl_t;

endpackage
