// mips_pkg: types and constants shared by the dual-issue MIPS pipeline.
//
// Holds the opcode and funct encodings of the supported instructions
// (R-type ADD/SUB/AND/OR/SLT, LW, SW, BEQ, ADDI, J), the 4-bit ALU control
// code, the 2-bit ALUOp from the main decoder to the ALU decoder, the
// 3-bit forwarding select used by both lanes, and the packed structs that
// travel through the per-lane pipeline registers.
//
// ALU control: bit 3 inverts operand B and injects a carry of 1 (so 0010 is
// add and 1010 is subtract); bits 2:0 pick the result. Forwarding select:
// 000 register file, 001 own-lane W, 010 own-lane M, 011 other-lane W,
// 100 other-lane M. These codes follow the design description; the enum
// names are this implementation's.
package mips_pkg;

  localparam int unsigned XLEN = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // Opcodes (instr[31:26])
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;
  localparam logic [5:0] OP_BEQ   = 6'b000100;
  localparam logic [5:0] OP_ADDI  = 6'b001000;
  localparam logic [5:0] OP_J     = 6'b000010;

  // R-type function codes (instr[5:0])
  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;
  localparam logic [5:0] FN_AND = 6'b100100;
  localparam logic [5:0] FN_OR  = 6'b100101;
  localparam logic [5:0] FN_SLT = 6'b101010;

  typedef enum logic [3:0] {
    ALU_AND  = 4'b0000,
    ALU_OR   = 4'b0001,
    ALU_ADD  = 4'b0010,
    ALU_SLTU0= 4'b0011,  // sign of A+B; not produced by the decoder
    ALU_SLL  = 4'b0100,
    ALU_MUL  = 4'b0101,
    ALU_DIV  = 4'b0110,
    ALU_SUB  = 4'b1010,
    ALU_SLT  = 4'b1011
  } alu_ctrl_e;

  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,
    ALUOP_SUB   = 2'b01,
    ALUOP_FUNCT = 2'b10,
    ALUOP_SLT   = 2'b11
  } aluop_e;

  typedef enum logic [2:0] {
    FWD_NONE    = 3'b000,
    FWD_W_OWN   = 3'b001,
    FWD_M_OWN   = 3'b010,
    FWD_W_OTHER = 3'b011,
    FWD_M_OTHER = 3'b100
  } fwd_sel_e;

  // Main-decoder output, in the order of the control word.
  typedef struct packed {
    logic   regwrite;
    logic   regdst;
    logic   alusrc;
    logic   branch;
    logic   memwrite;
    logic   memtoreg;
    logic   jump;
    aluop_e aluop;
  } ctrl_t;

  // Decode -> execute register contents of one lane.
  typedef struct packed {
    logic      regwrite;
    logic      memtoreg;
    logic      memwrite;
    alu_ctrl_e alucontrol;
    logic      alusrc;
    logic      regdst;
    word_t     srca;
    word_t     srcb;
    reg_idx_t  rs;
    reg_idx_t  rt;
    reg_idx_t  rd;
    word_t     signimm;
    logic [4:0] shamt;
  } de_t;

  // Execute -> memory register contents of one lane.
  typedef struct packed {
    logic     regwrite;
    logic     memtoreg;
    logic     memwrite;
    word_t    aluout;
    word_t    writedata;
    reg_idx_t writereg;
  } em_t;

  // Memory -> write-back register contents of one lane.
  typedef struct packed {
    logic     regwrite;
    logic     memtoreg;
    word_t    readdata;
    word_t    aluout;
    reg_idx_t writereg;
  } mw_t;

endpackage
