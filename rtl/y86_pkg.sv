// y86_pkg: shared constants and types of the Y86-64 single-cycle (SEQ) processor.
// Holds the instruction codes, function codes, register numbers and status codes of the
// Y86-64 instruction set. The icode values, the register count (15 registers plus 0xF for
// "none") and STAT_AOK = 1 follow the document; the remaining status values, the ALU and
// condition function codes and the decoded-instruction struct are this design's choices,
// taken from the usual Y86-64 definition.
package y86_pkg;

  localparam int unsigned WORD = 64;   // data path width

  typedef logic [WORD-1:0] word_t;
  typedef logic [3:0]      regnum_t;

  // Instruction codes: high nibble of byte 0.
  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,  // also cmovXX
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_t;

  // ALU functions: low nibble of byte 0 for OPq.
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_AND = 2'b10,
    ALU_XOR = 2'b11
  } alu_op_t;

  // Condition functions: low nibble of byte 0 for jXX and cmovXX.
  localparam logic [3:0] C_YES = 4'h0, C_LE = 4'h1, C_L = 4'h2, C_E = 4'h3,
                         C_NE  = 4'h4, C_GE = 4'h5, C_G = 4'h6;

  // Register numbers.
  localparam regnum_t REG_RSP  = 4'h4;
  localparam regnum_t REG_NONE = 4'hF;

  // Machine status.
  typedef enum logic [2:0] {
    STAT_AOK = 3'd1,  // keep going
    STAT_HLT = 3'd2,  // halt instruction executed
    STAT_ADR = 3'd3,  // address out of range
    STAT_INS = 3'd4   // invalid instruction
  } stat_t;

  // Condition code flags.
  typedef struct packed {
    logic zf;
    logic sf;
    logic of;
  } cc_t;

endpackage
