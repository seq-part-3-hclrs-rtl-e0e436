// seq_writeback: write-back control of the SEQ processor.
// Chooses the two register-file destinations and the value for the E port:
//   dstE = rB    for irmovq, OPq, and rrmovq/cmovXX when the condition holds
//        = %rsp  for pushq, popq, call, ret
//        = 0xF   otherwise (no write; a failed cmovXX writes nothing)
//   dstM = rA    for mrmovq and popq, otherwise 0xF
//   inputE = valC for irmovq, valE (ALU output) otherwise
// (the M port always takes valM, the value read from data memory, so it needs no multiplexer)
// Two write ports with 0xF as "no write", cmovXX gated by its condition, and the constant
// of irmovq entering through this multiplexer rather than the ALU all follow the document.
// Combinational.
module seq_writeback
  import y86_pkg::*;
(
  input  logic [3:0] icode,
  input  regnum_t    rA,
  input  regnum_t    rB,
  input  logic       cnd,
  input  word_t      valC,
  input  word_t      valE,
  output regnum_t    dstE,
  output regnum_t    dstM,
  output word_t      inputE
);
  always_comb begin
    unique case (icode)
      I_IRMOVQ, I_OPQ:                  dstE = rB;
      I_RRMOVQ:                         dstE = cnd ? rB : REG_NONE;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:   dstE = REG_RSP;
      default:                          dstE = REG_NONE;
    endcase
    dstM   = (icode inside {I_MRMOVQ, I_POPQ}) ? rA : REG_NONE;
    inputE = (icode == I_IRMOVQ) ? valC : valE;
  end
endmodule
