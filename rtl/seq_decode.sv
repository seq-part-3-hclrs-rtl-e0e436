// seq_decode: source-register selection of the SEQ processor.
// Two multiplexers, controlled by icode, choose which registers the register file reads:
//   srcA = rA   for rrmovq/cmovXX, rmmovq, OPq, pushq, popq; else 0xF (none)
//   srcB = rB   for rmmovq, mrmovq, OPq
//        = %rsp for call, ret, pushq, popq; else 0xF (none)
// The table of which instruction reads which register follows the document, including its
// choice that popq names rA on port A (the value is read but unused) and that call and ret
// read nothing on port A. Combinational.
module seq_decode
  import y86_pkg::*;
(
  input  logic [3:0] icode,
  input  regnum_t    rA,
  input  regnum_t    rB,
  output regnum_t    srcA,
  output regnum_t    srcB
);
  always_comb begin
    unique case (icode)
      I_RRMOVQ, I_RMMOVQ, I_OPQ, I_PUSHQ, I_POPQ: srcA = rA;
      default:                                    srcA = REG_NONE;
    endcase
    unique case (icode)
      I_RMMOVQ, I_MRMOVQ, I_OPQ:        srcB = rB;
      I_CALL, I_RET, I_PUSHQ, I_POPQ:   srcB = REG_RSP;
      default:                          srcB = REG_NONE;
    endcase
  end
endmodule
