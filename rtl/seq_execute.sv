// seq_execute: execute stage of the SEQ processor.
// Chooses the two ALU inputs, runs the ALU and keeps the condition codes.
//   aluA = valA for OPq, rrmovq/cmovXX;  valB for rmmovq, mrmovq;  8 for call, ret, pushq, popq
//   aluB = valB for OPq, call, ret, pushq, popq;  valC for rmmovq, mrmovq;  0 for rrmovq/cmovXX
//   valE = aluB OP aluA, where OP is ifun for OPq, subtract for pushq and call, add otherwise
// so that subq rA, rB gives R[rB] - R[rA], memory instructions give displacement + R[rB], and
// stack instructions give %rsp - 8 or %rsp + 8. The condition codes are loaded from the ALU
// flags only by OPq, and only when `commit` is high; `cnd` is the condition named by ifun,
// evaluated on the flags held before this instruction.
// The document gives the ALU operations, that memory instructions add a displacement to rB and
// stack instructions add or subtract 8 with the ALU, an aluB multiplexer fed by valB and valC,
// and a constant-0 ALU input for register moves. Which input carries which operand beyond that
// is this design's choice. irmovq does not use the ALU: its constant reaches the register file
// through the write-back multiplexer. Combinational apart from the flags register.
module seq_execute
  import y86_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       commit,
  input  logic [3:0] icode,
  input  logic [3:0] ifun,
  input  word_t      valA,
  input  word_t      valB,
  input  word_t      valC,
  output word_t      valE,
  output logic       cnd,
  output cc_t        cc
);
  word_t   aluA, aluB;
  alu_op_t op;
  cc_t     flags;

  always_comb begin
    unique case (icode)
      I_OPQ, I_RRMOVQ:                   aluA = valA;
      I_RMMOVQ, I_MRMOVQ:                aluA = valB;
      I_CALL, I_RET, I_PUSHQ, I_POPQ:    aluA = 64'd8;
      default:                           aluA = '0;
    endcase
    unique case (icode)
      I_OPQ, I_CALL, I_RET, I_PUSHQ, I_POPQ: aluB = valB;
      I_RMMOVQ, I_MRMOVQ:                    aluB = valC;
      default:                               aluB = '0;
    endcase
    unique case (icode)
      I_OPQ:            op = alu_op_t'(ifun[1:0]);
      I_CALL, I_PUSHQ:  op = ALU_SUB;
      default:          op = ALU_ADD;
    endcase
  end

  alu u_alu (
    .op     (op),
    .x      (aluB),
    .y      (aluA),
    .result (valE),
    .flags  (flags)
  );

  cond_codes u_cc (
    .clk    (clk),
    .rst    (rst),
    .set_cc (commit && icode == I_OPQ),
    .new_cc (flags),
    .ifun   (ifun),
    .cc     (cc),
    .cnd    (cnd)
  );
endmodule
