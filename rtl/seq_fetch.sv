// seq_fetch: fetch-stage splitter of the SEQ processor.
// Cuts the 80-bit word read from program memory into the instruction fields and computes the
// address of the following instruction. Purely combinational.
//   icode = bits [7:4], ifun = bits [3:0] (byte 0)
//   rA    = bits [15:12], rB = bits [11:8] (byte 1)
//   valC  = bytes 2..9 for irmovq, rmmovq, mrmovq; bytes 1..8 for jXX and call
//   valP  = pc + instruction length (1, 2, 9 or 10 bytes)
// Field positions and lengths follow the document's encoding table. `instr_valid` is low for
// an icode above 0xB, or a function code the ALU or the condition logic does not define (this
// design's choice of what counts as invalid). Instructions without register bytes report
// rA = rB = 0xF.
module seq_fetch
  import y86_pkg::*;
(
  input  logic [79:0] i10bytes,
  input  word_t       pc,
  output logic [3:0]  icode,
  output logic [3:0]  ifun,
  output regnum_t     rA,
  output regnum_t     rB,
  output word_t       valC,
  output word_t       valP,
  output logic        instr_valid
);
  logic need_regids, need_valC;
  logic [3:0] ilen;

  assign icode = i10bytes[7:4];
  assign ifun  = i10bytes[3:0];

  always_comb begin
    need_regids = icode inside {I_RRMOVQ, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_OPQ, I_PUSHQ, I_POPQ};
    need_valC   = icode inside {I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_JXX, I_CALL};

    rA = need_regids ? i10bytes[15:12] : REG_NONE;
    rB = need_regids ? i10bytes[11:8]  : REG_NONE;

    if (icode inside {I_JXX, I_CALL}) valC = i10bytes[71:8];
    else if (need_valC)               valC = i10bytes[79:16];
    else                              valC = '0;

    ilen = 4'd1 + (need_regids ? 4'd1 : 4'd0) + (need_valC ? 4'd8 : 4'd0);
    valP = pc + word_t'(ilen);

    unique case (icode)
      I_OPQ:            instr_valid = (ifun <= 4'h3);
      I_JXX, I_RRMOVQ:  instr_valid = (ifun <= C_G);
      default:          instr_valid = (icode <= I_POPQ);
    endcase
  end
endmodule
