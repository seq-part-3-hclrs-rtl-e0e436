// seq_pc_update: next-PC selection of the SEQ processor.
//   call -> valC;  jXX -> valC if the condition holds, else valP;  ret -> valM;
//   every other instruction -> valP
// That the next PC is usually valP with call, jXX and ret as the exceptions follows the
// document; the choice for each follows from what those instructions do. Combinational.
module seq_pc_update
  import y86_pkg::*;
(
  input  logic [3:0] icode,
  input  logic       cnd,
  input  word_t      valC,
  input  word_t      valM,
  input  word_t      valP,
  output word_t      new_pc
);
  always_comb begin
    unique case (icode)
      I_CALL:  new_pc = valC;
      I_JXX:   new_pc = cnd ? valC : valP;
      I_RET:   new_pc = valM;
      default: new_pc = valP;
    endcase
  end
endmodule
