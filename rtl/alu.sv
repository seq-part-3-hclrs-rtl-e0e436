// alu: the 64-bit arithmetic/logic unit of the SEQ processor.
// Computes x + y, x - y, x & y or x ^ y, selected by the 2-bit `op` (00 add, 01 sub, 10 and,
// 11 xor), and the flags the condition codes take from the result: zero, sign and signed
// overflow. The four operations and their encoding follow the document; the flag outputs are
// this design's addition, defined as in the usual Y86-64 machine. Combinational.
module alu
  import y86_pkg::*;
(
  input  alu_op_t op,
  input  word_t   x,
  input  word_t   y,
  output word_t   result,
  output cc_t     flags
);
  always_comb begin
    unique case (op)
      ALU_ADD: result = x + y;
      ALU_SUB: result = x - y;
      ALU_AND: result = x & y;
      ALU_XOR: result = x ^ y;
    endcase
    flags.zf = (result == '0);
    flags.sf = result[63];
    unique case (op)
      ALU_ADD: flags.of = (x[63] == y[63]) && (result[63] != x[63]);
      ALU_SUB: flags.of = (x[63] != y[63]) && (result[63] != x[63]);
      default: flags.of = 1'b0;
    endcase
  end
endmodule
