// cond_codes: condition-code register and condition evaluation of the SEQ processor.
// Holds the zero, sign and overflow flags. `set_cc` (high for OPq) loads `new_cc` at the
// rising clock edge; reset clears ZF/SF/OF to Z=1, S=0, O=0, the state the reference simulator
// reports for a program that never sets them. `cnd` is computed combinationally from the flags
// held *before* this instruction and the condition function `ifun`:
//   0 always, 1 le ((SF^OF)|ZF), 2 l (SF^OF), 3 e (ZF), 4 ne (!ZF), 5 ge (!(SF^OF)), 6 g.
// That jXX and cmovXX choose a condition by ifun from prior flags follows the document; the
// condition formulas and the reset value are the usual Y86-64 ones.
module cond_codes
  import y86_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       set_cc,
  input  cc_t        new_cc,
  input  logic [3:0] ifun,
  output cc_t        cc,
  output logic       cnd
);
  always_ff @(posedge clk) begin
    if (rst)         cc <= '{zf: 1'b1, sf: 1'b0, of: 1'b0};
    else if (set_cc) cc <= new_cc;
  end

  always_comb begin
    unique case (ifun)
      C_YES:   cnd = 1'b1;
      C_LE:    cnd = (cc.sf ^ cc.of) | cc.zf;
      C_L:     cnd = cc.sf ^ cc.of;
      C_E:     cnd = cc.zf;
      C_NE:    cnd = !cc.zf;
      C_GE:    cnd = !(cc.sf ^ cc.of);
      C_G:     cnd = !(cc.sf ^ cc.of) && !cc.zf;
      default: cnd = 1'b0;
    endcase
  end
endmodule
