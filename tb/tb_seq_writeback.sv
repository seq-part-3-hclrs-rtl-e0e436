// tb_seq_writeback: self-checking test of write-back control. For every icode, both values of
// the condition and random operands it checks dstE, dstM and the E-port input value.
module tb_seq_writeback;
  import y86_pkg::*;
  logic [3:0] icode;
  logic cnd;
  regnum_t rA, rB, dstE, dstM, eE, eM;
  word_t valC, valE, inE;
  int checks = 0, failures = 0;

  seq_writeback dut (.icode, .rA, .rB, .cnd, .valC, .valE, .dstE, .dstM, .inputE(inE));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30) for (int ic = 0; ic < 16; ic++) for (int c = 0; c < 2; c++) begin
      icode = 4'(ic); cnd = c[0]; rA = 4'($urandom); rB = 4'($urandom);
      valC = {$urandom, $urandom}; valE = {$urandom, $urandom};
      case (ic)
        2:            eE = c ? rB : 4'hF;   // cmovXX writes only if the condition holds
        3, 6:         eE = rB;
        8, 9, 10, 11: eE = 4'h4;
        default:      eE = 4'hF;
      endcase
      eM = (ic == 5 || ic == 11) ? rA : 4'hF;
      #1;
      checks++;
      if (dstE !== eE || dstM !== eM || inE !== ((ic == 3) ? valC : valE)) begin
        failures++; $display("FAIL icode=%h cnd=%b dstE=%h dstM=%h", ic, c, dstE, dstM);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
