// tb_seq_decode: self-checking test of source-register selection. For every icode and random
// rA/rB it checks srcA and srcB against the table of registers each instruction reads.
module tb_seq_decode;
  import y86_pkg::*;
  logic [3:0] icode;
  regnum_t rA, rB, srcA, srcB, eA, eB;
  int checks = 0, failures = 0;

  seq_decode dut (.icode, .rA, .rB, .srcA, .srcB);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30) for (int ic = 0; ic < 16; ic++) begin
      icode = 4'(ic); rA = 4'($urandom); rB = 4'($urandom);
      // instruction          srcA   srcB
      // halt nop jXX irmovq   none   none
      // rrmovq/cmovXX         rA     none
      // mrmovq                none   rB
      // rmmovq OPq            rA     rB
      // call ret              none   %rsp
      // pushq popq            rA     %rsp
      case (ic)
        2:     begin eA = rA;   eB = 4'hF; end
        5:     begin eA = 4'hF; eB = rB;   end
        4, 6:  begin eA = rA;   eB = rB;   end
        8, 9:  begin eA = 4'hF; eB = 4'h4; end
        10,11: begin eA = rA;   eB = 4'h4; end
        default: begin eA = 4'hF; eB = 4'hF; end
      endcase
      #1;
      checks++;
      if (srcA !== eA || srcB !== eB) begin
        failures++; $display("FAIL icode=%h srcA=%h srcB=%h exp %h %h", ic, srcA, srcB, eA, eB);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
