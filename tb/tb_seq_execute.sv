// tb_seq_execute: self-checking test of the execute stage. For each instruction with random
// register values it checks valE against what the instruction must compute (OPq results,
// displacement + rB, %rsp -/+ 8, register move), that only a committed OPq changes the
// condition codes, and that cnd follows the flags the OPq left behind.
module tb_seq_execute;
  import y86_pkg::*;
  logic clk = 0, rst = 1, commit = 0, cnd;
  logic [3:0] icode = 0, ifun = 0;
  word_t valA = 0, valB = 0, valC = 0, valE, e;
  cc_t cc, cc_before;
  int checks = 0, failures = 0;

  seq_execute dut (.clk, .rst, .commit, .icode, .ifun, .valA, .valB, .valC, .valE, .cnd, .cc);
  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    chk(cc == 3'b100, "reset flags");
    repeat (300) begin
      int ic;
      ic = $urandom_range(0, 11);
      icode = 4'(ic);
      ifun = (ic == 6) ? 4'($urandom_range(0, 3)) : 4'($urandom_range(0, 6));
      valA = {$urandom, $urandom}; valB = {$urandom, $urandom}; valC = {$urandom, $urandom};
      if ($urandom_range(0, 3) == 0) valA = valB;   // exercise the zero flag
      commit = ($urandom_range(0, 3) != 0);
      cc_before = cc;
      case (ic)
        6: case (ifun)
             0: e = valB + valA;
             1: e = valB - valA;
             2: e = valB & valA;
             default: e = valB ^ valA;
           endcase
        2:        e = valA;
        4, 5:     e = valB + valC;
        8, 10:    e = valB - 64'd8;
        9, 11:    e = valB + 64'd8;
        default:  e = 'x;
      endcase
      #1;
      if (ic inside {2, 4, 5, 6, 8, 9, 10, 11})
        chk(valE === e, $sformatf("valE icode=%0d ifun=%0d", ic, ifun));
      @(negedge clk);
      if (ic == 6 && commit) begin
        chk(cc.zf == (e == 0) && cc.sf == e[63], "flags set by OPq");
        // after subq the signed less-than condition must equal valB < valA
        if (ifun == 1) begin
          icode = 4'h7; ifun = 4'h2; #1;
          chk(cnd == ($signed(valB) < $signed(valA)), "jl after subq");
          ifun = 4'h3; #1;
          chk(cnd == (valB == valA), "je after subq");
        end
      end else begin
        chk(cc == cc_before, "flags unchanged");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
