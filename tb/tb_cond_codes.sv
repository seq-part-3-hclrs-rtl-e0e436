// tb_cond_codes: self-checking test of the condition-code register. Checks the reset value,
// that flags load only when set_cc is high, and every condition function for all eight flag
// combinations against the Y86-64 condition formulas.
module tb_cond_codes;
  import y86_pkg::*;
  logic clk = 0, rst = 1, set_cc = 0, cnd;
  cc_t new_cc, cc;
  logic [3:0] ifun;
  int checks = 0, failures = 0;

  cond_codes dut (.clk, .rst, .set_cc, .new_cc, .ifun, .cc, .cnd);
  always #5 clk = ~clk;

  function automatic logic ref_cnd(logic [3:0] f, cc_t c);
    case (f)
      0: return 1;
      1: return (c.sf != c.of) || c.zf;
      2: return c.sf != c.of;
      3: return c.zf;
      4: return !c.zf;
      5: return c.sf == c.of;
      6: return (c.sf == c.of) && !c.zf;
      default: return 0;
    endcase
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    new_cc = '0; ifun = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    chk(cc == 3'b100, "reset Z=1 S=0 O=0");
    for (int v = 0; v < 8; v++) begin
      new_cc = cc_t'(v[2:0]); set_cc = 1;
      @(negedge clk);
      chk(cc == cc_t'(v[2:0]), "load");
      set_cc = 0; new_cc = ~cc_t'(v[2:0]);
      @(negedge clk);
      chk(cc == cc_t'(v[2:0]), "hold when set_cc low");
      for (int f = 0; f < 16; f++) begin
        ifun = 4'(f); #1;
        chk(cnd == ref_cnd(4'(f), cc), $sformatf("cnd f=%0d cc=%b", f, cc));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
