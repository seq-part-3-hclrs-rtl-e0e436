// tb_regfile: self-checking test of the register file against an array model. Random
// two-port writes (including 0xF "none" and both ports naming the same register, where the
// M port wins), random reads on both ports, the write enable and reset.
module tb_regfile;
  import y86_pkg::*;
  logic clk = 0, rst = 1, wr_en = 0;
  regnum_t srcA, srcB, dstE, dstM;
  word_t inE, inM, outA, outB, regs [15];
  word_t model [15];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .wr_en, .reg_srcA(srcA), .reg_srcB(srcB), .reg_dstE(dstE),
               .reg_dstM(dstM), .reg_inputE(inE), .reg_inputM(inM), .reg_outputA(outA),
               .reg_outputB(outB), .regs_out(regs));
  always #5 clk = ~clk;

  function automatic word_t rd(regnum_t n);
    return (n == 4'hF) ? '0 : model[n];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    srcA = 0; srcB = 0; dstE = 4'hF; dstM = 4'hF; inE = 0; inM = 0;
    foreach (model[i]) model[i] = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    repeat (500) begin
      dstE = 4'($urandom_range(0, 15)); dstM = ($urandom_range(0, 3) == 0) ? dstE : 4'($urandom_range(0, 15));
      inE = {$urandom, $urandom}; inM = {$urandom, $urandom};
      wr_en = ($urandom_range(0, 4) != 0);
      srcA = 4'($urandom_range(0, 15)); srcB = 4'($urandom_range(0, 15));
      #1;
      checks++;
      if (outA !== rd(srcA) || outB !== rd(srcB)) begin
        failures++; $display("FAIL read A%0d=%h B%0d=%h", srcA, outA, srcB, outB);
      end
      @(negedge clk);
      if (wr_en) begin
        if (dstE != 4'hF) model[dstE] = inE;
        if (dstM != 4'hF) model[dstM] = inM;
      end
      checks++;
      if (regs != model) begin failures++; $display("FAIL state after write"); end
    end
    rst = 1; @(negedge clk); rst = 0;
    checks++;
    foreach (regs[i]) if (regs[i] != 0) begin failures++; $display("FAIL reset"); break; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
