// tb_seq_pc_update: self-checking test of next-PC selection for every icode and condition.
module tb_seq_pc_update;
  import y86_pkg::*;
  logic [3:0] icode;
  logic cnd;
  word_t valC, valM, valP, new_pc, e;
  int checks = 0, failures = 0;

  seq_pc_update dut (.icode, .cnd, .valC, .valM, .valP, .new_pc);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30) for (int ic = 0; ic < 16; ic++) for (int c = 0; c < 2; c++) begin
      icode = 4'(ic); cnd = c[0];
      valC = {$urandom, $urandom}; valM = {$urandom, $urandom}; valP = {$urandom, $urandom};
      e = (ic == 8) ? valC : (ic == 7 && c == 1) ? valC : (ic == 9) ? valM : valP;
      #1;
      checks++;
      if (new_pc !== e) begin failures++; $display("FAIL icode=%h cnd=%b", ic, c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
