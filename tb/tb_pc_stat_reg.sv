// tb_pc_stat_reg: self-checking test of the PC and Stat registers. Checks reset, that the PC
// follows new_pc while every instruction is AOK, the priority of the status checks, that the
// stopping instruction leaves the PC in place, and that nothing changes after Stat leaves AOK.
module tb_pc_stat_reg;
  import y86_pkg::*;
  logic clk = 0, rst = 1, ierr = 0, valid = 1, halt = 0, derr = 0, commit;
  word_t new_pc = 0, pc;
  stat_t stat, new_stat;
  logic [31:0] cycles;
  int checks = 0, failures = 0;

  pc_stat_reg dut (.clk, .rst, .imem_error(ierr), .instr_valid(valid), .is_halt(halt),
                   .dmem_error(derr), .new_pc, .pc, .stat, .new_stat, .commit, .cycles);
  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    chk(pc == 0 && stat == STAT_AOK && cycles == 0, "reset");
    // status priority, checked combinationally
    ierr = 1; valid = 0; halt = 1; derr = 1; #1; chk(new_stat == STAT_ADR && !commit, "imem first");
    ierr = 0; #1; chk(new_stat == STAT_INS, "invalid second");
    valid = 1; #1; chk(new_stat == STAT_HLT, "halt third");
    halt = 0; #1; chk(new_stat == STAT_ADR, "dmem fourth");
    derr = 0; #1; chk(new_stat == STAT_AOK && commit, "aok commits");
    rst = 1; @(negedge clk); rst = 0;
    for (int i = 1; i <= 20; i++) begin
      new_pc = {$urandom, $urandom};
      @(negedge clk);
      chk(pc == new_pc && stat == STAT_AOK && cycles == 32'(i), "pc follows");
    end
    begin
      word_t held;
      int    stop_kind;
      held = pc;
      stop_kind = $urandom_range(0, 3);
      new_pc = ~held;
      case (stop_kind)
        0: halt = 1;
        1: valid = 0;
        2: ierr = 1;
        default: derr = 1;
      endcase
      @(negedge clk);
      chk(pc == held && stat != STAT_AOK && cycles == 21, "stopping instruction holds pc");
      chk(stat == ((stop_kind == 0) ? STAT_HLT : (stop_kind == 1) ? STAT_INS : STAT_ADR), "stat kind");
      halt = 0; valid = 1; ierr = 0; derr = 0;
      repeat (5) @(negedge clk);
      chk(pc == held && stat != STAT_AOK && cycles == 21 && !commit, "frozen after stop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
