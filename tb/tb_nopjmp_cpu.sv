// tb_nopjmp_cpu: self-checking test of the nop/jmp/halt example processor.
//   1. the course's nopjmp program: the PC must visit 0x0, 0x1, 0x13, 0xa, 0x1c, 0x1d, 0x1e,
//      one instruction per cycle, and stop with HLT after 7 cycles
//   1b. the five-nop program: stops with HLT at 0x5 after 6 cycles
//   2. a program reaching a code the processor does not know: must stop with INS
//   3. random nop/jmp chains ending in halt, checked cycle by cycle against a small model
module tb_nopjmp_cpu;
  import y86_pkg::*;
  localparam int unsigned N = 512;
  logic clk = 0, rst = 1, load_en = 0;
  logic [63:0] load_addr = 0;
  logic [7:0]  load_data = 0;
  word_t pc;
  stat_t stat;
  logic [31:0] cycles;
  byte unsigned img [N];
  int checks = 0, failures = 0;

  nopjmp_cpu #(.MEM_BYTES(N)) dut (.clk, .rst, .load_en, .load_addr, .load_data, .pc, .stat, .cycles);
  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (pc=%h stat=%0d)", what, pc, stat); end
  endtask

  function automatic void jmp_at(int unsigned a, longint unsigned d);
    img[a] = 8'h70;
    for (int k = 0; k < 8; k++) img[a + 1 + k] = 8'(d >> (8 * k));
  endfunction

  task automatic load_and_reset();
    rst = 1;
    for (int a = 0; a < N; a++) begin
      @(negedge clk); load_en = 1; load_addr = 64'(a); load_data = img[a];
    end
    @(negedge clk); load_en = 0;
    @(negedge clk); rst = 0;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned trace [7] = '{'h0, 'h1, 'h13, 'ha, 'h1c, 'h1d, 'h1e};
    // 1.
    foreach (img[i]) img[i] = 0;
    img['h0] = 8'h10; jmp_at('h1, 'h13); jmp_at('ha, 'h1c); jmp_at('h13, 'ha);
    img['h1c] = 8'h10; img['h1d] = 8'h10; img['h1e] = 8'h00;
    load_and_reset();
    for (int i = 0; i < 7; i++) begin
      chk(pc == trace[i] && stat == STAT_AOK, $sformatf("trace step %0d", i));
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    chk(stat == STAT_HLT && pc == 'h1e && cycles == 7, "HLT at 0x1e after 7 cycles");
    // the course's nops program: five nops; the zero byte after them is a halt
    foreach (img[i]) img[i] = 0;
    for (int i = 0; i < 5; i++) img[i] = 8'h10;
    load_and_reset();
    repeat (8) @(negedge clk);
    chk(stat == STAT_HLT && pc == 5 && cycles == 6, "nops: HLT at 0x5 after 6 cycles");
    // 2.
    foreach (img[i]) img[i] = 0;
    img[0] = 8'h10; img[1] = 8'h10; img[2] = 8'h60;
    load_and_reset();
    repeat (6) @(negedge clk);
    chk(stat == STAT_INS && pc == 2 && cycles == 3, "INS on an unknown instruction");
    // 3.
    for (int p = 0; p < 10; p++) begin
      longint unsigned mpc; int unsigned a, steps;
      foreach (img[i]) img[i] = 8'h10;
      // a chain of jumps at random 16-byte slots, nops in between, a halt at the end
      a = 0;
      for (int j = 0; j < 12; j++) begin
        int unsigned nxt;
        nxt = 16 * $urandom_range(2, 28);
        if (nxt == a) nxt = a + 16;
        jmp_at(a + 3, nxt);
        for (int k = 0; k < 3; k++) img[a + k] = 8'h10;
        a = nxt;
      end
      img[a] = 8'h00;
      load_and_reset();
      mpc = 0; steps = 0;
      while (img[mpc] != 8'h00 && steps < 400) begin
        chk(pc == mpc && stat == STAT_AOK, "random chain pc");
        mpc = (img[mpc] == 8'h70) ? {img[mpc+8], img[mpc+7], img[mpc+6], img[mpc+5],
                                     img[mpc+4], img[mpc+3], img[mpc+2], img[mpc+1]} : mpc + 1;
        steps++;
        @(negedge clk);
      end
      @(negedge clk);
      chk(pc == mpc && (steps >= 400 || stat == STAT_HLT), "random chain end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
