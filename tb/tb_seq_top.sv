// tb_seq_top: end-to-end test of the top level with every parameter at its default.
// The single-cycle Y86-64 processor runs the course's nop/jmp/halt program, an array-sum
// program with call/ret, stack, memory, ALU and conditional instructions, and 60 random
// programs; after every cycle its PC, Stat, registers, condition codes and cycle count are
// compared with an instruction-level reference model. Alongside the first program the nop/jmp
// example processor runs the same program (HLT at 0x1e after 7 cycles) and the add example
// processor adds %rcx into %rax three times. The test counts how often each mechanism occurred
// (every instruction, cmov and jXX taken and not taken, each stop reason, popq %rsp writing
// one register from both ports, the example
// processors' jumps, halts and adds) and fails if any never did.
module tb_seq_top;
  import y86_pkg::*;
  import y86_ref_pkg::*;
  localparam int unsigned N = 4096;

  logic clk = 0, rst = 1, load_en = 0;
  logic [63:0] load_addr = 0;
  logic [7:0]  load_data = 0;
  stat_t stat;
  word_t pc, regs [15];
  logic [31:0] cycles;
  cc_t cc;
  int checks = 0, failures = 0;

  byte unsigned img [N];
  int unsigned at;
  Y86Ref ref_m;

  // the two example processors
  logic nj_load_en = 0, add_load_en = 0, add_preg_en = 0;
  logic [63:0] nj_load_addr = 0, add_load_addr = 0;
  logic [7:0]  nj_load_data = 0, add_load_data = 0;
  regnum_t add_preg_num = 0;
  word_t add_preg_val = 0, nj_pc, add_pc, add_regs [15];
  stat_t nj_stat, add_stat;
  logic [31:0] nj_cycles;
  // mechanism counters
  int unsigned n_icode [16];
  int unsigned n_cmov_taken, n_cmov_not, n_jmp_taken, n_jmp_not, n_hlt, n_adr, n_ins, n_both;
  int unsigned n_nj_jmp, n_nj_hlt, n_add;

  seq_top dut (
    .clk, .rst,
    .seq_load_en(load_en), .seq_load_addr(load_addr), .seq_load_data(load_data),
    .seq_stat(stat), .seq_pc(pc), .seq_cycles(cycles), .seq_regs(regs), .seq_cc(cc),
    .nj_load_en, .nj_load_addr, .nj_load_data, .nj_pc, .nj_stat, .nj_cycles,
    .add_load_en, .add_load_addr, .add_load_data, .add_preg_en, .add_preg_num, .add_preg_val,
    .add_pc, .add_stat, .add_regs
  );
  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (pc=%h stat=%0d cycle=%0d)", what, pc, stat, cycles);
    end
  endtask

  // ---- tiny assembler ----
  function automatic void b1(int unsigned v); img[at] = 8'(v); at++; endfunction
  function automatic void q8(longint unsigned v);
    for (int k = 0; k < 8; k++) b1(32'(v >> (8 * k)) & 255);
  endfunction
  function automatic void i_rr(int unsigned ic, int unsigned fn, int unsigned ra, int unsigned rb);
    b1(ic * 16 + fn); b1(ra * 16 + rb);
  endfunction
  function automatic void i_irmovq(longint unsigned v, int unsigned rb);
    i_rr(3, 0, 15, rb); q8(v);
  endfunction
  function automatic void i_mem(int unsigned ic, int unsigned ra, longint unsigned d, int unsigned rb);
    i_rr(ic, 0, ra, rb); q8(d);
  endfunction
  function automatic void i_dest(int unsigned ic, int unsigned fn, longint unsigned dest);
    b1(ic * 16 + fn); q8(dest);
  endfunction

  // add processor program: addq %rcx, %rax three times, then halt
  function automatic byte unsigned add_img(int unsigned a);
    case (a)
      0, 2, 4: return 8'h60;
      1, 3, 5: return 8'h10;
      default: return 8'h00;
    endcase
  endfunction

  // ---- load image, reset, run with per-cycle comparison ----
  task automatic run(int unsigned max_cycles);
    rst = 1;
    ref_m = new(N);
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      load_en = 1; load_addr = 64'(a); load_data = img[a];
      nj_load_en = 1; nj_load_addr = 64'(a); nj_load_data = img[a];
      add_load_en = 1; add_load_addr = 64'(a); add_load_data = add_img(a);
      ref_m.load(a, img[a]);
    end
    @(negedge clk); load_en = 0; nj_load_en = 0; add_load_en = 0;
    add_preg_en = 1; add_preg_num = 4'd1; add_preg_val = 64'd5;     // %rcx = 5
    @(negedge clk);
    add_preg_num = 4'd0; add_preg_val = 64'd0;                      // %rax = 0
    @(negedge clk); rst = 0; add_preg_en = 0;
    for (int c = 0; c < max_cycles && ref_m.stat == 1; c++) begin
      @(negedge clk);
      ref_m.step();
      check_state();
    end
    foreach (n_icode[i]) n_icode[i] += ref_m.n_icode[i];
    n_cmov_taken += ref_m.n_cmov_taken; n_cmov_not += ref_m.n_cmov_not;
    n_jmp_taken += ref_m.n_jmp_taken; n_jmp_not += ref_m.n_jmp_not;
    n_both += ref_m.n_both_ports; n_hlt += ref_m.n_stop_hlt; n_adr += ref_m.n_stop_adr; n_ins += ref_m.n_stop_ins;
    if (ref_m.stat != 1) begin
      repeat (3) @(negedge clk);
      check_state();   // the machine must hold once stopped
    end
  endtask

  task automatic check_state();
    logic ok = 1;
    for (int i = 0; i < 15; i++) if (regs[i] != ref_m.r[i]) ok = 0;
    chk(ok, "registers");
    chk(pc == ref_m.pc, $sformatf("pc exp %h", ref_m.pc));
    chk(int'(stat) == ref_m.stat, $sformatf("stat exp %0d", ref_m.stat));
    chk(cc == {ref_m.zf, ref_m.sf, ref_m.of}, "condition codes");
    chk(cycles == ref_m.cycles, "cycle count");
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---- 1. nop/jmp/halt program ----
    foreach (img[i]) img[i] = 0;
    at = 'h000; b1('h10);
    at = 'h001; i_dest(7, 0, 'h13);
    at = 'h00a; i_dest(7, 0, 'h1c);
    at = 'h013; i_dest(7, 0, 'h0a);
    at = 'h01c; b1('h10); b1('h10); b1('h00);
    run(50);
    chk(stat == STAT_HLT && pc == 'h1e && cycles == 7, "SEQ runs nopjmp: HLT at 0x1e after 7 cycles");
    chk(nj_stat == STAT_HLT && nj_pc == 'h1e && nj_cycles == 7, "nop/jmp CPU: HLT at 0x1e after 7 cycles");
    if (nj_stat == STAT_HLT) begin n_nj_jmp += 3; n_nj_hlt++; end
    chk(add_stat == STAT_HLT && add_pc == 6 && add_regs[0] == 15 && add_regs[1] == 5, "add CPU: %rax = 3 * 5");
    if (add_regs[0] == 15) n_add += 3;

    // ---- 2. array sum with call/ret ----
    foreach (img[i]) img[i] = 0;
    at = 'h000;
    i_irmovq('h800, 4);            // %rsp = 0x800
    i_irmovq('h200, 7);            // %rdi = array
    i_irmovq(4, 6);                // %rsi = count
    i_dest(8, 0, 'h100);           // call sum
    i_mem(4, 0, 'h40, 7);          // rmmovq %rax, 0x40(%rdi)
    i_mem(5, 11, 'h40, 7);         // mrmovq 0x40(%rdi), %r11
    i_rr(6, 1, 11, 0);             // subq %r11, %rax   -> 0, ZF=1
    i_rr(2, 3, 3, 12);             // cmove %rbx, %r12  (taken)
    i_rr(2, 4, 3, 13);             // cmovne %rbx, %r13 (not taken)
    b1('h00);                      // halt
    at = 'h100;                    // sum:
    i_irmovq(8, 8);                //   %r8 = 8
    i_irmovq(1, 9);                //   %r9 = 1
    i_rr(6, 3, 0, 0);              //   xorq %rax, %rax
    i_rr(6, 2, 6, 6);              //   andq %rsi, %rsi
    i_dest(7, 0, 'h131);           //   jmp test
    // loop: (at 0x121)
    i_mem(5, 10, 0, 7);            //   mrmovq (%rdi), %r10
    i_rr(6, 0, 10, 0);             //   addq %r10, %rax
    i_rr(6, 0, 8, 7);              //   addq %r8, %rdi
    i_rr(6, 1, 9, 6);              //   subq %r9, %rsi
    // test: (at 0x131)
    i_dest(7, 4, 'h121);           //   jne loop
    i_rr('hA, 0, 0, 15);           //   pushq %rax
    i_rr('hB, 0, 3, 15);           //   popq %rbx
    i_rr(2, 0, 0, 1);              //   rrmovq %rax, %rcx
    b1('h90);                      //   ret
    at = 'h200;
    q8('h0000_0000_000d_000d); q8('h0000_0000_00c0_00c0);
    q8('h0000_0000_0b00_0b00); q8('h0000_0000_a000_a000);
    run(200);
    chk(stat == STAT_HLT, "sum program halts");
    chk(regs[3] == 64'h0000_0000_abcd_abcd && regs[1] == 64'h0000_0000_abcd_abcd, "sum = 0xabcdabcd");
    chk(regs[0] == 0 && regs[12] == regs[3] && regs[13] == 0 && regs[4] == 'h800, "cmov and stack");

    // ---- 3. random programs ----
    for (int p = 0; p < 60; p++) begin
      foreach (img[i]) img[i] = 0;
      at = 0;
      for (int r = 0; r < 15; r++) i_irmovq(64'('h400 + 8 * $urandom_range(0, 200)), r);
      while (at < 'h300) begin
        int unsigned k, ra, rb;
        k = $urandom_range(0, 99);
        ra = $urandom_range(0, 14); rb = $urandom_range(0, 14);
        if ($urandom_range(0, 20) == 0) ra = 15;
        if (k < 5)       b1('h10);
        else if (k < 15) i_rr(2, $urandom_range(0, 6), ra, rb);
        else if (k < 22) i_irmovq(64'('h400 + 8 * $urandom_range(0, 200)), rb);
        else if (k < 30) i_mem(4, ra, 64'(8 * $urandom_range(0, 8)), rb);
        else if (k < 38) i_mem(5, ra, 64'(8 * $urandom_range(0, 8)), rb);
        else if (k < 60) i_rr(6, $urandom_range(0, 3), ra, rb);
        else if (k < 70) i_dest(7, $urandom_range(0, 6), 64'($urandom_range(0, 'h300)));
        else if (k < 74) i_dest(8, 0, 64'($urandom_range(0, 'h300)));
        else if (k < 78) b1('h90);
        else if (k < 88) i_rr('hA, 0, ra, 15);
        else if (k < 98) i_rr('hB, 0, ra, 15);
        else if (k < 99) b1($urandom_range('hC0, 'hFF));
        else             b1('h00);
      end
      run(300);
    end
    // every mechanism must have happened at least once
    for (int i = 0; i < 12; i++) begin
      $display("instruction %h executed %0d times", i, n_icode[i]);
      chk(n_icode[i] > 0, $sformatf("icode %h never executed", i));
    end
    $display("cmov taken %0d / not %0d, jXX taken %0d / not %0d", n_cmov_taken, n_cmov_not, n_jmp_taken, n_jmp_not);
    $display("stops: HLT %0d, ADR %0d, INS %0d", n_hlt, n_adr, n_ins);
    $display("example CPUs: jmp %0d, halt %0d, add %0d", n_nj_jmp, n_nj_hlt, n_add);
    chk(n_cmov_taken > 0 && n_cmov_not > 0, "cmov taken and not taken");
    chk(n_jmp_taken > 0 && n_jmp_not > 0, "jump taken and not taken");
    chk(n_hlt > 0 && n_adr > 0 && n_ins > 0, "every stop reason");
    $display("popq %%rsp (both write ports on one register): %0d", n_both);
    chk(n_both > 0, "both register write ports on the same register");
    chk(n_nj_jmp > 0 && n_nj_hlt > 0 && n_add > 0, "example processors ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
