// tb_add_cpu: self-checking test of the register-file example processor. Registers are
// preloaded with random values, then a program of random two-byte instructions runs; after
// every cycle all registers and the PC are compared with a model doing R[rB] += R[rA]
// (register 0xF reads 0 and is never written). The program ends with a halt byte, which must
// stop the processor with HLT.
module tb_add_cpu;
  import y86_pkg::*;
  localparam int unsigned N = 256;
  logic clk = 0, rst = 1, load_en = 0, preg_en = 0;
  logic [63:0] load_addr = 0;
  logic [7:0]  load_data = 0;
  regnum_t preg_num = 0;
  word_t preg_val = 0, pc, regs [15], model [15];
  stat_t stat;
  byte unsigned img [N];
  int checks = 0, failures = 0;

  add_cpu #(.MEM_BYTES(N)) dut (.clk, .rst, .load_en, .load_addr, .load_data, .preg_en,
                                .preg_num, .preg_val, .pc, .stat, .regs);
  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (pc=%h)", what, pc); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 10; p++) begin
      int unsigned len;
      len = 2 * $urandom_range(5, 60);
      for (int a = 0; a < N; a++) img[a] = 8'($urandom);
      for (int a = 0; a < len; a += 2) img[a] = 8'h60 | 8'($urandom_range(0, 3));
      img[len] = 8'h00;
      rst = 1;
      for (int a = 0; a < N; a++) begin
        @(negedge clk); load_en = 1; load_addr = 64'(a); load_data = img[a];
      end
      @(negedge clk); load_en = 0;
      for (int r = 0; r < 15; r++) begin
        model[r] = {$urandom, $urandom};
        preg_en = 1; preg_num = 4'(r); preg_val = model[r];
        @(negedge clk);
      end
      preg_en = 0; rst = 0;
      for (int a = 0; a < len; a += 2) begin
        int unsigned ra, rb; word_t va, vb;
        ra = img[a + 1] >> 4; rb = img[a + 1] & 15;
        va = (ra == 15) ? '0 : model[ra];
        vb = (rb == 15) ? '0 : model[rb];
        if (rb != 15) model[rb] = va + vb;
        @(negedge clk);
        chk(regs == model && pc == 64'(a + 2) && stat == STAT_AOK, "step");
      end
      repeat (2) @(negedge clk);
      chk(stat == STAT_HLT && pc == 64'(len) && regs == model, "halt");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
