// tb_instr_mem: self-checking test of program memory. Loads random bytes through the load
// port, then checks that i10bytes holds the ten bytes from pc upward in little-endian order,
// that bytes past the end read as zero and that the error flag rises only outside memory.
module tb_instr_mem;
  localparam int unsigned N = 256;
  logic clk = 0, load_en = 0, imem_error;
  logic [63:0] load_addr, pc;
  logic [7:0]  load_data;
  logic [79:0] i10bytes, exp;
  logic [7:0]  model [N];
  int checks = 0, failures = 0;

  instr_mem #(.MEM_BYTES(N)) dut (.clk, .load_en, .load_addr, .load_data, .pc, .i10bytes, .imem_error);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc = 0; load_addr = 0; load_data = 0;
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      model[a] = 8'($urandom); load_en = 1; load_addr = 64'(a); load_data = model[a];
    end
    @(negedge clk); load_en = 0;
    for (int p = 0; p < N + 4; p++) begin
      pc = 64'(p); #1;
      for (int k = 0; k < 10; k++) exp[8*k +: 8] = (p + k < N) ? model[p + k] : 8'h00;
      checks++;
      if (i10bytes !== exp || imem_error !== (p >= N)) begin
        failures++; $display("FAIL pc=%0d got %h exp %h err %b", p, i10bytes, exp, imem_error);
      end
    end
    pc = 64'hFFFF_FFFF_FFFF_FFFC; #1;
    checks++;
    if (!imem_error) begin failures++; $display("FAIL huge pc"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
