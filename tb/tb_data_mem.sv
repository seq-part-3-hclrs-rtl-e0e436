// tb_data_mem: self-checking test of data memory against a byte-array model. Random 64-bit
// reads and writes at unaligned addresses; checks that a read returns its value in the same
// cycle, that a write is visible only from the next cycle, that wr_en low cancels a write,
// that the load port fills bytes and that out-of-range accesses raise the error flag.
module tb_data_mem;
  localparam int unsigned N = 256;
  logic clk = 0, load_en = 0, rd = 0, wr = 0, wr_en = 1, err;
  logic [63:0] load_addr = 0, addr = 0, din = 0, dout, exp;
  logic [7:0]  load_data = 0;
  logic [7:0]  model [N];
  int checks = 0, failures = 0;

  data_mem #(.MEM_BYTES(N)) dut (.clk, .load_en, .load_addr, .load_data, .mem_addr(addr),
    .mem_readbit(rd), .mem_writebit(wr), .wr_en, .mem_input(din), .mem_output(dout), .dmem_error(err));
  always #5 clk = ~clk;

  function automatic logic [63:0] mread(int a);
    logic [63:0] v;
    for (int k = 0; k < 8; k++) v[8*k +: 8] = model[a + k];
    return v;
  endfunction

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
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      model[a] = 8'($urandom); load_en = 1; load_addr = 64'(a); load_data = model[a];
    end
    @(negedge clk); load_en = 0;
    repeat (600) begin
      int a;
      a = $urandom_range(0, N - 8);
      addr = 64'(a); din = {$urandom, $urandom};
      rd = 1; wr = $urandom_range(0, 1); wr_en = ($urandom_range(0, 3) != 0);
      #1;
      exp = mread(a);
      chk(dout === exp && !err, $sformatf("same-cycle read a=%0d", a));
      @(negedge clk);
      if (wr && wr_en) for (int k = 0; k < 8; k++) model[a + k] = din[8*k +: 8];
      wr = 0; #1;
      chk(dout === mread(a), $sformatf("value in next cycle a=%0d", a));
    end
    addr = 64'(N - 7); rd = 1; wr = 0; #1;
    chk(err, "read past end flags error");
    rd = 0; wr = 1; din = '1; @(negedge clk); wr = 0;
    chk(model[N-1] == dut.mem[N-1], "write past end dropped");
    addr = 64'(N - 7); #1;
    chk(!err, "no error when idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
