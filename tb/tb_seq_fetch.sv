// tb_seq_fetch: self-checking test of the fetch splitter. Builds every instruction form of
// the Y86-64 encoding table with random register numbers and constants, places it in a
// random 80-bit word and checks icode, ifun, rA, rB, valC, valP (pc + length) and validity.
module tb_seq_fetch;
  import y86_pkg::*;
  logic [79:0] w;
  word_t pc, valC, valP;
  logic [3:0] icode, ifun;
  regnum_t rA, rB;
  logic valid;
  int checks = 0, failures = 0;

  seq_fetch dut (.i10bytes(w), .pc, .icode, .ifun, .rA, .rB, .valC, .valP, .instr_valid(valid));

  // form: 0 = 1 byte, 1 = 2 bytes (regs), 2 = 10 bytes (regs + constant), 3 = 9 bytes (dest)
  task automatic one(logic [3:0] ic, logic [3:0] fn, int form, logic exp_valid);
    logic [3:0] ra, rb; logic [63:0] c; int len; logic [79:0] junk;
    ra = 4'($urandom); rb = 4'($urandom); c = {$urandom, $urandom};
    junk = {$urandom, $urandom, $urandom};
    w = junk;
    w[7:0] = {ic, fn};
    case (form)
      1: begin w[15:8] = {ra, rb}; len = 2; end
      2: begin w[15:8] = {ra, rb}; w[79:16] = c; len = 10; end
      3: begin w[71:8] = c; len = 9; end
      default: len = 1;
    endcase
    pc = {$urandom, $urandom};
    #1;
    checks++;
    if (icode !== ic || ifun !== fn || valP !== pc + 64'(len) || valid !== exp_valid ||
        (form inside {1, 2} && (rA !== ra || rB !== rb)) ||
        (form inside {2, 3} && valC !== c)) begin
      failures++;
      $display("FAIL ic=%h fn=%h rA=%h rB=%h valC=%h valP=%h valid=%b", ic, fn, rA, rB, valC, valP, valid);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20) begin
      one(4'h0, 4'h0, 0, 1);                         // halt
      one(4'h1, 4'h0, 0, 1);                         // nop
      one(4'h2, 4'($urandom_range(0, 6)), 1, 1);     // rrmovq / cmovXX
      one(4'h3, 4'h0, 2, 1);                         // irmovq
      one(4'h4, 4'h0, 2, 1);                         // rmmovq
      one(4'h5, 4'h0, 2, 1);                         // mrmovq
      one(4'h6, 4'($urandom_range(0, 3)), 1, 1);     // OPq
      one(4'h7, 4'($urandom_range(0, 6)), 3, 1);     // jXX
      one(4'h8, 4'h0, 3, 1);                         // call
      one(4'h9, 4'h0, 0, 1);                         // ret
      one(4'hA, 4'h0, 1, 1);                         // pushq
      one(4'hB, 4'h0, 1, 1);                         // popq
      one(4'h6, 4'($urandom_range(4, 15)), 1, 0);    // bad ALU function
      one(4'h7, 4'($urandom_range(7, 15)), 3, 0);    // bad condition
      one(4'($urandom_range(12, 15)), 4'h0, 0, 0);   // bad icode
    end
    // the example from the document: pushq %rbx is bytes a0 3f
    w = 80'h3fa0; pc = 0; #1;
    checks++;
    if (icode !== 4'hA || rA !== 4'h3 || rB !== 4'hF || valP !== 2) begin
      failures++; $display("FAIL pushq %%rbx");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
