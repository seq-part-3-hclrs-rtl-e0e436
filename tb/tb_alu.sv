// tb_alu: self-checking test of the ALU. Drives all four operations with corner values and
// random operands and compares the result and the zero/sign/overflow flags with values
// computed here from the operation's definition.
module tb_alu;
  import y86_pkg::*;
  alu_op_t op;
  word_t   x, y, result;
  cc_t     flags;
  int checks = 0, failures = 0;

  alu dut (.op, .x, .y, .result, .flags);

  task automatic run(alu_op_t o, word_t a, word_t b);
    word_t exp; logic eof; longint sa, sb, sr;
    op = o; x = a; y = b;
    #1;
    sa = longint'(a); sb = longint'(b);
    case (o)
      ALU_ADD: exp = a + b;
      ALU_SUB: exp = a - b;
      ALU_AND: exp = a & b;
      default: exp = a ^ b;
    endcase
    sr = longint'(exp);
    if (o == ALU_ADD)      eof = (sa < 0 && sb < 0 && sr >= 0) || (sa >= 0 && sb >= 0 && sr < 0);
    else if (o == ALU_SUB) eof = (sa < 0 && sb >= 0 && sr >= 0) || (sa >= 0 && sb < 0 && sr < 0);
    else                   eof = 1'b0;
    checks++;
    if (result !== exp || flags.zf !== (exp == 0) || flags.sf !== (sr < 0) || flags.of !== eof) begin
      failures++;
      $display("FAIL op=%0d x=%h y=%h got %h z%b s%b o%b exp %h", o, a, b, result,
               flags.zf, flags.sf, flags.of, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corner [6] = '{64'd0, 64'd1, 64'hFFFF_FFFF_FFFF_FFFF, 64'h7FFF_FFFF_FFFF_FFFF,
                          64'h8000_0000_0000_0000, 64'd8};
    foreach (corner[i]) foreach (corner[j])
      for (int o = 0; o < 4; o++) run(alu_op_t'(o), corner[i], corner[j]);
    repeat (400) run(alu_op_t'($urandom_range(0, 3)), {$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
