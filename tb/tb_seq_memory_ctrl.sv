// tb_seq_memory_ctrl: self-checking test of memory-stage control. For every icode with random
// operands it checks the read and write enables, the address and the data to be written.
module tb_seq_memory_ctrl;
  import y86_pkg::*;
  logic [3:0] icode;
  word_t valA, valB, valE, valP, addr, din, eaddr, edin;
  logic rd, wr, erd, ewr;
  int checks = 0, failures = 0;

  seq_memory_ctrl dut (.icode, .valA, .valB, .valE, .valP, .mem_readbit(rd),
                       .mem_writebit(wr), .mem_addr(addr), .mem_input(din));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30) for (int ic = 0; ic < 16; ic++) begin
      icode = 4'(ic);
      valA = {$urandom, $urandom}; valB = {$urandom, $urandom};
      valE = {$urandom, $urandom}; valP = {$urandom, $urandom};
      erd = ic inside {5, 9, 11};
      ewr = ic inside {4, 8, 10};
      eaddr = (ic inside {9, 11}) ? valB : valE;   // popq, ret use the old %rsp
      edin  = (ic == 8) ? valP : valA;              // call pushes the return address
      #1;
      checks++;
      if (rd !== erd || wr !== ewr || ((erd || ewr) && addr !== eaddr) || (ewr && din !== edin)) begin
        failures++; $display("FAIL icode=%h rd=%b wr=%b", ic, rd, wr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
