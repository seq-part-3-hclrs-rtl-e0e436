// seq_memory_ctrl: memory-stage control of the SEQ processor.
// Sets the data memory's read and write enables, address and write data from icode:
//   read  for mrmovq, popq, ret;  write for rmmovq, pushq, call
//   mem_addr  = valE (ALU output) for rmmovq, mrmovq, pushq, call;
//             = valB (the old %rsp) for popq and ret
//   mem_input = valA (register rA) for rmmovq and pushq;  valP for call
// The document names the signals, says the address is mostly the ALU output with popq and ret
// as exceptions, and that call stores the address of the following instruction. Using the
// %rsp value read on port B as the popq/ret address is this design's choice, consistent with
// the document's table of registers read. Combinational.
module seq_memory_ctrl
  import y86_pkg::*;
(
  input  logic [3:0] icode,
  input  word_t      valA,
  input  word_t      valB,
  input  word_t      valE,
  input  word_t      valP,
  output logic       mem_readbit,
  output logic       mem_writebit,
  output word_t      mem_addr,
  output word_t      mem_input
);
  always_comb begin
    mem_readbit  = icode inside {I_MRMOVQ, I_POPQ, I_RET};
    mem_writebit = (icode inside {I_RMMOVQ, I_PUSHQ, I_CALL});
    mem_addr     = (icode inside {I_POPQ, I_RET}) ? valB : valE;
    mem_input    = (icode == I_CALL) ? valP : valA;
  end
endmodule
