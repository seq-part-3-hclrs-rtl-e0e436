// seq_cpu: single-cycle (SEQ) Y86-64 processor.
// Every instruction takes one clock cycle. Between two rising edges the instruction at PC is
// fetched and split (seq_fetch), its source registers are chosen and read (seq_decode,
// regfile), the ALU works on the chosen inputs and the condition is evaluated (seq_execute),
// the data memory is read or prepared for a write (seq_memory_ctrl, data_mem), the write-back
// destinations and values are chosen (seq_writeback) and the next PC is chosen
// (seq_pc_update). At the rising edge the PC, registers, condition codes, memory and Stat
// register all change together. When an instruction stops the machine (halt, an invalid
// instruction or a bad address) it changes nothing but Stat, and the processor then holds.
// Interface: `rst` (synchronous, active high) starts at PC 0 with all registers 0. Programs are
// placed in both memories through the byte-wide load port while `rst` is high. `stat`,
// `pc`, `cycles`, `regs` and `cc` show the architectural state.
// The stage structure, the memories and register file with their timing, the instruction set
// subset (halt, nop, rrmovq/cmovXX, irmovq, rmmovq, mrmovq, OPq, jXX, call, ret, pushq, popq)
// follow the document. The memory size and the loading port are this design's choices.
module seq_cpu
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_en,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data,
  output stat_t       stat,
  output word_t       pc,
  output logic [31:0] cycles,
  output word_t       regs [15],
  output cc_t         cc
);
  logic [79:0] i10bytes;
  logic        imem_error, dmem_error, instr_valid, commit, cnd;
  logic [3:0]  icode, ifun;
  regnum_t     rA, rB, srcA, srcB, dstE, dstM;
  word_t       valA, valB, valC, valP, valE, valM, inputE, new_pc;
  word_t       mem_addr, mem_input;
  logic        mem_readbit, mem_writebit;

  instr_mem #(.MEM_BYTES(MEM_BYTES)) u_imem (
    .clk, .load_en, .load_addr, .load_data,
    .pc, .i10bytes, .imem_error
  );

  seq_fetch u_fetch (
    .i10bytes, .pc, .icode, .ifun, .rA, .rB, .valC, .valP, .instr_valid
  );

  seq_decode u_decode (.icode, .rA, .rB, .srcA, .srcB);

  regfile u_rf (
    .clk, .rst, .wr_en(commit),
    .reg_srcA(srcA), .reg_srcB(srcB), .reg_dstE(dstE), .reg_dstM(dstM),
    .reg_inputE(inputE), .reg_inputM(valM),
    .reg_outputA(valA), .reg_outputB(valB), .regs_out(regs)
  );

  seq_execute u_exec (
    .clk, .rst, .commit, .icode, .ifun, .valA, .valB, .valC, .valE, .cnd, .cc
  );

  seq_memory_ctrl u_memctl (
    .icode, .valA, .valB, .valE, .valP,
    .mem_readbit, .mem_writebit, .mem_addr, .mem_input
  );

  data_mem #(.MEM_BYTES(MEM_BYTES)) u_dmem (
    .clk, .load_en, .load_addr, .load_data,
    .mem_addr, .mem_readbit, .mem_writebit, .wr_en(commit), .mem_input,
    .mem_output(valM), .dmem_error
  );

  seq_writeback u_wb (
    .icode, .rA, .rB, .cnd, .valC, .valE, .dstE, .dstM, .inputE
  );

  seq_pc_update u_pcu (.icode, .cnd, .valC, .valM, .valP, .new_pc);

  pc_stat_reg u_pcs (
    .clk, .rst, .imem_error, .instr_valid, .is_halt(icode == I_HALT), .dmem_error,
    .new_pc, .pc, .stat, .new_stat(), .commit, .cycles
  );
endmodule
