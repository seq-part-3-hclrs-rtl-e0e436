// nopjmp_cpu: the smallest example processor, running only nop, jmp and halt.
// A 64-bit PC register (initial value 0) addresses program memory. The high nibble of the
// first byte is the icode and bytes 1..8 are the jump destination. The next PC is PC + 1 for
// nop and the destination for jmp. Stat is AOK for nop and jmp, HLT for halt and INS for any
// other code. The machine runs, one instruction per cycle, until Stat is not AOK; the
// stopping instruction leaves the PC where it is. jmp ignores its condition field and always
// jumps.
// The PC register, the two-way next-PC multiplexer, the Stat rule and the one-cycle-per-
// instruction timing follow the document. The memory size, the loading port, the freeze rule
// on stopping and the cycle counter are this design's choices, shared with the SEQ processor.
// Interface: `rst` synchronous, active high; the program is loaded byte by byte while `rst` is
// high.
module nopjmp_cpu
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_en,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data,
  output word_t       pc,
  output stat_t       stat,
  output logic [31:0] cycles
);
  logic [79:0] i10bytes;
  logic        imem_error;
  logic [3:0]  icode;
  word_t       dest, valP;
  stat_t       new_stat;

  instr_mem #(.MEM_BYTES(MEM_BYTES)) u_imem (
    .clk, .load_en, .load_addr, .load_data, .pc, .i10bytes, .imem_error
  );

  always_comb begin
    icode = i10bytes[7:4];
    dest  = i10bytes[71:8];
    valP  = (icode == I_JXX) ? dest : pc + 64'd1;
    if (imem_error)                           new_stat = STAT_ADR;
    else if (icode inside {I_NOP, I_JXX})     new_stat = STAT_AOK;
    else if (icode == I_HALT)                 new_stat = STAT_HLT;
    else                                      new_stat = STAT_INS;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc     <= '0;
      stat   <= STAT_AOK;
      cycles <= '0;
    end else if (stat == STAT_AOK) begin
      stat   <= new_stat;
      cycles <= cycles + 32'd1;
      if (new_stat == STAT_AOK) pc <= valP;
    end
  end
endmodule
