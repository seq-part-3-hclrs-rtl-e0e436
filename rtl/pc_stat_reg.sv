// pc_stat_reg: program counter and status register of the SEQ processor.
// The status of the current instruction is worked out combinationally, first match wins:
//   program-memory address error -> STAT_ADR;  invalid instruction -> STAT_INS;
//   halt -> STAT_HLT;  data-memory address error -> STAT_ADR;  otherwise STAT_AOK.
// `commit` is high when the machine is still running (Stat register = AOK) and this
// instruction's status is AOK; only then may the processor change any state. At each rising
// edge while the machine runs, the Stat register takes the new status and the cycle counter
// counts the cycle; the PC takes `new_pc` only if the instruction committed. Once Stat is not
// AOK nothing changes any more, so the PC stays at the instruction that stopped the machine.
// Reset sets PC = 0 and Stat = AOK. Two assertions check that a stopped machine holds.
// The PC register with initial value 0, a Stat register that decides whether the machine keeps
// going, the status names, STAT_AOK = 1 and the count of cycles run (the halt cycle included)
// follow the document. The order of the error checks and the ADR status are this design's
// choices.
module pc_stat_reg
  import y86_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  imem_error,
  input  logic  instr_valid,
  input  logic  is_halt,
  input  logic  dmem_error,
  input  word_t new_pc,
  output word_t pc,
  output stat_t stat,
  output stat_t new_stat,
  output logic  commit,
  output logic [31:0] cycles
);
  always_comb begin
    if (imem_error)        new_stat = STAT_ADR;
    else if (!instr_valid) new_stat = STAT_INS;
    else if (is_halt)      new_stat = STAT_HLT;
    else if (dmem_error)   new_stat = STAT_ADR;
    else                   new_stat = STAT_AOK;
    commit = (stat == STAT_AOK) && (new_stat == STAT_AOK);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc     <= '0;
      stat   <= STAT_AOK;
      cycles <= '0;
    end else if (stat == STAT_AOK) begin
      stat   <= new_stat;
      cycles <= cycles + 32'd1;
      if (commit) pc <= new_pc;
    end
  end

  // Once stopped, the machine must hold its PC and status.
  a_hold_when_stopped: assert property (@(posedge clk) disable iff (rst)
    (stat != STAT_AOK) |=> ($stable(pc) && $stable(stat) && $stable(cycles)));
  // The status only ever leaves AOK; it never returns to it without a reset.
  a_no_restart: assert property (@(posedge clk) disable iff (rst)
    (stat != STAT_AOK) |=> (stat != STAT_AOK));
endmodule
