// add_cpu: example processor that uses the register file and nothing else.
// Every instruction is taken to be two bytes long. Each cycle it reads R[rA] and R[rB]
// (rA = bits 15:12, rB = bits 11:8 of the fetched word), writes their sum into R[rB] and
// advances the PC by 2; the M write port is unused (0xF). It stops with Stat = HLT at a halt
// byte, and with STAT_ADR if the PC leaves program memory.
// The fetch fields, the register-file connections and PC + 2 follow the document; its status
// rule is not given there, so stopping at halt is this design's choice. So is the register
// preload port (`preg_en`, `preg_num`, `preg_val`), which writes one register through the E
// port while `rst` is high, giving the adds something other than zero to work on.
module add_cpu
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_en,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data,
  input  logic        preg_en,
  input  regnum_t     preg_num,
  input  word_t       preg_val,
  output word_t       pc,
  output stat_t       stat,
  output word_t       regs [15]
);
  logic [79:0] i10bytes;
  logic        imem_error, run;
  logic [3:0]  icode;
  regnum_t     rA, rB, dstE;
  word_t       outA, outB, inputE;
  stat_t       new_stat;

  instr_mem #(.MEM_BYTES(MEM_BYTES)) u_imem (
    .clk, .load_en, .load_addr, .load_data, .pc, .i10bytes, .imem_error
  );

  always_comb begin
    icode = i10bytes[7:4];
    rA    = i10bytes[15:12];
    rB    = i10bytes[11:8];
    if (imem_error)           new_stat = STAT_ADR;
    else if (icode == I_HALT) new_stat = STAT_HLT;
    else                      new_stat = STAT_AOK;
    run    = (stat == STAT_AOK) && (new_stat == STAT_AOK);
    dstE   = rst ? (preg_en ? preg_num : REG_NONE) : rB;
    inputE = rst ? preg_val : outA + outB;
  end

  regfile u_rf (
    .clk, .rst(1'b0), .wr_en(rst || run),
    .reg_srcA(rA), .reg_srcB(rB), .reg_dstE(dstE), .reg_dstM(REG_NONE),
    .reg_inputE(inputE), .reg_inputM('0),
    .reg_outputA(outA), .reg_outputB(outB), .regs_out(regs)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pc   <= '0;
      stat <= STAT_AOK;
    end else if (stat == STAT_AOK) begin
      stat <= new_stat;
      if (run) pc <= pc + 64'd2;
    end
  end
endmodule
