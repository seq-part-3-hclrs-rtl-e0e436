// regfile: the Y86-64 register file.
// Fifteen 64-bit registers (numbers 0 to 14). Two read ports return R[reg_srcA] and
// R[reg_srcB] combinationally; two write ports store reg_inputE into R[reg_dstE] and
// reg_inputM into R[reg_dstM] at the rising clock edge. Register number 0xF (REG_NONE) means
// "no register": it reads as zero and a write to it does nothing. `wr_en` gates both writes
// so the processor can hold its state once it has stopped. Port names, the register count and
// 0xF as "none" follow the document. This design's choices: the write enable, the reset to
// zero (the reference simulator starts with every register at 0), and that when both write
// ports name the same register the M port wins.
module regfile
  import y86_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    wr_en,
  input  regnum_t reg_srcA,
  input  regnum_t reg_srcB,
  input  regnum_t reg_dstE,
  input  regnum_t reg_dstM,
  input  word_t   reg_inputE,
  input  word_t   reg_inputM,
  output word_t   reg_outputA,
  output word_t   reg_outputB,
  output word_t   regs_out [15]
);
  word_t r [15];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 15; i++) r[i] <= '0;
    end else if (wr_en) begin
      if (reg_dstE != REG_NONE) r[reg_dstE] <= reg_inputE;
      if (reg_dstM != REG_NONE) r[reg_dstM] <= reg_inputM;
    end
  end

  assign reg_outputA = (reg_srcA == REG_NONE) ? '0 : r[reg_srcA];
  assign reg_outputB = (reg_srcB == REG_NONE) ? '0 : r[reg_srcB];
  assign regs_out    = r;
endmodule
