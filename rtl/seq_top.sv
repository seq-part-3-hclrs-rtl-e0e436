// seq_top: top level holding the three processors side by side.
//   seq_*     the single-cycle Y86-64 processor (seq_cpu), the main design
//   nj_*      the nop/jmp/halt example processor (nopjmp_cpu)
//   add_*     the register-file example processor (add_cpu)
// They share only the clock and reset; each has its own program-loading port and its own
// status outputs. All ports are plain signals and arrays; see each processor for its timing.
module seq_top
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic        clk,
  input  logic        rst,
  // single-cycle Y86-64 processor
  input  logic        seq_load_en,
  input  logic [63:0] seq_load_addr,
  input  logic [7:0]  seq_load_data,
  output stat_t       seq_stat,
  output word_t       seq_pc,
  output logic [31:0] seq_cycles,
  output word_t       seq_regs [15],
  output cc_t         seq_cc,
  // nop/jmp/halt processor
  input  logic        nj_load_en,
  input  logic [63:0] nj_load_addr,
  input  logic [7:0]  nj_load_data,
  output word_t       nj_pc,
  output stat_t       nj_stat,
  output logic [31:0] nj_cycles,
  // add processor
  input  logic        add_load_en,
  input  logic [63:0] add_load_addr,
  input  logic [7:0]  add_load_data,
  input  logic        add_preg_en,
  input  regnum_t     add_preg_num,
  input  word_t       add_preg_val,
  output word_t       add_pc,
  output stat_t       add_stat,
  output word_t       add_regs [15]
);
  seq_cpu #(.MEM_BYTES(MEM_BYTES)) u_seq (
    .clk, .rst, .load_en(seq_load_en), .load_addr(seq_load_addr), .load_data(seq_load_data),
    .stat(seq_stat), .pc(seq_pc), .cycles(seq_cycles), .regs(seq_regs), .cc(seq_cc)
  );

  nopjmp_cpu #(.MEM_BYTES(MEM_BYTES)) u_nj (
    .clk, .rst, .load_en(nj_load_en), .load_addr(nj_load_addr), .load_data(nj_load_data),
    .pc(nj_pc), .stat(nj_stat), .cycles(nj_cycles)
  );

  add_cpu #(.MEM_BYTES(MEM_BYTES)) u_add (
    .clk, .rst, .load_en(add_load_en), .load_addr(add_load_addr), .load_data(add_load_data),
    .preg_en(add_preg_en), .preg_num(add_preg_num), .preg_val(add_preg_val),
    .pc(add_pc), .stat(add_stat), .regs(add_regs)
  );
endmodule
