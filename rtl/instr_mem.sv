// instr_mem: program memory of the Y86-64 processors.
// Given the program counter `pc` it returns, in the same cycle, the ten bytes stored from
// `pc` upward as one 80-bit word `i10bytes`, little-endian: bit 0 is the least significant bit
// of the byte at `pc`, so byte k of the instruction sits at bits [8k+7:8k]. Ten bytes is the
// length of the longest instruction; shorter instructions simply ignore the upper bits.
// That read port and its bit order follow the document. The byte array, its size MEM_BYTES,
// the loading port (one byte per clock on `load_en`, used to place a program before reset is
// released) and the error flag are this design's choices: `imem_error` is raised when `pc`
// lies outside the memory, and bytes past the end of the array read as zero.
module instr_mem #(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic        clk,
  input  logic        load_en,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data,
  input  logic [63:0] pc,
  output logic [79:0] i10bytes,
  output logic        imem_error
);
  localparam int unsigned AW = $clog2(MEM_BYTES);

  logic [7:0] mem [MEM_BYTES];

  always_ff @(posedge clk) begin
    if (load_en && load_addr < 64'(MEM_BYTES)) mem[load_addr[AW-1:0]] <= load_data;
  end

  always_comb begin
    imem_error = (pc >= 64'(MEM_BYTES));
    for (int k = 0; k < 10; k++) begin
      logic [63:0] a;
      a = pc + 64'(k);
      if (a < 64'(MEM_BYTES)) i10bytes[8*k +: 8] = mem[a[AW-1:0]];
      else                    i10bytes[8*k +: 8] = 8'h00;
    end
  end
endmodule
