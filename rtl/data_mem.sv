// data_mem: data memory of the SEQ processor.
// One 64-bit access per cycle at byte address `mem_addr`, little-endian. A read
// (`mem_readbit`) returns `mem_output` combinationally in the same cycle; a write
// (`mem_writebit`) stores `mem_input` at the rising clock edge, so the new value is seen from
// the next cycle on. These two timing rules and the port names follow the document. The byte
// array, its size MEM_BYTES, the byte-wide loading port and the error flag are this design's
// choices: `dmem_error` is raised for an access whose eight bytes do not all lie inside the
// memory, and such a write is dropped. `wr_en` gates writes without touching the error flag, so
// the processor can cancel the write of an instruction that stops the machine.
module data_mem #(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic        clk,
  input  logic        load_en,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data,
  input  logic [63:0] mem_addr,
  input  logic        mem_readbit,
  input  logic        mem_writebit,
  input  logic        wr_en,
  input  logic [63:0] mem_input,
  output logic [63:0] mem_output,
  output logic        dmem_error
);
  localparam int unsigned AW = $clog2(MEM_BYTES);

  logic [7:0] mem [MEM_BYTES];
  logic       in_range;

  assign in_range   = (mem_addr <= 64'(MEM_BYTES - 8));
  assign dmem_error = (mem_readbit || mem_writebit) && !in_range;

  always_ff @(posedge clk) begin
    if (mem_writebit && wr_en && in_range) begin
      for (int k = 0; k < 8; k++) mem[AW'(mem_addr + 64'(k))] <= mem_input[8*k +: 8];
    end else if (load_en && load_addr < 64'(MEM_BYTES)) begin
      mem[load_addr[AW-1:0]] <= load_data;
    end
  end

  always_comb begin
    mem_output = '0;
    if (mem_readbit && in_range)
      for (int k = 0; k < 8; k++) mem_output[8*k +: 8] = mem[AW'(mem_addr + 64'(k))];
  end
endmodule
