// dde_code_memory -- main memory holding the static program code.
//
// The program is a list of 64-bit demand-driven instructions laid out in
// blocks of one frame each; a code label is the word address of a block.
// Frame allocators copy a block into scalar memory when they create a frame,
// reading one word per cycle on their own read port (combinational read).
// The host loads the program through the write port before starting. The
// document reads code through an instruction cache in burst mode; this
// model is the backing memory itself with one read port per allocator.
module dde_code_memory
  import dde_pkg::*;
#(
  parameter int WORDS = 4096
) (
  input  logic   clk,
  input  logic   ld_en,
  input  caddr_t ld_addr,
  input  instr_t ld_data,
  input  caddr_t ra0,
  output instr_t rd0,
  input  caddr_t ra1,
  output instr_t rd1
);
  instr_t mem [WORDS];

  assign rd0 = mem[ra0];
  assign rd1 = mem[ra1];

  always_ff @(posedge clk)
    if (ld_en) mem[ld_addr] <= ld_data;

endmodule
