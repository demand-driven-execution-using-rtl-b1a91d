// dde_heap_memory -- conventional data memory for arrays and structures.
//
// Scalars live in scalar memory; arrays live here and are reached by LW and
// SW from the execution pipeline's load and store units. Port a (execution
// pipeline) has a combinational read and a write at the clock edge; port h
// lets the host fill inputs and read results. Ordering between memory
// instructions is the program's job (predicate operands), so the memory
// itself is plain. Word addressed, 32-bit words; the size is this design's
// choice.
module dde_heap_memory
  import dde_pkg::*;
#(
  parameter int WORDS = 4096
) (
  input  logic               clk,
  input  logic               a_we,
  input  logic [HEAP_AW-1:0] a_addr,
  input  data_t              a_wdata,
  output data_t              a_rdata,
  input  logic               h_we,
  input  logic [HEAP_AW-1:0] h_addr,
  input  data_t              h_wdata,
  output data_t              h_rdata
);
  data_t mem [WORDS];

  assign a_rdata = mem[a_addr];
  assign h_rdata = mem[h_addr];

  always_ff @(posedge clk) begin
    if (h_we) mem[h_addr] <= h_wdata;
    if (a_we) mem[a_addr] <= a_wdata;
  end

endmodule
