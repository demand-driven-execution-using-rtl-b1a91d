// dde_alu -- integer execution unit of the execution pipeline.
//
// Combinational: computes result = a OP b for the arithmetic, logical,
// shift, multiply and compare opcodes (compares give 1 or 0, and are what
// loop-exit and selection predicates are made of). b is either the right
// operand or the instruction's literal. The document groups execution units
// into simple integer, multiply/divide, load and store units; this unit
// covers the first two in one cycle. Division and floating point are not
// provided.
module dde_alu
  import dde_pkg::*;
(
  input  opcode_e op,
  input  data_t   a,
  input  data_t   b,
  output data_t   y
);
  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_MUL:  y = a * b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SLL:  y = a << b[4:0];
      OP_SRL:  y = a >> b[4:0];
      OP_SRA:  y = data_t'($signed(a) >>> b[4:0]);
      OP_SLT:  y = data_t'($signed(a) <  $signed(b));
      OP_SLE:  y = data_t'($signed(a) <= $signed(b));
      OP_SEQ:  y = data_t'(a == b);
      OP_SNE:  y = data_t'(a != b);
      OP_SGT:  y = data_t'($signed(a) >  $signed(b));
      OP_SGE:  y = data_t'($signed(a) >= $signed(b));
      default: y = a;               // MOV and the synchronisation opcodes
    endcase
  end
endmodule
