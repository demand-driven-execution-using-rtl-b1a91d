// dde_scalar_memory -- the scalar memory (SM) of the demand-driven processor.
//
// Every SM location holds an instruction (IM, 64 bits), its data word (DM,
// 64 bits) and two tags: the evaluation tag (Evtag: empty & unlocked, empty &
// locked, full) and the operand tag (Optag, which operands have arrived).
// The instruction at location d writes its result to DM[d]. Until then DM
// doubles as operand storage: its low half (slot L) holds a shelved left
// operand, its high half (slot R) a shelved right operand; the result is
// written to slot L, which is what later demands read.
//
// Ports (reads are combinational, writes take effect at the clock edge):
//   ea_*   s_Eval    : read Evtag and value
//   eb_*   s_Fetch   : read Evtag, value and IM, optionally lock
//                      (test-and-set)
//   xi_*   Read_SM   : read IM
//   xo_*   Pre_EX    : read/write Optag and the two operand slots
//   wb_*   WB_update : write result, Evtag <- full
//   fa*_*  frame allocators: load IM with tags reset, or write an argument
//          pointer with Evtag <- full
// If several ports write the same field of one location in a cycle, the
// frame allocators win over write-back, which wins over the evaluation
// pipeline's lock. The split of DM into two operand slots and the widened
// Optag (five flags instead of a 2-bit state) are this design's choices;
// the return-link and in-use fields of the document's layout are replaced by
// the host flag in the return storage and the frame allocators' free lists.
module dde_scalar_memory
  import dde_pkg::*;
#(
  parameter int NUM_FRAMES = 80
) (
  input  logic   clk,
  // s_Eval
  input  addr_t  ea_addr,
  output evtag_e ea_evtag,
  output data_t  ea_value,
  // s_Fetch
  input  addr_t  eb_addr,
  output evtag_e eb_evtag,
  output data_t  eb_value,
  output instr_t eb_instr,
  input  logic   eb_lock,
  // Read_SM
  input  addr_t  xi_addr,
  output instr_t xi_instr,
  // Pre_EX
  input  addr_t  xo_addr,
  output optag_t xo_optag,
  output data_t  xo_slot_l,
  output data_t  xo_slot_r,
  input  logic   xo_we,
  input  optag_t xo_optag_w,
  input  logic   xo_l_we,
  input  data_t  xo_l_w,
  input  logic   xo_r_we,
  input  data_t  xo_r_w,
  // WB_update
  input  logic   wb_en,
  input  addr_t  wb_addr,
  input  data_t  wb_value,
  // frame allocators
  input  logic   fa0_im_en,
  input  addr_t  fa0_addr,
  input  instr_t fa0_instr,
  input  logic   fa0_arg_en,
  input  data_t  fa0_arg,
  input  logic   fa1_im_en,
  input  addr_t  fa1_addr,
  input  instr_t fa1_instr,
  input  logic   fa1_arg_en,
  input  data_t  fa1_arg
);
  localparam int NUM_LOC = NUM_FRAMES * FRAME_SIZE;

  evtag_e evtag  [NUM_LOC];
  optag_t optag  [NUM_LOC];
  instr_t im     [NUM_LOC];
  data_t  slot_l [NUM_LOC];
  data_t  slot_r [NUM_LOC];

  assign ea_evtag  = evtag[ea_addr];
  assign ea_value  = slot_l[ea_addr];
  assign eb_evtag  = evtag[eb_addr];
  assign eb_value  = slot_l[eb_addr];
  assign eb_instr  = im[eb_addr];
  assign xi_instr  = im[xi_addr];
  assign xo_optag  = optag[xo_addr];
  assign xo_slot_l = slot_l[xo_addr];
  assign xo_slot_r = slot_r[xo_addr];

  always_ff @(posedge clk) begin
    if (eb_lock) evtag[eb_addr] <= EV_EMPTY_LOCKED;
    if (xo_we)   optag[xo_addr] <= xo_optag_w;
    if (xo_l_we) slot_l[xo_addr] <= xo_l_w;
    if (xo_r_we) slot_r[xo_addr] <= xo_r_w;
    if (wb_en) begin
      slot_l[wb_addr] <= wb_value;
      evtag[wb_addr]  <= EV_FULL;
    end
    if (fa0_im_en) begin
      im[fa0_addr]    <= fa0_instr;
      evtag[fa0_addr] <= EV_EMPTY_UNLOCKED;
      optag[fa0_addr] <= '0;
    end
    if (fa0_arg_en) begin
      slot_l[fa0_addr] <= fa0_arg;
      evtag[fa0_addr]  <= EV_FULL;
    end
    if (fa1_im_en) begin
      im[fa1_addr]    <= fa1_instr;
      evtag[fa1_addr] <= EV_EMPTY_UNLOCKED;
      optag[fa1_addr] <= '0;
    end
    if (fa1_arg_en) begin
      slot_l[fa1_addr] <= fa1_arg;
      evtag[fa1_addr]  <= EV_FULL;
    end
  end

endmodule
