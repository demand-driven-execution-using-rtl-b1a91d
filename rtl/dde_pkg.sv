// dde_pkg -- types and constants shared by the demand-driven processor.
//
// The processor executes a program from its outputs towards its inputs: a
// demand for the value of a scalar-memory location causes the instruction at
// that location to demand its own operands, and values flow back to the
// demanders once they are computed. Three kinds of message ("tokens") carry
// this traffic between the pipelines:
//   EV-token  <D, R, port, indirect>  a demand for location D, to be answered
//                                     at location R on the given operand port
//   OP-token  <value, R, port>        an operand value delivered to R
//   WB-token  <value, C>              a computed result for location C
// A fourth token carries frame-creation requests to a frame allocator.
//
// Scalar memory is divided into frames of FRAME_SIZE = 64 locations (the
// frame size of the 6-bit base / 6-bit displacement instruction flavour).
// A scalar-memory address is {frame index, offset}. A pointer to a frame is
// the address of its location 0, held as an ordinary data value.
//
// The 64-bit instruction layout is this design's own packing of the fields
// that the D, C, M, N and FN instruction formats carry (opcode, up to two
// operands plus a predicate operand, 32-bit immediate, memory displacement,
// newf label and argument-block offsets); it is not the bit-exact fused
// two-word encoding.
// The helper functions below each look at a few fields of their argument;
// lint reports the remaining bits of those arguments as unused.
package dde_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int FRAME_W     = 6;                 // offset within a frame
  localparam int FRAME_SIZE  = 1 << FRAME_W;      // 64 locations
  localparam int FIDX_W      = 7;                 // up to 128 frames
  localparam int MAX_FRAMES  = 1 << FIDX_W;
  localparam int ADDR_W      = FIDX_W + FRAME_W;  // scalar-memory address
  localparam int DATA_W      = 32;                // machine word
  localparam int CODE_AW     = 12;                // main (code) memory words
  localparam int HEAP_AW     = 12;                // heap memory words
  localparam int MDISP_W     = 14;                // memory displacement

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [FRAME_W-1:0] off_t;
  typedef logic [FIDX_W-1:0]  fidx_t;
  typedef logic [CODE_AW-1:0] caddr_t;

  // ------------------------------------------------------------ tag states
  // Evaluation tag (Evtag): state of the value at a location.
  typedef enum logic [1:0] {
    EV_EMPTY_UNLOCKED = 2'd0,  // no value, nobody evaluating it
    EV_EMPTY_LOCKED   = 2'd1,  // operands demanded, value being computed
    EV_FULL           = 2'd2   // value available in DM
  } evtag_e;

  // Operand tag (Optag): which operands of the instruction have arrived.
  // Kept as flags so that a predicated instruction with two operands can be
  // tracked; 'fired' marks an instruction that already produced its result
  // (late operands of EITHER, FIRST, NEXT are then dropped).
  typedef struct packed {
    logic fired;
    logic have_l;
    logic have_r;
    logic have_p;
    logic pval;
  } optag_t;

  // ---------------------------------------------------------------- ISA
  typedef enum logic [5:0] {
    OP_NOP    = 6'd0,
    OP_LI     = 6'd1,   // dest <- imm                       (no operands)
    OP_FADDR  = 6'd2,   // dest <- pointer to own frame      (no operands)
    OP_NEWF   = 6'd3,   // create frame, dest <- pointer to new frame
    OP_DELF   = 6'd4,   // free frame holding rop, dest <- lop
    OP_MOV    = 6'd5,   // dest <- lop
    OP_ADD    = 6'd8,
    OP_SUB    = 6'd9,
    OP_MUL    = 6'd10,
    OP_AND    = 6'd11,
    OP_OR     = 6'd12,
    OP_XOR    = 6'd13,
    OP_SLL    = 6'd14,
    OP_SRL    = 6'd15,
    OP_SRA    = 6'd16,
    OP_SLT    = 6'd17,
    OP_SLE    = 6'd18,
    OP_SEQ    = 6'd19,
    OP_SNE    = 6'd20,
    OP_SGT    = 6'd21,
    OP_SGE    = 6'd22,
    OP_WITH   = 6'd32,  // eval lop || eval rop; dest <- lop when both done
    OP_THEN   = 6'd33,  // eval lop ; eval rop;  dest <- lop
    OP_EITHER = 6'd34,  // eval lop || eval rop; dest <- first to arrive
    OP_FIRST  = 6'd35,  // eval lop || eval rop; dest <- lop, rop discarded
    OP_PSI    = 6'd36,  // eval pop ; eval (pop ? lop : rop); dest <- it
    OP_NEXT   = 6'd37,  // eval lop || eval pop; pop ? lop : tail-demand rop
    OP_LW     = 6'd40,  // dest <- heap[lop + mdisp]     (after pop, if any)
    OP_SW     = 6'd41   // heap[lop + mdisp] <- rop; dest <- rop
  } opcode_e;

  // Operand addressing modes (literal operands use the immediate field).
  typedef enum logic [1:0] {
    AM_NONE   = 2'd0,   // operand not present
    AM_DIRECT = 2'd1,   // frame direct: location 'disp' of own frame
    AM_DISP   = 2'd2    // displacement: location disp(base) = loc[base]+disp
  } amode_e;

  typedef struct packed {
    amode_e mode;
    off_t   base;
    off_t   disp;
  } operand_t;          // 14 bits

  // Instruction word. With imm_f set (C-format) bits [31:0] are the 32-bit
  // literal and the rop/pop fields are not used. For OP_NEWF (N-format) the
  // literal is the code label, lop.disp the argument-block offset in the
  // current frame and lop.base the offset in the new frame that receives the
  // argument-block pointer; 'pool' selects the frame pool.
  typedef struct packed {
    opcode_e            op;     // [63:58]
    logic               imm_f;  // [57]
    logic               pool;   // [56]
    operand_t           lop;    // [55:42]
    operand_t           rop;    // [41:28]
    operand_t           pop;    // [27:14]
    logic [MDISP_W-1:0] mdisp;  // [13:0] memory displacement (M-format)
  } instr_t;

  // ---------------------------------------------------------------- tokens
  typedef enum logic [1:0] {
    PORT_L = 2'd0,
    PORT_R = 2'd1,
    PORT_P = 2'd2
  } port_e;

  typedef struct packed {
    addr_t d;         // demanded location (pointer location if indirect)
    addr_t r;         // requester
    port_e port;      // requester's operand port
    logic  indirect;  // value of d is a pointer: demand d's value + disp
    off_t  disp;
    logic  fwd;       // tail demand: hand the requester's waiters to d
    logic  host;      // answer goes to the host result port
  } ev_token_t;

  typedef struct packed {
    data_t v;
    addr_t ra;
    port_e port;
  } op_token_t;

  typedef struct packed {
    data_t v;
    addr_t cr;
  } wb_token_t;

  typedef struct packed {
    addr_t  loc;       // location of the newf instruction
    caddr_t label;     // first code word of the frame
    off_t   arg_src;   // argument block offset in the creating frame
    off_t   arg_trg;   // where the new frame keeps the argument pointer
    logic   boot;      // host request: demand boot_off of the new frame
    off_t   boot_off;
  } fa_token_t;

  // Reservation-station (return storage) entry, keyed by demanded location.
  typedef struct packed {
    addr_t key;
    addr_t r;
    port_e port;
    logic  indirect;
    off_t  disp;
    logic  fwd;
    logic  host;
  } rs_entry_t;

  // Event pulses brought out of the core for performance counting.
  typedef struct packed {
    logic demand;       // EV-token accepted by s_Eval
    logic full_hit;     // demanded value already available
    logic locked_hit;   // demand merged with one already in progress
    logic indirect;     // indirect (displacement) demand resolved
    logic bypass_wb;    // immediate instruction bypassed execution
    logic shelve;       // operand stored while waiting for another
    logic execute;      // instruction executed
    logic forward;      // tail demand handed waiters over
    logic frame_new;    // frame allocated
    logic frame_free;   // frame freed
    logic pool_stall;   // frame request waiting for a free frame
    logic eval_stall;   // evaluation pipeline stalled by back-pressure
    logic store;        // store committed to heap memory
  } dde_events_t;

  // ---------------------------------------------------------------- helpers
  function automatic fidx_t frame_of(addr_t a);
    return a[ADDR_W-1:FRAME_W];
  endfunction

  function automatic addr_t frame_base(addr_t a);
    return {a[ADDR_W-1:FRAME_W], {FRAME_W{1'b0}}};
  endfunction

  function automatic data_t instr_imm(instr_t i);
    return i[31:0];
  endfunction

  function automatic logic has_pop(instr_t i);
    return !i.imm_f && (i.pop.mode != AM_NONE);
  endfunction

  // Operands that s_Demand requests as soon as an instruction is evaluated.
  // THEN, PSI and NEXT request their remaining operands later, from the
  // execution pipeline.
  function automatic logic demand_l_first(instr_t i);
    return (i.lop.mode != AM_NONE) && (i.op != OP_PSI) && (i.op != OP_NEWF);
  endfunction

  function automatic logic demand_r_first(instr_t i);
    return !i.imm_f && (i.rop.mode != AM_NONE) &&
           !(i.op inside {OP_THEN, OP_PSI, OP_NEXT});
  endfunction

  function automatic logic demand_p_first(instr_t i);
    return has_pop(i);
  endfunction

  // Build the EV-token that demands operand 'o' of the instruction at 'self'.
  function automatic ev_token_t operand_demand(operand_t o, addr_t self,
                                               port_e port, logic fwd);
    ev_token_t t;
    t.r    = self;
    t.port = port;
    t.fwd  = fwd;
    t.host = 1'b0;
    t.disp = o.disp;
    if (o.mode == AM_DISP) begin
      t.d        = frame_base(self) | addr_t'(o.base);
      t.indirect = 1'b1;
    end else begin
      t.d        = frame_base(self) | addr_t'(o.disp);
      t.indirect = 1'b0;
    end
    return t;
  endfunction

  // Target of an indirect demand once the pointer value is known.
  function automatic addr_t disp_target(data_t ptr, off_t disp);
    return addr_t'(ptr) + addr_t'(disp);
  endfunction

endpackage
