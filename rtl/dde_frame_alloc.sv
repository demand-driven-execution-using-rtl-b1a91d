// dde_frame_alloc -- frame allocation stage for one pool of frames.
//
// Serves the NEWF instruction. A request from the frame allocation queue
// takes a free frame of this stage's pool, copies FRAME_SIZE instruction
// words from code memory starting at the request's label into the frame's IM
// (one word per cycle, a burst), resetting each location's tags. It then
// stores the argument pointer -- the address of the argument block in the
// frame that executed NEWF -- at the requested offset of the new frame, with
// its Evtag full, and finally writes back the NEWF location with a pointer to
// the new frame. A request is held in the queue while the pool has no free
// frame; this is how the number of live procedure instances and loop
// iterations is limited. DELF releases a frame of the pool.
// A boot request (from the host) allocates a frame the same way and then
// demands one of its locations on behalf of the host instead of writing
// back. One frame takes FRAME_SIZE + 2 cycles plus the wait for queue room.
// Behaviour and pooling follow the document; the free-list bit vector, the
// lowest-free-frame choice and the boot request are this design's choices.
// The frames of the pool are FIRST_FRAME .. FIRST_FRAME+POOL_FRAMES-1.
// Several output bits are constant by construction: the unused fields of
// the boot EV-token, the offset bits of the frame pointer it writes back and
// the upper bits of pointer-valued data words.
module dde_frame_alloc
  import dde_pkg::*;
#(
  parameter int FIRST_FRAME = 0,
  parameter int POOL_FRAMES = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       adv,
  // frame allocation queue head
  input  logic       in_valid,
  input  fa_token_t  in_tok,
  output logic       in_pop,
  // code memory
  output caddr_t     c_addr,
  input  instr_t     c_data,
  // scalar memory
  output logic       im_en,
  output addr_t      sm_addr,
  output instr_t     im_instr,
  output logic       arg_en,
  output data_t      arg_val,
  // frame release (any frame; ignored unless it belongs to this pool)
  input  logic       free_en,
  input  fidx_t      free_frame,
  // produced tokens
  output logic       wb_wr_en,
  output wb_token_t  wb_wr,
  output logic       ev_wr_en,
  output ev_token_t  ev_wr,
  output logic       busy,
  output logic       ev_frame_new,
  output logic       ev_frame_free,
  output logic       ev_pool_stall,
  output logic [$clog2(POOL_FRAMES+1)-1:0] free_count
);
  localparam int PW = (POOL_FRAMES > 1) ? $clog2(POOL_FRAMES) : 1;

  typedef enum logic [1:0] {S_IDLE, S_BURST, S_ARG, S_DONE} state_e;

  state_e            state;
  logic [POOL_FRAMES-1:0] free_v;
  fa_token_t         req;
  addr_t             base;
  off_t              k;
  logic              any_free;
  logic [PW-1:0]     pick;
  logic              in_pool;
  logic [PW-1:0]     rel_idx;

  always_comb begin
    any_free = 1'b0;
    pick     = '0;
    for (int i = POOL_FRAMES - 1; i >= 0; i--)
      if (free_v[i]) begin any_free = 1'b1; pick = PW'(i); end
    free_count = '0;
    for (int i = 0; i < POOL_FRAMES; i++)
      free_count = free_count + ($bits(free_count))'(free_v[i]);
  end

  assign in_pool = (int'(free_frame) >= FIRST_FRAME) &&
                   (int'(free_frame) < FIRST_FRAME + POOL_FRAMES);
  assign rel_idx = PW'(int'(free_frame) - FIRST_FRAME);

  assign in_pop   = (state == S_IDLE) && in_valid && any_free;
  assign c_addr   = req.label + caddr_t'(k);
  assign im_en    = (state == S_BURST);
  assign im_instr = c_data;
  assign arg_en   = (state == S_ARG);
  assign sm_addr  = (state == S_ARG) ? (base | addr_t'(req.arg_trg)) : (base | addr_t'(k));
  assign arg_val  = data_t'(addr_t'(frame_base(req.loc) | addr_t'(req.arg_src)));

  assign wb_wr_en = (state == S_DONE) && adv && !req.boot;
  assign wb_wr    = '{v: data_t'(base), cr: req.loc};
  assign ev_wr_en = (state == S_DONE) && adv && req.boot;
  assign ev_wr    = '{d: base | addr_t'(req.boot_off), r: '0, port: PORT_L,
                      indirect: 1'b0, disp: '0, fwd: 1'b0, host: 1'b1};

  assign busy          = (state != S_IDLE);
  assign ev_frame_new  = in_pop;
  assign ev_frame_free = free_en && in_pool;
  assign ev_pool_stall = (state == S_IDLE) && in_valid && !any_free;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      free_v <= '1;
      k      <= '0;
    end else begin
      if (free_en && in_pool) free_v[rel_idx] <= 1'b1;
      unique case (state)
        S_IDLE: if (in_pop) begin
          req          <= in_tok;
          base         <= addr_t'(FIRST_FRAME + int'(pick)) << FRAME_W;
          free_v[pick] <= 1'b0;
          k            <= '0;
          state        <= S_BURST;
        end
        S_BURST: begin
          k <= k + 1'b1;
          if (k == off_t'(FRAME_SIZE - 1)) state <= req.boot ? S_DONE : S_ARG;
        end
        S_ARG:  state <= S_DONE;
        S_DONE: if (adv) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (free_en && in_pool) |-> !free_v[rel_idx])
    else $error("dde_frame_alloc: frame released twice");

endmodule
