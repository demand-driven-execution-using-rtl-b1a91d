// dde_core -- single-issue pipelined demand-driven processor.
//
// The processor executes a program starting from the value that is wanted:
// a demand for a scalar-memory location makes the instruction there demand
// its operands, recursively, and each value flows back to its demanders as
// soon as it is computed, so independent work proceeds in parallel in the
// pipelines. Three pipelines, each fed by its own token queue, form a loop:
//
//   ev-queue -> evaluation pipeline  -> op-queue / wb-queue / ev-queue /
//                                       frame allocation queues
//   op-queue -> execution pipeline   -> wb-queue (and ev-queue, heap memory)
//   wb-queue -> send-back pipeline   -> op-queue / ev-queue / host result
//
// Scalar memory holds the instructions and values of all live frames; the
// return storage holds the return addresses of demands still waiting --
// either a CAM reservation station or, with LINKED_RETURN, one linked list
// of waiters per location;
// two frame allocation stages create frames from code memory, one for
// procedures and outer loops (pool 0) and one for innermost loop iterations
// (pool 1), each with its own queue; heap memory holds arrays.
//
// Host interface: load code words (ld_*), read and write heap words (h_*),
// then pulse start_valid with a code label and an offset: a frame is created
// from that label and the value at that offset is demanded; it comes back on
// res_valid/res_data. 'idle' is high when no token or frame request is in
// flight. 'events' pulses for performance counting; the *_count and
// rs_used outputs give the occupancy of the queues and the reservation
// station.
//
// Every producer writes a queue only when the queue has room for all its
// writers at once; otherwise that pipeline holds. Queue and reservation
// station sizes are this design's choices (the document gives none). A
// queue can still fill up if a program's demands grow faster than they
// drain; the ev-queue is therefore made deep.
module dde_core
  import dde_pkg::*;
#(
  parameter int POOL0_FRAMES = 16,
  parameter int POOL1_FRAMES = 64,
  parameter bit LINKED_RETURN = 1'b0,   // 0: CAM reservation station, 1: linked lists
  parameter int RS_ENTRIES   = 128,
  parameter int EVQ_DEPTH    = 256,
  parameter int OPQ_DEPTH    = 128,
  parameter int WBQ_DEPTH    = 128,
  parameter int FAQ_DEPTH    = 16,
  parameter int CODE_WORDS   = 4096,
  parameter int HEAP_WORDS   = 4096
) (
  input  logic               clk,
  input  logic               rst_n,
  // program load
  input  logic               ld_en,
  input  caddr_t             ld_addr,
  input  instr_t             ld_data,
  // heap access
  input  logic               h_we,
  input  logic [HEAP_AW-1:0] h_addr,
  input  data_t              h_wdata,
  output data_t              h_rdata,
  // start a demand
  input  logic               start_valid,
  input  caddr_t             start_label,
  input  off_t               start_off,
  output logic               start_ready,
  // result of the host demand
  output logic               res_valid,
  output data_t              res_data,
  // status
  output logic               idle,
  output logic [$clog2(POOL0_FRAMES+1)-1:0] pool0_free,
  output logic [$clog2(POOL1_FRAMES+1)-1:0] pool1_free,
  output dde_events_t        events,
  // occupancy of the token queues and the reservation station
  output logic [$clog2(EVQ_DEPTH):0]  ev_count,
  output logic [$clog2(OPQ_DEPTH):0]  op_count,
  output logic [$clog2(WBQ_DEPTH):0]  wb_count,
  output logic [$clog2(FAQ_DEPTH):0]  fa0_count,
  output logic [$clog2(FAQ_DEPTH):0]  fa1_count,
  output logic [$clog2(RS_ENTRIES):0] rs_used
);
  localparam int NUM_FRAMES = POOL0_FRAMES + POOL1_FRAMES;
  localparam int EV_NW = 9, OP_NW = 3, WB_NW = 6;

  initial assert (NUM_FRAMES <= MAX_FRAMES)
    else $fatal(1, "dde_core: more frames than the address space holds");

  // ---------------------------------------------------------------- queues
  logic [EV_NW-1:0] ev_we;  ev_token_t ev_wd [EV_NW];
  logic [OP_NW-1:0] op_we;  op_token_t op_wd [OP_NW];
  logic [WB_NW-1:0] wb_we;  wb_token_t wb_wd [WB_NW];
  logic [1:0]       fa0_we; fa_token_t fa0_wd [2];
  logic [0:0]       fa1_we; fa_token_t fa1_wd [1];

  logic ev_pop, op_pop, wb_pop, fa0_pop, fa1_pop;
  logic ev_empty, op_empty, wb_empty, fa0_empty, fa1_empty;
  logic ev_room, op_room, wb_room, fa0_room, fa1_room;
  ev_token_t ev_head; op_token_t op_head; wb_token_t wb_head;
  fa_token_t fa0_head, fa1_head;

  dde_fifo #(.T(ev_token_t), .DEPTH(EVQ_DEPTH), .NW(EV_NW)) u_evq (
    .clk, .rst_n, .wr_en(ev_we), .wr_data(ev_wd), .rd_en(ev_pop),
    .rd_data(ev_head), .empty(ev_empty), .room(ev_room), .count(ev_count));
  dde_fifo #(.T(op_token_t), .DEPTH(OPQ_DEPTH), .NW(OP_NW)) u_opq (
    .clk, .rst_n, .wr_en(op_we), .wr_data(op_wd), .rd_en(op_pop),
    .rd_data(op_head), .empty(op_empty), .room(op_room), .count(op_count));
  dde_fifo #(.T(wb_token_t), .DEPTH(WBQ_DEPTH), .NW(WB_NW)) u_wbq (
    .clk, .rst_n, .wr_en(wb_we), .wr_data(wb_wd), .rd_en(wb_pop),
    .rd_data(wb_head), .empty(wb_empty), .room(wb_room), .count(wb_count));
  dde_fifo #(.T(fa_token_t), .DEPTH(FAQ_DEPTH), .NW(2)) u_faq0 (
    .clk, .rst_n, .wr_en(fa0_we), .wr_data(fa0_wd), .rd_en(fa0_pop),
    .rd_data(fa0_head), .empty(fa0_empty), .room(fa0_room), .count(fa0_count));
  dde_fifo #(.T(fa_token_t), .DEPTH(FAQ_DEPTH), .NW(1)) u_faq1 (
    .clk, .rst_n, .wr_en(fa1_we), .wr_data(fa1_wd), .rd_en(fa1_pop),
    .rd_data(fa1_head), .empty(fa1_empty), .room(fa1_room), .count(fa1_count));

  // ---------------------------------------------------------------- scalar memory
  addr_t  ea_addr, eb_addr, xi_addr, xo_addr, wb_addr, fa0_addr, fa1_addr;
  evtag_e ea_evtag, eb_evtag;
  data_t  ea_value, eb_value, xo_slot_l, xo_slot_r, xo_l_w, xo_r_w, wb_value;
  data_t  fa0_arg, fa1_arg;
  instr_t eb_instr, xi_instr, fa0_instr, fa1_instr;
  optag_t xo_optag, xo_optag_w;
  logic   eb_lock, xo_we, xo_l_we, xo_r_we, wb_en;
  logic   fa0_im_en, fa0_arg_en, fa1_im_en, fa1_arg_en;

  dde_scalar_memory #(.NUM_FRAMES(NUM_FRAMES)) u_sm (
    .clk,
    .ea_addr, .ea_evtag, .ea_value,
    .eb_addr, .eb_evtag, .eb_value, .eb_instr, .eb_lock,
    .xi_addr, .xi_instr,
    .xo_addr, .xo_optag, .xo_slot_l, .xo_slot_r, .xo_we, .xo_optag_w,
    .xo_l_we, .xo_l_w, .xo_r_we, .xo_r_w,
    .wb_en, .wb_addr, .wb_value,
    .fa0_im_en, .fa0_addr, .fa0_instr, .fa0_arg_en, .fa0_arg,
    .fa1_im_en, .fa1_addr, .fa1_instr, .fa1_arg_en, .fa1_arg);

  // ---------------------------------------------------------------- reservation station
  logic      rs_ins_en, rs_full, rs_hit, rs_take, rs_rekey_en;
  rs_entry_t rs_ins_entry, rs_hit_entry;
  addr_t     rs_key, rs_rekey_from, rs_rekey_to;

  if (LINKED_RETURN) begin : g_ras
    dde_ras #(.ENTRIES(RS_ENTRIES)) u_rs (
      .clk, .rst_n, .ins_en(rs_ins_en), .ins_entry(rs_ins_entry), .full(rs_full),
      .srch_key(rs_key), .hit(rs_hit), .hit_entry(rs_hit_entry), .take(rs_take),
      .rekey_en(rs_rekey_en), .rekey_from(rs_rekey_from), .rekey_to(rs_rekey_to),
      .used(rs_used));
  end else begin : g_cam
    dde_resv_station #(.ENTRIES(RS_ENTRIES)) u_rs (
      .clk, .rst_n, .ins_en(rs_ins_en), .ins_entry(rs_ins_entry), .full(rs_full),
      .srch_key(rs_key), .hit(rs_hit), .hit_entry(rs_hit_entry), .take(rs_take),
      .rekey_en(rs_rekey_en), .rekey_from(rs_rekey_from), .rekey_to(rs_rekey_to),
      .used(rs_used));
  end

  // ---------------------------------------------------------------- evaluation
  logic       eval_adv, eval_busy;
  logic [4:0] e_ev_en;  ev_token_t e_ev [5];
  logic [1:0] e_op_en;  op_token_t e_op [2];
  logic [2:0] e_wb_en;  wb_token_t e_wb [3];
  logic [1:0] e_fa_en;  fa_token_t e_fa;
  logic [1:0] e_host_en; data_t e_host_val [2];
  logic ev_demand, ev_full_hit, ev_locked_hit, ev_indirect, ev_bypass,
        ev_forward, ev_stall;

  assign eval_adv = ev_room && op_room && wb_room && fa0_room && fa1_room && !rs_full;

  dde_eval_pipe u_eval (
    .clk, .rst_n, .adv(eval_adv),
    .in_valid(!ev_empty), .in_tok(ev_head), .in_pop(ev_pop),
    .ea_addr, .ea_evtag, .ea_value,
    .eb_addr, .eb_evtag, .eb_value, .eb_instr, .eb_lock,
    .rs_ins_en, .rs_ins_entry, .rs_rekey_en, .rs_rekey_from, .rs_rekey_to,
    .ev_wr_en(e_ev_en), .ev_wr(e_ev), .op_wr_en(e_op_en), .op_wr(e_op),
    .wb_wr_en(e_wb_en), .wb_wr(e_wb), .fa_wr_en(e_fa_en), .fa_wr(e_fa),
    .host_en(e_host_en), .host_val(e_host_val), .busy(eval_busy),
    .ev_demand, .ev_full_hit, .ev_locked_hit, .ev_indirect, .ev_bypass,
    .ev_forward, .ev_stall);

  // ---------------------------------------------------------------- execution
  logic      exec_adv, exec_busy, x_wb_en, x_ev_en, free_en;
  wb_token_t x_wb;
  ev_token_t x_ev;
  fidx_t     free_frame;
  logic      mem_we;
  logic [HEAP_AW-1:0] mem_addr;
  data_t     mem_wdata, mem_rdata;
  logic      ev_shelve, ev_execute, ev_store;

  assign exec_adv = wb_room && ev_room;

  dde_exec_pipe u_exec (
    .clk, .rst_n, .adv(exec_adv),
    .in_valid(!op_empty), .in_tok(op_head), .in_pop(op_pop),
    .xi_addr, .xi_instr,
    .xo_addr, .xo_optag, .xo_slot_l, .xo_slot_r, .xo_we, .xo_optag_w,
    .xo_l_we, .xo_l_w, .xo_r_we, .xo_r_w,
    .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .wb_wr_en(x_wb_en), .wb_wr(x_wb), .ev_wr_en(x_ev_en), .ev_wr(x_ev),
    .free_en, .free_frame, .busy(exec_busy),
    .ev_shelve, .ev_execute, .ev_store);

  dde_heap_memory #(.WORDS(HEAP_WORDS)) u_heap (
    .clk, .a_we(mem_we), .a_addr(mem_addr), .a_wdata(mem_wdata), .a_rdata(mem_rdata),
    .h_we, .h_addr, .h_wdata, .h_rdata);

  // ---------------------------------------------------------------- send-back
  logic      sb_adv, sb_busy, s_op_en, s_ev_en, s_host_en;
  op_token_t s_op;
  ev_token_t s_ev;
  data_t     s_host_val;

  assign sb_adv = op_room && ev_room;

  dde_sendback_pipe u_sb (
    .clk, .rst_n, .adv(sb_adv),
    .in_valid(!wb_empty), .in_tok(wb_head), .in_pop(wb_pop),
    .wb_en, .wb_addr, .wb_value,
    .rs_key, .rs_hit, .rs_entry(rs_hit_entry), .rs_take,
    .op_wr_en(s_op_en), .op_wr(s_op), .ev_wr_en(s_ev_en), .ev_wr(s_ev),
    .host_en(s_host_en), .host_val(s_host_val), .busy(sb_busy));

  // ---------------------------------------------------------------- frame allocation
  logic      fa_adv;
  caddr_t    c_addr0, c_addr1;
  instr_t    c_data0, c_data1;
  logic      a0_wb_en, a1_wb_en, a0_ev_en, a1_ev_en, a0_busy, a1_busy;
  wb_token_t a0_wb, a1_wb;
  ev_token_t a0_ev, a1_ev;
  logic      a0_new, a1_new, a0_free, a1_free, a0_stall, a1_stall;

  assign fa_adv = wb_room && ev_room;

  dde_code_memory #(.WORDS(CODE_WORDS)) u_code (
    .clk, .ld_en, .ld_addr, .ld_data,
    .ra0(c_addr0), .rd0(c_data0), .ra1(c_addr1), .rd1(c_data1));

  dde_frame_alloc #(.FIRST_FRAME(0), .POOL_FRAMES(POOL0_FRAMES)) u_fa0 (
    .clk, .rst_n, .adv(fa_adv),
    .in_valid(!fa0_empty), .in_tok(fa0_head), .in_pop(fa0_pop),
    .c_addr(c_addr0), .c_data(c_data0),
    .im_en(fa0_im_en), .sm_addr(fa0_addr), .im_instr(fa0_instr),
    .arg_en(fa0_arg_en), .arg_val(fa0_arg),
    .free_en, .free_frame,
    .wb_wr_en(a0_wb_en), .wb_wr(a0_wb), .ev_wr_en(a0_ev_en), .ev_wr(a0_ev),
    .busy(a0_busy), .ev_frame_new(a0_new), .ev_frame_free(a0_free),
    .ev_pool_stall(a0_stall), .free_count(pool0_free));

  dde_frame_alloc #(.FIRST_FRAME(POOL0_FRAMES), .POOL_FRAMES(POOL1_FRAMES)) u_fa1 (
    .clk, .rst_n, .adv(fa_adv),
    .in_valid(!fa1_empty), .in_tok(fa1_head), .in_pop(fa1_pop),
    .c_addr(c_addr1), .c_data(c_data1),
    .im_en(fa1_im_en), .sm_addr(fa1_addr), .im_instr(fa1_instr),
    .arg_en(fa1_arg_en), .arg_val(fa1_arg),
    .free_en, .free_frame,
    .wb_wr_en(a1_wb_en), .wb_wr(a1_wb), .ev_wr_en(a1_ev_en), .ev_wr(a1_ev),
    .busy(a1_busy), .ev_frame_new(a1_new), .ev_frame_free(a1_free),
    .ev_pool_stall(a1_stall), .free_count(pool1_free));

  // ---------------------------------------------------------------- queue writers
  always_comb begin
    for (int i = 0; i < 5; i++) begin
      ev_we[i] = e_ev_en[i];
      ev_wd[i] = e_ev[i];
    end
    ev_we[5] = x_ev_en;  ev_wd[5] = x_ev;
    ev_we[6] = s_ev_en;  ev_wd[6] = s_ev;
    ev_we[7] = a0_ev_en; ev_wd[7] = a0_ev;
    ev_we[8] = a1_ev_en; ev_wd[8] = a1_ev;

    op_we[0] = e_op_en[0]; op_wd[0] = e_op[0];
    op_we[1] = e_op_en[1]; op_wd[1] = e_op[1];
    op_we[2] = s_op_en;    op_wd[2] = s_op;

    for (int i = 0; i < 3; i++) begin
      wb_we[i] = e_wb_en[i];
      wb_wd[i] = e_wb[i];
    end
    wb_we[3] = x_wb_en;  wb_wd[3] = x_wb;
    wb_we[4] = a0_wb_en; wb_wd[4] = a0_wb;
    wb_we[5] = a1_wb_en; wb_wd[5] = a1_wb;

    fa0_we[0] = e_fa_en[0];
    fa0_wd[0] = e_fa;
    fa0_we[1] = start_valid && start_ready;
    fa0_wd[1] = '{loc: '0, label: start_label, arg_src: '0, arg_trg: '0,
                  boot: 1'b1, boot_off: start_off};
    fa1_we[0] = e_fa_en[1];
    fa1_wd[0] = e_fa;
  end

  assign start_ready = fa0_room;

  // ---------------------------------------------------------------- host result
  always_comb begin
    res_valid = 1'b1;
    if (s_host_en)         res_data = s_host_val;
    else if (e_host_en[0]) res_data = e_host_val[0];
    else if (e_host_en[1]) res_data = e_host_val[1];
    else begin
      res_valid = 1'b0;
      res_data  = '0;
    end
  end

  assign idle = ev_empty && op_empty && wb_empty && fa0_empty && fa1_empty &&
                !eval_busy && !exec_busy && !sb_busy && !a0_busy && !a1_busy;

  assign events = '{demand: ev_demand, full_hit: ev_full_hit,
                    locked_hit: ev_locked_hit, indirect: ev_indirect || s_ev_en,
                    bypass_wb: ev_bypass, shelve: ev_shelve, execute: ev_execute,
                    forward: ev_forward, frame_new: a0_new || a1_new,
                    frame_free: a0_free || a1_free, pool_stall: a0_stall || a1_stall,
                    eval_stall: ev_stall, store: ev_store};

endmodule
