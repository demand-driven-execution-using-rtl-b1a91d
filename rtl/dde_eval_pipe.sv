// dde_eval_pipe -- evaluation pipeline: turns demands into work.
//
// Four stages, one EV-token accepted per cycle from the ev-queue:
//   s_Eval   reads the Evtag and value of the demanded location. If the value
//            is already there it is answered at once: an OP-token to the
//            requester, a new EV-token if the value is a pointer to follow
//            (indirect demand), or the host result port.
//   s_Fetch  re-reads the Evtag and acts on it atomically (test-and-set):
//            full       -> answered as in s_Eval;
//            locked     -> someone is already computing it: the return
//                          address is stored in the reservation station and
//                          the token retires;
//            unlocked   -> return address stored, location locked, and the
//                          instruction read from IM goes on.
//   s_Decode literal (LI) and frame-address (FADDR) instructions produce a
//            WB-token directly, bypassing execution; NEWF goes to the frame
//            allocation queue of its pool; the rest goes on.
//   s_Demand issues an EV-token for each operand needed now (up to two plus
//            a predicate). A displacement operand is demanded indirectly:
//            its base location is demanded and the answer is redirected.
// A tail demand (fwd) from a NEXT instruction does not store a return
// address; instead the waiters of the NEXT are re-keyed onto the demanded
// location, or, if that value already exists, the NEXT location is written
// back with it.
// The whole pipeline advances only when 'adv' is high, which the core
// derives from the room left in every queue it writes and in the
// reservation station. The stage split follows the document; re-checking
// the Evtag in s_Fetch, the host answer path and the tail-demand re-keying
// are this design's own choices.
// Several output bits are constant by construction, for example the fields
// that a given write port never sets (fwd and host of operand demands, the
// pool bit routing of frame requests).
module dde_eval_pipe
  import dde_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        adv,
  // ev-queue head
  input  logic        in_valid,
  input  ev_token_t   in_tok,
  output logic        in_pop,
  // scalar memory
  output addr_t       ea_addr,
  input  evtag_e      ea_evtag,
  input  data_t       ea_value,
  output addr_t       eb_addr,
  input  evtag_e      eb_evtag,
  input  data_t       eb_value,
  input  instr_t      eb_instr,
  output logic        eb_lock,
  // reservation station
  output logic        rs_ins_en,
  output rs_entry_t   rs_ins_entry,
  output logic        rs_rekey_en,
  output addr_t       rs_rekey_from,
  output addr_t       rs_rekey_to,
  // produced tokens
  output logic [4:0]  ev_wr_en,     // 0 s_Eval, 1 s_Fetch, 2..4 s_Demand
  output ev_token_t   ev_wr [5],
  output logic [1:0]  op_wr_en,     // 0 s_Eval, 1 s_Fetch
  output op_token_t   op_wr [2],
  output logic [2:0]  wb_wr_en,     // 0 s_Eval, 1 s_Fetch, 2 s_Decode
  output wb_token_t   wb_wr [3],
  output logic [1:0]  fa_wr_en,     // frame pool 0 / pool 1
  output fa_token_t   fa_wr,
  output logic [1:0]  host_en,      // answers to the host
  output data_t       host_val [2],
  output logic        busy,
  output logic        ev_demand,
  output logic        ev_full_hit,
  output logic        ev_locked_hit,
  output logic        ev_indirect,
  output logic        ev_bypass,
  output logic        ev_forward,
  output logic        ev_stall
);
  typedef struct packed {
    addr_t  loc;
    instr_t ins;
  } dec_t;

  logic      v1, v2, v3, v4;
  ev_token_t t1, t2;
  dec_t      d3, d4;

  assign in_pop  = adv && in_valid;
  assign ea_addr = t1.d;
  assign eb_addr = t2.d;
  assign busy    = v1 || v2 || v3 || v4;

  // Answer a demand whose value 'val' is available.
  typedef struct packed {
    logic      e, o, w, h;
    ev_token_t ev;
    op_token_t op;
    wb_token_t wb;
  } ans_t;

  function automatic ans_t answer(ev_token_t t, data_t val);
    ans_t a;
    a = '0;
    if (t.indirect) begin
      a.e           = 1'b1;
      a.ev          = t;
      a.ev.d        = disp_target(val, t.disp);
      a.ev.indirect = 1'b0;
    end else if (t.fwd) begin
      a.w     = 1'b1;
      a.wb.v  = val;
      a.wb.cr = t.r;
    end else if (t.host) begin
      a.h     = 1'b1;
    end else begin
      a.o       = 1'b1;
      a.op.v    = val;
      a.op.ra   = t.r;
      a.op.port = t.port;
    end
    return a;
  endfunction

  ans_t a1, a2;
  assign a1 = answer(t1, ea_value);
  assign a2 = answer(t2, eb_value);
  assign host_val[0] = ea_value;
  assign host_val[1] = eb_value;

  always_comb begin
    ev_wr_en      = '0;
    op_wr_en      = '0;
    wb_wr_en      = '0;
    fa_wr_en      = '0;
    host_en       = '0;
    eb_lock       = 1'b0;
    rs_ins_en     = 1'b0;
    rs_rekey_en   = 1'b0;
    rs_rekey_from = t2.r;
    rs_rekey_to   = t2.d;
    rs_ins_entry  = '{key: t2.d, r: t2.r, port: t2.port, indirect: t2.indirect,
                      disp: t2.disp, fwd: t2.fwd, host: t2.host};
    ev_wr[0]      = a1.ev;
    ev_wr[1]      = a2.ev;
    op_wr[0]      = a1.op;
    op_wr[1]      = a2.op;
    wb_wr[0]      = a1.wb;
    wb_wr[1]      = a2.wb;
    wb_wr[2]      = '0;
    fa_wr         = '0;
    ev_full_hit   = 1'b0;
    ev_locked_hit = 1'b0;
    ev_indirect   = 1'b0;
    ev_bypass     = 1'b0;
    ev_forward    = 1'b0;

    // s_Eval
    if (v1 && ea_evtag == EV_FULL && adv) begin
      ev_wr_en[0] = a1.e; op_wr_en[0] = a1.o; wb_wr_en[0] = a1.w; host_en[0] = a1.h;
      ev_full_hit = 1'b1;
      ev_indirect = t1.indirect;
    end

    // s_Fetch
    if (v2 && adv) begin
      if (eb_evtag == EV_FULL) begin
        ev_wr_en[1] = a2.e; op_wr_en[1] = a2.o; wb_wr_en[1] = a2.w; host_en[1] = a2.h;
        ev_full_hit = 1'b1;
        ev_indirect = ev_indirect | t2.indirect;
      end else begin
        if (t2.fwd && !t2.indirect) begin
          rs_rekey_en = 1'b1;
          ev_forward  = 1'b1;
        end else begin
          rs_ins_en   = 1'b1;
        end
        if (eb_evtag == EV_EMPTY_UNLOCKED) eb_lock = 1'b1;
        else ev_locked_hit = 1'b1;
      end
    end

    // s_Decode
    if (v3 && adv) begin
      unique case (d3.ins.op)
        OP_LI, OP_FADDR, OP_NOP: begin
          wb_wr_en[2] = 1'b1;
          wb_wr[2].cr = d3.loc;
          wb_wr[2].v  = (d3.ins.op == OP_LI)    ? instr_imm(d3.ins) :
                        (d3.ins.op == OP_FADDR) ? data_t'(frame_base(d3.loc)) : '0;
          ev_bypass   = 1'b1;
        end
        OP_NEWF: begin
          fa_wr_en[d3.ins.pool] = 1'b1;
          fa_wr.loc     = d3.loc;
          fa_wr.label   = caddr_t'(instr_imm(d3.ins));
          fa_wr.arg_src = d3.ins.lop.disp;
          fa_wr.arg_trg = d3.ins.lop.base;
        end
        default: ;
      endcase
    end

    // s_Demand
    ev_wr[2] = operand_demand(d4.ins.lop, d4.loc, PORT_L, 1'b0);
    ev_wr[3] = operand_demand(d4.ins.rop, d4.loc, PORT_R, 1'b0);
    ev_wr[4] = operand_demand(d4.ins.pop, d4.loc, PORT_P, 1'b0);
    if (v4 && adv) begin
      ev_wr_en[2] = demand_l_first(d4.ins);
      ev_wr_en[3] = demand_r_first(d4.ins);
      ev_wr_en[4] = demand_p_first(d4.ins);
    end
  end

  assign ev_demand = v1 && adv;
  assign ev_stall  = !adv && (v1 || v2 || v3 || v4 || in_valid);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; v4 <= 1'b0;
    end else if (adv) begin
      v1 <= in_valid;
      t1 <= in_tok;
      v2 <= v1 && (ea_evtag != EV_FULL);
      t2 <= t1;
      v3 <= v2 && (eb_evtag == EV_EMPTY_UNLOCKED);
      d3 <= '{loc: t2.d, ins: eb_instr};
      v4 <= v3 && !(d3.ins.op inside {OP_LI, OP_FADDR, OP_NOP, OP_NEWF});
      d4 <= d3;
    end
  end

endmodule
