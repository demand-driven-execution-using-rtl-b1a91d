// dde_exec_pipe -- execution pipeline: matches operands and executes.
//
// One OP-token per cycle is taken from the op-queue and goes through three
// stages:
//   Read_SM  reads the instruction of the target location from IM.
//   Pre_EX   reads the location's Optag and shelved operands and merges the
//            arriving operand in (atomically, so two operands of one
//            instruction arriving back to back are seen in order). If the
//            instruction still lacks an operand the value is shelved in DM
//            and the Optag updated; if it is complete it moves on to EX.
//            Instructions whose later operands depend on earlier ones emit
//            those demands here: THEN demands rop once lop has arrived,
//            PSI demands lop or rop once the predicate is known, and NEXT
//            issues a tail demand of rop (the same instruction in the next
//            loop iteration) when its predicate says the loop goes on.
//   EX       integer unit, load unit (heap read), store unit (heap write,
//            the stored value is the result) and frame release for DELF. The
//            result leaves as a WB-token.
// Operands that arrive after an instruction fired (EITHER, FIRST, a NEXT
// that forwarded) are dropped. The pipeline advances only when 'adv' is
// high (room in the wb-queue and ev-queue). Stage split and operand matching
// follow the document; the per-opcode firing rules for the synchronisation
// instructions are this design's reading of their definitions.
module dde_exec_pipe
  import dde_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       adv,
  // op-queue head
  input  logic       in_valid,
  input  op_token_t  in_tok,
  output logic       in_pop,
  // scalar memory
  output addr_t      xi_addr,
  input  instr_t     xi_instr,
  output addr_t      xo_addr,
  input  optag_t     xo_optag,
  input  data_t      xo_slot_l,
  input  data_t      xo_slot_r,
  output logic       xo_we,
  output optag_t     xo_optag_w,
  output logic       xo_l_we,
  output data_t      xo_l_w,
  output logic       xo_r_we,
  output data_t      xo_r_w,
  // heap memory
  output logic       mem_we,
  output logic [HEAP_AW-1:0] mem_addr,
  output data_t      mem_wdata,
  input  data_t      mem_rdata,
  // produced tokens
  output logic       wb_wr_en,
  output wb_token_t  wb_wr,
  output logic       ev_wr_en,
  output ev_token_t  ev_wr,
  // frame release
  output logic       free_en,
  output fidx_t      free_frame,
  output logic       busy,
  output logic       ev_shelve,
  output logic       ev_execute,
  output logic       ev_store
);
  typedef struct packed {
    addr_t  ra;
    instr_t ins;
    data_t  a;
    data_t  b;
    logic   rel;     // DELF: release the frame
  } ex_t;

  logic      v1, v2, v3;
  op_token_t t1, t2;
  instr_t    i2;
  ex_t       x3;

  assign in_pop  = adv && in_valid;
  assign xi_addr = t1.ra;
  assign xo_addr = t2.ra;
  assign busy    = v1 || v2 || v3;

  // ---------------------------------------------------------------- Pre_EX
  optag_t nt;
  data_t  lv, rv;
  logic   fire, hp;
  ex_t    x2;

  always_comb begin
    nt       = xo_optag;
    hp       = has_pop(i2);
    lv       = (t2.port == PORT_L) ? t2.v : xo_slot_l;
    rv       = (t2.port == PORT_R) ? t2.v : xo_slot_r;
    unique case (t2.port)
      PORT_L:  nt.have_l = 1'b1;
      PORT_R:  nt.have_r = 1'b1;
      default: begin nt.have_p = 1'b1; nt.pval = (t2.v != '0); end
    endcase

    fire     = 1'b0;
    ev_wr_en = 1'b0;
    ev_wr    = operand_demand(i2.rop, t2.ra, PORT_R, 1'b0);
    x2       = '{ra: t2.ra, ins: i2, a: lv, b: rv, rel: 1'b0};

    unique case (i2.op)
      OP_MOV, OP_FIRST: fire = nt.have_l;
      OP_WITH:          fire = nt.have_l && nt.have_r;
      OP_EITHER: begin
        fire = nt.have_l || nt.have_r;
        x2.a = (t2.port == PORT_L) ? lv : rv;
      end
      OP_THEN: begin
        fire = nt.have_l && nt.have_r;
        ev_wr_en = (t2.port == PORT_L) && !nt.have_r;
      end
      OP_PSI: begin
        fire = nt.have_p && (nt.pval ? nt.have_l : nt.have_r);
        x2.a = nt.pval ? lv : rv;
        if (t2.port == PORT_P) begin
          ev_wr_en = 1'b1;
          ev_wr    = nt.pval ? operand_demand(i2.lop, t2.ra, PORT_L, 1'b0)
                             : operand_demand(i2.rop, t2.ra, PORT_R, 1'b0);
        end
      end
      OP_NEXT: begin
        fire = nt.have_p && nt.pval && nt.have_l;
        if (t2.port == PORT_P && !nt.pval) begin
          ev_wr_en = 1'b1;
          ev_wr    = operand_demand(i2.rop, t2.ra, PORT_R, 1'b1);
          nt.fired = 1'b1;
        end
      end
      OP_LW:   fire = nt.have_l && (!hp || nt.have_p);
      OP_SW:   fire = nt.have_l && nt.have_r && (!hp || nt.have_p);
      OP_DELF: begin
        fire   = nt.have_l && nt.have_r && (!hp || nt.have_p);
        x2.rel = !hp || nt.pval;
      end
      default: begin                              // integer unit
        fire = i2.imm_f ? nt.have_l : (nt.have_l && nt.have_r);
        if (i2.imm_f) x2.b = instr_imm(i2);
      end
    endcase
    if (fire) nt.fired = 1'b1;

    if (xo_optag.fired) begin                     // late operand: drop it
      fire     = 1'b0;
      ev_wr_en = 1'b0;
    end
    if (!(v2 && adv)) begin
      fire     = 1'b0;
      ev_wr_en = 1'b0;
    end
  end

  assign xo_we      = v2 && adv && !xo_optag.fired;
  assign xo_optag_w = nt;
  assign xo_l_we    = xo_we && (t2.port == PORT_L);
  assign xo_r_we    = xo_we && (t2.port == PORT_R);
  assign xo_l_w     = t2.v;
  assign xo_r_w     = t2.v;
  assign ev_shelve  = xo_we && !fire && !nt.fired;

  // ---------------------------------------------------------------- EX
  data_t alu_y;

  dde_alu u_alu (.op(x3.ins.op), .a(x3.a), .b(x3.b), .y(alu_y));

  assign mem_addr  = HEAP_AW'(x3.a + data_t'($signed(x3.ins.mdisp)));
  assign mem_wdata = x3.b;
  assign mem_we    = v3 && adv && (x3.ins.op == OP_SW);

  always_comb begin
    wb_wr_en = v3 && adv;
    wb_wr.cr = x3.ra;
    unique case (x3.ins.op)
      OP_LW:   wb_wr.v = mem_rdata;
      OP_SW:   wb_wr.v = x3.b;
      OP_MOV, OP_WITH, OP_THEN, OP_EITHER, OP_FIRST, OP_PSI, OP_NEXT,
      OP_DELF: wb_wr.v = x3.a;
      default: wb_wr.v = alu_y;
    endcase
  end

  assign free_en    = v3 && adv && (x3.ins.op == OP_DELF) && x3.rel;
  assign free_frame = frame_of(addr_t'(x3.b));
  assign ev_execute = v3 && adv;
  assign ev_store   = mem_we;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
    end else if (adv) begin
      v1 <= in_valid;
      t1 <= in_tok;
      v2 <= v1;
      t2 <= t1;
      i2 <= xi_instr;
      v3 <= fire;
      x3 <= x2;
    end
  end

endmodule
