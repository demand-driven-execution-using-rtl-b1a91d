// dde_sendback_pipe -- send-back-and-commit pipeline with CAM return storage.
//
// One WB-token per cycle from the wb-queue goes through three stages:
//   WB_update   commits the result to DM and sets the Evtag to full (when the
//               token moves on to Access_res, so exactly once).
//   Access_res  searches the reservation station for every entry waiting on
//               that location and takes one match per cycle, staying on the
//               same result until no match is left (one extra cycle).
//   Gen_token   builds the answer for each waiter: an OP-token carrying the
//               value, or, for an indirect waiter, a new EV-token demanding
//               location value+displacement; waiters flagged host get the
//               value on the host result port.
// Because the Evtag is full before the search starts, no waiter can be added
// for that location after its search, so none is missed. The pipeline holds
// when 'adv' is low (no room in the op-queue or ev-queue). Stages follow the
// document's reservation-station variant; one match per cycle is the
// single-issue configuration. The key field of the registered entry (e3)
// is not needed after the search; lint reports those bits as unused.
// The indirect and disp fields of the EV-tokens it makes are always clear.
module dde_sendback_pipe
  import dde_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       adv,
  // wb-queue head
  input  logic       in_valid,
  input  wb_token_t  in_tok,
  output logic       in_pop,
  // scalar memory
  output logic       wb_en,
  output addr_t      wb_addr,
  output data_t      wb_value,
  // reservation station
  output addr_t      rs_key,
  input  logic       rs_hit,
  input  rs_entry_t  rs_entry,
  output logic       rs_take,
  // produced tokens
  output logic       op_wr_en,
  output op_token_t  op_wr,
  output logic       ev_wr_en,
  output ev_token_t  ev_wr,
  output logic       host_en,
  output data_t      host_val,
  output logic       busy
);
  logic      v1, v2, v3;
  wb_token_t t1, t2;
  rs_entry_t e3;
  data_t     val3;

  logic move1, w2_free;

  assign w2_free = !v2 || !rs_hit;          // Access_res done with its result
  assign move1   = adv && w2_free;
  assign in_pop  = move1 && in_valid;
  assign wb_en   = v1 && move1;
  assign wb_addr = t1.cr;
  assign wb_value = t1.v;
  assign rs_key  = t2.cr;
  assign rs_take = adv && v2 && rs_hit;
  assign busy    = v1 || v2 || v3;

  always_comb begin
    op_wr_en    = 1'b0;
    ev_wr_en    = 1'b0;
    host_en     = 1'b0;
    host_val    = val3;
    op_wr       = '{v: val3, ra: e3.r, port: e3.port};
    ev_wr       = '{d: disp_target(val3, e3.disp), r: e3.r, port: e3.port,
                    indirect: 1'b0, disp: '0, fwd: e3.fwd, host: e3.host};
    if (v3 && adv) begin
      if (e3.indirect)  ev_wr_en = 1'b1;
      else if (e3.host) host_en  = 1'b1;
      else              op_wr_en = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
    end else if (adv) begin
      if (move1) begin
        v1 <= in_valid;
        t1 <= in_tok;
        v2 <= v1;
        t2 <= t1;
      end
      v3   <= v2 && rs_hit;
      e3   <= rs_entry;
      val3 <= t2.v;
    end
  end

endmodule
