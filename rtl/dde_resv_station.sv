// dde_resv_station -- content-addressable return-address storage.
//
// Each demand that finds its location not yet computed leaves an entry here:
// the demanded location (the CAM key), where the value must go (requester
// address and operand port) and whether the value is a pointer to be
// followed (indirect, with its displacement). When a result is written back,
// the send-back pipeline searches all entries with that key in parallel and
// takes the matches, one per cycle, freeing each entry as it is read.
//
// Ports:
//   ins_en/ins_entry   store an entry in the lowest free slot (full = none)
//   srch_key           key being searched; hit/hit_entry show the lowest
//                      matching entry combinationally; take frees it
//   rekey_en           every entry with key rekey_from gets key rekey_to.
//                      This implements the tail demand of the NEXT
//                      instruction: the demanders of a NEXT become
//                      demanders of the location it demands in the next loop
//                      iteration, so the NEXT's own frame can be freed.
// An entry inserted in cycle t is visible to searches from cycle t+1.
// The number of entries is this design's choice; the document gives none.
module dde_resv_station
  import dde_pkg::*;
#(
  parameter int ENTRIES = 128
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ins_en,
  input  rs_entry_t ins_entry,
  output logic      full,
  input  addr_t     srch_key,
  output logic      hit,
  output rs_entry_t hit_entry,
  input  logic      take,
  input  logic      rekey_en,
  input  addr_t     rekey_from,
  input  addr_t     rekey_to,
  output logic [$clog2(ENTRIES):0] used
);
  localparam int IW = $clog2(ENTRIES);

  rs_entry_t ent   [ENTRIES];
  logic      valid [ENTRIES];

  logic [IW-1:0] free_idx, hit_idx;

  always_comb begin
    full     = 1'b1;
    free_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!valid[i]) begin
        full     = 1'b0;
        free_idx = IW'(i);
      end
    end
  end

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid[i] && ent[i].key == srch_key) begin
        hit     = 1'b1;
        hit_idx = IW'(i);
      end
    end
  end

  assign hit_entry = ent[hit_idx];

  always_comb begin
    used = '0;
    for (int i = 0; i < ENTRIES; i++) used = used + (IW+1)'(valid[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) valid[i] <= 1'b0;
    end else begin
      if (rekey_en) begin
        for (int i = 0; i < ENTRIES; i++)
          if (valid[i] && ent[i].key == rekey_from) ent[i].key <= rekey_to;
      end
      if (take && hit) valid[hit_idx] <= 1'b0;
      if (ins_en && !full) begin
        valid[free_idx] <= 1'b1;
        ent[free_idx]   <= ins_entry;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) ins_en |-> !full)
    else $error("dde_resv_station: insert while full");

endmodule
