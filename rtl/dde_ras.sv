// dde_ras -- return address storage kept as linked lists, one per location.
//
// The alternative to the content-addressable reservation station, with the
// same ports. Each waiting demand is an entry (where the value must go, its
// operand port, indirect flag and displacement) plus a next-link. Every
// scalar-memory location has a list head, a list tail and a non-empty flag,
// so the waiters of one location form a chain: a demand that has to wait is
// appended at the tail of its location's chain, and when the location's
// result is written back the send-back pipeline walks the chain from the
// head, one entry per cycle. No associative search is needed, only indexed
// reads.
//
// Ports (as dde_resv_station):
//   ins_en/ins_entry   append an entry to the chain of ins_entry.key, using
//                      the lowest free entry (full = none free)
//   srch_key           hit = the chain of srch_key is not empty; hit_entry is
//                      its head (oldest waiter first); take unlinks it
//   rekey_en           the chain of rekey_from is spliced onto the end of
//                      the chain of rekey_to (tail demand of NEXT)
// Insert and take may happen in the same cycle, also on the same chain;
// rekey and insert are never requested together (both come from s_Fetch).
// An entry inserted in cycle t is visible from cycle t+1.
// The list organisation (head, next-link) follows the document; the tail
// pointers, used to append and to splice in one cycle, and the free-entry
// bit vector are this design's choices. The per-location flags are reset,
// heads, tails, links and entries are not (they are only read where valid).
// hit_entry.key is srch_key itself, since the chain is found by location.
module dde_ras
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
  localparam int IW   = $clog2(ENTRIES);
  localparam int KEYS = 1 << ADDR_W;

  typedef logic [IW-1:0] idx_t;

  rs_entry_t ent   [ENTRIES];
  idx_t      nxt   [ENTRIES];
  logic [ENTRIES-1:0] valid;
  idx_t      head  [KEYS];
  idx_t      tail  [KEYS];
  logic [KEYS-1:0] nonempty;

  idx_t free_idx, h;
  logic taking, single;

  always_comb begin
    full     = 1'b1;
    free_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!valid[i]) begin full = 1'b0; free_idx = idx_t'(i); end
    used = '0;
    for (int i = 0; i < ENTRIES; i++) used = used + (IW+1)'(valid[i]);
  end

  assign h      = head[srch_key];
  assign hit    = nonempty[srch_key];
  assign taking = take && hit;
  assign single = (h == tail[srch_key]);   // chain of one entry

  always_comb begin
    hit_entry     = ent[h];
    hit_entry.key = srch_key;
  end

  // chain state of a key as it is after this cycle's take
  function automatic logic ne_after(addr_t k);
    return (taking && k == srch_key) ? !single : nonempty[k];
  endfunction
  function automatic idx_t head_after(addr_t k);
    return (taking && k == srch_key) ? nxt[h] : head[k];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid    <= '0;
      nonempty <= '0;
    end else begin
      // take: unlink the head
      if (taking) begin
        valid[h] <= 1'b0;
        if (single) nonempty[srch_key] <= 1'b0;
        else        head[srch_key]     <= nxt[h];
      end
      // insert: append at the tail
      if (ins_en && !full) begin
        valid[free_idx] <= 1'b1;
        ent[free_idx]   <= ins_entry;
        if (ne_after(ins_entry.key)) begin
          nxt[tail[ins_entry.key]] <= free_idx;
        end else begin
          head[ins_entry.key]     <= free_idx;
          nonempty[ins_entry.key] <= 1'b1;
        end
        tail[ins_entry.key] <= free_idx;
      end
      // rekey: splice the chain of rekey_from onto rekey_to
      if (rekey_en && rekey_from != rekey_to && ne_after(rekey_from)) begin
        nonempty[rekey_from] <= 1'b0;
        if (ne_after(rekey_to)) begin
          nxt[tail[rekey_to]] <= head_after(rekey_from);
        end else begin
          head[rekey_to]     <= head_after(rekey_from);
          nonempty[rekey_to] <= 1'b1;
        end
        tail[rekey_to] <= tail[rekey_from];
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) ins_en |-> !full)
    else $error("dde_ras: insert while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(ins_en && rekey_en))
    else $error("dde_ras: insert and rekey in one cycle");

endmodule
