// dde_ras_tb -- checks the linked-list return address storage against a model.
//
// An 8-entry station receives random inserts (keys from a small set so that
// several entries share a key), searches with take, and re-keying, for 4000
// cycles. A list model predicts 'full', 'used', 'hit' and which entry a take
// returns (the station returns some match; the model checks it is one of the
// waiting entries for that key and removes it). Inserting and searching
// happen in the same cycle as in the pipelines; results are registered at
// the clock edge.
module dde_ras_tb;
  import dde_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 8;
  logic      ins_en, full, hit, take, rekey_en;
  rs_entry_t ins_entry, hit_entry;
  addr_t     srch_key, rekey_from, rekey_to;
  logic [$clog2(N):0] used;

  dde_ras #(.ENTRIES(N)) dut (.*);

  int checks = 0, failures = 0;
  rs_entry_t model[$];
  int n_full = 0, n_multi = 0, n_rekey = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    ins_en = 0; take = 0; rekey_en = 0; ins_entry = '0; srch_key = '0; rekey_from = '0; rekey_to = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 4000; c++) begin
      int mh, cnt;
      ins_en = 0; take = 0; rekey_en = 0;
      srch_key = addr_t'($urandom_range(5, 0));
      #1;
      check("used", used, model.size());
      check("full", full, model.size() == N);
      mh = -1; cnt = 0;
      foreach (model[i]) if (model[i].key == srch_key) begin cnt++; if (mh < 0) mh = i; end
      check("hit", hit, mh >= 0);
      if (cnt > 1) n_multi++;
      if (full) n_full++;
      if (hit && $urandom_range(1, 0)) begin
        int found;
        take = 1;
        found = -1;
        foreach (model[i]) if (found < 0 && model[i] == hit_entry) found = i;
        check("taken entry was waiting", found >= 0, 1);
        if (found >= 0) model.delete(found);
      end else if ($urandom_range(7, 0) == 0) begin
        rekey_en = 1; rekey_from = addr_t'($urandom_range(5, 0)); rekey_to = addr_t'($urandom_range(5, 0));
        foreach (model[i]) if (model[i].key == rekey_from) begin model[i].key = rekey_to; n_rekey++; end
      end
      if (!full && $urandom_range(2, 0) != 0 && !rekey_en) begin
        ins_en = 1;
        ins_entry = '0;
        ins_entry.key = addr_t'($urandom_range(5, 0));
        ins_entry.r = addr_t'($urandom);
        ins_entry.port = port_e'($urandom_range(2, 0));
        ins_entry.disp = off_t'($urandom);
        model.push_back(ins_entry);
      end
      @(negedge clk);
    end
    check("station filled", n_full > 0, 1);
    check("shared keys seen", n_multi > 0, 1);
    check("re-keying seen", n_rekey > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
