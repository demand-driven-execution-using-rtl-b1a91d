// dde_core_tb -- end-to-end test of the demand-driven processor, with a small
// loop frame pool and a short op-queue so that throttling and back-pressure
// occur.
//
// Loads four programs into code memory and demands their results one after
// another through the host interface:
//   1. an expression block (a = b + c, WITH, THEN, EITHER, FIRST, integer ops)
//   2. a procedure call passing an argument block, selecting with PSI and
//      freeing the callee frame with DELF, for both predicate outcomes
//   3. predicate-ordered stores and a load to one heap address
//   4. Livermore kernel 1 in integer arithmetic, unrolled at run time into
//      one frame per iteration, N_K1 iterations
// Each result is compared with a value computed here; for the kernel every
// x[k] in heap memory is checked too, and the loop frames must all be freed
// but the last. The mechanisms the design has (demand merging, indirect
// demands, execution bypass, operand shelving, tail demand, frame creation
// and release, frame-pool throttling, back-pressure stalls, stores) are
// counted and each must occur. A watchdog ends the run if it hangs.
module dde_core_tb;
  import dde_pkg::*;
  import dde_asm_pkg::*;

  localparam int N_K1 = 24;
  localparam int POOL1 = 2;
  localparam int OPQ = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               ld_en;
  caddr_t             ld_addr;
  instr_t             ld_data;
  logic               h_we;
  logic [HEAP_AW-1:0] h_addr;
  data_t              h_wdata, h_rdata;
  logic               start_valid, start_ready;
  caddr_t             start_label;
  off_t               start_off;
  logic               res_valid, idle;
  data_t              res_data;
  logic [$clog2(8+1)-1:0] pool0_free;
  logic [$clog2(POOL1+1)-1:0]   pool1_free;
  dde_events_t        events;
  logic [8:0]         ev_count;
  logic [$clog2(OPQ):0] op_count;
  logic [7:0]         wb_count;
  logic [4:0]         fa0_count, fa1_count;
  logic [7:0]         rs_used;

  dde_core #(.POOL0_FRAMES(8), .POOL1_FRAMES(POOL1), .OPQ_DEPTH(4)) dut (
    .clk, .rst_n, .ld_en, .ld_addr, .ld_data, .h_we, .h_addr, .h_wdata, .h_rdata,
    .start_valid, .start_label, .start_off, .start_ready, .res_valid, .res_data,
    .idle, .pool0_free, .pool1_free, .events,
    .ev_count, .op_count, .wb_count, .fa0_count, .fa1_count, .rs_used);

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  // mechanism counters
  int n_demand, n_full, n_locked, n_ind, n_bypass, n_shelve, n_exec, n_fwd,
      n_new, n_free, n_pool, n_stall, n_store;
  int peak_op = 0, peak_rs = 0;
  always @(posedge clk) if (rst_n) begin
    n_demand += int'(events.demand);
    n_full   += int'(events.full_hit);
    n_locked += int'(events.locked_hit);
    n_ind    += int'(events.indirect);
    n_bypass += int'(events.bypass_wb);
    n_shelve += int'(events.shelve);
    n_exec   += int'(events.execute);
    n_fwd    += int'(events.forward);
    n_new    += int'(events.frame_new);
    n_free   += int'(events.frame_free);
    n_pool   += int'(events.pool_stall);
    n_stall  += int'(events.eval_stall);
    n_store  += int'(events.store);
    if (int'(op_count) > peak_op) peak_op = int'(op_count);
    if (int'(rs_used) > peak_rs) peak_rs = int'(rs_used);
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input int label, input int off, output data_t r, output longint took);
    longint t0;
    @(negedge clk);
    while (!start_ready) @(negedge clk);
    start_valid = 1'b1; start_label = caddr_t'(label); start_off = off_t'(off);
    t0 = cycles;
    @(negedge clk);
    start_valid = 1'b0;
    while (!res_valid) @(negedge clk);
    r = res_data;
    took = cycles - t0;
    while (!idle) @(negedge clk);
  endtask

  localparam int L_EXPR = 0, L_CALL1 = 64, L_CALL2 = 128, L_FOO = 192,
                 L_MEM = 256, L_K1M = 320, L_K1I = 384;
  localparam int CQ = 3, CR = 5, CT = -2;

  int ymem[int], zmem[int];
  ld_t prog[$];

  initial begin
    data_t  r;
    longint took;
    int     p0;
    ld_en = 0; h_we = 0; start_valid = 0; ld_addr = '0; ld_data = '0;
    h_addr = '0; h_wdata = '0; start_label = '0; start_off = '0;
    n_demand = 0; n_full = 0; n_locked = 0; n_ind = 0; n_bypass = 0; n_shelve = 0;
    n_exec = 0; n_fwd = 0; n_new = 0; n_free = 0; n_pool = 0; n_stall = 0; n_store = 0;

    prog_expr(prog, L_EXPR);
    prog_call(prog, L_CALL1, L_FOO, 12, 7);
    prog_call(prog, L_CALL2, L_FOO, 3, 7);
    prog_mem(prog, L_MEM, 77, 111, 222);
    prog_kernel1(prog, L_K1M, L_K1I, N_K1, CQ, CR, CT);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // program load: every block is cleared to NOP first
    for (int a = 0; a < 448; a++) begin
      ld_en = 1; ld_addr = caddr_t'(a); ld_data = nop(); @(negedge clk);
    end
    foreach (prog[i]) begin
      ld_en = 1; ld_addr = caddr_t'(prog[i].addr); ld_data = prog[i].ins; @(negedge clk);
    end
    ld_en = 0;
    // kernel input arrays
    for (int k = 0; k < N_K1 + 12; k++) begin
      ymem[k] = (k * 7 + 3) % 23 - 11;
      zmem[k] = (k * 13 + 5) % 31 - 9;
    end
    for (int k = 0; k < N_K1 + 12; k++) begin
      h_we = 1; h_addr = HEAP_AW'(K1_Y + k); h_wdata = ymem[k]; @(negedge clk);
      h_addr = HEAP_AW'(K1_Z + k); h_wdata = zmem[k]; @(negedge clk);
    end
    h_we = 0;

    // 1. expressions
    run(L_EXPR, 9, r, took);
    check("expr a+a", $signed(r), 64);
    run(L_EXPR, 23, r, took);
    check("expr chain", $signed(r), -647);

    // 2. procedure calls
    p0 = int'(pool0_free);
    run(L_CALL1, 4, r, took);
    check("call psi true", $signed(r), 112);
    check("callee frame freed", pool0_free, p0 - 1);
    run(L_CALL2, 4, r, took);
    check("call psi false", $signed(r), 207);
    check("callee frame freed 2", pool0_free, p0 - 2);

    // 3. memory ordering
    run(L_MEM, 6, r, took);
    check("load after ordered stores", $signed(r), 222);
    h_addr = HEAP_AW'(77); #1;
    check("heap after stores", $signed(h_rdata), 222);

    // 4. kernel 1
    run(L_K1M, 13, r, took);
    check("kernel1 result", $signed(r), k1_ref(N_K1 - 1, CQ, CR, CT, ymem, zmem));
    for (int k = 0; k < N_K1; k++) begin
      h_addr = HEAP_AW'(K1_X + k); #1;
      check($sformatf("x[%0d]", k), $signed(h_rdata), k1_ref(k, CQ, CR, CT, ymem, zmem));
    end
    check("loop frames freed", pool1_free, POOL1 - 1);
    $display("kernel1: %0d iterations in %0d cycles", N_K1, took);
    // every iteration executes 20 instructions at one per cycle at best
    checks++;
    if (took < 20 * N_K1) begin
      failures++;
      $display("FAIL kernel1 faster than the execution pipeline allows");
    end

    $display("events: demand=%0d full=%0d locked=%0d indirect=%0d bypass=%0d shelve=%0d exec=%0d fwd=%0d new=%0d free=%0d pool_stall=%0d stall=%0d store=%0d",
             n_demand, n_full, n_locked, n_ind, n_bypass, n_shelve, n_exec, n_fwd,
             n_new, n_free, n_pool, n_stall, n_store);
    check("seen demand",       n_demand > 0, 1);
    check("seen full hit",     n_full > 0, 1);
    check("seen locked hit",   n_locked > 0, 1);
    check("seen indirect",     n_ind > 0, 1);
    check("seen bypass",       n_bypass > 0, 1);
    check("seen shelve",       n_shelve > 0, 1);
    check("seen execute",      n_exec > 0, 1);
    check("seen forward",      n_fwd == N_K1 - 1, 1);
    check("seen frame new",    n_new > 0, 1);
    check("seen frame free",   n_free == N_K1 - 1 + 2, 1);
    $display("peak occupancy: op-queue %0d of %0d, return storage %0d", peak_op, OPQ, peak_rs);
    check("op-queue within depth", peak_op <= OPQ, 1);
    check("waiting demands stored", peak_rs > 0, 1);
    check("return storage drained", rs_used, 0);
    check("seen store",        n_store == N_K1 + 2, 1);
    check("seen pool throttle", n_pool > 0, 1);
    check("seen back-pressure", n_stall > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
