// dde_livermore_tb -- the Livermore loops at their full loop lengths on the
// default-size processor, in 32-bit integer arithmetic.
//
// Runs kernel 1 (hydrodynamics fragment, 200 iterations), kernel 3 (inner
// product, 1000), kernel 5 (tri-diagonal elimination, 999), kernel 11 (first
// sum, 1199) and kernel 12 (first difference, 200), one inner loop each.
// Every iteration is a frame of the innermost-loop pool; each one frees its
// predecessor, and loop-carried values (the running sum of kernels 3 and
// 11, x[i-1] of kernel 5) travel in the argument block of the next
// iteration. Inputs are generated here; every element of x and the loop
// result are compared with a reference computed here, and the loop pool
// must be back to all frames free but one after each kernel. Cycles per
// kernel are printed; an iteration cannot be faster than the instructions
// it executes at one per cycle.
module dde_livermore_tb;
  import dde_pkg::*;
  import dde_asm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               ld_en, h_we, start_valid, start_ready, res_valid, idle;
  caddr_t             ld_addr, start_label;
  instr_t             ld_data;
  logic [HEAP_AW-1:0] h_addr;
  data_t              h_wdata, h_rdata, res_data;
  off_t               start_off;
  logic [4:0]         pool0_free;
  logic [6:0]         pool1_free;
  dde_events_t        events;

  dde_core dut (
    .clk, .rst_n, .ld_en, .ld_addr, .ld_data, .h_we, .h_addr, .h_wdata, .h_rdata,
    .start_valid, .start_label, .start_off, .start_ready, .res_valid, .res_data,
    .idle, .pool0_free, .pool1_free, .events,
    .ev_count(), .op_count(), .wb_count(), .fa0_count(), .fa1_count(), .rs_used());

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int xs[int], ys[int], zs[int];
  ld_t prog[$];

  task automatic hw(input int a, input int v);
    h_we = 1; h_addr = HEAP_AW'(a); h_wdata = v; @(negedge clk); h_we = 0;
  endtask

  task automatic run_kernel(input lkernel_e kern, input int k0, input int n, input int body);
    localparam int MAIN = 0, IT = 64;
    int c0, exp_last, c;
    longint t0, took;
    data_t r;
    int p1;
    @(negedge clk);
    // inputs
    for (int k = 0; k < 1212; k++) begin
      ys[k] = int'($urandom_range(40, 0)) - 20;
      zs[k] = int'($urandom_range(40, 0)) - 20;
      xs[k] = 0;
    end
    xs[0] = (kern == LK11) ? ys[0] : int'($urandom_range(10, 0));
    for (int k = 0; k < 1212; k++) begin hw(LY + k, ys[k]); hw(LZ + k, zs[k]); hw(LX + k, xs[k]); end
    c0 = (kern == LK3) ? 0 : xs[0];
    // program
    prog.delete();
    prog_loop(prog, MAIN, IT, kern, k0, n, c0, 3, 5, -2);
    for (int a = 0; a < 128; a++) begin
      ld_en = 1; ld_addr = caddr_t'(a); ld_data = nop(); @(negedge clk);
    end
    foreach (prog[i]) begin
      ld_en = 1; ld_addr = caddr_t'(prog[i].addr); ld_data = prog[i].ins; @(negedge clk);
    end
    ld_en = 0;
    // reference
    c = c0;
    for (int k = k0; k < n; k++) begin
      case (kern)
        LK1:  c = 3 + ys[k] * (5 * zs[k + 10] + -2 * zs[k + 11]);
        LK3:  c = c + zs[k] * ys[k];
        LK5:  c = zs[k] * (ys[k] - c);
        LK11: c = c + ys[k];
        default: c = ys[k + 1] - ys[k];
      endcase
      xs[k] = c;
    end
    exp_last = c;
    // run
    p1 = int'(pool1_free);
    while (!start_ready) @(negedge clk);
    start_valid = 1; start_label = caddr_t'(MAIN); start_off = off_t'(14);
    t0 = cycles;
    @(negedge clk);
    start_valid = 0;
    while (!res_valid) @(negedge clk);
    took = cycles - t0;
    r = res_data;
    while (!idle) @(negedge clk);
    check($sformatf("kernel %0d result", int'(kern)), $signed(r), exp_last);
    for (int k = k0; k < n; k++) begin
      h_addr = HEAP_AW'(LX + k); #1;
      check($sformatf("kernel %0d x[%0d]", int'(kern), k), $signed(h_rdata), xs[k]);
    end
    check($sformatf("kernel %0d loop frames freed", int'(kern)), pool1_free, p1 - 1);
    checks++;
    if (took < longint'(body) * (n - k0)) begin
      failures++;
      $display("FAIL kernel %0d faster than one instruction per cycle", int'(kern));
    end
    $display("kernel %0d: %0d iterations, %0d cycles, %0d cycles per iteration",
             int'(kern), n - k0, took, took / (n - k0));
  endtask

  initial begin
    ld_en = 0; h_we = 0; start_valid = 0; ld_addr = '0; ld_data = '0;
    h_addr = '0; h_wdata = '0; start_label = '0; start_off = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // body instruction counts (executed per iteration, at least)
    run_kernel(LK1, 0, 200, 20);
    run_kernel(LK3, 0, 1000, 12);
    run_kernel(LK5, 1, 1000, 12);
    run_kernel(LK11, 1, 1200, 10);
    run_kernel(LK12, 0, 200, 11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("FAIL watchdog idle=%0d p0=%0d p1=%0d ev=%0d op=%0d wb=%0d rs=%0d", idle, pool0_free, pool1_free, dut.ev_count, dut.op_count, dut.wb_count, dut.rs_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
