// dde_scalar_memory_tb -- checks tags, ports and write priority of the
// scalar memory.
//
// A small memory (4 frames) is loaded through both frame-allocator ports
// (IM written, Evtag reset to empty & unlocked, Optag cleared). The test then
// checks: the s_Fetch lock (empty -> locked), write-back (value + full) and
// that write-back wins over a lock in the same cycle, an argument write
// (value + full), the Pre_EX Optag and slot writes, and that all read ports
// see the same location contents. Writes are visible one clock edge later.
module dde_scalar_memory_tb;
  import dde_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  addr_t  ea_addr, eb_addr, xi_addr, xo_addr, wb_addr, fa0_addr, fa1_addr;
  evtag_e ea_evtag, eb_evtag;
  data_t  ea_value, eb_value, xo_slot_l, xo_slot_r, xo_l_w, xo_r_w, wb_value, fa0_arg, fa1_arg;
  instr_t eb_instr, xi_instr, fa0_instr, fa1_instr;
  optag_t xo_optag, xo_optag_w;
  logic   eb_lock, xo_we, xo_l_we, xo_r_we, wb_en, fa0_im_en, fa0_arg_en, fa1_im_en, fa1_arg_en;

  dde_scalar_memory #(.NUM_FRAMES(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  task automatic idle_in();
    eb_lock = 0; xo_we = 0; xo_l_we = 0; xo_r_we = 0; wb_en = 0;
    fa0_im_en = 0; fa0_arg_en = 0; fa1_im_en = 0; fa1_arg_en = 0;
  endtask

  instr_t img[256];

  initial begin
    idle_in();
    ea_addr = '0; eb_addr = '0; xi_addr = '0; xo_addr = '0; wb_addr = '0;
    fa0_addr = '0; fa1_addr = '0; xo_l_w = '0; xo_r_w = '0; wb_value = '0;
    fa0_arg = '0; fa1_arg = '0; fa0_instr = '0; fa1_instr = '0; xo_optag_w = '0;
    // load frames 0,1 by allocator 0 and frames 2,3 by allocator 1
    for (int k = 0; k < 128; k++) begin
      @(negedge clk);
      idle_in();
      img[k] = {$urandom, $urandom}; img[k + 128] = {$urandom, $urandom};
      fa0_im_en = 1; fa0_addr = addr_t'(k); fa0_instr = img[k];
      fa1_im_en = 1; fa1_addr = addr_t'(k + 128); fa1_instr = img[k + 128];
    end
    @(negedge clk); idle_in();
    for (int a = 0; a < 256; a++) begin
      ea_addr = addr_t'(a); eb_addr = addr_t'(a); xi_addr = addr_t'(a); xo_addr = addr_t'(a); #1;
      check("loaded evtag", ea_evtag, EV_EMPTY_UNLOCKED);
      check("loaded optag", xo_optag, 0);
      check("eb instr", eb_instr, img[a]);
      check("xi instr", xi_instr, img[a]);
    end
    @(negedge clk);
    // lock location 5
    eb_addr = 5; eb_lock = 1; @(negedge clk); idle_in();
    ea_addr = 5; #1; check("locked", ea_evtag, EV_EMPTY_LOCKED);
    // write-back to 5
    wb_en = 1; wb_addr = 5; wb_value = 32'hCAFE; @(negedge clk); idle_in();
    ea_addr = 5; eb_addr = 5; #1;
    check("wb full", ea_evtag, EV_FULL);
    check("wb value ea", ea_value, 32'hCAFE);
    check("wb value eb", eb_value, 32'hCAFE);
    // write-back beats lock in the same cycle
    eb_addr = 7; eb_lock = 1; wb_en = 1; wb_addr = 7; wb_value = 9; @(negedge clk); idle_in();
    ea_addr = 7; #1; check("wb over lock", ea_evtag, EV_FULL);
    // argument write through allocator 1
    fa1_arg_en = 1; fa1_addr = 130; fa1_arg = 32'd4242; @(negedge clk); idle_in();
    ea_addr = 130; #1;
    check("arg full", ea_evtag, EV_FULL);
    check("arg value", ea_value, 4242);
    // Pre_EX: optag and both slots
    xo_addr = 200; xo_we = 1; xo_optag_w = '{fired: 1'b0, have_l: 1'b1, have_r: 1'b0, have_p: 1'b1, pval: 1'b1};
    xo_l_we = 1; xo_l_w = 111; xo_r_we = 1; xo_r_w = 222; @(negedge clk); idle_in();
    #1;
    check("optag written", xo_optag, 5'b01011);
    check("slot l", xo_slot_l, 111);
    check("slot r", xo_slot_r, 222);
    ea_addr = 200; #1; check("slot l on ea", ea_value, 111);
    check("evtag untouched by Pre_EX", ea_evtag, EV_EMPTY_UNLOCKED);
    // reloading a location clears its tags
    fa1_im_en = 1; fa1_addr = 200; fa1_instr = '0; @(negedge clk); idle_in();
    #1; check("reload clears optag", xo_optag, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
