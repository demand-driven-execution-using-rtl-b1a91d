// dde_frame_alloc_tb -- checks frame allocation, code copy, argument pointer,
// write-back, pool throttling, release and the boot request.
//
// A pool of two frames (frames 3 and 4) gets three NEWF requests in a row.
// For each served request the test checks the 64-cycle burst (IM address
// and word copied from code memory at the label), the argument pointer
// write, and the WB-token to the NEWF location with the new frame's base,
// and that one frame takes FRAME_SIZE + 2 cycles from pop to write-back.
// The third request must wait (pool_stall) until a frame is released, and
// must then get the released frame. A boot request must end with a host
// EV-token instead of a write-back. The code memory is a model here.
module dde_frame_alloc_tb;
  import dde_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      adv, in_valid, in_pop, im_en, arg_en, free_en, wb_wr_en, ev_wr_en, busy;
  logic      ev_frame_new, ev_frame_free, ev_pool_stall;
  fa_token_t in_tok;
  caddr_t    c_addr;
  instr_t    c_data, im_instr;
  addr_t     sm_addr;
  data_t     arg_val;
  fidx_t     free_frame;
  wb_token_t wb_wr;
  ev_token_t ev_wr;
  logic [1:0] free_count;

  dde_frame_alloc #(.FIRST_FRAME(3), .POOL_FRAMES(2)) dut (.*);

  instr_t code [4096];
  assign c_data = code[c_addr];

  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  fa_token_t reqs[$];
  int stall_cycles = 0;
  always @(posedge clk) if (rst_n && ev_pool_stall) stall_cycles++;

  // drive the request queue head from 'reqs'
  task automatic head();
    in_valid = reqs.size() > 0;
    in_tok   = in_valid ? reqs[0] : '0;
  endtask
  task automatic push(input fa_token_t r);
    reqs.push_back(r);
    head();
    #1;
  endtask
  always @(posedge clk) begin
    if (rst_n && in_pop) void'(reqs.pop_front());
    #1 head();
  end

  // follow one allocation from pop to its write-back / host demand
  task automatic serve(input fa_token_t r, input int exp_frame);
    int t;
    addr_t base;
    base = addr_t'(exp_frame) << FRAME_W;
    while (!in_pop) @(negedge clk);
    check("new event", ev_frame_new, 1);
    @(negedge clk);
    t = 1;
    for (int k = 0; k < FRAME_SIZE; k++) begin
      check("burst im_en", im_en, 1);
      check("burst address", sm_addr, base | addr_t'(k));
      check("burst word", im_instr, code[int'(r.label) + k]);
      @(negedge clk); t++;
    end
    if (!r.boot) begin
      check("arg en", arg_en, 1);
      check("arg address", sm_addr, base | addr_t'(r.arg_trg));
      check("arg pointer", arg_val, frame_base(r.loc) | addr_t'(r.arg_src));
      @(negedge clk); t++;
      check("wb en", wb_wr_en, 1);
      check("wb value", wb_wr.v, base);
      check("wb target", wb_wr.cr, r.loc);
      check("cycles pop to write-back", t, FRAME_SIZE + 2);
    end else begin
      check("boot ev", ev_wr_en, 1);
      check("boot ev target", ev_wr.d, base | addr_t'(r.boot_off));
      check("boot ev host", ev_wr.host, 1);
    end
    @(negedge clk);
  endtask

  initial begin
    fa_token_t a, b, c, d;
    adv = 1; free_en = 0; free_frame = '0;
    foreach (code[i]) code[i] = {$urandom, $urandom};
    a = '{loc: addr_t'(13'h0105), label: caddr_t'(64),  arg_src: off_t'(3), arg_trg: off_t'(0), boot: 1'b0, boot_off: '0};
    b = '{loc: addr_t'(13'h0207), label: caddr_t'(128), arg_src: off_t'(9), arg_trg: off_t'(5), boot: 1'b0, boot_off: '0};
    c = '{loc: addr_t'(13'h0309), label: caddr_t'(200), arg_src: off_t'(1), arg_trg: off_t'(2), boot: 1'b0, boot_off: '0};
    d = '{loc: '0, label: caddr_t'(300), arg_src: '0, arg_trg: '0, boot: 1'b1, boot_off: off_t'(17)};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("all free", free_count, 2);
    push(a); push(b); push(c);
    serve(a, 3);
    serve(b, 4);
    check("pool empty", free_count, 0);
    repeat (20) @(negedge clk);
    check("third request waits", reqs.size(), 1);
    check("pool stall seen", stall_cycles > 10, 1);
    free_en = 1; free_frame = fidx_t'(4); #1;
    check("free event", ev_frame_free, 1);
    @(negedge clk); free_en = 0;
    serve(c, 4);
    // a frame outside the pool is ignored
    free_en = 1; free_frame = fidx_t'(9); #1;
    check("foreign frame ignored", ev_frame_free, 0);
    @(negedge clk); free_en = 0;
    free_en = 1; free_frame = fidx_t'(3); @(negedge clk); free_en = 0;
    push(d);
    serve(d, 3);
    // write-back held while adv is low
    free_en = 1; free_frame = fidx_t'(3); @(negedge clk); free_en = 0;
    push(a);
    adv = 0;
    repeat (FRAME_SIZE + 10) @(negedge clk);
    check("held without adv", wb_wr_en, 0);
    check("still busy", busy, 1);
    adv = 1; #1;
    check("released with adv", wb_wr_en, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
