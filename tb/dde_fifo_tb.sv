// dde_fifo_tb -- checks the token queue against a reference queue.
//
// A 16-deep queue with two write ports takes random writes (0, 1 or 2 per
// cycle, only while 'room' is high) and random reads for 3000 cycles. Every
// popped word is compared with a SystemVerilog queue model; 'count',
// 'empty' and 'room' are compared every cycle. It also checks that the
// first-word-fall-through head is visible the cycle after a write into an
// empty queue (one cycle latency). Watchdog: the loop is bounded.
module dde_fifo_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int DEPTH = 16, NW = 2;
  logic [1:0]  wr_en;
  logic [15:0] wr_data [NW];
  logic        rd_en, empty, room;
  logic [15:0] rd_data;
  logic [$clog2(DEPTH):0] count;

  dde_fifo #(.T(logic [15:0]), .DEPTH(DEPTH), .NW(NW)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] model[$];
  int n_full = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    wr_en = '0; rd_en = 0; wr_data[0] = '0; wr_data[1] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("empty after reset", empty, 1);
    // latency: write one word, head visible next cycle
    wr_en = 2'b01; wr_data[0] = 16'h1234; @(negedge clk);
    wr_en = '0;
    check("head after one cycle", rd_data, 16'h1234);
    check("not empty", empty, 0);
    rd_en = 1; @(negedge clk); rd_en = 0;
    check("empty again", empty, 1);
    for (int c = 0; c < 3000; c++) begin
      int w;
      w = (c / 500) % 2 == 0 ? $urandom_range(2, 0) : $urandom_range(1, 0);
      wr_en = '0;
      if (room) begin
        for (int i = 0; i < w; i++) begin wr_en[i] = 1'b1; wr_data[i] = 16'($urandom); end
      end
      rd_en = ((c / 500) % 2 == 0) ? ($urandom_range(3, 0) == 0) : ($urandom_range(1, 0) == 1);
      #1;
      if (rd_en && !empty) begin
        check("pop data", rd_data, model[0]);
        void'(model.pop_front());
      end
      for (int i = 0; i < NW; i++) if (wr_en[i]) model.push_back(wr_data[i]);
      @(negedge clk);
      check("count", count, model.size());
      check("empty flag", empty, model.size() == 0);
      check("room flag", room, model.size() <= DEPTH - NW);
      if (model.size() > DEPTH - NW) n_full++;
    end
    check("queue filled up at least once", n_full > 0, 1);
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
