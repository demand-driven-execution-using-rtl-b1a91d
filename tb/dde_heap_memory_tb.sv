// dde_heap_memory_tb -- checks the two write/read ports of heap memory.
//
// Random writes through the processor port (a_*) and the host port (h_*),
// sometimes both in one cycle to different addresses, then read-back on
// both ports compared with a reference array. Reads are combinational, a
// write is visible after the clock edge.
module dde_heap_memory_tb;
  import dde_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic               a_we, h_we;
  logic [HEAP_AW-1:0] a_addr, h_addr;
  data_t              a_wdata, a_rdata, h_wdata, h_rdata;
  dde_heap_memory dut (.*);

  int checks = 0, failures = 0;
  int keys[$];
  int idx = 0;
  data_t model[int];

  initial begin
    a_we = 0; h_we = 0; a_addr = '0; h_addr = '0; a_wdata = '0; h_wdata = '0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      a_we = $urandom_range(1, 0); h_we = $urandom_range(1, 0);
      a_addr = HEAP_AW'($urandom); h_addr = HEAP_AW'($urandom);
      if (a_addr == h_addr) h_we = 0;
      a_wdata = $urandom; h_wdata = $urandom;
      if (a_we) model[int'(a_addr)] = a_wdata;
      if (h_we) model[int'(h_addr)] = h_wdata;
    end
    @(negedge clk); a_we = 0; h_we = 0;
    foreach (model[a]) keys.push_back(a);
    foreach (model[a]) begin
      int o;
      o = keys[(idx + 7) % keys.size()]; idx++;
      a_addr = HEAP_AW'(a); h_addr = HEAP_AW'(o); #1;
      checks += 2;
      if (a_rdata !== model[a]) begin failures++; $display("FAIL a port @%0d", a); end
      if (h_rdata !== model[o]) begin failures++; $display("FAIL h port @%0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
