// dde_code_memory_tb -- checks loading and the two read ports of code memory.
//
// Loads random 64-bit words at random addresses through the load port, then
// reads them back on both read ports (combinational, same cycle) and
// compares with a reference array.
module dde_code_memory_tb;
  import dde_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic   ld_en;
  caddr_t ld_addr, ra0, ra1;
  instr_t ld_data, rd0, rd1;
  dde_code_memory dut (.*);

  int checks = 0, failures = 0;
  int keys[$];
  int idx = 0;
  instr_t model[int];

  initial begin
    ld_en = 0; ld_addr = '0; ld_data = '0; ra0 = '0; ra1 = '0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      ld_en = 1; ld_addr = caddr_t'($urandom); ld_data = {$urandom, $urandom};
      model[int'(ld_addr)] = ld_data;
    end
    @(negedge clk); ld_en = 0;
    foreach (model[a]) keys.push_back(a);
    foreach (model[a]) begin
      int o;
      o = keys[(idx + 7) % keys.size()]; idx++;
      ra0 = caddr_t'(a); ra1 = caddr_t'(o); #1;
      checks += 2;
      if (rd0 !== model[a]) begin failures++; $display("FAIL rd0 @%0d", a); end
      if (rd1 !== model[o]) begin failures++; $display("FAIL rd1 @%0d", a); end
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
