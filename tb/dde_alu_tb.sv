// dde_alu_tb -- checks every integer operation of the execution unit.
//
// Applies random and corner operand pairs to each ALU opcode and compares
// the result with a SystemVerilog expression; MOV/LI style opcodes must pass
// the left operand through. Purely combinational, so no clock or latency.
module dde_alu_tb;
  import dde_pkg::*;
  opcode_e op;
  data_t a, b, y;
  dde_alu dut (.*);

  int checks = 0, failures = 0;

  function automatic data_t ref_y(opcode_e o, data_t x, data_t z);
    case (o)
      OP_ADD: return x + z;
      OP_SUB: return x - z;
      OP_MUL: return x * z;
      OP_AND: return x & z;
      OP_OR:  return x | z;
      OP_XOR: return x ^ z;
      OP_SLL: return x << z[4:0];
      OP_SRL: return x >> z[4:0];
      OP_SRA: return data_t'($signed(x) >>> z[4:0]);
      OP_SLT: return data_t'($signed(x) <  $signed(z));
      OP_SLE: return data_t'($signed(x) <= $signed(z));
      OP_SEQ: return data_t'(x == z);
      OP_SNE: return data_t'(x != z);
      OP_SGT: return data_t'($signed(x) >  $signed(z));
      OP_SGE: return data_t'($signed(x) >= $signed(z));
      default: return x;
    endcase
  endfunction

  initial begin
    opcode_e ops[] = '{OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL,
                       OP_SRA, OP_SLT, OP_SLE, OP_SEQ, OP_SNE, OP_SGT, OP_SGE, OP_MOV};
    data_t corner[] = '{32'd0, 32'd1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'd31};
    foreach (ops[o]) begin
      for (int n = 0; n < 236; n++) begin
        op = ops[o];
        if (n < 36) begin a = corner[n % 6]; b = corner[n / 6]; end
        else begin a = $urandom; b = (n % 3 == 0) ? $urandom_range(40, 0) : $urandom; end
        #1;
        checks++;
        if (y !== ref_y(op, a, b)) begin
          failures++;
          $display("FAIL %s a=%h b=%h: got %h expected %h", op.name(), a, b, y, ref_y(op, a, b));
        end
      end
    end
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
