// dde_asm_pkg -- instruction builders and test programs for the testbenches.
//
// Functions that assemble 64-bit demand-driven instructions, and programs
// written with them. Each program is a list of (code address, instruction)
// pairs that a testbench loads into code memory. Code blocks are one frame
// (64 words) long; a label is the block's first word address.
package dde_asm_pkg;
  import dde_pkg::*;

  typedef struct {
    int     addr;
    instr_t ins;
  } ld_t;

  // ---------------------------------------------------------------- operands
  function automatic operand_t none();
    return '{mode: AM_NONE, base: '0, disp: '0};
  endfunction
  function automatic operand_t dir(int off);
    return '{mode: AM_DIRECT, base: '0, disp: off_t'(off)};
  endfunction
  function automatic operand_t dsp(int base, int disp);   // disp(base)
    return '{mode: AM_DISP, base: off_t'(base), disp: off_t'(disp)};
  endfunction

  // ---------------------------------------------------------------- formats
  function automatic instr_t d_fmt(opcode_e op, operand_t l, operand_t r, operand_t p);
    instr_t i = '0;
    i.op = op; i.lop = l; i.rop = r; i.pop = p;
    return i;
  endfunction
  function automatic instr_t c_fmt(opcode_e op, operand_t l, int imm);
    instr_t i = '0;
    i.op = op; i.imm_f = 1'b1; i.lop = l;
    i[31:0] = imm;
    return i;
  endfunction
  function automatic instr_t m_fmt(opcode_e op, operand_t l, operand_t r, operand_t p, int disp);
    instr_t i = d_fmt(op, l, r, p);
    i.mdisp = MDISP_W'(disp);
    return i;
  endfunction

  function automatic instr_t nop();            return '0; endfunction
  function automatic instr_t li(int imm);      return c_fmt(OP_LI, none(), imm); endfunction
  function automatic instr_t faddr();          return d_fmt(OP_FADDR, none(), none(), none()); endfunction
  function automatic instr_t mov(operand_t l); return d_fmt(OP_MOV, l, none(), none()); endfunction
  function automatic instr_t alu(opcode_e op, operand_t l, operand_t r);
    return d_fmt(op, l, r, none());
  endfunction
  function automatic instr_t alui(opcode_e op, operand_t l, int imm);
    return c_fmt(op, l, imm);
  endfunction
  function automatic instr_t sync2(opcode_e op, operand_t l, operand_t r);
    return d_fmt(op, l, r, none());
  endfunction
  function automatic instr_t psi(operand_t l, operand_t r, operand_t p);
    return d_fmt(OP_PSI, l, r, p);
  endfunction
  function automatic instr_t next(operand_t l, operand_t r, operand_t p);
    return d_fmt(OP_NEXT, l, r, p);
  endfunction
  function automatic instr_t lw(operand_t l, int disp, operand_t p);
    return m_fmt(OP_LW, l, none(), p, disp);
  endfunction
  function automatic instr_t sw(operand_t l, operand_t r, int disp, operand_t p);
    return m_fmt(OP_SW, l, r, p, disp);
  endfunction
  function automatic instr_t delf(operand_t l, operand_t r, operand_t p);
    return d_fmt(OP_DELF, l, r, p);
  endfunction
  // newf: label, argument block offset here, pointer slot in the new frame
  function automatic instr_t newf(int label, int arg_src, int arg_trg, int pool);
    instr_t i = '0;
    i.op = OP_NEWF; i.pool = pool[0];
    i.lop.disp = off_t'(arg_src);
    i.lop.base = off_t'(arg_trg);
    i[31:0] = label;
    return i;
  endfunction

  function automatic void put(ref ld_t q[$], input int label, input int off, input instr_t i);
    q.push_back('{addr: label + off, ins: i});
  endfunction

  // ---------------------------------------------------------------- programs
  // Expression block: a = b + c and the synchronisation instructions.
  // Demanded offsets and expected values are listed by expr_checks.
  function automatic void prog_expr(ref ld_t q[$], input int L);
    put(q, L, 4,  li(4));                              // b
    put(q, L, 5,  li(28));                             // c
    put(q, L, 8,  alu(OP_ADD, dir(4), dir(5)));        // a = b + c = 32
    put(q, L, 9,  alu(OP_ADD, dir(8), dir(8)));        // 64, demands a twice
    put(q, L, 10, sync2(OP_WITH, dir(4), dir(9)));     // 4
    put(q, L, 11, sync2(OP_THEN, dir(5), dir(8)));     // 28
    put(q, L, 12, sync2(OP_EITHER, dir(4), dir(4)));   // 4
    put(q, L, 13, sync2(OP_FIRST, dir(5), dir(4)));    // 28
    put(q, L, 14, alui(OP_SUB, dir(9), 100));          // -36
    put(q, L, 15, alu(OP_SUB, dir(4), dir(5)));        // -24 (operand order)
    put(q, L, 16, alu(OP_MUL, dir(15), dir(5)));       // -672
    put(q, L, 17, alui(OP_SLT, dir(15), 0));           // 1
    put(q, L, 18, alu(OP_OR, dir(10), dir(11)));       // 4|28 = 28
    put(q, L, 19, alu(OP_ADD, dir(18), dir(17)));      // 29
    put(q, L, 20, alu(OP_ADD, dir(19), dir(12)));      // 33
    put(q, L, 21, alu(OP_ADD, dir(20), dir(13)));      // 61
    put(q, L, 22, alu(OP_ADD, dir(21), dir(16)));      // -611
    put(q, L, 23, alu(OP_ADD, dir(22), dir(14)));      // -647
  endfunction

  // Procedure call: main passes the argument block (a, b) to foo, which
  // returns psi(a > 10 ? a + 100 : b + 200). main then frees foo's frame.
  // Demand main offset 4; the result is a + 100 or b + 200.
  function automatic void prog_call(ref ld_t q[$], input int MAIN, input int FOO,
                                    input int a, input int b);
    put(q, MAIN, 0, li(a));                            // argument block
    put(q, MAIN, 1, li(b));
    put(q, MAIN, 2, newf(FOO, 0, 5, 0));               // z: frame of foo
    put(q, MAIN, 3, mov(dsp(2, 11)));                  // d = i(z)
    put(q, MAIN, 4, delf(dir(3), dir(6), none()));     // free foo, give d
    put(q, MAIN, 6, mov(dsp(2, 12)));                  // q(z): foo's frame
    put(q, FOO, 5,  nop());                            // n: argument pointer
    put(q, FOO, 6,  mov(dsp(5, 0)));                   // a
    put(q, FOO, 7,  alui(OP_SGT, dir(6), 10));         // p = a > 10
    put(q, FOO, 8,  alui(OP_ADD, dir(6), 100));        // x
    put(q, FOO, 9,  mov(dsp(5, 1)));                   // b
    put(q, FOO, 10, alui(OP_ADD, dir(9), 200));        // y
    put(q, FOO, 11, psi(dir(8), dir(10), dir(7)));     // i = psi_p(x, y)
    put(q, FOO, 12, faddr());                          // frame of foo
  endfunction

  // Memory ordering: sw z ; sw y (after z) ; lw x (after y), one address.
  // Demand offset 6; the load must see the second store's value.
  function automatic void prog_mem(ref ld_t q[$], input int L, input int addr,
                                   input int v1, input int v2);
    put(q, L, 1, li(addr));
    put(q, L, 2, li(v1));
    put(q, L, 3, li(v2));
    put(q, L, 4, sw(dir(1), dir(2), 0, none()));       // sw z
    put(q, L, 5, sw(dir(1), dir(3), 0, dir(4)));       // sw y, predicate z
    put(q, L, 6, lw(dir(1), 0, dir(5)));               // lw x, predicate y
  endfunction

  // Livermore kernel 1 (integer):  for k in 0..n-1
  //     x[k] = q + y[k] * (r * z[k+10] + t * z[k+11])
  // The loop is unrolled at run time: each iteration is a frame of pool 1
  // created by the previous iteration's NEWF; the NEXT at offset 6 is the
  // initiator node; THEN at 19 is the root of the loop body tree; each
  // iteration frees its predecessor through the DELF at offset 22 of the
  // predecessor frame. Demand main offset 13; the result is x[n-1].
  localparam int K1_Y = 256, K1_Z = 512, K1_X = 1024;

  function automatic void prog_kernel1(ref ld_t q[$], input int MAIN, input int IT,
                                       input int n, input int cq, input int cr,
                                       input int ct);
    put(q, MAIN, 10, li(0));                           // k of iteration 1
    put(q, MAIN, 11, faddr());                         // pointer to main
    put(q, MAIN, 12, newf(IT, 10, 0, 1));              // iteration 1 frame
    put(q, MAIN, 13, mov(dsp(12, 6)));                 // loop result
    put(q, MAIN, 29, li(0));                           // stands for a DELF
    put(q, MAIN, 40, li(cq));
    put(q, MAIN, 41, li(cr));
    put(q, MAIN, 42, li(ct));

    put(q, IT, 0,  nop());                             // argument pointer
    put(q, IT, 1,  mov(dsp(0, 0)));                    // k
    put(q, IT, 2,  mov(dsp(0, 1)));                    // pointer to main
    put(q, IT, 3,  alui(OP_ADD, dir(1), 1));           // k + 1   (arg block)
    put(q, IT, 4,  mov(dir(2)));                       // main    (arg block)
    put(q, IT, 5,  newf(IT, 3, 0, 1));                 // next iteration
    put(q, IT, 6,  next(dir(19), dsp(5, 6), dir(7)));  // initiator
    put(q, IT, 7,  alui(OP_SGE, dir(3), n));           // exit predicate
    put(q, IT, 8,  mov(dsp(2, 40)));                   // q
    put(q, IT, 9,  mov(dsp(2, 41)));                   // r
    put(q, IT, 10, mov(dsp(2, 42)));                   // t
    put(q, IT, 11, lw(dir(1), K1_Z + 10, none()));     // z[k+10]
    put(q, IT, 12, lw(dir(1), K1_Z + 11, none()));     // z[k+11]
    put(q, IT, 13, lw(dir(1), K1_Y, none()));          // y[k]
    put(q, IT, 14, alu(OP_MUL, dir(9), dir(11)));
    put(q, IT, 15, alu(OP_MUL, dir(10), dir(12)));
    put(q, IT, 16, alu(OP_ADD, dir(14), dir(15)));
    put(q, IT, 17, alu(OP_MUL, dir(13), dir(16)));
    put(q, IT, 18, alu(OP_ADD, dir(8), dir(17)));      // x value
    put(q, IT, 19, sync2(OP_THEN, dir(20), dsp(0, 19))); // store, then free prev
    put(q, IT, 20, sw(dir(1), dir(18), K1_X, none()));
    put(q, IT, 21, faddr());
    put(q, IT, 22, delf(dir(19), dir(21), none()));    // frees this frame
  endfunction

  function automatic int k1_ref(int k, int cq, int cr, int ct,
                                ref int y[int], ref int z[int]);
    return cq + y[k] * (cr * z[k + 10] + ct * z[k + 11]);
  endfunction

  // Livermore loops 1, 3, 5, 11 and 12 (integer), one generic loop frame.
  // Iteration frame layout:
  //   0 argument pointer      1 k        2 pointer to main   3 c (carried in)
  //   4..6 argument block of the next iteration: k+1, main, c' (carried out)
  //   7 NEWF next iteration   8 NEXT initiator               9 exit predicate
  //   10..39 body, c' at 39   40 root: THEN(store, predecessor's DELF)
  //   41 store x[k] = c'      42 FADDR                       43 DELF(40, 42)
  // Main: 10 k0, 11 FADDR, 12 c0 (argument block), 13 NEWF, 14 loop result,
  //       49 stands for the predecessor DELF of iteration 1, 60..62 q, r, t.
  // The argument pointer points at offset 4 of the predecessor, so
  // 39(argument pointer) is the predecessor's offset 43.
  // Demand main offset 14; the result is the last value stored.
  typedef enum int {LK1 = 1, LK3 = 3, LK5 = 5, LK11 = 11, LK12 = 12} lkernel_e;
  localparam int LX = 0, LY = 1300, LZ = 2600;

  function automatic void prog_loop(ref ld_t q[$], input int MAIN, input int IT,
                                    input lkernel_e kern, input int k0, input int n,
                                    input int c0, input int cq, input int cr, input int ct);
    put(q, MAIN, 10, li(k0));
    put(q, MAIN, 11, faddr());
    put(q, MAIN, 12, li(c0));
    put(q, MAIN, 13, newf(IT, 10, 0, 1));
    put(q, MAIN, 14, mov(dsp(13, 8)));
    put(q, MAIN, 49, li(0));
    put(q, MAIN, 60, li(cq));
    put(q, MAIN, 61, li(cr));
    put(q, MAIN, 62, li(ct));

    put(q, IT, 0,  nop());
    put(q, IT, 1,  mov(dsp(0, 0)));
    put(q, IT, 2,  mov(dsp(0, 1)));
    put(q, IT, 3,  mov(dsp(0, 2)));
    put(q, IT, 4,  alui(OP_ADD, dir(1), 1));
    put(q, IT, 5,  mov(dir(2)));
    put(q, IT, 6,  mov(dir(39)));
    put(q, IT, 7,  newf(IT, 4, 0, 1));
    put(q, IT, 8,  next(dir(40), dsp(7, 8), dir(9)));
    put(q, IT, 9,  alui(OP_SGE, dir(4), n));
    case (kern)
      LK1: begin   // x[k] = q + y[k]*(r*z[k+10] + t*z[k+11])
        put(q, IT, 10, lw(dir(1), LZ + 10, none()));
        put(q, IT, 11, lw(dir(1), LZ + 11, none()));
        put(q, IT, 12, lw(dir(1), LY, none()));
        put(q, IT, 13, mov(dsp(2, 60)));
        put(q, IT, 14, mov(dsp(2, 61)));
        put(q, IT, 15, mov(dsp(2, 62)));
        put(q, IT, 16, alu(OP_MUL, dir(14), dir(10)));
        put(q, IT, 17, alu(OP_MUL, dir(15), dir(11)));
        put(q, IT, 18, alu(OP_ADD, dir(16), dir(17)));
        put(q, IT, 19, alu(OP_MUL, dir(12), dir(18)));
        put(q, IT, 39, alu(OP_ADD, dir(13), dir(19)));
      end
      LK3: begin   // q += z[k]*x[k]   (running sum stored in x[k])
        put(q, IT, 10, lw(dir(1), LZ, none()));
        put(q, IT, 11, lw(dir(1), LY, none()));
        put(q, IT, 12, alu(OP_MUL, dir(10), dir(11)));
        put(q, IT, 39, alu(OP_ADD, dir(3), dir(12)));
      end
      LK5: begin   // x[i] = z[i]*(y[i] - x[i-1])
        put(q, IT, 10, lw(dir(1), LZ, none()));
        put(q, IT, 11, lw(dir(1), LY, none()));
        put(q, IT, 12, alu(OP_SUB, dir(11), dir(3)));
        put(q, IT, 39, alu(OP_MUL, dir(10), dir(12)));
      end
      LK11: begin  // x[k] = x[k-1] + y[k]
        put(q, IT, 10, lw(dir(1), LY, none()));
        put(q, IT, 39, alu(OP_ADD, dir(3), dir(10)));
      end
      default: begin // LK12: x[k] = y[k+1] - y[k]
        put(q, IT, 10, lw(dir(1), LY + 1, none()));
        put(q, IT, 11, lw(dir(1), LY, none()));
        put(q, IT, 39, alu(OP_SUB, dir(10), dir(11)));
      end
    endcase
    put(q, IT, 40, sync2(OP_THEN, dir(41), dsp(0, 39)));  // predecessor's 43
    put(q, IT, 41, sw(dir(1), dir(39), LX, none()));
    put(q, IT, 42, faddr());
    put(q, IT, 43, delf(dir(40), dir(42), none()));
  endfunction

endpackage
