// tb_ia64_decoder: encodes instructions with the testbench assembler and
// checks the decoded operation, registers and immediates, including the
// split immediate fields of adds, addl and movl, branch displacements,
// and the rejection of encodings outside the subset.
module tb_ia64_decoder;
  import ia64_pkg::*;
  import ia64_asm::*;
  logic [40:0] ins, lslot; unit_e unit; uop_t u;
  int checks = 0, failures = 0;
  ia64_decoder dut (.ins, .unit, .lslot, .u);
  task automatic chk(string w, logic [63:0] g, logic [63:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  task automatic dec(logic [40:0] i, unit_e un, logic [40:0] l = '0);
    ins = i; unit = un; lslot = l; #1;
  endtask
  initial begin
    dec(add(10, 11, 12), U_M);   chk("add op", u.op, OP_ADD); chk("r1", u.r1, 10); chk("r2", u.r2, 11); chk("r3", u.r3, 12); chk("wr", u.wr_gr, 1);
    dec(sub(1, 2, 3, 5), U_I);   chk("sub", u.op, OP_SUB); chk("qp", u.qp, 5);
    dec(andcm(4, 5, 6), U_I);    chk("andcm", u.op, OP_ANDCM);
    dec(xorr(4, 5, 6), U_M);     chk("xor", u.op, OP_XOR);
    dec(shladd(4, 5, 3, 6), U_I); chk("shladd", u.op, OP_SHLADD); chk("cnt", u.cnt, 2);
    dec(subi(4, -3, 6), U_I);    chk("subi", u.op, OP_SUB); chk("subi imm", u.imm, -64'sd3); chk("subi r2", u.r2, 0);
    dec(andi(4, 100, 6), U_M);   chk("andi", u.op, OP_AND); chk("andi imm", u.imm, 100);
    for (int k = 0; k < 200; k++) begin
      int v; v = $urandom_range(0, 16383) - 8192;
      dec(adds(7, v, 9), U_M); chk("adds imm", u.imm, 64'(longint'(v))); chk("adds r3", u.r3, 9);
      v = $urandom_range(0, 4194303) - 2097152;
      dec(addl(7, v, 2'd3), U_I); chk("addl imm", u.imm, 64'(longint'(v))); chk("addl r3", u.r3, 3);
    end
    dec(cmp(0, 6, 7, 10, 11), U_I); chk("cmp", u.op, OP_CMP); chk("crel", u.crel, CR_LT); chk("p1", u.p1, 6); chk("p2", u.p2, 7); chk("wr_pr", u.wr_pr, 1); chk("no gr", u.wr_gr, 0);
    dec(cmp(1, 6, 7, 10, 11, 1, 1), U_M); chk("cmp ltu", u.crel, CR_LTU); chk("unc", u.cunc, 1); chk("c4", u.c4, 1);
    dec(cmpi(2, 3, 4, -5, 20), U_M); chk("cmpi eq", u.crel, CR_EQ); chk("cmpi imm", u.imm, -64'sd5); chk("cmpi imm flag", u.use_imm, 1);
    dec(ld(2, 18, 8), U_M);      chk("ld", u.op, OP_LD); chk("ld sz", u.cnt, 2); chk("ld r3", u.r3, 8); chk("ld r1", u.r1, 18);
    dec(st(3, 8, 9), U_M);       chk("st", u.op, OP_ST); chk("st r2", u.r2, 9); chk("st r3", u.r3, 8); chk("st wr", u.wr_gr, 0);
    dec(ld(3, 18, 8), U_I);      chk("ld in I slot", u.op, OP_ILLEGAL);
    dec(alloc(34, 1, 30, 1), U_M); chk("alloc", u.op, OP_ALLOC); chk("alloc sof", u.imm[6:0], 32); chk("alloc sol", u.imm[13:7], 31);
    dec(nop(), U_M); chk("nop.m", u.op, OP_NOP);
    dec(nop(), U_I); chk("nop.i", u.op, OP_NOP);
    dec(nop(), U_F); chk("nop.f", u.op, OP_NOP);
    dec(nopb(), U_B); chk("nop.b", u.op, OP_NOP);
    dec(brk(), U_M); chk("break", u.op, OP_BREAK);
    dec(mov_tobr(6, 5), U_I); chk("mov b=r", u.op, OP_MOV_TOBR); chk("b1", u.b1, 6); chk("r2", u.r2, 5);
    dec(mov_frombr(33, 3), U_I); chk("mov r=b", u.op, OP_MOV_FROMBR); chk("b2", u.b2, 3);
    dec(mov_topfs(34), U_I); chk("mov pfs=r", u.op, OP_MOV_TOPFS);
    dec(mov_frompfs(34), U_I); chk("mov r=pfs", u.op, OP_MOV_FROMPFS);
    dec(xmpy(24, 10, 11), U_F); chk("xmpy", u.op, OP_MUL); chk("xmpy r2", u.r2, 10); chk("xmpy r3", u.r3, 11);
    dec(br_cond(-3, 8), U_B); chk("br", u.op, OP_BR_COND); chk("disp", u.imm, -64'sd48); chk("br qp", u.qp, 8);
    dec(br_call(0, 100), U_B); chk("call", u.op, OP_BR_CALL); chk("call disp", u.imm, 1600);
    dec(br_ret(0), U_B); chk("ret", u.op, OP_BR_RET); chk("ret b2", u.b2, 0);
    dec(br_ind(6), U_B); chk("br ind", u.op, OP_BR_COND); chk("ind b2", u.b2, 6); chk("ind imm flag", u.use_imm, 0);
    begin
      logic [81:0] lx;
      logic [63:0] v;
      for (int k = 0; k < 50; k++) begin
        v = {$urandom, $urandom};
        lx = movl(12, v);
        dec(lx[40:0], U_X, lx[81:41]); chk("movl", u.op, OP_MOVL); chk("movl imm", u.imm, v); chk("movl r1", u.r1, 12);
      end
      dec(lx[81:41], U_L); chk("L slot invalid", u.valid, 0);
    end
    dec(41'h1FFFFFFFFFF, U_B); chk("illegal", u.op, OP_ILLEGAL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
