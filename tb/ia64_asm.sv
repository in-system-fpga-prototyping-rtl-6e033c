// ia64_asm: a tiny Itanium assembler for the testbenches.
//
// Each function returns the 41-bit architectural encoding of one
// instruction of the supported subset; bundle() packs a template and three
// slots into 128 bits. Branch displacements are given in bundles.
package ia64_asm;
  typedef logic [40:0] ins_t;

  localparam logic [4:0] T_MII = 5'h00, T_MII_S = 5'h01, T_MLX_S = 5'h05, T_MMI = 5'h08,
                         T_MMI_S = 5'h09, T_MFI_S = 5'h0D, T_MIB_S = 5'h11, T_MBB_S = 5'h13,
                         T_BBB_S = 5'h17, T_MMB_S = 5'h19;

  function automatic logic [127:0] bundle(logic [4:0] t, ins_t s0, ins_t s1, ins_t s2);
    return {s2, s1, s0, t};
  endfunction

  function automatic ins_t a1(logic [5:0] qp, logic [3:0] x4, logic [1:0] x2b,
                              logic [6:0] r1, logic [6:0] r2, logic [6:0] r3);
    return {4'h8, 1'b0, 2'b00, 1'b0, x4, x2b, r3, r2, r1, qp};
  endfunction
  function automatic ins_t add (logic [6:0] r1, logic [6:0] r2, logic [6:0] r3, logic [5:0] qp = 0); return a1(qp, 4'h0, 2'd0, r1, r2, r3); endfunction
  function automatic ins_t sub (logic [6:0] r1, logic [6:0] r2, logic [6:0] r3, logic [5:0] qp = 0); return a1(qp, 4'h1, 2'd1, r1, r2, r3); endfunction
  function automatic ins_t andr(logic [6:0] r1, logic [6:0] r2, logic [6:0] r3, logic [5:0] qp = 0); return a1(qp, 4'h3, 2'd0, r1, r2, r3); endfunction
  function automatic ins_t andcm(logic [6:0] r1, logic [6:0] r2, logic [6:0] r3, logic [5:0] qp = 0); return a1(qp, 4'h3, 2'd1, r1, r2, r3); endfunction
  function automatic ins_t orr (logic [6:0] r1, logic [6:0] r2, logic [6:0] r3, logic [5:0] qp = 0); return a1(qp, 4'h3, 2'd2, r1, r2, r3); endfunction
  function automatic ins_t xorr(logic [6:0] r1, logic [6:0] r2, logic [6:0] r3, logic [5:0] qp = 0); return a1(qp, 4'h3, 2'd3, r1, r2, r3); endfunction
  function automatic ins_t shladd(logic [6:0] r1, logic [6:0] r2, int cnt, logic [6:0] r3, logic [5:0] qp = 0);
    return a1(qp, 4'h4, 2'(cnt - 1), r1, r2, r3);
  endfunction
  function automatic ins_t subi(logic [6:0] r1, int imm8, logic [6:0] r3, logic [5:0] qp = 0);
    logic [7:0] i; i = 8'(imm8);
    return {4'h8, i[7], 2'b00, 1'b0, 4'h9, 2'd1, r3, i[6:0], r1, qp};
  endfunction
  function automatic ins_t andi(logic [6:0] r1, int imm8, logic [6:0] r3, logic [5:0] qp = 0);
    logic [7:0] i; i = 8'(imm8);
    return {4'h8, i[7], 2'b00, 1'b0, 4'hB, 2'd0, r3, i[6:0], r1, qp};
  endfunction
  function automatic ins_t adds(logic [6:0] r1, int imm14, logic [6:0] r3, logic [5:0] qp = 0);
    logic [13:0] i; i = 14'(imm14);
    return {4'h8, i[13], 2'd2, 1'b0, i[12:7], r3, i[6:0], r1, qp};
  endfunction
  function automatic ins_t addl(logic [6:0] r1, int imm22, logic [1:0] r3, logic [5:0] qp = 0);
    logic [21:0] i; i = 22'(imm22);
    return {4'h9, i[21], i[15:7], i[20:16], r3, i[6:0], r1, qp};
  endfunction
  // rel: 0 = lt, 1 = ltu, 2 = eq
  function automatic ins_t cmp(int rel, logic [5:0] p1, logic [5:0] p2, logic [6:0] r2, logic [6:0] r3,
                               logic unc = 0, logic c4 = 0, logic [5:0] qp = 0);
    return {4'hC + 4'(rel), 1'b0, 1'b0, c4, 1'b0, p2, r3, r2, unc, p1, qp};
  endfunction
  function automatic ins_t cmpi(int rel, logic [5:0] p1, logic [5:0] p2, int imm8, logic [6:0] r3,
                                logic unc = 0, logic c4 = 0, logic [5:0] qp = 0);
    logic [7:0] i; i = 8'(imm8);
    return {4'hC + 4'(rel), i[7], 1'b1, c4, 1'b0, p2, r3, i[6:0], unc, p1, qp};
  endfunction
  // sz: 0 = 1 byte .. 3 = 8 bytes
  function automatic ins_t ld(int sz, logic [6:0] r1, logic [6:0] r3, logic [5:0] qp = 0);
    return {4'h4, 1'b0, 6'(sz), 2'b00, 1'b0, r3, 7'd0, r1, qp};
  endfunction
  function automatic ins_t st(int sz, logic [6:0] r3, logic [6:0] r2, logic [5:0] qp = 0);
    return {4'h4, 1'b0, 6'h30 + 6'(sz), 2'b00, 1'b0, r3, r2, 7'd0, qp};
  endfunction
  function automatic ins_t alloc(logic [6:0] r1, int i, int l, int o);
    return {4'h1, 1'b0, 3'd6, 2'b00, 4'd0, 7'(i + l), 7'(i + l + o), r1, 6'd0};
  endfunction
  function automatic ins_t nop();  return {4'h0, 1'b0, 3'd0, 6'h01, 7'd0, 7'd0, 7'd0, 6'd0}; endfunction
  function automatic ins_t brk();  return {4'h0, 1'b0, 3'd0, 6'h00, 7'd0, 7'd0, 7'd0, 6'd0}; endfunction
  function automatic ins_t nopb(); return {4'h2, 1'b0, 3'd0, 6'h00, 7'd0, 7'd0, 7'd0, 6'd0}; endfunction
  function automatic ins_t mov_tobr(logic [2:0] b1, logic [6:0] r2, logic [5:0] qp = 0);
    return {4'h0, 1'b0, 3'd7, 13'd0, r2, 4'd0, b1, qp};
  endfunction
  function automatic ins_t mov_frombr(logic [6:0] r1, logic [2:0] b2, logic [5:0] qp = 0);
    return {4'h0, 1'b0, 3'd0, 6'h31, 7'd0, 4'd0, b2, r1, qp};
  endfunction
  function automatic ins_t mov_topfs(logic [6:0] r2, logic [5:0] qp = 0);
    return {4'h0, 1'b0, 3'd0, 6'h2A, 7'd64, r2, 7'd0, qp};
  endfunction
  function automatic ins_t mov_frompfs(logic [6:0] r1, logic [5:0] qp = 0);
    return {4'h0, 1'b0, 3'd0, 6'h32, 7'd64, 7'd0, r1, qp};
  endfunction
  function automatic ins_t xmpy(logic [6:0] r1, logic [6:0] r3, logic [6:0] r4, logic [5:0] qp = 0);
    return {4'hE, 1'b1, 2'b00, r4, r3, 7'd0, r1, qp};
  endfunction
  function automatic ins_t br_cond(int disp_bundles, logic [5:0] qp = 0);
    logic [20:0] d; d = 21'(disp_bundles);
    return {4'h4, d[20], 1'b0, 2'b00, d[19:0], 1'b0, 3'd0, 3'd0, qp};
  endfunction
  function automatic ins_t br_call(logic [2:0] b1, int disp_bundles, logic [5:0] qp = 0);
    logic [20:0] d; d = 21'(disp_bundles);
    return {4'h5, d[20], 1'b0, 2'b00, d[19:0], 1'b0, 3'd0, b1, qp};
  endfunction
  function automatic ins_t br_ret(logic [2:0] b2, logic [5:0] qp = 0);
    return {4'h0, 1'b0, 1'b0, 2'b00, 6'h21, 11'd0, b2, 1'b0, 3'd0, 3'd4, qp};
  endfunction
  function automatic ins_t br_ind(logic [2:0] b2, logic [5:0] qp = 0);
    return {4'h0, 1'b0, 1'b0, 2'b00, 6'h20, 11'd0, b2, 1'b0, 3'd0, 3'd0, qp};
  endfunction
  // movl: returns {L slot, X slot}
  function automatic logic [81:0] movl(logic [6:0] r1, logic [63:0] imm, logic [5:0] qp = 0);
    ins_t l, x;
    l = imm[62:22];
    x = {4'h6, imm[63], imm[15:7], imm[20:16], imm[21], 1'b0, imm[6:0], r1, qp};
    return {l, x};
  endfunction
  function automatic logic [127:0] bundle_mlx(logic [4:0] t, ins_t m, logic [81:0] lx);
    return {lx[40:0], lx[81:41], m, t};
  endfunction
endpackage
