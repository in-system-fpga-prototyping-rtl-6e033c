// ia64_decoder: decodes one 41-bit Itanium instruction slot into a uop.
//
// Purely combinational. Inputs are the slot's 41 bits, the unit type the
// bundle template assigns to the slot, and, for the X slot of an L+X pair,
// the 41-bit L slot that holds the upper immediate bits of movl. The
// architectural bit encodings are used unchanged, so code from a stock
// Itanium assembler runs as long as it keeps to the subset below. Anything
// outside the subset decodes to OP_ILLEGAL, which the pipeline treats as a
// halt. The subset is this design's own cut of the user-level integer,
// memory and branch instructions:
//   A1  add sub and andcm or xor        A2  shladd
//   A3  sub/and/andcm/or/xor imm8       A4  adds imm14     A5  addl imm22
//   A6/A8 cmp/cmp4 .eq .lt .ltu (normal and .unc), register or imm8
//   M1/M4 ld1/2/4/8 st1/2/4/8 (no hints beyond none, no post-increment)
//   M34 alloc   M29/M31 and I26/I28 mov to/from ar.pfs
//   I21/I22 mov to/from b-register      X2 movl
//   F2 xma.l with f2=f0 (xmpy.l), executed on the integer multiplier
//      with the f-register numbers read as general registers
//   B1 br.cond  B3 br.call  B4 br.cond/br.ret via b-register
//   nop.m/i/f/b/x; break.m/i/f/b/x stop the processor
module ia64_decoder
  import ia64_pkg::*;
 (
  input  logic [40:0] ins,
  input  unit_e       unit,
  input  logic [40:0] lslot,
  output uop_t        u
);
  logic [3:0] op4;
  logic [5:0] x6m, x6b;
  logic [2:0] x3;
  logic [63:0] imm8, imm14, imm22, disp;

  assign op4   = ins[40:37];
  assign x3    = ins[35:33];
  assign x6m   = ins[32:27];           // {x2,x4} of M/I/F/B system forms
  assign x6b   = ins[32:27];
  assign imm8  = {{57{ins[36]}}, ins[19:13]};
  assign imm14 = {{51{ins[36]}}, ins[32:27], ins[19:13]};
  assign imm22 = {{43{ins[36]}}, ins[26:22], ins[35:27], ins[19:13]};
  assign disp  = {{40{ins[36]}}, ins[32:13], 4'b0};

  always_comb begin
    u       = UOP_NOP;
    u.valid = (unit != U_L);
    u.qp    = ins[5:0];
    u.r1    = ins[12:6];
    u.r2    = ins[19:13];
    u.r3    = ins[26:20];
    u.op    = OP_ILLEGAL;
    if (unit == U_NONE) u.op = OP_ILLEGAL;
    else if (unit == U_L) u.op = OP_NOP;
    // ---------------- A-type, legal in M and I slots ----------------
    else if ((unit == U_M || unit == U_I) && op4 == 4'h8) begin
      if (ins[35:34] == 2'd2) begin
        u.op = OP_ADD; u.use_imm = 1'b1; u.imm = imm14; u.wr_gr = 1'b1;
      end else if (ins[35:33] == 3'd0) begin
        unique case (ins[32:29])
          4'h0: if (ins[28:27] == 2'd0) begin u.op = OP_ADD; u.wr_gr = 1'b1; end
          4'h1: if (ins[28:27] == 2'd1) begin u.op = OP_SUB; u.wr_gr = 1'b1; end
          4'h3: begin
            u.wr_gr = 1'b1;
            unique case (ins[28:27])
              2'd0: u.op = OP_AND;
              2'd1: u.op = OP_ANDCM;
              2'd2: u.op = OP_OR;
              default: u.op = OP_XOR;
            endcase
          end
          4'h4: begin u.op = OP_SHLADD; u.cnt = ins[28:27]; u.wr_gr = 1'b1; end
          4'h9: if (ins[28:27] == 2'd1) begin
            u.op = OP_SUB; u.use_imm = 1'b1; u.imm = imm8; u.wr_gr = 1'b1;
          end
          4'hB: begin
            u.use_imm = 1'b1; u.imm = imm8; u.wr_gr = 1'b1;
            unique case (ins[28:27])
              2'd0: u.op = OP_AND;
              2'd1: u.op = OP_ANDCM;
              2'd2: u.op = OP_OR;
              default: u.op = OP_XOR;
            endcase
          end
          default: ;
        endcase
      end
    end
    else if ((unit == U_M || unit == U_I) && op4 == 4'h9) begin
      u.op = OP_ADD; u.use_imm = 1'b1; u.imm = imm22; u.wr_gr = 1'b1;
      u.r3 = {5'b0, ins[21:20]};
    end
    else if ((unit == U_M || unit == U_I) && (op4 == 4'hC || op4 == 4'hD || op4 == 4'hE)) begin
      u.p1   = ins[11:6];
      u.p2   = ins[32:27];
      u.cunc = ins[12];
      u.c4   = ins[34];
      u.crel = (op4 == 4'hC) ? CR_LT : (op4 == 4'hD) ? CR_LTU : CR_EQ;
      u.r1   = '0;
      if (ins[35] == 1'b1) begin           // A8: imm8 form, no tb bit
        if (ins[33] == 1'b0) begin
          u.op = OP_CMP; u.use_imm = 1'b1; u.imm = imm8; u.wr_pr = 1'b1;
        end
      end else if (ins[36] == 1'b0 && ins[33] == 1'b0) begin   // A6
        u.op = OP_CMP; u.wr_pr = 1'b1;
      end
    end
    // ---------------- M-unit ----------------
    else if (unit == U_M) begin
      unique case (op4)
        4'h0: if (x3 == 3'd0 && x6m == 6'h01) u.op = OP_NOP;
              else if (x3 == 3'd0 && x6m == 6'h00) u.op = OP_BREAK;
        4'h1: begin
          if (x3 == 3'd6) begin
            u.op = OP_ALLOC; u.wr_gr = 1'b1;
            u.imm = {50'b0, ins[26:20], ins[19:13]};  // {sol, sof}
          end else if (x3 == 3'd0 && x6m == 6'h2A && ins[26:20] == 7'd64) begin
            u.op = OP_MOV_TOPFS;
          end else if (x3 == 3'd0 && x6m == 6'h22 && ins[26:20] == 7'd64) begin
            u.op = OP_MOV_FROMPFS; u.wr_gr = 1'b1;
          end
        end
        4'h4: if (ins[36] == 1'b0 && ins[27] == 1'b0 && ins[29:28] == 2'd0) begin
          if (ins[35:32] == 4'h0) begin
            u.op = OP_LD; u.cnt = ins[31:30]; u.wr_gr = 1'b1;
          end else if (ins[35:32] == 4'hC) begin
            u.op = OP_ST; u.cnt = ins[31:30]; u.r1 = '0;
          end
        end
        default: ;
      endcase
    end
    // ---------------- I-unit ----------------
    else if (unit == U_I) begin
      if (op4 == 4'h0 && x3 == 3'd0) begin
        unique case (x6m)
          6'h00: u.op = OP_BREAK;
          6'h01: u.op = OP_NOP;
          6'h31: begin u.op = OP_MOV_FROMBR; u.b2 = ins[15:13]; u.wr_gr = 1'b1; end
          6'h2A: if (ins[26:20] == 7'd64) u.op = OP_MOV_TOPFS;
          6'h32: if (ins[26:20] == 7'd64) begin u.op = OP_MOV_FROMPFS; u.wr_gr = 1'b1; end
          default: ;
        endcase
      end else if (op4 == 4'h0 && x3 == 3'd7) begin
        u.op = OP_MOV_TOBR; u.b1 = ins[8:6]; u.r1 = '0;
      end
    end
    // ---------------- F-unit ----------------
    else if (unit == U_F) begin
      if (op4 == 4'h0 && ins[33] == 1'b0 && x6m == 6'h01) u.op = OP_NOP;
      else if (op4 == 4'h0 && ins[33] == 1'b0 && x6m == 6'h00) u.op = OP_BREAK;
      else if (op4 == 4'hE && ins[36] == 1'b1 && ins[35:34] == 2'd0 && ins[19:13] == 7'd0) begin
        u.op = OP_MUL; u.r2 = ins[26:20]; u.r3 = ins[33:27]; u.wr_gr = 1'b1;
      end
    end
    // ---------------- B-unit ----------------
    else if (unit == U_B) begin
      unique case (op4)
        4'h0: begin
          if (x6b == 6'h00) u.op = OP_BREAK;
          else if (x6b == 6'h20 && ins[8:6] == 3'd0) begin u.op = OP_BR_COND; u.b2 = ins[15:13]; end
          else if (x6b == 6'h21 && ins[8:6] == 3'd4) begin u.op = OP_BR_RET;  u.b2 = ins[15:13]; end
        end
        4'h2: u.op = OP_NOP;
        4'h4: if (ins[8:6] == 3'd0) begin u.op = OP_BR_COND; u.use_imm = 1'b1; u.imm = disp; end
        4'h5: begin u.op = OP_BR_CALL; u.use_imm = 1'b1; u.imm = disp; u.b1 = ins[8:6]; end
        default: ;
      endcase
      u.r1 = '0;
    end
    // ---------------- X-unit (L+X) ----------------
    else if (unit == U_X) begin
      if (op4 == 4'h6) begin
        u.op = OP_MOVL; u.wr_gr = 1'b1;
        u.imm = {ins[36], lslot, ins[21], ins[26:22], ins[35:27], ins[19:13]};
      end else if (op4 == 4'h0 && x3 == 3'd0 && x6m == 6'h01) u.op = OP_NOP;
      else if (op4 == 4'h0 && x3 == 3'd0 && x6m == 6'h00) u.op = OP_BREAK;
    end
    // Clear source fields the operation does not read, so that the
    // scoreboard sees no false dependences.
    unique case (u.op)
      OP_ADD, OP_SUB, OP_AND, OP_ANDCM, OP_OR, OP_XOR, OP_SHLADD, OP_CMP, OP_MUL:
        if (u.use_imm) u.r2 = '0;
      OP_ST: ;
      OP_LD: u.r2 = '0;
      OP_MOV_TOBR, OP_MOV_TOPFS: u.r3 = '0;
      default: begin u.r2 = '0; u.r3 = '0; end
    endcase
    if (u.r1 == 7'd0) u.wr_gr = 1'b0;
    if (!u.wr_gr && u.op != OP_ALLOC) u.r1 = '0;
  end
endmodule
