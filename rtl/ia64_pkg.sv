// ia64_pkg: types and constants shared by the Itanium-subset pipeline.
//
// An Itanium bundle is 128 bits: a 5-bit template in bits [4:0] and three
// 41-bit instruction slots at [45:5], [86:46] and [127:87]. The template
// says which execution-unit type each slot needs (M, I, F, B, or the L+X
// pair of movl) and where the stops that end an instruction group fall.
// The decoder turns each slot into a uop_t; the dispersal stage places uops
// on the issue ports M0, M1, I0, I1, B0, B1, B2.
//
// The bit layouts below are the architectural ones. The uop encoding, the
// port numbering and the frame-marker layout inside ar.pfs (sof in [6:0],
// sol in [13:7]) are this design's own choices.
package ia64_pkg;

  localparam int XLEN       = 64;
  localparam int NGR        = 128;   // general registers r0..r127
  localparam int NSTATIC    = 32;    // r0..r31 are not stacked
  localparam int NPR        = 64;    // predicates p0..p63
  localparam int NBR        = 8;     // branch registers b0..b7
  localparam int NPORTS     = 7;     // M0 M1 I0 I1 B0 B1 B2
  localparam int PORT_M0    = 0;
  localparam int PORT_M1    = 1;
  localparam int PORT_I0    = 2;
  localparam int PORT_I1    = 3;
  localparam int PORT_B0    = 4;

  typedef enum logic [2:0] {
    U_M, U_I, U_F, U_B, U_L, U_X, U_NONE
  } unit_e;

  typedef enum logic [4:0] {
    OP_NOP, OP_ADD, OP_SUB, OP_AND, OP_ANDCM, OP_OR, OP_XOR, OP_SHLADD,
    OP_MOVL, OP_CMP, OP_LD, OP_ST, OP_MUL, OP_BR_COND, OP_BR_CALL,
    OP_BR_RET, OP_MOV_TOBR, OP_MOV_FROMBR, OP_MOV_TOPFS, OP_MOV_FROMPFS,
    OP_ALLOC, OP_BREAK, OP_ILLEGAL
  } op_e;

  typedef enum logic [1:0] {
    CR_EQ, CR_LT, CR_LTU
  } crel_e;

  typedef struct packed {
    logic        valid;
    op_e         op;
    logic [5:0]  qp;
    logic [6:0]  r1;       // destination GR (0 = none)
    logic [6:0]  r2;       // source GR
    logic [6:0]  r3;       // source GR
    logic        use_imm;  // second ALU operand is imm instead of r2
    logic [63:0] imm;      // immediate, branch displacement or movl value
    logic [5:0]  p1;       // compare destinations
    logic [5:0]  p2;
    crel_e       crel;
    logic        cunc;     // .unc compare form
    logic        c4;       // 32-bit compare (cmp4)
    logic [1:0]  cnt;      // shladd count - 1 ; ld/st size log2
    logic [2:0]  b1;       // branch register destination
    logic [2:0]  b2;       // branch register source
    logic        wr_gr;    // writes r1
    logic        wr_pr;    // writes p1/p2
  } uop_t;

  // One instruction as it travels from dispersal to write-back.
  typedef struct packed {
    uop_t        u;
    logic [63:0] ip;       // bundle address
    logic [1:0]  slot;     // slot within the bundle
    logic [2:0]  age;      // order within the issue group, 0 = oldest
    logic        pred_tk;  // predictor sent fetch to pred_tgt after this slot
    logic [63:0] pred_tgt;
  } inst_t;

  localparam uop_t UOP_NOP = '{valid: 1'b0, op: OP_NOP, crel: CR_EQ, default: '0};

  // Slot unit types and stop positions of a template. stop[i] = group ends
  // after slot i. Reserved templates return U_NONE slots.
  typedef struct packed {
    unit_e [2:0] unit;     // unit[0] is slot 0
    logic  [2:0] stop;
  } tmpl_t;

  function automatic tmpl_t decode_template(input logic [4:0] t);
    tmpl_t r;
    r.stop = {t[0], 2'b00};
    case (t[4:1])
      4'h0: r.unit = {U_I, U_I, U_M};
      4'h1: begin r.unit = {U_I, U_I, U_M}; r.stop[1] = 1'b1; r.stop[2] = t[0]; end
      4'h2: r.unit = {U_X, U_L, U_M};
      4'h4: r.unit = {U_I, U_M, U_M};
      4'h5: begin r.unit = {U_I, U_M, U_M}; r.stop[0] = 1'b1; end
      4'h6: r.unit = {U_I, U_F, U_M};
      4'h7: r.unit = {U_F, U_M, U_M};
      4'h8: r.unit = {U_B, U_I, U_M};
      4'h9: r.unit = {U_B, U_B, U_M};
      4'hB: r.unit = {U_B, U_B, U_B};
      4'hC: r.unit = {U_B, U_M, U_M};
      4'hE: r.unit = {U_B, U_F, U_M};
      default: begin r.unit = {U_NONE, U_NONE, U_NONE}; r.stop = 3'b111; end
    endcase
    return r;
  endfunction

  function automatic logic [40:0] bundle_slot(input logic [127:0] b, input int s);
    case (s)
      0:       return b[45:5];
      1:       return b[86:46];
      default: return b[127:87];
    endcase
  endfunction

  // Frame marker kept by the register stack engine.
  typedef struct packed {
    logic [6:0] sof;
    logic [6:0] sol;
  } cfm_t;

endpackage
