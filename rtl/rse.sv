// rse: register stack engine and current frame marker.
//
// Keeps the current frame (size of frame 'sof', size of locals 'sol'), the
// physical position 'bof' of the frame's first stacked register, the
// previous function state ar.pfs, the number 'ndirty' of caller registers
// still held in the stacked physical registers, and the backing-store
// pointer. The execute stage sends it one command at a time:
//   call  : ar.pfs <- frame; the caller's outputs become the new frame
//   alloc : set sof/sol; spill the oldest caller registers first when the
//           new frame would not fit in PHYS_STACKED registers
//   ret   : restore the frame from ar.pfs; fill caller registers back from
//           the backing store first when they were spilled
//   setpfs: ar.pfs <- value (mov ar.pfs = r)
// As in the document, the engine services these compulsory spills and
// fills by blocking the pipeline: 'stall' is high from the command cycle
// until the last spill or fill is done. Each spill reads one physical
// register and stores it at the backing-store pointer through a memory
// port (8 bytes, pointer += 8); each fill loads pointer - 8 back.
// Own choices: no NaT collection words, no eager (background) spilling,
// ar.pfs holds sof in bits [6:0] and sol in [13:7], the frame after reset
// is sof = 96 - nothing is dirty - with bof = 0.
module rse
  import ia64_pkg::*;
 #(
  parameter int          PHYS_STACKED = 96,
  parameter logic [63:0] BSP_RESET    = 64'h0000_8000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  input  logic [1:0]  cmd,          // 0 call, 1 alloc, 2 ret, 3 setpfs
  input  logic [6:0]  cmd_sof,
  input  logic [6:0]  cmd_sol,
  input  logic [63:0] cmd_val,
  output logic        stall,
  output logic        busy,         // a spill/fill sequence is running
  output logic [6:0]  bof,
  output cfm_t        cfm,
  output logic [63:0] pfs,
  output logic [6:0]  ndirty,
  // register file access (physical register numbers)
  output logic [6:0]  rf_ra,
  input  logic [63:0] rf_rd,
  output logic        rf_we,
  output logic [6:0]  rf_wa,
  output logic [63:0] rf_wd,
  // memory port
  output logic        m_valid,
  input  logic        m_ready,
  output logic [63:0] m_addr,
  output logic        m_we,
  output logic [63:0] m_wdata,
  input  logic        m_rvalid,
  input  logic [63:0] m_rdata,
  output logic        spill_event,
  output logic        fill_event
);
  localparam logic [1:0] C_CALL = 2'd0, C_ALLOC = 2'd1, C_RET = 2'd2, C_SETPFS = 2'd3;
  typedef enum logic [1:0] { R_IDLE, R_REQ, R_WAIT } st_e;

  st_e        st;
  logic [63:0] bsp;
  logic [7:0]  todo;       // spills or fills left
  logic        filling;
  logic [1:0]  pend_cmd;
  logic [6:0]  pend_sof, pend_sol;

  function automatic logic [6:0] wrap(input int v);
    int x;
    x = v % PHYS_STACKED;
    if (x < 0) x += PHYS_STACKED;
    return 7'(x);
  endfunction

  // work a command needs
  int need_spill, need_fill;
  always_comb begin
    need_spill = 0; need_fill = 0;
    if (cmd == C_ALLOC && int'(ndirty) + int'(cmd_sof) > PHYS_STACKED)
      need_spill = int'(ndirty) + int'(cmd_sof) - PHYS_STACKED;
    if (cmd == C_RET && int'(pfs[13:7]) > int'(ndirty))
      need_fill = int'(pfs[13:7]) - int'(ndirty);
  end

  assign busy  = (st != R_IDLE);
  assign stall = busy || (cmd_valid && (need_spill > 0 || need_fill > 0));

  // the register moved by the next spill (oldest dirty) or fill
  logic [6:0] spill_reg, fill_reg;
  assign spill_reg = 7'(NSTATIC) + wrap(int'(bof) - int'(ndirty));
  assign fill_reg  = 7'(NSTATIC) + wrap(int'(bof) - int'(ndirty) - 1);

  assign rf_ra   = spill_reg;
  assign m_valid = (st == R_REQ);
  assign m_we    = !filling;
  assign m_addr  = filling ? bsp - 64'd8 : bsp;
  assign m_wdata = rf_rd;
  assign rf_we   = (st == R_WAIT) && m_rvalid && filling;
  assign rf_wa   = fill_reg;
  assign rf_wd   = m_rdata;
  assign spill_event = (st == R_WAIT) && m_rvalid && !filling;
  assign fill_event  = rf_we;

  // frame state after a command
  typedef struct packed {
    logic [6:0]  bof;
    cfm_t        cfm;
    logic [63:0] pfs;
    logic [6:0]  nd;
  } fstate_t;

  function automatic fstate_t apply(input fstate_t f, input logic [1:0] c, input logic [6:0] s_of,
                                    input logic [6:0] s_ol, input logic [63:0] v);
    fstate_t r;
    r = f;
    unique case (c)
      C_CALL: begin
        r.pfs     = {50'b0, f.cfm.sol, f.cfm.sof};
        r.bof     = wrap(int'(f.bof) + int'(f.cfm.sol));
        r.cfm.sof = f.cfm.sof - f.cfm.sol;
        r.cfm.sol = '0;
        r.nd      = f.nd + f.cfm.sol;
      end
      C_ALLOC: begin r.cfm.sof = s_of; r.cfm.sol = s_ol; end
      C_RET: begin
        r.bof     = wrap(int'(f.bof) - int'(f.pfs[13:7]));
        r.cfm.sof = f.pfs[6:0];
        r.cfm.sol = f.pfs[13:7];
        r.nd      = f.nd - f.pfs[13:7];
      end
      default: r.pfs = v;
    endcase
    return r;
  endfunction

  fstate_t cur, now_applied, pend_applied;
  always_comb begin
    cur = '{bof: bof, cfm: cfm, pfs: pfs, nd: ndirty};
    now_applied = apply(cur, cmd, cmd_sof, cmd_sol, cmd_val);
    pend_applied = cur;
    pend_applied.nd = filling ? ndirty + 7'd1 : ndirty - 7'd1;
    pend_applied = apply(pend_applied, pend_cmd, pend_sof, pend_sol, '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE; bsp <= BSP_RESET; todo <= '0; filling <= 1'b0;
      pend_cmd <= '0; pend_sof <= '0; pend_sol <= '0;
      bof <= '0; cfm.sof <= 7'(PHYS_STACKED); cfm.sol <= '0; pfs <= '0; ndirty <= '0;
    end else begin
      unique case (st)
        R_IDLE: if (cmd_valid) begin
          if (need_spill > 0 || need_fill > 0) begin
            st <= R_REQ; todo <= 8'(need_spill + need_fill); filling <= need_fill > 0;
            pend_cmd <= cmd; pend_sof <= cmd_sof; pend_sol <= cmd_sol;
          end else begin
            bof <= now_applied.bof; cfm <= now_applied.cfm;
            pfs <= now_applied.pfs; ndirty <= now_applied.nd;
          end
        end
        R_REQ: if (m_ready) st <= R_WAIT;
        R_WAIT: if (m_rvalid) begin
          if (filling) begin bsp <= bsp - 64'd8; ndirty <= ndirty + 7'd1; end
          else         begin bsp <= bsp + 64'd8; ndirty <= ndirty - 7'd1; end
          todo <= todo - 8'd1;
          if (todo == 8'd1) begin
            st <= R_IDLE;
            bof <= pend_applied.bof; cfm <= pend_applied.cfm;
            pfs <= pend_applied.pfs; ndirty <= pend_applied.nd;
          end else st <= R_REQ;
        end
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
