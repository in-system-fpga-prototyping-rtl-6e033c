// ia64_core: in-order Itanium-subset pipeline.
//
// Stages (the document's pipeline, with decode and dispersal in
// one stage):
//   FET  fetch_unit: predicted fetch of 32-byte lines from the L1I
//   DISP dispersal: decode two bundles, issue one instruction group (or a
//        split part of it) per cycle to ports M0 M1 I0 I1 B0 B1 B2
//   STK  stack_rename: frame-relative register names -> physical
//   REG  register read; stall on a non-bypassable hazard (a load's result
//        read by the next group: loads take two cycles)
//   EXE  integer units (M and I ports), memory requests (M ports, to the
//        dual-ported L1D), branch resolution (B ports), predicated bypass
//   DET  load data in flight
//   WB   general registers written, load data formatted
//
// Bypass: results of DET and WB are forwarded to the operands in EXE;
// writes in WB reach REG through the register file's write-through. With
// a one-cycle ALU this is a full bypass between the four integer
// pipelines. A result is forwarded only when its predicate is true.
// Predicates, branch registers and ar.pfs are written when an instruction
// leaves EXE; a branch can use a predicate computed by an older compare in
// its own group (forwarded from the integer units).
//
// Control: the oldest of these events in the EXE group wins and kills the
// younger instructions of the group: a branch mispredict (pipeline
// flushed, fetch redirected, predictor trained), a frame-changing
// instruction (alloc, taken br.call/br.ret: flush and refetch behind it so
// that younger instructions are renamed with the new frame; this
// serialisation is this design's simplification), and break or an
// unsupported instruction (the core halts, drops the younger work still in
// the pipeline, and reports the bundle address on halt_ip). Branch
// outcomes train the predictor whether or not they mispredicted.
//
// Memory: the back end freezes while an EXE memory request is not yet
// accepted or a WB load or store still waits for its response (a miss
// stalls everything; own choice). Responses are buffered two deep per port
// so none is lost while frozen. The register stack engine uses port 0
// while it blocks the pipeline for spills and fills.
module ia64_core
  import ia64_pkg::*;
 #(
  parameter int          PHYS_STACKED = 96,
  parameter logic [63:0] BSP_RESET    = 64'h0000_8000,
  parameter int          IC_TAG_W     = 74
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [63:0]          start_ip,
  output logic                 running,
  output logic                 halted,
  output logic [63:0]          halt_ip,     // bundle of the break that halted
  // L1 instruction cache
  output logic                 ic_valid,
  input  logic                 ic_ready,
  output logic [63:0]          ic_addr,
  output logic [IC_TAG_W-1:0]  ic_tag,
  input  logic                 ic_rvalid,
  input  logic [255:0]         ic_rdata,
  input  logic [IC_TAG_W-1:0]  ic_rtag,
  // L1 data cache, two ports
  output logic                 dc_valid [2],
  input  logic                 dc_ready [2],
  output logic [63:0]          dc_addr  [2],
  output logic                 dc_we    [2],
  output logic [63:0]          dc_wdata [2],
  output logic [7:0]           dc_be    [2],
  output logic                 dc_tag   [2],
  input  logic                 dc_rvalid[2],
  input  logic [63:0]          dc_rdata [2],
  input  logic                 dc_rtag  [2],
  // debug / state read-out
  input  logic [6:0]           dbg_ra,
  output logic [63:0]          dbg_rd,
  output logic [63:0]          dbg_pr,
  output logic [6:0]           dbg_bof,
  // events, one cycle each
  output logic [2:0]           ev_retire,
  output logic                 ev_mispredict,
  output logic                 ev_branch,
  output logic                 ev_raw_stall,
  output logic                 ev_bypass,
  output logic                 ev_pred_bypass,
  output logic                 ev_split,
  output logic                 ev_spill,
  output logic                 ev_fill,
  output logic                 ev_flush
);
  // ------------------------------------------------------------------
  // control state
  logic started;
  assign running = started && !halted;

  logic exe_fire, reg_fire, stall_be, stall_reg, flush;
  logic red_any, red_halt;
  logic [63:0] red_hip;
  logic [2:0] red_age;
  logic [63:0] red_ip;
  logic [1:0]  red_slot;

  // ------------------------------------------------------------------
  // front end
  logic [63:0] bp_ip [2], bp_tgt [2];
  logic        bp_tk [2];
  logic [1:0]  bp_slot [2];
  logic        up_valid, up_taken;
  logic [63:0] up_ip, up_tgt;
  logic [1:0]  up_slot;

  branch_predictor u_bp (
    .clk, .rst_n, .lk_ip(bp_ip), .lk_tk(bp_tk), .lk_tgt(bp_tgt), .lk_slot(bp_slot),
    .up_valid, .up_ip, .up_slot, .up_taken, .up_tgt
  );

  logic [1:0]   q_count, q_deq;
  logic [127:0] q_bundle [2];
  logic [63:0]  q_ip [2], q_ptgt [2];
  logic [1:0]   q_start [2], q_pslot [2];
  logic         q_ptk [2];
  logic         f_redirect;
  logic [63:0]  f_rip;
  logic [1:0]   f_rslot;

  assign f_redirect = start || flush;
  assign f_rip      = start ? start_ip : red_ip;
  assign f_rslot    = start ? 2'd0 : red_slot;

  fetch_unit #(.TAG_W(IC_TAG_W)) u_fetch (
    .clk, .rst_n, .run(running), .redirect(f_redirect), .redirect_ip(f_rip),
    .redirect_slot(f_rslot), .bp_ip, .bp_tk, .bp_tgt, .bp_slot,
    .ic_valid, .ic_ready, .ic_addr, .ic_tag, .ic_rvalid, .ic_rdata, .ic_rtag,
    .q_count, .q_bundle, .q_ip, .q_start, .q_ptk, .q_pslot, .q_ptgt, .q_deq
  );

  inst_t g_disp [NPORTS];
  dispersal u_disp (
    .clk, .rst_n, .stall(!reg_fire), .flush(flush || start), .q_count, .q_bundle, .q_ip,
    .q_start, .q_ptk, .q_pslot, .q_ptgt, .q_deq, .grp(g_disp), .split_event(ev_split)
  );

  // ------------------------------------------------------------------
  // stack stage
  logic [6:0]  bof, ndirty;
  cfm_t        cfm;
  logic [63:0] pfs;
  inst_t g_ren [NPORTS];
  for (genvar p = 0; p < NPORTS; p++) begin : g_stk
    stack_rename #(.PHYS_STACKED(PHYS_STACKED)) u_ren (.in(g_disp[p]), .bof(bof), .out(g_ren[p]));
  end

  inst_t g_reg [NPORTS];
  inst_t g_exe [NPORTS];

  // ------------------------------------------------------------------
  // register file
  localparam int NRD = 10, NWR = 5;
  logic [6:0]  rf_ra [NRD];
  logic [63:0] rf_rd [NRD];
  logic        rf_we [NWR];
  logic [6:0]  rf_wa [NWR];
  logic [63:0] rf_wd [NWR];
  gr_file #(.NREGS(NGR), .NR(NRD), .NW(NWR)) u_gr (
    .clk, .rst_n, .ra(rf_ra), .rd(rf_rd), .we(rf_we), .wa(rf_wa), .wd(rf_wd)
  );

  logic [6:0]  rse_ra, rse_wa;
  logic [63:0] rse_wd;
  logic        rse_we;
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      rf_ra[2*k]   = g_reg[k].u.r2;
      rf_ra[2*k+1] = g_reg[k].u.r3;
    end
    rf_ra[8] = rse_ra;
    rf_ra[9] = dbg_ra;
  end
  assign dbg_rd = rf_rd[9];

  // ------------------------------------------------------------------
  // REG stage: non-bypassable hazard against loads now in EXE
  always_comb begin
    stall_reg = 1'b0;
    for (int k = 0; k < 4; k++)
      for (int m = 0; m < 2; m++)
        if (g_exe[m].u.valid && g_exe[m].u.op == OP_LD && g_exe[m].u.r1 != '0 && g_reg[k].u.valid &&
            (g_reg[k].u.r2 == g_exe[m].u.r1 || g_reg[k].u.r3 == g_exe[m].u.r1))
          stall_reg = 1'b1;
  end

  logic [63:0] ex_a_rf [4], ex_b_rf [4];

  // ------------------------------------------------------------------
  // EXE stage
  logic [63:0] pr, br [NBR];

  // DET and WB stage records for the four integer pipelines
  typedef struct packed {
    logic        wr;      // writes dst
    logic [6:0]  dst;
    logic [63:0] val;
    logic        ld;
    logic        st;
    logic [2:0]  lo;      // address bits [2:0] of a load
    logic [1:0]  sz;
  } res_t;
  res_t d_r [4], w_r [4];

  // load data of the WB stage, per memory port
  logic [63:0] rq_d [2][2];
  logic [1:0]  rq_n [2];
  logic        rsp_core [2];
  logic [63:0] wb_raw [2];
  logic        wb_have [2];
  always_comb
    for (int k = 0; k < 2; k++) begin
      rsp_core[k] = dc_rvalid[k] && !dc_rtag[k];
      wb_have[k]  = (rq_n[k] != 2'd0) || rsp_core[k];
      wb_raw[k]   = (rq_n[k] != 2'd0) ? rq_d[k][0] : dc_rdata[k];
    end

  function automatic logic [63:0] ld_fmt(input logic [63:0] d, input logic [2:0] lo, input logic [1:0] sz);
    logic [63:0] s;
    s = d >> {lo, 3'b0};
    unique case (sz)
      2'd0:    return {56'b0, s[7:0]};
      2'd1:    return {48'b0, s[15:0]};
      2'd2:    return {32'b0, s[31:0]};
      default: return s;
    endcase
  endfunction

  logic [63:0] w_val [4];
  always_comb
    for (int k = 0; k < 4; k++)
      w_val[k] = (k < 2 && w_r[k].ld) ? ld_fmt(wb_raw[k % 2], w_r[k].lo, w_r[k].sz) : w_r[k].val;

  // operand bypass: DET (younger) then WB
  logic        bp_pv [8];
  logic [6:0]  bp_dst [8];
  logic [63:0] bp_val [8];
  always_comb
    for (int k = 0; k < 4; k++) begin
      bp_pv[k]    = d_r[k].wr && !d_r[k].ld;
      bp_dst[k]   = d_r[k].dst;
      bp_val[k]   = d_r[k].val;
      bp_pv[4+k]  = w_r[k].wr;
      bp_dst[4+k] = w_r[k].dst;
      bp_val[4+k] = w_val[k];
    end

  logic [63:0] opa [4], opb [4];
  logic        hita [4], hitb [4];
  for (genvar k = 0; k < 4; k++) begin : g_byp
    bypass_net #(.NSRC(8)) u_ba (.src(g_exe[k].u.r2), .rf_val(ex_a_rf[k]), .pv(bp_pv), .pdst(bp_dst),
                                 .pval(bp_val), .val(opa[k]), .hit(hita[k]));
    bypass_net #(.NSRC(8)) u_bb (.src(g_exe[k].u.r3), .rf_val(ex_b_rf[k]), .pv(bp_pv), .pdst(bp_dst),
                                 .pval(bp_val), .val(opb[k]), .hit(hitb[k]));
  end

  // qualifying predicates; branches see compares of their own group
  logic        qp_raw [NPORTS];
  logic        qpv [NPORTS];
  logic [63:0] alu_y [4];
  logic        alu_rel [4];
  logic        cmp_we [4];
  logic        cmp_v1 [4], cmp_v2 [4];
  logic        pfwd [NPORTS];
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      qp_raw[p] = pr[g_exe[p].u.qp];
      qpv[p]    = qp_raw[p];
      pfwd[p]   = 1'b0;
    end
    for (int k = 0; k < 4; k++) begin
      cmp_we[k] = g_exe[k].u.valid && g_exe[k].u.op == OP_CMP && (qp_raw[k] || g_exe[k].u.cunc);
      cmp_v1[k] = qp_raw[k] && alu_rel[k];
      cmp_v2[k] = qp_raw[k] && !alu_rel[k];
    end
    for (int p = PORT_B0; p < NPORTS; p++)
      for (int k = 0; k < 4; k++)
        if (cmp_we[k] && g_exe[k].age < g_exe[p].age) begin
          if (g_exe[k].u.p1 == g_exe[p].u.qp && g_exe[p].u.qp != '0) begin qpv[p] = cmp_v1[k]; pfwd[p] = 1'b1; end
          if (g_exe[k].u.p2 == g_exe[p].u.qp && g_exe[p].u.qp != '0) begin qpv[p] = cmp_v2[k]; pfwd[p] = 1'b1; end
        end
  end

  for (genvar k = 0; k < 4; k++) begin : g_alu
    logic [63:0] a_in;
    always_comb begin
      a_in = opa[k];
      if (g_exe[k].u.use_imm || g_exe[k].u.op == OP_MOVL) a_in = g_exe[k].u.imm;
      if (g_exe[k].u.op == OP_MOV_FROMBR) a_in = br[g_exe[k].u.b2];
      if (g_exe[k].u.op == OP_MOV_FROMPFS || g_exe[k].u.op == OP_ALLOC) a_in = pfs;
    end
    int_alu u_alu (.op(g_exe[k].u.op), .crel(g_exe[k].u.crel), .c4(g_exe[k].u.c4), .cnt(g_exe[k].u.cnt),
                   .a(a_in), .b(opb[k]), .y(alu_y[k]), .rel(alu_rel[k]));
  end

  // branch resolution on every port (a non-branch that the front end took
  // for a taken branch also counts as a mispredict)
  logic        bu_isbr [NPORTS], bu_tk [NPORTS], bu_mis [NPORTS];
  logic [63:0] bu_tgt [NPORTS], bu_rip [NPORTS], bu_link [NPORTS];
  logic [1:0]  bu_rslot [NPORTS];
  for (genvar p = 0; p < NPORTS; p++) begin : g_bu
    branch_unit u_bu (.in(g_exe[p]), .qp_val(qpv[p]), .b2_val(br[g_exe[p].u.b2]),
                      .is_br(bu_isbr[p]), .taken(bu_tk[p]), .target(bu_tgt[p]),
                      .mispredict(bu_mis[p]), .redir_ip(bu_rip[p]), .redir_slot(bu_rslot[p]),
                      .link(bu_link[p]));
  end

  // oldest redirect of the group
  always_comb begin
    red_any = 1'b0; red_halt = 1'b0; red_hip = '0; red_age = 3'd7; red_ip = '0; red_slot = '0;
    for (int p = 0; p < NPORTS; p++) begin
      logic req, h;
      inst_t e;
      e = g_exe[p];
      h   = e.u.valid && !halted && (e.u.op == OP_BREAK || e.u.op == OP_ILLEGAL) && qpv[p];
      req = e.u.valid && !halted && (bu_mis[p] || h || (e.u.op == OP_ALLOC) ||
                          ((e.u.op == OP_BR_CALL || e.u.op == OP_BR_RET) && bu_tk[p]));
      if (req && (!red_any || e.age < red_age)) begin
        red_any = 1'b1; red_age = e.age; red_halt = h; red_hip = e.ip;
        red_ip = bu_rip[p]; red_slot = bu_rslot[p];
      end
    end
  end

  logic exe_ok [NPORTS];
  logic alive  [NPORTS];
  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      alive[p]  = g_exe[p].u.valid && !halted && !(red_any && g_exe[p].age > red_age);
      exe_ok[p] = alive[p] && qpv[p];
    end

  // ------------------------------------------------------------------
  // register stack engine
  logic        rse_cmd_valid, rse_stall, rse_busy, cmd_done;
  logic [1:0]  rse_cmd;
  logic [6:0]  rse_sof, rse_sol;
  logic [63:0] rse_val;
  logic        rse_mv, rse_mwe;
  logic [63:0] rse_maddr, rse_mwdata;
  logic        wb_wait, mem_wait;

  always_comb begin
    rse_cmd = 2'd0; rse_sof = '0; rse_sol = '0; rse_val = '0;
    rse_cmd_valid = 1'b0;
    for (int p = 0; p < NPORTS; p++)
      if (exe_ok[p]) begin
        if (g_exe[p].u.op == OP_ALLOC) begin
          rse_cmd_valid = 1'b1; rse_cmd = 2'd1;
          rse_sof = g_exe[p].u.imm[6:0]; rse_sol = g_exe[p].u.imm[13:7];
        end else if (g_exe[p].u.op == OP_BR_CALL) begin
          rse_cmd_valid = 1'b1; rse_cmd = 2'd0;
        end else if (g_exe[p].u.op == OP_BR_RET) begin
          rse_cmd_valid = 1'b1; rse_cmd = 2'd2;
        end else if (g_exe[p].u.op == OP_MOV_TOPFS) begin
          rse_cmd_valid = 1'b1; rse_cmd = 2'd3; rse_val = opa[p < 4 ? p : 0];
        end
      end
    rse_cmd_valid = rse_cmd_valid && !cmd_done && !wb_wait && !mem_wait;
  end

  rse #(.PHYS_STACKED(PHYS_STACKED), .BSP_RESET(BSP_RESET)) u_rse (
    .clk, .rst_n, .cmd_valid(rse_cmd_valid), .cmd(rse_cmd), .cmd_sof(rse_sof), .cmd_sol(rse_sol),
    .cmd_val(rse_val), .stall(rse_stall), .busy(rse_busy), .bof, .cfm, .pfs, .ndirty,
    .rf_ra(rse_ra), .rf_rd(rf_rd[8]), .rf_we(rse_we), .rf_wa(rse_wa), .rf_wd(rse_wd),
    .m_valid(rse_mv), .m_ready(dc_ready[0]), .m_addr(rse_maddr), .m_we(rse_mwe), .m_wdata(rse_mwdata),
    .m_rvalid(dc_rvalid[0] && dc_rtag[0]), .m_rdata(dc_rdata[0]),
    .spill_event(ev_spill), .fill_event(ev_fill)
  );

  // ------------------------------------------------------------------
  // memory requests from the M pipelines
  logic memop [2], acc [2], core_req [2];
  always_comb begin
    wb_wait  = 1'b0;
    for (int k = 0; k < 2; k++) begin
      memop[k] = exe_ok[k] && (g_exe[k].u.op == OP_LD || g_exe[k].u.op == OP_ST);
      if ((w_r[k].ld || w_r[k].st) && !wb_have[k]) wb_wait = 1'b1;
    end
    for (int k = 0; k < 2; k++) begin
      logic [63:0] a;
      logic [2:0]  lo;
      a  = opb[k];
      lo = a[2:0];
      core_req[k] = memop[k] && !acc[k] && !wb_wait && !rse_busy;
      dc_valid[k] = core_req[k];
      dc_addr[k]  = {a[63:3], 3'b0};
      dc_we[k]    = g_exe[k].u.op == OP_ST;
      dc_wdata[k] = opa[k] << {lo, 3'b0};
      dc_be[k]    = 8'(((16'd1 << (16'd1 << g_exe[k].u.cnt)) - 16'd1) << lo);
      dc_tag[k]   = 1'b0;
    end
    if (rse_mv) begin
      dc_valid[0] = 1'b1; dc_addr[0] = rse_maddr; dc_we[0] = rse_mwe;
      dc_wdata[0] = rse_mwdata; dc_be[0] = 8'hFF; dc_tag[0] = 1'b1;
    end
  end

  always_comb begin
    mem_wait = 1'b0;
    for (int k = 0; k < 2; k++)
      if (memop[k] && !acc[k] && !(core_req[k] && dc_ready[k])) mem_wait = 1'b1;
  end

  assign stall_be = wb_wait || mem_wait || rse_stall;
  assign exe_fire = !stall_be;
  assign reg_fire = exe_fire && !stall_reg;
  assign flush    = exe_fire && red_any;   // a halt also drops the younger work

  // ------------------------------------------------------------------
  // write-back
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      rf_we[k] = w_r[k].wr && (!(k < 2 && w_r[k].ld) || wb_have[k % 2]);
      rf_wa[k] = w_r[k].dst;
      rf_wd[k] = w_val[k];
    end
    rf_we[4] = rse_we; rf_wa[4] = rse_wa; rf_wd[4] = rse_wd;
  end

  // predictor training: the oldest live branch
  always_comb begin
    logic [2:0] best;
    up_valid = 1'b0; up_ip = '0; up_slot = '0; up_taken = 1'b0; up_tgt = '0; best = 3'd7;
    for (int p = PORT_B0; p < NPORTS; p++)
      if (alive[p] && bu_isbr[p] && (!up_valid || g_exe[p].age < best)) begin
        up_valid = exe_fire; best = g_exe[p].age;
        up_ip = g_exe[p].ip; up_slot = g_exe[p].slot; up_taken = bu_tk[p]; up_tgt = bu_tgt[p];
      end
  end

  // events
  always_comb begin
    int n;
    n = 0;
    ev_mispredict = 1'b0; ev_branch = 1'b0; ev_bypass = 1'b0; ev_pred_bypass = 1'b0;
    for (int p = 0; p < NPORTS; p++) begin
      if (alive[p]) n++;
      if (alive[p] && bu_isbr[p]) ev_branch = exe_fire;
      if (alive[p] && bu_mis[p]) ev_mispredict = exe_fire;
      if (alive[p] && pfwd[p]) ev_pred_bypass = exe_fire;
    end
    for (int k = 0; k < 4; k++)
      if (exe_ok[k] && (hita[k] || hitb[k])) ev_bypass = exe_fire;
    ev_retire    = exe_fire ? 3'(n) : 3'd0;
    ev_raw_stall = exe_fire && stall_reg;
    ev_flush     = flush && !red_halt;
  end
  assign dbg_pr  = pr;
  assign dbg_bof = bof;

  // ------------------------------------------------------------------
  // sequential state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started <= 1'b0; halted <= 1'b0; halt_ip <= '0; cmd_done <= 1'b0;
      pr <= 64'h1;
      for (int i = 0; i < NBR; i++) br[i] <= '0;
      for (int p = 0; p < NPORTS; p++) begin g_reg[p] <= '0; g_exe[p] <= '0; end
      for (int k = 0; k < 4; k++) begin
        ex_a_rf[k] <= '0; ex_b_rf[k] <= '0; d_r[k] <= '0; w_r[k] <= '0;
      end
      for (int k = 0; k < 2; k++) begin
        acc[k] <= 1'b0; rq_n[k] <= '0; rq_d[k][0] <= '0; rq_d[k][1] <= '0;
      end
    end else begin
      if (start) begin started <= 1'b1; halted <= 1'b0; end
      // response buffers
      for (int k = 0; k < 2; k++) begin
        logic pop, inc;
        logic [1:0] n;
        logic [63:0] d0, d1;
        pop = exe_fire && (w_r[k].ld || w_r[k].st);
        inc = rsp_core[k];
        n   = rq_n[k];
        d0  = rq_d[k][0];
        d1  = rq_d[k][1];
        if (pop) begin
          if (n != 2'd0) begin d0 = d1; n = n - 2'd1; end
          else inc = 1'b0;          // consumed straight from the cache
        end
        if (inc) begin
          if (n == 2'd0) d0 = dc_rdata[k]; else d1 = dc_rdata[k];
          n = n + 2'd1;
        end
        rq_n[k] <= n; rq_d[k][0] <= d0; rq_d[k][1] <= d1;
        if (exe_fire) acc[k] <= 1'b0;
        else if (core_req[k] && dc_ready[k]) acc[k] <= 1'b1;
      end
      if (exe_fire) cmd_done <= 1'b0;
      else if (rse_cmd_valid) cmd_done <= 1'b1;

      if (exe_fire) begin
        // architectural updates at the end of EXE
        for (int p = 0; p < NPORTS; p++) if (exe_ok[p]) begin
          if (p < 4 && g_exe[p].u.op == OP_MOV_TOBR) br[g_exe[p].u.b1] <= opa[p < 4 ? p : 0];
          if (g_exe[p].u.op == OP_BR_CALL) br[g_exe[p].u.b1] <= bu_link[p];
        end
        for (int k = 0; k < 4; k++) if (alive[k] && cmp_we[k]) begin
          if (g_exe[k].u.p1 != '0) pr[g_exe[k].u.p1] <= cmp_v1[k];
          if (g_exe[k].u.p2 != '0) pr[g_exe[k].u.p2] <= cmp_v2[k];
        end
        if (red_any && red_halt) begin halted <= 1'b1; halt_ip <= red_hip; end
        // DET and WB
        for (int k = 0; k < 4; k++) begin
          d_r[k].wr  <= exe_ok[k] && g_exe[k].u.wr_gr;
          d_r[k].dst <= g_exe[k].u.r1;
          d_r[k].val <= alu_y[k];
          d_r[k].ld  <= k < 2 && exe_ok[k] && g_exe[k].u.op == OP_LD;
          d_r[k].st  <= k < 2 && exe_ok[k] && g_exe[k].u.op == OP_ST;
          d_r[k].lo  <= opb[k][2:0];
          d_r[k].sz  <= g_exe[k].u.cnt;
          w_r[k]     <= d_r[k];
        end
        // REG -> EXE
        for (int p = 0; p < NPORTS; p++) g_exe[p] <= (reg_fire && !flush) ? g_reg[p] : '0;
        for (int k = 0; k < 4; k++) begin
          ex_a_rf[k] <= rf_rd[2*k];
          ex_b_rf[k] <= rf_rd[2*k+1];
        end
        // STK -> REG
        if (flush) for (int p = 0; p < NPORTS; p++) g_reg[p] <= '0;
        else if (reg_fire) for (int p = 0; p < NPORTS; p++) g_reg[p] <= g_ren[p];
      end
      if (start) for (int p = 0; p < NPORTS; p++) begin g_reg[p] <= '0; g_exe[p] <= '0; end
    end
  end
endmodule
