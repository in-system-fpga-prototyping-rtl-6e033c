// fetch_unit: instruction fetch stage.
//
// Keeps the fetch address (a bundle address plus the slot at which
// execution resumes after a redirect), asks the branch predictor about the
// bundles of the current 32-byte line, and requests that line from the L1
// instruction cache. A hit returns the whole line, i.e. two bundles when
// the fetch address is line aligned and one when it points at the second
// bundle, as the document describes. Returned bundles go into a queue of
// QDEPTH bundles together with their prediction (taken, slot, target).
//
// Next address: the target of the first bundle predicted taken (at or
// after the resume slot), else the next line. A bundle predicted taken
// ends the line: the bundle after it is not queued.
//
// A redirect (mispredict or serialising instruction) loads a new address,
// empties the queue and flips an epoch bit; line responses carry the epoch
// of their request in the cache tag and stale ones are dropped. Requests
// are only made while the queue is sure to have room for all answers in
// flight. The queue gives the dispersal stage its two oldest bundles.
module fetch_unit
  import ia64_pkg::*;
 #(
  parameter int QDEPTH = 8,
  parameter int TAG_W  = 74
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,          // fetch enabled
  input  logic              redirect,
  input  logic [63:0]       redirect_ip,
  input  logic [1:0]        redirect_slot,
  // predictor lookup
  output logic [63:0]       bp_ip   [2],
  input  logic              bp_tk   [2],
  input  logic [63:0]       bp_tgt  [2],
  input  logic [1:0]        bp_slot [2],
  // L1I
  output logic              ic_valid,
  input  logic              ic_ready,
  output logic [63:0]       ic_addr,
  output logic [TAG_W-1:0]  ic_tag,
  input  logic              ic_rvalid,
  input  logic [255:0]      ic_rdata,
  input  logic [TAG_W-1:0]  ic_rtag,
  // queue head to dispersal
  output logic [1:0]        q_count,      // bundles offered (0..2)
  output logic [127:0]      q_bundle [2],
  output logic [63:0]       q_ip     [2],
  output logic [1:0]        q_start  [2], // first slot to execute
  output logic              q_ptk    [2],
  output logic [1:0]        q_pslot  [2],
  output logic [63:0]       q_ptgt   [2],
  input  logic [1:0]        q_deq
);
  typedef struct packed {
    logic [127:0] b;
    logic [63:0]  ip;
    logic [1:0]   start;
    logic         ptk;
    logic [1:0]   pslot;
    logic [63:0]  ptgt;
  } qent_t;

  typedef struct packed {
    logic        epoch;
    logic        second;   // fetch address was the second bundle of the line
    logic [1:0]  start;
    logic        tk0;
    logic [1:0]  s0;
    logic        tk1;
    logic [1:0]  s1;
    logic [63:0] tgt;
  } ftag_t;

  localparam int QW = $clog2(QDEPTH);

  qent_t          q [QDEPTH];
  logic [QW-1:0]  head, tail;
  logic [QW:0]    count;
  logic [3:0]     outst;          // requests in flight
  logic           epoch;
  logic [63:0]    pc;
  logic [1:0]     pslot0;

  ftag_t req_t, rsp_t;
  logic  p0, p1, second;
  logic [63:0] next_pc;

  assign second   = pc[4];
  assign bp_ip[0] = pc;
  assign bp_ip[1] = {pc[63:5], 5'b10000};

  always_comb begin
    p0 = bp_tk[0] && bp_slot[0] >= pslot0;
    p1 = !second && bp_tk[1];
    if (p0)      next_pc = {bp_tgt[0][63:4], 4'b0};
    else if (p1) next_pc = {bp_tgt[1][63:4], 4'b0};
    else         next_pc = {pc[63:5], 5'b0} + 64'd32;
    req_t = '{epoch: epoch, second: second, start: pslot0, tk0: p0, s0: bp_slot[0],
              tk1: p1 && !p0, s1: bp_slot[1], tgt: p0 ? bp_tgt[0] : bp_tgt[1]};
  end

  assign ic_valid = run && !redirect && (32'(count) + 2 * 32'(outst) + 2 <= QDEPTH) && outst < 4'd3;
  assign ic_addr  = {pc[63:5], 5'b0};
  assign ic_tag   = TAG_W'(req_t);
  assign rsp_t    = ftag_t'(ic_rtag);

  // queue outputs
  always_comb
    for (int i = 0; i < 2; i++) begin
      qent_t e;
      e = q[head + QW'(i)];
      q_bundle[i] = e.b;  q_ip[i] = e.ip;   q_start[i] = e.start;
      q_ptk[i]    = e.ptk; q_pslot[i] = e.pslot; q_ptgt[i] = e.ptgt;
    end
  assign q_count = (count >= 2) ? 2'd2 : 2'(count);

  // line address of the oldest request in flight
  logic [63:0] lines [4];
  logic [1:0]  lh, lt;
  logic [63:0] q_ip_of_line;
  assign q_ip_of_line = lines[lh];

  // entries pushed by a response
  qent_t  push_e [2];
  logic [1:0] push_n;
  always_comb begin
    logic [63:0] lip;
    lip = q_ip_of_line;
    push_n = 2'd0;
    push_e[0] = '0; push_e[1] = '0;
    if (ic_rvalid && rsp_t.epoch == epoch && !redirect) begin
      if (rsp_t.second) begin
        push_e[0] = '{b: ic_rdata[255:128], ip: lip + 64'd16, start: rsp_t.start,
                      ptk: rsp_t.tk0, pslot: rsp_t.s0, ptgt: rsp_t.tgt};
        push_n = 2'd1;
      end else begin
        push_e[0] = '{b: ic_rdata[127:0], ip: lip, start: rsp_t.start,
                      ptk: rsp_t.tk0, pslot: rsp_t.s0, ptgt: rsp_t.tgt};
        push_e[1] = '{b: ic_rdata[255:128], ip: lip + 64'd16, start: 2'd0,
                      ptk: rsp_t.tk1, pslot: rsp_t.s1, ptgt: rsp_t.tgt};
        push_n = rsp_t.tk0 ? 2'd1 : 2'd2;
      end
    end
  end


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; count <= '0; outst <= '0; epoch <= 1'b0;
      pc <= '0; pslot0 <= '0; lh <= '0; lt <= '0;
      for (int i = 0; i < 4; i++) lines[i] <= '0;
      for (int i = 0; i < QDEPTH; i++) q[i] <= '0;
    end else begin
      logic [QW:0] c;
      c = count;
      if (ic_valid && ic_ready) begin
        lines[lt] <= ic_addr; lt <= lt + 2'd1;
      end
      if (ic_rvalid) lh <= lh + 2'd1;
      outst <= outst + ((ic_valid && ic_ready) ? 4'd1 : 4'd0) - (ic_rvalid ? 4'd1 : 4'd0);
      if (redirect) begin
        head <= '0; tail <= '0; count <= '0; epoch <= ~epoch;
        pc <= {redirect_ip[63:4], 4'b0}; pslot0 <= redirect_slot;
      end else begin
        if (ic_valid && ic_ready) begin pc <= next_pc; pslot0 <= 2'd0; end
        head <= head + QW'(q_deq);
        c = c - (QW+1)'(q_deq);
        for (int i = 0; i < 2; i++)
          if (i < int'(push_n)) q[tail + QW'(i)] <= push_e[i];
        tail <= tail + QW'(push_n);
        count <= c + (QW+1)'(push_n);
      end
    end
  end

  a_deq_ok: assert property (@(posedge clk) disable iff (!rst_n) q_deq <= q_count);
endmodule
