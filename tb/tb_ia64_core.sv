// tb_ia64_core: the processor core alone, with ideal memories: an
// instruction cache and a two-port data cache that always hit, with the
// L1's 2-cycle latency and tags passed back. The program is one
// instruction group of 24 MII bundles with no stops (72 independent adds),
// then a store, a load of the stored word, a dependent add and a break.
// Checks the document's issue-rate limit: the 72 adds retire in exactly
// 24 cycles (3 per cycle), never more than 4 in a cycle. Then checks every
// destination register, the stored word in the data memory, the loaded
// and summed values, and that the core halts on the break.
module tb_ia64_core;
  import ia64_pkg::*;
  import ia64_asm::*;
  logic clk = 0, rst_n = 0;
  logic start, running, halted; logic [63:0] start_ip, halt_ip;
  logic ic_valid, ic_ready, ic_rvalid; logic [63:0] ic_addr; logic [73:0] ic_tag, ic_rtag; logic [255:0] ic_rdata;
  logic dc_valid[2], dc_ready[2], dc_we[2], dc_tag[2], dc_rvalid[2], dc_rtag[2];
  logic [63:0] dc_addr[2], dc_wdata[2], dc_rdata[2]; logic [7:0] dc_be[2];
  logic [6:0] dbg_ra, dbg_bof; logic [63:0] dbg_rd, dbg_pr;
  logic [2:0] ev_retire;
  logic ev_mispredict, ev_branch, ev_raw_stall, ev_bypass, ev_pred_bypass, ev_split, ev_spill, ev_fill, ev_flush;
  logic [127:0] prog [64];
  logic [63:0] dmem [logic [63:0]];
  // two-stage pipes standing in for the 2-cycle L1 hit
  logic        iv [2]; logic [63:0] ia [2]; logic [73:0] it [2];
  logic        dv [2][2]; logic [63:0] dd [2][2]; logic dt [2][2];
  int checks = 0, failures = 0, cyc = 0, retired = 0, first = -1, last = -1, maxret = 0;
  ia64_core dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string w, logic [63:0] g, logic [63:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  assign ic_ready = 1'b1;
  assign ic_rvalid = iv[1];
  assign ic_rtag = it[1];
  always_comb begin
    int b; b = int'((ia[1] - 64'h1000) >> 4);
    ic_rdata = {(b + 1 < 64 && b >= 0) ? prog[b + 1] : 128'h0, (b < 64 && b >= 0) ? prog[b] : 128'h0};
  end
  always_comb for (int p = 0; p < 2; p++) begin
    dc_ready[p] = 1'b1; dc_rvalid[p] = dv[p][1]; dc_rdata[p] = dd[p][1]; dc_rtag[p] = dt[p][1];
  end
  always @(posedge clk) begin
    if (!rst_n) begin
      iv[0] <= 0; iv[1] <= 0; ia[0] <= 0; ia[1] <= 0; it[0] <= 0; it[1] <= 0;
      for (int p = 0; p < 2; p++) for (int k = 0; k < 2; k++) begin dv[p][k] <= 0; dd[p][k] <= 0; dt[p][k] <= 0; end
    end else begin
      iv[0] <= ic_valid; ia[0] <= ic_addr; it[0] <= ic_tag; iv[1] <= iv[0]; ia[1] <= ia[0]; it[1] <= it[0];
      for (int p = 0; p < 2; p++) begin
        logic [63:0] w, a; a = {dc_addr[p][63:3], 3'b0};
        w = dmem.exists(a) ? dmem[a] : 64'h0;
        dv[p][0] <= dc_valid[p]; dt[p][0] <= dc_tag[p];
        dd[p][0] <= w >> (8 * dc_addr[p][2:0]);
        if (dc_valid[p] && dc_we[p]) begin
          for (int b = 0; b < 8; b++) if (dc_be[p][b] && b + dc_addr[p][2:0] < 8) w[(b + dc_addr[p][2:0]) * 8 +: 8] = dc_wdata[p][b * 8 +: 8];
          dmem[a] = w;
        end
        dv[p][1] <= dv[p][0]; dd[p][1] <= dd[p][0]; dt[p][1] <= dt[p][0];
      end
    end
  end
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (ev_retire != 0 && retired < 72) begin
      if (first < 0) first = cyc;
      if (retired + int'(ev_retire) >= 72 && last < 0) last = cyc;
      if (int'(ev_retire) > maxret) maxret = int'(ev_retire);
    end
    retired += int'(ev_retire);
  end
  initial begin
    for (int i = 0; i < 64; i++) prog[i] = bundle(T_MII_S, brk(), nop(), nop());
    for (int k = 0; k < 24; k++)
      prog[k] = bundle(k == 23 ? T_MII_S : T_MII, adds(7'(2 + 3 * k), 3 * k, 0),
                       adds(7'(3 + 3 * k), 3 * k + 1, 0), adds(7'(4 + 3 * k), 3 * k + 2, 0));
    prog[24] = bundle(T_MII_S, adds(80, 'h800, 0), adds(83, 'h7F, 0), nop());
    prog[25] = bundle(T_MMI_S, st(3, 80, 83), nop(), nop());
    prog[26] = bundle(T_MMI_S, ld(3, 81, 80), nop(), nop());
    prog[27] = bundle(T_MII_S, nop(), add(82, 81, 83), nop());
    prog[28] = bundle(T_MII_S, brk(), nop(), nop());
    start = 0; start_ip = 64'h1000; dbg_ra = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!halted && cyc < 2000) @(negedge clk);
    chk("halted", halted, 1);
    chk("72 adds in 24 cycles", last - first + 1, 24);
    chk("at most 4 retire per cycle", 32'(maxret <= 4), 1);
    for (int k = 0; k < 72; k++) begin
      dbg_ra = 7'(2 + k); #1; chk($sformatf("r%0d", 2 + k), dbg_rd, 64'(k));
    end
    dbg_ra = 81; #1; chk("loaded word", dbg_rd, 64'h7F);
    dbg_ra = 82; #1; chk("sum", dbg_rd, 64'hFE);
    chk("stored word", dmem.exists(64'h800) ? dmem[64'h800] : 64'hX, 64'h7F);
    $display("cycles=%0d retired=%0d", cyc, retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
