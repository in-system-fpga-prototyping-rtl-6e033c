// tb_sa_cache: the set-associative cache at its L1 data-cache defaults
// (16 KB, 4-way, 32-byte lines, 2-cycle hits, two 8-byte ports).
// A random phase sends loads and partial stores on both ports over a
// 64 KB region, so that sets overflow and lines are replaced, against a
// line memory with random latency. Every response is checked against a
// byte-level reference memory, in order per port, with its tag. A
// directed phase then checks that a load hit answers 2 cycles after
// acceptance and that both ports sustain one hit per cycle each.
module tb_sa_cache;
  localparam int NP = 2, LB = 32, UB = 8, MEMB = 65536;
  logic clk = 0, rst_n = 0;
  logic req_valid[NP], req_ready[NP], req_we[NP], resp_valid[NP];
  logic [63:0] req_addr[NP]; logic [63:0] req_wdata[NP], resp_rdata[NP]; logic [7:0] req_be[NP];
  logic [3:0] req_tag[NP], resp_tag[NP];
  logic dn_valid, dn_ready, dn_we, dn_resp_valid;
  logic [63:0] dn_addr; logic [LB*8-1:0] dn_wdata, dn_resp_rdata; logic [LB-1:0] dn_be;
  logic [7:0] refm [MEMB];
  logic [7:0] dmem [MEMB];
  logic [63:0] expq [NP][$];
  logic [3:0]  tagq [NP][$];
  int          cycq [NP][$];
  int checks = 0, failures = 0, cyc = 0, nresp = 0;
  logic dbusy; int dcnt; logic [63:0] da; logic dwe;
  logic directed = 0;
  sa_cache #(.TAG_W(4)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic chk(string w, logic [63:0] g, logic [63:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  // downstream line memory
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin dbusy <= 0; dcnt <= 0; da <= 0; dwe <= 0; end
    else if (!dbusy && dn_valid && dn_ready) begin
      dbusy <= 1; dcnt <= $urandom_range(1, 8); da <= dn_addr; dwe <= dn_we;
      if (dn_we)
        for (int b = 0; b < LB; b++)
          if (dn_be[b]) dmem[{dn_addr[15:5], 5'(b)}] <= dn_wdata[b*8 +: 8];
    end else if (dbusy && dcnt > 0) dcnt <= dcnt - 1;
    else if (dbusy) dbusy <= 0;
  always_comb begin
    dn_ready = 1'b1;
    dn_resp_valid = dbusy && dcnt == 0;
    for (int b = 0; b < LB; b++) dn_resp_rdata[b*8 +: 8] = dmem[{da[15:5], 5'(b)}];
  end
  // response checker
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < NP; p++) if (resp_valid[p]) begin
      nresp++;
      if (expq[p].size() == 0) begin checks++; failures++; $display("FAIL unexpected response port %0d", p); end
      else begin
        logic [63:0] e; logic [3:0] t; int c;
        e = expq[p].pop_front(); t = tagq[p].pop_front(); c = cycq[p].pop_front();
        chk("data", resp_rdata[p], e);
        chk("tag", resp_tag[p], t);
        if (directed) chk("hit latency", cyc - c, 2);
      end
    end
  task automatic accept_cycle();
    // called just before a rising edge: record accepted requests, port 0 first
    for (int p = 0; p < NP; p++)
      if (req_valid[p] && req_ready[p]) begin
        logic [63:0] v;
        for (int b = 0; b < 8; b++) v[b*8 +: 8] = refm[16'(req_addr[p]) + 16'(b)];
        expq[p].push_back(req_we[p] ? 64'h0 : v);
        tagq[p].push_back(req_tag[p]);
        cycq[p].push_back(cyc);
        if (req_we[p])
          for (int b = 0; b < 8; b++) if (req_be[p][b]) refm[16'(req_addr[p]) + 16'(b)] = req_wdata[p][b*8 +: 8];
      end
  endtask
  initial begin
    for (int i = 0; i < MEMB; i++) begin refm[i] = 8'($urandom); dmem[i] = refm[i]; end
    for (int p = 0; p < NP; p++) begin
      req_valid[p] = 0; req_addr[p] = 0; req_we[p] = 0; req_wdata[p] = 0; req_be[p] = 0; req_tag[p] = 0;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 30000; c++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        if (req_valid[p] && req_ready[p]) req_valid[p] = 0;
        if (!req_valid[p] && $urandom_range(0, 1) == 0) begin
          req_valid[p] = 1;
          // mostly a 2 KB hot region, sometimes the whole 64 KB
          req_addr[p]  = ($urandom_range(0, 3) == 0) ? 64'($urandom_range(0, MEMB/8-1) * 8)
                                                    : 64'($urandom_range(0, 255) * 8);
          req_we[p]    = ($urandom_range(0, 3) == 0);
          req_wdata[p] = {$urandom, $urandom};
          req_be[p]    = 8'($urandom);
          req_tag[p]   = 4'($urandom);
        end
      end
      #1; accept_cycle();
    end
    @(negedge clk); for (int p = 0; p < NP; p++) req_valid[p] = 0;
    repeat (40) @(posedge clk);
    for (int p = 0; p < NP; p++) chk("all answered", expq[p].size(), 0);
    // directed: warm lines, then back-to-back dual-port hits
    for (int k = 0; k < 8; k++) begin
      @(negedge clk); req_valid[0] = 1; req_we[0] = 0; req_addr[0] = 64'h8000 + 64'(k * 32);
      #1; accept_cycle();
      @(negedge clk); req_valid[0] = 0;
      repeat (15) @(posedge clk);
    end
    directed = 1;
    for (int k = 0; k < 32; k++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        req_valid[p] = 1; req_we[p] = 0; req_addr[p] = 64'h8000 + 64'($urandom_range(0, 31) * 8);
        req_tag[p] = 4'(k);
      end
      #1;
      chk("port 0 accepts every cycle", req_ready[0], 1);
      chk("port 1 accepts every cycle", req_ready[1], 1);
      accept_cycle();
    end
    @(negedge clk); for (int p = 0; p < NP; p++) req_valid[p] = 0;
    repeat (5) @(posedge clk);
    for (int p = 0; p < NP; p++) chk("all answered", expq[p].size(), 0);
    chk("traffic", 32'(nresp > 5000), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
