// tb_l3_tag_cache: drives reads and writes into the tag-only L3 at its
// default geometry with a main-memory model of random latency (always
// under the 21-cycle hit time). Checks that a read answers exactly 21 cycles after
// acceptance when the line was seen before and exactly 100 cycles when
// not, that the data always comes from memory, that hit and miss events
// match a reference tag model with round-robin replacement, and that
// writes reach memory.
module tb_l3_tag_cache;
  localparam int LB = 64, SETS = 16384, WAYS = 4;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, req_we, resp_valid;
  logic [63:0] req_addr; logic [LB*8-1:0] req_wdata, resp_rdata; logic [LB-1:0] req_be;
  logic mem_valid, mem_ready, mem_we, mem_resp_valid;
  logic [63:0] mem_addr; logic [LB*8-1:0] mem_wdata, mem_resp_rdata; logic [LB-1:0] mem_be;
  logic hit_event, miss_event;
  int checks = 0, failures = 0, nhit = 0, nmiss = 0, nwr = 0;
  logic [17:0] rtag [SETS][WAYS]; logic rv [SETS][WAYS]; int rrr [SETS];
  logic mbusy; int mcnt; logic [63:0] maddr; logic mwe;
  l3_tag_cache dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string w, logic [63:0] g, logic [63:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin mbusy <= 0; mcnt <= 0; maddr <= 0; mwe <= 0; end
    else if (!mbusy && mem_valid && mem_ready) begin
      mbusy <= 1; mcnt <= $urandom_range(2, 18); maddr <= mem_addr; mwe <= mem_we;
    end else if (mbusy && mcnt > 0) mcnt <= mcnt - 1;
    else if (mbusy) mbusy <= 0;
  always_comb begin
    mem_ready = 1'b1;
    mem_resp_valid = mbusy && mcnt == 0;
    mem_resp_rdata = {8{maddr}};
  end
  always @(posedge clk) if (mem_valid && mem_ready && mem_we) nwr++;
  function automatic logic ref_hit(logic [63:0] a);
    int s; s = int'(a[19:6]);
    for (int w = 0; w < WAYS; w++) if (rv[s][w] && rtag[s][w] == a[31:20]) return 1;
    return 0;
  endfunction
  task automatic ref_fill(logic [63:0] a);
    int s; s = int'(a[19:6]);
    rv[s][rrr[s]] = 1; rtag[s][rrr[s]] = a[31:20]; rrr[s] = (rrr[s] + 1) % WAYS;
  endtask
  initial begin
    logic [63:0] a; logic h; int lat; logic wr;
    req_valid = 0; req_addr = 0; req_we = 0; req_wdata = 0; req_be = 0;
    for (int s = 0; s < SETS; s++) begin rrr[s] = 0; for (int w = 0; w < WAYS; w++) begin rv[s][w] = 0; rtag[s][w] = 0; end end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      // addresses from a few sets so that replacement is exercised
      a = {32'h0, 6'($urandom_range(0, 7)), 6'd0, 8'd0, 6'($urandom_range(0, 3)), 6'd0};
      a[31:20] = 12'($urandom_range(0, 6));
      wr = ($urandom_range(0, 4) == 0);
      h = ref_hit(a);
      @(negedge clk);
      req_valid = 1; req_addr = a; req_we = wr; req_wdata = {16{$urandom}}; req_be = '1;
      #1;
      chk("ready when idle", req_ready, 1);
      if (!wr) begin chk("hit event", hit_event, h); chk("miss event", miss_event, !h); end
      @(posedge clk); #1; req_valid = 0;
      if (!h) ref_fill(a);
      lat = 1;   // counted from the accepting edge to the edge that samples the answer
      while (!resp_valid) begin @(posedge clk); #1; lat++; end
      if (!wr) begin
        chk(h ? "hit latency" : "miss latency", lat, h ? 21 : 100);
        chk("data from memory", resp_rdata[63:0], a);
        if (h) nhit++; else nmiss++;
      end
      @(posedge clk);
    end
    chk("hits seen", 32'(nhit > 50), 1);
    chk("misses seen", 32'(nmiss > 50), 1);
    chk("writes reach memory", 32'(nwr > 50), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #20000000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
