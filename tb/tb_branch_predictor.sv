// tb_branch_predictor: the two-level predictor at its default sizes.
// Part 1 trains random branches drawn from a pool of bundle addresses
// that collide in BHT sets and BTB entries, and after every update
// compares both lookup ports with a reference model (per-address 4-bit
// histories in a 4-way round-robin BHT, per-address tables of 2-bit
// counters, direct-mapped BTB). Part 2 checks the behaviour the two-level
// scheme exists for: a branch with the repeating pattern taken, taken,
// taken, not taken is predicted without error once trained.
module tb_branch_predictor;
  localparam int BSETS = 128, WAYS = 4, NPHT = 128, NBTB = 64;
  logic clk = 0, rst_n = 0;
  logic [63:0] lk_ip[2], lk_tgt[2]; logic lk_tk[2]; logic [1:0] lk_slot[2];
  logic up_valid, up_taken; logic [63:0] up_ip, up_tgt; logic [1:0] up_slot;
  int checks = 0, failures = 0;
  // reference
  logic rv [BSETS][WAYS]; logic [15:0] rt [BSETS][WAYS]; logic [3:0] rh [BSETS][WAYS]; int rrr [BSETS];
  logic [1:0] rp [NPHT][16];
  logic bv [NBTB]; logic [15:0] bt [NBTB]; logic [63:0] bg [NBTB]; logic [1:0] bs [NBTB];
  logic [63:0] pool [24];
  branch_predictor dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string w, logic [63:0] g, logic [63:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  function automatic logic [3:0] rhist(logic [63:0] ip, output int way);
    int s; s = int'(ip[10:4]); way = -1;
    for (int w = 0; w < WAYS; w++) if (rv[s][w] && rt[s][w] == ip[26:11]) begin way = w; return rh[s][w]; end
    return 4'd0;
  endfunction
  function automatic logic ref_tk(logic [63:0] ip);
    int way; logic [3:0] h; int b;
    h = rhist(ip, way); b = int'(ip[9:4]);
    return bv[b] && bt[b] == ip[26:11] && rp[int'(ip[10:4])][h][1];
  endfunction
  task automatic ref_update(logic [63:0] ip, logic tk, logic [63:0] tgt, logic [1:0] sl);
    int way, s, t, b; logic [3:0] h;
    h = rhist(ip, way); s = int'(ip[10:4]); t = int'(ip[10:4]); b = int'(ip[9:4]);
    if (tk && rp[t][h] != 3) rp[t][h]++;
    else if (!tk && rp[t][h] != 0) rp[t][h]--;
    if (way >= 0) rh[s][way] = {h[2:0], tk};
    else begin rv[s][rrr[s]] = 1; rt[s][rrr[s]] = ip[26:11]; rh[s][rrr[s]] = {3'b0, tk}; rrr[s] = (rrr[s] + 1) % WAYS; end
    if (tk) begin bv[b] = 1; bt[b] = ip[26:11]; bg[b] = tgt; bs[b] = sl; end
  endtask
  task automatic compare();
    for (int p = 0; p < 2; p++) begin
      lk_ip[p] = pool[$urandom_range(0, 23)];
    end
    #1;
    for (int p = 0; p < 2; p++) begin
      chk("taken", lk_tk[p], ref_tk(lk_ip[p]));
      if (lk_tk[p]) begin
        chk("target", lk_tgt[p], bg[int'(lk_ip[p][9:4])]);
        chk("slot", lk_slot[p], bs[int'(lk_ip[p][9:4])]);
      end
    end
  endtask
  initial begin
    int miss;
    for (int s = 0; s < BSETS; s++) begin rrr[s] = 0; for (int w = 0; w < WAYS; w++) begin rv[s][w] = 0; rt[s][w] = 0; rh[s][w] = 0; end end
    for (int t = 0; t < NPHT; t++) for (int e = 0; e < 16; e++) rp[t][e] = 1;
    for (int b = 0; b < NBTB; b++) begin bv[b] = 0; bt[b] = 0; bg[b] = 0; bs[b] = 0; end
    // pool: 6 addresses in each of 4 BHT sets (more than the 4 ways), so
    // entries are replaced; different sets may share BTB entries
    for (int i = 0; i < 24; i++) pool[i] = {32'h0, 5'($urandom), 11'h0, 7'(i % 4 * 64 + 3), 4'h0} + 64'((i / 4) << 11);
    up_valid = 0; up_ip = 0; up_taken = 0; up_tgt = 0; up_slot = 0; lk_ip[0] = 0; lk_ip[1] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      compare();
      up_valid = 1; up_ip = pool[$urandom_range(0, 23)]; up_taken = ($urandom_range(0, 2) != 0);
      up_tgt = {$urandom, $urandom} & ~64'hF; up_slot = 2'($urandom_range(0, 2));
      @(posedge clk); ref_update(up_ip, up_taken, up_tgt, up_slot);
    end
    // part 2: pattern T T T N on a fresh bundle
    miss = 0;
    for (int c = 0; c < 200; c++) begin
      logic tk;
      @(negedge clk);
      tk = (c % 4 != 3);
      lk_ip[0] = 64'h0040_0230; #1;
      if (c >= 100 && lk_tk[0] != tk) miss++;
      up_valid = 1; up_ip = 64'h0040_0230; up_taken = tk; up_tgt = 64'h0040_0100; up_slot = 2;
      @(posedge clk);
    end
    chk("periodic pattern learnt", miss, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
