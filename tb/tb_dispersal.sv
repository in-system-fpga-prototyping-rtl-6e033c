// tb_dispersal: the decode/dispersal stage fed from a model fetch queue.
// A random program of bundles over the supported templates, with random
// queue gaps and back-end stalls, must come out as issue groups that
// contain every instruction exactly once and in program order, never
// cross a stop, never put an instruction on a port of the wrong unit
// type and never hold more than 2 M, 2 I and 3 B instructions. A directed
// part checks the document's issue policy: 24 MII bundles without stops
// issue as groups of 4 and 2, i.e. 72 instructions in 24 cycles (3 per
// cycle) with a split issue in every window, and the resume slot and
// predicted-taken slot of a queue entry drop the slots before and after.
module tb_dispersal;
  import ia64_pkg::*;
  import ia64_asm::*;
  localparam int NB = 400;
  logic clk = 0, rst_n = 0;
  logic stall, flush; logic [1:0] q_count, q_deq;
  logic [127:0] q_bundle[2]; logic [63:0] q_ip[2], q_ptgt[2]; logic [1:0] q_start[2], q_pslot[2]; logic q_ptk[2];
  inst_t grp[NPORTS]; logic split_event;
  logic [127:0] prog [NB];
  int nprog, head, gap;
  logic [63:0] exp_ip [$]; logic [1:0] exp_sl [$];
  int checks = 0, failures = 0, nsplit = 0, issued = 0, last_issue = 0, first_issue = -1, cyc = 0, ngrp = 0;
  int gsize [$];
  logic [1:0] start0; logic ptk0; logic [1:0] psl0;
  dispersal dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string w, logic [63:0] g, logic [63:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  function automatic logic [127:0] rnd_bundle();
    logic [4:0] t;
    case ($urandom_range(0, 9))
      0: t = T_MII; 1: t = T_MII_S; 2: t = T_MMI; 3: t = T_MMI_S; 4: t = T_MFI_S;
      5: t = T_MIB_S; 6: t = T_MBB_S; 7: t = T_BBB_S; 8: t = T_MMB_S; default: t = T_MLX_S;
    endcase
    return bundle(t, nop(), nop(), (t == T_MIB_S || t == T_MBB_S || t == T_BBB_S || t == T_MMB_S) ? nopb() : nop());
  endfunction
  // model fetch queue
  always_comb begin
    q_count = (gap > 0 || head >= nprog) ? 2'd0 : (nprog - head >= 2) ? 2'd2 : 2'(nprog - head);
    for (int b = 0; b < 2; b++) begin
      q_bundle[b] = (head + b < NB) ? prog[head + b] : '0;
      q_ip[b] = 64'h1000 + 64'((head + b) * 16);
      q_start[b] = (b == 0) ? start0 : 2'd0; q_ptk[b] = (b == 0) ? ptk0 : 1'b0;
      q_pslot[b] = (b == 0) ? psl0 : 2'd0; q_ptgt[b] = 64'h0;
    end
  end
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (split_event) nsplit++;
    head <= head + int'(q_deq);
    gap <= (gap > 0) ? gap - 1 : 0;
  end
  // group checker
  always @(posedge clk) if (rst_n) begin
    int n, nm, ni, nb; inst_t by_age [NPORTS];
    n = 0; nm = 0; ni = 0; nb = 0;
    for (int p = 0; p < NPORTS; p++) if (grp[p].u.valid) begin
      by_age[grp[p].age] = grp[p]; n++;
      if (p < 2) nm++; else if (p < 4) ni++; else nb++;
    end
    if (n > 0 && !stall) begin
      ngrp++; gsize.push_back(n);
      if (first_issue < 0) first_issue = cyc;
      last_issue = cyc;
      for (int k = 0; k < n; k++) begin
        tmpl_t tm; unit_e ue; int port;
        if (exp_ip.size() == 0) begin checks++; failures++; $display("FAIL extra instruction"); end
        else begin
          chk("program order ip", by_age[k].ip, exp_ip.pop_front());
          chk("program order slot", by_age[k].slot, exp_sl.pop_front());
        end
        tm = decode_template(prog[(by_age[k].ip - 64'h1000) / 16][4:0]);
        ue = tm.unit[by_age[k].slot];
        if (k < n - 1) chk("no stop inside a group", tm.stop[by_age[k].slot], 0);
        port = -1;
        for (int p = 0; p < NPORTS; p++) if (grp[p].u.valid && grp[p].age == 3'(k)) port = p;
        chk("port type", (ue == U_M) ? 32'(port < 2) : (ue == U_B) ? 32'(port >= 4) : 32'(port == 2 || port == 3), 1);
        issued++;
      end
    end
  end
  task automatic load_prog(int n, int kind);
    nprog = n; head = 0;
    for (int i = 0; i < n; i++) begin
      prog[i] = (kind == 0) ? rnd_bundle() : bundle(T_MII, nop(), nop(), nop());
      for (int s = 0; s < 3; s++) begin
        tmpl_t tm; tm = decode_template(prog[i][4:0]);
        if (tm.unit[s] != U_L) begin exp_ip.push_back(64'h1000 + 64'(i * 16)); exp_sl.push_back(2'(s)); end
      end
    end
  endtask
  initial begin
    stall = 0; flush = 0; gap = 0; start0 = 0; ptk0 = 0; psl0 = 0; nprog = 0; head = 0;
    for (int i = 0; i < NB; i++) prog[i] = '0;
    repeat (3) @(posedge clk);
    // random part
    load_prog(NB, 0);
    rst_n = 1;
    while (head < nprog || exp_ip.size() > 0) begin
      @(negedge clk);
      stall = ($urandom_range(0, 4) == 0);
      if (gap == 0 && $urandom_range(0, 5) == 0) gap = $urandom_range(1, 3);
      if (cyc > 20000) break;
    end
    @(negedge clk); stall = 0;
    repeat (4) @(posedge clk);
    chk("all instructions issued", exp_ip.size(), 0);
    // directed: 24 MII bundles, no stops, no stalls
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    first_issue = -1; issued = 0; nsplit = 0; gsize.delete();
    load_prog(24, 1);
    repeat (40) @(posedge clk);
    chk("72 instructions", issued, 72);
    chk("24 cycles (3 per cycle)", last_issue - first_issue + 1, 24);
    for (int g = 0; g < gsize.size(); g++) chk("groups of 4 then 2", gsize[g], (g % 2 == 0) ? 4 : 2);
    chk("split issues", nsplit, 12);
    // directed: resume slot 1 on bundle 0, bundle 0 predicted taken at slot 1
    @(negedge clk); flush = 1; start0 = 2'd1; ptk0 = 1; psl0 = 2'd1; nprog = 0; head = 0;
    prog[0] = bundle(T_MII, nop(), nop(), nop()); prog[1] = bundle(T_MII, nop(), nop(), nop());
    @(negedge clk); flush = 0; issued = 0; nprog = 2;
    exp_ip.push_back(64'h1000); exp_sl.push_back(2'd1);
    @(posedge clk); @(negedge clk); nprog = 0; start0 = 0; ptk0 = 0;
    repeat (4) @(posedge clk);
    chk("only the slot between resume and taken branch", issued, 1);
    chk("taken bundle ends the window", head, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
