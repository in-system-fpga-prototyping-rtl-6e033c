// tb_fetch_unit: the fetch stage with a model instruction cache (pipelined,
// in-order answers after 1..4 cycles, random ready) and a model predictor
// that marks a pseudo-random set of bundles as taken branches with a
// slot and a target. The test walks the expected predicted path itself
// and checks every bundle the queue hands out: its address, its contents,
// its resume slot and its prediction. The consumer dequeues 0..2 bundles
// at random and redirects now and then to a random bundle and slot; after
// a redirect the next bundle out must be the redirect target, so stale
// lines still in flight must have been dropped. Coverage checks require
// taken predictions, second-half-of-line fetches and redirects.
module tb_fetch_unit;
  import ia64_pkg::*;
  logic clk = 0, rst_n = 0;
  logic run, redirect; logic [63:0] redirect_ip; logic [1:0] redirect_slot;
  logic [63:0] bp_ip[2], bp_tgt[2]; logic bp_tk[2]; logic [1:0] bp_slot[2];
  logic ic_valid, ic_ready, ic_rvalid; logic [63:0] ic_addr; logic [73:0] ic_tag, ic_rtag; logic [255:0] ic_rdata;
  logic [1:0] q_count, q_deq; logic [127:0] q_bundle[2]; logic [63:0] q_ip[2], q_ptgt[2];
  logic [1:0] q_start[2], q_pslot[2]; logic q_ptk[2];
  int checks = 0, failures = 0, ntaken = 0, nredir = 0, nsecond = 0, nout = 0;
  logic [63:0] icq_a [$]; logic [73:0] icq_t [$]; int icq_d [$];
  logic [63:0] exp_ip; logic [1:0] exp_start;
  fetch_unit dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string w, logic [63:0] g, logic [63:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  function automatic logic [31:0] h(logic [63:0] ip); return (ip[31:4] * 32'h9E3779B1) >> 7; endfunction
  function automatic logic p_tk(logic [63:0] ip); return h(ip) % 5 == 0; endfunction
  function automatic logic [1:0] p_sl(logic [63:0] ip); return 2'(h(ip) % 3); endfunction
  function automatic logic [63:0] p_tg(logic [63:0] ip); return 64'h10000 + 64'((h(ip) >> 4) % 512) * 16; endfunction
  function automatic logic [127:0] content(logic [63:0] ip); return {~ip, ip}; endfunction
  always_comb for (int p = 0; p < 2; p++) begin
    bp_tk[p] = p_tk(bp_ip[p]); bp_slot[p] = p_sl(bp_ip[p]); bp_tgt[p] = p_tg(bp_ip[p]);
  end
  // instruction cache model
  always_comb begin
    ic_rvalid = icq_d.size() > 0 && icq_d[0] == 0;
    ic_rdata = (icq_a.size() > 0) ? {content(icq_a[0] + 16), content(icq_a[0])} : '0;
    ic_rtag = (icq_t.size() > 0) ? icq_t[0] : '0;
  end
  always @(posedge clk) if (rst_n) begin
    if (ic_rvalid) begin void'(icq_a.pop_front()); void'(icq_t.pop_front()); void'(icq_d.pop_front()); end
    foreach (icq_d[i]) if (icq_d[i] > 0) icq_d[i]--;
    if (ic_valid && ic_ready) begin
      icq_a.push_back(ic_addr); icq_t.push_back(ic_tag); icq_d.push_back($urandom_range(1, 4) - 1);
      chk("line aligned request", ic_addr[4:0], 0);
    end
  end
  initial begin
    run = 0; redirect = 0; redirect_ip = 0; redirect_slot = 0; q_deq = 0; ic_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); redirect = 1; redirect_ip = 64'h10000; redirect_slot = 0; run = 1;
    exp_ip = 64'h10000; exp_start = 0;
    @(negedge clk); redirect = 0;
    for (int c = 0; c < 30000; c++) begin
      @(negedge clk);
      ic_ready = ($urandom_range(0, 3) != 0);
      if ($urandom_range(0, 60) == 0) begin
        redirect = 1; q_deq = 0;
        redirect_ip = 64'h10000 + 64'($urandom_range(0, 511)) * 16; redirect_slot = 2'($urandom_range(0, 2));
        exp_ip = redirect_ip; exp_start = redirect_slot; nredir++;
        @(negedge clk); redirect = 0;
        continue;
      end
      q_deq = 2'($urandom_range(0, int'(q_count)));
      for (int i = 0; i < int'(q_deq); i++) begin
        logic tk;
        chk("bundle address", q_ip[i], exp_ip);
        chk("bundle contents", q_bundle[i], content(exp_ip));
        chk("resume slot", q_start[i], exp_start);
        tk = p_tk(exp_ip) && p_sl(exp_ip) >= exp_start;
        chk("prediction", q_ptk[i], tk);
        if (tk) begin chk("predicted slot", q_pslot[i], p_sl(exp_ip)); chk("predicted target", q_ptgt[i], p_tg(exp_ip)); ntaken++; end
        if (exp_ip[4]) nsecond++;
        nout++;
        exp_ip = tk ? p_tg(exp_ip) : exp_ip + 16; exp_start = 0;
      end
    end
    @(negedge clk); q_deq = 0;
    $display("bundles=%0d taken=%0d redirects=%0d", nout, ntaken, nredir);
    chk("taken predictions seen", 32'(ntaken > 100), 1);
    chk("second-half bundles seen", 32'(nsecond > 100), 1);
    chk("redirects seen", 32'(nredir > 100), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
