// tb_rse: the register stack engine with 96 stacked registers, a model
// register file and a backing-store memory with random latency. Random
// call chains up to 10 deep allocate frames of 8..60 registers, fill the
// locals with unique values, and return in reverse order (restoring
// ar.pfs with setpfs as compiled code does). Frames deeper than the
// physical stack force spills on alloc and fills on return. Checks after
// every command: the frame marker and bof against a reference, ar.pfs on
// call, the invariant ndirty + sof <= 96, and on every return that each
// local of the caller holds its value again, so spill and fill moved the
// right registers to and from the right backing-store words. The test
// fails if no spill or no fill happened.
module tb_rse;
  import ia64_pkg::*;
  localparam int PS = 96;
  logic clk = 0, rst_n = 0;
  logic cmd_valid; logic [1:0] cmd; logic [6:0] cmd_sof, cmd_sol; logic [63:0] cmd_val;
  logic stall, busy; logic [6:0] bof; cfm_t cfm; logic [63:0] pfs; logic [6:0] ndirty;
  logic [6:0] rf_ra, rf_wa; logic [63:0] rf_rd, rf_wd; logic rf_we;
  logic m_valid, m_ready, m_we, m_rvalid; logic [63:0] m_addr, m_wdata, m_rdata;
  logic spill_event, fill_event;
  logic [63:0] rf [128];
  logic [63:0] bs [logic [63:0]];
  int checks = 0, failures = 0, nspill = 0, nfill = 0;
  logic mb; int mc; logic [63:0] ma; logic mw;
  rse #(.PHYS_STACKED(PS)) dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string w, logic [63:0] g, logic [63:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  assign rf_rd = rf[rf_ra];
  always @(posedge clk) begin
    if (rf_we) rf[rf_wa] <= rf_wd;
    if (spill_event) nspill++;
    if (fill_event) nfill++;
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin mb <= 0; mc <= 0; ma <= 0; mw <= 0; end
    else if (!mb && m_valid && m_ready) begin
      mb <= 1; mc <= $urandom_range(0, 4); ma <= m_addr; mw <= m_we;
      if (m_we) bs[m_addr] = m_wdata;
    end else if (mb && mc > 0) mc <= mc - 1;
    else if (mb) mb <= 0;
  always_comb begin
    m_ready = 1'b1; m_rvalid = mb && mc == 0;
    m_rdata = bs.exists(ma) ? bs[ma] : 64'hDEAD;
  end
  function automatic int phys(int b, int i);
    return 32 + ((b + i) % PS);
  endfunction
  task automatic issue(logic [1:0] c, int s_of = 0, int s_ol = 0, logic [63:0] v = 0);
    @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_sof = 7'(s_of); cmd_sol = 7'(s_ol); cmd_val = v;
    @(negedge clk);
    cmd_valid = 0;
    while (busy) @(negedge clk);
  endtask
  initial begin
    int b, depth; int sofs[16], sols[16], bofs[16]; logic [63:0] pfss[16];
    for (int i = 0; i < 128; i++) rf[i] = 0;
    cmd_valid = 0; cmd = 0; cmd_sof = 0; cmd_sol = 0; cmd_val = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    chk("reset sof", cfm.sof, PS); chk("reset bof", bof, 0);
    for (int trial = 0; trial < 40; trial++) begin
      b = 0 + int'(bof);
      depth = $urandom_range(2, 10);
      // level 0 frame: alloc, fill locals, call ... level depth-1
      for (int d = 0; d < depth; d++) begin
        int so, sl;
        so = $urandom_range(8, 60); sl = $urandom_range(2, so - 1);
        issue(2'd1, so, sl);
        chk("alloc sof", cfm.sof, so); chk("alloc sol", cfm.sol, sl);
        chk("alloc keeps bof", bof, b % PS);
        chk("ndirty bound", 32'(int'(ndirty) + so <= PS), 1);
        sofs[d] = so; sols[d] = sl; bofs[d] = b; pfss[d] = pfs;
        for (int i = 0; i < sl; i++) rf[phys(b, i)] = {trial[15:0], 8'(d), 8'(i), 32'hC0DE};
        if (d == depth - 1) break;
        issue(2'd0);
        chk("call pfs", pfs, {50'b0, 7'(sl), 7'(so)});
        b = b + sl;
        chk("call bof", bof, b % PS);
        chk("call sof", cfm.sof, so - sl);
        chk("call sol", cfm.sol, 0);
      end
      for (int d = depth - 2; d >= 0; d--) begin
        issue(2'd3, 0, 0, {50'b0, 7'(sols[d]), 7'(sofs[d])});
        issue(2'd2);
        b = bofs[d];
        chk("ret bof", bof, b % PS);
        chk("ret sof", cfm.sof, sofs[d]);
        chk("ret sol", cfm.sol, sols[d]);
        chk("ndirty bound", 32'(int'(ndirty) + sofs[d] <= PS), 1);
        for (int i = 0; i < sols[d]; i++)
          chk($sformatf("local %0d of level %0d", i, d), rf[phys(b, i)], {trial[15:0], 8'(d), 8'(i), 32'hC0DE});
        issue(2'd3, 0, 0, pfss[d]);
      end
    end
    chk("spills happened", 32'(nspill > 0), 1);
    chk("fills happened", 32'(nfill > 0), 1);
    $display("spills=%0d fills=%0d", nspill, nfill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5000000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
