// tb_mem_stride: the memory-stride workload on the whole system at default
// sizes. An IA-64 program walks a region with a fixed stride, loading one
// 8-byte word per step, for P passes, then halts. Region and stride pairs
// are chosen so that the lines touched fit, in turn, in the L1 data cache
// (8 KB with a 64-byte stride: 128 lines), in the L2 but not the L1 (64 KB
// with a 512-byte stride: 128 lines in 8 L1 sets of 4 ways, but in 32 L2
// sets of 6 ways), in the L3 only (1 MB with a 4 KB stride: 256 lines, 4
// L2 sets) and in none of them (8 MB with a 4 KB stride: 2048 lines in 256
// L3 sets of 4 ways, walked cyclically under round-robin replacement). Each region is run with P = 1 and P = 3
// from reset; the difference of the cycle counters over the 2 extra passes
// gives the steady-state cycles per load. The core freezes on a miss, so
// this is the loop's own cost plus the latency of the level that holds
// the line. Checks: the four levels are ordered, the L2, L3 and memory
// levels add at least 6, 21 and 100 cycles over an L1 hit (and less than
// twice that, so nothing is lost or retried), and the L3 hit and miss
// counters show the expected behaviour for the last two regions.
module tb_mem_stride;
  import ia64_asm::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic snoop_valid; logic [63:0] snoop_addr, snoop_data;
  logic running, halted, dump_done; logic [3:0] ctr_sel; logic [63:0] ctr_val, dbg_rd, dbg_pr; logic [6:0] dbg_ra;
  logic mem_valid, mem_ready, mem_we, mem_rvalid; logic [63:0] mem_addr, mem_be;
  logic [511:0] mem_wdata, mem_rdata; int n_reads, n_writes;
  ia64_system dut (
    .clk, .rst_n, .snoop_valid, .snoop_addr, .snoop_data, .running, .halted, .dump_done, .ctr_sel, .ctr_val,
    .dbg_ra, .dbg_rd, .dbg_pr, .mem_valid, .mem_ready, .mem_addr, .mem_we, .mem_wdata, .mem_be,
    .mem_rvalid, .mem_rdata
  );
  // the model wraps addresses onto its lines; the data region is only read
  main_mem_model #(.LAT(10), .LINES(1024)) u_mem (
    .clk, .rst_n, .req_valid(mem_valid), .req_ready(mem_ready), .req_addr(mem_addr), .req_we(mem_we),
    .req_wdata(mem_wdata), .req_be(mem_be), .resp_valid(mem_rvalid), .resp_rdata(mem_rdata),
    .n_reads, .n_writes
  );
  int checks = 0, failures = 0;
  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  localparam logic [63:0] CODE = 64'h1000, BASE = 64'h0100_0000;

  // runs the walk from reset; returns cycles, L3 hits and misses
  task automatic run(int n, int stride, int passes, output longint cyc, output longint hits, output longint miss);
    logic [127:0] prog [8];
    int t;
    prog[0] = bundle_mlx(T_MLX_S, nop(), movl(7'd20, BASE));
    prog[1] = bundle(T_MII_S, adds(21, stride, 0), adds(23, passes, 0), nop());
    prog[2] = bundle(T_MII_S, add(24, 20, 0), addl(22, n, 0), nop());            // pass start
    prog[3] = bundle(T_MII_S, ld(3, 10, 24), add(24, 24, 21), adds(22, -1, 22));  // step
    prog[4] = bundle(T_MIB_S, cmp(0, 6, 7, 0, 22), nop(), br_cond(-1, 6));
    prog[5] = bundle(T_MII_S, adds(23, -1, 23), nop(), nop());
    prog[6] = bundle(T_MIB_S, cmp(0, 8, 9, 0, 23), nop(), br_cond(-4, 8));
    prog[7] = bundle(T_MII_S, brk(), nop(), nop());
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      logic [63:0] a; a = CODE + 64'(16 * i);
      u_mem.mem[a[31:6]][a[5:4]*128 +: 128] = prog[i];
    end
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    snoop_valid <= 1'b1; snoop_addr <= 64'h0000_0000_FFFF_0000; snoop_data <= CODE;
    @(posedge clk);
    snoop_valid <= 1'b0;
    t = 0;
    while (!halted && t < 2000000) begin @(posedge clk); t++; end
    // registers are read once the state dump has finished with the read port
    while (!dump_done && t < 2010000) begin @(posedge clk); t++; end
    check("halted", 64'(halted), 1);
    ctr_sel = 4'd0;  #1; cyc  = longint'(ctr_val);
    ctr_sel = 4'd10; #1; hits = longint'(ctr_val);
    ctr_sel = 4'd11; #1; miss = longint'(ctr_val);
    dbg_ra = 7'd24; #1;
    check("pointer after the last pass", dbg_rd, BASE + 64'(n * stride));
  endtask

  initial begin
    int region_kb [4] = '{8, 64, 1024, 8192};
    int stride [4] = '{64, 512, 4096, 4096};
    string level [4] = '{"L1", "L2", "L3", "memory"};
    real per [4];
    longint h3 [4], m3 [4];
    snoop_valid = 1'b0; snoop_addr = '0; snoop_data = '0; ctr_sel = '0; dbg_ra = '0;
    for (int r = 0; r < 4; r++) begin
      longint c1, c3, h1, hh, mm1, mm; int n;
      n = region_kb[r] * 1024 / stride[r];
      run(n, stride[r], 1, c1, h1, mm1);
      run(n, stride[r], 3, c3, hh, mm);
      per[r] = real'(c3 - c1) / real'(2 * n);
      h3[r] = hh - h1; m3[r] = mm - mm1;
      $display("region %5d KB (%-6s): %0d loads/pass, %0.1f cycles per load, L3 hits %0d misses %0d in 2 passes",
               region_kb[r], level[r], n, per[r], h3[r], m3[r]);
    end
    check("L2 slower than L1", 64'(per[1] > per[0]), 1);
    check("L3 slower than L2", 64'(per[2] > per[1]), 1);
    check("memory slower than L3", 64'(per[3] > per[2]), 1);
    check("L2 adds >= 6 cycles", 64'(per[1] - per[0] >= 6.0), 1);
    check("L2 adds < 12 + overhead", 64'(per[1] - per[0] < 20.0), 1);
    check("L3 adds >= 21 cycles", 64'(per[2] - per[0] >= 21.0), 1);
    check("L3 adds < 42 cycles", 64'(per[2] - per[0] < 42.0), 1);
    check("memory adds >= 100 cycles", 64'(per[3] - per[0] >= 100.0), 1);
    check("memory adds < 200 cycles", 64'(per[3] - per[0] < 200.0), 1);
    check("1 MB region: every extra load hits the L3", 64'(h3[2] >= 2 * 256), 1);
    check("8 MB region: every extra load misses the L3", 64'(m3[3] >= 2 * 2048), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (6000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
