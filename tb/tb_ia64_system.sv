// tb_ia64_system: end-to-end test of the whole processor at its default
// sizes.
//
// Assembles a program with the testbench assembler, places it in the main
// memory model at 0x1000, starts the processor with a snooped host write
// and runs until it halts on break. The program exercises integer
// arithmetic and logic, shladd, movl, the multiplier, loads and stores of
// several sizes, a load-use stall, operand bypassing, a predicated-off
// producer that the bypass must skip, a compare feeding a branch in the
// same group, a counted loop (mispredicts while the predictor learns), a
// group split for lack of M ports, and a recursive function whose
// register-stack frames overflow the stacked registers, so the stack
// engine spills and later fills. Final register values are compared with
// values worked out by hand, and each mechanism's counter must be
// non-zero. Finally the state dump the processor writes to memory at
// halt is compared with the halt bundle, the predicates, the counters and
// every physical register read back directly.
module tb_ia64_system;
  import ia64_asm::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic snoop_valid;
  logic [63:0] snoop_addr, snoop_data;
  logic running, halted, dump_done;
  logic [3:0] ctr_sel;
  logic [63:0] ctr_val, dbg_rd, dbg_pr;
  logic [6:0] dbg_ra;
  logic mem_valid, mem_ready, mem_we, mem_rvalid;
  logic [63:0] mem_addr, mem_be;
  logic [511:0] mem_wdata, mem_rdata;
  int n_reads, n_writes;

  ia64_system dut (
    .clk, .rst_n, .snoop_valid, .snoop_addr, .snoop_data, .running, .halted, .dump_done, .ctr_sel, .ctr_val,
    .dbg_ra, .dbg_rd, .dbg_pr, .mem_valid, .mem_ready, .mem_addr, .mem_we, .mem_wdata, .mem_be,
    .mem_rvalid, .mem_rdata
  );
  main_mem_model #(.LAT(10), .LINES(1024)) u_mem (
    .clk, .rst_n, .req_valid(mem_valid), .req_ready(mem_ready), .req_addr(mem_addr), .req_we(mem_we),
    .req_wdata(mem_wdata), .req_be(mem_be), .resp_valid(mem_rvalid), .resp_rdata(mem_rdata),
    .n_reads, .n_writes
  );

  int checks = 0, failures = 0;
  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  localparam logic [63:0] CODE = 64'h1000;
  logic [127:0] prog [64];
  int np = 0;
  function automatic void emit(logic [127:0] b); prog[np] = b; np++; endfunction

  localparam int FUNC = 32;     // bundle index of the recursive function
  localparam int NARG = 6;

  initial begin
    int cyc;
    for (int i = 0; i < 64; i++) prog[i] = bundle(T_MII_S, nop(), nop(), nop());
    // ---- straight-line part ----
    emit(bundle_mlx(T_MLX_S, nop(), movl(7'd8, 64'h4000)));                        // 0
    emit(bundle_mlx(T_MLX_S, nop(), movl(7'd9, 64'h1122334455667788)));            // 1
    emit(bundle(T_MII_S, adds(10, 5, 0), adds(11, 7, 0), adds(12, 100, 0)));       // 2
    emit(bundle(T_MII_S, add(13, 10, 11), sub(14, 12, 10), shladd(15, 10, 2, 11)));// 3 bypass
    emit(bundle(T_MMI_S, st(3, 8, 9), adds(16, 8, 8), xorr(17, 13, 14)));          // 4
    emit(bundle(T_MMI_S, st(3, 16, 15), ld(0, 21, 16), nop()));                   // 5 st->ld, one group
    emit(bundle(T_MMI_S, ld(3, 18, 8), ld(2, 20, 8), nop()));                      // 6
    emit(bundle(T_MII_S, nop(), add(19, 18, 10), cmp(2, 6, 7, 10, 11)));           // 7 load-use
    emit(bundle(T_MII_S, adds(22, 50, 0), nop(), nop()));                          // 8
    emit(bundle(T_MII_S, nop(), adds(22, 60, 0, 6), nop()));                       // 9 p6 false
    emit(bundle(T_MII_S, nop(), add(23, 22, 0), nop()));                           // 10
    emit(bundle(T_MFI_S, nop(), xmpy(24, 10, 11), nop()));                         // 11
    emit(bundle(T_MMI,   adds(29, 1, 0), adds(30, 2, 0), nop()));                  // 12 split
    emit(bundle(T_MMI_S, adds(31, 3, 0), adds(7, 4, 0), nop()));                   // 13
    emit(bundle(T_MII_S, adds(25, 0, 0), adds(26, 10, 0), nop()));                 // 14
    emit(bundle(T_MII_S, adds(25, 1, 25), nop(), nop()));                          // 15 loop
    emit(bundle(T_MIB_S, cmp(0, 8, 9, 25, 26), nop(), br_cond(15 - 16, 8)));      // 16
    emit(bundle(T_MMI_S, alloc(33, 0, 2, 1), nop(), adds(34, NARG, 0)));           // 17
    emit(bundle(T_MIB_S, nop(), nop(), br_call(0, FUNC - 18)));                    // 18
    emit(bundle(T_MII_S, add(27, 8, 0), andi(28, 12, 17), addl(5, 'h1180, 0)));    // 19
    emit(bundle(T_MIB_S, nop(), mov_tobr(6, 5), nopb()));                          // 20
    emit(bundle(T_MIB_S, nop(), nop(), br_ind(6)));                                // 21 -> 24
    emit(bundle(T_MII_S, adds(27, 999, 0), nop(), nop()));                         // 22 skipped
    emit(bundle(T_MII_S, adds(27, 998, 0), nop(), nop()));                         // 23 skipped
    emit(bundle(T_MII_S, brk(), nop(), nop()));                                    // 24
    // ---- sum(n) = n + sum(n-1), frames of 32 registers ----
    np = FUNC;
    emit(bundle(T_MII_S, alloc(34, 1, 30, 1), mov_frombr(33, 0), nop()));          // F0
    emit(bundle(T_MII_S, cmpi(2, 6, 7, 0, 32), adds(63, -1, 32), nop()));          // F1
    emit(bundle(T_MIB_S, nop(), nop(), br_cond(FUNC + 6 - (FUNC + 2), 6)));       // F2
    emit(bundle(T_MIB_S, nop(), nop(), br_call(0, FUNC - (FUNC + 3))));            // F3
    emit(bundle(T_MII_S, add(8, 8, 32), mov_tobr(0, 33), mov_topfs(34)));          // F4
    emit(bundle(T_MIB_S, nop(), nop(), br_ret(0)));                                // F5
    emit(bundle(T_MII_S, adds(8, 0, 0), mov_tobr(0, 33), mov_topfs(34)));          // F6
    emit(bundle(T_MIB_S, nop(), nop(), br_ret(0)));                                // F7

    for (int i = 0; i < 64; i++) begin
      logic [63:0] a;
      a = CODE + 64'(16 * i);
      u_mem.mem[a[31:6]][a[5:4]*128 +: 128] = prog[i];
    end
    snoop_valid = 1'b0; snoop_addr = '0; snoop_data = '0; ctr_sel = '0; dbg_ra = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    snoop_valid <= 1'b1; snoop_addr <= 64'h0000_0000_FFFF_0000; snoop_data <= CODE;
    @(posedge clk);
    snoop_valid <= 1'b0;
    cyc = 0;
    while (!halted && cyc < 100000) begin @(posedge clk); cyc++; end
    // the state dump owns the register read port until it is done
    begin
      int t = 0;
      while (!dump_done && t < 5000) begin @(posedge clk); t++; end
    end
    check("halted", 64'(halted), 64'd1);
    begin
      logic [63:0] exp [32];
      bit          want [32];
      for (int i = 0; i < 32; i++) begin exp[i] = '0; want[i] = 1'b0; end
      exp[8]  = 64'(NARG * (NARG + 1) / 2);
      exp[9]  = 64'h1122334455667788;
      exp[10] = 5;  exp[11] = 7;  exp[12] = 100; exp[13] = 12; exp[14] = 95;
      exp[15] = 27; exp[16] = 64'h4008; exp[17] = 12 ^ 95;
      exp[18] = 64'h1122334455667788; exp[19] = 64'h1122334455667788 + 5;
      exp[20] = 64'h55667788; exp[21] = 27; exp[22] = 50; exp[23] = 50; exp[24] = 35;
      exp[25] = 10; exp[26] = 10; exp[27] = exp[8]; exp[28] = 12 & 83;
      exp[5] = 64'h1180; exp[29] = 1; exp[30] = 2; exp[31] = 3; exp[7] = 4;
      foreach (want[i]) want[i] = (i >= 5 && i != 6);
      for (int i = 1; i < 32; i++)
        if (want[i]) begin
          dbg_ra = 7'(i); #1;
          check($sformatf("r%0d", i), dbg_rd, exp[i]);
        end
    end
    // memory written through to main memory
    check("mem[0x4000]", u_mem.mem[64'h4000 >> 6][63:0], 64'h1122334455667788);
    check("mem[0x4008]", u_mem.mem[64'h4000 >> 6][127:64], 64'd27);
    // every mechanism happened
    begin
      string nm [12];
      nm = '{"cycles", "retired", "branches", "mispredicts", "raw stalls", "bypasses",
             "predicate forwards", "split issues", "spills", "fills", "L3 hits", "L3 misses"};
      for (int i = 0; i < 12; i++) begin
        ctr_sel = 4'(i); #1;
        $display("counter %-18s %0d", nm[i], ctr_val);
        checks++;
        if (ctr_val == 0) begin failures++; $display("FAIL mechanism never happened: %s", nm[i]); end
      end
    end
    // state dump at 0xFFFE0000, which the memory model folds onto line 0
    begin
      logic [511:0] l0, l1;
      check("dump done", 64'(dump_done), 64'd1);
      l0 = u_mem.mem[0]; l1 = u_mem.mem[1];
      check("dump halt ip", l0[63:0], CODE + 64'd16 * 24);
      check("dump predicates", l0[127:64], dbg_pr);
      for (int i = 0; i < 12; i++) begin
        ctr_sel = 4'(i); #1;
        check($sformatf("dump ctr%0d", i), (i < 6) ? l0[128 + 64*i +: 64] : l1[64*(i-6) +: 64], ctr_val);
      end
      for (int i = 0; i < 128; i++) begin
        dbg_ra = 7'(i); #1;
        check($sformatf("dump p%0d", i), u_mem.mem[2 + i/8][64*(i%8) +: 64], dbg_rd);
      end
    end
    $display("ran %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
