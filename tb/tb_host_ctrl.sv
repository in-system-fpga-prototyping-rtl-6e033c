// tb_host_ctrl: checks that only a write to the start address produces the
// one-cycle start pulse with the written bundle address, that such a write
// clears the counters, and that every counter follows a reference count of
// random events (the cycle counter only while running, the retire counter
// by 0..6 per cycle). At the end of each round the processor halts and the
// state dump is checked: 18 line writes to consecutive lines from the dump
// address, under random ready and acknowledge delays, holding the halt
// address, the predicates, the counters and the 128 registers (served by a
// register model whose value is a function of the address), with
// 'dump_done' only after the last acknowledge.
module tb_host_ctrl;
  localparam int NCTR = 12;
  localparam logic [63:0] SA = 64'h0000_0000_FFFF_0000;
  logic clk = 0, rst_n = 0;
  logic snoop_valid; logic [63:0] snoop_addr, snoop_data;
  logic start; logic [63:0] start_ip; logic running; logic [2:0] ev_retire;
  logic ev [NCTR-2]; logic [3:0] ctr_sel; logic [63:0] ctr_val;
  longint unsigned ref_c [NCTR];
  localparam logic [63:0] DA = 64'h0000_0000_FFFE_0000;
  logic halted; logic [63:0] halt_ip, pr_val, rd_val; logic [6:0] rd_ra;
  logic dumping, dump_done, d_valid, d_ready, d_ack; logic [63:0] d_addr; logic [511:0] d_wdata;
  function automatic logic [63:0] regval(logic [6:0] a); return {a, 25'h1abcdef, ~a, 25'h0f0f0f}; endfunction
  assign rd_val = regval(rd_ra);
  int checks = 0, failures = 0;
  host_ctrl #(.START_ADDR(SA), .DUMP_ADDR(DA), .NCTR(NCTR)) dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string w, logic [63:0] g, logic [63:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    snoop_valid = 0; snoop_addr = 0; snoop_data = 0; running = 0; ev_retire = 0; ctr_sel = 0;
    halted = 0; halt_ip = 0; pr_val = 0; d_ready = 0; d_ack = 0;
    for (int i = 0; i < NCTR-2; i++) ev[i] = 0;
    for (int i = 0; i < NCTR; i++) ref_c[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      // a write elsewhere must not start
      @(negedge clk); snoop_valid = 1; snoop_addr = SA + 8; snoop_data = 64'h1234;
      @(negedge clk); snoop_valid = 0; chk("no start", start, 0);
      @(negedge clk); snoop_valid = 1; snoop_addr = SA; snoop_data = 64'h1000 * (r + 1);
      @(negedge clk); snoop_valid = 0;
      chk("start pulse", start, 1); chk("start ip", start_ip, 64'h1000 * (r + 1));
      for (int i = 0; i < NCTR; i++) ref_c[i] = 0;
      @(negedge clk); chk("pulse is one cycle", start, 0);
      for (int i = 0; i < NCTR; i++) ref_c[i] = 0;
      // counters were cleared by the start write; the cycle after it counts
      // only if running was set, which it is not yet
      for (int c = 0; c < 500; c++) begin
        running = 1'($urandom); ev_retire = 3'($urandom_range(0, 6));
        for (int i = 0; i < NCTR-2; i++) ev[i] = ($urandom_range(0, 3) == 0);
        @(posedge clk);
        if (running) ref_c[0]++;
        ref_c[1] += ev_retire;
        for (int i = 0; i < NCTR-2; i++) if (ev[i]) ref_c[i+2]++;
        @(negedge clk);
      end
      running = 0; ev_retire = 0; for (int i = 0; i < NCTR-2; i++) ev[i] = 0;
      for (int i = 0; i < NCTR; i++) begin
        ctr_sel = 4'(i); #1; chk($sformatf("ctr%0d", i), ctr_val, ref_c[i]);
      end
      ctr_sel = 4'd15; #1; chk("unused select", ctr_val, 0);
      // halt and dump
      @(negedge clk); halted = 1; halt_ip = {$urandom, $urandom}; pr_val = {$urandom, $urandom_range(0, 32'h7fffffff), 1'b1};
      for (int l = 0; l < 18; l++) begin
        logic [511:0] e;
        int w;
        w = 0;
        while (!d_valid && w < 100) begin @(negedge clk); w++; end
        chk("dump request", d_valid, 1); chk("not done early", dump_done, 0);
        repeat ($urandom_range(0, 3)) begin @(negedge clk); chk("request held", d_valid, 1); end
        chk($sformatf("dump addr %0d", l), d_addr, DA + 64'(64 * l));
        if (l == 0) e = {64'(ref_c[5]), 64'(ref_c[4]), 64'(ref_c[3]), 64'(ref_c[2]), 64'(ref_c[1]),
                         64'(ref_c[0]), pr_val, halt_ip};
        else if (l == 1) e = {128'd0, 64'(ref_c[11]), 64'(ref_c[10]), 64'(ref_c[9]), 64'(ref_c[8]),
                              64'(ref_c[7]), 64'(ref_c[6])};
        else for (int k = 0; k < 8; k++) e[64*k +: 64] = regval(7'((l - 2) * 8 + k));
        chk($sformatf("dump line %0d lo", l), d_wdata[255:0] == e[255:0], 1);
        chk($sformatf("dump line %0d hi", l), d_wdata[511:256] == e[511:256], 1);
        d_ready = 1; @(negedge clk); d_ready = 0;
        chk("one request", d_valid, 0);
        repeat ($urandom_range(0, 4)) @(negedge clk);
        d_ack = 1; @(negedge clk); d_ack = 0;
      end
      chk("dump done", dump_done, 1); chk("idle after dump", dumping, 0);
      repeat (5) begin @(negedge clk); chk("no further request", d_valid, 0); end
      halted = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
