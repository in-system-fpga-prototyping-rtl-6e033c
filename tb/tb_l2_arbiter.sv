// tb_l2_arbiter: two random requesters (instruction and data side) share
// one downstream port modelled with random ready and response delays.
// Checks that the data side wins when both ask, that only one request is
// outstanding at a time, that each response goes back to its requester
// with the data the downstream returned for that request, and that each
// requester receives exactly one response per request.
module tb_l2_arbiter;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid[2], in_ready[2], in_we[2], in_rvalid[2];
  logic [63:0] in_addr[2]; logic [W*8-1:0] in_wdata[2], in_rdata[2]; logic [W-1:0] in_be[2];
  logic out_valid, out_ready, out_we, out_rvalid;
  logic [63:0] out_addr; logic [W*8-1:0] out_wdata, out_rdata; logic [W-1:0] out_be;
  int checks = 0, failures = 0;
  int sent[2], got[2];
  logic waiting[2];
  logic [63:0] pend_addr[2];
  logic ds_busy; int ds_cnt; logic [63:0] ds_addr;
  l2_arbiter #(.W(W)) dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string w, logic [63:0] g, logic [63:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  // downstream: accept with random ready, answer after random delay with
  // data derived from the address
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin ds_busy <= 0; ds_cnt <= 0; ds_addr <= 0; end
    else if (!ds_busy && out_valid && out_ready) begin
      ds_busy <= 1; ds_cnt <= $urandom_range(0, 5); ds_addr <= out_addr;
    end else if (ds_busy && ds_cnt > 0) ds_cnt <= ds_cnt - 1;
    else if (ds_busy && out_rvalid) ds_busy <= 0;
  always_comb begin
    out_rvalid = ds_busy && ds_cnt == 0;
    out_rdata  = ds_addr[31:0] ^ 32'hA5A5_0000;
  end
  initial begin
    for (int i = 0; i < 2; i++) begin
      in_valid[i] = 0; in_addr[i] = 0; in_we[i] = 0; in_wdata[i] = 0; in_be[i] = 0;
      sent[i] = 0; got[i] = 0; waiting[i] = 0; pend_addr[i] = 0;
    end
    out_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      out_ready = 1'($urandom);
      for (int i = 0; i < 2; i++)
        if (!waiting[i] && !in_valid[i] && $urandom_range(0, 2) == 0) begin
          in_valid[i] = 1; in_addr[i] = {31'h0, 1'(i), $urandom}; in_we[i] = 1'($urandom);
          in_wdata[i] = $urandom; in_be[i] = '1;
        end
      #1;
      if (in_valid[0] && in_valid[1]) chk("data wins", in_ready[0], 0);
      chk("one grant", 32'(in_ready[0] && in_ready[1]), 0);
      @(posedge clk);
      for (int i = 0; i < 2; i++) begin
        if (in_rvalid[i]) begin
          chk("response expected", waiting[i], 1);
          chk("response data", in_rdata[i], pend_addr[i][31:0] ^ 32'hA5A5_0000);
          waiting[i] = 0; got[i]++;
        end
        if (in_valid[i] && in_ready[i]) begin
          chk("address forwarded", out_addr, in_addr[i]);
          waiting[i] = 1; pend_addr[i] = in_addr[i]; sent[i]++;
          in_valid[i] <= 0;
        end
      end
    end
    repeat (20) @(posedge clk) for (int i = 0; i < 2; i++) if (in_rvalid[i]) begin got[i]++; waiting[i] = 0; end
    for (int i = 0; i < 2; i++) chk("all answered", got[i], sent[i]);
    chk("both sides served", 32'(sent[0] > 100 && sent[1] > 100), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
