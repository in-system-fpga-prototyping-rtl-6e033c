// tb_gr_file: random writes and reads against a reference array; r0 stays
// zero; a read of a register written in the same cycle sees the new value.
module tb_gr_file;
  localparam int NR = 4, NW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [6:0] ra [NR]; logic [63:0] rd [NR];
  logic we [NW]; logic [6:0] wa [NW]; logic [63:0] wd [NW];
  logic [63:0] model [128];
  int checks = 0, failures = 0;
  gr_file #(.NREGS(128), .NR(NR), .NW(NW)) dut (.clk, .rst_n, .ra, .rd, .we, .wa, .wd);
  initial begin
    for (int i = 0; i < 128; i++) model[i] = 0;
    for (int w = 0; w < NW; w++) begin we[w] = 0; wa[w] = 0; wd[w] = 0; end
    for (int r = 0; r < NR; r++) ra[r] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // distinct write addresses
      for (int w = 0; w < NW; w++) begin
        we[w] = 1'($urandom); wa[w] = 7'(w * 40 + $urandom_range(0, 39)); wd[w] = {$urandom, $urandom};
        if (t % 50 == 0) wa[w] = 0;
      end
      for (int r = 0; r < NR; r++) ra[r] = (r == 0) ? wa[0] : 7'($urandom);
      #1;
      for (int r = 0; r < NR; r++) begin
        logic [63:0] e;
        e = model[ra[r]];
        for (int w = 0; w < NW; w++) if (we[w] && wa[w] == ra[r]) e = wd[w];
        if (ra[r] == 0) e = 0;
        checks++;
        if (rd[r] !== e) begin failures++; $display("FAIL r%0d got %h exp %h", ra[r], rd[r], e); end
      end
      @(posedge clk);
      for (int w = 0; w < NW; w++) if (we[w] && wa[w] != 0) model[wa[w]] = wd[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
