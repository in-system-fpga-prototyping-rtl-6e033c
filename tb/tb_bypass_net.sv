// tb_bypass_net: the youngest producer whose predicate is true supplies the
// operand; predicated-off producers and r0 are skipped; otherwise the
// register-file value is used. Random producer sets against a reference.
module tb_bypass_net;
  localparam int N = 8;
  logic [6:0] src; logic [63:0] rf_val, val; logic hit;
  logic pv [N]; logic [6:0] pdst [N]; logic [63:0] pval [N];
  int checks = 0, failures = 0;
  bypass_net #(.NSRC(N)) dut (.src, .rf_val, .pv, .pdst, .pval, .val, .hit);
  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [63:0] e; logic eh;
      src = 7'($urandom_range(0, 5)); rf_val = {$urandom, $urandom};
      for (int i = 0; i < N; i++) begin
        pv[i] = 1'($urandom); pdst[i] = 7'($urandom_range(0, 5)); pval[i] = {$urandom, $urandom};
      end
      e = rf_val; eh = 0;
      for (int i = 0; i < N; i++)
        if (!eh && pv[i] && pdst[i] == src && src != 0) begin e = pval[i]; eh = 1; end
      #1;
      checks++;
      if (val !== e || hit !== eh) begin failures++; $display("FAIL src=%0d val=%h exp=%h", src, val, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
