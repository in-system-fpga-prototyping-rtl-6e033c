// tb_stack_rename: static registers keep their number, stacked registers
// are offset by the frame base and wrap around the stacked physical file.
module tb_stack_rename;
  import ia64_pkg::*;
  inst_t in, out; logic [6:0] bof;
  int checks = 0, failures = 0;
  stack_rename #(.PHYS_STACKED(96)) dut (.in, .bof, .out);
  function automatic logic [6:0] ref_map(int r, int b);
    if (r < 32) return 7'(r);
    return 7'(32 + (r - 32 + b) % 96);
  endfunction
  initial begin
    for (int t = 0; t < 4000; t++) begin
      in = '0;
      in.u.r1 = 7'($urandom); in.u.r2 = 7'($urandom); in.u.r3 = 7'($urandom);
      in.ip = {$urandom, $urandom};
      bof = 7'($urandom_range(0, 95));
      #1;
      checks += 4;
      if (out.u.r1 !== ref_map(in.u.r1, bof)) begin failures++; $display("FAIL r1 %0d bof %0d -> %0d", in.u.r1, bof, out.u.r1); end
      if (out.u.r2 !== ref_map(in.u.r2, bof)) failures++;
      if (out.u.r3 !== ref_map(in.u.r3, bof)) failures++;
      if (out.ip !== in.ip) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
