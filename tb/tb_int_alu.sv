// tb_int_alu: random and corner-case checks of the integer unit against a
// reference model written in the testbench.
module tb_int_alu;
  import ia64_pkg::*;
  op_e op; crel_e crel; logic c4; logic [1:0] cnt; logic [63:0] a, b, y; logic rel;
  int checks = 0, failures = 0;
  int_alu dut (.op, .crel, .c4, .cnt, .a, .b, .y, .rel);

  function automatic logic [63:0] ref_y(op_e o, logic [63:0] x, logic [63:0] z, logic [1:0] n);
    case (o)
      OP_ADD: return x + z;          OP_SUB: return x - z;
      OP_AND: return x & z;          OP_ANDCM: return x & ~z;
      OP_OR: return x | z;           OP_XOR: return x ^ z;
      OP_SHLADD: return (x << (n + 1)) + z;
      OP_MUL: return x * z;
      default: return x;
    endcase
  endfunction
  function automatic logic ref_rel(crel_e r, logic w4, logic [63:0] x, logic [63:0] z);
    longint sx, sz;
    sx = w4 ? longint'($signed(x[31:0])) : $signed(x);
    sz = w4 ? longint'($signed(z[31:0])) : $signed(z);
    case (r)
      CR_EQ: return w4 ? x[31:0] == z[31:0] : x == z;
      CR_LT: return sx < sz;
      default: return w4 ? x[31:0] < z[31:0] : x < z;
    endcase
  endfunction

  initial begin
    op_e ops [9] = '{OP_ADD, OP_SUB, OP_AND, OP_ANDCM, OP_OR, OP_XOR, OP_SHLADD, OP_MUL, OP_MOVL};
    for (int i = 0; i < 3000; i++) begin
      op = ops[i % 9]; crel = crel_e'(i % 3); c4 = i[4]; cnt = 2'($urandom);
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (i % 7 == 0) b = a;
      if (i % 11 == 0) a = 64'h8000_0000_0000_0000;
      #1;
      checks += 2;
      if (y !== ref_y(op, a, b, cnt)) begin failures++; $display("FAIL y op=%s a=%h b=%h y=%h", op.name(), a, b, y); end
      if (rel !== ref_rel(crel, c4, a, b)) begin failures++; $display("FAIL rel %0d c4=%b a=%h b=%h", crel, c4, a, b); end
    end
    // signed vs unsigned compare corner
    op = OP_CMP; crel = CR_LT; c4 = 0; a = '1; b = 64'd1; #1;
    checks++; if (rel !== 1'b1) failures++;
    crel = CR_LTU; #1;
    checks++; if (rel !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
