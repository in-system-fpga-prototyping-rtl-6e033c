// int_alu: one integer execution unit (combinational, one cycle).
//
// Does the 64-bit arithmetic and logical operations, shladd, the integer
// compares and the fixed-point multiply (low 64 bits of the product). The
// first operand a is either the r2 value or the immediate, the second
// operand b is always the r3 value, as in the Itanium A-type formats
// (sub r1 = r2, r3 gives a - b; cmp.lt p1, p2 = r2, r3 gives a < b).
// For OP_MOVL and the register moves the result is simply a; the caller
// places the immediate or the moved value there. cmp4 compares the low
// 32 bits. The multiplier is a single-cycle array here; the document only
// says the integer units do fixed-point multiply, so its latency is this
// design's choice.
module int_alu
  import ia64_pkg::*;
 (
  input  op_e         op,
  input  crel_e       crel,
  input  logic        c4,
  input  logic [1:0]  cnt,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y,
  output logic        rel     // compare outcome
);
  logic [63:0] ca, cb;
  always_comb begin
    ca = c4 ? {{32{a[31]}}, a[31:0]} : a;
    cb = c4 ? {{32{b[31]}}, b[31:0]} : b;
    unique case (crel)
      CR_EQ:   rel = (ca == cb);
      CR_LT:   rel = ($signed(ca) < $signed(cb));
      default: rel = c4 ? (a[31:0] < b[31:0]) : (a < b);
    endcase
    unique case (op)
      OP_ADD:    y = a + b;
      OP_SUB:    y = a - b;
      OP_AND:    y = a & b;
      OP_ANDCM:  y = a & ~b;
      OP_OR:     y = a | b;
      OP_XOR:    y = a ^ b;
      OP_SHLADD: y = (a << (3'(cnt) + 3'd1)) + b;
      OP_MUL:    y = a * b;
      default:   y = a;
    endcase
  end
endmodule
