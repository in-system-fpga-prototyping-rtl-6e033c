// stack_rename: the stack stage's register renaming for one instruction.
//
// Registers r0..r31 are static and keep their number. Registers r32 and
// up belong to the current register-stack frame and are mapped onto the
// PHYS_STACKED stacked physical registers, which are used as a circular
// buffer: physical = 32 + (bof + r - 32) mod PHYS_STACKED, where bof is the
// physical position of the frame's first register (kept by the register
// stack engine). This is the document's "simple offset in the circularly
// indexed rotating register file". Rotation of the rotating region
// (register rename base for software-pipelined loops) is not modelled: the
// document supports no loop-branch instructions that would move it.
// Combinational.
module stack_rename
  import ia64_pkg::*;
 #(
  parameter int PHYS_STACKED = 96
) (
  input  inst_t      in,
  input  logic [6:0] bof,
  output inst_t      out
);
  function automatic logic [6:0] map(input logic [6:0] r, input logic [6:0] base);
    logic [7:0] s;
    if (r < 7'(NSTATIC)) return r;
    s = 8'(r) - 8'(NSTATIC) + 8'(base);
    if (s >= 8'(PHYS_STACKED)) s = s - 8'(PHYS_STACKED);
    return 7'(s + 8'(NSTATIC));
  endfunction

  always_comb begin
    out      = in;
    out.u.r1 = map(in.u.r1, bof);
    out.u.r2 = map(in.u.r2, bof);
    out.u.r3 = map(in.u.r3, bof);
  end
endmodule
