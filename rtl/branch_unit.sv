// branch_unit: resolves one branch in the execute stage.
//
// The outcome comes from the qualifying predicate, which the caller
// supplies already forwarded (from a compare of the same group or a
// predicate written earlier). IP-relative branches add the displacement to
// the bundle address; indirect branches and returns take the b-register.
// The outcome is compared with what the front end predicted for this slot;
// a difference is a mispredict, and 'redir_ip'/'redir_slot' say where
// execution really continues: the target, or the next slot after the
// branch. br.call also produces the return link (the next bundle's
// address) for its b-register. Combinational.
module branch_unit
  import ia64_pkg::*;
 (
  input  inst_t        in,
  input  logic         qp_val,
  input  logic [63:0]  b2_val,
  output logic         is_br,
  output logic         taken,
  output logic [63:0]  target,
  output logic         mispredict,
  output logic [63:0]  redir_ip,
  output logic [1:0]   redir_slot,
  output logic [63:0]  link
);
  always_comb begin
    is_br  = in.u.valid && (in.u.op == OP_BR_COND || in.u.op == OP_BR_CALL || in.u.op == OP_BR_RET);
    taken  = is_br && qp_val;
    target = in.u.use_imm ? in.ip + in.u.imm : {b2_val[63:4], 4'b0};
    link   = in.ip + 64'd16;
    mispredict = in.u.valid && ((taken != in.pred_tk) || (taken && target != {in.pred_tgt[63:4], 4'b0}));
    if (taken) begin
      redir_ip = target; redir_slot = 2'd0;
    end else if (in.slot == 2'd2) begin
      redir_ip = in.ip + 64'd16; redir_slot = 2'd0;
    end else begin
      redir_ip = in.ip; redir_slot = in.slot + 2'd1;
    end
  end
endmodule
