// tb_branch_unit: taken/not-taken outcome from the predicate, IP-relative
// and indirect targets, return link, and mispredict detection against the
// front end's prediction, including the resume point after a not-taken
// mispredict (next slot, or next bundle after slot 2).
module tb_branch_unit;
  import ia64_pkg::*;
  inst_t in; logic qp_val; logic [63:0] b2_val;
  logic is_br, taken, mis; logic [63:0] target, rip, link; logic [1:0] rslot;
  int checks = 0, failures = 0;
  branch_unit dut (.in, .qp_val, .b2_val, .is_br, .taken, .target, .mispredict(mis),
                   .redir_ip(rip), .redir_slot(rslot), .link);
  task automatic chk(string w, logic [63:0] g, logic [63:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [63:0] etgt, erip; logic etk, emis; logic [1:0] ers;
      in = '0;
      in.u.valid = 1'b1;
      case (t % 4)
        0: in.u.op = OP_BR_COND;
        1: in.u.op = OP_BR_CALL;
        2: in.u.op = OP_BR_RET;
        default: in.u.op = OP_ADD;
      endcase
      in.u.use_imm = (in.u.op == OP_BR_RET) ? 1'b0 : 1'($urandom);
      in.u.imm  = {{40{1'b1}}, 24'($urandom)} & ~64'hF;
      if (t[3]) in.u.imm = 64'($urandom_range(0, 4096)) << 4;
      in.ip     = {32'h0, $urandom} & ~64'hF;
      in.slot   = 2'($urandom_range(0, 2));
      qp_val    = 1'($urandom);
      b2_val    = {$urandom, $urandom};
      etk       = (in.u.op != OP_ADD) && qp_val;
      etgt      = in.u.use_imm ? in.ip + in.u.imm : {b2_val[63:4], 4'b0};
      in.pred_tk  = 1'($urandom);
      in.pred_tgt = t[5] ? etgt : etgt + 64'h10;
      emis = (etk != in.pred_tk) || (etk && in.pred_tgt != etgt);
      if (etk) begin erip = etgt; ers = 0; end
      else if (in.slot == 2) begin erip = in.ip + 16; ers = 0; end
      else begin erip = in.ip; ers = in.slot + 1; end
      #1;
      chk("taken", taken, etk);
      chk("mispredict", mis, emis);
      chk("redir_ip", rip, erip);
      chk("redir_slot", rslot, ers);
      chk("link", link, in.ip + 16);
      if (etk) chk("target", target, etgt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
