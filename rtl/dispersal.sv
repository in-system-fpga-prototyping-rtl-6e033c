// dispersal: decode and dispersal stages, sharing one pipeline stage.
//
// An issue window holds up to two bundles taken from the fetch queue in
// the same cycle. Six decoders (one per slot) turn them into uops. Each
// cycle the stage issues, in program order, the next instructions of the
// current instruction group: it stops after a stop bit, at the end of the
// window, or when the next instruction finds no free port of its type
// (a split issue; the rest goes next cycle). Ports: M-slot instructions
// use M0/M1, I-, F- and X-slot instructions use I0/I1 (the F slot's only
// supported operation is the integer multiply), B-slot instructions
// B0/B1/B2. The window is refilled only when all its instructions have
// issued, so instructions decoded in different cycles never issue
// together. This is the issue policy the document describes, and it caps
// a stream of integer instructions at 3 per cycle (4 then 2).
//
// The window also drops the slots before the resume slot of a redirect and
// the slots after a slot predicted taken. The issue group goes out in a
// register (one inst_t per port with its age in the group) and is held
// while 'stall' is high; 'flush' empties window and register.
module dispersal
  import ia64_pkg::*;
 (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          stall,
  input  logic          flush,
  input  logic [1:0]    q_count,
  input  logic [127:0]  q_bundle [2],
  input  logic [63:0]   q_ip     [2],
  input  logic [1:0]    q_start  [2],
  input  logic          q_ptk    [2],
  input  logic [1:0]    q_pslot  [2],
  input  logic [63:0]   q_ptgt   [2],
  output logic [1:0]    q_deq,
  output inst_t         grp      [NPORTS],
  output logic          split_event     // a group was cut for lack of ports
);
  logic [127:0] wb   [2];
  logic [63:0]  wip  [2];
  logic         wptk [2];
  logic [1:0]   wpsl [2];
  logic [63:0]  wptg [2];
  logic         wval [2];
  logic [5:0]   done;

  tmpl_t tm [2];
  uop_t  du [6];
  unit_e un [6];
  always_comb
    for (int b = 0; b < 2; b++) tm[b] = decode_template(wb[b][4:0]);

  for (genvar s = 0; s < 6; s++) begin : g_dec
    assign un[s] = tm[s/3].unit[s%3];
    ia64_decoder u_dec (
      .ins  (bundle_slot(wb[s/3], s%3)),
      .unit (un[s]),
      .lslot(bundle_slot(wb[s/3], 1)),
      .u    (du[s])
    );
  end

  // ---------------- issue selection ----------------
  logic [5:0] take;
  inst_t      nxt [NPORTS];
  logic       cut;
  always_comb begin
    int nm, ni, nb, age, port;
    logic go;
    nm = 0; ni = 0; nb = 0; age = 0; port = -1; go = 1'b1; cut = 1'b0;
    take = '0;
    for (int p = 0; p < NPORTS; p++) nxt[p] = '0;
    for (int s = 0; s < 6; s++) begin
      if (go && wval[s/3] && !done[s]) begin
        port = -1;
        unique case (un[s])
          U_M:           if (nm < 2) port = PORT_M0 + nm;
          U_I, U_F, U_X: if (ni < 2) port = PORT_I0 + ni;
          U_B:           if (nb < 3) port = PORT_B0 + nb;
          U_L:           port = 99;               // consumed with its X slot
          default:       if (nm < 2) port = PORT_M0 + nm;  // reserved template: halts in M
        endcase
        if (port < 0) begin
          go = 1'b0; cut = 1'b1;
        end else begin
          take[s] = 1'b1;
          if (port != 99) begin
            nxt[port].u        = du[s];
            nxt[port].u.valid  = 1'b1;
            nxt[port].ip       = wip[s/3];
            nxt[port].slot     = 2'(s % 3);
            nxt[port].age      = 3'(age);
            nxt[port].pred_tk  = wptk[s/3] && (wpsl[s/3] == 2'(s % 3));
            nxt[port].pred_tgt = wptg[s/3];
            age++;
            if (un[s] == U_M || un[s] == U_NONE) nm++;
            else if (un[s] == U_B) nb++;
            else ni++;
          end
          if (tm[s/3].stop[s%3]) go = 1'b0;
        end
      end
    end
  end

  logic empty_after;
  assign empty_after = ((done | take) | {~{3{wval[1]}}, ~{3{wval[0]}}}) == 6'h3F;

  // ---------------- window refill ----------------
  logic [5:0] ndone;
  always_comb begin
    q_deq = 2'd0;
    if (!stall && !flush && empty_after && q_count != 2'd0)
      q_deq = (q_count == 2'd1 || q_ptk[0]) ? 2'd1 : 2'd2;
    // slots skipped in a newly loaded window
    ndone = '0;
    for (int b = 0; b < 2; b++)
      for (int s = 0; s < 3; s++) begin
        if (b == 0 && 2'(s) < q_start[0]) ndone[b*3+s] = 1'b1;
        if (b == 1 && 2'(s) < q_start[1]) ndone[b*3+s] = 1'b1;
        if (q_ptk[b] && 2'(s) > q_pslot[b]) ndone[b*3+s] = 1'b1;
      end
  end

  assign split_event = !stall && cut;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= '1;
      for (int b = 0; b < 2; b++) begin
        wb[b] <= '0; wip[b] <= '0; wptk[b] <= 1'b0; wpsl[b] <= '0; wptg[b] <= '0; wval[b] <= 1'b0;
      end
      for (int p = 0; p < NPORTS; p++) grp[p] <= '0;
    end else if (flush) begin
      done <= '1;
      wval[0] <= 1'b0; wval[1] <= 1'b0;
      for (int p = 0; p < NPORTS; p++) grp[p] <= '0;
    end else if (!stall) begin
      for (int p = 0; p < NPORTS; p++) grp[p] <= nxt[p];
      done <= done | take;
      if (empty_after) begin
        wval[0] <= q_deq >= 2'd1;
        wval[1] <= q_deq == 2'd2;
        done    <= ndone | {q_deq != 2'd2 ? 3'b111 : 3'b000, q_deq == 2'd0 ? 3'b111 : 3'b000};
        for (int b = 0; b < 2; b++) begin
          wb[b] <= q_bundle[b]; wip[b] <= q_ip[b]; wptk[b] <= q_ptk[b];
          wpsl[b] <= q_pslot[b]; wptg[b] <= q_ptgt[b];
        end
      end
    end
  end
endmodule
