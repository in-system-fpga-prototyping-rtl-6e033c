// l2_arbiter: shares the unified L2 between the L1 instruction cache and
// the L1 data cache.
//
// Both L1s issue at most one miss or write-through request at a time and
// wait for its response. The arbiter grants one requester, forwards its
// request to the L2, and returns the single response to the same
// requester before it grants again. When both ask at once the data cache
// wins (its misses stall the whole back end). The document only shows the
// two L1s feeding one L2; the policy is this design's choice.
module l2_arbiter #(
  parameter int W = 32      // bytes per transfer
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid [2],   // 0 = instruction, 1 = data
  output logic           in_ready [2],
  input  logic [63:0]    in_addr  [2],
  input  logic           in_we    [2],
  input  logic [W*8-1:0] in_wdata [2],
  input  logic [W-1:0]   in_be    [2],
  output logic           in_rvalid[2],
  output logic [W*8-1:0] in_rdata [2],
  output logic           out_valid,
  input  logic           out_ready,
  output logic [63:0]    out_addr,
  output logic           out_we,
  output logic [W*8-1:0] out_wdata,
  output logic [W-1:0]   out_be,
  input  logic           out_rvalid,
  input  logic [W*8-1:0] out_rdata
);
  logic busy, owner, sel;

  assign sel       = in_valid[1] ? 1'b1 : 1'b0;
  assign out_valid = !busy && (in_valid[0] || in_valid[1]);
  assign out_addr  = in_addr[sel];
  assign out_we    = in_we[sel];
  assign out_wdata = in_wdata[sel];
  assign out_be    = in_be[sel];

  always_comb
    for (int i = 0; i < 2; i++) begin
      in_ready[i]  = !busy && out_ready && (sel == 1'(i));
      in_rvalid[i] = busy && out_rvalid && (owner == 1'(i));
      in_rdata[i]  = out_rdata;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0; owner <= 1'b0;
    end else if (!busy && out_valid && out_ready) begin
      busy <= 1'b1; owner <= sel;
    end else if (busy && out_rvalid) begin
      busy <= 1'b0;
    end

  // a response only ever arrives for an outstanding request
  a_resp_owned: assert property (@(posedge clk) disable iff (!rst_n) out_rvalid |-> busy);
endmodule
