// bypass_net: predicated operand bypass for one operand.
//
// Chooses the value of source register 'src' from NSRC in-flight producers
// ordered youngest first (index 0 is the youngest), falling back to the
// value read from the register file. A producer only forwards when it will
// really write: its 'pv' flag already includes its qualifying predicate,
// so a predicated-off instruction is skipped and an older producer, or the
// register file, supplies the value. This is the document's predicated
// bypass control, which lets predicated results be forwarded
// speculatively. Register 0 never matches. Combinational.
module bypass_net #(
  parameter int NSRC = 8,
  parameter int W    = 64,
  parameter int AW   = 7
) (
  input  logic [AW-1:0] src,
  input  logic [W-1:0]  rf_val,
  input  logic          pv   [NSRC],
  input  logic [AW-1:0] pdst [NSRC],
  input  logic [W-1:0]  pval [NSRC],
  output logic [W-1:0]  val,
  output logic          hit
);
  always_comb begin
    val = rf_val;
    hit = 1'b0;
    for (int i = NSRC-1; i >= 0; i--)
      if (pv[i] && pdst[i] == src && src != '0) begin
        val = pval[i];
        hit = 1'b1;
      end
  end
endmodule
