// gr_file: general register file, NREGS x 64 bits.
//
// NR combinational read ports and NW write ports written at the clock
// edge. A read of a register being written in the same cycle returns the
// new value (write-through), so the write-back stage needs no separate
// bypass into the register-read stage. r0 reads as zero and ignores writes.
// Write ports never target the same register in one cycle (Itanium forbids
// two writes to one register within an instruction group; the stack engine
// only writes while the pipeline is stalled). NaT bits are not kept, since
// speculative loads are outside the supported subset.
module gr_file #(
  parameter int NREGS = 128,
  parameter int NR    = 9,
  parameter int NW    = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] ra [NR],
  output logic [63:0]              rd [NR],
  input  logic                     we [NW],
  input  logic [$clog2(NREGS)-1:0] wa [NW],
  input  logic [63:0]              wd [NW]
);
  logic [63:0] r [NREGS];

  always_comb
    for (int i = 0; i < NR; i++) begin
      rd[i] = r[ra[i]];
      for (int w = 0; w < NW; w++)
        if (we[w] && wa[w] == ra[i]) rd[i] = wd[w];
      if (ra[i] == '0) rd[i] = '0;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) r[i] <= '0;
    end else begin
      for (int w = 0; w < NW; w++)
        if (we[w] && wa[w] != '0) r[wa[w]] <= wd[w];
    end

  for (genvar a = 0; a < NW; a++) begin : g_chk
    for (genvar b = a + 1; b < NW; b++) begin : g_pair
      a_no_waw: assert property (@(posedge clk) disable iff (!rst_n)
        !(we[a] && we[b] && wa[a] == wa[b] && wa[a] != '0));
    end
  end
endmodule
