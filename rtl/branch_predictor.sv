// branch_predictor: two-level adaptive branch predictor with a BTB.
//
// First level: a per-address branch history table (BHT) of BHT_ENTRIES
// entries, BHT_WAYS-way set associative, each holding a HIST_BITS-bit
// history of the last outcomes of one branch bundle. Second level:
// NUM_PHT per-address pattern history tables of 2^HIST_BITS two-bit
// saturating counters; the bundle address selects the table and the
// history selects the counter. A BTB_ENTRIES-entry branch target buffer
// gives the target and the slot of the branch. These sizes (512-entry
// 4-way BHT of 4-bit entries, 128 PHTs of 16 counters, 64-entry BTB)
// follow the document.
//
// Own choices: the predictor works on bundle addresses (one predicted
// branch per bundle, the BTB remembers which slot); the BTB is direct
// mapped; BHT replacement is round robin per set; a bundle whose history
// is not in the BHT is predicted with history 0; counters reset to weakly
// not-taken. A bundle is predicted taken when the BTB hits and the counter
// is 2 or 3.
//
// Interface: two combinational lookup ports (the two bundles of a fetch)
// and one update port, written at the clock edge, fed by branch
// resolution.
module branch_predictor #(
  parameter int BHT_ENTRIES = 512,
  parameter int BHT_WAYS    = 4,
  parameter int HIST_BITS   = 4,
  parameter int NUM_PHT     = 128,
  parameter int BTB_ENTRIES = 64,
  parameter int TAG_BITS    = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] lk_ip   [2],   // bundle addresses to predict
  output logic        lk_tk   [2],
  output logic [63:0] lk_tgt  [2],
  output logic [1:0]  lk_slot [2],
  input  logic        up_valid,      // a resolved conditional branch
  input  logic [63:0] up_ip,
  input  logic [1:0]  up_slot,
  input  logic        up_taken,
  input  logic [63:0] up_tgt
);
  localparam int BSETS = BHT_ENTRIES / BHT_WAYS;
  localparam int BSW   = $clog2(BSETS);
  localparam int PW    = $clog2(NUM_PHT);
  localparam int TW    = $clog2(BTB_ENTRIES);
  localparam int WW    = (BHT_WAYS > 1) ? $clog2(BHT_WAYS) : 1;

  logic                 bht_v   [BSETS][BHT_WAYS];
  logic [TAG_BITS-1:0]  bht_tag [BSETS][BHT_WAYS];
  logic [HIST_BITS-1:0] bht_h   [BSETS][BHT_WAYS];
  logic [WW-1:0]        bht_rr  [BSETS];
  logic [1:0]           pht     [NUM_PHT][2**HIST_BITS];
  logic                 btb_v   [BTB_ENTRIES];
  logic [TAG_BITS-1:0]  btb_tag [BTB_ENTRIES];
  logic [63:0]          btb_tgt [BTB_ENTRIES];
  logic [1:0]           btb_slot[BTB_ENTRIES];

  function automatic logic [BSW-1:0] bset(input logic [63:0] ip);
    return ip[4 +: BSW];
  endfunction
  function automatic logic [TAG_BITS-1:0] btag(input logic [63:0] ip);
    return ip[4+BSW +: TAG_BITS];
  endfunction

  // History lookup: hit flag, way and history of a bundle.
  task automatic hist_lookup(input logic [63:0] ip, output logic hit,
                             output logic [WW-1:0] way, output logic [HIST_BITS-1:0] h);
    hit = 1'b0; way = '0; h = '0;
    for (int w = 0; w < BHT_WAYS; w++)
      if (bht_v[bset(ip)][w] && bht_tag[bset(ip)][w] == btag(ip)) begin
        hit = 1'b1; way = WW'(w); h = bht_h[bset(ip)][w];
      end
  endtask

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      logic hit; logic [WW-1:0] way; logic [HIST_BITS-1:0] h;
      logic [TW-1:0] bi;
      hist_lookup(lk_ip[p], hit, way, h);
      bi = lk_ip[p][4 +: TW];
      lk_tk[p]   = btb_v[bi] && btb_tag[bi] == btag(lk_ip[p]) &&
                   pht[lk_ip[p][4 +: PW]][h][1];
      lk_tgt[p]  = btb_tgt[bi];
      lk_slot[p] = btb_slot[bi];
    end
  end

  logic                 u_hit;
  logic [WW-1:0]        u_way;
  logic [HIST_BITS-1:0] u_h;
  always_comb hist_lookup(up_ip, u_hit, u_way, u_h);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < BSETS; s++) begin
        bht_rr[s] <= '0;
        for (int w = 0; w < BHT_WAYS; w++) begin
          bht_v[s][w] <= 1'b0; bht_tag[s][w] <= '0; bht_h[s][w] <= '0;
        end
      end
      for (int t = 0; t < NUM_PHT; t++)
        for (int e = 0; e < 2**HIST_BITS; e++) pht[t][e] <= 2'd1;
      for (int b = 0; b < BTB_ENTRIES; b++) begin
        btb_v[b] <= 1'b0; btb_tag[b] <= '0; btb_tgt[b] <= '0; btb_slot[b] <= '0;
      end
    end else if (up_valid) begin
      // pattern table: train the counter the prediction used
      if (up_taken && pht[up_ip[4 +: PW]][u_h] != 2'd3)
        pht[up_ip[4 +: PW]][u_h] <= pht[up_ip[4 +: PW]][u_h] + 2'd1;
      else if (!up_taken && pht[up_ip[4 +: PW]][u_h] != 2'd0)
        pht[up_ip[4 +: PW]][u_h] <= pht[up_ip[4 +: PW]][u_h] - 2'd1;
      // history table: shift in the outcome, allocate on a miss
      if (u_hit)
        bht_h[bset(up_ip)][u_way] <= {u_h[HIST_BITS-2:0], up_taken};
      else begin
        bht_v  [bset(up_ip)][bht_rr[bset(up_ip)]] <= 1'b1;
        bht_tag[bset(up_ip)][bht_rr[bset(up_ip)]] <= btag(up_ip);
        bht_h  [bset(up_ip)][bht_rr[bset(up_ip)]] <= HIST_BITS'(up_taken);
        bht_rr [bset(up_ip)] <= bht_rr[bset(up_ip)] + 1'b1;
      end
      // target buffer: remember taken branches
      if (up_taken) begin
        btb_v   [up_ip[4 +: TW]] <= 1'b1;
        btb_tag [up_ip[4 +: TW]] <= btag(up_ip);
        btb_tgt [up_ip[4 +: TW]] <= up_tgt;
        btb_slot[up_ip[4 +: TW]] <= up_slot;
      end
    end
  end
endmodule
