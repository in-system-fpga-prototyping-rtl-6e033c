// sa_cache: set-associative cache used for the L1 instruction cache, the
// dual-ported L1 data cache and the unified L2.
//
// Geometry and hit latency are parameters; each instance sets them from
// the document (L1: 16 KB, 4-way, 32-byte lines, 2 cycles; L2: 96 KB,
// 6-way, 64-byte lines, 6 cycles). The defaults are the L1's.
//
// Upstream side: NPORTS request ports of UP_BYTES data each, with a
// valid/ready handshake and a response HIT_LAT cycles after acceptance on
// a hit. Loads that hit on every presented port are accepted together and
// flow through a pipeline, so one access per port per cycle is sustained.
// Port 0 is the older when both present requests. A miss or a store is
// handled alone by a small state machine while the other port waits.
// Every request, store included, gets exactly one response; the response
// carries back the request's tag (TAG_W bits, for the requester's use).
//
// Downstream side: one request at a time, LINE_BYTES wide, valid/ready,
// and one response per request (line data for reads, an acknowledge for
// writes).
//
// Own choices, the document being silent: stores are write-through with
// no allocation on a miss (so the levels below always hold current data
// and no dirty lines are ever evicted); replacement is round robin per
// set; physical addresses are ADDR_W bits; a miss's response leaves
// HIT_LAT cycles after the line arrives.
module sa_cache #(
  parameter int SETS       = 128,
  parameter int WAYS       = 4,
  parameter int LINE_BYTES = 32,
  parameter int UP_BYTES   = 8,
  parameter int HIT_LAT    = 2,
  parameter int NPORTS     = 2,
  parameter int TAG_W      = 1,
  parameter int ADDR_W     = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // upstream
  input  logic                      req_valid [NPORTS],
  output logic                      req_ready [NPORTS],
  input  logic [63:0]               req_addr  [NPORTS],
  input  logic                      req_we    [NPORTS],
  input  logic [UP_BYTES*8-1:0]     req_wdata [NPORTS],
  input  logic [UP_BYTES-1:0]       req_be    [NPORTS],
  input  logic [TAG_W-1:0]          req_tag   [NPORTS],
  output logic                      resp_valid[NPORTS],
  output logic [UP_BYTES*8-1:0]     resp_rdata[NPORTS],
  output logic [TAG_W-1:0]          resp_tag  [NPORTS],
  // downstream
  output logic                      dn_valid,
  input  logic                      dn_ready,
  output logic [63:0]               dn_addr,
  output logic                      dn_we,
  output logic [LINE_BYTES*8-1:0]   dn_wdata,
  output logic [LINE_BYTES-1:0]     dn_be,
  input  logic                      dn_resp_valid,
  input  logic [LINE_BYTES*8-1:0]   dn_resp_rdata
);
  localparam int OFF   = $clog2(LINE_BYTES);
  localparam int SW    = $clog2(SETS);
  localparam int TAGB  = ADDR_W - OFF - SW;
  localparam int CHUNK = LINE_BYTES / UP_BYTES;
  localparam int CW    = (CHUNK > 1) ? $clog2(CHUNK) : 1;
  localparam int UOFF  = $clog2(UP_BYTES);
  localparam int WW    = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int LW    = LINE_BYTES * 8;
  localparam int UW    = UP_BYTES * 8;

  initial assert (HIT_LAT >= 1 && LINE_BYTES >= UP_BYTES);

  logic              vld  [SETS][WAYS];
  logic [TAGB-1:0]   tags [SETS][WAYS];
  logic [LW-1:0]     data [SETS][WAYS];
  logic [WW-1:0]     rr   [SETS];

  function automatic logic [SW-1:0] set_of(input logic [63:0] a);
    return a[OFF +: SW];
  endfunction
  function automatic logic [TAGB-1:0] tag_of(input logic [63:0] a);
    return a[OFF+SW +: TAGB];
  endfunction
  function automatic logic [CW-1:0] chunk_of(input logic [63:0] a);
    return (CHUNK > 1) ? CW'(a[OFF-1:0] >> UOFF) : '0;
  endfunction

  // ---------------- lookup ----------------
  logic          hit   [NPORTS];
  logic [WW-1:0] hway  [NPORTS];
  logic          simple[NPORTS];
  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      hit[p] = 1'b0; hway[p] = '0;
      for (int w = 0; w < WAYS; w++)
        if (vld[set_of(req_addr[p])][w] && tags[set_of(req_addr[p])][w] == tag_of(req_addr[p])) begin
          hit[p] = 1'b1; hway[p] = WW'(w);
        end
      simple[p] = !req_valid[p] || (!req_we[p] && hit[p]);
    end

  // ---------------- miss / store engine ----------------
  typedef enum logic [1:0] { S_IDLE, S_REQ, S_WAIT } st_e;
  st_e               st;
  logic [63:0]       m_addr;
  logic              m_we;
  logic [UW-1:0]     m_wdata;
  logic [UP_BYTES-1:0] m_be;
  logic [TAG_W-1:0]  m_tag;
  logic [$clog2(NPORTS+1)-1:0] m_port;
  logic              m_done;       // engine hands a response to the pipe
  logic [UW-1:0]     m_rdata;

  // first port that needs the engine, if all older ones are simple
  logic                         start;
  logic [$clog2(NPORTS+1)-1:0]  start_p;
  always_comb begin
    start = 1'b0; start_p = '0;
    for (int p = NPORTS-1; p >= 0; p--)
      if (!simple[p]) begin start = 1'b1; start_p = ($clog2(NPORTS+1))'(p); end
    for (int p = 0; p < NPORTS; p++)
      req_ready[p] = (st == S_IDLE) && (p <= int'(start_p) || !start);
  end

  always_comb begin
    dn_valid = (st == S_REQ);
    dn_we    = m_we;
    dn_addr  = m_we ? m_addr : {m_addr[63:OFF], {OFF{1'b0}}};
    dn_wdata = '0;
    dn_be    = '0;
    for (int c = 0; c < CHUNK; c++)
      if (CW'(c) == chunk_of(m_addr)) begin
        dn_wdata[c*UW +: UW]             = m_wdata;
        dn_be[c*UP_BYTES +: UP_BYTES]    = m_be;
      end
  end

  always_comb begin
    m_done  = (st == S_WAIT) && dn_resp_valid;
    m_rdata = '0;
    for (int c = 0; c < CHUNK; c++)
      if (CW'(c) == chunk_of(m_addr)) m_rdata = dn_resp_rdata[c*UW +: UW];
  end

  // ---------------- response pipeline ----------------
  logic              pv [NPORTS][HIT_LAT];
  logic [UW-1:0]     pd [NPORTS][HIT_LAT];
  logic [TAG_W-1:0]  pt [NPORTS][HIT_LAT];

  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      resp_valid[p] = pv[p][HIT_LAT-1];
      resp_rdata[p] = pd[p][HIT_LAT-1];
      resp_tag[p]   = pt[p][HIT_LAT-1];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      m_addr <= '0; m_we <= 1'b0; m_wdata <= '0; m_be <= '0; m_tag <= '0; m_port <= '0;
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin vld[s][w] <= 1'b0; tags[s][w] <= '0; end
      end
      for (int p = 0; p < NPORTS; p++)
        for (int k = 0; k < HIT_LAT; k++) begin pv[p][k] <= 1'b0; pd[p][k] <= '0; pt[p][k] <= '0; end
    end else begin
      // shift every port's pipe
      for (int p = 0; p < NPORTS; p++) begin
        for (int k = HIT_LAT-1; k > 0; k--) begin
          pv[p][k] <= pv[p][k-1]; pd[p][k] <= pd[p][k-1]; pt[p][k] <= pt[p][k-1];
        end
        pv[p][0] <= 1'b0;
      end
      unique case (st)
        S_IDLE: begin
          for (int p = 0; p < NPORTS; p++)
            if (req_valid[p] && req_ready[p] && simple[p]) begin
              pv[p][0] <= 1'b1;
              pd[p][0] <= data[set_of(req_addr[p])][hway[p]][chunk_of(req_addr[p])*UW +: UW];
              pt[p][0] <= req_tag[p];
            end
          for (int p = 0; p < NPORTS; p++)
            if (start && p == int'(start_p)) begin
              st      <= S_REQ;
              m_addr  <= req_addr[p];
              m_we    <= req_we[p];
              m_wdata <= req_wdata[p];
              m_be    <= req_be[p];
              m_tag   <= req_tag[p];
              m_port  <= start_p;
              // a store that hits updates the line now (write-through)
              if (req_we[p] && hit[p])
                for (int b = 0; b < UP_BYTES; b++)
                  if (req_be[p][b])
                    data[set_of(req_addr[p])][hway[p]]
                        [chunk_of(req_addr[p])*UW + b*8 +: 8] <= req_wdata[p][b*8 +: 8];
            end
        end
        S_REQ: if (dn_ready) st <= S_WAIT;
        S_WAIT: if (dn_resp_valid) begin
          st <= S_IDLE;
          if (!m_we) begin
            vld [set_of(m_addr)][rr[set_of(m_addr)]] <= 1'b1;
            tags[set_of(m_addr)][rr[set_of(m_addr)]] <= tag_of(m_addr);
            data[set_of(m_addr)][rr[set_of(m_addr)]] <= dn_resp_rdata;
            rr[set_of(m_addr)] <= (int'(rr[set_of(m_addr)]) == WAYS-1) ? '0 : rr[set_of(m_addr)] + 1'b1;
          end
          for (int p = 0; p < NPORTS; p++)
            if (int'(m_port) == p) begin
              pv[p][0] <= 1'b1;
              pd[p][0] <= m_we ? '0 : m_rdata;
              pt[p][0] <= m_tag;
            end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
