// l3_tag_cache: the third cache level, modelled with tags only.
//
// As in the document, only the L3 tags are kept: a lookup decides hit or
// miss, but the line itself is always read from main memory. The answer
// is then held back until HIT_LAT cycles (hit) or MEM_LAT cycles (miss)
// after the request was accepted, so the level shows the intended 21-cycle
// L3 and 100-cycle memory latency whatever the real memory's speed, as long
// as memory answers within that time. Geometry: 4 MB, 4-way, 64-byte lines
// (16384 sets).
//
// Interface: one upstream port and one memory port, both LINE_BYTES wide
// with valid/ready requests and one response per request. One request at
// a time.
//
// Own choices: writes are passed to memory and acknowledged as soon as
// memory acknowledges (no artificial delay); any miss, read or write,
// allocates a tag, round robin per set (memory always holds the data, so
// a written line is present as far as the L3 is concerned).
module l3_tag_cache #(
  parameter int SETS       = 16384,
  parameter int WAYS       = 4,
  parameter int LINE_BYTES = 64,
  parameter int HIT_LAT    = 21,
  parameter int MEM_LAT    = 100,
  parameter int ADDR_W     = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid,
  output logic                    req_ready,
  input  logic [63:0]             req_addr,
  input  logic                    req_we,
  input  logic [LINE_BYTES*8-1:0] req_wdata,
  input  logic [LINE_BYTES-1:0]   req_be,
  output logic                    resp_valid,
  output logic [LINE_BYTES*8-1:0] resp_rdata,
  output logic                    mem_valid,
  input  logic                    mem_ready,
  output logic [63:0]             mem_addr,
  output logic                    mem_we,
  output logic [LINE_BYTES*8-1:0] mem_wdata,
  output logic [LINE_BYTES-1:0]   mem_be,
  input  logic                    mem_resp_valid,
  input  logic [LINE_BYTES*8-1:0] mem_resp_rdata,
  output logic                    hit_event,     // one-cycle pulse per read hit
  output logic                    miss_event     // one-cycle pulse per read miss
);
  localparam int OFF  = $clog2(LINE_BYTES);
  localparam int SW   = $clog2(SETS);
  localparam int TAGB = ADDR_W - OFF - SW;
  localparam int WW   = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic            vld  [SETS][WAYS];
  logic [TAGB-1:0] tags [SETS][WAYS];
  logic [WW-1:0]   rr   [SETS];

  typedef enum logic [1:0] { S_IDLE, S_REQ, S_WAIT, S_HOLD } st_e;
  st_e                    st;
  logic [63:0]            a;
  logic                   we;
  logic [LINE_BYTES*8-1:0] wd, rd;
  logic [LINE_BYTES-1:0]  be;
  logic [7:0]             cnt, need;
  logic                   got;

  logic          hit;
  logic [SW-1:0] sidx;
  always_comb begin
    sidx = req_addr[OFF +: SW];
    hit  = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (vld[sidx][w] && tags[sidx][w] == req_addr[OFF+SW +: TAGB]) hit = 1'b1;
  end

  assign req_ready  = (st == S_IDLE);
  assign mem_valid  = (st == S_REQ);
  assign mem_addr   = a;
  assign mem_we     = we;
  assign mem_wdata  = wd;
  assign mem_be     = be;
  assign hit_event  = req_valid && req_ready && !req_we && hit;
  assign miss_event = req_valid && req_ready && !req_we && !hit;

  always_comb begin
    resp_valid = 1'b0;
    resp_rdata = rd;
    if (st == S_WAIT && we && mem_resp_valid) resp_valid = 1'b1;
    if (st == S_HOLD && got && cnt >= need) resp_valid = 1'b1;
    if (st == S_WAIT && !we && mem_resp_valid && cnt >= need) begin
      resp_valid = 1'b1; resp_rdata = mem_resp_rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; a <= '0; we <= 1'b0; wd <= '0; be <= '0; rd <= '0;
      cnt <= '0; need <= '0; got <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin vld[s][w] <= 1'b0; tags[s][w] <= '0; end
      end
    end else begin
      if (cnt != 8'hFF) cnt <= cnt + 8'd1;
      unique case (st)
        S_IDLE: if (req_valid) begin
          st <= S_REQ; a <= req_addr; we <= req_we; wd <= req_wdata; be <= req_be;
          cnt  <= 8'd1;
          need <= hit ? 8'(HIT_LAT) : 8'(MEM_LAT);
          got  <= 1'b0;
          if (!hit) begin
            vld [sidx][rr[sidx]] <= 1'b1;
            tags[sidx][rr[sidx]] <= req_addr[OFF+SW +: TAGB];
            rr[sidx] <= (int'(rr[sidx]) == WAYS-1) ? '0 : rr[sidx] + 1'b1;
          end
        end
        S_REQ: if (mem_ready) st <= S_WAIT;
        S_WAIT: if (mem_resp_valid) begin
          if (we || cnt >= need) st <= S_IDLE;
          else begin st <= S_HOLD; rd <= mem_resp_rdata; got <= 1'b1; end
        end
        S_HOLD: if (cnt >= need) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
