// ia64_system: the prototyped processor with its cache hierarchy.
//
// Core, 16 KB L1 instruction cache, 16 KB dual-ported L1 data cache
// (both 4-way, 32-byte lines, 2-cycle hits), a 96 KB 6-way unified L2
// with 64-byte lines and 6-cycle hits shared by the two L1s through an
// arbiter, a tag-only 4 MB 4-way L3 that holds answers to 21 cycles (hit)
// or 100 cycles (miss), and the host control block. All sizes and
// latencies are the document's. The main memory port (64-byte lines,
// valid/ready request, one response per request) is where the front-side
// bus interface and the host's memory would connect; the snoop inputs
// carry the host's writes that the bus interface observes.
//
// At halt the host control block writes the processor state to memory at
// DUMP_ADDR (layout in host_ctrl). It borrows the main memory port once
// the L3 has no request outstanding, and holds it until the dump is done;
// meanwhile it also drives the register read address that dbg_ra
// otherwise drives. 'dump_done' tells the host the state is in memory.
//
// Counter numbering (ctr_sel): 0 cycles, 1 retired instructions,
// 2 branches, 3 mispredicts, 4 register-read stalls, 5 bypassed
// operands, 6 forwarded predicates, 7 split issues, 8 spills, 9 fills,
// 10 L3 hits, 11 L3 misses.
//
// Everything runs from one clock. The document clocks the L1 data cache
// at twice the core clock to give it two ports; here the cache simply has
// two ports.
module ia64_system
  import ia64_pkg::*;
 #(
  parameter int          PHYS_STACKED = 96,
  parameter logic [63:0] BSP_RESET    = 64'h0000_8000,
  parameter logic [63:0] START_ADDR   = 64'h0000_0000_FFFF_0000,
  parameter logic [63:0] DUMP_ADDR    = 64'h0000_0000_FFFE_0000,
  parameter int          L3_SETS      = 16384
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          snoop_valid,
  input  logic [63:0]   snoop_addr,
  input  logic [63:0]   snoop_data,
  output logic          running,
  output logic          halted,
  output logic          dump_done,
  input  logic [3:0]    ctr_sel,
  output logic [63:0]   ctr_val,
  input  logic [6:0]    dbg_ra,
  output logic [63:0]   dbg_rd,
  output logic [63:0]   dbg_pr,
  output logic          mem_valid,
  input  logic          mem_ready,
  output logic [63:0]   mem_addr,
  output logic          mem_we,
  output logic [511:0]  mem_wdata,
  output logic [63:0]   mem_be,
  input  logic          mem_rvalid,
  input  logic [511:0]  mem_rdata
);
  localparam int ITW = 74;

  logic start;
  logic [63:0] start_ip;

  // core <-> L1I
  logic ic_valid [1], ic_ready [1], ic_rvalid [1];
  logic [63:0] ic_addr [1];
  logic [ITW-1:0] ic_tag [1], ic_rtag [1];
  logic [255:0] ic_rdata [1];
  // core <-> L1D
  logic dc_valid [2], dc_ready [2], dc_we [2], dc_tag [2], dc_rvalid [2], dc_rtag [2];
  logic [63:0] dc_addr [2], dc_wdata [2], dc_rdata [2];
  logic [7:0] dc_be [2];

  logic [2:0] ev_retire;
  logic ev_misp, ev_br, ev_raw, ev_byp, ev_pbyp, ev_split, ev_spill, ev_fill, ev_flush;
  logic [6:0] dbg_bof;
  logic [63:0] halt_ip, core_rd;
  logic [6:0] core_ra, h_ra;
  logic h_dumping, h_valid, h_ready, h_ack;
  logic [63:0] h_addr;
  logic [511:0] h_wdata;

  assign core_ra = h_dumping ? h_ra : dbg_ra;
  assign dbg_rd  = core_rd;

  ia64_core #(.PHYS_STACKED(PHYS_STACKED), .BSP_RESET(BSP_RESET), .IC_TAG_W(ITW)) u_core (
    .clk, .rst_n, .start, .start_ip, .running, .halted, .halt_ip,
    .ic_valid(ic_valid[0]), .ic_ready(ic_ready[0]), .ic_addr(ic_addr[0]), .ic_tag(ic_tag[0]),
    .ic_rvalid(ic_rvalid[0]), .ic_rdata(ic_rdata[0]), .ic_rtag(ic_rtag[0]),
    .dc_valid, .dc_ready, .dc_addr, .dc_we, .dc_wdata, .dc_be, .dc_tag,
    .dc_rvalid, .dc_rdata, .dc_rtag,
    .dbg_ra(core_ra), .dbg_rd(core_rd), .dbg_pr, .dbg_bof,
    .ev_retire, .ev_mispredict(ev_misp), .ev_branch(ev_br), .ev_raw_stall(ev_raw),
    .ev_bypass(ev_byp), .ev_pred_bypass(ev_pbyp), .ev_split, .ev_spill, .ev_fill, .ev_flush
  );

  // L1s <-> arbiter
  logic a_valid [2], a_ready [2], a_we [2], a_rvalid [2];
  logic [63:0] a_addr [2];
  logic [255:0] a_wdata [2], a_rdata [2];
  logic [31:0] a_be [2];

  logic        ic_wz [1];
  logic [255:0] ic_wdz [1];
  logic [31:0] ic_bez [1];
  assign ic_wz[0] = 1'b0; assign ic_wdz[0] = '0; assign ic_bez[0] = '0;

  sa_cache #(.SETS(128), .WAYS(4), .LINE_BYTES(32), .UP_BYTES(32), .HIT_LAT(2), .NPORTS(1),
             .TAG_W(ITW)) u_l1i (
    .clk, .rst_n, .req_valid(ic_valid), .req_ready(ic_ready), .req_addr(ic_addr), .req_we(ic_wz),
    .req_wdata(ic_wdz), .req_be(ic_bez), .req_tag(ic_tag), .resp_valid(ic_rvalid),
    .resp_rdata(ic_rdata), .resp_tag(ic_rtag),
    .dn_valid(a_valid[0]), .dn_ready(a_ready[0]), .dn_addr(a_addr[0]), .dn_we(a_we[0]),
    .dn_wdata(a_wdata[0]), .dn_be(a_be[0]), .dn_resp_valid(a_rvalid[0]), .dn_resp_rdata(a_rdata[0])
  );

  logic dc_tag1 [2], dc_rtag1 [2];
  always_comb for (int i = 0; i < 2; i++) begin dc_tag1[i] = dc_tag[i]; dc_rtag[i] = dc_rtag1[i]; end

  sa_cache #(.SETS(128), .WAYS(4), .LINE_BYTES(32), .UP_BYTES(8), .HIT_LAT(2), .NPORTS(2),
             .TAG_W(1)) u_l1d (
    .clk, .rst_n, .req_valid(dc_valid), .req_ready(dc_ready), .req_addr(dc_addr), .req_we(dc_we),
    .req_wdata(dc_wdata), .req_be(dc_be), .req_tag(dc_tag1), .resp_valid(dc_rvalid),
    .resp_rdata(dc_rdata), .resp_tag(dc_rtag1),
    .dn_valid(a_valid[1]), .dn_ready(a_ready[1]), .dn_addr(a_addr[1]), .dn_we(a_we[1]),
    .dn_wdata(a_wdata[1]), .dn_be(a_be[1]), .dn_resp_valid(a_rvalid[1]), .dn_resp_rdata(a_rdata[1])
  );

  // arbiter <-> L2
  logic l2_valid [1], l2_ready [1], l2_we [1], l2_rvalid [1], l2_tag [1], l2_rtag [1];
  logic [63:0] l2_addr [1];
  logic [255:0] l2_wdata [1], l2_rdata [1];
  logic [31:0] l2_be [1];
  assign l2_tag[0] = 1'b0;

  l2_arbiter #(.W(32)) u_arb (
    .clk, .rst_n, .in_valid(a_valid), .in_ready(a_ready), .in_addr(a_addr), .in_we(a_we),
    .in_wdata(a_wdata), .in_be(a_be), .in_rvalid(a_rvalid), .in_rdata(a_rdata),
    .out_valid(l2_valid[0]), .out_ready(l2_ready[0]), .out_addr(l2_addr[0]), .out_we(l2_we[0]),
    .out_wdata(l2_wdata[0]), .out_be(l2_be[0]), .out_rvalid(l2_rvalid[0]), .out_rdata(l2_rdata[0])
  );

  // L2 <-> L3
  logic l3_valid, l3_ready, l3_we, l3_rvalid;
  logic [63:0] l3_addr, l3_be;
  logic [511:0] l3_wdata, l3_rdata;

  sa_cache #(.SETS(256), .WAYS(6), .LINE_BYTES(64), .UP_BYTES(32), .HIT_LAT(6), .NPORTS(1),
             .TAG_W(1)) u_l2 (
    .clk, .rst_n, .req_valid(l2_valid), .req_ready(l2_ready), .req_addr(l2_addr), .req_we(l2_we),
    .req_wdata(l2_wdata), .req_be(l2_be), .req_tag(l2_tag), .resp_valid(l2_rvalid),
    .resp_rdata(l2_rdata), .resp_tag(l2_rtag),
    .dn_valid(l3_valid), .dn_ready(l3_ready), .dn_addr(l3_addr), .dn_we(l3_we),
    .dn_wdata(l3_wdata), .dn_be(l3_be), .dn_resp_valid(l3_rvalid), .dn_resp_rdata(l3_rdata)
  );

  logic l3_hit, l3_miss;
  logic m3_valid, m3_ready, m3_we, m3_rvalid;
  logic [63:0] m3_addr, m3_be;
  logic [511:0] m3_wdata;
  logic l3_out, host_own;

  // main memory port: the L3 owns it except while the dump engine holds it
  assign mem_valid = host_own ? h_valid : m3_valid;
  assign mem_addr  = host_own ? h_addr  : m3_addr;
  assign mem_we    = host_own ? 1'b1    : m3_we;
  assign mem_wdata = host_own ? h_wdata : m3_wdata;
  assign mem_be    = host_own ? '1      : m3_be;
  assign m3_ready  = !host_own && mem_ready;
  assign h_ready   = host_own && mem_ready;
  assign m3_rvalid = !host_own && mem_rvalid;
  assign h_ack     = host_own && mem_rvalid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      l3_out <= 1'b0; host_own <= 1'b0;
    end else begin
      if (m3_valid && m3_ready) l3_out <= 1'b1;
      else if (m3_rvalid) l3_out <= 1'b0;
      if (!h_dumping) host_own <= 1'b0;
      else if (!m3_valid && !l3_out) host_own <= 1'b1;
    end

  l3_tag_cache #(.SETS(L3_SETS), .WAYS(4), .LINE_BYTES(64), .HIT_LAT(21), .MEM_LAT(100)) u_l3 (
    .clk, .rst_n, .req_valid(l3_valid), .req_ready(l3_ready), .req_addr(l3_addr), .req_we(l3_we),
    .req_wdata(l3_wdata), .req_be(l3_be), .resp_valid(l3_rvalid), .resp_rdata(l3_rdata),
    .mem_valid(m3_valid), .mem_ready(m3_ready), .mem_addr(m3_addr), .mem_we(m3_we),
    .mem_wdata(m3_wdata), .mem_be(m3_be), .mem_resp_valid(m3_rvalid), .mem_resp_rdata(mem_rdata),
    .hit_event(l3_hit), .miss_event(l3_miss)
  );

  logic ev [10];
  assign ev = '{ev_br, ev_misp, ev_raw, ev_byp, ev_pbyp, ev_split, ev_spill, ev_fill, l3_hit, l3_miss};

  host_ctrl #(.START_ADDR(START_ADDR), .DUMP_ADDR(DUMP_ADDR), .NCTR(12)) u_host (
    .clk, .rst_n, .snoop_valid, .snoop_addr, .snoop_data, .start, .start_ip, .running,
    .ev_retire, .ev, .ctr_sel, .ctr_val,
    .halted, .halt_ip, .pr_val(dbg_pr), .rd_ra(h_ra), .rd_val(core_rd),
    .dumping(h_dumping), .dump_done, .d_valid(h_valid), .d_ready(h_ready), .d_addr(h_addr),
    .d_wdata(h_wdata), .d_ack(h_ack)
  );
endmodule
