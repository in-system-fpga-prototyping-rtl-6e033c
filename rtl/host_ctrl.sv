// host_ctrl: the prototype's link to the host processor.
//
// The host starts the prototyped processor by writing to a memory-mapped
// address that the bus interface snoops; the written data is taken as the
// bundle address where execution begins. The block turns that snooped
// write into a one-cycle start pulse and keeps the performance counters
// (cycles while running, retired instructions, branches, mispredicts,
// register-read stalls, bypassed operands, forwarded predicates, split
// issues, stack spills and fills, L3 hits and misses), also readable
// through a select/value port.
//
// When the processor halts, the block writes the processor state to
// physical memory for the host to examine, as 64-byte line writes on its
// own memory port (valid/ready, one acknowledge per write) starting at
// DUMP_ADDR:
//   line 0      : word 0 halt bundle address, word 1 predicates p63..p0,
//                 words 2..7 counters 0..5
//   line 1      : words 0..5 counters 6..11, words 6..7 zero
//   lines 2..17 : the 128 physical general registers, 8 per line, read one
//                 per cycle through the register read port rd_ra/rd_val
// 'dump_done' rises when the last line is acknowledged and stays high
// until the next start. The state dump and the snooped start follow the
// document; the start and dump addresses, the counter set and numbering
// and the memory layout of the dump are this design's choice.
module host_ctrl #(
  parameter logic [63:0] START_ADDR = 64'h0000_0000_FFFF_0000,
  parameter logic [63:0] DUMP_ADDR  = 64'h0000_0000_FFFE_0000,
  parameter int          NCTR       = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         snoop_valid,   // a host write seen on the bus
  input  logic [63:0]  snoop_addr,
  input  logic [63:0]  snoop_data,
  output logic         start,
  output logic [63:0]  start_ip,
  input  logic         running,
  input  logic [2:0]   ev_retire,
  input  logic         ev [NCTR-2],   // single-count events, counters 2..NCTR-1
  input  logic [3:0]   ctr_sel,
  output logic [63:0]  ctr_val,
  // state dump
  input  logic         halted,
  input  logic [63:0]  halt_ip,
  input  logic [63:0]  pr_val,
  output logic [6:0]   rd_ra,
  input  logic [63:0]  rd_val,
  output logic         dumping,
  output logic         dump_done,
  output logic         d_valid,
  input  logic         d_ready,
  output logic [63:0]  d_addr,
  output logic [511:0] d_wdata,
  input  logic         d_ack
);
  localparam int NLINES = 18;
  typedef enum logic [1:0] { D_IDLE, D_FILL, D_REQ, D_WAIT } dst_e;

  logic [63:0]  ctr [NCTR];
  dst_e         dst;
  logic         halted_q;
  logic [4:0]   line;
  logic [2:0]   word;
  logic [511:0] lbuf;

  // counter word k of the dump (k beyond NCTR reads zero)
  function automatic logic [63:0] ctr_word(input int k);
    return (k < NCTR) ? ctr[k] : 64'd0;
  endfunction

  assign rd_ra     = 7'((int'(line) - 2) * 8 + int'(word));
  assign dumping   = (dst != D_IDLE);
  assign d_valid   = (dst == D_REQ);
  assign d_addr    = DUMP_ADDR + 64'(line) * 64'd64;
  assign d_wdata   = lbuf;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      start <= 1'b0; start_ip <= '0;
      for (int i = 0; i < NCTR; i++) ctr[i] <= '0;
      dst <= D_IDLE; halted_q <= 1'b0; line <= '0; word <= '0; lbuf <= '0; dump_done <= 1'b0;
    end else begin
      start    <= snoop_valid && snoop_addr == START_ADDR;
      halted_q <= halted;
      if (snoop_valid && snoop_addr == START_ADDR) begin
        start_ip <= snoop_data;
        for (int i = 0; i < NCTR; i++) ctr[i] <= '0;
        dump_done <= 1'b0;
      end else begin
        if (running) ctr[0] <= ctr[0] + 64'd1;
        ctr[1] <= ctr[1] + 64'(ev_retire);
        for (int i = 2; i < NCTR; i++) if (ev[i-2]) ctr[i] <= ctr[i] + 64'd1;
      end
      unique case (dst)
        D_IDLE: if (halted && !halted_q) begin dst <= D_FILL; line <= '0; word <= '0; end
        D_FILL: begin
          if (line == 5'd0) begin
            lbuf <= {ctr_word(5), ctr_word(4), ctr_word(3), ctr_word(2), ctr_word(1), ctr_word(0),
                     pr_val, halt_ip};
            dst  <= D_REQ;
          end else if (line == 5'd1) begin
            lbuf <= {128'd0, ctr_word(11), ctr_word(10), ctr_word(9), ctr_word(8), ctr_word(7), ctr_word(6)};
            dst  <= D_REQ;
          end else begin
            lbuf[64*int'(word) +: 64] <= rd_val;
            word <= word + 3'd1;
            if (word == 3'd7) dst <= D_REQ;
          end
        end
        D_REQ: if (d_ready) dst <= D_WAIT;
        D_WAIT: if (d_ack) begin
          if (int'(line) == NLINES - 1) begin dst <= D_IDLE; dump_done <= 1'b1; end
          else begin dst <= D_FILL; line <= line + 5'd1; word <= '0; end
        end
        default: dst <= D_IDLE;
      endcase
    end

  assign ctr_val = (int'(ctr_sel) < NCTR) ? ctr[ctr_sel] : '0;

  a_ack_after_req: assert property (@(posedge clk) disable iff (!rst_n) d_ack |-> dst == D_WAIT);
endmodule
