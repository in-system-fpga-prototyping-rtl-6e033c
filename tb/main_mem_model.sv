// main_mem_model: behavioural model of the host's main memory for the
// testbenches. 64-byte lines, valid/ready requests, one response per
// request LAT cycles after acceptance, byte-enabled writes. WORDS lines of
// storage starting at address 0; the testbench fills it through 'mem'.
module main_mem_model #(
  parameter int LAT   = 10,
  parameter int LINES = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid,
  output logic         req_ready,
  input  logic [63:0]  req_addr,
  input  logic         req_we,
  input  logic [511:0] req_wdata,
  input  logic [63:0]  req_be,
  output logic         resp_valid,
  output logic [511:0] resp_rdata,
  output int           n_reads,
  output int           n_writes
);
  logic [511:0] mem [LINES];
  int           cnt;
  logic         busy;
  logic [511:0] rd;
  assign req_ready = !busy;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0; cnt <= 0; resp_valid <= 1'b0; resp_rdata <= '0; rd <= '0;
      n_reads <= 0; n_writes <= 0;
    end else begin
      resp_valid <= 1'b0;
      if (!busy && req_valid) begin
        int li;
        li = int'(req_addr[31:6]) % LINES;
        busy <= 1'b1; cnt <= LAT - 1;
        if (req_we) begin
          for (int b = 0; b < 64; b++) if (req_be[b]) mem[li][b*8 +: 8] <= req_wdata[b*8 +: 8];
          n_writes <= n_writes + 1;
        end else n_reads <= n_reads + 1;
        rd <= mem[li];
      end else if (busy) begin
        if (cnt <= 1) begin busy <= 1'b0; resp_valid <= 1'b1; resp_rdata <= rd; end
        cnt <= cnt - 1;
      end
    end
endmodule
