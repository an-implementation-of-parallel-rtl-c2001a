// tb_ext_mem: behavioural model of the external memory behind its memory
// controller, used only by testbenches. A bus slave of 128-bit words that
// answers LATENCY clocks after a request. The word index is address bits
// 25:4 (a 64 MB window) wrapped to WORDS. The array "mem" is open to
// hierarchical preload and inspection.
module tb_ext_mem
  import dna_pkg::*;
#(
  parameter int unsigned WORDS   = 4096,
  parameter int unsigned LATENCY = 3
) (
  input  logic     clk,
  input  bus_req_t s_req,
  output bus_rsp_t s_rsp
);
  logic [127:0] mem [WORDS];
  int cnt = 0;
  int transfers = 0;

  initial s_rsp = '0;

  always @(posedge clk) begin
    s_rsp.ack <= 1'b0;
    if (s_req.req && !s_rsp.ack) begin
      if (cnt == int'(LATENCY) - 1) begin
        cnt = 0;
        transfers++;
        if (s_req.we) mem[((s_req.addr & 32'h03FF_FFFF) >> 4) % WORDS] <= s_req.wdata;
        else          s_rsp.rdata <= mem[((s_req.addr & 32'h03FF_FFFF) >> 4) % WORDS];
        s_rsp.ack <= 1'b1;
      end else cnt++;
    end else cnt = 0;
  end
endmodule
