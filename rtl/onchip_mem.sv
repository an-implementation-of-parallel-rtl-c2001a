// onchip_mem: on-chip memory with its bus controller.
//
// Holds the target and source sequences and the matching results close to
// the matchers. A bus slave of 128-bit words: a write is stored and a read
// is answered one clock after the request (acknowledge and data together).
// The design places an on-chip memory and its controller on the bus but does
// not give their size or timing: 64 KB and the one-clock response are this
// implementation's choices.
//
// Interface: s_req/s_rsp bus slave port; address bits [3:0] select a byte in
// the word and are ignored (transfers are whole words).
module onchip_mem
  import dna_pkg::*;
#(
  parameter int unsigned WORDS = 4096,     // 64 KB
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t s_req,
  output bus_rsp_t s_rsp
);

  logic [BUS_DW-1:0] mem [WORDS];
  logic              accept, ack_q;
  logic [BUS_DW-1:0] rdata_q;
  logic [AW-1:0]     widx;

  assign accept = s_req.req && !ack_q;
  assign s_rsp  = '{ack: ack_q, rdata: rdata_q};
  assign widx   = s_req.addr[AW+3:4];

  always_ff @(posedge clk) begin
    if (accept && s_req.we)  mem[widx] <= s_req.wdata;
    if (accept && !s_req.we) rdata_q <= mem[widx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack_q <= 1'b0;
    else        ack_q <= accept;
  end

endmodule
