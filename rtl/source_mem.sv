// source_mem: the matcher's local source memory.
//
// Two banks of 128-bit words (ping-pong: the local DMA fills one bank while
// the controller scans the other). Total size defaults to 64 KB, the local
// memory size given for the matcher; splitting it into two equal banks follows
// the two source-memory state and redirect registers of the matcher, the rest
// is this design's choice.
//
// Interface: one write port (DMA) and one read port (controller), each with a
// bank select and a word address. Reads are synchronous: rdata holds the word
// addressed in the previous clock.
module source_mem #(
  parameter int unsigned DW          = 128,
  parameter int unsigned BANK_WORDS  = 2048,
  localparam int unsigned AW         = $clog2(BANK_WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          wbank,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic          rbank,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2*BANK_WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[{wbank, waddr}] <= wdata;
    if (re) rdata <= mem[{rbank, raddr}];
  end

endmodule
