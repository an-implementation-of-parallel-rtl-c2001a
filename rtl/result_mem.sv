// result_mem: the matcher's local result memory.
//
// Holds the matches the controller finds, as 64-bit entries
// {reserved, similarity, position}, two per 128-bit word so that the local
// DMA can send a whole word per bus beat. Two banks (ping-pong) of 2 KB each,
// 4 KB in total as given for the matcher's local memory; the bank split and
// the entry layout are this design's choices.
//
// Interface: the write port takes one entry (bank, entry index); the entry
// lands in the low or high half of its word by the index's lowest bit. The
// read port returns a whole word one clock after the address.
module result_mem #(
  parameter int unsigned DW         = 128,
  parameter int unsigned BANK_WORDS = 128,
  localparam int unsigned AW        = $clog2(BANK_WORDS),
  localparam int unsigned EW        = DW / 2
) (
  input  logic          clk,
  input  logic          we,
  input  logic          wbank,
  input  logic [AW:0]   wentry,
  input  logic [EW-1:0] wdata,
  input  logic          re,
  input  logic          rbank,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [EW-1:0] lo [2*BANK_WORDS];
  logic [EW-1:0] hi [2*BANK_WORDS];

  always_ff @(posedge clk) begin
    if (we && !wentry[0]) lo[{wbank, wentry[AW:1]}] <= wdata;
    if (we &&  wentry[0]) hi[{wbank, wentry[AW:1]}] <= wdata;
    if (re) rdata <= {hi[{rbank, raddr}], lo[{rbank, raddr}]};
  end

endmodule
