// matcher: one slave computing unit of the DNA matching SoC.
//
// The master processor loads a target sequence (up to 64 bases), its length,
// a bit mask and a similarity threshold into the registers, has the local DMA
// copy a segment of the source sequence into a source memory bank, and
// starts a scan. The controller slides the target along the segment one base
// per clock and the comparator scores every position; positions scoring above
// the threshold are written as {similarity, position} to a result memory
// bank, which the local DMA can then store to system memory. Interrupts tell
// the processor when a scan or a DMA descriptor finishes.
//
// Structure (as in the matcher block diagram): registers, controller,
// comparator, source memory, result memory and DMA, attached to the bus by a
// slave interface; the local DMA owns a bus master port. Source and result
// memories are two banks each so that loading, scanning and unloading can
// overlap. Sizes default to 64 KB of source memory and 4 KB of result memory.
//
// Interface: clk, active-low async reset, bus slave port for register access
// (s_req/s_rsp), bus master port for the DMA (m_req/m_rsp), irq.
module matcher
  import dna_pkg::*;
#(
  parameter int unsigned SRC_WORDS = 2048,   // per bank: 2 x 32 KB = 64 KB
  parameter int unsigned RES_WORDS = 128     // per bank: 2 x 2 KB = 4 KB
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t s_req,
  output bus_rsp_t s_rsp,
  output bus_req_t m_req,
  input  bus_rsp_t m_rsp,
  output logic     irq
);
  localparam int unsigned SAW = $clog2(SRC_WORDS);
  localparam int unsigned RAW = $clog2(RES_WORDS);

  // register port
  logic        reg_we;
  logic [12:0] reg_addr;
  logic [63:0] reg_wdata, reg_rdata;
  // configuration
  logic         start, src_bank, res_bank, rx_go, tx_go;
  logic [127:0] seq_data, seq_mask;
  logic [7:0]   seq_bits, seq_similarity;
  logic [15:0]  src_count [2];
  logic [23:0]  redirect  [2];
  logic [63:0]  rx_bd, tx_bd;
  // status
  logic         busy, scan_done, overflow, rx_done, rx_done_bank, tx_done, dma_busy;
  logic [15:0]  rx_done_words;
  logic [RAW+1:0] result_count;
  // memories
  logic           src_we, src_wbank, src_re, src_rbank;
  logic [SAW-1:0] src_waddr, src_raddr;
  logic [127:0]   src_wdata, src_rdata;
  logic           res_we, res_wbank, res_re, res_rbank;
  logic [RAW:0]   res_wentry;
  logic [RAW-1:0] res_raddr;
  logic [63:0]    res_wdata;
  logic [127:0]   res_rdata;
  // comparator
  logic           cmp_valid, cmp_out_valid;
  logic [127:0]   cmp_window;
  logic [31:0]    cmp_position, cmp_out_position;
  logic [7:0]     cmp_similarity;

  matcher_ipif u_ipif (
    .clk, .rst_n, .s_req, .s_rsp,
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata
  );

  matcher_regs u_regs (
    .clk, .rst_n,
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .start, .seq_data, .seq_mask, .seq_bits, .seq_similarity,
    .src_bank, .res_bank, .src_count, .redirect,
    .rx_go, .tx_go, .rx_bd, .tx_bd, .irq,
    .busy, .dma_busy, .scan_done, .overflow_evt(overflow),
    .result_count(16'(result_count)),
    .rx_done, .rx_done_bank, .rx_done_words, .tx_done
  );

  matcher_controller #(.SRC_WORDS(SRC_WORDS), .RES_WORDS(RES_WORDS)) u_ctrl (
    .clk, .rst_n,
    .start, .src_bank, .res_bank,
    .word_count((SAW+1)'(src_count[src_bank] > 16'(SRC_WORDS) ? 16'(SRC_WORDS) : src_count[src_bank])),
    .redirect_addr(redirect[src_bank]),
    .threshold(seq_similarity),
    .busy, .done(scan_done), .overflow, .result_count,
    .src_re, .src_rbank, .src_raddr, .src_rdata,
    .cmp_valid, .cmp_window, .cmp_position,
    .cmp_out_valid, .cmp_similarity, .cmp_out_position,
    .res_we, .res_wbank, .res_wentry, .res_wdata
  );

  matcher_comparator u_cmp (
    .clk, .rst_n,
    .in_valid(cmp_valid), .src_window(cmp_window), .position_in(cmp_position),
    .target(seq_data), .mask(seq_mask), .length_bits(seq_bits),
    .out_valid(cmp_out_valid), .similarity(cmp_similarity), .position_out(cmp_out_position)
  );

  source_mem #(.BANK_WORDS(SRC_WORDS)) u_src (
    .clk, .we(src_we), .wbank(src_wbank), .waddr(src_waddr), .wdata(src_wdata),
    .re(src_re), .rbank(src_rbank), .raddr(src_raddr), .rdata(src_rdata)
  );

  result_mem #(.BANK_WORDS(RES_WORDS)) u_res (
    .clk, .we(res_we), .wbank(res_wbank), .wentry(res_wentry), .wdata(res_wdata),
    .re(res_re), .rbank(res_rbank), .raddr(res_raddr), .rdata(res_rdata)
  );

  matcher_dma #(.SRC_WORDS(SRC_WORDS), .RES_WORDS(RES_WORDS)) u_dma (
    .clk, .rst_n,
    .rx_go, .rx_bd, .tx_go, .tx_bd,
    .rx_done, .rx_done_bank, .rx_done_words, .tx_done, .busy(dma_busy),
    .m_req, .m_rsp,
    .src_we, .src_wbank, .src_waddr, .src_wdata,
    .res_re, .res_rbank, .res_raddr, .res_rdata
  );

endmodule
