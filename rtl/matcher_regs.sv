// matcher_regs: the matcher's base, control and status registers.
//
// The register set, the offsets, the widths and the read/write access follow
// the matcher register table: MODER, INT_SOURCE, INT_MASK, the 128-bit target
// (Seq_Reg_Data_h/_l), its length in bits, the similarity threshold, the
// 128-bit mask, MATCHER_Mode, Src_mem_state, Redirect_Addr and the receive and
// transmit buffer descriptors of the local DMA. The meaning of the fields
// inside them is this design's choice (the table gives only names):
//   MODER[0]         write 1: start a scan; reads 1 while the scan runs
//   MODER[1]         read-only: the local DMA is busy
//   INT_SOURCE[3:0]  scan done, receive done, transmit done, result overflow;
//                    set by hardware, cleared by writing 1
//   MATCHER_Mode     [0] source bank to scan, [1] result bank to fill
//   Src_mem_state    [15:0]/[31:16] valid words in source bank 0/1 (written by
//                    the receive DMA, also writable); [47:32]/[63:48] entries
//                    in result bank 0/1 (read-only)
//   Redirect_Addr    [23:0]/[55:32] word address of source bank 0/1 in the
//                    whole source sequence
//   Receive_BD  0x1000, Transmit_BD 0x1008: [15:0] length in 128-bit words,
//                    [16] bank, [63:32] bus byte address; writing starts DMA.
// irq is the OR of the unmasked interrupt sources.
//
// Interface: a simple register port (write strobe, address, data; read data
// is combinational from the address).
module matcher_regs (
  input  logic        clk,
  input  logic        rst_n,
  // register access
  input  logic        reg_we,
  input  logic [12:0] reg_addr,
  input  logic [63:0] reg_wdata,
  output logic [63:0] reg_rdata,
  // configuration to the datapath
  output logic         start,
  output logic [127:0] seq_data,
  output logic [127:0] seq_mask,
  output logic [7:0]   seq_bits,
  output logic [7:0]   seq_similarity,
  output logic         src_bank,
  output logic         res_bank,
  output logic [15:0]  src_count [2],
  output logic [23:0]  redirect  [2],
  output logic         rx_go,
  output logic         tx_go,
  output logic [63:0]  rx_bd,
  output logic [63:0]  tx_bd,
  output logic         irq,
  // status from the datapath
  input  logic         busy,
  input  logic         dma_busy,
  input  logic         scan_done,
  input  logic         overflow_evt,
  input  logic [15:0]  result_count,
  input  logic         rx_done,
  input  logic         rx_done_bank,
  input  logic [15:0]  rx_done_words,
  input  logic         tx_done
);
  import dna_pkg::*;

  logic [63:0] int_source, int_mask;
  logic [2:0]  mode;
  logic [15:0] res_count [2];
  logic        ovf_q;

  assign src_bank = mode[0];
  assign res_bank = mode[1];
  assign irq      = |(int_source & int_mask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_source     <= '0;
      int_mask       <= '0;
      seq_data       <= '0;
      seq_mask       <= '1;
      seq_bits       <= 8'd128;
      seq_similarity <= '0;
      mode           <= '0;
      src_count      <= '{default: '0};
      res_count      <= '{default: '0};
      redirect       <= '{default: '0};
      rx_bd          <= '0;
      tx_bd          <= '0;
      start          <= 1'b0;
      rx_go          <= 1'b0;
      tx_go          <= 1'b0;
      ovf_q          <= 1'b0;
    end else begin
      start <= 1'b0;
      rx_go <= 1'b0;
      tx_go <= 1'b0;
      if (reg_we) begin
        unique case (reg_addr)
          REG_MODER:        start <= reg_wdata[0] && !busy;
          REG_INT_SOURCE:   int_source <= int_source & ~reg_wdata;
          REG_INT_MASK:     int_mask <= reg_wdata;
          REG_SEQ_DATA_H:   seq_data[127:64] <= reg_wdata;
          REG_SEQ_DATA_L:   seq_data[63:0]   <= reg_wdata;
          REG_SEQ_BITS:     seq_bits <= reg_wdata[7:0];
          REG_SEQ_SIM:      seq_similarity <= reg_wdata[7:0];
          REG_SEQ_MASK_H:   seq_mask[127:64] <= reg_wdata;
          REG_SEQ_MASK_L:   seq_mask[63:0]   <= reg_wdata;
          REG_MATCHER_MODE: mode <= reg_wdata[2:0];
          REG_SRC_MEM_STATE: begin
            src_count[0] <= reg_wdata[15:0];
            src_count[1] <= reg_wdata[31:16];
          end
          REG_REDIRECT: begin
            redirect[0] <= reg_wdata[23:0];
            redirect[1] <= reg_wdata[55:32];
          end
          REG_RECEIVE_BD:  begin rx_bd <= reg_wdata; rx_go <= 1'b1; end
          REG_TRANSMIT_BD: begin tx_bd <= reg_wdata; tx_go <= 1'b1; end
          default: ;
        endcase
      end
      // Hardware events (take precedence over a software write).
      if (rx_done) begin
        src_count[rx_done_bank] <= rx_done_words;
        int_source[INT_RX_DONE] <= 1'b1;
      end
      if (tx_done)   int_source[INT_TX_DONE] <= 1'b1;
      if (busy)      res_count[mode[1]] <= result_count;
      ovf_q <= overflow_evt;
      if (overflow_evt && !ovf_q) int_source[INT_OVERFLOW] <= 1'b1;
      if (scan_done) begin
        res_count[mode[1]] <= result_count;
        int_source[INT_SCAN_DONE] <= 1'b1;
      end
    end
  end

  always_comb begin
    unique case (reg_addr)
      REG_MODER:         reg_rdata = {62'd0, dma_busy, busy};
      REG_INT_SOURCE:    reg_rdata = int_source;
      REG_INT_MASK:      reg_rdata = int_mask;
      REG_SEQ_DATA_H:    reg_rdata = seq_data[127:64];
      REG_SEQ_DATA_L:    reg_rdata = seq_data[63:0];
      REG_SEQ_BITS:      reg_rdata = {56'd0, seq_bits};
      REG_SEQ_SIM:       reg_rdata = {56'd0, seq_similarity};
      REG_SEQ_MASK_H:    reg_rdata = seq_mask[127:64];
      REG_SEQ_MASK_L:    reg_rdata = seq_mask[63:0];
      REG_MATCHER_MODE:  reg_rdata = {61'd0, mode};
      REG_SRC_MEM_STATE: reg_rdata = {res_count[1], res_count[0], src_count[1], src_count[0]};
      REG_REDIRECT:      reg_rdata = {8'd0, redirect[1], 8'd0, redirect[0]};
      REG_RECEIVE_BD:    reg_rdata = rx_bd;
      REG_TRANSMIT_BD:   reg_rdata = tx_bd;
      default:           reg_rdata = '0;
    endcase
  end

endmodule
