// matcher_dma: the matcher's local DMA engine.
//
// Receive: fetches a block of 128-bit words from a bus address into a source
// memory bank (the source sequence segment a matcher works on). Transmit:
// stores words of a result memory bank to a bus address. Both are started by
// writing a buffer descriptor (low 32 bits: [15:0] length in 128-bit words,
// [16] bank; high 32 bits: bus byte address). That the DMA moves source data
// in and results out, and that descriptors hold a length/configuration word
// and an address word, follow the design; the bit layout, one channel at a
// time with receive first, and the single-beat bus transfers are this
// implementation's choices.
//
// Interface: bus master port (m_req held until m_rsp.ack), source memory
// write port, result memory read port (data one clock after the address),
// rx_done/tx_done pulses when a descriptor completes.
module matcher_dma
  import dna_pkg::*;
#(
  parameter int unsigned SRC_WORDS = 2048,
  parameter int unsigned RES_WORDS = 128,
  localparam int unsigned SAW = $clog2(SRC_WORDS),
  localparam int unsigned RAW = $clog2(RES_WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rx_go,
  input  logic [63:0]     rx_bd,
  input  logic            tx_go,
  input  logic [63:0]     tx_bd,
  output logic            rx_done,
  output logic            rx_done_bank,
  output logic [15:0]     rx_done_words,
  output logic            tx_done,
  output logic            busy,
  // bus master
  output bus_req_t        m_req,
  input  bus_rsp_t        m_rsp,
  // source memory write port
  output logic            src_we,
  output logic            src_wbank,
  output logic [SAW-1:0]  src_waddr,
  output logic [127:0]    src_wdata,
  // result memory read port
  output logic            res_re,
  output logic            res_rbank,
  output logic [RAW-1:0]  res_raddr,
  input  logic [127:0]    res_rdata
);

  typedef enum logic [2:0] {D_IDLE, D_RX, D_TX_RD, D_TX_WAIT, D_TX_WR} dstate_t;
  dstate_t state;

  logic        rx_pend, tx_pend;
  logic [63:0] rx_bd_q, tx_bd_q;
  logic [15:0] len, idx;
  logic        bank;
  logic [31:0] addr;

  function automatic logic [15:0] clip(input logic [15:0] l, input int unsigned cap);
    return (l > 16'(cap)) ? 16'(cap) : l;
  endfunction

  assign busy      = (state != D_IDLE) || rx_pend || tx_pend;
  assign src_we    = (state == D_RX) && m_rsp.ack;
  assign src_wbank = bank;
  assign src_waddr = idx[SAW-1:0];
  assign src_wdata = m_rsp.rdata;
  assign res_re    = (state == D_TX_RD);
  assign res_rbank = bank;
  assign res_raddr = idx[RAW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= D_IDLE;
      rx_pend <= 1'b0;
      tx_pend <= 1'b0;
      rx_bd_q <= '0;
      tx_bd_q <= '0;
      len     <= '0;
      idx     <= '0;
      bank    <= 1'b0;
      addr    <= '0;
      m_req   <= '0;
      rx_done <= 1'b0;
      rx_done_bank  <= 1'b0;
      rx_done_words <= '0;
      tx_done <= 1'b0;
    end else begin
      rx_done <= 1'b0;
      tx_done <= 1'b0;
      if (rx_go) begin rx_pend <= 1'b1; rx_bd_q <= rx_bd; end
      if (tx_go) begin tx_pend <= 1'b1; tx_bd_q <= tx_bd; end
      unique case (state)
        D_IDLE: begin
          idx <= '0;
          if (rx_pend && !rx_go) begin
            rx_pend <= 1'b0;
            len     <= clip(rx_bd_q[15:0], SRC_WORDS);
            bank    <= rx_bd_q[16];
            addr    <= rx_bd_q[63:32];
            if (rx_bd_q[15:0] == '0) begin
              rx_done <= 1'b1; rx_done_bank <= rx_bd_q[16]; rx_done_words <= '0;
            end else begin
              m_req <= '{req: 1'b1, we: 1'b0, addr: rx_bd_q[63:32], wdata: '0};
              state <= D_RX;
            end
          end else if (tx_pend && !tx_go) begin
            tx_pend <= 1'b0;
            len     <= clip(tx_bd_q[15:0], RES_WORDS);
            bank    <= tx_bd_q[16];
            addr    <= tx_bd_q[63:32];
            if (tx_bd_q[15:0] == '0) tx_done <= 1'b1;
            else                     state   <= D_TX_RD;
          end
        end
        D_RX: if (m_rsp.ack) begin
          idx <= idx + 1'b1;
          if (idx + 1'b1 == len) begin
            m_req.req     <= 1'b0;
            rx_done       <= 1'b1;
            rx_done_bank  <= bank;
            rx_done_words <= len;
            state         <= D_IDLE;
          end else begin
            m_req.addr <= addr + 32'({(idx + 1'b1), 4'b0000});
          end
        end
        D_TX_RD:   state <= D_TX_WAIT;
        D_TX_WAIT: begin
          m_req <= '{req: 1'b1, we: 1'b1, addr: addr + 32'({idx, 4'b0000}), wdata: res_rdata};
          state <= D_TX_WR;
        end
        D_TX_WR: if (m_rsp.ack) begin
          m_req.req <= 1'b0;
          idx       <= idx + 1'b1;
          if (idx + 1'b1 == len) begin
            tx_done <= 1'b1;
            state   <= D_IDLE;
          end else begin
            state <= D_TX_RD;
          end
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  // A bus request is held steady until it is acknowledged.
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_req.req && !m_rsp.ack |=> m_req.req && $stable(m_req.addr));

endmodule
