// sys_dma: the SoC's DMA controller.
//
// Copies a block of 128-bit words from one bus address to another, to move
// sequences and results between the on-chip memory and external storage
// without the processor. Each word is read and then written with single-beat
// bus transfers. The design names this controller and its purpose; the
// register set and the read-then-write scheme are this implementation's.
//
// Registers (bus slave, 64-bit values in the low half of the bus word):
//   0x00 source byte address      0x08 destination byte address
//   0x10 length in 128-bit words  0x18 control/status: write bit0=1 to start
//   (ignored while busy); read {done, busy}; writing clears done.
// irq is done and-ed with the interrupt enable, control bit 1.
module sys_dma
  import dna_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t s_req,
  output bus_rsp_t s_rsp,
  output bus_req_t m_req,
  input  bus_rsp_t m_rsp,
  output logic     irq
);

  typedef enum logic [1:0] {X_IDLE, X_RD, X_WR} xstate_t;
  xstate_t state;

  logic [31:0] src, dst;
  logic [15:0] len, idx;
  logic        done, ien, accept;
  logic [63:0] rd_val;

  assign accept = s_req.req && !s_rsp.ack;
  assign irq    = done && ien;

  always_comb begin
    unique case (s_req.addr[4:3])
      2'd0:    rd_val = {32'd0, src};
      2'd1:    rd_val = {32'd0, dst};
      2'd2:    rd_val = {48'd0, len};
      default: rd_val = {60'd0, 1'b0, ien, done, state != X_IDLE};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rsp <= '0;
      m_req <= '0;
      state <= X_IDLE;
      src   <= '0;
      dst   <= '0;
      len   <= '0;
      idx   <= '0;
      done  <= 1'b0;
      ien   <= 1'b0;
    end else begin
      s_rsp.ack <= accept;
      if (accept && !s_req.we) s_rsp.rdata <= {64'd0, rd_val};
      if (accept && s_req.we && state == X_IDLE) begin
        unique case (s_req.addr[4:3])
          2'd0: src <= s_req.wdata[31:0];
          2'd1: dst <= s_req.wdata[31:0];
          2'd2: len <= s_req.wdata[15:0];
          default: begin
            done <= 1'b0;
            ien  <= s_req.wdata[1];
            if (s_req.wdata[0]) begin
              idx <= '0;
              if (len == '0) done <= 1'b1;
              else begin
                m_req <= '{req: 1'b1, we: 1'b0, addr: src, wdata: '0};
                state <= X_RD;
              end
            end
          end
        endcase
      end
      unique case (state)
        X_RD: if (m_rsp.ack) begin
          m_req <= '{req: 1'b1, we: 1'b1, addr: dst + 32'({idx, 4'b0000}), wdata: m_rsp.rdata};
          state <= X_WR;
        end
        X_WR: if (m_rsp.ack) begin
          idx <= idx + 1'b1;
          if (idx + 1'b1 == len) begin
            m_req.req <= 1'b0;
            done      <= 1'b1;
            state     <= X_IDLE;
          end else begin
            m_req <= '{req: 1'b1, we: 1'b0, addr: src + 32'({(idx + 1'b1), 4'b0000}), wdata: '0};
            state <= X_RD;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
