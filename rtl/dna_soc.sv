// dna_soc: heterogeneous multi-core SoC for DNA sequence matching.
//
// A master general-purpose processor splits a long source DNA sequence into
// overlapping segments and dispatches one segment to each of N_MATCHERS slave
// matchers, which all compare the same target sequence against their own
// segment in parallel. Each matcher reports the positions whose similarity
// exceeds a threshold; the processor merges the reports. This module holds the
// hardware side: the matchers, the shared 128-bit on-chip bus with its
// arbiter, the on-chip memory and the DMA controller. The processor and the
// external memory controller are outside: their bus ports are brought out.
//
// Bus masters: 0 processor (ppu_* ports), 1..N matcher local DMAs, N+1 DMA
// controller. Address map: on-chip memory at 0x0000_0000 (64 KB), matcher k
// registers at 0x1000_0000 + k*0x1_0000, DMA controller registers at
// 0x2000_0000, external memory (ext_* ports, 64 MB) at 0x8000_0000.
// Four matchers, the 128-bit bus and the per-matcher 64 KB + 4 KB local
// memories follow the design; the address map and the on-chip memory size are
// this implementation's choices.
module dna_soc
  import dna_pkg::*;
#(
  parameter int unsigned N_MATCHERS = 4,
  parameter int unsigned SRC_WORDS  = 2048,   // per source bank (2 banks = 64 KB)
  parameter int unsigned RES_WORDS  = 128,    // per result bank (2 banks = 4 KB)
  parameter int unsigned OCM_WORDS  = 4096    // on-chip memory: 64 KB
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // master processor bus port
  input  bus_req_t              ppu_req,
  output bus_rsp_t              ppu_rsp,
  // external memory bus port (slave behind a memory controller)
  output bus_req_t              ext_req,
  input  bus_rsp_t              ext_rsp,
  // interrupts to the processor's interrupt controller
  output logic [N_MATCHERS-1:0] matcher_irq,
  output logic                  dma_irq,
  output logic [15:0]           bus_decode_errors
);

  localparam int unsigned NM = N_MATCHERS + 2;
  localparam int unsigned NS = N_MATCHERS + 3;
  localparam int unsigned S_OCM = 0, S_DMA = N_MATCHERS + 1, S_EXT = N_MATCHERS + 2;

  function automatic logic [NS-1:0][31:0] slave_bases();
    logic [NS-1:0][31:0] b;
    b[S_OCM] = OCM_BASE;
    for (int k = 0; k < int'(N_MATCHERS); k++) b[k+1] = MATCHER_BASE + 32'(k) * MATCHER_STRIDE;
    b[S_DMA] = SYSDMA_BASE;
    b[S_EXT] = EXT_BASE;
    return b;
  endfunction

  function automatic logic [NS-1:0][31:0] slave_masks();
    logic [NS-1:0][31:0] m;
    for (int s = 0; s < int'(NS); s++) m[s] = 32'hFFFF_0000;
    m[S_EXT] = 32'hFC00_0000;
    return m;
  endfunction

  bus_req_t m_req [NM];
  bus_rsp_t m_rsp [NM];
  bus_req_t s_req [NS];
  bus_rsp_t s_rsp [NS];

  assign m_req[0] = ppu_req;
  assign ppu_rsp  = m_rsp[0];
  assign ext_req  = s_req[S_EXT];
  assign s_rsp[S_EXT] = ext_rsp;

  onchip_bus #(
    .NM(NM), .NS(NS), .SLV_BASE(slave_bases()), .SLV_MASK(slave_masks())
  ) u_bus (
    .clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp, .decode_errors(bus_decode_errors)
  );

  onchip_mem #(.WORDS(OCM_WORDS)) u_ocm (
    .clk, .rst_n, .s_req(s_req[S_OCM]), .s_rsp(s_rsp[S_OCM])
  );

  for (genvar k = 0; k < N_MATCHERS; k++) begin : g_matcher
    matcher #(.SRC_WORDS(SRC_WORDS), .RES_WORDS(RES_WORDS)) u_matcher (
      .clk, .rst_n,
      .s_req(s_req[k+1]), .s_rsp(s_rsp[k+1]),
      .m_req(m_req[k+1]), .m_rsp(m_rsp[k+1]),
      .irq(matcher_irq[k])
    );
  end

  sys_dma u_dma (
    .clk, .rst_n,
    .s_req(s_req[S_DMA]), .s_rsp(s_rsp[S_DMA]),
    .m_req(m_req[NM-1]), .m_rsp(m_rsp[NM-1]),
    .irq(dma_irq)
  );

endmodule
