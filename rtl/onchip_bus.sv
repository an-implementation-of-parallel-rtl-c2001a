// onchip_bus: the shared 128-bit on-chip bus of the SoC (the role of the
// processor local bus, with its arbiter).
//
// NM masters share one path to NS slaves. In an idle clock the arbiter picks
// a requesting master; from the next clock its request is routed to the slave
// whose address window (addr & SLV_MASK == SLV_BASE) it hits, and the slave's
// acknowledge and read data are routed back. After the acknowledge the bus
// is idle for one clock and arbitrates again, so a transfer takes at least
// three clocks. An address that hits no slave is acknowledged by the bus
// itself with zero read data and counted in decode_errors.
// The 128-bit width and the presence of an arbiter follow the design; the
// single-beat protocol and the timing are this implementation's.
//
// Interface: m_req/m_rsp per master, s_req/s_rsp per slave (see dna_pkg).
module onchip_bus
  import dna_pkg::*;
#(
  parameter int unsigned NM = 6,
  parameter int unsigned NS = 7,
  parameter logic [NS-1:0][31:0] SLV_BASE = {32'h8000_0000, 32'h2000_0000, 32'h1003_0000,
                                             32'h1002_0000, 32'h1001_0000, 32'h1000_0000,
                                             32'h0000_0000},
  parameter logic [NS-1:0][31:0] SLV_MASK = {32'hFC00_0000, {5{32'hFFFF_0000}}, 32'hFFFF_0000},
  localparam int unsigned MIW = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  bus_req_t      m_req [NM],
  output bus_rsp_t      m_rsp [NM],
  output bus_req_t      s_req [NS],
  input  bus_rsp_t      s_rsp [NS],
  output logic [15:0]   decode_errors
);

  logic [NM-1:0]  reqs;
  logic           gnt_valid, busy;
  logic [MIW-1:0] gnt_idx, owner;
  bus_req_t       cur;
  logic [NS-1:0]  hit;
  logic           miss, miss_ack, ack;
  logic [BUS_DW-1:0] rdata;

  always_comb for (int i = 0; i < NM; i++) reqs[i] = m_req[i].req;

  bus_arbiter #(.N(NM)) u_arb (
    .clk, .rst_n, .req(reqs), .take(!busy), .gnt_valid, .gnt_idx
  );

  assign cur = m_req[owner];

  always_comb begin
    for (int s = 0; s < NS; s++) hit[s] = ((cur.addr & SLV_MASK[s]) == SLV_BASE[s]);
    miss = busy && (hit == '0);
  end

  always_comb begin
    ack   = miss_ack;
    rdata = '0;
    for (int s = 0; s < NS; s++) begin
      s_req[s]     = cur;
      s_req[s].req = busy && hit[s] && cur.req;
      if (busy && hit[s]) begin
        ack   = ack | s_rsp[s].ack;
        rdata = rdata | s_rsp[s].rdata;
      end
    end
    for (int i = 0; i < NM; i++) begin
      m_rsp[i].ack   = busy && (owner == MIW'(i)) && ack;
      m_rsp[i].rdata = rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy          <= 1'b0;
      owner         <= '0;
      miss_ack      <= 1'b0;
      decode_errors <= '0;
    end else begin
      miss_ack <= miss && !miss_ack;
      if (!busy) begin
        if (gnt_valid) begin
          busy  <= 1'b1;
          owner <= gnt_idx;
        end
      end else if (ack) begin
        busy <= 1'b0;
        if (miss_ack) decode_errors <= decode_errors + 1'b1;
      end
    end
  end

  // At most one slave may claim an address.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> $onehot0(hit));

endmodule
