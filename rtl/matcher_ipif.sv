// matcher_ipif: the matcher's bus slave attachment (IPIF role).
//
// Turns a single-beat on-chip bus transfer addressed to the matcher into a
// register access: it decodes the low address bits into a register offset,
// steers the 64-bit register onto the low half of the 128-bit bus, performs
// the write or samples the read data, and acknowledges one clock after the
// request. A request that is still held high in its own acknowledge clock is
// not executed twice. Slave attachment and address decoding are the services
// the design names for this interface; the one-clock timing and the steering
// onto the low half of the bus are this implementation's choices.
module matcher_ipif
  import dna_pkg::*;
#(
  parameter int unsigned WIN_BITS = 13     // register window: 8 KB
) (
  input  logic          clk,
  input  logic          rst_n,
  input  bus_req_t      s_req,
  output bus_rsp_t      s_rsp,
  output logic          reg_we,
  output logic [12:0]   reg_addr,
  output logic [63:0]   reg_wdata,
  input  logic [63:0]   reg_rdata
);

  logic accept;
  assign accept    = s_req.req && !s_rsp.ack;
  assign reg_we    = accept && s_req.we;
  assign reg_addr  = s_req.addr[WIN_BITS-1:0];
  assign reg_wdata = s_req.wdata[63:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rsp <= '0;
    end else begin
      s_rsp.ack <= accept;
      if (accept && !s_req.we) s_rsp.rdata <= {64'd0, reg_rdata};
    end
  end

endmodule
