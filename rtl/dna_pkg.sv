// dna_pkg: types and constants shared by the DNA sequence matching SoC.
//
// DNA bases are packed two bits each (A=00, C=01, G=10, T=11, as the design's
// base table defines). Base i of a sequence sits at bits [2i+1:2i] of the
// little-endian bit stream, so one 128-bit word holds 64 bases.
//
// The on-chip bus is 128 bits wide. A transfer is a single beat: the master
// raises req with addr/we/wdata and holds them until the bus returns ack
// (read data is valid in the ack cycle). The request/response bundles are
// structs so that arrays of masters and slaves can be passed as plain ports.
// The register offsets follow the matcher register table; the address map of
// the SoC and the matcher's result-entry layout are this design's own choices.
package dna_pkg;

  localparam int unsigned BUS_AW = 32;
  localparam int unsigned BUS_DW = 128;
  localparam int unsigned REG_DW = 64;
  localparam int unsigned BASES_PER_WORD = BUS_DW / 2;   // 64 bases per 128-bit word

  typedef enum logic [1:0] {
    BASE_A = 2'b00,
    BASE_C = 2'b01,
    BASE_G = 2'b10,
    BASE_T = 2'b11
  } base_t;

  typedef struct packed {
    logic              req;
    logic              we;
    logic [BUS_AW-1:0] addr;
    logic [BUS_DW-1:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic              ack;
    logic [BUS_DW-1:0] rdata;
  } bus_rsp_t;

  // One match found by a matcher: 64 bits, two per 128-bit result word.
  typedef struct packed {
    logic [23:0] rsvd;
    logic [7:0]  similarity;
    logic [31:0] position;     // base index in the whole source sequence
  } result_entry_t;

  // Matcher register offsets (byte addresses inside a matcher's window).
  localparam logic [12:0] REG_MODER        = 13'h000;
  localparam logic [12:0] REG_INT_SOURCE   = 13'h008;
  localparam logic [12:0] REG_INT_MASK     = 13'h010;
  localparam logic [12:0] REG_SEQ_DATA_H   = 13'h018;
  localparam logic [12:0] REG_SEQ_DATA_L   = 13'h020;
  localparam logic [12:0] REG_SEQ_BITS     = 13'h028;
  localparam logic [12:0] REG_SEQ_SIM      = 13'h030;
  localparam logic [12:0] REG_SEQ_MASK_H   = 13'h038;
  localparam logic [12:0] REG_SEQ_MASK_L   = 13'h040;
  localparam logic [12:0] REG_MATCHER_MODE = 13'h048;
  localparam logic [12:0] REG_SRC_MEM_STATE= 13'h050;
  localparam logic [12:0] REG_REDIRECT     = 13'h058;
  localparam logic [12:0] REG_RECEIVE_BD   = 13'h1000;
  localparam logic [12:0] REG_TRANSMIT_BD  = 13'h1008;

  // Interrupt source bits.
  localparam int unsigned INT_SCAN_DONE = 0;
  localparam int unsigned INT_RX_DONE   = 1;
  localparam int unsigned INT_TX_DONE   = 2;
  localparam int unsigned INT_OVERFLOW  = 3;

  // SoC address map.
  localparam logic [31:0] OCM_BASE     = 32'h0000_0000;
  localparam logic [31:0] MATCHER_BASE = 32'h1000_0000;  // + k * MATCHER_STRIDE
  localparam logic [31:0] MATCHER_STRIDE = 32'h0001_0000;
  localparam logic [31:0] SYSDMA_BASE  = 32'h2000_0000;
  localparam logic [31:0] EXT_BASE     = 32'h8000_0000;

endpackage
