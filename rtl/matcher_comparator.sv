// matcher_comparator: the matcher's comparer.
//
// Compares a 128-bit (64-base) window of the source sequence with the target
// sequence in one clock. The two words are XORed; a bit that is 0 after the
// XOR is a bit the two sequences share. The shared bits are counted, only
// where the user mask has a 1 and only below the target length, and the count
// is the similarity. The XOR-and-count scheme, the 128-bit width and the mask
// and length inputs follow the published design; counting bits (not bases)
// and the one-register pipeline are this implementation's choices.
//
// Interface: in_valid/src_window/position_in are sampled every clock;
// out_valid/similarity/position_out appear one clock later. target, mask and
// length_bits are configuration held steady during a scan.
module matcher_comparator #(
  parameter int unsigned DW    = 128,
  parameter int unsigned SIM_W = 8,
  parameter int unsigned POS_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [DW-1:0]    src_window,
  input  logic [POS_W-1:0] position_in,
  input  logic [DW-1:0]    target,
  input  logic [DW-1:0]    mask,
  input  logic [SIM_W-1:0] length_bits,
  output logic             out_valid,
  output logic [SIM_W-1:0] similarity,
  output logic [POS_W-1:0] position_out
);

  logic [DW-1:0]    len_mask;
  logic [DW-1:0]    same_bits;
  logic [SIM_W-1:0] count;

  always_comb begin
    for (int i = 0; i < DW; i++) len_mask[i] = (i < int'(length_bits));
    same_bits = ~(src_window ^ target) & mask & len_mask;
    count = '0;
    for (int i = 0; i < DW; i++) count = count + SIM_W'(same_bits[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      similarity   <= '0;
      position_out <= '0;
    end else begin
      out_valid    <= in_valid;
      similarity   <= count;
      position_out <= position_in;
    end
  end

endmodule
