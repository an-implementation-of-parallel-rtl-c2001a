// matcher_controller: the matcher's sequencing controller.
//
// After a start pulse it scans one bank of the source memory and slides the
// 64-base target along it one base per clock: every clock it hands the
// comparator a 128-bit window that starts at the next base, so one 128-bit
// comparison completes per clock as the design requires. When the similarity
// coming back exceeds the user threshold, it stores {similarity, position} in
// the selected result-memory bank. The position is the redirect address of the
// source bank (in 128-bit words of the whole source sequence) times 64, plus
// the base offset inside the bank, i.e. "redirect address + relative address".
//
// How it works: two words of the bank, cur and nxt, are held in registers and
// the window is ({nxt, cur} >> 2*offset)[127:0]. When the offset wraps, nxt
// becomes cur and the word after it, read from the memory during the
// previous clock, is loaded into nxt. A window must lie inside the loaded
// words, so a bank of N words gives (N-1)*64+1 positions; neighbouring banks
// or matchers must overlap by one word to see every position (the overlap
// the design's partitioning uses).
//
// Timing: start -> 2 clocks of memory prefetch -> one window per clock ->
// 2 clocks to drain the comparator -> done pulse. Results that do not fit
// the bank are dropped and flagged with overflow.
// The sliding, the threshold test and the result format are the design's;
// the prefetch scheme, the overflow handling and the strict ">" test
// ("exceeds") are this implementation's reading of it.
module matcher_controller #(
  parameter int unsigned DW           = 128,
  parameter int unsigned SRC_WORDS    = 2048,     // words per source bank
  parameter int unsigned RES_WORDS    = 128,      // words per result bank
  parameter int unsigned SIM_W        = 8,
  localparam int unsigned SAW         = $clog2(SRC_WORDS),
  localparam int unsigned RAW         = $clog2(RES_WORDS),
  localparam int unsigned BPW         = DW / 2,   // bases per word
  localparam int unsigned OW          = $clog2(BPW)
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  logic              src_bank,
  input  logic              res_bank,
  input  logic [SAW:0]      word_count,     // valid words in the source bank
  input  logic [23:0]       redirect_addr,  // word address of the bank in the whole sequence
  input  logic [SIM_W-1:0]  threshold,
  output logic              busy,
  output logic              done,
  output logic              overflow,
  output logic [RAW+1:0]    result_count,   // entries written in this scan
  // source memory read port
  output logic              src_re,
  output logic              src_rbank,
  output logic [SAW-1:0]    src_raddr,
  input  logic [DW-1:0]     src_rdata,
  // comparator
  output logic              cmp_valid,
  output logic [DW-1:0]     cmp_window,
  output logic [31:0]       cmp_position,
  input  logic              cmp_out_valid,
  input  logic [SIM_W-1:0]  cmp_similarity,
  input  logic [31:0]       cmp_out_position,
  // result memory write port
  output logic              res_we,
  output logic              res_wbank,
  output logic [RAW:0]      res_wentry,
  output logic [63:0]       res_wdata
);
  import dna_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_RD0, S_RD1, S_SCAN, S_DRAIN, S_DONE} state_t;
  state_t state;

  logic [DW-1:0]   cur, nxt;
  logic [SAW-1:0]  w;
  logic [OW-1:0]   off;
  logic            bank_q, rbank_q;
  logic [31:0]     base_pos;
  logic            last_pos;
  logic [2*DW-1:0] pair;

  localparam int unsigned RES_CAP = 2 * RES_WORDS;

  assign pair       = {nxt, cur};
  assign cmp_window = DW'(pair >> (2 * off));
  assign cmp_valid  = (state == S_SCAN);
  assign cmp_position = base_pos + 32'({w, {OW{1'b0}}}) + 32'(off);
  assign last_pos   = ({1'b0, w} == word_count - 1'b1) && (off == '0);
  assign busy       = (state != S_IDLE);
  assign src_rbank  = bank_q;

  // Source memory reads: word 0 and 1 at the start, then word w+2 in the last
  // clock of each word so that it arrives when the offset wraps to 0.
  always_comb begin
    src_re    = 1'b0;
    src_raddr = w + SAW'(2);
    unique case (state)
      S_RD0:  begin src_re = 1'b1; src_raddr = '0;      end
      S_RD1:  begin src_re = 1'b1; src_raddr = SAW'(1); end
      S_SCAN: src_re = (off == OW'(BPW - 1));
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur      <= '0;
      nxt      <= '0;
      w        <= '0;
      off      <= '0;
      bank_q   <= 1'b0;
      rbank_q  <= 1'b0;
      base_pos <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          bank_q   <= src_bank;
          rbank_q  <= res_bank;
          base_pos <= {2'b00, redirect_addr, {OW{1'b0}}};
          w        <= '0;
          off      <= '0;
          state    <= (word_count == '0) ? S_DONE : S_RD0;
        end
        S_RD0:  state <= S_RD1;
        S_RD1:  begin cur <= src_rdata; state <= S_SCAN; end
        S_SCAN: begin
          if (off == '0) nxt <= src_rdata;
          if (last_pos) begin
            state <= S_DRAIN;
          end else begin
            off <= off + 1'b1;
            if (off == OW'(BPW - 1)) begin
              w   <= w + 1'b1;
              cur <= nxt;
            end
          end
        end
        S_DRAIN: state <= S_DONE;   // last comparison leaves the comparator
        S_DONE:  begin done <= 1'b1; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Result writer: entries above the threshold go to the result bank.
  logic hit;
  assign hit       = cmp_out_valid && (cmp_similarity > threshold);
  assign res_we    = hit && (result_count < (RAW+2)'(RES_CAP));
  assign res_wbank = rbank_q;
  assign res_wentry = result_count[RAW:0];
  assign res_wdata = {24'd0, cmp_similarity, cmp_out_position};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result_count <= '0;
      overflow     <= 1'b0;
    end else if (state == S_IDLE && start) begin
      result_count <= '0;
      overflow     <= 1'b0;
    end else if (hit) begin
      if (res_we) result_count <= result_count + 1'b1;
      else        overflow     <= 1'b1;
    end
  end

  // The result must only be written while a scan is running.
  assert property (@(posedge clk) disable iff (!rst_n) res_we |-> busy);

endmodule
