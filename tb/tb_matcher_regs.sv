// tb_matcher_regs: self-checking test of the matcher register file.
// Writes and reads back every read/write register, checks the start and DMA
// descriptor strobes, the hardware-set and write-1-to-clear interrupt
// sources, the interrupt mask and irq, and the status fields updated by the
// DMA and the controller.
module tb_matcher_regs;
  import dna_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic reg_we; logic [12:0] reg_addr; logic [63:0] reg_wdata, reg_rdata;
  logic start, src_bank, res_bank, rx_go, tx_go, irq;
  logic [127:0] seq_data, seq_mask; logic [7:0] seq_bits, seq_similarity;
  logic [15:0] src_count [2]; logic [23:0] redirect [2]; logic [63:0] rx_bd, tx_bd;
  logic busy, dma_busy, scan_done, overflow_evt, rx_done, rx_done_bank, tx_done;
  logic [15:0] result_count, rx_done_words;
  int checks = 0, failures = 0;

  matcher_regs dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(logic [12:0] a, logic [63:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic rd(input logic [12:0] a, output logic [63:0] v);
    reg_addr = a; #1; v = reg_rdata;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] rv [4];
    reg_we = 0; reg_addr = 0; reg_wdata = 0; busy = 0; dma_busy = 0; scan_done = 0; overflow_evt = 0;
    result_count = 0; rx_done = 0; rx_done_bank = 0; rx_done_words = 0; tx_done = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // read/write registers
    wr(REG_SEQ_DATA_H, 64'h0123_4567_89AB_CDEF); wr(REG_SEQ_DATA_L, 64'hFEDC_BA98_7654_3210);
    wr(REG_SEQ_MASK_H, 64'h0F0F_0F0F_0F0F_0F0F); wr(REG_SEQ_MASK_L, 64'hFFFF_0000_FFFF_0000);
    wr(REG_SEQ_BITS, 64'd96); wr(REG_SEQ_SIM, 64'd77); wr(REG_MATCHER_MODE, 64'd3);
    wr(REG_REDIRECT, {8'd0, 24'h123456, 8'd0, 24'hABCDEF});
    wr(REG_SRC_MEM_STATE, {32'd0, 16'd300, 16'd200});
    wr(REG_INT_MASK, 64'h5);
    check(seq_data == 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210, "seq_data");
    check(seq_mask == 128'h0F0F_0F0F_0F0F_0F0F_FFFF_0000_FFFF_0000, "seq_mask");
    check(seq_bits == 96 && seq_similarity == 77, "bits/similarity");
    check(src_bank && res_bank, "mode bits");
    check(redirect[0] == 24'hABCDEF && redirect[1] == 24'h123456, "redirect");
    check(src_count[0] == 200 && src_count[1] == 300, "src counts");
    rd(REG_SEQ_DATA_L, rv[0]);
    rd(REG_SEQ_MASK_H, rv[1]);
    check(rv[0] == 64'hFEDC_BA98_7654_3210 && rv[1] == 64'h0F0F_0F0F_0F0F_0F0F, "readback data/mask");
    rd(REG_SEQ_BITS, rv[0]);
    rd(REG_SEQ_SIM, rv[1]);
    rd(REG_MATCHER_MODE, rv[2]);
    rd(REG_INT_MASK, rv[3]);
    check(rv[0] == 96 && rv[1] == 77 && rv[2] == 3 && rv[3] == 5, "readback small");
    rd(REG_REDIRECT, rv[0]);
    check(rv[0] == {8'd0, 24'h123456, 8'd0, 24'hABCDEF}, "readback redirect");
    // start strobe: one clock
    @(negedge clk); reg_we = 1; reg_addr = REG_MODER; reg_wdata = 1;
    @(negedge clk); reg_we = 0; check(start == 1, "start pulse");
    @(negedge clk); check(start == 0, "start one clock");
    // start ignored while busy
    busy = 1; dma_busy = 1;
    rd(REG_MODER, rv[0]);
    check(rv[0] == 3, "MODER busy bits");
    @(negedge clk); reg_we = 1; reg_addr = REG_MODER; reg_wdata = 1;
    @(negedge clk); reg_we = 0; check(start == 0, "no start while busy");
    // result count and scan done -> interrupt 0 (masked in)
    result_count = 42; scan_done = 1; @(negedge clk); scan_done = 0; busy = 0; dma_busy = 0;
    rd(REG_SRC_MEM_STATE, rv[0]);
    check(rv[0] == {16'd42, 16'd0, 16'd300, 16'd200}, "result count in bank 1");
    rd(REG_INT_SOURCE, rv[0]);
    check(rv[0] == 64'h1 && irq, "scan done irq");
    // rx done: count written, interrupt 1 (masked out)
    wr(REG_INT_SOURCE, 64'h1);
    rd(REG_INT_SOURCE, rv[0]);
    check(rv[0] == 0 && !irq, "w1c");
    rx_done = 1; rx_done_bank = 0; rx_done_words = 16'd77; @(negedge clk); rx_done = 0;
    rd(REG_INT_SOURCE, rv[0]);
    check(src_count[0] == 77 && rv[0] == 64'h2 && !irq, "rx done masked");
    tx_done = 1; @(negedge clk); tx_done = 0;
    rd(REG_INT_SOURCE, rv[0]);
    check(rv[0] == 64'h6 && irq, "tx done irq");
    overflow_evt = 1; repeat (3) @(negedge clk); overflow_evt = 0;
    rd(REG_INT_SOURCE, rv[0]);
    check(rv[0] == 64'hE, "overflow source");
    wr(REG_INT_SOURCE, 64'hF);
    rd(REG_INT_SOURCE, rv[0]);
    check(rv[0] == 0, "clear all");
    // descriptors
    @(negedge clk); reg_we = 1; reg_addr = REG_RECEIVE_BD; reg_wdata = 64'h0000_1000_0001_0010;
    @(negedge clk); reg_we = 0; check(rx_go && !tx_go && rx_bd == 64'h0000_1000_0001_0010, "rx bd");
    @(negedge clk); reg_we = 1; reg_addr = REG_TRANSMIT_BD; reg_wdata = 64'h0000_2000_0000_0004;
    @(negedge clk); reg_we = 0; check(tx_go && !rx_go && tx_bd == 64'h0000_2000_0000_0004, "tx bd");
    rd(REG_RECEIVE_BD, rv[0]);
    rd(REG_TRANSMIT_BD, rv[1]);
    check(rv[0] == 64'h0000_1000_0001_0010 && rv[1] == 64'h0000_2000_0000_0004, "bd readback");
    rd(13'h0F8, rv[0]);
    check(rv[0] == 0, "unmapped reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
