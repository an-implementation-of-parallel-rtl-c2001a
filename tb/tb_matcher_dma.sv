// tb_matcher_dma: self-checking test of the matcher's local DMA.
// The DMA's bus master port drives a behavioural external memory directly.
// Checks receive descriptors (words land in the chosen source bank, rx_done
// reports bank and length), transmit descriptors (result words land at the
// bus address), a receive and a transmit posted together, a zero-length
// descriptor, and that a transfer takes one bus transfer per word.
module tb_matcher_dma;
  import dna_pkg::*;
  localparam int SW = 32, RW = 8, SAW = $clog2(SW), RAW = $clog2(RW);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rx_go, tx_go, rx_done, rx_done_bank, tx_done, busy;
  logic [63:0] rx_bd, tx_bd;
  logic [15:0] rx_done_words;
  bus_req_t m_req; bus_rsp_t m_rsp;
  logic src_we, src_wbank, res_re, res_rbank, res_we, res_wbank;
  logic [SAW-1:0] src_waddr; logic [127:0] src_wdata, res_rdata;
  logic [RAW-1:0] res_raddr; logic [RAW:0] res_wentry; logic [63:0] res_wdata;
  logic [127:0] sink_rdata;
  int checks = 0, failures = 0, n_rx = 0, n_tx = 0;

  matcher_dma #(.SRC_WORDS(SW), .RES_WORDS(RW)) dut (.*);
  source_mem #(.BANK_WORDS(SW)) u_src (.clk, .we(src_we), .wbank(src_wbank), .waddr(src_waddr),
    .wdata(src_wdata), .re(1'b0), .rbank(1'b0), .raddr('0), .rdata(sink_rdata));
  result_mem #(.BANK_WORDS(RW)) u_res (.clk, .we(res_we), .wbank(res_wbank), .wentry(res_wentry),
    .wdata(res_wdata), .re(res_re), .rbank(res_rbank), .raddr(res_raddr), .rdata(res_rdata));
  tb_ext_mem #(.WORDS(1024), .LATENCY(2)) u_ext (.clk, .s_req(m_req), .s_rsp(m_rsp));

  always @(posedge clk) begin
    if (rx_done) n_rx++;
    if (tx_done) n_tx++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, x0;
    rx_go = 0; tx_go = 0; rx_bd = 0; tx_bd = 0; res_we = 0; res_wbank = 0; res_wentry = 0; res_wdata = 0;
    for (int i = 0; i < 1024; i++) u_ext.mem[i] = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(posedge clk); rst_n = 1;
    // fill result bank 1 with entries
    for (int e = 0; e < 2 * RW; e++) begin
      @(negedge clk); res_we = 1; res_wbank = 1; res_wentry = (RAW+1)'(e); res_wdata = {32'(e), 32'($urandom)};
    end
    @(negedge clk); res_we = 0;
    // receive 20 words from word 100 into bank 1
    @(negedge clk); rx_bd = {32'(100 * 16), 15'd0, 1'b1, 16'd20}; rx_go = 1;
    x0 = u_ext.transfers; t0 = $time;
    @(negedge clk); rx_go = 0;
    wait (rx_done); @(negedge clk);
    check(rx_done_bank == 1 && rx_done_words == 20, "rx_done report");
    check(u_ext.transfers - x0 == 20, "one bus transfer per word");
    for (int i = 0; i < 20; i++) check(u_src.mem[SW + i] == u_ext.mem[100 + i], $sformatf("rx word %0d", i));
    // transmit result bank 1 (8 words) to word 500, and receive into bank 0, posted together
    @(negedge clk);
    tx_bd = {32'(500 * 16), 15'd0, 1'b1, 16'(RW)}; tx_go = 1;
    rx_bd = {32'(10 * 16), 15'd0, 1'b0, 16'(SW)}; rx_go = 1;
    @(negedge clk); tx_go = 0; rx_go = 0;
    wait (!busy); @(negedge clk);
    for (int i = 0; i < RW; i++)
      check(u_ext.mem[500 + i] == {u_res.hi[RW + i], u_res.lo[RW + i]}, $sformatf("tx word %0d", i));
    for (int i = 0; i < SW; i++) check(u_src.mem[i] == u_ext.mem[10 + i], $sformatf("rx0 word %0d", i));
    check(n_rx == 2 && n_tx == 1, "done pulses");
    // zero-length and over-long descriptors
    @(negedge clk); rx_bd = {32'd0, 15'd0, 1'b0, 16'd0}; rx_go = 1;
    @(negedge clk); rx_go = 0;
    repeat (3) @(negedge clk);
    check(n_rx == 3 && rx_done_words == 0, "zero length");
    @(negedge clk); rx_bd = {32'(200 * 16), 15'd0, 1'b0, 16'(SW + 9)}; rx_go = 1;
    @(negedge clk); rx_go = 0;
    wait (rx_done); @(negedge clk);
    check(rx_done_words == SW, "length clipped to bank");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
