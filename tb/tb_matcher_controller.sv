// tb_matcher_controller: self-checking test of the scan controller together
// with the comparator and the two local memories (small sizes).
// Fills a source bank with random bases, plants mutated copies of the target,
// scans, and checks every result entry, the entry count and the scan time
// (one window per clock plus a fixed 5-clock overhead: two prefetch clocks, two drain clocks and the done pulse) against a reference
// computed here by sliding the target over the bank. Also covers bank
// selection, the redirect address, a one-word bank and result overflow.
module tb_matcher_controller;
  localparam int SW = 16, RW = 8, SAW = $clog2(SW), RAW = $clog2(RW);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, src_bank, res_bank, busy, done, overflow;
  logic [SAW:0] word_count;
  logic [23:0] redirect;
  logic [7:0] threshold, bits;
  logic [RAW+1:0] result_count;
  logic src_re, src_rbank, src_we, src_wbank;
  logic [SAW-1:0] src_raddr, src_waddr;
  logic [127:0] src_rdata, src_wdata, target, mask;
  logic cmp_valid, cmp_out_valid;
  logic [127:0] cmp_window;
  logic [31:0] cmp_position, cmp_out_position;
  logic [7:0] cmp_similarity;
  logic res_we, res_wbank, res_re, res_rbank;
  logic [RAW:0] res_wentry;
  logic [RAW-1:0] res_raddr;
  logic [63:0] res_wdata;
  logic [127:0] res_rdata;
  int checks = 0, failures = 0;

  matcher_controller #(.SRC_WORDS(SW), .RES_WORDS(RW)) dut (
    .clk, .rst_n, .start, .src_bank, .res_bank, .word_count, .redirect_addr(redirect),
    .threshold, .busy, .done, .overflow, .result_count,
    .src_re, .src_rbank, .src_raddr, .src_rdata,
    .cmp_valid, .cmp_window, .cmp_position, .cmp_out_valid, .cmp_similarity, .cmp_out_position,
    .res_we, .res_wbank, .res_wentry, .res_wdata);
  matcher_comparator u_cmp (.clk, .rst_n, .in_valid(cmp_valid), .src_window(cmp_window),
    .position_in(cmp_position), .target, .mask, .length_bits(bits),
    .out_valid(cmp_out_valid), .similarity(cmp_similarity), .position_out(cmp_out_position));
  source_mem #(.BANK_WORDS(SW)) u_src (.clk, .we(src_we), .wbank(src_wbank), .waddr(src_waddr),
    .wdata(src_wdata), .re(src_re), .rbank(src_rbank), .raddr(src_raddr), .rdata(src_rdata));
  result_mem #(.BANK_WORDS(RW)) u_res (.clk, .we(res_we), .wbank(res_wbank), .wentry(res_wentry),
    .wdata(res_wdata), .re(res_re), .rbank(res_rbank), .raddr(res_raddr), .rdata(res_rdata));

  logic [SW*128-1:0] stream [2];
  int mech_overflow = 0, mech_hits = 0, mech_bank1 = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic fill_bank(int b);
    for (int i = 0; i < SW * 4; i++) stream[b][i*32 +: 32] = $urandom;
    // plant target copies with a few mutated bases
    for (int k = 0; k < 3; k++) begin
      int p = $urandom % ((SW - 1) * 64 + 1);
      logic [127:0] c = target;
      for (int m = 0; m < k * 3; m++) c[2*($urandom % 64) +: 2] = 2'($urandom);
      stream[b][2*p +: 128] = c;
    end
    for (int w = 0; w < SW; w++) begin
      @(negedge clk);
      src_we = 1; src_wbank = 1'(b); src_waddr = SAW'(w); src_wdata = stream[b][w*128 +: 128];
    end
    @(negedge clk); src_we = 0;
  endtask

  task automatic run_scan(int b, int rb, int n, int thr, int redir);
    int exp_pos [$], exp_sim [$];
    int cyc, npos, got;
    npos = (n - 1) * 64 + 1;
    for (int p = 0; p < npos; p++) begin
      logic [127:0] wv = stream[b][2*p +: 128];
      int s = 0;
      for (int i = 0; i < 128; i++) if (i < bits && mask[i] && wv[i] == target[i]) s++;
      if (s > thr) begin exp_pos.push_back(redir * 64 + p); exp_sim.push_back(s); end
    end
    @(negedge clk);
    src_bank = 1'(b); res_bank = 1'(rb); word_count = (SAW+1)'(n); redirect = 24'(redir);
    threshold = 8'(thr); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == npos + 5, $sformatf("scan time %0d for %0d positions", cyc, npos));
    got = exp_pos.size() > 2 * RW ? 2 * RW : exp_pos.size();
    check(int'(result_count) == got, $sformatf("count %0d exp %0d", result_count, got));
    check(overflow == (exp_pos.size() > 2 * RW), "overflow flag");
    if (overflow) mech_overflow++;
    if (rb == 1) mech_bank1++;
    mech_hits += got;
    for (int e = 0; e < got; e++) begin
      logic [63:0] ent;
      @(negedge clk); res_re = 1; res_rbank = 1'(rb); res_raddr = RAW'(e / 2);
      @(negedge clk); res_re = 0;
      ent = (e % 2) ? res_rdata[127:64] : res_rdata[63:0];
      check(ent[31:0] == 32'(exp_pos[e]) && ent[39:32] == 8'(exp_sim[e]),
            $sformatf("entry %0d: %0d/%0d exp %0d/%0d", e, ent[31:0], ent[39:32], exp_pos[e], exp_sim[e]));
    end
  endtask

  initial begin
    start = 0; src_we = 0; res_re = 0; src_wbank = 0; src_waddr = 0; src_wdata = 0;
    res_rbank = 0; res_raddr = 0; src_bank = 0; res_bank = 0; word_count = 0; redirect = 0; threshold = 0;
    target = {$urandom, $urandom, $urandom, $urandom}; mask = '1; bits = 128;
    repeat (3) @(posedge clk); rst_n = 1;
    fill_bank(0); fill_bank(1);
    run_scan(0, 0, SW, 100, 0);
    run_scan(1, 1, SW, 100, 5000);
    run_scan(0, 1, 1, 40, 7);        // one-word bank: a single position
    run_scan(1, 0, SW, 72, 3);       // low threshold: result bank overflows
    bits = 64; mask = {64'd0, 64'hFFFF_FFFF_0000_FFFF};
    run_scan(0, 0, 9, 40, 1);        // short masked target
    check(mech_overflow > 0 && mech_hits > 0 && mech_bank1 > 0, "mechanisms exercised");
    $display("hits=%0d overflows=%0d", mech_hits, mech_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
