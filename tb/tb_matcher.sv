// tb_matcher: self-checking test of a whole matcher (small memories).
// A testbench bus master plays the processor; the local DMA's bus port drives
// a behavioural external memory holding a random source sequence with
// planted, mutated copies of the target. The test programs the target, the
// threshold and the mask, loads segment A into source bank 0, starts a scan
// of it while the DMA loads segment B into bank 1 (ping-pong), scans bank 1
// into result bank 1, transmits both result banks and checks every entry
// against a reference computed here. Scan time is checked against one window
// per clock.
module tb_matcher;
  import dna_pkg::*;
  localparam int SW = 32, RW = 16;
  localparam logic [31:0] MB = 32'h1000_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t s_req, m_req; bus_rsp_t s_rsp, m_rsp;
  logic irq;
  int checks = 0, failures = 0, overlap = 0;

  matcher #(.SRC_WORDS(SW), .RES_WORDS(RW)) dut (.*);
  tb_bus_master u_m (.clk, .req(s_req), .rsp(s_rsp));
  tb_ext_mem #(.WORDS(4096), .LATENCY(2)) u_ext (.clk, .s_req(m_req), .s_rsp(m_rsp));

  always @(posedge clk) if (dut.busy && dut.dma_busy) overlap++;

  logic [127:0] target;
  logic [4096*128-1:0] seq;   // the source sequence: word i = ext word i

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wreg(logic [12:0] a, logic [63:0] v);
    u_m.write(MB + 32'(a), {64'd0, v});
  endtask
  task automatic rreg(logic [12:0] a, output logic [63:0] v);
    logic [127:0] d;
    u_m.read(MB + 32'(a), d);
    v = d[63:0];
  endtask
  task automatic wait_int(int bitn);
    logic [63:0] v;
    do rreg(REG_INT_SOURCE, v); while (!v[bitn]);
    wreg(REG_INT_SOURCE, 64'(1) << bitn);
  endtask

  // expected hits for a segment starting at word w0 with n words
  task automatic expect_hits(int w0, int n, int thr, ref int pos[$], ref int sim[$]);
    for (int p = 0; p < (n - 1) * 64 + 1; p++) begin
      logic [127:0] wv;
      int s;
      wv = seq[(w0 * 64 + p) * 2 +: 128];
      s = 0;
      for (int i = 0; i < 128; i++) if (wv[i] == target[i]) s++;
      if (s > thr) begin pos.push_back(w0 * 64 + p); sim.push_back(s); end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pa[$], sa[$], pb[$], sb[$];
    logic [63:0] v;
    int t0, t1;
    for (int i = 0; i < 4096 * 4; i++) seq[i*32 +: 32] = $urandom;
    target = {$urandom, $urandom, $urandom, $urandom};
    for (int k = 0; k < 12; k++) begin
      int p;
      logic [127:0] c;
      p = $urandom % (4000 * 64);
      c = target;
      for (int m = 0; m < k % 4; m++) c[2*($urandom % 64) +: 2] = 2'($urandom);
      seq[p*2 +: 128] = c;
      if (k < 6) seq[(100 * 64 + 5 + k * 300) * 2 +: 128] = c;   // inside segment A
      else       seq[(1000 * 64 + 17 + (k - 6) * 300) * 2 +: 128] = c; // inside segment B
    end
    for (int i = 0; i < 4096; i++) u_ext.mem[i] = seq[i*128 +: 128];
    repeat (2) @(posedge clk); rst_n = 1;

    wreg(REG_INT_MASK, 64'hF);
    wreg(REG_SEQ_DATA_H, target[127:64]);
    wreg(REG_SEQ_DATA_L, target[63:0]);
    wreg(REG_SEQ_BITS, 64'd128);
    wreg(REG_SEQ_MASK_H, '1);
    wreg(REG_SEQ_MASK_L, '1);
    wreg(REG_SEQ_SIM, 64'd104);
    // segment A (words 100..131) -> bank 0
    wreg(REG_RECEIVE_BD, {32'(100 * 16), 15'd0, 1'b0, 16'(SW)});
    wait_int(INT_RX_DONE);
    check(irq == 0, "irq clears");
    rreg(REG_SRC_MEM_STATE, v);
    check(v[15:0] == SW, "bank 0 count from DMA");
    wreg(REG_REDIRECT, {8'd0, 24'd1000, 8'd0, 24'd100});
    wreg(REG_MATCHER_MODE, 64'b00);             // scan bank 0 into result bank 0
    t0 = $time;
    wreg(REG_MODER, 64'd1);
    // while scanning, load segment B (words 1000..1031) into bank 1
    wreg(REG_RECEIVE_BD, {32'(1000 * 16), 15'd0, 1'b1, 16'(SW)});
    wait (irq && dut.u_regs.int_source[INT_SCAN_DONE]);
    t1 = $time;
    check((t1 - t0) / 10 >= (SW - 1) * 64 + 1 && (t1 - t0) / 10 <= (SW - 1) * 64 + 12,
          $sformatf("scan time %0d clocks", (t1 - t0) / 10));
    wait_int(INT_SCAN_DONE);
    wait_int(INT_RX_DONE);
    check(overlap > 0, "DMA load overlapped the scan");
    wreg(REG_MATCHER_MODE, 64'b11);             // scan bank 1 into result bank 1
    wreg(REG_MODER, 64'd1);
    wait_int(INT_SCAN_DONE);
    rreg(REG_SRC_MEM_STATE, v);
    expect_hits(100, SW, 104, pa, sa);
    expect_hits(1000, SW, 104, pb, sb);
    check(pa.size() >= 6 && pb.size() >= 6, "planted copies found by reference");
    check(v[47:32] == 16'(pa.size()) && v[63:48] == 16'(pb.size()), "result counts");
    // transmit both result banks to ext words 3000 and 3100
    wreg(REG_TRANSMIT_BD, {32'(3000 * 16), 15'd0, 1'b0, 16'((pa.size() + 1) / 2)});
    wait_int(INT_TX_DONE);
    wreg(REG_TRANSMIT_BD, {32'(3100 * 16), 15'd0, 1'b1, 16'((pb.size() + 1) / 2)});
    wait_int(INT_TX_DONE);
    for (int e = 0; e < pa.size(); e++) begin
      logic [63:0] ent;
      ent = u_ext.mem[3000 + e / 2][(e % 2) * 64 +: 64];
      check(ent[31:0] == 32'(pa[e]) && ent[39:32] == 8'(sa[e]), $sformatf("A entry %0d", e));
    end
    for (int e = 0; e < pb.size(); e++) begin
      logic [63:0] ent;
      ent = u_ext.mem[3100 + e / 2][(e % 2) * 64 +: 64];
      check(ent[31:0] == 32'(pb[e]) && ent[39:32] == 8'(sb[e]), $sformatf("B entry %0d", e));
    end
    $display("hits A=%0d B=%0d overlap=%0d", pa.size(), pb.size(), overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
