// tb_dna_soc: end-to-end test of the DNA matching SoC at its default sizes
// (four matchers, 64 KB + 4 KB of local memory each, 64 KB on-chip memory).
//
// The testbench plays the master processor (a bus master on the processor
// port) and the external memory (a behavioural 512 KB memory on the external
// port). It builds a random source sequence P of 8 segments x 2047 words plus
// one overlap word (about 1M bases) with mutated copies of a 64-base target T
// planted in every segment, then runs the parallel matching flow:
//   1. dispatch: program T, mask and threshold into all four matchers and
//      have each local DMA load segment k into source bank 0;
//   2. start all four scans, and while they run, load segments 4..7 into
//      source bank 1 (ping-pong);
//   3. scan bank 1 into result bank 1;
//   4. every matcher transmits its two result banks to on-chip memory; the
//      DMA controller copies the result area to external memory;
//   5. merge: the processor reads all results, removes the duplicate found in
//      the one-word overlaps, and picks the best [similarity, position];
//   6. a low-threshold scan fills a result bank so that it overflows.
// Every result, count, interrupt and the merged answer are compared with a
// reference computed here. The four scans must run in parallel: all four
// finish within one scan time (one 64-base window per clock) of their start.
// The test counts bus contention, scan/DMA overlap, result overflows,
// interrupts and DMA-controller copies and fails if any never happened.
module tb_dna_soc;
  import dna_pkg::*;
  localparam int NMAT  = 4;
  localparam int SW    = 2048;                // source bank words (default)
  localparam int RW    = 128;                 // result bank words (default)
  localparam int SEGW  = SW - 1;              // stride between segments
  localparam int NSEG  = 2 * NMAT;
  localparam int PW    = NSEG * SEGW + 1;     // words of P
  localparam int NPOS  = (SW - 1) * 64 + 1;   // positions per segment
  localparam int THR   = 100;
  localparam int THR_LOW = 75;
  localparam int EXTW  = 32768;
  localparam int RES_OCM = 1024;              // result area in on-chip memory (words)
  localparam int RES_EXT = 20000;             // result copy in external memory (words)

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t ppu_req, ext_req; bus_rsp_t ppu_rsp, ext_rsp;
  logic [NMAT-1:0] matcher_irq; logic dma_irq; logic [15:0] bus_decode_errors;
  int checks = 0, failures = 0;
  int n_contention = 0, n_overlap = 0, n_overflow = 0, n_irq = 0, n_sysdma = 0, n_hits = 0, n_dup = 0;

  dna_soc dut (.*);
  tb_bus_master u_ppu (.clk, .req(ppu_req), .rsp(ppu_rsp));
  tb_ext_mem #(.WORDS(EXTW), .LATENCY(3)) u_ext (.clk, .s_req(ext_req), .s_rsp(ext_rsp));

  // mechanism counters
  logic [NMAT-1:0] irq_q;
  always @(posedge clk) begin
    int nreq;
    nreq = 0;
    for (int i = 0; i < NMAT + 2; i++) nreq += int'(dut.m_req[i].req);
    if (nreq > 1) n_contention++;
    if (dut.g_matcher[0].u_matcher.busy && dut.g_matcher[0].u_matcher.dma_busy) n_overlap++;
    for (int k = 0; k < NMAT; k++) if (matcher_irq[k] && !irq_q[k]) n_irq++;
    irq_q <= matcher_irq;
  end

  logic [127:0] target;
  logic [PW*128-1:0] seq;
  byte unsigned simv [NSEG][NPOS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] mbase(int k);
    return MATCHER_BASE + 32'(k) * MATCHER_STRIDE;
  endfunction
  task automatic wreg(int k, logic [12:0] a, logic [63:0] v);
    u_ppu.write(mbase(k) + 32'(a), {64'd0, v});
  endtask
  task automatic rreg(int k, logic [12:0] a, output logic [63:0] v);
    logic [127:0] d;
    u_ppu.read(mbase(k) + 32'(a), d);
    v = d[63:0];
  endtask
  task automatic wait_int(int k, int bitn);
    logic [63:0] v;
    do begin
      wait (matcher_irq[k]);
      rreg(k, REG_INT_SOURCE, v);
    end while (!v[bitn]);
    wreg(k, REG_INT_SOURCE, 64'(1) << bitn);
  endtask
  function automatic logic [63:0] bd(int word_addr, int bank, int len);
    return {32'(word_addr * 16), 15'd0, 1'(bank), 16'(len)};
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] v;
    logic [127:0] d;
    int exp_n [NSEG];
    int t0, t1, best_sim, best_pos, ref_best_sim, ref_best_pos, merged, ref_unique;
    int done_at [NMAT];
    bit seen [int];

    // ---- build P and the reference similarities
    for (int i = 0; i < PW * 4; i++) seq[i*32 +: 32] = $urandom;
    target = {$urandom, $urandom, $urandom, $urandom};
    for (int s = 0; s < NSEG; s++)
      for (int c = 0; c < 5; c++) begin
        logic [127:0] cp;
        int p;
        cp = target;
        for (int m = 0; m < (c + s) % 5; m++) cp[2*($urandom % 64) +: 2] = 2'($urandom);
        p = s * SEGW * 64 + ((c == 4) ? 0 : 1000 + c * 30000 + int'($urandom % 2000));
        seq[p*2 +: 128] = cp;
      end
    for (int i = 0; i < PW; i++) u_ext.mem[i] = seq[i*128 +: 128];
    ref_best_sim = -1; ref_best_pos = 0;
    for (int s = 0; s < NSEG; s++) begin
      exp_n[s] = 0;
      for (int p = 0; p < NPOS; p++) begin
        int gp;
        gp = s * SEGW * 64 + p;
        simv[s][p] = 8'($countones(~(seq[gp*2 +: 128] ^ target)));
        if (simv[s][p] > THR) begin
          exp_n[s]++;
          if (!seen.exists(gp)) seen[gp] = 1'b1;
          if (int'(simv[s][p]) > ref_best_sim) begin ref_best_sim = simv[s][p]; ref_best_pos = gp; end
        end
      end
    end
    ref_unique = seen.num();
    repeat (3) @(posedge clk); rst_n = 1;

    // ---- 1. dispatch
    for (int k = 0; k < NMAT; k++) begin
      wreg(k, REG_INT_MASK, 64'hF);
      wreg(k, REG_SEQ_DATA_H, target[127:64]);
      wreg(k, REG_SEQ_DATA_L, target[63:0]);
      wreg(k, REG_SEQ_BITS, 64'd128);
      wreg(k, REG_SEQ_MASK_H, '1);
      wreg(k, REG_SEQ_MASK_L, '1);
      wreg(k, REG_SEQ_SIM, 64'(THR));
      wreg(k, REG_REDIRECT, {8'd0, 24'((k + NMAT) * SEGW), 8'd0, 24'(k * SEGW)});
      wreg(k, REG_MATCHER_MODE, 64'b00);
      wreg(k, REG_RECEIVE_BD, bd(k * SEGW, 0, SW) | (64'(EXT_BASE) << 32));
    end
    for (int k = 0; k < NMAT; k++) wait_int(k, INT_RX_DONE);
    for (int k = 0; k < NMAT; k++) begin
      rreg(k, REG_SRC_MEM_STATE, v);
      check(v[15:0] == SW, "bank 0 loaded");
    end

    // ---- 2. parallel scans of bank 0, ping-pong load of bank 1
    t0 = $time / 10;
    for (int k = 0; k < NMAT; k++) wreg(k, REG_MODER, 64'd1);
    for (int k = 0; k < NMAT; k++)
      wreg(k, REG_RECEIVE_BD, bd((k + NMAT) * SEGW, 1, SW) | (64'(EXT_BASE) << 32));
    fork
      begin
        wait (dut.g_matcher[0].u_matcher.u_regs.int_source[INT_SCAN_DONE]); done_at[0] = $time / 10;
      end
      begin
        wait (dut.g_matcher[1].u_matcher.u_regs.int_source[INT_SCAN_DONE]); done_at[1] = $time / 10;
      end
      begin
        wait (dut.g_matcher[2].u_matcher.u_regs.int_source[INT_SCAN_DONE]); done_at[2] = $time / 10;
      end
      begin
        wait (dut.g_matcher[3].u_matcher.u_regs.int_source[INT_SCAN_DONE]); done_at[3] = $time / 10;
      end
    join
    t1 = done_at[0];
    for (int k = 1; k < NMAT; k++) if (done_at[k] > t1) t1 = done_at[k];
    check(t1 - t0 <= NPOS + 200, $sformatf("four scans in parallel: %0d clocks for %0d windows each", t1 - t0, NPOS));
    check(t1 - t0 >= NPOS, "scan cannot beat one window per clock");
    for (int k = 0; k < NMAT; k++) begin wait_int(k, INT_SCAN_DONE); wait_int(k, INT_RX_DONE); end

    // ---- 3. scan bank 1 into result bank 1
    for (int k = 0; k < NMAT; k++) wreg(k, REG_MATCHER_MODE, 64'b11);
    for (int k = 0; k < NMAT; k++) wreg(k, REG_MODER, 64'd1);
    for (int k = 0; k < NMAT; k++) wait_int(k, INT_SCAN_DONE);

    // ---- 4. results to on-chip memory, then a copy to external memory
    for (int k = 0; k < NMAT; k++) begin
      rreg(k, REG_SRC_MEM_STATE, v);
      check(int'(v[47:32]) == exp_n[k] && int'(v[63:48]) == exp_n[k + NMAT],
            $sformatf("matcher %0d result counts %0d/%0d exp %0d/%0d", k, v[47:32], v[63:48], exp_n[k], exp_n[k+NMAT]));
      for (int b = 0; b < 2; b++) begin
        wreg(k, REG_TRANSMIT_BD, bd((k * 2 + b) * RW, b, RW));
        wait_int(k, INT_TX_DONE);
      end
    end
    u_ppu.write(SYSDMA_BASE + 32'h00, 128'(OCM_BASE));
    u_ppu.write(SYSDMA_BASE + 32'h08, 128'(EXT_BASE + 32'(RES_EXT * 16)));
    u_ppu.write(SYSDMA_BASE + 32'h10, 128'(RES_OCM));
    u_ppu.write(SYSDMA_BASE + 32'h18, 128'd3);
    wait (dma_irq);
    n_sysdma++;
    u_ppu.write(SYSDMA_BASE + 32'h18, 128'd0);

    // ---- 5. merge
    best_sim = -1; best_pos = 0; merged = 0;
    seen.delete();
    for (int s = 0; s < NSEG; s++) begin
      int k, b, e, p;
      k = s % NMAT; b = s / NMAT; e = 0;
      for (p = 0; p < NPOS; p++)
        if (simv[s][p] > THR) begin
          logic [63:0] ent;
          int gp;
          gp = s * SEGW * 64 + p;
          u_ppu.read(OCM_BASE + 32'(((k * 2 + b) * RW + e / 2) * 16), d);
          ent = d[(e % 2) * 64 +: 64];
          check(ent[31:0] == 32'(gp) && ent[39:32] == simv[s][p], $sformatf("seg %0d entry %0d", s, e));
          check(u_ext.mem[RES_EXT + (k * 2 + b) * RW + e / 2] == d, "result copy in external memory");
          if (!seen.exists(int'(ent[31:0]))) begin
            seen[int'(ent[31:0])] = 1'b1;
            merged++;
            if (int'(ent[39:32]) > best_sim) begin best_sim = ent[39:32]; best_pos = ent[31:0]; end
          end else n_dup++;
          e++;
        end
      n_hits += e;
    end
    check(merged == ref_unique, $sformatf("merged hits %0d exp %0d", merged, ref_unique));
    check(best_sim == ref_best_sim && best_pos == ref_best_pos, "best [similarity, position]");
    $display("best similarity %0d at base %0d; %0d hits, %0d after merging", best_sim, best_pos, n_hits, merged);

    // ---- 6. low threshold: result bank overflows
    for (int k = 0; k < NMAT; k++) begin
      wreg(k, REG_SEQ_SIM, 64'(THR_LOW));
      wreg(k, REG_MATCHER_MODE, 64'b00);
      wreg(k, REG_MODER, 64'd1);
    end
    for (int k = 0; k < NMAT; k++) begin
      int e;
      wait_int(k, INT_SCAN_DONE);
      rreg(k, REG_INT_SOURCE, v);
      check(v[INT_OVERFLOW], "overflow interrupt");
      if (v[INT_OVERFLOW]) n_overflow++;
      wreg(k, REG_INT_SOURCE, 64'hF);
      rreg(k, REG_SRC_MEM_STATE, v);
      check(v[47:32] == 16'(2 * RW), "full result bank");
      wreg(k, REG_TRANSMIT_BD, bd(k * 2 * RW, 0, RW));
      wait_int(k, INT_TX_DONE);
      e = 0;
      for (int p = 0; p < NPOS && e < 8; p++)
        if (simv[k][p] > THR_LOW) begin
          u_ppu.read(OCM_BASE + 32'((k * 2 * RW + e / 2) * 16), d);
          check(d[(e % 2) * 64 +: 40] == {simv[k][p], 32'(k * SEGW * 64 + p)}, "low-threshold entry");
          e++;
        end
    end

    check(bus_decode_errors == 0, "no decode errors");
    check(n_contention > 0, "bus contention happened");
    check(n_overlap > 0, "ping-pong load overlapped a scan");
    check(n_overflow == NMAT, "overflow happened");
    check(n_irq > 0 && n_sysdma > 0, "interrupts and DMA-controller copy happened");
    check(n_dup > 0, "a match in a segment overlap was found twice and merged");
    $display("contention=%0d overlap=%0d overflow=%0d irq=%0d sysdma=%0d hits=%0d duplicates=%0d",
             n_contention, n_overlap, n_overflow, n_irq, n_sysdma, n_hits, n_dup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
