// tb_workloads: the matching workloads at their evaluated sizes, on the
// whole SoC with default parameters.
//
// Phase A, target 16 B against a 4 MB source: a 64-base target is matched
// against a source of 262,144 words (16.8M bases) held in the external
// memory. The source is cut into 129 segments of up to 2048 words that
// overlap by one word; segment s goes to matcher s%4, bank (s/4)%2, so
// every matcher loads its next segment while it scans the current one.
// After every scan the result bank goes to on-chip memory, and the
// testbench (playing the processor) reads the entries and merges them.
// The merged set of [similarity, position] must equal a reference computed
// here for every position of the source.
//
// Phase B, target 1024 B: a 4096-base target is split into 64 pieces of
// 64 bases, and each piece is matched in turn (only the target registers
// change; the source stays loaded). A hit of piece j at position q votes
// for a target start q - 64*j with its similarity; the summed votes must
// equal a reference, and the best starts must be the planted copies. The
// source in phase B is 64 KB (4 segments, one per matcher) instead of the
// 4 MB or 40 MB evaluated, to keep the run short: 64 pieces x 4 MB would be
// about 270M clocks.
module tb_workloads;
  import dna_pkg::*;
  localparam int NMAT = 4, SW = 2048, RW = 128, SEGW = SW - 1;
  localparam int PW   = 262144;                  // 4 MB source
  localparam int NSEG = (PW - 1 + SEGW - 1) / SEGW;
  localparam int THR  = 100;
  localparam int BW   = 4096;                    // phase B source: 64 KB
  localparam int BSEG = BW / NMAT;               // words per matcher in phase B
  localparam int TB_BASES = 4096;                // phase B target: 1024 B
  localparam int NPIECE = TB_BASES / 64;
  localparam int BTHR = 96;
  localparam int BASE_B = PW;                    // phase B source location (words)

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t ppu_req, ext_req; bus_rsp_t ppu_rsp, ext_rsp;
  logic [NMAT-1:0] matcher_irq; logic dma_irq; logic [15:0] bus_decode_errors;
  int checks = 0, failures = 0;

  dna_soc dut (.*);
  tb_bus_master u_ppu (.clk, .req(ppu_req), .rsp(ppu_rsp));
  tb_ext_mem #(.WORDS(PW + BW), .LATENCY(3)) u_ext (.clk, .s_req(ext_req), .s_rsp(ext_rsp));

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
  function automatic logic [63:0] ext_bd(int word, int bank, int len);
    return {EXT_BASE + 32'(word * 16), 15'd0, 1'(bank), 16'(len)};
  endfunction
  function automatic logic [127:0] window(int gp);     // 64 bases from base gp
    int w, o;
    w = gp / 64; o = gp % 64;
    return 128'({u_ext.mem[w + 1], u_ext.mem[w]} >> (2 * o));
  endfunction
  function automatic int seg_words(int s);
    return (PW - s * SEGW < SW) ? PW - s * SEGW : SW;
  endfunction

  // Collect the result bank of matcher k: transmit to on-chip memory, read
  // the entries, call them back through the queue.
  task automatic collect(int k, int bank, ref logic [63:0] ents[$]);
    logic [63:0] v;
    logic [127:0] d;
    int n;
    rreg(k, REG_SRC_MEM_STATE, v);
    n = bank ? int'(v[63:48]) : int'(v[47:32]);
    check(n < 2 * RW, "no result overflow in a workload run");
    if (n > 0) begin
      wreg(k, REG_TRANSMIT_BD, {32'(k * 2 * RW * 16), 15'd0, 1'(bank), 16'((n + 1) / 2)});
      wait_int(k, INT_TX_DONE);
      for (int e = 0; e < n; e += 2) begin
        u_ppu.read(OCM_BASE + 32'((k * 2 * RW + e / 2) * 16), d);
        ents.push_back(d[63:0]);
        if (e + 1 < n) ents.push_back(d[127:64]);
      end
    end
  endtask

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] target;
    logic [2*TB_BASES-1:0] tlong;
    int ref_sim [int];
    int got_sim [int];
    int votes_ref [int], votes_hw [int];
    int plant_b [3];
    int t0, nround, best1, best2, best3;
    logic [63:0] ents [$];

    // ---------------- phase A data
    for (int i = 0; i < PW + BW; i++) u_ext.mem[i] = {$urandom, $urandom, $urandom, $urandom};
    target = {$urandom, $urandom, $urandom, $urandom};
    for (int c = 0; c < 300; c++) begin
      int p, w, o;
      logic [127:0] cp;
      logic [255:0] two;
      cp = target;
      for (int m = 0; m < c % 6; m++) cp[2*($urandom % 64) +: 2] = 2'($urandom);
      p = (c < 8) ? (c * 37 + 1) * SEGW * 64 - 5 + c : int'($urandom % ((PW - 2) * 64));
      w = p / 64; o = p % 64;
      two = {u_ext.mem[w + 1], u_ext.mem[w]};
      two[2*o +: 128] = cp;
      {u_ext.mem[w + 1], u_ext.mem[w]} = two;
    end
    for (int gp = 0; gp <= (PW - 1) * 64; gp++) begin
      int s;
      s = $countones(~(window(gp) ^ target));
      if (s > THR) ref_sim[gp] = s;
    end
    $display("phase A: %0d segments, %0d reference hits", NSEG, ref_sim.num());
    repeat (3) @(posedge clk); rst_n = 1;

    for (int k = 0; k < NMAT; k++) begin
      wreg(k, REG_INT_MASK, 64'hF);
      wreg(k, REG_SEQ_DATA_H, target[127:64]);
      wreg(k, REG_SEQ_DATA_L, target[63:0]);
      wreg(k, REG_SEQ_SIM, 64'(THR));
      wreg(k, REG_RECEIVE_BD, ext_bd(k * SEGW, 0, seg_words(k)));
    end
    for (int k = 0; k < NMAT; k++) wait_int(k, INT_RX_DONE);
    nround = (NSEG + NMAT - 1) / NMAT;
    t0 = $time / 10;
    for (int r = 0; r < nround; r++) begin
      int b;
      b = r % 2;
      for (int k = 0; k < NMAT; k++) begin
        int s;
        s = r * NMAT + k;
        if (s < NSEG) begin
          if (b == 0) wreg(k, REG_REDIRECT, {8'd0, 24'((s + NMAT) * SEGW), 8'd0, 24'(s * SEGW)});
          else        wreg(k, REG_REDIRECT, {8'd0, 24'(s * SEGW), 8'd0, 24'((s + NMAT) * SEGW)});
          wreg(k, REG_MATCHER_MODE, {62'd0, 1'(b), 1'(b)});
          wreg(k, REG_MODER, 64'd1);
          if (s + NMAT < NSEG) wreg(k, REG_RECEIVE_BD, ext_bd((s + NMAT) * SEGW, 1 - b, seg_words(s + NMAT)));
        end
      end
      for (int k = 0; k < NMAT; k++) begin
        int s;
        s = r * NMAT + k;
        if (s < NSEG) begin
          wait_int(k, INT_SCAN_DONE);
          if (s + NMAT < NSEG) wait_int(k, INT_RX_DONE);
          collect(k, b, ents);
        end
      end
    end
    $display("phase A: %0d clocks of matching for %0d windows (%0d.%02d windows per clock)",
             $time / 10 - t0, (PW - 1) * 64 + 1, ((PW - 1) * 64 + 1) / ($time / 10 - t0),
             (((PW - 1) * 64 + 1) * 100 / ($time / 10 - t0)) % 100);
    foreach (ents[i]) begin
      int gp;
      gp = int'(ents[i][31:0]);
      if (got_sim.exists(gp)) check(got_sim[gp] == int'(ents[i][39:32]), "seam duplicate agrees");
      got_sim[gp] = int'(ents[i][39:32]);
    end
    check(got_sim.num() == ref_sim.num(), $sformatf("phase A hits %0d exp %0d", got_sim.num(), ref_sim.num()));
    foreach (ref_sim[gp])
      check(got_sim.exists(gp) && got_sim[gp] == ref_sim[gp], $sformatf("phase A hit at %0d", gp));
    check(($time / 10 - t0) < ((PW - 1) * 64 + 1) / NMAT * 2, "four matchers share the work");

    // ---------------- phase B: 1024-byte target, 64 pieces
    for (int i = 0; i < TB_BASES / 16; i++) tlong[i*32 +: 32] = $urandom;
    for (int c = 0; c < 3; c++) begin
      logic [2*TB_BASES-1:0] cp;
      logic [2*TB_BASES+127:0] span;
      int w, o;
      cp = tlong;
      for (int m = 0; m < 50 * c; m++) cp[2*($urandom % TB_BASES) +: 2] = 2'($urandom);
      plant_b[c] = 5000 + c * 70000 + int'($urandom % 1000);
      w = plant_b[c] / 64; o = plant_b[c] % 64;
      for (int i = 0; i < TB_BASES / 64 + 2; i++) span[i*128 +: 128] = u_ext.mem[BASE_B + w + i];
      span[2*o +: 2*TB_BASES] = cp;
      for (int i = 0; i < TB_BASES / 64 + 2; i++) u_ext.mem[BASE_B + w + i] = span[i*128 +: 128];
    end
    for (int k = 0; k < NMAT; k++) begin
      int nw;
      nw = (k == NMAT - 1) ? BSEG : BSEG + 1;
      wreg(k, REG_RECEIVE_BD, ext_bd(BASE_B + k * BSEG, 0, nw));
      wait_int(k, INT_RX_DONE);
      wreg(k, REG_REDIRECT, {8'd0, 24'd0, 8'd0, 24'(k * BSEG)});
      wreg(k, REG_MATCHER_MODE, 64'd0);
      wreg(k, REG_SEQ_SIM, 64'(BTHR));
    end
    for (int j = 0; j < NPIECE; j++) begin
      logic [127:0] piece;
      piece = tlong[j*128 +: 128];
      for (int gp = 0; gp <= (BW - 1) * 64; gp++) begin
        int s;
        s = $countones(~(window(BASE_B * 64 + gp) ^ piece));
        if (s > BTHR && gp - 64 * j >= 0) votes_ref[gp - 64 * j] += s;
      end
      ents.delete();
      for (int k = 0; k < NMAT; k++) begin
        wreg(k, REG_SEQ_DATA_H, piece[127:64]);
        wreg(k, REG_SEQ_DATA_L, piece[63:0]);
        wreg(k, REG_MODER, 64'd1);
      end
      for (int k = 0; k < NMAT; k++) begin
        wait_int(k, INT_SCAN_DONE);
        collect(k, 0, ents);
      end
      got_sim.delete();
      foreach (ents[i]) got_sim[int'(ents[i][31:0])] = int'(ents[i][39:32]);   // drop seam duplicates
      foreach (got_sim[gp]) if (gp - 64 * j >= 0) votes_hw[gp - 64 * j] += got_sim[gp];
    end
    check(votes_hw.num() == votes_ref.num(), $sformatf("phase B vote starts %0d exp %0d", votes_hw.num(), votes_ref.num()));
    foreach (votes_ref[p]) check(votes_hw.exists(p) && votes_hw[p] == votes_ref[p], $sformatf("phase B votes at %0d", p));
    best1 = -1; best2 = -1; best3 = -1;
    foreach (votes_hw[p]) begin
      if (best1 < 0 || votes_hw[p] > votes_hw[best1]) begin best3 = best2; best2 = best1; best1 = p; end
      else if (best2 < 0 || votes_hw[p] > votes_hw[best2]) begin best3 = best2; best2 = p; end
      else if (best3 < 0 || votes_hw[p] > votes_hw[best3]) best3 = p;
    end
    check(best1 == plant_b[0] && best2 == plant_b[1] && best3 == plant_b[2], "phase B best starts are the planted copies");
    $display("phase B: best starts %0d %0d %0d (planted %0d %0d %0d), scores %0d %0d %0d",
             best1, best2, best3, plant_b[0], plant_b[1], plant_b[2], votes_hw[best1], votes_hw[best2], votes_hw[best3]);
    check(bus_decode_errors == 0, "no decode errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
