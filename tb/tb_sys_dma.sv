// tb_sys_dma: self-checking test of the DMA controller on a small bus with
// an on-chip memory and a behavioural external memory. Programs copies from
// external to on-chip memory and back, checks the data, the status register,
// the interrupt, a zero-length start and that a copy of n words makes n
// transfers to the external memory.
module tb_sys_dma;
  import dna_pkg::*;
  localparam logic [2:0][31:0] BASE = {32'h8000_0000, 32'h2000_0000, 32'h0000_0000};
  localparam logic [2:0][31:0] MASK = {32'hFC00_0000, 32'hFFFF_0000, 32'hFFFF_0000};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t m_req [2]; bus_rsp_t m_rsp [2];
  bus_req_t s_req [3]; bus_rsp_t s_rsp [3];
  logic [15:0] decode_errors;
  logic irq;
  int checks = 0, failures = 0;

  onchip_bus #(.NM(2), .NS(3), .SLV_BASE(BASE), .SLV_MASK(MASK)) u_bus (.*);
  tb_bus_master u_m (.clk, .req(m_req[0]), .rsp(m_rsp[0]));
  onchip_mem #(.WORDS(256)) u_ocm (.clk, .rst_n, .s_req(s_req[0]), .s_rsp(s_rsp[0]));
  sys_dma dut (.clk, .rst_n, .s_req(s_req[1]), .s_rsp(s_rsp[1]), .m_req(m_req[1]), .m_rsp(m_rsp[1]), .irq);
  tb_ext_mem #(.WORDS(1024), .LATENCY(3)) u_ext (.clk, .s_req(s_req[2]), .s_rsp(s_rsp[2]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic copy(logic [31:0] src, logic [31:0] dst, int n, bit ien);
    logic [127:0] st;
    u_m.write(32'h2000_0000, 128'(src));
    u_m.write(32'h2000_0008, 128'(dst));
    u_m.write(32'h2000_0010, 128'(n));
    u_m.write(32'h2000_0018, {126'd0, ien, 1'b1});
    do u_m.read(32'h2000_0018, st); while (st[0]);
    check(st[1] == 1'b1, "done status");
    check(irq == ien, "irq follows enable");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x0;
    logic [127:0] d;
    for (int i = 0; i < 1024; i++) u_ext.mem[i] = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(posedge clk); rst_n = 1;
    x0 = u_ext.transfers;
    copy(32'h8000_0000 + 32'(40 * 16), 32'h0000_0000 + 32'(10 * 16), 100, 1);
    check(u_ext.transfers - x0 == 100, "one external read per word");
    for (int i = 0; i < 100; i++) begin
      u_m.read(32'((10 + i) * 16), d);
      check(d == u_ext.mem[40 + i], $sformatf("ext->ocm word %0d", i));
    end
    u_m.write(32'h2000_0018, 128'd0);               // clear done
    check(!irq, "irq cleared");
    copy(32'h0000_0000 + 32'(10 * 16), 32'h8000_0000 + 32'(600 * 16), 100, 0);
    for (int i = 0; i < 100; i++) check(u_ext.mem[600 + i] == u_ext.mem[40 + i], $sformatf("ocm->ext word %0d", i));
    copy(32'h0, 32'h10, 0, 1);                       // zero length completes at once
    u_m.read(32'h2000_0010, d);
    check(d[15:0] == 0, "length readback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
