// tb_onchip_bus: self-checking test of the shared bus with its arbiter.
// Three testbench masters run concurrent writes and reads to three memory
// slaves of different latencies. Checks that every word reaches the slave its
// address decodes to, that reads return it, that contention occurred and
// was resolved, and that an unmapped address is answered and counted.
module tb_onchip_bus;
  import dna_pkg::*;
  localparam int NM = 3, NS = 3;
  localparam logic [NS-1:0][31:0] BASE = {32'h8000_0000, 32'h1000_0000, 32'h0000_0000};
  localparam logic [NS-1:0][31:0] MASK = {32'hFC00_0000, 32'hFFFF_0000, 32'hFFFF_0000};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t m_req [NM]; bus_rsp_t m_rsp [NM];
  bus_req_t s_req [NS]; bus_rsp_t s_rsp [NS];
  logic [15:0] decode_errors;
  int checks = 0, failures = 0, contention = 0;

  onchip_bus #(.NM(NM), .NS(NS), .SLV_BASE(BASE), .SLV_MASK(MASK)) dut (.*);
  tb_bus_master u_m0 (.clk, .req(m_req[0]), .rsp(m_rsp[0]));
  tb_bus_master u_m1 (.clk, .req(m_req[1]), .rsp(m_rsp[1]));
  tb_bus_master u_m2 (.clk, .req(m_req[2]), .rsp(m_rsp[2]));
  tb_ext_mem #(.WORDS(256), .LATENCY(1)) u_s0 (.clk, .s_req(s_req[0]), .s_rsp(s_rsp[0]));
  tb_ext_mem #(.WORDS(256), .LATENCY(2)) u_s1 (.clk, .s_req(s_req[1]), .s_rsp(s_rsp[1]));
  tb_ext_mem #(.WORDS(256), .LATENCY(4)) u_s2 (.clk, .s_req(s_req[2]), .s_rsp(s_rsp[2]));

  always @(posedge clk) if ((m_req[0].req + m_req[1].req + m_req[2].req) > 1) contention++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [127:0] pattern(int m, int s, int i);
    return {32'(m), 32'(s), 32'(i), 32'hC0DE_0000 + 32'(m * 1000 + s * 100 + i)};
  endfunction

  // master m writes words m*32+i of every slave, then reads them back
  task automatic traffic(int m);
    logic [127:0] d;
    for (int i = 0; i < 32; i++)
      for (int s = 0; s < NS; s++) begin
        if (m == 0) u_m0.write(BASE[s] + 32'((m * 32 + i) * 16), pattern(m, s, i));
        if (m == 1) u_m1.write(BASE[s] + 32'((m * 32 + i) * 16), pattern(m, s, i));
        if (m == 2) u_m2.write(BASE[s] + 32'((m * 32 + i) * 16), pattern(m, s, i));
      end
    for (int i = 0; i < 32; i++)
      for (int s = 0; s < NS; s++) begin
        if (m == 0) u_m0.read(BASE[s] + 32'((m * 32 + i) * 16), d);
        if (m == 1) u_m1.read(BASE[s] + 32'((m * 32 + i) * 16), d);
        if (m == 2) u_m2.read(BASE[s] + 32'((m * 32 + i) * 16), d);
        check(d == pattern(m, s, i), $sformatf("readback m%0d s%0d i%0d", m, s, i));
      end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] d;
    repeat (2) @(posedge clk); rst_n = 1;
    fork
      traffic(0);
      traffic(1);
      traffic(2);
    join
    for (int m = 0; m < NM; m++)
      for (int i = 0; i < 32; i++) begin
        check(u_s0.mem[m * 32 + i] == pattern(m, 0, i), "slave 0 content");
        check(u_s1.mem[m * 32 + i] == pattern(m, 1, i), "slave 1 content");
        check(u_s2.mem[m * 32 + i] == pattern(m, 2, i), "slave 2 content");
      end
    u_m1.read(32'h4000_0000, d);
    @(negedge clk);
    check(d == 0 && decode_errors == 1, "unmapped address");
    check(contention > 0, "contention exercised");
    $display("contention cycles=%0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
