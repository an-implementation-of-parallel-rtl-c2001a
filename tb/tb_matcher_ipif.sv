// tb_matcher_ipif: self-checking test of the matcher's bus slave attachment.
// A small register array in the testbench stands behind the interface. Bus
// writes must reach it exactly once with the register offset and the low 64
// bits of data; bus reads must return its value in the low half of the bus
// word; every transfer must be acknowledged one clock after the request.
module tb_matcher_ipif;
  import dna_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t s_req; bus_rsp_t s_rsp;
  logic reg_we; logic [12:0] reg_addr; logic [63:0] reg_wdata, reg_rdata;
  logic [63:0] regs [1024];
  int nwrites = 0;
  int checks = 0, failures = 0;

  matcher_ipif dut (.*);
  bus_req_t m_req_tb, s_req_hold = '0;
  logic use_hold = 1'b0;
  tb_bus_master u_m (.clk, .req(m_req_tb), .rsp(s_rsp));
  assign s_req = use_hold ? s_req_hold : m_req_tb;

  assign reg_rdata = regs[reg_addr[12:3]];
  always @(posedge clk) if (reg_we) begin regs[reg_addr[12:3]] <= reg_wdata; nwrites++; end

  // A write whose request stays high through its acknowledge clock, as the
  // design's own bus masters drive it: it must still be executed once.
  task automatic hold_write(input logic [31:0] addr, input logic [127:0] data);
    @(negedge clk);
    s_req_hold = '{req: 1'b1, we: 1'b1, addr: addr, wdata: data};
    use_hold = 1'b1;
    do @(negedge clk); while (!s_rsp.ack);
    @(negedge clk);
    s_req_hold.req = 1'b0;
    use_hold = 1'b0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] model [1024];
    logic [127:0] d, v;
    int r, nw0;
    for (int i = 0; i < 1024; i++) begin regs[i] = 0; model[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      r = $urandom % 1024;
      if ($urandom % 2) begin
        v = {$urandom, $urandom, $urandom, $urandom};
        nw0 = nwrites;
        if (t % 4 == 1) hold_write(32'h1000_0000 | 32'(r << 3), v);
        else            u_m.write(32'h1000_0000 | 32'(r << 3), v);
        model[r] = v[63:0];
        checks++;
        if (nwrites != nw0 + 1 || (t % 4 != 1 && u_m.last_wait != 1)) begin
          failures++; $display("FAIL write count/latency %0d %0d", nwrites - nw0, u_m.last_wait);
        end
      end else begin
        u_m.read(32'h1000_0000 | 32'(r << 3), d);
        checks++;
        if (d !== {64'd0, model[r]} || u_m.last_wait != 1) begin
          failures++; $display("FAIL read %0d", r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
