// tb_onchip_mem: self-checking test of the on-chip memory slave.
// Random bus writes and reads against a reference array; every transfer must
// be acknowledged one clock after the request.
module tb_onchip_mem;
  import dna_pkg::*;
  localparam int W = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t s_req; bus_rsp_t s_rsp;
  logic [127:0] model [W];
  logic [W-1:0] written;
  int checks = 0, failures = 0;

  onchip_mem #(.WORDS(W)) dut (.*);
  tb_bus_master u_m (.clk, .req(s_req), .rsp(s_rsp));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] d;
    int a;
    written = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      a = $urandom % W;
      if ($urandom % 2 || !written[a]) begin
        model[a] = {$urandom, $urandom, $urandom, $urandom};
        written[a] = 1'b1;
        u_m.write(32'(a * 16), model[a]);
      end else begin
        u_m.read(32'(a * 16), d);
        checks++;
        if (d !== model[a]) begin failures++; $display("FAIL read word %0d", a); end
      end
      checks++;
      if (u_m.last_wait != 1) begin failures++; $display("FAIL latency %0d", u_m.last_wait); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
