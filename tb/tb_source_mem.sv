// tb_source_mem: self-checking test of the two-bank source memory.
// Writes random words to both banks, reads them back (one-clock read
// latency), checks that the banks are independent and that the read data
// holds while re is low.
module tb_source_mem;
  localparam int W = 64, AW = $clog2(W);
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, wbank, re, rbank;
  logic [AW-1:0] waddr, raddr;
  logic [127:0] wdata, rdata;
  logic [127:0] model [2][W];
  int checks = 0, failures = 0;

  source_mem #(.BANK_WORDS(W)) dut (.clk, .we, .wbank, .waddr, .wdata, .re, .rbank, .raddr, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; wbank = 0; rbank = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < W; i++) begin
        @(negedge clk);
        model[b][i] = {$urandom, $urandom, $urandom, $urandom};
        we = 1; wbank = 1'(b); waddr = AW'(i); wdata = model[b][i];
      end
    @(negedge clk); we = 0;
    for (int t = 0; t < 400; t++) begin
      int b, i;
      b = $urandom % 2; i = $urandom % W;
      @(negedge clk); re = 1; rbank = 1'(b); raddr = AW'(i);
      @(negedge clk); re = 0; raddr = AW'(i + 1);
      checks++;
      if (rdata !== model[b][i]) begin failures++; $display("FAIL bank %0d word %0d", b, i); end
      @(negedge clk);
      checks++;
      if (rdata !== model[b][i]) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
