// tb_result_mem: self-checking test of the two-bank result memory.
// Writes 64-bit entries one at a time into both banks and checks that each
// 128-bit word read back holds entry 2k in its low half and entry 2k+1 in its
// high half, one clock after the read address.
module tb_result_mem;
  localparam int W = 16, AW = $clog2(W);
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, wbank, re, rbank;
  logic [AW:0] wentry;
  logic [AW-1:0] raddr;
  logic [63:0] wdata;
  logic [127:0] rdata;
  logic [63:0] model [2][2*W];
  int checks = 0, failures = 0;

  result_mem #(.BANK_WORDS(W)) dut (.clk, .we, .wbank, .wentry, .wdata, .re, .rbank, .raddr, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; wbank = 0; rbank = 0; wentry = 0; raddr = 0; wdata = 0;
    for (int b = 0; b < 2; b++)
      for (int e = 0; e < 2 * W; e++) begin
        @(negedge clk);
        model[b][e] = {$urandom, $urandom};
        we = 1; wbank = 1'(b); wentry = (AW+1)'(e); wdata = model[b][e];
      end
    @(negedge clk); we = 0;
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < W; i++) begin
        @(negedge clk); re = 1; rbank = 1'(b); raddr = AW'(i);
        @(negedge clk); re = 0;
        checks++;
        if (rdata !== {model[b][2*i+1], model[b][2*i]}) begin
          failures++; $display("FAIL bank %0d word %0d", b, i);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
