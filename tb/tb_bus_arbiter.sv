// tb_bus_arbiter: self-checking test of the round-robin arbiter.
// Random request patterns are applied; each grant is compared with a
// reference that searches from the master after the last one taken, and a
// master that requests continuously must be served within N grants.
module tb_bus_arbiter;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req; logic take, gnt_valid; logic [2:0] gnt_idx;
  int checks = 0, failures = 0;
  int last = N - 1;
  int since [N];

  bus_arbiter #(.N(N)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; take = 0;
    for (int i = 0; i < N; i++) since[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int exp;
      exp = -1;
      @(negedge clk);
      req = (t < 1500) ? N'($urandom) : {N{1'b1}};
      if (t == 1500) for (int i = 0; i < N; i++) since[i] = 0;
      take = ($urandom % 4) != 0;
      for (int k = 1; k <= N; k++) if (exp < 0 && req[(last + k) % N]) exp = (last + k) % N;
      #1;
      checks++;
      if (gnt_valid != (exp >= 0) || (exp >= 0 && int'(gnt_idx) != exp)) begin
        failures++; $display("FAIL t=%0d req=%b exp=%0d got=%0d/%0b", t, req, exp, gnt_idx, gnt_valid);
      end
      if (take && exp >= 0) begin
        last = exp;
        for (int i = 0; i < N; i++) since[i] = (i == exp) ? 0 : since[i] + (req[i] ? 1 : 0);
        if (t >= 1500) begin
          checks++;
          for (int i = 0; i < N; i++) if (since[i] >= N) begin failures++; $display("FAIL starvation %0d", i); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
