// tb_matcher_comparator: self-checking test of the 128-bit comparator.
// Drives random windows, targets, masks and lengths (plus all-equal and
// all-different corner cases) and checks that the similarity, counted here
// bit by bit, and the position appear exactly one clock after the input.
module tb_matcher_comparator;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [127:0] win, tgt, msk;
  logic [7:0] len, sim;
  logic [31:0] pos_in, pos_out;
  int checks = 0, failures = 0;

  matcher_comparator dut (.clk, .rst_n, .in_valid, .src_window(win), .position_in(pos_in),
    .target(tgt), .mask(msk), .length_bits(len), .out_valid, .similarity(sim), .position_out(pos_out));

  always #5 clk = ~clk;

  function automatic int ref_sim(logic [127:0] a, logic [127:0] b, logic [127:0] m, int l);
    int n = 0;
    for (int i = 0; i < 128; i++) if (i < l && m[i] && a[i] == b[i]) n++;
    return n;
  endfunction

  task automatic apply_and_check(logic [127:0] a, logic [127:0] b, logic [127:0] m, logic [7:0] l, logic [31:0] p);
    int exp;
    exp = ref_sim(a, b, m, l);
    @(negedge clk);
    win = a; tgt = b; msk = m; len = l; pos_in = p; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || sim !== 8'(exp) || pos_out !== p) begin
      failures++;
      $display("FAIL sim=%0d exp=%0d valid=%0b pos=%0d/%0d", sim, exp, out_valid, pos_out, p);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; win = 0; tgt = 0; msk = 0; len = 0; pos_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    apply_and_check('1, '1, '1, 8'd128, 32'd7);           // all equal -> 128
    apply_and_check('0, '1, '1, 8'd128, 32'd8);           // all differ -> 0
    apply_and_check('1, '1, '1, 8'd20, 32'd9);            // length limits -> 20
    apply_and_check('1, '1, {64'd0, 64'hFFFF}, 8'd128, 32'd10); // mask -> 16
    for (int t = 0; t < 2000; t++) begin
      logic [127:0] a, b, m;
      a = {$urandom, $urandom, $urandom, $urandom};
      b = (t % 3 == 0) ? a ^ (128'(1) << ($urandom % 128)) : {$urandom, $urandom, $urandom, $urandom};
      m = (t % 2 == 0) ? '1 : {$urandom, $urandom, $urandom, $urandom};
      apply_and_check(a, b, m, 8'($urandom % 129), $urandom);
    end
    // out_valid must drop when no input is given
    @(negedge clk); checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
