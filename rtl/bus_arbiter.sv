// bus_arbiter: round-robin arbiter of the on-chip bus.
//
// Picks one of N requesting masters. The search starts at the master after
// the one granted last, so every master that keeps requesting is served
// within N grants. The design gives the bus an arbiter but not its policy;
// round robin is this implementation's choice.
//
// Interface: req is sampled combinationally; gnt_valid/gnt_idx name the
// winner in the same clock. take (the bus accepted the winner) moves the
// priority pointer past it on the next clock edge.
module bus_arbiter #(
  parameter int unsigned N = 6,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          take,
  output logic          gnt_valid,
  output logic [IW-1:0] gnt_idx
);

  logic [IW-1:0] last;

  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int k = 1; k <= int'(N); k++) begin
      int unsigned cand;
      cand = (int'(last) + k) % N;
      if (!gnt_valid && req[cand]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(cand);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 last <= IW'(N - 1);
    else if (take && gnt_valid) last <= gnt_idx;
  end

endmodule
