// rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters, searching from the one after the last winner.
// The priority pointer moves only when `advance` is high, so an arbitration
// whose grant is later discarded does not cost the requester its turn.
// Combinational grant, pointer updated on the clock edge.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);

  logic [N-1:0] last;  // one-hot: previous winner

  always_comb begin
    int unsigned idx;
    int unsigned base;
    grant = '0;
    base = 0;
    for (int unsigned i = 0; i < N; i++) if (last[i]) base = i;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = (base + k) % N;
      if (req[idx] && grant == '0) grant[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       last <= N'(1) << (N - 1);
    else if (advance && grant != '0)  last <= grant;
  end

endmodule
