// rr_arbiter: prioritized round-robin arbiter.
//
// Requests flagged in `prio` are served before all others (used for
// time-critical synchronization messages); within a class the grant rotates,
// starting one position after the last granted requester. The grant is
// combinational; the rotation pointer moves on the cycle `advance` is high
// (the granted transfer actually took place). The priority-class rule follows
// the router description; the one-hot, combinational form is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic [N-1:0] prio,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic         valid
);
  logic [$clog2(N > 1 ? N : 2)-1:0] last_q;
  logic [N-1:0] eff;

  always_comb begin
    eff   = ((req & prio) != '0) ? (req & prio) : req;
    grant = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last_q) + k) % N;
      if (grant == '0 && eff[idx]) grant[idx] = 1'b1;
    end
    valid = (grant != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_q <= '0;
    else if (advance && valid) begin
      for (int unsigned i = 0; i < N; i++)
        if (grant[i]) last_q <= i[$bits(last_q)-1:0];
    end
  end

  property p_onehot;
    @(posedge clk) disable iff (!rst_n) $onehot0(grant);
  endproperty
  assert property (p_onehot);
endmodule
