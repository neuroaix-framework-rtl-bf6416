// local_router: purely combinational distribution of synaptic inputs from
// the lookup lanes to the per-worker ring-buffer FIFOs.
//
// Each of the L input lanes holds one synapse (valid, target worker, input
// word). Every output (one per worker) has its own round-robin arbiter over
// the lanes that address it, so up to NW synapses move per cycle when their
// targets differ, and lanes aimed at the same worker queue up behind each
// other (the back-pressure case of badly distributed targets). A lane sees
// lane_ack in the cycle its synapse is taken. Targets beyond NW are dropped
// and counted in bad_target. Round-robin, combinational and per-ring-buffer
// arbitration follow the document; the lane structure is this design's.
module local_router
  import neuroaix_pkg::*;
#(
  parameter int unsigned L  = 16,
  parameter int unsigned NW = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [L-1:0]    lane_valid,
  input  logic [7:0]      lane_worker [L],
  input  syn_in_t         lane_syn    [L],
  output logic [L-1:0]    lane_ack,
  output logic [NW-1:0]   out_valid,
  output syn_in_t         out_syn     [NW],
  input  logic [NW-1:0]   out_ready,
  output logic [15:0]     bad_target
);
  logic [L-1:0] req   [NW];
  logic [L-1:0] grant [NW];
  logic [NW-1:0] gvld;
  logic [L-1:0] bad;

  always_comb begin
    for (int unsigned l = 0; l < L; l++)
      bad[l] = lane_valid[l] && (32'(lane_worker[l]) >= NW);
    for (int unsigned w = 0; w < NW; w++)
      for (int unsigned l = 0; l < L; l++)
        req[w][l] = lane_valid[l] && (32'(lane_worker[l]) == w) && out_ready[w];
  end

  for (genvar w = 0; w < NW; w++) begin : g_out
    rr_arbiter #(.N(L)) u_arb (
      .clk, .rst_n, .req(req[w]), .prio('0), .advance(1'b1),
      .grant(grant[w]), .valid(gvld[w])
    );
  end

  always_comb begin
    lane_ack = bad;
    for (int unsigned w = 0; w < NW; w++) begin
      out_valid[w] = gvld[w];
      out_syn[w]   = '0;
      for (int unsigned l = 0; l < L; l++)
        if (grant[w][l]) out_syn[w] = lane_syn[l];
      lane_ack |= grant[w];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bad_target <= '0;
    else if (bad != '0) bad_target <= bad_target + 16'($countones(bad));
  end
endmodule
