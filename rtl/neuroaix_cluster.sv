// neuroaix_cluster: the complete simulation system, NX x NY nodes.
//
// Every node is linked to every other node of its row and of its column
// (5 x 7 = 35 nodes by default: 4 row links and 6 column links per node).
// Spikes are broadcast in two steps: from the source to its whole row and
// column, then from each node of the source's column along its own row, so
// every node is reached in at most two hops; each node therefore uses two
// synchronizations per timestep. Links are wired directly here: in the
// physical system each is a transceiver pair (64/66b encoding) with a
// reliability layer (see arq_link), which add latency but do not change
// what arrives or in which order. The host bridge feeds node (0,0);
// configuration packets reach their node by unicast xy routing. Each
// node's two memory channels and its observation signals are ports, node n
// at (n mod NX, n div NX). All nodes share the run control and settings.
module neuroaix_cluster
  import neuroaix_pkg::*;
#(
  parameter int unsigned NX      = 5,
  parameter int unsigned NY      = 7,
  parameter int unsigned NW      = 10,
  parameter int unsigned NPW     = 255,
  parameter int unsigned PIPE    = 30,
  parameter int unsigned STRIDE  = 41,
  parameter int unsigned NN      = NX * NY
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic [TS_W-1:0] n_steps,
  input  logic [1:0]      n_sync,
  input  logic [7:0]      npw,
  input  logic [7:0]      prefetch,
  input  logic [3:0]      max_par,
  input  lif_param_t      prm,
  input  logic            host_valid,
  output logic            host_ready,
  input  packet_t         host_pkt,
  output logic            mem_req_valid [NN][2],
  input  logic            mem_req_ready [NN][2],
  output logic [MADDR_W-1:0] mem_req_addr [NN][2],
  output logic [7:0]      mem_req_beats [NN][2],
  input  logic            mem_rsp_valid [NN][2],
  output logic            mem_rsp_ready [NN][2],
  input  logic [BEAT_W-1:0] mem_rsp_data [NN][2],
  output logic            mon_spike_valid [NN],
  output logic [LID_W-1:0] mon_spike_lid  [NN],
  output logic [TS_W-1:0] cur_ts        [NN],
  output logic            finished      [NN],
  output logic [31:0]     n_lookups     [NN],
  output logic [31:0]     n_synapses    [NN],
  output logic [31:0]     n_forwarded   [NN],
  output logic [31:0]     n_wait_cycles [NN],
  output logic [31:0]     err_late      [NN],
  output logic [31:0]     err_overflow  [NN]
);
  localparam int unsigned NL = NX + NY - 2;

  logic    o_valid [NN][NL];
  logic    o_ready [NN][NL];
  packet_t o_pkt   [NN][NL];
  logic    i_valid [NN][NL];
  logic    i_ready [NN][NL];
  packet_t i_pkt   [NN][NL];
  logic    h_ready [NN];

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned N = y * NX + x;
      // row links: port toward x2 on node (x,y) <-> port toward x on (x2,y)
      for (genvar x2 = 0; x2 < NX; x2++) begin : g_r
        if (x2 != x) begin : g_c
          localparam int unsigned P = (x2 < x) ? x2 : x2 - 1;
          localparam int unsigned Q = (x < x2) ? x : x - 1;
          localparam int unsigned M = y * NX + x2;
          assign i_valid[M][Q] = o_valid[N][P];
          assign i_pkt[M][Q]   = o_pkt[N][P];
          assign o_ready[N][P] = i_ready[M][Q];
        end
      end
      for (genvar y2 = 0; y2 < NY; y2++) begin : g_cl
        if (y2 != y) begin : g_c
          localparam int unsigned P = NX - 1 + ((y2 < y) ? y2 : y2 - 1);
          localparam int unsigned Q = NX - 1 + ((y < y2) ? y : y - 1);
          localparam int unsigned M = y2 * NX + x;
          assign i_valid[M][Q] = o_valid[N][P];
          assign i_pkt[M][Q]   = o_pkt[N][P];
          assign o_ready[N][P] = i_ready[M][Q];
        end
      end

      logic unused_busy;
      neuroaix_node #(.NX(NX), .NY(NY), .NW(NW), .NPW(NPW), .PIPE(PIPE), .STRIDE(STRIDE)) u_node (
        .clk, .rst_n, .my_x(4'(x)), .my_y(4'(y)),
        .run, .n_steps, .n_sync, .n_neigh(5'(NL)), .npw, .prefetch, .max_par, .prm,
        .link_in_valid(i_valid[N]), .link_in_ready(i_ready[N]), .link_in_pkt(i_pkt[N]),
        .link_out_valid(o_valid[N]), .link_out_ready(o_ready[N]), .link_out_pkt(o_pkt[N]),
        .host_valid(N == 0 ? host_valid : 1'b0), .host_ready(h_ready[N]), .host_pkt(host_pkt),
        .mem_req_valid(mem_req_valid[N]), .mem_req_ready(mem_req_ready[N]),
        .mem_req_addr(mem_req_addr[N]), .mem_req_beats(mem_req_beats[N]),
        .mem_rsp_valid(mem_rsp_valid[N]), .mem_rsp_ready(mem_rsp_ready[N]),
        .mem_rsp_data(mem_rsp_data[N]),
        .mon_spike_valid(mon_spike_valid[N]), .mon_spike_lid(mon_spike_lid[N]),
        .cur_ts(cur_ts[N]), .busy(unused_busy), .finished(finished[N]),
        .n_lookups(n_lookups[N]), .n_synapses(n_synapses[N]), .n_forwarded(n_forwarded[N]),
        .n_wait_cycles(n_wait_cycles[N]), .err_late(err_late[N]), .err_overflow(err_overflow[N])
      );
    end
  end
  assign host_ready = h_ready[0];
endmodule
