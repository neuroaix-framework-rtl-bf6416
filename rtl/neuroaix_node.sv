// neuroaix_node: one compute node of the cluster.
//
// Data flow of a spike: a worker's neuron fires -> its spike FIFO -> the
// router's local input (packet with source node, source neuron and
// timestep) -> the two-step broadcast over the row and column links, and
// back to this node's own local output -> one of two synapse lookups (the
// source neuron's lowest id bit picks the memory channel) -> padded
// synaptic list read from off-chip memory -> local router -> FIFO of the
// target worker -> that worker's ring buffer, accumulated at timestep
// origin + delay -> read by the worker when that timestep is computed.
// Configuration packets addressed to this node write neuron state; sync
// packets go to the sync controller, which schedules the timesteps.
//
// Sizes (document): NW = 10 workers of up to 255 neurons, 30 pipeline
// stages, 64/32 timestep ring buffers, two memory channels. Sizes of the
// FIFOs, the memory beat of 8 synapses and the list stride are this
// design's. The transceivers and DRAM controllers are outside: their
// packet and memory request/response signals are the node's ports.
module neuroaix_node
  import neuroaix_pkg::*;
#(
  parameter int unsigned NX       = 5,
  parameter int unsigned NY       = 7,
  parameter int unsigned NW       = 10,
  parameter int unsigned NPW      = 255,
  parameter int unsigned PIPE     = 30,
  parameter int unsigned EXC_D    = 64,
  parameter int unsigned INH_D    = 32,
  parameter int unsigned STRIDE   = 41,
  parameter int unsigned MAX_PAR  = 8,
  parameter int unsigned RB_FIFO_D = 16,
  parameter int unsigned NL       = NX + NY - 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0]      my_x,
  input  logic [3:0]      my_y,
  // run control and run-time settings
  input  logic            run,
  input  logic [TS_W-1:0] n_steps,
  input  logic [1:0]      n_sync,
  input  logic [4:0]      n_neigh,
  input  logic [7:0]      npw,
  input  logic [7:0]      prefetch,
  input  logic [3:0]      max_par,
  input  lif_param_t      prm,
  // links to the row and column neighbours (through the transceivers)
  input  logic            link_in_valid  [NL],
  output logic            link_in_ready  [NL],
  input  packet_t         link_in_pkt    [NL],
  output logic            link_out_valid [NL],
  input  logic            link_out_ready [NL],
  output packet_t         link_out_pkt   [NL],
  // host bridge input
  input  logic            host_valid,
  output logic            host_ready,
  input  packet_t         host_pkt,
  // two off-chip memory channels
  output logic            mem_req_valid [2],
  input  logic            mem_req_ready [2],
  output logic [MADDR_W-1:0] mem_req_addr [2],
  output logic [7:0]      mem_req_beats [2],
  input  logic            mem_rsp_valid [2],
  output logic            mem_rsp_ready [2],
  input  logic [BEAT_W-1:0] mem_rsp_data [2],
  // observation
  output logic            mon_spike_valid,
  output logic [LID_W-1:0] mon_spike_lid,
  output logic [TS_W-1:0] cur_ts,
  output logic            busy,
  output logic            finished,
  output logic [31:0]     n_lookups,
  output logic [31:0]     n_synapses,
  output logic [31:0]     n_forwarded,
  output logic [31:0]     n_wait_cycles,
  output logic [31:0]     err_late,
  output logic [31:0]     err_overflow
);
  localparam int unsigned LOC = NL;
  localparam int unsigned HST = NL + 1;
  localparam int unsigned LN  = 2 * SYN_PER_BEAT;

  // ---------------- router ----------------
  logic    r_in_valid [NL+2];
  logic    r_in_ready [NL+2];
  packet_t r_in_pkt   [NL+2];
  logic    r_out_valid [NL+1];
  logic    r_out_ready [NL+1];
  packet_t r_out_pkt   [NL+1];

  for (genvar i = 0; i < NL; i++) begin : g_link
    assign r_in_valid[i]     = link_in_valid[i];
    assign link_in_ready[i]  = r_in_ready[i];
    assign r_in_pkt[i]       = link_in_pkt[i];
    assign link_out_valid[i] = r_out_valid[i];
    assign r_out_ready[i]    = link_out_ready[i];
    assign link_out_pkt[i]   = r_out_pkt[i];
  end
  assign r_in_valid[HST] = host_valid;
  assign host_ready      = r_in_ready[HST];
  assign r_in_pkt[HST]   = host_pkt;

  packet_router #(.NX(NX), .NY(NY)) u_router (
    .clk, .rst_n, .my_x, .my_y,
    .in_valid(r_in_valid), .in_ready(r_in_ready), .in_pkt(r_in_pkt),
    .out_valid(r_out_valid), .out_ready(r_out_ready), .out_pkt(r_out_pkt),
    .n_forwarded
  );

  // ---------------- sync controller ----------------
  logic compute_start, compute_busy, local_idle;
  logic sync_tx_valid, sync_tx_ready, sync_tx_lvl;
  logic sync_rx;
  packet_t lo;
  assign lo = r_out_pkt[LOC];
  assign sync_rx = r_out_valid[LOC] && lo.typ == PKT_SYNC;

  sync_controller u_sync (
    .clk, .rst_n, .run, .n_steps, .n_sync, .n_neigh,
    .compute_start, .cur_ts, .compute_busy, .local_idle,
    .tx_valid(sync_tx_valid), .tx_ready(sync_tx_ready), .tx_lvl(sync_tx_lvl),
    .rx_valid(sync_rx), .rx_lvl(lo.sync_lvl), .rx_ts(lo.ts),
    .busy, .finished, .n_wait_cycles
  );

  // ---------------- workers, spike FIFOs, ring buffers ----------------
  logic [NW-1:0] w_busy, w_spk, sf_valid, sf_pop, rbf_valid, rbf_ready, lr_out_valid;
  logic [7:0]    w_spk_slot [NW];
  logic [7:0]    sf_slot    [NW];
  syn_in_t       lr_out_syn [NW];
  syn_in_t       rbf_syn    [NW];
  logic [15:0]   rb_late    [NW];
  logic [15:0]   rb_ovf     [NW];
  logic          cfg_hit;
  assign cfg_hit = r_out_valid[LOC] && lo.typ == PKT_CONFIG;

  for (genvar w = 0; w < NW; w++) begin : g_w
    logic            rd_en;
    logic [7:0]      rd_slot;
    logic [TS_W-1:0] rd_ts;
    logic [31:0]     rd_exc, rd_inh;
    logic            unused_done, unused_acc, unused_sf_ready, unused_rbf_ready;
    logic [$clog2(NPW+2)-1:0]     unused_sf_cnt;
    logic [$clog2(RB_FIFO_D+1)-1:0] unused_rbf_cnt;

    lif_worker #(.NPW(NPW), .PIPE(PIPE)) u_worker (
      .clk, .rst_n, .start(compute_start), .ts(cur_ts), .npw, .prm,
      .rb_rd_en(rd_en), .rb_rd_slot(rd_slot), .rb_rd_ts(rd_ts),
      .rb_exc(rd_exc), .rb_inh(rd_inh),
      .cfg_we(cfg_hit && 32'(lo.neuron[11:8]) == w), .cfg_slot(lo.neuron[7:0]),
      .cfg_field(lo.field), .cfg_data(lo.data),
      .spk_valid(w_spk[w]), .spk_slot(w_spk_slot[w]), .busy(w_busy[w]), .done(unused_done)
    );

    // Holds every spike one computation can produce, so workers never stall.
    sync_fifo #(.W(8), .DEPTH(NPW + 1)) u_spk_fifo (
      .clk, .rst_n, .in_valid(w_spk[w]), .in_ready(unused_sf_ready), .in_data(w_spk_slot[w]),
      .out_valid(sf_valid[w]), .out_ready(sf_pop[w]), .out_data(sf_slot[w]), .count(unused_sf_cnt)
    );

    sync_fifo #(.W($bits(syn_in_t)), .DEPTH(RB_FIFO_D)) u_rb_fifo (
      .clk, .rst_n, .in_valid(lr_out_valid[w]), .in_ready(rbf_ready[w]), .in_data(lr_out_syn[w]),
      .out_valid(rbf_valid[w]), .out_ready(1'b1), .out_data(rbf_syn[w]), .count(unused_rbf_cnt)
    );

    ring_buffer #(.NPW(NPW), .EXC_DEPTH(EXC_D), .INH_DEPTH(INH_D)) u_rb (
      .clk, .rst_n, .cur_ts, .in_valid(rbf_valid[w]), .in_syn(rbf_syn[w]),
      .rd_en, .rd_slot, .rd_ts, .rd_exc, .rd_inh,
      .err_late(rb_late[w]), .err_overflow(rb_ovf[w]), .accepted(unused_acc)
    );
  end

  always_comb begin
    err_late     = '0;
    err_overflow = '0;
    for (int w = 0; w < NW; w++) begin
      err_late     += 32'(rb_late[w]);
      err_overflow += 32'(rb_ovf[w]);
    end
  end

  // ---------------- local router input: spikes, then sync ----------------
  logic [NW-1:0] sp_grant;
  logic          sp_gvalid, loc_take;
  logic [NW-1:0] arb_grant, hold_grant_q;
  logic          arb_valid, hold_q;
  rr_arbiter #(.N(NW)) u_spk_arb (
    .clk, .rst_n, .req(sf_valid), .prio('0), .advance(loc_take),
    .grant(arb_grant), .valid(arb_valid)
  );
  // The router may serve a broadcast over several cycles, so the offered
  // packet must not change until it is accepted: the grant is held.
  assign sp_grant  = hold_q ? hold_grant_q : arb_grant;
  assign sp_gvalid = hold_q || arb_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_q       <= 1'b0;
      hold_grant_q <= '0;
    end else begin
      hold_q       <= sp_gvalid && !loc_take;
      hold_grant_q <= sp_grant;
    end
  end

  always_comb begin
    packet_t p;
    p          = '0;
    p.src_x    = my_x;
    p.src_y    = my_y;
    p.ts       = cur_ts;
    p.field    = FLD_V;
    if (sp_gvalid) begin
      p.typ = PKT_SPIKE;
      for (int w = 0; w < NW; w++)
        if (sp_grant[w]) p.neuron = {4'(w), sf_slot[w]};
    end else begin
      p.typ      = PKT_SYNC;
      p.sync_lvl = sync_tx_lvl;
    end
    r_in_pkt[LOC]   = p;
    r_in_valid[LOC] = sp_gvalid || sync_tx_valid;
  end
  assign loc_take        = r_in_ready[LOC];
  assign sf_pop          = (sp_gvalid && loc_take) ? sp_grant : '0;
  assign sync_tx_ready   = !sp_gvalid && loc_take;
  assign compute_busy    = (w_busy != '0) || (sf_valid != '0);
  assign mon_spike_valid = sp_gvalid && loc_take;
  assign mon_spike_lid   = r_in_pkt[LOC].neuron;

  // ---------------- local output: spikes to the lookups ----------------
  logic [1:0]  lk_in_valid, lk_in_ready, lk_q_valid, lk_q_ready, lk_idle;
  logic [17+TS_W:0] lk_in_data, lk_q_data [2];
  logic        ch;
  assign ch = lo.neuron[0];
  assign lk_in_data = {6'(32'(lo.src_y) * NX + 32'(lo.src_x)), lo.neuron, lo.ts};
  assign lk_in_valid[0] = r_out_valid[LOC] && lo.typ == PKT_SPIKE && !ch;
  assign lk_in_valid[1] = r_out_valid[LOC] && lo.typ == PKT_SPIKE &&  ch;
  assign r_out_ready[LOC] = (lo.typ == PKT_SPIKE) ? lk_in_ready[ch] : 1'b1;

  logic [LN-1:0] lane_valid, lane_ack;
  logic [7:0]    lane_worker [LN];
  syn_in_t       lane_syn    [LN];
  logic [31:0]   lk_nl [2];
  logic [31:0]   lk_ns [2];

  for (genvar c = 0; c < 2; c++) begin : g_ch
    logic [4:0] unused_cnt;
    logic [7:0] lw [SYN_PER_BEAT];
    syn_in_t    ls [SYN_PER_BEAT];
    sync_fifo #(.W(18 + TS_W), .DEPTH(16)) u_spq (
      .clk, .rst_n, .in_valid(lk_in_valid[c]), .in_ready(lk_in_ready[c]), .in_data(lk_in_data),
      .out_valid(lk_q_valid[c]), .out_ready(lk_q_ready[c]), .out_data(lk_q_data[c]), .count(unused_cnt)
    );
    synapse_lookup #(.STRIDE(STRIDE), .MAX_PAR(MAX_PAR)) u_lookup (
      .clk, .rst_n,
      .sp_valid(lk_q_valid[c]), .sp_ready(lk_q_ready[c]),
      .sp_list(lk_q_data[c][TS_W +: 18]), .sp_ts(lk_q_data[c][TS_W-1:0]),
      .prefetch, .max_par,
      .mem_req_valid(mem_req_valid[c]), .mem_req_ready(mem_req_ready[c]),
      .mem_req_addr(mem_req_addr[c]), .mem_req_beats(mem_req_beats[c]),
      .mem_rsp_valid(mem_rsp_valid[c]), .mem_rsp_ready(mem_rsp_ready[c]),
      .mem_rsp_data(mem_rsp_data[c]),
      .lane_valid(lane_valid[c*SYN_PER_BEAT +: SYN_PER_BEAT]), .lane_worker(lw), .lane_syn(ls),
      .lane_ack(lane_ack[c*SYN_PER_BEAT +: SYN_PER_BEAT]),
      .idle(lk_idle[c]), .n_lookups(lk_nl[c]), .n_synapses(lk_ns[c])
    );
    for (genvar i = 0; i < SYN_PER_BEAT; i++) begin : g_l
      assign lane_worker[c*SYN_PER_BEAT + i] = lw[i];
      assign lane_syn[c*SYN_PER_BEAT + i]    = ls[i];
    end
  end
  assign n_lookups  = lk_nl[0] + lk_nl[1];
  assign n_synapses = lk_ns[0] + lk_ns[1];

  logic [15:0] unused_bad;
  local_router #(.L(LN), .NW(NW)) u_lrouter (
    .clk, .rst_n, .lane_valid, .lane_worker, .lane_syn, .lane_ack,
    .out_valid(lr_out_valid), .out_syn(lr_out_syn), .out_ready(rbf_ready),
    .bad_target(unused_bad)
  );

  assign local_idle = !r_out_valid[LOC] && (lk_idle == 2'b11) && (lk_q_valid == 2'b00) &&
                      (rbf_valid == '0);
endmodule
