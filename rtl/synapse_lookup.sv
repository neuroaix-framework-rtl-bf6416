// synapse_lookup: broadcast-mode synapse lookup for one memory channel.
//
// For every incoming spike (list index of the presynaptic neuron, timestep
// of origin) it reads that neuron's padded synaptic list from off-chip
// memory. Lists have a fixed stride of STRIDE beats, so the address is
// list_idx * STRIDE and needs no base-address table. Word 0 of a list holds
// its length (bits 15:0); the following 64-bit words are synapses. The first
// read fetches `prefetch` beats (run-time setting) together with the length;
// if the list is longer, one continuation read fetches the rest. Up to
// `max_par` spikes (run-time setting, at most MAX_PAR) may have reads in
// flight; responses return in request order. Each response beat is unpacked
// into SYN_PER_BEAT lanes toward the local router: worker = target[15:8],
// slot = target[7:0], effective timestep = origin + delay. A beat stays on
// the lanes until every valid lane has been acknowledged (back-pressure).
// Fixed-stride padded lists, the always-performed length read and the two
// run-time settings follow the document; list format, response ordering and
// the continuation read are this design's choices.
module synapse_lookup
  import neuroaix_pkg::*;
#(
  parameter int unsigned STRIDE  = 41,
  parameter int unsigned MAX_PAR = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // spikes to look up
  input  logic                 sp_valid,
  output logic                 sp_ready,
  input  logic [17:0]          sp_list,
  input  logic [TS_W-1:0]      sp_ts,
  // run-time settings
  input  logic [7:0]           prefetch,
  input  logic [3:0]           max_par,
  // memory channel
  output logic                 mem_req_valid,
  input  logic                 mem_req_ready,
  output logic [MADDR_W-1:0]   mem_req_addr,
  output logic [7:0]           mem_req_beats,
  input  logic                 mem_rsp_valid,
  output logic                 mem_rsp_ready,
  input  logic [BEAT_W-1:0]    mem_rsp_data,
  // synapses toward the local router
  output logic [SYN_PER_BEAT-1:0] lane_valid,
  output logic [7:0]           lane_worker [SYN_PER_BEAT],
  output syn_in_t              lane_syn    [SYN_PER_BEAT],
  input  logic [SYN_PER_BEAT-1:0] lane_ack,
  output logic                 idle,
  output logic [31:0]          n_lookups,
  output logic [31:0]          n_synapses
);
  localparam int unsigned CTX_D = 2 * MAX_PAR;

  typedef struct packed {
    logic            first;
    logic [TS_W-1:0] ts;
    logic [15:0]     remaining;  // continuation: synapses still to come
    logic [7:0]      beats;
  } ctx_t;

  ctx_t  ctx_in, ctx_head;
  logic  ctx_push, ctx_pop, ctx_full, ctx_empty, ctx_in_ready, ctx_out_valid;
  logic [$clog2(CTX_D+1)-1:0] ctx_cnt;

  sync_fifo #(.W($bits(ctx_t)), .DEPTH(CTX_D)) u_ctx (
    .clk, .rst_n,
    .in_valid(ctx_push), .in_ready(ctx_in_ready), .in_data(ctx_in),
    .out_valid(ctx_out_valid), .out_ready(ctx_pop), .out_data(ctx_head),
    .count(ctx_cnt)
  );
  assign ctx_full  = !ctx_in_ready;
  assign ctx_empty = !ctx_out_valid;

  // continuation request waiting to be issued
  logic                cont_q;
  logic [MADDR_W-1:0]  cont_addr_q;
  logic [7:0]          cont_beats_q;
  logic [15:0]         cont_rem_q;
  logic [TS_W-1:0]     cont_ts_q;

  logic [3:0]          outst_q;      // first reads in flight
  logic [7:0]          pf;
  logic                issue_first, issue_cont;

  always_comb begin
    pf = (prefetch == 8'd0) ? 8'd1 : ((32'(prefetch) > STRIDE) ? 8'(STRIDE) : prefetch);
    issue_cont  = cont_q && !ctx_full;
    issue_first = !cont_q && sp_valid && !ctx_full && (outst_q < max_par) &&
                  (32'(outst_q) < MAX_PAR);
    mem_req_valid = issue_cont || issue_first;
    mem_req_addr  = cont_q ? cont_addr_q : MADDR_W'(32'(sp_list) * STRIDE);
    mem_req_beats = cont_q ? cont_beats_q : pf;
    sp_ready      = issue_first && mem_req_ready;
    ctx_push      = mem_req_valid && mem_req_ready;
    ctx_in.first     = !cont_q;
    ctx_in.ts        = cont_q ? cont_ts_q : sp_ts;
    ctx_in.remaining = cont_q ? cont_rem_q : 16'd0;
    ctx_in.beats     = mem_req_beats;
  end

  // Start address of every read in flight, kept in step with the context
  // FIFO, so a continuation knows where its list begins.
  logic [MADDR_W-1:0] base_q [CTX_D];
  logic [$clog2(CTX_D)-1:0] bw_q, br_q;

  // ---- response side ----
  logic [SYN_PER_BEAT-1:0] hold_q, hold_left;
  logic [7:0]              beat_idx_q;
  logic [15:0]             rem_q;        // synapses left in the current context
  logic                    take;
  synapse_t                word [SYN_PER_BEAT];

  assign hold_left     = hold_q & ~lane_ack;
  // A first beat that may queue a continuation waits while an earlier
  // continuation has not been issued yet (there is one continuation slot).
  assign mem_rsp_ready = (hold_left == '0) && !ctx_empty &&
                         !(cont_q && ctx_head.first && beat_idx_q == 8'd0);
  assign take          = mem_rsp_valid && mem_rsp_ready;
  assign ctx_pop       = take && (beat_idx_q == ctx_head.beats - 8'd1);
  assign lane_valid    = hold_q;

  always_comb
    for (int i = 0; i < SYN_PER_BEAT; i++) word[i] = mem_rsp_data[i*SYN_W +: SYN_W];

  logic [15:0] rem_now, list_len;
  logic [SYN_PER_BEAT-1:0] new_mask;
  logic [15:0] in_first;   // synapse words carried by the first read
  logic [15:0] r;
  always_comb begin
    r        = 16'd0;
    list_len = word[0][15:0];
    in_first = 16'(32'(ctx_head.beats) * SYN_PER_BEAT - 1);
    new_mask = '0;
    if (ctx_head.first && beat_idx_q == 8'd0) begin
      for (int i = 1; i < SYN_PER_BEAT; i++) new_mask[i] = (16'(i) <= list_len);
      rem_now = (list_len > 16'(SYN_PER_BEAT-1)) ? list_len - 16'(SYN_PER_BEAT-1) : 16'd0;
    end else begin
      r = (ctx_head.first || beat_idx_q != 8'd0) ? rem_q : ctx_head.remaining;
      for (int i = 0; i < SYN_PER_BEAT; i++) new_mask[i] = (16'(i) < r);
      rem_now = (r > 16'(SYN_PER_BEAT)) ? r - 16'(SYN_PER_BEAT) : 16'd0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_q       <= '0;
      beat_idx_q   <= '0;
      rem_q        <= '0;
      cont_q       <= 1'b0;
      cont_addr_q  <= '0;
      cont_beats_q <= '0;
      cont_rem_q   <= '0;
      cont_ts_q    <= '0;
      outst_q      <= '0;
      n_lookups    <= '0;
      n_synapses   <= '0;
      for (int i = 0; i < SYN_PER_BEAT; i++) begin
        lane_worker[i] <= '0;
        lane_syn[i]    <= '0;
      end
    end else begin
      hold_q <= hold_left;
      if (issue_cont && mem_req_ready) cont_q <= 1'b0;
      if (sp_ready) n_lookups <= n_lookups + 1;
      outst_q <= outst_q + 4'(sp_ready) - 4'(ctx_pop && ctx_head.first);
      if (take) begin
        hold_q     <= new_mask;
        rem_q      <= rem_now;
        beat_idx_q <= ctx_pop ? 8'd0 : beat_idx_q + 8'd1;
        n_synapses <= n_synapses + 32'($countones(new_mask));
        for (int i = 0; i < SYN_PER_BEAT; i++) begin
          lane_worker[i]    <= word[i].target[15:8];
          lane_syn[i].slot  <= word[i].target[7:0];
          lane_syn[i].ts    <= ctx_head.ts + TS_W'(word[i].delay);
          lane_syn[i].weight<= word[i].weight;
        end
        // list longer than the first read: queue the continuation
        if (ctx_head.first && beat_idx_q == 8'd0 && list_len > in_first) begin
          cont_q       <= 1'b1;
          cont_addr_q  <= base_q[br_q] + MADDR_W'(ctx_head.beats);
          cont_beats_q <= 8'((32'(list_len - in_first) + SYN_PER_BEAT - 1) / SYN_PER_BEAT);
          cont_rem_q   <= list_len - in_first;
          cont_ts_q    <= ctx_head.ts;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bw_q <= '0;
      br_q <= '0;
      for (int i = 0; i < CTX_D; i++) base_q[i] <= '0;
    end else begin
      if (ctx_push) begin
        base_q[bw_q] <= mem_req_addr;
        bw_q <= (32'(bw_q) == CTX_D-1) ? '0 : bw_q + 1'b1;
      end
      if (ctx_pop) br_q <= (32'(br_q) == CTX_D-1) ? '0 : br_q + 1'b1;
    end
  end

  assign idle = !sp_valid && ctx_empty && !cont_q && (hold_q == '0);

  assert property (@(posedge clk) disable iff (!rst_n) mem_rsp_valid && ctx_empty |-> !mem_rsp_ready);
endmodule
