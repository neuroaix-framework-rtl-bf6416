// sync_controller: timestep scheduler with local neighbour synchronization.
//
// Instead of a global barrier, a node only waits for its direct neighbours.
// Per timestep k:
//   1. start the workers on k (compute_start, cur_ts = k);
//   2. when computation has finished and the generated spikes have been
//      handed to the router (compute_busy low), send the first sync message
//      of k to every neighbour; it queues behind those spikes;
//   3. wait for the first sync of k from all n_neigh neighbours;
//   4. if n_sync = 2, send the second sync of k and wait for the second sync
//      of k from all neighbours (covers the two-hop worst case);
//   5. wait until every received spike has reached the ring buffers
//      (local_idle), then continue with k+1.
// A neighbour can run at most one timestep ahead, so received syncs are
// counted per level and per timestep parity. With n_sync = 1 the run is
// faster but spikes may arrive late; they are then counted by the ring
// buffers' error registers. The scheme follows the document; the run
// control (start, n_steps) and the final idle wait are this design's.
// Timesteps are numbered from 1; cur_ts = 0 before the first one.
module sync_controller
  import neuroaix_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,          // pulse: simulate n_steps timesteps
  input  logic [TS_W-1:0] n_steps,
  input  logic [1:0]      n_sync,       // 1 or 2 synchronizations per timestep
  input  logic [4:0]      n_neigh,      // connected neighbours
  output logic            compute_start,
  output logic [TS_W-1:0] cur_ts,
  input  logic            compute_busy,
  input  logic            local_idle,
  // sync messages to send (to the router's local input)
  output logic            tx_valid,
  input  logic            tx_ready,
  output logic            tx_lvl,
  // sync messages received from neighbours
  input  logic            rx_valid,
  input  logic            rx_lvl,
  input  logic [TS_W-1:0] rx_ts,
  output logic            busy,
  output logic            finished,
  output logic [31:0]     n_wait_cycles
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_COMPUTE, S_SEND1, S_WAIT1,
                            S_SEND2, S_WAIT2, S_DRAIN} state_e;
  state_e     st_q;
  logic [4:0] cnt_q [2][2];   // [level][timestep parity]
  logic [1:0] settle_q;
  logic [TS_W-1:0] steps_q;
  logic       clr;
  logic       clr_lvl;

  assign busy     = (st_q != S_IDLE);
  assign tx_valid = (st_q == S_SEND1) || (st_q == S_SEND2);
  assign tx_lvl   = (st_q == S_SEND2);

  always_comb begin
    clr     = 1'b0;
    clr_lvl = 1'b0;
    if (st_q == S_WAIT1 && cnt_q[0][cur_ts[0]] >= n_neigh) clr = 1'b1;
    if (st_q == S_WAIT2 && cnt_q[1][cur_ts[0]] >= n_neigh) begin
      clr = 1'b1; clr_lvl = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q          <= S_IDLE;
      cur_ts        <= '0;
      steps_q       <= '0;
      compute_start <= 1'b0;
      settle_q      <= '0;
      finished      <= 1'b0;
      n_wait_cycles <= '0;
      for (int l = 0; l < 2; l++) for (int p = 0; p < 2; p++) cnt_q[l][p] <= '0;
    end else begin
      compute_start <= 1'b0;
      for (int l = 0; l < 2; l++)
        for (int p = 0; p < 2; p++) begin
          logic [4:0] c;
          c = (clr && l == int'(clr_lvl) && p == int'(cur_ts[0])) ? 5'd0 : cnt_q[l][p];
          if (rx_valid && l == int'(rx_lvl) && p == int'(rx_ts[0])) c = c + 5'd1;
          cnt_q[l][p] <= c;
        end
      if (st_q == S_WAIT1 || st_q == S_WAIT2) n_wait_cycles <= n_wait_cycles + 1;
      unique case (st_q)
        S_IDLE: if (run) begin
          st_q     <= S_START;
          steps_q  <= n_steps;
          finished <= 1'b0;
        end
        S_START: begin
          if (steps_q == '0) begin
            st_q     <= S_IDLE;
            finished <= 1'b1;
          end else begin
            steps_q       <= steps_q - 1'b1;
            cur_ts        <= cur_ts + 1'b1;
            compute_start <= 1'b1;
            settle_q      <= 2'd3;
            st_q          <= S_COMPUTE;
          end
        end
        S_COMPUTE: begin
          if (settle_q != 0) settle_q <= settle_q - 1'b1;
          else if (!compute_busy) st_q <= (n_neigh == 0) ? S_DRAIN : S_SEND1;
        end
        S_SEND1: if (tx_ready) st_q <= S_WAIT1;
        S_WAIT1: if (clr) st_q <= (n_sync >= 2'd2) ? S_SEND2 : S_DRAIN;
        S_SEND2: if (tx_ready) st_q <= S_WAIT2;
        S_WAIT2: if (clr) st_q <= S_DRAIN;
        S_DRAIN: if (local_idle) st_q <= S_START;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) tx_valid |-> n_neigh != 0);
endmodule
