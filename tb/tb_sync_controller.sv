// tb_sync_controller: the testbench plays three neighbours and the node's
// workers. Neighbours answer each sync of timestep k with their own sync of
// the same level after random delays, and one neighbour sends its first
// sync of k+1 early, before this node has finished k (it is allowed to be
// one step ahead). Checks: timesteps start in order and only after both
// syncs of the previous step from all neighbours and an idle node; sync
// levels go out in order; with one sync per timestep no second sync is
// sent; the run finishes after n_steps; waiting cycles are counted.
module tb_sync_controller;
  import neuroaix_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic run, compute_start, compute_busy, local_idle, tx_valid, tx_ready, tx_lvl;
  logic rx_valid, rx_lvl, busy, finished;
  logic [TS_W-1:0] n_steps, cur_ts, rx_ts;
  logic [1:0] n_sync;
  logic [4:0] n_neigh;
  logic [31:0] n_wait_cycles;

  sync_controller dut (.*);

  typedef struct { longint t; bit lvl; int ts; } ev_t;
  ev_t evq[$];
  longint now = 0;
  int got [2][int];        // syncs received by the node per level and ts
  int starts = 0, busy_left = 0, early = 0, sent2 = 0, last_lvl = 1, last_ts = 0;

  always @(posedge clk) now <= now + 1;

  // workers: busy for a random time after each start
  always @(posedge clk) begin
    if (compute_start) busy_left <= 5 + $urandom % 20;
    else if (busy_left > 0) busy_left <= busy_left - 1;
  end
  assign compute_busy = (busy_left > 0);
  always @(negedge clk) local_idle = ($urandom % 3 != 0);
  always @(negedge clk) tx_ready = ($urandom % 2 == 0);

  // neighbours
  always @(posedge clk) if (rst_n) begin
    if (tx_valid && tx_ready) begin
      checks++;
      // levels alternate 0,1,0,1 (two syncs) on consecutive timesteps
      if (n_sync == 2 && (int'(tx_lvl) == last_lvl)) begin failures++; $display("sync order"); end
      if (tx_lvl) sent2++;
      last_lvl = int'(tx_lvl);
      for (int n = 0; n < 3; n++) begin
        ev_t e; e.t = now + 1 + $urandom % 15; e.lvl = tx_lvl; e.ts = int'(cur_ts);
        if (!(n == 0 && tx_lvl == 0 && early_sent(int'(cur_ts)))) evq.push_back(e);
      end
      // neighbour 0 runs ahead: its first sync of the next step comes now
      if (tx_lvl == (n_sync == 2) && $urandom % 2 == 0) begin
        ev_t e; e.t = now + 2; e.lvl = 0; e.ts = int'(cur_ts) + 1;
        evq.push_back(e); early_mark[int'(cur_ts) + 1] = 1; early++;
      end
    end
  end
  bit early_mark [int];
  function automatic bit early_sent(int ts); return early_mark.exists(ts); endfunction

  always @(negedge clk) begin
    rx_valid = 0; rx_lvl = 0; rx_ts = 0;
    foreach (evq[i]) if (evq[i].t <= now) begin
      rx_valid = 1; rx_lvl = evq[i].lvl; rx_ts = TS_W'(evq[i].ts);
      got[evq[i].lvl][evq[i].ts] = (got[evq[i].lvl].exists(evq[i].ts) ? got[evq[i].lvl][evq[i].ts] : 0) + 1;
      evq.delete(i);
      break;
    end
  end

  always @(posedge clk) if (rst_n && compute_start) begin
    int k;
    k = int'(cur_ts);
    starts++;
    checks++;
    if (k != last_ts + 1) begin failures++; $display("ts %0d after %0d", k, last_ts); end
    if (k > 1) begin
      int g0, g1;
      g0 = got[0].exists(k-1) ? got[0][k-1] : 0;
      g1 = got[1].exists(k-1) ? got[1][k-1] : 0;
      checks++;
      if (g0 != 3 || (n_sync == 2 && g1 != 3)) begin failures++; $display("ts %0d started early %0d %0d", k, g0, g1); end
    end
    last_ts = k;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run = 0; n_steps = 40; n_sync = 2; n_neigh = 3; rx_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) run = 1;
    @(negedge clk) run = 0;
    wait (finished);
    checks++; if (starts != 40 || early == 0 || sent2 != 40) begin failures++; $display("starts %0d early %0d sent2 %0d", starts, early, sent2); end
    // one synchronization per timestep
    repeat (50) @(posedge clk);
    evq.delete(); sent2 = 0; starts = 0;
    @(negedge clk) begin n_sync = 1; n_steps = 10; run = 1; end
    @(negedge clk) run = 0;
    wait (finished);
    checks++; if (starts != 10 || sent2 != 0 || n_wait_cycles == 0) begin failures++; $display("n_sync=1: starts %0d sent2 %0d", starts, sent2); end
    $display("early syncs=%0d wait cycles=%0d", early, n_wait_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
