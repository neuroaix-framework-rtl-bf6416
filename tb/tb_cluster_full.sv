// tb_cluster_full: end-to-end test of the cluster with every parameter at its default (7 x 5 nodes, 10 workers of 255 neurons each).
//
// The host port configures neurons of every node with configuration
// packets (unicast xy routing), then the cluster runs N_STEPS timesteps
// twice: with two synchronizations per timestep and then with one.
// Every node's memory channels are behavioural DRAM models holding the
// synthetic connectome of tb_conn_pkg. A reference model in the testbench
// simulates the same network (exact-integration LIF update in the same
// fixed-point arithmetic, broadcast of every spike to every node, synaptic
// input at origin + delay) and the spikes each node emits in each timestep
// must match it exactly. The test also counts the mechanisms the run must
// show: two-hop forwarding, waits for neighbour syncs, continuation reads
// of long synaptic lists, configuration packets, and no late spikes in the
// fully synchronized run.
module tb_cluster_full;
  import neuroaix_pkg::*;
  import tb_conn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NX = 5, NY = 7, NW = 10, NPW = 255, NN = NX * NY;
  localparam int STRIDE = 41, FAN = 20, DMAX = 6, N_STEPS = 3, ACT = 255;

  logic run, host_valid, host_ready;
  logic [TS_W-1:0] n_steps;
  logic [1:0] n_sync;
  logic [7:0] npw, prefetch;
  logic [3:0] max_par;
  lif_param_t prm;
  packet_t host_pkt;
  logic mem_req_valid [NN][2], mem_req_ready [NN][2], mem_rsp_valid [NN][2], mem_rsp_ready [NN][2];
  logic [MADDR_W-1:0] mem_req_addr [NN][2];
  logic [7:0] mem_req_beats [NN][2];
  logic [BEAT_W-1:0] mem_rsp_data [NN][2];
  logic mon_spike_valid [NN], finished [NN];
  logic [LID_W-1:0] mon_spike_lid [NN];
  logic [TS_W-1:0] cur_ts [NN];
  logic [31:0] n_lookups [NN], n_synapses [NN], n_forwarded [NN], n_wait_cycles [NN], err_late [NN], err_overflow [NN];

  neuroaix_cluster dut (.*);

  for (genvar n = 0; n < NN; n++) begin : g_mem
    for (genvar c = 0; c < 2; c++) begin : g_c
      dram_model #(.STRIDE(STRIDE), .LAT(30), .FAN(FAN), .NW(NW), .NPW(ACT), .DMAX(DMAX)) u_mem (
        .clk, .rst_n, .req_valid(mem_req_valid[n][c]), .req_ready(mem_req_ready[n][c]),
        .req_addr(mem_req_addr[n][c]), .req_beats(mem_req_beats[n][c]),
        .rsp_valid(mem_rsp_valid[n][c]), .rsp_ready(mem_rsp_ready[n][c]), .rsp_data(mem_rsp_data[n][c]));
    end
  end

  // ---------------- reference model ----------------
  int v [NN][NW][ACT], iex [NN][NW][ACT], iin [NN][NW][ACT], idc [NN][NW][ACT], rf [NN][NW][ACT];
  int in_e [int], in_i [int];       // key: ((t*NN + n)*NW + w)*256 + s
  int exp_spk [longint];            // key: (t*NN + n)*4096 + lid
  int got_spk [longint];
  int ts_base = 0;

  function automatic longint fx(longint a, longint b); return (a * b) >>> 16; endfunction

  task automatic ref_step(int t);
    for (int n = 0; n < NN; n++)
      for (int w = 0; w < NW; w++)
        for (int s = 0; s < ACT; s++) begin
          longint vv; int key, ie, ii;
          key = ((t * NN + n) * NW + w) * 256 + s;
          ie = in_e.exists(key) ? in_e[key] : 0;
          ii = in_i.exists(key) ? in_i[key] : 0;
          vv = v[n][w][s];
          if (rf[n][w][s] == 0)
            vv = fx(prm.p22, v[n][w][s]) + fx(prm.p21ex, iex[n][w][s]) + fx(prm.p21in, iin[n][w][s]) + fx(prm.p20, idc[n][w][s]);
          else rf[n][w][s]--;
          iex[n][w][s] = int'(fx(prm.p11ex, iex[n][w][s])) + ie;
          iin[n][w][s] = int'(fx(prm.p11in, iin[n][w][s])) + ii;
          if (int'(vv) >= int'(prm.theta)) begin
            int idx;
            vv = prm.v_reset; rf[n][w][s] = prm.t_ref;
            exp_spk[(longint'(t) * NN + n) * 4096 + w * 256 + s] = 1;
            idx = (n << 12) | (w << 8) | s;
            for (int j = 1; j <= list_len(idx, FAN); j++) begin
              synapse_t sy; int tw, tsl, k2;
              sy = syn(idx, j, NW, ACT, DMAX);
              tw = sy.target[15:8]; tsl = sy.target[7:0];
              for (int m = 0; m < NN; m++) begin
                k2 = (((t + sy.delay) * NN + m) * NW + tw) * 256 + tsl;
                if (sy.weight[31]) in_i[k2] = (in_i.exists(k2) ? in_i[k2] : 0) + int'(sy.weight);
                else               in_e[k2] = (in_e.exists(k2) ? in_e[k2] : 0) + int'(sy.weight);
              end
            end
          end
          v[n][w][s] = int'(vv);
        end
  endtask

  // ---------------- observation ----------------
  int n_spikes = 0;
  always @(posedge clk) if (rst_n)
    for (int n = 0; n < NN; n++)
      if (mon_spike_valid[n]) begin
        got_spk[(longint'(cur_ts[n]) * NN + n) * 4096 + mon_spike_lid[n]] = 1;
        n_spikes++;
      end

  int watchdog_cycles = 2000000;
  initial begin
    repeat (watchdog_cycles) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_cfg(int n, int w, int s, cfg_field_e f, int d);
    packet_t p;
    p = '0; p.typ = PKT_CONFIG; p.dst_x = 4'(n % NX); p.dst_y = 4'(n / NX);
    p.neuron = LID_W'((w << 8) | s); p.field = f; p.data = 32'(d);
    @(negedge clk); host_valid = 1; host_pkt = p;
    do @(posedge clk); while (!host_ready);
    @(negedge clk); host_valid = 0;
  endtask

  task automatic run_steps(int nsync);
    @(negedge clk); n_sync = 2'(nsync); n_steps = TS_W'(N_STEPS); run = 1;
    @(negedge clk); run = 0;
    for (int t = 1; t <= N_STEPS; t++) ref_step(ts_base + t);
    for (int n = 0; n < NN; n++) wait (finished[n] && cur_ts[n] == TS_W'(ts_base + N_STEPS));
    repeat (10) @(posedge clk);
    ts_base += N_STEPS;
  endtask

  initial begin
    int missing, extra, cfg_sent, nfwd, nwait, nlk, nreq, late;
    run = 0; host_valid = 0; host_pkt = '0; n_steps = 0; n_sync = 2;
    npw = 8'(ACT); prefetch = 8'd1; max_par = 4'd4;
    prm.p22 = 32'h0000_E666; prm.p21ex = 32'h0000_1000; prm.p21in = 32'h0000_1000;
    prm.p20 = 32'h0000_3333; prm.p11ex = 32'h0000_8000; prm.p11in = 32'h0000_8000;
    prm.theta = 32'h0001_0000; prm.v_reset = 32'h0; prm.t_ref = 8'd2;
    for (int n = 0; n < NN; n++) for (int w = 0; w < NW; w++) for (int s = 0; s < ACT; s++) begin
      v[n][w][s] = 0; iex[n][w][s] = 0; iin[n][w][s] = 0; idc[n][w][s] = 0; rf[n][w][s] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    cfg_sent = 0;
    for (int n = 0; n < NN; n++) for (int w = 0; w < NW; w++) for (int s = 0; s < ACT; s++)
      if ((n + w + s) % 97 == 0) begin
        idc[n][w][s] = ((n * 3 + w * 5 + s) % 4) * 32'h0000_4000 + 32'h0000_6000;
        v[n][w][s]   = ((w + s) % 3) * 32'h0000_4000;
        send_cfg(n, w, s, FLD_IDC, idc[n][w][s]);
        send_cfg(n, w, s, FLD_V, v[n][w][s]);
        cfg_sent += 2;
      end
    repeat (200) @(posedge clk);
    run_steps(2);
    late = 0;
    for (int n = 0; n < NN; n++) late += int'(err_late[n]) + int'(err_overflow[n]);
    checks++;
    if (late != 0) begin failures++; $display("late or overflowed inputs with two syncs: %0d", late); end
    run_steps(1);
    missing = 0; extra = 0;
    foreach (exp_spk[k]) begin checks++; if (!got_spk.exists(k)) begin missing++; failures++; if (missing < 5) $display("missing t=%0d n=%0d lid=%0h", k / 4096 / NN, (k / 4096) % NN, k % 4096); end end
    foreach (got_spk[k]) if (!exp_spk.exists(k)) begin extra++; failures++; if (extra < 5) $display("extra t=%0d n=%0d lid=%0h", k / 4096 / NN, (k / 4096) % NN, k % 4096); end
    late = 0;
    for (int n = 0; n < NN; n++) late += int'(err_late[n]);
    $display("late inputs after the single-sync run: %0d", late);
    nfwd = 0; nwait = 0; nlk = 0; nreq = 0;
    for (int n = 0; n < NN; n++) begin
      nfwd += int'(n_forwarded[n]); nwait += int'(n_wait_cycles[n]); nlk += int'(n_lookups[n]);
      nreq += g_req_count(n);
    end
    $display("spikes expected=%0d seen=%0d missing=%0d extra=%0d", exp_spk.size(), n_spikes, missing, extra);
    $display("config packets=%0d forwarded copies=%0d sync wait cycles=%0d lookups=%0d memory reads=%0d",
             cfg_sent, nfwd, nwait, nlk, nreq);
    // each mechanism happened at least once
    checks++; if (exp_spk.size() == 0) begin failures++; $display("no spikes"); end
    checks++; if (1 && nfwd == 0) begin failures++; $display("no forwarding"); end
    checks++; if (nwait == 0) begin failures++; $display("no sync waits"); end
    checks++; if (nreq <= nlk) begin failures++; $display("no continuation reads"); end
    checks++; if (cfg_sent == 0) begin failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int g_req_count(int n);
    int r; r = 0;
    for (int c = 0; c < 2; c++) r += mem_reads[n][c];
    return r;
  endfunction
  int mem_reads [NN][2];
  initial for (int n = 0; n < NN; n++) begin mem_reads[n][0] = 0; mem_reads[n][1] = 0; end
  always @(posedge clk)
    for (int n = 0; n < NN; n++) for (int c = 0; c < 2; c++)
      if (mem_req_valid[n][c] && mem_req_ready[n][c]) mem_reads[n][c]++;
endmodule
