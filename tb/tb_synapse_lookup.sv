// tb_synapse_lookup: sends spikes of random list indices to the lookup
// connected to the behavioural memory, acknowledges lanes at random, and
// compares every emitted synapse (in order) with the synthetic connectome.
// Lists longer than the first read force continuation reads; two settings
// of prefetch and parallel accesses are run, and the counters are checked.
module tb_synapse_lookup;
  import neuroaix_pkg::*;
  import tb_conn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int STRIDE = 6, FAN = 14, NW = 10, NPW = 255, DMAX = 4;

  logic sp_valid, sp_ready, mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready, idle;
  logic [17:0] sp_list;
  logic [TS_W-1:0] sp_ts;
  logic [7:0] prefetch, mem_req_beats;
  logic [3:0] max_par;
  logic [MADDR_W-1:0] mem_req_addr;
  logic [BEAT_W-1:0] mem_rsp_data;
  logic [SYN_PER_BEAT-1:0] lane_valid, lane_ack;
  logic [7:0] lane_worker [SYN_PER_BEAT];
  syn_in_t lane_syn [SYN_PER_BEAT];
  logic [31:0] n_lookups, n_synapses;

  synapse_lookup #(.STRIDE(STRIDE), .MAX_PAR(4)) dut (.*);
  dram_model #(.STRIDE(STRIDE), .LAT(12), .FAN(FAN), .NW(NW), .NPW(NPW), .DMAX(DMAX)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_addr(mem_req_addr),
    .req_beats(mem_req_beats), .rsp_valid(mem_rsp_valid), .rsp_ready(mem_rsp_ready), .rsp_data(mem_rsp_data));

  // expected synapses, in emission order
  typedef struct { int worker; int slot; int ts; int w; } e_t;
  e_t exp_q[$];
  int total_syn = 0, max_out = 0, conts = 0;

  // lanes: a beat is emitted in lane order; acknowledge a random subset
  always @(negedge clk) lane_ack = lane_valid & SYN_PER_BEAT'($urandom);

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < SYN_PER_BEAT; i++)
      if (lane_valid[i] && lane_ack[i]) begin
        // find this synapse among the expected ones of the oldest lists
        int k; k = -1;
        for (int m = 0; m < exp_q.size() && m < 64; m++)
          if (k < 0 && exp_q[m].worker == int'(lane_worker[i]) && exp_q[m].slot == int'(lane_syn[i].slot) &&
              exp_q[m].ts == int'(lane_syn[i].ts) && exp_q[m].w == int'(lane_syn[i].weight)) k = m;
        checks++;
        if (k < 0) begin failures++; $display("unexpected synapse w%0d s%0d", lane_worker[i], lane_syn[i].slot); end
        else exp_q.delete(k);
      end
    if (mem.q.size() > max_out) max_out = mem.q.size();
    conts = mem.n_req - int'(n_lookups);
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int nsp, int pf, int par);
    prefetch = 8'(pf); max_par = 4'(par);
    for (int n = 0; n < nsp; n++) begin
      int idx, t;
      idx = $urandom % 200; t = $urandom % 1000;
      for (int j = 1; j <= list_len(idx, FAN); j++) begin
        synapse_t s; e_t e;
        s = syn(idx, j, NW, NPW, DMAX);
        e.worker = s.target[15:8]; e.slot = s.target[7:0]; e.ts = t + s.delay; e.w = int'(s.weight);
        exp_q.push_back(e);
        total_syn++;
      end
      @(negedge clk); sp_valid = 1; sp_list = 18'(idx); sp_ts = TS_W'(t);
      do @(posedge clk); while (!sp_ready);
      @(negedge clk); sp_valid = 0;
    end
    while (!idle) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  initial begin
    sp_valid = 0; sp_list = 0; sp_ts = 0; prefetch = 1; max_par = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(30, 1, 1);   // length read only, always continued
    run(30, 2, 4);   // prefetch of 2 beats, 4 accesses in flight
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d synapses missing", exp_q.size()); end
    checks++;
    if (n_lookups != 60 || int'(n_synapses) != total_syn) begin
      failures++; $display("counters %0d %0d/%0d", n_lookups, n_synapses, total_syn);
    end
    checks++;
    if (max_out < 2 || conts == 0) begin failures++; $display("max_out=%0d conts=%0d", max_out, conts); end
    $display("synapses=%0d max in flight=%0d continuations=%0d", total_syn, max_out, conts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
