// tb_local_router: random synapses on 16 lanes toward 4 workers, with
// random back-pressure from the worker FIFOs. Checks that every synapse
// arrives exactly once at the worker it names, that per-output grants
// rotate fairly among lanes (no lane waits more than L grants of its
// output), and that bad targets are dropped and counted.
module tb_local_router;
  import neuroaix_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int L = 16, NW = 4;
  logic [L-1:0] lane_valid, lane_ack;
  logic [7:0] lane_worker [L];
  syn_in_t lane_syn [L];
  logic [NW-1:0] out_valid, out_ready;
  syn_in_t out_syn [NW];
  logic [15:0] bad_target;
  int pend[int];           // weight -> expected worker
  int wait_c [L];
  int sent = 0, got = 0, bad = 0, maxwait = 0, contention = 0;

  local_router #(.L(L), .NW(NW)) dut (.*);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int uid = 1;
  logic [L-1:0] acked;
  initial begin
    lane_valid = 0; out_ready = 0;
    for (int l = 0; l < L; l++) begin lane_worker[l] = 0; lane_syn[l] = '0; wait_c[l] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      out_ready = NW'($urandom | $urandom);
      for (int l = 0; l < L; l++)
        if (!lane_valid[l] && c < 2700 && ($urandom % 3 == 0)) begin
          int w;
          w = ($urandom % 50 == 0) ? NW + 1 : (c < 1000 ? 0 : $urandom % NW);  // hot spot first
          lane_valid[l] = 1; lane_worker[l] = 8'(w);
          lane_syn[l].slot = 8'(l); lane_syn[l].ts = TS_W'(c); lane_syn[l].weight = 32'(uid);
          if (w < NW) begin pend[uid] = w; sent++; end else bad++;
          uid++;
          wait_c[l] = 0;
        end
      #1;
      begin
        int n; n = 0;
        for (int l = 0; l < L; l++) if (lane_valid[l] && lane_worker[l] == 0) n++;
        if (n > 1) contention++;
      end
      for (int w = 0; w < NW; w++)
        if (out_valid[w]) begin
          int u; u = int'(out_syn[w].weight);
          checks++;
          if (!pend.exists(u) || pend[u] != w || !out_ready[w]) begin failures++; $display("bad delivery %0d to %0d", u, w); end
          else begin pend.delete(u); got++; end
        end
      acked = lane_ack;
      for (int l = 0; l < L; l++)
        if (lane_valid[l]) begin
          if (acked[l]) ;
          else if (lane_worker[l] < NW && out_valid[lane_worker[l]]) begin
            wait_c[l]++;   // another lane was served by this lane's output
            if (wait_c[l] > maxwait) maxwait = wait_c[l];
          end
        end
      @(posedge clk);
      #1 lane_valid = lane_valid & ~acked;
    end
    checks++; if (pend.size() != 0 || got != sent) begin failures++; $display("lost %0d", pend.size()); end
    checks++; if (int'(bad_target) != bad) begin failures++; $display("bad %0d/%0d", bad_target, bad); end
    checks++; if (contention == 0 || maxwait > L - 1) begin failures++; $display("maxwait %0d", maxwait); end
    $display("delivered=%0d contention cycles=%0d max wait=%0d", got, contention, maxwait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
