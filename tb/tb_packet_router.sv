// tb_packet_router: the router of node (1,1) in a 3 x 3 cluster. Every
// input gets a random stream of the packets it can see (own spikes and
// syncs on the local input, neighbour spikes, forwarded spikes and syncs on
// the links, configuration packets everywhere), outputs apply random
// back-pressure. A reference routing function gives the set of outputs of
// every packet; the test checks each copy arrives exactly once with the
// right forward flag, that packets of one input keep their order on every
// output, and that syncs overtake waiting spikes from other inputs.
module tb_packet_router;
  import neuroaix_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NX = 3, NY = 3, NL = 4, LOC = 4, HST = 5;
  logic [3:0] my_x = 1, my_y = 1;
  logic in_valid [NL+2], in_ready [NL+2];
  packet_t in_pkt [NL+2];
  logic out_valid [NL+1], out_ready [NL+1];
  packet_t out_pkt [NL+1];
  logic [31:0] n_forwarded;

  packet_router #(.NX(NX), .NY(NY)) dut (.*);

  packet_t q [NL+2][$];
  int exp_cnt [int];       // (id*8 + out) -> expected copies
  int exp_fwd [int];
  int last_id [NL+2][NL+1];
  int nexp = 0, ngot = 0, nfwd_exp = 0, prio_seen = 0;
  int uid = 1;

  function automatic int port_x(int x); return (x < 1) ? x : x - 1; endfunction
  function automatic int port_y(int y); return NX - 1 + ((y < 1) ? y : y - 1); endfunction

  task automatic add(int inp, packet_t p);
    logic [NL:0] d;
    p.data = 32'(uid * 8 + inp);
    d = '0;
    case (p.typ)
      PKT_SPIKE: begin
        d[LOC] = 1;
        if (p.src_x == 1 && p.src_y == 1) d[3:0] = 4'hF;
        else if (p.src_x == 1 && !p.fwd) d[1:0] = 2'b11;
      end
      PKT_SYNC: if (inp == LOC) d[3:0] = 4'hF; else d[LOC] = 1;
      default: begin
        if (p.dst_x != 1) d[port_x(p.dst_x)] = 1;
        else if (p.dst_y != 1) d[port_y(p.dst_y)] = 1;
        else d[LOC] = 1;
      end
    endcase
    for (int o = 0; o <= NL; o++) if (d[o]) begin
      exp_cnt[uid*8 + o] = 1;
      exp_fwd[uid*8 + o] = (p.typ == PKT_SPIKE && o < NL && p.src_x == 1 && p.src_y != 1) ? 1 : int'(p.fwd);
      if (p.typ == PKT_SPIKE && o < NL && p.src_x == 1 && p.src_y != 1) nfwd_exp++;
      nexp++;
    end
    q[inp].push_back(p);
    uid++;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // generator
  initial begin
    for (int i = 0; i < NL+2; i++) begin in_valid[i] = 0; in_pkt[i] = '0; end
    for (int o = 0; o <= NL; o++) out_ready[o] = 0;
    for (int i = 0; i < NL+2; i++) for (int o = 0; o <= NL; o++) last_id[i][o] = 0;
    for (int n = 0; n < 150; n++)
      for (int i = 0; i < NL+2; i++) begin
        packet_t p; int k;
        p = '0; k = $urandom % 10;
        if (k < 2 || i == HST) begin
          p.typ = PKT_CONFIG; p.dst_x = 4'($urandom % NX); p.dst_y = 4'($urandom % NY);
        end else if (i == LOC) begin
          p.typ = (k < 8) ? PKT_SPIKE : PKT_SYNC; p.src_x = 1; p.src_y = 1;
        end else if (k < 4) begin
          p.typ = PKT_SYNC;
          if (i < 2) begin p.src_x = 4'(i == 0 ? 0 : 2); p.src_y = 1; end
          else begin p.src_x = 1; p.src_y = 4'(i == 2 ? 0 : 2); end
        end else begin
          p.typ = PKT_SPIKE;
          if (i < 2) begin        // row link: own row spike or stage-2 copy
            p.src_x = 4'(i == 0 ? 0 : 2);
            p.src_y = 4'((k % 2) ? 1 : $urandom % NY);
            p.fwd   = (p.src_y != 1);
          end else begin          // column link: stage 1 from the column
            p.src_x = 1; p.src_y = 4'(i == 2 ? 0 : 2);
          end
        end
        add(i, p);
      end
  end

  // drivers and monitors
  always @(negedge clk) begin
    for (int i = 0; i < NL+2; i++) begin
      in_valid[i] = rst_n && q[i].size() != 0 && ($urandom % 4 != 0 || in_valid[i]);
      in_pkt[i]   = (q[i].size() != 0) ? q[i][0] : '0;
    end
    for (int o = 0; o <= NL; o++) out_ready[o] = ($urandom % 3 != 0);
  end

  always @(posedge clk) if (rst_n) begin
    int sync_wait, spike_took;
    sync_wait = 0; spike_took = 0;
    for (int i = 0; i < NL; i++)
      if (in_valid[i] && in_pkt[i].typ == PKT_SYNC) sync_wait++;
    for (int o = 0; o <= NL; o++)
      if (out_valid[o] && out_ready[o]) begin
        int id, inp, key;
        id = int'(out_pkt[o].data) / 8; inp = int'(out_pkt[o].data) % 8;
        key = id * 8 + o;
        checks++;
        if (!exp_cnt.exists(key)) begin failures++; $display("unexpected id %0d on %0d", id, o); end
        else begin
          if (exp_fwd[key] != int'(out_pkt[o].fwd)) begin failures++; $display("fwd flag id %0d", id); end
          exp_cnt.delete(key); ngot++;
        end
        if (id < last_id[inp][o]) begin failures++; $display("order broken in %0d out %0d", inp, o); end
        last_id[inp][o] = id;
      end
    for (int i = 0; i < NL+2; i++) if (in_valid[i] && in_ready[i]) void'(q[i].pop_front());
    // priority: a sync and a spike from different links compete for LOC
    if (dut.req[LOC][0] && dut.req[LOC][2] && ((in_pkt[0].typ == PKT_SYNC) != (in_pkt[2].typ == PKT_SYNC))) begin
      prio_seen++;
      checks++;
      if (dut.grant[LOC][in_pkt[0].typ == PKT_SYNC ? 2 : 0]) begin failures++; $display("sync not first %0d %0d req=%b prio=%b g=%b", in_pkt[0].typ, in_pkt[2].typ, dut.req[LOC], dut.prio, dut.grant[LOC]); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ngot == nexp && nexp > 0);
    repeat (20) @(posedge clk);
    checks++;
    if (exp_cnt.size() != 0) begin failures++; $display("%0d copies missing", exp_cnt.size()); end
    checks++;
    if (int'(n_forwarded) != nfwd_exp || prio_seen == 0) begin
      failures++; $display("forwarded %0d/%0d prio %0d", n_forwarded, nfwd_exp, prio_seen);
    end
    $display("copies=%0d forwarded=%0d priority conflicts=%0d", ngot, nfwd_exp, prio_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
