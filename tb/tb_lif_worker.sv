// tb_lif_worker: runs 30 timesteps of a worker with 6 configured neurons,
// driving the ring-buffer read port from a formula, and compares the spikes of
// every neuron and timestep with a reference model of the exact-integration
// update. Also checks the compute time of npw + PIPE + 2 cycles per timestep,
// that refractory neurons hold, and that spikes happen.
module tb_lif_worker;
  import neuroaix_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NPW = 8, PIPE = 30, N = 6;
  logic start, busy, done, rb_rd_en, cfg_we, spk_valid;
  logic [TS_W-1:0] ts, rb_rd_ts;
  logic [7:0] npw, rb_rd_slot, cfg_slot, spk_slot;
  logic [31:0] rb_exc, rb_inh, cfg_data;
  cfg_field_e cfg_field;
  lif_param_t prm;

  lif_worker #(.NPW(NPW), .PIPE(PIPE)) dut (.*);

  function automatic longint fx(longint a, longint b); return (a * b) >>> 16; endfunction
  function automatic int in_e(int s, int t); return ((s * 7 + t * 3) % 5) * 32'h4000; endfunction
  function automatic int in_i(int s, int t); return -(((s + t) % 3) * 32'h2000); endfunction

  assign rb_exc = rb_rd_en ? 32'(in_e(rb_rd_slot, rb_rd_ts)) : 32'hDEAD;
  assign rb_inh = rb_rd_en ? 32'(in_i(rb_rd_slot, rb_rd_ts)) : 32'hBEEF;

  int mv[N], mie[N], mii[N], mdc[N], mref[N];
  bit exp_spk[N], got_spk[N];
  int spikes = 0, refr_steps = 0;

  always @(posedge clk) if (spk_valid && spk_slot < N) got_spk[spk_slot] <= 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; ts = 0; npw = N; cfg_we = 0; cfg_slot = 0; cfg_data = 0; cfg_field = FLD_V;
    prm.p22 = 32'h0000_E000; prm.p21ex = 32'h0000_4000; prm.p21in = 32'h0000_4000;
    prm.p20 = 32'h0000_2000; prm.p11ex = 32'h0000_8000; prm.p11in = 32'h0000_8000;
    prm.theta = 32'h0004_0000; prm.v_reset = 32'h0000_0000; prm.t_ref = 8'd2;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < N; s++) begin
      mv[s] = s * 32'h8000; mie[s] = 0; mii[s] = 0; mdc[s] = (s + 1) * 32'h1_0000; mref[s] = 0;
      @(negedge clk); cfg_we = 1; cfg_slot = 8'(s); cfg_field = FLD_V;   cfg_data = 32'(mv[s]);
      @(negedge clk); cfg_field = FLD_IDC; cfg_data = 32'(mdc[s]);
      @(negedge clk); cfg_field = FLD_IEX; cfg_data = 0;
      @(negedge clk); cfg_field = FLD_IIN; cfg_data = 0;
      @(negedge clk); cfg_field = FLD_REF; cfg_data = 0;
    end
    @(negedge clk); cfg_we = 0;
    for (int t = 1; t <= 30; t++) begin
      int cyc;
      for (int s = 0; s < N; s++) begin
        longint v;
        v = mv[s];
        if (mref[s] == 0) v = fx(prm.p22, mv[s]) + fx(prm.p21ex, mie[s]) + fx(prm.p21in, mii[s]) + fx(prm.p20, mdc[s]);
        else begin mref[s]--; refr_steps++; end
        mie[s] = int'(fx(prm.p11ex, mie[s])) + in_e(s, t);
        mii[s] = int'(fx(prm.p11in, mii[s])) + in_i(s, t);
        exp_spk[s] = (int'(v) >= int'(prm.theta));
        if (exp_spk[s]) begin v = prm.v_reset; mref[s] = prm.t_ref; spikes++; end
        mv[s] = int'(v);
        got_spk[s] = 0;
      end
      @(negedge clk); start = 1; ts = TS_W'(t);
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != N + PIPE + 2) begin failures++; $display("t=%0d took %0d cycles", t, cyc); end
      @(negedge clk);
      for (int s = 0; s < N; s++) begin
        checks++;
        if (got_spk[s] != exp_spk[s]) begin
          failures++;
          $display("t=%0d s=%0d spike %0d expected %0d", t, s, got_spk[s], exp_spk[s]);
        end
      end
    end
    checks++; if (spikes == 0 || refr_steps == 0) failures++;
    $display("spikes=%0d refractory steps=%0d", spikes, refr_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
