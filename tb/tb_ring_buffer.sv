// tb_ring_buffer: accumulates random excitatory and inhibitory inputs for
// future timesteps into a small ring buffer, advances time and reads every
// neuron of each timestep, comparing with sums kept by the testbench. Also
// sends late and too-far-ahead inputs and checks the error counters, and
// checks that a read clears the word.
module tb_ring_buffer;
  import neuroaix_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NPW = 6, ED = 8, ID = 4;
  logic [TS_W-1:0] cur_ts, rd_ts;
  logic in_valid, rd_en, accepted;
  syn_in_t in_syn;
  logic [7:0] rd_slot;
  logic [31:0] rd_exc, rd_inh;
  logic [15:0] err_late, err_overflow;
  int exp_e [int][int];
  int exp_i [int][int];
  int late_n = 0, ovf_n = 0;

  ring_buffer #(.NPW(NPW), .EXC_DEPTH(ED), .INH_DEPTH(ID)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cur_ts = 0; rd_ts = 0; in_valid = 0; rd_en = 0; rd_slot = 0; in_syn = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 1; t <= 40; t++) begin
      // inputs while timestep t-1 is current
      for (int k = 0; k < 12; k++) begin
        int s, d, w, mode;
        @(negedge clk);
        mode = $urandom % 10;
        s = $urandom % NPW;
        w = int'($urandom % 1000) + 1;
        if (mode < 5)      begin d = 1 + $urandom % ED; end
        else if (mode < 8) begin d = 1 + $urandom % ID; w = -w; end
        else if (mode == 8) begin d = 0; late_n++; end
        else               begin d = ED + 1 + $urandom % 3; ovf_n++; end
        in_syn.slot = 8'(s); in_syn.ts = TS_W'(t - 1 + d); in_syn.weight = 32'(w);
        in_valid = 1;
        if (mode < 5) exp_e[t-1+d][s] = (exp_e[t-1+d].exists(s) ? exp_e[t-1+d][s] : 0) + w;
        else if (mode < 8) exp_i[t-1+d][s] = (exp_i[t-1+d].exists(s) ? exp_i[t-1+d][s] : 0) + w;
      end
      @(negedge clk); in_valid = 0;
      cur_ts = TS_W'(t);
      // read all neurons of timestep t
      for (int s = 0; s < NPW; s++) begin
        int ee, ei;
        @(negedge clk);
        rd_en = 1; rd_slot = 8'(s); rd_ts = TS_W'(t);
        #1;
        ee = (exp_e.exists(t) && exp_e[t].exists(s)) ? exp_e[t][s] : 0;
        ei = (exp_i.exists(t) && exp_i[t].exists(s)) ? exp_i[t][s] : 0;
        checks++;
        if (rd_exc != 32'(ee) || rd_inh != 32'(ei)) begin
          failures++; $display("t=%0d s=%0d exc=%0d/%0d inh=%0d/%0d", t, s, int'(rd_exc), ee, int'(rd_inh), ei);
        end
      end
      @(negedge clk); rd_en = 0;
    end
    // a read word has been cleared: it reads 0 one ring revolution later
    @(negedge clk); rd_en = 0; rd_slot = 0; rd_ts = TS_W'(40 - ED); #1;
    checks++; if (rd_exc != 0) failures++;
    checks++;
    if (int'(err_late) != late_n || int'(err_overflow) != ovf_n) begin
      failures++; $display("late %0d/%0d ovf %0d/%0d", err_late, late_n, err_overflow, ovf_n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
