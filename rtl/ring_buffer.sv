// ring_buffer: lumped synaptic input of every neuron of one worker for each
// future timestep.
//
// All inputs that reach the same neuron in the same timestep are summed into
// one 32-bit fixed-point word, so the buffer size depends only on the number
// of neurons and on the largest synaptic delay: EXC_DEPTH (64) timesteps for
// excitatory and INH_DEPTH (32) for inhibitory inputs, both from the document.
// A weight's sign selects the buffer (negative = inhibitory), a choice of
// this design. The word of timestep t lives at slot (t mod DEPTH).
//
// Write side: one synaptic input per cycle (8 bytes/cycle, about 1.5 GB/s at
// 189 MHz), accumulated in the cycle it is presented; it is always accepted.
// Read side: the worker presents rd_slot/rd_ts and gets both sums in the same
// cycle; the words are cleared at the clock edge so the slot can be reused
// DEPTH timesteps later. cur_ts is the timestep most recently started: an
// input for cur_ts or earlier is counted in err_late and dropped, one more
// than DEPTH steps ahead is counted in err_overflow and dropped. The error
// counters mirror the document's error registers for late spikes.
module ring_buffer
  import neuroaix_pkg::*;
#(
  parameter int unsigned NPW       = 255,
  parameter int unsigned EXC_DEPTH = 64,
  parameter int unsigned INH_DEPTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [TS_W-1:0]  cur_ts,
  input  logic             in_valid,
  input  syn_in_t          in_syn,
  input  logic             rd_en,
  input  logic [7:0]       rd_slot,
  input  logic [TS_W-1:0]  rd_ts,
  output logic [31:0]      rd_exc,
  output logic [31:0]      rd_inh,
  output logic [15:0]      err_late,
  output logic [15:0]      err_overflow,
  output logic             accepted
);
  localparam int unsigned EW = $clog2(EXC_DEPTH);
  localparam int unsigned IW = $clog2(INH_DEPTH);

  logic [31:0] exc_mem [NPW*EXC_DEPTH];
  logic [31:0] inh_mem [NPW*INH_DEPTH];

  logic [TS_W-1:0] diff;
  logic            inh, late, ovf, wr_ok;
  logic [$clog2(NPW*EXC_DEPTH)-1:0] wa_e, ra_e;
  logic [$clog2(NPW*INH_DEPTH)-1:0] wa_i, ra_i;

  always_comb begin
    diff  = in_syn.ts - cur_ts;
    inh   = in_syn.weight[31];
    late  = (diff == '0) || diff[TS_W-1];
    ovf   = !late && (inh ? (diff > TS_W'(INH_DEPTH)) : (diff > TS_W'(EXC_DEPTH)));
    wr_ok = in_valid && !late && !ovf && (32'(in_syn.slot) < NPW);
    wa_e  = $bits(wa_e)'(32'(in_syn.slot) * EXC_DEPTH + 32'(in_syn.ts[EW-1:0]));
    wa_i  = $bits(wa_i)'(32'(in_syn.slot) * INH_DEPTH + 32'(in_syn.ts[IW-1:0]));
    ra_e  = $bits(ra_e)'(32'(rd_slot) * EXC_DEPTH + 32'(rd_ts[EW-1:0]));
    ra_i  = $bits(ra_i)'(32'(rd_slot) * INH_DEPTH + 32'(rd_ts[IW-1:0]));
    rd_exc = exc_mem[ra_e];
    rd_inh = inh_mem[ra_i];
  end

  assign accepted = wr_ok;

  // Block RAM contents start at zero (FPGA configuration value).
  initial begin
    for (int i = 0; i < NPW*EXC_DEPTH; i++) exc_mem[i] = '0;
    for (int i = 0; i < NPW*INH_DEPTH; i++) inh_mem[i] = '0;
  end

  // Accumulate port and read-and-clear port. They never address the same
  // word: reads are for cur_ts, accepted writes are for later timesteps.
  always_ff @(posedge clk) begin
    if (rst_n && wr_ok && !inh) exc_mem[wa_e] <= exc_mem[wa_e] + in_syn.weight;
    if (rst_n && wr_ok &&  inh) inh_mem[wa_i] <= inh_mem[wa_i] + in_syn.weight;
    if (rst_n && rd_en) begin
      exc_mem[ra_e] <= '0;
      inh_mem[ra_i] <= '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_late     <= '0;
      err_overflow <= '0;
    end else if (in_valid) begin
      if (late) err_late     <= err_late + 1'b1;
      if (ovf)  err_overflow <= err_overflow + 1'b1;
    end
  end

  assert property (@(posedge clk) rd_en |-> !(wr_ok && !inh && wa_e == ra_e));
endmodule
