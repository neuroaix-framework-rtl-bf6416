// lif_worker: computes the neuronal dynamics of up to NPW leaky
// integrate-and-fire neurons with current-based exponential synapses.
//
// On `start` the worker walks its neurons one per cycle, slot 0 to npw-1.
// For each it reads the neuron state (on-chip memory) and the lumped
// excitatory and inhibitory inputs of timestep `ts` from its ring buffer,
// and applies the exact-exponential-integration update:
//   if ref == 0:  V <- p22*V + p21ex*Iex + p21in*Iin + p20*Idc   else ref <- ref-1
//   Iex <- p11ex*Iex + in_exc,   Iin <- p11in*Iin + in_inh
//   if V >= theta: spike, V <- v_reset, ref <- t_ref
// The result travels through a PIPE-stage pipeline before it is written
// back and the spike (if any) leaves on spk_valid/spk_slot. `done` pulses
// once the last neuron is written back, npw + PIPE + 2 cycles after the
// cycle `start` is sampled (one cycle to take the start, one to flag the
// end), matching the (255+30)-cycle computation time of a full worker in the
// document (255 neurons, 30 stages). The document computes the update in
// 32-bit floating point; this design uses Q16.16 fixed point throughout
// (one multiply-shift per term), the main departure of this block.
// Neuron state is written through the cfg_* port while the worker is idle;
// Idc holds the external (DC) stimulus of each neuron.
module lif_worker
  import neuroaix_pkg::*;
#(
  parameter int unsigned NPW  = 255,
  parameter int unsigned PIPE = 30
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [TS_W-1:0]  ts,
  input  logic [7:0]       npw,
  input  lif_param_t       prm,
  // ring buffer read port
  output logic             rb_rd_en,
  output logic [7:0]       rb_rd_slot,
  output logic [TS_W-1:0]  rb_rd_ts,
  input  logic [31:0]      rb_exc,
  input  logic [31:0]      rb_inh,
  // configuration of neuron state
  input  logic             cfg_we,
  input  logic [7:0]       cfg_slot,
  input  cfg_field_e       cfg_field,
  input  logic [31:0]      cfg_data,
  // spikes
  output logic             spk_valid,
  output logic [7:0]       spk_slot,
  output logic             busy,
  output logic             done
);
  typedef struct packed {
    logic               vld;
    logic [7:0]         slot;
    logic               spike;
    logic signed [31:0] v;
    logic signed [31:0] iex;
    logic signed [31:0] iin;
    logic [7:0]         refr;
  } stage_t;

  logic signed [31:0] v_mem   [NPW];
  logic signed [31:0] iex_mem [NPW];
  logic signed [31:0] iin_mem [NPW];
  logic signed [31:0] idc_mem [NPW];
  logic        [7:0]  ref_mem [NPW];

  logic       issuing;
  logic [7:0] cnt_q;
  logic [TS_W-1:0] ts_q;
  stage_t     s0;
  stage_t     pipe_q [PIPE];
  stage_t     wb;

  assign issuing    = busy && (cnt_q < npw) && (32'(cnt_q) < NPW);
  assign rb_rd_en   = issuing;
  assign rb_rd_slot = cnt_q;
  assign rb_rd_ts   = ts_q;

  // Neuron update (first pipeline stage).
  always_comb begin
    logic signed [31:0] v, iex, iin, idc;
    logic [7:0]         r;
    v   = v_mem[cnt_q];
    iex = iex_mem[cnt_q];
    iin = iin_mem[cnt_q];
    idc = idc_mem[cnt_q];
    r   = ref_mem[cnt_q];
    s0  = '0;
    s0.vld  = issuing;
    s0.slot = cnt_q;
    if (r == 8'd0)
      v = qmul(prm.p22, v) + qmul(prm.p21ex, iex) + qmul(prm.p21in, iin) + qmul(prm.p20, idc);
    else
      r = r - 8'd1;
    iex = qmul(prm.p11ex, iex) + $signed(rb_exc);
    iin = qmul(prm.p11in, iin) + $signed(rb_inh);
    if (v >= prm.theta) begin
      s0.spike = 1'b1;
      v        = prm.v_reset;
      r        = prm.t_ref;
    end
    s0.v    = v;
    s0.iex  = iex;
    s0.iin  = iin;
    s0.refr = r;
  end

  assign wb = pipe_q[PIPE-1];

  // Neuron memories start at zero (FPGA configuration value).
  initial begin
    for (int i = 0; i < NPW; i++) begin
      v_mem[i] = '0; iex_mem[i] = '0; iin_mem[i] = '0; idc_mem[i] = '0; ref_mem[i] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      cnt_q <= '0;
      ts_q  <= '0;
      done  <= 1'b0;
      for (int i = 0; i < PIPE; i++) pipe_q[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        cnt_q <= '0;
        ts_q  <= ts;
      end else if (issuing) begin
        cnt_q <= cnt_q + 8'd1;
      end
      pipe_q[0] <= s0;
      for (int i = 1; i < PIPE; i++) pipe_q[i] <= pipe_q[i-1];
      // finished when everything issued has been written back
      if (busy && !issuing && !(start && !busy)) begin
        logic any;
        any = 1'b0;
        for (int i = 0; i < PIPE; i++) any |= pipe_q[i].vld;
        if (!any) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // Write-back of the state and configuration writes (neuron data memory).
  always_ff @(posedge clk) begin
    if (rst_n && wb.vld) begin
      v_mem[wb.slot]   <= wb.v;
      iex_mem[wb.slot] <= wb.iex;
      iin_mem[wb.slot] <= wb.iin;
      ref_mem[wb.slot] <= wb.refr;
    end
    if (rst_n && cfg_we && !busy && 32'(cfg_slot) < NPW) begin
      case (cfg_field)
        FLD_V:   v_mem[cfg_slot]   <= cfg_data;
        FLD_IEX: iex_mem[cfg_slot] <= cfg_data;
        FLD_IIN: iin_mem[cfg_slot] <= cfg_data;
        FLD_REF: ref_mem[cfg_slot] <= cfg_data[7:0];
        default: idc_mem[cfg_slot] <= cfg_data;
      endcase
    end
  end

  assign spk_valid = wb.vld && wb.spike;
  assign spk_slot  = wb.slot;
endmodule
