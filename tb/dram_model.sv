// dram_model: behavioural model of one off-chip memory channel (controller
// and DRAM) holding the synthetic connectome of tb_conn_pkg. Requests
// (start beat address, beat count) are accepted while fewer than 16 are
// queued; the beats of each request come back in request order, one per
// cycle, the first LAT cycles after acceptance. Not synthesizable.
module dram_model
  import neuroaix_pkg::*;
#(
  parameter int STRIDE = 41,
  parameter int LAT    = 20,
  parameter int FAN    = 10,
  parameter int NW     = 10,
  parameter int NPW    = 255,
  parameter int DMAX   = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [MADDR_W-1:0] req_addr,
  input  logic [7:0]         req_beats,
  output logic               rsp_valid,
  input  logic               rsp_ready,
  output logic [BEAT_W-1:0]  rsp_data
);
  import tb_conn_pkg::*;
  typedef struct { longint t; int addr; int beats; } rq_t;
  rq_t q[$];
  longint now = 0;
  int cur_beat = 0;
  int n_req = 0;

  assign req_ready = (q.size() < 16);
  always_comb begin
    rsp_valid = (q.size() != 0) && (now >= q[0].t);
    rsp_data  = rsp_valid ? beat(q[0].addr + cur_beat, STRIDE, FAN, NW, NPW, DMAX) : '0;
  end

  always @(posedge clk) begin
    now <= now + 1;
    if (rst_n) begin
      if (rsp_valid && rsp_ready) begin
        if (cur_beat + 1 == q[0].beats) begin
          cur_beat = 0;
          void'(q.pop_front());
        end else cur_beat++;
      end
      if (req_valid && req_ready) begin
        rq_t r;
        r.t = now + LAT; r.addr = int'(req_addr); r.beats = int'(req_beats);
        q.push_back(r);
        n_req++;
      end
    end
  end
endmodule
